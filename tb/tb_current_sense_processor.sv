// tb_current_sense_processor -- self-checking testbench of the lossless
// current-sensing arithmetic (offset calibration + I = (V - offset)*g*k_i/DCR).
//
// A behavioural front-end model delivers one ADC code every 64 sampling
// clocks: code = offset + e * 0.004 * DCR * I (DCR in 0.1 mOhm, I in mA, e the
// ADC gain error). Checks:
//  * offset calibration: with the inputs shorted, the offset register becomes
//    the mean of 4 codes and offset_done pulses once;
//  * no current samples are produced while offset_cal is high or sense_en low;
//  * every sensed current (-200 ... 900 mA, DCR 15 ... 80 mOhm, e 0.85 ... 1.15)
//    is within 1 % + 3 mA of the model, with g = 1/e and k_i = 250;
//  * i_load_valid follows each code by exactly 34 clocks (load, 32 quotient
//    bits, output register), i.e. well inside one 64-clock code period.
module tb_current_sense_processor;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, code_valid = 1'b0, offset_cal = 1'b0, sense_en = 1'b0;
  logic [12:0] code = '0, offset;
  logic [15:0] gain = 16'd4096, k_i = 16'd250, dcr = 16'd600;
  logic offset_done;
  logic signed [15:0] i_load;
  logic i_load_valid;
  int n_done = 0, n_valid = 0;

  current_sense_processor dut (.clk(clk), .rst_n(rst_n), .code(code), .code_valid(code_valid),
    .offset_cal(offset_cal), .sense_en(sense_en), .gain(gain), .k_i(k_i), .dcr(dcr),
    .offset(offset), .offset_done(offset_done), .i_load(i_load), .i_load_valid(i_load_valid));

  always #15625ps clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && offset_done) n_done++;
    if (rst_n && i_load_valid) n_valid++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one code, then wait for the rest of the 64-clock code period
  task automatic send(int c, output int lat);
    @(negedge clk);
    code = 13'(c); code_valid = 1'b1;
    @(negedge clk);
    code_valid = 1'b0;
    lat = -1;
    for (int k = 1; k < 64; k++) begin
      if (i_load_valid && lat < 0) lat = k;
      @(negedge clk);
    end
  endtask

  initial begin
    #20ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int lat, ofs_true;
    real dcr_list [4] = '{600.0, 150.0, 800.0, 420.0};
    real e_list [4]   = '{1.0, 0.85, 1.15, 0.97};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sense_en = 1'b1;
    // offset calibration
    ofs_true = 1234;
    offset_cal = 1'b1;
    for (int k = 0; k < 6; k++) begin
      send(ofs_true + ((k % 2) ? 1 : -1) * (k % 3), lat);
      check(lat < 0, "current sample produced during offset calibration");
    end
    offset_cal = 1'b0;
    check(n_done == 1, $sformatf("offset_done pulsed %0d times", n_done));
    // mean of the first four codes: 1234 + (0 +1 -2 +0)/4 -> floor = 1233
    check(offset == 13'd1233, $sformatf("offset %0d expected 1233", offset));
    foreach (dcr_list[t]) begin
      dcr  = 16'(int'(dcr_list[t]));
      gain = 16'(int'(4096.0 / e_list[t]));
      for (int n = 0; n < 40; n++) begin
        real i_ma, meas;
        i_ma = (n == 0) ? 0.0 : $urandom_range(0, 1100) - 200.0;
        send(int'(1233.0 + e_list[t] * 0.004 * dcr_list[t] * i_ma), lat);
        meas = real'(i_load);
        check(lat == 34, $sformatf("i_load_valid latency %0d", lat));
        check(meas > i_ma - 3.0 - 0.01 * (i_ma < 0 ? -i_ma : i_ma) &&
              meas < i_ma + 3.0 + 0.01 * (i_ma < 0 ? -i_ma : i_ma),
              $sformatf("I = %g mA, expected %g (DCR %g)", meas, i_ma, dcr_list[t] / 10.0));
      end
    end
    sense_en = 1'b0;
    n_valid = 0;
    send(2000, lat);
    check(n_valid == 0, "current sample while sense_en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
