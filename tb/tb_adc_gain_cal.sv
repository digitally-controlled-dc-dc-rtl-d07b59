// tb_adc_gain_cal -- self-checking testbench of the ADC gain calibration.
//
// Applies nominal/measured reference-code pairs (gain errors of about -30 %
// to +30 %) and checks the normalising factor g = floor(VREF_NOM * 2^12 /
// VREF_D), saturated to 16 bits. Also checks g = 1.0 after reset, that the
// result appears 27 clocks after the vref_valid pulse (load, 25 quotient bits,
// output register),
// and that a zero code is ignored.
module tb_adc_gain_cal;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, vref_valid = 1'b0;
  logic [12:0] vref_nom = '0, vref_code = '0;
  logic [15:0] gain;
  logic gain_valid;

  adc_gain_cal dut (.clk(clk), .rst_n(rst_n), .vref_nom(vref_nom), .vref_code(vref_code),
                    .vref_valid(vref_valid), .gain(gain), .gain_valid(gain_valid));

  always #15625ps clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [15:0] prev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(gain == 16'd4096 && !gain_valid, "gain must be 1.0 (4096) and not valid after reset");
    for (int n = 0; n < 60; n++) begin
      longint expd;
      int lat;
      vref_nom  = 13'($urandom_range(1500, 4000));
      vref_code = (n == 7) ? 13'd1 : 13'(int'(vref_nom) * $urandom_range(70, 130) / 100);
      expd = (longint'(vref_nom) * 4096) / longint'(vref_code);
      if (expd > 65535) expd = 65535;
      prev = gain;
      @(negedge clk);
      vref_valid = 1'b1;
      @(negedge clk);
      vref_valid = 1'b0;
      lat = 1;
      while (gain == prev && lat < 40 && gain != 16'(expd)) begin @(negedge clk); lat++; end
      check(gain == 16'(expd), $sformatf("g=%0d expected %0d (nom %0d code %0d)", gain, expd, vref_nom, vref_code));
      if (gain != prev) check(lat == 27, $sformatf("latency %0d clocks", lat));
      check(gain_valid, "gain_valid not set");
      repeat (4) @(negedge clk);
    end
    prev = gain;
    vref_code = '0;
    vref_valid = 1'b1;
    @(negedge clk);
    vref_valid = 1'b0;
    repeat (40) @(negedge clk);
    check(gain == prev, "zero reference code must be ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
