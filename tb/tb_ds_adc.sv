// tb_ds_adc -- self-checking testbench of the digital part of the
// frequency-domain delta-sigma ADC (discriminator + CIC, R = 64, 13 bits).
//
// A behavioural VCO model (square wave of programmable frequency) stands for the
// analog VCO. The ADC code is 2*f_vco/f_spl * R^2; checks, per VCO frequency,
// that settled codes are within +-2 LSB of that value and that a new code
// arrives exactly every 64 sampling clocks (f_s = 32 MHz / 64 = 500 kHz).
module tb_ds_adc;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, fm = 1'b0;
  logic [12:0] code;
  logic code_valid;
  realtime vco_half = 200ns;
  int cyc = 0, last_v = -1;

  ds_adc dut (.clk(clk), .rst_n(rst_n), .fm(fm), .code(code), .code_valid(code_valid));

  always #15625ps clk = ~clk;
  always #(vco_half) fm = ~fm;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && code_valid) begin
    if (last_v >= 0) check(cyc - last_v == 64, $sformatf("code spacing %0d clocks", cyc - last_v));
    last_v = cyc;
  end

  initial begin
    #20ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real f_list [5] = '{0.5e6, 3.3e6, 6.0e6, 9.9e6, 14.2e6};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (f_list[k]) begin
      real expd;
      vco_half = 1s / (2.0 * f_list[k]);
      expd = 2.0 * f_list[k] / 32.0e6 * 4096.0;
      repeat (3) @(posedge code_valid);         // settle (2R-1 sample window)
      repeat (6) begin
        @(posedge code_valid); @(negedge clk);
        check(real'(code) > expd - 2.5 && real'(code) < expd + 2.5,
              $sformatf("code %0d, expected %g at f_vco=%g", code, expd, f_list[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
