// tb_fd_modulator -- self-checking testbench of the frequency discriminator.
//
// A square-wave VCO model (behavioural, real-valued period) drives fm while the
// discriminator samples it at f_spl = 32 MHz. Checks:
//  * cycle-exact: after every sampling edge bit_out equals the XOR of the fm
//    values sampled at the last two edges (two D flip-flops + XOR);
//  * rate: over 4096 samples the density of ones equals 2*f_vco/f_spl within
//    a small tolerance, for several VCO frequencies (the first-order
//    noise-shaped frequency-to-bitstream conversion of the design).
module tb_fd_modulator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, fm = 1'b0, bit_out;
  realtime vco_half = 100ns;
  bit s1 = 1'b0, s2 = 1'b0;

  fd_modulator dut (.clk(clk), .rst_n(rst_n), .fm(fm), .bit_out(bit_out));

  always #15625ps clk = ~clk;                 // 32 MHz
  always #(vco_half) fm = ~fm;                // VCO model

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real f_list [4] = '{1.3e6, 4.0e6, 7.77e6, 12.1e6};
    int ones, errs;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (f_list[k]) begin
      vco_half = 1s / (2.0 * f_list[k]);
      repeat (8) @(negedge clk);
      ones = 0; errs = 0;
      for (int n = 0; n < 4096; n++) begin
        @(posedge clk);
        s2 = s1; s1 = fm;                      // tb copy of the two flip-flops
        @(negedge clk);
        if (n > 2 && bit_out != (s1 ^ s2)) errs++;
        if (bit_out) ones++;
      end
      check(errs == 0, $sformatf("bit_out != XOR of last two samples (%0d errors) at f=%g", errs, f_list[k]));
      begin
        real expd;
        expd = 4096.0 * 2.0 * f_list[k] / 32.0e6;
        check(ones > expd - 4.0 && ones < expd + 4.0,
              $sformatf("ones density %0d, expected %g at f=%g", ones, expd, f_list[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
