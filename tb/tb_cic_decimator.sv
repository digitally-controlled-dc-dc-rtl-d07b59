// tb_cic_decimator -- self-checking testbench of the two-stage CIC decimator.
//
// Drives random and constant-density 1-bit streams at the sampling clock and
// checks every decimated output against an independent reference: a two-stage
// CIC with M = 1 equals an FIR with triangular impulse response of length
// 2R-1 (h[m] = m+1 for m < R, 2R-1-m otherwise) evaluated every R inputs.
// With the implementation's timing the output after edge E covers inputs
// sampled at edges E-2 ... E-2R. Also checks that dout_valid pulses exactly
// every R = 64 clocks (f_s = f_spl/64) and that a constant density k/R gives
// the DC gain R^2 (code = R*k).
module tb_cic_decimator;
  localparam int R = 64;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic [12:0] dout;
  logic dout_valid;
  bit hist [int];
  int e = 0;              // sampling edges since reset release
  int last_valid = -1;
  int dens = -1;          // >=0: constant-density mode, k ones per R

  cic_decimator dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .dout_valid(dout_valid));

  always #15625ps clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int expected(int E);
    int acc = 0;
    for (int m = 0; m <= 2*R-2; m++) begin
      int idx = E - 2 - m;
      int h = (m < R) ? m + 1 : 2*R - 1 - m;
      if (idx >= 1 && hist.exists(idx) && hist[idx]) acc += h;
    end
    return acc % 8192;
  endfunction

  always @(posedge clk) if (rst_n) begin
    e++;
    hist[e] = din;
  end

  always @(negedge clk) if (rst_n) begin
    if (dout_valid) begin
      check(int'(dout) == expected(e), $sformatf("edge %0d: dout=%0d expected %0d", e, dout, expected(e)));
      if (last_valid >= 0) check(e - last_valid == R, $sformatf("valid spacing %0d", e - last_valid));
      if (dens >= 0 && e > 300 + last_dens_change)
        check(int'(dout) == R * dens, $sformatf("DC gain: dout=%0d expected %0d", dout, R * dens));
      last_valid = e;
    end
    // next input bit
    if (dens < 0) din = 1'($urandom);
    else          din = ((e % R) < dens);
  end

  int last_dens_change = 0;

  initial begin
    #10ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (R * 40) @(posedge clk);            // random stream
    for (int k = 0; k <= R; k += 13) begin     // constant densities 0, 13, ... 64
      dens = k; last_dens_change = e;
      repeat (R * 8) @(posedge clk);
    end
    dens = -1;
    repeat (R * 20) @(posedge clk);
    check(checks > 100, "too few outputs observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
