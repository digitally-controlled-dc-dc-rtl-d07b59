// tb_tdf2_compensator -- self-checking testbench of the transposed direct-form II
// compensator (default ORDER = 3, the Type-III PID of the voltage-mode loop).
//
// Random coefficient sets (Q12) and random error samples with random gaps are
// applied. The reference is the direct-form difference equation
//   yf[n] = sum a_k x[n-k] - sum b_k ysat[n-k],  y = sat(floor(yf / 2^12))
// evaluated with 64-bit integers on the samples actually accepted. Checks every
// output, that y_valid follows x_valid by exactly one clock, saturation at the
// DPWM range 0..511, and that clear empties the delay line.
module tb_tdf2_compensator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, x_valid = 1'b0;
  logic signed [13:0] x = '0;
  logic signed [17:0] a [4];
  logic signed [17:0] b [3];
  logic signed [11:0] y;
  logic y_valid;
  longint xh [4], yh [4];
  longint exp_y;
  bit pend = 1'b0;
  int sat_lo = 0, sat_hi = 0, mid = 0;

  tdf2_compensator dut (.clk(clk), .rst_n(rst_n), .clear(clear), .x(x), .x_valid(x_valid),
                        .a(a), .b(b), .y(y), .y_valid(y_valid));

  always #15625ps clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic hist_clear();
    for (int i = 0; i < 4; i++) begin xh[i] = 0; yh[i] = 0; end
  endtask

  // reference update for an accepted sample
  function automatic longint ref_step(longint xn);
    longint acc, q;
    for (int i = 3; i > 0; i--) xh[i] = xh[i-1];
    xh[0] = xn;
    acc = 0;
    for (int k = 0; k < 4; k++) acc += longint'(a[k]) * xh[k];
    for (int k = 1; k < 4; k++) acc -= (longint'(b[k-1]) * yh[k-1]) >>> 12;
    if (acc < 0) acc = 0;
    if (acc > 512 * 4096 - 1) acc = 512 * 4096 - 1;
    for (int i = 3; i > 0; i--) yh[i] = yh[i-1];
    yh[0] = acc;                               // clamped, with fraction
    q = acc >>> 12;
    return q;
  endfunction

  task automatic rand_coefs(int scale);
    for (int k = 0; k < 4; k++) a[k] = 18'($signed($urandom_range(0, 2*scale)) - scale);
    for (int k = 0; k < 3; k++) b[k] = 18'($signed($urandom_range(0, 2*scale/2)) - scale/2);
  endtask

  initial begin
    #10ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) a[k] = '0;
    for (int k = 0; k < 3; k++) b[k] = '0;
    hist_clear();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int set = 0; set < 12; set++) begin
      // new coefficient set applied together with clear (as the controller does)
      @(negedge clk);
      rand_coefs((set % 3 == 0) ? 16000 : 6000);
      if (set == 5) begin  // classic type-III-like set: integrator pole
        a[0] = 18'sd9000; a[1] = -18'sd8000; a[2] = -18'sd8800; a[3] = 18'sd8100;
        b[0] = -18'sd4800; b[1] = 18'sd1000; b[2] = -18'sd296;
      end
      clear = 1'b1; x_valid = 1'b0;
      @(negedge clk);
      clear = 1'b0;
      hist_clear();
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        pend = 1'b0;
        if ($urandom_range(0, 3) != 0) begin
          x = 14'($signed($urandom_range(0, 1200)) - 600);
          x_valid = 1'b1;
          exp_y = ref_step(longint'(x));
          pend = 1'b1;
        end
        @(negedge clk);                       // one clock after the sample
        x_valid = 1'b0;
        if (pend) begin
          check(y_valid == 1'b1, "y_valid not one clock after x_valid");
          check(longint'(y) == exp_y, $sformatf("y=%0d expected %0d", y, exp_y));
          if (exp_y == 0) sat_lo++; else if (exp_y == 511) sat_hi++; else mid++;
        end else begin
          check(y_valid == 1'b0, "y_valid without x_valid");
        end
      end
    end
    check(sat_lo > 10 && sat_hi > 10 && mid > 100,
          $sformatf("coverage: low %0d high %0d mid %0d", sat_lo, sat_hi, mid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
