// tb_acmc_controller -- self-checking testbench of the two-loop average-current-
// mode compensator (outer voltage loop G_c_v -> I_REF, inner current loop
// G_c_c -> duty; both Type-II, order 2).
//
// Each switching period the testbench applies a voltage-code pair, then (a few
// clocks later, as the current-sensing divider does) a sensed current. The
// reference is the direct-form difference equation of each loop evaluated with
// 64-bit integers: I_REF = floor(clamp(sum a_k e_v[n-k] - sum b_k I_REF[n-k]) / 2^12) in 0..4095,
// D likewise in 0..511 on e_i = I_REF - I_L (internal values keep 12
// fraction bits, each feedback product floored). Checks every I_REF and D, the one-
// clock latency of each loop, that disable clears both loops, and that both
// saturation limits are reached.
module tb_acmc_controller;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, code_valid = 1'b0, i_load_valid = 1'b0;
  logic [12:0] vref_code = '0, vfb_code = '0;
  logic signed [15:0] i_load = '0, i_ref;
  logic signed [17:0] av [3], bv [2], ac [3], bc [2];
  logic [8:0] duty;
  logic duty_valid;
  longint xv [3], yv [3], xc [3], yc [3];
  int n_dmax = 0, n_dmin = 0, n_imax = 0;

  acmc_controller dut (.clk(clk), .rst_n(rst_n), .enable(enable), .vref_code(vref_code),
    .vfb_code(vfb_code), .code_valid(code_valid), .i_load(i_load), .i_load_valid(i_load_valid),
    .av(av), .bv(bv), .ac(ac), .bc(bc), .i_ref(i_ref), .duty(duty), .duty_valid(duty_valid));

  always #20833ps clk = ~clk;    // 24 MHz

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint step(ref longint xh [3], ref longint yh [3], input longint x,
                                  logic signed [17:0] a [3], logic signed [17:0] b [2], longint ymax);
    longint acc;
    xh[2] = xh[1]; xh[1] = xh[0]; xh[0] = x;
    acc = longint'(a[0]) * xh[0] + longint'(a[1]) * xh[1] + longint'(a[2]) * xh[2]
        - ((longint'(b[0]) * yh[0]) >>> 12) - ((longint'(b[1]) * yh[1]) >>> 12);
    if (acc < 0) acc = 0;
    if (acc > (ymax + 1) * 4096 - 1) acc = (ymax + 1) * 4096 - 1;
    yh[2] = yh[1]; yh[1] = yh[0]; yh[0] = acc;   // clamped, with fraction
    return acc >>> 12;
  endfunction

  task automatic clear_hist();
    for (int i = 0; i < 3; i++) begin xv[i] = 0; yv[i] = 0; xc[i] = 0; yc[i] = 0; end
  endtask

  initial begin
    #20ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint e_iref, e_duty;
    // Type-II sets: integrator pole (b1 = -1) plus a real pole/zero
    av = '{18'sd40000, -18'sd2000, -18'sd36000};
    bv = '{-18'sd5000, 18'sd904};
    ac = '{18'sd3000, -18'sd200, -18'sd2700};
    bc = '{-18'sd4900, 18'sd804};
    clear_hist();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      enable = 1'b1;
      clear_hist();
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        vref_code = 13'd2000;
        vfb_code  = 13'(2000 + $urandom_range(0, 160) - 80 + ((n / 60) % 2) * 40 - 20);
        code_valid = 1'b1;
        e_iref = step(xv, yv, longint'(vref_code) - longint'(vfb_code), av, bv, 4095);
        @(negedge clk);
        code_valid = 1'b0;
        check(longint'(i_ref) == e_iref, $sformatf("I_REF=%0d expected %0d", i_ref, e_iref));
        repeat (3) @(negedge clk);
        check(longint'(i_ref) == e_iref, "I_REF changed without a new voltage code");
        i_load = 16'($signed(int'(i_ref) + $signed($urandom_range(0, 400)) - 200));
        i_load_valid = 1'b1;
        e_duty = step(xc, yc, longint'(i_ref) - longint'(i_load), ac, bc, 511);
        @(negedge clk);
        i_load_valid = 1'b0;
        check(duty_valid, "duty_valid not one clock after i_load_valid");
        check(longint'(duty) == e_duty, $sformatf("D=%0d expected %0d", duty, e_duty));
        if (e_duty == 511) n_dmax++;
        if (e_duty == 0) n_dmin++;
        if (e_iref == 4095) n_imax++;
        repeat (20) @(negedge clk);
      end
      // disable clears both loops
      enable = 1'b0;
      repeat (2) @(negedge clk);
      check(i_ref == 0 && duty == 0, "disable must clear both loops");
    end
    check(n_dmax > 0 && n_dmin > 0, $sformatf("duty limits not reached (%0d/%0d)", n_dmax, n_dmin));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
