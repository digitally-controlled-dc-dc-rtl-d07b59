// tb_dpwm_hybrid -- self-checking testbench of the 9-bit hybrid DPWM.
//
// CK_REF = 16 MHz (T = 62.5 ns). A behavioural 16-cell delay line stands for the
// locked DLL: each cell delays by T/16, so taps[k] is CK_REF delayed by k*T/16. For every
// switching period the testbench checks, against the code written during the
// previous period:
//  * the period is 32 CK_REF cycles (2 us, f_sw = 500 kHz) and CK_SW rises with
//    the pulse;
//  * the pulse starts at the period start and its width is
//    MSB*T + LSB*T/16 = code * 3.906 ns (within 5 ps); code 0 gives no pulse.
// Codes: a full ascending sweep 0..511, a descending sweep and random codes.
// Known limitation (documented in the block assumptions): a code with MSB = 31
// directly followed by one with MSB = 0 is not used.
module tb_dpwm_hybrid;
  localparam realtime T = 62500ps;
  int checks = 0, failures = 0;
  logic ck_ref = 1'b0, rst_n = 1'b0;
  logic [8:0] duty = '0;
  logic [15:0] taps;
  logic pwm, ck_sw, cr, ck_mux, period_start;
  realtime t_rise = -1.0, last_w = 0.0;
  int nfall = 0;

  dpwm_hybrid dut (.ck_ref(ck_ref), .rst_n(rst_n), .duty(duty), .taps(taps), .pwm(pwm),
                   .ck_sw(ck_sw), .cr(cr), .ck_mux(ck_mux), .period_start(period_start));

  always #(T / 2) ck_ref = ~ck_ref;

  // DLL model: 16 equally spaced delayed copies of CK_REF (transport delays)
  assign taps[0] = ck_ref;
  for (genvar k = 1; k < 16; k++) begin : g_tap
    always @(taps[k-1]) taps[k] <= #(T / 16) taps[k-1];   // one delay cell
  end

  always @(posedge pwm) t_rise = $realtime;
  always @(negedge pwm) begin last_w = $realtime - t_rise; nfall++; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int codes [$];
    int exp_prev = 0, exp_cur = 0;
    realtime t0 = 0.0, t0_prev = -1.0;
    for (int c = 0; c < 512; c++) codes.push_back(c);
    for (int c = 511; c >= 0; c -= 3) codes.push_back(c);
    for (int n = 0; n < 300; n++) codes.push_back($urandom_range(0, 511));
    for (int n = 1; n < codes.size(); n++)            // avoid MSB 31 -> MSB 0
      if (codes[n-1] >= 496 && codes[n] < 16) codes[n] += 16;
    repeat (3) @(negedge ck_ref);
    rst_n = 1'b1;
    @(posedge period_start);
    #1ns duty = 9'(codes[0]);
    foreach (codes[i]) begin
      @(posedge period_start);
      t0 = $realtime;
      exp_prev = exp_cur;
      exp_cur = codes[i];
      #1ns;
      if (t0_prev >= 0.0) check(t0 - t0_prev > 32 * T - 1ps && t0 - t0_prev < 32 * T + 1ps, $sformatf("period %0t", t0 - t0_prev));
      check(ck_sw == 1'b1, "CK_SW not high at period start");
      if (i > 0) begin
        // pulse of the previous period
        if (exp_prev == 0) check(nfall == 0, "pulse for code 0");
        else begin
          check(nfall == 1, $sformatf("code %0d: %0d pulses", exp_prev, nfall));
          check(last_w > exp_prev * T / 16 - 5ps && last_w < exp_prev * T / 16 + 5ps,
                $sformatf("code %0d: width %0t expected %0t", exp_prev, last_w, exp_prev * T / 16));
        end
      end
      // rising edge of the current period
      if (exp_cur != 0) check(t_rise > t0 - 1ps && t_rise < t0 + 1ps && pwm, $sformatf("code %0d: pulse did not start with the period", exp_cur));
      else check(!pwm, "pwm high for code 0");
      nfall = 0;
      t0_prev = t0;
      if (i + 1 < codes.size()) duty = 9'(codes[i+1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
