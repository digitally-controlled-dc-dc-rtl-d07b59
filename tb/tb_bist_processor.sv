// tb_bist_processor -- self-checking testbench of the inductor BIST processor.
//
// Models (behavioural) the analog front end during BIST: a 10 kHz triangular
// test current between I_min and I_max flows through the inductor with both
// power switches off; the sense amplifier output V_DIFF = +-L*slope +
// DCR*I(t) (+ offset) is digitised every 2 us (500 kHz code rate, f_spl 32 MHz)
// with an ADC gain error e; V_SEL is high on the rising ramp. All values are in
// ADC code units. The processor gets the gain correction g = 1/e and the scale
// constants k_l, k_r. Checks per run (several inductances, DCRs, gain errors,
// start phases):
//  * done pulses, err = 0, and the whole test ends within 1.5 triangle periods
//    plus a few codes (5000 sampling clocks, 156 us), inside the 200 us budget;
//  * L and DCR agree with the model within 3 % and 6 % (the codes are window
//    samples of a moving ramp, see the block assumptions);
//  * a reversed V_DIFF polarity sets err.
module tb_bist_processor;
  localparam realtime TCLK = 31250ps;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, code_valid = 1'b0, v_sel = 1'b0;
  logic [12:0] code = '0;
  logic [15:0] gain = 16'd4096, k_l = '0, k_r = '0;
  logic busy, done, err;
  logic signed [13:0] d_ab, d_bc;
  logic [15:0] l_meas, dcr_meas;
  // analog model state
  real ls = 200.0;        // L * slope, code units
  real r_lo = 100.0;      // DCR * I_min
  real r_hi = 160.0;      // DCR * I_max
  real e = 1.0;           // ADC gain error
  real ofs = 1500.0;      // sense-amplifier offset
  real pol = 1.0;
  int  cyc = 0;
  int  phase0 = 0;

  bist_processor dut (.clk(clk), .rst_n(rst_n), .start(start), .code(code), .code_valid(code_valid),
    .v_sel(v_sel), .gain(gain), .k_l(k_l), .k_r(k_r), .busy(busy), .done(done), .err(err),
    .d_ab(d_ab), .d_bc(d_bc), .l_meas(l_meas), .dcr_meas(dcr_meas));

  always #(TCLK / 2) clk = ~clk;

  // triangle: 3200 clocks per period (10 kHz), rising during the first half
  always @(posedge clk) begin
    int p;
    real frac, i_r, v;
    cyc++;
    p = (cyc + phase0) % 3200;
    v_sel <= (p < 1600);
    code_valid <= (cyc % 64 == 0);
    if (cyc % 64 == 0) begin
      frac = (p < 1600) ? p / 1600.0 : (3200 - p) / 1600.0;
      i_r = r_lo + (r_hi - r_lo) * frac;
      v = ((p < 1600) ? pol * ls : -pol * ls) + i_r;
      code <= 13'(int'(ofs + e * v));
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // (L in 0.01 uH, DCR in 0.1 mOhm, gain error)
    real l_list [5]   = '{18.0, 3.7, 22.3, 10.0, 18.0};
    real dcr_list [5] = '{60.0, 15.0, 80.0, 40.0, 60.0};
    real e_list [5]   = '{1.0, 0.85, 1.15, 1.05, 0.92};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (l_list[t]) begin
      int t_start, t_done;
      real lm, rm;
      // code-unit model: L*slope = 20 codes per uH, DCR*dI = 2 codes per mOhm
      ls   = 20.0 * l_list[t];
      r_lo = 3.0 * dcr_list[t];
      r_hi = r_lo + 2.0 * dcr_list[t];
      e    = e_list[t];
      gain = 16'(int'(4096.0 / e));
      k_l  = 16'(int'(100.0 / 40.0 * 4096.0));                 // -> 0.01 uH units
      k_r  = 16'(int'(5.0 / (1.0 - 3.0 / 25.0) * 4096.0));   // -> 0.1 mOhm, ramp loss 3/25
      phase0 = $urandom_range(0, 3199);
      repeat (5) @(negedge clk);
      start = 1'b1; t_start = cyc;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy not set after start");
      while (!done && cyc - t_start < 8000) @(negedge clk);
      t_done = cyc;
      check(done, "BIST did not finish");
      check(t_done - t_start <= 5000, $sformatf("BIST took %0d clocks (> 156 us)", t_done - t_start));
      check(!err, "err set on a valid measurement");
      lm = l_meas / 100.0; rm = dcr_meas / 10.0;
      check(lm > l_list[t] * 0.97 && lm < l_list[t] * 1.03,
            $sformatf("L = %g uH, expected %g", lm, l_list[t]));
      check(rm > dcr_list[t] * 0.94 && rm < dcr_list[t] * 1.06,
            $sformatf("DCR = %g mOhm, expected %g", rm, dcr_list[t]));
      @(negedge clk);
      check(!busy, "busy after done");
    end
    // reversed sense polarity must be flagged
    pol = -1.0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(err, "err not set for reversed V_DIFF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
