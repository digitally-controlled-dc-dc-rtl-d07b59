// tb_buck_converters_top -- end-to-end testbench of the top level: both
// converters run at the same time, each in closed loop with a behavioural
// model of its analog parts (power stage, LC filter, sensing RC filter, sense
// amplifier, VCOs, triangular BIST current source, delay lines; the models are
// the ones of tb_vmc_buck_controller and tb_acmc_buck_controller, copied below
// under their own names). The top is used with its default parameters, so this
// is also the full-size testbench.
//
// Voltage-mode converter (32 MHz / 16 MHz / 500 kHz), sequence and checks:
//  * start-up BIST within 200 us, L within 5 % of 18 uH, DCR within 10 % of
//    60 mOhm, ADC gain factor within 1 % of 1/e; SA offset calibration;
//  * regulation to 3.3 V +-40 mV at 300 mA and 750 mA; sensed current within 10 %;
//  * coefficient table switch to set 1 at 750 mA and back to set 0 at 300 mA;
//  * restart: a second BIST / offset calibration / regulation sequence.
// Average-current-mode converter (24 MHz / 12 MHz / 375 kHz):
//  * MDLL lock (delay line = one CK_REF period within 0.5 ns on average);
//  * SA offset calibration; regulation to 3.3 V +-40 mV at 200 mA and 900 mA,
//    sensed current within 10 %, I_REF tracking the load.
// Both: no shoot-through, switching periods 2 us and 2.667 us.
// At the end the number of times each mechanism was seen is checked:
// 2 BISTs, 3 offset calibrations, 2 table switches, 1 MDLL lock, 4 regulated
// load points.
module tb_buck_converters_top;
  import buck_pkg::*;
  int checks = 0, failures = 0;
  // ---- VMC side ----
  logic v_clk = 1'b0, v_ck_ref = 1'b0, rst_n = 1'b0;
  logic v_fm_fb, v_fm_ref, v_fm_diff, v_sel;
  logic [15:0] v_taps;
  logic v_restart = 1'b0, v_upd = 1'b0;
  logic [12:0] v_vref_nom;
  logic [15:0] v_k_l, v_k_r, v_k_i;
  logic v_cwr = 1'b0, v_twr = 1'b0;
  logic [0:0] v_cset = '0, v_tidx = '0, v_sel_out;
  logic [2:0] v_cidx = '0;
  coef_t v_cdata = '0;
  logic [15:0] v_tdata = '0;
  logic v_pwm, v_n1, v_n2, v_ck_sw, v_bist_mode, v_offset_sw, v_bist_done, v_bist_err, v_bist_to, v_ilv;
  vmc_mode_e v_mode;
  logic [15:0] v_l, v_dcr, v_gain;
  logic signed [15:0] v_il;
  logic [8:0] v_duty;
  logic [12:0] v_cfb, v_cref, v_cdiff;
  // ---- ACMC side ----
  logic a_clk = 1'b0, a_ck_ref = 1'b0;
  logic a_fm_fb, a_fm_ref, a_fm_diff, a_ck_fb;
  logic [15:0] a_taps;
  logic a_en = 1'b0, a_ofs = 1'b0;
  logic [12:0] a_vref_nom;
  logic [15:0] a_k_i, a_dcr;
  coef_t av [3], bv [2], ac [3], bc [2];
  logic a_pwm, a_n1, a_n2, a_ck_sw, a_ofs_done, a_ilv;
  logic [4:0] a_isw;
  logic signed [15:0] a_il, a_iref;
  logic [8:0] a_duty;
  logic [12:0] a_cfb, a_cref;
  // mechanism counters
  int n_bist = 0, n_ofs = 0, n_tab = 0, n_lock = 0, n_reg = 0, shoot = 0;

  buck_converters_top dut (
    .rst_n(rst_n),
    .vmc_clk_spl(v_clk), .vmc_ck_ref(v_ck_ref), .vmc_fm_fb(v_fm_fb), .vmc_fm_ref(v_fm_ref),
    .vmc_fm_diff(v_fm_diff), .vmc_dll_taps(v_taps), .vmc_v_sel(v_sel), .vmc_restart(v_restart),
    .vmc_pid_update_en(v_upd), .vmc_vref_nom(v_vref_nom), .vmc_k_l(v_k_l), .vmc_k_r(v_k_r),
    .vmc_k_i(v_k_i), .vmc_coef_wr_en(v_cwr), .vmc_coef_wr_set(v_cset), .vmc_coef_wr_idx(v_cidx),
    .vmc_coef_wr_data(v_cdata), .vmc_thr_wr_en(v_twr), .vmc_thr_idx(v_tidx), .vmc_thr_data(v_tdata),
    .vmc_pwm(v_pwm), .vmc_n1(v_n1), .vmc_n2(v_n2), .vmc_ck_sw(v_ck_sw), .vmc_mode(v_mode),
    .vmc_bist_mode(v_bist_mode), .vmc_offset_sw(v_offset_sw), .vmc_l_meas(v_l), .vmc_dcr_meas(v_dcr),
    .vmc_bist_done(v_bist_done), .vmc_bist_err(v_bist_err), .vmc_bist_timeout(v_bist_to),
    .vmc_i_load(v_il), .vmc_i_load_valid(v_ilv), .vmc_pid_sel(v_sel_out), .vmc_duty(v_duty),
    .vmc_vfb_code(v_cfb), .vmc_vref_code(v_cref), .vmc_vdiff_code(v_cdiff), .vmc_adc_gain(v_gain),
    .acmc_clk_spl(a_clk), .acmc_ck_ref(a_ck_ref), .acmc_fm_fb(a_fm_fb), .acmc_fm_ref(a_fm_ref),
    .acmc_fm_diff(a_fm_diff), .acmc_icdl_taps(a_taps), .acmc_ck_fb(a_ck_fb), .acmc_enable(a_en),
    .acmc_offset_cal(a_ofs), .acmc_vref_nom(a_vref_nom), .acmc_k_i(a_k_i), .acmc_dcr(a_dcr),
    .acmc_av(av), .acmc_bv(bv), .acmc_ac(ac), .acmc_bc(bc),
    .acmc_pwm(a_pwm), .acmc_n1(a_n1), .acmc_n2(a_n2), .acmc_ck_sw(a_ck_sw), .acmc_i_sw(a_isw),
    .acmc_offset_done(a_ofs_done), .acmc_i_load(a_il), .acmc_i_load_valid(a_ilv), .acmc_i_ref(a_iref),
    .acmc_duty(a_duty), .acmc_vfb_code(a_cfb), .acmc_vref_code(a_cref));

  top_tb_vmc_analog vana (.clk_spl(v_clk), .ck_ref(v_ck_ref), .n1(v_n1), .n2(v_n2),
    .bist_mode(v_bist_mode), .offset_sw(v_offset_sw), .fm_fb(v_fm_fb), .fm_ref(v_fm_ref),
    .fm_diff(v_fm_diff), .v_sel(v_sel), .dll_taps(v_taps));
  top_tb_acmc_analog aana (.clk_spl(a_clk), .ck_ref(a_ck_ref), .n1(a_n1), .n2(a_n2),
    .offset_sw(a_ofs), .i_sw(a_isw), .fm_fb(a_fm_fb), .fm_ref(a_fm_ref), .fm_diff(a_fm_diff),
    .icdl_taps(a_taps), .ck_fb(a_ck_fb));

  always #15625ps v_clk = ~v_clk;                 // 32 MHz
  always @(posedge v_clk) v_ck_ref <= ~v_ck_ref;  // 16 MHz
  always #20833ps a_clk = ~a_clk;                 // 24 MHz
  always @(posedge a_clk) a_ck_ref <= ~a_ck_ref;  // 12 MHz

  always @(v_n1 or v_n2) #1ps if (!v_n1 && v_n2) shoot++;
  always @(a_n1 or a_n2) #1ps if (!a_n1 && a_n2) shoot++;
  always @(posedge v_clk) if (rst_n && v_bist_done) n_bist++;
  always @(posedge a_clk) if (rst_n && a_ofs_done) n_ofs++;
  always @(negedge v_offset_sw) if (rst_n) n_ofs++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic v_wr_coef(int s, int idx, int val);
    @(negedge v_clk);
    v_cwr = 1'b1; v_cset = 1'(s); v_cidx = 3'(idx); v_cdata = coef_t'(val);
    @(negedge v_clk);
    v_cwr = 1'b0;
  endtask

  task automatic v_measure(int n, output real v_avg, output real i_avg);
    v_avg = 0.0; i_avg = 0.0;
    for (int k = 0; k < n; k++) begin
      @(posedge v_ilv);
      v_avg += vana.vout; i_avg += real'(v_il);
    end
    v_avg /= n; i_avg /= n;
  endtask

  task automatic a_measure(int n, output real v_avg, output real i_avg, output real r_avg);
    v_avg = 0.0; i_avg = 0.0; r_avg = 0.0;
    for (int k = 0; k < n; k++) begin
      @(posedge a_ilv);
      v_avg += aana.vout; i_avg += real'(a_il); r_avg += real'(a_iref);
    end
    v_avg /= n; i_avg /= n; r_avg /= n;
  endtask

  task automatic v_startup();
    realtime t0;
    wait (v_bist_mode);
    t0 = $realtime;
    wait (v_bist_done);
    check($realtime - t0 <= 200us, $sformatf("VMC BIST took %0t", $realtime - t0));
    @(negedge v_clk);
    $display("INFO: VMC BIST L %0d (0.01 uH) DCR %0d (0.1 mOhm) g %0d", v_l, v_dcr, v_gain);
    check(!v_bist_err && !v_bist_to, $sformatf("VMC BIST error %0d timeout %0d", v_bist_err, v_bist_to));
    check(v_l > 1710 && v_l < 1890, $sformatf("VMC L = %0d, expected 1800", v_l));
    check(v_dcr > 540 && v_dcr < 660, $sformatf("VMC DCR = %0d, expected 600", v_dcr));
    check(v_gain > 16'(int'(4096.0 / 0.93 * 0.99)) && v_gain < 16'(int'(4096.0 / 0.93 * 1.01)),
          $sformatf("VMC ADC gain factor %0d", v_gain));
    wait (v_mode == MODE_REGULATE);
  endtask

  initial begin
    #40ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    v_vref_nom = 13'(int'(4096.0 * 2.0 * (2.0e6 + 3.0e6 * 1.98) / 32.0e6 + 0.5));
    v_k_l = 16'(int'(1.0e8 / (2.0 * 800.0 * 40.0 * 768.0) * 4096.0));
    v_k_r = 16'(int'(1.0e4 / (40.0 * 768.0 * 0.04 * (1.0 - 3.0 / 25.0)) * 4096.0));
    v_k_i = 16'(int'(1.0e7 / (40.0 * 768.0) + 0.5));
    a_vref_nom = 13'(int'(4096.0 * 2.0 * (2.0e6 + 3.0e6 * 1.98) / 24.0e6 + 0.5));
    a_k_i = 16'(int'(1.0e7 / (10.0 * 1024.0) + 0.5));
    a_dcr = 16'd620;
    av = '{18'sd37247, -18'sd37000, 18'sd0};  bv = '{-18'sd4096, 18'sd0};
    ac = '{18'sd495,   -18'sd475,   18'sd0};  bc = '{-18'sd4096, 18'sd0};
    vana.iload = 0.0; aana.iload = 0.0;
    repeat (3) @(negedge v_clk);
    rst_n = 1'b1;
    fork
      // ================= voltage-mode converter =================
      begin
        real v, i;
        v_wr_coef(0, 0, 6);  v_wr_coef(0, 4, -4096);
        v_wr_coef(1, 0, 9);  v_wr_coef(1, 4, -4096);
        @(negedge v_clk);
        v_twr = 1'b1; v_tidx = '0; v_tdata = 16'd500;
        @(negedge v_clk);
        v_twr = 1'b0;
        v_startup();
        vana.iload = 0.3;
        repeat (1000) @(posedge v_ilv);
        v_measure(100, v, i);
        $display("INFO: VMC 300 mA: VOUT %g sensed %g", v, i);
        check(v > 3.26 && v < 3.34, $sformatf("VMC VOUT %g at 300 mA", v));
        check(i > 270.0 && i < 330.0, $sformatf("VMC sensed %g mA at 300 mA", i));
        if (v > 3.26 && v < 3.34) n_reg++;
        v_upd = 1'b1;
        vana.iload = 0.75;
        repeat (1000) @(posedge v_ilv);
        @(negedge v_clk);
        check(v_sel_out == 1'b1, "VMC set 1 not selected at 750 mA");
        if (v_sel_out == 1'b1) n_tab++;
        v_measure(100, v, i);
        $display("INFO: VMC 750 mA: VOUT %g sensed %g", v, i);
        check(v > 3.26 && v < 3.34, $sformatf("VMC VOUT %g at 750 mA", v));
        check(i > 675.0 && i < 825.0, $sformatf("VMC sensed %g mA at 750 mA", i));
        if (v > 3.26 && v < 3.34) n_reg++;
        vana.iload = 0.3;
        repeat (300) @(posedge v_ilv);
        @(negedge v_clk);
        check(v_sel_out == 1'b0, "VMC set 0 not selected back at 300 mA");
        if (v_sel_out == 1'b0) n_tab++;
        begin
          realtime ta, tb;
          @(posedge v_ck_sw); ta = $realtime;
          @(posedge v_ck_sw); tb = $realtime;
          check(tb - ta > 2us - 1ps && tb - ta < 2us + 1ps, $sformatf("VMC CK_SW period %0t", tb - ta));
        end
        // restart: load off, new self-test, back to regulation
        vana.iload = 0.0;
        @(negedge v_clk);
        v_restart = 1'b1;
        @(negedge v_clk);
        v_restart = 1'b0;
        v_startup();
        vana.iload = 0.3;
        repeat (1500) @(posedge v_ilv);
        v_measure(100, v, i);
        $display("INFO: VMC after restart: VOUT %g sensed %g", v, i);
        check(v > 3.26 && v < 3.34, $sformatf("VMC VOUT %g after restart", v));
      end
      // ============== average-current-mode converter ==============
      begin
        real v, i, r, isw_avg;
        repeat (200) @(posedge a_ck_ref);
        isw_avg = 0.0;
        for (int k = 0; k < 64; k++) begin @(posedge a_ck_ref); isw_avg += real'(a_isw); end
        isw_avg /= 64.0;
        check(16.0 * (6.0 - 0.05 * isw_avg) > 82.8 && 16.0 * (6.0 - 0.05 * isw_avg) < 83.8,
              $sformatf("ACMC delay line not locked (I_SW avg %g)", isw_avg));
        if (16.0 * (6.0 - 0.05 * isw_avg) > 82.8 && 16.0 * (6.0 - 0.05 * isw_avg) < 83.8) n_lock++;
        a_ofs = 1'b1;
        wait (a_ofs_done);
        repeat (2) @(negedge a_clk);
        a_ofs = 1'b0;
        aana.iload = 0.2;
        a_en = 1'b1;
        begin
          int n = 0;
          // the first current sample must follow within a few code periods
          while (!a_ilv && n < 4000) begin @(posedge a_clk); n++; end
          if (n >= 4000) begin
            check(1'b0, "ACMC produced no current sample while enabled");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
        repeat (1500) @(posedge a_ilv);
        a_measure(150, v, i, r);
        $display("INFO: ACMC 200 mA: VOUT %g sensed %g I_REF %g", v, i, r);
        check(v > 3.26 && v < 3.34, $sformatf("ACMC VOUT %g at 200 mA", v));
        check(i > 180.0 && i < 220.0, $sformatf("ACMC sensed %g mA at 200 mA", i));
        check(r > 150.0 && r < 250.0, $sformatf("ACMC I_REF %g at 200 mA", r));
        if (v > 3.26 && v < 3.34) n_reg++;
        aana.iload = 0.9;
        repeat (1500) @(posedge a_ilv);
        a_measure(150, v, i, r);
        $display("INFO: ACMC 900 mA: VOUT %g sensed %g I_REF %g", v, i, r);
        check(v > 3.26 && v < 3.34, $sformatf("ACMC VOUT %g at 900 mA", v));
        check(i > 810.0 && i < 990.0, $sformatf("ACMC sensed %g mA at 900 mA", i));
        check(r > 800.0 && r < 1000.0, $sformatf("ACMC I_REF %g at 900 mA", r));
        if (v > 3.26 && v < 3.34) n_reg++;
        begin
          realtime ta, tb;
          @(posedge a_ck_sw); ta = $realtime;
          @(posedge a_ck_sw); tb = $realtime;
          check(tb - ta > 2666ns && tb - ta < 2667ns, $sformatf("ACMC CK_SW period %0t", tb - ta));
        end
      end
    join
    check(shoot == 0, $sformatf("%0d shoot-through events", shoot));
    $display("INFO: mechanisms: BIST %0d, offset calibrations %0d, table switches %0d, MDLL locks %0d, regulated points %0d",
             n_bist, n_ofs, n_tab, n_lock, n_reg);
    check(n_bist == 2, $sformatf("BIST runs %0d, expected 2", n_bist));
    check(n_ofs == 3, $sformatf("offset calibrations %0d, expected 3", n_ofs));
    check(n_tab == 2, $sformatf("coefficient table switches %0d, expected 2", n_tab));
    check(n_lock == 1, "MDLL lock not seen");
    check(n_reg == 4, $sformatf("regulated load points %0d, expected 4", n_reg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Behavioural model of the VMC converter's analog parts (same as in tb_vmc_buck_controller).
module top_tb_vmc_analog (
  input  logic clk_spl,
  input  logic ck_ref,
  input  logic n1,
  input  logic n2,
  input  logic bist_mode,
  input  logic offset_sw,
  output logic fm_fb,
  output logic fm_ref,
  output logic fm_diff,
  output logic v_sel,
  output logic [15:0] dll_taps
);
  localparam real DT = 31.25e-9;
  localparam real L = 18.0e-6, DCR = 0.06, C = 22.0e-6, ESR = 0.07, VIN = 5.0, RDS = 0.15;
  localparam real H = 0.6, VREF = 1.98, G = 40.0, VOS = 0.005, E = 0.93;
  real iload = 0.0;
  real il = 0.0, vc = 0.0, vout = 0.0, vcs = 0.0, vdiff = 0.0, vl = 0.0;
  real t_tri = 0.0;
  realtime h_fb = 100ns, h_ref = 100ns, h_diff = 100ns;

  initial begin fm_fb = 1'b0; fm_ref = 1'b0; fm_diff = 1'b0; v_sel = 1'b0; end

  function automatic realtime half_period(real volts);
    real f;
    f = E * (2.0e6 + 3.0e6 * volts);
    if (f < 1.0e5) f = 1.0e5;
    return 1s / (2.0 * f);
  endfunction

  always @(posedge clk_spl) begin
    real vsw, il_new;
    if (bist_mode) begin
      // triangular test current, 10 kHz, 0 ... 40 mA
      real ph;
      t_tri += DT;
      ph = t_tri * 1.0e4 - $floor(t_tri * 1.0e4);
      il_new = (ph < 0.5) ? 0.04 * 2.0 * ph : 0.04 * 2.0 * (1.0 - ph);
      v_sel <= (ph < 0.5);
      vl = L * (il_new - il) / DT + DCR * il_new;
      il = il_new;
      vcs = 0.0;
    end else begin
      if (!n1)      vsw = VIN - il * RDS;
      else if (n2)  vsw = -il * RDS;
      else          vsw = (il > 0.0) ? -0.7 : VIN + 0.7;
      vl = vsw - vout;
      il += (vl - il * DCR) / L * DT;
      vcs += (vl - vcs) * DT / (L / DCR);          // matched RC filter: vcs ~ DCR * iL
      v_sel <= 1'b0;
    end
    vc += (il - iload) / C * DT;
    if (vc < 0.0 && il < iload) vc = 0.0;
    vout = vc + ESR * (il - iload);
    if (offset_sw)      vdiff = 0.0;
    else if (bist_mode) vdiff = vl;
    else                vdiff = vcs;
    h_fb   = half_period(H * vout);
    h_ref  = half_period(VREF);
    h_diff = half_period(1.0 + G * (vdiff + VOS));
  end

  always #(h_fb)   fm_fb   = ~fm_fb;
  always #(h_ref)  fm_ref  = ~fm_ref;
  always #(h_diff) fm_diff = ~fm_diff;

  // locked DLL: 16 cells of T_ref/16
  assign dll_taps[0] = ck_ref;
  for (genvar k = 1; k < 16; k++) begin : g_cell
    always @(dll_taps[k-1]) dll_taps[k] <= #(62500ps / 16) dll_taps[k-1];
  end
endmodule

// Behavioural model of the ACMC converter's analog parts (same as in tb_acmc_buck_controller).
module top_tb_acmc_analog (
  input  logic clk_spl,
  input  logic ck_ref,
  input  logic n1,
  input  logic n2,
  input  logic offset_sw,
  input  logic [4:0] i_sw,
  output logic fm_fb,
  output logic fm_ref,
  output logic fm_diff,
  output logic [15:0] icdl_taps,
  output logic ck_fb
);
  localparam real DT = 41.6667e-9;
  localparam real L = 18.0e-6, DCR = 0.062, C = 330.0e-6, ESR = 0.025, VIN = 5.0, RDS = 0.15;
  localparam real H = 0.6, VREF = 1.98, G = 10.0, VOS = 0.005, E = 1.06;
  real iload = 0.0;
  real il = 0.0, vc = 0.0, vout = 0.0, vcs = 0.0, vdiff = 0.0;
  realtime h_fb = 100ns, h_ref = 100ns, h_diff = 100ns;
  realtime cell_dly;

  initial begin fm_fb = 1'b0; fm_ref = 1'b0; fm_diff = 1'b0; end

  function automatic realtime half_period(real volts);
    real f;
    f = E * (2.0e6 + 3.0e6 * volts);
    if (f < 1.0e5) f = 1.0e5;
    return 1s / (2.0 * f);
  endfunction

  always @(posedge clk_spl) begin
    real vsw, vl;
    if (!n1)      vsw = VIN - il * RDS;
    else if (n2)  vsw = -il * RDS;
    else          vsw = (il > 0.0) ? -0.7 : VIN + 0.7;
    vl = vsw - vout;
    il += (vl - il * DCR) / L * DT;
    vcs += (vl - vcs) * DT / (L / DCR);
    vc += (il - iload) / C * DT;
    if (vc < 0.0 && il < iload) vc = 0.0;
    vout = vc + ESR * (il - iload);
    vdiff = offset_sw ? 0.0 : vcs;
    h_fb   = half_period(H * vout);
    h_ref  = half_period(VREF);
    h_diff = half_period(1.0 + G * (vdiff + VOS));
  end

  always #(h_fb)   fm_fb   = ~fm_fb;
  always #(h_ref)  fm_ref  = ~fm_ref;
  always #(h_diff) fm_diff = ~fm_diff;

  // current-controlled delay line
  assign cell_dly = (6.0 - 0.05 * real'(i_sw)) * 1ns;
  assign icdl_taps[0] = ck_ref;
  for (genvar k = 1; k < 16; k++) begin : g_cell
    always @(icdl_taps[k-1]) icdl_taps[k] <= #(cell_dly) icdl_taps[k-1];
  end
  always @(icdl_taps[15]) ck_fb <= #(cell_dly) icdl_taps[15];
endmodule
