// tb_vmc_buck_controller -- end-to-end testbench of the voltage-mode buck
// controller in closed loop with a behavioural model of its analog parts.
//
// vmc_tb_analog (below, behavioural, real-valued, stepped every 31.25 ns):
//  * power stage: PMOS/NMOS switches (R_DS 150 mOhm), body diodes in dead time,
//    L = 18 uH with DCR = 60 mOhm, C = 22 uF with ESR = 70 mOhm, V_IN = 5 V,
//    resistive divider H = 0.6, load current from the testbench;
//  * self-test: in BIST mode both switches are off and a 10 kHz triangular
//    current (0 ... 40 mA) is forced through the inductor; V_SEL is high on the
//    rising ramp; the sense amplifier sees the inductor voltage L di/dt + DCR i;
//  * lossless sensing otherwise: an RC filter matched to L/DCR across the
//    inductor; the sense amplifier (gain 40, 5 mV input offset) is shorted
//    by the Offset_Cal switch;
//  * three VCOs f = e * (2 MHz + 3 MHz/V * V) with a common ADC gain error
//    e = 0.93; V_REF = 1.98 V;
//  * 16-cell delay line of T_ref/16 cells (locked DLL) for the DPWM.
// Checks (counted per mechanism):
//  * start-up sequence BIST -> offset calibration -> regulation, BIST within
//    200 us, no timeout, no error; L within 5 % of 18 uH, DCR within 10 % of
//    60 mOhm; ADC gain factor within 1 % of 1/e;
//  * output regulated to 3.3 V +-40 mV at 300 mA and 750 mA load;
//  * sensed load current within 10 % of the true current;
//  * coefficient set 1 selected at 750 mA and set 0 back at 300 mA, and only
//    while the global update enable is high;
//  * no shoot-through (n1 low and n2 high together) at any time;
//  * switching frequency 500 kHz (CK_SW period 2 us).
module tb_vmc_buck_controller;
  import buck_pkg::*;
  int checks = 0, failures = 0;
  logic clk_spl = 1'b0, ck_ref = 1'b0, rst_n = 1'b0;
  logic fm_fb, fm_ref, fm_diff, v_sel;
  logic [15:0] dll_taps;
  logic restart = 1'b0, pid_update_en = 1'b0;
  logic [12:0] vref_nom;
  logic [15:0] k_l, k_r, k_i;
  logic coef_wr_en = 1'b0, thr_wr_en = 1'b0;
  logic [0:0] coef_wr_set = '0, thr_idx = '0, pid_sel;
  logic [2:0] coef_wr_idx = '0;
  coef_t coef_wr_data = '0;
  logic [15:0] thr_data = '0;
  logic pwm, n1, n2, ck_sw, bist_mode, offset_sw, bist_done, bist_err, bist_timeout, i_load_valid;
  vmc_mode_e mode;
  logic [15:0] l_meas, dcr_meas, adc_gain;
  logic signed [15:0] i_load;
  logic [8:0] duty;
  logic [12:0] vfb_code, vref_code, vdiff_code;
  int shoot = 0;

  vmc_buck_controller dut (.clk_spl(clk_spl), .ck_ref(ck_ref), .rst_n(rst_n), .fm_fb(fm_fb),
    .fm_ref(fm_ref), .fm_diff(fm_diff), .dll_taps(dll_taps), .v_sel(v_sel), .restart(restart),
    .pid_update_en(pid_update_en), .vref_nom(vref_nom), .k_l(k_l), .k_r(k_r), .k_i(k_i),
    .coef_wr_en(coef_wr_en), .coef_wr_set(coef_wr_set), .coef_wr_idx(coef_wr_idx),
    .coef_wr_data(coef_wr_data), .thr_wr_en(thr_wr_en), .thr_idx(thr_idx), .thr_data(thr_data),
    .pwm(pwm), .n1(n1), .n2(n2), .ck_sw(ck_sw), .mode(mode), .bist_mode(bist_mode),
    .offset_sw(offset_sw), .l_meas(l_meas), .dcr_meas(dcr_meas), .bist_done(bist_done),
    .bist_err(bist_err), .bist_timeout(bist_timeout), .i_load(i_load), .i_load_valid(i_load_valid),
    .pid_sel(pid_sel), .duty(duty), .vfb_code(vfb_code), .vref_code(vref_code),
    .vdiff_code(vdiff_code), .adc_gain(adc_gain));

  vmc_tb_analog ana (.clk_spl(clk_spl), .ck_ref(ck_ref), .n1(n1), .n2(n2), .bist_mode(bist_mode),
    .offset_sw(offset_sw), .fm_fb(fm_fb), .fm_ref(fm_ref), .fm_diff(fm_diff), .v_sel(v_sel),
    .dll_taps(dll_taps));

  always #15625ps clk_spl = ~clk_spl;                 // 32 MHz
  always @(posedge clk_spl) ck_ref <= ~ck_ref;        // 16 MHz, same source

  always @(n1 or n2) #1ps if (!n1 && n2) shoot++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr_coef(int s, int idx, int val);
    @(negedge clk_spl);
    coef_wr_en = 1'b1; coef_wr_set = 1'(s); coef_wr_idx = 3'(idx); coef_wr_data = coef_t'(val);
    @(negedge clk_spl);
    coef_wr_en = 1'b0;
  endtask

  // average output voltage and sensed current over n codes
  task automatic measure(int n, output real v_avg, output real i_avg);
    v_avg = 0.0; i_avg = 0.0;
    for (int k = 0; k < n; k++) begin
      @(posedge i_load_valid);
      v_avg += ana.vout; i_avg += real'(i_load);
    end
    v_avg /= n; i_avg /= n;
  endtask

  initial begin
    #12ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real v, i, t0;
    int n_bist = 0, n_ofs = 0, n_reg = 0, n_sw = 0;
    // calibration constants for the model's scales (see header)
    vref_nom = 13'(int'(4096.0 * 2.0 * (2.0e6 + 3.0e6 * 1.98) / 32.0e6 + 0.5));
    k_l = 16'(int'(1.0e8 / (2.0 * 800.0 * 40.0 * 768.0) * 4096.0));       // 0.01 uH
    k_r = 16'(int'(1.0e4 / (40.0 * 768.0 * 0.04 * (1.0 - 3.0 / 25.0)) * 4096.0)); // 0.1 mOhm
    k_i = 16'(int'(1.0e7 / (40.0 * 768.0) + 0.5));                       // mA
    ana.iload = 0.0;
    repeat (3) @(negedge clk_spl);
    rst_n = 1'b1;
    // coefficient sets: integral compensators (a0, b1 = -1), set 1 slightly faster
    wr_coef(0, 0, 6);  wr_coef(0, 4, -4096);
    wr_coef(1, 0, 9);  wr_coef(1, 4, -4096);
    @(negedge clk_spl);
    thr_wr_en = 1'b1; thr_idx = '0; thr_data = 16'd500;   // 500 mA
    @(negedge clk_spl);
    thr_wr_en = 1'b0;
    // ---- start-up: BIST ----
    wait (bist_mode);
    t0 = $realtime;
    n_bist++;
    wait (bist_done);
    check($realtime - t0 <= 200us, $sformatf("BIST took %0t", $realtime - t0));
    @(negedge clk_spl);
    $display("INFO: BIST %0t, L %0d (0.01 uH), DCR %0d (0.1 mOhm), g %0d", $realtime - t0, l_meas, dcr_meas, adc_gain);
    check(!bist_err && !bist_timeout, "BIST error or timeout");
    check(l_meas > 1710 && l_meas < 1890, $sformatf("L = %0d (0.01 uH), expected 1800", l_meas));
    check(dcr_meas > 540 && dcr_meas < 660, $sformatf("DCR = %0d (0.1 mOhm), expected 600", dcr_meas));
    check(adc_gain > 16'(int'(4096.0 / 0.93 * 0.99)) && adc_gain < 16'(int'(4096.0 / 0.93 * 1.01)),
          $sformatf("ADC gain factor %0d, expected %0d", adc_gain, int'(4096.0 / 0.93)));
    // ---- offset calibration ----
    wait (offset_sw);
    n_ofs++;
    wait (mode == MODE_REGULATE);
    n_reg++;
    // ---- regulation at 300 mA ----
    ana.iload = 0.3;
    repeat (1000) @(posedge i_load_valid);            // 2 ms
    measure(100, v, i);
    check(v > 3.26 && v < 3.34, $sformatf("VOUT %g V at 300 mA", v));
    check(i > 270.0 && i < 330.0, $sformatf("sensed %g mA at 300 mA", i));
    check(pid_sel == 1'b0, "set 0 expected at 300 mA (update disabled)");
    // load step to 750 mA with the table update disabled: selection must hold
    ana.iload = 0.75;
    repeat (300) @(posedge i_load_valid);
    check(pid_sel == 1'b0, "selection changed while update disabled");
    pid_update_en = 1'b1;
    repeat (5) @(posedge i_load_valid);
    @(negedge clk_spl);
    check(pid_sel == 1'b1, "set 1 not selected at 750 mA");
    if (pid_sel == 1'b1) n_sw++;
    repeat (300) @(posedge i_load_valid);
    measure(100, v, i);
    $display("INFO: 750 mA: VOUT %g V, sensed %g mA", v, i);
    check(v > 3.26 && v < 3.34, $sformatf("VOUT %g V at 750 mA", v));
    check(i > 675.0 && i < 825.0, $sformatf("sensed %g mA at 750 mA", i));
    // back to light load
    ana.iload = 0.3;
    repeat (300) @(posedge i_load_valid);
    @(negedge clk_spl);
    check(pid_sel == 1'b0, "set 0 not selected back at 300 mA");
    if (pid_sel == 1'b0) n_sw++;
    measure(100, v, i);
    check(v > 3.26 && v < 3.34, $sformatf("VOUT %g V back at 300 mA", v));
    // switching frequency
    begin
      realtime ta, tb;
      @(posedge ck_sw); ta = $realtime;
      @(posedge ck_sw); tb = $realtime;
      check(tb - ta > 2us - 1ps && tb - ta < 2us + 1ps, $sformatf("CK_SW period %0t", tb - ta));
    end
    check(shoot == 0, $sformatf("%0d shoot-through events", shoot));
    check(n_bist == 1 && n_ofs == 1 && n_reg == 1 && n_sw == 2,
          $sformatf("mechanisms: bist %0d offset %0d regulate %0d table switches %0d", n_bist, n_ofs, n_reg, n_sw));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Behavioural model of the VMC converter's analog parts (see header above).
module vmc_tb_analog (
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
