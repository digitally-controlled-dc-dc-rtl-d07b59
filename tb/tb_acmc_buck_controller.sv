// tb_acmc_buck_controller -- end-to-end testbench of the average-current-mode
// buck controller in closed loop with a behavioural model of its analog parts.
//
// acmc_tb_analog (below, behavioural, real-valued, stepped every 41.67 ns):
//  * power stage V_IN = 5 V, L = 18 uH, DCR = 62 mOhm, C = 330 uF, ESR = 25 mOhm,
//    R_DS 150 mOhm, divider H = 0.6 (V_OUT = 3.3 V), load from the testbench;
//  * lossless sensing: RC filter matched to L/DCR, sense amplifier gain 10 with
//    5 mV input offset, shorted by the Offset_Cal switch;
//  * three VCOs f = e * (2 MHz + 3 MHz/V * V), ADC gain error e = 1.06;
//  * current-controlled delay line: 16 cells of (6.0 - 0.05 * I_SW) ns each,
//    CK_FB = the output of the last cell_dly (locks at I_SW ~ 16 for T_ref = 83.3 ns).
// Clocks: f_spl = 24 MHz, CK_REF = 12 MHz, switching 375 kHz.
// Checks (counted per mechanism):
//  * MDLL: I_SW settles around the lock code and the delay line spans one
//    CK_REF period within 0.5 ns on average;
//  * SA offset calibration completes (offset_done);
//  * V_OUT regulated to 3.3 V +-40 mV at 200 mA and 900 mA;
//  * sensed current within 10 % of the true current; I_REF tracks the load;
//  * switching period 32 CK_REF cycles (2.667 us); no shoot-through;
//  * with enable low the loops are cleared (duty 0).
module tb_acmc_buck_controller;
  import buck_pkg::*;
  int checks = 0, failures = 0;
  logic clk_spl = 1'b0, ck_ref = 1'b0, rst_n = 1'b0;
  logic fm_fb, fm_ref, fm_diff, ck_fb;
  logic [15:0] icdl_taps;
  logic enable = 1'b0, offset_cal = 1'b0;
  logic [12:0] vref_nom;
  logic [15:0] k_i, dcr;
  logic signed [17:0] av [3], bv [2], ac [3], bc [2];
  logic pwm, n1, n2, ck_sw, offset_done, i_load_valid;
  logic [4:0] i_sw;
  logic signed [15:0] i_load, i_ref;
  logic [8:0] duty;
  logic [12:0] vfb_code, vref_code;
  int shoot = 0, n_ofs = 0;

  acmc_buck_controller dut (.clk_spl(clk_spl), .ck_ref(ck_ref), .rst_n(rst_n), .fm_fb(fm_fb),
    .fm_ref(fm_ref), .fm_diff(fm_diff), .icdl_taps(icdl_taps), .ck_fb(ck_fb), .enable(enable),
    .offset_cal(offset_cal), .vref_nom(vref_nom), .k_i(k_i), .dcr(dcr), .av(av), .bv(bv),
    .ac(ac), .bc(bc), .pwm(pwm), .n1(n1), .n2(n2), .ck_sw(ck_sw), .i_sw(i_sw),
    .offset_done(offset_done), .i_load(i_load), .i_load_valid(i_load_valid), .i_ref(i_ref),
    .duty(duty), .vfb_code(vfb_code), .vref_code(vref_code));

  acmc_tb_analog ana (.clk_spl(clk_spl), .ck_ref(ck_ref), .n1(n1), .n2(n2), .offset_sw(offset_cal),
    .i_sw(i_sw), .fm_fb(fm_fb), .fm_ref(fm_ref), .fm_diff(fm_diff), .icdl_taps(icdl_taps), .ck_fb(ck_fb));

  always #20833ps clk_spl = ~clk_spl;                // 24 MHz
  always @(posedge clk_spl) ck_ref <= ~ck_ref;       // 12 MHz
  always @(n1 or n2) #1ps if (!n1 && n2) shoot++;
  always @(posedge clk_spl) if (rst_n && offset_done) n_ofs++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(int n, output real v_avg, output real i_avg, output real r_avg);
    v_avg = 0.0; i_avg = 0.0; r_avg = 0.0;
    for (int k = 0; k < n; k++) begin
      @(posedge i_load_valid);
      v_avg += ana.vout; i_avg += real'(i_load); r_avg += real'(i_ref);
    end
    v_avg /= n; i_avg /= n; r_avg /= n;
  endtask

  initial begin
    #20ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real v, i, r, isw_avg;
    vref_nom = 13'(int'(4096.0 * 2.0 * (2.0e6 + 3.0e6 * 1.98) / 24.0e6 + 0.5));
    k_i = 16'(int'(1.0e7 / (10.0 * 1024.0) + 0.5));    // mA; 1024 codes/V at 24 MHz
    dcr = 16'd620;                                      // 62 mOhm from the start-up BIST
    // voltage loop: PI, code error -> I_REF (mA); current loop: PI, mA -> duty
    av = '{18'sd37247, -18'sd37000, 18'sd0};  bv = '{-18'sd4096, 18'sd0};
    ac = '{18'sd495,   -18'sd475,   18'sd0};  bc = '{-18'sd4096, 18'sd0};
    repeat (3) @(negedge clk_spl);
    rst_n = 1'b1;
    // ---- MDLL lock ----
    repeat (200) @(posedge ck_ref);
    isw_avg = 0.0;
    for (int k = 0; k < 64; k++) begin @(posedge ck_ref); isw_avg += real'(i_sw); end
    isw_avg /= 64.0;
    $display("INFO: MDLL average I_SW %g, line delay %g ns", isw_avg, 16.0 * (6.0 - 0.05 * isw_avg));
    check(16.0 * (6.0 - 0.05 * isw_avg) > 82.8 && 16.0 * (6.0 - 0.05 * isw_avg) < 83.8,
          $sformatf("delay line not locked to one CK_REF period (I_SW avg %g)", isw_avg));
    // ---- offset calibration ----
    offset_cal = 1'b1;
    wait (offset_done);
    repeat (2) @(negedge clk_spl);
    offset_cal = 1'b0;
    check(n_ofs == 1, "offset calibration did not complete once");
    // ---- regulation ----
    ana.iload = 0.2;
    enable = 1'b1;
    repeat (1500) @(posedge i_load_valid);            // 4 ms
    measure(150, v, i, r);
    $display("INFO: 200 mA: VOUT %g V, sensed %g mA, I_REF %g", v, i, r);
    check(v > 3.26 && v < 3.34, $sformatf("VOUT %g V at 200 mA", v));
    check(i > 180.0 && i < 220.0, $sformatf("sensed %g mA at 200 mA", i));
    check(r > 150.0 && r < 250.0, $sformatf("I_REF %g at 200 mA", r));
    ana.iload = 0.9;
    repeat (1500) @(posedge i_load_valid);
    measure(150, v, i, r);
    $display("INFO: 900 mA: VOUT %g V, sensed %g mA, I_REF %g", v, i, r);
    check(v > 3.26 && v < 3.34, $sformatf("VOUT %g V at 900 mA", v));
    check(i > 810.0 && i < 990.0, $sformatf("sensed %g mA at 900 mA", i));
    check(r > 800.0 && r < 1000.0, $sformatf("I_REF %g at 900 mA", r));
    begin
      realtime ta, tb;
      @(posedge ck_sw); ta = $realtime;
      @(posedge ck_sw); tb = $realtime;
      check(tb - ta > 2666ns && tb - ta < 2667ns, $sformatf("CK_SW period %0t", tb - ta));
    end
    check(shoot == 0, $sformatf("%0d shoot-through events", shoot));
    enable = 1'b0;
    repeat (4) @(negedge clk_spl);
    check(duty == 0 && i_ref == 0, "loops not cleared when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Behavioural model of the ACMC converter's analog parts (see header above).
module acmc_tb_analog (
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
