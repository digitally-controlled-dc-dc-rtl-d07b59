// acmc_buck_controller -- digital controller of the average-current-mode buck
// converter with lossless average current sensing and a mixed-mode-DLL DPWM.
//
// Three frequency-domain delta-sigma ADCs (R = 64, output rate = switching
// frequency, typically 375 kHz, so f_spl = 24 MHz) digitise V_FB, V_REF and the
// sense-amplifier output V_DIFF (amplified V_C - V_OUT). The current-sense block
// turns V_DIFF,D into the average inductor current using the inductor DC
// resistance dcr and the ADC gain factor from the reference ADC; the two-loop
// controller computes I_REF from the voltage error and D from the current error.
// The 9-bit hybrid DPWM takes its fine delay from a current-controlled delay
// line whose bias word I_SW comes from the bang-bang phase detector and the
// 5-bit up/down counter of the mixed-mode DLL (both clocked by CK_REF,
// typically 12 MHz = 32 x 375 kHz).
//
// Implementation choices: dcr is an input (the design measures it with the
// inductor self-test at start-up; see vmc_buck_controller for that
// machinery); offset calibration is requested through the offset_cal input
// while the sense-amplifier inputs are shorted; regulation runs while enable is
// high. Clock relation and duty hand-over as in vmc_buck_controller.
module acmc_buck_controller
  import buck_pkg::*;
#(
  parameter int unsigned I_W = 16
) (
  input  logic                     clk_spl,
  input  logic                     ck_ref,
  input  logic                     rst_n,
  input  logic                     fm_fb,
  input  logic                     fm_ref,
  input  logic                     fm_diff,
  input  logic [15:0]              icdl_taps,   // delay-line taps, k*T_ref/16
  input  logic                     ck_fb,       // delay-line output (one T_ref)
  input  logic                     enable,
  input  logic                     offset_cal,
  input  logic [CIC_W-1:0]         vref_nom,
  input  logic [15:0]              k_i,
  input  logic [15:0]              dcr,
  input  logic signed [COEF_W-1:0] av [3],
  input  logic signed [COEF_W-1:0] bv [2],
  input  logic signed [COEF_W-1:0] ac [3],
  input  logic signed [COEF_W-1:0] bc [2],
  output logic                     pwm,
  output logic                     n1,
  output logic                     n2,
  output logic                     ck_sw,
  output logic [4:0]               i_sw,
  output logic                     offset_done,
  output logic signed [I_W-1:0]    i_load,
  output logic                     i_load_valid,
  output logic signed [I_W-1:0]    i_ref,
  output logic [DPWM_W-1:0]        duty,
  output logic [CIC_W-1:0]         vfb_code,
  output logic [CIC_W-1:0]         vref_code
);
  logic fb_valid, ref_valid, diff_valid, gain_valid, duty_valid, up_dn;
  logic [CIC_W-1:0] vdiff_code, sa_offset;
  logic [15:0] adc_gain;
  logic cr, ck_mux, period_start;

  ds_adc u_adc_fb   (.clk(clk_spl), .rst_n(rst_n), .fm(fm_fb),   .code(vfb_code),   .code_valid(fb_valid));
  ds_adc u_adc_ref  (.clk(clk_spl), .rst_n(rst_n), .fm(fm_ref),  .code(vref_code),  .code_valid(ref_valid));
  ds_adc u_adc_diff (.clk(clk_spl), .rst_n(rst_n), .fm(fm_diff), .code(vdiff_code), .code_valid(diff_valid));

  adc_gain_cal u_gain (
    .clk(clk_spl), .rst_n(rst_n), .vref_nom(vref_nom), .vref_code(vref_code),
    .vref_valid(ref_valid), .gain(adc_gain), .gain_valid(gain_valid)
  );

  current_sense_processor #(.I_W(I_W)) u_isense (
    .clk(clk_spl), .rst_n(rst_n), .code(vdiff_code), .code_valid(diff_valid),
    .offset_cal(offset_cal), .sense_en(enable), .gain(adc_gain), .k_i(k_i),
    .dcr(dcr), .offset(sa_offset), .offset_done(offset_done),
    .i_load(i_load), .i_load_valid(i_load_valid)
  );

  acmc_controller #(.I_W(I_W)) u_ctrl (
    .clk(clk_spl), .rst_n(rst_n), .enable(enable),
    .vref_code(vref_code), .vfb_code(vfb_code), .code_valid(fb_valid),
    .i_load(i_load), .i_load_valid(i_load_valid),
    .av(av), .bv(bv), .ac(ac), .bc(bc),
    .i_ref(i_ref), .duty(duty), .duty_valid(duty_valid)
  );

  // mixed-mode DLL: digital control of the current-starved delay line
  mdll_phase_detector u_pd  (.ck_ref(ck_ref), .rst_n(rst_n), .ck_fb(ck_fb), .up_dn(up_dn));
  mdll_updn_counter   u_cnt (.ck_ref(ck_ref), .rst_n(rst_n), .up_dn(up_dn), .i_sw(i_sw));

  dpwm_hybrid u_dpwm (
    .ck_ref(ck_ref), .rst_n(rst_n), .duty(duty), .taps(icdl_taps),
    .pwm(pwm), .ck_sw(ck_sw), .cr(cr), .ck_mux(ck_mux), .period_start(period_start)
  );

  power_stage_driver u_drv (.pwm(pwm), .bist(1'b0), .n1(n1), .n2(n2));
endmodule
