// buck_converters_top -- the two digital buck-converter controllers side by side.
//
// vmc_*  : voltage-mode controller with inductor self-test, load-current sensing
//          and a load-current-selected Type-III compensator (32 MHz sampling
//          clock, 16 MHz DPWM reference, 500 kHz switching).
// acmc_* : average-current-mode controller with the same current sensing, a
//          two-loop compensator and a mixed-mode-DLL DPWM (24 MHz sampling
//          clock, 12 MHz DPWM reference, 375 kHz switching).
// The two were separate chips; they share no logic here and every port of each
// is brought out with its prefix. Analog parts (VCOs, delay lines, sense
// amplifier, triangular current generator, level shifters, power switches)
// connect through these ports.
module buck_converters_top
  import buck_pkg::*;
(
  input  logic                 rst_n,
  // ---------------- voltage-mode converter ----------------
  input  logic                 vmc_clk_spl,
  input  logic                 vmc_ck_ref,
  input  logic                 vmc_fm_fb,
  input  logic                 vmc_fm_ref,
  input  logic                 vmc_fm_diff,
  input  logic [15:0]          vmc_dll_taps,
  input  logic                 vmc_v_sel,
  input  logic                 vmc_restart,
  input  logic                 vmc_pid_update_en,
  input  logic [CIC_W-1:0]     vmc_vref_nom,
  input  logic [15:0]          vmc_k_l,
  input  logic [15:0]          vmc_k_r,
  input  logic [15:0]          vmc_k_i,
  input  logic                 vmc_coef_wr_en,
  input  logic [0:0]           vmc_coef_wr_set,
  input  logic [2:0]           vmc_coef_wr_idx,
  input  coef_t                vmc_coef_wr_data,
  input  logic                 vmc_thr_wr_en,
  input  logic [0:0]           vmc_thr_idx,
  input  logic [15:0]          vmc_thr_data,
  output logic                 vmc_pwm,
  output logic                 vmc_n1,
  output logic                 vmc_n2,
  output logic                 vmc_ck_sw,
  output vmc_mode_e            vmc_mode,
  output logic                 vmc_bist_mode,
  output logic                 vmc_offset_sw,
  output logic [15:0]          vmc_l_meas,
  output logic [15:0]          vmc_dcr_meas,
  output logic                 vmc_bist_done,
  output logic                 vmc_bist_err,
  output logic                 vmc_bist_timeout,
  output logic signed [15:0]   vmc_i_load,
  output logic                 vmc_i_load_valid,
  output logic [0:0]           vmc_pid_sel,
  output logic [DPWM_W-1:0]    vmc_duty,
  output logic [CIC_W-1:0]     vmc_vfb_code,
  output logic [CIC_W-1:0]     vmc_vref_code,
  output logic [CIC_W-1:0]     vmc_vdiff_code,
  output logic [15:0]          vmc_adc_gain,
  // ---------------- average-current-mode converter ----------------
  input  logic                 acmc_clk_spl,
  input  logic                 acmc_ck_ref,
  input  logic                 acmc_fm_fb,
  input  logic                 acmc_fm_ref,
  input  logic                 acmc_fm_diff,
  input  logic [15:0]          acmc_icdl_taps,
  input  logic                 acmc_ck_fb,
  input  logic                 acmc_enable,
  input  logic                 acmc_offset_cal,
  input  logic [CIC_W-1:0]     acmc_vref_nom,
  input  logic [15:0]          acmc_k_i,
  input  logic [15:0]          acmc_dcr,
  input  coef_t                acmc_av [3],
  input  coef_t                acmc_bv [2],
  input  coef_t                acmc_ac [3],
  input  coef_t                acmc_bc [2],
  output logic                 acmc_pwm,
  output logic                 acmc_n1,
  output logic                 acmc_n2,
  output logic                 acmc_ck_sw,
  output logic [4:0]           acmc_i_sw,
  output logic                 acmc_offset_done,
  output logic signed [15:0]   acmc_i_load,
  output logic                 acmc_i_load_valid,
  output logic signed [15:0]   acmc_i_ref,
  output logic [DPWM_W-1:0]    acmc_duty,
  output logic [CIC_W-1:0]     acmc_vfb_code,
  output logic [CIC_W-1:0]     acmc_vref_code
);
  vmc_buck_controller u_vmc (
    .clk_spl(vmc_clk_spl), .ck_ref(vmc_ck_ref), .rst_n(rst_n),
    .fm_fb(vmc_fm_fb), .fm_ref(vmc_fm_ref), .fm_diff(vmc_fm_diff),
    .dll_taps(vmc_dll_taps), .v_sel(vmc_v_sel),
    .restart(vmc_restart), .pid_update_en(vmc_pid_update_en), .vref_nom(vmc_vref_nom),
    .k_l(vmc_k_l), .k_r(vmc_k_r), .k_i(vmc_k_i),
    .coef_wr_en(vmc_coef_wr_en), .coef_wr_set(vmc_coef_wr_set), .coef_wr_idx(vmc_coef_wr_idx),
    .coef_wr_data(vmc_coef_wr_data), .thr_wr_en(vmc_thr_wr_en), .thr_idx(vmc_thr_idx),
    .thr_data(vmc_thr_data),
    .pwm(vmc_pwm), .n1(vmc_n1), .n2(vmc_n2), .ck_sw(vmc_ck_sw),
    .mode(vmc_mode), .bist_mode(vmc_bist_mode), .offset_sw(vmc_offset_sw),
    .l_meas(vmc_l_meas), .dcr_meas(vmc_dcr_meas), .bist_done(vmc_bist_done),
    .bist_err(vmc_bist_err), .bist_timeout(vmc_bist_timeout),
    .i_load(vmc_i_load), .i_load_valid(vmc_i_load_valid), .pid_sel(vmc_pid_sel),
    .duty(vmc_duty), .vfb_code(vmc_vfb_code), .vref_code(vmc_vref_code),
    .vdiff_code(vmc_vdiff_code), .adc_gain(vmc_adc_gain)
  );

  acmc_buck_controller u_acmc (
    .clk_spl(acmc_clk_spl), .ck_ref(acmc_ck_ref), .rst_n(rst_n),
    .fm_fb(acmc_fm_fb), .fm_ref(acmc_fm_ref), .fm_diff(acmc_fm_diff),
    .icdl_taps(acmc_icdl_taps), .ck_fb(acmc_ck_fb),
    .enable(acmc_enable), .offset_cal(acmc_offset_cal), .vref_nom(acmc_vref_nom),
    .k_i(acmc_k_i), .dcr(acmc_dcr),
    .av(acmc_av), .bv(acmc_bv), .ac(acmc_ac), .bc(acmc_bc),
    .pwm(acmc_pwm), .n1(acmc_n1), .n2(acmc_n2), .ck_sw(acmc_ck_sw), .i_sw(acmc_i_sw),
    .offset_done(acmc_offset_done), .i_load(acmc_i_load), .i_load_valid(acmc_i_load_valid),
    .i_ref(acmc_i_ref), .duty(acmc_duty), .vfb_code(acmc_vfb_code), .vref_code(acmc_vref_code)
  );
endmodule
