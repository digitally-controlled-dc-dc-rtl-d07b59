// vmc_buck_controller -- digital controller of the voltage-mode buck converter
// with inductor self-test (L and DCR) and lossless average current sensing.
//
// Signal flow in regulation: three frequency-domain delta-sigma ADCs digitise
// the feedback voltage, the reference voltage and the sense-amplifier output
// (their VCOs are analog and deliver fm_*). The error V_REF,D - V_FB,D drives
// the Type-III compensator, whose coefficient set is chosen from a table by the
// sensed load current; its output is the 9-bit duty code of the hybrid DPWM,
// whose pulse reaches the power switches through the dead-time driver.
// At start-up the mode controller first runs the inductor self-test (power
// switches off, triangular current into the inductor, L and DCR computed from
// the sense-amplifier codes), then records the sense-amplifier offset, then
// regulates; the sensed current is (V_DIFF,D - offset)*g*k_i/DCR. The ADC gain
// factor g comes from the reference ADC. One compensator update per switching
// period: ADC rate f_spl/64 = 32 MHz/64 = 500 kHz = f_ref/32.
//
// Clocks: clk_spl (sampling clock of the ADCs and all arithmetic) and ck_ref
// (DPWM counter and delay-line reference); the design runs them at 32 and
// 16 MHz from one source. The duty code crosses from clk_spl to ck_ref as a
// quasi-static word: the DPWM samples it once per period, and it changes once
// per period, so clk_spl-domain updates must not coincide with the sampling
// point (true when ck_ref = clk_spl/2 from the same source, the design's case).
//
// Analog neighbours and their ports: fm_fb/fm_ref/fm_diff from the VCOs,
// dll_taps from the 16-stage delay line, v_sel from the triangular-current
// generator's comparator; bist_mode enables the triangular source and the
// output-capacitor short; offset_sw shorts the sense-amplifier inputs; n1/n2
// are the power-switch gate nodes (through the behavioural driver model).
module vmc_buck_controller
  import buck_pkg::*;
#(
  parameter int unsigned NUM_SETS      = 2,
  parameter int unsigned BIST_MAX_CLKS = 6400,
  parameter int unsigned I_W           = 16,
  localparam int unsigned SEL_W        = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic                 clk_spl,
  input  logic                 ck_ref,
  input  logic                 rst_n,
  // analog front ends
  input  logic                 fm_fb,
  input  logic                 fm_ref,
  input  logic                 fm_diff,
  input  logic [15:0]          dll_taps,
  input  logic                 v_sel,
  // control and calibration constants
  input  logic                 restart,
  input  logic                 pid_update_en,
  input  logic [CIC_W-1:0]     vref_nom,
  input  logic [15:0]          k_l,
  input  logic [15:0]          k_r,
  input  logic [15:0]          k_i,
  // coefficient table programming
  input  logic                 coef_wr_en,
  input  logic [SEL_W-1:0]     coef_wr_set,
  input  logic [2:0]           coef_wr_idx,
  input  coef_t                coef_wr_data,
  input  logic                 thr_wr_en,
  input  logic [SEL_W-1:0]     thr_idx,
  input  logic [I_W-1:0]       thr_data,
  // power stage
  output logic                 pwm,
  output logic                 n1,
  output logic                 n2,
  output logic                 ck_sw,
  // modes
  output vmc_mode_e            mode,
  output logic                 bist_mode,
  output logic                 offset_sw,
  // results
  output logic [15:0]          l_meas,
  output logic [15:0]          dcr_meas,
  output logic                 bist_done,
  output logic                 bist_err,
  output logic                 bist_timeout,
  output logic signed [I_W-1:0] i_load,
  output logic                 i_load_valid,
  output logic [SEL_W-1:0]     pid_sel,
  output logic [DPWM_W-1:0]    duty,
  output logic [CIC_W-1:0]     vfb_code,
  output logic [CIC_W-1:0]     vref_code,
  output logic [CIC_W-1:0]     vdiff_code,
  output logic [15:0]          adc_gain
);
  logic fb_valid, ref_valid, diff_valid;
  logic bist_start, bist_busy, offset_cal, offset_done, regulate, gain_valid;
  logic signed [CIC_W:0] d_ab, d_bc;
  logic [CIC_W-1:0] sa_offset;
  logic signed [ERR_W-1:0] v_err;
  logic signed [11:0] y;
  logic y_valid;
  pid3_coef_t coef;
  coef_t a [4];
  coef_t b [3];
  logic cr, ck_mux, period_start;

  // ---------------- ADCs ----------------
  ds_adc u_adc_fb   (.clk(clk_spl), .rst_n(rst_n), .fm(fm_fb),   .code(vfb_code),   .code_valid(fb_valid));
  ds_adc u_adc_ref  (.clk(clk_spl), .rst_n(rst_n), .fm(fm_ref),  .code(vref_code),  .code_valid(ref_valid));
  ds_adc u_adc_diff (.clk(clk_spl), .rst_n(rst_n), .fm(fm_diff), .code(vdiff_code), .code_valid(diff_valid));

  adc_gain_cal u_gain (
    .clk(clk_spl), .rst_n(rst_n), .vref_nom(vref_nom), .vref_code(vref_code),
    .vref_valid(ref_valid), .gain(adc_gain), .gain_valid(gain_valid)
  );

  // ---------------- start-up sequencing ----------------
  vmc_mode_controller #(.BIST_MAX_CLKS(BIST_MAX_CLKS)) u_mode (
    .clk(clk_spl), .rst_n(rst_n), .restart(restart), .code_valid(diff_valid),
    .bist_done(bist_done), .offset_done(offset_done), .mode(mode),
    .bist_mode(bist_mode), .bist_start(bist_start), .bist_timeout(bist_timeout),
    .offset_sw(offset_sw), .offset_cal(offset_cal), .regulate(regulate)
  );

  // ---------------- inductor self-test ----------------
  bist_processor u_bist (
    .clk(clk_spl), .rst_n(rst_n), .start(bist_start), .code(vdiff_code),
    .code_valid(diff_valid), .v_sel(v_sel), .gain(adc_gain), .k_l(k_l), .k_r(k_r),
    .busy(bist_busy), .done(bist_done), .err(bist_err), .d_ab(d_ab), .d_bc(d_bc),
    .l_meas(l_meas), .dcr_meas(dcr_meas)
  );

  // ---------------- load current sensing ----------------
  current_sense_processor #(.I_W(I_W)) u_isense (
    .clk(clk_spl), .rst_n(rst_n), .code(vdiff_code), .code_valid(diff_valid),
    .offset_cal(offset_cal), .sense_en(regulate), .gain(adc_gain), .k_i(k_i),
    .dcr(dcr_meas), .offset(sa_offset), .offset_done(offset_done),
    .i_load(i_load), .i_load_valid(i_load_valid)
  );

  // ---------------- compensator ----------------
  pid_coeff_table #(.NUM_SETS(NUM_SETS), .I_W(I_W)) u_table (
    .clk(clk_spl), .rst_n(rst_n),
    .wr_en(coef_wr_en), .wr_set(coef_wr_set), .wr_idx(coef_wr_idx), .wr_data(coef_wr_data),
    .thr_wr_en(thr_wr_en), .thr_idx(thr_idx), .thr_data(thr_data),
    .update_en(pid_update_en),
    .i_load(i_load[I_W-1] ? '0 : i_load), .i_load_valid(i_load_valid),
    .sel(pid_sel), .coef(coef)
  );

  assign a = '{coef.a0, coef.a1, coef.a2, coef.a3};
  assign b = '{coef.b1, coef.b2, coef.b3};
  assign v_err = $signed({1'b0, vref_code}) - $signed({1'b0, vfb_code});

  tdf2_compensator #(.ORDER(3), .Y_W(12), .Y_MIN(0), .Y_MAX(2**DPWM_W - 1)) u_pid (
    .clk(clk_spl), .rst_n(rst_n), .clear(!regulate),
    .x(v_err), .x_valid(fb_valid && regulate),
    .a(a), .b(b), .y(y), .y_valid(y_valid)
  );
  assign duty = DPWM_W'(y);

  // ---------------- DPWM and driver ----------------
  dpwm_hybrid u_dpwm (
    .ck_ref(ck_ref), .rst_n(rst_n), .duty(duty), .taps(dll_taps),
    .pwm(pwm), .ck_sw(ck_sw), .cr(cr), .ck_mux(ck_mux), .period_start(period_start)
  );

  power_stage_driver u_drv (.pwm(pwm), .bist(bist_mode), .n1(n1), .n2(n2));
endmodule
