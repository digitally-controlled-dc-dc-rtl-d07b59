// acmc_controller -- two-loop average current mode controller.
//
// Outer voltage loop: the error V_REF,D - V_FB,D passes through the voltage
// compensator G_c_v and becomes the current reference I_REF. Inner current
// loop: I_REF - I_LOAD (the sensed average inductor current) passes through the
// current compensator G_c_c and becomes the duty cycle D of the DPWM.
// Both compensators are transposed direct-form IIR filters (tdf2_compensator).
// The design uses Type-II for both loops (2 poles incl. the origin, 1 zero);
// VOLT_ORDER / CUR_ORDER select Type-I (1), Type-II (2) or Type-III (3).
//
// Sequencing (implementation choice): the voltage loop runs when the ADC codes
// arrive (code_valid); the current loop runs when the sensed current of the
// same period arrives (i_load_valid, some tens of clocks later), using the
// I_REF computed for that period. Both compensators are cleared while
// enable = 0. I_REF is saturated to [0, I_REF_MAX], D to [0, 511].
//
// Timing: duty_valid pulses one clk after i_load_valid.
module acmc_controller #(
  parameter int unsigned CODE_W     = buck_pkg::CIC_W,
  parameter int unsigned I_W        = 16,
  parameter int unsigned COEF_W     = buck_pkg::COEF_W,
  parameter int unsigned VOLT_ORDER = 2,
  parameter int unsigned CUR_ORDER  = 2,
  parameter int          I_REF_MAX  = 4095
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic [CODE_W-1:0]        vref_code,
  input  logic [CODE_W-1:0]        vfb_code,
  input  logic                     code_valid,
  input  logic signed [I_W-1:0]    i_load,
  input  logic                     i_load_valid,
  input  logic signed [COEF_W-1:0] av [VOLT_ORDER+1],
  input  logic signed [COEF_W-1:0] bv [VOLT_ORDER],
  input  logic signed [COEF_W-1:0] ac [CUR_ORDER+1],
  input  logic signed [COEF_W-1:0] bc [CUR_ORDER],
  output logic signed [I_W-1:0]    i_ref,
  output logic [buck_pkg::DPWM_W-1:0] duty,
  output logic                     duty_valid
);
  localparam int unsigned VE_W = CODE_W + 1;
  localparam int unsigned IE_W = I_W + 1;

  logic signed [VE_W-1:0] v_err;
  logic signed [IE_W-1:0] i_err;
  logic                   iref_valid;
  logic signed [11:0]     duty_s;

  assign v_err = $signed({1'b0, vref_code}) - $signed({1'b0, vfb_code});
  assign i_err = IE_W'(i_ref) - IE_W'(i_load);

  tdf2_compensator #(
    .ORDER(VOLT_ORDER), .X_W(VE_W), .COEF_W(COEF_W), .Y_W(I_W),
    .Y_MIN(0), .Y_MAX(I_REF_MAX)
  ) u_volt (
    .clk(clk), .rst_n(rst_n), .clear(!enable),
    .x(v_err), .x_valid(code_valid && enable),
    .a(av), .b(bv), .y(i_ref), .y_valid(iref_valid)
  );

  tdf2_compensator #(
    .ORDER(CUR_ORDER), .X_W(IE_W), .COEF_W(COEF_W), .Y_W(12),
    .Y_MIN(0), .Y_MAX(2**buck_pkg::DPWM_W - 1)
  ) u_cur (
    .clk(clk), .rst_n(rst_n), .clear(!enable),
    .x(i_err), .x_valid(i_load_valid && enable),
    .a(ac), .b(bc), .y(duty_s), .y_valid(duty_valid)
  );

  assign duty = buck_pkg::DPWM_W'(duty_s);
endmodule
