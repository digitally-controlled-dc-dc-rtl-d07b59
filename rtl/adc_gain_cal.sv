// adc_gain_cal -- delta-sigma ADC gain monitor.
//
// The VCO gain of the frequency-domain ADCs drifts with process and temperature,
// and the codes drift with it. The reference voltage is known, so the ratio of
// the expected reference code to the measured one, g = VREF_NOM / VREF_D, tracks
// the ADC gain. The sense-amplifier ADC uses a VCO matched to the reference ADC,
// so multiplying its code differences by g removes the drift (the design
// describes this normalisation; how g is computed and held is this
// implementation's choice).
//
// Every new reference code (vref_valid) starts a division when the divider is
// idle; g is an unsigned fixed-point number with G_FRAC fractional bits and
// gain_valid is high once the first result exists. A zero code leaves g as is.
//
// Timing: g updates N_W+1 clocks after the reference code (32 + 1 by default,
// well inside the 64-clock code period).
module adc_gain_cal #(
  parameter int unsigned CODE_W = buck_pkg::CIC_W,
  parameter int unsigned G_W    = 16,
  parameter int unsigned G_FRAC = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] vref_nom,    // expected reference code
  input  logic [CODE_W-1:0] vref_code,   // measured reference code
  input  logic              vref_valid,
  output logic [G_W-1:0]    gain,        // g, G_FRAC fractional bits
  output logic              gain_valid
);
  localparam int unsigned N_W = CODE_W + G_FRAC;

  logic           div_busy, div_done;
  logic [N_W-1:0] q;
  logic [CODE_W-1:0] r_unused;

  seq_divider #(.N_W(N_W), .D_W(CODE_W)) u_div (
    .clk(clk), .rst_n(rst_n),
    .start(vref_valid && vref_code != '0),
    .numer({vref_nom, G_FRAC'(0)}),
    .denom(vref_code),
    .busy(div_busy), .done(div_done),
    .quotient(q), .remainder(r_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain       <= G_W'(1) << G_FRAC;   // unity until the first measurement
      gain_valid <= 1'b0;
    end else if (div_done) begin
      gain       <= (q > N_W'({G_W{1'b1}})) ? '1 : G_W'(q);
      gain_valid <= 1'b1;
    end
  end
endmodule
