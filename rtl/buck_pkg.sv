// buck_pkg -- constants and types shared by the digital buck-converter controllers.
//
// Both controllers (voltage-mode with inductor self-test, and average-current-mode)
// are built from the same pieces: frequency-domain delta-sigma ADCs decimated by a
// two-stage CIC filter, transposed direct-form IIR compensators and a 9-bit hybrid
// counter/delay-line DPWM. The numbers below are the ones the converters were
// designed around: 9-bit DPWM split 5 MSB (counter) + 4 LSB (delay line),
// decimation ratio R = 64, two CIC stages with differential delay M = 1, hence
// ceil(2*log2(64) + 1) = 13-bit ADC codes. Coefficient and datapath widths are
// this implementation's own choice (fixed point, COEF_FRAC fractional bits).
package buck_pkg;

  // DPWM: 9 bits = 5 coarse (counter) + 4 fine (delay-line tap)
  localparam int unsigned DPWM_MSB_W = 5;
  localparam int unsigned DPWM_LSB_W = 4;
  localparam int unsigned DPWM_W     = DPWM_MSB_W + DPWM_LSB_W;

  // Delta-sigma ADC: CIC decimator
  localparam int unsigned CIC_N = 2;   // stages
  localparam int unsigned CIC_R = 64;  // decimation ratio
  localparam int unsigned CIC_W = 13;  // ceil(N*log2(R*M) + 1)

  // Compensator arithmetic (implementation choice)
  localparam int unsigned COEF_W    = 18;  // signed coefficient width
  localparam int unsigned COEF_FRAC = 12;  // fractional bits of a coefficient
  localparam int unsigned ERR_W     = 14;  // signed error input (difference of two CIC codes)

  typedef logic signed [COEF_W-1:0] coef_t;

  // One stored Type-III coefficient set: H(z) = (a0 z^3 + a1 z^2 + a2 z + a3) /
  //                                            (z^3 + b1 z^2 + b2 z + b3)
  typedef struct packed {
    coef_t a0, a1, a2, a3;
    coef_t b1, b2, b3;
  } pid3_coef_t;

  // Operating modes of the voltage-mode controller
  typedef enum logic [2:0] {
    MODE_RESET      = 3'd0,
    MODE_BIST       = 3'd1,  // power train off, triangular current into inductor
    MODE_OFFSET_CAL = 3'd2,  // sense-amplifier inputs shorted, offset recorded
    MODE_REGULATE   = 3'd3   // closed-loop regulation with continuous current sensing
  } vmc_mode_e;

endpackage
