// bist_processor -- digital post-processing of the inductor self-test: computes
// inductance L and DC resistance R_DCR from the digitised sense-amplifier output.
//
// During the self-test the power switches are off, the output capacitor is
// shorted and a symmetric triangular current I_TRI is forced through the
// inductor. The inductor voltage L*dI/dt + R_DCR*I_TRI is trapezoidal; the
// sense amplifier adds gain, offset and a DC level that are the same at every
// instant. Three codes are taken around the triangle:
//   A  last code of the falling ramp, at I_TRI,min, slope -Slope
//   B  code just after the valley,    at ~I_TRI,min, slope +Slope
//   C  last code of the rising ramp,  at I_TRI,max, slope +Slope
// B - A = 2*L*Slope*gain and C - B = R_DCR*(I_max - I_min)*gain, so offset and
// DC level cancel. The triangle generator's comparator output v_sel (1 while
// the current rises) marks the valley and the peak.
//
// Implementation choices:
//  * v_sel is synchronised with two flip-flops. B is the B_SETTLE-th code after
//    the valley (3 by default: a two-stage R = 64 CIC needs 2R-1 samples, so the
//    third code is the first whose window lies wholly on the rising ramp).
//  * Differences are normalised by the ADC gain factor g (G_FRAC fractional
//    bits) and scaled by programmable constants k_l and k_r (K_FRAC fractional
//    bits) that fold in 1/(2*Slope), R_G/R_F, 1/(I_max - I_min) and the part of
//    the rising ramp spent settling (fixed, since the triangle period is fixed):
//        l_meas   = ((B - A) * g >> G_FRAC) * k_l >> K_FRAC
//        dcr_meas = ((C - B) * g >> G_FRAC) * k_r >> K_FRAC
//  * One triangle period is measured per start. The A-B-C order follows the
//    equations of the design (A and B both at I_TRI,min). A start on a falling
//    ramp uses that ramp when B_SETTLE-1 or more of its codes are still seen,
//    so a whole test takes at most 1.5 triangle periods (150 us at 10 kHz)
//    plus a few codes, inside the 200 us self-test budget.
//
// Interface: start (pulse) begins a measurement; busy while measuring; done
// pulses with l_meas, dcr_meas, d_ab, d_bc valid; err if B - A or C - B is not
// positive. Timing: done comes one clk after the code C is taken.
module bist_processor #(
  parameter int unsigned CODE_W   = buck_pkg::CIC_W,
  parameter int unsigned G_W      = 16,
  parameter int unsigned G_FRAC   = 12,
  parameter int unsigned K_W      = 16,
  parameter int unsigned K_FRAC   = 12,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned B_SETTLE = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CODE_W-1:0] code,
  input  logic              code_valid,
  input  logic              v_sel,          // asynchronous comparator output
  input  logic [G_W-1:0]    gain,
  input  logic [K_W-1:0]    k_l,
  input  logic [K_W-1:0]    k_r,
  output logic              busy,
  output logic              done,
  output logic              err,
  output logic signed [CODE_W:0] d_ab,
  output logic signed [CODE_W:0] d_bc,
  output logic [OUT_W-1:0]  l_meas,
  output logic [OUT_W-1:0]  dcr_meas
);
  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_FALL, S_WAIT_RISE, S_SETTLE, S_WAIT_PEAK, S_CALC
  } state_e;

  localparam int unsigned PW = CODE_W + 1 + G_W + K_W + 1;
  localparam int unsigned SW = $clog2(B_SETTLE + 1);

  state_e state;
  logic [1:0] sel_sync;
  logic       sel_q, sel_rise, sel_fall;
  logic [CODE_W-1:0] last_code, a_code, b_code;
  logic [SW-1:0] settle_cnt;
  logic signed [PW-1:0] ab_n, bc_n, l_full, r_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_sync <= '0;
      sel_q    <= 1'b0;
    end else begin
      sel_sync <= {sel_sync[0], v_sel};
      sel_q    <= sel_sync[1];
    end
  end
  assign sel_rise = sel_sync[1] & ~sel_q;
  assign sel_fall = ~sel_sync[1] & sel_q;

  always_comb begin
    ab_n   = (PW'(d_ab) * $signed(PW'(gain))) >>> G_FRAC;
    bc_n   = (PW'(d_bc) * $signed(PW'(gain))) >>> G_FRAC;
    l_full = (ab_n * $signed(PW'(k_l))) >>> K_FRAC;
    r_full = (bc_n * $signed(PW'(k_r))) >>> K_FRAC;
  end

  function automatic logic [OUT_W-1:0] clip(input logic signed [PW-1:0] v);
    if (v < 0)                                  return '0;
    else if (v > PW'({OUT_W{1'b1}}))            return '1;
    else                                        return OUT_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      last_code  <= '0;
      a_code     <= '0;
      b_code     <= '0;
      settle_cnt <= '0;
      d_ab       <= '0;
      d_bc       <= '0;
      l_meas     <= '0;
      dcr_meas   <= '0;
      done       <= 1'b0;
      err        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (code_valid) last_code <= code;
      case (state)
        // A must be a code whose whole window lies on a falling ramp: start on
        // the present falling ramp if at least B_SETTLE-1 codes of it are seen
        // before the valley, otherwise on the next one
        S_IDLE:      if (start) begin
                       settle_cnt <= '0;
                       state      <= sel_sync[1] ? S_WAIT_FALL : S_WAIT_RISE;
                     end
        S_WAIT_FALL: if (sel_fall) begin
                       settle_cnt <= '0;
                       state      <= S_WAIT_RISE;
                     end
        S_WAIT_RISE: if (sel_rise) begin
                       a_code     <= last_code;
                       settle_cnt <= '0;
                       state      <= (settle_cnt >= SW'(B_SETTLE - 1)) ? S_SETTLE : S_WAIT_FALL;
                     end else if (code_valid && settle_cnt != SW'(B_SETTLE)) begin
                       settle_cnt <= settle_cnt + 1'b1;
                     end
        S_SETTLE:    if (code_valid) begin
                       if (settle_cnt == SW'(B_SETTLE - 1)) begin
                         b_code <= code;
                         d_ab   <= $signed({1'b0, code}) - $signed({1'b0, a_code});
                         state  <= S_WAIT_PEAK;
                       end
                       settle_cnt <= settle_cnt + 1'b1;
                     end
        S_WAIT_PEAK: if (sel_fall) begin
                       d_bc  <= $signed({1'b0, last_code}) - $signed({1'b0, b_code});
                       state <= S_CALC;
                     end
        S_CALC:      begin
                       l_meas   <= clip(l_full);
                       dcr_meas <= clip(r_full);
                       err      <= (d_ab <= 0) || (d_bc <= 0);
                       done     <= 1'b1;
                       state    <= S_IDLE;
                     end
        default:     state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
