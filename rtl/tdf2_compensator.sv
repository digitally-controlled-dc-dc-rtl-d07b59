// tdf2_compensator -- digital loop compensator of order ORDER (1, 2 or 3) in
// transposed direct form II, sampled once per switching period.
//
//   H(z) = (a0 z^K + a1 z^(K-1) + ... + aK) / (z^K + b1 z^(K-1) + ... + bK),  K = ORDER
//
// ORDER = 3 is the Type-III (PID) compensator of the voltage-mode converter,
// ORDER = 2 the Type-II compensators of the current-mode converter, ORDER = 1 the
// Type-I integrator a(z+1)/(z-1) (a0 = a1 = a, b1 = -1). The signal flow is the
// one of the design: every input tap a_k*x and feedback tap -b_k*y is added into a
// chain of K delay registers, the output is a0*x plus the first register.
//
// Arithmetic (this implementation's choice): coefficients are signed COEF_W-bit
// numbers with COEF_FRAC fractional bits; the delay registers hold ACC_W-bit
// values in the same fixed point. The sum a0*x + s1 is clamped to the output
// range [Y_MIN, Y_MAX + 1) (still with its fraction bits) and that clamped value
// is what is fed back through the b taps, each product floored back to the
// register format: the clamp stops the integrator from winding up when the DPWM
// is at its limit, and keeping the fraction lets small errors still integrate.
// The output is y = floor(clamped sum / 2^COEF_FRAC).
//
// Interface: x (signed error) with x_valid; y (signed Y_W bits) and y_valid one
// clk later. Coefficients are inputs so a table can switch them between samples.
// clear resets the delay registers.
module tdf2_compensator #(
  parameter int unsigned ORDER     = 3,
  parameter int unsigned X_W       = buck_pkg::ERR_W,
  parameter int unsigned COEF_W    = buck_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = buck_pkg::COEF_FRAC,
  parameter int unsigned ACC_W     = 40,
  parameter int unsigned Y_W       = 12,
  parameter int          Y_MIN     = 0,
  parameter int          Y_MAX     = 511
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic signed [X_W-1:0]    x,
  input  logic                     x_valid,
  input  logic signed [COEF_W-1:0] a [ORDER+1],
  input  logic signed [COEF_W-1:0] b [ORDER],   // b[0] is b1
  output logic signed [Y_W-1:0]    y,
  output logic                     y_valid
);
  logic signed [ACC_W-1:0] s [ORDER];     // s[0] feeds the output adder
  logic signed [ACC_W-1:0] y_full;
  logic signed [ACC_W-1:0] y_clamp;
  logic signed [ACC_W-1:0] y_sat;
  localparam logic signed [ACC_W-1:0] Y_LO = ACC_W'(Y_MIN) <<< COEF_FRAC;
  localparam logic signed [ACC_W-1:0] Y_HI = ((ACC_W'(Y_MAX) + 1) <<< COEF_FRAC) - 1;
  localparam int unsigned PB_W = ACC_W + COEF_W;
  logic signed [PB_W-1:0]  prod_b_full [ORDER];
  logic signed [ACC_W-1:0] prod_a [ORDER+1];
  logic signed [ACC_W-1:0] prod_b [ORDER];

  always_comb begin
    for (int k = 0; k <= ORDER; k++) prod_a[k] = ACC_W'(a[k]) * ACC_W'(x);
    y_full = prod_a[0] + s[0];
    if (y_full < Y_LO)      y_clamp = Y_LO;
    else if (y_full > Y_HI) y_clamp = Y_HI;
    else                    y_clamp = y_full;
    y_sat = y_clamp >>> COEF_FRAC;
    for (int k = 0; k < ORDER; k++) begin
      prod_b_full[k] = PB_W'(b[k]) * PB_W'(y_clamp);
      prod_b[k]      = ACC_W'(prod_b_full[k] >>> COEF_FRAC);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) s[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (clear) begin
        for (int k = 0; k < ORDER; k++) s[k] <= '0;
        y <= '0;
      end else if (x_valid) begin
        // s_k <= a_k*x - b_k*y + s_(k+1); the last register has no successor
        for (int k = 0; k < ORDER; k++) begin
          if (k == ORDER - 1) s[k] <= prod_a[k+1] - prod_b[k];
          else                s[k] <= prod_a[k+1] - prod_b[k] + s[k+1];
        end
        y <= Y_W'(y_sat);
      end
    end
  end
endmodule
