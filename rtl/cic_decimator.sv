// cic_decimator -- N-stage cascaded integrator-comb decimator (default N = 2,
// R = 64, M = 1, 13-bit output), the decimation filter of the delta-sigma ADC.
//
// N integrators y[n] = y[n-1] + x[n] run at the input rate, every R-th integrator
// value is passed to N comb stages y = x - x[-M] running at the output rate.
// Transfer function (sum_{k=0}^{RM-1} z^-k)^N, DC gain (RM)^N. All registers are
// W = ceil(N*log2(RM) + B_in) bits wide and wrap modulo 2^W, which is exact for a
// CIC filter because the true output never exceeds (RM)^N. With M = 1 the filter
// has nulls at all multiples of the output rate, which is why it also averages
// away the switching ripple of the sensed signal when the output rate equals
// the switching frequency.
//
// Interface: clk (input rate), din (1-bit delta-sigma stream), dout (unsigned,
// W bits), dout_valid (one-clk pulse every R clks).
// Timing: dout is updated one clk after the integrators are sampled; the output
// for a DC input with k ones per R samples is exactly R^(N-1)*k*M^N.
// Structure follows the design; the phase of the decimation counter after reset
// is this implementation's choice (first output R clks after reset).
module cic_decimator #(
  parameter int unsigned N    = 2,
  parameter int unsigned R    = 64,
  parameter int unsigned M    = 1,
  parameter int unsigned B_IN = 1,
  parameter int unsigned W    = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [B_IN-1:0]   din,
  output logic [W-1:0]      dout,
  output logic              dout_valid
);
  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic [W-1:0] integ [N];
  logic [W-1:0] comb_tap [N];   // input of comb stage i
  logic [W-1:0] comb_out;
  logic [W-1:0] comb_dly [N][M];
  logic [CW-1:0] dec_cnt;
  logic          dec_tick;

  assign dec_tick = (dec_cnt == CW'(R-1));

  // Integrators at the input rate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) integ[i] <= '0;
      dec_cnt <= '0;
    end else begin
      integ[0] <= integ[0] + W'(din);
      for (int i = 1; i < N; i++) integ[i] <= integ[i] + integ[i-1];
      dec_cnt <= dec_tick ? '0 : dec_cnt + 1'b1;
    end
  end

  // Comb stages at the output rate: out_i = in_i - in_i delayed by M
  always_comb begin
    logic [W-1:0] v;
    v = integ[N-1];
    for (int i = 0; i < N; i++) begin
      comb_tap[i] = v;
      v = v - comb_dly[i][M-1];
    end
    comb_out = v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) comb_dly[i][j] <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= dec_tick;
      if (dec_tick) begin
        for (int i = 0; i < N; i++) begin
          comb_dly[i][0] <= comb_tap[i];
          for (int j = 1; j < M; j++) comb_dly[i][j] <= comb_dly[i][j-1];
        end
        dout <= comb_out;
      end
    end
  end
endmodule
