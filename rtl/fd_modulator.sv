// fd_modulator -- delta-sigma frequency discriminator (digital half of the
// first-order frequency-domain delta-sigma modulator).
//
// A VCO turns the analog input into a square wave fm. Two D flip-flops clocked
// by the sampling clock f_spl sample fm; the XOR of the two flip-flop outputs is
// 1 in every sampling cycle in which the sampled fm changed level. The VCO
// integrates, the flip-flops quantise the phase, the XOR differentiates, giving
// first-order noise shaping. For f_vco < f_spl/2 the ones density of the output
// bit stream is 2*f_vco/f_spl. Structure (two flops + XOR) follows the design;
// the first flop is also the synchroniser of the asynchronous VCO output.
//
// Interface: clk = f_spl, fm = VCO output (asynchronous), bit_out = 1-bit stream.
// Timing: bit_out is registered-combinational: valid one clk after the edge of
// fm that it reports has been sampled.
module fd_modulator (
  input  logic clk,
  input  logic rst_n,
  input  logic fm,
  output logic bit_out
);
  logic q1, q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= fm;
      q2 <= q1;
    end
  end

  assign bit_out = q1 ^ q2;
endmodule
