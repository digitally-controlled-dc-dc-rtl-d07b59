// ds_adc -- frequency-domain delta-sigma ADC: frequency discriminator followed by
// the CIC decimator (the digital part of the ADC; the VCO is analog and drives fm).
//
// Interface: clk = sampling clock f_spl (32 MHz in the voltage-mode converter,
// R*375 kHz = 24 MHz in the current-mode one), fm = VCO square wave, code =
// W-bit unsigned result, code_valid = one-clk pulse at f_spl/R (= switching
// frequency). The code is proportional to the VCO frequency:
// code ~= R^2 * 2*f_vco/f_spl for the default N = 2.
// Timing: a new code every R clks; a step in f_vco is fully visible after two
// output periods (impulse response of 2R-1 input samples).
module ds_adc #(
  parameter int unsigned R = buck_pkg::CIC_R,
  parameter int unsigned W = buck_pkg::CIC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fm,
  output logic [W-1:0] code,
  output logic         code_valid
);
  logic ds_bit;

  fd_modulator u_fd (
    .clk(clk), .rst_n(rst_n), .fm(fm), .bit_out(ds_bit)
  );

  cic_decimator #(.N(buck_pkg::CIC_N), .R(R), .M(1), .B_IN(1), .W(W)) u_cic (
    .clk(clk), .rst_n(rst_n), .din(ds_bit), .dout(code), .dout_valid(code_valid)
  );
endmodule
