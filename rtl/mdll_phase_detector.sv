// mdll_phase_detector -- bang-bang phase detector of the mixed-mode DLL.
//
// On each rising CK_REF edge it samples the delay-line feedback clock CK_FB.
// If CK_FB is still low, the delayed edge arrives late, the line needs less
// delay and up_dn = 1 (count up: more current into the current-starved delay
// line). If CK_FB is already high it arrived early and up_dn = 0. In lock the
// output alternates 1/0, so CK_FB dithers by one control step around CK_REF.
// The design names the detector and its Up/Dn output; the single sampling
// flip-flop and the polarity are this implementation's choice.
//
// Timing: up_dn is valid one CK_REF edge after the comparison.
module mdll_phase_detector (
  input  logic ck_ref,
  input  logic rst_n,
  input  logic ck_fb,
  output logic up_dn
);
  logic fb_q;

  always_ff @(posedge ck_ref or negedge rst_n) begin
    if (!rst_n) fb_q <= 1'b1;
    else        fb_q <= ck_fb;
  end

  assign up_dn = ~fb_q;
endmodule
