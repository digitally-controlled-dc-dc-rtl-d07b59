// mdll_updn_counter -- 5-bit synchronous up/down counter of the mixed-mode DLL.
// Its output I_SW is the control word of the current-steering DAC that biases
// the current-controlled delay line.
//
// Every CK_REF edge the count moves by one: up when up_dn = 1, down when 0.
// As in the design the counter is a plain binary up/down counter with no end
// stops (it wraps); the coarse bias of the delay line is chosen so that lock
// lies near mid-scale, and the counter is reset to mid-scale (implementation
// choice). Width W = 5 as in the design.
//
// Interface: ck_ref, rst_n, up_dn, i_sw[W-1:0]. Timing: i_sw changes one CK_REF
// edge after up_dn.
module mdll_updn_counter #(
  parameter int unsigned W = 5
) (
  input  logic         ck_ref,
  input  logic         rst_n,
  input  logic         up_dn,
  output logic [W-1:0] i_sw
);
  always_ff @(posedge ck_ref or negedge rst_n) begin
    if (!rst_n)     i_sw <= W'(1) << (W - 1);
    else if (up_dn) i_sw <= i_sw + 1'b1;
    else            i_sw <= i_sw - 1'b1;
  end
endmodule
