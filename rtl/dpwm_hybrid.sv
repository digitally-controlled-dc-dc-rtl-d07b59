// dpwm_hybrid -- 9-bit hybrid digital pulse-width modulator: a 5-bit counter
// gives the coarse delay in whole CK_REF periods, one of the 16 delay-line taps
// gives the fine delay in 1/16 of a CK_REF period.
//
// Operation (as in the design): the counter runs on CK_REF and divides it by
// 2^MSB_W to make the switching clock CK_SW (16 MHz / 32 = 500 kHz); the rising
// edge of CK_SW starts the PWM pulse. The comparator raises the coarse-ready
// signal CR once the count reaches the MSBs of the duty code. The LSBs select
// one delay-line tap (CK_MUX); the first CK_MUX edge after CR ends the pulse.
// Pulse width = MSB*T_ref + LSB*T_ref/16, i.e. duty = code/512.
//
// Implementation choices (the design gives only the above):
//  * The pulse is the XOR of three toggle flags, one set by CK_REF at the period
//    start, one cleared by CK_REF (used when LSB = 0, so the tap coincident with
//    CK_REF is never sampled against a CR that changes on the same edge) and one
//    cleared by CK_MUX. Each flag lives in one clock domain only.
//  * CK_MUX may only end the pulse during the CK_REF cycle in which the count
//    equals the MSBs ("arm"), so edges caused by switching the tap multiplexer
//    are ignored. The duty code for the next period is sampled at the end of
//    that cycle and the tap select switches then, while arm is low. Known corner:
//    a period with MSB = 31 followed by one with MSB = 0 switches the select at
//    the period boundary, when the new arm window opens; that one pulse may end
//    early.
//  * Taps: taps[k] is CK_REF delayed by k*T_ref/16 (taps[0] is only used as the
//    multiplexer input for LSB = 0, where it is ignored).
//
// Interface: ck_ref, rst_n, duty (9 bits, sampled once per period), taps (from
// the analog delay line); pwm, ck_sw, cr, ck_mux, period_start (one CK_REF cycle
// at count 0).
module dpwm_hybrid #(
  parameter int unsigned MSB_W = buck_pkg::DPWM_MSB_W,
  parameter int unsigned LSB_W = buck_pkg::DPWM_LSB_W
) (
  input  logic                    ck_ref,
  input  logic                    rst_n,
  input  logic [MSB_W+LSB_W-1:0]  duty,
  input  logic [2**LSB_W-1:0]     taps,
  output logic                    pwm,
  output logic                    ck_sw,
  output logic                    cr,
  output logic                    ck_mux,
  output logic                    period_start
);
  localparam logic [MSB_W-1:0] CNT_MAX = '1;

  logic [MSB_W-1:0]       cnt;
  logic [MSB_W-1:0]       m_q;
  logic [LSB_W-1:0]       l_q;
  logic [MSB_W+LSB_W-1:0] duty_next;
  logic [MSB_W+LSB_W-1:0] duty_new;
  logic                   set_tgl, clr_ref_tgl, clr_fine_tgl;
  logic                   arm;
  logic                   wrap;

  assign wrap         = (cnt == CNT_MAX);
  assign ck_sw        = ~cnt[MSB_W-1];
  assign period_start = (cnt == '0);
  assign cr           = (cnt >= m_q);
  assign arm          = (cnt == m_q) && (l_q != '0);
  assign pwm          = set_tgl ^ clr_ref_tgl ^ clr_fine_tgl;
  assign ck_mux       = taps[duty_next[LSB_W-1:0]];
  // Code used by the coming period: sampled at the end of the arm cycle, or at
  // the period boundary itself when that cycle is the last one.
  assign duty_new     = (m_q == CNT_MAX) ? duty : duty_next;

  // Coarse path, CK_REF domain
  always_ff @(posedge ck_ref or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      m_q         <= '0;
      l_q         <= '0;
      duty_next   <= '0;
      set_tgl     <= 1'b0;
      clr_ref_tgl <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == m_q) duty_next <= duty;
      if (wrap) begin
        m_q <= duty_new[MSB_W+LSB_W-1:LSB_W];
        l_q <= duty_new[LSB_W-1:0];
        if (duty_new != '0) set_tgl <= ~set_tgl;
      end else if (l_q == '0 && m_q != '0 && cnt == m_q - 1'b1 && pwm) begin
        clr_ref_tgl <= ~clr_ref_tgl;   // LSB = 0: pulse ends on the CK_REF edge
      end
    end
  end

  // Fine path, CK_MUX domain: first selected tap edge inside the arm cycle
  always_ff @(posedge ck_mux or negedge rst_n) begin
    if (!rst_n)            clr_fine_tgl <= 1'b0;
    else if (arm && pwm)   clr_fine_tgl <= ~clr_fine_tgl;
  end
endmodule
