// current_sense_processor -- lossless average load-current sensing.
//
// An RC filter across the switching node and the output gives V_C whose average
// exceeds V_OUT by I_LOAD*R_DCR; the sense amplifier amplifies V_C - V_OUT and the
// delta-sigma ADC digitises it. Because the CIC decimator's output rate equals
// the switching frequency, its nulls remove the switching ripple and each code
// is already the average over a period. This block turns the codes into a load
// current:
//   offset calibration (offset_cal = 1, amplifier inputs shorted): the mean of
//     2^OFS_LOG2 codes is stored as the read-out chain offset;
//   sensing: i_load = ((code - offset) * g >> G_FRAC) * k_i / dcr
// g is the ADC gain factor, dcr the inductor DC resistance measured by the
// self-test, k_i a programmable constant folding in R_G/R_F and the units.
// The formula is the design's; averaging length, fixed point and the bit-serial
// division are this implementation's choices. Negative currents are returned
// as negative numbers (sign-magnitude division).
//
// Timing: i_load_valid pulses NUM_W+2 clocks after each code (34 by default,
// inside the 64-clock code period); offset_done pulses when the offset is stored.
module current_sense_processor #(
  parameter int unsigned CODE_W   = buck_pkg::CIC_W,
  parameter int unsigned G_W      = 16,
  parameter int unsigned G_FRAC   = 12,
  parameter int unsigned K_W      = 16,
  parameter int unsigned DCR_W    = 16,
  parameter int unsigned I_W      = 16,
  parameter int unsigned OFS_LOG2 = 2,
  parameter int unsigned NUM_W    = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CODE_W-1:0]     code,
  input  logic                  code_valid,
  input  logic                  offset_cal,
  input  logic                  sense_en,
  input  logic [G_W-1:0]        gain,
  input  logic [K_W-1:0]        k_i,
  input  logic [DCR_W-1:0]      dcr,
  output logic [CODE_W-1:0]     offset,
  output logic                  offset_done,
  output logic signed [I_W-1:0] i_load,
  output logic                  i_load_valid
);
  localparam int unsigned AW = CODE_W + OFS_LOG2;
  localparam int unsigned CW = OFS_LOG2 + 1;
  localparam int unsigned PW = CODE_W + 1 + G_W + K_W;

  logic [AW-1:0]        ofs_acc;
  logic [CW-1:0]        ofs_cnt;
  logic                 cal_q;
  logic signed [CODE_W:0] diff;
  logic signed [PW-1:0] norm;
  logic [PW-1:0]        mag;
  logic                 neg_q;
  logic                 div_busy, div_done;
  logic [NUM_W-1:0]     q;
  logic [DCR_W-1:0]     rem_unused;
  logic                 div_start;

  assign diff = $signed({1'b0, code}) - $signed({1'b0, offset});
  assign norm = ((PW'(diff) * $signed(PW'(gain))) >>> G_FRAC) * $signed(PW'(k_i));
  assign mag  = norm[PW-1] ? PW'(-norm) : PW'(norm);
  assign div_start = sense_en && !offset_cal && code_valid && !div_busy;

  seq_divider #(.N_W(NUM_W), .D_W(DCR_W)) u_div (
    .clk(clk), .rst_n(rst_n),
    .start(div_start),
    .numer((mag > PW'({NUM_W{1'b1}})) ? '1 : NUM_W'(mag)),
    .denom(dcr),
    .busy(div_busy), .done(div_done),
    .quotient(q), .remainder(rem_unused)
  );

  // offset calibration: average 2^OFS_LOG2 codes while the inputs are shorted
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ofs_acc     <= '0;
      ofs_cnt     <= '0;
      cal_q       <= 1'b0;
      offset      <= '0;
      offset_done <= 1'b0;
    end else begin
      offset_done <= 1'b0;
      cal_q       <= offset_cal;
      if (offset_cal && !cal_q) begin
        ofs_acc <= '0;
        ofs_cnt <= '0;
      end else if (offset_cal && code_valid && ofs_cnt < CW'(2**OFS_LOG2)) begin
        ofs_acc <= ofs_acc + AW'(code);
        ofs_cnt <= ofs_cnt + 1'b1;
        if (ofs_cnt == CW'(2**OFS_LOG2 - 1)) begin
          offset      <= CODE_W'((ofs_acc + AW'(code)) >> OFS_LOG2);
          offset_done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_q        <= 1'b0;
      i_load       <= '0;
      i_load_valid <= 1'b0;
    end else begin
      i_load_valid <= div_done;
      if (div_start) neg_q <= norm[PW-1];
      if (div_done) begin
        if (q > NUM_W'(2**(I_W-1) - 1)) i_load <= neg_q ? I_W'(-(2**(I_W-1))) : I_W'(2**(I_W-1) - 1);
        else                            i_load <= neg_q ? -I_W'(q) : I_W'(q);
      end
    end
  end
endmodule
