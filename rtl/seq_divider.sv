// seq_divider -- unsigned restoring divider, one quotient bit per clock.
//
// start loads numerator and denominator; N_W+1 clocks later done pulses for one
// clk and quotient/remainder hold the result until the next start. busy is high
// while dividing. Division by zero returns an all-ones quotient.
// Helper of the gain-calibration and current-sensing blocks (the design performs
// these divisions "in the digital domain" without saying how; a bit-serial
// divider is this implementation's choice because results are needed only once
// per switching period, 64 sampling clocks).
module seq_divider #(
  parameter int unsigned N_W = 32,
  parameter int unsigned D_W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] numer,
  input  logic [D_W-1:0] denom,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quotient,
  output logic [D_W-1:0] remainder
);
  localparam int unsigned CW = $clog2(N_W + 1);

  logic [N_W-1:0] num_sh;
  logic [D_W:0]   rem;
  logic [D_W-1:0] den_q;
  logic [CW-1:0]  cnt;
  logic [D_W:0]   trial;

  assign trial = {rem[D_W-1:0], num_sh[N_W-1]} - {1'b0, den_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_sh    <= '0;
      rem       <= '0;
      den_q     <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num_sh <= numer;
        den_q  <= denom;
        rem    <= '0;
        cnt    <= CW'(N_W);
        busy   <= 1'b1;
      end else if (busy) begin
        // shift in the next numerator bit and try to subtract the denominator
        if (!trial[D_W]) rem <= trial;
        else             rem <= {rem[D_W-1:0], num_sh[N_W-1]};
        num_sh <= {num_sh[N_W-2:0], ~trial[D_W]};
        cnt    <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= (den_q == '0) ? '1 : {num_sh[N_W-2:0], ~trial[D_W]};
          remainder <= (!trial[D_W]) ? trial[D_W-1:0] : {rem[D_W-2:0], num_sh[N_W-1]};
        end
      end
    end
  end
endmodule
