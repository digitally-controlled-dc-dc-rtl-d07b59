// vmc_mode_controller -- start-up sequencer of the voltage-mode converter.
//
// After reset the converter first runs the inductor self-test, then calibrates
// the sense-amplifier offset, then regulates with continuous current sensing:
//   MODE_BIST       bist_mode = 1: the driver turns both power switches off,
//                   the output-capacitor short and the triangular current
//                   source are enabled, bist_start is pulsed once the switching
//                   node has had SETTLE_CODES code periods to settle. Left when
//                   the post-processor reports done, or after BIST_MAX_CLKS
//                   (200 us at 32 MHz: the self-test's time budget) with
//                   bist_timeout set.
//   MODE_OFFSET_CAL offset_sw = 1 shorts the amplifier inputs; after
//                   SETTLE_CODES codes, offset_cal asks the current-sense block
//                   to average; left on offset_done.
//   MODE_REGULATE   regulate = 1: compensator and DPWM run, currents are sensed.
// restart returns to MODE_BIST (a new self-test) from regulation.
// The order (self-test at start-up, offset calibration before current
// measurement) and the 200 us budget follow the design; the state machine, its
// settling delays and the restart input are this implementation's choices.
module vmc_mode_controller
  import buck_pkg::*;
#(
  parameter int unsigned BIST_MAX_CLKS = 6400,
  parameter int unsigned SETTLE_CODES  = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      restart,
  input  logic      code_valid,     // one pulse per ADC code period
  input  logic      bist_done,
  input  logic      offset_done,
  output vmc_mode_e mode,
  output logic      bist_mode,
  output logic      bist_start,
  output logic      bist_timeout,
  output logic      offset_sw,
  output logic      offset_cal,
  output logic      regulate
);
  localparam int unsigned TW = $clog2(BIST_MAX_CLKS + 1);
  localparam int unsigned CW = $clog2(SETTLE_CODES + 1);

  logic [TW-1:0] timer;
  logic [CW-1:0] codes;
  logic          started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_RESET;
      timer        <= '0;
      codes        <= '0;
      started      <= 1'b0;
      bist_start   <= 1'b0;
      bist_timeout <= 1'b0;
      offset_cal   <= 1'b0;
    end else begin
      bist_start <= 1'b0;
      case (mode)
        MODE_RESET: begin
          mode    <= MODE_BIST;
          timer   <= '0;
          codes   <= '0;
          started <= 1'b0;
        end
        MODE_BIST: begin
          timer <= timer + 1'b1;
          if (!started && code_valid) begin
            if (codes == CW'(SETTLE_CODES - 1)) begin
              bist_start <= 1'b1;
              started    <= 1'b1;
            end
            codes <= codes + 1'b1;
          end
          if ((started && bist_done) || timer == TW'(BIST_MAX_CLKS - 1)) begin
            bist_timeout <= !(started && bist_done);
            mode         <= MODE_OFFSET_CAL;
            codes        <= '0;
          end
        end
        MODE_OFFSET_CAL: begin
          if (!offset_cal && code_valid) begin
            if (codes == CW'(SETTLE_CODES - 1)) offset_cal <= 1'b1;
            codes <= codes + 1'b1;
          end
          if (offset_cal && offset_done) begin
            offset_cal <= 1'b0;
            mode       <= MODE_REGULATE;
          end
        end
        MODE_REGULATE: begin
          if (restart) mode <= MODE_RESET;
        end
        default: mode <= MODE_RESET;
      endcase
    end
  end

  assign bist_mode = (mode == MODE_BIST);
  assign offset_sw = (mode == MODE_OFFSET_CAL);
  assign regulate  = (mode == MODE_REGULATE);
endmodule
