// pid_coeff_table -- look-up table of prestored Type-III compensator coefficient
// sets, selected by the sensed load current (quasi load-independent control).
//
// NUM_SETS coefficient sets are held in registers written through a simple
// write port (set index, coefficient index 0..6 = a0,a1,a2,a3,b1,b2,b3, data).
// NUM_SETS-1 ascending current thresholds split the load range: while update_en
// (the global compensator-update enable) is high, each new load-current sample
// selects set i = number of thresholds the current exceeds; with the default
// two sets that is "set 0 for low load, set 1 for high load", as in the design.
// While update_en is low the selection holds. Reset values of the table and
// thresholds are zero (they are loaded after reset); the register-file form,
// write port and threshold registers are this implementation's choice.
//
// Timing: sel and coef change one clk after an i_load_valid pulse.
module pid_coeff_table
  import buck_pkg::*;
#(
  parameter int unsigned NUM_SETS = 2,
  parameter int unsigned I_W      = 16,
  localparam int unsigned SEL_W   = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // programming port
  input  logic                        wr_en,
  input  logic [SEL_W-1:0] wr_set,
  input  logic [2:0]                  wr_idx,
  input  coef_t                       wr_data,
  input  logic                        thr_wr_en,
  input  logic [SEL_W-1:0] thr_idx,
  input  logic [I_W-1:0]              thr_data,
  // selection
  input  logic                        update_en,
  input  logic [I_W-1:0]              i_load,
  input  logic                        i_load_valid,
  output logic [SEL_W-1:0] sel,
  output pid3_coef_t                  coef
);
  
  pid3_coef_t         table_q [NUM_SETS];
  logic [I_W-1:0]     thr_q   [NUM_SETS];   // thr_q[i] separates set i and i+1
  logic [SEL_W-1:0]   sel_next;

  always_comb begin
    sel_next = '0;
    for (int i = 0; i < NUM_SETS - 1; i++)
      if (i_load > thr_q[i]) sel_next = SEL_W'(i + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SETS; i++) begin
        table_q[i] <= '0;
        thr_q[i]   <= '0;
      end
      sel <= '0;
    end else begin
      if (wr_en && 32'(wr_set) < NUM_SETS) begin
        case (wr_idx)
          3'd0: table_q[wr_set].a0 <= wr_data;
          3'd1: table_q[wr_set].a1 <= wr_data;
          3'd2: table_q[wr_set].a2 <= wr_data;
          3'd3: table_q[wr_set].a3 <= wr_data;
          3'd4: table_q[wr_set].b1 <= wr_data;
          3'd5: table_q[wr_set].b2 <= wr_data;
          3'd6: table_q[wr_set].b3 <= wr_data;
          default: ;
        endcase
      end
      if (thr_wr_en && 32'(thr_idx) < NUM_SETS) thr_q[thr_idx] <= thr_data;
      if (update_en && i_load_valid) sel <= sel_next;
    end
  end

  assign coef = table_q[sel];
endmodule
