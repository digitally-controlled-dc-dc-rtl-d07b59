// tb_pid_coeff_table -- self-checking testbench of the load-current-selected
// compensator coefficient table (two sets).
//
// Loads two random coefficient sets and a threshold, then drives load-current
// samples. Checks: set 0 is selected for currents at or below the threshold
// and set 1 above it, but only while the global update enable is high; the
// selection changes exactly one clock after the i_load_valid pulse; the
// coefficient output always equals the selected set; writes of one set do not
// disturb the other.
module tb_pid_coeff_table;
  import buck_pkg::*;
  int checks = 0, failures = 0, switches = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, thr_wr_en = 1'b0, update_en = 1'b0, i_load_valid = 1'b0;
  logic [0:0] wr_set = '0, thr_idx = '0, sel;
  logic [2:0] wr_idx = '0;
  coef_t wr_data = '0;
  logic [15:0] thr_data = '0, i_load = '0;
  pid3_coef_t coef;
  coef_t model [2][7];
  logic [15:0] thr;
  logic exp_sel;

  pid_coeff_table dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_set(wr_set), .wr_idx(wr_idx),
    .wr_data(wr_data), .thr_wr_en(thr_wr_en), .thr_idx(thr_idx), .thr_data(thr_data),
    .update_en(update_en), .i_load(i_load), .i_load_valid(i_load_valid), .sel(sel), .coef(coef));

  always #15625ps clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit coef_ok(logic s);
    return coef.a0 == model[s][0] && coef.a1 == model[s][1] && coef.a2 == model[s][2] &&
           coef.a3 == model[s][3] && coef.b1 == model[s][4] && coef.b2 == model[s][5] &&
           coef.b3 == model[s][6];
  endfunction

  initial begin
    #5ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 7; k++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_set = 1'(s); wr_idx = 3'(k);
        wr_data = coef_t'($urandom); model[s][k] = wr_data;
      end
    @(negedge clk);
    wr_en = 1'b0;
    thr = 16'd1500;                    // e.g. 1.5 A-scale threshold code
    thr_wr_en = 1'b1; thr_idx = '0; thr_data = thr;
    @(negedge clk);
    thr_wr_en = 1'b0;
    check(sel == 1'b0 && coef_ok(1'b0), "after reset set 0 must be selected");
    exp_sel = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      update_en = (n % 100) < 70;
      i_load = (n % 7 < 3) ? 16'($urandom_range(0, 1500)) : 16'($urandom_range(1400, 4000));
      i_load_valid = 1'b1;
      @(negedge clk);
      i_load_valid = 1'b0;
      if (update_en) begin
        if ((i_load > thr) != exp_sel) switches++;
        exp_sel = (i_load > thr);
      end
      check(sel == exp_sel, $sformatf("sel=%0d expected %0d (i_load=%0d, update_en=%0d)",
            sel, exp_sel, i_load, update_en));
      check(coef_ok(exp_sel), "coefficient output differs from selected set");
      // a current change without a valid pulse must not change the selection
      i_load = ~i_load;
      @(negedge clk);
      check(sel == exp_sel, "selection changed without i_load_valid");
    end
    check(switches > 20, $sformatf("only %0d set switches exercised", switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
