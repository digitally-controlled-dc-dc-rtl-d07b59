// tb_vmc_mode_controller -- self-checking testbench of the start-up sequencer
// (BIST -> offset calibration -> regulation).
//
// Code-valid pulses arrive every 64 clocks. Checks, cycle by cycle:
//  * after reset the controller enters BIST mode (driver switches off) and
//    pulses bist_start once, on the 2nd code;
//  * bist_done moves it to offset calibration; offset_sw closes at once and
//    offset_cal rises on the 2nd code; offset_done moves it to regulation;
//  * if the BIST never finishes, the 200 us budget (6400 clocks) ends BIST
//    mode with bist_timeout set, exactly 6400 clocks after BIST mode starts;
//  * restart returns to BIST; bist_mode, offset_sw and regulate are exclusive.
module tb_vmc_mode_controller;
  import buck_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, code_valid = 1'b0;
  logic bist_done = 1'b0, offset_done = 1'b0;
  vmc_mode_e mode;
  logic bist_mode, bist_start, bist_timeout, offset_sw, offset_cal, regulate;
  int cyc = 0, n_start = 0;

  vmc_mode_controller dut (.clk(clk), .rst_n(rst_n), .restart(restart), .code_valid(code_valid),
    .bist_done(bist_done), .offset_done(offset_done), .mode(mode), .bist_mode(bist_mode),
    .bist_start(bist_start), .bist_timeout(bist_timeout), .offset_sw(offset_sw),
    .offset_cal(offset_cal), .regulate(regulate));

  always #15625ps clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    code_valid <= (cyc % 64 == 0);
    if (bist_start) n_start++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk) if (rst_n)
    check(int'(bist_mode) + int'(offset_sw) + int'(regulate) <= 1, "mode outputs not exclusive");

  initial begin
    #5ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run_sequence(bit let_bist_finish);
    int t_bist, codes_seen;
    // wait for BIST mode
    while (!bist_mode) @(negedge clk);
    t_bist = cyc;
    check(mode == MODE_BIST, "mode encoding in BIST");
    codes_seen = 0;
    n_start = 0;
    while (n_start == 0 && cyc - t_bist < 7000) begin
      @(negedge clk);
      if (code_valid) codes_seen++;
    end
    check(n_start == 1 && codes_seen == 2, $sformatf("bist_start after %0d codes", codes_seen));
    if (let_bist_finish) begin
      repeat (1000) @(negedge clk);
      check(bist_mode, "left BIST mode before done");
      bist_done = 1'b1;
      @(negedge clk);
      bist_done = 1'b0;
      check(offset_sw && !bist_mode && !bist_timeout, "done did not lead to offset calibration");
    end else begin
      while (bist_mode && cyc - t_bist < 7000) @(negedge clk);
      check(cyc - t_bist == 6400, $sformatf("BIST timeout after %0d clocks", cyc - t_bist));
      check(offset_sw && bist_timeout, "timeout not flagged");
    end
    check(n_start == 1, "bist_start pulsed more than once");
    codes_seen = 0;
    while (!offset_cal) begin
      @(negedge clk);
      if (code_valid) codes_seen++;
      check(offset_sw, "offset switch opened early");
    end
    check(codes_seen == 2, $sformatf("offset_cal after %0d codes", codes_seen));
    repeat (300) @(negedge clk);
    check(offset_cal && !regulate, "left offset calibration before done");
    offset_done = 1'b1;
    @(negedge clk);
    offset_done = 1'b0;
    check(regulate && mode == MODE_REGULATE && !offset_cal && !offset_sw, "not regulating after offset_done");
    repeat (500) @(negedge clk);
    check(regulate, "regulation not held");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_sequence(1'b1);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    run_sequence(1'b0);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    run_sequence(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
