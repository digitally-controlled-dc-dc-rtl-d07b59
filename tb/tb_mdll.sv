// tb_mdll -- self-checking testbench of the mixed-mode DLL control logic: the
// bang-bang phase detector and the 5-bit up/down counter driving the I-DAC.
//
// A behavioural current-controlled delay line stands for the analog I-DAC and
// ICDL: CK_FB is CK_REF (12 MHz) delayed by D0 - i_sw * STEP, so more counter
// current means less delay. The loop must lock the line delay to one CK_REF
// period. Checks: counter resets to mid-scale 16; it moves by exactly one step
// on every CK_REF edge; it reaches the code whose delay is closest to one
// period within 20 cycles from several starting delays; in lock it circles
// around that code. The loop has two to three CK_REF cycles of latency
// (launch, phase-detector flop, counter), so the bang-bang limit cycle spans
// +-3 codes; the check is that every code stays within +-3 of the target, the
// average is within 1.5 codes of it and both up and down counts are seen.
module tb_mdll;
  int checks = 0, failures = 0;
  logic ck_ref = 1'b0, rst_n = 1'b0, ck_fb = 1'b0, up_dn;
  logic [4:0] i_sw, prev;
  realtime d0 = 100ns;
  localparam realtime STEP = 2ns;
  localparam realtime TREF = 83334ps;           // 12 MHz

  mdll_phase_detector u_pd (.ck_ref(ck_ref), .rst_n(rst_n), .ck_fb(ck_fb), .up_dn(up_dn));
  mdll_updn_counter   u_cnt (.ck_ref(ck_ref), .rst_n(rst_n), .up_dn(up_dn), .i_sw(i_sw));

  always #(TREF / 2) ck_ref = ~ck_ref;
  always @(ck_ref) begin                       // ICDL model (transport delay)
    automatic logic v = ck_ref;
    automatic realtime dd = d0 - i_sw * STEP;
    fork
      begin #(dd) ck_fb = v; end
    join_none
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    realtime d0_list [4] = '{110ns, 100ns, 90ns, 116ns};
    foreach (d0_list[t]) begin
      int target, ups, dns, step_err, sum;
      d0 = d0_list[t];
      target = int'((d0 - TREF) / STEP + 0.5);
      rst_n = 1'b0;
      repeat (2) @(negedge ck_ref);
      check(i_sw == 5'd16, $sformatf("reset value %0d", i_sw));
      rst_n = 1'b1;
      ups = 0; dns = 0; step_err = 0; sum = 0;
      prev = i_sw;
      for (int n = 0; n < 60; n++) begin
        @(negedge ck_ref);
        if (i_sw != prev + 5'd1 && i_sw != prev - 5'd1) step_err++;
        if (n >= 20) begin
          if (i_sw > prev) ups++; else dns++;
          sum += int'(i_sw);
          check(int'(i_sw) >= target - 3 && int'(i_sw) <= target + 3,
                $sformatf("not locked: i_sw=%0d target %0d", i_sw, target));
        end
        prev = i_sw;
      end
      check(sum >= 40 * target - 60 && sum <= 40 * target + 60,
            $sformatf("lock centre %0.2f, target %0d", sum / 40.0, target));
      check(step_err == 0, "counter did not move by exactly one per CK_REF edge");
      check(ups > 10 && dns > 10, $sformatf("no dither in lock (up %0d, down %0d)", ups, dns));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
