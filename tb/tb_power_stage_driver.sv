// tb_power_stage_driver -- self-checking testbench of the dead-time driver model.
//
// Drives random PWM pulses (20 ns ... 1 us) and BIST intervals. Checks:
//  * the PMOS (n1 = 0) and NMOS (n2 = 1) are never on together;
//  * PWM rising: n2 falls at once, n1 falls 10 ns later (t_d,on);
//  * PWM falling: n1 rises at once, n2 rises 10 ns later (t_d,off);
//  * BIST mode: n1 = 1, n2 = 0 whatever the PWM does.
module tb_power_stage_driver;
  int checks = 0, failures = 0;
  logic pwm = 1'b0, bist = 1'b0, n1, n2;
  realtime t_edge;

  power_stage_driver dut (.pwm(pwm), .bist(bist), .n1(n1), .n2(n2));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(n1 or n2) #1ps check(!(n1 == 1'b0 && n2 == 1'b1), "shoot-through: both switches on");

  initial begin
    #1ms $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #100ns;
    check(n1 && n2, "idle PWM low: NMOS on, PMOS off");
    for (int n = 0; n < 200; n++) begin
      pwm = 1'b1; t_edge = $realtime;
      #1ps check(!n2 && n1, "PWM rise: n2 must fall at once, n1 stay high");
      @(negedge n1);
      check($realtime - t_edge > 10ns - 1ps && $realtime - t_edge < 10ns + 1ps, $sformatf("t_d,on = %0t", $realtime - t_edge));
      #($urandom_range(20, 1000) * 1ns);
      pwm = 1'b0; t_edge = $realtime;
      #1ps check(n1 && !n2, "PWM fall: n1 must rise at once, n2 stay low");
      @(posedge n2);
      check($realtime - t_edge > 10ns - 1ps && $realtime - t_edge < 10ns + 1ps, $sformatf("t_d,off = %0t", $realtime - t_edge));
      #($urandom_range(20, 1000) * 1ns);
    end
    bist = 1'b1;
    for (int n = 0; n < 50; n++) begin
      pwm = 1'($urandom);
      #($urandom_range(5, 100) * 1ns);
      check(n1 && !n2, "BIST mode: both switches must be off");
    end
    bist = 1'b0; pwm = 1'b0;
    #20ns check(n1 && n2, "after BIST: back to NMOS on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
