// tb_seq_divider -- self-checking testbench for the bit-serial divider.
//
// Drives random numerator/denominator pairs (plus edge cases: zero
// denominator, zero numerator, denominator 1, numerator < denominator) and
// checks quotient, remainder and that done arrives exactly N_W+1 clocks after the
// start clock. busy must be high during the division. Two-state simulation:
// all testbench signals are reset explicitly.
// Everything here is this implementation's choice; the design only says the
// divisions are done in the digital domain.
module tb_seq_divider;
  localparam int unsigned N_W = 32;
  localparam int unsigned D_W = 16;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           start;
  logic [N_W-1:0] numer;
  logic [D_W-1:0] denom;
  logic           busy, done;
  logic [N_W-1:0] quotient;
  logic [D_W-1:0] remainder;
  int checks = 0, failures = 0;

  seq_divider #(.N_W(N_W), .D_W(D_W)) dut (.*);

  always #15.625ns clk = ~clk;

  initial begin : watchdog
    #5ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic divide(input logic [N_W-1:0] n, input logic [D_W-1:0] d);
    int lat;
    logic [N_W-1:0] eq;
    logic [D_W-1:0] er;
    @(negedge clk);
    numer = n; denom = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while dividing"); end
      @(negedge clk); lat++;
    end
    eq = (d == 0) ? '1 : n / N_W'(d);
    er = (d == 0) ? remainder : D_W'(n % N_W'(d));
    checks += 3;
    if (lat != N_W + 1) begin failures++; $display("FAIL latency %0d expected %0d", lat, N_W + 1); end
    if (quotient !== eq) begin failures++; $display("FAIL %0d/%0d q=%0d exp %0d", n, d, quotient, eq); end
    if (remainder !== er) begin failures++; $display("FAIL %0d%%%0d r=%0d exp %0d", n, d, remainder, er); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; numer = '0; denom = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    divide(32'd1000, 16'd0);
    divide(32'd0, 16'd7);
    divide(32'hFFFF_FFFF, 16'd1);
    divide(32'hFFFF_FFFF, 16'hFFFF);
    divide(32'd5, 16'd9);
    for (int i = 0; i < 300; i++) begin
      logic [N_W-1:0] n;
      logic [D_W-1:0] d;
      n = $urandom >> ($urandom_range(0, 31));
      d = D_W'($urandom) >> ($urandom_range(0, 15));
      if (d == 0) d = 1;
      divide(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
