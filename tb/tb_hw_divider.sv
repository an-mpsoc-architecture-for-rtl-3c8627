// tb_hw_divider: random and corner-case divisions (including Q16.16
// reciprocals and division by zero) compared with the `/` and `%` operators;
// also checks that `done` is high exactly NW+1 cycles after the start cycle.
module tb_hw_divider;
  localparam int NW = 48, DW = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0, busy, done;
  logic [NW-1:0] dividend = '0, quotient;
  logic [DW-1:0] divisor = '0, remainder;

  hw_divider #(.NW(NW), .DW(DW)) dut (
    .clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient, .remainder
  );

  int checks = 0, failures = 0;

  task automatic run(logic [NW-1:0] a, logic [DW-1:0] b);
    int cycles = 0;
    logic [NW-1:0] eq;
    logic [DW-1:0] er;
    @(negedge clk);
    dividend = a; divisor = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    dividend = '1; divisor = '1;   // inputs must have been sampled
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    eq = (b == 0) ? '1 : a / NW'(b);
    er = (b == 0) ? a[DW-1:0] : DW'(a % NW'(b));
    checks++;
    if (quotient !== eq || (b != 0 && remainder !== er)) begin
      failures++;
      $display("FAIL: %0d / %0d gave %0d r %0d, expected %0d r %0d", a, b, quotient, remainder, eq, er);
    end
    checks++;
    if (cycles != NW + 1) begin failures++; $display("FAIL: latency %0d", cycles); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(48'h1_0000_0000, 32'd16384);        // 1/0.25 = 4.0
    run(48'h1_0000_0000, 32'd36027);        // 1/0.5497
    run(48'd7, 32'd7);
    run(48'd6, 32'd7);
    run('1, 32'd1);
    run('1, '1);
    run(48'd12345, 32'd0);
    for (int k = 0; k < 300; k++)
      run({16'($urandom), 32'($urandom)}, (k % 3 == 0) ? 32'($urandom_range(1, 1000)) : 32'($urandom) | 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
