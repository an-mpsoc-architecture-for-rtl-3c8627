// tb_sync_fifo: random pushes and pops against a queue model. Checks every
// word read (order and value), that in_ready drops exactly when DEPTH words
// are held, that out_valid drops exactly when empty, and that a word written
// to an empty queue is readable on the next cycle.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [15:0] in_data = '0, out_data;

  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data
  );

  int checks = 0, failures = 0;
  logic [15:0] model [$];
  int n_full = 0, n_empty = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // Phase: mostly fill, then mostly drain.
      in_valid  = ($urandom_range(0, 99) < (((c / 200) % 2) ? 30 : 80));
      out_ready = ($urandom_range(0, 99) < (((c / 200) % 2) ? 80 : 30));
      in_data   = 16'($urandom);
      checks++;
      if (in_ready !== (model.size() < DEPTH)) begin
        failures++; $display("FAIL: in_ready=%0d with %0d words", in_ready, model.size());
      end
      checks++;
      if (out_valid !== (model.size() > 0)) begin
        failures++; $display("FAIL: out_valid=%0d with %0d words", out_valid, model.size());
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== model[0]) begin
          failures++; $display("FAIL: read %h expected %h", out_data, model[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL: full/empty not reached"); end
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
