// tb_mtt_full_load: runs the full-load case (every filter tracking, one
// target too many) for the system at its default size of 10 filters and at
// the planned size of 20 filters, side by side, and sums their checks.
module tb_mtt_full_load;
  logic done10, done20;
  int   checks10, failures10, checks20, failures20;
  int   cycles = 0;

  mtt_load_run #(.N(10)) u_run10 (.done(done10), .checks(checks10), .failures(failures10));
  mtt_load_run #(.N(20)) u_run20 (.done(done20), .checks(checks20), .failures(failures20));

  initial begin
    // Watchdog: 2,000,000 steps of 10 time units, the clock period of the runs.
    while (!(done10 && done20) && cycles < 2_000_000) begin
      #10;
      cycles++;
    end
    if (done10 && done20)
      $display("TB_RESULT checks=%0d failures=%0d", checks10 + checks20, failures10 + failures20);
    else begin
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks10 + checks20, failures10 + failures20 + 1);
    end
    $finish;
  end
endmodule
