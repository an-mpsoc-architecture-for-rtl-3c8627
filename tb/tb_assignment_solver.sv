// tb_assignment_solver: 60 random 5x5 cost matrices (random gated costs,
// random COST_INF entries, some rows invalid, many ties in a small-range
// mode) are streamed into the solver. The total cost of the pairing it
// reports must equal the minimum found by trying all 120 permutations, the
// pairing must be one-to-one, `assigned` must be set exactly for valid rows
// paired inside the gate, and row data and track flags must pass through.
// The output side is randomly stalled.
module tb_assignment_solver;
  import mtt_pkg::*;
  localparam int N = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cm_valid = 1'b0, cm_ready, as_valid, as_ready = 1'b0;
  cm_word_t cm = '0;
  as_word_t as;

  assignment_solver #(.N(N)) dut (.clk, .rst_n, .cm_valid, .cm_ready, .cm, .as_valid, .as_ready, .as);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  cost_t    c  [N][N];
  cm_word_t rw [N];
  logic     tf [N];
  longint   best;
  int       perm [N];
  bit       taken [N];

  // Exhaustive minimum over all permutations.
  task automatic search(int row, longint acc);
    if (row == N) begin
      if (acc < best) best = acc;
      return;
    end
    for (int j = 0; j < N; j++) if (!taken[j]) begin
      taken[j] = 1;
      search(row + 1, acc + longint'(c[row][j]));
      taken[j] = 0;
    end
  endtask

  task automatic send(cm_word_t w);
    @(negedge clk);
    cm = w; cm_valid = 1'b1;
    while (!cm_ready) @(negedge clk);
    @(negedge clk);
    cm_valid = 1'b0;
  endtask

  as_word_t outw [$];
  always @(posedge clk) if (rst_n && as_valid && as_ready) outw.push_back(as);
  always @(negedge clk) as_ready = ($urandom_range(0, 2) != 0);

  initial begin
    int n_inf_pairs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      cm_word_t w;
      for (int i = 0; i < N; i++) begin
        rw[i] = '0;
        rw[i].kind  = CM_OBS;
        rw[i].valid = ($urandom_range(0, 5) != 0);
        rw[i].flag  = $urandom_range(0, 1);
        rw[i].x     = fx_t'($urandom);
        rw[i].y     = fx_t'($urandom);
        for (int j = 0; j < N; j++)
          c[i][j] = (!rw[i].valid || $urandom_range(0, 2) == 0) ? COST_INF :
                    ((t % 3 == 0) ? cost_t'($urandom_range(0, 3)) : cost_t'($urandom_range(0, 603586)));
      end
      for (int j = 0; j < N; j++) tf[j] = $urandom_range(0, 1);
      outw = {};
      for (int i = 0; i < N; i++) begin
        send(rw[i]);
        for (int j = 0; j < N; j++) begin
          w = '0; w.kind = CM_COST; w.cost = c[i][j];
          send(w);
        end
      end
      for (int j = 0; j < N; j++) begin w = '0; w.kind = CM_TRK; w.flag = tf[j]; send(w); end
      w = '0; w.kind = CM_EOS; send(w);
      while (outw.size() < 2 * N + 1) @(negedge clk);
      repeat (3) @(negedge clk);
      check(outw.size() == 2 * N + 1, "word count");
      best = 64'h7FFF_FFFF_FFFF_FFFF;
      for (int j = 0; j < N; j++) taken[j] = 0;
      search(0, 0);
      begin
        longint total;
        bit     used [N];
        total = 0;
        for (int j = 0; j < N; j++) used[j] = 0;
        for (int i = 0; i < N; i++) begin
          as_word_t a;
          int       col;
          a   = outw[i];
          col = int'(a.trk);
          check(a.kind == AS_OBS && a.valid == rw[i].valid && a.flag == rw[i].flag &&
                a.x == rw[i].x && a.y == rw[i].y, $sformatf("row %0d pass-through", i));
          check(col < N && !used[col], $sformatf("row %0d column %0d not one-to-one", i, col));
          if (col < N) begin
            used[col] = 1;
            total += longint'(c[i][col]);
            check(a.assigned == (rw[i].valid && c[i][col] != COST_INF), $sformatf("row %0d assigned flag", i));
            if (c[i][col] == COST_INF) n_inf_pairs++;
          end
        end
        check(total == best, $sformatf("matrix %0d: total %0d, optimum %0d", t, total, best));
        for (int j = 0; j < N; j++)
          check(outw[N + j].kind == AS_TRK && outw[N + j].flag == tf[j], $sformatf("track flag %0d", j));
        check(outw[2 * N].kind == AS_EOS, "eos");
      end
    end
    check(n_inf_pairs > 0, "no forced out-of-gate pairing seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
