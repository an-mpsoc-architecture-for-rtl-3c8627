// tb_gate_cost_unit: 30 random scans for a 4-track, 4-observation engine.
// Each scan delivers predictions (random activity, position and innovation
// variance) and 0..5 observations, some placed close to a prediction; the
// fifth observation of a scan must be dropped. The output stream is checked
// word by word against a floating-point model: layout (rows, costs, track
// flags, eos), row validity and coordinates, every cost (gated or COST_INF,
// pairs within 0.1 of the gate threshold are not judged), the "inside some
// gate" flag of each row and the "gate holds an observation" flag of each
// track. The output side is randomly stalled.
module tb_gate_cost_unit;
  import mtt_pkg::*;
  localparam int  NT = 4, NO = 4;
  localparam real THR = 603586.0 / 65536.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NT-1:0] pred_valid = '0, pred_ready;
  pred_word_t    pred [NT];
  logic          obs_valid = 1'b0, obs_ready;
  obs_word_t     obs = '0;
  logic          cm_valid, cm_ready = 1'b0;
  cm_word_t      cm;

  gate_cost_unit #(.N_TRK(NT), .N_OBS(NO)) dut (
    .clk, .rst_n, .pred_valid, .pred_ready, .pred, .obs_valid, .obs_ready, .obs,
    .cm_valid, .cm_ready, .cm
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic fx_t to_fx(real r); return fx_t'($rtoi(r * 65536.0)); endfunction
  function automatic real to_r(fx_t f); return $itor(f) / 65536.0; endfunction
  function automatic real rnd(real lo, real hi); return lo + (hi - lo) * $itor($urandom_range(0, 10000)) / 10000.0; endfunction

  // Scenario of the current scan, in fixed point as sent.
  pred_word_t sp [NT];
  obs_word_t  so [5];
  int         nobs;
  int         n_gated = 0, n_out = 0;

  function automatic real model_cost(int i, int j);
    real dx = to_r(so[i].x) - to_r(sp[j].x), dy = to_r(so[i].y) - to_r(sp[j].y);
    return dx * dx / to_r(sp[j].sx) + dy * dy / to_r(sp[j].sy);
  endfunction

  // Output collector for one scan.
  cm_word_t outw [$];
  always @(posedge clk) if (rst_n && cm_valid && cm_ready) outw.push_back(cm);
  always @(negedge clk) cm_ready = ($urandom_range(0, 3) != 0);

  task automatic run_scan();
    int k;
    for (int j = 0; j < NT; j++) begin
      sp[j].active = ($urandom_range(0, 3) != 0);
      sp[j].x  = to_fx(rnd(-50.0, 50.0));
      sp[j].y  = to_fx(rnd(-10.0, 10.0));
      sp[j].sx = to_fx(rnd(0.3, 2.0));
      sp[j].sy = to_fx(rnd(0.3, 2.0));
    end
    nobs = $urandom_range(0, 5);
    for (int i = 0; i < nobs; i++) begin
      int j = $urandom_range(0, NT - 1);
      so[i].eos = 1'b0;
      if ($urandom_range(0, 2) != 0) begin
        so[i].x = sp[j].x + to_fx(rnd(-2.5, 2.5));
        so[i].y = sp[j].y + to_fx(rnd(-2.5, 2.5));
      end else begin
        so[i].x = to_fx(rnd(-50.0, 50.0));
        so[i].y = to_fx(rnd(-10.0, 10.0));
      end
    end
    outw = {};
    // Predictions arrive in a random order, observations interleaved.
    fork
      for (int j = 0; j < NT; j++) begin
        @(negedge clk);
        k = (j + nobs) % NT;
        pred[k] = sp[k];
        pred_valid[k] = 1'b1;
        while (!pred_ready[k]) @(negedge clk);
        @(negedge clk);
        pred_valid[k] = 1'b0;
      end
      for (int i = 0; i <= nobs; i++) begin
        @(negedge clk);
        obs = (i == nobs) ? obs_word_t'({1'b1, 64'd0}) : so[i];
        obs_valid = 1'b1;
        while (!obs_ready) @(negedge clk);
        @(negedge clk);
        obs_valid = 1'b0;
      end
    join
    while (outw.size() < NO * (NT + 1) + NT + 1) @(negedge clk);
    repeat (5) @(negedge clk);
    check(outw.size() == NO * (NT + 1) + NT + 1, $sformatf("%0d words", outw.size()));
    // Judge the stream.
    begin
      bit trk_hit [NT];
      for (int j = 0; j < NT; j++) trk_hit[j] = 0;
      for (int i = 0; i < NO; i++) begin
        cm_word_t r = outw[i * (NT + 1)];
        bit rv = (i < nobs) && (i < NO);
        bit any = 0, sure = 1;
        check(r.kind == CM_OBS && r.valid == rv, $sformatf("row %0d header", i));
        if (rv) check(r.x == so[i].x && r.y == so[i].y, $sformatf("row %0d coordinates", i));
        for (int j = 0; j < NT; j++) begin
          cm_word_t c = outw[i * (NT + 1) + 1 + j];
          real mc;
          check(c.kind == CM_COST, "cost word kind");
          if (!rv || !sp[j].active) begin
            check(c.cost == COST_INF, $sformatf("cost (%0d,%0d) should be INF", i, j));
            continue;
          end
          mc = model_cost(i, j);
          if (mc < THR - 0.1) begin
            any = 1; trk_hit[j] = 1; n_gated++;
            check(c.cost != COST_INF && (to_r(fx_t'(c.cost)) - mc) ** 2 < (0.01 + 0.01 * mc) ** 2,
                  $sformatf("cost (%0d,%0d) %f model %f", i, j, to_r(fx_t'(c.cost)), mc));
          end else if (mc > THR + 0.1) begin
            n_out++;
            check(c.cost == COST_INF, $sformatf("cost (%0d,%0d) should be outside gate (%f)", i, j, mc));
          end else sure = 0;
        end
        if (sure) check(r.flag == any, $sformatf("row %0d in-gate flag", i));
      end
      for (int j = 0; j < NT; j++) begin
        cm_word_t t = outw[NO * (NT + 1) + j];
        check(t.kind == CM_TRK, "track word kind");
        if (trk_hit[j]) check(t.flag, $sformatf("track %0d gate flag", j));
      end
      check(outw[NO * (NT + 1) + NT].kind == CM_EOS, "eos word");
    end
  endtask

  initial begin
    for (int j = 0; j < NT; j++) pred[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 30; s++) run_scan();
    check(n_gated > 10 && n_out > 10, $sformatf("too few gated (%0d) or gated-out (%0d) pairs", n_gated, n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
