// tb_mtt_mpsoc_top: end-to-end test of the tracking system at its default
// size (10 filters). A scenario generator moves five targets on straight
// lines, sends one scan of noisy position observations per radar period into
// the radar queue, and a pass-through pre-formatting model forwards them to
// the observation queue. A display model collects one estimate per filter per
// scan. Checked:
//  - every target present for a while is followed by exactly one confirmed
//    track within TOL metres, and the number of confirmed tracks matches;
//  - the two close, parallel targets keep their own tracks (no swap);
//  - a target that vanishes and two one-scan clutter observations are
//    deleted, a target appearing later is started and confirmed;
//  - the latency from the end of a scan to the last estimate stays below
//    one radar period (20 ms at 100 MHz = 2,000,000 cycles);
//  - each mechanism happened at least once: track start, update, coast
//    (observation-less gate), confirmation, deletion of a confirmed and of a
//    tentative track, a gate holding two observations, display back-pressure
//    filling an estimate queue and the observation queue.
module tb_mtt_mpsoc_top;
  import mtt_pkg::*;

  localparam int N        = MAX_TARGETS;
  localparam int SCANS    = 80;
  localparam int PRT_CYC  = 2_000_000;
  localparam real DT      = 0.02;
  localparam real TOL     = 0.6;
  localparam int NT       = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             radar_valid = 1'b0, radar_ready;
  logic [64:0]      radar_data  = '0;
  logic             raw_valid, raw_ready;
  logic [64:0]      raw_data;
  logic             pre_valid, pre_ready;
  obs_word_t        pre_obs;
  logic [N-1:0]     est_valid, est_ready;
  est_word_t        est [N];

  mtt_mpsoc_top dut (
    .clk, .rst_n,
    .radar_valid, .radar_ready, .radar_data,
    .raw_valid, .raw_ready, .raw_data,
    .pre_valid, .pre_ready, .pre_obs,
    .est_valid, .est_ready, .est
  );

  // Pre-formatting model: the radar words already are observation words.
  assign pre_valid = raw_valid;
  assign raw_ready = pre_ready;
  assign pre_obs   = obs_word_t'(raw_data);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Scenario: start x, y, speed vx, vy, first and last scan present.
  real t_x0 [NT] = '{30.0, 60.0, 45.0, 45.0, 80.0};
  real t_y0 [NT] = '{-3.0,  4.0,  0.0,  1.0, -6.0};
  real t_vx [NT] = '{ 5.0, -8.0,  2.0,  2.0, -3.0};
  real t_vy [NT] = '{ 0.0,  0.5,  0.0,  0.0,  1.0};
  int  t_on [NT] = '{0, 0, 0, 0, 25};
  int  t_off[NT] = '{SCANS, 39, SCANS, SCANS, SCANS};

  function automatic real tx(int t, int s); return t_x0[t] + t_vx[t] * DT * s; endfunction
  function automatic real ty(int t, int s); return t_y0[t] + t_vy[t] * DT * s; endfunction
  function automatic bit present(int t, int s); return s >= t_on[t] && s <= t_off[t]; endfunction
  function automatic fx_t to_fx(real r); return fx_t'($rtoi(r * 65536.0)); endfunction
  function automatic real to_r(fx_t f); return $itor(f) / 65536.0; endfunction
  function automatic real noise(); return ($itor($urandom_range(0, 2000)) - 1000.0) / 10000.0; endfunction

  // Scans with display back-pressure: no estimate is read during them.
  function automatic bit bp_scan(int s); return s >= 60 && s < 70; endfunction

  // Estimate log.
  est_word_t elog [SCANS][N];
  int        got  [N];
  int        done_scans = 0;
  longint    cyc = 0;
  longint    eos_cyc [SCANS];
  always @(posedge clk) cyc <= cyc + 1;

  // Display model.
  logic hold = 1'b0;
  always_comb for (int k = 0; k < N; k++) est_ready[k] = !hold;
  always @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (est_valid[k] && est_ready[k] && got[k] < SCANS) begin
        elog[got[k]][k] = est[k];
        got[k] = got[k] + 1;
      end
    end
  end

  // Mechanism counters.
  int n_init = 0, n_upd = 0, n_coast = 0, n_del = 0, n_del_tent = 0, n_conf = 0;
  bit conf_seen [16];
  int cur_scan = 0;
  longint max_lat = 0;
  int n_two_in_gate = 0, n_est_full = 0, n_obs_full = 0, row_gated = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.kf_cmd_valid && dut.kf_cmd_ready) begin
      case (dut.kf_cmd.op)
        KF_INIT:   n_init++;
        KF_UPDATE: n_upd++;
        KF_COAST:  n_coast++;
        KF_DELETE: begin
          n_del++;
          if (!conf_seen[dut.kf_cmd.id[3:0]]) n_del_tent++;
        end
        default: ;
      endcase
      conf_seen[dut.kf_cmd.id[3:0]] = dut.kf_cmd.confirmed;
      if (dut.kf_cmd.op == KF_INIT || dut.kf_cmd.op == KF_DELETE)
        $display("scan %0d: filter %0d %s", cur_scan, dut.kf_cmd.id,
                 dut.kf_cmd.op == KF_INIT ? "starts a track" : "drops its track");
    end
    if (dut.gc_cm_valid && dut.gc_cm_ready) begin
      if (dut.gc_cm.kind == CM_OBS) row_gated = 0;
      else if (dut.gc_cm.kind == CM_COST && dut.gc_cm.cost != COST_INF) begin
        row_gated++;
        if (row_gated == 2) n_two_in_gate++;
      end
    end
    if (dut.g_kf[0].e_valid && !dut.g_kf[0].e_ready) n_est_full++;
    if (pre_valid && !pre_ready) n_obs_full++;
  end

  // Radar: send one scan (observations in rotated order, then eos).
  task automatic send_word(obs_word_t w);
    @(negedge clk);
    radar_data  = 65'(w);
    radar_valid = 1'b1;
    while (!radar_ready) @(negedge clk);
    @(negedge clk);
    radar_valid = 1'b0;
  endtask

  obs_word_t sw [8];
  int        sn;
  task automatic send_scan(int s);
    obs_word_t o;
    sn = 0;
    for (int t = 0; t < NT; t++) if (present(t, s)) begin
      o.eos = 1'b0;
      o.x   = to_fx(tx(t, s) + noise());
      o.y   = to_fx(ty(t, s) + noise());
      sw[sn] = o;
      sn++;
    end
    if (s == 10) begin o.eos = 1'b0; o.x = to_fx(120.0); o.y = to_fx(10.0); sw[sn] = o; sn++; end
    if (s == 50) begin o.eos = 1'b0; o.x = to_fx(15.0);  o.y = to_fx(8.0);  sw[sn] = o; sn++; end
    for (int r = 0; r < sn; r++) send_word(sw[(r + s) % sn]);
    o = '0;
    o.eos = 1'b1;
    send_word(o);
    eos_cyc[s] = cyc;
  endtask

  function automatic bit all_got(int s);
    for (int k = 0; k < N; k++) if (got[k] <= s) return 0;
    return 1;
  endfunction

  // Track bookkeeping for the identity check.
  int id_t2 = -1, id_t3 = -1;

  task automatic evaluate(int s);
    int n_present = 0, n_confirmed = 0;
    bit stable = 1;
    for (int t = 0; t < NT; t++)
      if ((s >= t_on[t] && s < t_on[t] + 8) || (s > t_off[t] && s <= t_off[t] + 5)) stable = 0;
    if ((s >= 10 && s < 16) || (s >= 50 && s < 56)) stable = 0;
    if (!stable || s < 8) return;
    for (int k = 0; k < N; k++) if (elog[s][k].active && elog[s][k].confirmed) n_confirmed++;
    for (int t = 0; t < NT; t++) if (present(t, s)) begin
      int hits = 0, who = -1;
      n_present++;
      for (int k = 0; k < N; k++)
        if (elog[s][k].active && elog[s][k].confirmed &&
            ((to_r(elog[s][k].x) - tx(t, s)) ** 2 < TOL ** 2) &&
            ((to_r(elog[s][k].y) - ty(t, s)) ** 2 < TOL ** 2)) begin
          hits++; who = k;
        end
      check(hits == 1, $sformatf("scan %0d target %0d followed by %0d tracks", s, t, hits));
      if (t == 2) begin if (id_t2 < 0) id_t2 = who; check(who == id_t2, $sformatf("scan %0d target 2 changed track", s)); end
      if (t == 3) begin if (id_t3 < 0) id_t3 = who; check(who == id_t3, $sformatf("scan %0d target 3 changed track", s)); end
    end
    check(n_confirmed == n_present,
          $sformatf("scan %0d: %0d confirmed tracks for %0d targets", s, n_confirmed, n_present));
  endtask

  initial begin
    for (int k = 0; k < N; k++) got[k] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < SCANS; s++) begin
      cur_scan = s;
      if (s == 60) begin
        hold = 1'b1;
        fork begin repeat (150_000) @(posedge clk); hold = 1'b0; end join_none
      end
      send_scan(s);
      if (!bp_scan(s)) begin
        while (!all_got(s)) @(posedge clk);
        if ((s == 0 || !bp_scan(s - 1)) && cyc - eos_cyc[s] > max_lat) max_lat = cyc - eos_cyc[s];
        if (s == 0 || !bp_scan(s - 1))
          check(cyc - eos_cyc[s] < longint'(PRT_CYC), $sformatf("scan %0d latency %0d cycles", s, cyc - eos_cyc[s]));
        else
          $display("scan %0d (after back-pressure) done", s);
      end
    end
    for (int s = 0; s < SCANS; s++) evaluate(s);
    // Identity-level outcome of the scenario.
    check(n_init == 7, $sformatf("%0d tracks started, expected 7", n_init));
    check(n_del == 3, $sformatf("%0d tracks deleted, expected 3", n_del));
    // Every mechanism happened.
    check(n_init > 0,        "no track start");
    check(n_upd > 0,         "no filter update");
    check(n_coast > 0,       "no coasting track (observation-less gate)");
    check(n_del - n_del_tent > 0, "no confirmed track deleted");
    check(n_del_tent > 0,    "no tentative track deleted");
    check(n_two_in_gate > 0, "no gate with two observations");
    check(n_est_full > 0,    "estimate queue never full");
    check(n_obs_full > 0,    "observation queue never full");
    for (int k = 0; k < N; k++) for (int s = 1; s < SCANS; s++)
      if (elog[s][k].confirmed && !elog[s-1][k].confirmed) n_conf++;
    check(n_conf >= 4, $sformatf("%0d confirmations", n_conf));
    $display("longest scan latency without back-pressure: %0d cycles", max_lat);
    $display("mechanisms: init=%0d update=%0d coast=%0d delete=%0d (tentative %0d) confirm=%0d two_in_gate=%0d est_full=%0d obs_full=%0d",
             n_init, n_upd, n_coast, n_del, n_del_tent, n_conf, n_two_in_gate, n_est_full, n_obs_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
