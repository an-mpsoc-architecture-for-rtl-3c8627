// tb_track_maintenance: drives a 4-slot engine with assignment streams and
// checks every filter command against a reference model of the rules:
// start a tentative track per observation outside all gates (lowest free
// slot first), confirm at 3 gate hits in the last 5 scans, delete after 3
// consecutive obs-less gates or when the 5-scan window of a tentative track
// ends unconfirmed, UPDATE with the assigned observation, COAST otherwise.
// Six scripted scans check the rules directly (a track confirmed at its
// third hit, one deleted at its third miss, one deleted when its window
// ends); 150 random scans follow. The command side is randomly stalled.
module tb_track_maintenance;
  import mtt_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     as_valid = 1'b0, as_ready, cmd_valid, cmd_ready = 1'b0;
  as_word_t as = '0;
  kf_cmd_t  cmd;

  track_maintenance #(.N(N)) dut (.clk, .rst_n, .as_valid, .as_ready, .as, .cmd_valid, .cmd_ready, .cmd);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference model state.
  bit       m_act [N], m_conf [N];
  bit [4:0] m_hist [N];
  int       m_age [N];

  kf_cmd_t outc [$];
  always @(posedge clk) if (rst_n && cmd_valid && cmd_ready) outc.push_back(cmd);
  always @(negedge clk) cmd_ready = ($urandom_range(0, 2) != 0);

  task automatic send(as_word_t w);
    @(negedge clk);
    as = w; as_valid = 1'b1;
    while (!as_ready) @(negedge clk);
    @(negedge clk);
    as_valid = 1'b0;
  endtask

  int n_conf = 0, n_del = 0, n_init = 0, n_coast = 0, n_upd = 0;
  kf_cmd_t last [N];

  // One scan: hit[j] = gate of slot j holds an observation, upd[j] = an
  // observation is assigned to slot j, nnew new observations outside all
  // gates, junk = one observation inside a gate but unassigned.
  task automatic scan(bit hit [N], bit upd [N], int nnew, bit junk);
    as_word_t rows [$];
    as_word_t w;
    fx_t      ux [N], uy [N], cx [$], cy [$];
    int       nc, rd;
    for (int j = 0; j < N; j++) if (upd[j] && m_act[j]) begin
      w = '0; w.kind = AS_OBS; w.valid = 1; w.flag = 1; w.assigned = 1; w.trk = idx_t'(j);
      w.x = fx_t'($urandom); w.y = fx_t'($urandom);
      ux[j] = w.x; uy[j] = w.y;
      rows.push_back(w);
    end
    for (int k = 0; k < nnew; k++) begin
      w = '0; w.kind = AS_OBS; w.valid = 1; w.flag = 0; w.trk = idx_t'($urandom_range(0, N - 1));
      w.x = fx_t'($urandom); w.y = fx_t'($urandom);
      cx.push_back(w.x); cy.push_back(w.y);
      rows.push_back(w);
    end
    if (junk) begin
      w = '0; w.kind = AS_OBS; w.valid = 1; w.flag = 1; w.x = fx_t'($urandom);
      rows.push_back(w);
    end
    while (rows.size() < N) begin w = '0; w.kind = AS_OBS; w.trk = idx_t'($urandom_range(0, 3)); rows.push_back(w); end
    outc = {};
    for (int r = 0; r < rows.size(); r++) send(rows[r]);
    for (int j = 0; j < N; j++) begin
      w = '0; w.kind = AS_TRK; w.flag = hit[j] || (upd[j] && m_act[j]); send(w);
    end
    w = '0; w.kind = AS_EOS; send(w);
    while (outc.size() < N) @(negedge clk);
    repeat (3) @(negedge clk);
    check(outc.size() == N, "one command per slot");
    // Reference decision.
    nc = cx.size(); rd = 0;
    for (int j = 0; j < N; j++) begin
      kf_cmd_t e;
      e = '0; e.id = idx_t'(j);
      if (m_act[j]) begin
        bit [4:0] h;
        int hits;
        h = {m_hist[j][3:0], hit[j] || upd[j]};
        hits = h[0] + h[1] + h[2] + h[3] + h[4];
        if (m_age[j] < 5) m_age[j]++;
        if (hits >= 3 && !m_conf[j]) begin m_conf[j] = 1; n_conf++; end
        if (h[2:0] == 3'b000 || (!m_conf[j] && m_age[j] >= 5)) begin
          e.op = KF_DELETE; m_act[j] = 0; m_conf[j] = 0; n_del++;
        end else if (upd[j]) begin
          e.op = KF_UPDATE; e.x = ux[j]; e.y = uy[j]; e.confirmed = m_conf[j]; n_upd++;
        end else begin
          e.op = KF_COAST; e.confirmed = m_conf[j]; n_coast++;
        end
        m_hist[j] = h;
      end else if (rd < nc) begin
        e.op = KF_INIT; e.x = cx[rd]; e.y = cy[rd]; rd++;
        m_act[j] = 1; m_conf[j] = 0; m_hist[j] = 5'b00001; m_age[j] = 1; n_init++;
      end else e.op = KF_IDLE;
      if (outc.size() > j) begin
        last[j] = outc[j];
        check(outc[j].id == e.id && outc[j].op == e.op && outc[j].confirmed == e.confirmed &&
              ((e.op != KF_UPDATE && e.op != KF_INIT) || (outc[j].x == e.x && outc[j].y == e.y)),
              $sformatf("slot %0d: got op %0d conf %0d, expected op %0d conf %0d",
                        j, outc[j].op, outc[j].confirmed, e.op, e.confirmed));
      end
    end
  endtask

  initial begin
    bit h [N], u [N];
    for (int j = 0; j < N; j++) begin m_act[j] = 0; m_conf[j] = 0; m_hist[j] = 0; m_age[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Scripted: slot0 always hit, slot1 never, slot2 miss, miss, hit, miss.
    for (int j = 0; j < N; j++) begin h[j] = 0; u[j] = 0; end
    scan(h, u, 3, 0);
    check(last[0].op == KF_INIT && last[1].op == KF_INIT && last[2].op == KF_INIT && last[3].op == KF_IDLE, "three starts");
    u[0] = 1; scan(h, u, 0, 0);                     // scan 1
    check(!last[0].confirmed, "confirmed too early");
    scan(h, u, 0, 1);                               // scan 2: third hit
    check(last[0].confirmed && last[0].op == KF_UPDATE, "slot 0 not confirmed at third hit");
    u[2] = 1; scan(h, u, 0, 0); u[2] = 0;           // scan 3: slot1 third miss
    check(last[1].op == KF_DELETE, "slot 1 not deleted at third miss");
    scan(h, u, 0, 0);                               // scan 4: slot2 window ends with 2 hits
    check(last[2].op == KF_DELETE, "slot 2 not deleted at end of window");
    scan(h, u, 2, 0);                               // scan 5: two starts in free slots
    check(last[1].op == KF_INIT && last[2].op == KF_INIT, "free slots not reused");
    // Random scans.
    for (int s = 0; s < 150; s++) begin
      for (int j = 0; j < N; j++) begin
        u[j] = ($urandom_range(0, 99) < ((j == 0) ? 90 : (j == 1) ? 60 : 35));
        h[j] = u[j] || ($urandom_range(0, 9) == 0);
      end
      scan(h, u, $urandom_range(0, 2), $urandom_range(0, 3) == 0);
    end
    check(n_conf > 5 && n_del > 5 && n_init > 5 && n_coast > 5 && n_upd > 5, "random scans too tame");
    $display("confirm=%0d delete=%0d init=%0d coast=%0d update=%0d", n_conf, n_del, n_init, n_coast, n_upd);
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
