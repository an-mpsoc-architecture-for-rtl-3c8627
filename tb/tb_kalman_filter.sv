// tb_kalman_filter: drives one filter engine (ID 3) with a command sequence
// (start, updates along a moving target, coasting, delete, idle) and compares
// every prediction and estimate with a floating-point model of the same
// constant-velocity Kalman filter (eq. 1-5 with diagonal Q and R). Also
// checks that commands for another ID are left alone, that the engine offers
// an inactive prediction after reset, and that a command is answered within
// 2*(48+1)+6 cycles.
module tb_kalman_filter;
  import mtt_pkg::*;

  localparam int  ID  = 3;
  localparam real DT  = 1311.0 / 65536.0;
  localparam real R   = 0.25, QP = 655.0 / 65536.0, QV = 6554.0 / 65536.0, P0V = 100.0;
  localparam real TOL = 0.02;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       cmd_valid = 1'b0, cmd_ready, pred_valid, pred_ready = 1'b0, est_valid, est_ready = 1'b1;
  kf_cmd_t    cmd = '0;
  pred_word_t pred;
  est_word_t  est;

  kalman_filter #(.ID(ID)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .pred_valid, .pred_ready, .pred, .est_valid, .est_ready, .est
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fx_t to_fx(real r); return fx_t'($rtoi(r * 65536.0)); endfunction
  function automatic real to_r(fx_t f); return $itor(f) / 65536.0; endfunction
  function automatic bit near(real a, real b, real tol);
    real d = a - b;
    if (d < 0) d = -d;
    return d <= tol + 0.01 * ((b < 0) ? -b : b);
  endfunction

  // Reference model, per axis: prediction (p, v, a, b, c) and estimate.
  real mp [2], mv [2], ma [2], mb [2], mc [2];
  real ep [2], ev [2];
  bit  m_active = 0;

  task automatic m_predict();
    for (int x = 0; x < 2; x++) begin
      real a = ma[x], b = mb[x], c = mc[x];
      mp[x] = ep[x] + DT * ev[x];
      mv[x] = ev[x];
      ma[x] = a + 2.0 * DT * b + DT * DT * c + QP;
      mb[x] = b + DT * c;
      mc[x] = c + QV;
    end
  endtask

  task automatic m_cmd(kf_op_e op, real zx, real zy);
    real z [2];
    z[0] = zx; z[1] = zy;
    case (op)
      KF_INIT: begin
        m_active = 1;
        for (int x = 0; x < 2; x++) begin
          ep[x] = z[x]; ev[x] = 0.0; ma[x] = R; mb[x] = 0.0; mc[x] = P0V;
        end
        m_predict();
      end
      KF_UPDATE: begin
        for (int x = 0; x < 2; x++) begin
          real s = ma[x] + R, k1 = ma[x] / s, k2 = mb[x] / s, e = z[x] - mp[x];
          real a = ma[x], b = mb[x], c = mc[x];
          ep[x] = mp[x] + k1 * e;
          ev[x] = mv[x] + k2 * e;
          ma[x] = a - k1 * a;
          mb[x] = b - k1 * b;
          mc[x] = c - k2 * b;
        end
        m_predict();
      end
      KF_COAST: begin
        for (int x = 0; x < 2; x++) begin ep[x] = mp[x]; ev[x] = mv[x]; end
        m_predict();
      end
      default: m_active = 0;
    endcase
  endtask

  pred_word_t got_pred;
  est_word_t  got_est;

  // Send one command and collect the answer.
  task automatic do_cmd(kf_op_e op, real zx, real zy, bit conf);
    int cycles = 0;
    bit have_p = 0, have_e = 0;
    @(negedge clk);
    cmd.id = idx_t'(ID); cmd.op = op; cmd.confirmed = conf; cmd.x = to_fx(zx); cmd.y = to_fx(zy);
    cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!(have_p && have_e)) begin
      if (pred_valid) begin got_pred = pred; have_p = 1; end
      if (est_valid)  begin got_est  = est;  have_e = 1; end
      @(negedge clk);
      cycles++;
    end
    check(cycles <= 2 * 49 + 6, $sformatf("answer took %0d cycles", cycles));
    m_cmd(op, zx, zy);
    check(got_pred.active == m_active && got_est.active == m_active, "active flag");
    check(got_est.confirmed == (conf && m_active) && got_est.id == idx_t'(ID), "confirmed flag / id");
    if (m_active) begin
      check(near(to_r(got_pred.x), mp[0], TOL) && near(to_r(got_pred.y), mp[1], TOL),
            $sformatf("prediction (%f,%f) model (%f,%f)", to_r(got_pred.x), to_r(got_pred.y), mp[0], mp[1]));
      check(near(to_r(got_pred.sx), ma[0] + R, TOL) && near(to_r(got_pred.sy), ma[1] + R, TOL),
            $sformatf("S (%f,%f) model (%f,%f)", to_r(got_pred.sx), to_r(got_pred.sy), ma[0] + R, ma[1] + R));
      check(near(to_r(got_est.x), ep[0], TOL) && near(to_r(got_est.y), ep[1], TOL),
            $sformatf("estimate (%f,%f) model (%f,%f)", to_r(got_est.x), to_r(got_est.y), ep[0], ep[1]));
      check(near(to_r(got_est.vx), ev[0], 0.2) && near(to_r(got_est.vy), ev[1], 0.2),
            $sformatf("speed (%f,%f) model (%f,%f)", to_r(got_est.vx), to_r(got_est.vy), ev[0], ev[1]));
    end
  endtask

  initial begin
    real x, y;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Inactive prediction offered after reset.
    repeat (3) @(negedge clk);
    check(pred_valid && !pred.active, "no inactive prediction after reset");
    pred_ready = 1'b1;
    @(negedge clk);
    pred_ready = 1'b1;
    @(negedge clk);
    check(!pred_valid, "second prediction without a command");
    // A command for another filter is not taken.
    cmd.id = idx_t'(ID + 1); cmd.op = KF_INIT; cmd_valid = 1'b1;
    repeat (2) @(negedge clk);
    check(!cmd_ready, "took a command for another filter");
    cmd_valid = 1'b0;
    // Track a target moving at (6, -2) m/s with small noise.
    x = 40.0; y = 3.0;
    do_cmd(KF_INIT, x, y, 0);
    for (int s = 1; s <= 40; s++) begin
      x += 6.0 * DT; y -= 2.0 * DT;
      if (s == 20 || s == 21) do_cmd(KF_COAST, 0.0, 0.0, 1);
      else do_cmd(KF_UPDATE, x + (($itor($urandom_range(0, 200)) - 100.0) / 1000.0), y, s >= 2);
    end
    do_cmd(KF_DELETE, 0.0, 0.0, 0);
    do_cmd(KF_IDLE, 0.0, 0.0, 0);
    do_cmd(KF_INIT, -5.0, 12.0, 0);
    do_cmd(KF_UPDATE, -5.1, 12.2, 0);
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
