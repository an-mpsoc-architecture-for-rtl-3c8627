// mtt_load_run: full-load run of a tracking system built with N filters:
// N targets at once, one per filter, for 40 radar scans, plus one more
// target from scan 20 on, for which no filter is free. Checks that all N
// filters carry a confirmed track within TOL metres of their target from
// scan 8 on, that the extra target never takes a track from the others, and
// that every scan finishes well within one 20 ms radar period at 100 MHz
// (2,000,000 cycles). Reports its check and failure counts and raises `done`.
module mtt_load_run
  import mtt_pkg::*;
#(
  parameter int N = MAX_TARGETS
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int  SCANS   = 40;
  localparam int  PRT_CYC = 2_000_000;
  localparam real DT      = 0.02;
  localparam real TOL     = 0.6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         radar_valid = 1'b0, radar_ready;
  logic [64:0]  radar_data  = '0;
  logic         raw_valid, raw_ready;
  logic [64:0]  raw_data;
  logic         pre_valid, pre_ready;
  obs_word_t    pre_obs;
  logic [N-1:0] est_valid;
  logic [N-1:0] est_ready = '1;
  est_word_t    est [N];

  mtt_mpsoc_top #(.N_TRK(N)) dut (
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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Target t: start (10 + 9 (t mod 10), -8 + 1.7 (t mod 10) + 20 (t div 10)),
  // speed (3 - 0.5 (t mod 10), 0.2 (t mod 10) - 1).
  function automatic real tx(int t, int s);
    return 10.0 + 9.0 * (t % 10) + (3.0 - 0.5 * (t % 10)) * DT * s;
  endfunction
  function automatic real ty(int t, int s);
    return -8.0 + 1.7 * (t % 10) + 20.0 * (t / 10) + (0.2 * (t % 10) - 1.0) * DT * s;
  endfunction
  function automatic fx_t to_fx(real r); return fx_t'($rtoi(r * 65536.0)); endfunction
  function automatic real to_r(fx_t f); return $itor(f) / 65536.0; endfunction
  function automatic real noise(); return ($itor($urandom_range(0, 2000)) - 1000.0) / 10000.0; endfunction

  est_word_t elog [N];
  int        got  [N];
  longint    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk)
    for (int k = 0; k < N; k++)
      if (est_valid[k] && est_ready[k]) begin elog[k] = est[k]; got[k] = got[k] + 1; end

  task automatic send_word(obs_word_t w);
    @(negedge clk);
    radar_data  = 65'(w);
    radar_valid = 1'b1;
    while (!radar_ready) @(negedge clk);
    @(negedge clk);
    radar_valid = 1'b0;
  endtask

  function automatic bit all_got(int s);
    for (int k = 0; k < N; k++) if (got[k] <= s) return 0;
    return 1;
  endfunction

  longint max_lat = 0;
  int     owner [N];

  initial begin
    obs_word_t o;
    longint    t0;
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 0; k < N; k++) begin got[k] = 0; owner[k] = -1; end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int s = 0; s < SCANS; s++) begin
      for (int t = 0; t < N + 1; t++) begin
        if (t == N && s < 20) continue;
        o.eos = 1'b0;
        o.x = (t == N) ? to_fx(5.0 + noise()) : to_fx(tx(t, s) + noise());
        o.y = (t == N) ? to_fx(-30.0 + noise()) : to_fx(ty(t, s) + noise());
        send_word(o);
      end
      o = '0;
      o.eos = 1'b1;
      send_word(o);
      t0 = cyc;
      while (!all_got(s)) @(posedge clk);
      if (cyc - t0 > max_lat) max_lat = cyc - t0;
      check(cyc - t0 < longint'(PRT_CYC), $sformatf("scan %0d took %0d cycles", s, cyc - t0));
      if (s >= 8) begin
        for (int t = 0; t < N; t++) begin
          int hits, who;
          hits = 0;
          who  = -1;
          for (int k = 0; k < N; k++)
            if (elog[k].active && elog[k].confirmed &&
                (to_r(elog[k].x) - tx(t, s)) ** 2 < TOL ** 2 && (to_r(elog[k].y) - ty(t, s)) ** 2 < TOL ** 2) begin
              hits++; who = k;
            end
          check(hits == 1, $sformatf("scan %0d target %0d followed by %0d tracks", s, t, hits));
          if (owner[t] < 0) owner[t] = who;
          check(who == owner[t], $sformatf("scan %0d target %0d changed filter", s, t));
        end
      end
    end
    $display("%0d filters: longest scan latency at full load %0d cycles (radar period %0d)", N, max_lat, PRT_CYC);
    done = 1'b1;
  end
endmodule
