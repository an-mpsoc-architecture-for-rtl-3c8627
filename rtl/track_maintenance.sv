// track_maintenance: the track maintenance engine (processor #13 of the
// architecture) with its three parts:
//  - obs-less gate identifier: a track whose gate received no observation in
//    this scan (AS_TRK flag = 0) records a miss in its history;
//  - new target identifier: a valid observation that lies outside every gate
//    (AS_OBS flag = 0) becomes a candidate for a new track;
//  - track init/del: a candidate starts a tentative track in the lowest free
//    filter slot; a track is confirmed once it has CONFIRM_M hits in its last
//    WINDOW_N scans (3 of 5), and deleted after DELETE_MISSES (3)
//    consecutive misses. A tentative track whose window is full without
//    reaching CONFIRM_M hits is deleted as well.
// Per scan it reads the assignment stream (N AS_OBS, N AS_TRK, AS_EOS) and
// then sends exactly one command per filter slot, slot 0 first, on the shared
// filter command queue: UPDATE with the assigned observation, COAST when no
// observation was assigned, DELETE, INIT with a candidate, or IDLE.
// Candidates beyond the number of free slots, and observations inside some
// gate but left unassigned, are dropped. The 3-of-5 and 3-miss rules follow
// the document; the tentative-deletion rule, the slot choice and the stream
// layout are this design's choices.
module track_maintenance
  import mtt_pkg::*;
#(
  parameter int unsigned N             = MAX_TARGETS,
  parameter int unsigned WINDOW_N      = 5,
  parameter int unsigned CONFIRM_M     = 3,
  parameter int unsigned DELETE_MISSES = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     as_valid,
  output logic     as_ready,
  input  as_word_t as,
  output logic     cmd_valid,
  input  logic     cmd_ready,
  output kf_cmd_t  cmd
);
  localparam int unsigned IW = $clog2(N + 1);
  localparam int unsigned AW = $clog2(WINDOW_N + 1);

  typedef enum logic [0:0] {S_LOAD, S_CMD} state_e;
  state_e state;

  // Per-track state.
  logic [N-1:0]        active, confirmed;
  logic [WINDOW_N-1:0] hist [N];   // bit 0 = latest scan, 1 = hit
  logic [AW-1:0]       age  [N];   // scans seen, saturating at WINDOW_N
  // Per-scan state.
  logic [N-1:0]        upd, ghit;
  fx_t                 ux [N];
  fx_t                 uy [N];
  fx_t                 cx [N];
  fx_t                 cy [N];
  logic [IW-1:0]       n_cand, rd_cand, ld_trk, slot;

  logic [IW-1:0] sl;
  assign sl = (slot < IW'(N)) ? slot : '0;

  // Decision for slot `sl`.
  logic [WINDOW_N-1:0] hist_n;
  logic [AW-1:0]       age_n;
  logic                conf_n, del_n, take_cand;
  int unsigned         hits;
  always_comb begin
    hist_n = {hist[sl][WINDOW_N-2:0], ghit[sl]};
    age_n  = (age[sl] < AW'(WINDOW_N)) ? age[sl] + 1'b1 : age[sl];
    hits   = 0;
    for (int b = 0; b < WINDOW_N; b++) hits += int'(hist_n[b]);
    conf_n = confirmed[sl] || (hits >= CONFIRM_M);
    del_n  = (hist_n[DELETE_MISSES-1:0] == '0) ||
             (!conf_n && age_n >= AW'(WINDOW_N));
    take_cand = !active[sl] && (rd_cand < n_cand);

    cmd    = '0;
    cmd.id = idx_t'(sl);
    if (active[sl]) begin
      cmd.confirmed = conf_n && !del_n;
      if (del_n)        cmd.op = KF_DELETE;
      else if (upd[sl]) cmd.op = KF_UPDATE;
      else              cmd.op = KF_COAST;
      cmd.x = ux[sl];
      cmd.y = uy[sl];
    end else if (take_cand) begin
      cmd.op = KF_INIT;
      cmd.x  = cx[(rd_cand < IW'(N)) ? rd_cand : '0];
      cmd.y  = cy[(rd_cand < IW'(N)) ? rd_cand : '0];
    end else begin
      cmd.op = KF_IDLE;
    end
  end

  assign as_ready  = (state == S_LOAD);
  assign cmd_valid = (state == S_CMD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      active    <= '0;
      confirmed <= '0;
      upd       <= '0;
      ghit      <= '0;
      n_cand    <= '0;
      rd_cand   <= '0;
      ld_trk    <= '0;
      slot      <= '0;
      for (int t = 0; t < N; t++) begin
        hist[t] <= '0; age[t] <= '0;
        ux[t] <= '0; uy[t] <= '0; cx[t] <= '0; cy[t] <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: if (as_valid) begin
          unique case (as.kind)
            AS_OBS: begin
              if (as.valid && as.assigned && as.trk < idx_t'(N)) begin
                upd[IW'(as.trk)] <= 1'b1;
                ux[IW'(as.trk)]  <= as.x;
                uy[IW'(as.trk)]  <= as.y;
              end else if (as.valid && !as.flag && n_cand < IW'(N)) begin
                cx[n_cand] <= as.x;
                cy[n_cand] <= as.y;
                n_cand     <= n_cand + 1'b1;
              end
            end
            AS_TRK: begin
              if (ld_trk < IW'(N)) ghit[ld_trk] <= as.flag;
              ld_trk <= ld_trk + 1'b1;
            end
            default: begin  // AS_EOS
              slot    <= '0;
              rd_cand <= '0;
              state   <= S_CMD;
            end
          endcase
        end
        S_CMD: if (cmd_ready) begin
          if (active[sl]) begin
            if (del_n) begin
              active[sl]    <= 1'b0;
              confirmed[sl] <= 1'b0;
              hist[sl]      <= '0;
              age[sl]       <= '0;
            end else begin
              confirmed[sl] <= conf_n;
              hist[sl]      <= hist_n;
              age[sl]       <= age_n;
            end
          end else if (take_cand) begin
            active[sl]    <= 1'b1;
            confirmed[sl] <= 1'b0;
            hist[sl]      <= WINDOW_N'(1);
            age[sl]       <= AW'(1);
            rd_cand       <= rd_cand + 1'b1;
          end
          if (slot == IW'(N - 1)) begin
            upd    <= '0;
            ghit   <= '0;
            n_cand <= '0;
            ld_trk <= '0;
            state  <= S_LOAD;
          end else slot <= slot + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
