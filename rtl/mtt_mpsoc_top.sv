// mtt_mpsoc_top: radar-based multiple target tracking system built as a set
// of processing engines joined by queues, following the 15-processor
// architecture it models. Each processor of that architecture is replaced by
// a fixed-function engine with the same role and the same queue links:
//
//   radar --q--> [pre-formatting, outside] --q--> gate_cost_unit (#11)
//   gate_cost_unit --q--> assignment_solver (#12) --q--> track_maintenance (#13)
//   track_maintenance --shared command q--> kalman_filter x N_TRK (#1..#10)
//   kalman_filter j --q--> gate_cost_unit (prediction for the next scan)
//   kalman_filter j --q--> est_* ports (towards interface/display #14)
//
// The radar pre-formatting and the interface/display functions are not part
// of this RTL: the radar queue output (raw_*) and the pre-formatted
// observation input (pre_*) and the N_TRK estimate queues (est_*) are ports.
// All links use valid/ready. One scan is: observations closed by an eos word
// in on pre_*, and one est_word_t per filter out on est_*; a scan takes a few
// thousand clock cycles at N_TRK = 10, far below the 20 ms radar pulse
// repetition time at 100 MHz (2,000,000 cycles).
// The number of filters follows the document (10). Queue depths are not
// given for the original system beyond "the faster a function, the deeper
// the queues on its output"; the depths below are this design's choice.
module mtt_mpsoc_top
  import mtt_pkg::*;
#(
  parameter int unsigned N_TRK      = MAX_TARGETS,
  parameter int unsigned RAW_W      = 65,
  parameter int unsigned RADAR_QD   = 32,
  parameter int unsigned OBS_QD     = 32,
  parameter int unsigned PRED_QD    = 2,
  parameter int unsigned CM_QD      = 16,
  parameter int unsigned AS_QD      = 8,
  parameter int unsigned CMD_QD     = 16,
  parameter int unsigned EST_QD     = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // Radar -> radar queue.
  input  logic             radar_valid,
  output logic             radar_ready,
  input  logic [RAW_W-1:0] radar_data,
  // Radar queue -> pre-formatting.
  output logic             raw_valid,
  input  logic             raw_ready,
  output logic [RAW_W-1:0] raw_data,
  // Pre-formatting -> observation queue.
  input  logic             pre_valid,
  output logic             pre_ready,
  input  obs_word_t        pre_obs,
  // Filter estimates -> interface/display.
  output logic [N_TRK-1:0] est_valid,
  input  logic [N_TRK-1:0] est_ready,
  output est_word_t        est [N_TRK]
);

  // Radar queue.
  sync_fifo #(.T(logic [RAW_W-1:0]), .DEPTH(RADAR_QD)) u_radar_q (
    .clk, .rst_n,
    .in_valid (radar_valid), .in_ready (radar_ready), .in_data (radar_data),
    .out_valid(raw_valid),   .out_ready(raw_ready),   .out_data(raw_data)
  );

  // Observation queue.
  logic      obs_valid, obs_ready;
  obs_word_t obs;
  sync_fifo #(.T(obs_word_t), .DEPTH(OBS_QD)) u_obs_q (
    .clk, .rst_n,
    .in_valid (pre_valid), .in_ready (pre_ready), .in_data (pre_obs),
    .out_valid(obs_valid), .out_ready(obs_ready), .out_data(obs)
  );

  // Prediction queues, one per filter.
  logic [N_TRK-1:0] kf_pred_valid, kf_pred_ready;
  pred_word_t       kf_pred [N_TRK];
  logic [N_TRK-1:0] gc_pred_valid, gc_pred_ready;
  pred_word_t       gc_pred [N_TRK];

  // Gate compute, gate checker and cost-matrix generator.
  logic     gc_cm_valid, gc_cm_ready;
  cm_word_t gc_cm;
  gate_cost_unit #(.N_TRK(N_TRK), .N_OBS(N_TRK)) u_gate (
    .clk, .rst_n,
    .pred_valid(gc_pred_valid), .pred_ready(gc_pred_ready), .pred(gc_pred),
    .obs_valid (obs_valid),     .obs_ready (obs_ready),     .obs (obs),
    .cm_valid  (gc_cm_valid),   .cm_ready  (gc_cm_ready),   .cm  (gc_cm)
  );

  logic     as_cm_valid, as_cm_ready;
  cm_word_t as_cm;
  sync_fifo #(.T(cm_word_t), .DEPTH(CM_QD)) u_cm_q (
    .clk, .rst_n,
    .in_valid (gc_cm_valid), .in_ready (gc_cm_ready), .in_data (gc_cm),
    .out_valid(as_cm_valid), .out_ready(as_cm_ready), .out_data(as_cm)
  );

  // Assignment solver.
  logic     sol_as_valid, sol_as_ready;
  as_word_t sol_as;
  assignment_solver #(.N(N_TRK)) u_solver (
    .clk, .rst_n,
    .cm_valid(as_cm_valid),  .cm_ready(as_cm_ready),  .cm(as_cm),
    .as_valid(sol_as_valid), .as_ready(sol_as_ready), .as(sol_as)
  );

  logic     tm_as_valid, tm_as_ready;
  as_word_t tm_as;
  sync_fifo #(.T(as_word_t), .DEPTH(AS_QD)) u_as_q (
    .clk, .rst_n,
    .in_valid (sol_as_valid), .in_ready (sol_as_ready), .in_data (sol_as),
    .out_valid(tm_as_valid),  .out_ready(tm_as_ready),  .out_data(tm_as)
  );

  // Track maintenance.
  logic    tm_cmd_valid, tm_cmd_ready;
  kf_cmd_t tm_cmd;
  track_maintenance #(.N(N_TRK)) u_track (
    .clk, .rst_n,
    .as_valid (tm_as_valid),  .as_ready (tm_as_ready),  .as (tm_as),
    .cmd_valid(tm_cmd_valid), .cmd_ready(tm_cmd_ready), .cmd(tm_cmd)
  );

  // Shared filter command queue: every filter sees the head word, the one
  // whose ID matches takes it.
  logic             kf_cmd_valid, kf_cmd_ready;
  logic [N_TRK-1:0] kf_cmd_take;
  kf_cmd_t          kf_cmd;
  sync_fifo #(.T(kf_cmd_t), .DEPTH(CMD_QD)) u_cmd_q (
    .clk, .rst_n,
    .in_valid (tm_cmd_valid), .in_ready (tm_cmd_ready), .in_data (tm_cmd),
    .out_valid(kf_cmd_valid), .out_ready(kf_cmd_ready), .out_data(kf_cmd)
  );
  assign kf_cmd_ready = |kf_cmd_take;

  // Kalman filters with their prediction and estimate queues.
  for (genvar k = 0; k < N_TRK; k++) begin : g_kf
    logic      e_valid, e_ready;
    est_word_t e_word;

    kalman_filter #(.ID(k)) u_kf (
      .clk, .rst_n,
      .cmd_valid (kf_cmd_valid),     .cmd_ready (kf_cmd_take[k]),   .cmd (kf_cmd),
      .pred_valid(kf_pred_valid[k]), .pred_ready(kf_pred_ready[k]), .pred(kf_pred[k]),
      .est_valid (e_valid),          .est_ready (e_ready),          .est (e_word)
    );

    sync_fifo #(.T(pred_word_t), .DEPTH(PRED_QD)) u_pred_q (
      .clk, .rst_n,
      .in_valid (kf_pred_valid[k]), .in_ready (kf_pred_ready[k]), .in_data (kf_pred[k]),
      .out_valid(gc_pred_valid[k]), .out_ready(gc_pred_ready[k]), .out_data(gc_pred[k])
    );

    sync_fifo #(.T(est_word_t), .DEPTH(EST_QD)) u_est_q (
      .clk, .rst_n,
      .in_valid (e_valid),      .in_ready (e_ready),      .in_data (e_word),
      .out_valid(est_valid[k]), .out_ready(est_ready[k]), .out_data(est[k])
    );
  end

  // At most one filter takes a command word.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(kf_cmd_take));

endmodule
