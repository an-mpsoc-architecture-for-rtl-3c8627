// mtt_pkg: types and constants shared by the multiple target tracking (MTT)
// engines. All arithmetic is fixed point Q16.16 in 32-bit two's complement
// (metres, metres per second and their squares). The words that travel over
// the queues between engines are defined here as packed structs; the order in
// which each engine sends its words is given in that engine's header comment.
// The number of tracked targets (10) follows the system this design models;
// number format, word layouts and the noise constants are choices of this
// design.
package mtt_pkg;

  // Largest number of targets tracked at once (one Kalman filter per target).
  parameter int unsigned MAX_TARGETS = 10;

  parameter int unsigned FX_W    = 32;
  parameter int unsigned FX_FRAC = 16;
  typedef logic signed [FX_W-1:0] fx_t;

  // Statistical distance of an observation-to-track pair, unsigned Q16.16.
  typedef logic [31:0] cost_t;
  // Cost of a pair that lies outside the gate (256.0). Far above any gated
  // cost, so the solver first maximises the number of gated pairs.
  localparam cost_t COST_INF = 32'h0100_0000;

  typedef logic [7:0] idx_t;

  // Observation word (pre-formatting -> gate/cost engine). A word with eos=1
  // carries no observation and closes the scan.
  typedef struct packed {
    logic eos;
    fx_t  x;
    fx_t  y;
  } obs_word_t;

  // Prediction word (Kalman filter -> gate/cost engine), one per filter per
  // scan: predicted position and innovation variance S = P(pos) + R per axis.
  typedef struct packed {
    logic active;
    fx_t  x;
    fx_t  y;
    fx_t  sx;
    fx_t  sy;
  } pred_word_t;

  // Cost-matrix stream (gate/cost engine -> assignment solver).
  typedef enum logic [1:0] {CM_OBS, CM_COST, CM_TRK, CM_EOS} cm_kind_e;
  typedef struct packed {
    cm_kind_e kind;
    logic     valid;  // CM_OBS: an observation exists in this row
    logic     flag;   // CM_OBS: inside some gate; CM_TRK: gate holds an observation
    fx_t      x;
    fx_t      y;
    cost_t    cost;   // CM_COST
  } cm_word_t;

  // Assignment stream (assignment solver -> track maintenance).
  typedef enum logic [1:0] {AS_OBS, AS_TRK, AS_EOS} as_kind_e;
  typedef struct packed {
    as_kind_e kind;
    logic     valid;     // AS_OBS: observation exists
    logic     flag;      // AS_OBS: inside some gate; AS_TRK: gate holds an observation
    logic     assigned;  // AS_OBS: paired with track `trk` inside its gate
    idx_t     trk;
    fx_t      x;
    fx_t      y;
  } as_word_t;

  // Filter commands (track maintenance -> Kalman filters, shared queue).
  typedef enum logic [2:0] {KF_IDLE, KF_INIT, KF_UPDATE, KF_COAST, KF_DELETE} kf_op_e;
  typedef struct packed {
    idx_t   id;
    kf_op_e op;
    logic   confirmed;
    fx_t    x;
    fx_t    y;
  } kf_cmd_t;

  // Estimate word (Kalman filter -> interface/display), one per filter per scan.
  typedef struct packed {
    idx_t id;
    logic active;
    logic confirmed;
    fx_t  x;
    fx_t  vx;
    fx_t  y;
    fx_t  vy;
  } est_word_t;

  // Q16.16 product, truncated toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = $signed(a) * $signed(b);
    return fx_t'(p >>> FX_FRAC);
  endfunction

endpackage
