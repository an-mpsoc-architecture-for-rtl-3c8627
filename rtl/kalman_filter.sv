// kalman_filter: one 4-state Kalman filter engine, the work of one of the ten
// filter processors. State [x vx y vy] with a constant-velocity model over one
// radar scan period DT; the observation is the position (x, y). With diagonal
// Q and R and a block-diagonal start covariance, P stays block-diagonal, so
// the engine keeps per axis only the three distinct entries a=P(pos,pos),
// b=P(pos,vel), c=P(vel,vel) and runs both axes side by side. The equations
// are the standard predict (eq. 1-2, no control input) and correct (eq. 3-5):
//   correct: k1=a/S, k2=b/S, e=z-x^, x=x^+k1 e, v=v^+k2 e,
//            a-=k1 a, b-=k1 b, c-=k2 b             (S = a + R)
//   predict: x^=x+DT v, a=a+2DT b+DT^2 c+Q_POS, b=b+DT c, c=c+Q_VEL
// Fixed point Q16.16 replaces floating point; 1/S comes from hw_divider.
//
// Interface: commands arrive on a queue shared by all filters; the engine
// takes the head word (cmd_ready) only when cmd.id == ID and it is idle.
//   KF_IDLE   slot unused: report inactive
//   KF_INIT   start a track at (x,y), speed 0, P = diag(R, P0_VEL)
//   KF_UPDATE correct with the assigned observation (x,y)
//   KF_COAST  no observation: estimate = prediction
//   KF_DELETE drop the track
// After each command it predicts, computes 1/S for both axes (2 divisions of
// 48 cycles) and then offers one pred_word_t (to the gate engine) and one
// est_word_t (to the display) and waits until both are taken. After reset
// it offers an inactive prediction so that the first scan can start.
// Parameter values are this design's choices (the scan period follows the
// 20 ms radar pulse repetition time).
module kalman_filter
  import mtt_pkg::*;
#(
  parameter int unsigned ID     = 0,
  parameter fx_t         DT     = fx_t'(1311),     // 0.02 s
  parameter fx_t         R_MEAS = fx_t'(16384),    // 0.25 m^2
  parameter fx_t         Q_POS  = fx_t'(655),      // 0.01 m^2
  parameter fx_t         Q_VEL  = fx_t'(6554),     // 0.1 (m/s)^2
  parameter fx_t         P0_VEL = fx_t'(6553600)   // 100 (m/s)^2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  kf_cmd_t    cmd,
  output logic       pred_valid,
  input  logic       pred_ready,
  output pred_word_t pred,
  output logic       est_valid,
  input  logic       est_ready,
  output est_word_t  est
);

  typedef struct packed {
    fx_t p;  // position
    fx_t v;  // velocity
    fx_t a;  // P(pos,pos)
    fx_t b;  // P(pos,vel)
    fx_t c;  // P(vel,vel)
  } axis_t;

  typedef enum logic [2:0] {S_CMD, S_PRED, S_DIVX, S_DIVY, S_EMIT} state_e;
  state_e state;

  logic  active, confirmed;
  axis_t pr_x, pr_y;      // prediction (state and covariance)
  axis_t es_x, es_y;      // estimate after the last command
  fx_t   inv_sx, inv_sy;  // 1/S of the current prediction
  logic  pred_sent, est_sent;

  // Correct one axis with observation z.
  function automatic axis_t correct(axis_t pr, fx_t inv_s, fx_t z);
    axis_t r;
    fx_t   k1, k2, e;
    k1  = fx_mul(pr.a, inv_s);
    k2  = fx_mul(pr.b, inv_s);
    e   = z - pr.p;
    r.p = pr.p + fx_mul(k1, e);
    r.v = pr.v + fx_mul(k2, e);
    r.a = pr.a - fx_mul(k1, pr.a);
    r.b = pr.b - fx_mul(k1, pr.b);
    r.c = pr.c - fx_mul(k2, pr.b);
    return r;
  endfunction

  // Predict one axis one scan ahead.
  function automatic axis_t predict(axis_t es);
    axis_t r;
    r.p = es.p + fx_mul(DT, es.v);
    r.v = es.v;
    r.a = es.a + (fx_mul(DT, es.b) <<< 1) + fx_mul(fx_mul(DT, DT), es.c) + Q_POS;
    r.b = es.b + fx_mul(DT, es.c);
    r.c = es.c + Q_VEL;
    return r;
  endfunction

  function automatic axis_t start_axis(fx_t z);
    axis_t r;
    r.p = z;
    r.v = '0;
    r.a = R_MEAS;
    r.b = '0;
    r.c = P0_VEL;
    return r;
  endfunction

  // Divider for 1/S.
  logic        div_start, div_busy, div_done;
  logic [47:0] div_q;
  logic [31:0] div_r;
  fx_t         div_den;

  hw_divider #(.NW(48), .DW(32)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (48'h1_0000_0000),
    .divisor  (div_den),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  // Reciprocal in Q16.16, limited to the positive range.
  function automatic fx_t sat_recip(logic [47:0] q);
    return (q > 48'h7FFF_FFFF) ? fx_t'(32'h7FFF_FFFF) : fx_t'(q[31:0]);
  endfunction

  assign cmd_ready = (state == S_CMD) && (cmd.id == idx_t'(ID));
  assign div_den   = (state == S_DIVX) ? pr_x.a + R_MEAS : pr_y.a + R_MEAS;
  assign div_start = ((state == S_DIVX) || (state == S_DIVY)) && !div_busy && !div_done;

  assign pred_valid = (state == S_EMIT) && !pred_sent;
  assign est_valid  = (state == S_EMIT) && !est_sent;

  always_comb begin
    pred.active = active;
    pred.x      = pr_x.p;
    pred.y      = pr_y.p;
    pred.sx     = pr_x.a + R_MEAS;
    pred.sy     = pr_y.a + R_MEAS;
    est.id        = idx_t'(ID);
    est.active    = active;
    est.confirmed = confirmed;
    est.x         = es_x.p;
    est.vx        = es_x.v;
    est.y         = es_y.p;
    est.vy        = es_y.v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_EMIT;
      active    <= 1'b0;
      confirmed <= 1'b0;
      pr_x      <= '0;
      pr_y      <= '0;
      es_x      <= '0;
      es_y      <= '0;
      inv_sx    <= '0;
      inv_sy    <= '0;
      pred_sent <= 1'b0;
      est_sent  <= 1'b1;  // no estimate before the first command
    end else begin
      unique case (state)
        S_CMD: if (cmd_valid && cmd_ready) begin
          confirmed <= cmd.confirmed;
          unique case (cmd.op)
            KF_INIT: begin
              active <= 1'b1;
              es_x   <= start_axis(cmd.x);
              es_y   <= start_axis(cmd.y);
              state  <= S_PRED;
            end
            KF_UPDATE: begin
              es_x  <= correct(pr_x, inv_sx, cmd.x);
              es_y  <= correct(pr_y, inv_sy, cmd.y);
              state <= S_PRED;
            end
            KF_COAST: begin
              es_x  <= pr_x;
              es_y  <= pr_y;
              state <= S_PRED;
            end
            default: begin  // KF_IDLE, KF_DELETE
              active    <= 1'b0;
              confirmed <= 1'b0;
              es_x      <= '0;
              es_y      <= '0;
              pr_x      <= '0;
              pr_y      <= '0;
              pred_sent <= 1'b0;
              est_sent  <= 1'b0;
              state     <= S_EMIT;
            end
          endcase
        end
        S_PRED: begin
          pr_x  <= predict(es_x);
          pr_y  <= predict(es_y);
          state <= S_DIVX;
        end
        S_DIVX: if (div_done) begin
          inv_sx <= sat_recip(div_q);
          state  <= S_DIVY;
        end
        S_DIVY: if (div_done) begin
          inv_sy    <= sat_recip(div_q);
          pred_sent <= 1'b0;
          est_sent  <= 1'b0;
          state     <= S_EMIT;
        end
        S_EMIT: begin
          if (pred_valid && pred_ready) pred_sent <= 1'b1;
          if (est_valid && est_ready)   est_sent  <= 1'b1;
          if ((pred_sent || (pred_valid && pred_ready)) &&
              (est_sent  || (est_valid  && est_ready)))
            state <= S_CMD;
        end
        default: state <= S_CMD;
      endcase
    end
  end

endmodule
