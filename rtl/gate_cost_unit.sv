// gate_cost_unit: the gate compute, gate checker and cost-matrix generator
// grouped on one engine (processor #11 of the architecture). Per scan it
//  1. collects one prediction word from each of the N_TRK filter queues and
//     the observations of one scan (up to N_OBS, closed by an eos word; extra
//     observations are dropped);
//  2. gate compute: for every active track turns the predicted innovation
//     variances Sx, Sy into gate weights 1/Sx, 1/Sy with hw_divider;
//  3. gate checker and cost matrix: for observation i and track j the cost is
//     the statistical distance d2 = dx^2/Sx + dy^2/Sy; a pair is inside the
//     gate when d2 <= GATE_THR, otherwise its cost is COST_INF;
//  4. sends, row by row, one CM_OBS word (valid, coordinates, flag = inside
//     some gate) followed by N_TRK CM_COST words; then N_TRK CM_TRK words
//     (flag = at least one observation in that track's gate); then CM_EOS.
// Rows N_OBS and columns N_TRK are fixed, empty ones are sent as invalid rows
// or COST_INF columns so that the solver always sees a full matrix.
// GATE_THR = 9.21 (chi-square, 2 degrees of freedom, 99 %) and the word
// layout are this design's choices; the three functions and their grouping
// follow the architecture.
module gate_cost_unit
  import mtt_pkg::*;
#(
  parameter int unsigned N_TRK    = MAX_TARGETS,
  parameter int unsigned N_OBS    = MAX_TARGETS,
  parameter cost_t       GATE_THR = cost_t'(603586)  // 9.21
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_TRK-1:0] pred_valid,
  output logic [N_TRK-1:0] pred_ready,
  input  pred_word_t       pred [N_TRK],
  input  logic             obs_valid,
  output logic             obs_ready,
  input  obs_word_t        obs,
  output logic             cm_valid,
  input  logic             cm_ready,
  output cm_word_t         cm
);
  localparam int unsigned TW = $clog2(N_TRK + 1);
  localparam int unsigned OW = $clog2(N_OBS + 1);

  typedef enum logic [2:0] {S_COLLECT, S_GATE_X, S_GATE_Y, S_ROW, S_COST, S_TRK, S_EOS} state_e;
  state_e state;

  // Stored predictions and gates.
  logic [N_TRK-1:0] have_pred, trk_act, trk_hit;
  fx_t              px [N_TRK];
  fx_t              py [N_TRK];
  fx_t              sx [N_TRK];
  fx_t              sy [N_TRK];
  fx_t              gx [N_TRK];
  fx_t              gy [N_TRK];
  // Stored observations.
  logic             have_eos;
  logic [OW-1:0]    n_obs;
  fx_t              ox [N_OBS];
  fx_t              oy [N_OBS];

  logic [TW-1:0]    j;   // track counter
  logic [OW-1:0]    i;   // row counter
  logic [OW-1:0]    id;  // row counter limited to a legal index
  assign id = (i < OW'(N_OBS)) ? i : '0;

  // Statistical distance of (observation i, track j), COST_INF outside the gate.
  function automatic cost_t pair_cost(fx_t ax, fx_t ay, fx_t bx, fx_t by,
                                      fx_t wx, fx_t wy, cost_t thr);
    logic signed [63:0] ddx, ddy;
    logic [63:0]        qx, qy, cx, cy, sum;
    ddx = 64'(ax) - 64'(bx);
    ddy = 64'(ay) - 64'(by);
    qx  = 64'(ddx * ddx) >> FX_FRAC;      // dx^2, Q16.16
    qy  = 64'(ddy * ddy) >> FX_FRAC;
    if (qx >= 64'h8000_0000 || qy >= 64'h8000_0000) return COST_INF;
    cx  = (qx * 64'($unsigned(wx))) >> FX_FRAC;
    cy  = (qy * 64'($unsigned(wy))) >> FX_FRAC;
    sum = cx + cy;
    return (sum <= 64'(thr)) ? cost_t'(sum) : COST_INF;
  endfunction

  // Costs of the current row against every track.
  cost_t            row_cost [N_TRK];
  logic  [N_TRK-1:0] row_in_gate;
  logic             row_valid;

  always_comb begin
    row_valid = (i < n_obs);
    for (int t = 0; t < N_TRK; t++) begin
      if (row_valid && trk_act[t])
        row_cost[t] = pair_cost(ox[id], oy[id],
                                px[t], py[t], gx[t], gy[t], GATE_THR);
      else
        row_cost[t] = COST_INF;
      row_in_gate[t] = (row_cost[t] != COST_INF);
    end
  end

  // Divider for the gate weights.
  logic        div_start, div_busy, div_done;
  logic [47:0] div_q;
  logic [31:0] div_r;
  fx_t         div_den;
  logic [TW-1:0] jd;
  assign jd = (j < TW'(N_TRK)) ? j : '0;

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
  assign div_den   = (state == S_GATE_X) ? sx[jd] : sy[jd];
  assign div_start = ((state == S_GATE_X) || (state == S_GATE_Y)) && trk_act[jd] &&
                     !div_busy && !div_done;

  function automatic fx_t sat_recip(logic [47:0] q);
    return (q > 48'h7FFF_FFFF) ? fx_t'(32'h7FFF_FFFF) : fx_t'(q[31:0]);
  endfunction

  assign pred_ready = (state == S_COLLECT) ? ~have_pred : '0;
  assign obs_ready  = (state == S_COLLECT) && !have_eos;

  // Output word.
  always_comb begin
    cm       = '0;
    cm_valid = 1'b0;
    unique case (state)
      S_ROW: begin
        cm_valid = 1'b1;
        cm.kind  = CM_OBS;
        cm.valid = row_valid;
        cm.flag  = |row_in_gate;
        cm.x     = row_valid ? ox[id] : '0;
        cm.y     = row_valid ? oy[id] : '0;
      end
      S_COST: begin
        cm_valid = 1'b1;
        cm.kind  = CM_COST;
        cm.cost  = row_cost[jd];
      end
      S_TRK: begin
        cm_valid = 1'b1;
        cm.kind  = CM_TRK;
        cm.flag  = trk_hit[jd];
      end
      S_EOS: begin
        cm_valid = 1'b1;
        cm.kind  = CM_EOS;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      have_pred <= '0;
      trk_act   <= '0;
      trk_hit   <= '0;
      have_eos  <= 1'b0;
      n_obs     <= '0;
      i         <= '0;
      j         <= '0;
      for (int t = 0; t < N_TRK; t++) begin
        px[t] <= '0; py[t] <= '0; sx[t] <= '0; sy[t] <= '0; gx[t] <= '0; gy[t] <= '0;
      end
      for (int o = 0; o < N_OBS; o++) begin
        ox[o] <= '0; oy[o] <= '0;
      end
    end else begin
      unique case (state)
        S_COLLECT: begin
          for (int t = 0; t < N_TRK; t++) begin
            if (pred_valid[t] && pred_ready[t]) begin
              have_pred[t] <= 1'b1;
              trk_act[t]   <= pred[t].active;
              px[t]        <= pred[t].x;
              py[t]        <= pred[t].y;
              sx[t]        <= pred[t].sx;
              sy[t]        <= pred[t].sy;
            end
          end
          if (obs_valid && obs_ready) begin
            if (obs.eos) begin
              have_eos <= 1'b1;
            end else if (n_obs < OW'(N_OBS)) begin
              ox[n_obs] <= obs.x;
              oy[n_obs] <= obs.y;
              n_obs     <= n_obs + 1'b1;
            end
          end
          if (&have_pred && have_eos) begin
            j     <= '0;
            state <= S_GATE_X;
          end
        end
        // Gate compute: 1/Sx then 1/Sy for every active track.
        S_GATE_X: begin
          if (!trk_act[jd]) begin
            if (j == TW'(N_TRK - 1)) begin
              j <= '0; i <= '0; trk_hit <= '0; state <= S_ROW;
            end else j <= j + 1'b1;
          end else if (div_done) begin
            gx[jd] <= sat_recip(div_q);
            state  <= S_GATE_Y;
          end
        end
        S_GATE_Y: if (div_done) begin
          gy[jd] <= sat_recip(div_q);
          if (j == TW'(N_TRK - 1)) begin
            j <= '0; i <= '0; trk_hit <= '0; state <= S_ROW;
          end else begin
            j <= j + 1'b1; state <= S_GATE_X;
          end
        end
        S_ROW: if (cm_ready) begin
          j     <= '0;
          state <= S_COST;
        end
        S_COST: if (cm_ready) begin
          if (row_in_gate[jd]) trk_hit[jd] <= 1'b1;
          if (j == TW'(N_TRK - 1)) begin
            j <= '0;
            if (i == OW'(N_OBS - 1)) state <= S_TRK;
            else begin
              i     <= i + 1'b1;
              state <= S_ROW;
            end
          end else j <= j + 1'b1;
        end
        S_TRK: if (cm_ready) begin
          if (j == TW'(N_TRK - 1)) state <= S_EOS;
          else j <= j + 1'b1;
        end
        S_EOS: if (cm_ready) begin
          have_pred <= '0;
          have_eos  <= 1'b0;
          n_obs     <= '0;
          state     <= S_COLLECT;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
