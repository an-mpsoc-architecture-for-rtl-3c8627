// assignment_solver: observation-to-track assignment (processor #12 of the
// architecture). It finds the one-to-one pairing of the N observation rows
// with the N track columns that minimises the total cost, as the Munkres
// (Hungarian) method does. This engine uses the O(N^3) shortest-augmenting-
// path form of the Hungarian method with row and column potentials u, v:
// rows are added one at a time; for each row a Dijkstra-like search over
// columns grows an alternating tree (used, minv, way) until it reaches a free
// column, then the matching is flipped along the path. Each search step
// handles all N columns in parallel in one cycle.
//
// Input: the cost-matrix stream of gate_cost_unit (N CM_OBS rows each with N
// CM_COST words, N CM_TRK words, CM_EOS). Output, after solving: for each row
// an AS_OBS word (valid, gate flag, assigned + track index when the pairing
// lies inside the gate, coordinates), then the N CM_TRK flags as AS_TRK
// words, then AS_EOS. Gated-out pairs carry COST_INF, which is larger than
// N times any gated cost, so the solution first maximises the number of
// gated pairs. Timing: about N*(N+1) words in, a few cycles per search step
// (at most N steps per row), 2N+1 words out. The algorithm variant and the
// stream layout are this design's choices; the document names Munkres.
module assignment_solver
  import mtt_pkg::*;
#(
  parameter int unsigned N = MAX_TARGETS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cm_valid,
  output logic     cm_ready,
  input  cm_word_t cm,
  output logic     as_valid,
  input  logic     as_ready,
  output as_word_t as
);
  localparam int unsigned IW = $clog2(N + 1);
  typedef logic signed [39:0] pot_t;
  localparam pot_t POT_INF = pot_t'(40'sh40_0000_0000);

  typedef enum logic [2:0] {S_LOAD, S_ROW, S_MARK, S_SCAN, S_CHECK, S_AUG, S_OUT_OBS, S_OUT_TRK} state_e;
  state_e state;

  // Stored problem.
  cost_t          c   [N][N];
  logic [N-1:0]   o_valid, o_flag, t_flag;
  fx_t            o_x [N];
  fx_t            o_y [N];
  logic [IW-1:0]  ld_row, ld_col, ld_trk;

  // Solver state, index 0 is the virtual column/row of the method.
  pot_t           u    [N+1];
  pot_t           v    [N+1];
  pot_t           minv [N+1];
  logic [IW-1:0]  p    [N+1];   // row matched to column j (0 = free)
  logic [IW-1:0]  way  [N+1];
  logic [N:0]     used;
  logic [IW-1:0]  row, j0, i0;

  // One search step: relax all free columns from row i0, pick the minimum.
  pot_t           cur    [N+1];
  pot_t           minv_n [N+1];
  logic [IW-1:0]  way_n  [N+1];
  pot_t           delta;
  logic [IW-1:0]  j1;

  always_comb begin
    delta = POT_INF;
    j1    = '0;
    for (int j = 0; j <= N; j++) begin
      cur[j]    = '0;
      minv_n[j] = minv[j];
      way_n[j]  = way[j];
    end
    for (int j = 1; j <= N; j++) begin
      if (!used[j]) begin
        cur[j] = pot_t'(c[(i0 > 0) ? i0 - 1'b1 : '0][j-1]) - u[i0] - v[j];
        if (cur[j] < minv[j]) begin
          minv_n[j] = cur[j];
          way_n[j]  = j0;
        end
        if (minv_n[j] < delta) begin
          delta = minv_n[j];
          j1    = IW'(j);
        end
      end
    end
  end

  // Column assigned to output row `row` (1-based), 0 if none.
  logic [IW-1:0] col_of_row;
  always_comb begin
    col_of_row = '0;
    for (int j = 1; j <= N; j++)
      if (p[j] == row) col_of_row = IW'(j);
  end

  logic [IW-1:0] orow, ocol;
  assign orow = (row > 0) ? row - 1'b1 : '0;
  assign ocol = (col_of_row > 0) ? col_of_row - 1'b1 : '0;

  assign cm_ready = (state == S_LOAD);

  always_comb begin
    as       = '0;
    as_valid = 1'b0;
    if (state == S_OUT_OBS) begin
      as_valid    = 1'b1;
      as.kind     = AS_OBS;
      as.valid    = o_valid[orow];
      as.flag     = o_flag[orow];
      as.assigned = o_valid[orow] && (col_of_row != '0) && (c[orow][ocol] != COST_INF);
      as.trk      = idx_t'(ocol);
      as.x        = o_x[orow];
      as.y        = o_y[orow];
    end else if (state == S_OUT_TRK) begin
      as_valid = 1'b1;
      if (row == IW'(N + 1)) begin
        as.kind = AS_EOS;
      end else begin
        as.kind = AS_TRK;
        as.flag = t_flag[orow];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      o_valid <= '0;
      o_flag  <= '0;
      t_flag  <= '0;
      ld_row  <= '0;
      ld_col  <= '0;
      ld_trk  <= '0;
      used    <= '0;
      row     <= '0;
      j0      <= '0;
      i0      <= '0;
      for (int a = 0; a < N; a++) begin
        o_x[a] <= '0;
        o_y[a] <= '0;
        for (int b = 0; b < N; b++) c[a][b] <= COST_INF;
      end
      for (int j = 0; j <= N; j++) begin
        u[j] <= '0; v[j] <= '0; minv[j] <= POT_INF; p[j] <= '0; way[j] <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: if (cm_valid) begin
          unique case (cm.kind)
            CM_OBS: begin
              if (ld_row < IW'(N)) begin
                o_valid[ld_row] <= cm.valid;
                o_flag[ld_row]  <= cm.flag;
                o_x[ld_row]     <= cm.x;
                o_y[ld_row]     <= cm.y;
              end
              ld_row <= ld_row + 1'b1;
              ld_col <= '0;
            end
            CM_COST: begin
              if (ld_row > 0 && ld_row <= IW'(N) && ld_col < IW'(N))
                c[ld_row - 1'b1][ld_col] <= cm.cost;
              ld_col <= ld_col + 1'b1;
            end
            CM_TRK: begin
              if (ld_trk < IW'(N)) t_flag[ld_trk] <= cm.flag;
              ld_trk <= ld_trk + 1'b1;
            end
            default: begin  // CM_EOS: start solving
              ld_row <= '0;
              ld_col <= '0;
              ld_trk <= '0;
              for (int j = 0; j <= N; j++) begin
                u[j] <= '0; v[j] <= '0; p[j] <= '0; way[j] <= '0;
              end
              row   <= IW'(1);
              state <= S_ROW;
            end
          endcase
        end
        // Start the search for row `row`.
        S_ROW: begin
          p[0] <= row;
          j0   <= '0;
          used <= '0;
          for (int j = 0; j <= N; j++) minv[j] <= POT_INF;
          state <= S_MARK;
        end
        S_MARK: begin
          used[j0] <= 1'b1;
          i0       <= p[j0];
          state    <= S_SCAN;
        end
        S_SCAN: begin
          for (int j = 0; j <= N; j++) begin
            if (used[j]) begin
              u[p[j]] <= u[p[j]] + delta;
              v[j]    <= v[j] - delta;
            end else begin
              minv[j] <= minv_n[j] - delta;
              way[j]  <= way_n[j];
            end
          end
          j0    <= j1;
          state <= S_CHECK;
        end
        S_CHECK: state <= (p[j0] == '0) ? S_AUG : S_MARK;
        // Flip the matching along the path back to column 0.
        S_AUG: begin
          p[j0] <= p[way[j0]];
          j0    <= way[j0];
          if (way[j0] == '0) begin
            if (row == IW'(N)) begin
              row   <= IW'(1);
              state <= S_OUT_OBS;
            end else begin
              row   <= row + 1'b1;
              state <= S_ROW;
            end
          end
        end
        S_OUT_OBS: if (as_ready) begin
          if (row == IW'(N)) begin
            row   <= IW'(1);
            state <= S_OUT_TRK;
          end else row <= row + 1'b1;
        end
        S_OUT_TRK: if (as_ready) begin
          if (row == IW'(N + 1)) state <= S_LOAD;
          else row <= row + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
