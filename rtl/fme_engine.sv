// Fractional motion estimation (FME) engine.
//
// Refines the integer MV of the 16x16 block to quarter-pel accuracy by
// rate-constrained search: cost = SATD + lambda * MV bits. Nine 4x4-block PUs
// evaluate the 3x3 candidates around the current centre in parallel, all fed
// from one shared interpolator, so each reference row is interpolated once
// for nine candidates. Larger blocks are folded onto the 4x4 hardware: the
// sixteen 4x4 blocks of the MB pass through the interpolator and PUs in
// turn and the SATDs are summed per candidate.
//
// Pass 0 searches the 3x3 half-pel points around the integer MV, pass 1 the
// 3x3 quarter-pel points around the best half-pel point, and pass 2 rebuilds
// the prediction at the winning MV into mc_mb (the motion-compensated MB
// handed to intra prediction). A candidate replaces the centre only with a
// strictly smaller cost; among the others the lower index wins a tie.
//
// Reference pels are fetched through a read port: ref_rd_en with position
// (ref_rd_x, ref_rd_y) relative to the current MB's top-left pel asks for ten
// pels ref(x..x+9, y), returned in ref_rd_data in the next cycle.
// Timing: each 4x4 block takes 10 read cycles, 1 wait and 4 feed cycles; a
// pass is 16 blocks plus the PU drain. About 740 cycles from start to done.
//
// Follows the encoder: nine 4x4 PUs on 3x3 candidates, shared interpolation
// with 5 horizontal and 11 vertical FIRs fed ten pels per row, folding for
// larger blocks, SATD plus side information as criterion. This design's own:
// only the 16x16 partition of one reference frame is refined (the encoder
// refines all partitions of up to four references and then picks the best
// mode), and interpolated rows are not reused between vertically adjacent
// 4x4 blocks.
module fme_engine
  import h264enc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  pel_t              cur_mb [MB_SIZE][MB_SIZE],
  input  mv_t               int_mv,        // integer pel
  input  mv_t               pmv,           // quarter pel
  input  logic [7:0]        lambda,
  output logic              ref_rd_en,
  output logic signed [11:0] ref_rd_x,
  output logic signed [11:0] ref_rd_y,
  input  pel_t              ref_rd_data [10],
  output logic              busy,
  output logic              done,
  output mv_t               best_mv,       // quarter pel
  output cost_t             best_cost,
  output pel_t              mc_mb [MB_SIZE][MB_SIZE]
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WAIT, S_FEED, S_DRAIN, S_DEC, S_DONE} state_e;

  state_e      state;
  logic [1:0]  pass;
  logic [3:0]  blk;
  logic [3:0]  rcnt;
  logic [1:0]  frow;
  logic [4:0]  outcnt;
  logic signed [3:0] cx, cy;       // centre offset, quarter pel
  logic [16:0] acc [9];

  logic [1:0] bx, by;
  assign bx = blk[1:0];
  assign by = blk[3:2];

  // ------------------------------------------------------------ interpolation
  logic rd_v;
  pel_t grid [11][11];
  logic grid_done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_v <= 1'b0;
    else        rd_v <= ref_rd_en;

  fme_interp u_interp (.clk, .rst_n, .in_valid(rd_v), .in_row(ref_rd_data), .grid, .done(grid_done));

  assign ref_rd_en = (state == S_RD);
  assign ref_rd_x  = 12'(int'(int_mv.x) + 4*int'(bx) - 3);
  assign ref_rd_y  = 12'(int'(int_mv.y) + 4*int'(by) - 3 + int'(rcnt));

  // Quarter-pel sample at (qx, qy), quarter units from the block origin.
  function automatic pel_t qsample(input int qx, input int qy);
    int u0, v0, a, b;
    u0 = (qx + 4) >>> 1;
    v0 = (qy + 4) >>> 1;
    if (qx % 2 == 0 && qy % 2 == 0) return grid[v0][u0];
    if (qy % 2 == 0) begin a = int'(grid[v0][u0]); b = int'(grid[v0][u0+1]); end
    else if (qx % 2 == 0) begin a = int'(grid[v0][u0]); b = int'(grid[v0+1][u0]); end
    else if ((u0 + v0) % 2 == 0) begin a = int'(grid[v0][u0+1]); b = int'(grid[v0+1][u0]); end
    else begin a = int'(grid[v0][u0]); b = int'(grid[v0+1][u0+1]); end
    return pel_t'((a + b + 1) >> 1);
  endfunction

  // ------------------------------------------------------------ nine PUs
  int   step;
  pel_t cur_row [4];
  pel_t pred_row [9][4];
  mv_t  cand_mv [9];
  logic [8:0]  pu_v;
  logic [12:0] pu_satd [9];

  assign step = (pass == 2'd0) ? 2 : (pass == 2'd1) ? 1 : 0;

  always_comb begin
    for (int i = 0; i < 4; i++) cur_row[i] = cur_mb[4*by + frow][4*bx + i];
    for (int k = 0; k < 9; k++) begin
      int ox, oy;
      ox = int'(cx) + step * (k % 3 - 1);
      oy = int'(cy) + step * (k / 3 - 1);
      cand_mv[k].x = mvc_t'(4*int'(int_mv.x) + ox);
      cand_mv[k].y = mvc_t'(4*int'(int_mv.y) + oy);
      for (int i = 0; i < 4; i++) pred_row[k][i] = qsample(4*i + ox, 4*int'(frow) + oy);
    end
  end

  for (genvar k = 0; k < 9; k++) begin : g_pu
    fme_pu u_pu (.clk, .rst_n, .in_valid(state == S_FEED && pass != 2'd2),
                 .cur_row, .pred_row(pred_row[k]), .satd_valid(pu_v[k]), .satd(pu_satd[k]));
  end

  // ------------------------------------------------------------ decision
  cost_t mvcost [9];
  cost_t cost [9];
  for (genvar k = 0; k < 9; k++) begin : g_cost
    ime_mv_cost_gen #(.MV_SCALE(1)) u_mvc (.mv(cand_mv[k]), .pmv, .lambda, .cost(mvcost[k]));
    always_comb begin
      logic [COST_W:0] t;
      t = (COST_W+1)'(acc[k]) + (COST_W+1)'(mvcost[k]);
      cost[k] = t[COST_W] ? '1 : t[COST_W-1:0];
    end
  end

  int win;
  always_comb begin
    win = 4;
    for (int k = 0; k < 9; k++)
      if (cost[k] < cost[win]) win = k;
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pass <= '0; blk <= '0; rcnt <= '0; frow <= '0; outcnt <= '0;
      cx <= '0; cy <= '0; best_mv <= '0; best_cost <= '1;
      for (int k = 0; k < 9; k++) acc[k] <= '0;
      for (int y = 0; y < MB_SIZE; y++) for (int x = 0; x < MB_SIZE; x++) mc_mb[y][x] <= '0;
    end else begin
      if (pu_v[0]) begin
        outcnt <= outcnt + 1'b1;
        for (int k = 0; k < 9; k++) acc[k] <= acc[k] + 17'(pu_satd[k]);
      end
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RD; pass <= '0; blk <= '0; rcnt <= '0; outcnt <= '0;
          cx <= '0; cy <= '0;
          for (int k = 0; k < 9; k++) acc[k] <= '0;
        end
        S_RD: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == 4'd9) state <= S_WAIT;
        end
        S_WAIT: begin state <= S_FEED; frow <= '0; end
        S_FEED: begin
          frow <= frow + 1'b1;
          if (pass == 2'd2)
            for (int i = 0; i < 4; i++) mc_mb[4*by + frow][4*bx + i] <= pred_row[4][i];
          if (frow == 2'd3) begin
            rcnt <= '0;
            blk  <= blk + 1'b1;
            if (blk != 4'd15)       state <= S_RD;
            else if (pass == 2'd2)  state <= S_DONE;
            else                    state <= S_DRAIN;
          end
        end
        S_DRAIN: if (outcnt == 5'd16) state <= S_DEC;
        S_DEC: begin
          cx <= 4'(int'(cx) + step * (win % 3 - 1));
          cy <= 4'(int'(cy) + step * (win / 3 - 1));
          if (pass == 2'd1) begin
            best_mv   <= cand_mv[win];
            best_cost <= cost[win];
          end
          pass   <= pass + 1'b1;
          blk    <= '0;
          outcnt <= '0;
          for (int k = 0; k < 9; k++) acc[k] <= '0;
          state  <= S_RD;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // the grid is complete before the PUs read it
  assert property (@(posedge clk) disable iff (!rst_n) state == S_WAIT |=> grid_done);
  // the nine PUs run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) pu_v == '0 || pu_v == '1);

endmodule
