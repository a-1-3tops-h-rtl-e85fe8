// Intra prediction (IP) mode decision with partial distortion elimination.
//
// Chooses the intra 4x4 luma mode of each of the sixteen 4x4 blocks of an MB
// and decides whether the MB is coded intra or inter. Blocks are visited in
// the standard's 4x4 block order; for each block the reconfigurable
// predictor generator steps through the nine modes, one per cycle, and the
// mode with the smallest SAD (lower mode number on a tie) is kept. After
// each block the best SADs found so far are summed; as soon as this partial
// intra cost exceeds the MB's minimum inter cost, the decision stops early
// (partial distortion elimination) and the MB is inter. Otherwise, after the
// last block, the MB is intra if its intra cost is below the inter cost.
//
// Neighbours: pels above the MB (top_row, 16 + 4 above-right), left of it
// (left_col) and above-left (topleft), with availability flags, come from the
// neighbour buffers; inside the MB, neighbours are taken from the MB itself.
//
// Timing: 9 cycles per 4x4 block, so 144 cycles plus one for a full decision,
// fewer when elimination stops it. 'done' pulses one cycle.
//
// Follows the encoder: a reconfigurable predictor generator shared by all
// modes, and elimination against the minimum inter cost. This design's own:
// SAD as the intra cost, no most-probable-mode term, and interior
// neighbours from original rather than reconstructed pels (the encoder's
// forward/inverse transform loop is not part of this block).
module ip_engine
  import h264enc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pel_t       cur_mb   [MB_SIZE][MB_SIZE],
  input  pel_t       top_row  [MB_SIZE + 4],
  input  pel_t       left_col [MB_SIZE],
  input  pel_t       topleft,
  input  logic       top_avail,
  input  logic       left_avail,
  input  logic       topright_avail,
  input  cost_t      inter_cost,
  output logic       busy,
  output logic       done,
  output logic       is_intra,
  output logic       pde_stop,      // decision ended early
  output cost_t      intra_cost,    // partial sum when pde_stop
  output logic [3:0] modes [16]     // best mode per 4x4 block, raster order
);

  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_DONE} state_e;
  state_e     state;
  logic [3:0] bidx;     // 4x4 block index in coding order
  logic [3:0] mode;
  logic [1:0] bx, by;
  assign bx = {bidx[2], bidx[0]};
  assign by = {bidx[3], bidx[1]};

  // neighbours of the current block
  pel_t top [8];
  pel_t left [4];
  pel_t tl;
  logic top_ok, left_ok, tl_ok, tr_ok;

  always_comb begin
    for (int i = 0; i < 8; i++)
      top[i] = (by == 0) ? top_row[4*bx + i]
             : cur_mb[4*by - 1][(4*bx + i < MB_SIZE) ? 4*bx + i : MB_SIZE - 1];
    for (int i = 0; i < 4; i++)
      left[i] = (bx == 0) ? left_col[4*by + i] : cur_mb[4*by + i][4*bx - 1];
    if (bx == 0 && by == 0) tl = topleft;
    else if (bx == 0)       tl = left_col[4*by - 1];
    else if (by == 0)       tl = top_row[4*bx - 1];
    else                    tl = cur_mb[4*by - 1][4*bx - 1];
    top_ok  = (by != 0) || top_avail;
    left_ok = (bx != 0) || left_avail;
    tl_ok   = (bx != 0 && by != 0) || (bx == 0 && by != 0 && left_avail)
           || (by == 0 && bx != 0 && top_avail) || (top_avail && left_avail);
    if (by == 0) tr_ok = (bx == 3) ? topright_avail : top_avail;
    else         tr_ok = !(bidx == 4'd3 || bidx == 4'd7 || bidx == 4'd11 || bidx == 4'd13 || bidx == 4'd15);
  end

  pel_t pred [4][4];
  logic mode_ok;

  intra4x4_pred_gen u_gen (
    .mode, .top, .left, .topleft(tl), .top_ok, .left_ok, .topleft_ok(tl_ok),
    .topright_ok(tr_ok), .pred, .mode_ok
  );

  logic [11:0] sad;
  always_comb begin
    sad = '0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        pel_t c, d;
        c = cur_mb[4*by + y][4*bx + x];
        d = (c > pred[y][x]) ? c - pred[y][x] : pred[y][x] - c;
        sad += 12'(d);
      end
  end

  logic [11:0] blk_best;
  logic [3:0]  blk_mode;
  logic        cand_better;
  logic [11:0] new_best;
  logic [3:0]  new_mode;
  logic [COST_W:0] new_acc;

  always_comb begin
    cand_better = mode_ok && (mode == 4'd0 || sad < blk_best);
    new_best    = cand_better ? sad  : blk_best;
    new_mode    = cand_better ? mode : blk_mode;
    new_acc     = (COST_W+1)'(intra_cost) + (COST_W+1)'(new_best);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bidx <= '0; mode <= '0; blk_best <= '1; blk_mode <= '0;
      is_intra <= 1'b0; pde_stop <= 1'b0; intra_cost <= '0;
      for (int i = 0; i < 16; i++) modes[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_EVAL; bidx <= '0; mode <= '0; blk_best <= '1;
          intra_cost <= '0; pde_stop <= 1'b0; is_intra <= 1'b0;
        end
        S_EVAL: begin
          if (mode != 4'd8) begin
            mode     <= mode + 1'b1;
            blk_best <= new_best;
            blk_mode <= new_mode;
          end else begin
            modes[{by, bx}] <= new_mode;
            intra_cost      <= new_acc[COST_W] ? '1 : new_acc[COST_W-1:0];
            mode            <= '0;
            blk_best        <= '1;
            bidx            <= bidx + 1'b1;
            if (new_acc > (COST_W+1)'(inter_cost)) begin
              pde_stop <= (bidx != 4'd15);
              is_intra <= 1'b0;
              state    <= S_DONE;
            end else if (bidx == 4'd15) begin
              is_intra <= new_acc < (COST_W+1)'(inter_cost);
              state    <= S_DONE;
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // DC is always available, so every block gets a mode
  assert property (@(posedge clk) disable iff (!rst_n) state == S_EVAL && mode == 4'd2 |-> mode_ok);

endmodule
