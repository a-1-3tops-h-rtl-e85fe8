// Integer motion estimation (IME) engine: parallel full search with snake scan.
//
// For one reference frame per 'start', the engine evaluates every integer
// search point of the window [-srh, srh-1] x [-srv, srv-1] around the current
// MB and keeps, for each of the 41 VBS blocks, the MV of least cost
// (SAD + lambda * MV bits). Eight PE-array SAD trees work on eight
// horizontally consecutive search points at once, so 41 x 8 SADs are produced
// every scan cycle. They read a 16 x 23 reference pels array that is fed from
// the luma reference SRAM one row (vertical move) or eight columns
// (horizontal move) at a time. The scan is a snake: down one column group of
// eight search points, right by eight, up the next group, and so on, so every
// pel the array already holds is reused both horizontally and vertically.
//
// Reference 0 uses the range H[-SR_H, SR_H-1] V[-SR_V, SR_V-1]; references
// 1..NUM_REF-1 use SR_H1/SR_V1. The search window of the selected reference
// is written into the luma reference SRAM beforehand, 8 pels per write, with
// window pel (0,0) at the top-left search point's top-left pel. The current MB
// is written row by row into the current MB register. Results for each
// reference land in the integer MV buffer (mv_buf/cost_buf[ref]).
//
// Timing for reference r: 1 cycle after start, 16 fill cycles, then
// (2*srh/8)*(2*srv) scan cycles, 2 pipeline cycles; 'done' pulses one cycle.
// Ref 0 at the default range takes 1043 cycles.
//
// Follows the encoder: eight PE arrays, 16x23 ref pels array with three shift
// directions, snake scan, 41 comparator trees, MV cost generator, integer MV
// buffer per reference frame, the search ranges of its main configuration.
// This design's own: one reference per start (the encoder overlaps loading
// the next window with matching), the SRAM modelled as a register array with
// combinational reads, one MV predictor for all 41 blocks, and no level-C
// reuse, on-chip padding or adaptive moving window (the window arrives
// complete and padded through the write port).
module ime_engine
  import h264enc_pkg::*;
#(
  parameter int SR_H       = 64,
  parameter int SR_V       = 32,
  parameter int SR_H1      = 32,
  parameter int SR_V1      = 16,
  parameter int NUM_REF    = 4,
  parameter int SUBSAMPLE  = 2,
  parameter int TRUNC_BITS = 2,
  localparam int SW_W = 2*SR_H + MB_SIZE - 1,  // window width in pels
  localparam int SW_H = 2*SR_V + MB_SIZE - 1,  // window height in pels
  localparam int XW   = $clog2(SW_W + 8),
  localparam int YW   = $clog2(SW_H + 1),
  localparam int RW   = (NUM_REF > 1) ? $clog2(NUM_REF) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // current MB register load (system bus side)
  input  logic          cur_we,
  input  logic [3:0]    cur_row,
  input  pel_t          cur_wdata [MB_SIZE],
  output pel_t          cur_mb    [MB_SIZE][MB_SIZE],
  // luma reference SRAM load (local bus side)
  input  logic          sw_we,
  input  logic [XW-1:0] sw_wx,       // first of 8 pels
  input  logic [YW-1:0] sw_wy,
  input  pel_t          sw_wdata [8],
  // search control
  input  logic          start,
  input  logic [RW-1:0] ref_idx,
  input  mv_t           pmv,         // MV predictor, quarter pel
  input  logic [7:0]    lambda,
  output logic          busy,
  output logic          done,
  // integer MV buffer, integer pel
  output mv_t           mv_buf   [NUM_REF][NUM_BLK],
  output cost_t         cost_buf [NUM_REF][NUM_BLK]
);

  localparam int AC = MB_SIZE + NUM_CAND - 1;   // 23 array columns

  // ---------------------------------------------------------------- memories
  pel_t sw [SW_H][SW_W];

  always_ff @(posedge clk) begin
    if (sw_we)
      for (int i = 0; i < 8; i++)
        if (int'(sw_wx) + i < SW_W && int'(sw_wy) < SW_H)
          sw[sw_wy][int'(sw_wx) + i] <= sw_wdata[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int y = 0; y < MB_SIZE; y++)
        for (int x = 0; x < MB_SIZE; x++) cur_mb[y][x] <= '0;
    end else if (cur_we) begin
      cur_mb[cur_row] <= cur_wdata;
    end
  end

  // ---------------------------------------------------------------- control
  typedef enum logic [2:0] {S_IDLE, S_FILL, S_SCAN, S_DRAIN, S_DONE} state_e;
  state_e          state;
  logic [RW-1:0]   rsel;
  logic [XW-1:0]   wx;           // window column of candidate 0
  logic [YW-1:0]   wy;           // window row
  logic [4:0]      fill_cnt;
  logic [1:0]      drain_cnt;
  logic            dir_down;     // scanning towards larger wy
  int              srh, srv;
  int              grp_last_x;

  assign srh        = (rsel == '0) ? SR_H : SR_H1;
  assign srv        = (rsel == '0) ? SR_V : SR_V1;
  assign grp_last_x = 2*srh - NUM_CAND;

  ra_cmd_e   cmd;
  pel_t      row_in [AC];
  pel_t      col_in [MB_SIZE][8];
  pel_t      arr    [MB_SIZE][AC];
  logic [YW-1:0] row_sel;

  always_comb begin
    cmd     = SH_HOLD;
    row_sel = wy;
    unique case (state)
      S_FILL: begin cmd = SH_UP; row_sel = YW'(fill_cnt); end
      S_SCAN: begin
        if (dir_down && int'(wy) < 2*srv - 1) begin
          cmd = SH_UP;   row_sel = wy + YW'(MB_SIZE);
        end else if (!dir_down && wy != '0) begin
          cmd = SH_DOWN; row_sel = wy - 1'b1;
        end else if (int'(wx) < grp_last_x) begin
          cmd = SH_LEFT;
        end
      end
      default: ;
    endcase
  end

  for (genvar c = 0; c < AC; c++) begin : g_rowin
    assign row_in[c] = sw[row_sel][int'(wx) + c];
  end
  for (genvar r = 0; r < MB_SIZE; r++) begin : g_colin
    for (genvar c = 0; c < 8; c++) begin : g_colc
      assign col_in[r][c] = (int'(wx) + AC + c < SW_W) ? sw[int'(wy) + r][int'(wx) + AC + c] : '0;
    end
  end

  ime_ref_pels_array #(.ROWS(MB_SIZE), .COLS(AC), .SHIFT(NUM_CAND)) u_array (
    .clk, .rst_n, .cmd, .row_in, .col_in, .arr
  );

  // scan state: evaluate the array contents while moving to the next point
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; rsel <= '0; wx <= '0; wy <= '0;
      fill_cnt <= '0; drain_cnt <= '0; dir_down <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_FILL; rsel <= ref_idx; wx <= '0; wy <= '0;
          fill_cnt <= '0; dir_down <= 1'b1;
        end
        S_FILL: begin
          fill_cnt <= fill_cnt + 1'b1;
          if (fill_cnt == 5'(MB_SIZE - 1)) state <= S_SCAN;
        end
        S_SCAN: begin
          unique case (cmd)
            SH_UP:   wy <= wy + 1'b1;
            SH_DOWN: wy <= wy - 1'b1;
            SH_LEFT: begin wx <= wx + XW'(NUM_CAND); dir_down <= !dir_down; end
            default: begin state <= S_DRAIN; drain_cnt <= '0; end
          endcase
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'd1) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // ---------------------------------------------------------------- datapath
  sad_t sad_c [NUM_CAND][NUM_BLK];
  for (genvar k = 0; k < NUM_CAND; k++) begin : g_pe
    pel_t ref_blk [MB_SIZE][MB_SIZE];
    for (genvar y = 0; y < MB_SIZE; y++) begin : g_y
      for (genvar x = 0; x < MB_SIZE; x++) begin : g_x
        assign ref_blk[y][x] = arr[y][x + k];
      end
    end
    ime_pe_sad_tree #(.SUBSAMPLE(SUBSAMPLE), .TRUNC_BITS(TRUNC_BITS)) u_sad (
      .cur(cur_mb), .ref_blk, .sad(sad_c[k])
    );
  end

  // stage 1 registers: SADs and their candidate MVs
  sad_t  sad_r  [NUM_CAND][NUM_BLK];
  mv_t   mv_r   [NUM_CAND];
  logic  v_r, first_r, first_pend;
  cost_t mvc    [NUM_CAND];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r <= 1'b0; first_r <= 1'b0; first_pend <= 1'b0;
      for (int k = 0; k < NUM_CAND; k++) begin
        mv_r[k] <= '0;
        for (int b = 0; b < NUM_BLK; b++) sad_r[k][b] <= '0;
      end
    end else begin
      v_r     <= (state == S_SCAN);
      first_r <= (state == S_SCAN) && first_pend;
      if (state == S_FILL)      first_pend <= 1'b1;
      else if (state == S_SCAN) first_pend <= 1'b0;
      sad_r <= sad_c;
      for (int k = 0; k < NUM_CAND; k++) begin
        mv_r[k].x <= mvc_t'(int'(wx) + k - srh);
        mv_r[k].y <= mvc_t'(int'(wy) - srv);
      end
    end
  end

  for (genvar k = 0; k < NUM_CAND; k++) begin : g_mvc
    ime_mv_cost_gen #(.MV_SCALE(4)) u_mvc (.mv(mv_r[k]), .pmv, .lambda, .cost(mvc[k]));
  end

  cost_t best_cost [NUM_BLK];
  mv_t   best_mv   [NUM_BLK];

  ime_comparator_tree u_cmp (
    .clk, .rst_n, .clear(first_r), .valid(v_r),
    .sad(sad_r), .mv_cost(mvc), .cand_mv(mv_r),
    .best_cost, .best_mv
  );

  // integer MV buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REF; r++)
        for (int b = 0; b < NUM_BLK; b++) begin
          mv_buf[r][b] <= '0; cost_buf[r][b] <= '1;
        end
    end else if (state == S_DONE) begin
      mv_buf[rsel]   <= best_mv;
      cost_buf[rsel] <= best_cost;
    end
  end

  // the scan never leaves the window
  assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SCAN |-> int'(wx) + AC <= SW_W && int'(wy) + MB_SIZE <= SW_H);

endmodule
