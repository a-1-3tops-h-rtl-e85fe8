// H.264/AVC baseline encoder core with four-stage macroblock pipelining.
//
// Four MBs are in flight at once: stage 1 runs integer motion estimation
// (IME) over up to four reference frames, stage 2 fractional motion
// estimation (FME), stage 3 intra prediction and the intra/inter decision
// (IP), and stage 4 entropy coding and deblocking (EC/DB). mb_pipeline_ctrl
// starts all stages together and advances when the slowest is done. At each
// advance the MB's data move on locally, stage register to stage register:
// the current MB pels, the chosen reference and integer MV, the quarter-pel
// MV, its cost and the motion-compensated MB, and the IP decision.
//
// Stage 1 is sequenced here: for each reference r < num_ref it asks for a
// load (ld_req, ld_ref, ld_mbx/ld_mby), waits for ld_done while an external
// loader writes the padded search window through sw_* and, for r = 0, the
// current MB through cur_*, then runs the IME engine. Stage 2 refines the MV
// of the 16x16 block in the reference with the lowest IME cost; its reads
// leave through fme_rd_*. Stage 3 takes its neighbours from the upper pels
// buffer (the bottom row of the MB row above, one frame width), a left column
// register and a top-left register, all written when an MB leaves IP. The
// MV predictor of an MB is the final MV of the MB above it, from the upper
// MV buffer (zero in the first row and for intra MBs).
// Stage 4 is outside this core: ecdb_start hands it the MB's results and it
// answers with ecdb_done.
//
// Frame size, number of reference frames and lambda are run-time inputs;
// MB_COLS_MAX sizes the upper buffers (80 MBs = 1280 pels for 720p).
// Follows the encoder: the engines, the stage split and order, local
// stage-to-stage transfer, shared search windows loaded over the local bus.
// This design's own: the load/read handshakes, the MV predictor rule, and
// taking IP neighbours from original rather than reconstructed pels (no
// transform/quantisation loop is included).
module h264_encoder_top
  import h264enc_pkg::*;
#(
  parameter int SR_H        = 64,
  parameter int SR_V        = 32,
  parameter int SR_H1       = 32,
  parameter int SR_V1       = 16,
  parameter int NUM_REF     = 4,
  parameter int MB_COLS_MAX = 80,
  localparam int CW  = 8,
  localparam int XW  = $clog2(2*SR_H + MB_SIZE - 1 + 8),
  localparam int YW  = $clog2(2*SR_V + MB_SIZE - 1 + 1),
  localparam int RW  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // encoding parameters
  input  logic           frame_start,
  input  logic [CW-1:0]  mb_cols,
  input  logic [CW-1:0]  mb_rows,
  input  logic [2:0]     num_ref,       // 1..NUM_REF
  input  logic [7:0]     lambda,
  output logic           busy,
  output logic           frame_done,
  // stage 1 loads (system bus: current MB, local bus: search window)
  output logic           ld_req,
  output logic [RW-1:0]  ld_ref,
  output logic [CW-1:0]  ld_mbx,
  output logic [CW-1:0]  ld_mby,
  input  logic           ld_done,
  input  logic           cur_we,
  input  logic [3:0]     cur_row,
  input  pel_t           cur_wdata [MB_SIZE],
  input  logic           sw_we,
  input  logic [XW-1:0]  sw_wx,
  input  logic [YW-1:0]  sw_wy,
  input  pel_t           sw_wdata [8],
  // stage 2 reference reads
  output logic           fme_rd_en,
  output logic [RW-1:0]  fme_rd_ref,
  output logic [CW-1:0]  fme_rd_mbx,
  output logic [CW-1:0]  fme_rd_mby,
  output logic signed [11:0] fme_rd_x,
  output logic signed [11:0] fme_rd_y,
  input  pel_t           fme_rd_data [10],
  // stage 4 hand-over
  output logic           ecdb_start,
  output logic [CW-1:0]  ecdb_mbx,
  output logic [CW-1:0]  ecdb_mby,
  output logic           ecdb_is_intra,
  output logic [3:0]     ecdb_modes [16],
  output logic [RW-1:0]  ecdb_ref,
  output mv_t            ecdb_mv,
  output cost_t          ecdb_inter_cost,
  output pel_t           ecdb_cur [MB_SIZE][MB_SIZE],
  output pel_t           ecdb_mc  [MB_SIZE][MB_SIZE],
  input  logic           ecdb_done
);

  // ---------------------------------------------------------------- pipeline
  logic [3:0]    stage_start, stage_done, stage_valid;
  logic [CW-1:0] stage_mbx [4], stage_mby [4];
  logic          advance;

  mb_pipeline_ctrl #(.NUM_STAGES(4), .CW(CW)) u_ctrl (
    .clk, .rst_n, .frame_start, .mb_cols, .mb_rows, .stage_done, .stage_start,
    .stage_valid, .stage_mbx, .stage_mby, .advance, .busy, .frame_done
  );

  // upper MV buffer and MV predictor
  mv_t upper_mv [MB_COLS_MAX];
  mv_t ime_pmv;
  assign ime_pmv = (stage_mby[0] == '0 || int'(stage_mbx[0]) >= MB_COLS_MAX) ? '0 : upper_mv[int'(stage_mbx[0])];

  // ---------------------------------------------------------------- stage 1
  typedef enum logic [2:0] {I_IDLE, I_LREQ, I_LWAIT, I_RUN, I_WAIT} istate_e;
  istate_e       ist;
  logic [RW-1:0] iref;
  logic          ime_start, ime_busy, ime_done;
  pel_t          ime_cur [MB_SIZE][MB_SIZE];
  mv_t           mv_buf   [NUM_REF][NUM_BLK];
  cost_t         cost_buf [NUM_REF][NUM_BLK];
  logic [2:0]    nref;

  assign nref = (num_ref == '0) ? 3'd1 : (int'(num_ref) > NUM_REF) ? 3'(NUM_REF) : num_ref;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist <= I_IDLE; iref <= '0;
    end else begin
      unique case (ist)
        I_IDLE:  if (stage_start[0]) begin ist <= I_LREQ; iref <= '0; end
        I_LREQ:  ist <= I_LWAIT;
        I_LWAIT: if (ld_done) ist <= I_RUN;
        I_RUN:   ist <= I_WAIT;
        I_WAIT:  if (ime_done) begin
          if (int'(iref) + 1 < int'(nref)) begin ist <= I_LREQ; iref <= iref + 1'b1; end
          else ist <= I_IDLE;
        end
        default: ist <= I_IDLE;
      endcase
    end
  end

  assign ld_req        = (ist == I_LREQ);
  assign ld_ref        = iref;
  assign ld_mbx        = stage_mbx[0];
  assign ld_mby        = stage_mby[0];
  assign ime_start     = (ist == I_RUN);
  assign stage_done[0] = (ist == I_WAIT) && ime_done && !(int'(iref) + 1 < int'(nref));

  ime_engine #(.SR_H(SR_H), .SR_V(SR_V), .SR_H1(SR_H1), .SR_V1(SR_V1), .NUM_REF(NUM_REF)) u_ime (
    .clk, .rst_n, .cur_we, .cur_row, .cur_wdata, .cur_mb(ime_cur),
    .sw_we, .sw_wx, .sw_wy, .sw_wdata,
    .start(ime_start), .ref_idx(iref), .pmv(ime_pmv), .lambda,
    .busy(ime_busy), .done(ime_done), .mv_buf, .cost_buf
  );

  // reference with the lowest 16x16 cost
  logic [RW-1:0] best_ref;
  always_comb begin
    best_ref = '0;
    for (int r = 1; r < NUM_REF; r++)
      if (r < int'(nref) && cost_buf[r][NUM_BLK-1] < cost_buf[best_ref][NUM_BLK-1]) best_ref = RW'(r);
  end

  // ---------------------------------------------------------------- stage 2
  pel_t          f_cur [MB_SIZE][MB_SIZE];
  mv_t           f_int_mv, f_pmv;
  logic [RW-1:0] f_ref;
  logic          fme_busy, fme_done;
  mv_t           fme_mv;
  cost_t         fme_cost;
  pel_t          fme_mc [MB_SIZE][MB_SIZE];

  fme_engine u_fme (
    .clk, .rst_n, .start(stage_start[1]), .cur_mb(f_cur), .int_mv(f_int_mv), .pmv(f_pmv),
    .lambda, .ref_rd_en(fme_rd_en), .ref_rd_x(fme_rd_x), .ref_rd_y(fme_rd_y),
    .ref_rd_data(fme_rd_data), .busy(fme_busy), .done(fme_done),
    .best_mv(fme_mv), .best_cost(fme_cost), .mc_mb(fme_mc)
  );
  assign stage_done[1] = fme_done;
  assign fme_rd_ref    = f_ref;
  assign fme_rd_mbx    = stage_mbx[1];
  assign fme_rd_mby    = stage_mby[1];

  // ---------------------------------------------------------------- stage 3
  pel_t          p_cur [MB_SIZE][MB_SIZE];
  pel_t          p_mc  [MB_SIZE][MB_SIZE];
  mv_t           p_mv;
  cost_t         p_cost;
  logic [RW-1:0] p_ref;
  pel_t          upper_pels [MB_COLS_MAX*MB_SIZE];
  pel_t          left_col [MB_SIZE];
  pel_t          topleft;
  pel_t          top_row [MB_SIZE + 4];
  logic          ip_busy, ip_done, ip_intra, ip_pde;
  cost_t         ip_cost;
  logic [3:0]    ip_modes [16];
  logic [CW-1:0] px, py;

  assign px = stage_mbx[2];
  assign py = stage_mby[2];
  always_comb
    for (int i = 0; i < MB_SIZE + 4; i++)
      top_row[i] = (int'(px)*MB_SIZE + i < MB_COLS_MAX*MB_SIZE) ? upper_pels[int'(px)*MB_SIZE + i] : '0;

  ip_engine u_ip (
    .clk, .rst_n, .start(stage_start[2]), .cur_mb(p_cur), .top_row, .left_col, .topleft,
    .top_avail(py != '0), .left_avail(px != '0), .topright_avail(py != '0 && px + 1'b1 < mb_cols),
    .inter_cost(p_cost), .busy(ip_busy), .done(ip_done), .is_intra(ip_intra),
    .pde_stop(ip_pde), .intra_cost(ip_cost), .modes(ip_modes)
  );
  assign stage_done[2] = ip_done;

  // neighbour buffers, written as an MB leaves IP
  always_ff @(posedge clk) begin
    if (ip_done && int'(px) < MB_COLS_MAX) begin
      topleft <= upper_pels[int'(px)*MB_SIZE + MB_SIZE - 1];
      for (int i = 0; i < MB_SIZE; i++) begin
        left_col[i] <= p_cur[i][MB_SIZE-1];
        upper_pels[int'(px)*MB_SIZE + i] <= p_cur[MB_SIZE-1][i];
      end
      upper_mv[int'(px)] <= ip_intra ? '0 : p_mv;
    end
  end

  // ---------------------------------------------------------------- stage 4
  assign ecdb_start    = stage_start[3];
  assign ecdb_mbx      = stage_mbx[3];
  assign ecdb_mby      = stage_mby[3];
  assign stage_done[3] = ecdb_done;

  // ---------------------------------------------------------------- hand-over
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_int_mv <= '0; f_pmv <= '0; f_ref <= '0;
      p_mv <= '0; p_cost <= '0; p_ref <= '0;
      ecdb_is_intra <= 1'b0; ecdb_ref <= '0; ecdb_mv <= '0; ecdb_inter_cost <= '0;
      for (int i = 0; i < 16; i++) ecdb_modes[i] <= '0;
      for (int y = 0; y < MB_SIZE; y++)
        for (int x = 0; x < MB_SIZE; x++) begin
          f_cur[y][x] <= '0; p_cur[y][x] <= '0; p_mc[y][x] <= '0;
          ecdb_cur[y][x] <= '0; ecdb_mc[y][x] <= '0;
        end
    end else if (advance) begin
      f_cur    <= ime_cur;
      f_int_mv <= mv_buf[best_ref][NUM_BLK-1];
      f_ref    <= best_ref;
      f_pmv    <= ime_pmv;
      p_cur    <= f_cur;
      p_mc     <= fme_mc;
      p_mv     <= fme_mv;
      p_cost   <= fme_cost;
      p_ref    <= f_ref;
      ecdb_cur        <= p_cur;
      ecdb_mc         <= p_mc;
      ecdb_mv         <= p_mv;
      ecdb_ref        <= p_ref;
      ecdb_inter_cost <= p_cost;
      ecdb_is_intra   <= ip_intra;
      ecdb_modes      <= ip_modes;
    end
  end

  // stage 1 only loads while its engine is idle
  assert property (@(posedge clk) disable iff (!rst_n) (sw_we || cur_we) |-> !ime_busy);

  logic unused;
  assign unused = ^{fme_busy, ip_busy, ip_pde, ip_cost, stage_valid};

endmodule
