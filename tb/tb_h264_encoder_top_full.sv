// End-to-end test of h264_encoder_top with every parameter at its default:
// search ranges H[-64,63] V[-32,31] for reference 0 and H[-32,31] V[-16,15]
// for references 1..3, four reference frames. One 2x2-MB frame is encoded
// with four references and then with one. The checks are those of
// h264_top_bench.
module tb_h264_encoder_top_full;
  import h264enc_pkg::*;

  logic           clk = 0;
  logic           rst_n, frame_start, busy, frame_done;
  logic [7:0]     mb_cols, mb_rows, lambda;
  logic [2:0]     num_ref;
  logic           ld_req, ld_done, cur_we, sw_we;
  logic [1:0]     ld_ref, fme_rd_ref, ecdb_ref;
  logic [7:0]     ld_mbx, ld_mby, fme_rd_mbx, fme_rd_mby, ecdb_mbx, ecdb_mby;
  logic [3:0]     cur_row;
  pel_t           cur_wdata [MB_SIZE];
  logic [7:0]     sw_wx;
  logic [6:0]     sw_wy;
  pel_t           sw_wdata [8];
  logic           fme_rd_en;
  logic signed [11:0] fme_rd_x, fme_rd_y;
  pel_t           fme_rd_data [10];
  logic           ecdb_start, ecdb_is_intra, ecdb_done;
  logic [3:0]     ecdb_modes [16];
  mv_t            ecdb_mv;
  cost_t          ecdb_inter_cost;
  pel_t           ecdb_cur [MB_SIZE][MB_SIZE];
  pel_t           ecdb_mc  [MB_SIZE][MB_SIZE];
  logic [3:0]     obs_stage_start, obs_stage_done, obs_stage_valid;
  logic           obs_ip_done, obs_ip_pde;

  always #5 clk = ~clk;

  h264_encoder_top dut (.*);

  assign obs_stage_start = dut.stage_start;
  assign obs_stage_done  = dut.stage_done;
  assign obs_stage_valid = dut.stage_valid;
  assign obs_ip_done     = dut.ip_done;
  assign obs_ip_pde      = dut.ip_pde;

  h264_top_bench #(.SR_H(64), .SR_V(32), .SR_H1(32), .SR_V1(16), .NUM_REF(4), .COLS(2), .ROWS(2), .OFF(64), .ECDB_MAX(3000), .WATCHDOG(2000000)) bench (.*);

endmodule
