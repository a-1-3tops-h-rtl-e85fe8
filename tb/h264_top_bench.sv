// Stimulus, memory models and checks for end-to-end tests of
// h264_encoder_top; the wrapping testbench instantiates the encoder and this
// bench side by side.
//
// The bench plays every part outside the core: the external frame memory and
// loader (it answers ld_req by writing the padded search window of the asked
// reference and, for reference 0, the current MB), the reference read port of
// stage 2, and a stage-4 model that takes each finished MB after a random
// delay (sometimes a long one, so that other stages stall).
//
// Scene: reference 0 is a blurred random picture; the current frame is
// reference 0 moved by the quarter-pel motion (TQX, TQY), except that two MBs
// are flat (intra candidates). Reference 1 equals the current frame in the
// left half of the frame. Frames are encoded with num_ref = NUM_REF and then 1.
// Each MB leaving the pipeline is checked: raster order; its motion-
// compensated MB against the standard interpolation at its MV and reference;
// its inter cost against SATD + lambda * MV bits recomputed with the MV
// predictor of the MB above; left-half MBs exactly on reference 1 with zero
// MV; flat MBs intra. Mechanisms counted and required at least once: stage
// stalls, slots with four MBs in flight, searches of a reference > 0, early
// intra termination, intra and inter MBs, both references chosen, frames with
// more than one and with one reference.
module h264_top_bench
  import h264enc_pkg::*;
  import tb_h264_model_pkg::*;
#(
  parameter int SR_H = 64, SR_V = 32, SR_H1 = 32, SR_V1 = 16, NUM_REF = 4,
  parameter int COLS = 4, ROWS = 3,
  parameter int OFF = 64,
  parameter int ECDB_MAX = 1500,
  parameter int WATCHDOG = 1000000,
  localparam int XW  = $clog2(2*SR_H + MB_SIZE - 1 + 8),
  localparam int YW  = $clog2(2*SR_V + MB_SIZE - 1 + 1),
  localparam int RW  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1
) (
  input  logic           clk,
  output logic           rst_n,
  output logic           frame_start,
  output logic [7:0]     mb_cols, mb_rows,
  output logic [2:0]     num_ref,
  output logic [7:0]     lambda,
  input  logic           busy, frame_done,
  input  logic           ld_req,
  input  logic [RW-1:0]  ld_ref,
  input  logic [7:0]     ld_mbx, ld_mby,
  output logic           ld_done,
  output logic           cur_we,
  output logic [3:0]     cur_row,
  output pel_t           cur_wdata [MB_SIZE],
  output logic           sw_we,
  output logic [XW-1:0]  sw_wx,
  output logic [YW-1:0]  sw_wy,
  output pel_t           sw_wdata [8],
  input  logic           fme_rd_en,
  input  logic [RW-1:0]  fme_rd_ref,
  input  logic [7:0]     fme_rd_mbx, fme_rd_mby,
  input  logic signed [11:0] fme_rd_x, fme_rd_y,
  output pel_t           fme_rd_data [10],
  input  logic           ecdb_start,
  input  logic [7:0]     ecdb_mbx, ecdb_mby,
  input  logic           ecdb_is_intra,
  input  logic [3:0]     ecdb_modes [16],
  input  logic [RW-1:0]  ecdb_ref,
  input  mv_t            ecdb_mv,
  input  cost_t          ecdb_inter_cost,
  input  pel_t           ecdb_cur [MB_SIZE][MB_SIZE],
  input  pel_t           ecdb_mc  [MB_SIZE][MB_SIZE],
  output logic           ecdb_done,
  // observation of the pipeline controller
  input  logic [3:0]     obs_stage_start, obs_stage_done, obs_stage_valid,
  input  logic           obs_ip_done, obs_ip_pde
);

  localparam int TQX = 6, TQY = -5;
  int checks = 0, failures = 0;
  int n_stall = 0, n_full = 0, n_ref1_search = 0, n_pde = 0, n_intra = 0, n_inter = 0;
  int n_chose [2] = '{0, 0};
  int n_multi = 0, n_single = 0, n_true = 0, n_mb = 0, n_frames = 0;
  int cur [ROWS*16][COLS*16];
  mv_t final_mv [ROWS][COLS];

  function automatic bit is_flat(int mx, int my);
    return (mx == COLS - 1 && my == 0) || (mx == COLS - 1 && my == ROWS - 1);
  endfunction

  function automatic int eg_len(int v);
    int c;
    c = (v > 0) ? 2*v - 1 : -2*v;
    return 2*($clog2(c + 2) - 1) + 1;
  endfunction

  // ------------------------------------------------------------ loader
  initial begin
    ld_done = 0; cur_we = 0; sw_we = 0; cur_row = 0; sw_wx = 0; sw_wy = 0;
    for (int i = 0; i < 8; i++) sw_wdata[i] = 0;
    for (int i = 0; i < 16; i++) cur_wdata[i] = 0;
    forever begin
      @(posedge clk);
      if (ld_req) begin
        int r, mx, my, srh, srv;
        r = int'(ld_ref); mx = int'(ld_mbx); my = int'(ld_mby);
        srh = (r == 0) ? SR_H : SR_H1; srv = (r == 0) ? SR_V : SR_V1;
        if (r > 0) n_ref1_search++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        for (int y = 0; y < 2*srv + 15; y++)
          for (int x = 0; x < 2*srh + 15; x += 8) begin
            @(negedge clk);
            sw_we = 1; sw_wx = XW'(x); sw_wy = YW'(y);
            for (int i = 0; i < 8; i++)
              sw_wdata[i] = pel_t'(pix(r == 0 ? 0 : 1, OFF + 16*my - srv + y, OFF + 16*mx - srh + x + i));
          end
        @(negedge clk); sw_we = 0;
        if (r == 0)
          for (int y = 0; y < 16; y++) begin
            cur_we = 1; cur_row = 4'(y);
            for (int x = 0; x < 16; x++) cur_wdata[x] = pel_t'(cur[16*my + y][16*mx + x]);
            @(negedge clk);
          end
        cur_we = 0; ld_done = 1;
        @(negedge clk); ld_done = 0;
      end
    end
  end

  // ------------------------------------------------------------ FME reads
  always_ff @(posedge clk)
    if (fme_rd_en)
      for (int i = 0; i < 10; i++)
        fme_rd_data[i] <= pel_t'(pix(int'(fme_rd_ref) == 0 ? 0 : 1, OFF + 16*int'(fme_rd_mby) + int'(fme_rd_y),
                                     OFF + 16*int'(fme_rd_mbx) + int'(fme_rd_x) + i));

  // ------------------------------------------------------------ observation
  bit stage_fin [4];
  always @(posedge clk) begin
    if (obs_stage_start != 0) begin
      if (obs_stage_start == 4'hf) n_full++;
      for (int k = 0; k < 4; k++) stage_fin[k] = 0;
    end
    for (int k = 0; k < 4; k++)
      if (obs_stage_done[k]) begin
        // a stage that finishes while another occupied stage is still busy stalls
        for (int j = 0; j < 4; j++)
          if (j != k && obs_stage_valid[j] && !stage_fin[j] && !obs_stage_done[j]) begin n_stall++; break; end
        stage_fin[k] = 1;
      end
    if (obs_ip_done && obs_ip_pde) n_pde++;
  end

  // ------------------------------------------------------------ stage 4 model
  int exp_idx;
  initial begin
    ecdb_done = 0;
    forever begin
      @(posedge clk);
      if (ecdb_start) begin
        int mx, my, pmx, pmy, sel;
        mx = int'(ecdb_mbx); my = int'(ecdb_mby);
        n_mb++;
        checks++;
        if (my*COLS + mx != exp_idx) begin failures++; $display("FAIL MB (%0d,%0d) out of order", mx, my); end
        exp_idx++;
        checks++;
        for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
          if (int'(ecdb_cur[y][x]) != cur[16*my + y][16*mx + x]) begin
            failures++; $display("FAIL MB (%0d,%0d) current pels", mx, my); y = 16; break;
          end
        // inter result, whatever the decision
        sel = int'(ecdb_ref);
        n_chose[sel > 0 ? 1 : 0]++;
        pmx = (my == 0) ? 0 : int'(final_mv[my-1][mx].x);
        pmy = (my == 0) ? 0 : int'(final_mv[my-1][mx].y);
        begin
          int s;
          s = 0;
          for (int by = 0; by < 4; by++) for (int bx = 0; bx < 4; bx++) begin
            int d [4][4];
            for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
              int p;
              p = luma_q(4*(OFF + 16*mx + 4*bx + j) + int'(ecdb_mv.x), 4*(OFF + 16*my + 4*by + i) + int'(ecdb_mv.y), sel);
              d[i][j] = cur[16*my + 4*by + i][16*mx + 4*bx + j] - p;
              checks++;
              if (int'(ecdb_mc[4*by + i][4*bx + j]) != p) begin
                failures++; $display("FAIL MB (%0d,%0d) mc pel (%0d,%0d)", mx, my, 4*bx + j, 4*by + i);
              end
            end
            s += satd4(d);
          end
          s += int'(lambda) * (eg_len(int'(ecdb_mv.x) - pmx) + eg_len(int'(ecdb_mv.y) - pmy));
          checks++;
          if (int'(ecdb_inter_cost) != s) begin
            failures++; $display("FAIL MB (%0d,%0d) inter cost %0d exp %0d", mx, my, ecdb_inter_cost, s);
          end
        end
        if (is_flat(mx, my)) begin
          checks++;
          if (!ecdb_is_intra) begin failures++; $display("FAIL flat MB (%0d,%0d) not intra", mx, my); end
        end else if (mx < COLS/2 && num_ref > 1) begin
          checks++;
          if (ecdb_is_intra || sel != 1 || ecdb_mv != '0) begin
            failures++; $display("FAIL MB (%0d,%0d) intra %0b ref %0d mv (%0d,%0d), exp ref 1 (0,0)",
                                 mx, my, ecdb_is_intra, sel, int'(ecdb_mv.x), int'(ecdb_mv.y));
          end
        end
        if (!ecdb_is_intra && int'(ecdb_mv.x) == TQX && int'(ecdb_mv.y) == TQY) n_true++;
        if (ecdb_is_intra) n_intra++; else n_inter++;
        final_mv[my][mx] = ecdb_is_intra ? '0 : ecdb_mv;
        repeat ((n_mb % 4 == 1) ? ECDB_MAX : $urandom_range(1, 20)) @(negedge clk);
        ecdb_done = 1;
        @(negedge clk); ecdb_done = 0;
      end
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    int tmp [PIC][PIC];
    rst_n = 0; frame_start = 0; mb_cols = 8'(COLS); mb_rows = 8'(ROWS); lambda = 8'd4;
    num_ref = 3'(NUM_REF);
    for (int y = 0; y < PIC; y++) for (int x = 0; x < PIC; x++) tmp[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < PIC; y++) for (int x = 0; x < PIC; x++) begin
      int s;
      s = 0;
      for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
        s += tmp[(y + dy + PIC) % PIC][(x + dx + PIC) % PIC];
      pic[y][x] = s / 9;
      pic1[y][x] = tmp[y][(x + 7) % PIC];
    end
    for (int y = 0; y < ROWS*16; y++) for (int x = 0; x < COLS*16; x++) begin
      if (is_flat(x / 16, y / 16)) cur[y][x] = 77;
      else cur[y][x] = luma_q(4*(OFF + x) + TQX, 4*(OFF + y) + TQY);
      if (x < (COLS/2)*16) pic1[OFF + y][OFF + x] = cur[y][x];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      num_ref = (f == 0) ? 3'(NUM_REF) : 3'd1;
      if (num_ref > 1) n_multi++; else n_single++;
      exp_idx = 0;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      while (!frame_done) @(negedge clk);
      n_frames++;
      $display("frame %0d (num_ref %0d) done at %0t", f, num_ref, $time);
      checks++;
      if (exp_idx != COLS*ROWS) begin failures++; $display("FAIL frame %0d gave %0d MBs", f, exp_idx); end
    end
    $display("MBs %0d: inter %0d (true motion %0d) intra %0d, early intra stops %0d", n_mb, n_inter, n_true, n_intra, n_pde);
    $display("stalls %0d, full-pipeline slots %0d, searches of ref>0 %0d, ref0/ref>0 chosen %0d/%0d, frames multi/single ref %0d/%0d",
             n_stall, n_full, n_ref1_search, n_chose[0], n_chose[1], n_multi, n_single);
    checks += 10;
    if (n_stall == 0)       begin failures++; $display("FAIL no stall"); end
    if (n_full == 0)        begin failures++; $display("FAIL never four MBs in flight"); end
    if (n_ref1_search == 0) begin failures++; $display("FAIL no search of ref > 0"); end
    if (n_pde == 0)         begin failures++; $display("FAIL no early intra stop"); end
    if (n_intra == 0)       begin failures++; $display("FAIL no intra MB"); end
    if (n_inter == 0)       begin failures++; $display("FAIL no inter MB"); end
    if (n_chose[0] == 0 || n_chose[1] == 0) begin failures++; $display("FAIL a reference never chosen"); end
    if (n_multi == 0 || n_single == 0) begin failures++; $display("FAIL reference-count switch not exercised"); end
    if (n_true == 0)        begin failures++; $display("FAIL true quarter-pel motion never found"); end
    if (n_frames != 2)      begin failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
