// Self-checking test of ime_engine at a reduced search range (H[-16,15]
// V[-8,7] for reference 0, H[-8,7] V[-4,3] for reference 1). Random search
// windows are loaded, the current MB is a noisy copy of one window position,
// and both references are searched. All 41 best MVs and costs of each
// reference are compared with an exhaustive software search that visits the
// search points in the same snake order, and the cycle count is checked
// against 16 fill cycles + one cycle per eight search points + 3.
module tb_ime_engine;
  import h264enc_pkg::*;
  localparam int SRH = 16, SRV = 8, SRH1 = 8, SRV1 = 4;
  localparam int W = 2*SRH + 15, H = 2*SRV + 15;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic cur_we = 0; logic [3:0] cur_row = 0; pel_t cur_wdata [16];
  pel_t cur_mb [16][16];
  logic sw_we = 0; logic [5:0] sw_wx = 0; logic [4:0] sw_wy = 0; pel_t sw_wdata [8];
  logic start = 0; logic [0:0] ref_idx = 0; mv_t pmv; logic [7:0] lambda;
  logic busy, done;
  mv_t   mv_buf [2][NUM_BLK];
  cost_t cost_buf [2][NUM_BLK];

  ime_engine #(.SR_H(SRH), .SR_V(SRV), .SR_H1(SRH1), .SR_V1(SRV1), .NUM_REF(2)) dut (.*);
  always #5 clk = ~clk;

  int win [H][W];
  int cur [16][16];

  function automatic int eg_len(int v);
    int c;
    c = (v > 0) ? 2*v - 1 : -2*v;
    return 2*($clog2(c + 2) - 1) + 1;
  endfunction

  function automatic int blk_sad(int b, int px, int py);
    int x0, y0, w, h, s;
    if (b < 16)      begin x0 = (b%4)*4; y0 = (b/4)*4; w = 4; h = 4; end
    else if (b < 24) begin x0 = ((b-16)%2)*8; y0 = ((b-16)/2)*4; w = 8; h = 4; end
    else if (b < 32) begin x0 = ((b-24)%4)*4; y0 = ((b-24)/4)*8; w = 4; h = 8; end
    else if (b < 36) begin x0 = ((b-32)%2)*8; y0 = ((b-32)/2)*8; w = 8; h = 8; end
    else if (b < 38) begin x0 = 0; y0 = (b-36)*8; w = 16; h = 8; end
    else if (b < 40) begin x0 = (b-38)*8; y0 = 0; w = 8; h = 16; end
    else             begin x0 = 0; y0 = 0; w = 16; h = 16; end
    s = 0;
    for (int y = y0; y < y0+h; y++)
      for (int x = x0; x < x0+w; x++)
        if ((x+y) % 2 == 0) begin
          int d;
          d = (cur[y][x] >> 2) - (win[py+y][px+x] >> 2);
          s += (d < 0) ? -d : d;
        end
    return s;
  endfunction

  task automatic run_ref(int r, int srh, int srv);
    int bc [NUM_BLK]; int bx [NUM_BLK]; int by [NUM_BLK];
    int ncyc, ng, nv;
    // load window and current MB
    for (int y = 0; y < 2*srv+15; y++)
      for (int x = 0; x < 2*srh+15; x += 8) begin
        @(negedge clk);
        sw_we = 1; sw_wx = 6'(x); sw_wy = 5'(y);
        for (int i = 0; i < 8; i++) sw_wdata[i] = pel_t'(win[y][(x+i < W) ? x+i : 0]);
      end
    for (int y = 0; y < 16; y++) begin
      @(negedge clk);
      sw_we = 0; cur_we = 1; cur_row = 4'(y);
      for (int x = 0; x < 16; x++) cur_wdata[x] = pel_t'(cur[y][x]);
    end
    @(negedge clk);
    cur_we = 0;
    pmv = '{x: mvc_t'($urandom_range(0, 40) - 20), y: mvc_t'($urandom_range(0, 20) - 10)};
    lambda = 8'($urandom_range(0, 8));
    // software search in snake order
    ng = 2*srh/8; nv = 2*srv;
    for (int b = 0; b < NUM_BLK; b++) bc[b] = 1 << 30;
    for (int g = 0; g < ng; g++)
      for (int i = 0; i < nv; i++) begin
        int py;
        py = (g % 2 == 0) ? i : nv - 1 - i;
        for (int k = 0; k < 8; k++) begin
          int px, mc;
          px = 8*g + k;
          mc = int'(lambda) * (eg_len(4*(px - srh) - int'(pmv.x)) + eg_len(4*(py - srv) - int'(pmv.y)));
          for (int b = 0; b < NUM_BLK; b++) begin
            int c;
            c = blk_sad(b, px, py) + mc;
            if (c < bc[b]) begin bc[b] = c; bx[b] = px - srh; by[b] = py - srv; end
          end
        end
      end
    // run
    start = 1; ref_idx = 1'(r);
    @(posedge clk); #1;
    start = 0;
    ncyc = 0;
    while (!done) begin @(posedge clk); #1; ncyc++; end
    checks++;
    if (ncyc != 16 + ng*nv + 2) begin
      failures++; $display("FAIL ref %0d cycles %0d exp %0d", r, ncyc, 16 + ng*nv + 2);
    end
    @(posedge clk); #1;
    for (int b = 0; b < NUM_BLK; b++) begin
      checks++;
      if (int'(cost_buf[r][b]) != bc[b] || int'(mv_buf[r][b].x) != bx[b] || int'(mv_buf[r][b].y) != by[b]) begin
        failures++;
        $display("FAIL ref %0d blk %0d got %0d (%0d,%0d) exp %0d (%0d,%0d)", r, b, cost_buf[r][b],
                 mv_buf[r][b].x, mv_buf[r][b].y, bc[b], bx[b], by[b]);
      end
    end
    $display("ref %0d: 16x16 MV (%0d,%0d) cost %0d in %0d cycles", r, bx[40], by[40], bc[40], ncyc);
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 2; trial++) begin
      int tx, ty;
      // reference 0: full window, MB copied from (tx, ty) with noise
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) win[y][x] = $urandom_range(0, 255);
      tx = $urandom_range(0, 2*SRH - 1); ty = $urandom_range(0, 2*SRV - 1);
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
        begin
          int v;
          v = win[ty+y][tx+x] + $urandom_range(0, 6);
          cur[y][x] = (v > 255) ? 255 : v;
        end
      run_ref(0, SRH, SRV);
      checks++;
      if (int'(mv_buf[0][40].x) != tx - SRH || int'(mv_buf[0][40].y) != ty - SRV) begin
        failures++; $display("FAIL true motion (%0d,%0d) not found", tx - SRH, ty - SRV);
      end
      // reference 1: small window, random
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) win[y][x] = $urandom_range(0, 255);
      run_ref(1, SRH1, SRV1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
