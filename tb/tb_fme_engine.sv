// Self-checking test of fme_engine: a random 64x64 reference picture, the MB
// at (24,24), and a current MB made from the reference at a random quarter-pel
// motion plus noise. The testbench serves the reference read port from the
// picture, repeats the two-step search in software (standard interpolation,
// matrix SATD, Exp-Golomb MV bits, centre kept on ties) and compares the
// best MV, its cost and the whole motion-compensated MB; the cycle count from
// start to done is checked too (3 passes of 16 blocks x 15 cycles, plus PU
// drain and decision).
module tb_fme_engine;
  import h264enc_pkg::*;
  import tb_h264_model_pkg::*;
  localparam int MX = 24, MY = 24;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  pel_t cur_mb [16][16];
  mv_t  int_mv, pmv, best_mv;
  logic [7:0] lambda;
  logic ref_rd_en;
  logic signed [11:0] ref_rd_x, ref_rd_y;
  pel_t ref_rd_data [10];
  logic busy, done;
  cost_t best_cost;
  pel_t mc_mb [16][16];

  fme_engine dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (ref_rd_en)
      for (int i = 0; i < 10; i++)
        ref_rd_data[i] <= pel_t'(pic[MY + int'(ref_rd_y)][MX + int'(ref_rd_x) + i]);

  function automatic int eg_len(int v);
    int c;
    c = (v > 0) ? 2*v - 1 : -2*v;
    return 2*($clog2(c + 2) - 1) + 1;
  endfunction

  function automatic int mb_cost(int qx, int qy);   // quarter MV
    int s;
    s = 0;
    for (int by = 0; by < 4; by++) for (int bx = 0; bx < 4; bx++) begin
      int d [4][4];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        d[i][j] = int'(cur_mb[4*by+i][4*bx+j]) - luma_q(4*(MX + 4*bx + j) + qx, 4*(MY + 4*by + i) + qy);
      s += satd4(d);
    end
    return s + int'(lambda) * (eg_len(qx - int'(pmv.x)) + eg_len(qy - int'(pmv.y)));
  endfunction

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int tqx, tqy, cx, cy, bc, ncyc;
      // smooth random picture
      for (int y = 0; y < PIC; y++) for (int x = 0; x < PIC; x++)
        pic[y][x] = (x * (t + 3) + y * 5 + $urandom_range(0, 40)) % 256;
      int_mv = '{x: mvc_t'($urandom_range(0, 16) - 8), y: mvc_t'($urandom_range(0, 16) - 8)};
      tqx = 4*int'(int_mv.x) + $urandom_range(0, 6) - 3;
      tqy = 4*int'(int_mv.y) + $urandom_range(0, 6) - 3;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
        cur_mb[y][x] = pel_t'(clip1(luma_q(4*(MX + x) + tqx, 4*(MY + y) + tqy) + ((t > 2) ? $urandom_range(0, 4) : 0)));
      pmv = '{x: mvc_t'($urandom_range(0, 20) - 10), y: mvc_t'($urandom_range(0, 20) - 10)};
      lambda = 8'((t % 3) * 4);
      // software two-step search
      cx = 4*int'(int_mv.x); cy = 4*int'(int_mv.y);
      for (int step = 2; step >= 1; step--) begin
        int nx, ny;
        bc = mb_cost(cx, cy); nx = cx; ny = cy;
        for (int k = 0; k < 9; k++) begin
          int c;
          c = mb_cost(cx + step*(k%3 - 1), cy + step*(k/3 - 1));
          if (c < bc) begin bc = c; nx = cx + step*(k%3 - 1); ny = cy + step*(k/3 - 1); end
        end
        cx = nx; cy = ny;
      end
      @(negedge clk);
      while (busy) @(negedge clk);
      start = 1;
      @(posedge clk); #1; start = 0;
      ncyc = 0;
      while (!done) begin @(posedge clk); #1; ncyc++; end
      checks += 3;
      if (ncyc != 3*240 + 2*7) begin failures++; $display("FAIL cycles %0d exp %0d", ncyc, 3*240 + 2*7); end
      if (int'(best_mv.x) != cx || int'(best_mv.y) != cy) begin
        failures++; $display("FAIL t=%0d mv (%0d,%0d) exp (%0d,%0d)", t, best_mv.x, best_mv.y, cx, cy);
      end
      if (int'(best_cost) != bc) begin failures++; $display("FAIL t=%0d cost %0d exp %0d", t, best_cost, bc); end
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        checks++;
        if (int'(mc_mb[y][x]) != luma_q(4*(MX + x) + cx, 4*(MY + y) + cy)) begin
          failures++; $display("FAIL t=%0d mc (%0d,%0d)", t, x, y);
        end
      end
      $display("t=%0d true (%0d,%0d) found (%0d,%0d) cost %0d cycles %0d", t, tqx, tqy, int'(best_mv.x), int'(best_mv.y), best_cost, ncyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
