// Self-checking test of fme_interp: random reference pictures; for several
// block positions the ten rows are fed, and all 121 grid samples are compared
// with the standard's half-sample definitions evaluated on the picture.
// Also checks that 'done' comes one cycle after the tenth row.
module tb_fme_interp;
  import h264enc_pkg::*;
  import tb_h264_model_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, done;
  pel_t in_row [10];
  pel_t grid [11][11];

  fme_interp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int ox, oy, gap;
      for (int y = 0; y < PIC; y++) for (int x = 0; x < PIC; x++)
        pic[y][x] = (t % 3 == 0) ? ((x + y) % 2) * 255 : $urandom_range(0, 255);
      ox = $urandom_range(4, 50); oy = $urandom_range(4, 50);
      gap = t % 2;
      for (int r = 0; r < 10; r++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < 10; i++) in_row[i] = pel_t'(pic[oy - 3 + r][ox - 3 + i]);
        if (gap == 1 && r == 4) begin
          @(negedge clk); in_valid = 0;
        end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL t=%0d done missing", t); end
      for (int v = 0; v < 11; v++) for (int u = 0; u < 11; u++) begin
        int e;
        e = luma_q(4*ox + 2*u - 4, 4*oy + 2*v - 4);
        checks++;
        if (int'(grid[v][u]) != e) begin
          failures++;
          $display("FAIL t=%0d v=%0d u=%0d got %0d exp %0d", t, v, u, grid[v][u], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
