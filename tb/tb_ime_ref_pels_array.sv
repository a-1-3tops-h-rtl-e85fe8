// Self-checking test of ime_ref_pels_array: random sequences of the four
// shift commands with random input pels, the whole 16x23 array compared after
// every clock with a software copy.
module tb_ime_ref_pels_array;
  import h264enc_pkg::*;
  int checks = 0, failures = 0;
  int hist [4];

  logic clk = 0, rst_n = 0;
  ra_cmd_e cmd;
  pel_t row_in [23];
  pel_t col_in [16][8];
  pel_t arr [16][23];
  int   mdl [16][23];

  ime_ref_pels_array dut (.clk, .rst_n, .cmd, .row_in, .col_in, .arr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = SH_HOLD;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 23; c++) mdl[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int m [16][23];
      @(negedge clk);
      cmd = ra_cmd_e'($urandom_range(0, 3));
      hist[int'(cmd)]++;
      for (int c = 0; c < 23; c++) row_in[c] = 8'($urandom);
      for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) col_in[r][c] = 8'($urandom);
      m = mdl;
      case (cmd)
        SH_UP:   begin for (int r = 0; r < 15; r++) m[r] = mdl[r+1];
                       for (int c = 0; c < 23; c++) m[15][c] = row_in[c]; end
        SH_DOWN: begin for (int r = 1; r < 16; r++) m[r] = mdl[r-1];
                       for (int c = 0; c < 23; c++) m[0][c] = row_in[c]; end
        SH_LEFT: for (int r = 0; r < 16; r++) for (int c = 0; c < 23; c++)
                   m[r][c] = (c < 15) ? mdl[r][c+8] : int'(col_in[r][c-15]);
        default: ;
      endcase
      mdl = m;
      @(posedge clk); #1;
      checks++;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 23; c++)
        if (int'(arr[r][c]) != mdl[r][c]) begin
          failures++;
          $display("FAIL t=%0d cmd=%s r=%0d c=%0d got %0d exp %0d", t, cmd.name(), r, c, arr[r][c], mdl[r][c]);
          break;
        end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (hist[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
