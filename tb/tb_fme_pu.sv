// Self-checking test of fme_pu: random 4x4 blocks fed back to back and with
// idle gaps; each SATD is compared with the matrix-form Hadamard SATD, and
// its arrival five cycles after the block's fourth row is checked.
module tb_fme_pu;
  import h264enc_pkg::*;
  import tb_h264_model_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, satd_valid;
  pel_t cur_row [4], pred_row [4];
  logic [12:0] satd;

  fme_pu dut (.*);
  always #5 clk = ~clk;

  int exp_q [$];
  int due_q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (satd_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected SATD"); end
      else begin
        int e, d;
        e = exp_q.pop_front(); d = due_q.pop_front();
        if (int'(satd) != e) begin failures++; $display("FAIL satd %0d exp %0d", satd, e); end
        if (cyc != d) begin failures++; $display("FAIL satd at cycle %0d exp %0d", cyc, d); end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int d [4][4];
      int c [4][4], p [4][4];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        case (t)
          0: begin c[i][j] = 255; p[i][j] = 0; end
          1: begin c[i][j] = ((i + j) % 2) * 255; p[i][j] = 255 - c[i][j]; end
          default: begin c[i][j] = $urandom_range(0, 255); p[i][j] = $urandom_range(0, 255); end
        endcase
        d[i][j] = c[i][j] - p[i][j];
      end
      exp_q.push_back(satd4(d));
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < 4; i++) begin cur_row[i] = pel_t'(c[r][i]); pred_row[i] = pel_t'(p[r][i]); end
        if (r == 3) due_q.push_back(cyc + 5);
      end
      if (t % 7 == 3) begin @(negedge clk); in_valid = 0; repeat ($urandom_range(0, 6)) @(negedge clk); end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d SATDs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
