// Self-checking test of ime_comparator_tree: random runs of cost vectors; the
// best cost and MV of every block are compared after each clock with a
// software search that keeps the first occurrence of the minimum.
module tb_ime_comparator_tree;
  import h264enc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear, valid;
  sad_t  sad [NUM_CAND][NUM_BLK];
  cost_t mv_cost [NUM_CAND];
  mv_t   cand_mv [NUM_CAND];
  cost_t best_cost [NUM_BLK];
  mv_t   best_mv [NUM_BLK];
  int    m_cost [NUM_BLK];
  mv_t   m_mv [NUM_BLK];

  ime_comparator_tree dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      clear = (t % 50 == 0);
      valid = ($urandom_range(0, 9) != 0);
      for (int k = 0; k < NUM_CAND; k++) begin
        // small ranges so that ties happen
        mv_cost[k] = cost_t'($urandom_range(0, 20));
        cand_mv[k] = '{x: mvc_t'($urandom_range(0, 255) - 128), y: mvc_t'(t)};
        for (int b = 0; b < NUM_BLK; b++) sad[k][b] = sad_t'($urandom_range(0, 200));
      end
      if (clear) for (int b = 0; b < NUM_BLK; b++) begin m_cost[b] = 262143; m_mv[b] = '0; end
      if (valid)
        for (int b = 0; b < NUM_BLK; b++)
          for (int k = 0; k < NUM_CAND; k++)
            if (int'(sad[k][b]) + int'(mv_cost[k]) < m_cost[b]) begin
              m_cost[b] = int'(sad[k][b]) + int'(mv_cost[k]);
              m_mv[b]   = cand_mv[k];
            end
      @(posedge clk); #1;
      if (t >= 1) begin
        checks++;
        for (int b = 0; b < NUM_BLK; b++)
          if (int'(best_cost[b]) != m_cost[b] || best_mv[b] != m_mv[b]) begin
            failures++;
            $display("FAIL t=%0d blk=%0d got %0d (%0d,%0d) exp %0d (%0d,%0d)", t, b,
                     best_cost[b], best_mv[b].x, best_mv[b].y, m_cost[b], m_mv[b].x, m_mv[b].y);
            break;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
