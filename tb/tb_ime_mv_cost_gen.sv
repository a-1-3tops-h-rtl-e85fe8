// Self-checking test of ime_mv_cost_gen: fixed and random MVs against the
// Exp-Golomb length 2*floor(log2(codeNum+1))+1 worked out here with $clog2,
// including saturation of large products.
module tb_ime_mv_cost_gen;
  import h264enc_pkg::*;
  int checks = 0, failures = 0;

  mv_t mv, pmv, mvq;
  logic [7:0] lambda;
  cost_t cost, costq;

  ime_mv_cost_gen dut (.mv, .pmv, .lambda, .cost);
  ime_mv_cost_gen #(.MV_SCALE(1)) dutq (.mv(mvq), .pmv, .lambda, .cost(costq));

  function automatic int eg_len(int v);
    int c;
    c = (v > 0) ? 2*v - 1 : -2*v;
    return 2*($clog2(c + 2) - 1) + 1;
  endfunction

  task automatic check(int exp_i, int exp_q);
    #1;
    checks += 2;
    if (int'(cost) != exp_i) begin
      failures++; $display("FAIL int mv=(%0d,%0d) got %0d exp %0d", mv.x, mv.y, cost, exp_i);
    end
    if (int'(costq) != exp_q) begin
      failures++; $display("FAIL qpel mv=(%0d,%0d) got %0d exp %0d", mvq.x, mvq.y, costq, exp_q);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: mvd (0,0) -> 1+1 bits; mvd (+4,-4) -> codeNum 7 and 8 -> 7+7
    pmv = '0; lambda = 8'd10;
    mv = '{x: 0, y: 0}; mvq = '{x: 0, y: 0};   check(20, 20);
    mv = '{x: 1, y: -1}; mvq = '{x: 4, y: -4}; check(140, 140);
    // qpel mvd (1,0): codeNum 1 -> 3 bits, plus 1
    mvq = '{x: 1, y: 0};                       check(140, 40);
    for (int t = 0; t < 500; t++) begin
      int ex, eq, px, py;
      px = $urandom_range(0, 200) - 100; py = $urandom_range(0, 200) - 100;
      pmv = '{x: mvc_t'(px), y: mvc_t'(py)};
      lambda = 8'($urandom);
      mv  = '{x: mvc_t'($urandom_range(0, 127) - 64), y: mvc_t'($urandom_range(0, 63) - 32)};
      mvq = '{x: mvc_t'($urandom_range(0, 500) - 250), y: mvc_t'($urandom_range(0, 250) - 125)};
      ex = int'(lambda) * (eg_len(4*int'(mv.x) - px) + eg_len(4*int'(mv.y) - py));
      eq = int'(lambda) * (eg_len(int'(mvq.x) - px) + eg_len(int'(mvq.y) - py));
      if (ex > 262143) ex = 262143;
      if (eq > 262143) eq = 262143;
      check(ex, eq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
