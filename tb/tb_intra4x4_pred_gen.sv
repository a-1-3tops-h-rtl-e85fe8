// Self-checking test of intra4x4_pred_gen: every mode with random and extreme
// neighbours and all availability combinations; each of the 16 predicted
// pels is compared with the standard's per-mode equations, and mode_ok with
// the modes' neighbour needs.
module tb_intra4x4_pred_gen;
  import h264enc_pkg::*;
  import tb_h264_model_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] mode;
  pel_t top [8], left [4], topleft;
  logic top_ok, left_ok, topleft_ok, topright_ok, mode_ok;
  pel_t pred [4][4];

  intra4x4_pred_gen dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int pt [8], pl [4], pm;
      bit ta, la, tla, tra;
      for (int k = 0; k < 8; k++) pt[k] = (t < 2) ? 255 * t : $urandom_range(0, 255);
      for (int k = 0; k < 4; k++) pl[k] = (t < 2) ? 255 * t : $urandom_range(0, 255);
      pm = $urandom_range(0, 255);
      {ta, la, tla, tra} = 4'(t);
      for (int k = 0; k < 8; k++) top[k] = pel_t'(pt[k]);
      for (int k = 0; k < 4; k++) left[k] = pel_t'(pl[k]);
      topleft = pel_t'(pm);
      top_ok = ta; left_ok = la; topleft_ok = tla; topright_ok = tra;
      if (!tra) for (int k = 4; k < 8; k++) pt[k] = pt[3];
      for (int m = 0; m < 9; m++) begin
        bit need_ok;
        mode = 4'(m);
        #1;
        case (m)
          0, 3, 7: need_ok = ta;
          1, 8:    need_ok = la;
          2:       need_ok = 1;
          default: need_ok = ta && la && tla;
        endcase
        checks++;
        if (mode_ok != need_ok) begin failures++; $display("FAIL t=%0d mode %0d ok %0b", t, m, mode_ok); end
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          int e;
          e = intra4(m, x, y, pt, pl, pm, ta, la);
          checks++;
          if (int'(pred[y][x]) != e) begin
            failures++;
            $display("FAIL t=%0d mode %0d (%0d,%0d) got %0d exp %0d", t, m, x, y, pred[y][x], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
