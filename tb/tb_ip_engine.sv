// Self-checking test of ip_engine: random MBs and neighbours under random
// availability, with inter costs that are very large (full decision), very
// small (elimination after the first block) and in between. A software model
// walks the blocks in coding order with the standard's predictions, keeps
// the least-SAD mode per block and applies the same early stop; modes,
// intra cost, the intra/inter decision, the early-stop flag and the cycle
// count (9 per evaluated block) are compared.
module tb_ip_engine;
  import h264enc_pkg::*;
  import tb_h264_model_pkg::*;
  int checks = 0, failures = 0;
  int n_stop = 0, n_intra = 0, n_inter_full = 0;

  logic clk = 0, rst_n = 0, start = 0;
  pel_t cur_mb [16][16], top_row [20], left_col [16], topleft;
  logic top_avail, left_avail, topright_avail;
  cost_t inter_cost, intra_cost;
  logic busy, done, is_intra, pde_stop;
  logic [3:0] modes [16];

  ip_engine dut (.*);
  always #5 clk = ~clk;

  int c [16][16], tr [20], lc [16], tlp;

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int acc, nblk, ncyc, m_modes [16];
      bit stop, intra;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        c[y][x] = (t % 2) ? (x*8 + y*3 + $urandom_range(0, 10)) % 256 : $urandom_range(0, 255);
        cur_mb[y][x] = pel_t'(c[y][x]);
      end
      for (int i = 0; i < 20; i++) begin tr[i] = $urandom_range(0, 255); top_row[i] = pel_t'(tr[i]); end
      for (int i = 0; i < 16; i++) begin lc[i] = $urandom_range(0, 255); left_col[i] = pel_t'(lc[i]); end
      tlp = $urandom_range(0, 255); topleft = pel_t'(tlp);
      {top_avail, left_avail, topright_avail} = 3'($urandom);
      case (t % 3)
        0: inter_cost = '1;
        1: inter_cost = cost_t'($urandom_range(0, 100));
        default: inter_cost = cost_t'($urandom_range(500, 3000));
      endcase
      // model (twice when the inter cost is set to the full intra cost, or
      // one below it: both must give inter without an early stop)
      for (int pass = 0; pass < ((t % 6 == 5) ? 2 : 1); pass++) begin
      if (t % 6 == 5 && pass == 0) inter_cost = '1;
      if (t % 6 == 5 && pass == 1) inter_cost = cost_t'(acc - ((t % 12 == 11) ? 1 : 0));
      acc = 0; nblk = 0; stop = 0; intra = 0;
      for (int i = 0; i < 16; i++) m_modes[i] = -1;
      for (int b = 0; b < 16 && !stop; b++) begin
        int bx, by, pt [8], pl [4], pm, best, bm;
        bit ta, la, tla, tra;
        bx = 2*((b >> 2) & 1) + (b & 1); by = 2*((b >> 3) & 1) + ((b >> 1) & 1);
        ta = by > 0 || top_avail; la = bx > 0 || left_avail;
        tla = (bx > 0 && by > 0) || (bx == 0 && by > 0 && left_avail) || (by == 0 && bx > 0 && top_avail) || (top_avail && left_avail);
        if (by == 0) tra = (bx == 3) ? topright_avail : top_avail;
        else tra = !(b == 3 || b == 7 || b == 11 || b == 13 || b == 15);
        for (int k = 0; k < 8; k++) pt[k] = (by == 0) ? tr[4*bx + k] : c[4*by - 1][(4*bx + k) > 15 ? 15 : 4*bx + k];
        if (!tra) for (int k = 4; k < 8; k++) pt[k] = pt[3];
        for (int k = 0; k < 4; k++) pl[k] = (bx == 0) ? lc[4*by + k] : c[4*by + k][4*bx - 1];
        pm = (bx == 0 && by == 0) ? tlp : (bx == 0) ? lc[4*by - 1] : (by == 0) ? tr[4*bx - 1] : c[4*by - 1][4*bx - 1];
        best = 1 << 30; bm = 0;
        for (int m = 0; m < 9; m++) begin
          bit ok;
          int s;
          case (m) 0, 3, 7: ok = ta; 1, 8: ok = la; 2: ok = 1; default: ok = ta && la && tla; endcase
          if (!ok) continue;
          s = 0;
          for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
            int d;
            d = c[4*by + y][4*bx + x] - intra4(m, x, y, pt, pl, pm, ta, la);
            s += d < 0 ? -d : d;
          end
          if (s < best) begin best = s; bm = m; end
        end
        m_modes[4*by + bx] = bm;
        acc += best; nblk++;
        if (acc > int'(inter_cost)) begin stop = (b != 15); intra = 0; break; end
        if (b == 15) intra = acc < int'(inter_cost);
      end
      end
      // run
      @(negedge clk);
      while (busy) @(negedge clk);
      start = 1;
      @(posedge clk); #1; start = 0;
      ncyc = 0;
      while (!done) begin @(posedge clk); #1; ncyc++; end
      checks += 4;
      if (ncyc != 9*nblk) begin failures++; $display("FAIL t=%0d cycles %0d exp %0d", t, ncyc, 9*nblk); end
      if (int'(intra_cost) != acc) begin failures++; $display("FAIL t=%0d cost %0d exp %0d", t, intra_cost, acc); end
      if (is_intra != intra) begin failures++; $display("FAIL t=%0d is_intra", t); end
      if (pde_stop != stop) begin failures++; $display("FAIL t=%0d pde_stop", t); end
      for (int i = 0; i < 16; i++)
        if (m_modes[i] >= 0) begin
          checks++;
          if (int'(modes[i]) != m_modes[i]) begin failures++; $display("FAIL t=%0d blk %0d mode %0d exp %0d", t, i, modes[i], m_modes[i]); end
        end
      if (stop) n_stop++; else if (intra) n_intra++; else n_inter_full++;
    end
    $display("early stops %0d, intra %0d, inter after full decision %0d", n_stop, n_intra, n_inter_full);
    checks += 3;
    if (n_stop == 0) failures++;
    if (n_intra == 0) failures++;
    if (n_inter_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
