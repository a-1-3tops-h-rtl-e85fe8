// Self-checking test of ime_pe_sad_tree: random and extreme MB pairs, all 41
// VBS SADs compared with a direct per-block sum over the subsampled,
// truncated pels, for both the default and the full-sampling configuration.
module tb_ime_pe_sad_tree;
  import h264enc_pkg::*;
  int checks = 0, failures = 0;

  pel_t cur [16][16], rf [16][16];
  sad_t sad_a [NUM_BLK], sad_b [NUM_BLK];

  ime_pe_sad_tree dut_a (.cur, .ref_blk(rf), .sad(sad_a));
  ime_pe_sad_tree #(.SUBSAMPLE(1), .TRUNC_BITS(0)) dut_b (.cur, .ref_blk(rf), .sad(sad_b));

  function automatic int expect_sad(int b, int ss, int tr);
    int x0, y0, w, h, s;
    // block sizes written out independently of the package
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
        if (ss == 1 || (x+y) % 2 == 0) begin
          int d;
          d = int'(cur[y][x] >> tr) - int'(rf[y][x] >> tr);
          s += (d < 0) ? -d : d;
        end
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          case (t)
            0: begin cur[y][x] = 8'hff; rf[y][x] = 8'h00; end
            1: begin cur[y][x] = 8'h00; rf[y][x] = 8'hff; end
            2: begin cur[y][x] = 8'(x*16+y); rf[y][x] = 8'(x*16+y); end
            default: begin cur[y][x] = 8'($urandom); rf[y][x] = 8'($urandom); end
          endcase
        end
      #1;
      for (int b = 0; b < NUM_BLK; b++) begin
        checks += 2;
        if (int'(sad_a[b]) != expect_sad(b, 2, 2)) begin
          failures++;
          $display("FAIL t=%0d blk=%0d sub: got %0d exp %0d", t, b, sad_a[b], expect_sad(b, 2, 2));
        end
        if (int'(sad_b[b]) != expect_sad(b, 1, 0)) begin
          failures++;
          $display("FAIL t=%0d blk=%0d full: got %0d exp %0d", t, b, sad_b[b], expect_sad(b, 1, 0));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
