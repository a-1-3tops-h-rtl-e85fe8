// PE array and SAD tree of one IME search point.
//
// The current MB and one 16x16 reference candidate enter as pel arrays. The
// PE array forms absolute differences of 2:1 subsampled pels (128 PEs for a
// 16x16 MB), after dropping TRUNC_BITS low bits of every pel (pixel
// truncation). Sixteen 2-D adder trees sum each 4x4 block; one VBS tree then
// adds those 4x4 SADs into the 8x4, 4x8, 8x8, 16x8, 8x16 and 16x16 SADs, so all
// 41 block sizes come from the same 128 differences with no partial-SAD
// registers. Output order is h264enc_pkg::blk_geom().
//
// Purely combinational; the IME engine registers the 41 SADs.
// Follows the encoder: 128-PE array with 1/2 subsampling, sixteen 4x4 adder
// trees, one VBS tree, 41 SADs. Own choices: the subsampling pattern (pels
// with x+y even, a checkerboard) and the truncation depth (TRUNC_BITS).
module ime_pe_sad_tree
  import h264enc_pkg::*;
#(
  parameter int SUBSAMPLE  = 2,   // 1: all 256 pels, 2: checkerboard 128 pels
  parameter int TRUNC_BITS = 2    // low pel bits ignored
) (
  input  pel_t cur [MB_SIZE][MB_SIZE],   // [y][x]
  input  pel_t ref_blk [MB_SIZE][MB_SIZE],
  output sad_t sad [NUM_BLK]
);

  logic [7:0] ad [MB_SIZE][MB_SIZE];     // PE outputs
  sad_t       sad4 [4][4];               // 4x4 SADs [by][bx]

  // PE array: only kept positions get a PE.
  for (genvar y = 0; y < MB_SIZE; y++) begin : g_row
    for (genvar x = 0; x < MB_SIZE; x++) begin : g_col
      if (SUBSAMPLE == 1 || ((x + y) % 2) == 0) begin : g_pe
        logic [7:0] c, r;
        assign c = cur[y][x] >> TRUNC_BITS;
        assign r = ref_blk[y][x] >> TRUNC_BITS;
        assign ad[y][x] = (c > r) ? c - r : r - c;
      end else begin : g_skip
        assign ad[y][x] = '0;
      end
    end
  end

  // Sixteen 2-D adder trees for 4x4 blocks.
  for (genvar by = 0; by < 4; by++) begin : g_by
    for (genvar bx = 0; bx < 4; bx++) begin : g_bx
      sad_t rowsum [4];
      for (genvar r = 0; r < 4; r++) begin : g_r
        assign rowsum[r] = sad_t'(ad[4*by+r][4*bx])   + sad_t'(ad[4*by+r][4*bx+1])
                         + sad_t'(ad[4*by+r][4*bx+2]) + sad_t'(ad[4*by+r][4*bx+3]);
      end
      assign sad4[by][bx] = (rowsum[0] + rowsum[1]) + (rowsum[2] + rowsum[3]);
    end
  end

  // VBS tree.
  sad_t s8x4 [4][2];   // [row of 4][half]
  sad_t s4x8 [2][4];   // [half][col]
  sad_t s8x8 [2][2];
  for (genvar i = 0; i < 4; i++) begin : g_vbs1
    for (genvar j = 0; j < 2; j++) begin : g_vbs1b
      assign s8x4[i][j] = sad4[i][2*j] + sad4[i][2*j+1];
      assign s4x8[j][i] = sad4[2*j][i] + sad4[2*j+1][i];
    end
  end
  for (genvar i = 0; i < 2; i++) begin : g_vbs2
    for (genvar j = 0; j < 2; j++) begin : g_vbs2b
      assign s8x8[i][j] = s8x4[2*i][j] + s8x4[2*i+1][j];
    end
  end

  for (genvar b = 0; b < 16; b++) begin : g_o4
    assign sad[b] = sad4[b/4][b%4];
  end
  for (genvar b = 0; b < 8; b++) begin : g_o84
    assign sad[16+b] = s8x4[b/2][b%2];
    assign sad[24+b] = s4x8[b/4][b%4];
  end
  for (genvar b = 0; b < 4; b++) begin : g_o88
    assign sad[32+b] = s8x8[b/2][b%2];
  end
  assign sad[36] = s8x8[0][0] + s8x8[0][1];
  assign sad[37] = s8x8[1][0] + s8x8[1][1];
  assign sad[38] = s8x8[0][0] + s8x8[1][0];
  assign sad[39] = s8x8[0][1] + s8x8[1][1];
  assign sad[40] = (s8x8[0][0] + s8x8[0][1]) + (s8x8[1][0] + s8x8[1][1]);

endmodule
