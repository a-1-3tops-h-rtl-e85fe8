// Shared types, constants and helper functions of the H.264/AVC baseline
// encoder datapath.
//
// The macroblock (MB) is 16x16 luma pels of 8 bits. Integer motion estimation
// produces 41 variable-block-size (VBS) results per search point, in the order
// fixed here by blk_geom(): sixteen 4x4, eight 8x4, eight 4x8, four 8x8, two
// 16x8, two 8x16 and one 16x16 block. That order, the cost widths and the
// signed Exp-Golomb bit count used by the rate term are choices of this design;
// the 41-block count and the seven block sizes are the encoder's.
package h264enc_pkg;

  localparam int MB_SIZE   = 16;  // MB edge in pels
  localparam int NUM_BLK   = 41;  // VBS blocks per search point
  localparam int NUM_CAND  = 8;   // horizontally consecutive search points per cycle
  localparam int SAD_W     = 16;  // width of any SAD
  localparam int COST_W    = 18;  // SAD plus rate term
  localparam int MV_W      = 10;  // signed MV component (integer or quarter pel)

  typedef logic [7:0]                 pel_t;
  typedef logic [SAD_W-1:0]           sad_t;
  typedef logic [COST_W-1:0]          cost_t;
  typedef logic signed [MV_W-1:0]     mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // Shift command of the IME reference pels array.
  typedef enum logic [1:0] {SH_HOLD, SH_UP, SH_DOWN, SH_LEFT} ra_cmd_e;

  // Geometry of VBS block b: origin (x, y) and size (w, h), in 4x4 units.
  typedef struct packed {
    logic [2:0] x;
    logic [2:0] y;
    logic [2:0] w;
    logic [2:0] h;
  } blk_geom_t;

  function automatic blk_geom_t blk_geom(input int b);
    blk_geom_t g;
    if (b < 16) begin                       // 4x4, raster order
      g.x = 3'(b % 4);      g.y = 3'(b / 4);      g.w = 3'd1; g.h = 3'd1;
    end else if (b < 24) begin              // 8x4 (wide), raster order
      g.x = 3'(((b-16) % 2) * 2); g.y = 3'((b-16) / 2); g.w = 3'd2; g.h = 3'd1;
    end else if (b < 32) begin              // 4x8 (tall)
      g.x = 3'((b-24) % 4); g.y = 3'(((b-24) / 4) * 2); g.w = 3'd1; g.h = 3'd2;
    end else if (b < 36) begin              // 8x8
      g.x = 3'(((b-32) % 2) * 2); g.y = 3'(((b-32) / 2) * 2); g.w = 3'd2; g.h = 3'd2;
    end else if (b < 38) begin              // 16x8
      g.x = 3'd0; g.y = 3'((b-36) * 2); g.w = 3'd4; g.h = 3'd2;
    end else if (b < 40) begin              // 8x16
      g.x = 3'((b-38) * 2); g.y = 3'd0; g.w = 3'd2; g.h = 3'd4;
    end else begin                          // 16x16
      g.x = 3'd0; g.y = 3'd0; g.w = 3'd4; g.h = 3'd4;
    end
    return g;
  endfunction

  // Length in bits of the signed Exp-Golomb code se(v) of v:
  // 2*floor(log2(codeNum+1)) + 1 with codeNum = 2|v| - (v > 0).
  function automatic int unsigned se_bits(input int v);
    int unsigned code, len;
    code = ((v > 0) ? unsigned'(2*v - 1) : unsigned'(-2*v)) + 1;
    len  = 1;
    for (int i = 1; i < 24; i++)
      if ((code >> i) != 0) len = len + 2;
    return len;
  endfunction

  function automatic pel_t clip_pel(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : pel_t'(v);
  endfunction

endpackage
