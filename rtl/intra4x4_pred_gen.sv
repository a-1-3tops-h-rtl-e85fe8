// Reconfigurable intra 4x4 luma predictor generator.
//
// All nine intra 4x4 prediction modes of H.264 are produced by one shared set
// of filter units: the thirteen edge pels L, K, J, I, M, A..H are laid out on
// one line e[0..12], eleven three-tap units f3[i] = (e[i-1] + 2e[i] + e[i+1]
// + 2) >> 2 and twelve two-tap units f2[i] = (e[i] + e[i+1] + 1) >> 1 run on
// that line, and each mode is only a different routing of e, f2 and f3 (plus
// the two end-of-line terms and the DC sum) to the sixteen outputs.
// Missing above-right pels are replaced by D, as the standard prescribes.
// mode_ok tells whether the mode's neighbours are available.
//
// Combinational: pred follows mode and the edge inputs in the same cycle.
// The mode definitions are the standard's; the shared filter line is this
// design's reading of the reconfigurable generator the encoder cites.
module intra4x4_pred_gen
  import h264enc_pkg::*;
(
  input  logic [3:0] mode,
  input  pel_t       top  [8],      // p[0..7,-1]: A..H
  input  pel_t       left [4],      // p[-1,0..3]: I..L
  input  pel_t       topleft,       // p[-1,-1]: M
  input  logic       top_ok,
  input  logic       left_ok,
  input  logic       topleft_ok,
  input  logic       topright_ok,
  output pel_t       pred [4][4],   // [y][x]
  output logic       mode_ok
);

  logic [11:0] e  [13];
  pel_t       f2 [12];
  pel_t       f3 [13];
  pel_t       dc;
  pel_t       end_top, end_left;

  always_comb begin
    for (int i = 0; i < 4; i++) e[i] = 12'(left[3 - i]);
    e[4] = 12'(topleft);
    for (int i = 0; i < 4; i++) e[5 + i] = 12'(top[i]);
    for (int i = 4; i < 8; i++) e[5 + i] = topright_ok ? 12'(top[i]) : 12'(top[3]);
    for (int i = 0; i < 12; i++) f2[i] = pel_t'((e[i] + e[i+1] + 12'd1) >> 1);
    f3[0]  = '0;
    f3[12] = '0;
    for (int i = 1; i < 12; i++) f3[i] = pel_t'((e[i-1] + 12'd2*e[i] + e[i+1] + 12'd2) >> 2);
    end_top  = pel_t'((e[11] + 12'd3*e[12] + 12'd2) >> 2);   // (G + 3H + 2) >> 2
    end_left = pel_t'((e[1] + 12'd3*e[0] + 12'd2) >> 2);     // (K + 3L + 2) >> 2
    if (top_ok && left_ok) dc = pel_t'((e[5] + e[6] + e[7] + e[8] + e[0] + e[1] + e[2] + e[3] + 12'd4) >> 3);
    else if (top_ok)       dc = pel_t'((e[5] + e[6] + e[7] + e[8] + 12'd2) >> 2);
    else if (left_ok)      dc = pel_t'((e[0] + e[1] + e[2] + e[3] + 12'd2) >> 2);
    else                   dc = 8'd128;
  end

  always_comb begin
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        int z;
        z = 0;
        case (mode)
          4'd0: pred[y][x] = pel_t'(e[5 + x]);                           // vertical
          4'd1: pred[y][x] = pel_t'(e[3 - y]);                           // horizontal
          4'd2: pred[y][x] = dc;                                         // DC
          4'd3: pred[y][x] = (x == 3 && y == 3) ? end_top : f3[x + y + 6]; // diagonal down-left
          4'd4: pred[y][x] = f3[4 + x - y];                              // diagonal down-right
          4'd5: begin                                                    // vertical-right
            z = 2*x - y;
            if (z >= 0 && z % 2 == 0) pred[y][x] = f2[4 + x - (y >> 1)];
            else if (z > 0)           pred[y][x] = f3[4 + x - (y >> 1)];
            else if (z == -1)         pred[y][x] = f3[4];
            else                      pred[y][x] = f3[5 - y];
          end
          4'd6: begin                                                    // horizontal-down
            z = 2*y - x;
            if (z >= 0 && z % 2 == 0) pred[y][x] = f2[3 - y + (x >> 1)];
            else if (z > 0)           pred[y][x] = f3[4 - y + (x >> 1)];
            else if (z == -1)         pred[y][x] = f3[4];
            else                      pred[y][x] = f3[3 + x];
          end
          4'd7: pred[y][x] = (y % 2 == 0) ? f2[5 + x + (y >> 1)]         // vertical-left
                                          : f3[6 + x + (y >> 1)];
          4'd8: begin                                                    // horizontal-up
            z = x + 2*y;
            if (z > 5)                pred[y][x] = pel_t'(e[0]);
            else if (z == 5)          pred[y][x] = end_left;
            else if (z % 2 == 0)      pred[y][x] = f2[2 - y - (x >> 1)];
            else                      pred[y][x] = f3[2 - y - (x >> 1)];
          end
          default: pred[y][x] = '0;
        endcase
      end
    end
    mode_ok = 1'b0;
    case (mode)
      4'd0, 4'd3, 4'd7: mode_ok = top_ok;
      4'd1, 4'd8:       mode_ok = left_ok;
      4'd2:             mode_ok = 1'b1;
      4'd4, 4'd5, 4'd6: mode_ok = top_ok && left_ok && topleft_ok;
      default:          mode_ok = 1'b0;
    endcase
  end

endmodule
