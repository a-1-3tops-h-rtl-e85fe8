// Half-pel interpolator of the FME engine.
//
// Builds the half-pel neighbourhood of one 4x4 block: an 11 x 11 grid covering
// integer positions -1..4 in both directions in half-pel steps, which holds
// every sample the 3x3 half-pel candidates and the 3x3 quarter-pel
// candidates around them need. Ten integer reference pels of one row
// (x = -3..6) enter per cycle, rows y = -3..6 in order. Five horizontal
// six-tap FIRs (1,-5,20,20,-5,1) make the horizontal half pels of the row; a
// six-row window then feeds eleven vertical FIRs: six over integer columns
// (vertical half pels) and five over the unrounded horizontal results
// (centre half pels, rounded once at the end as H.264 requires).
//
// grid[v][u]: u, v = 0..10 stand for positions -1, -0.5, 0, ..., 4; even
// indices are integer positions. Integer rows are written as their input row
// arrives, half rows as soon as their sixth tap row has arrived; 'done'
// pulses in the cycle after the tenth row, when the grid is complete.
// The 10-pel input row and the 5 + 11 FIR counts are the encoder's;
// the row order and grid layout are this design's.
module fme_interp
  import h264enc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pel_t in_row [10],
  output pel_t grid   [11][11],
  output logic done
);

  typedef logic signed [15:0] s16_t;

  function automatic int fir6(input int a, b, c, d, e, f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  logic [3:0] r;               // input row count
  s16_t       win [5][11];     // last five rows of column values
  s16_t       cv  [11];        // column values of the incoming row
  s16_t       nw  [6][11];     // window including the incoming row

  // 5 horizontal FIRs; integer columns pass through
  always_comb begin
    for (int i = 0; i < 6; i++) cv[2*i] = s16_t'(in_row[i + 2]);
    for (int i = 0; i < 5; i++)
      cv[2*i + 1] = s16_t'(fir6(int'(in_row[i]), int'(in_row[i+1]), int'(in_row[i+2]),
                                int'(in_row[i+3]), int'(in_row[i+4]), int'(in_row[i+5])));
    for (int k = 0; k < 5; k++) nw[k] = win[k];
    nw[5] = cv;
  end

  // output rows
  pel_t int_row [11];
  pel_t half_row [11];
  always_comb begin
    for (int u = 0; u < 11; u++) begin
      int s;
      int_row[u] = (u % 2 == 0) ? pel_t'(cv[u]) : clip_pel((int'(cv[u]) + 16) >>> 5);
      // 11 vertical FIRs
      s = fir6(int'(nw[0][u]), int'(nw[1][u]), int'(nw[2][u]), int'(nw[3][u]), int'(nw[4][u]), int'(nw[5][u]));
      half_row[u] = (u % 2 == 0) ? clip_pel((s + 16) >>> 5) : clip_pel((s + 512) >>> 10);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      done <= 1'b0;
      for (int k = 0; k < 5; k++) for (int u = 0; u < 11; u++) win[k][u] <= '0;
      for (int v = 0; v < 11; v++) for (int u = 0; u < 11; u++) grid[v][u] <= '0;
    end else begin
      done <= in_valid && (r == 4'd9);
      if (in_valid) begin
        for (int k = 0; k < 4; k++) win[k] <= win[k+1];
        win[4] <= cv;
        r <= (r == 4'd9) ? '0 : r + 1'b1;
        if (r >= 4'd2 && r <= 4'd7) grid[2*r - 4] <= int_row;
        if (r >= 4'd5)              grid[2*r - 9] <= half_row;
      end
    end
  end

endmodule
