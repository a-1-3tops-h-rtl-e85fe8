// 4x4-block processing unit (PU) of the FME engine.
//
// Computes the SATD of one 4x4 block: one row of four current pels and one row
// of four interpolated reference pels enter per cycle, four PEs take their
// differences, a first 1-D Hadamard transform acts on the row and its result
// is written into one bank of transpose registers. When a bank holds four
// rows, a second 1-D Hadamard transform reads it one column per cycle while
// the next block's rows fill the other bank, and the absolute values of the
// coefficients are summed. The two transforms work in parallel, so the PU
// accepts a new 4x4 block every four cycles.
//
// Rows of a block must arrive in four consecutive in_valid cycles, top row
// first. satd_valid pulses five cycles after the fourth row with
// satd = (sum of |coefficients| + 1) >> 1.
// The PE x4 / two transforms / transpose register structure is the encoder's;
// the halving of the sum and the ping-pong banks are this design's choices.
module fme_pu
  import h264enc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pel_t        cur_row  [4],
  input  pel_t        pred_row [4],
  output logic        satd_valid,
  output logic [12:0] satd
);

  typedef logic signed [12:0] coef_t;   // up to 16 * 255 in magnitude

  function automatic void hadamard4(input coef_t x [4], output coef_t y [4]);
    coef_t m0, m1, m2, m3;
    m0 = x[0] + x[3]; m3 = x[0] - x[3];
    m1 = x[1] + x[2]; m2 = x[1] - x[2];
    y[0] = m0 + m1; y[2] = m0 - m1;
    y[1] = m3 + m2; y[3] = m3 - m2;
  endfunction

  // first 1-D transform (rows)
  coef_t d [4], hr [4];
  always_comb begin
    for (int i = 0; i < 4; i++) d[i] = coef_t'(int'(cur_row[i]) - int'(pred_row[i]));
    hadamard4(d, hr);
  end

  coef_t      tr [2][4][4];    // transpose registers [bank][row][col]
  logic [1:0] wrow;
  logic       wbank;
  logic       col_act;         // second transform busy
  logic       rbank;
  logic [1:0] rcol;
  logic [16:0] acc;

  // second 1-D transform (columns)
  coef_t col [4], hc [4];
  logic [14:0] colsum;
  always_comb begin
    for (int i = 0; i < 4; i++) col[i] = tr[rbank][i][rcol];
    hadamard4(col, hc);
    colsum = '0;
    for (int i = 0; i < 4; i++) colsum += 15'(hc[i] < 0 ? 13'(-hc[i]) : 13'(hc[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrow <= '0; wbank <= 1'b0; col_act <= 1'b0; rbank <= 1'b0; rcol <= '0;
      acc <= '0; satd_valid <= 1'b0; satd <= '0;
      for (int b = 0; b < 2; b++) for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) tr[b][i][j] <= '0;
    end else begin
      satd_valid <= 1'b0;
      if (in_valid) begin
        tr[wbank][wrow] <= hr;
        wrow <= wrow + 1'b1;
        if (wrow == 2'd3) begin
          wbank   <= !wbank;
          rbank   <= wbank;
          col_act <= 1'b1;
          rcol    <= '0;
          acc     <= '0;
        end
      end
      if (col_act) begin
        if (rcol == 2'd3) begin
          satd       <= 13'((acc + 17'(colsum) + 17'd1) >> 1);
          satd_valid <= 1'b1;
          if (!(in_valid && wrow == 2'd3)) col_act <= 1'b0;
        end else begin
          acc  <= acc + 17'(colsum);
          rcol <= rcol + 1'b1;
        end
      end
    end
  end

endmodule
