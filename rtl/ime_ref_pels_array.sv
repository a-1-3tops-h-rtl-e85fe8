// Reference pels array of the IME engine.
//
// A 16-row by 23-column register array caches search-area pels between the
// luma reference SRAM and the eight PE arrays. Columns k..k+15 form the 16x16
// candidate of search point k (k = 0..7), so one array holds eight
// horizontally consecutive candidates. To follow a snake scan the array can
// shift its data in three directions, each in one clock:
//   SH_UP    all rows move up one pel, row_in enters as the new bottom row
//            (the search window moves down by one row);
//   SH_DOWN  all rows move down one pel, row_in enters as the new top row
//            (the window moves up);
//   SH_LEFT  all columns move left eight pels, col_in (16 rows x 8 pels)
//            enters as the eight rightmost columns (the window moves right
//            by eight search points).
// SH_HOLD keeps the contents. The array is the encoder's (16 x 23 registers,
// three shift directions); the command encoding is this design's.
module ime_ref_pels_array
  import h264enc_pkg::*;
#(
  parameter int ROWS  = 16,
  parameter int COLS  = 23,
  parameter int SHIFT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ra_cmd_e    cmd,
  input  pel_t       row_in [COLS],
  input  pel_t       col_in [ROWS][SHIFT],
  output pel_t       arr    [ROWS][COLS]    // [row][col]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) arr[r][c] <= '0;
    end else begin
      unique case (cmd)
        SH_UP: begin
          for (int r = 0; r < ROWS-1; r++) arr[r] <= arr[r+1];
          arr[ROWS-1] <= row_in;
        end
        SH_DOWN: begin
          for (int r = 1; r < ROWS; r++) arr[r] <= arr[r-1];
          arr[0] <= row_in;
        end
        SH_LEFT: begin
          for (int r = 0; r < ROWS; r++) begin
            for (int c = 0; c < COLS-SHIFT; c++) arr[r][c] <= arr[r][c+SHIFT];
            for (int c = 0; c < SHIFT; c++)      arr[r][COLS-SHIFT+c] <= col_in[r][c];
          end
        end
        default: ;
      endcase
    end
  end

endmodule
