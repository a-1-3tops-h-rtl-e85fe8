// Main controller of the four-stage macroblock (MB) pipeline.
//
// The encoder splits MB processing into four stages, IME, FME, IP and EC/DB,
// that work on four consecutive MBs at once. This controller walks a frame of
// mb_cols x mb_rows MBs in raster order. In each pipeline slot it starts every
// stage that holds an MB with a one-cycle stage_start pulse, collects the
// stages' stage_done pulses, and when all occupied stages are done it
// advances: every MB moves one stage on, the next MB of the frame enters the
// first stage, and the last stage's MB leaves. A fast stage therefore waits
// (stalls) for the slowest one. During the first and last three slots the
// pipeline fills and drains, with some stages empty.
//
// Timing: 'advance' is high for one cycle at each slot change and
// stage_start two cycles later; a stage may answer with stage_done any number
// of cycles L after its start, and the next advance comes three cycles after
// the slowest stage's stage_done, so a slot lasts max(L) + 3 cycles. frame_done pulses once after the last MB has left the fourth stage.
// The four stages and their order are the encoder's; the handshake is this
// design's.
module mb_pipeline_ctrl #(
  parameter int NUM_STAGES = 4,
  parameter int CW         = 8      // width of MB column / row numbers
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic [CW-1:0] mb_cols,
  input  logic [CW-1:0] mb_rows,
  input  logic [NUM_STAGES-1:0] stage_done,
  output logic [NUM_STAGES-1:0] stage_start,
  output logic [NUM_STAGES-1:0] stage_valid,
  output logic [CW-1:0] stage_mbx [NUM_STAGES],
  output logic [CW-1:0] stage_mby [NUM_STAGES],
  output logic          advance,
  output logic          busy,
  output logic          frame_done
);

  typedef enum logic [1:0] {P_IDLE, P_ADV, P_START, P_WAIT} pstate_e;
  pstate_e state;
  logic [CW-1:0] nx, ny;           // next MB to enter
  logic          more;             // MBs left to enter
  logic [NUM_STAGES-1:0] fin;

  assign advance = (state == P_ADV);
  assign busy    = (state != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE; nx <= '0; ny <= '0; more <= 1'b0; fin <= '0;
      stage_valid <= '0; stage_start <= '0; frame_done <= 1'b0;
      for (int k = 0; k < NUM_STAGES; k++) begin stage_mbx[k] <= '0; stage_mby[k] <= '0; end
    end else begin
      stage_start <= '0;
      frame_done  <= 1'b0;
      unique case (state)
        P_IDLE: if (frame_start) begin
          state <= P_ADV; nx <= '0; ny <= '0; stage_valid <= '0;
          more  <= (mb_cols != '0) && (mb_rows != '0);
        end
        P_ADV: begin
          for (int k = NUM_STAGES-1; k > 0; k--) begin
            stage_valid[k] <= stage_valid[k-1];
            stage_mbx[k]   <= stage_mbx[k-1];
            stage_mby[k]   <= stage_mby[k-1];
          end
          stage_valid[0] <= more;
          stage_mbx[0]   <= nx;
          stage_mby[0]   <= ny;
          if (more) begin
            if (nx == mb_cols - 1'b1) begin
              nx <= '0;
              ny <= ny + 1'b1;
              if (ny == mb_rows - 1'b1) more <= 1'b0;
            end else begin
              nx <= nx + 1'b1;
            end
          end
          if (!more && stage_valid[NUM_STAGES-2:0] == '0) begin
            state      <= P_IDLE;
            frame_done <= 1'b1;
          end else begin
            state <= P_START;
          end
        end
        P_START: begin
          stage_start <= stage_valid;
          fin         <= '0;
          state       <= P_WAIT;
        end
        P_WAIT: begin
          fin <= fin | stage_done;
          if (((fin | stage_done) & stage_valid) == stage_valid) state <= P_ADV;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // a stage reports done only for an MB it holds
  assert property (@(posedge clk) disable iff (!rst_n) (stage_done & ~stage_valid) == '0);

endmodule
