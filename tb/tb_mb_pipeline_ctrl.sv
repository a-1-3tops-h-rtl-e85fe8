// Self-checking test of mb_pipeline_ctrl: frames of several sizes; four stage
// models answer each start after a random latency. Checks that every MB goes
// through the four stages in order, in raster order, one stage per slot;
// that a slot lasts the slowest stage's latency plus 3 cycles; that stages
// that finish early are held (stalls are counted and must occur); and that
// frame_done comes once, after the last MB left the fourth stage.
module tb_mb_pipeline_ctrl;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, frame_start = 0;
  logic [7:0] mb_cols, mb_rows;
  logic [3:0] stage_done, stage_start, stage_valid;
  logic [7:0] stage_mbx [4], stage_mby [4];
  logic advance, busy, frame_done;

  mb_pipeline_ctrl dut (.*);
  always #5 clk = ~clk;

  int lat [4];
  int cnt [4];
  int seen [4];          // MBs started per stage
  int stalls = 0, slots = 0, cyc = 0, last_adv = -1;
  bit started [4];

  always @(posedge clk) cyc++;

  // stage models
  for (genvar k = 0; k < 4; k++) begin : g_stage
    always @(posedge clk) begin
      stage_done[k] <= 1'b0;
      if (!rst_n) cnt[k] = 0;
      else if (stage_start[k]) begin
        // an MB enters stage k: check order
        checks++;
        if (int'(stage_mby[k]) * int'(mb_cols) + int'(stage_mbx[k]) != seen[k]) begin
          failures++; $display("FAIL stage %0d got MB (%0d,%0d), expected #%0d", k, stage_mbx[k], stage_mby[k], seen[k]);
        end
        seen[k]++;
        lat[k] = $urandom_range(1, 30);
        cnt[k] = lat[k];
        started[k] = 1;
      end else if (cnt[k] > 0) begin
        cnt[k]--;
        if (cnt[k] == 0) stage_done[k] <= 1'b1;
      end
    end
  end

  // at each advance: the slot just ended lasted the slowest stage's latency
  // (counted from the clock edge that saw stage_start) plus 4 clock edges
  always @(posedge clk) begin
    #1;
    if (advance) begin
      int mx;
      bit any;
      mx = 0; any = 0;
      for (int k = 0; k < 4; k++) if (started[k]) begin any = 1; if (lat[k] > mx) mx = lat[k]; end
      if (last_adv >= 0 && any) begin
        checks++;
        slots++;
        if (cyc - last_adv != mx + 4) begin
          failures++; $display("FAIL slot length %0d exp %0d", cyc - last_adv, mx + 4);
        end
        for (int k = 0; k < 4; k++) if (started[k] && lat[k] < mx) stalls++;
      end
      for (int k = 0; k < 4; k++) started[k] = 0;
      last_adv = cyc;
    end
  end

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stage_done = '0;
    for (int k = 0; k < 4; k++) begin cnt[k] = 0; seen[k] = 0; lat[k] = 0; started[k] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      int nmb, nfd;
      mb_cols = 8'($urandom_range(1, 6)); mb_rows = 8'($urandom_range(1, 4));
      if (f == 0) begin mb_cols = 1; mb_rows = 1; end
      nmb = int'(mb_cols) * int'(mb_rows);
      for (int k = 0; k < 4; k++) seen[k] = 0;
      last_adv = -1;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      nfd = 0;
      while (busy || nfd == 0) begin
        @(negedge clk);
        if (frame_done) nfd++;
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (seen[k] != nmb) begin failures++; $display("FAIL frame %0d stage %0d saw %0d MBs of %0d", f, k, seen[k], nmb); end
      end
      checks++;
      if (nfd != 1) begin failures++; $display("FAIL frame_done %0d times", nfd); end
    end
    $display("slots %0d stalls %0d", slots, stalls);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
