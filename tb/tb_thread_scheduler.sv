// tb_thread_scheduler: two model rendering units with four packet slots
// each take packets at random and finish them after random delays. Checks
// that every 2x2 quad of a 16x8 frame is issued exactly once, that no slot is
// handed out while in use, that a unit never holds more than its slots, that
// both units receive work, and that frame_done follows the last packet.
// Two frames are run back to back.
module tb_thread_scheduler;
  localparam int NRU = 2, NP = 4, W = 16, H = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start, busy, frame_done, out_valid;
  logic [0:0]     out_ru;
  logic [1:0]     out_pkt;
  logic [15:0]    out_x, out_y;
  logic [NRU-1:0] out_ready, done_valid;
  logic [1:0]     done_pkt [NRU];
  int checks = 0, failures = 0;

  thread_scheduler #(.NUM_RU(NRU), .NPKT(NP), .WIDTH(W), .HEIGHT(H)) dut (.*);

  int  seen [W/2][H/2];
  bit  in_use [NRU][NP];
  int  timer [NRU][NP];
  int  per_ru [NRU];
  int  frames_done = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      // retire: finish one packet per unit per cycle when its timer ran out
      for (int r = 0; r < NRU; r++) begin
        done_valid[r] = 0;
        for (int s = 0; s < NP; s++)
          if (!done_valid[r] && in_use[r][s] && timer[r][s] == 0) begin
            done_valid[r] = 1; done_pkt[r] = 2'(s);
          end
        out_ready[r] = ($urandom_range(0, 2) != 0);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < NRU; r++) begin
        for (int s = 0; s < NP; s++) if (in_use[r][s] && timer[r][s] > 0) timer[r][s]--;
        if (done_valid[r]) in_use[r][done_pkt[r]] = 0;
      end
      if (out_valid && out_ready[out_ru]) begin
        checks++;
        if (in_use[out_ru][out_pkt] || out_x >= W || out_y >= H || out_x[0] || out_y[0]) begin
          failures++;
          $display("FAIL bad issue ru %0d slot %0d (%0d,%0d)", out_ru, out_pkt, out_x, out_y);
        end else begin
          seen[out_x/2][out_y/2]++;
          in_use[out_ru][out_pkt] = 1;
          timer[out_ru][out_pkt] = $urandom_range(1, 20);
          per_ru[out_ru]++;
        end
      end
      if (frame_done) frames_done++;
    end
  end

  initial begin
    int total;
    start = 0; out_ready = '0; done_valid = '0; done_pkt = '{default: 0};
    for (int r = 0; r < NRU; r++) begin
      per_ru[r] = 0;
      for (int s = 0; s < NP; s++) begin in_use[r][s] = 0; timer[r][s] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int x = 0; x < W/2; x++) for (int y = 0; y < H/2; y++) seen[x][y] = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after start"); end
      wait (frames_done == f + 1);
      @(negedge clk);
      for (int x = 0; x < W/2; x++)
        for (int y = 0; y < H/2; y++) begin
          checks++;
          if (seen[x][y] != 1) begin failures++; $display("FAIL quad (%0d,%0d) issued %0d times", x, y, seen[x][y]); end
        end
      total = 0;
      for (int r = 0; r < NRU; r++) for (int s = 0; s < NP; s++) total += in_use[r][s];
      checks++;
      if (total != 0 || busy) begin failures++; $display("FAIL frame_done with %0d packets in flight", total); end
    end
    checks++;
    if (per_ru[0] == 0 || per_ru[1] == 0) begin failures++; $display("FAIL unit starved %0d %0d", per_ru[0], per_ru[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
