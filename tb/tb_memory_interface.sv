// tb_memory_interface: four clients issue back-to-back random reads and
// writes to their own address ranges through the memory interface. Each
// read must return that client's latest write (or the initial contents),
// answers must go only to the client that asked, and under full contention
// the round-robin arbiter must serve all clients equally (within one grant).
module tb_memory_interface;
  import drpu_pkg::*;

  localparam int N = 4;
  localparam int OPS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t    req   [N];
  logic        ready [N];
  mem_rsp_t    rsp   [N];
  mem_req_t    dreq;
  logic        dready;
  mem_rsp_t    drsp;
  logic [31:0] grants [N];
  int checks = 0, failures = 0;
  int done_cnt = 0;
  bit all_busy_phase = 1'b1;
  int grants_at_first_done [N];

  memory_interface #(.NPORTS(N)) dut (.clk, .rst_n, .req, .ready, .rsp,
    .dram_req(dreq), .dram_ready(dready), .dram_rsp(drsp), .grants);
  tb_dram_model #(.DEPTH(4096), .LATENCY(3), .STALLS(1'b1)) dram (.clk, .rst_n, .req(dreq), .ready(dready), .rsp(drsp));

  // an answer must only reach a client with a read outstanding
  bit waiting [N];
  always @(negedge clk) begin
    for (int p = 0; p < N; p++)
      if (rst_n && rsp[p].valid && !waiting[p]) begin
        failures++;
        $display("FAIL stray answer to client %0d", p);
      end
  end

  for (genvar g = 0; g < N; g++) begin : g_client
    initial begin
      word_t shadow [64];
      int a;
      word_t wd;
      req[g] = '0;
      waiting[g] = 0;
      for (int i = 0; i < 64; i++) shadow[i] = {4{32'(g * 1000 + i)}};
      wait (rst_n);
      for (int n = 0; n < OPS; n++) begin
        @(negedge clk);
        a = $urandom_range(0, 63);
        req[g].valid = 1;
        req[g].addr  = 32'(g * 64 + a);
        req[g].we    = ($urandom_range(0, 2) == 0);
        wd = {$urandom, $urandom, $urandom, $urandom};
        req[g].wdata = wd;
        if (!req[g].we) waiting[g] = 1;
        @(posedge clk);
        while (!ready[g]) @(posedge clk);
        @(negedge clk);
        if (req[g].we) begin
          shadow[a] = wd;
          req[g] = '0;
        end else begin
          req[g] = '0;
          while (!rsp[g].valid) @(negedge clk);
          checks++;
          if (rsp[g].rdata !== shadow[a]) begin
            failures++;
            $display("FAIL client %0d addr %0d got %h exp %h", g, a, rsp[g].rdata, shadow[a]);
          end
          @(posedge clk);
          waiting[g] = 0;
        end
      end
      if (done_cnt == 0)
        for (int p = 0; p < N; p++) grants_at_first_done[p] = int'(grants[p]);
      done_cnt++;
    end
  end

  initial begin
    for (int a = 0; a < N * 64; a++) dram.mem[a] = {4{32'((a / 64) * 1000 + a % 64)}};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cnt == N);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (grants[p] != 32'(OPS)) begin failures++; $display("FAIL grants[%0d]=%0d", p, grants[p]); end
      checks++;
      if (grants_at_first_done[p] < OPS - 1) begin
        failures++;
        $display("FAIL unfair: client %0d had %0d grants when the first client finished", p, grants_at_first_done[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
