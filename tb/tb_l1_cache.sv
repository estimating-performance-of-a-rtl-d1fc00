// tb_l1_cache: random reads and writes over a few sets with many tags, so
// lines are replaced often. Every read must return the latest value written
// (kept in a shadow copy here), the backing memory must match after writes,
// read hits must answer on the next cycle, and the hit/miss counters must
// agree with a reference model of a 4-way round-robin set-associative cache.
module tb_l1_cache;
  import drpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t creq, mreq;
  logic     cready, mready;
  mem_rsp_t crsp, mrsp;
  logic [31:0] hits, misses;
  int checks = 0, failures = 0;

  l1_cache dut (.clk, .rst_n, .cpu_req(creq), .cpu_ready(cready), .cpu_rsp(crsp),
                .mem_req(mreq), .mem_ready(mready), .mem_rsp(mrsp), .hits, .misses);
  tb_dram_model #(.DEPTH(65536), .LATENCY(5), .STALLS(1'b1)) dram (.clk, .rst_n, .req(mreq), .ready(mready), .rsp(mrsp));

  word_t shadow [int];
  // reference model: 256 sets x 4 ways
  int ref_tag [256][4];
  int ref_vic [256];
  int ref_hits = 0, ref_misses = 0;

  function automatic bit ref_lookup(input int addr);
    int s = addr % 256, t = addr / 256;
    for (int w = 0; w < 4; w++) if (ref_tag[s][w] == t) return 1;
    return 0;
  endfunction

  initial begin
    int addr, lat;
    word_t wd;
    bit exp_hit;
    creq = '0;
    for (int s = 0; s < 256; s++) begin
      ref_vic[s] = 0;
      for (int w = 0; w < 4; w++) ref_tag[s][w] = -1;
    end
    for (int a = 0; a < 65536; a++) begin
      dram.mem[a] = {4{32'(a * 7919)}};
      shadow[a] = dram.mem[a];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // 4 sets, 7 tags each: more tags than ways
      addr = ($urandom_range(0, 6) * 256) + $urandom_range(0, 3) * 17;
      @(negedge clk);
      while (!cready) @(negedge clk);
      creq.valid = 1;
      creq.addr  = 32'(addr);
      if ($urandom_range(0, 3) == 0) begin
        wd = {$urandom, $urandom, $urandom, $urandom};
        creq.we = 1; creq.wdata = wd;
        shadow[addr] = wd;
        @(negedge clk);
        creq = '0;
        while (!cready) @(negedge clk);
        checks++;
        if (dram.mem[addr] !== wd) begin failures++; $display("FAIL write-through %0d", addr); end
      end else begin
        creq.we = 0;
        exp_hit = ref_lookup(addr);
        if (exp_hit) ref_hits++;
        else begin
          ref_misses++;
          ref_tag[addr % 256][ref_vic[addr % 256]] = addr / 256;
          ref_vic[addr % 256] = (ref_vic[addr % 256] + 1) % 4;
        end
        lat = 0;
        @(negedge clk);
        creq = '0;
        while (!crsp.valid) begin
          @(negedge clk);
          lat++;
        end
        checks++;
        if (crsp.rdata !== shadow[addr]) begin
          failures++;
          $display("FAIL read %0d got %h exp %h", addr, crsp.rdata, shadow[addr]);
        end
        if (exp_hit) begin
          checks++;
          if (lat != 0) begin failures++; $display("FAIL hit latency %0d", lat); end
        end
      end
    end
    @(negedge clk);
    checks++;
    if (hits != 32'(ref_hits) || misses != 32'(ref_misses)) begin
      failures++;
      $display("FAIL counters hits %0d/%0d misses %0d/%0d", hits, ref_hits, misses, ref_misses);
    end
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
