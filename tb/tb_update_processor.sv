// tb_update_processor: runs random refit programs on the update processor.
// Each round loads six random vertices, builds two triangle bounds, merges
// them, and stores node updates along a random axis for the two triangles
// and for the merged bound paired with the first triangle. The stored words
// are compared with min/max worked out here on real values.
module tb_update_processor;
  import drpu_pkg::*;
  import tb_fp::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     start, busy, done;
  addr_t    prog_addr;
  mem_req_t req;
  logic     ready;
  mem_rsp_t rsp;
  int checks = 0, failures = 0;

  update_processor dut (.clk, .rst_n, .start, .prog_addr, .busy, .done,
                        .mem_req(req), .mem_ready(ready), .mem_rsp(rsp));
  tb_dram_model #(.DEPTH(1024), .LATENCY(3), .STALLS(1'b1)) dram (.clk, .rst_n, .req, .ready, .rsp);

  function automatic word_t instr(input int op, input int dst, input int a, input int b,
                                  input int c, input int axis, input int addr);
    word_t w = '0;
    w[3:0] = 4'(op); w[9:4] = 6'(dst); w[15:10] = 6'(a); w[21:16] = 6'(b);
    w[27:22] = 6'(c); w[29:28] = 2'(axis); w[63:32] = 32'(addr);
    return w;
  endfunction

  function automatic fp32_t rnd_fp();
    real r = real'($urandom_range(0, 20000)) / 100.0 - 100.0;
    return to_fp(r);
  endfunction

  function automatic fp32_t rmin(input fp32_t a, input fp32_t b);
    return (to_real(a) < to_real(b)) ? a : b;
  endfunction
  function automatic fp32_t rmax(input fp32_t a, input fp32_t b);
    return (to_real(a) > to_real(b)) ? a : b;
  endfunction

  fp32_t vx [6][3];

  initial begin
    int pc, axis, vr0;
    fp32_t lo0, hi0, lo1, hi1, lom, him;
    word_t exp0, exp1, expm;
    start = 0; prog_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      pc = 0;
      axis = $urandom_range(0, 2);
      vr0 = $urandom_range(0, 58);
      for (int v = 0; v < 6; v++) begin
        for (int k = 0; k < 3; k++) vx[v][k] = rnd_fp();
        dram.mem[512 + v] = {32'd0, vx[v][2], vx[v][1], vx[v][0]};
        dram.mem[pc] = instr(1, vr0 + v, 0, 0, 0, 0, 512 + v); pc++;
      end
      dram.mem[pc] = instr(2, 10, vr0, vr0 + 1, vr0 + 2, 0, 0); pc++;
      dram.mem[pc] = instr(2, 63, vr0 + 3, vr0 + 4, vr0 + 5, 0, 0); pc++;
      dram.mem[pc] = instr(3, 20, 10, 63, 0, 0, 0); pc++;
      dram.mem[pc] = instr(4, 0, 10, 63, 0, axis, 600); pc++;
      dram.mem[pc] = instr(4, 0, 20, 10, 0, axis, 602); pc++;
      dram.mem[pc] = instr(0, 0, 0, 0, 0, 0, 0); pc++;
      lo0 = rmin(rmin(vx[0][axis], vx[1][axis]), vx[2][axis]);
      hi0 = rmax(rmax(vx[0][axis], vx[1][axis]), vx[2][axis]);
      lo1 = rmin(rmin(vx[3][axis], vx[4][axis]), vx[5][axis]);
      hi1 = rmax(rmax(vx[3][axis], vx[4][axis]), vx[5][axis]);
      lom = rmin(lo0, lo1);
      him = rmax(hi0, hi1);
      exp0 = {hi1, lo1, hi0, lo0};
      expm = {hi0, lo0, him, lom};
      @(negedge clk); start = 1; prog_addr = 0;
      @(negedge clk); start = 0;
      wait (done);
      @(negedge clk);
      checks++;
      if (dram.mem[600] !== exp0) begin
        failures++;
        $display("FAIL round %0d node600 %h exp %h", round, dram.mem[600], exp0);
      end
      checks++;
      if (dram.mem[602] !== expm) begin
        failures++;
        $display("FAIL round %0d node602 %h exp %h", round, dram.mem[602], expm);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    checks++;
    if (dram.writes != 40) begin failures++; $display("FAIL writes %0d", dram.writes); end
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
