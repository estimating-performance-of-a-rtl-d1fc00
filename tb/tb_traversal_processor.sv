// tb_traversal_processor: traces packets of four rays through a random
// B-KD tree scene with the traversal processor and a geometry unit, and
// compares each ray's closest hit with a brute-force search over all
// triangles. Rays whose answer is within rounding of a tie or an edge are
// skipped. Also requires that stack pushes, pops, early ray terminations and
// leaf visits all happened.
// A second phase traces through a world of two instances of the same object:
// a root node whose children are transformation nodes, one shifting the
// object (object = world + (30,0,0)) and one scaling and shifting it
// (object = 2 world + (-40,0,0)). The reference transforms each ray into both
// object spaces and keeps the closer hit; this exercises entering an object
// and restoring the world rays when its subtree is done.
module tb_traversal_processor;
  import drpu_pkg::*;
  import tb_fp::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        trace_valid, trace_ready, res_valid, res_ready;
  trace_req_t  trace_req;
  trace_rsp_t  res;
  mem_req_t    nreq, vreq;
  logic        nready, vready;
  mem_rsp_t    nrsp, vrsp;
  logic        gu_req_valid, gu_req_ready, gu_rsp_valid;
  gu_req_t     gu_req;
  gu_rsp_t     gu_rsp;
  logic        stack_overflow;
  logic [31:0] stat_steps, stat_leaves, stat_pushes, stat_pops, stat_terminations;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  traversal_processor dut (
    .clk, .rst_n, .trace_valid, .trace_ready, .trace_req, .res_valid, .res_ready, .res,
    .node_req(nreq), .node_ready(nready), .node_rsp(nrsp),
    .gu_req_valid, .gu_req_ready, .gu_req, .gu_rsp_valid, .gu_rsp,
    .stack_overflow, .stat_steps, .stat_leaves, .stat_pushes, .stat_pops, .stat_terminations);

  geometry_unit gu (.clk, .rst_n, .req_valid(gu_req_valid), .req_ready(gu_req_ready), .req(gu_req),
                    .rsp_valid(gu_rsp_valid), .rsp(gu_rsp),
                    .mem_req(vreq), .mem_ready(vready), .mem_rsp(vrsp));

  tb_dram_model #(.DEPTH(1024), .LATENCY(2), .STALLS(1'b1)) nmem (.clk, .rst_n, .req(nreq), .ready(nready), .rsp(nrsp));
  tb_dram_model #(.DEPTH(1024), .LATENCY(2)) vmem (.clk, .rst_n, .req(vreq), .ready(vready), .rsp(vrsp));

  localparam int X = 512;   // world tree and matrices for the second phase

  task automatic trace(input int n, input int root, input real o[4][3], input real d[4][3],
                       input real tfar[4], input bit world);
    bit  hit, amb;
    int  prim;
    real tb_t;
    @(negedge clk);
    trace_req = '0;
    trace_req.pkt  = 5'(n);
    trace_req.root = 32'(root);
    trace_req.mask = 4'($urandom_range(1, 15));
    for (int i = 0; i < 4; i++) begin
      trace_req.rays[i].org = '{x: to_fp(o[i][0]), y: to_fp(o[i][1]), z: to_fp(o[i][2])};
      trace_req.rays[i].dir = '{x: to_fp(d[i][0]), y: to_fp(d[i][1]), z: to_fp(d[i][2])};
      trace_req.tfar[i] = (tfar[i] > 1e29) ? FP_INF : to_fp(tfar[i]);
    end
    trace_valid = 1;
    @(negedge clk);
    trace_valid = 0;
    wait (res_valid);
    @(negedge clk);
    checks++;
    if (res.pkt !== 5'(n)) begin failures++; $display("FAIL pkt id"); end
    for (int i = 0; i < 4; i++) begin
      if (!trace_req.mask[i]) begin
        checks++;
        if (res.hits[i].hit) begin failures++; $display("FAIL masked ray %0d hit", i); end
        continue;
      end
      if (world) tb_scene::ref_world(o[i], d[i], tfar[i], hit, prim, amb);
      else       tb_scene::ref_trace(o[i], d[i], tfar[i], hit, prim, tb_t, amb);
      if (amb) continue;
      checks++;
      if (res.hits[i].hit !== hit || (hit && res.prim[i] !== 28'(prim))) begin
        failures++;
        $display("FAIL %s pkt %0d ray %0d hit %b prim %0d exp hit %b prim %0d", world ? "world" : "object",
                 n, i, res.hits[i].hit, res.prim[i], hit, prim);
      end
      if (hit) begin n_hit++; if (world) n_whit++; end else n_miss++;
    end
  endtask

  int n_whit = 0;

  initial begin
    real o[4][3], d[4][3], tfar[4], tgt[3], base[3];
    int  tri_i;
    trace_valid = 0; res_ready = 1; trace_req = '0;
    tb_scene::build(4, 1'b1);
    for (int a = 0; a < tb_scene::words(); a++) begin
      nmem.mem[a] = tb_scene::word(a);
      vmem.mem[a] = tb_scene::word(a);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      tri_i = $urandom_range(0, tb_scene::NTRI - 1);
      for (int c = 0; c < 3; c++) begin
        tgt[c]  = (tb_scene::V[tri_i][0][c] + tb_scene::V[tri_i][1][c] + tb_scene::V[tri_i][2][c]) / 3.0;
        base[c] = tb_scene::rnd(-30, 30);
      end
      for (int i = 0; i < 4; i++) begin
        for (int c = 0; c < 3; c++) begin
          o[i][c] = tb_scene::q(base[c] + tb_scene::rnd(-0.5, 0.5));
          d[i][c] = tb_scene::q((tgt[c] + tb_scene::rnd(-2, 2) - o[i][c]) / 20.0);
        end
        tfar[i] = ($urandom_range(0, 5) == 0) ? tb_scene::q(tb_scene::rnd(0.2, 1.5)) : 1.0e30;
      end
      trace(n, 2, o, d, tfar, 1'b0);
    end
    // phase 2: two instances
    for (int a = X; a < X + 14; a++) begin
      nmem.mem[a] = tb_scene::world_word(X, a);
      vmem.mem[a] = tb_scene::world_word(X, a);
    end
    for (int n = 0; n < 80; n++) begin
      tri_i = $urandom_range(0, tb_scene::NTRI - 1);
      for (int c = 0; c < 3; c++) begin
        tgt[c]  = (tb_scene::V[tri_i][0][c] + tb_scene::V[tri_i][1][c] + tb_scene::V[tri_i][2][c]) / 3.0;
        base[c] = tb_scene::rnd(-30, 30);
      end
      // target the triangle in one of the two instances, in world space
      if (n % 2 == 0) tgt[0] = tgt[0] - 30.0;
      else for (int c = 0; c < 3; c++) tgt[c] = (tgt[c] + ((c == 0) ? 40.0 : 0.0)) / 2.0;
      for (int i = 0; i < 4; i++) begin
        for (int c = 0; c < 3; c++) begin
          o[i][c] = tb_scene::q(base[c] + tb_scene::rnd(-0.5, 0.5));
          d[i][c] = tb_scene::q((tgt[c] + tb_scene::rnd(-0.7, 0.7) - o[i][c]) / 20.0);
        end
        tfar[i] = ($urandom_range(0, 5) == 0) ? tb_scene::q(tb_scene::rnd(0.2, 1.5)) : 1.0e30;
      end
      trace(60 + n, X, o, d, tfar, 1'b1);
    end
    checks++;
    if (n_hit < 20 || n_miss < 10 || n_whit < 20 || stat_pushes == 0 || stat_pops == 0
        || stat_terminations == 0 || stat_leaves == 0 || stack_overflow) begin
      failures++;
      $display("FAIL coverage world hits %0d", n_whit);
      $display("FAIL coverage hits %0d misses %0d push %0d pop %0d term %0d leaves %0d ovf %b",
               n_hit, n_miss, stat_pushes, stat_pops, stat_terminations, stat_leaves, stack_overflow);
    end
    $display("steps %0d leaves %0d pushes %0d pops %0d terminations %0d hits %0d misses %0d",
             stat_steps, stat_leaves, stat_pushes, stat_pops, stat_terminations, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
