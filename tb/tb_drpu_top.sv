// tb_drpu_top: end-to-end run of the DRPU core at its default configuration
// (one rendering unit, 32 packets, a 1024x768 frame, 16 KB caches).
//
// 1. A random 16-triangle scene and its B-KD tree are placed in the DRAM
//    model with all node bounds zero; the update processor runs its refit
//    program and the refitted nodes are compared with bounds worked out here.
// 2. A frame is started. A shader model in this testbench takes each packet
//    of four pixels from the thread scheduler, traces one primary ray per
//    pixel through the traversal processor, checks every result against a
//    brute-force search over all triangles, loads one word per ray (chosen by
//    the hit triangle) through request packing and the shader cache, runs a
//    branch on the hit mask through the SIMD control-flow unit, and frees the
//    packet slot. The lower half of the frame is traced through a world of two
//    instances of the scene (transformation nodes), the upper half through
//    the scene's own tree.
// Every mechanism is counted and must have happened: refit stores, stack
// pushes/pops, early ray terminations, leaf intersections, hits inside
// instanced objects, hits and misses
// in each cache, packed loads that served several threads with one request,
// divergent branches, slot reuse and frame completion.
module tb_drpu_top;
  import drpu_pkg::*;
  import tb_fp::*;

  localparam int W = 1024, H = 768, NP = 32;
  localparam int MAT_BASE = 2048;   // one word per triangle, background after
  localparam int WORLD    = 3000;   // two-instance world tree and matrices

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            up_start, up_busy, up_done, frame_start, frame_busy, frame_done;
  addr_t           up_prog_addr;
  logic            sp_pkt_valid;
  logic [0:0]      sp_pkt_ru;
  logic [4:0]      sp_pkt_slot;
  logic [15:0]     sp_pkt_x, sp_pkt_y;
  logic [0:0]      sp_pkt_ready, sp_done_valid;
  logic [4:0]      sp_done_slot [1];
  logic            trace_valid [1], trace_ready [1], res_valid [1], res_ready [1];
  trace_req_t      trace_req [1];
  trace_rsp_t      res [1];
  logic            ld_valid [1], ld_ready [1], ld_rsp_valid [1];
  addr_t           ld_addr [1][RAYS];
  logic [RAYS-1:0] ld_mask [1], ld_rsp_mask [1];
  word_t           ld_rsp_data [1];
  logic            br_load [1], br_advance [1], br_branch [1], br_ret [1], br_done [1];
  logic [15:0]     br_load_pc [1], br_target [1], br_pc [1];
  logic [RAYS-1:0] br_load_mask [1], br_cond [1], br_mask [1];
  mem_req_t        dram_req;
  logic            dram_ready;
  mem_rsp_t        dram_rsp;
  logic [31:0]     stat_steps [1], stat_leaves [1], stat_pushes [1], stat_pops [1], stat_terminations [1];
  logic [31:0]     stat_cache_hits [1][3], stat_cache_misses [1][3];
  logic [31:0]     stat_packed_loads [1], stat_divergences [1], stat_mem_grants [4];
  logic            stack_overflow [1], ctl_overflow [1];

  drpu_top dut (.*);

  tb_dram_model #(.DEPTH(4096), .LATENCY(6)) dram (.clk, .rst_n, .req(dram_req), .ready(dram_ready), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_world_hit = 0, n_shared_load = 0, n_packets = 0;

  // packets handed out by the scheduler, waiting for the shader model
  typedef struct { logic [4:0] slot; int x; int y; } pkt_t;
  pkt_t queue[$];
  always @(posedge clk)
    if (rst_n && sp_pkt_valid && sp_pkt_ready[0])
      queue.push_back('{slot: sp_pkt_slot, x: int'(sp_pkt_x), y: int'(sp_pkt_y)});

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic shade(input pkt_t p);
    real  o[3], d[4][3], tb_t;
    bit   hit, amb;
    int   prim;
    logic [3:0] hitmask;
    addr_t a [RAYS];
    int   distinct;
    bit   dup, world;
    trace_req_t tr;
    tr = '0;
    tr.pkt  = p.slot;
    world   = (p.y >= H / 2);
    tr.root = world ? 32'(WORLD) : 32'd2;
    tr.mask = 4'hF;
    o = '{0.0, 0.0, -40.0};
    for (int i = 0; i < 4; i++) begin
      int px, py;
      px = p.x + (i % 2);
      py = p.y + (i / 2);
      d[i][0] = tb_scene::q(((real'(px) + 0.5) / W * 2.0 - 1.0) * 1.2);
      d[i][1] = tb_scene::q(((real'(py) + 0.5) / H * 2.0 - 1.0) * 0.9);
      d[i][2] = 1.0;
      tr.rays[i].org = '{x: to_fp(o[0]), y: to_fp(o[1]), z: to_fp(o[2])};
      tr.rays[i].dir = '{x: to_fp(d[i][0]), y: to_fp(d[i][1]), z: to_fp(d[i][2])};
      tr.tfar[i] = FP_INF;
    end
    // trace
    @(negedge clk);
    trace_req[0] = tr;
    trace_valid[0] = 1;
    @(negedge clk);
    trace_valid[0] = 0;
    while (!res_valid[0]) @(negedge clk);
    checks++;
    if (res[0].pkt !== p.slot) fail("packet id");
    hitmask = '0;
    for (int i = 0; i < 4; i++) begin
      if (world) tb_scene::ref_world(o, d[i], 1.0e30, hit, prim, amb);
      else       tb_scene::ref_trace(o, d[i], 1.0e30, hit, prim, tb_t, amb);
      hitmask[i] = res[0].hits[i].hit;
      a[i] = res[0].hits[i].hit ? addr_t'(MAT_BASE + int'(res[0].prim[i])) : addr_t'(MAT_BASE + 64);
      if (amb) continue;
      checks++;
      if (res[0].hits[i].hit !== hit || (hit && int'(res[0].prim[i]) != prim))
        fail($sformatf("pixel (%0d,%0d) hit %b prim %0d, expected hit %b prim %0d",
                       p.x + i % 2, p.y + i / 2, res[0].hits[i].hit, res[0].prim[i], hit, prim));
      if (hit) n_hit++; else n_miss++;
      if (hit && world) n_world_hit++;
    end
    // load one word per ray through request packing
    distinct = 0;
    for (int i = 0; i < 4; i++) begin
      dup = 0;
      for (int j = 0; j < i; j++) if (a[j] == a[i]) dup = 1;
      if (!dup) distinct++;
    end
    if (distinct < 4) n_shared_load++;
    while (!ld_ready[0]) @(negedge clk);
    ld_valid[0] = 1;
    ld_mask[0]  = 4'hF;
    for (int i = 0; i < 4; i++) ld_addr[0][i] = a[i];
    @(negedge clk);
    ld_valid[0] = 0;
    begin
      logic [3:0] served;
      int got;
      served = '0;
      got = 0;
      while (served != 4'hF) begin
        if (ld_rsp_valid[0]) begin
          got++;
          for (int i = 0; i < 4; i++) if (ld_rsp_mask[0][i]) begin
            checks++;
            if (ld_rsp_data[0] !== dram.mem[a[i]]) fail("shader load data");
            served[i] = 1;
          end
        end
        @(negedge clk);
      end
      checks++;
      if (got != distinct) fail($sformatf("packed loads %0d for %0d distinct addresses", got, distinct));
    end
    // control flow: branch on the hit mask, run both paths, return
    br_load[0] = 1; br_load_pc[0] = 16'd100; br_load_mask[0] = 4'hF;
    @(negedge clk);
    br_load[0] = 0;
    br_branch[0] = 1; br_cond[0] = hitmask; br_target[0] = 16'd200;
    @(negedge clk);
    br_branch[0] = 0;
    checks++;
    if (hitmask != 0 && br_mask[0] !== hitmask) fail("taken path mask");
    if (hitmask == 0 && br_pc[0] !== 16'd101) fail("not-taken branch pc");
    br_ret[0] = 1;
    @(negedge clk);
    if (hitmask != 0 && hitmask != 4'hF) begin
      checks++;
      if (br_pc[0] !== 16'd101 || br_mask[0] !== ~hitmask || br_done[0]) fail("resumed path");
      @(negedge clk);
    end
    br_ret[0] = 0;
    checks++;
    if (!br_done[0]) fail("packet did not end");
    // free the slot
    sp_done_valid[0] = 1;
    sp_done_slot[0]  = p.slot;
    @(negedge clk);
    sp_done_valid[0] = 0;
    n_packets++;
  endtask

  initial begin
    int t0;
    up_start = 0; up_prog_addr = '0; frame_start = 0;
    sp_pkt_ready = 1'b1; sp_done_valid = '0; sp_done_slot[0] = '0;
    trace_valid[0] = 0; res_ready[0] = 1; trace_req[0] = '0;
    ld_valid[0] = 0; ld_mask[0] = '0;
    for (int i = 0; i < RAYS; i++) ld_addr[0][i] = '0;
    br_load[0] = 0; br_advance[0] = 0; br_branch[0] = 0; br_ret[0] = 0;
    br_load_pc[0] = '0; br_target[0] = '0; br_load_mask[0] = '0; br_cond[0] = '0;

    tb_scene::build(4, 1'b0);
    tb_scene::make_up_program();
    for (int a = 0; a < tb_scene::words(); a++) dram.mem[a] = tb_scene::word(a);
    for (int a = WORLD; a < WORLD + 14; a++) dram.mem[a] = tb_scene::world_word(WORLD, a);
    for (int a = 0; a <= 64; a++) dram.mem[MAT_BASE + a] = {4{32'(a * 2654435761)}};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 1. refit
    @(negedge clk);
    up_start = 1; up_prog_addr = addr_t'(tb_scene::prog_base());
    @(negedge clk);
    up_start = 0;
    wait (up_done);
    @(negedge clk);
    tb_scene::with_bounds = 1'b1;
    for (int h = 1; h < tb_scene::NTRI; h++) begin
      checks++;
      if (dram.mem[2 * h] !== tb_scene::node_word(h, 0)) fail($sformatf("refit node %0d", h));
    end
    checks++;
    if (dram.writes != tb_scene::NTRI - 1) fail("refit store count");

    // 2. frame
    t0 = $time;
    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    while (frame_busy || queue.size() != 0) begin
      if (queue.size() != 0) shade(queue.pop_front());
      else @(negedge clk);
    end
    repeat (3) @(negedge clk);

    checks++;
    if (n_packets != W * H / 4) fail($sformatf("%0d packets shaded", n_packets));
    checks++;
    if (stat_pushes[0] == 0 || stat_pops[0] == 0 || stat_terminations[0] == 0 || stat_leaves[0] == 0)
      fail("traversal mechanisms");
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (stat_cache_hits[0][c] == 0 || stat_cache_misses[0][c] == 0) fail($sformatf("cache %0d hits/misses", c));
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_world_hit == 0 || n_shared_load == 0 || stat_divergences[0] == 0)
      fail("hits, misses, shared loads or divergences missing");
    checks++;
    if (stack_overflow[0] || ctl_overflow[0]) fail("overflow");
    $display("hits inside instanced objects %0d", n_world_hit);
    $display("packets %0d rays hit %0d miss %0d | steps %0d leaves %0d pushes %0d pops %0d terminations %0d",
             n_packets, n_hit, n_miss, stat_steps[0], stat_leaves[0], stat_pushes[0], stat_pops[0], stat_terminations[0]);
    $display("cache hits/misses node %0d/%0d vertex %0d/%0d shader %0d/%0d | packed loads %0d shared %0d divergences %0d",
             stat_cache_hits[0][0], stat_cache_misses[0][0], stat_cache_hits[0][1], stat_cache_misses[0][1],
             stat_cache_hits[0][2], stat_cache_misses[0][2], stat_packed_loads[0], n_shared_load, stat_divergences[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
