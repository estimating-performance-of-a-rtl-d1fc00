// drpu_top: one DRPU (Dynamic Ray Processing Unit) ray-tracing core.
//
// The core holds NUM_RU rendering units, a thread scheduler, the update
// processor for dynamic B-KD trees, and the memory interface to external
// DRAM. Each rendering unit has a traversal processor (four TPUs in SIMD), a
// geometry unit, and 128-bit node, vertex and shader caches. The source's
// implemented configuration is a single rendering unit with 32 packets of
// four threads, which are the defaults here.
//
// The programmable shader processor is not part of this RTL: its
// connections are ports of this module. Per rendering unit these are
//   - the packet stream from the thread scheduler (sp_pkt_*) and the slot
//     release back to it (sp_done_*),
//   - the "trace" call into the traversal processor (trace_*) and its
//     results (res_*),
//   - a packet load port through memory request packing to the shader
//     cache (ld_*): the four thread addresses go in, packed requests go out
//     and each answer comes back with the mask of threads it serves,
//   - the packet's SIMD control-flow unit (br_*), driven by the shader's
//     instruction decode.
// The host bus controller's functions are ports too: starting the update
// processor (up_*) and a frame (frame_*). The external DRAM port is
// dram_*. Memory interface client order: for unit r, 3r is the node cache,
// 3r+1 the vertex cache, 3r+2 the shader cache; the last client is the
// update processor.
//
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is the reset guard of assertions inside the units.
module drpu_top
  import drpu_pkg::*;
#(
  parameter int unsigned NUM_RU      = 1,
  parameter int unsigned NPKT        = 32,
  parameter int unsigned WIDTH       = 1024,
  parameter int unsigned HEIGHT      = 768,
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned CACHE_WAYS  = 4,
  parameter int unsigned STACK_DEPTH = 32,
  parameter int unsigned CTL_DEPTH   = 16,
  parameter int unsigned PC_W        = 16,
  localparam int unsigned RU_W       = (NUM_RU > 1) ? $clog2(NUM_RU) : 1,
  localparam int unsigned SLOT_W     = $clog2(NPKT),
  localparam int unsigned NPORTS     = 3 * NUM_RU + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host: update processor and frame control
  input  logic              up_start,
  input  addr_t             up_prog_addr,
  output logic              up_busy,
  output logic              up_done,
  input  logic              frame_start,
  output logic              frame_busy,
  output logic              frame_done,
  // thread scheduler to shader processors
  output logic              sp_pkt_valid,
  output logic [RU_W-1:0]   sp_pkt_ru,
  output logic [SLOT_W-1:0] sp_pkt_slot,
  output logic [15:0]       sp_pkt_x,
  output logic [15:0]       sp_pkt_y,
  input  logic [NUM_RU-1:0] sp_pkt_ready,
  input  logic [NUM_RU-1:0] sp_done_valid,
  input  logic [SLOT_W-1:0] sp_done_slot [NUM_RU],
  // trace calls
  input  logic              trace_valid [NUM_RU],
  output logic              trace_ready [NUM_RU],
  input  trace_req_t        trace_req   [NUM_RU],
  output logic              res_valid   [NUM_RU],
  input  logic              res_ready   [NUM_RU],
  output trace_rsp_t        res         [NUM_RU],
  // shader loads through request packing and the shader cache
  input  logic              ld_valid    [NUM_RU],
  output logic              ld_ready    [NUM_RU],
  input  addr_t             ld_addr     [NUM_RU][RAYS],
  input  logic [RAYS-1:0]   ld_mask     [NUM_RU],
  output logic              ld_rsp_valid [NUM_RU],
  output word_t             ld_rsp_data  [NUM_RU],
  output logic [RAYS-1:0]   ld_rsp_mask  [NUM_RU],
  // SIMD control flow of the packet in execution
  input  logic              br_load      [NUM_RU],
  input  logic [PC_W-1:0]   br_load_pc   [NUM_RU],
  input  logic [RAYS-1:0]   br_load_mask [NUM_RU],
  input  logic              br_advance   [NUM_RU],
  input  logic              br_branch    [NUM_RU],
  input  logic [RAYS-1:0]   br_cond      [NUM_RU],
  input  logic [PC_W-1:0]   br_target    [NUM_RU],
  input  logic              br_ret       [NUM_RU],
  output logic [PC_W-1:0]   br_pc        [NUM_RU],
  output logic [RAYS-1:0]   br_mask      [NUM_RU],
  output logic              br_done      [NUM_RU],
  // external DRAM
  output mem_req_t          dram_req,
  input  logic              dram_ready,
  input  mem_rsp_t          dram_rsp,
  // statistics and errors
  output logic [31:0]       stat_steps        [NUM_RU],
  output logic [31:0]       stat_leaves       [NUM_RU],
  output logic [31:0]       stat_pushes       [NUM_RU],
  output logic [31:0]       stat_pops         [NUM_RU],
  output logic [31:0]       stat_terminations [NUM_RU],
  output logic [31:0]       stat_cache_hits   [NUM_RU][3],
  output logic [31:0]       stat_cache_misses [NUM_RU][3],
  output logic [31:0]       stat_packed_loads [NUM_RU],
  output logic [31:0]       stat_divergences  [NUM_RU],
  output logic [31:0]       stat_mem_grants   [NPORTS],
  output logic              stack_overflow    [NUM_RU],
  output logic              ctl_overflow      [NUM_RU]
);

  mem_req_t mi_req   [NPORTS];
  logic     mi_ready [NPORTS];
  mem_rsp_t mi_rsp   [NPORTS];

  // ---------------- thread scheduler ----------------
  thread_scheduler #(
    .NUM_RU(NUM_RU), .NPKT(NPKT), .WIDTH(WIDTH), .HEIGHT(HEIGHT)
  ) u_sched (
    .clk, .rst_n,
    .start      (frame_start),
    .busy       (frame_busy),
    .frame_done (frame_done),
    .out_valid  (sp_pkt_valid),
    .out_ru     (sp_pkt_ru),
    .out_pkt    (sp_pkt_slot),
    .out_x      (sp_pkt_x),
    .out_y      (sp_pkt_y),
    .out_ready  (sp_pkt_ready),
    .done_valid (sp_done_valid),
    .done_pkt   (sp_done_slot)
  );

  // ---------------- update processor ----------------
  update_processor u_update (
    .clk, .rst_n,
    .start     (up_start),
    .prog_addr (up_prog_addr),
    .busy      (up_busy),
    .done      (up_done),
    .mem_req   (mi_req[NPORTS-1]),
    .mem_ready (mi_ready[NPORTS-1]),
    .mem_rsp   (mi_rsp[NPORTS-1])
  );

  // ---------------- rendering units ----------------
  for (genvar r = 0; r < NUM_RU; r++) begin : g_ru
    mem_req_t node_req, vtx_req, sh_req;
    logic     node_ready, vtx_ready, sh_ready;
    mem_rsp_t node_rsp, vtx_rsp, sh_rsp;
    logic     gu_req_valid, gu_req_ready, gu_rsp_valid;
    gu_req_t  gu_req;
    gu_rsp_t  gu_rsp;
    logic     pk_valid;
    addr_t    pk_addr;
    logic [RAYS-1:0] pk_mask, pk_mask_q;

    traversal_processor #(.STACK_DEPTH(STACK_DEPTH)) u_tp (
      .clk, .rst_n,
      .trace_valid       (trace_valid[r]),
      .trace_ready       (trace_ready[r]),
      .trace_req         (trace_req[r]),
      .res_valid         (res_valid[r]),
      .res_ready         (res_ready[r]),
      .res               (res[r]),
      .node_req          (node_req),
      .node_ready        (node_ready),
      .node_rsp          (node_rsp),
      .gu_req_valid      (gu_req_valid),
      .gu_req_ready      (gu_req_ready),
      .gu_req            (gu_req),
      .gu_rsp_valid      (gu_rsp_valid),
      .gu_rsp            (gu_rsp),
      .stack_overflow    (stack_overflow[r]),
      .stat_steps        (stat_steps[r]),
      .stat_leaves       (stat_leaves[r]),
      .stat_pushes       (stat_pushes[r]),
      .stat_pops         (stat_pops[r]),
      .stat_terminations (stat_terminations[r])
    );

    geometry_unit u_gu (
      .clk, .rst_n,
      .req_valid (gu_req_valid),
      .req_ready (gu_req_ready),
      .req       (gu_req),
      .rsp_valid (gu_rsp_valid),
      .rsp       (gu_rsp),
      .mem_req   (vtx_req),
      .mem_ready (vtx_ready),
      .mem_rsp   (vtx_rsp)
    );

    l1_cache #(.SIZE_BYTES(CACHE_BYTES), .WAYS(CACHE_WAYS)) u_node_cache (
      .clk, .rst_n,
      .cpu_req (node_req), .cpu_ready (node_ready), .cpu_rsp (node_rsp),
      .mem_req (mi_req[3*r]), .mem_ready (mi_ready[3*r]), .mem_rsp (mi_rsp[3*r]),
      .hits (stat_cache_hits[r][0]), .misses (stat_cache_misses[r][0])
    );

    l1_cache #(.SIZE_BYTES(CACHE_BYTES), .WAYS(CACHE_WAYS)) u_vertex_cache (
      .clk, .rst_n,
      .cpu_req (vtx_req), .cpu_ready (vtx_ready), .cpu_rsp (vtx_rsp),
      .mem_req (mi_req[3*r+1]), .mem_ready (mi_ready[3*r+1]), .mem_rsp (mi_rsp[3*r+1]),
      .hits (stat_cache_hits[r][1]), .misses (stat_cache_misses[r][1])
    );

    // shader loads: packed requests, one outstanding at a time
    logic ld_wait;
    mem_packer u_packer (
      .clk, .rst_n,
      .in_valid  (ld_valid[r]),
      .in_ready  (ld_ready[r]),
      .in_addr   (ld_addr[r]),
      .in_mask   (ld_mask[r]),
      .out_valid (pk_valid),
      .out_ready (sh_ready && !ld_wait),
      .out_addr  (pk_addr),
      .out_mask  (pk_mask),
      .requests  (stat_packed_loads[r])
    );

    always_comb begin
      sh_req       = '0;
      sh_req.valid = pk_valid && !ld_wait;
      sh_req.addr  = pk_addr;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ld_wait   <= 1'b0;
        pk_mask_q <= '0;
      end else if (sh_req.valid && sh_ready) begin
        ld_wait   <= 1'b1;
        pk_mask_q <= pk_mask;
      end else if (sh_rsp.valid) begin
        ld_wait   <= 1'b0;
      end
    end

    assign ld_rsp_valid[r] = sh_rsp.valid;
    assign ld_rsp_data[r]  = sh_rsp.rdata;
    assign ld_rsp_mask[r]  = pk_mask_q;

    l1_cache #(.SIZE_BYTES(CACHE_BYTES), .WAYS(CACHE_WAYS)) u_shader_cache (
      .clk, .rst_n,
      .cpu_req (sh_req), .cpu_ready (sh_ready), .cpu_rsp (sh_rsp),
      .mem_req (mi_req[3*r+2]), .mem_ready (mi_ready[3*r+2]), .mem_rsp (mi_rsp[3*r+2]),
      .hits (stat_cache_hits[r][2]), .misses (stat_cache_misses[r][2])
    );

    simd_branch_unit #(.PC_W(PC_W), .DEPTH(CTL_DEPTH)) u_branch (
      .clk, .rst_n,
      .load        (br_load[r]),
      .load_pc     (br_load_pc[r]),
      .load_mask   (br_load_mask[r]),
      .advance     (br_advance[r]),
      .branch      (br_branch[r]),
      .cond        (br_cond[r]),
      .target      (br_target[r]),
      .ret         (br_ret[r]),
      .pc          (br_pc[r]),
      .mask        (br_mask[r]),
      .done        (br_done[r]),
      .overflow    (ctl_overflow[r]),
      .divergences (stat_divergences[r])
    );
  end

  // ---------------- memory interface ----------------
  memory_interface #(.NPORTS(NPORTS)) u_mem (
    .clk, .rst_n,
    .req        (mi_req),
    .ready      (mi_ready),
    .rsp        (mi_rsp),
    .dram_req   (dram_req),
    .dram_ready (dram_ready),
    .dram_rsp   (dram_rsp),
    .grants     (stat_mem_grants)
  );

endmodule
