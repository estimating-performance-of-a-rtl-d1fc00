// traversal_processor: traces a packet of four rays through a B-KD tree and
// returns, per ray, the closest triangle hit.
//
// Four TPUs (one per ray) work in SIMD on the same node, so the packet shares
// every node fetch. Following the source: each step intersects the rays with
// the node's two child slabs; the closer child is entered first, the other
// child (if some ray overlaps it) is pushed on a stack together with each
// ray's interval for it; a ray whose closest hit lies before its near
// distance stops (early ray termination); leaves go to the geometry unit;
// when a branch ends the stack is popped; an empty stack ends the trace.
//
// This design's own choices: which child is "closer" is decided for the
// whole packet by the direction sign of the lowest-numbered active ray on
// the split axis (positive: the child whose slab starts first; negative: the
// child whose slab ends last). Reciprocal directions are computed at the
// start of a trace and again whenever the rays change space. One packet is traced at a time; node words are fetched one after
// the other (word 1 first, then the bounds word for inner nodes), so a step
// costs two node-cache round trips plus one cycle.
//
// Transformation nodes (instanced objects): following the source, the node
// holds a pointer to the object's root and a transformation matrix, and the
// geometry unit transforms the packet's rays into the object's space. How
// the object is left again is this design's choice: entering pushes a
// restore marker, the world-space rays are kept in a register, and popping
// the marker puts them back (and recomputes the reciprocals). The direction
// is not renormalised, so ray distances t mean the same in both spaces and
// intervals and hits carry over. One level of instancing is supported: a
// transformation node inside an object ends that branch. Word 1 of a
// transformation node holds the root address in [35:4] and the address of
// the three matrix rows in [67:36]; each row is {translation, m_z, m_y, m_x}.
//
// Interface: trace_valid/trace_ready accept a trace_req_t; res_valid/
// res_ready hand back a trace_rsp_t. Node words come through a memory port
// to the node cache; leaves go to the geometry unit over gu_req/gu_rsp.
// Statistics outputs count steps, leaves, pushes, pops and early ray
// terminations since reset.
//
// Reset is asynchronous. The assertion at the end also reads rst_n to stay
// quiet during reset, so lint reports rst_n as used both asynchronously and
// synchronously; that use is intended and adds no logic.
module traversal_processor
  import drpu_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trace_valid,
  output logic        trace_ready,
  input  trace_req_t  trace_req,
  output logic        res_valid,
  input  logic        res_ready,
  output trace_rsp_t  res,
  output mem_req_t    node_req,
  input  logic        node_ready,
  input  mem_rsp_t    node_rsp,
  output logic        gu_req_valid,
  input  logic        gu_req_ready,
  output gu_req_t     gu_req,
  input  logic        gu_rsp_valid,
  input  gu_rsp_t     gu_rsp,
  output logic        stack_overflow,
  output logic [31:0] stat_steps,
  output logic [31:0] stat_leaves,
  output logic [31:0] stat_pushes,
  output logic [31:0] stat_pops,
  output logic [31:0] stat_terminations
);
  localparam int unsigned SP_W  = $clog2(STACK_DEPTH + 1);
  localparam int unsigned IDX_W = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1;

  typedef struct packed {
    logic                 restore;   // marker: leave an instanced object
    addr_t                node;
    logic [RAYS-1:0]      mask;
    ival_t [RAYS-1:0]     ival;
  } stack_entry_t;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_RINV, S_F1, S_W1, S_F0, S_W0, S_STEP, S_GU, S_GUW, S_XF, S_XFW,
    S_POP, S_DONE
  } state_e;

  state_e           state;
  trace_req_t       job;
  ray_t [RAYS-1:0]  wrays;     // world-space rays while inside an object
  logic             in_obj;
  state_e           rinv_next;
  vec3_t            inv   [RAYS];
  ival_t            ival  [RAYS];
  hit_t             best  [RAYS];
  prim_t            prim  [RAYS];
  logic [RAYS-1:0]  mask;
  addr_t            node;
  word_t            w1, w0;
  stack_entry_t     stack [STACK_DEPTH];
  logic [SP_W-1:0]  sp;

  logic [1:0] axis;
  addr_t      child;
  assign axis  = w1[3:2];
  assign child = w1[35:4];

  // ---------------- TPUs ----------------
  logic [RAYS-1:0] term, in0, in1;
  ival_t           iv0 [RAYS];
  ival_t           iv1 [RAYS];

  for (genvar i = 0; i < RAYS; i++) begin : g_tpu
    tpu u_tpu (
      .org_a     (v_comp(job.rays[i].org, axis)),
      .inv_a     (v_comp(inv[i], axis)),
      .ival      (ival[i]),
      .hit_dist  (best[i].t),
      .c0_lo     (w0[31:0]),
      .c0_hi     (w0[63:32]),
      .c1_lo     (w0[95:64]),
      .c1_hi     (w0[127:96]),
      .terminated(term[i]),
      .in0       (in0[i]),
      .in1       (in1[i]),
      .ival0     (iv0[i]),
      .ival1     (iv1[i])
    );
  end

  // ---------------- step decision ----------------
  logic            first_is_1;
  logic [RAYS-1:0] m0, m1, mf, ms, gu_mask;
  logic            lead_neg;
  always_comb begin
    m0 = mask & in0;
    m1 = mask & in1;
    lead_neg = 1'b0;
    for (int i = RAYS - 1; i >= 0; i--)
      if (mask[i]) lead_neg = v_comp(inv[i], axis) [31];
    if (!lead_neg) first_is_1 = fp_lt(w0[95:64], w0[31:0]);
    else           first_is_1 = fp_lt(w0[63:32], w0[127:96]);
    mf = first_is_1 ? m1 : m0;
    ms = first_is_1 ? m0 : m1;
    for (int i = 0; i < RAYS; i++)
      gu_mask[i] = mask[i] && !fp_lt(best[i].t, ival[i].lo);
  end

  // ---------------- memory and GU requests ----------------
  always_comb begin
    node_req = '0;
    if (state == S_F1) begin
      node_req.valid = 1'b1;
      node_req.addr  = node + 1'b1;
    end else if (state == S_F0) begin
      node_req.valid = 1'b1;
      node_req.addr  = node;
    end
  end

  // transformation node: [35:4] object root, [67:36] matrix (three rows)
  addr_t mat;
  assign mat = w1[67:36];
  always_comb begin
    gu_req = '0;
    gu_req.mode  = (state == S_XF);
    gu_req.mask  = gu_mask;
    gu_req.rays  = job.rays;
    for (int i = 0; i < RAYS; i++) gu_req.tmax[i] = best[i].t;
    if (state == S_XF) gu_req.vaddr = {mat + 32'd2, mat + 32'd1, mat};
    else               gu_req.vaddr = {w1[99:68], w1[67:36], w1[35:4]};
  end
  assign gu_req_valid = (state == S_GU) || (state == S_XF);

  assign trace_ready = (state == S_IDLE);
  assign res_valid   = (state == S_DONE);
  always_comb begin
    res.pkt = job.pkt;
    for (int i = 0; i < RAYS; i++) begin
      res.hits[i] = best[i];
      res.prim[i] = prim[i];
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      job   <= '0;
      wrays <= '0;
      in_obj    <= 1'b0;
      rinv_next <= S_F1;
      mask  <= '0;
      node  <= '0;
      w0    <= '0;
      w1    <= '0;
      sp    <= '0;
      stack_overflow    <= 1'b0;
      stat_steps        <= '0;
      stat_leaves       <= '0;
      stat_pushes       <= '0;
      stat_pops         <= '0;
      stat_terminations <= '0;
      for (int i = 0; i < RAYS; i++) begin
        inv[i]  <= '0;
        ival[i] <= '0;
        best[i] <= '0;
        prim[i] <= '0;
      end
    end else begin
      case (state)
        S_IDLE: if (trace_valid) begin
          job   <= trace_req;
          mask  <= trace_req.mask;
          node  <= trace_req.root;
          sp    <= '0;
          state <= S_INIT;
        end
        S_INIT: begin
          for (int i = 0; i < RAYS; i++) begin
            ival[i]  <= '{lo: FP_ZERO, hi: job.tfar[i]};
            best[i]  <= '{hit: 1'b0, t: job.tfar[i], u: FP_ZERO, v: FP_ZERO};
            prim[i]  <= '0;
          end
          in_obj    <= 1'b0;
          rinv_next <= S_F1;
          state     <= (|job.mask) ? S_RINV : S_DONE;
        end
        S_RINV: begin
          for (int i = 0; i < RAYS; i++) begin
            inv[i].x <= fp_div(FP_ONE, job.rays[i].dir.x);
            inv[i].y <= fp_div(FP_ONE, job.rays[i].dir.y);
            inv[i].z <= fp_div(FP_ONE, job.rays[i].dir.z);
          end
          state <= rinv_next;
        end
        S_F1: if (node_ready) state <= S_W1;
        S_W1: if (node_rsp.valid) begin
          w1 <= node_rsp.rdata;
          case (node_kind_e'(node_rsp.rdata[1:0]))
            NODE_INNER: state <= S_F0;
            NODE_LEAF:  state <= S_GU;
            NODE_TRANSFORM: state <= in_obj ? S_POP : S_XF;
            default:    state <= S_POP;
          endcase
        end
        S_F0: if (node_ready) state <= S_W0;
        S_W0: if (node_rsp.valid) begin
          w0    <= node_rsp.rdata;
          state <= S_STEP;
        end
        S_STEP: begin
          stat_steps <= stat_steps + 1;
          if (|(mask & term)) stat_terminations <= stat_terminations + 1;
          if (|mf) begin
            node <= first_is_1 ? child + 2 : child;
            mask <= mf;
            for (int i = 0; i < RAYS; i++)
              if (mf[i]) ival[i] <= first_is_1 ? iv1[i] : iv0[i];
            if (|ms) begin
              if (sp == SP_W'(STACK_DEPTH)) begin
                stack_overflow <= 1'b1;
              end else begin
                stack[IDX_W'(sp)].restore <= 1'b0;
                stack[IDX_W'(sp)].node <= first_is_1 ? child : child + 2;
                stack[IDX_W'(sp)].mask <= ms;
                for (int i = 0; i < RAYS; i++)
                  stack[IDX_W'(sp)].ival[i] <= first_is_1 ? iv0[i] : iv1[i];
                sp          <= sp + 1'b1;
                stat_pushes <= stat_pushes + 1;
              end
            end
            state <= S_F1;
          end else if (|ms) begin
            node <= first_is_1 ? child : child + 2;
            mask <= ms;
            for (int i = 0; i < RAYS; i++)
              if (ms[i]) ival[i] <= first_is_1 ? iv0[i] : iv1[i];
            state <= S_F1;
          end else begin
            state <= S_POP;
          end
        end
        S_GU: if (gu_req_ready) begin
          stat_leaves <= stat_leaves + 1;
          state       <= S_GUW;
        end
        S_GUW: if (gu_rsp_valid) begin
          for (int i = 0; i < RAYS; i++)
            if (gu_rsp.hits[i].hit) begin
              best[i] <= gu_rsp.hits[i];
              prim[i] <= w1[127:100];
            end
          state <= S_POP;
        end
        S_XF: if (gu_req_ready) state <= S_XFW;
        S_XFW: if (gu_rsp_valid) begin
          // enter the object: a restore marker below its subtree brings the
          // world-space rays back when the subtree is finished
          if (sp == SP_W'(STACK_DEPTH)) begin
            stack_overflow <= 1'b1;
            state          <= S_POP;
          end else begin
            stack[IDX_W'(sp)] <= '{restore: 1'b1, node: '0, mask: '0, ival: '0};
            sp          <= sp + 1'b1;
            stat_pushes <= stat_pushes + 1;
            wrays       <= job.rays;
            job.rays    <= gu_rsp.rays;
            in_obj      <= 1'b1;
            node        <= w1[35:4];
            rinv_next   <= S_F1;
            state       <= S_RINV;
          end
        end
        S_POP: begin
          if (sp == '0) begin
            state <= S_DONE;
          end else if (stack[IDX_W'(sp - 1'b1)].restore) begin
            job.rays  <= wrays;
            in_obj    <= 1'b0;
            sp        <= sp - 1'b1;
            stat_pops <= stat_pops + 1;
            rinv_next <= S_POP;
            state     <= S_RINV;
          end else begin
            node      <= stack[IDX_W'(sp - 1'b1)].node;
            mask      <= stack[IDX_W'(sp - 1'b1)].mask;
            for (int i = 0; i < RAYS; i++) ival[i] <= stack[IDX_W'(sp - 1'b1)].ival[i];
            sp        <= sp - 1'b1;
            stat_pops <= stat_pops + 1;
            state     <= S_F1;
          end
        end
        S_DONE: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !stack_overflow)
    else $error("traversal stack overflow");
`endif

endmodule
