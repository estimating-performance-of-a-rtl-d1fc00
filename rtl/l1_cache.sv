// l1_cache: first-level cache between a rendering-unit client (shader
// processor, traversal processor or geometry unit) and the memory interface.
//
// Following the source's ASIC configuration the cache is 128 bits wide,
// four-way set associative and 16 KB, which with one 128-bit word per line
// gives 256 sets. This design's choices: one word per line, round-robin
// replacement per set, write-through without allocation (a write updates a
// resident copy and is always passed on), one access in flight.
//
// Interface (both sides use the drpu_pkg memory port): a client request is
// taken while ready is high. A read hit answers on the next cycle; a miss
// forwards the read, fills the line and answers when the word arrives.
// hits/misses count read hits and misses since reset.
module l1_cache
  import drpu_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_req_t    cpu_req,
  output logic        cpu_ready,
  output mem_rsp_t    cpu_rsp,
  output mem_req_t    mem_req,
  input  logic        mem_ready,
  input  mem_rsp_t    mem_rsp,
  output logic [31:0] hits,
  output logic [31:0] misses
);
  localparam int unsigned LINES = SIZE_BYTES / (WORD_W / 8);
  localparam int unsigned SETS  = LINES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = ADDR_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_MREQ, S_MWAIT, S_WREQ} state_e;

  logic [TAG_W-1:0] tag_q  [WAYS][SETS];
  word_t            data_q [WAYS][SETS];
  logic [SETS-1:0]  valid_q [WAYS];
  logic [WAY_W-1:0] victim_q [SETS];

  state_e    state;
  mem_req_t  cur;

  logic [IDX_W-1:0] idx, cur_idx;
  logic [TAG_W-1:0] tag, cur_tag;
  assign idx     = cpu_req.addr[IDX_W-1:0];
  assign tag     = cpu_req.addr[ADDR_W-1:IDX_W];
  assign cur_idx = cur.addr[IDX_W-1:0];
  assign cur_tag = cur.addr[ADDR_W-1:IDX_W];

  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (valid_q[w][idx] && tag_q[w][idx] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  assign cpu_ready = (state == S_IDLE);

  always_comb begin
    mem_req = '0;
    if (state == S_MREQ) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = cur.addr;
    end else if (state == S_WREQ) begin
      mem_req = cur;
    end
  end

  // tag and data arrays (no reset needed: guarded by the valid bits)
  always_ff @(posedge clk) begin
    if (state == S_IDLE && cpu_req.valid && cpu_req.we && hit)
      data_q[hit_way][idx] <= cpu_req.wdata;
    if (state == S_MWAIT && mem_rsp.valid) begin
      data_q[victim_q[cur_idx]][cur_idx] <= mem_rsp.rdata;
      tag_q[victim_q[cur_idx]][cur_idx]  <= cur_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur     <= '0;
      cpu_rsp <= '0;
      hits    <= '0;
      misses  <= '0;
      for (int w = 0; w < int'(WAYS); w++) valid_q[w] <= '0;
      for (int s = 0; s < int'(SETS); s++) victim_q[s] <= '0;
    end else begin
      cpu_rsp.valid <= 1'b0;
      case (state)
        S_IDLE: if (cpu_req.valid) begin
          cur <= cpu_req;
          if (cpu_req.we) begin
            state <= S_WREQ;
          end else if (hit) begin
            cpu_rsp.valid <= 1'b1;
            cpu_rsp.rdata <= data_q[hit_way][idx];
            hits          <= hits + 1;
          end else begin
            misses <= misses + 1;
            state  <= S_MREQ;
          end
        end
        S_MREQ: if (mem_ready) state <= S_MWAIT;
        S_MWAIT: if (mem_rsp.valid) begin
          valid_q[victim_q[cur_idx]][cur_idx] <= 1'b1;
          victim_q[cur_idx] <= victim_q[cur_idx] + 1'b1;
          cpu_rsp.valid     <= 1'b1;
          cpu_rsp.rdata     <= mem_rsp.rdata;
          state             <= S_IDLE;
        end
        S_WREQ: if (mem_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
