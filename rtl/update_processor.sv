// update_processor: refits the bounds of a B-KD tree after its geometry has
// moved, without touching the tree's structure.
//
// It runs an instruction stream that the driver precomputes for each dynamic
// object. Following the source, the unit holds 64 vertex registers and 64
// bound registers and has instructions to load a vertex, to compute a
// triangle's axis-aligned bound from three vertex registers and to merge two
// bounds; the bottom-up merge only uses min/max. Node updates write the
// extents of a node's two children along the node's axis to memory. The
// encoding, the one-instruction-per-word format and the explicit store
// instruction are this design's own choices:
//
//   [3:0] opcode  0 END   stop, raise done
//                 1 LDV   vreg[dst] <- vertex at mem[addr]
//                 2 TRI   breg[dst] <- bound(vreg[a], vreg[b], vreg[c])
//                 3 MRG   breg[dst] <- bound(breg[a]) merged with bound(breg[b])
//                 4 STN   mem[addr] <- {breg[b].max[axis], breg[b].min[axis],
//                                       breg[a].max[axis], breg[a].min[axis]}
//   [9:4] dst  [15:10] a  [21:16] b  [27:22] c  [29:28] axis  [63:32] addr
//
// Interface: pulse start with prog_addr; busy stays high until END, then
// done pulses for one cycle. Memory is reached through one request/response
// port (request held until mem_ready, one outstanding access).
// Timing: an instruction fetch costs a memory round trip; TRI and MRG take
// one cycle; LDV adds a read round trip; STN a write handshake.
//
// Reset is asynchronous. The assertion at the end also reads rst_n to stay
// quiet during reset, so lint reports rst_n as used both asynchronously and
// synchronously; that use is intended and adds no logic.
module update_processor
  import drpu_pkg::*;
#(
  parameter int unsigned NUM_VREGS = 64,
  parameter int unsigned NUM_BREGS = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  addr_t    prog_addr,
  output logic     busy,
  output logic     done,
  output mem_req_t mem_req,
  input  logic     mem_ready,
  input  mem_rsp_t mem_rsp
);

  typedef struct packed {
    vec3_t hi;
    vec3_t lo;
  } bound_t;

  typedef enum logic [3:0] {
    OP_END = 4'd0,
    OP_LDV = 4'd1,
    OP_TRI = 4'd2,
    OP_MRG = 4'd3,
    OP_STN = 4'd4
  } op_e;

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_FWAIT, S_EXEC, S_LREQ, S_LWAIT, S_STORE
  } state_e;

  vec3_t  vreg [NUM_VREGS];
  bound_t breg [NUM_BREGS];

  state_e state;
  addr_t  pc;
  word_t  ir;

  op_e         op;
  logic [5:0]  f_dst, f_a, f_b, f_c;
  logic [1:0]  f_axis;
  addr_t       f_addr;

  assign op     = op_e'(ir[3:0]);
  assign f_dst  = ir[9:4];
  assign f_a    = ir[15:10];
  assign f_b    = ir[21:16];
  assign f_c    = ir[27:22];
  assign f_axis = ir[29:28];
  assign f_addr = ir[63:32];

  function automatic vec3_t vmin(input vec3_t a, input vec3_t b);
    return '{x: fp_min(a.x, b.x), y: fp_min(a.y, b.y), z: fp_min(a.z, b.z)};
  endfunction

  function automatic vec3_t vmax(input vec3_t a, input vec3_t b);
    return '{x: fp_max(a.x, b.x), y: fp_max(a.y, b.y), z: fp_max(a.z, b.z)};
  endfunction

  bound_t tri_bound, mrg_bound, sa, sb;
  always_comb begin
    tri_bound.lo = vmin(vmin(vreg[f_a], vreg[f_b]), vreg[f_c]);
    tri_bound.hi = vmax(vmax(vreg[f_a], vreg[f_b]), vreg[f_c]);
    mrg_bound.lo = vmin(breg[f_a].lo, breg[f_b].lo);
    mrg_bound.hi = vmax(breg[f_a].hi, breg[f_b].hi);
    sa = breg[f_a];
    sb = breg[f_b];
  end

  always_comb begin
    mem_req = '0;
    case (state)
      S_FETCH: begin
        mem_req.valid = 1'b1;
        mem_req.addr  = pc;
      end
      S_LREQ: begin
        mem_req.valid = 1'b1;
        mem_req.addr  = f_addr;
      end
      S_STORE: begin
        mem_req.valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = f_addr;
        mem_req.wdata = {v_comp(sb.hi, f_axis), v_comp(sb.lo, f_axis),
                         v_comp(sa.hi, f_axis), v_comp(sa.lo, f_axis)};
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      ir    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pc    <= prog_addr;
          state <= S_FETCH;
        end
        S_FETCH: if (mem_ready) state <= S_FWAIT;
        S_FWAIT: if (mem_rsp.valid) begin
          ir    <= mem_rsp.rdata;
          pc    <= pc + 1'b1;
          state <= S_EXEC;
        end
        S_EXEC: begin
          case (op)
            OP_END: begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
            OP_LDV: state <= S_LREQ;
            OP_TRI: begin
              breg[f_dst] <= tri_bound;
              state       <= S_FETCH;
            end
            OP_MRG: begin
              breg[f_dst] <= mrg_bound;
              state       <= S_FETCH;
            end
            OP_STN: state <= S_STORE;
            default: state <= S_FETCH;   // unknown opcodes are skipped
          endcase
        end
        S_LREQ: if (mem_ready) state <= S_LWAIT;
        S_LWAIT: if (mem_rsp.valid) begin
          vreg[f_dst] <= mem_rsp.rdata[95:0];
          state       <= S_FETCH;
        end
        S_STORE: if (mem_ready) state <= S_FETCH;
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req.valid && !mem_ready |=> mem_req.valid && $stable(mem_req.addr));
`endif

endmodule
