// simd_branch_unit: control flow of one packet of four threads that run in
// lock step (SIMD) in the shader processor.
//
// Following the source: every instruction runs under an activity mask that
// says which threads take part. When a conditional branch diverges, one
// path (here: the taken one) runs first, and the instruction pointer and
// activity mask of the other path are pushed onto a control stack. When the
// running path reaches a return, the next control stack entry resumes. The
// choice of running the taken path first, the stack depth and the handling
// of a full stack (the push is dropped and overflow is flagged) are this
// design's own. A return with an empty stack ends the packet.
//
// Interface: load sets pc and mask for a new packet. Each cycle at most one
// of advance (pc + 1), branch (per-thread condition cond, target) or ret is
// applied. pc, mask and done are registered; divergences counts diverging
// branches since reset.
//
// Reset is asynchronous. The assertion at the end also reads rst_n to stay
// quiet during reset, so lint reports rst_n as used both asynchronously and
// synchronously; that use is intended and adds no logic.
module simd_branch_unit
  import drpu_pkg::*;
#(
  parameter int unsigned PC_W  = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [PC_W-1:0] load_pc,
  input  logic [RAYS-1:0] load_mask,
  input  logic            advance,
  input  logic            branch,
  input  logic [RAYS-1:0] cond,
  input  logic [PC_W-1:0] target,
  input  logic            ret,
  output logic [PC_W-1:0] pc,
  output logic [RAYS-1:0] mask,
  output logic            done,
  output logic            overflow,
  output logic [31:0]     divergences
);
  localparam int unsigned SP_W  = $clog2(DEPTH + 1);
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic [PC_W-1:0] pc;
    logic [RAYS-1:0] mask;
  } ctl_entry_t;

  ctl_entry_t      stack [DEPTH];
  logic [SP_W-1:0] sp;

  logic [RAYS-1:0] taken, not_taken;
  assign taken     = mask & cond;
  assign not_taken = mask & ~cond;

  always_ff @(posedge clk) begin
    if (!done && branch && |taken && |not_taken && sp != SP_W'(DEPTH))
      stack[IDX_W'(sp)] <= '{pc: pc + 1'b1, mask: not_taken};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= '0;
      mask        <= '0;
      sp          <= '0;
      done        <= 1'b1;
      overflow    <= 1'b0;
      divergences <= '0;
    end else if (load) begin
      pc       <= load_pc;
      mask     <= load_mask;
      sp       <= '0;
      done     <= 1'b0;
      overflow <= 1'b0;
    end else if (!done) begin
      if (advance) begin
        pc <= pc + 1'b1;
      end else if (branch) begin
        if (taken == '0) begin
          pc <= pc + 1'b1;
        end else if (not_taken == '0) begin
          pc <= target;
        end else begin
          pc          <= target;
          mask        <= taken;
          divergences <= divergences + 1;
          if (sp == SP_W'(DEPTH)) overflow <= 1'b1;
          else sp <= sp + 1'b1;
        end
      end else if (ret) begin
        if (sp == '0) begin
          done <= 1'b1;
          mask <= '0;
        end else begin
          pc   <= stack[IDX_W'(sp - 1'b1)].pc;
          mask <= stack[IDX_W'(sp - 1'b1)].mask;
          sp   <= sp - 1'b1;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({advance, branch, ret}));
`endif

endmodule
