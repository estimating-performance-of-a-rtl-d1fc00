// tb_simd_branch_unit: random streams of advance, branch and return
// operations on a four-thread packet, compared every cycle with a reference
// model that keeps the control stack in a queue. Checks that divergent,
// uniform-taken and uniform-not-taken branches, pops and packet ends all
// occur.
module tb_simd_branch_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load, advance, branch, ret, done, overflow;
  logic [15:0] load_pc, target, pc;
  logic [3:0]  load_mask, cond, mask;
  logic [31:0] divergences;
  int checks = 0, failures = 0;
  int n_div = 0, n_uni = 0, n_pop = 0, n_end = 0;

  simd_branch_unit dut (.*);

  typedef struct { logic [15:0] pc; logic [3:0] mask; } ent_t;
  ent_t        st[$];
  logic [15:0] r_pc;
  logic [3:0]  r_mask;
  bit          r_done;

  initial begin
    int op;
    logic [3:0] tk, nt;
    load = 0; advance = 0; branch = 0; ret = 0; cond = 0; target = 0; load_pc = 0; load_mask = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      load = 0; advance = 0; branch = 0; ret = 0;
      if (r_done || n == 0 || $urandom_range(0, 200) == 0) begin
        load = 1; load_pc = 16'($urandom); load_mask = 4'($urandom_range(1, 15));
        r_pc = load_pc; r_mask = load_mask; r_done = 0; st.delete();
      end else begin
        op = $urandom_range(0, 9);
        if (op < 3) begin
          advance = 1; r_pc = r_pc + 1;
        end else if (op < 8) begin
          branch = 1; cond = 4'($urandom); target = 16'($urandom);
          tk = r_mask & cond; nt = r_mask & ~cond;
          if (tk == 0) r_pc = r_pc + 1;
          else if (nt == 0) begin r_pc = target; n_uni++; end
          else begin
            st.push_back('{pc: r_pc + 1, mask: nt});
            r_pc = target; r_mask = tk; n_div++;
          end
        end else begin
          ret = 1;
          if (st.size() == 0) begin r_done = 1; r_mask = 0; n_end++; end
          else begin
            ent_t e;
            e = st.pop_back();
            r_pc = e.pc; r_mask = e.mask; n_pop++;
          end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (done !== r_done || (!r_done && (pc !== r_pc || mask !== r_mask))) begin
        failures++;
        $display("FAIL step %0d pc %h/%h mask %b/%b done %b/%b", n, pc, r_pc, mask, r_mask, done, r_done);
      end
    end
    checks++;
    if (n_div == 0 || n_uni == 0 || n_pop == 0 || n_end == 0 || overflow) begin
      failures++;
      $display("FAIL coverage div %0d uni %0d pop %0d end %0d ovf %b", n_div, n_uni, n_pop, n_end, overflow);
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
