// tb_dram_model: behavioural model of external DRAM for testbenches.
// It serves one request/response memory port of 128-bit words: a request is
// accepted when ready is high (ready is dropped for a pseudo-random cycle
// now and then when STALLS is set), and a read answers LATENCY cycles later.
// One access is outstanding at a time. Testbenches fill mem[] directly and
// read it back the same way. Counters give the number of reads and writes.
module tb_dram_model
  import drpu_pkg::*;
#(
  parameter int unsigned DEPTH   = 4096,
  parameter int unsigned LATENCY = 4,
  parameter bit          STALLS  = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output logic     ready,
  output mem_rsp_t rsp
);
  word_t mem [DEPTH];
  int unsigned reads, writes;
  int          wait_cnt;
  logic        pending;
  word_t       pend_data;
  logic        stall;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    reads = 0;
    writes = 0;
  end

  always_ff @(posedge clk) stall <= STALLS ? ($urandom_range(0, 3) == 0) : 1'b0;

  assign ready = !pending && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      wait_cnt  <= 0;
      rsp       <= '0;
      pend_data <= '0;
    end else begin
      rsp.valid <= 1'b0;
      if (pending) begin
        if (wait_cnt <= 1) begin
          pending   <= 1'b0;
          rsp.valid <= 1'b1;
          rsp.rdata <= pend_data;
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end else if (req.valid && ready) begin
        if (req.we) begin
          mem[req.addr % DEPTH] <= req.wdata;
          writes <= writes + 1;
        end else begin
          pend_data <= mem[req.addr % DEPTH];
          pending   <= 1'b1;
          wait_cnt  <= LATENCY;
          reads     <= reads + 1;
        end
      end
    end
  end
endmodule
