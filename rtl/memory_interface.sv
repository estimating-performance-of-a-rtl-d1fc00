// memory_interface: shares the external memory port among the on-chip
// clients (the caches of each rendering unit and the update processor).
//
// The source shows this block only as the connection between the caches,
// the update processor and the external DRAM; its insides are this design's
// own: a round-robin arbiter that grants one request at a time, passes it to
// the DRAM port, and for a read routes the answer back to the client that
// asked, accepting nothing new until that answer has arrived. Writes finish
// when the DRAM port accepts them.
//
// Interface: NPORTS client ports and one DRAM port, all drpu_pkg memory
// ports. A client's ready is high only in the cycle its request is passed
// on. grants counts the requests passed on for each client.
module memory_interface
  import drpu_pkg::*;
#(
  parameter int unsigned NPORTS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_req_t    req   [NPORTS],
  output logic        ready [NPORTS],
  output mem_rsp_t    rsp   [NPORTS],
  output mem_req_t    dram_req,
  input  logic        dram_ready,
  input  mem_rsp_t    dram_rsp,
  output logic [31:0] grants [NPORTS]
);
  localparam int unsigned P_W = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic           busy;       // a read is waiting for its answer
  logic [P_W-1:0] owner;      // client that issued it
  logic [P_W-1:0] last;       // most recently granted client
  logic           sel_valid;
  logic [P_W-1:0] sel;

  // round-robin choice starting after the last granted client
  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int k = int'(NPORTS); k >= 1; k--) begin
      int p;
      p = (int'(last) + k) % int'(NPORTS);
      if (req[p].valid) begin
        sel_valid = 1'b1;
        sel       = P_W'(p);
      end
    end
  end

  always_comb begin
    dram_req = '0;
    if (!busy && sel_valid) dram_req = req[sel];
    for (int p = 0; p < int'(NPORTS); p++) begin
      ready[p]     = !busy && sel_valid && (sel == P_W'(p)) && dram_ready;
      rsp[p].valid = dram_rsp.valid && busy && (owner == P_W'(p));
      rsp[p].rdata = dram_rsp.rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= P_W'(NPORTS - 1);
      for (int p = 0; p < int'(NPORTS); p++) grants[p] <= '0;
    end else begin
      if (!busy && sel_valid && dram_ready) begin
        last         <= sel;
        grants[sel]  <= grants[sel] + 1;
        if (!req[sel].we) begin
          busy  <= 1'b1;
          owner <= sel;
        end
      end else if (busy && dram_rsp.valid) begin
        busy <= 1'b0;
      end
    end
  end

endmodule
