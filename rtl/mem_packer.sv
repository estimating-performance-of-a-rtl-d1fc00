// mem_packer: memory request packing for a packet of four threads.
//
// Following the source: threads of a packet execute the same load or store,
// and for coherent rays they often use the same address; only as many
// memory requests as there are distinct addresses among the active threads
// are made, so four equal addresses give one request and four different
// ones give four. How the distinct addresses are found is this design's own:
// each cycle the lowest-numbered thread still waiting is served together
// with every waiting thread that has the same address.
//
// Interface: in_valid/in_ready take a packet's addresses and activity mask
// (in_ready is high when the previous packet is fully served). Each packed
// request appears on out_valid/out_addr with out_mask naming the threads it
// serves, and is consumed when out_ready is high. requests counts packed
// requests issued since reset.
module mem_packer
  import drpu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  addr_t           in_addr [RAYS],
  input  logic [RAYS-1:0] in_mask,
  output logic            out_valid,
  input  logic            out_ready,
  output addr_t           out_addr,
  output logic [RAYS-1:0] out_mask,
  output logic [31:0]     requests
);
  addr_t           addr_q [RAYS];
  logic [RAYS-1:0] pend_q;

  always_comb begin
    out_addr = '0;
    for (int i = RAYS - 1; i >= 0; i--)
      if (pend_q[i]) out_addr = addr_q[i];
    for (int i = 0; i < RAYS; i++)
      out_mask[i] = pend_q[i] && (addr_q[i] == out_addr);
  end

  assign out_valid = |pend_q;
  assign in_ready  = !(|pend_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q   <= '0;
      requests <= '0;
      for (int i = 0; i < RAYS; i++) addr_q[i] <= '0;
    end else if (in_ready) begin
      if (in_valid) begin
        pend_q <= in_mask;
        for (int i = 0; i < RAYS; i++) addr_q[i] <= in_addr[i];
      end
    end else if (out_ready) begin
      pend_q   <= pend_q & ~out_mask;
      requests <= requests + 1;
    end
  end

endmodule
