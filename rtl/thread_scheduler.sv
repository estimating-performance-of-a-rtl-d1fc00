// thread_scheduler: hands out the pixels of a frame to the rendering units,
// four adjacent pixels (one packet of threads) at a time.
//
// Following the source, each time a packet finishes in a rendering unit, the
// scheduler sends that unit four new adjacent pixels, which balances the load
// between units. This design's choices: the four pixels are a 2x2 quad,
// quads are issued in rows from the top left; each unit has NPKT packet
// slots, and a frame starts by filling all free slots; among units with a
// free slot the next quad goes round robin. A slot is free again when the
// unit reports it done.
//
// Interface: pulse start to begin a frame of WIDTH x HEIGHT pixels. A packet
// is offered on out_* with out_valid and taken when out_ready[out_ru] is
// high; (out_x, out_y) is the quad's top-left pixel and out_pkt the slot it
// occupies. done_valid[r]/done_pkt[r] free a slot of unit r. frame_done
// pulses when every quad has been issued and every slot is free again.
module thread_scheduler
  import drpu_pkg::*;
#(
  parameter int unsigned NUM_RU = 1,
  parameter int unsigned NPKT   = 32,
  parameter int unsigned WIDTH  = 1024,
  parameter int unsigned HEIGHT = 768,
  localparam int unsigned RU_W  = (NUM_RU > 1) ? $clog2(NUM_RU) : 1,
  localparam int unsigned SLOT_W = $clog2(NPKT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              frame_done,
  output logic              out_valid,
  output logic [RU_W-1:0]   out_ru,
  output logic [SLOT_W-1:0] out_pkt,
  output logic [15:0]       out_x,
  output logic [15:0]       out_y,
  input  logic [NUM_RU-1:0] out_ready,
  input  logic [NUM_RU-1:0] done_valid,
  input  logic [SLOT_W-1:0] done_pkt [NUM_RU]
);
  logic [NPKT-1:0]  free_q [NUM_RU];
  logic [15:0]      x_q, y_q;
  logic             issuing;     // quads of this frame remain
  logic [RU_W-1:0]  last_ru;

  // unit choice: round robin among units with a free slot
  logic             cand;
  logic [RU_W-1:0]  ru;
  logic [SLOT_W-1:0] slot;
  always_comb begin
    cand = 1'b0;
    ru   = '0;
    for (int k = int'(NUM_RU); k >= 1; k--) begin
      int r;
      r = (int'(last_ru) + k) % int'(NUM_RU);
      if (|free_q[r]) begin
        cand = 1'b1;
        ru   = RU_W'(r);
      end
    end
    slot = '0;
    for (int s = int'(NPKT) - 1; s >= 0; s--)
      if (free_q[ru][s]) slot = SLOT_W'(s);
  end

  assign out_valid = issuing && cand;
  assign out_ru    = ru;
  assign out_pkt   = slot;
  assign out_x     = x_q;
  assign out_y     = y_q;
  logic all_free;
  assign busy      = issuing || !all_free;

  always_comb begin
    all_free = 1'b1;
    for (int r = 0; r < int'(NUM_RU); r++) if (!(&free_q[r])) all_free = 1'b0;
  end

  logic take;
  assign take = out_valid && out_ready[ru];

  logic was_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NUM_RU); r++) free_q[r] <= '1;
      x_q        <= '0;
      y_q        <= '0;
      issuing    <= 1'b0;
      last_ru    <= RU_W'(NUM_RU - 1);
      frame_done <= 1'b0;
      was_busy   <= 1'b0;
    end else begin
      for (int r = 0; r < int'(NUM_RU); r++) begin
        logic [NPKT-1:0] f;
        f = free_q[r];
        if (done_valid[r]) f[done_pkt[r]] = 1'b1;
        if (take && ru == RU_W'(r)) f[slot] = 1'b0;
        free_q[r] <= f;
      end
      if (start && !busy) begin
        issuing <= 1'b1;
        x_q     <= '0;
        y_q     <= '0;
      end else if (take) begin
        last_ru <= ru;
        if (x_q + 16'd2 >= 16'(WIDTH)) begin
          x_q <= '0;
          y_q <= y_q + 16'd2;
          if (y_q + 16'd2 >= 16'(HEIGHT)) issuing <= 1'b0;
        end else begin
          x_q <= x_q + 16'd2;
        end
      end
      was_busy   <= busy;
      frame_done <= was_busy && !busy;
    end
  end

endmodule
