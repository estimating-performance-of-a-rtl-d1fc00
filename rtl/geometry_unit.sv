// geometry_unit: intersects the rays of a packet with one triangle, or
// transforms them into the local space of an instanced object.
//
// Following the source, rays are handled one after the other, one ray every
// two clock cycles, so a packet of four rays takes eight cycles, and the
// transformation reuses the arithmetic of the intersection. Intersection uses
// the Moller-Trumbore algorithm on the triangle's three shared vertices,
// which are read through the vertex cache port. How the work is split over
// the two cycles is this design's choice:
//   intersect, cycle 1: e1 = v1-v0, e2 = v2-v0, s = o-v0, p = d x e2,
//                       q = s x e1, det = e1.p
//   intersect, cycle 2: u = s.p/det, v = d.q/det, t = e2.q/det and the hit
//                       test det != 0, u >= 0, v >= 0, u+v <= 1, 0 < t < tmax
//   transform, cycle 1: origin' = M [o 1];  cycle 2: direction' = M [d 0]
// Masked-off rays still take their two cycles and report no hit.
//
// Interface: req_valid/req_ready handshake on gu_req_t; after the three
// vertex (or matrix row) reads, rsp_valid rises with the results exactly
// eight clock edges after the third read response and stays high one cycle.
module geometry_unit
  import drpu_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  gu_req_t  req,
  output logic     rsp_valid,
  output gu_rsp_t  rsp,
  output mem_req_t mem_req,
  input  logic     mem_ready,
  input  mem_rsp_t mem_rsp
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_CALC} state_e;

  state_e      state;
  gu_req_t     job;
  word_t       w [3];
  logic [1:0]  widx;
  logic [1:0]  ray;
  logic        phase;

  // vertices (or matrix rows)
  vec3_t v0, v1, v2;
  assign v0 = w[0][95:0];
  assign v1 = w[1][95:0];
  assign v2 = w[2][95:0];

  // stage registers between the two cycles of a ray
  vec3_t r_e2, r_s, r_p, r_q;
  fp32_t r_det;

  ray_t  cur;
  fp32_t cur_tmax;
  assign cur      = job.rays[ray];
  assign cur_tmax = job.tmax[ray];

  // cycle-1 arithmetic
  vec3_t e1, e2, s, p, q;
  fp32_t det;
  // cycle-2 arithmetic
  fp32_t inv_det, u, v, t;
  logic  hit;
  // transform
  function automatic fp32_t row_dot(input word_t row, input vec3_t a, input logic with_w);
    fp32_t acc;
    acc = v_dot(row[95:0], a);
    return with_w ? fp_add(acc, row[127:96]) : acc;
  endfunction
  vec3_t xf;

  always_comb begin
    e1  = v_sub(v1, v0);
    e2  = v_sub(v2, v0);
    s   = v_sub(cur.org, v0);
    p   = v_cross(cur.dir, e2);
    q   = v_cross(s, e1);
    det = v_dot(e1, p);
    inv_det = fp_div(FP_ONE, r_det);
    u   = fp_mul(v_dot(r_s, r_p), inv_det);
    v   = fp_mul(v_dot(cur.dir, r_q), inv_det);
    t   = fp_mul(v_dot(r_e2, r_q), inv_det);
    hit = job.mask[ray] && (r_det[30:23] != 8'd0) && !u[31] && !v[31]
          && fp_le(fp_add(u, v), FP_ONE) && !t[31] && (t[30:23] != 8'd0)
          && fp_lt(t, cur_tmax);
    xf.x = row_dot(w[0], phase ? cur.dir : cur.org, !phase);
    xf.y = row_dot(w[1], phase ? cur.dir : cur.org, !phase);
    xf.z = row_dot(w[2], phase ? cur.dir : cur.org, !phase);
  end

  assign req_ready = (state == S_IDLE);

  always_comb begin
    mem_req = '0;
    if (state == S_REQ) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = job.vaddr[widx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      job       <= '0;
      widx      <= '0;
      ray       <= '0;
      phase     <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      r_e2      <= '0;
      r_s       <= '0;
      r_p       <= '0;
      r_q       <= '0;
      r_det     <= '0;
      for (int i = 0; i < 3; i++) w[i] <= '0;
    end else begin
      rsp_valid <= 1'b0;
      case (state)
        S_IDLE: if (req_valid) begin
          job   <= req;
          widx  <= '0;
          state <= S_REQ;
        end
        S_REQ: if (mem_ready) state <= S_WAIT;
        S_WAIT: if (mem_rsp.valid) begin
          w[widx] <= mem_rsp.rdata;
          if (widx == 2'd2) begin
            ray   <= '0;
            phase <= 1'b0;
            state <= S_CALC;
          end else begin
            widx  <= widx + 1'b1;
            state <= S_REQ;
          end
        end
        S_CALC: begin
          if (!phase) begin
            r_e2  <= e2;
            r_s   <= s;
            r_p   <= p;
            r_q   <= q;
            r_det <= det;
            if (job.mode) rsp.rays[ray].org <= xf;
          end else begin
            if (job.mode) begin
              rsp.rays[ray].dir <= xf;
              rsp.hits[ray]     <= '0;
            end else begin
              rsp.hits[ray] <= '{hit: hit, t: t, u: u, v: v};
              rsp.rays[ray] <= cur;
            end
          end
          phase <= ~phase;
          if (phase) begin
            ray <= ray + 1'b1;
            if (ray == 2'(RAYS - 1)) begin
              rsp_valid <= 1'b1;
              state     <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
