// tb_geometry_unit: random triangles and ray packets, checked against a
// Moller-Trumbore reference in real arithmetic (hit flags away from the
// triangle edges, and t, u, v of hits), plus random ray transformations.
// The eight-cycle packet time after the last vertex read is checked too.
module tb_geometry_unit;
  import drpu_pkg::*;
  import tb_fp::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid, req_ready, rsp_valid;
  gu_req_t  req;
  gu_rsp_t  rsp;
  mem_req_t mreq;
  logic     mready;
  mem_rsp_t mrsp;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  geometry_unit dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
                     .mem_req(mreq), .mem_ready(mready), .mem_rsp(mrsp));
  tb_dram_model #(.DEPTH(64), .LATENCY(2)) dram (.clk, .rst_n, .req(mreq), .ready(mready), .rsp(mrsp));

  // cycle count from the third vertex response to rsp_valid
  int nresp, since_last;
  always_ff @(posedge clk) begin
    if (mrsp.valid) begin
      nresp <= nresp + 1;
      if (nresp % 3 == 2) since_last <= 0;
    end else since_last <= since_last + 1;
  end

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  function automatic bit close(input real a, input real b, input real tol);
    real d = a - b;
    if (d < 0) d = -d;
    return d <= tol * (1.0 + (a < 0 ? -a : a));
  endfunction

  real V[3][3];
  real O[4][3], D[4][3];

  function automatic real dot(input real a[3], input real b[3]);
    return a[0]*b[0] + a[1]*b[1] + a[2]*b[2];
  endfunction

  task automatic put_vec(input int addr, input real x, input real y, input real z, input real w);
    dram.mem[addr] = {to_fp(w), to_fp(z), to_fp(y), to_fp(x)};
  endtask

  task automatic run_packet(input logic mode, input logic [3:0] mask, input real tmax[4]);
    @(negedge clk);
    req = '0;
    req.mode = mode;
    req.mask = mask;
    for (int i = 0; i < 4; i++) begin
      req.rays[i].org = '{x: to_fp(O[i][0]), y: to_fp(O[i][1]), z: to_fp(O[i][2])};
      req.rays[i].dir = '{x: to_fp(D[i][0]), y: to_fp(D[i][1]), z: to_fp(D[i][2])};
      req.tmax[i] = to_fp(tmax[i]);
    end
    req.vaddr = {32'd2, 32'd1, 32'd0};
    req_valid = 1'b1;
    @(negedge clk);
    req_valid = 1'b0;
    wait (rsp_valid);
    checks++;
    if (since_last != 8) begin
      failures++;
      $display("FAIL packet took %0d cycles after last vertex", since_last);
    end
    @(negedge clk);
  endtask

  initial begin
    real tmax[4];
    real e1[3], e2[3], s[3], p[3], q[3], det, u, v, t, a, b;
    real M[3][4];
    logic [3:0] mask;
    bit exp_hit, border;
    nresp = 0; since_last = 0;
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 150; n++) begin
      for (int k = 0; k < 3; k++) begin
        for (int c = 0; c < 3; c++) V[k][c] = rnd(-5, 5);
        put_vec(k, V[k][0], V[k][1], V[k][2], 0.0);
        V[k][0] = to_real(to_fp(V[k][0])); V[k][1] = to_real(to_fp(V[k][1]));
        V[k][2] = to_real(to_fp(V[k][2]));
      end
      for (int i = 0; i < 4; i++) begin
        // aim at a barycentric point that may lie outside the triangle
        a = rnd(-0.2, 1.0); b = rnd(-0.2, 1.1 - a);
        for (int c = 0; c < 3; c++) begin
          O[i][c] = to_real(to_fp(rnd(-20, 20)));
          D[i][c] = to_real(to_fp((V[0][c] + a * (V[1][c] - V[0][c]) + b * (V[2][c] - V[0][c]) - O[i][c]) * rnd(0.1, 0.5)));
        end
        tmax[i] = ($urandom_range(0, 4) == 0) ? rnd(0.5, 5) : 1.0e30;
      end
      mask = 4'($urandom_range(1, 15));
      run_packet(1'b0, mask, tmax);
      for (int i = 0; i < 4; i++) begin
        for (int c = 0; c < 3; c++) begin
          e1[c] = V[1][c] - V[0][c]; e2[c] = V[2][c] - V[0][c]; s[c] = O[i][c] - V[0][c];
        end
        p[0] = D[i][1]*e2[2] - D[i][2]*e2[1]; p[1] = D[i][2]*e2[0] - D[i][0]*e2[2]; p[2] = D[i][0]*e2[1] - D[i][1]*e2[0];
        q[0] = s[1]*e1[2] - s[2]*e1[1]; q[1] = s[2]*e1[0] - s[0]*e1[2]; q[2] = s[0]*e1[1] - s[1]*e1[0];
        det = dot(e1, p);
        u = dot(s, p) / det; v = dot(D[i], q) / det; t = dot(e2, q) / det;
        exp_hit = mask[i] && u >= 0 && v >= 0 && u + v <= 1 && t > 0 && t < tmax[i];
        border = (det < 1e-3 && det > -1e-3) || (u > -1e-3 && u < 1e-3) || (v > -1e-3 && v < 1e-3)
                 || (u + v > 1 - 1e-3 && u + v < 1 + 1e-3) || close(t, tmax[i], 1e-3);
        if (!border) begin
          checks++;
          if (rsp.hits[i].hit !== exp_hit) begin
            failures++;
            $display("FAIL pkt %0d ray %0d hit %b exp %b (u=%f v=%f t=%f)", n, i, rsp.hits[i].hit, exp_hit, u, v, t);
          end
          if (exp_hit) n_hit++; else n_miss++;
          if (exp_hit && rsp.hits[i].hit) begin
            checks++;
            if (!close(to_real(rsp.hits[i].t), t, 1e-3) || !close(to_real(rsp.hits[i].u), u, 1e-3)
                || !close(to_real(rsp.hits[i].v), v, 1e-3)) begin
              failures++;
              $display("FAIL pkt %0d ray %0d tuv %f %f %f exp %f %f %f", n, i,
                       to_real(rsp.hits[i].t), to_real(rsp.hits[i].u), to_real(rsp.hits[i].v), t, u, v);
            end
          end
        end
      end
    end
    // transformations
    for (int n = 0; n < 40; n++) begin
      for (int r = 0; r < 3; r++) begin
        for (int c = 0; c < 4; c++) M[r][c] = to_real(to_fp(rnd(-2, 2)));
        put_vec(r, M[r][0], M[r][1], M[r][2], M[r][3]);
      end
      for (int i = 0; i < 4; i++)
        for (int c = 0; c < 3; c++) begin
          O[i][c] = to_real(to_fp(rnd(-5, 5)));
          D[i][c] = to_real(to_fp(rnd(-1, 1)));
        end
      tmax = '{1.0e30, 1.0e30, 1.0e30, 1.0e30};
      run_packet(1'b1, 4'hF, tmax);
      for (int i = 0; i < 4; i++) begin
        real eo[3], ed[3];
        for (int r = 0; r < 3; r++) begin
          eo[r] = M[r][0]*O[i][0] + M[r][1]*O[i][1] + M[r][2]*O[i][2] + M[r][3];
          ed[r] = M[r][0]*D[i][0] + M[r][1]*D[i][1] + M[r][2]*D[i][2];
        end
        checks++;
        if (!close(to_real(rsp.rays[i].org.x), eo[0], 1e-4) || !close(to_real(rsp.rays[i].org.y), eo[1], 1e-4)
            || !close(to_real(rsp.rays[i].org.z), eo[2], 1e-4) || !close(to_real(rsp.rays[i].dir.x), ed[0], 1e-4)
            || !close(to_real(rsp.rays[i].dir.y), ed[1], 1e-4) || !close(to_real(rsp.rays[i].dir.z), ed[2], 1e-4)) begin
          failures++;
          $display("FAIL transform %0d ray %0d", n, i);
        end
      end
    end
    checks++;
    if (n_hit < 20 || n_miss < 20) begin
      failures++;
      $display("FAIL coverage hits %0d misses %0d", n_hit, n_miss);
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
