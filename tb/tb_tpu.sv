// tb_tpu: random rays and node bounds against a reference traversal step
// computed in real arithmetic. Interval ends must agree to a small relative
// error; overlap flags are checked wherever the reference is not within that
// error of the decision boundary.
module tb_tpu;
  import drpu_pkg::*;
  import tb_fp::*;

  fp32_t org_a, inv_a, hit_dist, c0_lo, c0_hi, c1_lo, c1_hi;
  ival_t ival, ival0, ival1;
  logic  terminated, in0, in1;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_term = 0;

  tpu dut (.*);

  function automatic bit close(input real a, input real b);
    real d = a - b;
    if (d < 0) d = -d;
    return d <= 1e-4 * ((a < 0 ? -a : a) + (b < 0 ? -b : b)) + 1e-6;
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic check_child(input string nm, input real blo, input real bhi,
                             input real o, input real inv, input real nr, input real fr,
                             input logic got_in, input ival_t got);
    real ta, tb, lo, hi;
    ta = (blo - o) * inv;
    tb = (bhi - o) * inv;
    lo = (ta < tb) ? ta : tb;
    hi = (ta < tb) ? tb : ta;
    if (nr > lo) lo = nr;
    if (fr < hi) hi = fr;
    if (!close(lo, hi)) begin
      checks++;
      if (got_in !== (lo <= hi)) begin
        failures++;
        $display("FAIL %s overlap got %b exp [%f,%f]", nm, got_in, lo, hi);
      end
      if (lo <= hi) n_in++; else n_out++;
    end
    checks++;
    if (!close(to_real(got.lo), lo) || !close(to_real(got.hi), hi)) begin
      failures++;
      $display("FAIL %s interval got [%f,%f] exp [%f,%f]", nm, to_real(got.lo), to_real(got.hi), lo, hi);
    end
  endtask

  initial begin
    real o, d, nr, fr, h, a, b, c, e, fr_c;
    for (int i = 0; i < 4000; i++) begin
      o  = rnd(-10, 10);
      d  = rnd(-1, 1);
      if (d > -0.01 && d < 0.01) d = 0.5;
      nr = rnd(0, 5);
      fr = nr + rnd(0, 30);
      h  = ($urandom_range(0, 3) == 0) ? rnd(0, 40) : 1.0e30;
      a = rnd(-12, 12); b = a + rnd(0, 8);
      c = rnd(-12, 12); e = c + rnd(0, 8);
      org_a = to_fp(o); inv_a = to_fp(1.0 / d);
      ival.lo = to_fp(nr); ival.hi = to_fp(fr);
      hit_dist = (h > 1e29) ? FP_INF : to_fp(h);
      c0_lo = to_fp(a); c0_hi = to_fp(b); c1_lo = to_fp(c); c1_hi = to_fp(e);
      #1;
      fr_c = (h < fr) ? h : fr;
      checks++;
      if (terminated !== (h < nr)) begin
        failures++;
        $display("FAIL terminated got %b h=%f near=%f", terminated, h, nr);
      end
      if (h < nr) n_term++;
      else begin
        check_child("c0", to_real(c0_lo), to_real(c0_hi), to_real(org_a), to_real(inv_a),
                    to_real(ival.lo), fr_c, in0, ival0);
        check_child("c1", to_real(c1_lo), to_real(c1_hi), to_real(org_a), to_real(inv_a),
                    to_real(ival.lo), fr_c, in1, ival1);
      end
    end
    checks++;
    if (n_in == 0 || n_out == 0 || n_term == 0) begin
      failures++;
      $display("FAIL coverage in=%0d out=%0d term=%0d", n_in, n_out, n_term);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
