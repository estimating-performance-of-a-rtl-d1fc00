// tb_fp: conversions between real and binary32 bit patterns for testbenches,
// done through the 64-bit real encoding. to_fp rounds to nearest; denormal
// and out-of-range values go to zero and infinity.
package tb_fp;
  function automatic logic [31:0] to_fp(input real r);
    logic [63:0] d;
    int          e;
    logic [52:0] m;
    logic [24:0] mr;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mr = 25'(m[52:29]) + 25'(m[28]);
    if (mr[24]) begin
      mr = mr >> 1;
      e = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
endpackage
