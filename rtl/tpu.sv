// tpu: Traversal Processing Unit, the per-ray datapath of one B-KD tree
// traversal step. Combinational; the traversal processor uses four of them
// side by side, one per ray of a packet, and registers their results.
//
// Following the source (B-KD traversal, Figure 4): the ray is intersected
// with the four planes that bound the node's two children along the node's
// split axis, giving the intervals I0 and I1 along the ray. A child is
// entered iff its interval overlaps the ray's traversal interval
// I = [near, far]; the interval handed to the child is the intersection of I
// and I_k (two min/max operations). Early ray termination: a ray whose
// current closest hit lies before near takes no further part. Clipping far
// to the current hit distance as well is this design's choice.
//
// Inputs are the ray origin and reciprocal direction along the node axis.
// Plane distances are (plane - origin) * (1/direction); a negative reciprocal
// swaps entry and exit, handled by min/max.
module tpu
  import drpu_pkg::*;
(
  input  fp32_t org_a,     // ray origin component on the node axis
  input  fp32_t inv_a,     // 1 / ray direction component on the node axis
  input  ival_t ival,      // traversal interval [near, far]
  input  fp32_t hit_dist,  // distance of the closest hit so far (inf if none)
  input  fp32_t c0_lo,
  input  fp32_t c0_hi,
  input  fp32_t c1_lo,
  input  fp32_t c1_hi,
  output logic  terminated,  // closest hit lies before near
  output logic  in0,         // interval of child 0 overlaps I
  output logic  in1,         // interval of child 1 overlaps I
  output ival_t ival0,       // I intersected with I0
  output ival_t ival1        // I intersected with I1
);
  fp32_t t0a, t0b, t1a, t1b, far_c;

  always_comb begin
    t0a   = fp_mul(fp_sub(c0_lo, org_a), inv_a);
    t0b   = fp_mul(fp_sub(c0_hi, org_a), inv_a);
    t1a   = fp_mul(fp_sub(c1_lo, org_a), inv_a);
    t1b   = fp_mul(fp_sub(c1_hi, org_a), inv_a);
    far_c = fp_min(ival.hi, hit_dist);
    ival0.lo = fp_max(ival.lo, fp_min(t0a, t0b));
    ival0.hi = fp_min(far_c,   fp_max(t0a, t0b));
    ival1.lo = fp_max(ival.lo, fp_min(t1a, t1b));
    ival1.hi = fp_min(far_c,   fp_max(t1a, t1b));
    terminated = fp_lt(hit_dist, ival.lo);
    in0 = !terminated && fp_le(ival0.lo, ival0.hi);
    in1 = !terminated && fp_le(ival1.lo, ival1.hi);
  end
endmodule
