// PE_(l+1)/2: last processing element of the SISO systolic Montgomery multiplier.
//
// It computes the final iteration i = (l+1)/2 of both recurrences.  During A (t1 = 1) it
// uses d_{(l-1)/2}; during B (t1 = 0) the d input is the constant 0, because the B
// recurrence must use d_{(l-1)/2} = 0 in its last step (d_{(l-1)/2} already belongs to A).
// Unlike the other PEs it has no D_i, D_c or D_f registers: the result bit goes straight
// to the output stage, steered as in the reference PE_(l+1)/2 circuit:
//   a_msb_v : first A bit, a^{(l+1)/2}_{l-1}   (t2 & t1)
//   a_v     : any A bit,   a^{(l+1)/2}_{l-1-j} (act & t1)
//   b_lsb_v : first B bit, b^{(l+1)/2}_0       (t2 & ~t1)
//   b_v     : any B bit,   b^{(l+1)/2}_j       (act & ~t1)
// The reference circuit uses tri-state buffers for this steering; here the bit is a single
// output with four valid strobes.  Gating with act (bit in flight) is this design's own
// addition so that the output registers hold the result once the operation ends.
// Timing: purely combinational.
module mmm_pe_last (
  input  logic act,
  input  logic t1,
  input  logic t2,
  input  logic z,
  input  logic c_i,
  input  logic f_i,
  input  logic d_a,      // d_{(l-1)/2}
  input  logic msb_i,    // a^{i-1}_{l-1} / b^{i-1}_0
  input  logic nxt_i,    // a^{i-1}_{l-2-j} / b^{i-1}_{j+1}
  output logic res,      // result coefficient of this cycle
  output logic a_msb_v,
  output logic a_v,
  output logic b_lsb_v,
  output logic b_v
);

  logic d_s;

  always_comb begin
    d_s     = t1 & d_a;  // B phase: constant 0
    res     = (c_i & d_s) ^ (f_i & msb_i) ^ (nxt_i & z);
    a_msb_v = t2 & t1;
    a_v     = act & t1;
    b_lsb_v = t2 & ~t1;
    b_v     = act & ~t1;
  end

endmodule
