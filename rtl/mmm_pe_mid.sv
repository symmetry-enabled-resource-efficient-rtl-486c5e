// PE_i (1 < i < (l+1)/2): intermediate processing element of the SISO systolic
// Montgomery multiplier.
//
// It computes iteration i of both recurrences, one coefficient per clock, from what PE_{i-1}
// delivers two cycles earlier in the schedule:
//   A phase (t1 = 1): a^i_{l-1-j} = a^{i-1}_{l-2-j} ^ (a^{i-1}_{l-1} & f_{l-1-j}) ^ (d_{l-i} & c_{l-1-j})
//   B phase (t1 = 0): b^i_j       = b^{i-1}_{j+1}   ^ (b^{i-1}_0     & f_{j+1})   ^ (d_{i-1} & c_j)
// Only the d bit differs between the phases; t1 picks it (a tri-state pair in the
// reference circuit, a 2:1 selection here).  c, f, the held bit (msb_i) and the coefficient
// stream (nxt_i) come from PE_{i-1} already in the right order.  The result bit is
// registered in D_i (nxt_o); with t2 high it is copied into the hold register (msb_o) for
// PE_{i+1}.  c and f pass through two registers each.  z = 0 zeroes nxt_i.
//
// Gate network and registers follow the reference PE_i circuit; flip-flops with an
// asynchronous active-low clear are this design's choice.  All outputs are registered.
module mmm_pe_mid (
  input  logic clk,
  input  logic rst_n,
  input  logic t1,     // 1: A phase, 0: B phase
  input  logic t2,     // load the hold register
  input  logic z,      // 0: force nxt_i to 0
  input  logic c_i,
  input  logic f_i,
  input  logic d_a,    // d_{l-i}
  input  logic d_b,    // d_{i-1}
  input  logic msb_i,  // a^{i-1}_{l-1} / b^{i-1}_0
  input  logic nxt_i,  // a^{i-1}_{l-2-j} / b^{i-1}_{j+1}
  output logic c_o,
  output logic f_o,
  output logic msb_o,  // held a^i_{l-1} / b^i_0
  output logic nxt_o   // a^i_{l-1-j} / b^i_j stream
);

  logic d_s, res;
  logic c_d1, f_d1;

  always_comb begin
    d_s = t1 ? d_a : d_b;
    res = (c_i & d_s) ^ (f_i & msb_i) ^ (nxt_i & z);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_d1  <= 1'b0;
      c_o   <= 1'b0;
      f_d1  <= 1'b0;
      f_o   <= 1'b0;
      nxt_o <= 1'b0;
      msb_o <= 1'b0;
    end else begin
      c_d1  <= c_i;
      c_o   <= c_d1;
      f_d1  <= f_i;
      f_o   <= f_d1;
      nxt_o <= res;
      if (t2) msb_o <= nxt_o;
    end
  end

endmodule
