// Output stage of the SISO systolic Montgomery multiplier: SR-A, SR-B, the two separate
// result flip-flops and the bank of l two-input XOR gates.
//
// The last PE delivers A^{(l+1)/2} most significant bit first, then B^{(l+1)/2} least
// significant bit first, one bit per cycle on `bit_i`, with strobes saying what it is:
//   a_msb_v : a_{l-1}, stored in its own flip-flop
//   a_v     : an A bit; SR-A (l-1 bits) shifts towards its high end, so after the l A bits
//             it holds a_{l-2}..a_0 and a_{l-1} has dropped out of its top
//   b_lsb_v : b_0, stored in its own flip-flop
//   b_v     : a B bit; SR-B (l-1 bits) shifts towards its low end, so after the l B bits it
//             holds b_{l-1}..b_1 and b_0 has dropped out of its bottom
// P = A ^ B bit by bit: p_j = a_j ^ b_j.  The registers keep their contents while no strobe
// is high, so P stays valid until the next operation.  Asynchronous active-low clear.
module mmm_out_unit #(
  parameter int unsigned L = 233   // field degree l
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_i,
  input  logic         a_msb_v,
  input  logic         a_v,
  input  logic         b_lsb_v,
  input  logic         b_v,
  output logic [L-1:0] a_o,       // A^{(l+1)/2}
  output logic [L-1:0] b_o,       // B^{(l+1)/2}
  output logic [L-1:0] p_o        // P = A ^ B
);

  logic [L-2:0] sr_a, sr_b;
  logic         a_msb, b_lsb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_a  <= '0;
      sr_b  <= '0;
      a_msb <= 1'b0;
      b_lsb <= 1'b0;
    end else begin
      if (a_msb_v) a_msb <= bit_i;
      if (b_lsb_v) b_lsb <= bit_i;
      if (a_v)     sr_a  <= {sr_a[L-3:0], bit_i};
      if (b_v)     sr_b  <= {bit_i, sr_b[L-2:1]};
    end
  end

  always_comb begin
    a_o = {a_msb, sr_a};
    b_o = {sr_b, b_lsb};
    p_o = a_o ^ b_o;
  end

endmodule
