// PE_1: first processing element of the SISO systolic Montgomery multiplier.
//
// It computes iteration i = 1 of both recurrences, one coefficient per clock:
//   A phase (t1 = 1): a^1_{l-1-j} = a^0_{l-2-j} ^ (a^0_{l-1} & f_{l-1-j}) ^ (d_{l-1} & c_{l-1-j})
//   B phase (t1 = 0): b^1_j       = b^0_{j+1}   ^ (b^0_0     & f_{j+1})   ^ (d_0     & c_j)
// The t1 selection in front of the gates stands for the pairs of tri-state buffers of the
// reference structure (one enabled at t1 = 1, its partner at t1 = 0); here it is a plain
// 2:1 selection.  The result bit goes to register D_i (output nxt_o, the stream of all
// coefficients) and, when t2 is high, is copied into a second register that holds it for
// the next PE (output msb_o: a^1_{l-1} during A, b^1_0 during B).  The selected c and f
// bits leave through two registers each (D_c D_c, D_f D_f), matching the two-cycle offset
// of the next PE.  z = 0 zeroes the a_{-1}/b_l input through an AND gate.
//
// The gate network follows the PE_1 circuit of the reference design.  The registers are
// edge-triggered flip-flops cleared by an asynchronous active-low reset ("all latches
// must be cleared before operation"); using flip-flops is this design's choice.
// Timing: combinational from the inputs to the D_i register; every output is registered.
module mmm_pe_first (
  input  logic clk,
  input  logic rst_n,
  input  logic t1,      // 1: A phase, 0: B phase
  input  logic t2,      // load the hold register
  input  logic z,       // 0: force the next-lower-coefficient input to 0
  input  logic c_a,     // c_{l-1-j}
  input  logic c_b,     // c_j
  input  logic d_a,     // d_{l-1}
  input  logic d_b,     // d_0
  input  logic f_a,     // f_{l-1-j}
  input  logic f_b,     // f_{j+1}
  input  logic msb_a,   // a^0_{l-1}
  input  logic msb_b,   // b^0_0
  input  logic nxt_a,   // a^0_{l-2-j}
  input  logic nxt_b,   // b^0_{j+1}
  output logic c_o,     // c, two cycles later
  output logic f_o,     // f, two cycles later
  output logic msb_o,   // held a^1_{l-1} / b^1_0
  output logic nxt_o    // a^1_{l-1-j} / b^1_j stream
);

  logic c_s, d_s, f_s, msb_s, nxt_s, res;
  logic c_d1, f_d1;

  always_comb begin
    c_s   = t1 ? c_a   : c_b;
    d_s   = t1 ? d_a   : d_b;
    f_s   = t1 ? f_a   : f_b;
    msb_s = t1 ? msb_a : msb_b;
    nxt_s = t1 ? nxt_a : nxt_b;
    res   = (c_s & d_s) ^ (f_s & msb_s) ^ (nxt_s & z);
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
      c_d1  <= c_s;
      c_o   <= c_d1;
      f_d1  <= f_s;
      f_o   <= f_d1;
      nxt_o <= res;
      if (t2) msb_o <= nxt_o;
    end
  end

endmodule
