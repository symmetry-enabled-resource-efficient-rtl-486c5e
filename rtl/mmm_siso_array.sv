// Serial-in/serial-out (SISO) bit-serial systolic array for Montgomery multiplication
// over GF(2^l), P = C * D * v^{-(l-1)/2} mod F, l odd.
//
// The array has (l+1)/2 PEs; PE_i performs iteration i of the two independent recurrences
//   A^i = A^{i-1} v mod F + C d_{l-i}        (A^0 = 0)
//   B^i = B^{i-1} v^{-1} mod F + C d_{i-1}   (B^0 = 0, d_{(l-1)/2} replaced by 0 in B)
// on one shared datapath: first the l coefficients of A (t1 = 1, MSB first), then the l
// coefficients of B (t1 = 0, LSB first).  PE_i handles coefficient j at cycle
// 2(i-1) + j of its phase; c, f, the held bit and the coefficient stream move from PE to PE
// through registers, the d bits are fixed per PE and come in parallel.  The control word
// for PE_1 comes from outside; a D_t pair (mmm_ctrl_delay) in front of every later PE
// delays it by two cycles.  The output unit collects A and B from the last PE and XORs them.
//
// Timing, with cycle 0 the first A cycle of PE_1 (ctl_i.t1 = 1, ctl_i.act = 1): PE_1 takes
// the A streams at cycles 0..l-1 and the B streams at l..2l-1.  The last PE emits
// A at cycles l-1..2l-2 and B at cycles 2l-1..3l-2, so p_o is valid from cycle 3l-1 on and
// holds until the next operation.  The serial operand inputs are sampled combinationally
// by PE_1 in the cycle they are presented.
module mmm_siso_array
  import mmm_pkg::*;
#(
  parameter int unsigned L = 233   // field degree l (odd, at least 3)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_t        ctl_i,   // control word for PE_1
  input  logic         c_a,     // c_{l-1-j} (A phase stream)
  input  logic         c_b,     // c_j       (B phase stream)
  input  logic         f_a,     // f_{l-1-j}
  input  logic         f_b,     // f_{j+1}
  input  logic [L-1:0] d_i,     // D, parallel
  output logic [L-1:0] a_o,     // A^{(l+1)/2}
  output logic [L-1:0] b_o,     // B^{(l+1)/2}
  output logic [L-1:0] p_o      // P
);

  localparam int unsigned NPE = (L + 1) / 2;

  // Signals entering PE_k (ctl: k = 1..NPE, the others k = 2..NPE)
  ctrl_t ctl   [1:NPE];
  ctrl_t ctl_m [2:NPE];
  logic  c_s   [2:NPE];
  logic  f_s   [2:NPE];
  logic  msb_s [2:NPE];
  logic  nxt_s [2:NPE];

  logic res, a_msb_v, a_v, b_lsb_v, b_v;

  assign ctl[1] = ctl_i;

  // D_t pairs
  for (genvar k = 2; k <= NPE; k++) begin : g_dt
    mmm_ctrl_delay u_dt (
      .clk, .rst_n, .d(ctl[k-1]), .q_mid(ctl_m[k]), .q(ctl[k])
    );
  end

  // PE_1; A^0 = B^0 = 0
  mmm_pe_first u_pe1 (
    .clk, .rst_n,
    .t1(ctl[1].t1), .t2(ctl[1].t2), .z(ctl[1].z),
    .c_a, .c_b, .d_a(d_i[L-1]), .d_b(d_i[0]), .f_a, .f_b,
    .msb_a(1'b0), .msb_b(1'b0), .nxt_a(1'b0), .nxt_b(1'b0),
    .c_o(c_s[2]), .f_o(f_s[2]), .msb_o(msb_s[2]), .nxt_o(nxt_s[2])
  );

  // PE_2 .. PE_{NPE-1}
  for (genvar k = 2; k < NPE; k++) begin : g_pe
    mmm_pe_mid u_pe (
      .clk, .rst_n,
      .t1(ctl[k].t1), .t2(ctl[k].t2), .z(ctl[k].z),
      .c_i(c_s[k]), .f_i(f_s[k]), .d_a(d_i[L-k]), .d_b(d_i[k-1]),
      .msb_i(msb_s[k]), .nxt_i(nxt_s[k]),
      .c_o(c_s[k+1]), .f_o(f_s[k+1]), .msb_o(msb_s[k+1]), .nxt_o(nxt_s[k+1])
    );
  end

  // PE_{(l+1)/2}: t2 taken one register earlier (it has no D_i register)
  mmm_pe_last u_pel (
    .act(ctl[NPE].act), .t1(ctl[NPE].t1), .t2(ctl_m[NPE].t2), .z(ctl[NPE].z),
    .c_i(c_s[NPE]), .f_i(f_s[NPE]), .d_a(d_i[L-NPE]),
    .msb_i(msb_s[NPE]), .nxt_i(nxt_s[NPE]),
    .res, .a_msb_v, .a_v, .b_lsb_v, .b_v
  );

  mmm_out_unit #(.L(L)) u_out (
    .clk, .rst_n, .bit_i(res), .a_msb_v, .a_v, .b_lsb_v, .b_v, .a_o, .b_o, .p_o
  );

  // l must be odd and at least 3
  initial begin
    assert (L >= 3 && (L % 2) == 1)
      else $error("mmm_siso_array: L must be odd and at least 3");
  end

endmodule
