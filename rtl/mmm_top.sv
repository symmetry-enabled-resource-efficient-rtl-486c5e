// Montgomery modular multiplier over GF(2^l) built on a bit-serial SISO systolic array.
//
// Computes P = C * D * v^{-(l-1)/2} mod F for an irreducible F = v^l + ... + 1 (general
// polynomial, supplied as an input) and odd l.  With the Montgomery factor Q = v^{(l-1)/2},
// C = sigma*Q and D = mu*Q give P = sigma*mu*Q; a second pass with D = 1 removes the factor.
//
// Interface: on a `start` pulse while not busy, C, D and F are registered; the controller
// then streams C and F bit-serially into the array (d bits go in parallel) and `done`
// pulses 3l cycles after the start edge (the array's 3l-2 schedule steps, plus one cycle
// to register the last bit and one to start).  p_o holds the result from `done` until the
// next start.  One multiplication at a time.  Asynchronous active-low reset.
module mmm_top
  import mmm_pkg::*;
#(
  parameter int unsigned L = 233   // field degree l (odd); 233 as in the evaluated field
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [L-1:0] c_i,
  input  logic [L-1:0] d_i,
  input  logic [L:0]   f_i,    // f_l .. f_0, f_l = f_0 = 1
  output logic         busy,
  output logic         done,
  output logic [L-1:0] p_o
);

  logic [L-1:0] c_q, d_q;
  logic [L:0]   f_q;
  ctrl_t        ctl;
  logic         c_a, c_b, f_a, f_b;
  logic [L-1:0] a_unused, b_unused;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      d_q <= '0;
      f_q <= '0;
    end else if (start && !busy) begin
      c_q <= c_i;
      d_q <= d_i;
      f_q <= f_i;
    end
  end

  mmm_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .start, .c_i(c_q), .f_i(f_q),
    .ctl_o(ctl), .c_a, .c_b, .f_a, .f_b, .busy, .done
  );

  mmm_siso_array #(.L(L)) u_array (
    .clk, .rst_n, .ctl_i(ctl), .c_a, .c_b, .f_a, .f_b, .d_i(d_q),
    .a_o(a_unused), .b_o(b_unused), .p_o
  );

endmodule
