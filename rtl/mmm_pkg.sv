// Shared types for the bit-serial systolic Montgomery multiplier over GF(2^l).
//
// ctrl_t is the control word that travels down the processing-element (PE) chain.
// Each PE works two clock cycles after its predecessor (schedule t = 2i + j), so the
// whole word is delayed by two registers between neighbouring PEs:
//   act : a bit of the current multiplication is in this PE (this design's addition; it
//         only gates the output registers so they hold the result afterwards)
//   t1  : 1 while the PE processes A (d_{l-i}, c_{l-1-j}, f_{l-1-j}), 0 while it processes B
//   t2  : load strobe of the PE's hold register (first result bit of a phase)
//   z   : 0 forces the "next lower coefficient" input to zero (a_{-1} = b_l = 0)
package mmm_pkg;

  typedef struct packed {
    logic act;
    logic t1;
    logic t2;
    logic z;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{act: 1'b0, t1: 1'b0, t2: 1'b0, z: 1'b1};

endpackage
