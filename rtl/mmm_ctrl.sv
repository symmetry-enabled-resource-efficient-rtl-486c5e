// Controller of the SISO systolic Montgomery multiplier.
//
// After `start` it runs one multiplication of 3l-1 cycles (cycle count t = 0 .. 3l-2):
//   * serial operand streams for PE_1: during t = 0..l-1 the A streams c_{l-1-t}, f_{l-1-t};
//     during t = l..2l-1 the B streams c_{t-l}, f_{t-l+1}
//   * t1 = 1 for t < l (A phase), 0 afterwards
//   * t2 = 1 at t = 1 and t = l+1, when PE_1's D_i register holds a^1_{l-1} and b^1_0
//   * z  = 0 at t = l-1 and t = 2l-1, the last coefficient of each phase, where the
//     next-lower-coefficient input must be the zero a_{-1} / b_l
//   * act = 1 for t < 2l
// These waveforms are PE_1's; the array delays them for the later PEs.  The last PE emits
// its final B bit at t = 3l-2; `done` pulses for one cycle at t = 3l-1, when P is valid.
// `busy` is high from the cycle after `start` until t = 3l-2; `start` is ignored while busy.
// The serial streams are picked out of the operand registers by indexing with t; the index
// words ka/kb are as wide as the counter, and only their low bits address the operands
// (the upper bits are zero whenever the index is used), which lint reports as unused bits.
// Assertions: done is never high while busy, and t2 and a z pulse only occur inside an
// operation.
// What the waveforms must do follows the reference design; the counter, the start/busy/done
// handshake and the exact t2 instants are this design's choices.
module mmm_ctrl
  import mmm_pkg::*;
#(
  parameter int unsigned L = 233   // field degree l
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [L-1:0] c_i,    // C, held stable while busy
  input  logic [L:0]   f_i,    // F = f_l .. f_0, held stable while busy
  output ctrl_t        ctl_o,  // control word for PE_1
  output logic         c_a,    // c_{l-1-t}
  output logic         c_b,    // c_{t-l}
  output logic         f_a,    // f_{l-1-t}
  output logic         f_b,    // f_{t-l+1}
  output logic         busy,
  output logic         done
);

  localparam int unsigned CW = $clog2(3 * L);
  localparam logic [CW-1:0] LAST = CW'(3 * L - 2);
  localparam logic [CW-1:0] LL   = CW'(L);
  localparam int unsigned CIW = $clog2(L);       // index width of c_i
  localparam int unsigned FIW = $clog2(L + 1);   // index width of f_i

  logic [CW-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (t == LAST) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        t    <= '0;
      end
    end
  end

  logic           a_ph, b_ph;
  logic [CW-1:0]  ka, kb;   // A-phase index l-1-t, B-phase index t-l

  always_comb begin
    a_ph = busy && (t < LL);
    b_ph = busy && (t >= LL) && (t < 2 * LL);

    ctl_o.act = a_ph || b_ph;
    ctl_o.t1  = a_ph;
    ctl_o.t2  = busy && ((t == CW'(1)) || (t == LL + CW'(1)));
    ctl_o.z   = !(busy && ((t == LL - CW'(1)) || (t == 2 * LL - CW'(1))));

    ka = LL - CW'(1) - t;
    kb = t - LL;

    c_a = 1'b0;
    f_a = 1'b0;
    c_b = 1'b0;
    f_b = 1'b0;
    if (a_ph) begin
      c_a = c_i[CIW'(ka)];
      f_a = f_i[FIW'(ka)];
    end
    if (b_ph) begin
      c_b = c_i[CIW'(kb)];
      f_b = f_i[FIW'(kb) + FIW'(1)];
    end
  end

  // Handshake and control rules
  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_t2_in_op:      assert property (@(posedge clk) disable iff (!rst_n) ctl_o.t2 |-> ctl_o.act);
  a_z_in_op:       assert property (@(posedge clk) disable iff (!rst_n) !ctl_o.z |-> ctl_o.act);

endmodule
