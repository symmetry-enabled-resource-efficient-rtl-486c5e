// Control delay stage between two neighbouring PEs (the D_t D_t pair).
//
// PE_{i+1} processes the same coefficient two cycles after PE_i (schedule t = 2i + j), so
// its control word is the one of PE_i delayed by two registers.  The reference structure
// places this pair on t2 only and broadcasts t1 and Z; here the whole control word
// (act, t1, t2, z) goes through the pair, because the PEs enter and leave the A and B
// phases two cycles apart and a broadcast t1 or Z would act on the wrong coefficient in
// all but the first PE.  q_mid is the word after the first register; the last PE takes
// its t2 from there, as it has no D_i register and produces each bit one cycle earlier.
// Reset clears both stages to the idle word.
module mmm_ctrl_delay
  import mmm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t d,
  output ctrl_t q_mid,
  output ctrl_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_mid <= CTRL_IDLE;
      q     <= CTRL_IDLE;
    end else begin
      q_mid <= d;
      q     <= q_mid;
    end
  end

endmodule
