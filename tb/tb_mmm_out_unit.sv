// Testbench for mmm_out_unit: random A and B vectors are sent as the last PE sends them
// (A MSB first with the first bit also strobed into the MSB flip-flop, then B LSB first
// with the first bit strobed into the LSB flip-flop), followed by idle cycles with random
// data and no strobes.  A, B and P = A ^ B must be reassembled and must then hold.
module tb_mmm_out_unit;
  import mmm_ref_pkg::*;

  localparam int L = 233;

  logic         clk = 1'b0, rst_n = 1'b1;
  logic         bit_i, a_msb_v, a_v, b_lsb_v, b_v;
  logic [L-1:0] a_o, b_o, p_o;
  logic [L-1:0] ea, eb;
  int           checks = 0, failures = 0;

  mmm_out_unit #(.L(L)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    {a_msb_v, a_v, b_lsb_v, b_v} = '0;
    bit_i = 1'($urandom);
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < 20; op++) begin
      ea = L'(rand_poly(L));
      eb = L'(rand_poly(L));
      for (int j = 0; j < L; j++) begin
        {a_msb_v, a_v, b_lsb_v, b_v} = {j == 0, 1'b1, 2'b00};
        bit_i = ea[L-1-j];
        @(posedge clk); #1;
      end
      for (int j = 0; j < L; j++) begin
        {a_msb_v, a_v, b_lsb_v, b_v} = {2'b00, j == 0, 1'b1};
        bit_i = eb[j];
        @(posedge clk); #1;
      end
      for (int k = 0; k < 5; k++) begin
        idle();
        @(posedge clk); #1;
        checks++;
        if (a_o !== ea || b_o !== eb || p_o !== (ea ^ eb)) begin
          failures++;
          if (failures < 10) $display("mismatch op=%0d k=%0d", op, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
