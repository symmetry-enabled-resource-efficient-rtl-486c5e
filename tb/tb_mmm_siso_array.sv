// Testbench for mmm_siso_array at l = 13: the testbench itself plays the controller
// (t1, t2, z, act and the serial c/f streams for PE_1) and checks, against the word-level
// reference model, A^{(l+1)/2} once its last bit has arrived (cycle 2l-1), and A, B and
// P = C D v^{-(l-1)/2} mod F at cycle 3l-1, the first cycle after the last B bit
// (schedule step 3l-2).  Random C, D and random moduli with f_l = f_0 = 1, plus the
// corner operands 0, 1 and all-ones; operations follow each other with random gaps.
module tb_mmm_siso_array;
  import mmm_pkg::*;
  import mmm_ref_pkg::*;

  localparam int L = 13;

  logic         clk = 1'b0, rst_n = 1'b1;
  ctrl_t        ctl_i;
  logic         c_a, c_b, f_a, f_b;
  logic [L-1:0] d_i, a_o, b_o, p_o;
  logic [L-1:0] c;
  logic [L:0]   f;
  int           checks = 0, failures = 0;

  mmm_siso_array #(.L(L)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(string what, int op, logic [L-1:0] got, logic [L-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("op %0d %s got %h exp %h", op, what, got, exp);
    end
  endtask

  task automatic drive(int t);
    ctl_i = CTRL_IDLE;
    {c_a, c_b, f_a, f_b} = 4'($urandom);   // ignored outside their phase
    if (t >= 0 && t < 2 * L) begin
      ctl_i.act = 1'b1;
      ctl_i.t1  = t < L;
      ctl_i.t2  = t == 1 || t == L + 1;
      ctl_i.z   = !(t == L - 1 || t == 2 * L - 1);
      if (t < L) begin
        c_a = c[L-1-t];
        f_a = f[L-1-t];
      end else begin
        c_b = c[t-L];
        f_b = f[t-L+1];
      end
    end
  endtask

  initial begin
    poly_t pc, pd, pf;
    drive(-1);
    d_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < 300; op++) begin
      pc = rand_poly(L);
      pd = rand_poly(L);
      pf = rand_mod(L);
      if (op == 0) begin pc = '0; end
      if (op == 1) begin pc = 1; pd = 1; end
      if (op == 2) begin pc = '1; pd = '1; pc[W-1:L] = '0; pd[W-1:L] = '0; end
      c   = L'(pc);
      d_i = L'(pd);
      f   = (L+1)'(pf);
      for (int t = 0; t < 3 * L; t++) begin
        drive(t);
        @(posedge clk); #1;
        // now in cycle t+1
        if (t + 1 == 2 * L - 1)
          check_vec("A early", op, a_o, L'(a_part(pc, pd, pf, L)));
      end
      // cycle 3l: the array has been idle for l cycles; result unchanged since 3l-1
      drive(-1);
      check_vec("A", op, a_o, L'(a_part(pc, pd, pf, L)));
      check_vec("B", op, b_o, L'(b_part(pc, pd, pf, L)));
      check_vec("P", op, p_o, L'(mont(pc, pd, pf, L)));
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
