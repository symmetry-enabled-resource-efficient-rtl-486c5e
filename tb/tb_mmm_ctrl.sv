// Testbench for mmm_ctrl: after a start pulse every output is compared, cycle by cycle,
// with the waveforms the array expects (t counts from the cycle after the start edge):
// A streams c_{l-1-t}, f_{l-1-t} and t1 = 1 for t < l; B streams c_{t-l}, f_{t-l+1} for
// l <= t < 2l; t2 at t = 1 and l+1; z = 0 at t = l-1 and 2l-1; busy until t = 3l-2 and a
// one-cycle done at t = 3l-1.  A start during busy must be ignored.
module tb_mmm_ctrl;
  import mmm_pkg::*;
  import mmm_ref_pkg::*;

  localparam int L = 11;

  logic         clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [L-1:0] c_i;
  logic [L:0]   f_i;
  ctrl_t        ctl_o;
  logic         c_a, c_b, f_a, f_b, busy, done;
  int           checks = 0, failures = 0;

  mmm_ctrl #(.L(L)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, int t, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("t=%0d %s got %b exp %b", t, what, got, exp);
    end
  endtask

  initial begin
    c_i = '0;
    f_i = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < 6; op++) begin
      c_i = L'(rand_poly(L));
      f_i = (L+1)'(rand_mod(L));
      repeat (3) @(posedge clk);
      #1;
      expect_bit("idle act", -1, ctl_o.act, 1'b0);
      expect_bit("idle t2", -1, ctl_o.t2, 1'b0);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      for (int t = 0; t <= 3 * L - 1; t++) begin
        // a start while busy must change nothing
        start = (t == 4);
        expect_bit("busy", t, busy, t <= 3 * L - 2);
        expect_bit("done", t, done, t == 3 * L - 1);
        expect_bit("act", t, ctl_o.act, t < 2 * L);
        if (t < 2 * L) begin
          expect_bit("t1", t, ctl_o.t1, t < L);
          expect_bit("t2", t, ctl_o.t2, t == 1 || t == L + 1);
          expect_bit("z", t, ctl_o.z, !(t == L - 1 || t == 2 * L - 1));
        end
        if (t < L) begin
          expect_bit("c_a", t, c_a, c_i[L-1-t]);
          expect_bit("f_a", t, f_a, f_i[L-1-t]);
        end else if (t < 2 * L) begin
          expect_bit("c_b", t, c_b, c_i[t-L]);
          expect_bit("f_b", t, f_b, f_i[t-L+1]);
        end
        @(posedge clk); #1;
        start = 1'b0;
      end
      expect_bit("done low", 3 * L, done, 1'b0);
      expect_bit("busy low", 3 * L, busy, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
