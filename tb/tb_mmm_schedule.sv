// Schedule test of the systolic array at l = 5 (three PEs), run through mmm_top.
//
// Checks, cycle by cycle, that every PE computes the coefficient the schedule assigns to
// it: with t = 0 the first computing cycle of PE_1, PE_i works on coefficient j of the A
// phase at t = 2(i-1) + j and on coefficient j of the B phase at t = l + 2(i-1) + j.  For
// PE_1 and PE_2 the D_i register must hold a^i_{l-1-j} (resp. b^i_j) one cycle later, and
// the hold register must hold a^i_{l-1} (resp. b^i_0) during the l cycles PE_{i+1} reads it;
// for the last PE the unregistered result bit is checked in its own cycle.  Expected values
// are the intermediate words A^i and B^i of the word-level recurrences.  Random C, D and
// moduli of degree 5 with f_5 = f_0 = 1.
module tb_mmm_schedule;
  import mmm_ref_pkg::*;

  localparam int L   = 5;
  localparam int NPE = (L + 1) / 2;

  logic         clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [L-1:0] c_i, d_i, p_o;
  logic [L:0]   f_i;
  logic         busy, done;
  int           checks = 0, failures = 0;

  mmm_top #(.L(L)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (100000) @(posedge clk);
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

  // D_i register / hold register of PE_k (k < NPE) are the inputs of PE_{k+1}
  function automatic logic pe_nxt(int k);
    return dut.u_array.nxt_s[k + 1];
  endfunction
  function automatic logic pe_msb(int k);
    return dut.u_array.msb_s[k + 1];
  endfunction

  initial begin
    poly_t c, d, f;
    poly_t a [0:NPE];
    poly_t b [0:NPE];
    c_i = '0;
    d_i = '0;
    f_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < 200; op++) begin
      c = rand_poly(L);
      d = rand_poly(L);
      f = rand_mod(L);
      a[0] = '0;
      b[0] = '0;
      for (int i = 1; i <= NPE; i++) begin
        a[i] = mulmod(a[i-1], poly_t'(2), f, L);
        if (d[L-i]) a[i] ^= c;
        b[i] = vinv(b[i-1], f, L);
        if (i < NPE && d[i-1]) b[i] ^= c;
      end
      c_i = L'(c);
      d_i = L'(d);
      f_i = (L+1)'(f);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      // now t = 0
      for (int t = 0; t < 3 * L; t++) begin
        for (int k = 1; k < NPE; k++) begin
          automatic int ja = t - 1 - 2 * (k - 1);   // coefficient held in D_k
          automatic int jb = ja - L;
          automatic int ua = t - 2 * k;   // coefficient PE_{k+1} works on
          if (ja >= 0 && ja < L) expect_bit($sformatf("PE%0d D_i A", k), t, pe_nxt(k), a[k][L-1-ja]);
          if (jb >= 0 && jb < L) expect_bit($sformatf("PE%0d D_i B", k), t, pe_nxt(k), b[k][jb]);
          if (ua >= 0 && ua < L)
            expect_bit($sformatf("PE%0d hold A", k), t, pe_msb(k), a[k][L-1]);
          if (ua - L >= 0 && ua - L < L)
            expect_bit($sformatf("PE%0d hold B", k), t, pe_msb(k), b[k][0]);
        end
        begin
          automatic int j = t - 2 * (NPE - 1);
          if (j >= 0 && j < L)
            expect_bit("PE_last A", t, dut.u_array.res, a[NPE][L-1-j]);
          if (j - L >= 0 && j - L < L)
            expect_bit("PE_last B", t, dut.u_array.res, b[NPE][j-L]);
        end
        @(posedge clk); #1;
      end
      checks++;
      if (p_o !== L'(a[NPE] ^ b[NPE]) || p_o !== L'(mont(c, d, f, L))) begin
        failures++;
        $display("op %0d P got %h exp %h", op, p_o, L'(mont(c, d, f, L)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
