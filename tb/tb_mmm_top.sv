// End-to-end testbench for mmm_top at its default size, l = 233, with the trinomial
// F = v^233 + v^74 + 1 and with random moduli (f_233 = f_0 = 1).
//
// Each operation is checked against the word-level reference P = C D v^{-116} mod F.  A
// full Montgomery round trip is also run: sigma and mu are mapped to C = sigma Q and
// D = mu Q (Q = v^116, by the reference model), the multiplier gives P, and a second pass
// with D = 1 must return sigma*mu mod F.  The latency from the start edge to done must be
// 3l cycles (3l-2 schedule steps plus start and capture).  The testbench counts the
// mechanisms of the array and fails if one never happens: the A-to-B switch of t1 at the
// last PE, t2 hold loads at the last PE, z actually clearing a 1 on a next-coefficient
// input, and a start that is ignored because the unit is busy.
module tb_mmm_top;
  import mmm_ref_pkg::*;

  localparam int L   = 233;
  localparam int NPE = (L + 1) / 2;

  logic         clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [L-1:0] c_i, d_i, p_o;
  logic [L:0]   f_i;
  logic         busy, done;
  int           checks = 0, failures = 0;
  int           n_t1_switch = 0, n_t2_hold = 0, n_z_clear = 0, n_start_ignored = 0;

  mmm_top dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed at the last PE
  logic last_t1 = 1'b0;
  always @(posedge clk) begin
    if (dut.u_array.ctl[NPE].act) begin
      if (last_t1 && !dut.u_array.ctl[NPE].t1) n_t1_switch++;
      if (!dut.u_array.ctl[NPE].z && dut.u_array.nxt_s[NPE]) n_z_clear++;
    end
    if (dut.u_array.ctl_m[NPE].t2) n_t2_hold++;
    last_t1 <= dut.u_array.ctl[NPE].act && dut.u_array.ctl[NPE].t1;
  end

  task automatic run(poly_t c, poly_t d, poly_t f, output poly_t p);
    int cyc = 0;
    c_i = L'(c);
    d_i = L'(d);
    f_i = (L+1)'(f);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // a second start while busy, with other operands, must be ignored
    if ($urandom_range(0, 1) == 1) begin
      c_i = ~c_i;
      start = 1'b1;
      n_start_ignored++;
    end
    while (!done) begin
      @(posedge clk); #1;
      start = 1'b0;
      cyc++;
      if (cyc > 4 * L) break;
    end
    checks++;
    if (cyc + 1 != 3 * L) begin
      failures++;
      $display("latency %0d cycles, expected %0d", cyc + 1, 3 * L);
    end
    p = '0;
    p[L-1:0] = p_o;
  endtask

  task automatic check(string what, poly_t got, poly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    poly_t f, q, sigma, mu, c, d, p, k;
    c_i = '0;
    d_i = '0;
    f_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // Q = v^{(l-1)/2}
    for (int op = 0; op < 24; op++) begin
      if (op < 16) begin
        f = '0;
        f[L] = 1'b1;
        f[74] = 1'b1;
        f[0] = 1'b1;
      end else begin
        f = rand_mod(L);
      end
      q = '0;
      q[(L - 1) / 2] = 1'b1;
      sigma = rand_poly(L);
      mu    = rand_poly(L);
      c = mulmod(sigma, q, f, L);
      d = mulmod(mu, q, f, L);
      run(c, d, f, p);
      check("P", p, mont(c, d, f, L));
      run(p, poly_t'(1), f, k);
      check("K = sigma*mu", k, mulmod(sigma, mu, f, L));
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #1;
    end

    $display("mechanisms: t1 switches %0d, t2 loads %0d, z clears %0d, ignored starts %0d",
             n_t1_switch, n_t2_hold, n_z_clear, n_start_ignored);
    checks += 4;
    if (n_t1_switch == 0) failures++;
    if (n_t2_hold == 0) failures++;
    if (n_z_clear == 0) failures++;
    if (n_start_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
