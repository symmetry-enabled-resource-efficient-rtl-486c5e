// End-to-end testbench for mmm_top at other field sizes: l = 3, l = 5 with
// F = v^5 + v^2 + 1 (the size of the worked example of the array), and l = 163 with the
// pentanomial F = v^163 + v^7 + v^6 + v^3 + 1.  Each size multiplies random operands, the
// corner operands 0 and 1, and runs Montgomery round trips (sigma, mu -> C = sigma Q,
// D = mu Q -> P -> P * 1 = sigma*mu mod F) against the word-level reference, checking the
// 3l-cycle latency of every operation.  The three instances run one after the other.
module tb_mmm_top_sizes;
  import mmm_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- l = 3 --------------------------------------------------------------------------
  logic       s3 = 1'b0, b3, dn3;
  logic [2:0] c3, d3, p3;
  logic [3:0] f3;
  mmm_top #(.L(3)) u3 (.clk, .rst_n, .start(s3), .c_i(c3), .d_i(d3), .f_i(f3),
                       .busy(b3), .done(dn3), .p_o(p3));

  // ---- l = 5 --------------------------------------------------------------------------
  logic       s5 = 1'b0, b5, dn5;
  logic [4:0] c5, d5, p5;
  logic [5:0] f5;
  mmm_top #(.L(5)) u5 (.clk, .rst_n, .start(s5), .c_i(c5), .d_i(d5), .f_i(f5),
                       .busy(b5), .done(dn5), .p_o(p5));

  // ---- l = 163 ------------------------------------------------------------------------
  logic         s163 = 1'b0, b163, dn163;
  logic [162:0] c163, d163, p163;
  logic [163:0] f163;
  mmm_top #(.L(163)) u163 (.clk, .rst_n, .start(s163), .c_i(c163), .d_i(d163), .f_i(f163),
                           .busy(b163), .done(dn163), .p_o(p163));

  task automatic check(string what, int l, poly_t got, poly_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("l=%0d %s: got %h exp %h", l, what, got, exp);
    end
  endtask

  // One multiplication on the instance of size l; returns P
  task automatic run(int l, poly_t c, poly_t d, poly_t f, output poly_t p);
    int cyc = 0;
    logic dn;
    case (l)
      3:   begin c3 = 3'(c);     d3 = 3'(d);     f3 = 4'(f);     s3 = 1'b1;   end
      5:   begin c5 = 5'(c);     d5 = 5'(d);     f5 = 6'(f);     s5 = 1'b1;   end
      default: begin c163 = 163'(c); d163 = 163'(d); f163 = 164'(f); s163 = 1'b1; end
    endcase
    @(posedge clk); #1;
    {s3, s5, s163} = '0;
    do begin
      @(posedge clk); #1;
      cyc++;
      dn = (l == 3) ? dn3 : (l == 5) ? dn5 : dn163;
    end while (!dn && cyc < 4 * l + 10);
    checks++;
    if (cyc + 1 != 3 * l) begin
      failures++;
      $display("l=%0d latency %0d, expected %0d", l, cyc + 1, 3 * l);
    end
    p = '0;
    case (l)
      3:       p[2:0]   = p3;
      5:       p[4:0]   = p5;
      default: p[162:0] = p163;
    endcase
  endtask

  task automatic size_test(int l, poly_t f, int n);
    poly_t q, sigma, mu, c, d, p, k;
    q = '0;
    q[(l - 1) / 2] = 1'b1;
    for (int op = 0; op < n; op++) begin
      sigma = rand_poly(l);
      mu    = rand_poly(l);
      if (op == 0) sigma = '0;
      if (op == 1) begin sigma = 1; mu = 1; end
      c = mulmod(sigma, q, f, l);
      d = mulmod(mu, q, f, l);
      run(l, c, d, f, p);
      check("P", l, p, mont(c, d, f, l));
      run(l, p, poly_t'(1), f, k);
      check("K", l, k, mulmod(sigma, mu, f, l));
    end
  endtask

  initial begin
    poly_t f;
    {c3, d3, f3, c5, d5, f5, c163, d163, f163} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    f = 'b1011;                // v^3 + v + 1
    size_test(3, f, 20);
    f = 'b100101;              // v^5 + v^2 + 1
    size_test(5, f, 40);
    f = '0;                    // v^163 + v^7 + v^6 + v^3 + 1
    f[163] = 1'b1; f[7] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; f[0] = 1'b1;
    size_test(163, f, 20);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
