// Testbench for mmm_pe_mid: random inputs every cycle, outputs compared with a cycle model
// of the PE_i equations (d selected by t1, three AND terms into an XOR, D_i register,
// t2-loaded hold register, two-register delay of c and f).
module tb_mmm_pe_mid;

  logic clk = 1'b0, rst_n = 1'b1;
  logic t1, t2, z, c_i, f_i, d_a, d_b, msb_i, nxt_i;
  logic c_o, f_o, msb_o, nxt_o;
  int   checks = 0, failures = 0;

  mmm_pe_mid dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  logic m_c1, m_c2, m_f1, m_f2, m_nxt, m_msb;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ds, r;
    {t1, t2, z, c_i, f_i, d_a, d_b, msb_i, nxt_i} = '0;
    {m_c1, m_c2, m_f1, m_f2, m_nxt, m_msb} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      {t1, t2, z, c_i, f_i, d_a, d_b, msb_i, nxt_i} = 9'($urandom);
      #1;
      ds = t1 ? d_a : d_b;
      r  = (c_i & ds) ^ (f_i & msb_i) ^ (nxt_i & z);
      @(posedge clk);
      if (t2) m_msb = m_nxt;
      m_nxt = r;
      m_c2 = m_c1; m_c1 = c_i;
      m_f2 = m_f1; m_f1 = f_i;
      #1;
      checks++;
      if ({c_o, f_o, msb_o, nxt_o} !== {m_c2, m_f2, m_msb, m_nxt}) begin
        failures++;
        if (failures < 10)
          $display("mismatch n=%0d got c%b f%b msb%b nxt%b exp c%b f%b msb%b nxt%b", n,
                   c_o, f_o, msb_o, nxt_o, m_c2, m_f2, m_msb, m_nxt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
