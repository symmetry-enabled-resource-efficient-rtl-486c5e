// Testbench for mmm_pe_first: random inputs every cycle, outputs compared with a cycle
// model of the PE_1 equations (selection by t1, three AND terms into an XOR, D_i register,
// t2-loaded hold register, two-register delay of c and f).
module tb_mmm_pe_first;

  logic clk = 1'b0, rst_n = 1'b1;
  logic t1, t2, z, c_a, c_b, d_a, d_b, f_a, f_b, msb_a, msb_b, nxt_a, nxt_b;
  logic c_o, f_o, msb_o, nxt_o;
  int   checks = 0, failures = 0;

  mmm_pe_first dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  // model state
  logic m_c1, m_c2, m_f1, m_f2, m_nxt, m_msb;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_random();
    {t1, t2, z, c_a, c_b, d_a, d_b, f_a, f_b, msb_a, msb_b, nxt_a, nxt_b} = 13'($urandom);
  endtask

  initial begin
    logic cs, ds, fs, ms, ns, r;
    drive_random();
    {m_c1, m_c2, m_f1, m_f2, m_nxt, m_msb} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      drive_random();
      #1;
      cs = t1 ? c_a : c_b;
      ds = t1 ? d_a : d_b;
      fs = t1 ? f_a : f_b;
      ms = t1 ? msb_a : msb_b;
      ns = t1 ? nxt_a : nxt_b;
      r  = (cs & ds) ^ (fs & ms) ^ (ns & z);
      @(posedge clk);
      if (t2) m_msb = m_nxt;
      m_nxt = r;
      m_c2 = m_c1; m_c1 = cs;
      m_f2 = m_f1; m_f1 = fs;
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
