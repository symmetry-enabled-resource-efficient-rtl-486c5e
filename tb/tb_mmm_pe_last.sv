// Testbench for mmm_pe_last: all 2^9 input combinations, result bit and the four output
// strobes compared with the PE_(l+1)/2 equations (d forced to 0 in the B phase).
module tb_mmm_pe_last;

  logic act, t1, t2, z, c_i, f_i, d_a, msb_i, nxt_i;
  logic res, a_msb_v, a_v, b_lsb_v, b_v;
  logic e_res;
  int   checks = 0, failures = 0;

  mmm_pe_last dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {act, t1, t2, z, c_i, f_i, d_a, msb_i, nxt_i} = 9'(v);
      #1;
      e_res = (c_i & (t1 ? d_a : 1'b0)) ^ (f_i & msb_i) ^ (nxt_i & z);
      checks++;
      if ({res, a_msb_v, a_v, b_lsb_v, b_v} !==
          {e_res, t2 & t1, act & t1, t2 & ~t1, act & ~t1}) begin
        failures++;
        if (failures < 10) $display("mismatch v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
