// Testbench for mmm_ctrl_delay: random control words, q_mid must equal the word of one
// cycle earlier and q the word of two cycles earlier; reset must give the idle word.
module tb_mmm_ctrl_delay;
  import mmm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b1;
  ctrl_t d, q_mid, q;
  ctrl_t h1, h2;
  int    checks = 0, failures = 0;

  mmm_ctrl_delay dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // falling edge for the asynchronous clear

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = ctrl_t'(4'b1111);
    #2;
    checks++;
    if (q !== CTRL_IDLE || q_mid !== CTRL_IDLE) failures++;
    h1 = CTRL_IDLE;
    h2 = CTRL_IDLE;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      d = ctrl_t'(4'($urandom));
      @(posedge clk);
      h2 = h1;
      h1 = d;
      #1;
      checks++;
      if (q_mid !== h1 || q !== h2) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
