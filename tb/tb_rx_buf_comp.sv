// tb_rx_buf_comp: the comparator buffer must reproduce its input delayed
// by exactly two clocks.
module tb_rx_buf_comp;
  logic clk = 0, rst_n = 0, comp_in = 0, comp_bit;
  logic hist[$];
  int checks = 0, failures = 0;

  rx_buf_comp dut (.clk, .rst_n, .comp_in, .comp_bit);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    hist = {1'b0, 1'b0};
    repeat (300) begin
      @(negedge clk);
      comp_in = 1'($urandom);
      hist.push_back(comp_in);
      @(posedge clk); #1;
      checks++;
      if (comp_bit !== hist[hist.size() - 2]) begin failures++; $display("mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
