// tb_tx_sig_gen: checks that the signal generator emits its 16-bit
// pattern LSB first, one bit per strobe, and wraps around.
module tb_tx_sig_gen;
  logic clk = 0, rst_n = 0, tick = 0, bit_out;
  logic [15:0] pattern;
  int checks = 0, failures = 0;

  tx_sig_gen dut (.clk, .rst_n, .tick, .pattern, .bit_out);
  always #5 clk = ~clk;

  initial begin
    pattern = 16'hC3A5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      if (p == 1) pattern = 16'(($urandom));
      for (int i = 0; i < 48; i++) begin
        @(posedge clk); tick <= 1;
        @(posedge clk); tick <= 0;
        #1;
        checks++;
        if (bit_out !== pattern[(p * 48 + i) % 16]) begin
          failures++; $display("bit %0d got %b", i, bit_out);
        end
        repeat (2) @(posedge clk);
        checks++;
        if (bit_out !== pattern[(p * 48 + i) % 16]) begin failures++; $display("not held"); end
      end
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
