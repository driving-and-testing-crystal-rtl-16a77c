// tb_tx_out_buf: random enable, source and input bits; the pin must show
// the selected source one clock later, or low while disabled.
module tb_tx_out_buf;
  import pcbif_pkg::*;
  logic clk = 0, rst_n = 0, tx_en, stream_bit, siggen_bit, tx_pin;
  tx_src_e tx_src;
  int checks = 0, failures = 0;
  logic exp;

  tx_out_buf dut (.clk, .rst_n, .tx_en, .tx_src, .stream_bit, .siggen_bit, .tx_pin);
  always #5 clk = ~clk;

  initial begin
    tx_en = 0; tx_src = TXSRC_STREAM; stream_bit = 0; siggen_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      tx_en = 1'($urandom); tx_src = tx_src_e'(1'($urandom));
      stream_bit = 1'($urandom); siggen_bit = 1'($urandom);
      exp = !tx_en ? 1'b0 : (tx_src == TXSRC_SIGGEN ? siggen_bit : stream_bit);
      @(posedge clk); #1;
      checks++;
      if (tx_pin !== exp) begin failures++; $display("pin %b exp %b", tx_pin, exp); end
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
