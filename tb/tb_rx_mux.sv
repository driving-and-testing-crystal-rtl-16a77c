// tb_rx_mux: random enable, source and input bits; the output must show
// the selected source one clock later, or low while disabled.
module tb_rx_mux;
  import pcbif_pkg::*;
  logic clk = 0, rst_n = 0, rx_en, comp_bit, adc_bit, rx_bit;
  rx_src_e rx_src;
  int checks = 0, failures = 0;
  logic exp;

  rx_mux dut (.clk, .rst_n, .rx_en, .rx_src, .comp_bit, .adc_bit, .rx_bit);
  always #5 clk = ~clk;

  initial begin
    rx_en = 0; rx_src = RXSRC_COMP; comp_bit = 0; adc_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      rx_en = 1'($urandom); rx_src = rx_src_e'(1'($urandom));
      comp_bit = 1'($urandom); adc_bit = 1'($urandom);
      exp = !rx_en ? 1'b0 : (rx_src == RXSRC_ADC ? adc_bit : comp_bit);
      @(posedge clk); #1;
      checks++;
      if (rx_bit !== exp) begin failures++; $display("out %b exp %b", rx_bit, exp); end
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
