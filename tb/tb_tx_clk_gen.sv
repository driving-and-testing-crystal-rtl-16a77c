// tb_tx_clk_gen: checks the transmit sample clock divider.
// With CLK_DIV=10 the strobe must come exactly every 10 cycles, on the
// rising edge of the sample clock level, and the level must be high for
// 5 of the 10 cycles.
module tb_tx_clk_gen;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 0, sclk, tick;
  int checks = 0, failures = 0;
  int last_tick = -1, ncyc = 0, nticks = 0, nhigh = 0;
  logic sclk_q = 0;

  tx_clk_gen #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .sample_clk (sclk), .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1000) begin
      @(posedge clk); #1;
      ncyc++;
      if (sclk) nhigh++;
      if (tick) begin
        nticks++;
        if (last_tick >= 0) begin
          checks++;
          if (ncyc - last_tick != DIV) begin failures++; $display("period %0d", ncyc - last_tick); end
        end
        last_tick = ncyc;
        checks++;
        if (!(sclk && !sclk_q)) begin failures++; $display("tick not at rising edge"); end
      end
      sclk_q = sclk;
    end
    checks++; if (nticks < 99 || nticks > 101) begin failures++; $display("ticks %0d", nticks); end
    checks++; if (nhigh < 495 || nhigh > 505) begin failures++; $display("high %0d", nhigh); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
