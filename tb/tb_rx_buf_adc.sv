// tb_rx_buf_adc: reads a serial ADC model that converts a new random
// value every frame; every `valid` must deliver exactly the value the
// model took at the start of that frame, at the expected frame rate.
module tb_rx_buf_adc;
  logic clk = 0, rst_n = 1, cs_n, sclk, sdata, valid;
  logic [11:0] sample, value, taken;
  int checks = 0, failures = 0, nvalid = 0, last_v = -1, cyc = 0;

  rx_buf_adc #(.SCLK_HALF(3)) dut (.clk, .rst_n, .adc_cs_n (cs_n), .adc_sclk (sclk),
                                   .adc_sdata (sdata), .sample, .valid);
  adc_model u_adc (.clk, .cs_n, .sclk, .value, .sdata, .last_taken (taken));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!cs_n) value <= 12'($urandom);     // value changes during frames too
  end

  always @(posedge clk) if (valid) begin
    nvalid++;
    checks++;
    if (sample !== taken) begin failures++; $display("got %h exp %h", sample, taken); end
    if (last_v >= 0) begin
      checks++;
      if (cyc - last_v != 17 * 6) begin failures++; $display("frame period %0d", cyc - last_v); end
    end
    last_v = cyc;
  end

  initial begin
    value = 12'hABC;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    checks++;
    if (nvalid < 150) begin failures++; $display("only %0d samples", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
