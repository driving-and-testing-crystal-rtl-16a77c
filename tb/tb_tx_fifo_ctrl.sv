// tb_tx_fifo_ctrl: the transmit FIFO controller must read one bit per
// strobe while the FIFO holds data, hold it on the line until the next
// strobe, and idle low once the FIFO is empty.
module tb_tx_fifo_ctrl;
  logic clk = 0, rst_n = 0, tick = 0, fifo_rd, bit_out, active;
  logic q[$];
  logic fifo_bit, fifo_empty;
  logic sent[$];
  int checks = 0, failures = 0, nrd = 0;

  assign fifo_empty = (q.size() == 0);
  assign fifo_bit   = fifo_empty ? 1'b0 : q[0];

  tx_fifo_ctrl dut (.clk, .rst_n, .tick, .fifo_bit, .fifo_empty, .fifo_rd, .bit_out, .active);
  always #5 clk = ~clk;

  // the model FIFO pops half a cycle after the read pulse, avoiding a race
  logic rd_q = 0;
  always @(posedge clk) rd_q <= fifo_rd;
  always @(negedge clk) if (rd_q) begin nrd++; void'(q.pop_front()); end

  initial begin
    for (int i = 0; i < 40; i++) begin
      logic b;
      b = 1'($urandom);
      q.push_back(b);
      sent.push_back(b);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      @(posedge clk); tick <= 1;
      @(posedge clk); tick <= 0;
      #1;
      checks++;
      if (i < 40) begin
        if (bit_out !== sent[i] || !active) begin failures++; $display("bit %0d got %b", i, bit_out); end
      end else if (bit_out !== 1'b0 || active) begin
        failures++; $display("idle not low");
      end
      repeat (3) @(posedge clk);
    end
    checks++;
    if (nrd != 40) begin failures++; $display("reads %0d", nrd); end
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
