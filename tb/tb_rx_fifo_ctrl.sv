// tb_rx_fifo_ctrl: the receive FIFO controller must forward every
// sampled bit while hunting, recognise the SFD, take the PHR length and
// stop forwarding exactly after PHR*8 payload bits; it stays stopped
// until re-armed. Strobes and bits are driven directly.
module tb_rx_fifo_ctrl;
  import pcbif_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0, tick = 0, din = 0;
  logic wr, bit_out, in_frame, done;
  logic stream[$], got[$];
  int checks = 0, failures = 0;

  rx_fifo_ctrl dut (.clk, .rst_n, .arm, .tick, .din, .wr, .bit_out, .in_frame, .done);
  always #5 clk = ~clk;
  always @(posedge clk) if (wr) got.push_back(bit_out);

  task automatic send_bit(logic b);
    @(negedge clk); din = b; tick = 1;
    @(negedge clk); tick = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic frame(int len, int noise);
    stream = {};
    got = {};
    for (int i = 0; i < noise; i++) stream.push_back(1'b0);     // idle line
    for (int i = 0; i < 8; i++) stream.push_back(SFD[i]);
    for (int i = 0; i < 8; i++) stream.push_back(i < 7 ? len[i] : 1'b0);
    for (int i = 0; i < len * 8; i++) stream.push_back(1'($urandom));
    foreach (stream[i]) send_bit(stream[i]);
    // further bits after the frame must not be forwarded
    for (int i = 0; i < 20; i++) send_bit(1'($urandom));
    checks++;
    if (got.size() != stream.size()) begin
      failures++; $display("len %0d: forwarded %0d of %0d", len, got.size(), stream.size());
    end
    foreach (got[i]) if (i < stream.size()) begin
      checks++;
      if (got[i] !== stream[i]) begin failures++; $display("bit %0d", i); end
    end
    checks++;
    if (!done) begin failures++; $display("done not set"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    arm = 1;
    frame(3, 12);
    @(negedge clk); arm = 0; @(negedge clk); arm = 1;
    checks++; if (done) begin failures++; $display("not re-armed"); end
    frame(1, 5);
    @(negedge clk); arm = 0; @(negedge clk); arm = 1;
    frame(127, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
