// tb_sync_fifo: random pushes and pops against a queue model, with a
// non-power-of-two depth; checks data order, the empty/full flags, the
// count, and the clear input.
module tb_sync_fifo;
  localparam int W = 8, D = 13;
  logic clk = 0, rst_n = 0, clear = 0, wr = 0, rd = 0, empty, full;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, nfull = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .clear, .wr, .wr_data, .rd, .rd_data,
                                         .empty, .full, .count);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = ((i / 300) % 2 != 0) ? 70 : 30;
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || int'(count) != q.size()) begin
        failures++; $display("flags at %0d: size %0d count %0d", i, q.size(), count);
      end
      if (!empty) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
      end
      if (full) nfull++;
      wr = !full && ($urandom_range(0, 99) < bias);
      rd = !empty && ($urandom_range(0, 99) < 50);
      wr_data = W'($urandom);
      clear = (i == 2000);
      @(posedge clk);
      if (clear) q = {};
      else begin
        if (rd) void'(q.pop_front());
        if (wr) q.push_back(wr_data);
      end
    end
    checks++;
    if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
