// tb_rf_tx: frames messages of several lengths and drains the bit FIFO.
// The expected stream (SFD 0xA7, PHR = length+2, message, CRC-16 low
// octet first, all LSB first) is built here; the reference CRC is a
// bytewise CRC-16 checked against its published check value 0x2189 for
// "123456789". Also checks that a start outside transmit mode or with an
// illegal length is ignored and that the octet stream may stall.
module tb_rf_tx;
  logic clk = 0, rst_n = 0, en = 0, start = 0, in_valid = 0, in_ready;
  logic [6:0] msg_len = 0;
  logic [7:0] in_data = 0;
  logic fifo_rd = 0, fifo_bit, fifo_empty, busy, done;
  int checks = 0, failures = 0;

  rf_tx dut (.clk, .rst_n, .en, .start, .msg_len, .in_valid, .in_data, .in_ready,
             .fifo_rd, .fifo_bit, .fifo_empty, .busy, .done);
  always #5 clk = ~clk;

  function automatic logic [15:0] crc_bytes(logic [7:0] m[$]);
    logic [15:0] c = 0;
    foreach (m[i]) begin
      c ^= {8'h00, m[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    end
    return c;
  endfunction

  task automatic send(int len, bit stall);
    logic [7:0] msg[$], oct[$];
    logic exp[$], got[$];
    logic [15:0] c;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    c = crc_bytes(msg);
    oct = {8'hA7, 8'(len + 2)};
    oct = {oct, msg};
    oct.push_back(c[7:0]);
    oct.push_back(c[15:8]);
    foreach (oct[i]) for (int k = 0; k < 8; k++) exp.push_back(oct[i][k]);
    @(negedge clk); start = 1; msg_len = 7'(len);
    @(negedge clk); start = 0;
    fork
      begin
        foreach (msg[i]) begin
          if (stall) repeat ($urandom_range(0, 12)) @(negedge clk);
          in_valid = 1; in_data = msg[i];
          do @(posedge clk); while (!in_ready);
          @(negedge clk); in_valid = 0;
        end
      end
      begin
        // drain slowly while framing, then fully
        while (got.size() < exp.size()) begin
          @(negedge clk);
          if (!fifo_empty && $urandom_range(0, 3) == 0) begin
            got.push_back(fifo_bit); fifo_rd = 1;
            @(negedge clk); fifo_rd = 0;
          end
        end
      end
    join
    checks++;
    if (!fifo_empty) begin failures++; $display("extra bits in FIFO"); end
    foreach (exp[i]) begin
      checks++;
      if (got[i] !== exp[i]) begin failures++; $display("len %0d bit %0d", len, i); break; end
    end
  endtask

  initial begin
    logic [7:0] chk[$];
    chk = {"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    checks++;
    if (crc_bytes(chk) != 16'h2189) begin failures++; $display("reference CRC wrong"); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // start while not in Tx mode, and with illegal lengths: ignored
    @(negedge clk); start = 1; msg_len = 7'd5;
    @(negedge clk); start = 0;
    en = 1;
    @(negedge clk); start = 1; msg_len = 7'd0;
    @(negedge clk); start = 1; msg_len = 7'd126;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (busy || !fifo_empty) begin failures++; $display("illegal start accepted"); end
    send(1, 0);
    send(5, 1);
    send(125, 0);
    send(17, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
