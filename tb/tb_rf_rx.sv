// tb_rf_rx: feeds bit streams with write pulses: idle noise, then SFD,
// PHR and a PSDU with a correct CRC; checks the stored octets, the
// reported length, crc_ok and that recording stops after the frame. A
// frame with one payload bit flipped must give crc_ok=0, and a frame
// whose SFD has one wrong bit must not be received at all.
module tb_rf_rx;
  logic clk = 0, rst_n = 0, en = 0, wr = 0, din = 0;
  logic out_valid, out_ready = 0, recording, done, crc_ok;
  logic [7:0] out_data;
  logic [6:0] frame_len;
  int checks = 0, failures = 0, ndone = 0;

  rf_rx dut (.clk, .rst_n, .en, .wr, .din, .out_valid, .out_data, .out_ready,
             .recording, .done, .frame_len, .crc_ok);
  always #5 clk = ~clk;
  always @(posedge clk) if (done) ndone++;

  function automatic logic [15:0] crc_bytes(logic [7:0] m[$]);
    logic [15:0] c = 0;
    foreach (m[i]) begin
      c ^= {8'h00, m[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    end
    return c;
  endfunction

  task automatic put(logic b);
    @(negedge clk); din = b; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  // mode 0: good, 1: payload bit flipped, 2: SFD bit flipped
  task automatic frame(int len, int mode);
    logic [7:0] msg[$], oct[$];
    logic [15:0] c;
    logic bits[$];
    int nd;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    c = crc_bytes(msg);
    oct = {8'hA7, 8'(len + 2)};
    oct = {oct, msg};
    oct.push_back(c[7:0]);
    oct.push_back(c[15:8]);
    foreach (oct[i]) for (int k = 0; k < 8; k++) bits.push_back(oct[i][k]);
    if (mode == 1) begin
      bits[16 + 3] = ~bits[16 + 3];
      oct[2] ^= 8'h08;             // what the receiver will store
    end
    if (mode == 2) bits[5] = ~bits[5];
    @(negedge clk); en = 0;
    @(negedge clk); en = 1;
    nd = ndone;
    for (int i = 0; i < 20; i++) put(1'b0);
    foreach (bits[i]) put(bits[i]);
    for (int i = 0; i < 30; i++) put(1'($urandom));
    repeat (3) @(negedge clk);
    if (mode == 2) begin
      checks++;
      if (ndone != nd || out_valid) begin failures++; $display("bad SFD accepted"); end
      return;
    end
    checks++;
    if (ndone != nd + 1 || frame_len != 7'(len + 2) || crc_ok !== (mode == 0)) begin
      failures++; $display("len %0d mode %0d: done %0d flen %0d crc_ok %b", len, mode, ndone - nd, frame_len, crc_ok);
    end
    for (int i = 0; i < len + 2; i++) begin
      checks++;
      if (!out_valid || out_data !== oct[2 + i]) begin
        failures++; $display("octet %0d got %h exp %h", i, out_data, oct[2 + i]); break;
      end
      @(negedge clk); out_ready = 1;
      @(negedge clk); out_ready = 0;
    end
    checks++;
    if (out_valid) begin failures++; $display("extra octets stored"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(3, 0);
    frame(125, 0);
    frame(1, 0);
    frame(10, 2);
    frame(8, 1);
    frame(40, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
