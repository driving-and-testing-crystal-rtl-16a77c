// tb_pcb_interface: the PCB Interface on its own, with its Tx pin looped
// back to its own receive inputs.
//
// The bench plays the transceiver's bit FIFO (a queue of bits read with
// tx_fifo_rd) and collects every bit the interface writes towards the
// transceiver (rx_wr / rx_bit). The loop back goes through a 3-cycle
// delay to the comparator input and through an ADC model whose reading
// is 900 or 2500 plus +-40 noise. DAC models sit on the SPI pins.
//
// Sequence:
//   1. registers: version, DAC writes must reach the four DAC models;
//   2. a frame (alternating preamble, SFD, PHR, payload) sent with the
//      comparator path selected: the received bits after the SFD must
//      equal the PHR and payload, the receive FIFO controller must report
//      the frame done, and the frame must take its bit count times CLK_DIV;
//   3. the same through the ADC with the fixed threshold, plus the 0x18
//      readback of threshold and last sample;
//   4. the same through the ADC with the moving-average threshold;
//   5. signal generator on the pin: 32 bit periods must show the 16-bit
//      pattern, LSB first, repeating.
// Bench parameters: CLK_DIV=400, AVG_LOG2=6, ADC and DAC SCLK half
// periods of 2 system clocks.
module tb_pcb_interface;
  import pcbif_pkg::*;
  localparam int DIV = 400;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        hsel = 0, hwrite = 0, hreadyout, hresp;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0]  htrans = 0;
  logic        tx_fifo_bit, tx_fifo_empty, tx_fifo_rd, rx_wr, rx_bit, tx_pin;
  logic        comp_in = 0, adc_cs_n, adc_sclk, adc_sdata, dac_sclk, dac_mosi;
  logic [3:0]  dac_sync_n;
  logic        tx_active, rx_in_frame, rx_frame_done, rx_resync, rx_sample_tick;
  logic [11:0] adc_value = 12'd900, adc_taken;
  logic [3:0][11:0] dac_got;
  int          dac_upd[4], dac_err;

  pcb_interface #(.CLK_DIV (DIV), .AVG_LOG2 (6), .ADC_SCLK_HALF (2), .DAC_SCLK_HALF (2)) dut (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hsize (3'd2), .hwdata, .hready (1'b1),
    .hrdata, .hreadyout, .hresp, .tx_fifo_bit, .tx_fifo_empty, .tx_fifo_rd, .rx_wr, .rx_bit,
    .tx_pin, .comp_in, .adc_cs_n, .adc_sclk, .adc_sdata, .dac_sclk, .dac_mosi, .dac_sync_n,
    .tx_active, .rx_in_frame, .rx_frame_done, .rx_resync, .rx_sample_tick);
  adc_model u_adc (.clk, .cs_n (adc_cs_n), .sclk (adc_sclk), .value (adc_value),
                   .sdata (adc_sdata), .last_taken (adc_taken));
  dac_model u_dac (.clk, .sclk (dac_sclk), .mosi (dac_mosi), .sync_n (dac_sync_n),
                   .value (dac_got), .updates (dac_upd), .errors (dac_err));

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // transceiver Tx bit FIFO (first word fall through)
  bit txq[$];
  logic rd_q = 0;
  assign tx_fifo_bit   = (txq.size() != 0) ? txq[0] : 1'b0;
  assign tx_fifo_empty = (txq.size() == 0);
  always @(posedge clk) rd_q <= tx_fifo_rd;
  always @(negedge clk) if (rd_q && txq.size() != 0) void'(txq.pop_front());

  // received bits and events
  bit rxq[$];
  int n_done = 0, n_resync = 0;
  logic done_q = 0;
  always @(posedge clk) begin
    done_q <= rx_frame_done;
    if (rx_wr) rxq.push_back(rx_bit);
    if (rx_frame_done && !done_q) n_done++;   // frame done is a level
    if (rx_resync) n_resync++;
  end

  // loop back: 3-cycle line delay, ADC reading from the delayed line
  logic [2:0] dly = 0;
  always @(posedge clk) begin
    dly       <= {dly[1:0], tx_pin};
    comp_in   <= dly[2];
    adc_value <= 12'((dly[2] ? 2500 : 900) + $urandom_range(0, 80) - 40);
  end

  task automatic ahb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 1;
    @(negedge clk); hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge clk);
  endtask

  task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0;
    @(negedge clk); hsel = 0; htrans = 2'b00;
    #1 d = hrdata;
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Send one frame through the loop with the given receive settings.
  task automatic frame(logic [31:0] rxbits, int nbytes);
    bit exp[$];
    logic [7:0] b;
    int done0, t0, t1, nbits, at;
    bit match;
    rxq.delete();
    done0 = n_done;
    for (int i = 0; i < 16; i++) exp.push_back(i[0] ? 1'b0 : 1'b1);  // preamble 1010...
    for (int i = 0; i < 8; i++) exp.push_back(SFD[i]);
    b = 8'(nbytes);
    for (int i = 0; i < 8; i++) exp.push_back(b[i]);
    for (int k = 0; k < nbytes; k++) begin
      b = 8'($urandom);
      for (int i = 0; i < 8; i++) exp.push_back(b[i]);
    end
    nbits = exp.size();
    ahb_write(32'h00, 32'h0);              // disarm
    foreach (exp[i]) txq.push_back(exp[i]);
    ahb_write(32'h00, rxbits | 32'h1);     // Tx on (bit stream), Rx armed
    t0 = 0;
    t1 = 0;
    for (int c = 0; c < (nbits + 4) * DIV && t1 == 0; c++) begin
      @(posedge clk);
      if (tx_active && t0 == 0) t0 = c;
      if (!tx_active && t0 != 0) t1 = c;
    end
    check(t1 - t0 == nbits * DIV, $sformatf("frame on pin took %0d cycles, expected %0d", t1 - t0, nbits * DIV));
    repeat (4 * DIV) @(posedge clk);
    check(n_done == done0 + 1 && rx_frame_done, $sformatf("frame done rises %0d", n_done - done0));
    check(!rx_in_frame, "still in frame");
    // locate the SFD in the received bits, compare everything after it
    at = -1;
    for (int i = 7; i < rxq.size() && at < 0; i++) begin
      match = 1;
      for (int j = 0; j < 8; j++) if (rxq[i - 7 + j] != SFD[j]) match = 0;
      if (match) at = i + 1;
    end
    check(at >= 0, "no SFD in received bits");
    if (at >= 0) begin
      check(rxq.size() - at == 8 + 8 * nbytes,
            $sformatf("%0d bits after SFD, expected %0d", rxq.size() - at, 8 + 8 * nbytes));
      for (int i = 0; i < 8 + 8 * nbytes && at + i < rxq.size(); i++)
        check(rxq[at + i] == exp[24 + i], $sformatf("bit %0d after SFD", i));
    end
  endtask

  initial begin
    logic [31:0] d;
    logic [11:0] dv[4];
    logic [15:0] pat;
    bit pin[$];
    int off;
    bit ok;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. registers and DACs
    ahb_read(32'h20, d);
    check(d == 32'h0000_5000, "version");
    for (int i = 0; i < 4; i++) begin
      dv[i] = 12'($urandom);
      ahb_write(32'h04 + 4 * i, {20'd0, dv[i]});
    end
    repeat (400) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      check(dac_got[i] == dv[i], $sformatf("DAC%0d got %h exp %h", i, dac_got[i], dv[i]));
      check(dac_upd[i] == 1, $sformatf("DAC%0d updates %0d", i, dac_upd[i]));
    end
    check(dac_err == 0, "DAC frame errors");

    // 2. comparator path
    frame(32'h4, 6);
    // 3. ADC, fixed threshold
    ahb_write(32'h14, 32'd1700);
    frame(32'h4 | 32'h8 | 32'h10, 6);
    ahb_read(32'h18, d);
    check(d[23:12] == 12'd1700, $sformatf("0x18 threshold %0d", d[23:12]));
    check(d[11:0] inside {[860:940], [2460:2540]}, $sformatf("0x18 sample %0d", d[11:0]));
    // 4. ADC, moving average
    frame(32'h4 | 32'h8, 8);
    check(n_resync > 0, "clock recovery never restarted on an edge");

    // 5. signal generator
    pat = 16'($urandom) | 16'h0101;
    ahb_write(32'h1c, {16'd0, pat});
    ahb_write(32'h00, 32'h3);
    repeat (2 * DIV) @(posedge clk);
    for (int k = 0; k < 32; k++) begin
      @(posedge clk iff dut.tx_tick);
      repeat (DIV / 2) @(posedge clk);
      pin.push_back(tx_pin);
    end
    off = -1;
    for (int o = 0; o < 16 && off < 0; o++) begin
      ok = 1;
      for (int k = 0; k < 32; k++) if (pin[k] != pat[(k + o) % 16]) ok = 0;
      if (ok) off = o;
    end
    check(off >= 0, $sformatf("pattern %h not seen on the pin", pat));
    check(txq.size() == 0, "bit FIFO left unread");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
