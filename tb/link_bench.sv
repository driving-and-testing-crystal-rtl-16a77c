// link_bench: end-to-end bench of two radio nodes talking over a model
// of the analog chain.
//
// Node A and node B run on separate clocks whose periods differ by 2%,
// as two crystal-free nodes would. Each node's Tx pin drives the other's
// comparator input through a channel model that delays the line and adds
// short glitches just after some edges, and an ADC model whose reading is
// the line level times a swing, plus a slowly drifting offset and noise.
// Each node also has DAC models on its SPI pins.
//
// Sequence: program both PCB Interfaces over AHB (version readout, the
// four DACs), then
//   1. A sends to B, B receives through the comparator;
//   2. A sends to B, B receives through the ADC with the fixed threshold;
//   3. A sends to B, B receives through the ADC with the moving average;
//   4. A sends to B while the channel corrupts one payload bit: B must
//      report a CRC error;
//   5. the roles swap: B sends to A (and a start on the receiving node is
//      ignored, since the transceiver is half duplex);
//   6. A's Tx output is switched to the signal generator and the 16-bit
//      pattern must appear on the pin;
//   7. NRUN frames back to back from A to B, cycling through the three
//      receive paths, with A's carrier DAC rewritten in the middle of each
//      frame: every frame must arrive and every DAC write must land while
//      the frame is still on the pin.
// Every received message is compared with what was sent, the transmit
// duration must be the frame's bit count times CLK_DIV, and every
// mechanism listed at the end must have happened at least once.
//
// FULL=1 builds the nodes with all parameters at their defaults and sends
// the largest message (125 octets) in step 1.
module link_bench #(
  parameter bit          FULL    = 1'b0,
  parameter int unsigned DIV     = 200,
  parameter int unsigned AVGL2   = 6,
  parameter int unsigned ASH     = 1,
  parameter int unsigned MSG_LEN = 24,
  parameter int unsigned NRUN    = 6
);
  import pcbif_pkg::*;

  localparam int unsigned CDIV = FULL ? 1000 : DIV;

  logic clk[2], rst_n = 1'b1;
  initial begin clk[0] = 0; clk[1] = 0; end
  always #50 clk[0] = ~clk[0];
  always #51 clk[1] = ~clk[1];

  int checks = 0, failures = 0;

  // ---------------- node signals ----------------
  logic        hsel[2], hwrite[2], hreadyout[2], hresp[2];
  logic [31:0] haddr[2], hwdata[2], hrdata[2];
  logic [1:0]  htrans[2];
  xcvr_mode_e  mode[2];
  logic        tx_start[2], tx_valid[2], tx_ready[2], tx_busy[2], tx_done[2];
  logic [6:0]  tx_len[2], rx_len[2];
  logic [7:0]  tx_data[2], rx_data[2];
  logic        rx_valid[2], rx_ready[2], rx_done[2], rx_crc_ok[2], rx_recording[2];
  logic        tx_pin[2], comp_in[2], adc_cs_n[2], adc_sclk[2], adc_sdata[2];
  logic        dac_sclk[2], dac_mosi[2];
  logic [3:0]  dac_sync_n[2];
  logic        tx_active[2], rx_in_frame[2], rx_frame_done[2], rx_resync[2], rx_tick[2];
  logic [11:0] adc_value[2], adc_taken[2];
  logic [3:0][11:0] dac_got[2];
  int          dac_upd[2][4], dac_err[2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    if (FULL) begin : g_full
      radio_node u_node (
        .clk (clk[n]), .rst_n,
        .hsel (hsel[n]), .haddr (haddr[n]), .htrans (htrans[n]), .hwrite (hwrite[n]),
        .hsize (3'd2), .hwdata (hwdata[n]), .hready (1'b1), .hrdata (hrdata[n]),
        .hreadyout (hreadyout[n]), .hresp (hresp[n]),
        .mode (mode[n]), .tx_start (tx_start[n]), .tx_len (tx_len[n]),
        .tx_valid (tx_valid[n]), .tx_data (tx_data[n]), .tx_ready (tx_ready[n]),
        .tx_busy (tx_busy[n]), .tx_done (tx_done[n]),
        .rx_valid (rx_valid[n]), .rx_data (rx_data[n]), .rx_ready (rx_ready[n]),
        .rx_done (rx_done[n]), .rx_len (rx_len[n]), .rx_crc_ok (rx_crc_ok[n]),
        .rx_recording (rx_recording[n]),
        .tx_pin (tx_pin[n]), .comp_in (comp_in[n]), .adc_cs_n (adc_cs_n[n]),
        .adc_sclk (adc_sclk[n]), .adc_sdata (adc_sdata[n]),
        .dac_sclk (dac_sclk[n]), .dac_mosi (dac_mosi[n]), .dac_sync_n (dac_sync_n[n]),
        .tx_active (tx_active[n]), .rx_in_frame (rx_in_frame[n]),
        .rx_frame_done (rx_frame_done[n]), .rx_resync (rx_resync[n]),
        .rx_sample_tick (rx_tick[n])
      );
    end else begin : g_small
      radio_node #(.CLK_DIV (DIV), .AVG_LOG2 (AVGL2), .ADC_SCLK_HALF (ASH), .DAC_SCLK_HALF (2)) u_node (
        .clk (clk[n]), .rst_n,
        .hsel (hsel[n]), .haddr (haddr[n]), .htrans (htrans[n]), .hwrite (hwrite[n]),
        .hsize (3'd2), .hwdata (hwdata[n]), .hready (1'b1), .hrdata (hrdata[n]),
        .hreadyout (hreadyout[n]), .hresp (hresp[n]),
        .mode (mode[n]), .tx_start (tx_start[n]), .tx_len (tx_len[n]),
        .tx_valid (tx_valid[n]), .tx_data (tx_data[n]), .tx_ready (tx_ready[n]),
        .tx_busy (tx_busy[n]), .tx_done (tx_done[n]),
        .rx_valid (rx_valid[n]), .rx_data (rx_data[n]), .rx_ready (rx_ready[n]),
        .rx_done (rx_done[n]), .rx_len (rx_len[n]), .rx_crc_ok (rx_crc_ok[n]),
        .rx_recording (rx_recording[n]),
        .tx_pin (tx_pin[n]), .comp_in (comp_in[n]), .adc_cs_n (adc_cs_n[n]),
        .adc_sclk (adc_sclk[n]), .adc_sdata (adc_sdata[n]),
        .dac_sclk (dac_sclk[n]), .dac_mosi (dac_mosi[n]), .dac_sync_n (dac_sync_n[n]),
        .tx_active (tx_active[n]), .rx_in_frame (rx_in_frame[n]),
        .rx_frame_done (rx_frame_done[n]), .rx_resync (rx_resync[n]),
        .rx_sample_tick (rx_tick[n])
      );
    end

    adc_model u_adc (.clk (clk[n]), .cs_n (adc_cs_n[n]), .sclk (adc_sclk[n]),
                     .value (adc_value[n]), .sdata (adc_sdata[n]), .last_taken (adc_taken[n]));
    dac_model u_dac (.clk (clk[n]), .sclk (dac_sclk[n]), .mosi (dac_mosi[n]),
                     .sync_n (dac_sync_n[n]), .value (dac_got[n]), .updates (dac_upd[n]),
                     .errors (dac_err[n]));
  end

  // ---------------- channel model ----------------
  // Line from node m to node n = 1-m: delayed by 3 receiver clocks, a
  // 2-cycle glitch 4 cycles after every 5th rising edge, and an optional
  // forced inversion (bit error injection).
  bit   inject_err = 0;
  int   n_glitch = 0;
  int   drift[2] = '{0, 0};
  for (genvar n = 0; n < 2; n++) begin : g_chan
    logic [2:0] dly;
    int rises = 0, since = 100;
    logic line, last;
    logic cin = 1'b0;
    logic [11:0] aval = 12'd900;
    assign comp_in[n]   = cin;
    assign adc_value[n] = aval;
    always @(posedge clk[n]) begin
      dly  <= {dly[1:0], tx_pin[1 - n]};
      last <= dly[2];
      if (dly[2] && !last) begin rises++; since = 0; end else since++;
      line = dly[2];
      if (rises % 5 == 0 && since inside {[4:5]}) begin
        line = ~line;
        if (since == 4) n_glitch++;
      end
      if (inject_err && n == 1) line = ~line;
      cin <= line;
      // ADC reading: offset drifts by 1 LSB every 64 cycles, +-40 noise
      if ($urandom_range(0, 63) == 0) drift[n] = (drift[n] + 1) % 400;
      aval <= 12'(900 + drift[n] + (dly[2] ? 1600 : 0) + $urandom_range(0, 80) - 40);
    end
  end

  // ---------------- AHB and stream helpers ----------------
  initial for (int n = 0; n < 2; n++) begin
    hsel[n] = 0; hwrite[n] = 0; haddr[n] = 0; hwdata[n] = 0; htrans[n] = 0;
    mode[n] = XCVR_IDLE; tx_start[n] = 0; tx_valid[n] = 0; tx_len[n] = 0; tx_data[n] = 0;
    rx_ready[n] = 0;
  end

  // clock waits on a node chosen at run time
  task automatic posc(int n);
    if (n == 0) @(posedge clk[0]); else @(posedge clk[1]);
  endtask
  task automatic negc(int n);
    if (n == 0) @(negedge clk[0]); else @(negedge clk[1]);
  endtask

  task automatic ahb_write(int n, logic [31:0] a, logic [31:0] d);
    negc(n); hsel[n] = 1; haddr[n] = a; htrans[n] = 2'b10; hwrite[n] = 1;
    negc(n); hsel[n] = 0; htrans[n] = 0; hwrite[n] = 0; hwdata[n] = d;
    negc(n);
  endtask

  task automatic ahb_read(int n, logic [31:0] a, output logic [31:0] d);
    negc(n); hsel[n] = 1; haddr[n] = a; htrans[n] = 2'b10; hwrite[n] = 0;
    negc(n); hsel[n] = 0; htrans[n] = 0;
    #1 d = hrdata[n];
  endtask

  // mechanism counters
  int m_frames_comp = 0, m_frames_adc_fixed = 0, m_frames_adc_mavg = 0, m_crc_error = 0;
  int m_resync = 0, m_fifo_stop = 0, m_reverse = 0, m_siggen = 0, m_start_ignored = 0;
  int m_dac = 0, m_version = 0, m_glitch_survived = 0, m_sustained = 0, m_retune = 0;

  logic fd_q0 = 1'b0, fd_q1 = 1'b0;
  int   ndone[2] = '{0, 0};
  always @(posedge clk[0]) if (rx_done[0]) ndone[0]++;
  always @(posedge clk[1]) if (rx_done[1]) ndone[1]++;
  always @(posedge clk[0]) begin
    if (rx_resync[0]) m_resync++;
    if (rx_frame_done[0] && !fd_q0) m_fifo_stop++;
    fd_q0 <= rx_frame_done[0];
  end
  always @(posedge clk[1]) begin
    if (rx_resync[1]) m_resync++;
    if (rx_frame_done[1] && !fd_q1) m_fifo_stop++;
    fd_q1 <= rx_frame_done[1];
  end

  // send one message from node s to node r; returns whether it arrived intact
  task automatic transfer(int s, int len, logic [31:0] rxctrl, bit expect_ok, output bit ok);
    int r;
    logic [7:0] msg[$];
    longint t_act0, t_act1;
    int nb;
    bit got_done;
    int nd0, per;
    per = (s == 0) ? 100 : 102;
    ok = 0;
    r = 1 - s;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom_range(32, 126)));
    // receiver: sleep, then listen (transceiver and PCB Interface re-armed)
    mode[r] = XCVR_IDLE;
    ahb_write(r, 32'h00, 32'h0);
    ahb_write(r, 32'h00, rxctrl);
    nd0 = ndone[r];
    mode[r] = XCVR_RX;
    mode[s] = XCVR_TX;
    negc(s); tx_start[s] = 1; tx_len[s] = 7'(len);
    negc(s); tx_start[s] = 0;
    fork
      foreach (msg[i]) begin
        tx_valid[s] = 1; tx_data[s] = msg[i];
        do posc(s); while (!tx_ready[s]);
        negc(s); tx_valid[s] = 0;
      end
      begin
        do posc(s); while (!tx_active[s]);
        t_act0 = $time;
        do posc(s); while (tx_active[s]);
        t_act1 = $time;
      end
    join_any
    do posc(s); while (tx_active[s] || tx_busy[s] || t_act1 == 0);
    // duration of the frame on the pin, in transmitter clocks
    nb = (len + 4) * 8;
    checks++;
    if (int'((t_act1 - t_act0) / longint'(per)) != nb * CDIV) begin
      failures++; $display("tx took %0d cycles, expected %0d", int'((t_act1 - t_act0) / longint'(per)), nb * CDIV);
    end
    // receiver result
    for (int c = 0; c < 40 * int'(CDIV) && ndone[r] == nd0; c++) posc(r);
    got_done = (ndone[r] == nd0 + 1);
    repeat (3) negc(r);
    checks++;
    if (!got_done || rx_len[r] != 7'(len + 2) || rx_crc_ok[r] !== expect_ok) begin
      failures++;
      $display("rx done %b len %0d (exp %0d) crc_ok %b (exp %b)", got_done, rx_len[r], len + 2, rx_crc_ok[r], expect_ok);
      mode[s] = XCVR_IDLE;
      return;
    end
    if (expect_ok) begin
      ok = 1;
      foreach (msg[i]) begin
        checks++;
        if (!rx_valid[r] || rx_data[r] !== msg[i]) begin
          failures++; ok = 0; $display("octet %0d got %h exp %h", i, rx_data[r], msg[i]); break;
        end
        negc(r); rx_ready[r] = 1;
        negc(r); rx_ready[r] = 0;
      end
    end
    mode[s] = XCVR_IDLE;
  endtask

  initial begin
    logic [31:0] d;
    bit ok;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    // --- register setup ---
    for (int n = 0; n < 2; n++) begin
      ahb_read(n, 32'h20, d);
      checks++;
      if (d !== 32'h5000) begin failures++; $display("version %h", d); end else m_version++;
      ahb_write(n, 32'h04, 32'h400 + n);   // f0 voltage
      ahb_write(n, 32'h08, 32'h800 + n);   // f1 voltage
      ahb_write(n, 32'h0c, 32'h7FF);       // comparator threshold
      ahb_write(n, 32'h10, 32'hA55);       // carrier VCO voltage
      ahb_write(n, 32'h14, 32'd1900);      // fixed ADC threshold
      ahb_write(n, 32'h1c, 32'h35CA);      // signal generator pattern
    end
    repeat (2000) @(negedge clk[1]);
    for (int n = 0; n < 2; n++) begin
      checks++;
      if (dac_got[n][0] !== 12'h400 + 12'(n) || dac_got[n][1] !== 12'h800 + 12'(n) ||
          dac_got[n][2] !== 12'h7FF || dac_got[n][3] !== 12'hA55 || dac_err[n] != 0) begin
        failures++; $display("node %0d DACs wrong", n);
      end else m_dac++;
    end

    // --- 1: comparator path ---
    $display("step 1: A to B, comparator path");
    ahb_write(0, 32'h00, 32'h01);                       // A: Tx enabled, bit stream
    transfer(0, FULL ? MAX_MSG : MSG_LEN, 32'h04, 1, ok);
    if (ok) begin m_frames_comp++; if (n_glitch > 0) m_glitch_survived++; end

    // --- 2: ADC, fixed threshold ---
    $display("step 2: A to B, ADC with fixed threshold");
    transfer(0, MSG_LEN, 32'h1C, 1, ok);
    if (ok) m_frames_adc_fixed++;
    ahb_read(1, 32'h18, d);
    checks++;
    if (d[23:12] !== 12'd1900 || d[11:0] < 12'd400) begin failures++; $display("adc debug %h", d); end

    // --- 3: ADC, moving average ---
    $display("step 3: A to B, ADC with moving average");
    transfer(0, MSG_LEN, 32'h0C, 1, ok);
    if (ok) m_frames_adc_mavg++;

    // --- 4: bit error on the channel ---
    $display("step 4: A to B with a corrupted bit");
    fork
      transfer(0, MSG_LEN, 32'h04, 0, ok);
      begin
        wait (rx_in_frame[1]);
        repeat (40 * CDIV) @(posedge clk[1]);
        inject_err = 1;
        repeat (CDIV) @(posedge clk[1]);
        inject_err = 0;
      end
    join
    if (!ok && rx_len[1] == 7'(MSG_LEN + 2) && !rx_crc_ok[1]) m_crc_error++;

    // --- 5: reverse direction, half duplex ---
    $display("step 5: B to A");
    ahb_write(0, 32'h00, 32'h0);
    ahb_write(1, 32'h00, 32'h01);
    fork
      transfer(1, MSG_LEN / 2 + 1, 32'h04, 1, ok);
      begin
        wait (tx_busy[1]);
        @(negedge clk[0]); tx_start[0] = 1; tx_len[0] = 7'd3;   // A is in Rx mode
        @(negedge clk[0]); tx_start[0] = 0;
        repeat (5) @(negedge clk[0]);
        checks++;
        if (tx_busy[0]) begin failures++; $display("start accepted in Rx mode"); end
        else m_start_ignored++;
      end
    join
    if (ok) m_reverse++;

    // --- 6: signal generator on A's pin ---
    $display("step 6: signal generator");
    ahb_write(1, 32'h00, 32'h0);
    ahb_write(0, 32'h00, 32'h03);
    begin
      logic b[32];
      bit found;
      repeat (4 * CDIV) @(posedge clk[0]);
      @(posedge tx_pin[0] or negedge tx_pin[0]);
      repeat (CDIV / 2) @(posedge clk[0]);
      for (int i = 0; i < 32; i++) begin
        b[i] = tx_pin[0];
        repeat (CDIV) @(posedge clk[0]);
      end
      found = 0;
      for (int rot = 0; rot < 16; rot++) begin
        bit match;
        match = 1;
        for (int i = 0; i < 32; i++) if (b[i] !== 1'(16'h35CA >> ((rot + i) % 16))) match = 0;
        if (match) found = 1;
      end
      checks++;
      if (!found) begin failures++; $display("signal generator pattern not seen"); end
      else m_siggen++;
    end

    // --- 7: sustained link, DAC retuned during a frame ---
    $display("step 7: %0d frames back to back, carrier DAC rewritten mid-frame", NRUN);
    ahb_write(0, 32'h00, 32'h0);
    ahb_write(1, 32'h00, 32'h0);
    ahb_write(0, 32'h00, 32'h01);
    for (int k = 0; k < NRUN; k++) begin
      logic [11:0] v;
      v = 12'h100 + 12'(k);
      fork
        transfer(0, MSG_LEN, (k % 3 == 0) ? 32'h04 : (k % 3 == 1) ? 32'h1C : 32'h0C, 1, ok);
        begin
          wait (tx_active[0]);
          repeat (20 * CDIV) @(posedge clk[0]);
          ahb_write(0, 32'h10, {20'd0, v});
          repeat (200) @(posedge clk[0]);
          checks++;
          if (dac_got[0][3] !== v || !tx_active[0]) begin
            failures++; $display("DAC3 retune: got %h exp %h (tx_active %b)", dac_got[0][3], v, tx_active[0]);
          end else m_retune++;
        end
      join
      if (ok) m_sustained++;
    end
    checks++;
    if (m_sustained != NRUN) begin failures++; $display("sustained run: %0d of %0d frames intact", m_sustained, NRUN); end

    // --- mechanism coverage ---
    $display("frames: comp=%0d adc_fixed=%0d adc_mavg=%0d reverse=%0d crc_error=%0d",
             m_frames_comp, m_frames_adc_fixed, m_frames_adc_mavg, m_reverse, m_crc_error);
    $display("resync=%0d fifo_stop=%0d glitches=%0d siggen=%0d start_ignored=%0d dac=%0d version=%0d",
             m_resync, m_fifo_stop, n_glitch, m_siggen, m_start_ignored, m_dac, m_version);
    check_seen("comparator frame", m_frames_comp);
    check_seen("ADC fixed-threshold frame", m_frames_adc_fixed);
    check_seen("ADC moving-average frame", m_frames_adc_mavg);
    check_seen("CRC error detected", m_crc_error);
    check_seen("clock recovery restart", m_resync);
    check_seen("FIFO controller stop", m_fifo_stop);
    check_seen("frame received despite glitches", m_glitch_survived);
    check_seen("reverse direction frame", m_reverse);
    check_seen("Tx start ignored in Rx mode", m_start_ignored);
    check_seen("signal generator output", m_siggen);
    check_seen("DAC update", m_dac);
    check_seen("version readout", m_version);
    check_seen("frame in sustained run", m_sustained);
    check_seen("DAC rewritten during a frame", m_retune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(string what, int cnt);
    checks++;
    if (cnt == 0) begin failures++; $display("never happened: %s", what); end
  endtask

  initial begin
    repeat ((FULL ? 4000 : 1000) * CDIV * 10) @(posedge clk[0]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
