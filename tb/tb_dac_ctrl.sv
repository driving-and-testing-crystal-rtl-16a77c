// tb_dac_ctrl: register writes must reach the DAC models over SPI: single
// writes, writes to several DACs in the same cycle, and a rewrite while a
// transfer is running. Checks values, number of frames and frame timing.
module tb_dac_ctrl;
  localparam int H = 2;
  logic clk = 0, rst_n = 1, sclk, mosi, busy;
  logic [3:0] sync_n, dac_wr = 0;
  logic [3:0][11:0] dac_val = '0, got;
  int updates[4], errors;
  int checks = 0, failures = 0, exp_upd[4] = '{0, 0, 0, 0};
  int t0, dur, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dac_ctrl #(.SCLK_HALF(H)) dut (.clk, .rst_n, .dac_val, .dac_wr, .dac_sclk (sclk),
                                 .dac_mosi (mosi), .dac_sync_n (sync_n), .busy);
  dac_model u_dac (.clk, .sclk, .mosi, .sync_n, .value (got), .updates, .errors);
  always #5 clk = ~clk;

  task automatic wr(int i, logic [11:0] v);
    @(negedge clk); dac_val[i] = v; dac_wr[i] = 1;
    exp_upd[i]++;
    @(negedge clk); dac_wr = 0;
  endtask

  // exact: every write gives one frame; otherwise writes to a DAC that is
  // still waiting may merge into one frame carrying the latest value
  task automatic check_all(bit exact);
    do begin
      wait (!busy);
      repeat (3) @(posedge clk);
    end while (busy);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] !== dac_val[i] || (exact ? updates[i] != exp_upd[i] : updates[i] > exp_upd[i])) begin
        failures++; $display("dac%0d got %h exp %h upd %0d/%0d", i, got[i], dac_val[i], updates[i], exp_upd[i]);
      end
    end
    checks++;
    if (errors != 0) begin failures++; $display("model errors %0d", errors); end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(0, 12'h123);
    wait (busy); t0 = cyc;
    wait (!busy); dur = cyc - t0;
    checks++;
    if (dur < 33 * H - 2 || dur > 33 * H + 2) begin failures++; $display("frame %0d cycles", dur); end
    check_all(1);
    // several DACs written in the same cycle
    @(negedge clk);
    dac_val = {12'hD00, 12'h0C5, 12'hFFF, 12'h8A1};
    dac_wr = 4'b1111;
    foreach (exp_upd[i]) exp_upd[i]++;
    @(negedge clk); dac_wr = 0;
    check_all(1);
    // rewrite of DAC3 while DAC2 is being sent
    wr(2, 12'h555);
    repeat (10) @(negedge clk);
    wr(3, 12'h0F0);
    check_all(1);
    for (int n = 0; n < 20; n++) begin
      wr($urandom_range(0, 3), 12'($urandom));
      repeat ($urandom_range(0, 80)) @(negedge clk);
    end
    check_all(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
