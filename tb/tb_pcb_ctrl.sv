// tb_pcb_ctrl: AHB-Lite accesses to the PCB Interface registers: write
// and read back every writable register, check the read-only ADC debug
// and version registers, the decoded configuration, and one DAC strobe
// per DAC register write; then 400 back-to-back pipelined transfers with
// random reads, writes, idle and deselected cycles against a reference copy
// of the register file.
module tb_pcb_ctrl;
  import pcbif_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0, hready = 1, hreadyout, hresp;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0] htrans = 0;
  logic [2:0] hsize = 3'd2;
  pcb_cfg_t cfg;
  logic [3:0][11:0] dac_val;
  logic [3:0] dac_wr;
  logic [11:0] adc_raw = 12'h3C5, adc_thr = 12'h7E1;
  int checks = 0, failures = 0, strobes[4] = '{0, 0, 0, 0};

  pcb_ctrl dut (.hclk (clk), .hresetn (rst_n), .hsel, .haddr, .htrans, .hwrite, .hsize,
                .hwdata, .hready, .hrdata, .hreadyout, .hresp,
                .cfg, .dac_val, .dac_wr, .adc_raw, .adc_thr);
  always #5 clk = ~clk;
  always @(negedge clk) for (int i = 0; i < 4; i++) if (dac_wr[i]) strobes[i]++;

  task automatic ahb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 1;
    @(negedge clk); hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge clk); hwdata = 32'hDEAD_BEEF;
  endtask

  task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0;
    @(negedge clk); hsel = 0; htrans = 2'b00;
    #1 d = hrdata;
  endtask

  task automatic expect_rd(logic [31:0] a, logic [31:0] e);
    logic [31:0] d;
    ahb_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("read %h = %h exp %h", a, d, e); end
  endtask

  initial begin
    logic [31:0] v[9];
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_rd(32'h20, 32'h0000_5000);
    expect_rd(32'h18, {8'd0, 12'h7E1, 12'h3C5});
    expect_rd(32'h00, 32'h0);
    for (int r = 0; r < 8; r++) v[r] = $urandom;
    ahb_write(32'h00, v[0]);
    ahb_write(32'h04, v[1]);
    ahb_write(32'h08, v[2]);
    ahb_write(32'h0c, v[3]);
    ahb_write(32'h10, v[4]);
    ahb_write(32'h14, v[5]);
    ahb_write(32'h1c, v[7]);
    ahb_write(32'h18, 32'hFFFF_FFFF);   // read-only: ignored
    ahb_write(32'h20, 32'h0);           // read-only: ignored
    expect_rd(32'h00, {27'd0, v[0][4:0]});
    expect_rd(32'h04, {20'd0, v[1][11:0]});
    expect_rd(32'h08, {20'd0, v[2][11:0]});
    expect_rd(32'h0c, {20'd0, v[3][11:0]});
    expect_rd(32'h10, {20'd0, v[4][11:0]});
    expect_rd(32'h14, {20'd0, v[5][11:0]});
    expect_rd(32'h1c, {16'd0, v[7][15:0]});
    expect_rd(32'h18, {8'd0, 12'h7E1, 12'h3C5});
    expect_rd(32'h20, 32'h0000_5000);
    checks++;
    if (cfg.tx_en !== v[0][0] || cfg.tx_src !== v[0][1] || cfg.rx_en !== v[0][2] ||
        cfg.rx_src !== v[0][3] || cfg.thr_sel !== v[0][4] || cfg.adc_thr !== v[5][11:0] ||
        cfg.siggen !== v[7][15:0]) begin failures++; $display("cfg mismatch"); end
    checks++;
    if (dac_val[0] !== v[1][11:0] || dac_val[3] !== v[4][11:0]) begin failures++; $display("dac_val"); end
    ahb_write(32'h08, 32'h0000_0ABC);
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (strobes[i] != (i == 1 ? 2 : 1)) begin failures++; $display("dac%0d strobes %0d", i, strobes[i]); end
    end
    // a transfer without HSEL must not write
    @(negedge clk); hsel = 0; haddr = 32'h00; htrans = 2'b10; hwrite = 1;
    @(negedge clk); htrans = 0; hwrite = 0; hwdata = 32'h1F;
    expect_rd(32'h00, {27'd0, v[0][4:0]});
    checks++;
    if (hreadyout !== 1'b1 || hresp !== 1'b0) begin failures++; $display("handshake"); end
    pipelined(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Back-to-back pipelined transfers: every cycle the next address phase
  // overlaps the previous data phase, with random idle cycles, deselected
  // cycles, reads, writes and unmapped addresses. A reference copy of the
  // register file predicts each read and the DAC strobe counts.
  function automatic logic [31:0] mask_of(logic [5:0] a);
    case (a)
      6'h00: return 32'h1F;
      6'h04, 6'h08, 6'h0c, 6'h10, 6'h14: return 32'hFFF;
      6'h1c: return 32'hFFFF;
      default: return 32'h0;
    endcase
  endfunction

  task automatic pipelined(int n);
    logic [31:0] ref_regs[logic [5:0]];
    int          exp_strobes[4];
    bit          p_valid, p_write;
    logic [5:0]  p_addr;
    logic [31:0] exp;
    for (int i = 0; i < 4; i++) exp_strobes[i] = strobes[i];
    for (int a = 0; a < 64; a += 4) begin
      logic [31:0] d;
      ahb_read(32'(a), d);
      ref_regs[6'(a)] = d;
    end
    p_valid = 0;
    for (int k = 0; k <= n; k++) begin
      logic [31:0] wd;
      @(negedge clk);
      // data phase of the previous transfer
      wd = $urandom;
      hwdata = wd;
      if (p_valid && !p_write) begin
        exp = ref_regs.exists(p_addr) ? ref_regs[p_addr] : 32'h0;
        if (p_addr == 6'h18) exp = {8'd0, 12'h7E1, 12'h3C5};
        if (p_addr == 6'h20) exp = 32'h0000_5000;
        checks++;
        if (hrdata !== exp) begin
          failures++; $display("pipelined read %h = %h exp %h", p_addr, hrdata, exp);
        end
      end
      if (p_valid && p_write && mask_of(p_addr) != 0) begin
        ref_regs[p_addr] = wd & mask_of(p_addr);
        if (p_addr inside {6'h04, 6'h08, 6'h0c, 6'h10}) exp_strobes[(p_addr - 6'h04) / 4]++;
      end
      // address phase of this transfer
      if (k < n) begin
        hsel   = ($urandom_range(0, 9) != 0);
        htrans = ($urandom_range(0, 4) != 0) ? 2'b10 : 2'b00;
        hwrite = 1'($urandom_range(0, 1));
        haddr  = {26'd0, 6'($urandom_range(0, 15) * 4)};
        p_valid = hsel && htrans[1];
        p_write = hwrite;
        p_addr  = haddr[5:0];
      end else begin
        hsel = 0; htrans = 0; hwrite = 0;
      end
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (strobes[i] != exp_strobes[i]) begin
        failures++; $display("pipelined: dac%0d strobes %0d exp %0d", i, strobes[i], exp_strobes[i]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
