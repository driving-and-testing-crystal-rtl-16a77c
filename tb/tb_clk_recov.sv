// tb_clk_recov: clock recovery against a drifting, glitchy bit stream.
//
// The stimulus is a random bit stream whose bit period is 2% longer than
// the receiver's CLK_DIV, with a random start phase and short glitches
// placed just after some bit edges. Once the recovery has seen its first
// rising edge, every strobe must fall inside a bit at least CLK_DIV/5
// cycles from both of its edges, no bit may be sampled twice or skipped,
// and the sampled value must equal the sent bit. At least one restart by
// a data edge must be reported.
module tb_clk_recov;
  localparam int DIV  = 40;
  localparam int NB   = 400;
  logic clk = 0, rst_n = 0, din = 0, sclk, tick, resync;
  int checks = 0, failures = 0;
  int edges[NB + 1];    // start cycle of each bit
  logic bits[NB];
  int cyc = 0, nres = 0, first_rise = -1, last_bit = -1, offset;

  clk_recov #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .din, .sample_clk (sclk), .tick, .resync);
  always #5 clk = ~clk;

  function automatic int bit_at(int c);
    for (int k = 0; k < NB; k++) if (c >= edges[k] && c < edges[k + 1]) return k;
    return -1;
  endfunction

  // stimulus, one value per cycle
  always @(posedge clk) begin
    int k;
    cyc <= cyc + 1;
    k = bit_at(cyc + 1);
    if (k < 0) din <= 1'b0;
    else begin
      din <= bits[k];
      // glitch: invert 2 cycles, 3 cycles after every 7th bit edge
      if (k % 7 == 3 && (cyc + 1 - edges[k]) inside {[3:4]}) din <= ~bits[k];
    end
  end

  // checker
  always @(posedge clk) begin
    if (resync) nres++;
    if (tick && first_rise >= 0 && cyc > first_rise + DIV) begin
      int k;
      k = bit_at(cyc - 3);   // din reaches the recovery 1 cycle after it is set; margin
      checks++;
      if (k < 0) begin failures++; $display("tick outside stream at %0d", cyc); end
      else begin
        int pos, len;
        pos = cyc - 1 - edges[k];
        len = edges[k + 1] - edges[k];
        if (pos < DIV / 5 || pos > len - DIV / 5) begin
          failures++; $display("tick at %0d/%0d of bit %0d", pos, len, k);
        end
        if (last_bit >= 0 && k != last_bit + 1) begin
          failures++; $display("bit %0d after %0d", k, last_bit);
        end
        if (dut.din !== bits[k]) begin failures++; $display("value bit %0d", k); end
        last_bit = k;
      end
    end
  end

  initial begin
    offset = 5 + int'($urandom_range(0, DIV - 1));
    for (int k = 0; k <= NB; k++) edges[k] = offset + (k * DIV * 102) / 100;
    for (int k = 0; k < NB; k++) bits[k] = (k < 2) ? 1'(k) : 1'($urandom);
    for (int k = 0; k < NB; k++) if (bits[k] && (k == 0 || !bits[k - 1])) begin
      first_rise = edges[k]; break;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (cyc > edges[NB] + 5);
    checks++;
    if (nres == 0) begin failures++; $display("no resync"); end
    checks++;
    if (last_bit < NB - 3) begin failures++; $display("only %0d bits sampled", last_bit); end
    $display("resyncs=%0d sampled up to bit %0d", nres, last_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * DIV * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
