// tb_rx_extract_adc: random ADC samples against a reference moving
// average of the last 2**AVG_LOG2 samples (zeros before the window has
// filled) and against a fixed threshold; checks the extracted bit, the
// reported threshold and the latest sample.
module tb_rx_extract_adc;
  import pcbif_pkg::*;
  localparam int L2 = 3, N = 1 << L2;
  logic clk = 0, rst_n = 0, valid = 0, bit_out;
  logic [11:0] sample = 0, fixed_thr, threshold, last_sample;
  thr_sel_e thr_sel;
  int checks = 0, failures = 0;
  int hist[$];

  rx_extract_adc #(.AVG_LOG2(L2)) dut (.clk, .rst_n, .valid, .sample, .thr_sel, .fixed_thr,
                                       .bit_out, .threshold, .last_sample);
  always #5 clk = ~clk;

  initial begin
    thr_sel = THR_MAVG; fixed_thr = 12'd2000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int s, sum, thr;
      if (i == 150) thr_sel = THR_FIXED;
      if (i == 250) thr_sel = THR_MAVG;
      // slowly drifting offset plus a +-600 data swing
      s = 1200 + i * 4 + (($urandom_range(0, 1) != 0) ? 600 : -600) + int'($urandom_range(0, 100));
      hist.push_back(s);
      sum = 0;
      for (int k = 0; k < N; k++) if (hist.size() > k) sum += hist[hist.size() - 1 - k];
      thr = (thr_sel == THR_FIXED) ? int'(fixed_thr) : sum / N;
      @(negedge clk); sample = 12'(s); valid = 1;
      @(negedge clk); valid = 0;
      checks++;
      if (threshold !== 12'(thr) || bit_out !== (s > thr) || last_sample !== 12'(s)) begin
        failures++; $display("i=%0d s=%0d thr %0d exp %0d bit %b", i, s, threshold, thr, bit_out);
      end
      repeat (2) @(negedge clk);
    end
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
