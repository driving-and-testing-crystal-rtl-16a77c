// rx_extract_adc: ADC signal extractor (RxExtractADC).
//
// Recovers the transmitted bit from the 12-bit samples of the
// demodulator's error voltage. A sample above the active threshold is a
// '1', otherwise a '0'. The threshold is either the fixed value of
// register 0x14 or the moving average of the most recent 2**AVG_LOG2
// samples, selected by control bit 4. The moving average lets the
// threshold follow a drifting offset of the error signal. The active
// threshold is reported for the read-only debug register 0x18.
//
// The two threshold modes, their selection and the debug readout follow
// the design. The window length, the circular buffer with a running sum,
// and the strict '>' comparison are this implementation's choices. Until
// the window has been filled once after reset, the missing samples count
// as zero.
//
// Timing: `bit_out` and `threshold` update one clock after `valid`.
module rx_extract_adc
  import pcbif_pkg::*;
#(
  parameter int unsigned AVG_LOG2 = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,       // new ADC sample
  input  logic [11:0] sample,
  input  thr_sel_e    thr_sel,
  input  logic [11:0] fixed_thr,   // register 0x14
  output logic        bit_out,
  output logic [11:0] threshold,   // currently active threshold
  output logic [11:0] last_sample  // most recent ADC value
);
  localparam int unsigned N = 1 << AVG_LOG2;

  logic [11:0]          win [N];
  logic [AVG_LOG2-1:0]  wptr;
  logic                 full;
  logic [AVG_LOG2+11:0] sum, sum_nxt;
  logic [11:0]          avg_nxt, thr_nxt;
  logic [11:0]          oldest;

  assign oldest  = full ? win[wptr] : 12'd0;
  assign sum_nxt = sum - (AVG_LOG2+12)'(oldest) + (AVG_LOG2+12)'(sample);
  assign avg_nxt = sum_nxt[AVG_LOG2 +: 12];
  assign thr_nxt = (thr_sel == THR_FIXED) ? fixed_thr : avg_nxt;

  always_ff @(posedge clk) begin
    if (valid) win[wptr] <= sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      full        <= 1'b0;
      sum         <= '0;
      bit_out     <= 1'b0;
      threshold   <= '0;
      last_sample <= '0;
    end else if (valid) begin
      wptr        <= wptr + 1'b1;
      if (wptr == AVG_LOG2'(N - 1)) full <= 1'b1;
      sum         <= sum_nxt;
      threshold   <= thr_nxt;
      bit_out     <= (sample > thr_nxt);
      last_sample <= sample;
    end else begin
      threshold   <= (thr_sel == THR_FIXED) ? fixed_thr : sum[AVG_LOG2 +: 12];
    end
  end
endmodule
