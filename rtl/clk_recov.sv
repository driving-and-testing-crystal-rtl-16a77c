// clk_recov: receiver clock recovery (RxCRC).
//
// Regenerates the sample clock from the received bit stream so that no
// clock wire is needed between transmitter and receiver. A counter
// divides the system clock by CLK_DIV; the sample clock is high for the
// first half of each period and low for the second. A second counter
// measures how long the (already oversampled) input has been high since
// its last rising edge. Once the input has stayed high for half a sample
// period the transition is taken as genuine and the clock counter is
// restarted from zero, whatever its value. The sample clock thereby rises
// half a bit after each real rising edge, i.e. in the middle of the bit,
// while glitches shorter than half a period are ignored. Between rising
// edges the counter free-runs, which is enough because both ends use
// nearly the same frequency reference.
//
// All of the above follows the design. This implementation's choices:
// one clock domain with a rising-edge strobe `tick` instead of a derived
// clock, and no extra strobe when a restart happens while the sample
// clock is already high (the strobe is the sample clock's rising edge, so
// a bit is never sampled twice).
//
// Timing: `tick` is high for one cycle per sample; `resync` pulses when
// the counter was restarted by a rising edge of the data.
module clk_recov #(
  parameter int unsigned CLK_DIV = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,         // synchronised received bit stream
  output logic sample_clk,  // recovered sample clock level
  output logic tick,        // rising-edge strobe of sample_clk
  output logic resync       // counter restarted by a data transition
);
  localparam int unsigned HALF = CLK_DIV / 2;
  localparam int unsigned CW   = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [CW-1:0] cnt, cnt_nxt;
  logic [CW-1:0] high_cnt;
  logic          restart;

  // The input has been high for HALF consecutive cycles (counted once per
  // high run: the counter saturates at HALF).
  assign restart = din && (high_cnt == CW'(HALF - 1));

  always_comb begin
    if (restart)                          cnt_nxt = '0;
    else if (cnt == CW'(CLK_DIV - 1))     cnt_nxt = '0;
    else                                  cnt_nxt = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= CW'(CLK_DIV - 1);
      high_cnt   <= '0;
      sample_clk <= 1'b0;
      tick       <= 1'b0;
      resync     <= 1'b0;
    end else begin
      if (!din)                         high_cnt <= '0;
      else if (high_cnt != CW'(HALF))   high_cnt <= high_cnt + 1'b1;
      cnt        <= cnt_nxt;
      sample_clk <= (cnt_nxt < CW'(HALF));
      tick       <= (cnt_nxt < CW'(HALF)) && !sample_clk;
      resync     <= restart;
    end
  end

  initial assert (CLK_DIV >= 4) else $error("CLK_DIV must be at least 4");
endmodule
