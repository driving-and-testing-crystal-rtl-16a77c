// tx_clk_gen: transmitter sample clock generator (TxClkGen).
//
// Divides the system clock by CLK_DIV with a free-running counter. The
// sample clock level is high for the first half of each period and low
// for the second; `tick` is a one-cycle strobe on each rising edge of the
// sample clock, which is when the transmitter launches its next bit.
// Dividing the system clock follows the design; the strobe style (one
// clock domain with an enable instead of a derived clock) and the default
// divider are this implementation's choices: 1000 turns a 100 MHz board
// clock into the 100 kbps bit rate the radio runs at.
//
// Timing: `tick` is high for one cycle every CLK_DIV cycles, first one
// cycle after reset is released.
module tx_clk_gen #(
  parameter int unsigned CLK_DIV = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample_clk,  // divided clock level
  output logic tick         // rising-edge strobe of sample_clk
);
  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(CLK_DIV - 1);
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(CLK_DIV - 1));
      cnt  <= (cnt == CW'(CLK_DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end

  assign sample_clk = (cnt < CW'(CLK_DIV / 2));

  initial assert (CLK_DIV >= 2) else $error("CLK_DIV must be at least 2");
endmodule
