// dac_model: behavioural model of four 12-bit SPI DACs for testbenches.
//
// Each DAC shifts in `mosi` on the falling edge of `sclk` while its
// `sync_n` is low and, when `sync_n` rises after 16 bits, takes the low
// 12 bits as its new value and counts the update. A frame of any other
// length is counted as an error.
module dac_model (
  input  logic       clk,
  input  logic       sclk,
  input  logic       mosi,
  input  logic [3:0] sync_n,
  output logic [3:0][11:0] value,
  output int         updates [4],
  output int         errors
);
  logic [15:0] sh [4];
  int          nbits [4];
  logic        sclk_q = 1'b1;
  logic [3:0]  sync_q = 4'hF;

  initial begin
    value = '0; errors = 0;
    for (int i = 0; i < 4; i++) begin updates[i] = 0; nbits[i] = 0; sh[i] = '0; end
  end

  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (!sync_n[i] && sclk_q && !sclk) begin
        sh[i] = {sh[i][14:0], mosi};
        nbits[i]++;
      end
      if (!sync_q[i] && sync_n[i]) begin
        if (nbits[i] == 16 && sh[i][15:12] == 4'b0000) begin
          value[i] = sh[i][11:0];
          updates[i]++;
        end else errors++;
        nbits[i] = 0;
      end
    end
    if ($countones(~sync_n) > 1) errors++;
    sclk_q = sclk;
    sync_q = sync_n;
  end
endmodule
