// adc_model: behavioural model of a 12-bit serial ADC for testbenches.
//
// On the falling edge of chip select it takes the current `value` and
// shifts out four zeros followed by the 12 bits MSB first, one bit per
// falling edge of `sclk`. Edges are detected on the testbench clock,
// which must be faster than sclk.
module adc_model (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] value,
  output logic        sdata,
  output logic [11:0] last_taken
);
  logic [15:0] sh;
  logic cs_q = 1'b1, sclk_q = 1'b1;
  initial begin sdata = 1'b0; sh = '0; last_taken = '0; end

  always @(posedge clk) begin
    if (cs_q && !cs_n) begin
      sh         = {4'b0000, value};
      last_taken <= value;
      sdata      <= 1'b0;
      sh         = {sh[14:0], 1'b0};
    end else if (!cs_n && sclk_q && !sclk) begin
      sdata <= sh[15];
      sh    = {sh[14:0], 1'b0};
    end
    cs_q   <= cs_n;
    sclk_q <= sclk;
  end
endmodule
