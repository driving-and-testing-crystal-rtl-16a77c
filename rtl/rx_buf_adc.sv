// rx_buf_adc: ADC interface (RxBufADC).
//
// Continuously reads the external 12-bit ADC on the demodulation PCB and
// presents its most recent sample. The ADC is read over a 3-wire serial
// link: chip select low, 16 serial clock periods, chip select high for
// one period, then the next frame. The ADC shifts its word out MSB first
// after four leading zeros and changes `sdata` on the falling edge of
// `sclk`; this block samples it on the rising edge. The serial clock is
// the system clock divided by 2*SCLK_HALF.
//
// That the block keeps reading the latest 12-bit value follows the
// design. The serial protocol (the framing of a common 12-bit SPI ADC)
// and the clock divider are this implementation's choices, since the
// converter part is not specified.
//
// Timing: `valid` pulses for one cycle with each new `sample`, once per
// 17 serial clock periods.
module rx_buf_adc #(
  parameter int unsigned SCLK_HALF = 4   // system clocks per half sclk period
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  input  logic        adc_sdata,
  output logic [11:0] sample,
  output logic        valid
);
  localparam int unsigned HW = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;
  logic [HW-1:0] div;
  logic [4:0]    bitn;     // 0..15 data periods, 16 = quiet period
  logic [10:0]   shreg;   // last 11 bits received; the 12th is adc_sdata itself
  logic          half_end;

  assign half_end = (div == HW'(SCLK_HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div      <= '0;
      bitn     <= 5'd16;
      adc_cs_n <= 1'b1;
      adc_sclk <= 1'b1;
      shreg    <= '0;
      sample   <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      div   <= half_end ? '0 : div + 1'b1;
      if (half_end) begin
        if (adc_sclk) begin
          // falling edge of sclk: start of a bit period
          adc_sclk <= 1'b0;
          if (bitn == 5'd16) begin
            bitn     <= 5'd0;
            adc_cs_n <= 1'b0;
          end else begin
            bitn <= bitn + 1'b1;
            if (bitn == 5'd15) adc_cs_n <= 1'b1;
          end
        end else begin
          // rising edge of sclk: sample the data line
          adc_sclk <= 1'b1;
          if (!adc_cs_n) begin
            shreg <= {shreg[9:0], adc_sdata};
            if (bitn == 5'd15) begin
              sample <= {shreg[10:0], adc_sdata};
              valid  <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
