// dac_ctrl: DAC interface (DACCtrl).
//
// Whenever the processor writes one of the DAC registers 0x04-0x10, the
// new 12-bit value is sent to the corresponding external DAC over SPI.
// The four DACs set the two MSK modulation voltages (f0, f1), the Rx
// comparator threshold and the RF carrier's VCO voltage. Writes are
// remembered per DAC, so several writes in a row are all delivered; they
// are served lowest index first and the value sent is the register's
// value when the transfer starts.
//
// Writing on register change over SPI follows the design. The frame
// format is this implementation's choice, that of a common 12-bit SPI
// DAC: one shared `sclk`/`mosi` pair, one active-low `sync_n` per DAC, 16
// bits MSB first made of two zero bits, two power-down bits (00, normal
// operation) and the 12-bit value. `mosi` changes while `sclk` is high;
// the DAC takes it on the falling edge. `sclk` runs at the system clock
// divided by 2*SCLK_HALF.
//
// Timing: a transfer takes 33 half periods of sclk from start to the
// release of `sync_n`; `busy` is high meanwhile.
module dac_ctrl
  import pcbif_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NUM_DAC-1:0][11:0]  dac_val,
  input  logic [NUM_DAC-1:0]        dac_wr,    // register written
  output logic                      dac_sclk,
  output logic                      dac_mosi,
  output logic [NUM_DAC-1:0]        dac_sync_n,
  output logic                      busy
);
  localparam int unsigned HW = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;

  logic [NUM_DAC-1:0] pending;
  logic [HW-1:0]      div;
  logic [5:0]         phase;   // 0..32 half periods within a frame
  logic [14:0]        word;     // bits 14..0 of the 16-bit frame; bit 15 is always 0
  logic [1:0]         sel;
  logic               start;
  logic [1:0]         pick;

  always_comb begin
    pick = '0;
    for (int i = NUM_DAC - 1; i >= 0; i--)
      if (pending[i]) pick = 2'(i);
  end

  assign start = !busy && (pending != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending    <= '0;
      busy       <= 1'b0;
      div        <= '0;
      phase      <= '0;
      word       <= '0;
      sel        <= '0;
      dac_sclk   <= 1'b1;
      dac_mosi   <= 1'b0;
      dac_sync_n <= '1;
    end else begin
      if (start) begin
        busy            <= 1'b1;
        sel             <= pick;
        word            <= {3'b000, dac_val[pick]};
        dac_mosi        <= 1'b0;          // first bit of {4'b0000, value}
        dac_sync_n[pick] <= 1'b0;
        div             <= '0;
        phase           <= '0;
        dac_sclk        <= 1'b1;
        pending         <= (pending & ~(NUM_DAC'(1) << pick)) | dac_wr;
      end else begin
        pending <= pending | dac_wr;
        if (busy) begin
          div <= (div == HW'(SCLK_HALF - 1)) ? '0 : div + 1'b1;
          if (div == HW'(SCLK_HALF - 1)) begin
            phase <= phase + 1'b1;
            if (phase == 6'd32) begin
              busy            <= 1'b0;
              dac_sync_n[sel] <= 1'b1;
              dac_sclk        <= 1'b1;
            end else if (!phase[0]) begin
              dac_sclk <= 1'b0;                   // DAC samples here
            end else begin
              dac_sclk <= 1'b1;
              if (phase != 6'd31) begin
                word     <= {word[13:0], 1'b0};
                dac_mosi <= word[14];
              end
            end
          end
        end
      end
    end
  end
endmodule
