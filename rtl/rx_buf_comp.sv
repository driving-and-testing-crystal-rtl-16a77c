// rx_buf_comp: comparator input buffer (RxBufComp).
//
// The comparator on the demodulation PCB delivers an asynchronous 1-bit
// signal. This buffer brings it into the system clock domain with a
// two-flop synchronizer; the clock recovery then oversamples it. The
// design names the block only; the synchronizer is this implementation's
// choice. Latency: two clocks.
module rx_buf_comp (
  input  logic clk,
  input  logic rst_n,
  input  logic comp_in,
  output logic comp_bit
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta     <= 1'b0;
      comp_bit <= 1'b0;
    end else begin
      meta     <= comp_in;
      comp_bit <= meta;
    end
  end
endmodule
