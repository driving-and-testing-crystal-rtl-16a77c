// rx_fifo_ctrl: receiver FIFO controller / sampler (RxFifoCtrl).
//
// Samples the received bit stream on each recovered sample clock strobe
// and forwards every sampled bit to the transceiver with a one-cycle
// write pulse. Because the recovered clock never stops by itself, the
// controller follows the frame: it searches the sampled bits for the SFD,
// reads the 8-bit PHR that follows, counts the PHR's length in octets of
// payload bits and, once the last payload bit has been passed on, stops
// forwarding. It stays stopped (`done` high) until `arm` is taken low,
// which re-arms it for the next frame.
//
// Counting against the PHR length and stopping the sample clock
// forwarding follow the design. Doing its own exact SFD match to find the
// PHR, using the low 7 PHR bits as the length, and the re-arm by `arm`
// are this implementation's choices. A length of zero ends the frame
// right after the PHR.
module rx_fifo_ctrl
  import pcbif_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       arm,      // receiver input enabled
  input  logic       tick,     // recovered sample clock strobe
  input  logic       din,      // received bit stream
  output logic       wr,       // write pulse towards the transceiver
  output logic       bit_out,  // sampled bit
  output logic       in_frame, // SFD seen, frame being counted
  output logic       done      // frame complete, forwarding stopped
);
  typedef enum logic [1:0] {S_HUNT, S_PHR, S_DATA, S_DONE} state_e;
  state_e     state;
  logic [7:1] shreg;
  logic [7:1] phr;
  logic [2:0] phr_cnt;
  logic [9:0] bits_left;
  logic [7:0] shreg_nxt;
  logic [7:0] phr_nxt;

  assign shreg_nxt = {din, shreg[7:1]};   // LSB-first: newest bit enters at MSB
  assign phr_nxt   = {din, phr[7:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HUNT;
      shreg     <= '0;
      phr       <= '0;
      phr_cnt   <= '0;
      bits_left <= '0;
      wr        <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      wr <= 1'b0;
      if (!arm) begin
        state <= S_HUNT;
        shreg <= '0;
      end else if (tick && state != S_DONE) begin
        wr      <= 1'b1;
        bit_out <= din;
        unique case (state)
          S_HUNT: begin
            shreg <= shreg_nxt[7:1];
            if (shreg_nxt == SFD) begin
              state   <= S_PHR;
              phr_cnt <= '0;
            end
          end
          S_PHR: begin
            phr     <= phr_nxt[7:1];
            phr_cnt <= phr_cnt + 1'b1;
            if (phr_cnt == 3'd7) begin
              bits_left <= {phr_nxt[6:0], 3'b000};
              state     <= (phr_nxt[6:0] == 7'd0) ? S_DONE : S_DATA;
            end
          end
          S_DATA: begin
            bits_left <= bits_left - 1'b1;
            if (bits_left == 10'd1) state <= S_DONE;
          end
          default: ;
        endcase
      end
    end
  end

  assign in_frame = (state == S_PHR) || (state == S_DATA);
  assign done     = (state == S_DONE);
endmodule
