// rf_rx: transceiver receive path (start detection and message store).
//
// Takes the sampled bits that the PCB Interface forwards with write
// pulses, looks for the SFD, and only on an exact 8-bit match starts
// recording: the next 8 bits are the PHR (PSDU length in octets), then
// that many octets, assembled LSB first, are stored in an octet FIFO from
// which the message is read out (the processor's DMA would do this). When
// the last octet is in, `done` pulses and `frame_len` and `crc_ok` hold
// the result; the CRC check runs the frame check polynomial over the
// whole PSDU, which leaves zero for an intact frame. The receiver then
// sleeps until `en` is taken low, which also empties the octet FIFO.
//
// Exact SFD match, recording and notification follow the design; the
// SFD value, bit order and CRC come from IEEE 802.15.4 (see rf_tx). The
// readout stream, the sleep/re-arm by `en`, and counting frames shorter
// than the two CRC octets as bad are this implementation's choices.
module rf_rx
  import pcbif_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,          // transceiver in Rx mode
  input  logic       wr,          // bit write pulse
  input  logic       din,
  // received octets
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  output logic       recording,   // SFD found, frame being stored
  output logic       done,        // one-cycle pulse: frame complete
  output logic [6:0] frame_len,   // PSDU octets incl. CRC
  output logic       crc_ok
);
  typedef enum logic [1:0] {S_HUNT, S_PHR, S_DATA, S_SLEEP} state_e;
  state_e      state;
  logic [7:1]  shreg;
  logic [7:0]  shreg_nxt;
  logic [2:0]  idx;
  logic [6:0]  nbytes;
  logic [15:0] crc;
  logic        push, empty;

  assign shreg_nxt = {din, shreg[7:1]};
  assign push      = wr && (state == S_DATA) && (idx == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HUNT;
      shreg     <= '0;
      idx       <= '0;
      nbytes    <= '0;
      crc       <= '0;
      done      <= 1'b0;
      frame_len <= '0;
      crc_ok    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!en) begin
        state <= S_HUNT;
        shreg <= '0;
      end else if (wr) begin
        shreg <= shreg_nxt[7:1];
        unique case (state)
          S_HUNT: if (shreg_nxt == SFD) begin
            state <= S_PHR;
            idx   <= '0;
          end
          S_PHR: begin
            idx <= idx + 1'b1;
            if (idx == 3'd7) begin
              frame_len <= shreg_nxt[6:0];
              nbytes    <= '0;
              crc       <= '0;
              crc_ok    <= 1'b0;
              if (shreg_nxt[6:0] == 7'd0) begin
                state <= S_SLEEP;
                done  <= 1'b1;
              end else begin
                state <= S_DATA;
              end
            end
          end
          S_DATA: begin
            crc <= crc16_bit(crc, din);
            idx <= idx + 1'b1;
            if (idx == 3'd7) begin
              nbytes <= nbytes + 1'b1;
              if (nbytes == frame_len - 1'b1) begin
                state  <= S_SLEEP;
                done   <= 1'b1;
                crc_ok <= (crc16_bit(crc, din) == 16'h0000) && (frame_len >= 7'd2);
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign recording = (state == S_PHR) || (state == S_DATA);
  assign out_valid = !empty;

  sync_fifo #(.WIDTH(8), .DEPTH(MAX_PSDU)) u_fifo (
    .clk, .rst_n,
    .clear   (!en),
    .wr      (push),
    .wr_data (shreg_nxt),
    .rd      (out_ready && !empty),
    .rd_data (out_data),
    .empty   (empty),
    .full    (),
    .count   ()
  );
endmodule
