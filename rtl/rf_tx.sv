// rf_tx: transceiver transmit path (PPDU framer and bit FIFO).
//
// Turns a message of up to 125 octets into the simplified IEEE 802.15.4
// PPDU bit stream and stores it in a bit FIFO, from which the PCB
// Interface reads it at the bit rate. The frame is SFD (8 bits), PHR (8
// bits: PSDU length in octets, bit 7 reserved as 0), the message octets
// and a 16-bit CRC, so the PSDU is the message plus two octets. There is
// no preamble and no chip spreading. Every octet goes out LSB first.
//
// Adding SFD, PHR and CRC and buffering the bit stream in a FIFO follow
// the design. The SFD value 0xA7, the LSB-first order and the CRC
// (x^16+x^12+x^5+1, reflected, initial value 0, sent low octet first, as
// in the IEEE 802.15.4 frame check sequence) come from that standard. The
// message interface is this implementation's choice: a `start` pulse with
// the message length, then the octets on a valid/ready stream (as a DMA
// would deliver them); one bit is framed per clock. `start` is taken
// only in transmit mode, when idle, and with a length of 1..125.
module rf_tx
  import pcbif_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = MAX_PPDU_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,         // transceiver in Tx mode
  input  logic       start,
  input  logic [6:0] msg_len,    // message octets, 1..125
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  // bit FIFO read side, towards the PCB Interface
  input  logic       fifo_rd,
  output logic       fifo_bit,
  output logic       fifo_empty,
  output logic       busy,       // framing in progress
  output logic       done        // one-cycle pulse: frame fully queued
);
  typedef enum logic [2:0] {S_IDLE, S_SFD, S_PHR, S_DATA, S_CRC} state_e;
  state_e      state;
  logic [3:0]  idx;        // bit index within field
  logic [6:0]  len_q;
  logic [6:0]  nbytes;     // octets framed so far
  logic [7:0]  cur;
  logic [15:0] crc, fcs;
  logic        push, push_bit, full;
  logic [7:0]  phr;
  logic        take_byte;
  logic        data_bit;

  assign phr       = {1'b0, len_q + 7'd2};
  assign take_byte = (state == S_DATA) && (idx == 4'd0) && in_valid && !full;
  assign in_ready  = (state == S_DATA) && (idx == 4'd0) && !full;
  assign data_bit  = (idx == 4'd0) ? in_data[0] : cur[idx[2:0]];

  always_comb begin
    push     = 1'b0;
    push_bit = 1'b0;
    unique case (state)
      S_SFD:  begin push = !full; push_bit = SFD[idx[2:0]]; end
      S_PHR:  begin push = !full; push_bit = phr[idx[2:0]]; end
      S_DATA: begin push = !full && (idx != 4'd0 || in_valid); push_bit = data_bit; end
      S_CRC:  begin push = !full; push_bit = fcs[idx]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      idx    <= '0;
      len_q  <= '0;
      nbytes <= '0;
      cur    <= '0;
      crc    <= '0;
      fcs    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && en && msg_len != 7'd0 && msg_len <= 7'(MAX_MSG)) begin
          state <= S_SFD;
          len_q <= msg_len;
          idx   <= '0;
          crc   <= '0;
        end
        S_SFD, S_PHR: if (push) begin
          idx <= idx + 1'b1;
          if (idx == 4'd7) begin
            idx    <= '0;
            nbytes <= '0;
            state  <= (state == S_SFD) ? S_PHR : S_DATA;
          end
        end
        S_DATA: if (push) begin
          if (take_byte) cur <= in_data;
          crc <= crc16_bit(crc, push_bit);
          idx <= idx + 1'b1;
          if (idx == 4'd7) begin
            idx    <= '0;
            nbytes <= nbytes + 1'b1;
            if (nbytes == len_q - 1'b1) begin
              state <= S_CRC;
              fcs   <= crc16_bit(crc, push_bit);
            end
          end
        end
        S_CRC: if (push) begin
          idx <= idx + 1'b1;
          if (idx == 4'd15) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  sync_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .clear   (1'b0),
    .wr      (push),
    .wr_data (push_bit),
    .rd      (fifo_rd),
    .rd_data (fifo_bit),
    .empty   (fifo_empty),
    .full    (full),
    .count   ()
  );
endmodule
