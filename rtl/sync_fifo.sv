// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Holds the transceiver's PPDU bit stream on the transmit side and the
// received message octets on the receive side. DEPTH need not be a power
// of two. `rd_data` shows the oldest entry whenever `empty` is low; a
// read pulse removes it. A write to a full FIFO and a read from an empty
// one are ignored (and flagged by assertions). The design only names the
// FIFO; its organisation is this implementation's choice.
// The assertions are disabled while `rst_n` is low, so lint tools note
// that `rst_n` feeds both the asynchronous resets and a synchronously
// sampled expression; the assertions generate no logic, so this is
// harmless.
module sync_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1032
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rd_data = mem[rptr];
  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));

  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full && !clear))
    else $error("sync_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty && !clear))
    else $error("sync_fifo: read while empty");
endmodule
