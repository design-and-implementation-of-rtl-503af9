// tx_fifo: transmit FIFO of the HDLC transceiver.
//
// Holds up to DEPTH bytes written by the host through the Transmit Data
// register, each with two tags: 'eop' (the byte ends a packet) and 'fa' (the
// packet is to be aborted at this byte). Tx Logic reads the oldest entry.
// The 2-bit Tx FIFO Status field is encoded as 00 full, 01 five or more
// bytes, 10 empty, 11 four or fewer bytes. 'tx4_evt' pulses when a read takes
// the level from five down to four bytes (the "Tx 4/30 Full" interrupt).
// The depth of 30 bytes is taken from the threshold names of the interrupt
// register; the encoding is the design's FIFO Status table. A write to a full
// FIFO is lost.
module tx_fifo
  import hdlc_pkg::*;
#(
  parameter int unsigned DEPTH  = 30,
  parameter int unsigned LOW_TH = 4,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        wr,
  input  tx_entry_t   wdata,
  input  logic        rd,
  output tx_entry_t   rdata,
  output logic        empty,
  output logic [1:0]  status,
  output logic        tx4_evt,
  output logic [CW-1:0] level
);

  logic full;

  sync_fifo #(.WIDTH($bits(tx_entry_t)), .DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .clr,
    .push(wr), .din(wdata), .pop(rd), .dout(rdata),
    .count(level), .full, .empty
  );

  always_comb begin
    if (full)                      status = TXS_FULL;
    else if (empty)                status = TXS_EMPTY;
    else if (level <= CW'(LOW_TH)) status = TXS_LE4;
    else                           status = TXS_GE5;
  end

  // level falls from LOW_TH+1 to LOW_TH: a read without a write at LOW_TH+1
  assign tx4_evt = rd && !(wr && !full) && (level == CW'(LOW_TH + 1));

endmodule
