// rx_fifo: receive FIFO of the HDLC transceiver.
//
// Holds up to DEPTH received bytes, each with its 2-bit Rx Byte Status
// (packet byte, first byte, last byte with good FCS, last byte with bad
// FCS). The host reads the oldest byte through the Receive Data register;
// its status is shown in the FIFO Status register. The Rx FIFO Status field
// is encoded 00 empty, 01 25 or fewer bytes, 10 full, 11 26 or more bytes.
// 'rx26_evt' pulses when a write takes the level to 26 bytes (the "Rx 26/30
// Full" interrupt) and 'oflw_evt' when a byte arrives while the FIFO is full
// (the byte is lost). Depth 30 and the thresholds come from the register
// definitions.
module rx_fifo
  import hdlc_pkg::*;
#(
  parameter int unsigned DEPTH   = 30,
  parameter int unsigned HIGH_TH = 26,
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        wr,
  input  rx_entry_t   wdata,
  input  logic        rd,
  output rx_entry_t   rdata,
  output logic        empty,
  output logic [1:0]  status,
  output logic        rx26_evt,
  output logic        oflw_evt,
  output logic [CW-1:0] level
);

  logic full;

  sync_fifo #(.WIDTH($bits(rx_entry_t)), .DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .clr,
    .push(wr), .din(wdata), .pop(rd), .dout(rdata),
    .count(level), .full, .empty
  );

  always_comb begin
    if (full)                        status = RXS_FULL;
    else if (empty)                  status = RXS_EMPTY;
    else if (level >= CW'(HIGH_TH))  status = RXS_GE26;
    else                             status = RXS_LE25;
  end

  assign rx26_evt = wr && !full && !(rd && !empty) && (level == CW'(HIGH_TH - 1));
  assign oflw_evt = wr && full;

endmodule
