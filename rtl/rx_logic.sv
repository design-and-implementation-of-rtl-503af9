// rx_logic: receive byte assembly, FCS check and Rx FIFO writing.
//
// Content bits (least significant first) are gathered into bytes and every
// bit is run through a CRC-CCITT register, preset at each flag, abort and
// address drop. Because the last two bytes of a frame are its FCS, the block
// keeps the three most recent bytes back: a byte is written to the Rx FIFO
// only when a fourth arrives behind it, marked 'first byte' if it is the
// frame's first and 'packet byte' otherwise. At the closing flag the oldest
// held byte is written as the last byte with good FCS when the CRC register
// holds the residue 16'h1D0F and the frame is a whole number of octets, and
// with bad FCS otherwise; the two FCS bytes are discarded. A frame of fewer
// than three bytes is dropped. On an abort, a frame that has already written
// bytes is closed with its oldest held byte marked bad FCS. An address drop
// discards the frame. 'eop' pulses (REOP and the EOPD interrupt) when a last
// byte is written. The hold-back scheme, the minimum frame length and the
// handling of aborted frames are this design's choices; the four byte
// status codes are the design's Rx Byte Status.
module rx_logic
  import hdlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  rx_sym_t   in_sym,
  output logic      fifo_wr,
  output rx_entry_t fifo_data,
  output logic      eop,
  output logic      fcs_bad
);

  logic [7:0]  shreg;
  logic [2:0]  bitpos;
  logic        active;       // content bits since the last flag
  logic [7:0]  hold [3];     // hold[0] is the oldest
  logic [1:0]  hcnt;
  logic        pushed_any;
  logic [15:0] crc;
  logic        crc_init;
  logic        closing;
  logic        good;
  logic [7:0]  byte_nx;

  assign byte_nx  = {in_sym.b, shreg[7:1]};
  assign crc_init = in_sym.flag || in_sym.abort || in_sym.drop;
  assign closing  = in_sym.flag && active && (pushed_any || hcnt == 2'd3);
  assign good     = (crc == CRC_RESIDUE) && (bitpos == 3'd0);

  crc_ccitt u_crc (
    .clk, .rst_n, .init(crc_init || clr), .en(in_sym.valid), .din(in_sym.b),
    .shift(1'b0), .crc
  );

  always_comb begin
    fifo_wr   = 1'b0;
    fifo_data = '{status: RXB_PACKET, data: hold[0]};
    eop       = 1'b0;
    fcs_bad   = 1'b0;
    if (clr) begin
      fifo_wr = 1'b0;
    end else if (closing) begin
      fifo_wr          = 1'b1;
      fifo_data.status = good ? RXB_LAST_GOOD : RXB_LAST_BAD;
      eop              = 1'b1;
      fcs_bad          = !good;
    end else if (in_sym.abort && pushed_any) begin
      fifo_wr          = 1'b1;
      fifo_data.status = RXB_LAST_BAD;
      eop              = 1'b1;
    end else if (in_sym.valid && bitpos == 3'd7 && hcnt == 2'd3) begin
      fifo_wr          = 1'b1;
      fifo_data.status = pushed_any ? RXB_PACKET : RXB_FIRST;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0; bitpos <= '0; active <= 1'b0; hcnt <= '0; pushed_any <= 1'b0;
      hold[0] <= '0; hold[1] <= '0; hold[2] <= '0;
    end else if (clr || in_sym.flag || in_sym.abort || in_sym.drop) begin
      bitpos <= '0; active <= 1'b0; hcnt <= '0; pushed_any <= 1'b0;
    end else if (in_sym.valid) begin
      active <= 1'b1;
      shreg  <= byte_nx;
      bitpos <= bitpos + 3'd1;
      if (bitpos == 3'd7) begin
        if (hcnt == 2'd3) begin
          hold[0]    <= hold[1];
          hold[1]    <= hold[2];
          hold[2]    <= byte_nx;
          pushed_any <= 1'b1;
        end else begin
          hold[hcnt] <= byte_nx;
          hcnt       <= hcnt + 2'd1;
        end
      end
    end
  end

endmodule
