// tx_logic: turns Tx FIFO bytes into the frame-content bit stream.
//
// When 'send' is high and the Tx FIFO holds a byte, Tx Logic reads it and
// offers its bits, least significant first, one token per handshake
// (out_valid/out_ready) to Zero Insertion. Every data bit also enters the
// CRC-CCITT register. After the byte tagged end-of-packet the 16 FCS bits
// follow (complemented CRC, bit 15 first); the last FCS bit carries 'last'.
// A byte tagged frame-abort is not sent: an abort token is offered instead.
// If the FIFO runs dry inside a packet the packet is aborted the same way and
// 'urun' pulses (Tx underrun). The next byte is read in the same cycle that
// the previous byte's last bit is taken, so there is no gap between bytes.
// 'send' low (transmitter disabled) returns the block to idle at once.
// The FIFO tags and the abort-on-underrun behaviour are this design's reading
// of the Control register's EOP and FA bits and of the Tx URUN status.
module tx_logic
  import hdlc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      send,        // transmitter enabled in data mode
  // Tx FIFO
  input  logic      fifo_empty,
  input  tx_entry_t fifo_data,
  output logic      fifo_rd,
  // bit stream
  output logic      out_valid,
  input  logic      out_ready,
  output tx_tok_t   out_tok,
  // events
  output logic      urun,
  output logic      frame_start
);

  typedef enum logic [1:0] {T_IDLE, T_DATA, T_FCS, T_ABORT} tstate_e;
  tstate_e     state;
  logic [7:0]  shreg;
  logic        cur_eop;
  logic [3:0]  cnt;
  logic [15:0] crc;
  logic        take;
  logic        crc_init, crc_en, crc_shift;

  assign take = out_valid && out_ready;

  crc_ccitt u_crc (
    .clk, .rst_n, .init(crc_init), .en(crc_en), .din(shreg[0]),
    .shift(crc_shift), .crc
  );

  always_comb begin
    out_valid = 1'b0;
    out_tok   = '0;
    unique case (state)
      T_DATA:  begin out_valid = 1'b1; out_tok.b = shreg[0]; end
      T_FCS:   begin out_valid = 1'b1; out_tok.b = ~crc[15]; out_tok.last = (cnt == 4'd15); end
      T_ABORT: begin out_valid = 1'b1; out_tok.abort = 1'b1; end
      default: ;
    endcase
  end

  // FIFO read: at the start of a packet, or when the last bit of a byte is
  // taken and the byte did not end the packet
  always_comb begin
    fifo_rd = 1'b0;
    if (send && !fifo_empty) begin
      if (state == T_IDLE) fifo_rd = 1'b1;
      else if (state == T_DATA && take && cnt == 4'd7 && !cur_eop) fifo_rd = 1'b1;
    end
  end

  assign crc_init  = (state == T_IDLE);
  assign crc_en    = (state == T_DATA) && take;
  assign crc_shift = (state == T_FCS) && take;
  assign urun      = send && state == T_DATA && take && cnt == 4'd7 && !cur_eop && fifo_empty;
  assign frame_start = fifo_rd && state == T_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      shreg   <= '0;
      cur_eop <= 1'b0;
      cnt     <= '0;
    end else if (!send) begin
      state   <= T_IDLE;
      cnt     <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (fifo_rd) begin
          shreg   <= fifo_data.data;
          cur_eop <= fifo_data.eop;
          cnt     <= '0;
          state   <= fifo_data.fa ? T_ABORT : T_DATA;
        end
        T_DATA: if (take) begin
          if (cnt == 4'd7) begin
            cnt <= '0;
            if (cur_eop) state <= T_FCS;
            else if (fifo_empty) state <= T_ABORT;   // underrun
            else begin
              shreg   <= fifo_data.data;
              cur_eop <= fifo_data.eop;
              if (fifo_data.fa) state <= T_ABORT;
            end
          end else begin
            shreg <= {1'b0, shreg[7:1]};
            cnt   <= cnt + 4'd1;
          end
        end
        T_FCS: if (take) begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= T_IDLE;
        end
        T_ABORT: if (take) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
