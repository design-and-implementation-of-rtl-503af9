// flag_detector: Flag/Abort/Idle Detector, the first stage of the receiver.
//
// Takes one received bit per 'bit_en' and keeps a count of consecutive 1s.
//   0 after exactly six 1s   -> flag: the receiver is (re)synchronised
//   seventh consecutive 1    -> abort: the frame in progress is abandoned and
//                               the detector hunts for the next flag
//   0 after exactly seven 1s -> go-ahead pattern (01111111 0)
//   fifteenth consecutive 1  -> idle, held until the next 0
// Frame content passes through a 7-bit delay line: a bit leaves it only
// once seven newer bits have arrived, so the bits of a flag or abort are
// removed from the stream before they can be delivered. After a flag the
// delay line is emptied. Outputs are registered: one rx_sym_t per cycle with
// a content bit, a flag or an abort. 'abrt' (abort received, no flag since)
// and 'idle' are status levels; 'ga_evt' and 'abort_evt' are one-cycle
// pulses. 'clr' (receiver disabled) returns the detector to hunting.
module flag_detector
  import hdlc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    bit_en,
  input  logic    rxd,
  output rx_sym_t sym,
  output logic    abrt,
  output logic    idle,
  output logic    ga_evt,
  output logic    abort_evt
);

  logic [3:0] ones;      // saturates at 15
  logic       sync;      // a flag has been seen, no abort since
  logic [6:0] win;       // win[6] is the oldest bit
  logic [2:0] wcnt;      // valid bits in win, 0..7
  logic [3:0] ones_nx;

  assign ones_nx = (ones == 4'd15) ? ones : ones + 4'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones <= '0; sync <= 1'b0; win <= '0; wcnt <= '0;
      sym <= '0; abrt <= 1'b0; idle <= 1'b0; ga_evt <= 1'b0; abort_evt <= 1'b0;
    end else if (clr) begin
      ones <= '0; sync <= 1'b0; win <= '0; wcnt <= '0;
      sym <= '0; abrt <= 1'b0; idle <= 1'b0; ga_evt <= 1'b0; abort_evt <= 1'b0;
    end else begin
      sym       <= '0;
      ga_evt    <= 1'b0;
      abort_evt <= 1'b0;
      if (bit_en) begin
        if (rxd) begin
          ones <= ones_nx;
          if (ones_nx == 4'd15) idle <= 1'b1;
          if (ones_nx == 4'd7 && sync) begin
            sync      <= 1'b0;
            wcnt      <= '0;
            abrt      <= 1'b1;
            sym.abort <= 1'b1;
            abort_evt <= 1'b1;
          end
        end else begin
          ones <= '0;
          idle <= 1'b0;
          if (ones == 4'd7) ga_evt <= 1'b1;
        end
        if (!rxd && ones == 4'd6) begin
          sync     <= 1'b1;
          abrt     <= 1'b0;
          wcnt     <= '0;
          sym.flag <= 1'b1;
        end else if (sync && !(rxd && ones_nx == 4'd7)) begin
          win <= {win[5:0], rxd};
          if (wcnt == 3'd7) begin
            sym.valid <= 1'b1;
            sym.b     <= win[6];
          end else begin
            wcnt <= wcnt + 3'd1;
          end
        end
      end
    end
  end

endmodule
