// address_detection: receive address filter.
//
// Counts the content bits of each frame (restarting at every flag and
// abort). When the eighth bit, the last of the address byte, arrives and
// address detection is enabled (RxAD), the byte is compared with the Receive
// Address register: with RA6/7 = 0 on bits 7..1, with RA6/7 = 1 on bits 7..2
// (bits are received least significant first). On a mismatch the eighth bit
// is replaced by a 'drop' symbol and the rest of the frame's content bits
// are suppressed until the next flag or abort; flags and aborts always pass.
// Which address bits are compared is this design's choice. One registered
// stage.
module address_detection
  import hdlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       rxad,
  input  logic       ra67,
  input  logic [7:0] rx_addr,
  input  rx_sym_t    in_sym,
  output rx_sym_t    out_sym
);

  logic [3:0] nbits;     // content bits of this frame, saturates at 8
  logic [7:0] abyte;
  logic       blocked;
  logic [7:0] full_byte;
  logic [7:0] mask;
  logic       match;

  assign full_byte = {in_sym.b, abyte[7:1]};
  assign mask      = ra67 ? 8'hFC : 8'hFE;
  assign match     = ((full_byte ^ rx_addr) & mask) == 8'h00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits <= '0; abyte <= '0; blocked <= 1'b0; out_sym <= '0;
    end else if (clr) begin
      nbits <= '0; abyte <= '0; blocked <= 1'b0; out_sym <= '0;
    end else begin
      out_sym <= in_sym;
      if (in_sym.flag || in_sym.abort) begin
        nbits   <= '0;
        blocked <= 1'b0;
      end else if (in_sym.valid) begin
        if (blocked) begin
          out_sym.valid <= 1'b0;
        end else if (nbits < 4'd8) begin
          abyte <= full_byte;
          nbits <= nbits + 4'd1;
          if (nbits == 4'd7 && rxad && !match) begin
            blocked       <= 1'b1;
            out_sym.valid <= 1'b0;
            out_sym.drop  <= 1'b1;
          end
        end
      end
    end
  end

endmodule
