// zero_insertion: HDLC bit stuffing for the transmitter.
//
// Sits between Tx Logic and the Flag Generator on a valid/ready bit stream.
// It counts consecutive 1s of frame content; after the fifth it offers a 0
// of its own and holds the upstream stream for that one token. If the fifth
// 1 is also the frame's last bit, the 'last' mark moves onto the inserted 0,
// so that the closing flag follows it. Abort tokens pass through and, like
// the end of a frame, restart the count. 'clr' (transmitter disabled) clears
// the count. The block is combinational on the stream, with the count held
// in a register.
module zero_insertion
  import hdlc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    in_valid,
  output logic    in_ready,
  input  tx_tok_t in_tok,
  output logic    out_valid,
  input  logic    out_ready,
  output tx_tok_t out_tok
);

  logic [2:0] ones;
  logic       pend_last;   // the stuffed 0 closes the frame
  logic       stuff;

  assign stuff = (ones == 3'd5);

  always_comb begin
    if (stuff) begin
      out_valid = 1'b1;
      out_tok   = '{b: 1'b0, last: pend_last, abort: 1'b0};
      in_ready  = 1'b0;
    end else begin
      out_valid = in_valid;
      out_tok   = in_tok;
      in_ready  = out_ready;
      if (in_tok.b && in_tok.last && ones == 3'd4) out_tok.last = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones      <= '0;
      pend_last <= 1'b0;
    end else if (clr) begin
      ones      <= '0;
      pend_last <= 1'b0;
    end else if (out_valid && out_ready) begin
      if (stuff) begin
        ones      <= '0;
        pend_last <= 1'b0;
      end else if (in_tok.abort) begin
        ones <= '0;
      end else if (in_tok.b) begin
        ones      <= ones + 3'd1;
        pend_last <= in_tok.last && (ones == 3'd4);
        if (in_tok.last && ones != 3'd4) ones <= '0;
      end else begin
        ones <= '0;
      end
    end
  end

endmodule
