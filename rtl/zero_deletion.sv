// zero_deletion: removes the stuffed 0 that follows five consecutive 1s of
// received frame content.
//
// One registered stage on the receive symbol stream: content bits pass one
// cycle later except a 0 that comes right after five 1s, which is dropped.
// Flags and aborts pass unchanged and restart the count of 1s. 'clr'
// (receiver disabled) clears the stage.
module zero_deletion
  import hdlc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  rx_sym_t in_sym,
  output rx_sym_t out_sym
);

  logic [2:0] ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones    <= '0;
      out_sym <= '0;
    end else if (clr) begin
      ones    <= '0;
      out_sym <= '0;
    end else begin
      out_sym <= in_sym;
      if (in_sym.flag || in_sym.abort) begin
        ones <= '0;
      end else if (in_sym.valid) begin
        if (!in_sym.b && ones == 3'd5) begin
          out_sym.valid <= 1'b0;     // stuffed zero
          ones          <= '0;
        end else if (in_sym.b) begin
          ones <= (ones == 3'd5) ? ones : ones + 3'd1;
        end else begin
          ones <= '0;
        end
      end
    end
  end

endmodule
