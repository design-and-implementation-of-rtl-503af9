// sync_fifo: single-clock first-in first-out buffer, used by the Tx and Rx
// FIFOs of the HDLC transceiver.
//
// DEPTH entries of WIDTH bits held in a register array with read and write
// pointers and an occupancy count. 'dout' always shows the oldest entry
// (first-word fall-through). A push when full and a pop when empty are
// ignored; a push and a pop in the same cycle are both performed. 'clr'
// empties the FIFO synchronously.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 30,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic [CW-1:0]    count,
  output logic             full,
  output logic             empty
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  // storage needs no reset: an entry is only read after it was written
  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

endmodule
