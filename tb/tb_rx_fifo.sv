// tb_rx_fifo: random writes and reads of the 30-entry Rx FIFO compared with
// a queue model: read data and byte status, the Rx FIFO Status code, the
// "26/30" threshold pulse and the overflow pulse.
module tb_rx_fifo;
  import hdlc_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  rx_entry_t wdata = '0, rdata;
  logic empty, rx26_evt, oflw_evt;
  logic [1:0] status;
  logic [4:0] level;
  int checks = 0, failures = 0, rx26_seen = 0, oflw_seen = 0;
  rx_entry_t model[$];

  rx_fifo dut (.clk, .rst_n, .clr, .wr, .wdata, .rd, .rdata, .empty, .status, .rx26_evt, .oflw_evt, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] exp_status(int n);
    if (n == 30) return 2'b10;
    if (n == 0)  return 2'b00;
    if (n >= 26) return 2'b11;
    return 2'b01;
  endfunction

  task automatic step(bit w, bit r);
    int n = model.size();
    bit e26, eof;
    wr = w; rd = r; wdata = rx_entry_t'($urandom);
    #1;
    checks++;
    if (status !== exp_status(n) || empty !== (n == 0)) begin
      failures++; $display("status %b empty %b with %0d entries", status, empty, n);
    end
    if (r && n > 0) begin
      checks++;
      if (rdata !== model[0]) begin failures++; $display("rdata %h want %h", rdata, model[0]); end
    end
    e26 = w && n == 25 && !(r && n > 0);
    eof = w && n == 30;
    checks++;
    if (rx26_evt !== e26 || oflw_evt !== eof) begin
      failures++; $display("events %b%b want %b%b at %0d", rx26_evt, oflw_evt, e26, eof, n);
    end
    rx26_seen += int'(e26); oflw_seen += int'(eof);
    @(negedge clk);
    if (r && n > 0) void'(model.pop_front());
    if (w && n < 30) model.push_back(wdata);
    wr = 0; rd = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    repeat (4) begin
      repeat (40) step(1, 0);
      repeat (400) step($urandom_range(0, 2) != 0, $urandom_range(0, 1) == 1);
      repeat (40) step(0, 1);
      repeat (200) step($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);
    end
    checks++;
    if (rx26_seen == 0 || oflw_seen == 0) begin failures++; $display("events not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
