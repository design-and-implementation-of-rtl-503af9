// tb_tx_fifo: fills and drains the 30-entry Tx FIFO with random traffic and
// compares every read entry, the Tx FIFO Status code and the "4/30"
// threshold pulse with a queue model.
module tb_tx_fifo;
  import hdlc_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  tx_entry_t wdata = '0, rdata;
  logic empty, tx4_evt;
  logic [1:0] status;
  logic [4:0] level;
  int checks = 0, failures = 0, tx4_seen = 0;
  tx_entry_t model[$];

  tx_fifo dut (.clk, .rst_n, .clr, .wr, .wdata, .rd, .rdata, .empty, .status, .tx4_evt, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] exp_status(int n);
    if (n == 30) return 2'b00;
    if (n == 0)  return 2'b10;
    if (n <= 4)  return 2'b11;
    return 2'b01;
  endfunction

  task automatic step(bit w, bit r);
    int n = model.size();
    bit exp_tx4;
    wr = w; rd = r; wdata = tx_entry_t'($urandom);
    #1;
    // check outputs before the edge
    checks++;
    if (status !== exp_status(n) || empty !== (n == 0)) begin
      failures++; $display("status %b empty %b with %0d entries", status, empty, n);
    end
    if (r && n > 0) begin
      checks++;
      if (rdata !== model[0]) begin failures++; $display("rdata %h want %h", rdata, model[0]); end
    end
    exp_tx4 = r && n == 5 && !(w && n < 30);
    checks++;
    if (tx4_evt !== exp_tx4) begin failures++; $display("tx4 %b want %b at %0d", tx4_evt, exp_tx4, n); end
    if (exp_tx4) tx4_seen++;
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
      repeat (40) step(1, 0);                       // overfill
      repeat (400) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0);
      repeat (40) step(0, 1);                       // drain
      repeat (200) step($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1);
    end
    clr = 1; @(negedge clk); clr = 0; model.delete();
    step(0, 0);
    checks++;
    if (tx4_seen == 0) begin failures++; $display("threshold never crossed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
