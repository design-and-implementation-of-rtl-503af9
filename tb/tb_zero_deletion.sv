// tb_zero_deletion: stuffed frame content with flags and aborts between
// frames goes through Zero Deletion; the content delivered between flags
// must be the unstuffed original, and flags and aborts must pass unchanged.
module tb_zero_deletion;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  rx_sym_t in_sym = '0, out_sym;
  int checks = 0, failures = 0, flags = 0, aborts = 0;
  bitq_t cur, got[$];

  zero_deletion dut (.clk, .rst_n, .clr, .in_sym, .out_sym);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_sym.valid) cur.push_back(out_sym.b);
    if (out_sym.flag) begin flags++; got.push_back(cur); cur.delete(); end
    if (out_sym.abort) begin aborts++; cur.delete(); end
  end

  task automatic put(rx_sym_t s);
    @(negedge clk);
    #1 in_sym = s;
    @(negedge clk);
    #1 in_sym = '0;
  endtask

  initial begin
    bitq_t exp[$], c, s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      c.delete();
      repeat ($urandom_range(1, 80)) c.push_back($urandom_range(0, 9) < 8);
      s = stuff(c);
      if (f % 7 == 3) begin
        // an aborted fragment first
        foreach (s[i]) put('{valid: 1'b1, b: s[i], flag: 1'b0, abort: 1'b0, drop: 1'b0});
        put('{valid: 1'b0, b: 1'b0, flag: 1'b0, abort: 1'b1, drop: 1'b0});
      end
      foreach (s[i]) put('{valid: 1'b1, b: s[i], flag: 1'b0, abort: 1'b0, drop: 1'b0});
      put('{valid: 1'b0, b: 1'b0, flag: 1'b1, abort: 1'b0, drop: 1'b0});
      exp.push_back(c);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("%0d frames", got.size()); end
    foreach (got[i]) if (i < exp.size()) begin
      checks++;
      if (got[i] != exp[i]) begin failures++; if (failures < 5) $display("frame %0d differs", i); end
    end
    checks++;
    if (aborts != 29) begin failures++; $display("aborts %0d", aborts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
