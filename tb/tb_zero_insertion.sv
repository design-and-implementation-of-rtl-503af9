// tb_zero_insertion: random frames, rich in 1s, go through the bit stuffer
// under random back-pressure on both sides. The output must equal the
// reference stuffing of each frame, with 'last' on the final output bit
// (an inserted 0 when the frame ends in five 1s). Abort tokens pass through
// and restart the count of 1s.
module tb_zero_insertion;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  tx_tok_t in_tok = '0, out_tok;
  tx_tok_t src[$], exp_q[$], got_q[$];
  int checks = 0, failures = 0, stuffed = 0, last_moved = 0;

  zero_insertion dut (.clk, .rst_n, .clr, .in_valid, .in_ready, .in_tok,
                      .out_valid, .out_ready, .out_tok);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    in_valid  = (src.size() > 0) && ($urandom_range(0, 3) != 0);
    in_tok    = (src.size() > 0) ? src[0] : '0;
    out_ready = ($urandom_range(0, 2) != 0);
    #1;
    if (out_valid && out_ready) got_q.push_back(out_tok);
    if (in_valid && in_ready) void'(src.pop_front());
  end

  task automatic add_frame(bitq_t c);
    bitq_t s = stuff(c);
    foreach (c[i]) src.push_back('{b: c[i], last: i == c.size() - 1, abort: 1'b0});
    foreach (s[i]) exp_q.push_back('{b: s[i], last: i == s.size() - 1, abort: 1'b0});
    stuffed += s.size() - c.size();
    if (s[s.size()-1] == 1'b0 && c[c.size()-1] == 1'b1) last_moved++;
  endtask

  initial begin
    bitq_t c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) begin
      c.delete();
      repeat ($urandom_range(1, 60)) c.push_back($urandom_range(0, 9) < 8);
      if ($urandom_range(0, 3) == 0) repeat (5) c.push_back(1'b1);   // end in five 1s
      if ($urandom_range(0, 5) == 0) begin
        // an aborted frame: a few bits then an abort token
        for (int i = 0; i < 3; i++) begin
          src.push_back('{b: 1'b1, last: 1'b0, abort: 1'b0});
          exp_q.push_back('{b: 1'b1, last: 1'b0, abort: 1'b0});
        end
        src.push_back('{b: 1'b0, last: 1'b0, abort: 1'b1});
        exp_q.push_back('{b: 1'b0, last: 1'b0, abort: 1'b1});
      end
      add_frame(c);
    end
    while (src.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++; $display("%0d tokens, expected %0d", got_q.size(), exp_q.size());
    end
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got_q[i] !== exp_q[i]) begin
        failures++;
        if (failures < 10) $display("token %0d got %b want %b", i, got_q[i], exp_q[i]);
      end
    end
    checks++;
    if (stuffed == 0 || last_moved == 0) begin failures++; $display("cases not reached"); end
    $display("stuffed zeros %0d, frames ending in a stuffed zero %0d", stuffed, last_moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
