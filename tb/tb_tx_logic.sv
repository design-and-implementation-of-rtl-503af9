// tb_tx_logic: drives Tx Logic from a modelled Tx FIFO with random
// back-pressure and checks the token stream: each packet's bytes LSB first
// followed by the 16 FCS bits of the reference CRC with 'last' on the final
// one; a byte tagged frame-abort yields one abort token; a FIFO that runs
// dry inside a packet yields an abort token and a 'urun' pulse. It also
// checks that, with the sink always ready, a packet of N bytes takes
// exactly 8N + 16 cycles of tokens with no gaps.
module tb_tx_logic;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, send = 0;
  logic fifo_empty, fifo_rd, out_valid, out_ready = 0, urun, frame_start;
  tx_entry_t fifo_data;
  tx_tok_t out_tok;
  int checks = 0, failures = 0, urun_cnt = 0, abort_cnt = 0;
  tx_entry_t q[$];
  tx_tok_t exp_q[$], got_q[$];
  int ready_pct = 100;
  int gap_cycles = 0;

  tx_logic dut (.clk, .rst_n, .send, .fifo_empty, .fifo_data, .fifo_rd,
                .out_valid, .out_ready, .out_tok, .urun, .frame_start);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model and token collection, one step per cycle
  always @(negedge clk) begin
    fifo_empty = (q.size() == 0);
    fifo_data  = (q.size() > 0) ? q[0] : '0;
    out_ready  = ($urandom_range(1, 100) <= ready_pct);
    #1;
    if (out_valid && out_ready) got_q.push_back(out_tok);
    if (send && out_valid && !out_ready) gap_cycles++;
    if (urun) urun_cnt++;
    @(posedge clk);
    #1;
    if (fifo_rd && q.size() > 0) void'(q.pop_front());
  end

  task automatic add_packet(byteq_t d, bit with_eop = 1, int fa_at = -1);
    bitq_t c;
    foreach (d[i]) begin
      if (i == fa_at) begin
        q.push_back('{data: d[i], eop: 1'b0, fa: 1'b1});
        for (int j = 0; j < i; j++)
          for (int k = 0; k < 8; k++) exp_q.push_back('{b: d[j][k], last: 1'b0, abort: 1'b0});
        exp_q.push_back('{b: 1'b0, last: 1'b0, abort: 1'b1});
        return;
      end
      q.push_back('{data: d[i], eop: with_eop && (i == d.size() - 1), fa: 1'b0});
    end
    if (with_eop) begin
      c = content_bits(d);
      foreach (c[i]) exp_q.push_back('{b: c[i], last: (i == c.size() - 1), abort: 1'b0});
    end else begin
      foreach (d[i]) for (int k = 0; k < 8; k++) exp_q.push_back('{b: d[i][k], last: 1'b0, abort: 1'b0});
      exp_q.push_back('{b: 1'b0, last: 1'b0, abort: 1'b1});
    end
  endtask

  task automatic compare(string what);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++; $display("%s: %0d tokens, expected %0d", what, got_q.size(), exp_q.size());
    end
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got_q[i] !== exp_q[i]) begin
        failures++;
        if (failures < 10) $display("%s: token %0d got %b want %b", what, i, got_q[i], exp_q[i]);
      end
      if (exp_q[i].abort) abort_cnt++;
    end
    got_q.delete(); exp_q.delete();
  endtask

  function automatic byteq_t rnd_bytes(int n);
    byteq_t d;
    repeat (n) d.push_back(8'($urandom));
    return d;
  endfunction

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // timing: always-ready sink, one packet of 10 bytes
    add_packet(rnd_bytes(10));
    @(negedge clk);
    send = 1;
    t0 = 0;
    while (got_q.size() < 8 * 10 + 16 && t0 < 1000) begin @(negedge clk); t0++; end
    repeat (5) @(negedge clk);
    checks++;
    if (t0 != 8 * 10 + 16 + 1) begin failures++; $display("packet took %0d cycles", t0); end
    compare("timing");
    // random packets with back-pressure
    ready_pct = 40;
    repeat (30) begin
      add_packet(rnd_bytes($urandom_range(1, 12)));
      while (q.size() > 0) @(negedge clk);
      repeat (200) @(negedge clk);
      compare("random");
    end
    // frame abort tag on the 3rd byte
    add_packet(rnd_bytes(6), 1, 2);
    repeat (200) @(negedge clk);
    compare("fa");
    // underrun: packet without EOP
    t0 = urun_cnt;
    add_packet(rnd_bytes(4), 0);
    repeat (300) @(negedge clk);
    compare("underrun");
    checks++;
    if (urun_cnt != t0 + 1) begin failures++; $display("urun pulses %0d", urun_cnt - t0); end
    checks++;
    if (abort_cnt != 2) begin failures++; $display("aborts %0d", abort_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
