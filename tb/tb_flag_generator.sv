// tb_flag_generator: checks the line the Flag/Abort/Idle Generator sends.
// Disabled and IFTF = 00 give all 1s, IFTF = 01 continuous flags, IFTF = 11
// continuous 7F octets. In data mode frames handed over as stuffed bit
// tokens must decode, with a reference decoder, to the original bytes with
// a good FCS; TEOP must be high exactly on the last bit of each closing flag
// and 'tx_done' must pulse once per frame. An abort token must put a 0
// followed by seven 1s on the line. TxD may change only on a tick.
module tb_flag_generator;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, tick = 0, in_valid = 0, in_ready;
  iftf_e iftf = IFTF_IDLE;
  tx_tok_t in_tok = '0;
  logic txd, teop, tx_done, tx_abort;
  tx_tok_t src[$];
  bitq_t line;
  bit teop_line[$];
  int checks = 0, failures = 0, done_cnt = 0, abort_cnt = 0, tick_pct = 100;

  flag_generator dut (.clk, .rst_n, .en, .iftf, .tick, .in_valid, .in_ready, .in_tok,
                      .txd, .teop, .tx_done, .tx_abort);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    logic t, txd_before;
    tick     = ($urandom_range(1, 100) <= tick_pct);
    in_valid = (src.size() > 0);
    in_tok   = (src.size() > 0) ? src[0] : '0;
    #1;
    t = tick;
    txd_before = txd;
    if (in_valid && in_ready) void'(src.pop_front());
    if (tx_done) done_cnt++;
    if (tx_abort) abort_cnt++;
    @(posedge clk);
    #1;
    if (t) begin line.push_back(txd); teop_line.push_back(teop); end
    else begin
      checks++;
      if (txd !== txd_before) begin failures++; $display("TxD changed without a tick"); end
    end
  end

  task automatic run_bits(int n);
    int target = line.size() + n;
    while (line.size() < target) @(negedge clk);
  endtask

  // the last n line bits must repeat octet 'pat' (LSB first) at some phase
  task automatic check_fill(logic [7:0] pat, string what);
    int n = line.size();
    bit ok = 0;
    for (int ph = 0; ph < 8 && !ok; ph++) begin
      bit all = 1;
      for (int i = n - 64; i < n; i++) if (line[i] !== pat[(i + ph) % 8]) all = 0;
      ok = all;
    end
    checks++;
    if (!ok) begin failures++; $display("%s: fill pattern %h not seen", what, pat); end
  endtask

  initial begin
    byteq_t d, frames[$], exp_frames[$];
    bit good[$];
    bitq_t s;
    int start;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_bits(80);  check_fill(8'hFF, "disabled");
    en = 1;
    iftf = IFTF_IDLE;    run_bits(100); check_fill(8'hFF, "idle");
    iftf = IFTF_FLAGS;   run_bits(100); check_fill(8'h7E, "flags");
    iftf = IFTF_GOAHEAD; run_bits(100); check_fill(8'h7F, "go-ahead");
    iftf = IFTF_DATA;    run_bits(40);
    // frames
    tick_pct = 60;
    start = line.size();
    for (int f = 0; f < 20; f++) begin
      d.delete();
      repeat ($urandom_range(1, 10)) d.push_back(($urandom_range(0, 1) == 1) ? 8'hFF : 8'($urandom));
      exp_frames.push_back(d);
      s = stuff(content_bits(d));
      foreach (s[i]) src.push_back('{b: s[i], last: i == s.size() - 1, abort: 1'b0});
      while (src.size() > 0) @(negedge clk);
    end
    run_bits(40);
    decode(line[start:$], frames, good);
    checks++;
    if (frames.size() != exp_frames.size()) begin
      failures++; $display("%0d frames decoded, %0d sent", frames.size(), exp_frames.size());
    end
    foreach (frames[i]) begin
      if (i < exp_frames.size()) begin
        checks++;
        if (!good[i] || frames[i][0:frames[i].size()-3] != exp_frames[i]) begin
          failures++; $display("frame %0d wrong", i);
        end
      end
    end
    checks++;
    if (done_cnt != exp_frames.size()) begin failures++; $display("tx_done %0d", done_cnt); end
    // TEOP on the last bit of each closing flag: every TEOP bit is a 0
    // preceded by 0111111
    begin
      int teops = 0;
      for (int i = start; i < line.size(); i++) if (teop_line[i]) begin
        teops++;
        checks++;
        if (!(line[i] == 0 && line[i-1] && line[i-6] && line[i-7] == 0)) begin
          failures++; $display("TEOP not on a closing flag at %0d", i);
        end
      end
      checks++;
      if (teops != exp_frames.size()) begin failures++; $display("TEOP count %0d", teops); end
    end
    // abort
    start = line.size();
    for (int i = 0; i < 12; i++) src.push_back('{b: 1'b0, last: 1'b0, abort: 1'b0});
    src.push_back('{b: 1'b0, last: 1'b0, abort: 1'b1});
    while (src.size() > 0) @(negedge clk);
    run_bits(20);
    begin
      bit found = 0;
      for (int i = start; i + 8 < line.size(); i++)
        if (line[i] == 0 && line[i+1] && line[i+2] && line[i+3] && line[i+4] && line[i+5] &&
            line[i+6] && line[i+7]) found = 1;
      checks++;
      if (!found || abort_cnt != 1) begin failures++; $display("abort sequence missing"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
