// tb_flag_detector: sends a line of idle 1s, flags, frames, an aborted
// frame, a go-ahead pattern and idle again into the detector with random
// bit spacing. The content bits it delivers between flags must equal each
// frame's stuffed content exactly (flags removed, stuffing left for Zero
// Deletion); one flag event per flag, one abort event per abort (seven 1s), a
// go-ahead pulse for 0111 1111 0, and IDLE set after fifteen 1s.
// A second phase sends random runs of 1s (0 to 16 long, each ended by a 0)
// and compares flags, aborts, go-aheads, idle and the content between flags
// with a bit-by-bit reference kept in the testbench.
module tb_flag_detector;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, bit_en = 0, rxd = 1;
  rx_sym_t sym;
  logic abrt, idle, ga_evt, abort_evt;
  bitq_t line;
  int checks = 0, failures = 0, flags = 0, aborts = 0, gas = 0, idle_seen = 0;
  bitq_t cur;
  bitq_t got_frames[$];

  flag_detector dut (.clk, .rst_n, .clr, .bit_en, .rxd, .sym, .abrt, .idle, .ga_evt, .abort_evt);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect content between flags
  always @(negedge clk) begin
    if (sym.valid) cur.push_back(sym.b);
    if (sym.flag) begin
      flags++;
      if (cur.size() > 0) got_frames.push_back(cur);
      cur.delete();
    end
    if (sym.abort) begin aborts++; cur.delete(); end
    if (ga_evt) gas++;
    if (idle) idle_seen++;
  end

  task automatic send(bitq_t q);
    foreach (q[i]) begin
      @(negedge clk);
      bit_en = 1; rxd = q[i];
      @(negedge clk);
      bit_en = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  function automatic bitq_t ones(int n);
    bitq_t q;
    repeat (n) q.push_back(1'b1);
    return q;
  endfunction

  // Random runs of 1s checked against a reference of the detection rules:
  // flag = 0 after exactly six 1s (always resynchronises), abort = seventh 1
  // while synchronised, go-ahead = 0 after exactly seven 1s, idle = fifteen
  // 1s. Content between two flags is every bit after the first flag except
  // the seven that start the second one.
  task automatic random_phase();
    bitq_t seg, exp_frames[$];
    int r_ones, r_sync, e_flags, e_aborts, e_gas, n_idle_err;
    logic b;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    flags = 0; aborts = 0; gas = 0; got_frames.delete(); cur.delete();
    r_ones = 0; r_sync = 0; e_flags = 0; e_aborts = 0; e_gas = 0; n_idle_err = 0;
    for (int run = 0; run < 3000; run++) begin
      int len;
      len = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 16) : $urandom_range(5, 7);
      for (int k = 0; k <= len; k++) begin
        b = (k < len);
        // reference
        if (b) begin
          if (r_ones < 15) r_ones++;
          if (r_ones == 7 && r_sync == 1) begin r_sync = 0; e_aborts++; seg.delete(); end
          else if (r_sync == 1) seg.push_back(b);
        end else begin
          if (r_ones == 7) e_gas++;
          if (r_ones == 6) begin
            e_flags++;
            if (r_sync == 1 && seg.size() > 7) begin
              bitq_t c;
              for (int i = 0; i < seg.size() - 7; i++) c.push_back(seg[i]);
              exp_frames.push_back(c);
            end
            r_sync = 1; seg.delete();
          end else if (r_sync == 1) seg.push_back(b);
          r_ones = 0;
        end
        send('{b});
        @(negedge clk);
        if (idle != (r_ones == 15)) n_idle_err++;
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_idle_err != 0) begin failures++; $display("random: idle wrong %0d times", n_idle_err); end
    checks++;
    if (flags != e_flags || aborts != e_aborts || gas != e_gas) begin
      failures++;
      $display("random: flags %0d/%0d aborts %0d/%0d go-ahead %0d/%0d",
               flags, e_flags, aborts, e_aborts, gas, e_gas);
    end
    checks++;
    if (got_frames.size() != exp_frames.size()) begin
      failures++; $display("random: %0d frames, expected %0d", got_frames.size(), exp_frames.size());
    end
    foreach (got_frames[i]) if (i < exp_frames.size()) begin
      checks++;
      if (got_frames[i] != exp_frames[i]) begin failures++; $display("random: frame %0d differs", i); end
    end
    $display("random phase: %0d flags, %0d aborts, %0d go-aheads, %0d frames",
             e_flags, e_aborts, e_gas, exp_frames.size());
  endtask

  initial begin
    bitq_t exp_frames[$], q, c;
    byteq_t d;
    int exp_flags = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(ones(20));
    checks++;
    if (!idle) begin failures++; $display("idle not detected"); end
    for (int f = 0; f < 10; f++) begin
      d.delete();
      repeat ($urandom_range(1, 8)) d.push_back(($urandom_range(0, 1) == 1) ? 8'hFF : 8'($urandom));
      c = stuff(content_bits(d));
      exp_frames.push_back(c);
      send(frame_line(d));
      exp_flags += 2;
      if (f % 3 == 0) begin send(flag_bits()); exp_flags++; end
    end
    // aborted frame: flag, some content, abort
    send(flag_bits()); exp_flags++;
    q = '{1,0,1,1,0,0,1,0, 0,1,1,1,1,1,1,1};
    send(q);
    send(ones(3));
    // go-ahead 0 1111111 0
    send('{0,1,1,1,1,1,1,1,0});
    // in sync again: exactly seven 1s then a 0 is both an abort and a go-ahead
    send(flag_bits()); exp_flags++;
    send('{1,0,1,1,0,0,1,0, 0,1,1,1,1,1,1,1,0});
    repeat (3) @(negedge clk);
    checks++;
    if (aborts != 2) begin failures++; $display("seven 1s in a frame: aborts %0d", aborts); end
    send(ones(20));
    checks++;
    if (got_frames.size() != exp_frames.size()) begin
      failures++; $display("%0d frames, expected %0d", got_frames.size(), exp_frames.size());
    end
    foreach (got_frames[i]) if (i < exp_frames.size()) begin
      checks++;
      if (got_frames[i] != exp_frames[i]) begin failures++; $display("frame %0d content differs", i); end
    end
    checks++;
    if (flags != exp_flags) begin failures++; $display("flags %0d want %0d", flags, exp_flags); end
    checks++;
    if (aborts != 2 || !abrt) begin failures++; $display("aborts %0d abrt %b", aborts, abrt); end
    checks++;
    if (gas != 2) begin failures++; $display("go-ahead %0d", gas); end
    checks++;
    if (!idle) begin failures++; $display("idle not detected at end"); end
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
