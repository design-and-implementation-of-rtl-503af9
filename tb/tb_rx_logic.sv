// tb_rx_logic: unstuffed frame content, flags, aborts and drops go into Rx
// Logic. For a good frame the FIFO writes must be its data bytes without the
// FCS, the first marked 'first' (or 'last, good' for a single byte), the
// middle ones 'packet' and the last 'last, good FCS', with one 'eop' pulse.
// A frame with a flipped bit must end 'last, bad FCS'; a frame that is not a
// whole number of octets likewise; frames under three bytes and dropped
// frames must write nothing; an aborted frame that has written bytes must
// end with a 'last, bad FCS' byte.
module tb_rx_logic;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  rx_sym_t in_sym = '0;
  logic fifo_wr, eop, fcs_bad;
  rx_entry_t fifo_data;
  rx_entry_t got[$], exp_q[$];
  int checks = 0, failures = 0, eops = 0, exp_eops = 0, bads = 0;

  rx_logic dut (.clk, .rst_n, .clr, .in_sym, .fifo_wr, .fifo_data, .eop, .fcs_bad);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #2;
    if (fifo_wr) got.push_back(fifo_data);
    if (eop) eops++;
  end

  task automatic put(rx_sym_t s);
    @(negedge clk);
    #1 in_sym = s;
    @(negedge clk);
    #1 in_sym = '0;
  endtask

  task automatic send_bits(bitq_t c);
    foreach (c[i]) put('{valid: 1'b1, b: c[i], flag: 1'b0, abort: 1'b0, drop: 1'b0});
  endtask

  task automatic send_flag();
    put('{valid: 1'b0, b: 1'b0, flag: 1'b1, abort: 1'b0, drop: 1'b0});
  endtask

  task automatic expect_frame(byteq_t d, bit good_fcs);
    foreach (d[i]) begin
      rx_byte_status_e st;
      if (i == d.size() - 1) st = good_fcs ? RXB_LAST_GOOD : RXB_LAST_BAD;
      else if (i == 0) st = RXB_FIRST;
      else st = RXB_PACKET;
      exp_q.push_back('{status: st, data: d[i]});
    end
    exp_eops++;
  endtask

  function automatic byteq_t rnd(int n);
    byteq_t d;
    repeat (n) d.push_back(8'($urandom));
    return d;
  endfunction

  initial begin
    byteq_t d, w;
    bitq_t c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send_flag();
    for (int f = 0; f < 120; f++) begin
      int kind;
      kind = f % 6;
      d = rnd($urandom_range(1, 12));
      c = content_bits(d);
      case (kind)
        0, 1: begin send_bits(c); send_flag(); expect_frame(d, 1); end
        2: begin  // bit error
          int e;
          e = $urandom_range(0, c.size() - 1);
          c[e] ^= 1'b1;
          if (e < 8 * d.size()) d[e / 8][e % 8] ^= 1'b1;
          send_bits(c); send_flag(); expect_frame(d, 0); bads++;
        end
        3: begin  // not a whole number of octets
          c.push_back(1'b0);
          send_bits(c); send_flag(); expect_frame(d, 0); bads++;
        end
        4: begin  // too short, then a dropped frame
          send_bits(c[0:15]); send_flag();
          send_bits(c[0:6]);
          put('{valid: 1'b0, b: 1'b0, flag: 1'b0, abort: 1'b0, drop: 1'b1});
          send_flag();
        end
        default: begin  // abort after d bytes + 1 more
          c = content_bits(d);
          send_bits(c[0:8*d.size()+7]);
          put('{valid: 1'b0, b: 1'b0, flag: 1'b0, abort: 1'b1, drop: 1'b0});
          // bytes written: all but the last 3 of the d.size()+1 received bytes,
          // then the oldest held byte closes the frame as bad
          if (d.size() + 1 > 3) begin
            w.delete();
            for (int i = 0; i < d.size() - 1; i++) w.push_back(d[i]);
            expect_frame(w, 0);
          end
          send_flag();
        end
      endcase
    end
    repeat (4) @(negedge clk);
    checks++;
    if (got.size() != exp_q.size()) begin failures++; $display("%0d writes, expected %0d", got.size(), exp_q.size()); end
    foreach (got[i]) if (i < exp_q.size()) begin
      checks++;
      if (got[i] !== exp_q[i]) begin
        failures++;
        if (failures < 10) $display("write %0d: %s %h, want %s %h", i, got[i].status.name(), got[i].data,
                                    exp_q[i].status.name(), exp_q[i].data);
      end
    end
    checks++;
    if (eops != exp_eops) begin failures++; $display("eop %0d want %0d", eops, exp_eops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
