// tb_hdlc_transceiver: end-to-end test of the transceiver at its default
// parameters, with TxD looped back to RxD and the host bus driven as a
// microprocessor would. It goes through:
//   - reset state: Control and Timing Control cleared, TxD idle (all 1s)
//   - normal mode, one bit per CLK: packets of random length and content
//     (some all-FF to force bit stuffing) are written to the Tx FIFO, sent,
//     received and read back; the line is also captured every CLK and
//     decoded by a reference decoder, which checks the rate and the FCS
//   - Rx Byte Status first/packet/last-good on each received byte
//   - address detection on (match and mismatch, RA6/7 = 0 and 1)
//   - a line bit error giving 'last byte, bad FCS'
//   - frame abort by the FA bit, Tx underrun, Rx FIFO overflow, the 4/30 and
//     26/30 thresholds, Tx Done, EOPD, TEOP and REOP
//   - IFTF fill modes: idle (receiver IDLE status), flags, go-ahead (GA)
//   - TxEN pin held high keeps TxD idle
//   - software reset by the RST bit of Timing Control
//   - internal control mode on the ST-BUS with BRCK = 1 and BRCK = 0: F0i
//     every 125 us frame, TxD driven only during channel 1 (8 bit periods
//     per frame), packets received, C Channel Status equal to the channel 1
//     byte on the line
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_hdlc_transceiver;
  import hdlc_pkg::*;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, cs_n = 1, rw = 1;
  logic [3:0] addr = 0;
  logic [7:0] d_in = 0, d_out;
  logic d_oe, txen_n = 0, rxen_n = 0, f0i_n = 1, rxd;
  logic txd, txd_oe, teop, reop, irq;
  logic [7:0] cch_ctrl;
  logic flip = 0, teop_d = 0;
  int n_teop_bits = 0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_frames_ok = 0, n_stuffed = 0, n_deleted = 0, n_addr_pass = 0, n_addr_drop = 0;
  int n_bad_fcs = 0, n_fa = 0, n_urun = 0, n_oflw = 0, n_tx4 = 0, n_rx26 = 0, n_txdone = 0;
  int n_eopd = 0, n_teop = 0, n_reop = 0, n_idle = 0, n_ga = 0, n_flags_fill = 0;
  int n_pin_dis = 0, n_srst = 0, n_st_bus1 = 0, n_st_bus2 = 0, n_cch = 0;

  // ST-BUS frame generator
  bit st_on = 0;
  int cpb = 1, st_cyc = 0;
  int oe_frame = 0, oe_bad = 0, st_frames = 0;
  logic [7:0] ch1_sh, ch1_last;

  bitq_t line;       // TxD every CLK, normal mode
  bit    capture = 0;

  hdlc_transceiver dut (.*);

  assign rxd = (txd_oe ? txd : 1'b1) ^ flip;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  always @(negedge clk) begin
    if (capture) line.push_back(txd);
    if (teop) n_teop++;
    if (teop && !teop_d) n_teop_bits++;
    teop_d = teop;
    if (reop) n_reop++;
    if (dut.u_zi.stuff && dut.u_zi.out_valid && dut.u_zi.out_ready) n_stuffed++;
    if (dut.u_zd.in_sym.valid && !dut.u_zd.in_sym.b && dut.u_zd.ones == 3'd5) n_deleted++;
    if (st_on) begin
      int pos, bitn;
      pos = st_cyc % (256 * cpb);
      bitn = pos / cpb;
      f0i_n = (pos != 256 * cpb - 1);
      if (txd_oe) oe_frame++;
      if (txd_oe && !(bitn >= 8 && bitn < 16)) oe_bad++;
      // channel 1 byte on the line, sampled in the last CLK of each bit
      if (bitn >= 8 && bitn < 16 && (pos % cpb) == cpb - 1) ch1_sh = {ch1_sh[6:0], rxd};
      if (pos == 16 * cpb) ch1_last = ch1_sh;
      if (pos == 256 * cpb - 1) begin
        st_frames++;
        if (st_frames > 1) begin
          checks++;
          if (oe_frame != 8 * cpb || oe_bad != 0) begin
            failures++; $display("ST-BUS frame: TxD enabled %0d CLKs, %0d outside channel 1", oe_frame, oe_bad);
          end
        end
        oe_frame = 0; oe_bad = 0;
      end
      st_cyc++;
    end else f0i_n = 1;
  end

  // ---------------- host bus ----------------
  task automatic wr(logic [3:0] a, logic [7:0] v);
    @(negedge clk);
    cs_n = 0; rw = 0; addr = a; d_in = v;
    @(negedge clk);
    cs_n = 1; rw = 1;
    @(negedge clk);
  endtask

  task automatic rd(logic [3:0] a, output logic [7:0] v);
    @(negedge clk);
    cs_n = 0; rw = 1; addr = a;
    @(negedge clk);
    v = d_out;
    cs_n = 1;
    @(negedge clk);
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] ctrl_v;   // host copy of the Control register
  logic [7:0] iflags;   // interrupt flags accumulated by the host

  task automatic set_ctrl(logic [7:0] v);
    ctrl_v = v;
    wr(A_CONTROL, v);
  endtask

  task automatic poll_int();
    logic [7:0] v;
    rd(A_INT_FLAG, v);
    iflags |= v;
  endtask

  // write a packet to the Tx FIFO; fa_at >= 0 tags that byte as abort,
  // eop = 0 leaves the packet open
  task automatic put_packet(byteq_t d, bit eop = 1, int fa_at = -1);
    foreach (d[i]) begin
      if (i == fa_at) wr(A_CONTROL, ctrl_v | 8'h02);
      else if (eop && i == d.size() - 1) wr(A_CONTROL, ctrl_v | 8'h01);
      wr(A_DATA, d[i]);
      if (i == fa_at) break;
    end
  endtask

  // read one received packet; returns bytes and the final status
  task automatic get_packet(output byteq_t d, output logic [1:0] last_st, input int max_wait);
    logic [7:0] st, v;
    int w = 0;
    d.delete();
    last_st = 2'b00;
    forever begin
      rd(A_FIFO_STATUS, st);
      if (st[5:4] == RXS_EMPTY) begin
        w++;
        if (w > max_wait) begin last_st = 2'bxx; return; end
        continue;
      end
      rd(A_DATA, v);
      d.push_back(v);
      if (st[7:6] == RXB_LAST_GOOD || st[7:6] == RXB_LAST_BAD) begin last_st = st[7:6]; return; end
      if (d.size() == 1) chk(st[7:6] == RXB_FIRST, "first byte status");
      else chk(st[7:6] == RXB_PACKET, "packet byte status");
    end
  endtask

  task automatic wait_clk(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_tx_empty(int max);
    logic [7:0] st;
    for (int i = 0; i < max; i++) begin
      rd(A_FIFO_STATUS, st);
      if (st[3:2] == TXS_EMPTY) break;
    end
  endtask

  function automatic byteq_t rnd_packet(int n, bit ff);
    byteq_t d;
    repeat (n) d.push_back(ff ? 8'hFF : 8'($urandom));
    return d;
  endfunction

  // send a packet with the FIFO filled first, then read it back
  task automatic loop_packet(byteq_t d, bit expect_rx, string what);
    byteq_t r;
    logic [1:0] st;
    set_ctrl(8'h48);             // RxEN, data mode, transmitter off
    put_packet(d);
    set_ctrl(ctrl_v | 8'h80);    // TxEN
    get_packet(r, st, expect_rx ? 400 : 60);
    if (expect_rx) begin
      chk(st == RXB_LAST_GOOD && r == d, {what, ": packet received intact"});
      if (st == RXB_LAST_GOOD && r == d) n_frames_ok++;
    end else begin
      chk(r.size() == 0, {what, ": packet must be filtered"});
    end
    wait_tx_empty(50);
    wait_clk(40);
    poll_int();
  endtask

  initial begin
    byteq_t d, r, frames[$], sent[$];
    bit good[$];
    logic [1:0] st;
    logic [7:0] v;
    int t0;
    iflags = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_clk(3);

    // reset state
    rd(A_CONTROL, v); chk(v == 8'h00, "Control cleared by reset");
    rd(A_TIMING, v);  chk(v == 8'h00, "Timing Control cleared by reset");
    t0 = 0;
    repeat (40) begin @(negedge clk); if (txd !== 1'b1) t0++; end
    chk(t0 == 0, "idle stream after reset");
    wr(A_INT_EN, 8'hFF);

    // ---- normal mode packets, line captured and decoded ----
    capture = 1;
    for (int p = 0; p < 8; p++) begin
      d = rnd_packet($urandom_range(1, 26), p % 3 == 1);
      sent.push_back(d);
      loop_packet(d, 1, "normal mode");
    end
    capture = 0;
    decode(line, frames, good);
    chk(frames.size() == sent.size(), "reference decoder frame count");
    foreach (frames[i]) if (i < sent.size()) begin
      chk(good[i] && frames[i][0:frames[i].size()-3] == sent[i], "reference decoder frame content");
    end
    chk(iflags[INT_TXDONE] && iflags[INT_EOPD] && iflags[INT_TX4], "Tx Done, EOPD and Tx 4/30 interrupts");
    if (iflags[INT_TXDONE]) n_txdone++;
    if (iflags[INT_EOPD]) n_eopd++;
    if (iflags[INT_TX4]) n_tx4++;
    chk(n_teop == 8 && n_reop == 8, $sformatf("TEOP %0d REOP %0d pulses for 8 frames", n_teop, n_reop));

    // ---- address detection ----
    wr(A_RX_ADDR, 8'hA4);
    ctrl_v = 8'h68;
    for (int k = 0; k < 4; k++) begin
      logic ra;
      logic [7:0] a;
      ra = k[1];
      a = (k[0] == 0) ? (8'hA4 ^ (ra ? 8'h03 : 8'h01)) : (8'hA4 ^ 8'h10);
      d = rnd_packet(5, 0);
      d[0] = a;
      begin
        byteq_t rr;
        logic [1:0] s2;
        wr(A_CONTROL, {8'h68 | (ra ? 8'h10 : 8'h00)});
        ctrl_v = 8'h68 | (ra ? 8'h10 : 8'h00);
        put_packet(d);
        wr(A_CONTROL, ctrl_v | 8'h80);
        get_packet(rr, s2, (k[0] == 0) ? 400 : 80);
        if (k[0] == 0) begin
          chk(s2 == RXB_LAST_GOOD && rr == d, "matching address accepted");
          if (rr == d) n_addr_pass++;
        end else begin
          chk(rr.size() == 0, "other address filtered");
          if (rr.size() == 0) n_addr_drop++;
        end
        wait_tx_empty(50);
        wait_clk(60);
      end
    end

    // ---- bit error -> bad FCS ----
    set_ctrl(8'h48);
    d = rnd_packet(8, 0);
    foreach (d[i]) d[i] = 8'h00;
    put_packet(d);
    set_ctrl(ctrl_v | 8'h80);
    wait_clk(40);
    flip = 1; @(negedge clk); flip = 0;
    get_packet(r, st, 400);
    chk(st == RXB_LAST_BAD && r.size() == d.size(), "corrupted frame flagged bad FCS");
    if (st == RXB_LAST_BAD) n_bad_fcs++;
    wait_tx_empty(50); wait_clk(40);

    // ---- frame abort by FA ----
    iflags = 0; poll_int(); iflags = 0;
    set_ctrl(8'h48);
    d = rnd_packet(8, 0);
    put_packet(d, 0, 5);             // bytes 0..4 then an FA-tagged byte
    set_ctrl(ctrl_v | 8'h80);
    get_packet(r, st, 300);
    chk(st == RXB_LAST_BAD && r == d[0:2], "aborted frame ends with a bad last byte");
    wait_clk(60);
    poll_int();
    rd(A_GEN_STATUS, v);
    chk(iflags[INT_FA], "FA interrupt on abort");
    if (iflags[INT_FA]) n_fa++;

    // ---- Tx underrun ----
    iflags = 0;
    set_ctrl(8'h48);
    d = rnd_packet(3, 0);
    put_packet(d, 0);
    set_ctrl(ctrl_v | 8'h80);
    wait_clk(120);
    poll_int();
    rd(A_GEN_STATUS, v);
    chk(iflags[INT_TXURUN] && v[6], "Tx underrun interrupt and status");
    chk(iflags[INT_FA], "underrun abort seen by the receiver");
    if (iflags[INT_TXURUN]) n_urun++;
    get_packet(r, st, 10);
    chk(r.size() == 0, "underrun frame not stored");

    // ---- Rx FIFO thresholds and overflow ----
    iflags = 0; poll_int(); iflags = 0;
    for (int k = 0; k < 2; k++) begin
      set_ctrl(8'h48);
      put_packet(rnd_packet(22, 0));
      set_ctrl(ctrl_v | 8'h80);
      wait_tx_empty(100);
      wait_clk(80);
    end
    poll_int();
    rd(A_GEN_STATUS, v);
    chk(iflags[INT_RX26] && iflags[INT_RXOFLW] && v[7], "Rx 26/30 and overflow");
    if (iflags[INT_RX26]) n_rx26++;
    if (iflags[INT_RXOFLW]) n_oflw++;
    rd(A_FIFO_STATUS, v);
    chk(v[5:4] == RXS_FULL, "Rx FIFO full status");

    // ---- software reset ----
    wr(A_TIMING, 8'h80);
    rd(A_FIFO_STATUS, v);
    chk(v[5:2] == {RXS_EMPTY, TXS_EMPTY}, "software reset empties the FIFOs");
    rd(A_CONTROL, v);
    chk(v == 8'h00, "software reset clears Control");
    wr(A_TIMING, 8'h00);
    if (v == 8'h00) n_srst++;
    wr(A_INT_EN, 8'hFF);

    // ---- fill modes ----
    set_ctrl(8'hC4);                 // flags
    wait_clk(100);
    rd(A_GEN_STATUS, v);
    chk(!v[2] && !v[4], "flag fill: receiver synchronised, not idle");
    t0 = 0;
    repeat (64) begin @(negedge clk); line.push_back(txd); end
    if (!v[2]) n_flags_fill++;
    iflags = 0; poll_int(); iflags = 0;
    set_ctrl(8'hCC);                 // go-ahead
    wait_clk(100);
    poll_int();
    chk(iflags[INT_GA], "go-ahead detected");
    if (iflags[INT_GA]) n_ga++;
    set_ctrl(8'hC0);                 // idle
    wait_clk(100);
    rd(A_GEN_STATUS, v);
    chk(v[2], "idle detected");
    if (v[2]) n_idle++;

    // ---- TxEN pin ----
    txen_n = 1;
    set_ctrl(8'hC4);
    t0 = 0;
    repeat (64) begin @(negedge clk); if (txd !== 1'b1) t0++; end
    chk(t0 == 0, "TxEN pin high keeps TxD idle");
    if (t0 == 0) n_pin_dis++;
    txen_n = 0;

    // ---- internal control mode, ST-BUS ----
    for (int b = 1; b >= 0; b--) begin
      cpb = (b == 1) ? 1 : 2;
      st_cyc = 0; st_frames = 0; st_on = 1;
      wr(A_TIMING, (b == 1) ? 8'h50 : 8'h40);
      wait_clk(256 * cpb * 2);
      for (int p = 0; p < 2; p++) begin
        d = rnd_packet($urandom_range(2, 6), p == 1);
        set_ctrl(8'h48);
        put_packet(d);
        set_ctrl(ctrl_v | 8'h80);
        get_packet(r, st, 3000 * cpb);
        chk(st == RXB_LAST_GOOD && r == d, $sformatf("ST-BUS packet, BRCK=%0d", b));
        if (st == RXB_LAST_GOOD && r == d) begin
          if (b == 1) n_st_bus1++; else n_st_bus2++;
        end
      end
      // C Channel Status: the channel 1 byte, read during a steady flag fill
      set_ctrl(8'hC4);
      wait_clk(256 * cpb * 3);
      @(negedge clk);
      while ((st_cyc % (256 * cpb)) != 100 * cpb) @(negedge clk);
      rd(A_CCH_STATUS, v);
      chk(v == ch1_last, $sformatf("C Channel Status %h, line %h", v, ch1_last));
      if (v == ch1_last) n_cch++;
      chk(st_frames > 10, "ST-BUS frames counted");
      set_ctrl(8'h00);
      st_on = 0;
      wr(A_TIMING, 8'h00);
    end
    wr(A_CCH_CTRL, 8'h5C);
    chk(cch_ctrl == 8'h5C, "C Channel Control register output");

    // mechanism coverage
    $display("frames ok %0d, stuffed zeros %0d, deleted zeros %0d, addr pass %0d drop %0d",
             n_frames_ok, n_stuffed, n_deleted, n_addr_pass, n_addr_drop);
    $display("bad FCS %0d, FA %0d, underrun %0d, overflow %0d, tx4 %0d, rx26 %0d, txdone %0d, eopd %0d",
             n_bad_fcs, n_fa, n_urun, n_oflw, n_tx4, n_rx26, n_txdone, n_eopd);
    $display("TEOP %0d, REOP %0d, idle %0d, GA %0d, flag fill %0d, pin disable %0d, soft reset %0d",
             n_teop, n_reop, n_idle, n_ga, n_flags_fill, n_pin_dis, n_srst);
    // frames closed by a flag: 8 normal, 4 address tests, 1 bit error,
    // 2 overflow, 4 ST-BUS = 19 TEOP bits. Frames written to the Rx FIFO:
    // the same less the 2 filtered ones, plus the aborted frame = 18 REOP.
    chk(n_teop_bits == 19 && n_reop == 18, "one TEOP bit per frame sent and one REOP per frame stored");
    $display("ST-BUS BRCK=1 %0d, BRCK=0 %0d, C channel %0d", n_st_bus1, n_st_bus2, n_cch);
    chk(n_frames_ok > 0, "mechanism: frame transfer");
    chk(n_stuffed > 0, "mechanism: zero insertion");
    chk(n_deleted > 0, "mechanism: zero deletion");
    chk(n_addr_pass > 0 && n_addr_drop > 0, "mechanism: address detection");
    chk(n_bad_fcs > 0, "mechanism: bad FCS");
    chk(n_fa > 0 && n_urun > 0 && n_oflw > 0, "mechanism: abort, underrun, overflow");
    chk(n_tx4 > 0 && n_rx26 > 0 && n_txdone > 0 && n_eopd > 0, "mechanism: interrupts");
    chk(n_teop > 0 && n_reop > 0, "mechanism: TEOP/REOP");
    chk(n_idle > 0 && n_ga > 0 && n_flags_fill > 0, "mechanism: fill modes");
    chk(n_pin_dis > 0 && n_srst > 0, "mechanism: TxEN pin, software reset");
    chk(n_st_bus1 > 0 && n_st_bus2 > 0 && n_cch > 0, "mechanism: ST-BUS internal mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
