// tb_cchannel_interface: ST-BUS timing. In normal mode all strobes are high.
// In internal control mode with BRCK = 1 (one CLK per bit) and BRCK = 0
// (two CLKs per bit) and F0i pulses every 256 bit periods, it checks that
// TxD is enabled for exactly the 8 bit periods of channel 1 in each frame,
// that there are exactly 8 receive and 8 transmit strobes per frame (one per
// bit period), that the receive strobes fall inside the channel, and that the
// byte sent on RxD in channel 1 (bit 7 first) appears in C Channel Status.
// It also checks each strobe's exact clock: the transmit strobe in the last
// clock before each channel-1 bit period, the receive strobe in the last
// clock of each channel-1 bit period, and TxD enabled only inside channel 1.
module tb_cchannel_interface;
  logic clk = 0, rst_n = 0, ic = 0, brck = 0, f0i_n = 1, rxd = 1;
  logic tx_tick, rx_tick, txd_oe;
  logic [7:0] cch_status;
  int checks = 0, failures = 0;
  int cyc = 0, oe_cnt = 0, rx_cnt = 0, tx_cnt = 0, rx_outside = 0;
  int oe_wrong = 0, tx_wrong = 0, rx_wrong = 0;
  int cpb = 1;
  logic [7:0] pattern = 8'hA5;
  bit running = 0;

  cchannel_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // F0i generator and RxD source: frame of 256*cpb clocks; F0i low in the
  // last clock of the frame; RxD carries 'pattern' during channel 1
  always @(negedge clk) begin
    int pos, bitn;
    if (running) begin
      pos  = cyc % (256 * cpb);
      bitn = pos / cpb;
      f0i_n = (pos != 256 * cpb - 1);
      rxd = (bitn >= 8 && bitn < 16) ? pattern[7 - (bitn - 8)] : 1'b1;
      #1;
      if (cyc == 256 * cpb) begin oe_cnt = 0; rx_cnt = 0; tx_cnt = 0; rx_outside = 0; end
      if (txd_oe) oe_cnt++;
      if (rx_tick) begin
        rx_cnt++;
        if (!(bitn >= 8 && bitn < 16)) rx_outside++;
      end
      if (tx_tick) tx_cnt++;
      if (cyc >= 256 * cpb) begin
        // bit period that starts in the next clock, and whether this clock ends one
        if (tx_tick != (((pos + 1) % cpb == 0) && ((pos + 1) / cpb) % 256 >= 8 && ((pos + 1) / cpb) % 256 < 16)) tx_wrong++;
        if (rx_tick != (((pos + 1) % cpb == 0) && bitn >= 8 && bitn < 16)) rx_wrong++;
        if (txd_oe != (bitn >= 8 && bitn < 16)) oe_wrong++;
      end
      cyc++;
    end
  end

  task automatic run_mode(bit b);
    brck = b; cpb = b ? 1 : 2;
    ic = 1;
    // align: start the generator so the first F0i comes at the end of a frame
    cyc = 0; running = 1;
    repeat (256 * cpb) @(negedge clk);   // first frame aligns the counter
    for (int fr = 0; fr < 4; fr++) begin
      pattern = 8'($urandom);
      repeat (256 * cpb) @(negedge clk);
      checks++;
      if (cch_status !== pattern) begin failures++; $display("brck=%0b C status %h want %h", b, cch_status, pattern); end
    end
    checks++;
    if (oe_cnt != 4 * 8 * cpb) begin failures++; $display("brck=%0b oe clocks %0d", b, oe_cnt); end
    checks++;
    if (rx_cnt != 32 || rx_outside != 0) begin failures++; $display("brck=%0b rx strobes %0d outside %0d", b, rx_cnt, rx_outside); end
    checks++;
    if (tx_cnt != 32) begin failures++; $display("brck=%0b tx strobes %0d", b, tx_cnt); end
    checks++;
    if (tx_wrong != 0 || rx_wrong != 0 || oe_wrong != 0) begin
      failures++; $display("brck=%0b strobe clocks wrong: tx %0d rx %0d oe %0d", b, tx_wrong, rx_wrong, oe_wrong);
    end
    tx_wrong = 0; rx_wrong = 0; oe_wrong = 0;
    running = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) begin
      @(negedge clk);
      #1;
      checks++;
      if (!(tx_tick && rx_tick && txd_oe)) begin failures++; $display("normal mode strobes"); end
    end
    run_mode(1);
    run_mode(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
