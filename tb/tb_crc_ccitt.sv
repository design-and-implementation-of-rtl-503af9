// tb_crc_ccitt: checks the serial CRC-CCITT register against the byte-wise
// reference. For the check string "123456789" the HDLC FCS is 16'h906E; the
// register, read MSB first and complemented, must give the same bits in
// line order. Random messages are then checked the same way, and running a
// message with its FCS through the register must leave the residue 16'h1D0F.
module tb_crc_ccitt;
  import hdlc_tb_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, en = 0, din = 0, shift = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc_ccitt dut (.clk, .rst_n, .init, .en, .din, .shift, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(bitq_t q);
    foreach (q[i]) begin
      en = 1; din = q[i];
      @(negedge clk);
    end
    en = 0;
    @(negedge clk);
  endtask

  task automatic check_msg(byteq_t msg);
    bitq_t q;
    bit [15:0] f = fcs16(msg);
    bitq_t fcsq;
    foreach (msg[i]) for (int k = 0; k < 8; k++) q.push_back(msg[i][k]);
    init = 1; @(negedge clk); init = 0;
    feed(q);
    // the FCS in line order: low byte LSB first, then high byte
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (~crc[15] !== f[k]) begin
        failures++;
        $display("FCS bit %0d: got %b want %b", k, ~crc[15], f[k]);
      end
      fcsq.push_back(f[k]);
      shift = 1; @(negedge clk); shift = 0;
    end
    // checker: message plus FCS leaves the residue
    init = 1; @(negedge clk); init = 0;
    foreach (fcsq[i]) q.push_back(fcsq[i]);
    feed(q);
    checks++;
    if (crc !== 16'h1D0F) begin failures++; $display("residue %h", crc); end
  endtask

  initial begin
    byteq_t m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (crc !== 16'hFFFF) begin failures++; $display("preset %h", crc); end
    m = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    checks++;
    if (fcs16(m) !== 16'h906E) begin failures++; $display("reference model wrong"); end
    check_msg(m);
    repeat (50) begin
      int n = 1 + $urandom_range(0, 20);
      m.delete();
      repeat (n) m.push_back(8'($urandom));
      check_msg(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
