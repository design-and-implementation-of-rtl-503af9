// tb_register_file: host-bus accesses to the register block. Checks that
// reset clears Control and Timing Control, that each read/write register
// reads back what was written (Timing Control only in its defined bits),
// that Transmit Data writes reach the Tx FIFO port tagged with EOP/FA which
// then clear, that Receive Data reads pop the Rx FIFO once per access, the
// FIFO Status and General Status layouts, interrupt flags set by events and
// cleared by a read, IRQ against the enable mask, and the software reset.
module tb_register_file;
  import hdlc_pkg::*;

  logic clk = 0, rst_n = 0, cs_n = 1, rw = 1;
  logic [3:0] addr = 0;
  logic [7:0] d_in = 0, d_out;
  logic d_oe;
  ctrl_reg_t ctrl;
  timing_reg_t timing;
  logic [7:0] rx_addr, cch_ctrl;
  logic srst, irq, txf_wr, rxf_rd;
  tx_entry_t txf_wdata;
  rx_entry_t rxf_rdata = '{status: RXB_LAST_BAD, data: 8'h5A};
  logic [1:0] txf_status = 2'b10, rxf_status = 2'b01;
  logic rx_abrt = 0, rx_idle = 0;
  logic [7:0] cch_status = 8'hC3, int_evt = 0;
  int checks = 0, failures = 0, txw = 0, rxr = 0;
  tx_entry_t last_tx;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (txf_wr) begin txw++; last_tx = txf_wdata; end
    if (rxf_rd) rxr++;
  end

  task automatic wr(logic [3:0] a, logic [7:0] v);
    @(negedge clk);
    cs_n = 0; rw = 0; addr = a; d_in = v;
    repeat (2) @(negedge clk);
    cs_n = 1; rw = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic rd(logic [3:0] a, output logic [7:0] v);
    @(negedge clk);
    cs_n = 0; rw = 1; addr = a;
    repeat (2) @(negedge clk);
    v = d_out;
    if (!d_oe) begin failures++; $display("d_oe low during read"); end
    cs_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_rd(logic [3:0] a, logic [7:0] want, string what);
    logic [7:0] v;
    rd(a, v);
    checks++;
    if (v !== want) begin failures++; $display("%s: read %h want %h", what, v, want); end
  endtask

  task automatic pulse(int bitn);
    @(negedge clk);
    int_evt = 8'(1 << bitn);
    @(negedge clk);
    int_evt = 0;
  endtask

  initial begin
    logic [7:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_rd(A_CONTROL, 8'h00, "control after reset");
    expect_rd(A_TIMING, 8'h00, "timing after reset");
    expect_rd(A_GEN_STATUS, 8'h01, "general status after reset");
    // read/write registers
    wr(A_CONTROL, 8'hB8);  expect_rd(A_CONTROL, 8'hB8, "control");
    checks++;
    if (!(ctrl.txen && !ctrl.rxen && ctrl.rxad && ctrl.ra67 && ctrl.iftf == IFTF_DATA)) begin
      failures++; $display("control fields");
    end
    wr(A_RX_ADDR, 8'h96);  expect_rd(A_RX_ADDR, 8'h96, "receive address");
    wr(A_CCH_CTRL, 8'h3C); expect_rd(A_CCH_CTRL, 8'h3C, "C channel control");
    checks++;
    if (cch_ctrl !== 8'h3C || rx_addr !== 8'h96) begin failures++; $display("register outputs"); end
    wr(A_TIMING, 8'hFF);   expect_rd(A_TIMING, 8'hD0, "timing");
    checks++;
    if (!(timing.ic && timing.brck && srst)) begin failures++; $display("timing fields"); end
    // software reset clears control
    expect_rd(A_CONTROL, 8'h00, "control under software reset");
    wr(A_TIMING, 8'h50);   expect_rd(A_TIMING, 8'h50, "timing, reset released");
    checks++;
    if (srst) begin failures++; $display("srst stuck"); end
    // transmit data with EOP tag
    wr(A_CONTROL, 8'h89);  // TxEN, IFTF data, EOP
    wr(A_DATA, 8'h11);
    checks++;
    if (txw != 1 || last_tx !== '{data: 8'h11, eop: 1'b1, fa: 1'b0}) begin
      failures++; $display("tx write 1: %0d %p", txw, last_tx);
    end
    expect_rd(A_CONTROL, 8'h88, "EOP cleared");
    wr(A_DATA, 8'h22);
    checks++;
    if (txw != 2 || last_tx !== '{data: 8'h22, eop: 1'b0, fa: 1'b0}) begin failures++; $display("tx write 2"); end
    wr(A_CONTROL, 8'h8A);  // FA
    wr(A_DATA, 8'h33);
    checks++;
    if (txw != 3 || last_tx !== '{data: 8'h33, eop: 1'b0, fa: 1'b1}) begin failures++; $display("tx write 3"); end
    // receive data and FIFO status
    expect_rd(A_DATA, 8'h5A, "receive data");
    checks++;
    if (rxr != 1) begin failures++; $display("rx reads %0d", rxr); end
    expect_rd(A_FIFO_STATUS, 8'b11_01_10_00, "FIFO status");
    checks++;
    if (rxr != 1) begin failures++; $display("status read popped the FIFO"); end
    expect_rd(A_CCH_STATUS, 8'hC3, "C channel status");
    // interrupts
    wr(A_INT_EN, 8'h41);   expect_rd(A_INT_EN, 8'h41, "interrupt enable");
    for (int b = 0; b < 8; b++) begin
      pulse(b);
      checks++;
      if (irq !== (b == 6 || b == 0)) begin failures++; $display("irq after event %0d", b); end
      expect_rd(A_INT_FLAG, 8'(1 << b), "interrupt flag");
      expect_rd(A_INT_FLAG, 8'h00, "interrupt flag cleared");
      checks++;
      if (irq) begin failures++; $display("irq not cleared"); end
    end
    // sticky and live general status bits
    pulse(INT_RXOFLW); pulse(INT_TXURUN); pulse(INT_GA);
    rx_abrt = 1; rx_idle = 1;
    expect_rd(A_GEN_STATUS, 8'b1111_1101, "general status");
    rx_abrt = 0; rx_idle = 0;
    expect_rd(A_GEN_STATUS, 8'b0000_1001, "general status after read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
