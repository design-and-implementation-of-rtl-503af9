// register_file: Address Decoder & Status Register block of the transceiver.
//
// Host bus: CS (active low), R/W (1 = read), A0-A3 and D0-D7, split here into
// d_in/d_out/d_oe. A read drives d_out while CS is low. The effect of an
// access (register write, Tx FIFO write, Rx FIFO read, clearing of flags) is
// taken once, in the cycle after CS returns high, with the address, R/W and
// data held from the last cycle CS was low.
//   0 R  FIFO Status   {Rx Byte Status, Rx FIFO Status, Tx FIFO Status, 0, 0}
//   1 R  Receive Data (reads the Rx FIFO)  W Transmit Data (writes the Tx FIFO,
//        tagged with the Control register's EOP and FA bits, which then clear)
//   2 RW Control {TxEN, RxEN, RxAD, RA6/7, IFTF[1:0], FA, EOP}
//   3 RW Receive Address        4 RW C Channel Control
//   5 RW Timing Control {RST, IC, 0, BRCK, 0000}
//   6 R  Interrupt Flag {GA, EOPD, Tx Done, FA, Tx 4/30, Tx URUN, Rx 26/30,
//        Rx OFLW}; events set the bits, a read clears them
//   7 RW Interrupt Enable (same layout)
//   8 R  General Status {Rx OFLW, Tx URUN, GA, ABRT, IRQ, IDLE, 0, 1}
//   9 R  C Channel Status
// IRQ is high while any enabled interrupt flag is set. In General Status,
// Rx OFLW, Tx URUN and GA are sticky and clear when the register is read;
// ABRT, IRQ and IDLE are live. The RST bit of Timing Control acts as a
// software reset of the rest of the transceiver while it is 1: Control,
// Receive Address, C Channel Control, the interrupt registers and the sticky
// status bits are cleared, and 'srst' is brought out for the other blocks.
// The register map and bit fields are the published ones; the bus timing, the
// clear-on-read rule and the EOP/FA auto-clear are this design's choices.
module register_file
  import hdlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        cs_n,
  input  logic        rw,
  input  logic [3:0]  addr,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  output logic        d_oe,
  // register contents
  output ctrl_reg_t   ctrl,
  output timing_reg_t timing,
  output logic [7:0]  rx_addr,
  output logic [7:0]  cch_ctrl,
  output logic        srst,
  output logic        irq,
  // Tx FIFO write
  output logic        txf_wr,
  output tx_entry_t   txf_wdata,
  // Rx FIFO read
  output logic        rxf_rd,
  input  rx_entry_t   rxf_rdata,
  // status inputs
  input  logic [1:0]  txf_status,
  input  logic [1:0]  rxf_status,
  input  logic        rx_abrt,
  input  logic        rx_idle,
  input  logic [7:0]  cch_status,
  // interrupt events (one-cycle pulses)
  input  logic [7:0]  int_evt
);

  logic [7:0] int_flag, int_en;
  logic       st_oflw, st_urun, st_ga;
  logic       acc_q, rw_q;
  logic [3:0] addr_q;
  logic [7:0] din_q;
  logic       acc_end, wr_end, rd_end;
  logic [7:0] gen_status;

  assign srst = timing.rst;
  assign irq  = |(int_flag & int_en);
  assign gen_status = {st_oflw, st_urun, st_ga, rx_abrt, irq, rx_idle, 1'b0, 1'b1};

  // host read data
  always_comb begin
    d_oe  = !cs_n && rw;
    d_out = 8'h00;
    unique case (reg_addr_e'(addr))
      A_FIFO_STATUS: d_out = {rxf_rdata.status, rxf_status, txf_status, 2'b00};
      A_DATA:        d_out = rxf_rdata.data;
      A_CONTROL:     d_out = ctrl;
      A_RX_ADDR:     d_out = rx_addr;
      A_CCH_CTRL:    d_out = cch_ctrl;
      A_TIMING:      d_out = timing;
      A_INT_FLAG:    d_out = int_flag;
      A_INT_EN:      d_out = int_en;
      A_GEN_STATUS:  d_out = gen_status;
      A_CCH_STATUS:  d_out = cch_status;
      default:       d_out = 8'h00;
    endcase
  end

  // access capture: the last cycle with CS low
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= 1'b0; rw_q <= 1'b1; addr_q <= '0; din_q <= '0;
    end else begin
      acc_q <= !cs_n;
      if (!cs_n) begin
        rw_q   <= rw;
        addr_q <= addr;
        din_q  <= d_in;
      end
    end
  end

  assign acc_end = acc_q && cs_n;
  assign wr_end  = acc_end && !rw_q;
  assign rd_end  = acc_end && rw_q;

  assign txf_wr    = wr_end && addr_q == A_DATA && !srst;
  assign txf_wdata = '{data: din_q, eop: ctrl.eop, fa: ctrl.fa};
  assign rxf_rd    = rd_end && addr_q == A_DATA && !srst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timing <= '0;
    end else if (wr_end && addr_q == A_TIMING) begin
      timing <= '{rst: din_q[7], ic: din_q[6], low5: 1'b0, brck: din_q[4], low: 4'h0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0; rx_addr <= '0; cch_ctrl <= '0; int_flag <= '0; int_en <= '0;
      st_oflw <= 1'b0; st_urun <= 1'b0; st_ga <= 1'b0;
    end else if (srst) begin
      ctrl <= '0; rx_addr <= '0; cch_ctrl <= '0; int_flag <= '0; int_en <= '0;
      st_oflw <= 1'b0; st_urun <= 1'b0; st_ga <= 1'b0;
    end else begin
      // register writes
      if (wr_end) begin
        unique case (reg_addr_e'(addr_q))
          A_CONTROL:  ctrl     <= din_q;
          A_RX_ADDR:  rx_addr  <= din_q;
          A_CCH_CTRL: cch_ctrl <= din_q;
          A_INT_EN:   int_en   <= din_q;
          default: ;
        endcase
      end
      // EOP and FA tag one byte, then clear
      if (txf_wr) begin
        ctrl.eop <= 1'b0;
        ctrl.fa  <= 1'b0;
      end
      // interrupt flags: a read clears, a new event in the same cycle wins
      if (rd_end && addr_q == A_INT_FLAG) int_flag <= int_evt;
      else                                int_flag <= int_flag | int_evt;
      // sticky status
      if (rd_end && addr_q == A_GEN_STATUS) begin
        st_oflw <= int_evt[INT_RXOFLW];
        st_urun <= int_evt[INT_TXURUN];
        st_ga   <= int_evt[INT_GA];
      end else begin
        st_oflw <= st_oflw | int_evt[INT_RXOFLW];
        st_urun <= st_urun | int_evt[INT_TXURUN];
        st_ga   <= st_ga   | int_evt[INT_GA];
      end
    end
  end

endmodule
