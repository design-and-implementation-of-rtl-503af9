// hdlc_transceiver: HDLC transceiver with an MT8952B-compatible host
// interface, for normal (one bit per CLK) and ST-BUS internal control modes.
//
// Transmit path: host bytes -> Tx FIFO -> Tx Logic (serialise, CRC-CCITT FCS)
// -> Zero Insertion -> Flag/Abort/Idle Generator -> TxD, TEOP.
// Receive path: RxD -> Flag/Abort/Idle Detector -> Zero Deletion -> Address
// Detection -> Rx Logic (FCS check) -> Rx FIFO -> host, REOP.
// The Address Decoder & Status Register block holds the control, status and
// interrupt registers; the C Channel Interface makes the bit strobes: every
// CLK in normal mode, and only during ST-BUS channel 1 (2.048 Mbit/s, TxD
// high impedance elsewhere) in internal control mode.
// Ports: CLK, RST (active low, asynchronous), CS/R/W/A0-A3/D0-D7 host bus
// (D0-D7 split into d_in, d_out, d_oe), TxEN and RxEN pins (active low; the
// transmitter or receiver runs only when its pin is low and its Control bit
// is set), F0i, RxD, TxD with its output enable, TEOP, REOP, and two outputs
// of this design's own: IRQ and the C Channel Control register contents.
// All blocks are clocked by CLK; TEOP is high for the bit period of the last
// bit of a closing flag and REOP for one CLK when the last byte of a
// received frame enters the Rx FIFO.
module hdlc_transceiver
  import hdlc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 30,
  parameter int unsigned HDLC_CHANNEL = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs_n,
  input  logic       rw,
  input  logic [3:0] addr,
  input  logic [7:0] d_in,
  output logic [7:0] d_out,
  output logic       d_oe,
  input  logic       txen_n,
  input  logic       rxen_n,
  input  logic       f0i_n,
  input  logic       rxd,
  output logic       txd,
  output logic       txd_oe,
  output logic       teop,
  output logic       reop,
  output logic       irq,
  output logic [7:0] cch_ctrl
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  ctrl_reg_t   ctrl;
  timing_reg_t timing;
  logic [7:0]  rx_addr, cch_status;
  logic        srst;
  logic        tx_en, rx_en, send;
  logic        tx_tick, rx_tick;

  // Tx FIFO
  logic        txf_wr, txf_rd, txf_empty, tx4_evt;
  tx_entry_t   txf_wdata, txf_rdata;
  logic [1:0]  txf_status;
  logic [CW-1:0] txf_level;
  // Rx FIFO
  logic        rxf_wr, rxf_rd, rxf_empty, rx26_evt, oflw_evt;
  rx_entry_t   rxf_wdata, rxf_rdata;
  logic [1:0]  rxf_status;
  logic [CW-1:0] rxf_level;
  // transmit stream
  logic        tl_valid, tl_ready, zi_valid, zi_ready;
  tx_tok_t     tl_tok, zi_tok;
  logic        urun, tx_done, tx_abort, tx_frame_start, teop_q;
  // receive stream
  rx_sym_t     fd_sym, zd_sym, ad_sym;
  logic        rx_abrt, rx_idle, ga_evt, abort_evt;
  logic        rl_eop, rl_fcs_bad;
  logic [7:0]  int_evt;

  assign tx_en = ctrl.txen && !txen_n && !srst;
  assign rx_en = ctrl.rxen && !rxen_n && !srst;
  assign send  = tx_en && ctrl.iftf == IFTF_DATA;

  register_file u_regs (
    .clk, .rst_n, .cs_n, .rw, .addr, .d_in, .d_out, .d_oe,
    .ctrl, .timing, .rx_addr, .cch_ctrl, .srst, .irq,
    .txf_wr, .txf_wdata, .rxf_rd, .rxf_rdata,
    .txf_status, .rxf_status, .rx_abrt, .rx_idle, .cch_status, .int_evt
  );

  cchannel_interface #(.HDLC_CHANNEL(HDLC_CHANNEL)) u_cch (
    .clk, .rst_n, .ic(timing.ic), .brck(timing.brck), .f0i_n, .rxd,
    .tx_tick, .rx_tick, .txd_oe, .cch_status
  );

  // ---------------- transmitter ----------------
  tx_fifo #(.DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .clr(srst), .wr(txf_wr), .wdata(txf_wdata), .rd(txf_rd),
    .rdata(txf_rdata), .empty(txf_empty), .status(txf_status),
    .tx4_evt, .level(txf_level)
  );

  tx_logic u_txl (
    .clk, .rst_n, .send, .fifo_empty(txf_empty), .fifo_data(txf_rdata),
    .fifo_rd(txf_rd), .out_valid(tl_valid), .out_ready(tl_ready),
    .out_tok(tl_tok), .urun, .frame_start(tx_frame_start)
  );

  zero_insertion u_zi (
    .clk, .rst_n, .clr(!tx_en), .in_valid(tl_valid), .in_ready(tl_ready),
    .in_tok(tl_tok), .out_valid(zi_valid), .out_ready(zi_ready), .out_tok(zi_tok)
  );

  flag_generator u_fg (
    .clk, .rst_n, .en(tx_en), .iftf(ctrl.iftf), .tick(tx_tick),
    .in_valid(zi_valid), .in_ready(zi_ready), .in_tok(zi_tok),
    .txd, .teop(teop_q), .tx_done, .tx_abort
  );

  // in internal control mode a bit is on the line only inside channel 1
  assign teop = teop_q && txd_oe;

  // ---------------- receiver ----------------
  flag_detector u_fd (
    .clk, .rst_n, .clr(!rx_en), .bit_en(rx_tick), .rxd,
    .sym(fd_sym), .abrt(rx_abrt), .idle(rx_idle), .ga_evt, .abort_evt
  );

  zero_deletion u_zd (
    .clk, .rst_n, .clr(!rx_en), .in_sym(fd_sym), .out_sym(zd_sym)
  );

  address_detection u_ad (
    .clk, .rst_n, .clr(!rx_en), .rxad(ctrl.rxad), .ra67(ctrl.ra67),
    .rx_addr, .in_sym(zd_sym), .out_sym(ad_sym)
  );

  rx_logic u_rxl (
    .clk, .rst_n, .clr(!rx_en), .in_sym(ad_sym),
    .fifo_wr(rxf_wr), .fifo_data(rxf_wdata), .eop(rl_eop), .fcs_bad(rl_fcs_bad)
  );

  rx_fifo #(.DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .clr(srst), .wr(rxf_wr), .wdata(rxf_wdata), .rd(rxf_rd),
    .rdata(rxf_rdata), .empty(rxf_empty), .status(rxf_status),
    .rx26_evt, .oflw_evt, .level(rxf_level)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reop <= 1'b0;
    else        reop <= rl_eop;
  end

  always_comb begin
    int_evt               = '0;
    int_evt[INT_GA]       = ga_evt;
    int_evt[INT_EOPD]     = rl_eop;
    int_evt[INT_TXDONE]   = tx_done;
    int_evt[INT_FA]       = abort_evt;
    int_evt[INT_TX4]      = tx4_evt;
    int_evt[INT_TXURUN]   = urun;
    int_evt[INT_RX26]     = rx26_evt;
    int_evt[INT_RXOFLW]   = oflw_evt;
  end

endmodule
