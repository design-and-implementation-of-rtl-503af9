// hdlc_pkg: types and constants shared by the HDLC transceiver.
//
// Register addresses (A0-A3), register bit layouts, the 2-bit codes of the
// status fields and the small structs that carry bits between the stages of
// the transmit and receive chains. The register map and field codes follow the
// MT8952B-compatible map of the design; the bit positions inside each register
// are taken left to right as bit 7 down to bit 0. The structs are this design's
// own choice.
package hdlc_pkg;

  // Register addresses
  typedef enum logic [3:0] {
    A_FIFO_STATUS = 4'd0,  // R : FIFO Status
    A_DATA        = 4'd1,  // R : Receive Data   W : Transmit Data
    A_CONTROL     = 4'd2,  // RW: Control
    A_RX_ADDR     = 4'd3,  // RW: Receive Address
    A_CCH_CTRL    = 4'd4,  // RW: C Channel Control
    A_TIMING      = 4'd5,  // RW: Timing Control
    A_INT_FLAG    = 4'd6,  // R : Interrupt Flag (cleared by reading)
    A_INT_EN      = 4'd7,  // RW: Interrupt Enable
    A_GEN_STATUS  = 4'd8,  // R : General Status
    A_CCH_STATUS  = 4'd9   // R : C Channel Status
  } reg_addr_e;

  // Inter-frame fill / transmit mode, Control register bits 3:2
  typedef enum logic [1:0] {
    IFTF_IDLE    = 2'b00,  // continuous ones (7FFF..)
    IFTF_FLAGS   = 2'b01,  // continuous flags
    IFTF_DATA    = 2'b10,  // send frames from the Tx FIFO
    IFTF_GOAHEAD = 2'b11   // continuous 7F
  } iftf_e;

  // Control register, bit 7 .. bit 0
  typedef struct packed {
    logic  txen;   // 7
    logic  rxen;   // 6
    logic  rxad;   // 5 receive address detection enable
    logic  ra67;   // 4 0: compare 7 address bits, 1: compare 6
    iftf_e iftf;   // 3:2
    logic  fa;     // 1 tag the next written byte as frame abort
    logic  eop;    // 0 tag the next written byte as end of packet
  } ctrl_reg_t;

  // Timing Control register, bit 7 .. bit 0
  typedef struct packed {
    logic       rst;    // 7 software reset
    logic       ic;     // 6 internal control (ST-BUS) mode
    logic       low5;   // 5
    logic       brck;   // 4 0: CLK = 4.096 MHz, 1: CLK = 2.048 MHz
    logic [3:0] low;    // 3:0
  } timing_reg_t;

  // Interrupt Flag / Interrupt Enable bit positions
  localparam int unsigned INT_GA     = 7;
  localparam int unsigned INT_EOPD   = 6;
  localparam int unsigned INT_TXDONE = 5;
  localparam int unsigned INT_FA     = 4;
  localparam int unsigned INT_TX4    = 3;
  localparam int unsigned INT_TXURUN = 2;
  localparam int unsigned INT_RX26   = 1;
  localparam int unsigned INT_RXOFLW = 0;

  // Tx FIFO Status codes
  localparam logic [1:0] TXS_FULL  = 2'b00;
  localparam logic [1:0] TXS_GE5   = 2'b01;
  localparam logic [1:0] TXS_EMPTY = 2'b10;
  localparam logic [1:0] TXS_LE4   = 2'b11;

  // Rx FIFO Status codes
  localparam logic [1:0] RXS_EMPTY = 2'b00;
  localparam logic [1:0] RXS_LE25  = 2'b01;
  localparam logic [1:0] RXS_FULL  = 2'b10;
  localparam logic [1:0] RXS_GE26  = 2'b11;

  // Rx Byte Status codes
  typedef enum logic [1:0] {
    RXB_PACKET    = 2'b00,
    RXB_FIRST     = 2'b01,
    RXB_LAST_GOOD = 2'b10,
    RXB_LAST_BAD  = 2'b11
  } rx_byte_status_e;

  // Tx FIFO entry: a byte and its tags
  typedef struct packed {
    logic [7:0] data;
    logic       eop;
    logic       fa;
  } tx_entry_t;

  // Rx FIFO entry: a byte and its status
  typedef struct packed {
    rx_byte_status_e status;
    logic [7:0]      data;
  } rx_entry_t;

  // One token of the transmit bit stream (Tx Logic -> Zero Insertion ->
  // Flag Generator). 'last' marks the final bit of a frame, 'abort' asks for
  // the abort sequence instead of a bit.
  typedef struct packed {
    logic b;
    logic last;
    logic abort;
  } tx_tok_t;

  // One symbol of the receive stream (Flag Detector -> Zero Deletion ->
  // Address Detection -> Rx Logic). At most one of valid/flag/abort/drop is set.
  typedef struct packed {
    logic valid;  // a frame content bit in 'b'
    logic b;
    logic flag;   // a flag was received
    logic abort;  // an abort was received
    logic drop;   // the frame's address did not match
  } rx_sym_t;

  // CRC-CCITT: generator x^16 + x^12 + x^5 + 1, preset to all ones, FCS sent
  // complemented; the register of a good frame ends at this residue.
  localparam logic [15:0] CRC_POLY    = 16'h1021;
  localparam logic [15:0] CRC_PRESET  = 16'hFFFF;
  localparam logic [15:0] CRC_RESIDUE = 16'h1D0F;

  localparam logic [7:0] FLAG_PATTERN  = 8'h7E;
  localparam logic [7:0] ABORT_PATTERN = 8'hFE;  // LSB first: a 0 then seven 1s
  localparam logic [7:0] GA_PATTERN    = 8'h7F;

endpackage
