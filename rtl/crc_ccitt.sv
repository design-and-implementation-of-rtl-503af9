// crc_ccitt: serial CRC-CCITT generator/checker (x^16 + x^12 + x^5 + 1).
//
// The 16-bit register is a linear feedback shift register with the XOR gates
// distributed along it, as in the classic serial implementation: the bit
// leaving the high end is XORed with the incoming data bit and fed back into
// stage 0 and into the XORs in front of stages 5 and 12, which splits the
// register into runs of 5, 7 and 4 cells. One data bit is taken per clock
// while 'en' is high; 'init' presets the register to all ones. 'shift' moves
// the register up by one with the feedback switched off, so that a transmitter
// can read the FCS out of bit 15 (sent complemented). A receiver that runs the
// whole frame, FCS included, through the register finds 16'h1D0F in it when
// the frame is error-free. The preset value, the complemented FCS and the
// read-out mode are this design's choice (the usual HDLC convention).
module crc_ccitt
  import hdlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,    // preset to all ones (has priority)
  input  logic        en,      // take 'din'
  input  logic        din,
  input  logic        shift,   // read-out: shift without feedback
  output logic [15:0] crc
);

  logic fb;
  assign fb = din ^ crc[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= CRC_PRESET;
    else if (init)   crc <= CRC_PRESET;
    else if (en)     crc <= {crc[14:0], 1'b0} ^ (fb ? CRC_POLY : 16'h0000);
    else if (shift)  crc <= {crc[14:0], 1'b0};
  end

endmodule
