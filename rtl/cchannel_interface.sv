// cchannel_interface: ST-BUS timing and C-channel receive register.
//
// Normal mode (IC = 0): one bit per CLK, so the transmit and receive bit
// strobes are always high and TxD is always driven.
// Internal Control mode (IC = 1): an ST-BUS frame of 125 us holds 32
// channels of 8 bits (256 bit periods at 2.048 Mbit/s); F0i (active low)
// marks its start. A bit period is two CLK cycles when BRCK = 0 (CLK =
// 4.096 MHz) and one when BRCK = 1 (CLK = 2.048 MHz). The HDLC stream uses
// only channel HDLC_CHANNEL (1): 'tx_tick' loads TxD in the last CLK before
// each of that channel's bit periods, 'txd_oe' drives TxD during them (TxD
// is high impedance elsewhere) and 'rx_tick' samples RxD in the last CLK of
// each. The 8 bits received in that channel (bit 7 first) are also kept in
// the C Channel Status register, updated at the end of the channel.
// The frame counter restarts in the cycle after F0i is first seen low and
// otherwise runs freely; this alignment is this design's choice.
module cchannel_interface #(
  parameter int unsigned HDLC_CHANNEL = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ic,
  input  logic       brck,
  input  logic       f0i_n,
  input  logic       rxd,
  output logic       tx_tick,
  output logic       rx_tick,
  output logic       txd_oe,
  output logic [7:0] cch_status
);

  logic [7:0] pos;        // bit period in the ST-BUS frame, 0..255
  logic       phase;      // CLK within the bit period (BRCK = 0 only)
  logic       f0_q;
  logic       frame_start;
  logic       last_clk;   // last CLK of the current bit period
  logic [7:0] pos_nx;
  logic [7:0] sh;

  assign frame_start = !f0i_n && f0_q;
  assign last_clk    = brck || phase;
  assign pos_nx      = pos + 8'd1;

  always_comb begin
    if (!ic) begin
      tx_tick = 1'b1;
      rx_tick = 1'b1;
      txd_oe  = 1'b1;
    end else begin
      tx_tick = !frame_start && last_clk && (pos_nx[7:3] == 5'(HDLC_CHANNEL));
      rx_tick = !frame_start && last_clk && (pos[7:3] == 5'(HDLC_CHANNEL));
      txd_oe  = (pos[7:3] == 5'(HDLC_CHANNEL));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; phase <= 1'b0; f0_q <= 1'b1; sh <= '0; cch_status <= '0;
    end else begin
      f0_q <= f0i_n;
      if (frame_start) begin
        pos   <= '0;
        phase <= 1'b0;
      end else if (last_clk) begin
        pos   <= pos_nx;
        phase <= 1'b0;
      end else begin
        phase <= 1'b1;
      end
      if (ic && rx_tick) begin
        sh <= {sh[6:0], rxd};
        if (pos[2:0] == 3'd7) cch_status <= {sh[6:0], rxd};
      end
    end
  end

endmodule
