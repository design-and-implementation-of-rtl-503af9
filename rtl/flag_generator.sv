// flag_generator: Flag/Abort/Idle Generator, the last stage of the transmitter.
//
// On every 'tick' (one per transmitted bit period) it registers the next bit
// onto TxD. Between frames it sends whole octets of the fill pattern chosen
// by the IFTF field of the Control register: all 1s (idle), flags (7E), or
// go-ahead (7F); in data mode the fill is flags. With the transmitter
// disabled it sends all 1s. When Zero Insertion offers frame content in data
// mode, it finishes the current fill octet, sends an opening flag, then takes
// one content bit per tick until the bit marked 'last', and ends with a
// closing flag; TEOP is high while the last bit of the closing flag is on
// TxD and 'tx_done' pulses when it has been sent. An abort token makes it
// send the abort sequence (a 0 then seven 1s) and return to fill. Octets go
// out least significant bit first. The exact fill used in data mode between
// frames is this design's choice.
module flag_generator
  import hdlc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,        // transmitter enabled
  input  iftf_e   iftf,
  input  logic    tick,
  input  logic    in_valid,
  output logic    in_ready,
  input  tx_tok_t in_tok,
  output logic    txd,
  output logic    teop,
  output logic    tx_done,
  output logic    tx_abort
);

  typedef enum logic [2:0] {G_FILL, G_OPEN, G_DATA, G_CLOSE, G_ABORT} gstate_e;
  gstate_e    state;
  logic [2:0] cnt;
  logic [7:0] pat;       // octet being sent in fill/flag/abort states
  logic [7:0] fill_pat;

  always_comb begin
    if (!en) fill_pat = 8'hFF;
    else unique case (iftf)
      IFTF_IDLE:    fill_pat = 8'hFF;
      IFTF_FLAGS:   fill_pat = FLAG_PATTERN;
      IFTF_DATA:    fill_pat = FLAG_PATTERN;
      IFTF_GOAHEAD: fill_pat = GA_PATTERN;
      default:      fill_pat = 8'hFF;
    endcase
  end

  assign in_ready = tick && en && (state == G_DATA);
  assign tx_done  = tick && en && (state == G_CLOSE) && (cnt == 3'd7);
  assign tx_abort = in_ready && in_valid && in_tok.abort;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_FILL;
      cnt   <= '0;
      pat   <= 8'hFF;
      txd   <= 1'b1;
      teop  <= 1'b0;
    end else if (!en) begin
      state <= G_FILL;
      cnt   <= '0;
      if (tick) begin
        txd  <= 1'b1;
        teop <= 1'b0;
      end
    end else if (tick) begin
      teop <= 1'b0;
      unique case (state)
        G_FILL: begin
          // a new fill octet starts at cnt 0
          if (cnt == 3'd0) begin
            txd <= fill_pat[0];
            pat <= fill_pat;
          end else begin
            txd <= pat[cnt];
          end
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7 && in_valid && iftf == IFTF_DATA) state <= G_OPEN;
        end
        G_OPEN: begin
          txd <= FLAG_PATTERN[cnt];
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) state <= G_DATA;
        end
        G_DATA: begin
          if (!in_valid || in_tok.abort) begin
            txd   <= ABORT_PATTERN[0];
            cnt   <= 3'd1;
            state <= G_ABORT;
          end else begin
            txd <= in_tok.b;
            if (in_tok.last) begin
              cnt   <= '0;
              state <= G_CLOSE;
            end
          end
        end
        G_CLOSE: begin
          txd  <= FLAG_PATTERN[cnt];
          teop <= (cnt == 3'd7);
          cnt  <= cnt + 3'd1;
          if (cnt == 3'd7) state <= G_FILL;
        end
        G_ABORT: begin
          txd <= ABORT_PATTERN[cnt];
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) state <= G_FILL;
        end
        default: state <= G_FILL;
      endcase
    end
  end

endmodule
