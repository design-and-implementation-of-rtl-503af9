// hdlc_tb_pkg: reference models shared by the HDLC testbenches.
//
// Written independently of the RTL: the FCS uses the byte-wise reflected
// form of CRC-CCITT (polynomial 16'h8408 in reflected order, preset FFFF,
// result complemented), which is the usual software formulation of the HDLC
// FCS and is sent low byte first, least significant bit first. Frames are
// encoded and decoded at bit level with explicit bit stuffing.
package hdlc_tb_pkg;

  typedef bit       bitq_t[$];
  typedef bit [7:0] byteq_t[$];

  function automatic bit [15:0] fcs16(byteq_t data);
    bit [15:0] c = 16'hFFFF;
    foreach (data[i]) begin
      c ^= 16'(data[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    end
    return ~c;
  endfunction

  // frame content (data + FCS) as bits, LSB first, not stuffed
  function automatic bitq_t content_bits(byteq_t data);
    bitq_t q;
    bit [15:0] f = fcs16(data);
    byteq_t all = data;
    all.push_back(f[7:0]);
    all.push_back(f[15:8]);
    foreach (all[i]) for (int k = 0; k < 8; k++) q.push_back(all[i][k]);
    return q;
  endfunction

  function automatic bitq_t stuff(bitq_t q);
    bitq_t o;
    int ones = 0;
    foreach (q[i]) begin
      o.push_back(q[i]);
      if (q[i]) begin
        ones++;
        if (ones == 5) begin o.push_back(1'b0); ones = 0; end
      end else ones = 0;
    end
    return o;
  endfunction

  function automatic bitq_t flag_bits();
    bitq_t q;
    for (int k = 0; k < 8; k++) q.push_back(k != 0 && k != 7);
    return q;
  endfunction

  // complete frame on the line: flag, stuffed content, flag
  function automatic bitq_t frame_line(byteq_t data);
    bitq_t q = flag_bits();
    bitq_t c = stuff(content_bits(data));
    bitq_t f = flag_bits();
    foreach (c[i]) q.push_back(c[i]);
    foreach (f[i]) q.push_back(f[i]);
    return q;
  endfunction

  // Decode a line bit stream into frames. Each frame's bytes include the
  // two FCS bytes; good[i] tells whether the FCS checks and the length is
  // a whole number of octets.
  function automatic void decode(bitq_t line, ref byteq_t frames[$], ref bit good[$]);
    bitq_t cur;
    bit    in_frame = 0;
    int    ones = 0;
    bitq_t win;
    frames.delete();
    good.delete();
    foreach (line[i]) begin
      bit b = line[i];
      if (b) begin
        ones++;
        if (ones >= 7) begin in_frame = 0; cur.delete(); end
        else if (in_frame) cur.push_back(b);
      end else begin
        if (ones == 6) begin
          // flag: remove its six 1s and leading 0 already queued
          if (in_frame) begin
            repeat (7) if (cur.size() > 0) void'(cur.pop_back());
            if (cur.size() > 0) begin
              byteq_t fr;
              bit [15:0] chk;
              for (int j = 0; j + 8 <= cur.size(); j += 8) begin
                bit [7:0] by;
                for (int k = 0; k < 8; k++) by[k] = cur[j+k];
                fr.push_back(by);
              end
              chk = 16'hFFFF;
              if (fr.size() >= 3) begin
                byteq_t d = fr[0:fr.size()-3];
                bit [15:0] f = fcs16(d);
                good.push_back((cur.size() % 8 == 0) &&
                               fr[fr.size()-2] == f[7:0] && fr[fr.size()-1] == f[15:8]);
              end else good.push_back(0);
              frames.push_back(fr);
            end
          end
          in_frame = 1;
          cur.delete();
        end else if (ones == 5) begin
          // stuffed zero: drop
        end else if (in_frame) cur.push_back(b);
        ones = 0;
      end
    end
  endfunction

endpackage
