// hdlc_ref_pkg: reference HDLC bit protocol for the testbenches, written
// independently of the RTL as plain bit-queue software. encode() builds the
// line bits of one frame (flag, data and FCS with zero insertion, flag);
// decode() splits a line bit stream into frames with their status. The FCS is
// CRC-16 x^16+x^12+x^5+1, preset to ones, sent inverted, low bit first.
package hdlc_ref_pkg;
  typedef bit bitq_t[$];

  typedef struct {
    bitq_t data;      // frame bits without the FCS
    int    status;    // 0 ok, 1 FCS error, 2 abort, 3 short
    int    nbits;     // frame bits including the FCS
  } frame_t;

  function automatic bit [15:0] crc_bits(bitq_t q);
    bit [15:0] c = 16'hFFFF;
    foreach (q[i]) begin
      bit fb = c[0] ^ q[i];
      c = c >> 1;
      if (fb) c ^= 16'h8408;
    end
    return c;
  endfunction

  function automatic bitq_t bytes_to_bits(byte unsigned b[$], int rem_bits = 0, byte unsigned last = 0);
    bitq_t q;
    foreach (b[i]) for (int k = 0; k < 8; k++) q.push_back(b[i][k]);
    for (int k = 0; k < rem_bits; k++) q.push_back(last[k]);
    return q;
  endfunction

  // line bits of one frame; bad_fcs flips one FCS bit
  function automatic bitq_t encode(bitq_t data, bit bad_fcs = 0);
    bitq_t body, line;
    bit [15:0] c = ~crc_bits(data);
    int ones = 0;
    body = data;
    for (int k = 0; k < 16; k++) body.push_back(c[k] ^ (bad_fcs && k == 3));
    for (int k = 0; k < 8; k++) line.push_back(1'(8'h7E >> k));
    foreach (body[i]) begin
      line.push_back(body[i]);
      ones = body[i] ? ones + 1 : 0;
      if (ones == 5) begin line.push_back(0); ones = 0; end
    end
    for (int k = 0; k < 8; k++) line.push_back(1'(8'h7E >> k));
    return line;
  endfunction

  function automatic void decode(bitq_t line, ref frame_t frames[$]);
    bitq_t cur;
    bit in_frame = 0;
    int ones = 0;
    foreach (line[i]) begin
      if (line[i]) begin
        ones++;
        if (ones == 7) begin
          if (in_frame && cur.size() > 0) begin
            frame_t f;
            f.data = cur; f.status = 2; f.nbits = cur.size();
            frames.push_back(f);
          end
          in_frame = 0;
          cur.delete();
        end
      end else begin
        if (ones == 6) begin
          // flag: the 0 before the six 1s was its first bit, not data
          if (cur.size() > 0) void'(cur.pop_back());
          if (in_frame && cur.size() > 0) begin
            frame_t f;
            f.nbits = cur.size();
            if (cur.size() < 32) f.status = 3;
            else if (crc_bits(cur) != 16'hF0B8) f.status = 1;
            else f.status = 0;
            f.data = cur;
            for (int k = 0; k < 16 && f.data.size() > 0; k++) void'(f.data.pop_back());
            frames.push_back(f);
          end
          in_frame = 1;
          cur.delete();
        end else if (ones <= 5 && ones >= 0 && ones < 7) begin
          if (in_frame) begin
            for (int k = 0; k < ones; k++) cur.push_back(1);
            if (ones != 5) cur.push_back(0);
          end
        end
        ones = 0;
      end
    end
  endfunction
endpackage
