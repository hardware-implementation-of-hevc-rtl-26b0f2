// bae_ref_pkg: reference model of the HEVC CABAC arithmetic coder for the
// testbenches.
//
// Written as the bit-serial processes of the HEVC standard (EncodeDecision,
// EncodeBypass, EncodeTerminate with EncodeFlush, RenormE looping one shift
// at a time) on plain integers, independent of the one-cycle hardware.  Each
// process appends its bit events to a queue using the bae_pkg event codes.
// Also here: a bit packer (PutBit with the first-bit rule and the release of
// outstanding bits) and an arithmetic decoder used for round-trip checks.
package bae_ref_pkg;
  import bae_pkg::*;

  // rangeTabLps, one row of four qRangeIdx entries per pStateIdx.
  localparam int RTAB [256] = '{
    128,176,208,240, 128,167,197,227, 128,158,187,216, 123,150,178,205,
    116,142,169,195, 111,135,160,185, 105,128,152,175, 100,122,144,166,
     95,116,137,158,  90,110,130,150,  85,104,123,142,  81, 99,117,135,
     77, 94,111,128,  73, 89,105,122,  69, 85,100,116,  66, 80, 95,110,
     62, 76, 90,104,  59, 72, 86, 99,  56, 69, 81, 94,  53, 65, 77, 89,
     51, 62, 73, 85,  48, 59, 69, 80,  46, 56, 66, 76,  43, 53, 63, 72,
     41, 50, 59, 69,  39, 48, 56, 65,  37, 45, 54, 62,  35, 43, 51, 59,
     33, 41, 48, 56,  32, 39, 46, 53,  30, 37, 43, 50,  29, 35, 41, 48,
     27, 33, 39, 45,  26, 31, 37, 43,  24, 30, 35, 41,  23, 28, 33, 39,
     22, 27, 32, 37,  21, 26, 30, 35,  20, 24, 29, 33,  19, 23, 27, 31,
     18, 22, 26, 30,  17, 21, 25, 28,  16, 20, 23, 27,  15, 19, 22, 25,
     14, 18, 21, 24,  14, 17, 20, 23,  13, 16, 19, 22,  12, 15, 18, 21,
     12, 14, 17, 20,  11, 14, 16, 19,  11, 13, 15, 18,  10, 12, 15, 17,
     10, 12, 14, 16,   9, 11, 13, 15,   9, 11, 12, 14,   8, 10, 12, 14,
      8,  9, 11, 13,   7,  9, 11, 12,   7,  9, 10, 12,   7,  8, 10, 11,
      6,  8,  9, 11,   6,  7,  9, 10,   6,  7,  8,  9,   2,  2,  2,  2
  };

  localparam int TLPS [64] = '{
     0, 0, 1, 2, 2, 4, 4, 5, 6, 7, 8, 9, 9,11,11,12,
    13,13,15,15,16,16,18,18,19,19,21,21,22,22,23,24,
    24,25,26,26,27,27,28,29,29,30,30,30,31,32,32,33,
    33,33,34,34,35,35,35,36,36,36,37,37,37,38,38,63
  };

  function automatic int range_lps(int pstate, int range);
    return RTAB[pstate * 4 + ((range >> 6) & 3)];
  endfunction

  function automatic int trans_mps(int pstate);
    return (pstate < 62) ? pstate + 1 : pstate;
  endfunction

  typedef struct {
    int low;
    int range;
    int outstd;
  } coder_t;

  function automatic coder_t coder_init();
    coder_t c;
    c.low = 0; c.range = 510; c.outstd = 0;
    return c;
  endfunction

  // RenormE, one shift per loop pass.
  function automatic void renorm(ref coder_t c, ref int evq[$]);
    while (c.range < 256) begin
      if (c.low < 256) begin
        evq.push_back(int'(EV_PUT0)); c.outstd = 0;
      end else if (c.low >= 512) begin
        c.low -= 512;
        evq.push_back(int'(EV_PUT1)); c.outstd = 0;
      end else begin
        c.low -= 256;
        evq.push_back(int'(EV_OUT)); c.outstd++;
      end
      c.range = c.range << 1;
      c.low   = c.low << 1;
    end
  endfunction

  function automatic void encode_decision(ref coder_t c, input int bin,
                                          ref int pstate, ref int mps,
                                          ref int evq[$]);
    int rlps;
    rlps    = range_lps(pstate, c.range);
    c.range = c.range - rlps;
    if (bin != mps) begin
      c.low   = c.low + c.range;
      c.range = rlps;
      if (pstate == 0) mps = 1 - mps;
      pstate = TLPS[pstate];
    end else begin
      pstate = trans_mps(pstate);
    end
    renorm(c, evq);
  endfunction

  function automatic void encode_bypass(ref coder_t c, input int bin,
                                        ref int evq[$]);
    c.low = c.low << 1;
    if (bin != 0) c.low += c.range;
    if (c.low >= 1024) begin
      evq.push_back(int'(EV_PUT1)); c.outstd = 0;
      c.low -= 1024;
    end else if (c.low < 512) begin
      evq.push_back(int'(EV_PUT0)); c.outstd = 0;
    end else begin
      c.low -= 512;
      evq.push_back(int'(EV_OUT)); c.outstd++;
    end
  endfunction

  function automatic void encode_terminate(ref coder_t c, input int bin,
                                           ref int evq[$]);
    c.range -= 2;
    if (bin != 0) begin
      c.low += c.range;
      // EncodeFlush
      c.range = 2;
      renorm(c, evq);
      evq.push_back(((c.low >> 9) & 1) != 0 ? int'(EV_PUT1) : int'(EV_PUT0));
      c.outstd = 0;
      evq.push_back(((c.low >> 8) & 1) != 0 ? int'(EV_WR1) : int'(EV_WR0));
      evq.push_back(int'(EV_WR1));
    end else begin
      renorm(c, evq);
    end
  endfunction

  // Bit packer: turns events into bits.
  class bit_packer;
    bit first_flag = 1'b1;
    int outstanding = 0;
    bit bits[$];

    function void reset();
      first_flag = 1'b1; outstanding = 0; bits.delete();
    endfunction

    function void put_bit(bit b);
      if (first_flag) first_flag = 1'b0;
      else bits.push_back(b);
      while (outstanding > 0) begin
        bits.push_back(!b);
        outstanding--;
      end
    endfunction

    function void event_in(int e);
      case (e)
        int'(EV_PUT0): put_bit(1'b0);
        int'(EV_PUT1): put_bit(1'b1);
        int'(EV_OUT):  outstanding++;
        int'(EV_WR0):  bits.push_back(1'b0);
        int'(EV_WR1):  bits.push_back(1'b1);
        default: ;
      endcase
    endfunction
  endclass

  // Arithmetic decoder (HEVC decoding process) reading a bit queue.
  class arith_decoder;
    int range;
    int offset;
    int pos;
    bit bits[$];

    function int read_bit();
      int b;
      b = (pos < bits.size()) ? int'(bits[pos]) : 0;
      pos++;
      return b;
    endfunction

    function void start(bit src[$]);
      bits = src; pos = 0; range = 510; offset = 0;
      for (int i = 0; i < 9; i++) offset = (offset << 1) | read_bit();
    endfunction

    function void renorm_d();
      while (range < 256) begin
        range  = range << 1;
        offset = (offset << 1) | read_bit();
      end
    endfunction

    function int decode_decision(ref int pstate, ref int mps);
      int rlps, bin;
      rlps  = range_lps(pstate, range);
      range = range - rlps;
      if (offset >= range) begin
        bin    = 1 - mps;
        offset = offset - range;
        range  = rlps;
        if (pstate == 0) mps = 1 - mps;
        pstate = TLPS[pstate];
      end else begin
        bin    = mps;
        pstate = trans_mps(pstate);
      end
      renorm_d();
      return bin;
    endfunction

    function int decode_bypass();
      offset = (offset << 1) | read_bit();
      if (offset >= range) begin
        offset = offset - range;
        return 1;
      end
      return 0;
    endfunction

    function int decode_terminate();
      range = range - 2;
      if (offset >= range) return 1;
      renorm_d();
      return 0;
    endfunction
  endclass

endpackage
