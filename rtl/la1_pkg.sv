// la1_pkg: types and constants shared by the LA-1 (Look-Aside 1) slave.
//
// An LA-1 word is 36 bits: four byte lanes of 9 bits, each lane an 8-bit
// data byte with its even-parity bit on top ({parity, byte}). The word
// crosses the 18-pin DDR data paths as two beats: beat 0 (lanes 1:0, bits
// 17:0) on the K rising edge and beat 1 (lanes 3:2, bits 35:18) on the K#
// rising edge. The 18-pin paths and the 32 + 4 parity split follow the
// LA-1 feature list; the lane order and the beat order are this design's
// choice.
package la1_pkg;

  localparam int unsigned DQ_WIDTH   = 18;            // pins per DDR data path
  localparam int unsigned WORD_WIDTH = 2 * DQ_WIDTH;  // 32 data + 4 parity
  localparam int unsigned LANES      = 4;             // byte lanes per word
  localparam int unsigned LANE_WIDTH = 9;             // 8 data + 1 parity
  localparam int unsigned BW_WIDTH   = LANES / 2;     // byte-write pins per beat

  typedef logic [DQ_WIDTH-1:0]   beat_t;
  typedef logic [WORD_WIDTH-1:0] word_t;
  typedef logic [LANES-1:0]      lane_en_t;

  // Even byte parity: the parity bit makes the nine bits of a lane hold an
  // even number of ones, so it is the XOR of the byte.
  function automatic logic byte_parity(input logic [7:0] b);
    return ^b;
  endfunction

  // Build a 36-bit word from 32 data bits, adding the four parity bits.
  function automatic word_t make_word(input logic [31:0] data);
    word_t w;
    for (int i = 0; i < LANES; i++) begin
      w[i*LANE_WIDTH +: LANE_WIDTH] = {byte_parity(data[i*8 +: 8]), data[i*8 +: 8]};
    end
    return w;
  endfunction

  // True when every lane of the word has even parity.
  function automatic logic word_parity_ok(input word_t w);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < LANES; i++) begin
      ok &= ~(^w[i*LANE_WIDTH +: LANE_WIDTH]);
    end
    return ok;
  endfunction

  // Number of bank-select bits for n banks (at least one).
  function automatic int unsigned bank_bits(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
