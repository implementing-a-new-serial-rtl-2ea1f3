// sckg_pkg: shared constants of the serial-control keystream generator.
//
// The generator has eight LFSRs (the driving division, two sets of four),
// two 16 x 1-bit nonlinear combining tables (EPROM E1 and E2) and eight
// feedback-free serial shift registers (LSRs) whose inputs are chosen by
// eight controllers.  This package holds the sizes every module shares.
//
// Taken from the source description: the LFSR lengths and tap positions,
// the serial LSR lengths and the 250-byte key.  Own choices: the EPROM
// contents (the description only asks for equal numbers of 0s and 1s) and
// the grouping of LFSRs 1-4 / 5-8 into the first and second set.
//
// Tap masks: bit (t-1) of LFSR_TAPS[i] is set when stage t of LFSR i+1 is
// tapped.  The feedback bit is the XOR of the tapped stages; stage t holds
// the feedback bit of t steps earlier, so the output obeys
// a(k) = XOR over taps t of a(k-t).
package sckg_pkg;

  localparam int unsigned NUM_LFSR = 8;
  localparam int unsigned NUM_LSR  = 8;
  localparam int unsigned SET_SIZE = 4;
  localparam int unsigned MAX_LEN  = 128;  // widest tap mask

  typedef logic [MAX_LEN-1:0] tap_mask_t;

  // Builds a tap mask from up to four 1-based stage numbers (0 = unused).
  function automatic tap_mask_t taps4(int unsigned a, int unsigned b,
                                      int unsigned c, int unsigned d);
    tap_mask_t m;
    m = '0;
    if (a != 0) m[a-1] = 1'b1;
    if (b != 0) m[b-1] = 1'b1;
    if (c != 0) m[c-1] = 1'b1;
    if (d != 0) m[d-1] = 1'b1;
    return m;
  endfunction

  // LFSR lengths and taps, one entry per LFSR (first set = 0..3).
  localparam int unsigned LFSR_LEN [NUM_LFSR] = '{39, 61, 47, 25, 70, 100, 35, 127};
  localparam tap_mask_t LFSR_TAPS [NUM_LFSR] = '{
    taps4( 31,  39,   0,   0),
    taps4( 56,  59,  60,  61),
    taps4( 42,  47,   0,   0),
    taps4(  3,  25,   0,   0),
    taps4(  1,   3,   5,  70),
    taps4(  2,   7,   8, 100),
    taps4( 33,  35,   0,   0),
    taps4(112, 120, 124, 127)
  };

  // Serial LSR lengths, LSR1 .. LSR8 (sum 738).
  localparam int unsigned LSR_LEN [NUM_LSR] = '{100, 87, 94, 98, 84, 96, 88, 91};

  // Secret key size in bytes.
  localparam int unsigned KEY_BYTES = 250;

  // EPROM contents, bit a = value stored at address a (address bit i is
  // the output of LFSR i+1 of the set).  Both hold eight ones.
  //   E1(x) = x0 x1 ^ x1 x2 ^ x2 ^ x3
  //   E2(x) = x3 ^ maj(x0, x1, x2)
  localparam logic [15:0] E1_CONTENTS = 16'h47B8;
  localparam logic [15:0] E2_CONTENTS = 16'h17E8;

  // Total number of state bits in a list of lengths.
  function automatic int unsigned sum_len8(int unsigned l [8]);
    int unsigned s;
    s = 0;
    for (int i = 0; i < 8; i++) s += l[i];
    return s;
  endfunction

endpackage
