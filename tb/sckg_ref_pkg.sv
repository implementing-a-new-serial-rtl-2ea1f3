// sckg_ref_pkg: bit-level reference model of the serial-control keystream
// generator, used by the testbenches as the independent expected value.
//
// It keeps every register as an array indexed by stage number (1 = input
// end) and evaluates one step in the order the algorithm is stated:
// LFSR outputs -> EPROM lookups -> controller 1 .. 8 -> shift everything.
// The EPROM tables are written as Boolean expressions rather than as the
// hex constants used by the RTL, and the tap lists as stage numbers.
// load() places key bits the way the scan chain does: chain position p
// (p = 0 is stage 1 of LFSR 1, then LFSR 1..8, then LSR 1..8) receives key
// bit N-1-p, where N is the number of state bits and key bit 0 is the
// least significant bit of the first key byte.
package sckg_ref_pkg;

  class sckg_ref;
    int unsigned lf_len [8];
    int unsigned ls_len [8];
    int unsigned taps   [8][$];
    bit          lf     [8][129];
    bit          ls     [8][129];
    // how often each controller chose candidate 0 / 1
    int unsigned ctrl_seen [8][2];

    function new();
      lf_len = '{39, 61, 47, 25, 70, 100, 35, 127};
      ls_len = '{100, 87, 94, 98, 84, 96, 88, 91};
      taps[0] = '{31, 39};
      taps[1] = '{56, 59, 60, 61};
      taps[2] = '{42, 47};
      taps[3] = '{3, 25};
      taps[4] = '{1, 3, 5, 70};
      taps[5] = '{2, 7, 8, 100};
      taps[6] = '{33, 35};
      taps[7] = '{112, 120, 124, 127};
      foreach (ctrl_seen[i, j]) ctrl_seen[i][j] = 0;
    endfunction

    function int unsigned lfsr_bits();
      int unsigned s = 0;
      foreach (lf_len[i]) s += lf_len[i];
      return s;
    endfunction

    function int unsigned lsr_bits();
      int unsigned s = 0;
      foreach (ls_len[i]) s += ls_len[i];
      return s;
    endfunction

    // key[i] is the i-th bit sent into the chain.
    function void load(bit key []);
      int unsigned n = lfsr_bits() + lsr_bits();
      int unsigned p = 0;
      for (int i = 0; i < 8; i++)
        for (int t = 1; t <= lf_len[i]; t++) begin lf[i][t] = key[n-1-p]; p++; end
      for (int i = 0; i < 8; i++)
        for (int t = 1; t <= ls_len[i]; t++) begin ls[i][t] = key[n-1-p]; p++; end
    endfunction

    function bit lfsr_out(int i);
      bit f = 0;
      foreach (taps[i][k]) f ^= lf[i][taps[i][k]];
      return f;
    endfunction

    static function bit e1f(bit [3:0] x);
      return (x[0] & x[1]) ^ (x[1] & x[2]) ^ x[2] ^ x[3];
    endfunction

    static function bit e2f(bit [3:0] x);
      return x[3] ^ ((x[0] & x[1]) | (x[1] & x[2]) | (x[0] & x[2]));
    endfunction

    function bit [3:0] bar(int set);
      bit [3:0] b;
      for (int i = 0; i < 4; i++) b[i] = lfsr_out(4*set + i);
      return b;
    endfunction

    function bit lsr_last(int i);
      return ls[i][ls_len[i]];
    endfunction

    function void lfsr_step();
      bit o [8];
      for (int i = 0; i < 8; i++) o[i] = lfsr_out(i);
      for (int i = 0; i < 8; i++) begin
        for (int t = lf_len[i]; t >= 2; t--) lf[i][t] = lf[i][t-1];
        lf[i][1] = o[i];
      end
    endfunction

    // Serial part alone: returns the keystream bit and shifts the LSRs.
    function bit serial_step(bit e1, bit e2, bit [7:0] c);
      bit in_bit [8];
      bit ks = lsr_last(7);
      in_bit[0] = c[0] ? e2 : e1;
      ctrl_seen[0][c[0]]++;
      for (int k = 1; k < 8; k++) begin
        in_bit[k] = c[k] ? lsr_last(k-1) : in_bit[k-1];
        ctrl_seen[k][c[k]]++;
      end
      for (int k = 0; k < 8; k++) begin
        for (int t = ls_len[k]; t >= 2; t--) ls[k][t] = ls[k][t-1];
        ls[k][1] = in_bit[k];
      end
      return ks;
    endfunction

    // Whole generator: returns K_n and advances one step.
    function bit step();
      bit [3:0] b1 = bar(0);
      bit [3:0] b2 = bar(1);
      bit ks = serial_step(e1f(b1), e2f(b2), {b2, b1});
      lfsr_step();
      return ks;
    endfunction
  endclass

endpackage
