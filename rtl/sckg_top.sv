// sckg_top: serial-control keystream generator with stream-cipher combiner.
//
// A bit-serial pseudo-random keystream generator for a stream cipher.  Its
// state is 1242 bits: eight LFSRs (504 bits, the driving division) and
// eight feedback-free serial shift registers (738 bits).  Each step:
//   1. every LFSR produces its feedback bit; LFSRs 1-4 form Bits control
//      bar 1, LFSRs 5-8 Bits control bar 2;
//   2. bar 1 addresses EPROM E1, bar 2 addresses EPROM E2 (16 x 1 tables);
//   3. controller 1 picks E1 (bar bit 1 = 0) or E2 (= 1) as the input of
//      LSR 1; controller k picks the input of LSR k-1 (bar bit k = 0) or the
//      output of LSR k-1 (= 1) as the input of LSR k;
//   4. the bit leaving LSR 8 is the keystream bit K_n, and
//      C_n = P_n XOR K_n is the ciphertext bit (decryption is the same).
//
// Interface: load the 250-byte key on key_valid/key_ready; key_loaded then
// rises.  After that, every cycle with 'step' high yields one keystream bit
// (ks_valid = step & key_loaded) and advances all registers; ks_bit and
// ct_bit are combinational from the state and pt_bit.  'step' low holds
// the state.  'rekey' restarts loading.
//
// The structure, sizes and selection rules follow the source description.
// Own choices: the EPROM contents, the key loading mechanism (byte
// handshake, LSB-first scan chain LFSR 1..8 then LSR 1..8, surplus 758 key
// bits dropped) and evaluating one step per clock entirely
// combinationally.
module sckg_top #(
  parameter int unsigned LFSR_LEN [sckg_pkg::NUM_LFSR] = sckg_pkg::LFSR_LEN,
  parameter sckg_pkg::tap_mask_t LFSR_TAPS [sckg_pkg::NUM_LFSR] = sckg_pkg::LFSR_TAPS,
  parameter int unsigned LSR_LEN [sckg_pkg::NUM_LSR] = sckg_pkg::LSR_LEN,
  parameter logic [15:0] E1_CONTENTS = sckg_pkg::E1_CONTENTS,
  parameter logic [15:0] E2_CONTENTS = sckg_pkg::E2_CONTENTS,
  parameter int unsigned KEY_BYTES = sckg_pkg::KEY_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rekey,
  input  logic       key_valid,
  input  logic [7:0] key_byte,
  output logic       key_ready,
  output logic       key_loaded,
  input  logic       step,
  output logic       ks_valid,
  output logic       ks_bit,
  input  logic       pt_bit,
  output logic       ct_bit
);

  localparam int unsigned CHAIN_LEN = sckg_pkg::sum_len8(LFSR_LEN)
                                    + sckg_pkg::sum_len8(LSR_LEN);

  logic       load_en, load_bit, chain_mid;
  logic       run;
  logic       e1, e2;
  logic [3:0] bar1, bar2;

  key_loader #(.KEY_BYTES(KEY_BYTES), .CHAIN_LEN(CHAIN_LEN)) u_loader (
    .clk      (clk),
    .rst_n    (rst_n),
    .rekey    (rekey),
    .key_valid(key_valid),
    .key_byte (key_byte),
    .key_ready(key_ready),
    .load_en  (load_en),
    .load_bit (load_bit),
    .loaded   (key_loaded)
  );

  assign run = step && key_loaded;

  traditional_part #(
    .LFSR_LEN   (LFSR_LEN),
    .LFSR_TAPS  (LFSR_TAPS),
    .E1_CONTENTS(E1_CONTENTS),
    .E2_CONTENTS(E2_CONTENTS)
  ) u_part1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .load_en (load_en),
    .load_in (load_bit),
    .load_out(chain_mid),
    .step    (run),
    .e1      (e1),
    .e2      (e2),
    .bar1    (bar1),
    .bar2    (bar2)
  );

  serial_part #(.LSR_LEN(LSR_LEN)) u_part2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .load_en (load_en),
    .load_in (chain_mid),
    .load_out(),
    .step    (run),
    .e1      (e1),
    .e2      (e2),
    .ctrl    ({bar2, bar1}),
    .ks_bit  (ks_bit)
  );

  assign ks_valid = run;
  assign ct_bit   = pt_bit ^ ks_bit;

endmodule
