// traditional_part: part one of the generator (driving division + EPROMs).
//
// Two driving sets of four LFSRs each.  The first set's 4-bit output
// (Bits control bar 1) addresses EPROM E1, the second set's (Bits control
// bar 2) addresses EPROM E2.  Outputs per step: the two EPROM bits e1, e2
// and both bars, all combinational from the LFSR state; on 'step' every
// LFSR advances once.
//
// Scan chain: load_in -> set 1 (LFSR 1..4) -> set 2 (LFSR 5..8) -> load_out,
// 504 bits at the default sizes.
//
// Taken from the source description: the structure and all LFSR sizes.
// Own choices: EPROM contents, set membership, chain order.
module traditional_part #(
  parameter int unsigned LFSR_LEN [sckg_pkg::NUM_LFSR] = sckg_pkg::LFSR_LEN,
  parameter sckg_pkg::tap_mask_t LFSR_TAPS [sckg_pkg::NUM_LFSR] = sckg_pkg::LFSR_TAPS,
  parameter logic [15:0] E1_CONTENTS = sckg_pkg::E1_CONTENTS,
  parameter logic [15:0] E2_CONTENTS = sckg_pkg::E2_CONTENTS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_en,
  input  logic       load_in,
  output logic       load_out,
  input  logic       step,
  output logic       e1,
  output logic       e2,
  output logic [3:0] bar1,
  output logic [3:0] bar2
);

  logic chain_mid;

  driving_set #(
    .LEN ('{LFSR_LEN[0], LFSR_LEN[1], LFSR_LEN[2], LFSR_LEN[3]}),
    .TAPS('{LFSR_TAPS[0], LFSR_TAPS[1], LFSR_TAPS[2], LFSR_TAPS[3]})
  ) u_set1 (
    .clk(clk), .rst_n(rst_n), .load_en(load_en), .load_in(load_in),
    .load_out(chain_mid), .step(step), .bar(bar1)
  );

  driving_set #(
    .LEN ('{LFSR_LEN[4], LFSR_LEN[5], LFSR_LEN[6], LFSR_LEN[7]}),
    .TAPS('{LFSR_TAPS[4], LFSR_TAPS[5], LFSR_TAPS[6], LFSR_TAPS[7]})
  ) u_set2 (
    .clk(clk), .rst_n(rst_n), .load_en(load_en), .load_in(chain_mid),
    .load_out(load_out), .step(step), .bar(bar2)
  );

  eprom #(.CONTENTS(E1_CONTENTS)) u_e1 (.addr(bar1), .data(e1));
  eprom #(.CONTENTS(E2_CONTENTS)) u_e2 (.addr(bar2), .data(e2));

endmodule
