// driving_set: one set of four LFSRs of the driving division.
//
// The four LFSRs step together.  Their present output bits form the set's
// Bits control bar: bar[i] is the output of the set's LFSR i+1.  The bar is
// used twice in the same step: as the 4-bit address of the set's EPROM and
// as the control bits of the set's four controllers in the serial part.
// It is a plain bus, not a register, so the step's bar matches the step's
// EPROM output.
//
// Scan chain: load_in -> LFSR 1 -> LFSR 2 -> LFSR 3 -> LFSR 4 -> load_out.
//
// Taken from the source description: four LFSRs per set whose four outputs
// address an EPROM and drive four controllers.  Own choices: the bit order
// of the bar and the chain order.
module driving_set #(
  parameter int unsigned LEN  [sckg_pkg::SET_SIZE] =
    '{sckg_pkg::LFSR_LEN[0], sckg_pkg::LFSR_LEN[1],
      sckg_pkg::LFSR_LEN[2], sckg_pkg::LFSR_LEN[3]},
  parameter sckg_pkg::tap_mask_t TAPS [sckg_pkg::SET_SIZE] =
    '{sckg_pkg::LFSR_TAPS[0], sckg_pkg::LFSR_TAPS[1],
      sckg_pkg::LFSR_TAPS[2], sckg_pkg::LFSR_TAPS[3]}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_en,
  input  logic       load_in,
  output logic       load_out,
  input  logic       step,
  output logic [3:0] bar
);

  logic [sckg_pkg::SET_SIZE:0] chain;

  assign chain[0] = load_in;

  for (genvar i = 0; i < sckg_pkg::SET_SIZE; i++) begin : g_lfsr
    lfsr #(.LEN(LEN[i]), .TAPS(TAPS[i])) u_lfsr (
      .clk     (clk),
      .rst_n   (rst_n),
      .load_en (load_en),
      .load_in (chain[i]),
      .load_out(chain[i+1]),
      .step    (step),
      .out_bit (bar[i])
    );
  end

  assign load_out = chain[sckg_pkg::SET_SIZE];

endmodule
