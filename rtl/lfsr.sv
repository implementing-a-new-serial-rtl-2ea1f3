// lfsr: one Fibonacci linear feedback shift register of the driving division.
//
// The state is LEN bits, stage 1 .. stage LEN (state[0] .. state[LEN-1]).
// The feedback bit is the XOR of the stages set in TAPS; it is the LFSR's
// output for the present step (out_bit, combinational from the state) and,
// when 'step' is high, it is shifted into stage 1 while every stage moves
// one place towards stage LEN.  With a primitive tap set the output is an
// m-sequence of period 2^LEN - 1.
//
// The key is loaded through a scan chain: with load_en high, load_in enters
// stage 1 and load_out is stage LEN, so LFSRs and LSRs can be chained.
// load_en has priority over step.  Reset clears the state; the all-zero
// state is a fixed point, so a key must leave at least one bit set.
//
// Taken from the source description: the feedback-bit output and the tap
// sets.  Own choices: the scan-chain loading, the step enable and reset.
module lfsr #(
  parameter int unsigned LEN = 39,
  parameter logic [sckg_pkg::MAX_LEN-1:0] TAPS = sckg_pkg::LFSR_TAPS[0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load_en,
  input  logic load_in,
  output logic load_out,
  input  logic step,
  output logic out_bit
);

  initial begin
    assert (LEN >= 2 && LEN <= sckg_pkg::MAX_LEN)
      else $fatal(1, "lfsr: LEN %0d out of range", LEN);
    assert (TAPS[LEN-1] && (TAPS >> LEN) == '0)
      else $fatal(1, "lfsr: TAPS must include stage LEN and nothing above it");
  end

  logic [LEN-1:0] state;

  assign out_bit  = ^(state & TAPS[LEN-1:0]);
  assign load_out = state[LEN-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= '0;
    else if (load_en) state <= {state[LEN-2:0], load_in};
    else if (step)    state <= {state[LEN-2:0], out_bit};
  end

endmodule
