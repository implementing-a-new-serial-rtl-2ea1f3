// lsr: one serial linear shift register of the serial part (no feedback).
//
// A delay line of LEN stages.  When 'step' is high, in_bit (the bit chosen
// by this register's controller) enters stage 1 and every stage moves one
// place on; out_bit is the last stage, i.e. the bit that leaves the
// register on this step and that the next controller's wait-box sees.
// out_bit is therefore the in_bit of LEN steps earlier.
//
// The key is loaded through a scan chain exactly as for the LFSRs: with
// load_en high, load_in enters stage 1; load_out (= out_bit) feeds the next
// register of the chain.  load_en has priority over step.
//
// Taken from the source description: the feedback-free serial register and
// its lengths.  Own choices: scan-chain loading, step enable, reset to 0.
module lsr #(
  parameter int unsigned LEN = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load_en,
  input  logic load_in,
  output logic load_out,
  input  logic step,
  input  logic in_bit,
  output logic out_bit
);

  initial assert (LEN >= 2) else $fatal(1, "lsr: LEN must be at least 2");

  logic [LEN-1:0] state;

  assign out_bit  = state[LEN-1];
  assign load_out = state[LEN-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= '0;
    else if (load_en) state <= {state[LEN-2:0], load_in};
    else if (step)    state <= {state[LEN-2:0], in_bit};
  end

endmodule
