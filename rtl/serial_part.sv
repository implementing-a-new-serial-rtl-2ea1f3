// serial_part: part two of the generator (eight controllers, eight LSRs).
//
// Per step, combinationally:
//   sel[1] = ctrl[0] ? e2 : e1                       (controller 1)
//   sel[k] = ctrl[k-1] ? out[k-1] : sel[k-1], k>1    (controller k)
// where out[k] is the last stage of LSR k.  On 'step' each LSR k shifts
// sel[k] in.  The keystream bit is out[8], the bit leaving LSR 8.
// ctrl[3:0] is Bits control bar 1 (controllers 1-4), ctrl[7:4] is bar 2.
//
// Scan chain: load_in -> LSR 1 -> ... -> LSR 8 -> load_out, 738 bits at the
// default sizes.
//
// Taken from the source description: the selection rules and the LSR
// lengths.  Own choices: chain order and the combinational wait-boxes.
module serial_part #(
  parameter int unsigned LSR_LEN [sckg_pkg::NUM_LSR] = sckg_pkg::LSR_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_en,
  input  logic       load_in,
  output logic       load_out,
  input  logic       step,
  input  logic       e1,
  input  logic       e2,
  input  logic [7:0] ctrl,
  output logic       ks_bit
);

  localparam int unsigned N = sckg_pkg::NUM_LSR;

  logic [N-1:0] sel;     // controller k+1 output = LSR k+1 input
  logic [N-1:0] lsr_out; // LSR k+1 last stage
  logic [N:0]   chain;

  assign chain[0] = load_in;

  for (genvar k = 0; k < N; k++) begin : g_stage
    if (k == 0) begin : g_first
      controller u_ctrl (.cand0(e1), .cand1(e2), .ctrl(ctrl[0]), .sel(sel[0]));
    end else begin : g_next
      controller u_ctrl (.cand0(sel[k-1]), .cand1(lsr_out[k-1]), .ctrl(ctrl[k]),
                         .sel(sel[k]));
    end

    lsr #(.LEN(LSR_LEN[k])) u_lsr (
      .clk     (clk),
      .rst_n   (rst_n),
      .load_en (load_en),
      .load_in (chain[k]),
      .load_out(chain[k+1]),
      .step    (step),
      .in_bit  (sel[k]),
      .out_bit (lsr_out[k])
    );
  end

  assign load_out = chain[N];
  assign ks_bit   = lsr_out[N-1];

endmodule
