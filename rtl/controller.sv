// controller: one controller of the serial part together with its wait-box.
//
// The wait-box holds two candidate bits; the controller's bit from the
// Bits control bar settles which one becomes the input of its LSR:
//   ctrl = 0 -> cand0, ctrl = 1 -> cand1.
// For controller 1 the candidates are the two EPROM outputs (cand0 = E1,
// cand1 = E2).  For controller k > 1 they are the bit chosen by
// controller k-1 (cand0) and the output of LSR k-1 (cand1).  The chosen
// bit 'sel' also goes on to the next wait-box.
//
// Purely combinational: all eight selections settle within one step, as
// the source description has the chosen bit enter the next wait-box
// simultaneously.  The selection rule follows the source description.
module controller (
  input  logic cand0,
  input  logic cand1,
  input  logic ctrl,
  output logic sel
);

  always_comb begin
    unique case (ctrl)
      1'b0: sel = cand0;
      1'b1: sel = cand1;
    endcase
  end

endmodule
