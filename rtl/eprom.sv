// eprom: 16 x 1-bit nonlinear combining table (EPROM E1 or E2).
//
// The four output bits of one LFSR set (its Bits control bar) address one
// of 16 stored bits; the stored bit is the table's output in the same step
// (asynchronous read).  The table is a parameter: bit a of CONTENTS is the
// value at address a.  The source description asks that the table hold as
// many 0s as 1s, so a table that is not balanced is rejected at
// elaboration.  Which balanced function is stored is this design's choice
// (see sckg_pkg); programming of the part is not modelled.
module eprom #(
  parameter logic [15:0] CONTENTS = sckg_pkg::E1_CONTENTS
) (
  input  logic [3:0] addr,
  output logic       data
);

  initial assert ($countones(CONTENTS) == 8)
    else $fatal(1, "eprom: CONTENTS must hold eight 0s and eight 1s");

  logic rom [16];

  always_comb begin
    for (int a = 0; a < 16; a++) rom[a] = CONTENTS[a];
  end

  assign data = rom[addr];

endmodule
