// tb_eprom: checks both default EPROM tables at all 16 addresses against
// their Boolean definitions E1(x) = x0x1 ^ x1x2 ^ x2 ^ x3 and
// E2(x) = x3 ^ maj(x0,x1,x2), and that each holds eight ones.
module tb_eprom;
  import sckg_ref_pkg::*;
  logic [3:0] addr;
  logic d1, d2;
  int checks = 0, failures = 0;
  int ones1 = 0, ones2 = 0;

  eprom dut1 (.addr, .data(d1));
  eprom #(.CONTENTS(sckg_pkg::E2_CONTENTS)) dut2 (.addr, .data(d2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks += 2;
      if (d1 !== sckg_ref::e1f(4'(a))) begin failures++; $display("FAIL E1 addr %0d", a); end
      if (d2 !== sckg_ref::e2f(4'(a))) begin failures++; $display("FAIL E2 addr %0d", a); end
      ones1 += d1;
      ones2 += d2;
    end
    checks += 2;
    if (ones1 != 8) failures++;
    if (ones2 != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
