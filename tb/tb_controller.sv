// tb_controller: exhaustive check of the controller's selection rule
// (control 0 passes the first wait-box candidate, 1 the second).
module tb_controller;
  logic cand0, cand1, ctrl, sel;
  int checks = 0, failures = 0;

  controller dut (.cand0, .cand1, .ctrl, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctrl, cand1, cand0} = 3'(v);
      #1;
      checks++;
      if (sel !== (ctrl ? cand1 : cand0)) begin
        failures++;
        $display("FAIL ctrl=%b cand0=%b cand1=%b sel=%b", ctrl, cand0, cand1, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
