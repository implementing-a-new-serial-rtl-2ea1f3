// tb_lsr: checks the serial shift register as a delay line.
//
// A random 100-bit content is loaded through the scan chain; then 1000
// steps with random input bits follow, with a held step now and then.
// out_bit must be the in_bit of 100 steps earlier, or the loaded content
// for the first 100 steps (stage 100 first).
module tb_lsr;
  localparam int L = 100;
  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_in = 0, step = 0, in_bit = 0;
  logic load_out, out_bit;
  int checks = 0, failures = 0;

  lsr dut (.clk, .rst_n, .load_en, .load_in, .load_out, .step, .in_bit, .out_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit seq [-L:1000];  // seq[k] = bit that enters at step k; seq[-t] = loaded stage t
  bit key [L];
  int holds = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (key[i]) key[i] = 1'($urandom);
    for (int i = 0; i < L; i++) begin
      @(negedge clk); load_en = 1; load_in = key[i];
    end
    @(negedge clk); load_en = 0;
    for (int t = 1; t <= L; t++) seq[-t] = key[L - t];
    for (int k = 0; k < 1000; k++) begin
      seq[k] = 1'($urandom);
      if ($urandom_range(0, 9) == 0) begin
        step = 0;
        @(negedge clk);
        check(out_bit == seq[k-L], "hold");
        holds++;
      end
      in_bit = seq[k];
      step = 1;
      check(out_bit == seq[k-L], $sformatf("out k=%0d", k));
      check(load_out == out_bit, "load_out");
      @(negedge clk);
      step = 0;
    end
    check(holds > 0, "a hold happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
