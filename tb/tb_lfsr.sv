// tb_lfsr: checks the LFSR against its recurrence.
//
// Unit 1 is the default 39-stage LFSR (taps 31, 39).  A random seed is
// shifted in through the scan chain, the chain output is checked, then
// 3000 output bits are compared with a(k) = a(k-31) ^ a(k-39), where the
// loaded stage t supplies a(-t).  A cycle with step low must hold the state.
// Unit 2 is a 5-stage LFSR with taps 3, 5 (x^5 + x^3 + 1, primitive): its
// output must have period exactly 31 with sixteen ones per period.
module tb_lfsr;
  import sckg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_in = 0, step = 0;
  logic load_out, out_bit;
  logic s_load_en = 0, s_load_in = 0, s_step = 0;
  logic s_load_out, s_out;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .load_en, .load_in, .load_out, .step, .out_bit);
  lfsr #(.LEN(5), .TAPS(taps4(3, 5, 0, 0))) u_small (
    .clk, .rst_n, .load_en(s_load_en), .load_in(s_load_in), .load_out(s_load_out),
    .step(s_step), .out_bit(s_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  bit seed [39];
  bit a [-39:3000];
  bit per [62];
  int ones;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (seed[i]) seed[i] = 1'($urandom);
    seed[5] = 1;  // never all zero
    // load 39 bits, then shift them out again while checking load_out
    for (int i = 0; i < 39; i++) begin
      @(negedge clk); load_en = 1; load_in = seed[i];
    end
    @(negedge clk); load_en = 0;
    for (int t = 1; t <= 39; t++) a[-t] = seed[39 - t];
    check(load_out == seed[0], "load_out after load");
    // outputs
    for (int k = 0; k < 3000; k++) begin
      a[k] = a[k-31] ^ a[k-39];
      @(negedge clk);
      check(out_bit == a[k], $sformatf("out_bit k=%0d", k));
      if (k == 1000) begin  // stall one cycle
        step = 0;
        @(negedge clk);
        check(out_bit == a[k], "hold while step low");
      end
      step = 1;
      @(posedge clk);
      #1 step = 0;
    end

    // small LFSR: load 00001 (stage 1 = 1)
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); s_load_en = 1; s_load_in = (i == 4);
    end
    @(negedge clk); s_load_en = 0; s_step = 1;
    for (int k = 0; k < 62; k++) begin
      @(negedge clk);
      per[k] = s_out;
    end
    s_step = 0;
    ones = 0;
    for (int k = 0; k < 31; k++) begin
      ones += per[k];
      check(per[k] == per[k+31], "small LFSR period 31");
    end
    check(ones == 16, "small LFSR ones per period");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
