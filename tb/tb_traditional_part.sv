// tb_traditional_part: checks part one (eight LFSRs and both EPROMs)
// against the reference model: 504 random bits through the scan chain,
// then e1, e2, bar1 and bar2 over 3000 steps.  Also counts how often
// each EPROM output takes each value.
module tb_traditional_part;
  import sckg_ref_pkg::*;
  localparam int N = 504;
  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_in = 0, step = 0;
  logic load_out, e1, e2;
  logic [3:0] bar1, bar2;
  int checks = 0, failures = 0;
  int e1_ones = 0, e2_ones = 0;

  traditional_part dut (.clk, .rst_n, .load_en, .load_in, .load_out, .step,
                        .e1, .e2, .bar1, .bar2);

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

  sckg_ref m;
  bit key [];
  int unsigned total;

  initial begin
    m = new();
    total = m.lfsr_bits() + m.lsr_bits();
    check(m.lfsr_bits() == N, "model LFSR size");
    key = new[total];
    foreach (key[i]) key[i] = 1'($urandom);
    m.load(key);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = total - N; i < total; i++) begin
      @(negedge clk); load_en = 1; load_in = key[i];
    end
    @(negedge clk); load_en = 0;
    check(load_out == key[total - N], "load_out = first bit sent");
    for (int k = 0; k < 3000; k++) begin
      check(bar1 == m.bar(0), "bar1");
      check(bar2 == m.bar(1), "bar2");
      check(e1 == sckg_ref::e1f(m.bar(0)), "e1");
      check(e2 == sckg_ref::e2f(m.bar(1)), "e2");
      e1_ones += e1;
      e2_ones += e2;
      step = 1;
      m.lfsr_step();
      @(negedge clk);
      step = 0;
    end
    // both tables are balanced, so each output is near 50 % ones
    check(e1_ones > 1300 && e1_ones < 1700, "E1 output balance");
    check(e2_ones > 1300 && e2_ones < 1700, "E2 output balance");
    $display("E1 ones %0d, E2 ones %0d of 3000", e1_ones, e2_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
