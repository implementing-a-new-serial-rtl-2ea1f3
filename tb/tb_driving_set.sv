// tb_driving_set: checks the first LFSR set (LFSRs 1-4 of the generator)
// against the reference model.  172 random bits are loaded through the
// scan chain (the model receives them as the first 172 chain positions),
// then the 4-bit Bits control bar is compared over 3000 steps, with random
// held steps in between.
module tb_driving_set;
  import sckg_ref_pkg::*;
  localparam int N = 39 + 61 + 47 + 25;
  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_in = 0, step = 0;
  logic load_out;
  logic [3:0] bar;
  int checks = 0, failures = 0;

  driving_set dut (.clk, .rst_n, .load_en, .load_in, .load_out, .step, .bar);

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
    key = new[total];
    // only the first N chain positions matter: they get key bits total-1 .. total-N,
    // i.e. the last N bits sent.  Send exactly those N bits.
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
      if ($urandom_range(0, 7) == 0) begin
        step = 0;
        @(negedge clk);
      end
      check(bar == m.bar(0), $sformatf("bar step %0d", k));
      step = 1;
      m.lfsr_step();
      @(negedge clk);
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
