// tb_serial_part: checks part two (controllers and LSRs) against the
// reference model.  738 random bits are loaded through the scan chain,
// then 4000 steps with random e1, e2 and control bits are compared bit by
// bit.  Every controller must have chosen each of its two candidates.
module tb_serial_part;
  import sckg_ref_pkg::*;
  localparam int N = 738;
  logic clk = 0, rst_n = 0;
  logic load_en = 0, load_in = 0, step = 0;
  logic load_out, e1 = 0, e2 = 0, ks_bit;
  logic [7:0] ctrl = '0;
  int checks = 0, failures = 0;

  serial_part dut (.clk, .rst_n, .load_en, .load_in, .load_out, .step,
                   .e1, .e2, .ctrl, .ks_bit);

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
  bit exp_ks;

  initial begin
    m = new();
    total = m.lfsr_bits() + m.lsr_bits();
    check(m.lsr_bits() == N, "model LSR size");
    key = new[total];
    foreach (key[i]) key[i] = 1'($urandom);
    m.load(key);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the LSRs are the last N chain positions: they get key bits 0 .. N-1
    for (int i = 0; i < N; i++) begin
      @(negedge clk); load_en = 1; load_in = key[i];
    end
    @(negedge clk); load_en = 0;
    check(load_out == key[0], "load_out = first bit sent");
    for (int k = 0; k < 4000; k++) begin
      e1 = 1'($urandom);
      e2 = 1'($urandom);
      ctrl = 8'($urandom);
      step = 1;
      #1;
      exp_ks = m.serial_step(e1, e2, ctrl);
      check(ks_bit == exp_ks, $sformatf("ks step %0d", k));
      @(negedge clk);
      step = 0;
    end
    for (int i = 0; i < 8; i++)
      check(m.ctrl_seen[i][0] > 0 && m.ctrl_seen[i][1] > 0, "both choices used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
