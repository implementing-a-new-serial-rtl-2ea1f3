// tb_key_loader: checks key serialisation.
//
// Run 1 offers the 250 key bytes with random gaps; run 2 (after rekey)
// offers a second key back to back.  In both, the bits presented with
// load_en must be exactly key bits 0 .. 1241 (LSB of byte 0 first), the
// surplus 758 bits must be consumed without load_en, key_ready must drop
// after 250 bytes and 'loaded' must rise only at the end.  In run 2 the
// load must take exactly 2000 clocks after the first byte is taken.
module tb_key_loader;
  localparam int KB = 250, CL = 1242;
  logic clk = 0, rst_n = 0;
  logic rekey = 0, key_valid = 0;
  logic [7:0] key_byte = '0;
  logic key_ready, load_en, load_bit, loaded;
  int checks = 0, failures = 0;

  key_loader dut (.clk, .rst_n, .rekey, .key_valid, .key_byte, .key_ready,
                  .load_en, .load_bit, .loaded);

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

  byte unsigned key [KB];
  bit got [$];
  int cyc = 0, t_first = -1, t_loaded = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !rekey) begin
      if (load_en) got.push_back(load_bit);
      if (loaded && t_loaded < 0) t_loaded = cyc;
    end
  end

  task automatic run(bit gaps);
    int n = 0;
    got.delete();
    t_first = -1;
    t_loaded = -1;
    foreach (key[i]) key[i] = 8'($urandom);
    while (n < KB) begin
      @(negedge clk);
      key_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      key_byte = key[n];
      @(posedge clk);
      if (key_valid && key_ready) begin
        if (n == 0) t_first = cyc;
        n++;
      end
    end
    @(negedge clk);
    key_valid = 1;  // extra offers must be refused
    key_byte = 8'hA5;
    wait (loaded);
    @(negedge clk);
    key_valid = 0;
    check(got.size() == CL, $sformatf("bits loaded %0d", got.size()));
    for (int i = 0; i < CL && i < got.size(); i++)
      check(got[i] == key[i / 8][i % 8], $sformatf("bit %0d", i));
    check(!key_ready, "no more key bytes taken");
    repeat (20) begin
      @(negedge clk);
      check(loaded && !load_en, "stays loaded, chain idle");
    end
    // loaded rises on the edge that sends bit 1999 and is sampled one edge later
    if (!gaps) check(t_loaded - t_first == KB * 8 + 1, $sformatf("load time %0d", t_loaded - t_first));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!loaded, "not loaded after reset");
    run(1);
    @(negedge clk); rekey = 1;
    @(negedge clk); rekey = 0;
    check(!loaded && key_ready, "rekey restarts loading");
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
