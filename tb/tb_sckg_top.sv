// tb_sckg_top: end-to-end test of the whole generator at its default sizes.
//
//  1. Load a random 250-byte key (random gaps between bytes) while 'step'
//     is held high: no keystream may appear before the key is in.
//  2. Encrypt 6000 random plaintext bits with random stalls of 'step';
//     every keystream bit is compared with the reference model (loaded
//     with the same key) and ct must equal pt ^ ks.
//  3. Rekey with the same key and feed the ciphertext back: the output
//     must be the original plaintext (decryption).
//  4. Rekey with a different key: the keystream must differ.
// Mechanisms counted (each must occur): key loading, surplus key bits,
// step requested during loading, stalls, rekey, both choices of every
// controller, decryption round trip.
module tb_sckg_top;
  import sckg_ref_pkg::*;
  localparam int KB = 250, NBITS = 6000;

  logic clk = 0, rst_n = 0;
  logic rekey = 0, key_valid = 0, step = 0, pt_bit = 0;
  logic [7:0] key_byte = '0;
  logic key_ready, key_loaded, ks_valid, ks_bit, ct_bit;
  int checks = 0, failures = 0;

  sckg_top dut (.clk, .rst_n, .rekey, .key_valid, .key_byte, .key_ready,
                .key_loaded, .step, .ks_valid, .ks_bit, .pt_bit, .ct_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  byte unsigned key1 [KB], key2 [KB];
  bit pt [NBITS], ct [NBITS], ks1 [NBITS];
  int n_load = 0, n_early_step = 0, n_stall = 0, n_rekey = 0, n_roundtrip = 0;
  int n_surplus = 0;

  // Feeds one key; 'step' stays high meanwhile, which must do nothing.
  task automatic load_key(ref byte unsigned k [KB]);
    int n = 0;
    step = 1;
    while (n < KB) begin
      @(negedge clk);
      check(!ks_valid, "no keystream while loading");
      n_early_step++;
      key_valid = ($urandom_range(0, 3) != 0);
      key_byte = k[n];
      @(posedge clk);
      if (key_valid && key_ready) n++;
    end
    @(negedge clk);
    key_valid = 0;
    while (!key_loaded) begin
      check(!ks_valid, "no keystream before key_loaded");
      @(negedge clk);
    end
    step = 0;
    n_load++;
    n_surplus += KB * 8 - 1242;
  endtask

  task automatic do_rekey();
    @(negedge clk); rekey = 1;
    @(negedge clk); rekey = 0;
    check(!key_loaded, "rekey clears key_loaded");
    n_rekey++;
  endtask

  typedef bit bitvec_t [];

  function automatic bitvec_t to_bits(ref byte unsigned k [KB]);
    bitvec_t b = new[KB * 8];
    foreach (b[i]) b[i] = k[i / 8][i % 8];
    return b;
  endfunction

  // Runs NBITS keystream bits with random stalls; 'src' is the data input.
  task automatic run_bits(sckg_ref m, ref bit src [NBITS], ref bit dst [NBITS],
                          input bit compare_model, ref bit ks [NBITS]);
    for (int i = 0; i < NBITS; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin
        step = 0;
        #1;
        check(!ks_valid, "stall gives no bit");
        n_stall++;
        @(negedge clk);
      end
      step = 1;
      pt_bit = src[i];
      #1;
      check(ks_valid, "ks_valid");
      ks[i] = ks_bit;
      dst[i] = ct_bit;
      check(ct_bit == (src[i] ^ ks_bit), "ct = pt ^ ks");
      if (compare_model) check(ks_bit == m.step(), $sformatf("keystream bit %0d", i));
      @(posedge clk);
    end
    @(negedge clk);
    step = 0;
  endtask

  sckg_ref m;
  bit back [NBITS], ks_tmp [NBITS], ks2 [NBITS];
  int diff;

  initial begin
    foreach (key1[i]) key1[i] = 8'($urandom);
    foreach (key2[i]) key2[i] = 8'($urandom);
    foreach (pt[i]) pt[i] = 1'($urandom);
    m = new();
    m.load(to_bits(key1));

    repeat (2) @(posedge clk);
    rst_n = 1;

    load_key(key1);
    run_bits(m, pt, ct, 1, ks1);

    do_rekey();
    load_key(key1);
    run_bits(m, ct, back, 0, ks_tmp);
    diff = 0;
    foreach (pt[i]) begin
      if (back[i] != pt[i]) diff++;
      if (ks_tmp[i] != ks1[i]) diff++;
    end
    check(diff == 0, $sformatf("decryption round trip, %0d mismatches", diff));
    if (diff == 0) n_roundtrip++;

    do_rekey();
    load_key(key2);
    run_bits(m, pt, back, 0, ks2);
    diff = 0;
    foreach (ks2[i]) if (ks2[i] != ks1[i]) diff++;
    check(diff > NBITS / 4, $sformatf("other key, other stream (%0d differ)", diff));

    // mechanisms
    check(n_load == 3, "key loads");
    check(n_surplus > 0, "surplus key bits dropped");
    check(n_early_step > 0, "step during loading");
    check(n_stall > 0, "stalls");
    check(n_rekey == 2, "rekeys");
    check(n_roundtrip == 1, "decryption");
    for (int k = 0; k < 8; k++)
      check(m.ctrl_seen[k][0] > 0 && m.ctrl_seen[k][1] > 0,
            $sformatf("controller %0d used both inputs", k + 1));
    $display("loads=%0d early_steps=%0d stalls=%0d rekeys=%0d roundtrips=%0d",
             n_load, n_early_step, n_stall, n_rekey, n_roundtrip);
    for (int k = 0; k < 8; k++)
      $display("controller %0d: picked cand0 %0d, cand1 %0d times", k + 1,
               m.ctrl_seen[k][0], m.ctrl_seen[k][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
