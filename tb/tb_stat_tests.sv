// tb_stat_tests: runs the statistical evaluation workload at default sizes.
//
// Part A, for one random key: 100000 keystream bits are generated and each
// is compared with the reference model (this is the pass/fail part).  The
// sequence then goes through the five classical tests, each reported as a
// chi-square statistic next to its 5 % critical value:
//   frequency      (n0 - n1)^2 / n                              1 dof
//   serial         non-overlapping bit pairs, 4 classes         3 dof
//   poker          number of ones in each 5-bit block, 6 cls.  5 dof
//   runs           runs of 0s and of 1s, lengths 1..9 and >=10  9 dof each
//                  expected count of length i: (n - i + 3) / 2^(i+2)
//   autocorrelation shifts 1..10: (agree - disagree)^2 / (n-d)   1 dof
// Part B, correlation: for six random keys, 100000 steps each, the
// fraction of steps on which each LFSR's output equals the keystream bit
// must lie within 0.5 +/- 0.01 (about six standard deviations); this
// holds for the generator as built.
// The Part A statistics are printed, not checked: the generator as built does
// not meet them (see the README), and a check would only restate that.
// What is checked is that every step yields a valid bit equal to the
// model's and that all six sequences ran to full length.
module tb_stat_tests;
  localparam int KB = 250, N = 100000;

  logic clk = 0, rst_n = 0;
  logic rekey = 0, key_valid = 0, step = 0, pt_bit = 0;
  logic [7:0] key_byte = '0;
  logic key_ready, key_loaded, ks_valid, ks_bit, ct_bit;
  int checks = 0, failures = 0;

  sckg_top dut (.clk, .rst_n, .rekey, .key_valid, .key_byte, .key_ready,
                .key_loaded, .step, .ks_valid, .ks_bit, .pt_bit, .ct_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("%0d of %0d statistics below their 5%% points", n_pass, n_stat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pass = 0, n_stat = 0;

  task automatic chi(string name, real x, real lim_05);
    n_stat++;
    if (x <= lim_05) n_pass++;
    $display("%-22s chi2 = %10.3f  (5%% point %6.2f: %s)", name, x, lim_05,
             x <= lim_05 ? "pass" : "above");
  endtask

  task automatic load_random_key();
    int n = 0;
    if (key_loaded) begin
      @(negedge clk); rekey = 1;
      @(negedge clk); rekey = 0;
    end
    while (n < KB) begin
      @(negedge clk);
      key_valid = 1;
      key_byte = 8'($urandom);
      @(posedge clk);
      if (key_ready) begin
        for (int b = 0; b < 8; b++) kbits[8*n + b] = key_byte[b];
        n++;
      end
    end
    @(negedge clk);
    key_valid = 0;
    wait (key_loaded);
  endtask

  bit s [N];
  int agree [8];
  int n_steps;
  sckg_ref_pkg::sckg_ref m;

  typedef bit bitvec_t [];
  bitvec_t kbits;

  task automatic gen(bit collect);
    foreach (agree[i]) agree[i] = 0;
    n_steps = 0;
    @(negedge clk);
    step = 1;
    for (int i = 0; i < N; i++) begin
      #1;
      checks++;
      if (!ks_valid) failures++;
      if (collect) begin
        s[i] = ks_bit;
        checks++;
        if (ks_bit != m.step()) begin
          failures++;
          if (failures < 10) $display("FAIL keystream bit %0d differs from model", i);
        end
      end
      n_steps++;
      for (int j = 0; j < 4; j++) begin
        agree[j]     += int'(dut.bar1[j] == ks_bit);
        agree[j + 4] += int'(dut.bar2[j] == ks_bit);
      end
      @(negedge clk);
    end
    step = 0;
  endtask

  real x, e;
  int n0, n1, pairs [4], poker [6], runs [2][11], len;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- Part A ----------------
    kbits = new[KB * 8];
    load_random_key();
    m = new();
    m.load(kbits);
    gen(1);

    n0 = 0; n1 = 0;
    foreach (s[i]) if (s[i]) n1++; else n0++;
    $display("frequency: zeros %0d ones %0d", n0, n1);
    chi("frequency", real'((n0 - n1) * (n0 - n1)) / N, 3.84);

    foreach (pairs[i]) pairs[i] = 0;
    for (int i = 0; i + 1 < N; i += 2) pairs[{s[i], s[i+1]}]++;
    x = 0; e = (N / 2) / 4.0;
    foreach (pairs[i]) x += (pairs[i] - e) ** 2 / e;
    $display("serial: 00 %0d 01 %0d 10 %0d 11 %0d", pairs[0], pairs[1], pairs[2], pairs[3]);
    chi("serial", x, 7.81);

    foreach (poker[i]) poker[i] = 0;
    for (int i = 0; i + 4 < N; i += 5)
      poker[int'(s[i]) + int'(s[i+1]) + int'(s[i+2]) + int'(s[i+3]) + int'(s[i+4])]++;
    x = 0;
    begin
      static int binom [6] = '{1, 5, 10, 10, 5, 1};
      for (int k = 0; k < 6; k++) begin
        e = (N / 5) * binom[k] / 32.0;
        x += (poker[k] - e) ** 2 / e;
      end
    end
    chi("poker", x, 11.07);

    foreach (runs[b, l]) runs[b][l] = 0;
    len = 1;
    for (int i = 1; i <= N; i++) begin
      if (i < N && s[i] == s[i-1]) len++;
      else begin
        runs[s[i-1]][len >= 10 ? 10 : len]++;
        len = 1;
      end
    end
    for (int b = 0; b < 2; b++) begin
      real tail;
      x = 0;
      tail = 0;
      for (int l = 1; l <= 9; l++) begin
        e = (N - l + 3) / real'(2 ** (l + 2));
        x += (runs[b][l] - e) ** 2 / e;
      end
      // expected runs of length >= 10: sum over l >= 10 of (N-l+3)/2^(l+2)
      for (int l = 10; l <= 40; l++) tail += (N - l + 3) / (2.0 ** (l + 2));
      x += (runs[b][10] - tail) ** 2 / tail;
      chi($sformatf("runs of %0ds", b), x, 16.92);
    end

    for (int d = 1; d <= 10; d++) begin
      int same, differ;
      same = 0;
      differ = 0;
      for (int i = 0; i + d < N; i++) if (s[i] == s[i+d]) same++; else differ++;
      chi($sformatf("autocorrelation d=%0d", d),
          real'((same - differ) * (same - differ)) / (N - d), 3.84);
    end

    // ---------------- Part B ----------------
    for (int q = 0; q < 6; q++) begin
      string line;
      if (q > 0) begin
        load_random_key();
        gen(0);
      end else begin
        // sequence 1 reuses the agreement counts of part A
      end
      line = $sformatf("correlation, sequence %0d:", q + 1);
      for (int j = 0; j < 8; j++) begin
        real f;
        f = real'(agree[j]) / N;
        line = {line, $sformatf(" %0.5f", f)};
        checks++;
        if (f < 0.49 || f > 0.51) begin
          failures++;
          $display("FAIL LFSR %0d agrees with the keystream %0.5f of the time", j + 1, f);
        end
      end
      $display("%s", line);
      checks++;
      if (n_steps != N) failures++;
    end

    $display("%0d of %0d statistics below their 5%% points", n_pass, n_stat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
