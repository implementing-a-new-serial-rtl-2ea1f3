// tb_linear_complexity: linear complexity of 20000 keystream bits.
//
// A random key is loaded and 20000 keystream bits are taken from the
// generator at default sizes.  The Berlekamp-Massey algorithm then finds
// the length L of the shortest LFSR that produces the sequence, and the
// number of times L grows (jumps).  For a random sequence of n bits L is
// n/2 within a few bits and the number of jumps is close to n/4.  The
// generator's state is 1242 bits, but its output function is nonlinear, so
// L is expected to reach n/2 = 10000.
//
// Berlekamp-Massey on packed vectors: W holds the sequence reversed
// (W[j] = s[n-j]), so the discrepancy is the parity of C & W.
module tb_linear_complexity;
  localparam int KB = 250, N = 20000;

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

  bit s [N];
  bit [N:0] C, B, T, W;
  int L, m, jumps;
  bit d;

  initial begin
    int n;
    n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n < KB) begin
      @(negedge clk);
      key_valid = 1;
      key_byte = 8'($urandom);
      @(posedge clk);
      if (key_ready) n++;
    end
    @(negedge clk);
    key_valid = 0;
    wait (key_loaded);
    @(negedge clk);
    step = 1;
    for (int i = 0; i < N; i++) begin
      #1;
      checks++;
      if (!ks_valid) failures++;
      s[i] = ks_bit;
      @(negedge clk);
    end
    step = 0;

    C = 1; B = 1; W = 0;
    L = 0; m = -1; jumps = 0;
    for (int i = 0; i < N; i++) begin
      W = {W[N-1:0], s[i]};
      d = ^(C & W);
      if (d) begin
        T = C;
        C = C ^ (B << (i - m));
        if (2 * L <= i) begin
          L = i + 1 - L;
          m = i;
          B = T;
          jumps++;
        end
      end
    end
    $display("bits %0d  linear complexity %0d (expected %0d)  jumps %0d (expected %0d)",
             N, L, N / 2, jumps, N / 4);
    checks++;
    if (L < N / 2 - 20 || L > N / 2 + 20) begin
      failures++;
      $display("FAIL linear complexity %0d", L);
    end
    checks++;
    if (jumps < N / 4 - 500 || jumps > N / 4 + 500) begin
      failures++;
      $display("FAIL jumps %0d", jumps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
