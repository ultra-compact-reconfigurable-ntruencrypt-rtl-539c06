// tb_ntru_roundtrip: real NTRU key pairs at the default size (N=167, p=3,
// q=128), encrypted and decrypted by the design.
//
// Key generation runs here: a ternary f with 61 (+1)s and 60 (-1)s is drawn
// until it is invertible mod 2 and mod 3; f_p = f^-1 mod 3 and
// f_q = f^-1 mod 128 (inverse mod 2, Newton-lifted) are computed, and the
// public key is h = 3 * f_q * g mod 128 for a ternary g. A random ternary
// message m is encrypted with a blinding value r of 18 (+1)s and 18 (-1)s,
// then e is decrypted with (f, f_p). Checks: e and c equal the reference
// model, c equals m (the cryptosystem works end to end), and the cycle counts
// equal N*(NW + w_r + 2) and N*(2*NW + w_f + w_fp + 4). All traffic goes
// through the host port.
module tb_ntru_roundtrip;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;

  localparam int N = 167, Q = 128, NW = 42;
  localparam int R = 0, H = R + NW, M = H + N, E = M + N, F = E + N, FP = F + NW, B = FP + NW, C = B + N;
  localparam int KEYS = 2;

  logic  clk = 0, rst_n = 0, start = 0, decrypt = 0, busy, done;
  logic  host_en = 0, host_we = 0;
  addr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  ntru_top dut (.clk, .rst_n, .start, .decrypt, .busy, .done,
                .host_en, .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int a, input int d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = addr_t'(a); host_wdata = 8'(d);
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int a, output int d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = addr_t'(a);
    @(negedge clk);
    host_en = 0;
    d = int'(host_rdata);
  endtask

  task automatic load_ternary(input int base, input poly_t c);
    for (int w = 0; w < NW; w++) host_write(base + w, pack_byte(c, w));
  endtask

  task automatic load_words(input int base, input poly_t d);
    for (int i = 0; i < N; i++) host_write(base + i, d[i]);
  endtask

  task automatic read_words(input int base, output poly_t d);
    d = new[N];
    for (int i = 0; i < N; i++) host_read(base + i, d[i]);
  endtask

  task automatic run(input bit dec, input int exp_cycles);
    int cycles = 0;
    @(negedge clk);
    start = 1; decrypt = dec;
    @(negedge clk);
    start = 0;
    while (busy) begin
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != exp_cycles || !done) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d", dec ? "decryption" : "encryption", cycles, exp_cycles);
    end
  endtask

  initial begin : main
    poly_t f, fp, fq, g, h, r, m, e, c, e_hw, c_hw, t;
    int tries;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int key = 0; key < KEYS; key++) begin
      // key generation
      tries = 0;
      do begin
        f = rand_ternary(N, 61, 60);
        tries++;
      end while (!(invert_mod_prime(f, N, 3, fp) && invert_mod_pow2(f, N, Q, fq)) && tries < 20);
      t = conv(f, fq, N, Q);
      checks++;
      if (t[0] != 1 || nonzeros(t) != 1) begin
        failures++;
        $display("FAIL key generation: f * f_q != 1 mod q");
      end
      foreach (fp[i]) if (fp[i] == 2) fp[i] = -1;
      g = rand_ternary(N, 16, 16);
      h = conv(fq, g, N, Q);
      foreach (h[i]) h[i] = modp(3 * h[i], Q);

      // encryption
      r = rand_ternary(N, 18, 18);
      m = new[N];
      foreach (m[i]) m[i] = $urandom_range(2) - 1;
      load_ternary(R, r); load_words(H, h); load_words(M, m);
      run(0, N * (NW + nonzeros(r) + 2));
      e = conv(r, h, N, Q);
      foreach (e[i]) e[i] = modp(e[i] + m[i], Q);
      read_words(E, e_hw);
      foreach (e[i]) begin
        checks++;
        if (e_hw[i] != e[i]) begin failures++; $display("FAIL key %0d e[%0d]=%0d expected %0d", key, i, e_hw[i], e[i]); end
      end

      // decryption
      load_ternary(F, f); load_ternary(FP, fp);
      run(1, N * (2 * NW + nonzeros(f) + nonzeros(fp) + 4));
      c = ref_decrypt(f, fp, e, N, Q);
      read_words(C, c_hw);
      foreach (c[i]) begin
        checks += 2;
        if (c_hw[i] != modp(c[i], 256)) begin failures++; $display("FAIL key %0d c[%0d]=%0d model %0d", key, i, c_hw[i], c[i]); end
        if (c_hw[i] != modp(m[i], 256)) begin failures++; $display("FAIL key %0d c[%0d]=%0d message %0d", key, i, c_hw[i], m[i]); end
      end
      $display("key %0d: f_p has %0d non-zero coefficients, message recovered", key, nonzeros(fp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
