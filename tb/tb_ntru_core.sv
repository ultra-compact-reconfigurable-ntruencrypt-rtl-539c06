// tb_ntru_core: end-to-end check of the core with its RAM at N=11, q=32.
//
// First the classic textbook NTRU example (N=11, p=3, q=32): encrypting
// m = -1 + x^3 - x^4 - x^8 + x^9 + x^10 with r = -1 + x^2 + x^3 + x^4 - x^5 - x^7
// under h = 8 + 25x + ... + 16x^10 must give the published ciphertext
// e = 14 + 11x + 26x^2 + 24x^3 + 14x^4 + 16x^5 + 30x^6 + 7x^7 + 25x^8 + 6x^9 + 19x^10,
// and decrypting it with f = -1 + x + x^2 - x^4 + x^6 + x^9 - x^10 and
// f_p = 1 + 2x + 2x^3 + 2x^4 + x^5 + 2x^7 + x^8 + 2x^9 must return m.
// Then random operands: results are compared with the reference model and the
// cycle count with N*(NW + nonzeros + 2) per pass.
module tb_ntru_core;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;

  localparam int N = 11, QB = 5, Q = 32, NW = 3;
  localparam int R = 0, H = R + NW, M = H + N, E = M + N, F = E + N, FP = F + NW, B = FP + NW, C = B + N;

  logic  clk = 0, rst_n = 0, start = 0, decrypt = 0, busy, done;
  addr_t ram_addr;
  logic  ram_ren, ram_wen;
  word_t ram_wdata, ram_rdata;
  int checks = 0, failures = 0;

  ntru_core #(.N(N), .Q_BITS(QB)) dut (
    .clk, .rst_n, .start, .decrypt, .busy, .done,
    .ram_addr, .ram_ren, .ram_wen, .ram_wdata, .ram_rdata
  );
  spram ram (.clk, .en(ram_ren | ram_wen), .we(ram_wen), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_ternary(input int base, input poly_t c);
    for (int w = 0; w < NW; w++) ram.mem[base + w] = pack_byte(c, w);
  endtask

  task automatic load_words(input int base, input poly_t d);
    for (int i = 0; i < N; i++) ram.mem[base + i] = 8'(d[i]);
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
      $display("FAIL %s took %0d cycles, expected %0d (done=%0b)", dec ? "decryption" : "encryption", cycles, exp_cycles, done);
    end
  endtask

  task automatic check_words(input int base, input poly_t exp, input int m, input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(ram.mem[base + i]) != modp(exp[i], m)) begin
        failures++;
        $display("FAIL %s[%0d] = %0d, expected %0d", what, i, ram.mem[base + i], modp(exp[i], m));
      end
    end
  endtask

  initial begin : main
    poly_t h, r, m, f, fp, e, e_pub, c;
    repeat (3) @(negedge clk);
    rst_n = 1;

    h     = '{8, 25, 22, 20, 12, 24, 15, 19, 12, 19, 16};
    r     = '{-1, 0, 1, 1, 1, -1, 0, -1, 0, 0, 0};
    m     = '{-1, 0, 0, 1, -1, 0, 0, 0, -1, 1, 1};
    f     = '{-1, 1, 1, 0, -1, 0, 1, 0, 0, 1, -1};
    fp    = '{1, -1, 0, -1, -1, 1, 0, -1, 1, -1, 0};   // 2 = -1 mod 3
    e_pub = '{14, 11, 26, 24, 14, 16, 30, 7, 25, 6, 19};

    load_ternary(R, r); load_words(H, h); load_words(M, m);
    run(0, N * (NW + nonzeros(r) + 2));
    check_words(E, e_pub, Q, "e");
    load_ternary(F, f); load_ternary(FP, fp);
    run(1, N * (2 * NW + nonzeros(f) + nonzeros(fp) + 4));
    check_words(C, m, 256, "c");

    // random operands against the model
    for (int t = 0; t < 30; t++) begin
      h = new[N]; m = new[N];
      foreach (h[i]) h[i] = $urandom_range(255);
      foreach (m[i]) m[i] = $urandom_range(2) - 1;
      r = rand_ternary(N, $urandom_range(5), $urandom_range(5));
      load_ternary(R, r); load_words(H, h); load_words(M, m);
      run(0, N * (NW + nonzeros(r) + 2));
      e = conv(r, h, N, Q);
      foreach (e[i]) e[i] = modp(e[i] + m[i], Q);
      check_words(E, e, Q, "e");
      f  = rand_ternary(N, $urandom_range(5), $urandom_range(5));
      fp = rand_ternary(N, $urandom_range(5), $urandom_range(5));
      load_ternary(F, f); load_ternary(FP, fp);
      run(1, N * (2 * NW + nonzeros(f) + nonzeros(fp) + 4));
      c = ref_decrypt(f, fp, e, N, Q);
      check_words(C, c, 256, "c");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
