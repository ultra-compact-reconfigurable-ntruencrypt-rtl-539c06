// tb_ntru_n251: the N=251 configuration in the 1 KB RAM.
//
// With N=251 the polynomials do not fit the RAM side by side, so the base
// pointers overlap: e is written over m (m_k is read in the same row that
// writes e_k) and c over e (the second decryption pass no longer needs e).
// Map: r 0, h 63, m = e = c 314, f 565, f_p 628, b 691 (942 bytes). q = 128.
// Encryption and decryption with random operands are compared with the
// reference model; cycle counts with N*(NW + nonzeros + 2) per pass. The
// mechanism counters are the same as in tb_ntru_top.
module tb_ntru_n251;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;

  localparam int N = 251, Q = 128, NW = 63;
  localparam int R = 0, H = R + NW, M = H + N, E = M, F = E + N, FP = F + NW, B = FP + NW, C = E;

  logic  clk = 0, rst_n = 0, start = 0, decrypt = 0, busy, done;
  logic  host_en = 0, host_we = 0;
  addr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  ntru_top #(.N(N), .M_PTR(M), .E_PTR(E), .F_PTR(F), .FP_PTR(FP), .B_PTR(B), .C_PTR(C)) dut (.clk, .rst_n, .start, .decrypt, .busy, .done,
                .host_en, .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled from the controller
  int n_skip = 0, n_act_cread = 0, n_act_mread = 0, n_wrap = 0, n_pass2 = 0, n_mod3 = 0, n_blocked = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_ctrl.state inside {S_SLOT0, S_SLOT1, S_SLOT2, S_SLOT3}) begin
      if (dut.u_core.u_ctrl.sk_found && dut.u_core.u_ctrl.sk_gap != 0) n_skip++;
      if (!dut.u_core.u_ctrl.sk_found && !dut.u_core.u_ctrl.last_word) n_act_cread++;
      if (!dut.u_core.u_ctrl.sk_found && dut.u_core.u_ctrl.last_word) n_act_mread++;
      if (dut.u_core.u_ctrl.idx_n > dut.u_core.u_ctrl.idx) n_wrap++;
    end
    if (dut.u_core.u_ctrl.phase == PH_DEC1 && dut.u_core.u_ctrl.phase_n == PH_DEC2) n_pass2++;
    if (dut.u_core.u_ctrl.phase == PH_DEC2 && dut.u_core.u_ctrl.acc_en) n_mod3++;
    if (busy && host_en) n_blocked++;
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

  task automatic check_words(input int base, input poly_t exp, input int m, input string what);
    for (int i = 0; i < N; i++) begin
      int d;
      host_read(base + i, d);
      checks++;
      if (d != modp(exp[i], m)) begin
        failures++;
        if (failures < 20) $display("FAIL %s[%0d] = %0d, expected %0d", what, i, d, modp(exp[i], m));
      end
    end
  endtask

  // start an operation, try one host write to 'poke' while it runs, count cycles
  task automatic run(input bit dec, input int exp_cycles, input int poke);
    int cycles = 0;
    @(negedge clk);
    start = 1; decrypt = dec;
    @(negedge clk);
    start = 0;
    while (busy) begin
      cycles++;
      if (cycles == 100) begin host_en = 1; host_we = 1; host_addr = addr_t'(poke); host_wdata = 8'h5A; end
      else begin host_en = 0; host_we = 0; end
      @(negedge clk);
    end
    host_en = 0; host_we = 0;
    checks++;
    if (cycles != exp_cycles || !done) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d (done=%0b)", dec ? "decryption" : "encryption", cycles, exp_cycles, done);
    end
    $display("%s: %0d cycles", dec ? "decryption" : "encryption", cycles);
  endtask

  initial begin : main
    poly_t h, r, m, f, fp, e, c;
    int d;
    repeat (3) @(negedge clk);
    rst_n = 1;

    h = new[N]; m = new[N];
    foreach (h[i]) h[i] = $urandom_range(Q - 1);
    foreach (m[i]) m[i] = $urandom_range(2) - 1;
    r = rand_ternary(N, 36, 36);
    load_ternary(R, r); load_words(H, h); load_words(M, m);
    host_write(F, 8'h00);  // poke target for the busy-write test
    run(0, N * (NW + 72 + 2), F);
    e = conv(r, h, N, Q);
    foreach (e[i]) e[i] = modp(e[i] + m[i], Q);
    check_words(E, e, Q, "e");

    f  = rand_ternary(N, 80, 80);
    fp = rand_ternary(N, 80, 80);
    load_ternary(F, f); load_ternary(FP, fp);
    run(1, 2 * N * (NW + 160 + 2), R);
    c = ref_decrypt(f, fp, e, N, Q);
    check_words(C, c, 256, "c");
    // the write attempted during decryption must not have reached the RAM
    host_read(R, d);
    checks++;
    if (d != int'(pack_byte(r, 0))) begin
      failures++;
      $display("FAIL host write while busy changed the RAM");
    end

    checks += 7;
    if (n_skip == 0)      begin failures++; $display("FAIL no zero coefficient skipped"); end
    if (n_act_cread == 0) begin failures++; $display("FAIL zero word remainder never turned into a coefficient read"); end
    if (n_act_mread == 0) begin failures++; $display("FAIL zero word remainder never turned into the plaintext read"); end
    if (n_wrap == 0)      begin failures++; $display("FAIL data index never wrapped"); end
    if (n_pass2 == 0)     begin failures++; $display("FAIL second decryption pass never started"); end
    if (n_mod3 == 0)      begin failures++; $display("FAIL mod-3 register never accumulated"); end
    if (n_blocked == 0)   begin failures++; $display("FAIL no host access while busy"); end
    $display("mechanisms: skip=%0d act_cread=%0d act_mread=%0d wrap=%0d pass2=%0d mod3=%0d host_blocked=%0d",
             n_skip, n_act_cread, n_act_mread, n_wrap, n_pass2, n_mod3, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
