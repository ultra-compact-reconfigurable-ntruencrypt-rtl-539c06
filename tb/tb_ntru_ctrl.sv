// tb_ntru_ctrl: checks the controller's RAM access sequence, cycle by cycle.
//
// The controller runs on a real RAM holding packed ternary polynomials (N=11
// and N=23). For every pass the expected trace is built here from the
// definition out_k = sum_i c_i d_(k-i mod N): per row, each coefficient word
// is read once, each non-zero coefficient c_i causes one read of data word
// (k-i) mod N, then the addend is read and the result written. The test
// compares address and read/write strobes of every busy cycle, checks that
// the datapath is told to accumulate (with the right sign) exactly one cycle
// after each data read, and that the cycle count is N*(NW + nonzeros + 2) per
// pass, one pass for encryption and two for decryption.
module tb_ntru_ctrl;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;

  typedef struct {
    int  addr;
    bit  wen;
    bit  data;
    bit  neg;
  } acc_t;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected trace of one pass
  function automatic void pass_trace(ref acc_t q[$], input poly_t c, input int n,
                                     input int cb, input int db, input int rb, input int wb);
    int nw = nwords(n);
    for (int k = 0; k < n; k++) begin
      for (int w = 0; w < nw; w++) begin
        q.push_back('{cb + w, 0, 0, 0});
        for (int j = 0; j < 4; j++) begin
          int i = 4 * w + j;
          if (i < n && c[i] != 0) q.push_back('{db + modp(k - i, n), 0, 1, c[i] < 0});
        end
      end
      q.push_back('{rb + k, 0, 0, 0});
      q.push_back('{wb + k, 1, 0, 0});
    end
  endfunction

  // one DUT size with its own RAM, driven by a task
  `define CTRL_INST(NN, NAME) \
    logic NAME``_start = 0, NAME``_decrypt = 0, NAME``_busy, NAME``_done; \
    addr_t NAME``_addr; logic NAME``_ren, NAME``_wen, NAME``_acc_en, NAME``_acc_neg, NAME``_wr_en; \
    word_t NAME``_rdata; phase_t NAME``_phase; \
    ntru_ctrl #(.N(NN)) NAME``_dut (.clk, .rst_n, .start(NAME``_start), .decrypt(NAME``_decrypt), \
      .busy(NAME``_busy), .done(NAME``_done), .ram_addr(NAME``_addr), .ram_ren(NAME``_ren), \
      .ram_wen(NAME``_wen), .ram_rdata(NAME``_rdata), .phase(NAME``_phase), \
      .acc_en(NAME``_acc_en), .acc_neg(NAME``_acc_neg), .wr_en(NAME``_wr_en)); \
    spram NAME``_ram (.clk, .en(NAME``_ren | NAME``_wen), .we(NAME``_wen), .addr(NAME``_addr), \
      .wdata(8'h00), .rdata(NAME``_rdata));

  `CTRL_INST(11, s)
  `CTRL_INST(23, l)

  // run one operation on the N=11 instance and compare the trace
  task automatic run_s(input bit dec, input poly_t c1, input poly_t c2);
    localparam int N = 11, NW = 3;
    localparam int R = 0, H = R + NW, M = H + N, E = M + N, F = E + N, FP = F + NW, B = FP + NW, C = B + N;
    acc_t q[$];
    int cycles = 0;
    bit prev_data = 0, prev_neg = 0;
    for (int w = 0; w < NW; w++) begin
      if (!dec) s_ram.mem[R + w] = pack_byte(c1, w);
      else begin
        s_ram.mem[F + w]  = pack_byte(c1, w);
        s_ram.mem[FP + w] = pack_byte(c2, w);
      end
    end
    if (!dec) pass_trace(q, c1, N, R, H, M, E);
    else begin
      pass_trace(q, c1, N, F, E, E, B);
      pass_trace(q, c2, N, FP, B, B, C);
    end
    @(negedge clk);
    s_start = 1; s_decrypt = dec;
    @(negedge clk);
    s_start = 0;
    while (s_busy) begin
      acc_t x;
      cycles++;
      checks++;
      if (s_acc_en !== prev_data || (prev_data && s_acc_neg !== prev_neg)) begin
        failures++;
        $display("FAIL N=11 cycle %0d: acc_en=%0b acc_neg=%0b expected %0b/%0b", cycles, s_acc_en, s_acc_neg, prev_data, prev_neg);
      end
      if (q.size() == 0) begin
        failures++;
        $display("FAIL N=11 cycle %0d: more accesses than expected", cycles);
        prev_data = 0;
      end else begin
        x = q.pop_front();
        checks++;
        if (int'(s_addr) != x.addr || s_wen !== x.wen || s_ren !== !x.wen) begin
          failures++;
          $display("FAIL N=11 cycle %0d: addr=%0d ren=%0b wen=%0b expected addr=%0d wen=%0b", cycles, s_addr, s_ren, s_wen, x.addr, x.wen);
        end
        prev_data = x.data; prev_neg = x.neg;
      end
      @(negedge clk);
    end
    checks += 2;
    if (!s_done) begin failures++; $display("FAIL N=11 no done pulse"); end
    if (cycles != (dec ? N * (2 * NW + nonzeros(c1) + nonzeros(c2) + 4) : N * (NW + nonzeros(c1) + 2))) begin
      failures++;
      $display("FAIL N=11 cycles=%0d", cycles);
    end
  endtask

  // same for the N=23 instance (encryption pass only)
  task automatic run_l(input poly_t c1);
    localparam int N = 23, NW = 6;
    localparam int R = 0, H = R + NW, M = H + N, E = M + N;
    acc_t q[$];
    int cycles = 0;
    for (int w = 0; w < NW; w++) l_ram.mem[R + w] = pack_byte(c1, w);
    pass_trace(q, c1, N, R, H, M, E);
    @(negedge clk);
    l_start = 1; l_decrypt = 0;
    @(negedge clk);
    l_start = 0;
    while (l_busy) begin
      acc_t x;
      cycles++;
      if (q.size() != 0) begin
        x = q.pop_front();
        checks++;
        if (int'(l_addr) != x.addr || l_wen !== x.wen) begin
          failures++;
          $display("FAIL N=23 cycle %0d: addr=%0d expected %0d", cycles, l_addr, x.addr);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (cycles != N * (NW + nonzeros(c1) + 2) || q.size() != 0) begin
      failures++;
      $display("FAIL N=23 cycles=%0d left=%0d", cycles, q.size());
    end
  endtask

  initial begin : main
    poly_t r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the worked example's blinding value r = -1 + x^2 + x^3 + x^4 - x^5 - x^7
    r = '{-1, 0, 1, 1, 1, -1, 0, -1, 0, 0, 0};
    run_s(0, r, r);
    for (int t = 0; t < 40; t++) begin
      int w1, w2;
      w1 = $urandom_range(5);
      w2 = $urandom_range(5);
      run_s(t % 2 == 1, rand_ternary(11, w1, $urandom_range(5)), rand_ternary(11, w2, $urandom_range(5)));
    end
    run_s(0, rand_ternary(11, 0, 0), r);   // all-zero polynomial
    run_s(1, rand_ternary(11, 6, 5), rand_ternary(11, 5, 6));  // full weight
    for (int t = 0; t < 20; t++) run_l(rand_ternary(23, $urandom_range(8), $urandom_range(8)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
