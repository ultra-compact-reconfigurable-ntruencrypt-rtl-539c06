// tb_ntru_datapath: drives random accumulate sequences in all three passes
// (encryption, decryption pass 1 and 2) and compares the write data of each
// row with arithmetic done here: sum of signed terms mod q plus the addend,
// centre lift and mod 3, and the mod-3 sum of the second decryption pass.
// Uses q = 128 (the default) and also q = 32 through a second instance.
module tb_ntru_datapath;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  phase_t phase = PH_ENC;
  logic   clr = 0, acc_en = 0, acc_neg = 0, wr_en = 0;
  word_t  rdata = '0;
  word_t  wdata7, wdata5;
  int checks = 0, failures = 0;

  ntru_datapath               dut7 (.clk, .rst_n, .phase, .clr, .acc_en, .acc_neg, .wr_en, .ram_rdata(rdata), .wdata(wdata7));
  ntru_datapath #(.Q_BITS(5)) dut5 (.clk, .rst_n, .phase, .clr, .acc_en, .acc_neg, .wr_en, .ram_rdata(rdata), .wdata(wdata5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_w(input phase_t p, input int sum, input int sum3, input int m, input int q);
    int a;
    case (p)
      PH_ENC:  return modp(sum + m, q);
      PH_DEC1: begin
        a = modp(sum, q);
        return modp((a > q / 2) ? a - q : a, 3);
      end
      default: return (modp(sum3, 3) == 2) ? 255 : modp(sum3, 3);
    endcase
  endfunction

  task automatic row(input phase_t p);
    int n, sum, sum3, m;
    n = $urandom_range(12);
    sum = 0; sum3 = 0;
    @(negedge clk);
    phase = p;
    for (int k = 0; k < n; k++) begin
      int d; bit s;
      // decryption pass 2 reads mod-3 values 0..2, the others full bytes
      d = (p == PH_DEC2) ? $urandom_range(2) : $urandom_range(255);
      s = 1'($urandom);
      rdata = 8'(d); acc_en = 1; acc_neg = s;
      sum  += s ? -d : d;
      sum3 += s ? -d : d;
      @(negedge clk);
      // idle cycles between terms (a coefficient-word read)
      acc_en = 0; rdata = 8'($urandom);
      if ($urandom_range(1) == 1) @(negedge clk);
    end
    m = $urandom_range(255);
    rdata = 8'(m); wr_en = 1;
    #1;
    checks += 2;
    if (int'(wdata7) != expect_w(p, sum, sum3, m, 128)) begin
      failures++;
      $display("FAIL q=128 phase=%s got %0d expected %0d", p.name(), wdata7, expect_w(p, sum, sum3, m, 128));
    end
    if (int'(wdata5) != expect_w(p, sum, sum3, m, 32)) begin
      failures++;
      $display("FAIL q=32 phase=%s got %0d expected %0d", p.name(), wdata5, expect_w(p, sum, sum3, m, 32));
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin : main
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) row(PH_ENC);
    for (int k = 0; k < 600; k++) row(PH_DEC1);
    for (int k = 0; k < 600; k++) row(PH_DEC2);
    for (int k = 0; k < 600; k++) row(phase_t'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
