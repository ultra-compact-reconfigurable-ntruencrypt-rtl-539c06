// tb_spram: writes random data to random addresses of the 1 KB RAM, reads it
// back and checks the one-cycle read latency and that rdata holds while the
// RAM is not enabled and during writes.
module tb_spram;
  logic       clk = 0, en = 0, we = 0;
  logic [9:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [1024];
  int checks = 0, failures = 0;

  spram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: rdata=%02h expected %02h", what, rdata, exp);
    end
  endtask

  initial begin : main
    // fill every location
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    // random reads, some writes in between
    for (int k = 0; k < 3000; k++) begin
      logic [7:0] last;
      @(negedge clk);
      en = 1; we = 0; addr = 10'($urandom);
      @(negedge clk);
      check(model[addr], "read");
      last = rdata;
      // idle cycle: output holds
      en = 0; addr = 10'($urandom);
      @(negedge clk);
      check(last, "hold while idle");
      // write cycle: output holds, memory updated
      en = 1; we = 1; wdata = 8'($urandom); model[addr] = wdata;
      @(negedge clk);
      check(last, "hold during write");
      en = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
