// tb_ntru_skip: exhaustive check of the zero-coefficient detector against a
// straightforward scan of every (word, start slot) pair.
module tb_ntru_skip;
  import ntru_pkg::*;

  word_t      word;
  logic [1:0] start, slot, gap;
  logic       found, neg;
  int checks = 0, failures = 0;

  ntru_skip dut (.word, .start, .found, .slot, .gap, .neg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 256; w++) begin
      for (int s = 0; s < 4; s++) begin
        int exp_slot;
        exp_slot = -1;
        word  = 8'(w);
        start = 2'(s);
        #1;
        for (int j = 3; j >= s; j--) if (((w >> (2 * j)) & 1) == 1) exp_slot = j;
        checks++;
        if (exp_slot < 0) begin
          if (found !== 1'b0) begin
            failures++;
            $display("FAIL word=%02h start=%0d expected nothing found", w, s);
          end
        end else if (!(found && int'(slot) == exp_slot && int'(gap) == exp_slot - s &&
                       neg == 1'((w >> (2 * exp_slot + 1)) & 1))) begin
          failures++;
          $display("FAIL word=%02h start=%0d got found=%0b slot=%0d gap=%0d neg=%0b exp slot %0d",
                   w, s, found, slot, gap, neg, exp_slot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
