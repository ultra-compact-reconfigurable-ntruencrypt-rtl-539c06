// ntru_skip: zero-coefficient detector of the NTRU controller.
//
// Given a packed word of four ternary coefficients and the slot the
// controller has reached, it finds the first non-zero coefficient at or after
// that slot. found=1 means there is one: slot is its position, gap the number
// of zero coefficients jumped over (slot - start) and neg its sign. With
// found=0 the rest of the word is zero and the controller moves on without
// reading any data. Purely combinational. The document names the function
// (zero coefficients are detected and skipped); the priority search is this
// design's.
module ntru_skip
  import ntru_pkg::*;
(
  input  word_t      word,
  input  logic [1:0] start,
  output logic       found,
  output logic [1:0] slot,
  output logic [1:0] gap,
  output logic       neg
);

  always_comb begin
    found = 1'b0;
    slot  = 2'd0;
    neg   = 1'b0;
    // search downwards so the lowest qualifying slot wins
    for (int i = int'(SLOTS) - 1; i >= 0; i--) begin
      if (i >= int'(start) && word[2*i] == 1'b1) begin
        found = 1'b1;
        slot  = 2'(i);
        neg   = word[2*i+1];
      end
    end
    gap = slot - start;
  end

endmodule
