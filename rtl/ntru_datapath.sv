// ntru_datapath: accumulators and result formation of the NTRUEncrypt core.
//
// acc is a Q_BITS-wide register (q = 2^Q_BITS), so additions wrap modulo q for
// free. When acc_en is high the RAM output (a data coefficient read in the
// previous cycle) is added to or, with acc_neg, subtracted from it. In the
// second decryption pass the separate 2-bit mod-3 register acc3 accumulates
// instead, holding values 0..2. When wr_en is high (the controller's write
// state) wdata carries the row's result and both registers clear:
//   PH_ENC : (acc + m) mod q, m being the RAM output (plaintext read the cycle
//            before), zero-extended to 8 bits
//   PH_DEC1: acc centre-lifted to (-q/2, q/2] and reduced mod 3, as 0, 1 or 2
//   PH_DEC2: acc3 as a signed byte: 0 -> 8'h00, 1 -> 8'h01, 2 -> 8'hFF (-1)
// clr (operation start) also clears both registers.
// The accumulator, the mod-q arithmetic and the extra mod-3 register follow the
// document; the result encodings and the centre-lift interval are this
// design's choices.
module ntru_datapath
  import ntru_pkg::*;
#(
  parameter int unsigned Q_BITS = 7          // q = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic   clr,
  input  logic   acc_en,
  input  logic   acc_neg,
  input  logic   wr_en,
  input  word_t  ram_rdata,
  output word_t  wdata
);

  localparam int unsigned Q      = 1 << Q_BITS;
  // adding this to x mod 3 gives (x - q) mod 3
  localparam logic [1:0]  LIFT3  = 2'((3 - Q % 3) % 3);

  typedef logic [Q_BITS-1:0] coef_t;

  coef_t      acc;
  logic [1:0] acc3;
  coef_t      din;
  logic [1:0] din3, sum3;

  assign din  = ram_rdata[Q_BITS-1:0];
  assign din3 = mod3(ram_rdata);

  // (acc3 +/- din3) mod 3 with both operands in 0..2
  always_comb begin
    logic [2:0] s;
    if (acc_neg) s = 3'(acc3) + 3'((din3 == 2'd0) ? 2'd0 : 2'd3 - din3);
    else         s = 3'(acc3) + 3'(din3);
    sum3 = (s >= 3'd3) ? 2'(s - 3'd3) : 2'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      acc3 <= '0;
    end else if (clr || wr_en) begin
      acc  <= '0;
      acc3 <= '0;
    end else if (acc_en) begin
      if (phase == PH_DEC2) acc3 <= sum3;
      else                  acc  <= acc_neg ? acc - din : acc + din;
    end
  end

  // centre lift: values above q/2 stand for acc - q; then reduce mod 3
  logic [2:0] lift_t3;
  logic [1:0] lift_r3;
  assign lift_t3 = 3'(mod3(word_t'(acc))) + ((int'(acc) > int'(Q / 2)) ? 3'(LIFT3) : 3'd0);
  assign lift_r3 = (lift_t3 >= 3'd3) ? 2'(lift_t3 - 3'd3) : 2'(lift_t3);

  // result formation
  always_comb begin
    case (phase)
      PH_DEC1: wdata = word_t'(lift_r3);
      PH_DEC2: wdata = (acc3 == 2'd2) ? '1 : word_t'(acc3);
      default: wdata = word_t'(coef_t'(acc + din));
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) acc3 != 2'd3);

endmodule
