// ntru_core: the compact NTRUEncrypt core without its memory.
//
// Encryption computes e = r*h + m (mod q) and decryption
// c = f_p * ((f*e mod q, centre-lifted) mod 3) (mod 3) in the ring
// Z[x]/(x^N - 1), with all operands and results in an external single-port
// RAM of 8-bit words at fixed base pointers (see ntru_ctrl). The core holds
// only the controller (pointers, state, one coefficient register) and the
// datapath (mod-q accumulator and mod-3 register); each cycle it makes one RAM
// access. Timing per pass: N*(NW + nonzero(c) + 2) cycles, NW = ceil(2N/8).
//
// Interface: pulse start with decrypt=0/1 while busy=0; busy stays high for
// the whole operation and done pulses for one cycle at the end. The RAM port
// (ram_addr, ram_ren, ram_wen, ram_wdata) expects read data one cycle after
// ram_ren on ram_rdata. The split into controller and datapath follows the
// document's description; the port names are this design's.
module ntru_core
  import ntru_pkg::*;
#(
  parameter int unsigned N      = 167,
  parameter int unsigned Q_BITS = 7,
  parameter int unsigned NW     = coef_words(N),
  parameter int unsigned R_PTR  = 0,
  parameter int unsigned H_PTR  = R_PTR + NW,
  parameter int unsigned M_PTR  = H_PTR + N,
  parameter int unsigned E_PTR  = M_PTR + N,
  parameter int unsigned F_PTR  = E_PTR + N,
  parameter int unsigned FP_PTR = F_PTR + NW,
  parameter int unsigned B_PTR  = FP_PTR + NW,
  parameter int unsigned C_PTR  = B_PTR + N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  decrypt,
  output logic  busy,
  output logic  done,
  output addr_t ram_addr,
  output logic  ram_ren,
  output logic  ram_wen,
  output word_t ram_wdata,
  input  word_t ram_rdata
);

  phase_t phase;
  logic   acc_en, acc_neg, wr_en;

  ntru_ctrl #(
    .N(N), .NW(NW), .R_PTR(R_PTR), .H_PTR(H_PTR), .M_PTR(M_PTR), .E_PTR(E_PTR),
    .F_PTR(F_PTR), .FP_PTR(FP_PTR), .B_PTR(B_PTR), .C_PTR(C_PTR)
  ) u_ctrl (
    .clk, .rst_n, .start, .decrypt, .busy, .done,
    .ram_addr, .ram_ren, .ram_wen, .ram_rdata,
    .phase, .acc_en, .acc_neg, .wr_en
  );

  ntru_datapath #(.Q_BITS(Q_BITS)) u_dp (
    .clk, .rst_n, .phase,
    .clr     (start && !busy),
    .acc_en, .acc_neg, .wr_en,
    .ram_rdata,
    .wdata   (ram_wdata)
  );

endmodule
