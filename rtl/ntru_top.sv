// ntru_top: NTRUEncrypt core together with the memory it shares.
//
// The design's idea is that a lightweight device already keeps its keys and
// messages in memory, so the core adds only control and a small accumulator
// and works word by word on that memory. Here the memory is one 1 KB x 8
// single-port RAM (spram). A host port gives the rest of the system access to
// the RAM whenever the core is idle: the host stores r, h, m (encryption) or
// f, f_p, e (decryption) at the core's base addresses, pulses start, waits for
// done and reads e or c back. While busy=1 the core owns the RAM and host
// accesses are ignored; host_rdata is the RAM output, valid one cycle after a
// host read. Default layout for N=167 (addresses): r 0, h 42, m 209, e 376,
// f 543, f_p 585, b (scratch) 627, c 794; 961 bytes in all.
// The shared memory follows the document; the host port and its arbitration
// are this design's.
module ntru_top
  import ntru_pkg::*;
#(
  parameter int unsigned N      = 167,       // ring degree (prime)
  parameter int unsigned Q_BITS = 7,         // q = 2^Q_BITS = 128
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
  input  logic  host_en,
  input  logic  host_we,
  input  addr_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata
);

  addr_t core_addr;
  logic  core_ren, core_wen;
  word_t core_wdata, ram_rdata;

  logic  ram_en, ram_we;
  addr_t ram_addr;
  word_t ram_wdata;

  ntru_core #(
    .N(N), .Q_BITS(Q_BITS), .NW(NW), .R_PTR(R_PTR), .H_PTR(H_PTR), .M_PTR(M_PTR),
    .E_PTR(E_PTR), .F_PTR(F_PTR), .FP_PTR(FP_PTR), .B_PTR(B_PTR), .C_PTR(C_PTR)
  ) u_core (
    .clk, .rst_n, .start, .decrypt, .busy, .done,
    .ram_addr  (core_addr),
    .ram_ren   (core_ren),
    .ram_wen   (core_wen),
    .ram_wdata (core_wdata),
    .ram_rdata (ram_rdata)
  );

  // the core owns the RAM while it runs, the host otherwise
  always_comb begin
    if (busy) begin
      ram_en    = core_ren | core_wen;
      ram_we    = core_wen;
      ram_addr  = core_addr;
      ram_wdata = core_wdata;
    end else begin
      ram_en    = host_en;
      ram_we    = host_we;
      ram_addr  = host_addr;
      ram_wdata = host_wdata;
    end
  end

  spram #(.DEPTH(RAM_DEPTH), .WIDTH(WORD_W)) u_ram (
    .clk,
    .en    (ram_en),
    .we    (ram_we),
    .addr  (ram_addr),
    .wdata (ram_wdata),
    .rdata (ram_rdata)
  );

  assign host_rdata = ram_rdata;

  // every polynomial must fit in the RAM
  initial assert (C_PTR + N <= RAM_DEPTH && E_PTR + N <= RAM_DEPTH);

endmodule
