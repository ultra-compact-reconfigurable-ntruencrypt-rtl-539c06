// spram: single-port synchronous RAM, 1 KB x 8 bit by default.
//
// Stands for the memory the core shares with its host (the document's 1 KB
// SPRAM on the ASIC, one block RAM on the FPGAs). One access per cycle: with
// en=1 and we=1 the word at addr is written; with en=1 and we=0 it is read and
// appears on rdata one clock later. rdata keeps its value when en=0 or on a
// write. Contents are not reset. Size follows the document; the read-hold
// behaviour is this design's choice.
module spram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
