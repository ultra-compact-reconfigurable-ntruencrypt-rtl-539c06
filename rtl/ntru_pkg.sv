// ntru_pkg: types and helpers shared by the NTRUEncrypt core.
//
// The core works on an 8-bit wide single-port RAM. Ternary polynomials
// (blinding value r, private keys f and f_p) are packed four coefficients per
// byte, two bits each, first coefficient in bits [1:0]: 2'b01 = +1, 2'b11 = -1,
// 2'b00 = 0 (2'b10 is unused and read as 0). Mod-q polynomials (h, e, and the
// message m) use one byte per coefficient. The 2-bit packing and the one-hot
// state codes follow the document; the bit order inside the byte is this
// design's choice.
package ntru_pkg;

  localparam int unsigned WORD_W    = 8;           // RAM word width (document: 8-bit memory)
  localparam int unsigned SLOTS     = WORD_W / 2;  // ternary coefficients per word
  localparam int unsigned RAM_DEPTH = 1024;        // 1 KB single-port RAM
  localparam int unsigned ADDR_W    = 10;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Controller states, one-hot as in the document's state table.
  typedef enum logic [6:0] {
    S_IDLE  = 7'b0000000,
    S_CREAD = 7'b0000001,  // read next coefficient word
    S_SLOT0 = 7'b0000010,  // first data read (coefficient word arrives)
    S_SLOT1 = 7'b0000100,  // second data read
    S_SLOT2 = 7'b0001000,  // third data read
    S_SLOT3 = 7'b0010000,  // fourth data read
    S_MREAD = 7'b0100000,  // plaintext (addend) read
    S_WRITE = 7'b1000000   // result write
  } state_t;

  // Which multiplication pass is running.
  typedef enum logic [1:0] {
    PH_ENC  = 2'd0,  // e = r*h + m            (mod q)
    PH_DEC1 = 2'd1,  // b = centre-lift(f*e) mod 3
    PH_DEC2 = 2'd2   // c = f_p*b              (mod 3)
  } phase_t;

  // Number of packed coefficient words of a degree-N ternary polynomial.
  function automatic int unsigned coef_words(input int unsigned n);
    return (2 * n + WORD_W - 1) / WORD_W;
  endfunction

  // Residue of an 8-bit unsigned value modulo 3.
  function automatic logic [1:0] mod3(input word_t v);
    return 2'(v % word_t'(3));
  endfunction

endpackage
