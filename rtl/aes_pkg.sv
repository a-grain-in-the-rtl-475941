// aes_pkg: types and constants shared by the byte-serial AES-128 core.
//
// The ALU operation codes (00 set, 01 add, 10 add two times, 11 add three
// times) are the ones the architecture defines for its MixColumns/KeyAdd
// unit. The encoding of the 4:1 operand multiplexer, the phase names of the
// sequencer and the cycle budget below belong to this implementation.
//
// The S-box is computed here as a function (multiplicative inverse in
// GF(2^8) by raising to the power 254, then the AES affine map), so that no
// table has to be pasted into the sources; aes_sbox turns it into a 256-entry
// look-up table at elaboration time.
package aes_pkg;

  // Operation of the MixColumns/KeyAdd ALU: r_i = f(r_{i-1}, x_i).
  typedef enum logic [1:0] {
    ALU_SET  = 2'b00,  // r = x
    ALU_ADD  = 2'b01,  // r = r ^ x
    ALU_ADD2 = 2'b10,  // r = r ^ 02*x
    ALU_ADD3 = 2'b11   // r = r ^ 03*x
  } alu_op_e;

  // Operand selection of the 4:1 multiplexer in front of the ALU.
  typedef enum logic [1:0] {
    M4_SBOX = 2'b00,   // S-box output
    M4_KEY  = 2'b01,   // KEY memory byte, bypassing the S-box
    M4_K    = 2'b10,   // external key byte K (or the round constant)
    M4_P    = 2'b11    // external plaintext byte P
  } mux4_sel_e;

  // Destination of the ALU result written one cycle after the last operation.
  typedef enum logic [1:0] {
    WR_NONE  = 2'b00,
    WR_KEY   = 2'b01,  // KEY memory (round key or PRNG block)
    WR_STATE = 2'b10,  // STATE memory
    WR_OUT   = 2'b11   // ciphertext output port
  } wr_tgt_e;

  // Cycle budget of one AES-128 run of this sequencer (no stalls).
  localparam int unsigned LOAD_CYCLES  = 32;  // 16 bytes x (set K, add P)
  localparam int unsigned KEYEXP_CYCLES = 33; // 1x3 + 15x2 ALU operations
  localparam int unsigned MIX_CYCLES   = 80;  // 16 bytes x 5 operations
  localparam int unsigned FINAL_CYCLES = 32;  // 16 bytes x (set S, add key)
  localparam int unsigned ENC_CYCLES   = LOAD_CYCLES + 10 * KEYEXP_CYCLES
                                       + 9 * MIX_CYCLES + FINAL_CYCLES;

  // Multiplication by 02 in GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1.
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // AES S-box: inverse (a^254, 0 maps to 0) followed by the affine transform.
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv, sq, y;
    inv = 8'h01;
    sq  = a;
    for (int i = 0; i < 8; i++) begin      // 254 = 0b1111_1110
      if (i != 0) inv = gf_mul(inv, sq);
      sq = gf_mul(sq, sq);
    end
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8]
           ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return y ^ 8'h63;
  endfunction

endpackage
