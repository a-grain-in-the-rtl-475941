// aes_mux4: the 4:1 operand multiplexer in front of the MixColumns/KeyAdd
// ALU.
//
// Its four inputs are the S-box output, the KEY memory byte (bypassing the
// S-box, for AddRoundKey and the linear part of the key schedule), the
// external key byte K and the external plaintext byte P. In this
// implementation the K input also carries the round constant during key
// expansion (the selection is made in the top level). Combinational.
module aes_mux4
  import aes_pkg::*;
(
  input  mux4_sel_e  sel,
  input  logic [7:0] sbox_b,
  input  logic [7:0] key_b,
  input  logic [7:0] k_b,
  input  logic [7:0] p_b,
  output logic [7:0] y
);

  always_comb begin
    unique case (sel)
      M4_SBOX: y = sbox_b;
      M4_KEY:  y = key_b;
      M4_K:    y = k_b;
      M4_P:    y = p_b;
    endcase
  end

endmodule
