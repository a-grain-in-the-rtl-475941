// aes_sbox: the AES SubBytes look-up table, shared by the key schedule and
// the round function.
//
// The 256-entry table is built at elaboration time from aes_pkg::sbox_calc
// (inverse in GF(2^8) followed by the affine map) and read combinationally,
// which maps to a plain LUT-based ROM on an FPGA (the architecture spends 8
// slices on it). Input a, output s = S(a), no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] a,
  output logic [7:0] s
);

  typedef logic [7:0] table_t [256];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  localparam table_t SBOX = build_table();

  always_comb s = SBOX[a];

endmodule
