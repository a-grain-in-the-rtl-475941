// aes_mux2: the 2:1 byte multiplexer in front of the shared S-box.
//
// It lets one S-box serve both the round function (STATE memory byte) and
// the key schedule (KEY memory byte, for SubWord of the last key column).
// Purely combinational: y = sel_key ? key_b : state_b.
module aes_mux2 (
  input  logic       sel_key,
  input  logic [7:0] key_b,
  input  logic [7:0] state_b,
  output logic [7:0] y
);

  always_comb y = sel_key ? key_b : state_b;

endmodule
