// mc_alu: the MixColumns & KeyAdd unit, an accumulating GF(2^8) ALU with a
// single 8-bit result register r.
//
// Each enabled clock cycle it applies one of four operations to its operand
// x: set (r = x), add (r = r ^ x), add two times (r = r ^ 02*x) and add three
// times (r = r ^ 03*x). One MixColumns output byte is then five operations:
// the four S-box outputs of a column, each with its coefficient, and the
// round-key byte added last (AddRoundKey merged into MixColumns). The same
// set/add operations serve the key schedule and the initial key addition.
// r is the core's output C and the data written back to the memories; it is
// cleared by the synchronous active-low reset.
module mc_alu
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  alu_op_e    op,
  input  logic [7:0] x,
  output logic [7:0] r
);

  logic [7:0] nxt;

  always_comb begin
    unique case (op)
      ALU_SET:  nxt = x;
      ALU_ADD:  nxt = r ^ x;
      ALU_ADD2: nxt = r ^ xtime(x);
      ALU_ADD3: nxt = r ^ xtime(x) ^ x;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  r <= 8'h00;
    else if (en) r <= nxt;
  end

endmodule
