// tb_mc_alu: random operation sequences against a register model using the
// reference GF(2^8) multiply, then one full MixColumns column (FIPS-197
// Appendix B, round 1, column 0: d4 bf 5d 30 -> 04 66 81 e5) computed with
// the five-operation schedule set/add/add2/add3/add-key, key byte 00.
module tb_mc_alu;
  import aes_pkg::*;
  import aes_ref_pkg::ref_gmul;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  alu_op_e op;
  logic [7:0] x, r, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mc_alu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_op(input alu_op_e o, input logic [7:0] v);
    @(negedge clk);
    en = 1'b1; op = o; x = v;
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    logic [7:0] col [4], res [4];
    op = ALU_SET; x = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(r == 8'h00, "reset value");
    model = 8'h00;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = 1'($urandom); op = alu_op_e'($urandom % 4); x = 8'($urandom);
      if (en)
        case (op)
          ALU_SET:  model = x;
          ALU_ADD:  model = model ^ x;
          ALU_ADD2: model = model ^ ref_gmul(x, 8'h02);
          ALU_ADD3: model = model ^ ref_gmul(x, 8'h03);
        endcase
      @(posedge clk); #1;
      check(r == model, $sformatf("op %0d x=%h r=%h exp=%h", op, x, r, model));
    end
    col = '{8'hd4, 8'hbf, 8'h5d, 8'h30};
    for (int row = 0; row < 4; row++) begin
      do_op(ALU_SET,  col[(row + 2) % 4]);
      do_op(ALU_ADD,  col[(row + 3) % 4]);
      do_op(ALU_ADD2, col[row]);
      do_op(ALU_ADD3, col[(row + 1) % 4]);
      do_op(ALU_ADD,  8'h00);
      res[row] = r;
    end
    check(res[0] == 8'h04 && res[1] == 8'h66 && res[2] == 8'h81 && res[3] == 8'he5,
          "MixColumns column of FIPS-197 Appendix B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
