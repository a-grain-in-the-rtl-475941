// tb_aes_mux4: every select value with random data on the four inputs.
module tb_aes_mux4;
  import aes_pkg::*;
  logic clk = 1'b0;
  mux4_sel_e sel;
  logic [7:0] sbox_b, key_b, k_b, p_b, y, exp_y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aes_mux4 dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      sel = mux4_sel_e'(n % 4);
      sbox_b = 8'($urandom); key_b = 8'($urandom); k_b = 8'($urandom); p_b = 8'($urandom);
      case (n % 4)
        0: exp_y = sbox_b;
        1: exp_y = key_b;
        2: exp_y = k_b;
        default: exp_y = p_b;
      endcase
      #1;
      checks++;
      if (y != exp_y) begin failures++; $display("FAIL: sel=%0d y=%h exp=%h", n % 4, y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
