// tb_aes_sbox: all 256 inputs against the reference S-box (inverse found by
// search) and a few values from FIPS-197 Figure 7.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0] a, s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aes_sbox dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a = 8'(i);
      #1;
      check(s == ref_sbox(a), $sformatf("S(%h) = %h", a, s));
    end
    a = 8'h00; #1; check(s == 8'h63, "S(00)");
    a = 8'h53; #1; check(s == 8'hed, "S(53)");
    a = 8'hff; #1; check(s == 8'h16, "S(ff)");
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
