// tb_aes_mux2: exhaustive-select, random-data check of the S-box input
// multiplexer.
module tb_aes_mux2;
  logic clk = 1'b0;
  logic sel_key;
  logic [7:0] key_b, state_b, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aes_mux2 dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      sel_key = 1'($urandom); key_b = 8'($urandom); state_b = 8'($urandom);
      #1;
      checks++;
      if (y != (sel_key ? key_b : state_b)) begin
        failures++;
        $display("FAIL: sel=%0b key=%h state=%h y=%h", sel_key, key_b, state_b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
