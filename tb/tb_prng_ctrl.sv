// tb_prng_ctrl: after reset and after every seed an extraction is required;
// each consumed half toggles between "extract, use half 0" and "use half 1".
module tb_prng_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, enc_done = 1'b0, seeded = 1'b0;
  logic need_extract, rnd_half;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prng_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_done();
    @(negedge clk); enc_done = 1'b1; @(negedge clk); enc_done = 1'b0;
  endtask

  initial begin
    bit avail;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(need_extract && !rnd_half, "extraction needed after reset");
    avail = 1'b0;
    for (int n = 0; n < 50; n++) begin
      int act;
      act = $urandom % 3;
      if (act == 0) begin
        @(negedge clk); seeded = 1'b1; @(negedge clk); seeded = 1'b0;
        avail = 1'b0;
      end else if (act == 1) begin
        pulse_done();
        avail = !avail;
      end else begin
        @(negedge clk);
      end
      check(need_extract == !avail && rnd_half == avail, $sformatf("state after step %0d", n));
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
