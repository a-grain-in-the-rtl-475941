// tb_perm_gen: initialises the permutation to the identity, then runs
// rounds of 16 two-cycle random swaps and compares every entry with a
// swap model; checks that the result stays a permutation, that a swap with
// j = i leaves it unchanged and that the order actually changes.
module tb_perm_gen;
  logic clk = 1'b0;
  logic init_we = 1'b0, swap_a = 1'b0, swap_b = 1'b0;
  logic [3:0] init_idx = '0, swap_i = '0, swap_j = '0, rd_idx = '0, rd_perm;
  int model [16];
  int checks = 0, failures = 0, changed = 0;
  always #5 clk = ~clk;

  perm_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string what);
    bit seen [16];
    bit ok = 1'b1;
    seen = '{default: 1'b0};
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i);
      #1;
      if (int'(rd_perm) != model[i]) ok = 1'b0;
      seen[rd_perm] = 1'b1;
    end
    for (int i = 0; i < 16; i++) if (!seen[i]) ok = 1'b0;
    check(ok, what);
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      init_we = 1'b1; init_idx = 4'(i); model[i] = i;
    end
    @(negedge clk);
    init_we = 1'b0;
    compare("identity after init");
    for (int rnd = 0; rnd < 20; rnd++) begin
      bit ident;
      ident = 1'b1;
      for (int i = 0; i < 16; i++) begin
        int j, t;
        j = (rnd == 0) ? i : int'($urandom % 16);   // round 0 swaps each entry with itself
        @(negedge clk);
        swap_a = 1'b1; swap_i = 4'(i); swap_j = 4'(j);
        @(negedge clk);
        swap_a = 1'b0; swap_b = 1'b1; swap_j = 4'($urandom);  // j only valid in cycle A
        @(negedge clk);
        swap_b = 1'b0;
        t = model[i]; model[i] = model[j]; model[j] = t;
      end
      compare($sformatf("permutation after swap round %0d", rnd));
      for (int i = 0; i < 16; i++) if (model[i] != i) ident = 1'b0;
      if (!ident) changed++;
    end
    check(changed > 0, "random swapping changed the order");
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
