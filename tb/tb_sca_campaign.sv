// tb_sca_campaign: a scaled-down side-channel measurement campaign on the
// full core at its default configuration.
//
// The lab and field evaluations of this core encrypt many random plaintexts
// under one fixed key, first with shuffling off (verification setup), then
// with shuffling on, and attack the S-box input of the last round. This
// testbench runs such a campaign (NPLAIN unshuffled and NSHUF shuffled
// encryptions; the real campaigns use 100,000 to 1,000,000 traces and
// differ only in their number), checks every ciphertext against the
// reference model, and measures what shuffling is meant to achieve: the
// step of the last round in which a given byte (byte 0 here) is processed.
// Unshuffled it must always be step 0; shuffled it must be spread over all
// 16 steps, every step being hit between half and twice its expected share.
// It also checks that every shuffled pair of encryptions costs three AES
// runs (one CPRNG extraction per two encryptions).
module tb_sca_campaign;
  import aes_ref_pkg::*;
  import aes_pkg::ENC_CYCLES;

  localparam int NPLAIN = 200;
  localparam int NSHUF  = 800;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, seed_load = 1'b0, shuffle_en = 1'b0;
  logic busy, done, ct_valid;
  logic [3:0] in_idx, ct_idx;
  logic [7:0] key_in, pt_in, ct_out;

  blk_t K, P, C;
  int   step_of_byte0, nout;
  int   hist [16];
  int   checks = 0, failures = 0;
  int   total_cycles;

  always #5 clk = ~clk;

  grain_aes_top dut (.*);

  assign key_in = K[in_idx];
  assign pt_in  = P[in_idx];

  always @(posedge clk) begin
    if (ct_valid) begin
      C[ct_idx] <= ct_out;
      if (ct_idx == 4'd0) step_of_byte0 = nout;
      nout++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic encrypt(input bit shuf, output int cyc);
    nout = 0;
    @(negedge clk);
    shuffle_en = shuf; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
  endtask

  initial begin
    int cyc, bad, always0;
    for (int i = 0; i < 16; i++) K[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (busy) @(negedge clk);
    // seed
    for (int i = 0; i < 16; i++) P[i] = 8'($urandom);
    @(negedge clk); seed_load = 1'b1; @(negedge clk); seed_load = 1'b0;
    while (busy) @(negedge clk);

    bad = 0; always0 = 1;
    for (int n = 0; n < NPLAIN; n++) begin
      for (int i = 0; i < 16; i++) P[i] = 8'($urandom);
      encrypt(1'b0, cyc);
      if (C != aes128_enc(K, P) || cyc != ENC_CYCLES + 1) bad++;
      if (step_of_byte0 != 0) always0 = 0;
    end
    check(bad == 0, $sformatf("%0d of %0d unshuffled encryptions wrong", bad, NPLAIN));
    check(always0 == 1, "unshuffled: byte 0 always processed first");

    bad = 0;
    hist = '{default: 0};
    total_cycles = 0;
    for (int n = 0; n < NSHUF; n++) begin
      for (int i = 0; i < 16; i++) P[i] = 8'($urandom);
      encrypt(1'b1, cyc);
      total_cycles += cyc;
      if (C != aes128_enc(K, P)) bad++;
      hist[step_of_byte0]++;
    end
    check(bad == 0, $sformatf("%0d of %0d shuffled encryptions wrong", bad, NSHUF));
    check(total_cycles == (NSHUF / 2) * int'(3 * ENC_CYCLES + 2),
          $sformatf("shuffled campaign took %0d cycles", total_cycles));
    for (int s = 0; s < 16; s++) begin
      $display("byte 0 processed in step %2d: %0d times", s, hist[s]);
      check(hist[s] >= NSHUF / 32 && hist[s] <= NSHUF / 8, $sformatf("step %0d share", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
