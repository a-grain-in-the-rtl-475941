// tb_grain_aes_top: end-to-end test of the AES-128 core at its default
// configuration.
//
// A host model answers in_idx with the key and plaintext bytes and collects
// the ciphertext bytes by index. Checked against the reference model:
//  - the FIPS-197 Appendix C.1 vector and random vectors, in order;
//  - latency ENC_CYCLES + 1 from start to done;
//  - seeding of the PRNG block, and in shuffled mode: that every second
//    encryption is preceded by an extraction (2*ENC_CYCLES + 1), that the
//    PRNG block advances as V <= AES_K(V), and that the output order equals
//    the permutation obtained by the 16 random swaps, modelled here;
//  - that the two-runs-for-three throughput of the PRNG variant holds.
// Every mechanism (plain run, extraction, shuffled order, seed) must occur.
module tb_grain_aes_top;
  import aes_ref_pkg::*;
  import aes_pkg::ENC_CYCLES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, seed_load = 1'b0, shuffle_en = 1'b0;
  logic busy, done, ct_valid;
  logic [3:0] in_idx, ct_idx;
  logic [7:0] key_in, pt_in, ct_out;

  blk_t K, P, C;
  int   order [16];
  int   nout;
  int   checks = 0, failures = 0;
  int   n_plain = 0, n_extract = 0, n_shuffled_order = 0, n_seed = 0, n_fast = 0;

  always #5 clk = ~clk;

  grain_aes_top dut (.*);

  assign key_in = K[in_idx];
  assign pt_in  = P[in_idx];

  always @(posedge clk) begin
    if (ct_valid) begin
      C[ct_idx] <= ct_out;
      if (nout < 16) order[nout] = int'(ct_idx);
      nout++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one encryption; returns cycles from the start cycle to done.
  task automatic encrypt(input bit shuf, output int cyc);
    nout = 0;
    @(negedge clk);
    shuffle_en = shuf;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
  endtask

  function automatic blk_t rand_blk();
    blk_t b;
    for (int i = 0; i < 16; i++) b[i] = 8'($urandom);
    return b;
  endfunction

  blk_t V, E;
  int   perm [16];
  bit   half_avail;

  initial begin
    int cyc, cyc_pair;
    bit ok, ident, seen [16];
    for (int i = 0; i < 16; i++) perm[i] = i;
    K = '{default: 8'h00};
    P = '{default: 8'h00};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    check(cyc == 16, $sformatf("permutation init took %0d cycles", cyc));

    // FIPS-197 C.1
    for (int i = 0; i < 16; i++) begin
      K[i] = 8'(i);
      P[i] = 8'(8'h11 * (i % 16));
    end
    encrypt(1'b0, cyc);
    E = '{8'h69, 8'hc4, 8'he0, 8'hd8, 8'h6a, 8'h7b, 8'h04, 8'h30,
          8'hd8, 8'hcd, 8'hb7, 8'h80, 8'h70, 8'hb4, 8'hc5, 8'h5a};
    check(C == E, "FIPS-197 C.1 ciphertext");
    check(cyc == ENC_CYCLES + 1, $sformatf("latency %0d, expected %0d", cyc, ENC_CYCLES + 1));
    n_plain++;

    // random vectors, unshuffled
    for (int n = 0; n < 3; n++) begin
      K = rand_blk();
      P = rand_blk();
      encrypt(1'b0, cyc);
      E = aes128_enc(K, P);
      check(C == E, "random vector, unshuffled");
      check(cyc == ENC_CYCLES + 1, "latency, unshuffled");
      ident = 1'b1;
      for (int i = 0; i < 16; i++) if (order[i] != i) ident = 1'b0;
      check(ident && nout == 16, "unshuffled output order is 0..15");
      n_plain++;
    end

    // seed the PRNG
    V = rand_blk();
    P = V;
    @(negedge clk);
    seed_load = 1'b1;
    @(negedge clk);
    seed_load = 1'b0;
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    check(cyc == 16, "seed load takes 16 cycles");
    n_seed++;
    half_avail = 1'b0;

    // shuffled encryptions
    cyc_pair = 0;
    for (int n = 0; n < 6; n++) begin
      int half;
      K = rand_blk();
      P = rand_blk();
      if (!half_avail) V = aes128_enc(K, V);   // extraction run
      half = half_avail ? 1 : 0;
      for (int i = 0; i < 16; i++) begin
        logic [7:0] b;
        int j, t;
        b = V[8*half + i/2];
        j = (i % 2 == 1) ? int'(b[7:4]) : int'(b[3:0]);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      encrypt(1'b1, cyc);
      E = aes128_enc(K, P);
      check(C == E, $sformatf("random vector %0d, shuffled", n));
      if (!half_avail) begin
        check(cyc == 2 * ENC_CYCLES + 1, $sformatf("latency with extraction %0d", cyc));
        if (cyc == 2 * ENC_CYCLES + 1) n_extract++;
      end else begin
        check(cyc == ENC_CYCLES + 1, $sformatf("latency without extraction %0d", cyc));
        n_fast++;
      end
      if (n < 2) cyc_pair += cyc;
      ok = (nout == 16);
      ident = 1'b1;
      seen = '{default: 1'b0};
      for (int i = 0; i < 16; i++) begin
        if (order[i] != perm[i]) ok = 1'b0;
        if (order[i] != i) ident = 1'b0;
        seen[order[i]] = 1'b1;
      end
      for (int i = 0; i < 16; i++) if (!seen[i]) ok = 1'b0;
      check(ok, "shuffled output order matches the swapped permutation");
      if (!ident) n_shuffled_order++;
      half_avail = !half_avail;
    end
    // two shuffled encryptions cost three AES runs: throughput drops by 1/3
    check(cyc_pair == 3 * ENC_CYCLES + 2, $sformatf("two shuffled encryptions took %0d", cyc_pair));

    // the unshuffled verification mode still works after shuffling
    K = rand_blk();
    P = rand_blk();
    encrypt(1'b0, cyc);
    check(C == aes128_enc(K, P), "unshuffled after shuffled");
    n_plain++;

    $display("mechanisms: plain=%0d extraction=%0d cached_half=%0d shuffled_order=%0d seed=%0d",
             n_plain, n_extract, n_fast, n_shuffled_order, n_seed);
    check(n_plain > 0, "plain encryption happened");
    check(n_extract > 0, "PRNG extraction happened");
    check(n_fast > 0, "second random half used");
    check(n_shuffled_order > 0, "shuffled order happened");
    check(n_seed > 0, "seed load happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
