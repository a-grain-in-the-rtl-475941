// tb_aes_ctrl: the sequencer alone, closed by behavioural models of the
// datapath written here (memory arrays, reference S-box, ALU, permutation
// memory). The sequencer must make that datapath compute correct AES-128
// ciphertexts, unshuffled and shuffled, with the documented cycle counts;
// it also checks the phase rules: start ignored while busy, each output
// index exactly once, done together with the last output byte, and the
// number of ALU operations of one run.
module tb_aes_ctrl;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, seed_load = 1'b0, shuffle_en = 1'b0;
  logic busy, done, need_extract, rnd_half, enc_done, seeded;
  logic alu_en, m2_sel_key, k_sel_rcon;
  alu_op_e alu_op;
  mux4_sel_e m4_sel;
  logic [7:0] rcon, alu_r, key_rnd_data;
  logic [4:0] key_raddr, key_rnd_addr, key_waddr, state_raddr, state_waddr;
  logic key_we, state_we;
  logic perm_init_we, perm_swap_a, perm_swap_b;
  logic [3:0] perm_init_idx, perm_swap_i, perm_swap_j, perm_rd_idx, perm_rd;
  logic [3:0] in_idx, ct_idx;
  logic ct_valid;

  always #5 clk = ~clk;

  aes_ctrl dut (.*);

  // ---- behavioural datapath ----
  logic [7:0] kmem [32], smem [32], sb [256];
  logic [3:0] pmem [16], ptmp, pj;
  blk_t K, P, C;
  logic [7:0] x, sin;
  bit half_q;
  int n_alu_ops;

  assign key_rnd_data = kmem[key_rnd_addr];
  assign perm_rd = pmem[perm_rd_idx];
  assign need_extract = !half_q;
  assign rnd_half = half_q;

  always_comb begin
    sin = m2_sel_key ? kmem[key_raddr] : smem[state_raddr];
    case (m4_sel)
      M4_SBOX: x = sb[sin];
      M4_KEY:  x = kmem[key_raddr];
      M4_K:    x = k_sel_rcon ? rcon : K[in_idx];
      default: x = P[in_idx];
    endcase
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      alu_r  <= 8'h00;
      half_q <= 1'b0;
    end else begin
      if (alu_en) begin
        n_alu_ops++;
        case (alu_op)
          ALU_SET:  alu_r <= x;
          ALU_ADD:  alu_r <= alu_r ^ x;
          ALU_ADD2: alu_r <= alu_r ^ ref_gmul(x, 8'h02);
          default:  alu_r <= alu_r ^ ref_gmul(x, 8'h03);
        endcase
      end
      if (key_we) kmem[key_waddr] <= alu_r;
      if (state_we) smem[state_waddr] <= alu_r;
      if (perm_init_we) pmem[perm_init_idx] <= perm_init_idx;
      if (perm_swap_a) begin
        pmem[perm_swap_i] <= pmem[perm_swap_j];
        ptmp <= pmem[perm_swap_i];
        pj <= perm_swap_j;
      end
      if (perm_swap_b) pmem[pj] <= ptmp;
      if (seeded) half_q <= 1'b0;
      else if (enc_done) half_q <= !half_q;
    end
  end

  // ---- output collection ----
  int nout;
  bit seen [16];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      // outputs are checked once the sequencer is out of reset
    end else if (ct_valid) begin
      C[ct_idx] <= alu_r;
      if (seen[ct_idx]) begin failures++; $display("FAIL: index %0d twice", ct_idx); end
      seen[ct_idx] = 1'b1;
      nout++;
      if (done != (nout == 16)) begin failures++; $display("FAIL: done not with last byte"); end
    end else if (done) begin
      failures++; $display("FAIL: done without output byte");
    end
  end

  task automatic run(input bit shuf, output int cyc);
    nout = 0;
    seen = '{default: 1'b0};
    n_alu_ops = 0;
    @(negedge clk);
    shuffle_en = shuf; start = 1'b1;
    @(negedge clk);
    cyc = 1;
    check(busy, "busy after start");
    // a start pulse while busy must be ignored
    repeat (5) begin @(negedge clk); cyc++; end
    start = 1'b0;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(8'(i));
    for (int i = 0; i < 16; i++) begin K[i] = 8'(i); P[i] = 8'(8'h11 * i); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (busy) @(negedge clk);
    run(1'b0, cyc);
    check(C == aes128_enc(K, P), "FIPS-197 vector");
    check(cyc == ENC_CYCLES + 1, $sformatf("latency %0d", cyc));
    check(n_alu_ops == ENC_CYCLES, $sformatf("ALU operations %0d", n_alu_ops));
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) begin K[i] = 8'($urandom); P[i] = 8'($urandom); end
      run(n[0], cyc);
      check(C == aes128_enc(K, P), $sformatf("random vector %0d", n));
      check(nout == 16, "16 output bytes");
      if (n == 1) check(cyc == 2 * ENC_CYCLES + 1, $sformatf("latency with extraction %0d", cyc));
      if (n == 3) check(cyc == ENC_CYCLES + 1, $sformatf("latency, second half %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
