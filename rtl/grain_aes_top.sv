// grain_aes_top: byte-serial, side-channel-hardened AES-128 encryption core
// with on-the-fly key expansion and a built-in CPRNG.
//
// Datapath (one byte wide, as in the architecture's block diagram): the KEY
// memory (32 x 8) and the STATE memory (32 x 8) feed a 2:1 multiplexer into
// the single shared S-box; a 4:1 multiplexer picks the ALU operand from the
// S-box, the KEY memory directly, the external key byte K or the external
// plaintext byte P; the MixColumns & KeyAdd ALU accumulates into its 8-bit
// register r, whose value C is the ciphertext output and the data written
// back into either memory. The KEY memory holds the round key (words 0..15,
// expanded in place) and the PRNG block V (words 16..31); the STATE memory
// holds two 16-byte banks used in ping-pong fashion, so the 16 bytes of a
// round can be computed in any order. aes_ctrl sequences everything,
// perm_gen holds the random byte order and prng_ctrl decides when the core
// must first encrypt V to obtain fresh randomness.
//
// Interface (all synchronous to clk, synchronous active-low reset):
//   seed_load  pulse while idle: take 16 bytes P[in_idx] as the PRNG seed.
//   start      pulse while idle: encrypt P under K. shuffle_en (sampled at
//              start) selects randomised byte order; with it, every second
//              encryption is preceded by one extraction run V <= AES_K(V).
//   in_idx     byte index 0..15 (column-major, FIPS-197 order) for which the
//              host presents key_in = K[in_idx] and pt_in = P[in_idx]
//              combinationally; both must stay available until done.
//   ct_valid / ct_idx / ct_out   one ciphertext byte and its index; in
//              shuffled mode the 16 bytes arrive in random order.
//   done       pulses with the last ciphertext byte; busy while working.
// Latency from the start cycle to done is ENC_CYCLES + 1 = 1115 cycles, or
// 2 * ENC_CYCLES + 1 when an extraction run is inserted. The K input of the
// 4:1 multiplexer carries the round constant during key expansion; that
// sharing, the memory map and the interface are this design's choices.
module grain_aes_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       seed_load,
  input  logic       shuffle_en,
  output logic       busy,
  output logic       done,
  output logic [3:0] in_idx,
  input  logic [7:0] key_in,
  input  logic [7:0] pt_in,
  output logic       ct_valid,
  output logic [3:0] ct_idx,
  output logic [7:0] ct_out
);

  // control
  logic       alu_en, m2_sel_key, k_sel_rcon;
  alu_op_e    alu_op;
  mux4_sel_e  m4_sel;
  logic [7:0] rcon;
  logic       need_extract, rnd_half, enc_done, seeded;
  // memories
  logic [4:0] key_raddr, key_rnd_addr, key_waddr, state_raddr, state_waddr;
  logic       key_we, state_we;
  logic [1:0][7:0] key_rdata;
  logic [0:0][7:0] state_rdata;
  // permutation
  logic       perm_init_we, perm_swap_a, perm_swap_b;
  logic [3:0] perm_init_idx, perm_swap_i, perm_swap_j, perm_rd_idx, perm_rd;
  // datapath
  logic [7:0] sbox_in, sbox_out, k_byte, alu_x, r;

  aes_ctrl u_ctrl (
    .clk, .rst_n, .start, .seed_load, .shuffle_en, .busy, .done,
    .need_extract, .rnd_half, .enc_done, .seeded,
    .alu_en, .alu_op, .m4_sel, .m2_sel_key, .k_sel_rcon, .rcon, .alu_r(r),
    .key_raddr, .key_rnd_addr, .key_rnd_data(key_rdata[1]), .key_we, .key_waddr,
    .state_raddr, .state_we, .state_waddr,
    .perm_init_we, .perm_init_idx, .perm_swap_a, .perm_swap_b,
    .perm_swap_i, .perm_swap_j, .perm_rd_idx, .perm_rd,
    .in_idx, .ct_valid, .ct_idx
  );

  prng_ctrl u_prng (
    .clk, .rst_n, .enc_done, .seeded, .need_extract, .rnd_half
  );

  perm_gen u_perm (
    .clk, .init_we(perm_init_we), .init_idx(perm_init_idx),
    .swap_a(perm_swap_a), .swap_b(perm_swap_b),
    .swap_i(perm_swap_i), .swap_j(perm_swap_j),
    .rd_idx(perm_rd_idx), .rd_perm(perm_rd)
  );

  // KEY memory: port 0 feeds the datapath, port 1 the random nibbles.
  dist_ram #(.DEPTH(32), .WIDTH(8), .NRD(2)) u_key_mem (
    .clk, .we(key_we), .waddr(key_waddr), .wdata(r),
    .raddr({key_rnd_addr, key_raddr}), .rdata(key_rdata)
  );

  // STATE memory: two banks of 16 bytes.
  dist_ram #(.DEPTH(32), .WIDTH(8), .NRD(1)) u_state_mem (
    .clk, .we(state_we), .waddr(state_waddr), .wdata(r),
    .raddr(state_raddr), .rdata(state_rdata)
  );

  aes_mux2 u_mux2 (
    .sel_key(m2_sel_key), .key_b(key_rdata[0]), .state_b(state_rdata[0]), .y(sbox_in)
  );

  aes_sbox u_sbox (.a(sbox_in), .s(sbox_out));

  assign k_byte = k_sel_rcon ? rcon : key_in;

  aes_mux4 u_mux4 (
    .sel(m4_sel), .sbox_b(sbox_out), .key_b(key_rdata[0]), .k_b(k_byte), .p_b(pt_in), .y(alu_x)
  );

  mc_alu u_alu (.clk, .rst_n, .en(alu_en), .op(alu_op), .x(alu_x), .r);

  assign ct_out = r;

endmodule
