// perm_gen: on-the-fly generation of the random byte order used for
// shuffling.
//
// The permutation of the 16 state-byte positions lives in a 16 x 4 bit
// distributed memory. A new permutation is made from the previous one by
// random swapping: for i = 0..15, entry i is exchanged with entry j, where j
// is a fresh 4-bit random number. Each swap takes two cycles on the single
// write port: in cycle A (swap_a) perm[i] <= perm[j] while the old perm[i] is
// kept in a 4-bit register together with j; in cycle B (swap_b) perm[j] <=
// old perm[i]. Sixteen swaps take 32 cycles, the length of the initial key
// addition they run in parallel with. Swapping only ever permutes entries,
// so the memory is loaded once with the identity (init_we, perm[init_idx] <=
// init_idx) after reset. rd_idx/rd_perm is the asynchronous read port used by
// the sequencer to translate the processing step into a byte position.
// Random swapping of the previous permutation, in distributed memory and in
// parallel with the first key addition, follows the architecture; the
// two-cycle swap and the identity initialisation are this design's choices.
module perm_gen (
  input  logic       clk,
  input  logic       init_we,
  input  logic [3:0] init_idx,
  input  logic       swap_a,
  input  logic       swap_b,
  input  logic [3:0] swap_i,
  input  logic [3:0] swap_j,
  input  logic [3:0] rd_idx,
  output logic [3:0] rd_perm
);

  logic            we;
  logic [3:0]      waddr, wdata;
  logic [2:0][3:0] raddr, rdata;
  logic [3:0]      tmp_q, j_q;

  assign raddr   = {swap_j, swap_i, rd_idx};
  assign rd_perm = rdata[0];

  always_comb begin
    we    = 1'b0;
    waddr = init_idx;
    wdata = init_idx;
    if (init_we) begin
      we = 1'b1;
    end else if (swap_a) begin
      we    = 1'b1;
      waddr = swap_i;
      wdata = rdata[2];      // perm[j]
    end else if (swap_b) begin
      we    = 1'b1;
      waddr = j_q;
      wdata = tmp_q;         // old perm[i]
    end
  end

  always_ff @(posedge clk) begin
    if (swap_a) begin
      tmp_q <= rdata[1];     // perm[i]
      j_q   <= swap_j;
    end
  end

  dist_ram #(.DEPTH(16), .WIDTH(4), .NRD(3)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

endmodule
