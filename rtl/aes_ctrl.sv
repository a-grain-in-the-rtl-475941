// aes_ctrl: sequencer of the byte-serial AES-128 core.
//
// The datapath holds no state of its own besides the ALU register, so this
// block does all the work of AES-128 by choosing, every cycle, one ALU
// operation, its operand and the memory addresses it is read from, and where
// the finished byte is written one cycle later. Phases:
//   PINIT   16 cycles after reset: identity into the permutation memory.
//   SEED    16 cycles: P bytes become the PRNG block V (KEY memory 16..31).
//   LOAD    32 cycles, initial key addition: r = K_i (written as round key
//           byte i), then r ^= P_i (or ^= V_i in an extraction run), written
//           to STATE bank 0. In a shuffled encryption the 16 random swaps of
//           the permutation run in parallel (two cycles each), fed by 4-bit
//           nibbles of the unused half of V.
//   KEYEXP  33 cycles, in place: column 0 byte r = S(k[12+(r+1)%4]) ^ k[r]
//           (^ rcon for r = 0), columns 1..3 byte = k[i] ^ k'[i-4].
//   MIX     80 cycles: output byte (row r, column c) = S(a[r+2]) ^ S(a[r+3])
//           ^ 02*S(a[r]) ^ 03*S(a[r+1]) ^ k, a being the ShiftRows view of the
//           source bank; ShiftRows is pure address translation, byte (row,
//           col) of the shifted state is read from address 4*((col+row)%4)+row.
//           The result goes to the other STATE bank (ping-pong).
//   FINAL   32 cycles: S(a[r]) ^ k to the ciphertext port, or to V in an
//           extraction run (V <= AES_K(V)).
// In MIX and FINAL the 16 bytes are processed in the order of the
// permutation memory when shuffling is on, else in order 0..15. One
// encryption takes aes_pkg::ENC_CYCLES cycles from LOAD to the last output
// byte; done pulses together with that byte, one cycle after the last ALU
// operation. When a shuffled encryption starts and prng_ctrl reports no
// unused random half, a complete extraction run precedes it.
// Interface: start / seed_load are sampled in IDLE only; in_idx names the
// key and plaintext byte (K, P) the host must present combinationally; the
// key must stay available until done. Reset is synchronous, active low.
// Concurrent assertions at the end state the protocol rules (one memory
// write per cycle, done only together with an output byte, swaps only
// during LOAD).
// The operation sequences, the write-back timing, the place of V and the
// order of the phases are this implementation's choices; the ALU operations,
// ShiftRows by address translation, merged key-schedule datapath, shuffling
// and CPRNG use follow the architecture.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // commands
  input  logic       start,
  input  logic       seed_load,
  input  logic       shuffle_en,
  output logic       busy,
  output logic       done,
  // PRNG bookkeeping
  input  logic       need_extract,
  input  logic       rnd_half,
  output logic       enc_done,
  output logic       seeded,
  // datapath control
  output logic       alu_en,
  output alu_op_e    alu_op,
  output mux4_sel_e  m4_sel,
  output logic       m2_sel_key,
  output logic       k_sel_rcon,
  output logic [7:0] rcon,
  input  logic [7:0] alu_r,
  // memories
  output logic [4:0] key_raddr,
  output logic [4:0] key_rnd_addr,
  input  logic [7:0] key_rnd_data,
  output logic       key_we,
  output logic [4:0] key_waddr,
  output logic [4:0] state_raddr,
  output logic       state_we,
  output logic [4:0] state_waddr,
  // permutation memory
  output logic       perm_init_we,
  output logic [3:0] perm_init_idx,
  output logic       perm_swap_a,
  output logic       perm_swap_b,
  output logic [3:0] perm_swap_i,
  output logic [3:0] perm_swap_j,
  output logic [3:0] perm_rd_idx,
  input  logic [3:0] perm_rd,
  // external byte interface
  output logic [3:0] in_idx,
  output logic       ct_valid,
  output logic [3:0] ct_idx
);

  typedef enum logic [2:0] {
    PH_PINIT, PH_IDLE, PH_SEED, PH_LOAD, PH_KEYEXP, PH_MIX, PH_FINAL
  } phase_e;

  phase_e     phase_q;
  logic [3:0] bidx_q;      // byte step within the phase
  logic [2:0] op_q;        // operation within the byte
  logic [3:0] round_q;     // 1..10
  logic [7:0] rcon_q;
  logic       src_q;       // STATE bank holding the current state
  logic       extract_q;   // this run is a PRNG extraction
  logic       shuf_q;      // shuffled order in this run
  wr_tgt_e    wr_tgt_q;
  logic [4:0] wr_addr_q;
  logic       done_q;

  // Byte position processed in this step, and its row / column.
  logic [3:0] pos;
  logic [1:0] col, row;
  assign perm_rd_idx = bidx_q;
  assign pos = shuf_q ? perm_rd : bidx_q;
  assign col = pos[3:2];
  assign row = pos[1:0];

  // Address in the source bank of the ShiftRows view at (row r, column c).
  function automatic logic [3:0] sr_addr(input logic [1:0] r, input logic [1:0] c);
    return {2'(c + r), r};
  endfunction

  logic    wr_now;     // this operation completes a byte to be written
  logic    byte_done;  // last operation of this byte step
  wr_tgt_e wt;
  logic [4:0] wa;

  // Random nibble for the swap; bypasses a V byte still being written.
  logic [7:0] rnd_byte;
  assign key_rnd_addr = {1'b1, rnd_half, bidx_q[3:1]};
  assign rnd_byte = (wr_tgt_q == WR_KEY && wr_addr_q == key_rnd_addr) ? alu_r
                                                                       : key_rnd_data;

  always_comb begin
    alu_en        = 1'b0;
    alu_op        = ALU_SET;
    m4_sel        = M4_SBOX;
    m2_sel_key    = 1'b0;
    k_sel_rcon    = 1'b0;
    key_raddr     = '0;
    state_raddr   = '0;
    in_idx        = bidx_q;
    perm_init_we  = 1'b0;
    perm_init_idx = bidx_q;
    perm_swap_a   = 1'b0;
    perm_swap_b   = 1'b0;
    perm_swap_i   = bidx_q;
    perm_swap_j   = bidx_q[0] ? rnd_byte[7:4] : rnd_byte[3:0];
    wr_now        = 1'b0;
    byte_done     = 1'b0;
    wt            = WR_NONE;
    wa            = '0;
    unique case (phase_q)
      PH_PINIT: begin
        perm_init_we = 1'b1;
        byte_done    = 1'b1;
      end
      PH_IDLE: ;
      PH_SEED: begin
        alu_en    = 1'b1;
        alu_op    = ALU_SET;
        m4_sel    = M4_P;
        wr_now    = 1'b1;
        byte_done = 1'b1;
        wt        = WR_KEY;
        wa        = {1'b1, bidx_q};
      end
      PH_LOAD: begin
        alu_en = 1'b1;
        wr_now = 1'b1;
        if (op_q == 3'd0) begin
          alu_op = ALU_SET;
          m4_sel = M4_K;
          wt     = WR_KEY;
          wa     = {1'b0, bidx_q};
        end else begin
          alu_op    = ALU_ADD;
          m4_sel    = extract_q ? M4_KEY : M4_P;
          key_raddr = {1'b1, bidx_q};
          wt        = WR_STATE;
          wa        = {1'b0, bidx_q};
          byte_done = 1'b1;
        end
        if (shuf_q && !extract_q) begin
          perm_swap_a = (op_q == 3'd0);
          perm_swap_b = (op_q != 3'd0);
        end
      end
      PH_KEYEXP: begin
        alu_en = 1'b1;
        wt     = WR_KEY;
        wa     = {1'b0, bidx_q};
        if (bidx_q[3:2] == 2'd0) begin
          unique case (op_q)
            3'd0: begin
              alu_op     = ALU_SET;
              m2_sel_key = 1'b1;
              m4_sel     = M4_SBOX;
              key_raddr  = {3'b011, 2'(bidx_q[1:0] + 2'd1)};
            end
            3'd1: begin
              alu_op    = ALU_ADD;
              m4_sel    = M4_KEY;
              key_raddr = {1'b0, bidx_q};
            end
            default: begin
              alu_op     = ALU_ADD;
              m4_sel     = M4_K;
              k_sel_rcon = 1'b1;
            end
          endcase
          byte_done = (bidx_q == 4'd0) ? (op_q == 3'd2) : (op_q == 3'd1);
        end else begin
          alu_op    = (op_q == 3'd0) ? ALU_SET : ALU_ADD;
          m4_sel    = M4_KEY;
          key_raddr = (op_q == 3'd0) ? {1'b0, bidx_q} : {1'b0, 4'(bidx_q - 4'd4)};
          byte_done = (op_q == 3'd1);
        end
        wr_now = byte_done;
      end
      PH_MIX: begin
        alu_en     = 1'b1;
        m2_sel_key = 1'b0;
        m4_sel     = M4_SBOX;
        key_raddr  = {1'b0, pos};
        unique case (op_q)
          3'd0: begin alu_op = ALU_SET;  state_raddr = {src_q, sr_addr(2'(row + 2'd2), col)}; end
          3'd1: begin alu_op = ALU_ADD;  state_raddr = {src_q, sr_addr(2'(row + 2'd3), col)}; end
          3'd2: begin alu_op = ALU_ADD2; state_raddr = {src_q, sr_addr(row, col)}; end
          3'd3: begin alu_op = ALU_ADD3; state_raddr = {src_q, sr_addr(2'(row + 2'd1), col)}; end
          default: begin alu_op = ALU_ADD; m4_sel = M4_KEY; end
        endcase
        byte_done = (op_q == 3'd4);
        wr_now    = byte_done;
        wt        = WR_STATE;
        wa        = {~src_q, pos};
      end
      PH_FINAL: begin
        alu_en      = 1'b1;
        state_raddr = {src_q, sr_addr(row, col)};
        key_raddr   = {1'b0, pos};
        if (op_q == 3'd0) begin
          alu_op = ALU_SET;
          m4_sel = M4_SBOX;
        end else begin
          alu_op = ALU_ADD;
          m4_sel = M4_KEY;
        end
        byte_done = (op_q == 3'd1);
        wr_now    = byte_done;
        wt        = extract_q ? WR_KEY : WR_OUT;
        wa        = {extract_q, pos};
      end
      default: ;
    endcase
  end

  logic last_byte;
  assign last_byte = byte_done && (bidx_q == 4'd15);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q   <= PH_PINIT;
      bidx_q    <= '0;
      op_q      <= '0;
      round_q   <= '0;
      rcon_q    <= 8'h01;
      src_q     <= 1'b0;
      extract_q <= 1'b0;
      shuf_q    <= 1'b0;
      wr_tgt_q  <= WR_NONE;
      wr_addr_q <= '0;
      done_q    <= 1'b0;
    end else begin
      wr_tgt_q  <= wr_now ? wt : WR_NONE;
      wr_addr_q <= wa;
      done_q    <= 1'b0;
      // byte and operation counters
      if (byte_done) begin
        op_q   <= '0;
        bidx_q <= bidx_q + 4'd1;
      end else if (phase_q != PH_IDLE) begin
        op_q <= op_q + 3'd1;
      end
      unique case (phase_q)
        PH_PINIT: if (last_byte) phase_q <= PH_IDLE;
        PH_IDLE: begin
          bidx_q <= '0;
          op_q   <= '0;
          if (seed_load) begin
            phase_q <= PH_SEED;
          end else if (start) begin
            phase_q   <= PH_LOAD;
            shuf_q    <= shuffle_en;
            extract_q <= shuffle_en && need_extract;
          end
        end
        PH_SEED: if (last_byte) phase_q <= PH_IDLE;
        PH_LOAD: if (last_byte) begin
          phase_q <= PH_KEYEXP;
          round_q <= 4'd1;
          rcon_q  <= 8'h01;
          src_q   <= 1'b0;
        end
        PH_KEYEXP: if (last_byte) phase_q <= (round_q == 4'd10) ? PH_FINAL : PH_MIX;
        PH_MIX: if (last_byte) begin
          phase_q <= PH_KEYEXP;
          round_q <= round_q + 4'd1;
          rcon_q  <= xtime(rcon_q);
          src_q   <= ~src_q;
        end
        PH_FINAL: if (last_byte) begin
          if (extract_q) begin
            phase_q   <= PH_LOAD;      // the encryption proper follows
            extract_q <= 1'b0;
          end else begin
            phase_q <= PH_IDLE;
            done_q  <= 1'b1;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  assign busy        = (phase_q != PH_IDLE);
  assign done        = done_q;
  assign enc_done    = (phase_q == PH_FINAL) && last_byte && !extract_q && shuf_q;
  assign seeded      = (phase_q == PH_SEED) && last_byte;
  assign rcon        = rcon_q;
  assign key_we      = (wr_tgt_q == WR_KEY);
  assign key_waddr   = wr_addr_q;
  assign state_we    = (wr_tgt_q == WR_STATE);
  assign state_waddr = wr_addr_q;
  assign ct_valid    = (wr_tgt_q == WR_OUT);
  assign ct_idx      = wr_addr_q[3:0];

  // Protocol rules: one memory write per cycle, done only with an output
  // byte, commands only taken while idle, permutation swaps only in LOAD.
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({key_we, state_we, ct_valid}));
  a_done_with_byte: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> ct_valid);
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == PH_LOAD && $past(phase_q) == PH_IDLE) |-> $past(start && !seed_load));
  a_swap_in_load: assert property (@(posedge clk) disable iff (!rst_n)
    (perm_swap_a || perm_swap_b) |-> (phase_q == PH_LOAD));

endmodule
