// prng_ctrl: bookkeeping of the built-in CPRNG.
//
// The core produces its own randomness by encrypting a 128-bit PRNG block V
// with itself (V <= AES_K(V), kept in the upper half of the KEY memory). One
// such extraction yields 128 random bits, enough for two shuffled
// encryptions of 64 bits each (16 swaps x 4 bits). This block remembers
// whether the second half of the last extraction is still unused:
//   need_extract = 1 : the next shuffled encryption must first run an
//                      extraction and then uses half 0 (rnd_half = 0);
//   need_extract = 0 : the next shuffled encryption uses half 1.
// enc_done pulses when a shuffled encryption has consumed its half; seeded
// pulses when a new seed has been written, which discards any unused half.
// Reset (synchronous, active low) also forces an extraction. Two encryptions
// per extraction follow the architecture; the half-selection scheme is this
// design's own.
module prng_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic enc_done,
  input  logic seeded,
  output logic need_extract,
  output logic rnd_half
);

  logic half_avail_q;   // second half of the last extraction unused

  always_ff @(posedge clk) begin
    if (!rst_n || seeded) half_avail_q <= 1'b0;
    else if (enc_done)    half_avail_q <= ~half_avail_q;
  end

  assign need_extract = ~half_avail_q;
  assign rnd_half     = half_avail_q;

endmodule
