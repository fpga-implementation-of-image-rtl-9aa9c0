// icrlg_top: image cryptology with reversible logic gates, encryptor and
// decryptor back to back.
//
// A stream of 8-bit pixels enters pixel_in, one per clock. icrlg_encrypt turns
// each pixel into a cipher byte with the key of that cycle; the cipher goes
// straight to icrlg_decrypt, which recovers the pixel on pixel_out in the same
// cycle. Both sides hold their own 4-bit runtime LFSR; sharing clk, rst and
// xor_sel keeps them in step, so they hold the same key every cycle. This
// loop-back arrangement follows the design's top-level schematic; exposing the
// cipher and the key on ports and the run-time xor_sel input are this
// design's choices. In a real link the cipher would travel between two
// devices whose LFSRs are reset together.
//
// Timing: pixel_out and cipher_out are combinational in pixel_in and the
// registered key; the key advances on each rising clk edge when rst is low.
// rst is synchronous and active high and restarts the key sequence at 1110.
module icrlg_top
  import icrlg_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   xor_sel,
  input  pixel_t pixel_in,
  output pixel_t cipher_out,
  output pixel_t pixel_out,
  output key_t   enc_key,
  output key_t   dec_key
);

  icrlg_encrypt u_enc (
    .clk, .rst, .xor_sel,
    .pixel_in,
    .cipher_out,
    .key(enc_key)
  );

  icrlg_decrypt u_dec (
    .clk, .rst, .xor_sel,
    .cipher_in(cipher_out),
    .pixel_out,
    .key(dec_key)
  );

  // The two key generators must never drift apart.
  property p_keys_in_step;
    @(posedge clk) disable iff (rst) enc_key == dec_key;
  endproperty
  a_keys_in_step: assert property (p_keys_in_step)
    else $error("icrlg_top: encryption and decryption keys differ");

endmodule
