// xnor_key: bitwise XNOR of a 4-bit data word with the 4-bit LFSR key.
//
// y[i] = ~(x[i] ^ key[i]). Key bit 3 meets the top line of a nibble (pixel bit
// 7 or 3 after the HNG gate), key bit 0 the bottom line. XNOR with the same key
// is its own inverse, so the block appears unchanged in both directions.
// Purely combinational; the key changes once per clock in the LFSR.
module xnor_key
  import icrlg_pkg::*;
(
  input  nibble_t x,
  input  key_t    key,
  output nibble_t y
);
  assign y = ~(x ^ key);
endmodule
