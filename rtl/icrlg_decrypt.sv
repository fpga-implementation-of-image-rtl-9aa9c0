// icrlg_decrypt: 8-bit pixel decryption, the exact inverse of icrlg_encrypt.
//
// Each nibble of the cipher C[7:0] goes back through the encryption chain in
// reverse order:
//   upper: inverse Peres on lines 7..5, line 4 passes -> XNOR with key
//          -> inverse HNG -> CNOT on lines 7..6 -> D[7:4]
//   lower: line 3 passes, inverse Peres on lines 2..0 -> XNOR with key
//          -> inverse HNG -> CNOT on lines 1..0 -> D[3:0]
// The order follows the design's decryption diagram. The design draws the
// same Peres and HNG gates here; since neither is its own inverse, this side
// uses their inverses (peres_gate_inv, hing_gate_inv), which is what makes
// D equal the original pixel. XNOR and CNOT are their own inverses.
//
// Its own 4-bit rlfsrl (same taps and start state as the encryption side)
// must be reset in the same cycle and clocked alongside the encryptor's, so
// both hold the same key in every cycle. Combinational in cipher and key, one
// pixel per clock, no latency.
//
// Ports: clk, rst (synchronous, active high), xor_sel (must equal the
// encryptor's), cipher_in, pixel_out, key (this cycle's key, for observation).
module icrlg_decrypt
  import icrlg_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   xor_sel,
  input  pixel_t cipher_in,
  output pixel_t pixel_out,
  output key_t   key
);

  logic [KEY_W-1:0] lfsr_state;

  rlfsrl #(.WIDTH(KEY_W), .TAPS(KEY_LFSR_TAPS), .SEED(KEY_LFSR_SEED)) u_lfsr (
    .clk, .rst, .xor_sel, .state(lfsr_state)
  );

  assign key = key_from_state(lfsr_state);

  // Upper nibble
  nibble_t pu, xu, hu;

  peres_gate_inv u_peres_hi (.p(cipher_in[7]), .q(cipher_in[6]), .z(cipher_in[5]),
                             .a(pu[3]), .b(pu[2]), .c(pu[1]));
  assign pu[0] = cipher_in[4];
  xnor_key      u_xnor_hi (.x(pu), .key(key), .y(xu));
  hing_gate_inv u_hing_hi (.p(xu[3]), .q(xu[2]), .r(xu[1]), .s(xu[0]),
                           .a(hu[3]), .b(hu[2]), .c(hu[1]), .d(hu[0]));
  cnot_gate     u_cnot_hi (.a(hu[3]), .b(hu[2]), .p(pixel_out[7]), .q(pixel_out[6]));
  assign pixel_out[5:4] = hu[1:0];

  // Lower nibble
  nibble_t pl, xl, hl;

  assign pl[3] = cipher_in[3];
  peres_gate_inv u_peres_lo (.p(cipher_in[2]), .q(cipher_in[1]), .z(cipher_in[0]),
                             .a(pl[2]), .b(pl[1]), .c(pl[0]));
  xnor_key      u_xnor_lo (.x(pl), .key(key), .y(xl));
  hing_gate_inv u_hing_lo (.p(xl[3]), .q(xl[2]), .r(xl[1]), .s(xl[0]),
                           .a(hl[3]), .b(hl[2]), .c(hl[1]), .d(hl[0]));
  assign pixel_out[3:2] = hl[3:2];
  cnot_gate     u_cnot_lo (.a(hl[1]), .b(hl[0]), .p(pixel_out[1]), .q(pixel_out[0]));

endmodule
