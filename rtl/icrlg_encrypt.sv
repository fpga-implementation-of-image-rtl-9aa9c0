// icrlg_encrypt: 8-bit pixel encryption with reversible gates and a runtime
// LFSR key.
//
// The pixel I[7:0] is split into two nibbles that go through the same chain of
// gates, mirrored:
//   upper: CNOT(I7, I6) -> HNG(A=cnot.P, B=cnot.Q, C=I5, D=I4)
//          -> XNOR with key -> Peres on lines 7..5, line 4 passes -> O[7:4]
//   lower: CNOT(I1, I0) -> HNG(A=I3, B=I2, C=cnot.P, D=cnot.Q)
//          -> XNOR with key -> line 3 passes, Peres on lines 2..0 -> O[3:0]
// Both nibbles use the same 4-bit key, key bit 3 on the top line of the nibble.
// This gate order and wiring follow the design's encryption diagram.
//
// The key comes from a 4-bit rlfsrl that advances every clock (reset state
// gives key 1110). The cipher is combinational in the pixel and the current
// key: a pixel presented in a cycle is encrypted with that cycle's key, one
// pixel per clock, no latency. Decryption needs an LFSR reset in the same
// cycle and clocked alongside (icrlg_decrypt).
//
// Ports: clk, rst (synchronous, active high, restarts the key sequence),
// xor_sel (LFSR feedback mode, 1 = XOR), pixel_in, cipher_out, key (the key of
// this cycle, for observation).
module icrlg_encrypt
  import icrlg_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   xor_sel,
  input  pixel_t pixel_in,
  output pixel_t cipher_out,
  output key_t   key
);

  logic [KEY_W-1:0] lfsr_state;

  rlfsrl #(.WIDTH(KEY_W), .TAPS(KEY_LFSR_TAPS), .SEED(KEY_LFSR_SEED)) u_lfsr (
    .clk, .rst, .xor_sel, .state(lfsr_state)
  );

  assign key = key_from_state(lfsr_state);

  // Upper nibble
  logic    cu_p, cu_q;
  nibble_t hu, xu;

  cnot_gate u_cnot_hi (.a(pixel_in[7]), .b(pixel_in[6]), .p(cu_p), .q(cu_q));
  hing_gate u_hing_hi (.a(cu_p), .b(cu_q), .c(pixel_in[5]), .d(pixel_in[4]),
                       .p(hu[3]), .q(hu[2]), .r(hu[1]), .s(hu[0]));
  xnor_key  u_xnor_hi (.x(hu), .key(key), .y(xu));
  peres_gate u_peres_hi (.a(xu[3]), .b(xu[2]), .c(xu[1]),
                         .p(cipher_out[7]), .q(cipher_out[6]), .z(cipher_out[5]));
  assign cipher_out[4] = xu[0];

  // Lower nibble
  logic    cl_p, cl_q;
  nibble_t hl, xl;

  cnot_gate u_cnot_lo (.a(pixel_in[1]), .b(pixel_in[0]), .p(cl_p), .q(cl_q));
  hing_gate u_hing_lo (.a(pixel_in[3]), .b(pixel_in[2]), .c(cl_p), .d(cl_q),
                       .p(hl[3]), .q(hl[2]), .r(hl[1]), .s(hl[0]));
  xnor_key  u_xnor_lo (.x(hl), .key(key), .y(xl));
  assign cipher_out[3] = xl[3];
  peres_gate u_peres_lo (.a(xl[2]), .b(xl[1]), .c(xl[0]),
                         .p(cipher_out[2]), .q(cipher_out[1]), .z(cipher_out[0]));

endmodule
