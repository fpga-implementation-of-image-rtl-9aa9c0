// icrlg_ref_pkg: reference model used by the testbenches.
//
// The cipher, its key sequence and the gates are written here as plain bit
// equations, independent of the RTL's module structure:
//   - the HNG output S is written as D ^ majority(A, B, C), which equals
//     ((A^B)&C) ^ (A&B) ^ D;
//   - the key sequence is stepped directly on the key bits (a Galois form of
//     the same LFSR): k' = {k[2], k[1], k[0] ^ k[3] ^ ~xor_sel, k[3]};
//   - decryption is found by searching the 256 pixels for the one that
//     encrypts to the given cipher.
package icrlg_ref_pkg;

  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (int'(a) + int'(b) + int'(c)) >= 2;
  endfunction

  function automatic logic [3:0] ref_hing(input logic a, b, c, d);
    return {a, b, a ^ b ^ c, d ^ maj3(a, b, c)};
  endfunction

  function automatic logic [2:0] ref_peres(input logic a, b, c);
    return {a, a ^ b, (a & b) ^ c};
  endfunction

  function automatic logic [7:0] ref_encrypt(input logic [7:0] i, input logic [3:0] k);
    logic [3:0] hu, hl, xu, xl;
    logic [7:0] o;
    hu = ref_hing(i[7], i[7] ^ i[6], i[5], i[4]);
    hl = ref_hing(i[3], i[2], i[1], i[1] ^ i[0]);
    xu = ~(hu ^ k);
    xl = ~(hl ^ k);
    o[7:5] = ref_peres(xu[3], xu[2], xu[1]);
    o[4]   = xu[0];
    o[3]   = xl[3];
    o[2:0] = ref_peres(xl[2], xl[1], xl[0]);
    return o;
  endfunction

  function automatic logic [7:0] ref_decrypt(input logic [7:0] c, input logic [3:0] k);
    for (int p = 0; p < 256; p++)
      if (ref_encrypt(8'(p), k) == c) return 8'(p);
    return 8'h00;
  endfunction

  function automatic logic [3:0] ref_key_next(input logic [3:0] k, input logic xor_sel);
    return {k[2], k[1], k[0] ^ k[3] ^ ~xor_sel, k[3]};
  endfunction

  localparam logic [3:0] REF_KEY_AFTER_RESET = 4'b1110;

endpackage
