// icrlg_pkg: types and constants shared by the image-cryptology datapath.
//
// The cipher works on 8-bit pixels split into two 4-bit halves (nibbles). Both
// halves are mixed with the same 4-bit key, which the 4-bit runtime LFSR gives
// each clock cycle. The 4-bit width of the key follows the design: its
// diagrams label the key "LFSR 4bit key", and its published simulation shows
// 4-bit key registers. The LFSR tap set, the start state and the order in which
// the LFSR stages are read out as key bits are this design's choice. They are
// picked so that the key sequence after reset is 1110, 1111, 1101, 1001, ...,
// the sequence of the published simulation. See key_from_state().
package icrlg_pkg;

  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned NIBBLE_W = 4;
  localparam int unsigned KEY_W = 4;

  typedef logic [PIXEL_W-1:0]  pixel_t;
  typedef logic [NIBBLE_W-1:0] nibble_t;
  typedef logic [KEY_W-1:0]    key_t;

  // Key LFSR: Fibonacci register of KEY_W stages, stage 1 in bit KEY_W-1,
  // feedback from stages 3 and 4 (polynomial x^4 + x^3 + 1, maximal length).
  localparam logic [KEY_W-1:0] KEY_LFSR_TAPS = 4'b0011;
  // Start state after reset. It reads out as key 1110.
  localparam logic [KEY_W-1:0] KEY_LFSR_SEED = 4'b1110;

  // Order in which the LFSR stages drive the key lines: key = {s[1], s[2], s[3], s[0]}
  // where s[3] is stage 1 and s[0] is stage 4.
  function automatic key_t key_from_state(input logic [KEY_W-1:0] s);
    return {s[1], s[2], s[3], s[0]};
  endfunction

endpackage
