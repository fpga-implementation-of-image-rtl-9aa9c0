// rlfsrl: runtime linear feedback shift register with selectable XOR/XNOR
// feedback.
//
// A Fibonacci shift register of WIDTH stages. Stage 1 is bit WIDTH-1 of
// `state`, stage WIDTH is bit 0; each clock the register shifts one stage
// towards bit 0 and stage 1 takes the feedback bit. The feedback is a cascade
// of two-input gates over the tapped stages (TAPS has a 1 for each tap). Each
// gate in the cascade is an XNOR followed by an optional inverter: with
// xor_sel = 1 every gate acts as XOR, with xor_sel = 0 as XNOR. In hardware the
// design builds this choice from two tri-state buffers and an inverter rather
// than from a multiplexer; here it is a plain 2:1 choice per gate. xor_sel may
// change at run time, the next shift uses the new mode.
//
// Defaults follow the design's 8-bit example: taps on stages 4, 5, 6 and 8
// (x^8 + x^6 + x^5 + x^4 + 1) and start state 8'hEC. In XOR mode the all-zero
// state locks the register; with an even number of taps (as here) the XNOR
// mode locks on all-ones. The synchronous, active-high reset and its loading of
// SEED are this design's choice.
//
// Ports: clk, rst (synchronous, active high), xor_sel, state (registered).
module rlfsrl #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'b0001_1101,
  parameter logic [WIDTH-1:0] SEED  = 8'hEC
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             xor_sel,
  output logic [WIDTH-1:0] state
);

  // Cascade of XOR/XNOR gates over the tapped stages, lowest bit first.
  function automatic logic feedback(input logic [WIDTH-1:0] s, input logic sel);
    logic acc;
    logic first;
    acc   = 1'b0;
    first = 1'b1;
    for (int i = 0; i < int'(WIDTH); i++) begin
      if (TAPS[i]) begin
        if (first) acc = s[i];
        else       acc = sel ? (acc ^ s[i]) : ~(acc ^ s[i]);
        first = 1'b0;
      end
    end
    return acc;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) state <= SEED;
    else     state <= {feedback(state, xor_sel), state[WIDTH-1:1]};
  end

  initial begin
    assert ($countones(TAPS) >= 2) else $error("rlfsrl: TAPS needs at least two taps");
  end

endmodule
