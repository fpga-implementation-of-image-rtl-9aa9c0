// tb_peres_gate: exhaustive check of the Peres gate against its truth table
// (written out literally) and that its 8 outputs are all different.
module tb_peres_gate;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output {P,Q,Z} for input {A,B,C} = 0..7.
  localparam logic [2:0] TRUTH [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b110, 3'b111, 3'b101, 3'b100};
  logic a, b, c, p, q, z;
  peres_gate dut (.a, .b, .c, .p, .q, .z);

  bit seen [8];
  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, z} !== TRUTH[v]) begin
        failures++; $display("FAIL in=%b out=%b exp=%b", 3'(v), {p, q, z}, TRUTH[v]);
      end
      checks++;
      if (seen[{p, q, z}]) begin failures++; $display("FAIL output repeated"); end
      seen[{p, q, z}] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
