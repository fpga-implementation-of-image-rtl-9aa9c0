// tb_hing_gate: exhaustive check of the HNG gate against the reference
// equations, and that its 16 outputs are all different (reversibility).
module tb_hing_gate;
  import icrlg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, b, c, d, p, q, r, s;
  hing_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  bit seen [16];
  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if ({p, q, r, s} !== ref_hing(a, b, c, d)) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 4'(v), {p, q, r, s}, ref_hing(a, b, c, d));
      end
      checks++;
      if (seen[{p, q, r, s}]) begin failures++; $display("FAIL output %b repeated", {p, q, r, s}); end
      seen[{p, q, r, s}] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
