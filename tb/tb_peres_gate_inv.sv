// tb_peres_gate_inv: for every 3-bit pattern, the inverse Peres gate must
// return the input that the reference Peres equations map onto it.
module tb_peres_gate_inv;
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

  logic p, q, z, a, b, c;
  peres_gate_inv dut (.p, .q, .z, .a, .b, .c);

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] x;
      x = 3'(v);
      {p, q, z} = ref_peres(x[2], x[1], x[0]);
      #1;
      checks++;
      if ({a, b, c} !== x) begin
        failures++; $display("FAIL out=%b from %b, exp %b", {a, b, c}, {p, q, z}, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
