// tb_hing_gate_inv: for every 4-bit pattern, the inverse HNG gate must return
// the input that the reference HNG equations map onto that pattern.
module tb_hing_gate_inv;
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

  logic p, q, r, s, a, b, c, d;
  hing_gate_inv dut (.p, .q, .r, .s, .a, .b, .c, .d);

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [3:0] x;
      x = 4'(v);
      {p, q, r, s} = ref_hing(x[3], x[2], x[1], x[0]);
      #1;
      checks++;
      if ({a, b, c, d} !== x) begin
        failures++;
        $display("FAIL out=%b from %b, exp %b", {a, b, c, d}, {p, q, r, s}, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
