// tb_cnot_gate: exhaustive check of the CNOT gate: P = A, Q = A xor B, and
// applying the gate twice returns the inputs.
module tb_cnot_gate;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, b, p, q, p2, q2;
  cnot_gate dut  (.a, .b, .p, .q);
  cnot_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++; if (p !== a) begin failures++; $display("FAIL p a=%b b=%b", a, b); end
      checks++; if (q !== (a != b)) begin failures++; $display("FAIL q a=%b b=%b", a, b); end
      checks++; if ({p2, q2} !== {a, b}) begin failures++; $display("FAIL self-inverse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
