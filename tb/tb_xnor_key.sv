// tb_xnor_key: all 256 data/key pairs; y must be 1 exactly where data and key
// bits agree.
module tb_xnor_key;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] x, key, y;
  xnor_key dut (.x, .key, .y);

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x, key} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (y[i] !== (x[i] == key[i])) begin
          failures++; $display("FAIL x=%b key=%b y=%b", x, key, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
