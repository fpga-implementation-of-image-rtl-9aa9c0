// tb_icrlg_decrypt: checks the decryption unit.
//   - the published simulation: cipher 00100110 under key 1110 decrypts to
//     00110111;
//   - every pixel/key pair: the reference cipher of the pixel, applied in the
//     cycle of that key, decrypts to the pixel (no latency), in XOR and in
//     XNOR key mode.
module tb_icrlg_decrypt;
  import icrlg_pkg::*;
  import icrlg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, xor_sel;
  pixel_t cipher_in, pixel_out;
  key_t key;
  icrlg_decrypt dut (.clk, .rst, .xor_sel, .cipher_in, .pixel_out, .key);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [3:0] k;

  initial begin
    rst = 1; xor_sel = 1; cipher_in = 8'b0010_0110;
    @(posedge clk); #1; rst = 0;
    check(pixel_out == 8'b0011_0111, $sformatf("published: %b", pixel_out));

    for (int mode = 1; mode >= 0; mode--) begin
      xor_sel = 1'(mode);
      rst = 1; @(posedge clk); #1; rst = 0;
      k = REF_KEY_AFTER_RESET;
      for (int n = 0; n < 15 * 256; n++) begin
        cipher_in = ref_encrypt(8'(n), k);
        #1;
        check(key == k, $sformatf("key %b exp %b", key, k));
        check(pixel_out == 8'(n), $sformatf("cipher %h key %b: %h exp %h", cipher_in, k, pixel_out, 8'(n)));
        check(pixel_out == ref_decrypt(cipher_in, k), "reference decrypt");
        @(posedge clk); #1;
        k = ref_key_next(k, 1'(mode));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
