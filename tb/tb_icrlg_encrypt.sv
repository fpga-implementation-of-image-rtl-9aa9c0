// tb_icrlg_encrypt: checks the encryption unit.
//   - the published simulation: pixel 00110111 under keys 1110, 1111, 1101,
//     1001 gives cipher 00100110, 00110111, 00010100, 010100xx;
//   - all 256 pixels against the reference cipher, with the key of each cycle
//     following the reference key sequence (256 pixels x 15 keys covered);
//   - no latency: the cipher matches in the cycle the pixel is applied.
module tb_icrlg_encrypt;
  import icrlg_pkg::*;
  import icrlg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, xor_sel;
  pixel_t pixel_in, cipher_out;
  key_t key;
  icrlg_encrypt dut (.clk, .rst, .xor_sel, .pixel_in, .cipher_out, .key);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam logic [7:0] PUB_CIPHER [3] = '{8'b0010_0110, 8'b0011_0111, 8'b0001_0100};
  logic [3:0] k;

  initial begin
    rst = 1; xor_sel = 1; pixel_in = 8'b0011_0111;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 3; i++) begin
      check(cipher_out == PUB_CIPHER[i],
            $sformatf("published step %0d: %b exp %b", i, cipher_out, PUB_CIPHER[i]));
      @(posedge clk); #1;
    end
    check(cipher_out[7:2] == 6'b010100, $sformatf("published step 3: %b", cipher_out));

    rst = 1; @(posedge clk); #1; rst = 0;
    k = REF_KEY_AFTER_RESET;
    for (int n = 0; n < 15 * 256; n++) begin
      pixel_in = 8'(n);
      #1;
      check(key == k, $sformatf("key %b exp %b", key, k));
      check(cipher_out == ref_encrypt(pixel_in, k),
            $sformatf("pixel %h key %b: %h exp %h", pixel_in, k, cipher_out, ref_encrypt(pixel_in, k)));
      @(posedge clk); #1;
      k = ref_key_next(k, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
