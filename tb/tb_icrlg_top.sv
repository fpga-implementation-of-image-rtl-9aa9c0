// tb_icrlg_top: end-to-end run of the encryptor/decryptor pair at its default
// (and only) configuration.
//
// A 64 x 48 synthetic 8-bit grey image (a gradient mixed with a checker and a
// pseudo-random texture) is streamed through one pixel per clock, then a
// second frame with XNOR key feedback, then a frame during which the key mode
// is switched at run time and reset is pulsed mid-frame. Each cycle:
//   - pixel_out must equal pixel_in (decryption recovers the image);
//   - cipher_out must equal the reference cipher under the reference key;
//   - enc_key and dec_key must be equal.
// Before that, the published plain-text example is replayed (pixel 00110111,
// cipher 00100110 / 00110111 / 00010100 over the first three keys).
// Mechanisms counted, each must happen at least once: XOR-mode cycles,
// XNOR-mode cycles, run-time mode switches, resets that restart the key,
// every one of the 15 key values, cipher bytes that differ from the pixel.
module tb_icrlg_top;
  import icrlg_pkg::*;
  import icrlg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, xor_sel;
  pixel_t pixel_in, cipher_out, pixel_out;
  key_t enc_key, dec_key;
  icrlg_top dut (.clk, .rst, .xor_sel, .pixel_in, .cipher_out, .pixel_out, .enc_key, .dec_key);

  localparam int IMG_W = 64, IMG_H = 48;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  function automatic pixel_t image_pixel(input int x, input int y, input int frame);
    logic [7:0] grad, noise;
    grad  = 8'((x * 4 + y * 2 + frame * 17) & 8'hFF);
    noise = 8'(((x * 37) ^ (y * 91) ^ (x * y)) & 8'h0F);
    return ((((x >> 3) ^ (y >> 3)) & 1) != 0) ? grad ^ noise : grad;
  endfunction

  int n_xor = 0, n_xnor = 0, n_switch = 0, n_reset = 0, n_changed = 0;
  bit key_seen [16];
  logic [3:0] k;

  task automatic step(input pixel_t px, input logic mode, input logic do_rst);
    if (mode != xor_sel) n_switch++;
    xor_sel  = mode;
    pixel_in = px;
    #1;
    check(enc_key == k, $sformatf("enc key %b exp %b", enc_key, k));
    check(dec_key == k, $sformatf("dec key %b exp %b", dec_key, k));
    check(cipher_out == ref_encrypt(px, k),
          $sformatf("cipher %h exp %h (pixel %h key %b)", cipher_out, ref_encrypt(px, k), px, k));
    check(pixel_out == px, $sformatf("decrypted %h exp %h", pixel_out, px));
    key_seen[k] = 1;
    if (cipher_out != px) n_changed++;
    if (mode) n_xor++; else n_xnor++;
    rst = do_rst;
    @(posedge clk); #1;
    if (do_rst) begin
      n_reset++;
      k = REF_KEY_AFTER_RESET;
    end else begin
      k = ref_key_next(k, mode);
    end
    rst = 0;
  endtask

  localparam logic [7:0] PUB_CIPHER [3] = '{8'b0010_0110, 8'b0011_0111, 8'b0001_0100};

  initial begin
    foreach (key_seen[i]) key_seen[i] = 0;
    rst = 1; xor_sel = 1; pixel_in = 8'b0011_0111;
    @(posedge clk); #1; rst = 0;
    k = REF_KEY_AFTER_RESET;
    for (int i = 0; i < 3; i++) begin
      #1;
      check(cipher_out == PUB_CIPHER[i], $sformatf("published cipher %0d: %b", i, cipher_out));
      check(pixel_out == 8'b0011_0111, "published plain text");
      step(8'b0011_0111, 1'b1, 1'b0);
    end

    // frame 0: XOR key feedback
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        step(image_pixel(x, y, 0), 1'b1, 1'b0);
    // frame 1: XNOR key feedback (restart from the reset key, which is not a lock state)
    step(8'h00, 1'b1, 1'b1);
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        step(image_pixel(x, y, 1), 1'b0, 1'b0);
    // frame 2: random run-time mode switches and a reset mid-frame
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        logic m;
        m = ($urandom_range(0, 7) == 0) ? ~xor_sel : xor_sel;
        if (!m && k == 4'b1111) m = 1'b1;   // never enter the XNOR lock state
        step(image_pixel(x, y, 2), m, (y == IMG_H / 2 && x == 0));
      end

    check(n_xor > 0, "no XOR-mode cycle");
    check(n_xnor > 0, "no XNOR-mode cycle");
    check(n_switch > 0, "no run-time mode switch");
    check(n_reset > 0, "no key reset");
    check(n_changed > 0, "cipher never differs from plain");
    for (int i = 1; i < 16; i++) check(key_seen[i], $sformatf("key %b never used", 4'(i)));
    $display("mechanisms: xor=%0d xnor=%0d switches=%0d resets=%0d changed=%0d",
             n_xor, n_xnor, n_switch, n_reset, n_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
