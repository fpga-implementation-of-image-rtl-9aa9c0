// tb_rlfsrl: checks the runtime LFSR.
//   - 8-bit default instance: state EC after reset, every step against
//     s' = {s0^s2^s3^s4 (inverted in XNOR mode), s[7:1]}, period 255 in XOR
//     mode and in XNOR mode, run-time mode switching.
//   - 4-bit instance as used for the cipher key: after reset the key read out
//     through icrlg_pkg::key_from_state runs 1110, 1111, 1101, 1001 (the
//     published key sequence) and has period 15.
module tb_rlfsrl;
  import icrlg_pkg::*;
  import icrlg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst, xor_sel;
  logic [7:0] s8;
  logic [3:0] s4;
  rlfsrl dut8 (.clk, .rst, .xor_sel, .state(s8));
  rlfsrl #(.WIDTH(4), .TAPS(KEY_LFSR_TAPS), .SEED(KEY_LFSR_SEED)) dut4 (.clk, .rst, .xor_sel, .state(s4));

  function automatic logic [7:0] ref8(input logic [7:0] s, input logic x);
    return {s[0] ^ s[2] ^ s[3] ^ s[4] ^ ~x, s[7:1]};
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [7:0] exp8;
  logic [3:0] expk;
  int period;
  localparam logic [3:0] PUBLISHED [4] = '{4'b1110, 4'b1111, 4'b1101, 4'b1001};

  initial begin
    rst = 1; xor_sel = 1;
    @(posedge clk); #1;
    rst = 0;
    check(s8 == 8'hEC, $sformatf("8-bit reset state %h", s8));
    check(key_from_state(s4) == REF_KEY_AFTER_RESET, "4-bit reset key");
    // published key sequence
    for (int i = 0; i < 4; i++) begin
      check(key_from_state(s4) == PUBLISHED[i],
            $sformatf("key step %0d = %b, exp %b", i, key_from_state(s4), PUBLISHED[i]));
      @(posedge clk); #1;
    end
    // XOR-mode period and step check, 8 and 4 bits
    rst = 1; @(posedge clk); #1; rst = 0;
    exp8 = 8'hEC; expk = REF_KEY_AFTER_RESET; period = 0;
    do begin
      @(posedge clk); #1;
      exp8 = ref8(exp8, 1'b1);
      expk = ref_key_next(expk, 1'b1);
      period++;
      check(s8 == exp8, $sformatf("xor step %0d: %h exp %h", period, s8, exp8));
      check(key_from_state(s4) == expk, $sformatf("key xor step %0d", period));
      if (period == 15) check(key_from_state(s4) == REF_KEY_AFTER_RESET, "4-bit period 15");
      if (period < 15)  check(key_from_state(s4) != REF_KEY_AFTER_RESET, "4-bit period short");
    end while (s8 != 8'hEC && period < 400);
    check(period == 255, $sformatf("8-bit XOR period %0d", period));
    // XNOR mode: period 255 from EC as well
    xor_sel = 0; period = 0; exp8 = s8;
    do begin
      @(posedge clk); #1;
      exp8 = ref8(exp8, 1'b0);
      period++;
      check(s8 == exp8, $sformatf("xnor step %0d: %h exp %h", period, s8, exp8));
      check(s8 != 8'hFF, "XNOR lock state reached");
    end while (s8 != 8'hEC && period < 400);
    check(period == 255, $sformatf("8-bit XNOR period %0d", period));
    // random run-time mode switching
    exp8 = s8;
    rst = 1; @(posedge clk); #1; rst = 0;
    exp8 = 8'hEC; expk = REF_KEY_AFTER_RESET;
    for (int i = 0; i < 300; i++) begin
      logic m;
      m = 1'($urandom);
      // keep the 4-bit key out of its lock states
      if (!m && key_from_state(s4) == 4'b1111) m = 1'b1;
      xor_sel = m;
      @(posedge clk); #1;
      exp8 = ref8(exp8, m);
      expk = ref_key_next(expk, m);
      check(s8 == exp8, "mixed-mode 8-bit step");
      check(key_from_state(s4) == expk, "mixed-mode key step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
