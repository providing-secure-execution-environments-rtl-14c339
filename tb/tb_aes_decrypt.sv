// tb_aes_decrypt: checks the pipelined AES-128 decryption core.
// Round keys come from a behavioural key expansion, not from the RTL one.
// Checks the two FIPS-197 vectors (Appendix B and C.1) and the 11-clock
// latency of an isolated block, then streams random blocks with random gaps
// and random pipeline stalls (en low) and checks every output, with its tag,
// in order against a behavioural model, and that an unstalled stream comes out
// at one block per clock.
module tb_aes_decrypt;
  import shade_pkg::*;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  block_t din = '0, dout;
  logic [7:0] in_tag = '0, out_tag;
  rkeys_t round_keys;
  logic out_valid, busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  aes_decrypt #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_key(input key_t k);
    logic [31:0] w [44];
    aes_ref_pkg::expand(k, w);
    for (int r = 0; r <= 10; r++) round_keys[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endtask

  // isolated block: latency
  task automatic single(input block_t x, input block_t exp);
    int n;
    @(negedge clk); din = x; in_valid = 1; in_tag = 8'h5a;
    @(negedge clk); in_valid = 0; din = ~x;
    n = 2;   // this negedge lies in the cycle after the entry cycle
    while (!out_valid && n < 40) begin @(negedge clk); n++; end
    check(n == 12, $sformatf("block appears in cycle %0d counting its entry cycle, expected 12", n));
    check(dout == exp && out_tag == 8'h5a, $sformatf("in %h: got %h expected %h", x, dout, exp));
    @(negedge clk);
    check(!out_valid, "single block leaves after one cycle");
  endtask

  // expected outputs, in order
  block_t exp_q [$];
  logic [7:0] tag_exp_q [$];
  int got = 0;
  int out_cyc [$];
  key_t key;

  always @(negedge clk) begin
    if (rst_n && en && out_valid && exp_q.size() > 0) begin
      check(dout == exp_q[0] && out_tag == tag_exp_q[0],
            $sformatf("stream block %0d: got %h expected %h", got, dout, exp_q[0]));
      out_cyc.push_back(cyc);
      void'(exp_q.pop_front());
      void'(tag_exp_q.pop_front());
      got++;
    end
  end

  task automatic stream(input int nblk, input int gap_pct, input int stall_pct);
    int sent;
    sent = 0;
    while (sent < nblk) begin
      @(negedge clk);
      #1;
      en = ($urandom_range(99) >= stall_pct);
      in_valid = ($urandom_range(99) >= gap_pct);
      din = {$urandom, $urandom, $urandom, $urandom};
      in_tag = 8'($urandom);
      if (en && in_valid) begin
        exp_q.push_back(aes_ref_pkg::decrypt(key, din));
        tag_exp_q.push_back(in_tag);
        sent++;
      end
    end
    @(negedge clk); #1; in_valid = 0; en = 1;
    repeat (15) @(negedge clk);
    check(exp_q.size() == 0, "every streamed block came out");
  endtask

  initial begin
    int c0;
    round_keys = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    single(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    single(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    check(aes_ref_pkg::decrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a) == 128'h00112233445566778899aabbccddeeff, "reference model vector");
    // back-to-back, no stalls: 40 blocks leave in 40 consecutive cycles
    key = {$urandom, $urandom, $urandom, $urandom};
    set_key(key);
    got = 0;
    out_cyc.delete();
    stream(40, 0, 0);
    check(got == 40, "unstalled stream complete");
    check(out_cyc.size() == 40 && out_cyc[39] - out_cyc[0] == 39, "one block per clock");
    // random gaps and stalls, several keys
    for (int k = 0; k < 5; k++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      set_key(key);
      stream(60, 30, 25);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
