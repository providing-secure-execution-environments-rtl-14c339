// tb_aes_key_expand: checks the registered AES-128 key schedule.
// After reset the block must expand its reset key by itself; after a key_load
// ready must fall and rise again 10 clock edges after the edge that sampled key_load, and all eleven round
// keys must match a behavioural key expansion. The FIPS-197 Appendix A.1 key
// also has its final round key checked against the published value.
module tb_aes_key_expand;
  import shade_pkg::*;
  localparam key_t RK = 128'h000102030405060708090a0b0c0d0e0f;

  logic clk = 0, rst_n = 0, key_load = 0;
  key_t key_in = '0;
  rkeys_t round_keys;
  logic ready;
  int checks = 0, failures = 0;

  aes_key_expand #(.RESET_KEY(RK)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare_all(input key_t k);
    logic [31:0] w [44];
    aes_ref_pkg::expand(k, w);
    for (int r = 0; r <= 10; r++)
      check(round_keys[r] == {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]},
            $sformatf("round key %0d for key %h", r, k));
  endtask

  task automatic load_and_time(input key_t k);
    int n;
    @(negedge clk); key_in = k; key_load = 1;
    @(negedge clk); key_load = 0;
    check(!ready, "ready low during expansion");
    n = 0;   // clock edges since the one that sampled key_load
    while (!ready && n < 50) begin @(negedge clk); n++; end
    check(n == 10, $sformatf("ready %0d clock edges after the load edge, expected 10", n));
    compare_all(k);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (12) @(negedge clk);
    check(ready, "ready after reset expansion");
    compare_all(RK);
    load_and_time(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(round_keys[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 last round key");
    for (int i = 0; i < 20; i++)
      load_and_time({$urandom, $urandom, $urandom, $urandom});
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
