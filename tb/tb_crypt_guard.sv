// tb_crypt_guard: one guard between a CPU-side driver and a behavioural
// memory with random stalls and latency.
// Checks: stores reach memory as E(key, data) and never as plaintext; loads of
// ciphertext placed in memory return D(key, block); a store followed by a
// load of the same address returns the original data; the FIPS-197 C.1 vector
// crosses the guard; no request is accepted while a new key is expanded; the
// store latency with an always-ready memory is 11 cycles of cipher plus the
// hand-off, as the module header states.
module tb_crypt_guard;
  import shade_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, key_ready, idle;
  key_t key_in = '0;
  key_t key = 128'h000102030405060708090a0b0c0d0e0f;
  int checks = 0, failures = 0;

  mem_if up (.clk, .rst_n);
  mem_if dn (.clk, .rst_n);

  crypt_guard #(.RESET_KEY(128'h000102030405060708090a0b0c0d0e0f)) dut (
    .clk, .rst_n, .key_load, .key_in, .key_ready, .idle, .up(up.slave), .dn(dn.master));
  mem_model mem (.clk, .rst_n, .bus(dn.slave));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic store(input addr_t a, input block_t d);
    @(negedge clk);
    up.req_valid = 1; up.req_write = 1; up.req_addr = a; up.req_data = d;
    do @(posedge clk); while (!up.req_ready);
    @(negedge clk);
    up.req_valid = 0;
    // wait until the block has reached memory
    while (!idle) @(negedge clk);
  endtask

  task automatic load(input addr_t a, output block_t d);
    @(negedge clk);
    up.req_valid = 1; up.req_write = 0; up.req_addr = a;
    do @(posedge clk); while (!up.req_ready);
    @(negedge clk);
    up.req_valid = 0;
    while (!up.rsp_valid) @(negedge clk);
    d = up.rsp_data;
  endtask

  initial begin
    block_t d, r;
    addr_t a;
    int n;
    up.req_valid = 0; up.req_write = 0; up.req_addr = '0; up.req_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!key_ready) @(negedge clk);

    // published vector through the guard
    store(32'h100, 128'h00112233445566778899aabbccddeeff);
    check(mem.store[32'h100] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS C.1 vector stored");
    load(32'h100, r);
    check(r == 128'h00112233445566778899aabbccddeeff, "FIPS C.1 vector loaded back");

    // new key: requests held off while expanding
    key = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); key_in = key; key_load = 1;
    @(negedge clk); key_load = 0;
    check(!key_ready && !up.req_ready, "no request accepted during key expansion");
    while (!key_ready) @(negedge clk);

    for (int i = 0; i < 40; i++) begin
      a = 32'h1000 + 32'(16 * i);
      d = {$urandom, $urandom, $urandom, $urandom};
      store(a, d);
      check(mem.store[a] == aes_ref_pkg::encrypt(key, d), $sformatf("store %0d enciphered", i));
      check(mem.store[a] != d, "no plaintext reaches memory");
    end
    for (int i = 0; i < 40; i++) begin
      a = 32'h1000 + 32'(16 * i);
      load(a, r);
      check(aes_ref_pkg::encrypt(key, r) == mem.store[a], $sformatf("load %0d deciphered", i));
    end
    for (int i = 0; i < 20; i++) begin
      a = 32'h8000 + 32'(16 * i);
      d = {$urandom, $urandom, $urandom, $urandom};
      mem.store[a] = d;
      load(a, r);
      check(r == aes_ref_pkg::decrypt(key, d), $sformatf("load of preset block %0d", i));
    end

    // store latency: accepted in cycle c, offered downstream in cycle c+11
    force dn.req_ready = 1'b1;
    @(negedge clk);
    up.req_valid = 1; up.req_write = 1; up.req_addr = 32'h40; up.req_data = '1;
    @(posedge clk);
    check(up.req_ready, "idle guard accepts at once");
    @(negedge clk); up.req_valid = 0;
    n = 0;   // clock edges since the accepting one
    while (!dn.req_valid) begin @(negedge clk); n++; end
    check(n == 10, $sformatf("store offered %0d edges after acceptance, expected 10 (cycle c+11)", n));
    @(negedge clk);

    // throughput: 16 stores and then 16 loads held back to back, one per clock
    n = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      up.req_valid = 1; up.req_write = 1; up.req_addr = 32'h2_0000 + 32'(16 * i);
      up.req_data = {4{32'(i)}};
      @(posedge clk); #1;
      if (up.req_ready) n++;
    end
    @(negedge clk); up.req_valid = 0;
    check(n == 16, $sformatf("%0d of 16 back-to-back stores accepted without a stall", n));
    release dn.req_ready;
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++)
      check(mem.store[32'h2_0000 + 32'(16 * i)] == aes_ref_pkg::encrypt(key, {4{32'(i)}}),
            $sformatf("streamed store %0d", i));
    fork
      begin
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          up.req_valid = 1; up.req_write = 0; up.req_addr = 32'h2_0000 + 32'(16 * i);
          do @(posedge clk); while (!up.req_ready);
        end
        @(negedge clk); up.req_valid = 0;
      end
      begin
        for (int i = 0; i < 16; i++) begin
          do @(negedge clk); while (!up.rsp_valid);
          check(up.rsp_data == {4{32'(i)}}, $sformatf("streamed load %0d in order", i));
        end
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
