// tb_shade_top: end-to-end run of the two-guard chain at its default
// parameters, with a behavioural CPU program on one side and a behavioural
// memory (random stalls and latency) on the other.
//
// Boot: both keys are loaded through their ports and the heartbeat table is
// filled with the inner-key encryption of each heartbeat value, as the trusted
// compiler would produce it (the last scenario instead has the outer guard
// fetch the table from memory, where the heartbeat values are stored under
// both keys and the windows under the Outer-key). Then:
//  1. data traffic: stores must reach memory doubly enciphered,
//     E(k2, E(k1, w)), never as plaintext or under the inner key alone, and
//     loads must return the plaintext; a burst of back-to-back stores must
//     come through intact while bus back-pressure stalls the CPU;
//  2. the heartbeat program of the worked example: a heartbeat HB1 opens a
//     block of T1 cycles, then a loop of LIMIT blocks of T2 cycles each opens
//     with heartbeat HB2, each block doing real loads and stores; the program
//     then stops sending heartbeats (exit) and the timeout alarm must follow,
//     and not before;
//  3. a Trojan in the inner guard that skips encryption (modelled by forcing
//     the inner guard's cipher output to the plaintext): memory still receives
//     only outer-key ciphertext, and the unencrypted heartbeat is not
//     recognised, so the timeout alarm follows;
//  4. a replayed heartbeat sent before its window opens: early alarm (with
//     the table fetched from memory).
// Every mechanism is counted, and one that never happened is a failure.
module tb_shade_top;
  import shade_pkg::*;
  localparam addr_t HB_ADDR = 32'hFFFF_0100;
  localparam int T1 = 150, T2 = 120, LIMIT = 6;
  localparam block_t HB1 = 128'h0000_0001_0000_0000_0000_0000_0000_0096;
  localparam block_t HB2 = 128'h0000_0002_0000_0000_0000_0000_0000_0078;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0, cpu_rsp_valid;
  addr_t cpu_req_addr = '0;
  block_t cpu_req_data = '0, cpu_rsp_data;
  logic ig_key_load = 0, og_key_load = 0, ig_key_ready, og_key_ready, ig_idle, og_idle;
  key_t ig_key = '0, og_key = '0;
  logic hb_cfg_we = 0;
  logic [5:0] hb_cfg_idx = '0;
  hb_entry_t hb_cfg_entry = '0;
  logic hb_fetch_start = 0, hb_fetch_busy;
  addr_t hb_fetch_base = '0;
  logic [6:0] hb_fetch_count = '0;
  logic hb_armed, alarm_timeout, alarm_early, alarm;
  hb_time_t hb_remaining;

  mem_if bus (.clk, .rst_n);

  shade_top dut (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req_write, .cpu_req_addr, .cpu_req_data,
    .cpu_rsp_valid, .cpu_rsp_data,
    .mem_req_valid(bus.req_valid), .mem_req_ready(bus.req_ready), .mem_req_write(bus.req_write),
    .mem_req_addr(bus.req_addr), .mem_req_data(bus.req_data),
    .mem_rsp_valid(bus.rsp_valid), .mem_rsp_data(bus.rsp_data),
    .ig_key_load, .ig_key, .ig_key_ready, .ig_idle, .og_key_load, .og_key, .og_key_ready, .og_idle,
    .hb_cfg_we, .hb_cfg_idx, .hb_cfg_entry,
    .hb_fetch_start, .hb_fetch_base, .hb_fetch_count, .hb_fetch_busy,
    .hb_armed, .hb_remaining, .alarm_timeout, .alarm_early, .alarm
  );
  mem_model mem (.clk, .rst_n, .bus(bus.slave));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  key_t k1, k2;

  // mechanism counters
  int n_key_load = 0, n_table_load = 0, n_table_fetch = 0, n_enc_store = 0, n_dec_load = 0;
  int n_hb_hit = 0, n_hb_miss = 0, n_timeout = 0, n_early = 0;
  int n_cpu_stall = 0, n_bus_stall = 0, n_leak_blocked = 0;

  always @(posedge clk) begin
    if (cpu_req_valid && !cpu_req_ready) n_cpu_stall++;
    if (bus.req_valid && !bus.req_ready) n_bus_stall++;
    if (rst_n && dut.u_outer.u_table.res_valid) begin
      if (dut.u_outer.u_table.res_hit) n_hb_hit++; else n_hb_miss++;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic cpu_store(input addr_t a, input block_t d);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = 1; cpu_req_addr = a; cpu_req_data = d;
    do @(posedge clk); while (!cpu_req_ready);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  task automatic cpu_load(input addr_t a, output block_t d);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = 0; cpu_req_addr = a;
    do @(posedge clk); while (!cpu_req_ready);
    @(negedge clk);
    cpu_req_valid = 0;
    while (!cpu_rsp_valid) @(negedge clk);
    d = cpu_rsp_data;
  endtask

  // wait until the chain has drained (both guards idle, memory quiet)
  task automatic drain();
    repeat (2) @(negedge clk);
    while (!(ig_idle && og_idle)) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic boot(input bit fetch = 1'b0);
    @(negedge clk); rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    ig_key = k1; og_key = k2; ig_key_load = 1; og_key_load = 1;
    @(negedge clk); ig_key_load = 0; og_key_load = 0;
    n_key_load += 2;
    // table entries: signature = E(k1, heartbeat value); window in cycles
    // (the bounds hold the block's measured best case and a worst case with
    // all its memory accesses at their slowest)
    if (!fetch) begin
      for (int i = 0; i < 2; i++) begin
        @(negedge clk);
        hb_cfg_we = 1; hb_cfg_idx = 6'(i);
        hb_cfg_entry.valid   = 1'b1;
        hb_cfg_entry.pattern = aes_ref_pkg::encrypt(k1, i == 0 ? HB1 : HB2);
        hb_cfg_entry.tmin    = hb_time_t'(i == 0 ? T1 - 20 : T2 - 20);
        hb_cfg_entry.tmax    = hb_time_t'(i == 0 ? 2 * T1 : 2 * T2);
        n_table_load++;
      end
      @(negedge clk); hb_cfg_we = 0;
    end
    while (!(ig_key_ready && og_key_ready)) @(negedge clk);
    if (fetch) begin
      // the table as the compiler would place it in memory at 0x0004_0000
      for (int i = 0; i < 2; i++) begin
        mem.store[32'h0004_0000 + 32'(32 * i)] =
          aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, i == 0 ? HB1 : HB2));
        mem.store[32'h0004_0000 + 32'(32 * i + 16)] = aes_ref_pkg::encrypt(k2,
          block_t'({hb_time_t'(i == 0 ? T1 - 20 : T2 - 20), hb_time_t'(i == 0 ? 2 * T1 : 2 * T2)}));
      end
      @(negedge clk);
      hb_fetch_base = 32'h0004_0000; hb_fetch_count = 7'd2; hb_fetch_start = 1;
      while (!hb_fetch_busy) @(negedge clk);
      hb_fetch_start = 0;
      while (hb_fetch_busy) @(negedge clk);
      for (int i = 0; i < 2; i++)
        check(dut.u_outer.u_table.valid_q[i] &&
              dut.u_outer.u_table.pat_q[i] == aes_ref_pkg::encrypt(k1, i == 0 ? HB1 : HB2) &&
              dut.u_outer.u_table.tmax_q[i] == hb_time_t'(i == 0 ? 2 * T1 : 2 * T2),
              $sformatf("table entry %0d fetched from memory", i));
      n_table_fetch++;
    end
  endtask

  // One basic block of the program: heartbeat, then work, padded to t cycles.
  task automatic basic_block(input block_t hb, input int t, input int seed);
    int start_t;
    block_t d, r;
    addr_t a;
    start_t = int'($time / 10);
    cpu_store(HB_ADDR, hb);
    a = 32'h0001_0000 + 32'(16 * seed);
    d = {$urandom, $urandom, $urandom, $urandom};
    cpu_store(a, d);
    cpu_load(a, r);
    check(r == d, "load inside a basic block returns the stored data");
    while (int'($time / 10) - start_t < t) @(negedge clk);
  endtask

  initial begin
    block_t d, r;
    addr_t a;
    k1 = {$urandom, $urandom, $urandom, $urandom};
    k2 = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    boot();
    check(!hb_armed && !alarm, "quiet after boot");

    // ---- 1. dual encryption of data traffic
    for (int i = 0; i < 24; i++) begin
      a = 32'h0000_4000 + 32'(16 * i);
      d = {$urandom, $urandom, $urandom, $urandom};
      cpu_store(a, d);
      drain();
      check(mem.store.exists(a) &&
            mem.store[a] == aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, d)),
            $sformatf("store %0d doubly enciphered", i));
      check(mem.store[a] != d && mem.store[a] != aes_ref_pkg::encrypt(k1, d),
            "memory holds neither plaintext nor single-key ciphertext");
      n_enc_store++;
    end
    for (int i = 0; i < 24; i++) begin
      a = 32'h0000_4000 + 32'(16 * i);
      cpu_load(a, r);
      check(aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, r)) == mem.store[a],
            $sformatf("load %0d doubly deciphered", i));
      n_dec_load++;
    end
    // a burst of stores (e.g. a cache write-back) with no wait in between:
    // the guards overlap them, and bus back-pressure stalls the CPU
    for (int i = 0; i < 32; i++) begin
      a = 32'h0000_6000 + 32'(16 * i);
      cpu_store(a, {4{32'(i) ^ 32'h5a5a_0000}});
    end
    drain();
    for (int i = 0; i < 32; i++) begin
      a = 32'h0000_6000 + 32'(16 * i);
      check(mem.store[a] == aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, {4{32'(i) ^ 32'h5a5a_0000}})),
            $sformatf("burst store %0d doubly enciphered", i));
    end
    // a block written by the trusted compiler into memory reads as plaintext
    d = {$urandom, $urandom, $urandom, $urandom};
    mem.store[32'h0000_8000] = aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, d));
    cpu_load(32'h0000_8000, r);
    check(r == d, "compiler-encrypted block loads as plaintext");
    check(!hb_armed && !alarm, "data traffic alone does not arm the heartbeat timer");

    // ---- 2. heartbeat program (worked example): HB1 block, LIMIT x HB2 blocks, exit
    basic_block(HB1, T1, 0);
    check(hb_armed, "first heartbeat arms the timer");
    for (int i = 0; i < LIMIT; i++) begin
      basic_block(HB2, T2, i + 1);
      check(!alarm, $sformatf("no alarm in loop iteration %0d", i));
    end
    check(mem.store[HB_ADDR] == aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, HB2)),
          "heartbeat stores are doubly enciphered in memory too");
    // exit(0): no heartbeat
    begin
      int waited;
      waited = 0;
      while (!alarm && waited < 4 * T2) begin @(negedge clk); waited++; end
      check(alarm_timeout && !alarm_early, "missing heartbeat after exit raises the timeout alarm");
      check(waited > T2 - 40 && waited <= 2 * T2, $sformatf("alarm %0d cycles after the last block", waited));
      if (alarm_timeout) n_timeout++;
    end

    // ---- 3. Trojan in the inner guard writes plaintext past its cipher
    boot();
    basic_block(HB1, T1, 20);
    check(hb_armed && !alarm, "armed before the Trojan activates");
    d = 128'hDEAD_BEEF_0123_4567_89AB_CDEF_0011_2233;   // secret the Trojan leaks
    force dut.u_inner.u_enc.dout = d;
    cpu_store(32'h0000_9000, d);
    drain();
    check(mem.store[32'h0000_9000] == aes_ref_pkg::encrypt(k2, d), "leaked block still enciphered by outer guard");
    check(mem.store[32'h0000_9000] != d, "no plaintext on the bus");
    if (mem.store[32'h0000_9000] != d) n_leak_blocked++;
    force dut.u_inner.u_enc.dout = HB2;                 // heartbeat passes unencrypted
    cpu_store(HB_ADDR, HB2);
    drain();
    release dut.u_inner.u_enc.dout;
    begin
      int waited;
      waited = 0;
      while (!alarm && waited < 4 * T1) begin @(negedge clk); waited++; end
      check(alarm_timeout, "unencrypted heartbeat is not recognised: timeout alarm");
      if (alarm_timeout) n_timeout++;
    end

    // ---- 4. replayed heartbeat inside the window's closed part: early alarm
    //         (table fetched from memory this time)
    boot(1'b1);
    basic_block(HB1, T1, 30);
    cpu_store(HB_ADDR, HB2);
    cpu_store(HB_ADDR, HB2);
    drain();
    check(alarm_early, "heartbeat before its window opens raises the early alarm");
    if (alarm_early) n_early++;

    // ---- mechanism coverage
    $display("table_fetches=%0d", n_table_fetch);
    $display("keys=%0d table=%0d enc_stores=%0d dec_loads=%0d hb_hits=%0d hb_misses=%0d",
             n_key_load, n_table_load, n_enc_store, n_dec_load, n_hb_hit, n_hb_miss);
    $display("timeouts=%0d early=%0d cpu_stalls=%0d bus_stalls=%0d leaks_blocked=%0d",
             n_timeout, n_early, n_cpu_stall, n_bus_stall, n_leak_blocked);
    check(n_key_load > 0, "key loading exercised");
    check(n_table_load > 0, "table loading exercised");
    check(n_table_fetch > 0, "table fetch from memory exercised");
    check(n_enc_store > 0 && n_dec_load > 0, "dual encryption exercised");
    check(n_hb_hit >= LIMIT + 1, "heartbeats matched");
    check(n_hb_miss > 0, "unmatched heartbeat seen");
    check(n_timeout >= 2, "timeout alarm exercised");
    check(n_early > 0, "early alarm exercised");
    check(n_cpu_stall > 0, "CPU held off by back-pressure through the guards");
    check(n_bus_stall > 0, "bus back-pressure seen");
    check(n_leak_blocked > 0, "leak through the inner guard blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
