// tb_outer_guard: outer guard between a driver standing in for the inner
// guard and a behavioural memory.
// Checks: stores reach memory as E(outer key, data) and loads are deciphered;
// heartbeat-region stores whose value is in the table arm and reload the
// timer, while the same value stored outside the region does not; a store to
// the region with a value not in the table does not reload it and the timer
// then raises the timeout alarm at the cycle the window predicts; a heartbeat
// that comes before its window opens raises the early alarm; the heartbeat
// lookup does not slow the store path; the table can be fetched from memory
// (entries land with the right signature and window, the guard takes no
// request while fetching, and a fetched heartbeat works like a loaded one).
module tb_outer_guard;
  import shade_pkg::*;
  localparam addr_t HB_ADDR = 32'hFFFF_0040;

  logic clk = 0, rst_n = 0, key_load = 0, key_ready, idle;
  key_t key_in = '0;
  logic cfg_we = 0;
  logic [5:0] cfg_idx = '0;
  hb_entry_t cfg_entry = '0;
  logic fetch_start = 0, fetch_busy;
  addr_t fetch_base = '0;
  logic [6:0] fetch_count = '0;
  logic hb_armed, alarm_timeout, alarm_early, alarm;
  hb_time_t hb_remaining;
  key_t key;
  block_t sig [4];
  int checks = 0, failures = 0;

  mem_if up (.clk, .rst_n);
  mem_if dn (.clk, .rst_n);

  outer_guard dut (.clk, .rst_n, .key_load, .key_in, .key_ready, .idle, .cfg_we, .cfg_idx, .cfg_entry,
                   .fetch_start, .fetch_base, .fetch_count, .fetch_busy,
                   .hb_armed, .hb_remaining, .alarm_timeout, .alarm_early, .alarm,
                   .up(up.slave), .dn(dn.master));
  mem_model #(.STALL_PCT(0), .LATENCY(3)) mem (.clk, .rst_n, .bus(dn.slave));

  always #5 clk = ~clk;

  // cycle stamps: acc_cyc = cycle in which the last heartbeat-region store was
  // accepted, alarm_cyc = first cycle in which alarm_timeout is high
  int cyc = 0, acc_cyc = 0, alarm_cyc = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (up.req_valid && up.req_ready && up.req_write && up.req_addr[31:16] == 16'hFFFF)
      acc_cyc <= cyc;
    if (!rst_n) alarm_cyc <= -1;
    else if (alarm_timeout && alarm_cyc < 0) alarm_cyc <= cyc;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // store; returns the number of cycles from issue until the memory port sees it
  task automatic store(input addr_t a, input block_t d, output int n);
    @(negedge clk);
    up.req_valid = 1; up.req_write = 1; up.req_addr = a; up.req_data = d;
    n = 0;
    do begin @(posedge clk); n++; end while (!up.req_ready);
    @(negedge clk);
    up.req_valid = 0;
    while (!(dn.req_valid && dn.req_ready)) begin @(negedge clk); n++; end
    @(negedge clk);
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

  task automatic setup();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk); key_in = key; key_load = 1;
    @(negedge clk); key_load = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = 6'(i);
      cfg_entry = '{valid: 1'b1, pattern: sig[i], tmin: hb_time_t'(i == 3 ? 40 : 0), tmax: hb_time_t'(100)};
    end
    @(negedge clk); cfg_we = 0;
    while (!key_ready) @(negedge clk);
  endtask

  initial begin
    block_t d, r;
    int n, n_plain, t0, t1;
    up.req_valid = 0; up.req_write = 0; up.req_addr = '0; up.req_data = '0;
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 4; i++) sig[i] = {$urandom, $urandom, $urandom, $urandom};
    setup();

    // encryption layer
    for (int i = 0; i < 16; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      store(32'h2000 + 32'(16 * i), d, n);
      check(mem.store[32'h2000 + 32'(16 * i)] == aes_ref_pkg::encrypt(key, d), "store under outer key");
      load(32'h2000 + 32'(16 * i), r);
      check(r == d, "load deciphered");
    end
    store(32'h3000, sig[0], n_plain);
    check(!hb_armed, "table value outside heartbeat region is no heartbeat");

    // heartbeats: first arms, each reloads the countdown
    store(HB_ADDR, sig[0], n);
    check(n == n_plain, $sformatf("heartbeat store not delayed (%0d vs %0d)", n, n_plain));
    @(negedge clk);
    check(hb_armed, "heartbeat arms the timer");
    check(mem.store[HB_ADDR] == aes_ref_pkg::encrypt(key, sig[0]), "heartbeat store reaches memory");
    for (int i = 0; i < 6; i++) begin
      repeat (50) @(negedge clk);
      store(HB_ADDR + 32'h10, sig[i % 3], n);
      @(negedge clk);
      check(hb_remaining > hb_time_t'(80) && hb_remaining < hb_time_t'(100), "countdown reloaded");
    end
    check(!alarm, "regular heartbeats raise no alarm");

    // wrongly enciphered heartbeat: no reload, then timeout
    store(HB_ADDR, ~sig[1], n);
    t0 = 0;
    while (!alarm_timeout && t0 < 300) begin @(negedge clk); t0++; end
    check(alarm_timeout && !alarm_early, "unmatched heartbeat leads to timeout alarm");
    check(t0 > 60 && t0 < 100, $sformatf("timeout came %0d cycles after the bad store", t0));

    // exact timeout: last good heartbeat, then silence
    setup();
    store(HB_ADDR, sig[2], n);
    t1 = 0;
    while (!alarm_timeout && t1 < 300) begin @(negedge clk); t1++; end
    repeat (2) @(negedge clk);
    // accepted in cycle A, table answer in A+1, last legal heartbeat cycle
    // A+1+100, alarm visible one cycle later
    check(alarm_timeout && alarm_cyc - acc_cyc == 102,
          $sformatf("alarm %0d cycles after the heartbeat store, expected 102", alarm_cyc - acc_cyc));

    // early heartbeat: entry 3 has tmin = 40
    setup();
    store(HB_ADDR, sig[3], n);
    store(HB_ADDR, sig[0], n);
    @(negedge clk);
    check(alarm_early, "heartbeat before the window opens raises the early alarm");
    check(alarm, "alarm output");

    // table fetched from memory: three entries at 0x8000, tmax 60 + 10*i
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk); key_in = key; key_load = 1;
    @(negedge clk); key_load = 0;
    while (!key_ready) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      mem.store[32'h8000 + 32'(32 * i)]      = aes_ref_pkg::encrypt(key, ~sig[i]);
      mem.store[32'h8000 + 32'(32 * i + 16)] =
        aes_ref_pkg::encrypt(key, block_t'({hb_time_t'(5 * i), hb_time_t'(60 + 10 * i)}));
    end
    fetch_base = 32'h8000; fetch_count = 7'd3; fetch_start = 1;
    @(negedge clk);
    check(fetch_busy, "fetch starts");
    fetch_start = 0;
    // a store offered during the fetch must wait for its end
    up.req_valid = 1; up.req_write = 1; up.req_addr = 32'h2400; up.req_data = '1;
    t0 = 0;
    while (fetch_busy && t0 < 500) begin
      @(posedge clk);
      if (up.req_ready && fetch_busy) check(0, "request taken during the fetch");
      @(negedge clk); t0++;
    end
    check(!fetch_busy, "fetch ends");
    while (!up.req_ready) @(negedge clk);
    @(posedge clk); @(negedge clk);
    up.req_valid = 0;
    for (int i = 0; i < 3; i++) begin
      check(dut.u_table.valid_q[i] && dut.u_table.pat_q[i] == ~sig[i] &&
            dut.u_table.tmin_q[i] == hb_time_t'(5 * i) && dut.u_table.tmax_q[i] == hb_time_t'(60 + 10 * i),
            $sformatf("fetched entry %0d", i));
    end
    check(!dut.u_table.valid_q[3], "no entry beyond the fetched count");
    store(HB_ADDR, ~sig[1], n);
    @(negedge clk);
    check(hb_armed && !alarm, "fetched heartbeat arms the timer");
    t0 = 0;
    while (!alarm_timeout && t0 < 300) begin @(negedge clk); t0++; end
    check(alarm_timeout && t0 > 50 && t0 < 70, $sformatf("fetched window times out (%0d)", t0));

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
