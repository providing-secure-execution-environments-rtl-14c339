// tb_hb_workload: a long heartbeat stream shaped like embedded benchmark code,
// run through the full guard chain at its default parameters.
//
// The program is synthetic: 3000 basic blocks whose lengths range from 2 to
// 842 instructions, mostly short (83.5% of 2..12, 15.3% of 13..60, 1.2% of
// 61..842 instructions), so that a heartbeat comes about every 17
// instructions on average. The CPU is taken to run one instruction per CPU clock at twice
// the guard clock, so a block of L instructions lasts ceil(L/2) guard cycles.
// About one block in 50 also does a load that goes all the way to memory and
// back through both guards. Heartbeat values name a length class (block
// lengths up to 2^k guard cycles, k = 0..9) as a compiler could do, so the
// table needs only ten entries; each window is [0, 2^k + 150] cycles, the
// slack covering the load.
//
// Checks: every heartbeat is recognised, no alarm is raised over the whole
// run, and once heartbeats stop the timeout alarm follows within the last
// window. Prints the stream's measured statistics.
module tb_hb_workload;
  import shade_pkg::*;
  localparam addr_t HB_ADDR = 32'hFFFF_0200;
  localparam int NBLK = 3000, NCLASS = 10, SLACK = 150;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0, cpu_rsp_valid;
  addr_t cpu_req_addr = '0;
  block_t cpu_req_data = '0, cpu_rsp_data;
  logic ig_key_load = 0, og_key_load = 0, ig_key_ready, og_key_ready, ig_idle, og_idle;
  key_t ig_key = '0, og_key = '0;
  logic hb_cfg_we = 0;
  logic [5:0] hb_cfg_idx = '0;
  hb_entry_t hb_cfg_entry = '0;
  logic hb_fetch_busy;
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
    .hb_fetch_start(1'b0), .hb_fetch_base('0), .hb_fetch_count('0), .hb_fetch_busy,
    .hb_armed, .hb_remaining, .alarm_timeout, .alarm_early, .alarm
  );
  mem_model mem (.clk, .rst_n, .bus(bus.slave));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hits = 0, n_miss = 0, n_loads = 0;
  longint instr_total = 0;
  key_t k1, k2;

  always @(posedge clk)
    if (rst_n && dut.u_outer.u_table.res_valid) begin
      if (dut.u_outer.u_table.res_hit) n_hits++; else n_miss++;
    end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic block_t hb_value(input int k);
    return {32'h4842_0000, 32'(k), 64'h0};
  endfunction

  function automatic int class_of(input int cycles);
    int k;
    k = 0;
    while ((1 << k) < cycles) k++;
    return k;
  endfunction

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

  initial begin
    int len, cyc_len, k, t0;
    block_t d;
    k1 = {$urandom, $urandom, $urandom, $urandom};
    k2 = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ig_key = k1; og_key = k2; ig_key_load = 1; og_key_load = 1;
    @(negedge clk); ig_key_load = 0; og_key_load = 0;
    for (int c = 0; c < NCLASS; c++) begin
      @(negedge clk);
      hb_cfg_we = 1; hb_cfg_idx = 6'(c);
      hb_cfg_entry = '{valid: 1'b1, pattern: aes_ref_pkg::encrypt(k1, hb_value(c)),
                       tmin: '0, tmax: hb_time_t'((1 << c) + SLACK)};
    end
    @(negedge clk); hb_cfg_we = 0;
    while (!(ig_key_ready && og_key_ready)) @(negedge clk);
    // preload memory with one doubly enciphered block for the loads
    mem.store[32'h0000_1000] = aes_ref_pkg::encrypt(k2, aes_ref_pkg::encrypt(k1, 128'h1234));

    for (int b = 0; b < NBLK; b++) begin
      int r;
      r = $urandom_range(999);
      if (r < 835)      len = $urandom_range(12, 2);
      else if (r < 988) len = $urandom_range(60, 13);
      else             len = $urandom_range(842, 61);
      instr_total += longint'(len);
      cyc_len = (len + 1) / 2;
      k = class_of(cyc_len);
      t0 = int'($time / 10);
      cpu_store(HB_ADDR, hb_value(k));
      if ($urandom_range(49) == 0) begin
        cpu_load(32'h0000_1000, d);
        check(d == 128'h1234, "load inside the workload");
        n_loads++;
      end
      while (int'($time / 10) - t0 < cyc_len) @(negedge clk);
      if (alarm) begin
        check(0, $sformatf("alarm during block %0d", b));
        break;
      end
    end
    repeat (20) @(negedge clk);
    check(!alarm, "no alarm over the whole stream");
    check(n_hits == NBLK, $sformatf("%0d of %0d heartbeats recognised", n_hits, NBLK));
    check(n_miss == 0, "no unrecognised heartbeat");
    // heartbeats stop
    t0 = 0;
    while (!alarm && t0 < (1 << NCLASS) + 2 * SLACK) begin @(negedge clk); t0++; end
    check(alarm_timeout, "timeout after the stream ends");
    check(instr_total >= 53 * NBLK / 10 && instr_total <= 445 * NBLK / 10,
          "stream spacing inside the 5.3..44.5 instructions per heartbeat range");
    $display("blocks=%0d instructions=%0d instructions_per_heartbeat=%0.1f loads=%0d",
             NBLK, instr_total, real'(instr_total) / NBLK, n_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
