// tb_hb_timer: heartbeat countdown against a reference written in terms of
// elapsed cycles: a matched heartbeat in cycle c is legal if the previous one
// was in cycle p with tmin <= c - p (else early alarm), and a timeout alarm is
// due in cycle p + tmax when no heartbeat comes. Directed cases cover the exact
// window edges, the disarmed state before the first heartbeat and an unmatched
// heartbeat-region store; random runs with resets in between cover the rest.
module tb_hb_timer;
  import shade_pkg::*;

  logic clk = 0, rst_n = 0;
  logic hb_valid = 0, hb_hit = 0;
  hb_time_t hb_tmin = '0, hb_tmax = '0;
  logic armed, alarm_timeout, alarm_early, alarm;
  hb_time_t remaining;
  int checks = 0, failures = 0;
  int n_timeout = 0, n_early = 0;

  hb_timer dut (.*);

  always #5 clk = ~clk;

  // reference state
  bit r_armed, r_to, r_early;
  longint cyc, r_last;
  int r_min, r_max;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0; hb_valid = 0; hb_hit = 0;
    @(negedge clk); rst_n = 1;
    r_armed = 0; r_to = 0; r_early = 0;
  endtask

  // Drive one cycle with the given inputs, update the reference, compare.
  task automatic step(input bit v, input bit h, input int tmin, input int tmax);
    hb_valid = v; hb_hit = h; hb_tmin = hb_time_t'(tmin); hb_tmax = hb_time_t'(tmax);
    if (v && h) begin
      if (r_armed && (cyc - r_last) < r_min) r_early = 1;
      r_armed = 1; r_last = cyc; r_min = tmin; r_max = tmax;
    end else if (r_armed && (cyc - r_last) >= r_max) begin
      r_to = 1;
    end
    @(negedge clk);
    cyc++;
    check(alarm_timeout == r_to, $sformatf("timeout alarm %0b expected %0b", alarm_timeout, r_to));
    check(alarm_early == r_early, $sformatf("early alarm %0b expected %0b", alarm_early, r_early));
    check(alarm == (r_to | r_early), "alarm is the OR");
    check(armed == r_armed, "armed");
  endtask

  task automatic idle(input int n);
    repeat (n) step(0, 0, 0, 0);
  endtask

  initial begin
    cyc = 0;
    repeat (2) @(negedge clk);
    do_reset();
    // disarmed: nothing expected before the first heartbeat
    idle(100);
    check(!alarm, "no alarm while disarmed");
    // beats exactly tmax apart are accepted
    step(1, 1, 0, 20);
    for (int i = 0; i < 5; i++) begin idle(19); step(1, 1, 0, 20); end
    check(!alarm, "beats tmax apart accepted");
    check(remaining == 19, "countdown loaded");
    // one cycle late: timeout
    idle(21);
    check(alarm_timeout, "late beat times out");
    if (alarm_timeout) n_timeout++;
    do_reset();
    // early window edge
    step(1, 1, 10, 30); idle(9); step(1, 1, 10, 30);
    check(!alarm, "beat tmin after previous accepted");
    idle(8); step(1, 1, 10, 30);
    check(alarm_early, "beat before tmin flagged early");
    if (alarm_early) n_early++;
    do_reset();
    // an unmatched heartbeat-region store does not keep the program alive
    step(1, 1, 0, 15);
    for (int i = 0; i < 4; i++) begin idle(3); step(1, 0, 0, 15); end
    idle(10);
    check(alarm_timeout, "unmatched stores end in a timeout");
    do_reset();
    // random runs
    for (int run = 0; run < 40; run++) begin
      int tmin, tmax;
      tmax = $urandom_range(40, 2);
      tmin = $urandom_range(tmax / 2);
      for (int i = 0; i < 300; i++) begin
        bit b;
        b = ($urandom_range(99) < 8);
        step(b, b ? ($urandom_range(9) != 0) : 0, tmin, tmax);
      end
      if (alarm_timeout) n_timeout++;
      if (alarm_early) n_early++;
      do_reset();
    end
    check(n_timeout > 2 && n_early > 2, "both alarms exercised");
    $display("timeouts=%0d early=%0d", n_timeout, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
