// tb_hb_table: heartbeat table loading and parallel lookup.
// Fills the table with random signatures and windows, then looks up every
// stored signature (must hit with its own window, one cycle later), random
// non-stored blocks and blocks one bit away from a stored signature
// (must miss), an invalidated entry (must miss), a
// duplicate signature (lowest index wins) and checks that reset empties the
// table.
module tb_hb_table;
  import shade_pkg::*;
  localparam int N = 64;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [$clog2(N)-1:0] cfg_idx = '0;
  hb_entry_t cfg_entry = '0;
  logic lk_valid = 0;
  block_t lk_data = '0;
  logic res_valid, res_hit;
  hb_time_t res_tmin, res_tmax;
  int checks = 0, failures = 0;

  hb_entry_t model [N];

  hb_table #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input int i, input hb_entry_t e);
    @(negedge clk); cfg_we = 1; cfg_idx = 6'(i); cfg_entry = e;
    @(negedge clk); cfg_we = 0;
    model[i] = e;
  endtask

  task automatic lookup(input block_t d, input bit exp_hit, input hb_time_t emin, input hb_time_t emax,
                        input string what);
    @(negedge clk); lk_valid = 1; lk_data = d;
    @(negedge clk); lk_valid = 0; lk_data = ~d;
    check(res_valid, {what, ": result one cycle later"});
    check(res_hit == exp_hit, {what, ": hit"});
    if (exp_hit) check(res_tmin == emin && res_tmax == emax, {what, ": window"});
    @(negedge clk);
    check(!res_valid, {what, ": result is a pulse"});
  endtask

  initial begin
    hb_entry_t e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      e.valid = 1;
      e.pattern = {$urandom, $urandom, $urandom, $urandom};
      e.tmin = hb_time_t'($urandom);
      e.tmax = hb_time_t'($urandom);
      write(i, e);
    end
    for (int i = 0; i < N; i++)
      lookup(model[i].pattern, 1, model[i].tmin, model[i].tmax, $sformatf("entry %0d", i));
    for (int i = 0; i < 20; i++)
      lookup({$urandom, $urandom, $urandom, $urandom}, 0, 0, 0, "random block");
    // near misses: one flipped bit anywhere in the signature must miss
    for (int i = 0; i < 32; i++) begin
      block_t d;
      d = model[i].pattern;
      d[127 - i] ^= 1'b1;
      lookup(d, 0, 0, 0, $sformatf("near miss high %0d", i));
      d = model[i].pattern;
      d[$urandom_range(127)] ^= 1'b1;
      lookup(d, 0, 0, 0, $sformatf("near miss random %0d", i));
    end
    // invalidate entry 5
    e = model[5]; e.valid = 0; write(5, e);
    lookup(e.pattern, 0, 0, 0, "invalidated entry");
    // duplicate signature in entries 9 and 40: entry 9 wins
    e = model[40]; e.pattern = model[9].pattern; write(40, e);
    lookup(model[9].pattern, 1, model[9].tmin, model[9].tmax, "duplicate signature");
    // reset clears the table
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    lookup(model[3].pattern, 0, 0, 0, "after reset");
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
