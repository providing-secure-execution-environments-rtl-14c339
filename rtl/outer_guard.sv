// outer_guard: the guard between the inner guard and the system bus.
//
// It does two jobs. (1) Encryption: like the inner guard it enciphers every
// store, here with the Outer-key, and deciphers every load before passing it
// inward, so that whatever the CPU or inner guard emits reaches the bus only
// under the Outer-key. (2) Heartbeat checking: every store that arrives from
// the inner guard for the non-cacheable heartbeat region (address & HB_MASK ==
// HB_BASE) is looked up, still under the Inner-key only, in the heartbeat
// table; a match restarts the countdown timer with that heartbeat's window,
// and a timer that runs out (or a heartbeat that comes too early) raises the
// attack alarm. The lookup runs beside the store path and never delays it.
// Heartbeat stores are otherwise ordinary stores and go on to memory.
//
// Interface: up faces the inner guard, dn faces the bus; key_load/key_in load
// the Outer-key (only while idle); the table is filled at boot either through
// cfg_* or by fetching it from memory (fetch_*, see hb_fetch); alarm outputs
// are sticky until reset. fetch_start is a level: the fetch begins at the
// first clock in which the guard is idle and no request is waiting on up, and
// fetch_busy then stays high until the last entry is written; the caller drops
// fetch_start once it sees fetch_busy. While fetching, the guard takes no
// request from up and its own loads use the request path to the bus. Timing: the table answers in the cycle after the
// store is accepted and the timer acts on that answer.
// The two jobs, the table/timer pair and the two ways of filling the table
// follow the design; the region defaults, table size, timer width and the
// fetch handshake are this design's choices.
module outer_guard
  import shade_pkg::*;
#(
  parameter key_t        RESET_KEY  = '0,
  parameter addr_t       HB_BASE    = 32'hFFFF_0000,
  parameter addr_t       HB_MASK    = 32'hFFFF_0000,
  parameter int unsigned HB_ENTRIES = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      key_load,
  input  key_t      key_in,
  output logic      key_ready,
  output logic      idle,           // no request or answer inside the guard
  input  logic      cfg_we,
  input  logic [$clog2(HB_ENTRIES)-1:0] cfg_idx,
  input  hb_entry_t cfg_entry,
  input  logic      fetch_start,
  input  addr_t     fetch_base,
  input  logic [$clog2(HB_ENTRIES):0] fetch_count,
  output logic      fetch_busy,
  output logic      hb_armed,
  output hb_time_t  hb_remaining,   // cycles left before the timeout alarm
  output logic      alarm_timeout,
  output logic      alarm_early,
  output logic      alarm,
  mem_if.slave      up,
  mem_if.master     dn
);

  logic     hb_store;
  logic     res_valid, res_hit;
  hb_time_t res_tmin, res_tmax;

  logic      crypt_idle, f_start, f_req_valid, f_we, tbl_we;
  addr_t     f_req_addr;
  logic [$clog2(HB_ENTRIES)-1:0] f_idx, tbl_idx;
  hb_entry_t f_entry, tbl_entry;

  // The cipher pair sees either the inner guard or the table fetcher.
  mem_if cg_up (.clk, .rst_n);

  assign cg_up.req_valid = fetch_busy ? f_req_valid : up.req_valid;
  assign cg_up.req_write = fetch_busy ? 1'b0        : up.req_write;
  assign cg_up.req_addr  = fetch_busy ? f_req_addr  : up.req_addr;
  assign cg_up.req_data  = fetch_busy ? '0          : up.req_data;
  assign up.req_ready    = !fetch_busy && cg_up.req_ready;
  assign up.rsp_valid    = !fetch_busy && cg_up.rsp_valid;
  assign up.rsp_data     = cg_up.rsp_data;

  crypt_guard #(.RESET_KEY(RESET_KEY)) u_crypt (
    .clk, .rst_n, .key_load, .key_in, .key_ready, .idle(crypt_idle), .up(cg_up), .dn
  );

  assign idle    = crypt_idle && !fetch_busy;
  assign f_start = fetch_start && crypt_idle && key_ready && !up.req_valid;

  hb_fetch #(.ENTRIES(HB_ENTRIES)) u_fetch (
    .clk, .rst_n, .start(f_start), .base(fetch_base), .count(fetch_count), .busy(fetch_busy),
    .req_valid(f_req_valid), .req_ready(cg_up.req_ready), .req_addr(f_req_addr),
    .rsp_valid(cg_up.rsp_valid && fetch_busy), .rsp_data(cg_up.rsp_data),
    .tbl_we(f_we), .tbl_idx(f_idx), .tbl_entry(f_entry)
  );

  // Fetched entries take precedence over the configuration port.
  assign tbl_we    = f_we || cfg_we;
  assign tbl_idx   = f_we ? f_idx   : cfg_idx;
  assign tbl_entry = f_we ? f_entry : cfg_entry;

  // Snoop accepted stores to the heartbeat region on the inner side.
  assign hb_store = up.req_valid && up.req_ready && up.req_write &&
                    ((up.req_addr & HB_MASK) == HB_BASE);

  hb_table #(.ENTRIES(HB_ENTRIES)) u_table (
    .clk, .rst_n, .cfg_we(tbl_we), .cfg_idx(tbl_idx), .cfg_entry(tbl_entry),
    .lk_valid(hb_store), .lk_data(up.req_data),
    .res_valid, .res_hit, .res_tmin, .res_tmax
  );

  hb_timer u_timer (
    .clk, .rst_n, .hb_valid(res_valid), .hb_hit(res_hit),
    .hb_tmin(res_tmin), .hb_tmax(res_tmax),
    .armed(hb_armed), .remaining(hb_remaining), .alarm_timeout, .alarm_early, .alarm
  );

endmodule
