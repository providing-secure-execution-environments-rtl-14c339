// shade_top: the two-guard chain that sits between a CPU and the system bus.
//
// The CPU's memory port enters the inner guard, whose output enters the outer
// guard, whose output is the bus port. Stores leave as E(sk2, E(sk1, w)),
// loads come back as D(sk1, D(sk2, r)). The outer guard watches the stores
// that the inner guard emits to the heartbeat region and raises alarm when the
// compiler-inserted heartbeats stop, arrive out of their window or arrive
// wrongly enciphered. In a real board the two guards are separate chips from
// different foundries; here they are two instances with no connection other
// than the memory link between them.
//
// Ports: cpu_* is the CPU side of the chain (request valid/ready, load
// response), mem_* the bus side; ig_key_*/og_key_* load the Inner- and
// Outer-key; hb_cfg_* fill the heartbeat table, or hb_fetch_* has the outer
// guard fetch it from memory (see outer_guard and hb_fetch); the alarm outputs are sticky
// until reset. Handshakes are those of mem_if. The CPU, bus and memory are
// outside this block. One clock drives everything (the design's evaluation
// runs the guards at half the CPU clock; clock crossing is left out).
module shade_top
  import shade_pkg::*;
#(
  parameter key_t        IG_RESET_KEY = '0,
  parameter key_t        OG_RESET_KEY = '0,
  parameter addr_t       HB_BASE      = 32'hFFFF_0000,
  parameter addr_t       HB_MASK      = 32'hFFFF_0000,
  parameter int unsigned HB_ENTRIES   = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // CPU side
  input  logic      cpu_req_valid,
  output logic      cpu_req_ready,
  input  logic      cpu_req_write,
  input  addr_t     cpu_req_addr,
  input  block_t    cpu_req_data,
  output logic      cpu_rsp_valid,
  output block_t    cpu_rsp_data,
  // bus / memory side
  output logic      mem_req_valid,
  input  logic      mem_req_ready,
  output logic      mem_req_write,
  output addr_t     mem_req_addr,
  output block_t    mem_req_data,
  input  logic      mem_rsp_valid,
  input  block_t    mem_rsp_data,
  // key loading
  input  logic      ig_key_load,
  input  key_t      ig_key,
  output logic      ig_key_ready,
  output logic      ig_idle,        // key loads only while idle
  input  logic      og_key_load,
  input  key_t      og_key,
  output logic      og_key_ready,
  output logic      og_idle,
  // heartbeat table loading
  input  logic      hb_cfg_we,
  input  logic [$clog2(HB_ENTRIES)-1:0] hb_cfg_idx,
  input  hb_entry_t hb_cfg_entry,
  input  logic      hb_fetch_start,
  input  addr_t     hb_fetch_base,
  input  logic [$clog2(HB_ENTRIES):0] hb_fetch_count,
  output logic      hb_fetch_busy,
  // attack detection
  output logic      hb_armed,
  output hb_time_t  hb_remaining,
  output logic      alarm_timeout,
  output logic      alarm_early,
  output logic      alarm
);

  mem_if cpu_link (.clk, .rst_n);   // CPU <-> inner guard
  mem_if mid_link (.clk, .rst_n);   // inner guard <-> outer guard
  mem_if bus_link (.clk, .rst_n);   // outer guard <-> bus

  assign cpu_link.req_valid = cpu_req_valid;
  assign cpu_link.req_write = cpu_req_write;
  assign cpu_link.req_addr  = cpu_req_addr;
  assign cpu_link.req_data  = cpu_req_data;
  assign cpu_req_ready      = cpu_link.req_ready;
  assign cpu_rsp_valid      = cpu_link.rsp_valid;
  assign cpu_rsp_data       = cpu_link.rsp_data;

  assign mem_req_valid      = bus_link.req_valid;
  assign mem_req_write      = bus_link.req_write;
  assign mem_req_addr       = bus_link.req_addr;
  assign mem_req_data       = bus_link.req_data;
  assign bus_link.req_ready = mem_req_ready;
  assign bus_link.rsp_valid = mem_rsp_valid;
  assign bus_link.rsp_data  = mem_rsp_data;

  crypt_guard #(.RESET_KEY(IG_RESET_KEY)) u_inner (
    .clk, .rst_n, .key_load(ig_key_load), .key_in(ig_key), .key_ready(ig_key_ready), .idle(ig_idle),
    .up(cpu_link.slave), .dn(mid_link.master)
  );

  outer_guard #(
    .RESET_KEY(OG_RESET_KEY), .HB_BASE(HB_BASE), .HB_MASK(HB_MASK), .HB_ENTRIES(HB_ENTRIES)
  ) u_outer (
    .clk, .rst_n, .key_load(og_key_load), .key_in(og_key), .key_ready(og_key_ready), .idle(og_idle),
    .cfg_we(hb_cfg_we), .cfg_idx(hb_cfg_idx), .cfg_entry(hb_cfg_entry),
    .fetch_start(hb_fetch_start), .fetch_base(hb_fetch_base), .fetch_count(hb_fetch_count),
    .fetch_busy(hb_fetch_busy),
    .hb_armed, .hb_remaining, .alarm_timeout, .alarm_early, .alarm,
    .up(mid_link.slave), .dn(bus_link.master)
  );

endmodule
