// mem_if: one memory-access link of the guard chain (CPU -> inner guard ->
// outer guard -> bus). The same bundle appears on every hop, so it is an
// interface.
//
// Request channel, valid/ready: a transfer happens in a cycle where req_valid
// and req_ready are both high. req_write selects a store of req_data (one
// 128-bit block) or a load. Response channel: a load is answered later by one
// cycle of rsp_valid with rsp_data; the requester must always accept it, and
// answers come back in request order. Stores get no response. The handshake
// and widths are this design's choices; the document fixes only that every
// load and store crosses each hop.
interface mem_if
  import shade_pkg::*;
(
  input logic clk,
  input logic rst_n
);
  logic   req_valid;
  logic   req_ready;
  logic   req_write;
  addr_t  req_addr;
  block_t req_data;
  logic   rsp_valid;
  block_t rsp_data;

  // Requester side (towards the CPU)
  modport master (output req_valid, req_write, req_addr, req_data,
                  input  req_ready, rsp_valid, rsp_data);
  // Responder side (towards memory)
  modport slave  (input  req_valid, req_write, req_addr, req_data,
                  output req_ready, rsp_valid, rsp_data);

  // A request, once raised, stays raised and unchanged until it is taken.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req_write) && $stable(req_addr)
                                  && (!req_write || $stable(req_data)));
endinterface
