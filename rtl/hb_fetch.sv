// hb_fetch: loads the heartbeat table from memory when the outer guard is
// configured.
//
// On a start pulse it reads `count` entries from memory, starting at `base`.
// Each entry takes two consecutive 128-bit blocks (byte addresses 16 apart):
//   block 0: the heartbeat value, stored like any other program data, i.e.
//            under both keys; the outer guard's inverse cipher removes the
//            Outer-key layer and leaves E(Inner-key, value), the signature;
//   block 1: the window, stored under the Outer-key only, so that the outer
//            guard can read it; after deciphering, bits [2*TIME_W-1:TIME_W]
//            are tmin and bits [TIME_W-1:0] are tmax, the rest is ignored.
// Entry i goes to table index i. The reads are issued one per clock through
// the outer guard's own request path (so they are deciphered with the
// Outer-key on the way back) and the answers come back in order.
//
// Interface: req_* issues loads and waits on req_ready; rsp_* are the
// deciphered answers; tbl_* writes the table; busy is high from the start
// pulse until the last entry has been written. A start while busy is
// ignored. Timing: with an always-ready path, 2*count clocks of requests; the
// last entry is written in the cycle its window block comes back.
// That the table can be fetched from memory follows the design; the memory
// layout and how each part is enciphered are this design's choices.
module hb_fetch
  import shade_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  addr_t            base,
  input  logic [IDX_W:0]   count,      // entries to fetch, 0..ENTRIES
  output logic             busy,
  output logic             req_valid,
  input  logic             req_ready,
  output addr_t            req_addr,
  input  logic             rsp_valid,
  input  block_t           rsp_data,
  output logic             tbl_we,
  output logic [IDX_W-1:0] tbl_idx,
  output hb_entry_t        tbl_entry
);

  logic [IDX_W+1:0] n_blocks_q;        // 2*count
  logic [IDX_W+1:0] sent_q, got_q;
  addr_t            base_q;
  block_t           pattern_q;

  assign req_valid = busy && (sent_q != n_blocks_q);
  assign req_addr  = base_q + addr_t'({sent_q, 4'b0000});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      n_blocks_q <= '0;
      sent_q     <= '0;
      got_q      <= '0;
      base_q     <= '0;
    end else if (!busy) begin
      if (start && count != '0) begin
        busy       <= 1'b1;
        n_blocks_q <= {count, 1'b0};
        sent_q     <= '0;
        got_q      <= '0;
        base_q     <= base;
      end
    end else begin
      if (req_valid && req_ready) sent_q <= sent_q + 1'b1;
      if (rsp_valid) begin
        got_q <= got_q + 1'b1;
        if (got_q + 1'b1 == n_blocks_q) busy <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk)
    if (busy && rsp_valid && !got_q[0]) pattern_q <= rsp_data;

  assign tbl_we    = busy && rsp_valid && got_q[0];
  assign tbl_idx   = got_q[IDX_W:1];
  assign tbl_entry = '{valid:   1'b1,
                       pattern: pattern_q,
                       tmin:    rsp_data[2*TIME_W-1:TIME_W],
                       tmax:    rsp_data[TIME_W-1:0]};

endmodule
