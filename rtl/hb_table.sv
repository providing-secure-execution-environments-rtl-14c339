// hb_table: the outer guard's heartbeat table.
//
// The compiler puts a store to a non-cacheable address at the start of every
// extended basic block. The value stored, as it looks after the inner guard
// has enciphered it with the Inner-key, is that heartbeat's signature. The
// table pairs each signature with the window of cycles in which the next
// heartbeat must arrive: tmax is the timeout the design describes; tmin is the
// lower end of the "range between best and worst-case" it mentions, and 0
// turns that check off.
//
// Loading: at boot, entry cfg_idx is written with cfg_entry when cfg_we is
// high (the design allows the table to be set up directly or fetched from
// memory; the source of the writes is outside this block). Reset clears
// every valid bit.
//
// Lookup: all entries are compared with lk_data at once, off the memory path.
// lk_valid in one cycle gives res_valid in the next, with res_hit and the
// matching entry's window; if several entries match, the lowest index wins.
// ENTRIES is this design's choice; the document only calls the table small.
module hb_table
  import shade_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // configuration port
  input  logic      cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  hb_entry_t cfg_entry,
  // lookup
  input  logic      lk_valid,
  input  block_t    lk_data,
  output logic      res_valid,
  output logic      res_hit,
  output hb_time_t  res_tmin,
  output hb_time_t  res_tmax
);

  logic     valid_q [ENTRIES];
  block_t   pat_q   [ENTRIES];
  hb_time_t tmin_q  [ENTRIES];
  hb_time_t tmax_q  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else if (cfg_we) begin
      valid_q[cfg_idx] <= cfg_entry.valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      pat_q[cfg_idx]  <= cfg_entry.pattern;
      tmin_q[cfg_idx] <= cfg_entry.tmin;
      tmax_q[cfg_idx] <= cfg_entry.tmax;
    end
  end

  // parallel match, lowest index first
  logic     hit;
  hb_time_t hit_min, hit_max;
  always_comb begin
    hit     = 1'b0;
    hit_min = '0;
    hit_max = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && pat_q[i] == lk_data) begin
        hit     = 1'b1;
        hit_min = tmin_q[i];
        hit_max = tmax_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_tmin  <= '0;
      res_tmax  <= '0;
    end else begin
      res_valid <= lk_valid;
      res_hit   <= lk_valid && hit;
      res_tmin  <= hit_min;
      res_tmax  <= hit_max;
    end
  end

endmodule
