// mem_model: behavioural main memory on the far side of the bus, for the
// testbenches. Holds 128-bit blocks in a sparse array, accepts requests with a
// randomly stalled req_ready, and answers each load after LATENCY cycles (or a
// random 1..8 cycles when LATENCY is 0). Unwritten blocks read as 0. The
// testbench may read and write `store` directly to preload or inspect memory.
module mem_model
  import shade_pkg::*;
#(
  parameter int LATENCY = 0,
  parameter int STALL_PCT = 30
) (
  input logic clk,
  input logic rst_n,
  mem_if.slave bus
);
  block_t store [addr_t];
  int     wait_q;
  logic   pending;
  addr_t  pend_addr;
  int     writes = 0, reads = 0;

  logic ready_r;
  always @(posedge clk) ready_r <= !pending && ($urandom_range(99) >= STALL_PCT);
  assign bus.req_ready = ready_r && !pending;

  initial begin
    pending = 0;
    bus.rsp_valid = 0;
    bus.rsp_data  = '0;
  end

  always @(posedge clk) begin
    bus.rsp_valid <= 1'b0;
    if (!rst_n) begin
      pending <= 1'b0;
    end else if (pending) begin
      if (wait_q <= 1) begin
        bus.rsp_valid <= 1'b1;
        bus.rsp_data  <= store.exists(pend_addr) ? store[pend_addr] : '0;
        pending <= 1'b0;
      end else begin
        wait_q <= wait_q - 1;
      end
    end else if (bus.req_valid && bus.req_ready) begin
      if (bus.req_write) begin
        store[bus.req_addr] = bus.req_data;
        writes++;
      end else begin
        pending   <= 1'b1;
        pend_addr <= bus.req_addr;
        wait_q    <= (LATENCY > 0) ? LATENCY : int'($urandom_range(8, 1));
        reads++;
      end
    end
  end
endmodule
