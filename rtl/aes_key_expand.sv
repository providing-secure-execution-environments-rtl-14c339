// aes_key_expand: AES-128 key schedule held in registers for one guard.
//
// A guard is loaded with its secret key once, at boot. This block takes the key
// and computes the eleven round keys one per clock (FIPS-197 key expansion,
// one 128-bit round key per step), so that the guard's cipher and inverse
// cipher can both read any round key at any time. Holding the whole schedule
// costs 11 x 128 flip-flops but lets decryption run with no extra
// "last round key" pass.
//
// Interface: key_load (one-cycle pulse) with key_in starts an expansion;
// ready falls on the next clock and is high again NR (10) clock edges after
// the edge that sampled key_load (in the 12th cycle counting the key_load
// cycle), when round_keys[0..10] are all valid. A key load while an expansion runs restarts
// it. After reset the block expands RESET_KEY by itself, which models a key
// pre-loaded into the guard; a later key_load (a key read from boot ROM)
// replaces it. Both ways of obtaining a key follow the design; the reset key
// value and the one-round-key-per-cycle schedule are this design's choices.
module aes_key_expand
  import shade_pkg::*;
#(
  parameter key_t RESET_KEY = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  key_t   key_in,
  output rkeys_t round_keys,
  output logic   ready
);

  rkeys_t rk_q;
  logic [3:0] step_q;     // index of the round key computed next (1..NR)
  logic busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk_q    <= '0;
      rk_q[0] <= RESET_KEY;
      step_q  <= 4'd1;
      busy_q  <= 1'b1;
    end else if (key_load) begin
      rk_q[0] <= key_in;
      step_q  <= 4'd1;
      busy_q  <= 1'b1;
    end else if (busy_q) begin
      rk_q[step_q] <= next_round_key(rk_q[step_q - 4'd1], rcon(32'(step_q)));
      if (step_q == 4'(NR)) busy_q <= 1'b0;
      step_q <= step_q + 4'd1;
    end
  end

  assign round_keys = rk_q;
  assign ready      = ~busy_q;

endmodule
