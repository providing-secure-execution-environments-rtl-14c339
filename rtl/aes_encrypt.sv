// aes_encrypt: fully pipelined AES-128 cipher, one block per clock.
//
// Used on the store path of each guard: the inner guard enciphers what the CPU
// writes with the Inner-key, the outer guard enciphers that again with the
// Outer-key. ECB mode: each 128-bit block is enciphered on its own, with no
// chaining, so equal plaintexts give equal ciphertexts.
//
// Structure: NR+1 register stages. Stage 0 holds din XOR round key 0; stage r
// (1..NR-1) applies SubBytes, ShiftRows, MixColumns and round key r; stage NR
// omits MixColumns. Each stage also carries a valid bit and a TAG_W-bit
// sideband (the guard uses it for the access's address and direction), so
// blocks leave in the order they entered.
//
// Interface and timing: when en is high every stage advances; when en is low
// the whole pipeline holds (the guard uses this for downstream back-pressure).
// busy is high while any stage holds a
// block. A block presented with in_valid in a cycle with en high appears at
// out_valid/dout/out_tag NR+1 (11) advancing clocks later, i.e. in the 12th
// cycle counting its entry cycle when nothing stalls. Throughput is one block
// per clock. Round keys come from aes_key_expand and must not change while
// blocks are in flight. The cipher is the one the design names; the unrolled
// pipeline is this design's choice, for a guard that overlaps accesses.
module aes_encrypt
  import shade_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  block_t           din,
  input  logic [TAG_W-1:0] in_tag,
  input  rkeys_t           round_keys,
  output logic             busy,        // some block is in the pipeline
  output logic             out_valid,
  output block_t           dout,
  output logic [TAG_W-1:0] out_tag
);

  block_t           st_q  [NR+1];
  logic [TAG_W-1:0] tag_q [NR+1];
  logic [NR:0]      vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld_q <= '0;
    else if (en) vld_q <= {vld_q[NR-1:0], in_valid};
  end

  // Data stages need no reset: only stages whose valid bit is set are used.
  always_ff @(posedge clk) begin
    if (en) begin
      st_q[0]  <= din ^ round_keys[0];
      tag_q[0] <= in_tag;
      for (int r = 1; r < NR; r++) begin
        st_q[r]  <= mix_columns(shift_rows(sub_bytes(st_q[r-1]))) ^ round_keys[r];
        tag_q[r] <= tag_q[r-1];
      end
      st_q[NR]  <= shift_rows(sub_bytes(st_q[NR-1])) ^ round_keys[NR];
      tag_q[NR] <= tag_q[NR-1];
    end
  end

  assign busy      = |vld_q;
  assign out_valid = vld_q[NR];
  assign dout      = st_q[NR];
  assign out_tag   = tag_q[NR];

endmodule
