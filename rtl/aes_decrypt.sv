// aes_decrypt: fully pipelined AES-128 inverse cipher, one block per clock.
//
// Used on the load path of each guard: the outer guard removes the Outer-key
// layer from what memory returns, the inner guard then removes the Inner-key
// layer before the data reach the CPU. ECB mode, one 128-bit block at a time.
//
// Structure: NR+1 register stages. Stage 0 holds din XOR round key NR; stage
// j (1..NR-1) applies InvShiftRows, InvSubBytes, round key NR-j and
// InvMixColumns; stage NR applies InvShiftRows, InvSubBytes and round key 0.
// A valid bit and a TAG_W-bit sideband travel with each block.
//
// Interface and timing are those of aes_encrypt: all stages advance when en is
// high, busy flags a block in any stage, a block entering with in_valid appears at out_valid/dout/out_tag NR+1
// (11) advancing clocks later, one block per clock. Round keys must not change
// while blocks are in flight. The unrolled pipeline is this design's choice.
module aes_decrypt
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
      st_q[0]  <= din ^ round_keys[NR];
      tag_q[0] <= in_tag;
      for (int j = 1; j < NR; j++) begin
        st_q[j]  <= inv_mix_columns(inv_sub_bytes(inv_shift_rows(st_q[j-1])) ^ round_keys[NR-j]);
        tag_q[j] <= tag_q[j-1];
      end
      st_q[NR]  <= inv_sub_bytes(inv_shift_rows(st_q[NR-1])) ^ round_keys[0];
      tag_q[NR] <= tag_q[NR-1];
    end
  end

  assign busy      = |vld_q;
  assign out_valid = vld_q[NR];
  assign dout      = st_q[NR];
  assign out_tag   = tag_q[NR];

endmodule
