// crypt_guard: one encrypting guard of the two-guard chain; used as the inner
// guard and as the crypto half of the outer guard.
//
// Every store that passes through is enciphered with the guard's own key
// before it is sent on; every load is sent on, and the block that comes back
// is deciphered before it is returned. With the inner guard (key sk1) next to
// the CPU and the outer guard (key sk2) next to the bus, memory only ever
// holds E(sk2, E(sk1, w)) and a load returns D(sk1, D(sk2, r)). Cipher:
// AES-128 in ECB mode, as the design uses; addresses are not enciphered
// (this design's choice, memory must stay addressable).
//
// Structure: a key schedule (aes_key_expand) and two pipelines. Every request,
// load or store, enters the cipher pipeline with its address and direction as
// sideband, so requests leave in the order they arrived and a load can never
// overtake an earlier store to the same address (a load's data field is
// enciphered too and ignored). When the request at the end of the pipeline
// is not taken downstream, the whole pipeline holds and no new request is
// accepted. Load answers from downstream enter the inverse-cipher pipeline,
// which never stalls, and leave in order. Overlapping accesses this way
// follows the design's remark that a full pipeline of memory accesses and
// decryptions hides part of the cost; the pipeline itself is this design's.
//
// Interface: up faces the CPU side, dn the memory side (mem_if). key_load
// with key_in replaces the key; it must be used only while idle is high (at
// boot), and no request is accepted until key_ready is high again.
// Timing: one request per clock; a request accepted in cycle c is offered
// downstream in cycle c+11 when nothing stalls; a load answer arriving in
// cycle a is returned upstream in cycle a+11.
module crypt_guard
  import shade_pkg::*;
#(
  parameter key_t RESET_KEY = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic key_load,     // load key_in as this guard's secret key
  input  key_t key_in,
  output logic key_ready,    // key schedule complete, guard passes traffic
  output logic idle,         // no request or answer inside the guard
  mem_if.slave  up,
  mem_if.master dn
);

  localparam int unsigned TAG_W = ADDR_W + 1;   // {write, addr}

  rkeys_t           rkeys;
  logic             advance, take;
  logic             enc_busy, dec_busy, enc_out_valid;
  logic [TAG_W-1:0] enc_out_tag;
  logic             unused_dec_tag;

  aes_key_expand #(.RESET_KEY(RESET_KEY)) u_keys (
    .clk, .rst_n, .key_load, .key_in, .round_keys(rkeys), .ready(key_ready)
  );

  // Request pipeline: holds while its head waits for the downstream side.
  assign advance      = !(enc_out_valid && !dn.req_ready);
  assign up.req_ready = advance && key_ready && !key_load;
  assign take         = up.req_valid && up.req_ready;

  aes_encrypt #(.TAG_W(TAG_W)) u_enc (
    .clk, .rst_n, .en(advance), .in_valid(take), .din(up.req_data),
    .in_tag({up.req_write, up.req_addr}), .round_keys(rkeys),
    .busy(enc_busy), .out_valid(enc_out_valid), .dout(dn.req_data), .out_tag(enc_out_tag)
  );

  assign dn.req_valid = enc_out_valid;
  assign dn.req_write = enc_out_tag[ADDR_W];
  assign dn.req_addr  = enc_out_tag[ADDR_W-1:0];

  // Answer pipeline: never stalls, the requester always accepts answers.
  aes_decrypt #(.TAG_W(1)) u_dec (
    .clk, .rst_n, .en(1'b1), .in_valid(dn.rsp_valid), .din(dn.rsp_data),
    .in_tag(1'b0), .round_keys(rkeys),
    .busy(dec_busy), .out_valid(up.rsp_valid), .dout(up.rsp_data), .out_tag(unused_dec_tag)
  );

  assign idle = !enc_busy && !dec_busy;

  // Keys change only while nothing is in flight.
  a_key_idle: assert property (@(posedge clk) disable iff (!rst_n) key_load |-> idle);

endmodule
