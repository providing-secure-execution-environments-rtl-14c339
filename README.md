# SHADE guard chain: dual encryption and heartbeat checking in front of an untrusted CPU

A chip made in a foundry you do not control may carry a hidden malicious
circuit (a hardware Trojan). Two things such a circuit can easily do once the
chip is deployed are to leak secrets by writing them out to memory or the bus,
and to stop the chip at a chosen moment (denial of service). SHADE (Secure
Heartbeat And Dual-Encryption) is a board-level defence against both. It
assumes the CPU may be infected and puts two small logic chips, the *inner
guard* and the *outer guard*, in series between the CPU and the system bus. The
guards come from two different foundries, so a Trojan in one cannot be expected
to cooperate with a Trojan in the other.

- **Leakage is prevented by dual encryption.** Every block the CPU stores is
  enciphered by the inner guard with key sk1 and then by the outer guard with
  key sk2. Memory only ever holds `E(sk2, E(sk1, w))`. A Trojan in the CPU or
  the inner guard that writes plaintext still has it enciphered by the outer
  guard. The outer guard only ever sees data already under sk1. Loads undo the
  two layers in reverse order. Code and static data are dual-encrypted ahead of
  time by a trusted compiler.
- **Denial of service is detected by heartbeats.** The trusted compiler puts a
  store to a reserved, non-cacheable address range at the start of every basic
  block. The outer guard watches for these stores. Each one it recognises
  restarts a countdown with that block's expected duration. If the countdown
  expires before the next heartbeat, the outer guard raises an alarm.

This repository holds synthesizable SystemVerilog for the two guards and their
heartbeat checker, together with self-checking testbenches. The CPU, the bus,
the memory and the compiler are outside it.

## The chain and its data

```
 CPU ──w──▶ inner guard ──w1=E(sk1,w)──▶ outer guard ──w2=E(sk2,w1)──▶ bus / memory
     ◀─r2──  (key sk1)  ◀─r1=D(sk2,r)──   (key sk2)   ◀──────r──────
            r2 = D(sk1, r1)                 │
                                            └─ heartbeat table + countdown ─▶ alarm
```

`shade_top` is this chain. Its CPU port (`cpu_*`) and bus port (`mem_*`) use the
same request/response protocol:

- **Request:** valid/ready, with `write`, a 32-bit `addr` and one 128-bit
  `data` block. A transfer happens in a cycle where valid and ready are both
  high.
- **Response:** a load is answered later by a single-cycle `rsp_valid` with
  `rsp_data`, in request order. The requester cannot refuse a response. Stores
  get no response.

Inside the top the three hops are `mem_if` interface instances. The interface
also asserts that a raised request is held steady until it is taken.

Both guards use AES-128 in ECB mode (each block enciphered on its own). ECB is
deliberate: the outer guard must recognise a heartbeat from its ciphertext. The
same heartbeat therefore has to encipher to the same value every time, and the
compiler has to be able to compute that value ahead of time. Addresses are not
enciphered.

## Heartbeats: what the outer guard checks, cycle by cycle

This is the part that takes the most care to get right.

**Table.** The trusted compiler gives each heartbeat a 128-bit value. From the
Inner-key it computes `E(sk1, value)`: the heartbeat's *signature*, as it will
appear between the two guards. At boot, the signatures are written into the
outer guard's heartbeat table (`hb_table`, 64 entries by default, through the
`hb_cfg_*` port). Each entry stores:

- `pattern`: the signature;
- `tmax`: the timeout, i.e. the latest cycle in which the next heartbeat may
  arrive;
- `tmin`: the earliest such cycle (0 = no lower bound).

Instead of writing entries through `hb_cfg_*`, the outer guard can fetch
them from memory itself (`hb_fetch`). Raise `hb_fetch_start`, with the
table's address in `hb_fetch_base` and the number of entries in
`hb_fetch_count`, and hold it until `hb_fetch_busy` rises. The fetch starts
once the outer guard is idle and nothing is waiting to enter it. Until
`hb_fetch_busy` falls, the guard takes no request from the inner guard, and
its own loads use the normal path to the bus. Entry i is read from two
16-byte blocks, at `base + 32*i` and `base + 32*i + 16`:

- **Heartbeat value.** The first block is stored like any program data, under
  both keys. Taking off the Outer-key layer therefore leaves exactly the
  signature `E(sk1, value)`.
- **Window.** The second block is stored under the Outer-key only, so the
  outer guard can read it. After deciphering, `tmin` is in bits
  `[2*TIME_W-1:TIME_W]` and `tmax` in bits `[TIME_W-1:0]`.

A natural way for the compiler to name heartbeats is by their window: all
blocks with the same timeout can share one heartbeat value, and so one entry.

**Snooping.** The outer guard looks at every store it accepts from the inner
guard. A store is a heartbeat candidate when `(addr & HB_MASK) == HB_BASE`, by
default the 64 KiB region at `0xFFFF_0000`. For each candidate, all table
entries are compared with the store's data at once. The answer comes one cycle
later and does not delay the store, which is enciphered and written to memory
like any other.

**Countdown** (`hb_timer`). Take a matched heartbeat whose lookup answer
arrives in cycle T:

| next matched heartbeat arrives in | result |
|---|---|
| cycle T+1 … T+tmin−1 | `alarm_early` (too soon: replayed or skipped code) |
| cycle T+tmin … T+tmax | accepted; the countdown restarts with the new entry's window |
| none by cycle T+tmax | `alarm_timeout` set at the end of cycle T+tmax (visible from T+tmax+1) |

The timer is disarmed until the first matched heartbeat, so nothing is expected
before the protected program starts. `hb_armed` and `hb_remaining` show its
state.

**Wrong values are not flagged at once.** A candidate store whose value matches
no entry does not restart the countdown, so it ends in a timeout. This is how a
leak from the inner guard is caught: if the inner guard stops enciphering, its
heartbeats arrive as plaintext and match nothing. Alarms are sticky until reset.

**Time base.** The countdown counts guard clock cycles, so table windows must be
given in those cycles. The bounds must also cover cache misses: a block's worst
case, not its typical duration, goes in `tmax`.

## Blocks

| module | role |
|---|---|
| `shade_pkg` | widths, types (`block_t`, `hb_entry_t`, …) and AES arithmetic; the S-box and its inverse are computed at elaboration from GF(2^8) inversion and the affine map, not stored as literal tables |
| `mem_if` | one hop of the memory link (request/response bundle, modports, handshake assertion) |
| `aes_key_expand` | AES-128 key schedule; 11 round keys computed one per clock after a key load and held in registers |
| `aes_encrypt` / `aes_decrypt` | fully pipelined AES-128 cipher / inverse cipher: 11 register stages, one block per clock, a valid bit and a sideband tag travelling with each block |
| `crypt_guard` | one encrypting guard: key schedule, a request pipeline (cipher) and an answer pipeline (inverse cipher). Used as the inner guard and inside the outer guard |
| `hb_table` | heartbeat table with a write port and a parallel lookup |
| `hb_fetch` | reads the heartbeat table from memory through the outer guard's load path |
| `hb_timer` | countdown and early/timeout alarms |
| `outer_guard` | `crypt_guard` + table + fetcher + timer, with the snooping of heartbeat-region stores |
| `shade_top` | inner guard → outer guard, with plain-signal ports |

## Inside a guard: keeping order while overlapping accesses

A guard must not let a load overtake an earlier store to the same address.
So every request, load or store, enters the same cipher pipeline, with its
address and direction carried alongside as a tag. Requests therefore leave in
the order they came.

- A load's data field is enciphered too, and then ignored.
- If the request at the head of the pipeline is not taken downstream, the
  whole pipeline holds and the upstream `req_ready` drops. A stalled bus
  therefore back-pressures the CPU, through both guards, within the same
  cycle.
- Load answers enter the inverse-cipher pipeline. It never stalls (answers
  cannot be refused) and keeps their order.

**Timing**, with an always-ready neighbour:

- a guard takes one request per clock;
- a request accepted in cycle c leaves in cycle c+11;
- an answer arriving in cycle a is returned in cycle a+11.

Through both guards, a store reaches the bus 22 cycles after the CPU issues
it, and a load adds 44 cycles to the memory latency (22 on the way out, 22 on
the way back). Throughput is one access per clock.

**Keys.** Each guard can hold its key in two ways:

- built in, as the `*_RESET_KEY` parameter, which is expanded automatically
  after reset;
- loaded at boot through `ig_key_load`/`og_key_load`.

A key may be loaded only while the guard is idle (`ig_idle`/`og_idle`; this is
asserted), because blocks in flight would otherwise mix round keys. While the
schedule is being computed (10 cycles), no request is accepted.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IG_RESET_KEY`, `OG_RESET_KEY` | 0 | keys expanded after reset |
| `HB_BASE`, `HB_MASK` | `0xFFFF_0000`, `0xFFFF_0000` | heartbeat region |
| `HB_ENTRIES` | 64 | heartbeat table size |
| `shade_pkg::TIME_W` | 20 | countdown width (up to about 10^6 guard cycles per block) |

## How far this follows the published scheme, and where it departs

These parts follow the published SHADE architecture:

- two guards in series, store path enciphered inner-then-outer and load path
  deciphered outer-then-inner;
- AES in ECB mode;
- keys either built in or loaded at boot;
- heartbeats as stores to a non-cacheable region, recognised by their
  inner-key ciphertext in a small table held only on the outer guard and
  looked up off the memory path;
- a countdown restarted by each heartbeat, with an alarm on expiry;
- the option of a best-to-worst-case window per heartbeat;
- a table that is either written at configuration or fetched from memory by
  the outer guard.

The following are choices of this implementation, not given by the scheme:

- AES-128 specifically;
- one 128-bit block per transfer; addresses not enciphered;
- the valid/ready link protocol;
- the fully pipelined ciphers and the single in-order request pipeline (the
  scheme only says that pipelining accesses and decryptions hides part of the
  cost);
- table size, region, timer width and the early alarm for the window's lower
  bound;
- alarms that stay set until reset;
- the in-memory layout of a fetched table, and which keys encipher it.

Left out:

- **Clock domains.** The evaluated system clocks the guards at half the CPU
  rate and the bus at a quarter; here one clock drives everything and the
  handshakes absorb rate differences.
- **Context switches.** Saving and restoring the timer and table across
  interrupts would need operating-system support, which the scheme leaves open.
- **Authenticated links.** Signed message digests between the guards (or
  between the outer guard and memory) would catch an inner-guard leak at the
  moment it happens. They are mentioned as a possible extension and are not
  built; here such a leak is caught only through its effect on heartbeats.
- **Other cipher modes.** Both guards use ECB. A mixed setup, for example CBC
  on the outer guard only, would also keep heartbeats recognisable, but it is
  not built.
- **Run-time-aware windows.** Besides a worst-case bound or a best-to-worst
  range, a heartbeat could follow run-time changes such as cache misses. Not
  built: windows are fixed once the table is loaded.
- **Prefetching by the outer guard.** Not built.
- **Outer-guard leaks.** No mechanism detects a leak by the outer guard itself;
  the scheme has none either.

The scheme breaks memory-mapped I/O and DMA, because peripherals see
dual-encrypted data. So does this RTL.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/shade_pkg.sv tb/aes_ref_pkg.sv tb/tb_shade_top.sv --top-module tb_shade_top
./obj_dir/Vtb_shade_top
```

Replace the testbench name for the others:

- `tb_aes_key_expand`
- `tb_aes_encrypt`
- `tb_aes_decrypt`
- `tb_crypt_guard`
- `tb_hb_table`
- `tb_hb_timer`
- `tb_outer_guard`
- `tb_hb_workload`

All of them run in seconds.

`tb/aes_ref_pkg.sv` is an independent behavioural AES (S-box built by walking
the multiplicative group with generator 3, byte-array state). The testbenches
check it and the RTL against the FIPS-197 example vectors, then use it to
predict ciphertexts for random keys and data. `tb/mem_model.sv` is a sparse
memory with random back-pressure and latency.

`tb_shade_top` runs the whole chain at its default parameters:

- **Dual-encrypted data traffic.** Memory must hold `E(sk2,E(sk1,w))`, and
  never the plaintext or the single-key ciphertext. A burst of back-to-back
  stores must come through intact while bus back-pressure stalls the CPU.
- **A heartbeat program.** A first block opens with heartbeat HB1, a loop of
  six blocks opens each block with HB2, and each block does real loads and
  stores. The program then stops sending heartbeats, as an exit that never
  returns would; the timeout alarm must follow, and not before.
- **A Trojan in the inner guard.** The inner guard's cipher output is forced to
  the plaintext. Memory must still receive only outer-key ciphertext, and the
  unenciphered heartbeat must lead to a timeout.
- **A replayed heartbeat.** A heartbeat sent before its window opens must raise
  the early alarm. For this run the outer guard fetches the table from memory.

The testbench counts each mechanism: key loads, table writes and fetches, matched and unmatched
heartbeats, both alarms, CPU stalls, bus back-pressure and the blocked leak. A
mechanism that never happened counts as a failure.

`tb_hb_workload` runs a long heartbeat stream through the same chain:

- **The stream.** 3000 basic blocks of 2 to 842 instructions, mostly short, so
  that a heartbeat comes about every 17 instructions on average. This matches
  the spread reported for embedded benchmark code.
- **Clocks.** The CPU is taken to run one instruction per CPU clock, at twice
  the guard clock.
- **Loads.** About one block in 50 also does a load through both guards.
- **Table.** Heartbeats are named by length class (up to 2^k guard cycles), so
  the table needs only ten entries.
- **Checks.** Every heartbeat must be recognised, with no alarm over the whole
  run. Once the stream stops, the timeout must follow.

The block-length mix is made up to fit those numbers. It is not taken from a
real program trace.
