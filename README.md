# RC4 brute-force key search engine

This engine searches for an RC4 key by brute force, given a short piece of
known plaintext. RC4 XORs the message with a keystream generated from the key.
If the first four bytes of a message are known, then `plaintext XOR ciphertext`
gives the first four keystream bytes. A candidate key is right when the
keystream it generates starts with those four bytes.

The engine holds several identical **functional units**. Each unit has its own
256-byte RC4 state memory and tests one key at a time. One shared **control
unit** steps all of them through the same sequence of states in lock-step, so
the units only differ in the key they hold. Each unit walks through its own
range of the key space. Every key takes exactly **1304 clock cycles** per unit.

The default configuration has five units and 32-bit keys. This matches a
published CPLD prototype that fit five units into one 20k-gate device with six
embedded RAM blocks. That prototype ran at about 10 MHz, which works out to
roughly 40,000 keys/s. At that rate the expected time to find a 32-bit key is
15 hours (30 hours worst case).

## How one key is tested

RC4 has three phases:

```
S[i] = i                         for i = 0..255              (fill)
j = 0
for i = 0..255:  j += S[i] + K[i mod keylen];  swap S[i], S[j]   (key schedule)
i = j = 0
per output byte: i += 1;  j += S[i];  swap S[i], S[j];
                 output S[S[i] + S[j]]                           (keystream)
```

All sums are modulo 256. The engine runs the phases as the following sequence
of states. The same sequence runs in every unit at the same time.

| phase | states | cycles |
|---|---|---|
| fill | Load Ram: write `S[i] = i`, `i++` | 256 |
| key schedule | Read Si, Read Sj, Write Si→Sj, Write Sj→Si, repeated 256 times | 1024 |
| keystream setup | Test Clear: `j = 0`, `i = 1`, clear the match counter | 1 |
| keystream | Read Si, Read Sj, Write Si→Sj, Write Sj→Si, Read Sk, repeated 4 times | 20 |
| decision | Test Done (4th compare), Has-the-key-been-found, Next K | 3 |
| **total** | | **1304** |

One Clear cycle after reset loads the key ranges. If a key matches, the
decision state goes to **Done** instead of Next K. Next K moves every unit to
its next key and goes back to Load Ram.

## The four-cycle swap on a single-port RAM

This is the central constraint of the design. The state memory has a single
port, which does one read or one write per cycle. Each swap needs two reads and
two writes, so it takes at least four cycles. The schedule meets that minimum,
and computing `j` costs no extra cycle.

The RAM (`rc4_s_array`) samples its address on the clock edge. Read data
appears in the following cycle and stays there until the next read. A write
leaves the read data as it was. With that timing, one key-schedule iteration
does the following:

| cycle | S-array address | S-array write | RAM output during the cycle | registers loaded at its end |
|---|---|---|---|---|
| Read Si | `i` | – | (last read) | – |
| Read Sj | `j_new = j + out + K[i mod n]` | – | `S[i]` | `Si ← out`, `j ← j_new` |
| Write Si→Sj | `j` | `S[j] ← Si` | `S[j]` (old) | `Sj ← out` |
| Write Sj→Si | `i` | `S[i] ← Sj` | – | `i ← i + 1` |

Some details of this schedule:

- **Same-cycle `j`.** In Read Sj the adder output `j + S[i] + K` goes straight
  to the RAM address port. The new `j` is therefore used in the cycle it is
  computed.
- **Sj capture.** The old `S[j]` is still on the RAM output during the first
  write. That is where it is captured into `Sj`.
- **Write order.** `S[j]` is written first and `S[i]` second. The next
  iteration then reads `S[i+1]`, so there is never a read of a word that is
  still in flight.
- **`i == j`.** Both writes store the same value, which is the correct result.

The keystream iteration uses the same four states, with the key input of the
`j` adder switched to zero. It then adds a fifth state, Read Sk, which
addresses `S[Si + Sj]`:

- `Si + Sj` is the same sum before and after the swap, so the two registers can
  be used directly.
- The keystream byte appears on the RAM output one cycle after Read Sk. The
  comparator checks it there.
- For bytes 1 to 3, that cycle is the next In-Testing Read Si. For byte 4 it is
  Test Done.
- Every match increments a 3-bit **bytes-correct counter**. A unit's
  `key_found` is high when the counter reaches 4.

## Functional unit datapath (`rc4_functional_unit`)

Each unit contains:

- **S-array**: 256 × 8 single-port RAM. Address multiplexer inputs are `i`,
  `j_new`, `j` and `Si + Sj`. Data multiplexer inputs are `i`, `Si` and `Sj`.
- **K-array** (`rc4_k_array`): the key is stored once, as `KEY_BYTES` bytes,
  and read at index `i mod KEY_BYTES`. This replaces RC4's 256-byte repeated
  key array. With 4-byte keys the index is just `i[1:0]`. A second address
  source, `ext_addr`, is used to read the key back after a match.
- **j adder**: three inputs, `j + S-array output + (K byte or 0)`.
- **t adder**: `Si + Sj`.
- **Registers**: `Si`, `Sj`, `j`.
- **Comparator and counter**: the comparator checks the RAM output against the
  expected byte; the bytes-correct counter drives `key_found`.

A unit has no sequencing logic of its own. Every cycle it receives an
`rc4_pkg::fu_ctrl_t` bundle from the control unit. The bundle holds:

- the shared `i` counter,
- the multiplexer selects,
- the write and register enables,
- the compare strobe and the expected byte.

The `i` counter lives in the control unit. The units run in lock-step, so `i`
is the same in all of them. Only `j`, `Si`, `Sj` and the state memory are
per-unit.

## Key space, search control and results

Each unit has a **key space register** (`rc4_key_space_reg`), a loadable
counter:

- In Clear, unit *n* is loaded with `key_base + n * keys_per_fu`.
- Next K increments every register by one.
- The K-array copies the register at the start of Load Ram.

For a full 32-bit search with five units, set `key_base = 0` and
`keys_per_fu = ceil(2^32 / 5) = 858993460`. The last range then wraps and
repeats a few keys from the start.

The search ends in Done, with `done = 1`, in one of two ways:

- **Match**: a unit matched all four bytes. Then `found = 1`, and:
  - `found_unit` is the lowest-numbered matching unit;
  - `found_key` is its key;
  - `probe_byte` returns byte `ext_addr` of its K-array (byte 0 is the most
    significant byte of the key).
- **Exhausted**: every unit has tested `keys_per_fu` keys without a match. Then
  `exhausted = 1`. `keys_per_fu = 0` means 2^KEY_W keys.

Four matching bytes are a 32-bit test. Over a whole 2^32 search, about one
false match is therefore expected. `found_key` should be confirmed on more of
the message. To continue after a false match, restart with `key_base` set just
past the reported key.

## Top-level interface (`rc4_cracker`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset. The search starts when reset is released |
| `key_base` | in | `8*KEY_BYTES` | first key of unit 0 |
| `keys_per_fu` | in | `8*KEY_BYTES` | keys per unit (0 = all 2^KEY_W) |
| `test_bytes[4]` | in | 8 each | expected keystream bytes 1–4 (plaintext XOR ciphertext) |
| `ext_addr` | in | `clog2(KEY_BYTES)` | K-array byte to show on `probe_byte` |
| `done`, `found`, `exhausted` | out | 1 | search status |
| `found_unit` | out | `clog2(NUM_FU)` | matching unit |
| `found_key` | out | `8*KEY_BYTES` | matching key |
| `probe_byte` | out | 8 | K-array byte of the matching unit |
| `keys_tested` | out | `8*KEY_BYTES` | keys tested per unit so far |
| `state` | out | 4 | controller state (`rc4_pkg::state_t`) |

All inputs must be held stable for the whole search. A new search starts with
a new reset.

## Parameters and scaling

| parameter | default | meaning |
|---|---|---|
| `NUM_FU` | 5 | functional units. Each needs one 2048-bit RAM |
| `KEY_BYTES` | 4 | key length in bytes. 5 gives 40-bit keys; other lengths also work through the `mod` index |

The pass length does not depend on either parameter. Throughput is
`NUM_FU × f_clk / 1304` keys/s:

| configuration | units | expected time, 32-bit | expected time, 40-bit |
|---|---|---|---|
| default (one small device) | 5 | 15 h | 160 days (with `KEY_BYTES = 5`) |
| 12 units (RAM-limited mid-size device) | 12 | 6.2 h | 66 days |
| 24 units | 24 | 3.1 h | 33 days |
| 384 units (multi-board system) | 384 | 11.7 min | 50 h |

All times assume 10.38 MHz. On an FPGA the practical limit is the number of
RAM blocks, one per unit, rather than logic. The 384-unit figure stands for
many devices. Here it is simulated as one instance.

## What follows the original design and what is filled in

These parts follow the published design:

- five units plus one control unit;
- a single-port 256 × 8 state memory per unit;
- the key stored once and read modulo the key length;
- the state sequence and its 1304-cycle count;
- the datapath elements of a unit: `Si`, `Sj`, `j`, two adders, the
  key-or-zero input, the comparator and the bytes-correct counter;
- the compare points for the four bytes.

These are this implementation's own choices:

- **RAM timing.** A one-cycle read latency, with the output held through write
  cycles.
- **Where `i` lives.** The `i` counter is in the control unit and is broadcast.
  The original text places an `i` counter in each unit, but its unit diagram
  takes `i` as an input.
- **Test Clear.** It runs once per key and also steps `i` from 0 to 1. The
  keystream loop returns to In-Testing Read Si, not to Test Clear. Returning to
  Test Clear would reset `j` between bytes and would not give 1304 cycles.
- **`j` reset.** `j` is cleared during Load Ram.
- **K-array loading.** The K-array is loaded in parallel from the key space
  register. The byte order is most significant byte first.
- **Key ranges.** Contiguous ranges, stepped by one.
- **Exhaustion stop.** The `exhausted` stop and the `keys_per_fu` input.
- **Result readout.** `found_unit`, `found_key` and `probe_byte` stand in for
  the prototype's user probing logic. The lowest-numbered unit wins if several
  match.
- **Reset.** Synchronous reset. The state memory is never reset, because it is
  always filled before it is read.

Not included:

- **The skip-the-fill variant.** This alternative kept a 256-bit "written" flag
  per unit. It saves the 256 fill cycles but costs so much logic that only one
  unit fits.
- **Board-level I/O.** There are no switches, displays or board-level
  interface. The result ports take their place.

## Files

`rtl/`

- `rc4_pkg.sv`: states, multiplexer encodings and the `fu_ctrl_t` command
  bundle.
- `rc4_s_array.sv`: single-port state RAM.
- `rc4_k_array.sv`: key byte store.
- `rc4_key_space_reg.sv`: per-unit key counter.
- `rc4_functional_unit.sv`: one unit.
- `rc4_control.sv`: the shared state machine. It also has two assertions on the
  compare and write scheduling.
- `rc4_cracker.sv`: the top level.

`tb/`

- `rc4_ref_pkg.sv`: a plain software model of RC4, used by the testbenches.
- `tb_rc4_s_array`, `tb_rc4_k_array`, `tb_rc4_key_space_reg`: block tests
  against simple models.
- `tb_rc4_functional_unit`: drives one unit with a scripted schedule. It checks
  the state array after the key schedule against the model, then `key_found`
  for correct and corrupted expected bytes, then the probe port.
- `tb_rc4_control`: compares every cycle of the state machine with the
  expected schedule, including the 1304-cycle pass, the match stop and the
  exhaustion stop.
- `tb_rc4_cracker`: end-to-end at the default size. It runs three searches:
  - a match in unit 2 on its fourth key, within a full 32-bit range split;
  - an exhausted range;
  - all units matching at once, to check priority.

  It checks cycle counts and counts each mechanism.
- `tb_rc4_workloads` with `rc4_workload_run`: one search each at 12, 24 and
  384 units, and one with 40-bit keys.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes on its own.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -j 4 \
    --top-module tb_rc4_cracker -y rtl -y tb +libext+.sv \
    rtl/rc4_pkg.sv tb/rc4_ref_pkg.sv tb/tb_rc4_cracker.sv
./obj_dir/Vtb_rc4_cracker
```

To run another test, replace `tb_rc4_cracker` with its name. Lint the design
with `verilator --lint-only -Wall -y rtl rtl/rc4_pkg.sv rtl/rc4_cracker.sv`.
Every test runs in well under a minute.
