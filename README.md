# Register-mapped test platform for FPGA co-processor experiments

A host PC sends operands to a small hardware "experiment" on an FPGA and gets the
results back, with no custom driver work for each experiment. All traffic goes
through three 32-bit registers behind a PCI target core. On the FPGA, an interface
controller buffers words in two FIFOs. It then hands them to the experiment over a
simple three-wire handshake that works across clock domains. Any backend that
speaks this handshake can be placed behind the controller. Four are included:

| backend          | words in | words out | what it computes                                   |
|------------------|----------|-----------|----------------------------------------------------|
| `avg_backend`    | 2        | 1         | (a + b) >> 1, the bring-up test                    |
| `tea_backend`    | 2        | 2         | Tiny Encryption Algorithm encode, fixed 128-bit key |
| `dct_backend`    | 16       | 16        | 4x4 2-D DCT in 8-bit fixed point (JPEG front end)   |
| `cordic_backend` | 3        | 3         | CORDIC rotation: cos/sin of an angle in degrees    |

The design reproduces the hardware side of a published comparison of
Handel-C and VHDL design flows. In that work, each experiment was written in
both languages and run behind this same interface. This RTL is an independent
SystemVerilog implementation. The last section before the simulation notes
lists where it departs from the original.

```
 PCI target core (not included)        hif_top
 ───────────────────────────┐   ┌───────────────────────────────────────────────────────┐
   lt_req/write/burst/addr  │   │  hif_core (pci_clk)               backends (exp_clk)  │
   lt_wdata  ───────────────┼──►│  ┌───────────┐  in_data           ┌─────────────────┐ │
   lt_rdata  ◄──────────────┼───│  │ input FIFO├──────────────────► │ exp_port        │ │
   lt_done/abort/disc       │   │  │ 16 x 32   │  in_rdy/in_rec ──► │ + algorithm     │ │
                            │   │  └───────────┘  ◄── in_req        │ (one of four,   │ │
                            │   │   hif_ctrl FSM                    │  by exp_sel)    │ │
                            │   │  ┌───────────┐  ◄── res_data      │                 │ │
                            │   │  │result FIFO│  res_rdy/res_rec ─►│                 │ │
                            │   │  │ 16 x 32   │  ◄── res_req       └─────────────────┘ │
                            │   │  └───────────┘   design_reset ──► reset bridge        │
 ───────────────────────────┘   └───────────────────────────────────────────────────────┘
```

## The host's view: three registers and a one-read lag

This is the least obvious part of the design, and host software must follow it exactly.

| `lt_addr` | name          | access | effect                                                         |
|-----------|---------------|--------|----------------------------------------------------------------|
| 0         | `REG_DATA_IN` | write  | push the word into the input FIFO; **aborted** if it is full    |
| 1         | `REG_RESULT`  | read   | pop the result FIFO; **aborted**, data `0xFFFFFFFF`, if empty   |
| 2         | `REG_CONTROL` | write  | command in bits [1:0], see below                               |

Any other combination (for example reading register 0) is aborted.

| bits [1:0] | command            | effect                                                    |
|------------|--------------------|-----------------------------------------------------------|
| `11`       | `CMD_SYSTEM_RESET` | empty both FIFOs and reset the backend                    |
| `10`       | `CMD_INPUT_FLUSH`  | empty the input FIFO                                      |
| `01`       | `CMD_RESULT_FLUSH` | empty the result FIFO                                     |
| `00`       | `CMD_FINAL_POP`    | push one padding word (whatever the backend's result bus holds) into the result FIFO |

**Results come back one read late.** The result FIFO has a registered read port. A
read returns the word in that register and pops the next word into it, so each
read returns the word fetched by the read before. After a system reset the
register holds zero. The first successful read therefore returns a padding zero,
and the n-th successful read returns result n-1. The last result of a job is
already in the read register, but reading it needs something left to pop. A read
at that point would find the FIFO empty and abort. The host therefore issues
`CMD_FINAL_POP` first, which pushes a padding word, and then reads the last
result. A job with N results looks like this:

```
write CONTROL = 3                  system reset
write DATA    = operand ...        (retry on abort: input FIFO full)
read  RESULT  -> 0                 padding zero (retry while aborted)
read  RESULT  -> r0 ... r(N-2)     (retry while aborted)
write CONTROL = 0                  final pop
read  RESULT  -> r(N-1)
```

Once the padding zero and N-1 results have been read, the last result is
certainly in the read register, so the final pop never overtakes it.

**Bursts.** Holding `lt_burst` together with `lt_req` makes a data write or
result read a burst. The first word is checked exactly like a single
access: a write to a full FIFO, or a read of an empty one, aborts. After
that, one word moves at every clock edge where `lt_done` is high. For a
write, the host presents the next word after each such edge. For a read,
`lt_rdata` is valid while `lt_done` is high. The host ends the burst by
dropping `lt_req`. The controller ends it with a one-cycle `lt_disc`
(target disconnect) when the input FIFO becomes full or the result FIFO
becomes empty. A write burst can therefore send up to 16 words at once. A
read burst collects everything waiting, the padding zero included. The
one-read lag and the final pop work the same as for single reads.
`lt_burst` has no effect on control writes. While a burst runs, the
backend is not served, so a write burst cannot carry more than one FIFO of
data.

An aborted read and a genuine result of `0xFFFFFFFF` look alike on the bus. Host
software must use the abort status, or a timeout, to tell them apart. Writes
beyond the input FIFO's 16 words are aborted, and the host must retry them.
Host software is expected to know the backend's ratio of inputs to outputs.

## Interface controller (`hif_ctrl`, `hif_core`, `hif_fifo`)

`hif_core` runs entirely on the PCI clock. It holds two 16 x 32 FIFOs
(`hif_fifo`) and the controller FSM (`hif_ctrl`), and it synchronises the
backend's two request lines with two flip-flops each. The controller serves
**one request at a time** from a central Ready state:

```
            ┌──────────── S_READY ◄─────────── S_WAIT ◄───────────┐
  lt_req    ▼                                                       │
        S_PCI_REQ ──(check fails: lt_abort)──────► S_WAIT           │
            │ ok                                                    │
        S_PCI_SVC  (FIFO strobe, lt_done) ─────────► S_WAIT          │
            or, for a burst,                                        │
        S_PCI_BURST (word per clock; ends on !lt_req or lt_disc) ─► S_WAIT
                                                                    │
  in_req & in_rdy, else res_req & res_rdy                           │
        S_EXP_REQ  (pop input FIFO / push result bus)               │
        S_EXP_SVC  (hold in_rec / res_rec until the request drops) ─┘
```

* A PCI access wins over a waiting backend request. An input request is served
  before a result request.
* A burst has its own state after PCI Request. It stays there, moving a word
  per clock, until `lt_req` drops or the FIFO boundary forces `lt_disc`.
* Local-side access: hold `lt_req`, `lt_write`, `lt_addr` and `lt_wdata` until
  `lt_done` or `lt_abort` is high for one cycle. A successful access takes three
  clocks from Ready: request, service, done. An abort comes one clock earlier.
  `lt_rdata` is valid with `lt_done`, and reads `0xFFFFFFFF` otherwise. The
  cycle after completion is a wait state, so a held `lt_req` is never served twice.
* While the controller waits for a backend handshake to finish, PCI accesses
  wait too.
* `design_reset` is a registered one-cycle pulse. It comes from power-on reset
  or `CMD_SYSTEM_RESET`.

## Backend handshake (`exp_port`)

Each direction uses three wires and a 32-bit bus. The controller drives *ready*
and *received*, and the backend drives *request*:

* `in_rdy` means the input FIFO holds data. `res_rdy` means the result FIFO has room.
* Input: the backend raises `in_req`. The controller pops a word and raises
  `in_rec` in the same cycle the word appears on `in_data`. The backend captures
  the word and drops `in_req`. The controller then drops `in_rec`.
* Result: the backend puts its word on `res_data` and raises `res_req`. The
  controller pushes the word and raises `res_rec`. The backend drops `res_req`,
  and the controller drops `res_rec`.

Each data bus is stable whenever its request or received line is high. The
backend may therefore run on an unrelated clock: only single-bit levels cross
between the domains, each through two flip-flops. `exp_port` is the reusable
backend end of this protocol. An algorithm core holds `get` and receives a
one-cycle `got` pulse with `got_data`. It holds `put` with `put_data` and
receives a one-cycle `put_done` pulse once the whole handshake has finished.
Because `exp_port` waits for *ready* before it raises a request, a backend
stalls when the result FIFO is full and resumes when the host reads.

## The experiments

**Averager.** It adds two words and returns the sum shifted right by one bit.
The sum is formed in 33 bits, so the carry is kept. It takes two inputs for each
output, which exercises host code whose input and output counts differ.

**TEA encoder.** Inputs are y then z, and outputs are the encoded y then z. Each
of the 32 rounds does `sum += 0x9E3779B9`, then
`y += ((z<<4)+k0) ^ (z+sum) ^ ((z>>5)+k1)`, then the same for z with k2 and k3.
The arithmetic is unsigned 32-bit with logical shifts. The key is a parameter,
by default `11112222 33334444 55556666 77778888`. It is fixed in hardware, like a
write-only key store. Each clock computes one half round, so an encryption takes
64 cycles. `sum` restarts at zero for each block.

**4x4 DCT.** The host sends (pixel - 128) x 256 for 16 pixels in row order. The
values are signed, with 8 fractional bits. The backend transforms each row and
then each column with the same fixed-point 1-D DCT, and returns 16 signed
integer coefficients in row order. For one line `v`:

```
s    = Σx Rnd(v[x] * COS[u][x])           COS = 256 · cos((2x+1)uπ/8), tabulated as
t[u] = Rnd(Rnd(s * C[u]) * 181)                 {256,256,256,256} {236,98,-98,-236}
Rnd(n) = (n >>> 8) + n[7]                       {181,-181,-181,181} {98,-236,236,-98}
C = {181, 256, 256, 256}   (181/256 ≈ 1/√2)
```

Every product keeps only its low 32 bits. The output is `Rnd` of the final
coefficient. The result agrees with a floating-point orthonormal DCT to within
about ±1. One multiplier is shared by every step. Each coefficient takes four
multiply-accumulate cycles and two scaling cycles, and each line needs one
write-back cycle. A block therefore takes 200 cycles. Quantisation and entropy
coding are left to software.

**CORDIC.** Inputs are x, y and z, signed with 12 fractional bits (value x 4096),
where z is an angle in degrees. The backend runs 16 rotation-mode iterations,
one per clock:
`d = z>=0 ? +1 : -1; x -= d·(y>>>i); y += d·(x>>>i); z -= d·atan(2^-i)`.
The arctangents come from a 16-entry ROM holding
`floor(atan(2^-i)·180/π·4096)`. Start with x = 0.6073 (the CORDIC gain
compensation), y = 0 and z = the angle. The returned x and y are then cos and sin
to about 3 decimal places. The returned z is the angle left over, close to 0.

## Top level (`hif_top`)

`hif_top` connects `hif_core` to all four backends. `exp_sel` (0 = averager,
1 = TEA, 2 = DCT, 3 = CORDIC) chooses which backend sees the ready and received
lines and drives the requests and the result bus. The unselected backends sit
idle. Change `exp_sel` only while the platform is idle, and follow the change
with a system reset. A reset bridge (`hif_rst_sync`) resets the backends. It
asserts as soon as `rst_n` is low or `design_reset` pulses, and it releases in
step with `exp_clk`. The status outputs (`in_full`, `in_empty`, `res_full`,
`res_empty`, `exp_busy`) are for observation only.

Shared types are in `hif_pkg`: register and command enums, the FIFO depth and the
null word. `hif_sync` is the synchroniser used on both sides.

## Where this design departs from the original platform

* **Local side of the PCI core.** The original controller drove the
  handshake signals of a vendor PCI core directly. This design uses a
  simplified interface: request, burst, done, abort and disconnect. It keeps
  the original's single and burst transfers and its disconnect rules. The
  per-word data-phase handshake of the real core is folded into `lt_req`.
  A bridge to a real PCI core must supply that bus protocol.
* **Four backends at once.** The original loaded one experiment per FPGA
  configuration. Here all four are instantiated and `exp_sel` chooses one.
* **Clock-domain crossing.** The original handshake was meant to let the
  experiment run on its own clock. In practice the experiments were clocked
  from the PCI clock, and no synchronisers were described. Here the backends
  have their own clock, `exp_clk`, which may be the same as `pci_clk` or
  unrelated to it. Synchronisers and a reset bridge are added for this. The
  cost is a few cycles of extra latency on each handshake edge.
* **Schedules are this design's own.** The arithmetic of each experiment
  follows the original specification: the TEA rounds and key, the DCT tables and
  rounding, and the CORDIC ROM and shifts. The cycle-by-cycle schedules are new.
  The original DCT kept the matrix in RAM and used extra wait states around a
  slower multiplier. This one keeps the matrix in registers. The original
  high-level-language versions also ran on a divided clock.
* **TEA `sum`.** Here it restarts at zero for every pair. The original
  cleared it only on a reset, so its host issued a system reset before each
  pair. Both give the same results for that host.
* **Aborts.** A wrong-direction register access aborts. This is a choice of
  this design.
* The original tied its interrupt output inactive. It is left out here.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
          rtl/hif_pkg.sv tb/tb_hif_top.sv --top-module tb_hif_top
obj_dir/Vtb_hif_top
```

| testbench           | what it covers |
|---------------------|----------------|
| `tb_hif_top`        | The whole platform at default sizes. PCI runs at 33 MHz and the backends at 45 MHz. The host runs 40 averager pairs, the three TEA pairs (checked against an encryption model and decrypted back), a 16x16 image of random shapes in sixteen DCT blocks, and CORDIC at every whole angle from 0° to 90°. It checks that every interface mechanism happens at least once: write abort, read abort, padding zero, final pop, system reset, both flushes, a backend stalled on a full result FIFO, PCI priority, backend switching, burst writes and reads, and a disconnect ending each kind of burst. One averager job and one DCT block are moved entirely in bursts. |
| `tb_hif_core`       | Controller and FIFOs from the host's side: padding zero, one-read lag, final pop, 17th write aborted, flushes, backend reset, a burst write disconnected at 16 words, a burst read disconnected when empty |
| `tb_hif_ctrl`       | The FSM alone: each access and command gives exactly its strobes, priority, 3-cycle access, bursts at one word per clock with their disconnects and aborts |
| `tb_hif_fifo`       | FIFO against a queue model under random traffic; registered read port; flush |
| `tb_exp_port`       | Both handshake directions in a loop-back test, with the result side held off |
| `tb_avg_backend`, `tb_tea_backend`, `tb_dct_backend`, `tb_cordic_backend` | Each backend against a software model, bit-exact, plus the cycle count of its compute phase (TEA 64, DCT 200, CORDIC 16). TEA is also checked against the published all-zero test vector, DCT against a floating-point DCT, and CORDIC against `$sin` and `$cos`. |

`tb_hs_ctrl` is a behavioural model of the controller's backend side, which the
backend testbenches use. Each backend testbench finishes in well under a second,
and `tb_hif_top` in well under a second of run time after a build of a few seconds.
