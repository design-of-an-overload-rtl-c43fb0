# Overloaded CDMA crossbar router for networks-on-chip

A CDMA crossbar lets several transmitters use one shared channel at once. Each
transmit/receive pair gets its own spreading code. The spread data of all
transmitters is added in an arithmetic adder, and each receiver recovers its own
bit by correlating the sum with its code. With Walsh–Hadamard codes of length N,
a classical CDMA crossbar serves N−1 ports (the all-zero Walsh row cannot be
used).

This design is an **overloaded CDMA interconnect (OCI)** crossbar. It
serves **M = 2(N−1) ports with the same N-chip codes**, twice as many as the
classical crossbar. It adds only simple encoders and decoders: the classical
accumulator decoder stays as it is. The RTL contains two crossbars:

* **T-OCI** (serial): one chip per clock, so one transaction takes N cycles.
* **P-OCI** (parallel): all N chips in one clock. This gives N times the
  bandwidth, for about N times the encoder and adder logic.

Each crossbar sits in a complete NoC router. The router has transmit FIFOs, a
code-assigning controller with arbitration, and 8-bit flits. All adders are
Brent–Kung parallel-prefix adders. The top `oci_noc_top` places a T-OCI router
and a P-OCI router side by side. At the default N = 8, each router has 14 ports.

## Why overloading works

The codes here are written in 0/1 form, so Walsh chip (r, i) =
parity(r AND i). A transmitter with an orthogonal (Walsh) code sends
`d XOR C(i)` at chip i. The channel sum at chip i is

    S(i) = Σ_j ( d_j XOR C_j(i) )  +  overloading contributions

Two facts make the extra N−1 codes possible:

1. **The parity of the Walsh part is the same at every chip.** Chip 0 of every
   Walsh row is 0, so S(0) = Σ d_j. Going from chip 0 to chip i flips the
   contribution of every row whose chip i is 1. There are exactly N/2 such rows
   among rows 1..N−1, and N/2 is even for N ≥ 4. Each flip changes the sum by
   ±1, so S(i) − S(0) is even. This holds for any data, but only if **all N−1
   Walsh codes are on the channel**.
2. **An overloading code is a single '1' at chip k** (k = 1..N−1). Its
   transmitter sends `d AND C(i)`, so its bit shows up only in S(k). The bit is
   then simply

       d_k = LSB(S(0)) XOR LSB(S(k))

   Each chip carries at most one overloading '1'. So S(i) ≤ N, and the sum needs
   only ⌈log2(N+1)⌉ = 4 bits at N = 8.

**Walsh decoding still works.** The Walsh decoder computes Σ_i ±S(i). It adds
S(i) where its code chip is 0 and subtracts it where the chip is 1. The
orthogonal part gives +N/2 for a '1' and −N/2 for a '0'. Other Walsh users
cancel out. The overloading bits add an error between −N/2 and N/2−1, because
code row j has N/2 ones and N/2−1 zeros among chips 1..N−1. The result is
therefore in [0, N−1] for a '1' and in [−N, −1] for a '0'. **The sign bit alone
decides**, as long as a zero result counts as positive: decoded bit = NOT
sign.

**Filler codes keep all Walsh codes on the channel.** Fact 1 needs every Walsh
code present in every transaction. So the controller hands each Walsh code
that no flit uses to an idle transmit port, which spreads a '0' with it. Its
receive port just ignores the result. There are always enough idle ports,
because at most N−1 ports can hold overloading codes.

## Code assignment, receiver-based

Receive port `d` owns code index `d` for good:

| receive port | code                                          | decoder                   |
|--------------|-----------------------------------------------|---------------------------|
| 0 .. N−2     | Walsh row d+1                                 | up/down correlator (sign) |
| N−1 .. 2N−3  | single '1' at chip k = d−N+2                   | LSB(S(0)) XOR LSB(S(k))   |

Before each transaction, `oci_controller` looks at the head flit of every
transmit FIFO. For each receive port it picks one requesting transmit port and
gives that port the receive port's code. The other requesters wait for a later
transaction. Then it assigns the filler Walsh codes.

Arbitration uses a rotating priority. A pointer names the highest-priority
port, and it moves on by one port per transaction, so every port waits at most
M transactions. A fixed priority was tried first and dropped: under sustained
traffic, a low-index port can starve another port whose head flit addresses the
same receiver forever.

## The crossbars

Both crossbars use the same blocks:

* `oci_hybrid_encoder`: computes `data XOR chip` and `data AND chip`. A
  multiplexer on the code type picks one of them. The output is 0 when the port
  holds no code.
* `oci_add_tree`: the channel adder, a balanced tree of `bk_adder` built as a
  heap (node n = node 2n+1 + node 2n+2). It adds the M spread chips of one flit
  bit. The tree takes all M ports, because with receiver-based assignment any
  port may hold either code type.
* decoders: one per receive port and flit bit. The single-bit crossbar is
  repeated FLIT_W times.

| | T-OCI `oci_t_crossbar` | P-OCI `oci_p_crossbar` |
|---|---|---|
| encoders per port and bit | 1 | N |
| channel adders per bit | 1 (chip i in cycle i) | N (all chips at once) |
| Walsh decoder | `oci_t_orth_decoder`: up/down accumulator, restarts at chip 0 | `oci_p_orth_decoder`: the loop unrolled into an adder tree |
| overloading decoder | `oci_t_nonorth_decoder`: 2-bit register with LSB(S(0)) and LSB(S(k)), then XOR | `oci_p_nonorth_decoder`: XOR of both LSBs in the same cycle |
| `ready` | idle, or in the last chip cycle | always |
| start → `out_valid` | N+1 cycles (N+2 pipelined) | 2 cycles (3 pipelined) |
| throughput | M flits per N cycles | M flits per cycle |

The serial accumulator adds or subtracts with a single Brent–Kung adder. It
inverts the operand and sets the carry-in to subtract. The parallel correlator
adds `~S(i)` for the '1' chips of its code. It then adds the number of those
chips as one more tree operand, which completes the two's complement.

`PIPELINED = 1` puts a register after the channel adders. The chip index, valid
flag and destination mask are delayed with it. Its purpose is to shorten the
critical path. The reference variant, `PIPELINED = 0`, is the default.

## Router and top-level interface

`oci_router` is built from:

* one `oci_tx_fifo` per port, holding `{dest, payload}` (depth 4);
* the controller;
* the crossbar chosen by `PARALLEL`.

A transaction starts when at least one flit is granted and the crossbar is
ready. The granted flits leave their FIFOs in that same cycle.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `tx_valid[p]` / `tx_ready[p]` | in / out | 1 | write handshake of transmit port p |
| `tx_dest[p]` | in | $clog2(M) | receive port, must be < M (assertion) |
| `tx_data[p]` | in | FLIT_W | payload |
| `rx_valid[d]`, `rx_data[d]` | out | 1, FLIT_W | one-cycle pulse per delivered flit, no backpressure |

`oci_noc_top` repeats this interface twice, as `t_*` (serial router) and `p_*`
(parallel router), on a shared clock and reset.

Latency from writing a flit into an empty FIFO to delivery:

* serial router: N+2 cycles (10 at N = 8);
* parallel router: 3 cycles (4 when pipelined).

Flits from one source to one destination arrive in order.

### Parameters

| parameter | default | where |
|---|---|---|
| `N` | 8 | code length; ports M = 2(N−1) = 14. The code needs N a power of two ≥ 4. |
| `FLIT_W` | 8 | payload bits (one single-bit crossbar per bit) |
| `PARALLEL` | 0 | router: 0 = T-OCI, 1 = P-OCI (the top instantiates both) |
| `PIPELINED` | 0 | register after the channel adders |
| `FIFO_DEPTH` | 4 | transmit FIFO entries |
| `bk_adder.WIDTH` | 8 | instantiated at the width each sum needs |

## What follows the source description and what was chosen here

The following come from the published OCI architecture:

* M = 2(N−1) ports;
* Walsh codes plus overloading codes;
* XOR/AND hybrid encoders;
* the up/down accumulator decoder with its sign rule, and its unrolled parallel
  form;
* the LSB-XOR overloading decoder, with and without the 2-bit register;
* receiver-based code assignment with arbitration;
* transmit NI FIFOs;
* serial and parallel variants, each with and without pipelining;
* Brent–Kung adders in place of the plain adders.

The following are this design's own choices:

* N = 8 and 8-bit flits. The architecture fixes neither; the 8-bit Brent–Kung
  adder and 8-bit data values point to these sizes.
* Filler Walsh codes on idle ports. The parity property needs all Walsh codes
  present, but how that is ensured is left open.
* Rotating-priority arbitration. The scheme is left open.
* The channel adder sums all M port chips. The source reduces the adder with a
  multiplexer that picks the one overloading input that can be '1'. That
  presumes fixed overloading ports, which receiver-based assignment does not
  give.
* The sum width is ⌈log2(N+1)⌉. The source gives it as log2 M. The two agree at
  N = 8.
* A single pipeline register, placed after the channel adder.
* The start/ready/valid handshakes, FIFO depth, reset style and latencies.
* The receive network interface and the processing elements are not part of
  the RTL. The router brings its receive ports out instead.

The source also reports FPGA results: slices, LUTs and a clock of about 199 MHz
on a Xilinx part. Those results are for an unstated and much smaller
configuration (35 I/O pins), so they are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. The reference model, `tb_oci_ref_pkg`, builds
the Walsh matrix by the Sylvester recursion rather than the parity formula used
in the RTL.

| testbench | what it shows |
|---|---|
| `tb_bk_adder` | exhaustive at 8 bits, random at 5 and 13 |
| `tb_oci_add_tree` | 14-input channel adder; 9-operand pipelined tree |
| `tb_oci_hybrid_encoder` | exhaustive |
| `tb_oci_{t,p}_{orth,nonorth}_decoder` | all 7 decoders of a kind, with sums of random data on all 14 codes; exact output timing |
| `tb_oci_controller` | grants against rotating priority, each Walsh code exactly once, fillers only on idle ports |
| `tb_oci_tx_fifo` | queue model, full, and write while full with a pop |
| `tb_oci_{t,p}_crossbar` | reference and pipelined variants, through `tb_oci_xbar_env`; random code sets including all ports; latency; back-to-back starts; at N = 8 and N = 4, and also N = 16 for the serial crossbar |
| `tb_oci_router` | serial router and pipelined parallel router with scoreboards; latency probe; hot-spot traffic; full-load throughput (14 flits per 8 cycles, per cycle); drain |
| `tb_oci_noc_top` | top at default parameters, end to end; also counts conflicts, fillers, idle encoders, full-load transactions, back-to-back transactions, FIFO backpressure, and deliveries on both code types, and fails if any never happened |

To run a testbench with Verilator from the repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/oci_pkg.sv tb/tb_oci_ref_pkg.sv tb/tb_oci_noc_top.sv --top-module tb_oci_noc_top
    ./obj_dir/Vtb_oci_noc_top

To lint a module: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/oci_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused inputs. One is the clock of a
non-pipelined adder tree. The others are the upper sum bits, which the
overloading decoders do not need, since they read only the LSB.

## Limits

* N must be a power of two and at least 4. For N = 2 the parity property fails,
  because N/2 is odd.
* Filler ports send a '0' payload. Their receive ports decode it but do not
  flag it as valid.
* The receive ports cannot stall the router.
