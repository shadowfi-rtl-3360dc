# Saboteur-based fault injection infrastructure (SHADOWFI-style)

Fault emulation measures how a circuit reacts to hardware faults by building
the faults into the circuit itself. Small *saboteur* cells are spliced into
chosen nets and flip-flop inputs of a gate-level netlist; when told to, a
saboteur forces its net to 0 or 1, inverts it for a cycle, or makes a
flip-flop load a flipped bit. Because the instrumented circuit is ordinary
logic, it can be simulated with a fast cycle-based simulator or put on an
FPGA, and thousands of faults can be evaluated one after another (or on
many machines at once) without re-synthesising anything.

The hard part is control: a large design may carry tens of thousands of
saboteurs. This RTL follows the SHADOWFI architecture, which solves it with
one serial scan chain. Every group of saboteurs has a shift register that
holds the fault model and one selection bit per saboteur; the registers of
all groups are chained, and one extra wire, `tf_en`, says *when* the
selected fault is active. A fault injection controller loads a bit string
into the chain and pulses `tf_en` at the right clock cycles. The five
signals `rst`, `en`, `si`, `so`, `tf_en` (plus the clock) are the whole
Fault Injection Port (FIP), however many saboteurs there are.

## Files

| file | what it is |
|---|---|
| `rtl/shadowfi_pkg.sv` | fault-model enum, shared constants |
| `rtl/sab_type1.sv` | net saboteur: stuck-at-0, stuck-at-1, SET |
| `rtl/sab_type2.sv` | flip-flop saboteur: SEU (MEU when several are selected) |
| `rtl/sbtr.sv` | SBTR: one shift register plus N_T1 + N_T2 saboteurs |
| `rtl/fic.sv` | fault injection controller (host port to FIP) |
| `rtl/shadowfi_fi_top.sv` | FIC + chain of N_SBTR SBTRs; design nets as ports |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/cut_model.sv` | small stand-in design under test used by the top testbench |
| `tb/fi_size_check.sv` | checker for one scaled-up infrastructure, used by `tb_fi_sizes` |

## Fault models and the two saboteur cells

Both cells are combinational and have two common control inputs:
`s_en` (this saboteur is selected) and `tf_en` (the fault is active now).
Nothing happens unless both are high.

| cell | `s_en & tf_en` | `c[1:0]` | output | fault model |
|---|---|---|---|---|
| Type I (net) | 0 | - | `net_out = net_in` | none |
| Type I | 1 | 00 | `net_out = 0` | stuck-at-0 |
| Type I | 1 | 01 | `net_out = 1` | stuck-at-1 |
| Type I | 1 | 1x | `net_out = ~net_in` | single event transient |
| Type II (flip-flop) | 0 | ignored | `d_out = d_in`, `en_out = en_in` | none |
| Type II | 1 | ignored | `d_out = ~d_in`, `en_out = 1` | single event upset |

How long a fault lasts is decided only by `tf_en`: a permanent stuck-at
keeps it high for the whole run; a SET or SEU keeps it high for one cycle.
A Type II saboteur does not touch Q directly. It inverts what the
flip-flop is about to load and forces it to load, so the stored bit
flips at the next clock edge. A multibit upset (MEU) is obtained by
selecting several adjacent Type II saboteurs of one SBTR at once. The
Type II cell keeps a `c` input so that both cells take the same control
bundle; it ignores it (a lint tool reports it as unused, and that is
intended).

For a flip-flop without an enable pin, tie `en_in` to 1.

## The SBTR and the configuration chain

An SBTR holds `W = N_T1 + N_T2 + 2` register bits:

```
 si ──► sr[W-1] sr[W-2] │ sr[N_T1+N_T2-1] ... sr[N_T1] │ sr[N_T1-1] ... sr[0] ──► so
        C1      C0      │ Type II selects (flip-flops) │ Type I selects (nets)
        fault model     │                              │
```

The two most significant bits are the fault model shared by every
saboteur in the group; each other bit selects exactly one saboteur. On
each clock with `en` high the register shifts one place toward `sr[0]`.
`rst` (synchronous, active high) clears it, which selects nothing.

`shadowfi_fi_top` chains `N_SBTR` of them:
`FIC.si → SBTR 0 → SBTR 1 → … → SBTR N_SBTR-1 → FIC.so`. The whole chain
is `L = N_SBTR × W` bits. The first bit shifted in travels furthest, so
a configuration is best thought of as an L-bit string `s` where `s[b]` is
the b-th bit sent:

* `s[b]` ends up in SBTR `N_SBTR-1 - b / W`, register bit `b % W`.
* So SBTR `k` owns string bits `Bit_start = (N_SBTR-1-k)·W` to
  `Bit_end = Bit_start + W - 1`.
* Net saboteur `j` of SBTR `k` is bit `Bit_start + j`. Flip-flop saboteur
  `m` is bit `Bit_start + N_T1 + m`. C0 is bit `Bit_end - 1` and C1 is
  bit `Bit_end`.

Example, at the default sizes (W = 242, L = 1,210): a stuck-at-1 on net 12
of SBTR 2 sets bits 484 + 12 = 496 (select), 724 (C0 = 1) and 725
(C1 = 0). Everything else is 0. The host sends `s` as 38 words of 32 bits,
`s[31:0]` first.

Only one fault at a time is intended (one selected saboteur, or a few
adjacent flip-flops for an MEU). Nothing in the hardware prevents
selecting more. Note that the FM bits belong to each SBTR, so two
selected nets in different SBTRs may even use different models.

On the design side, Type I saboteur `j` of SBTR `k` is bit `k·N_T1 + j` of
`dut_net_in/dut_net_out`. Type II saboteur `m` of SBTR `k` is bit
`k·N_T2 + m` of the `dut_ff_*` vectors.

## The controller (FIC)

The FIC has two independent jobs.

**Loading the chain.** Pulse `load_start` with `load_len = L`, then offer
the words on `cfg_valid/cfg_ready/cfg_data`. The FIC shifts one bit per
clock. It takes a new word in the same cycle it shifts the last bit of
the old one, so there is no bubble as long as `cfg_valid` stays high. If
the host falls behind, `en` drops and the chain simply waits. A load of L
bits therefore takes L shift cycles, and `load_done` pulses L + 2 cycles
after `load_start` when the host never stalls. The bits pushed out of the
far end are packed the same way and returned on `rb_valid/rb_data`, one
word per 32 bits, with a final partial word right-aligned. This gives
back the previous configuration, which is useful to check that the
chain is intact. `clear` resets all SBTR registers in one cycle.

**Activating the fault.** `run_start` opens the design's operating window.
Cycle `k = 0` is the first clock cycle after the edge that samples
`run_start`, and `cycle` shows `k`. `tf_en` is registered and is high for
`act_time ≤ k < act_time + duration`. `duration = 0` means permanent: it
stays high until `run_stop`. Both values are sampled at `run_start`. A
fault-free reference run sets `act_time` to all ones (never).

Loads are refused while a window is open, and windows are refused while
loading, so `tf_en` is never high while the chain shifts. An assertion
in `fic.sv` states this rule. It matters because partly shifted selection
bits would otherwise inject faults in the wrong places.

A typical campaign, per fault: load the fault's string; reset the design
under test; pulse `run_start` together with releasing its reset; run the
workload; compare its outputs with a fault-free run, and classify the
fault as masked (no difference), SDC (silent data corruption: wrong
outputs) or DUE (the design hangs or times out).

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `N_SBTR` | 5 | instrumented components in the chain |
| `N_T1` | 180 | net saboteurs per SBTR |
| `N_T2` | 60 | flip-flop saboteurs per SBTR |
| `LEN_W` | 24 | width of the chain-length counter (chains up to 2^24 - 1 bits) |
| `TIME_W` | 32 | width of the cycle counter / activation time |

The defaults give 5 × (180 × 3 + 60) = 3,000 distinct single faults,
counting three per net (SA0, SA1, SET) and one per flip-flop (SEU). That
is the smallest of the infrastructure sizes used to evaluate SHADOWFI
(3 k to 48 k faults). The larger ones are reached by scaling `N_T1`/`N_T2`
or `N_SBTR`. For example, 48 k is 16 times the default, with a 19,210-bit
chain. The default is a choice of this RTL: the published description
gives the sizes only as fault counts. The same goes for the 3:1 split
between net and flip-flop saboteurs.

Synthesised at the defaults, the infrastructure is about 4,900 word-level
cells and 1,466 flip-flops (1,210 of them the chain).

## What follows the published architecture and what is this RTL's own

Taken from the published description:

* the two saboteur types and their truth table;
* the SBTR register with the two fault-model bits at the top, one
  selection bit per saboteur and a shared `tf_en`;
* the FIP signal set;
* the chaining of SBTRs into one scan chain;
* activation time and duration in clock cycles under control of `tf_en`.

Choices made here, where the description is silent:

* the shift direction inside an SBTR (serial input at the fault-model end,
  as drawn in the published block diagram);
* both saboteur types sharing one SBTR register;
* synchronous active-high resets;
* everything inside the FIC: the 32-bit word-stream host port, readback,
  `clear`, the cycle numbering, `duration = 0` for permanent faults, and
  the refusal to shift while a fault is active;
* the bit numbering of the configuration string;
* the default sizes.

Not included: the instrumented designs themselves (in the original work,
third-party accelerators), the host-to-FPGA bridge IP, and all software
(netlist instrumentation, fault-list generation, campaign orchestration).
In this RTL the design under test connects through the
`dut_*` ports and the host through the FIC's word-stream port. Routing the
FIP through a design's module hierarchy is flattened here into one
generate loop; a real instrumented netlist would carry `si/so` through
each module boundary instead.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/shadowfi_pkg.sv tb/tb_shadowfi_fi_top.sv --top-module tb_shadowfi_fi_top
./obj_dir/Vtb_shadowfi_fi_top
```

Replace the testbench name for the others (`tb_sab_type1`, `tb_sab_type2`,
`tb_sbtr`, `tb_fic`).

* `tb_sab_type1`, `tb_sab_type2`: exhaustive truth tables. The Type II
  testbench also shows an SEU flipping a held flip-flop once.
* `tb_sbtr` (5 + 3 saboteurs): random configurations shifted in with
  pauses, serial output checked against the previous configuration, every
  saboteur output checked against the tables, reset.
* `tb_fic`: load and readback against a plain shift-register chain model,
  exact load latency, stalls, clear, and `tf_en` timing for transient,
  multi-cycle, permanent and stopped faults.
* `tb_shadowfi_fi_top` runs at the default size with no parameter
  overrides. It is a 120-fault campaign (SA0, SA1, SET, SEU and 2-4 bit
  MEU over all five SBTRs; permanent and transient) against `cut_model`,
  classifying each fault as masked, SDC or DUE. In every cycle it checks
  all 900 net and 300 flip-flop saboteur outputs against the fault it
  meant to inject. It takes a few seconds of wall-clock time.
* `tb_fi_sizes` builds the infrastructure at 6 k, 12 k, 24 k and 48 k faults
  (2, 4, 8 and 16 times the default saboteurs per SBTR; chains of 2,410 to
  19,210 bits) through the helper `fi_size_check`. At each size it injects
  one fault of every model, including one at each end of the chain, and
  checks readback and every saboteur output. Verilator needs a few minutes
  to build it, because the 48 k instance alone has 19,200 saboteurs.

Verilator runs in two-state mode, so the testbenches reset or initialise
everything they read.
