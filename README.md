# PUF-bound hardware signature for IP cores on an SoC FPGA

This RTL ties add-on IP cores to one physical FPGA. It uses no stored
secret and no cryptographic core. Two physical unclonable functions (PUFs)
on the chip give the secret:

* An **arbiter PUF** (strong PUF) answers a 16-bit challenge C with a 16-bit
  response R. Only the Hamming distance HD(C, R), 4 bits, is kept.
* A **butterfly PUF** (weak PUF) gives a 16-bit KEY.

A **three-level FSM** accepts only (HD, KEY) pairs that were enrolled for
this chip. It mixes the pair by XOR and shifting into a 16-bit **hardware
signature (HS)**, which is stored in a register inside an IP core. Later an
**extended FSM (EFSM)** checks that IP core. It measures the HD again on the
same chip, using the challenge C that travels with the core as a passcode.
It undoes the mixing and compares the result with the chip's public keys,
within a time limit T. The IP core's outputs pass only when the EFSM reaches
its authenticated state. Four IP cores (`NUM_IP`) share one generator, one
verifier and one pair of PUFs; software picks the core each operation
refers to.

The scheme follows the paper "Lightweight signature scheme to protect
intellectual properties of Internet of things applications in system on chip
field-programmable gate arrays". That paper gives the block structure, the
FSM levels, the EFSM states and guards, and the enrolment values. Where it
leaves something open, this RTL makes its own choice. Each module's header
says which parts come from the paper and which are choices made here. The
section "Readings and departures" below lists them all together.

## Block structure

```
hw_signature_top
 ├─ hs_axil_regs        AXI4-Lite slave, 32-bit: control, passcode, results
 ├─ arbiter_puf         (behavioural model) 16 challenge bits -> 16 response bits
 ├─ hd_hash             HD = popcount(C xor R), saturated to 4 bits
 ├─ butterfly_puf       (behavioural model) 16-bit KEY per excitation
 ├─ sig_fsm             three-level generation FSM
 │   └─ xor_shift_mixer KEY, HD -> HS
 ├─ ip_core_stack       selects the IP core, routes HS, keeps per-core verdicts
 ├─ addon_ip_wrapper ×NUM_IP  encapsulated HS register + output gate of one IP core
 ├─ resuming_response   re-applies the passcode C to the arbiter PUF -> HD
 └─ efsm_verifier       Start / E0 / AS / UA extended FSM
hs_pkg                  widths, branch-table type, enrolled tables, mix functions
```

The generation side and the verification side share the chip's one arbiter
PUF. While `resuming_response` is busy, it owns the PUF. The processor, the
AXI interconnect and the protected IP core are outside the top:

* The processor and the interconnect are reached through the AXI4-Lite port.
* The IP cores' outputs enter on `core_out[i]` and leave, gated, on
  `ip_output[i]`.

## Generation: the three-level FSM

`sig_fsm` holds a table of four enrolled branches. Each branch is one pair:
an HD (condition C1) and a KEY (condition C2). The HD may be a range
(`hd`..`hd_hi`); the signature then uses the HD actually measured. The default table,
`CHIP1_BRANCHES`, uses the chip-1 enrolment values from the paper: the four
most frequent pairs whose HD lies in the EFSM window 7..10.

| branch (table index) | HD | KEY  | occurrences in 500 runs |
|----------------------|----|------|-------------------------|
| 1 (0)                | 10 | EFFF | 27 |
| 2 (1)                | 10 | CFFF | 13 |
| 3 (2)                | 9  | FF7F | 12 |
| 4 (3)                | 9  | DFFF | 11 |

`CHIP2_BRANCHES` is the same selection for the paper's second chip.

1. **Level 1 (S0 → Si).** The FSM excites the arbiter PUF with the current
   challenge. If the HD matches no branch, a 16-bit LFSR
   (x^16+x^14+x^13+x^11+1) steps and the FSM tries again. Each retry pulses
   `l1_retry`. The challenge that passes is kept as the passcode C.
2. **Level 2 (Si → Ki).** The FSM excites the butterfly PUF. The KEY must
   equal the KEY of a branch whose HD matched. A KEY that is enrolled only
   under another HD is refused. On a refusal the PUF is excited again, and
   each retry pulses `l2_retry`.
3. **Level 3 (Ki → HS).** The FSM mixes HD and KEY into HS and clears its
   copies of the KEY and HD. It then rests in the accepting state (`done`).
   The LFSR also steps, so the next signature starts from a new challenge.

Each level-1 try takes 2 clocks. Each level-2 try takes the butterfly PUF
latency plus 1 clock (3 clocks with the model's `SETTLE=2`). The mix takes
1 clock. The number of tries depends on the chip.

### The mixing, and why the verifier can undo it

The paper draws the mixing as a 4-bit XOR of HD with the KEY, followed by
"4-bit shifting". It prints the verifier's update functions as
`Out1 = REG xor HD` and `Out2 = Out1 >> HD`, and expects `Out2` to equal the
KEY. This RTL uses one reading that satisfies both:

```
mask(HD)   = {HD, HD, HD, HD}                    // HD in every nibble
HS         = rotl(KEY xor mask(HD), 4*(HD mod 4))  // generation
Out1       = HS xor mask(HD)                     // verification
Out2       = rotr(Out1, 4*(HD mod 4))  == KEY
```

The mask has the same value in every nibble, so a rotation by whole nibbles
leaves it unchanged. The XOR and the rotation therefore commute, and the
verifier can apply XOR-then-shift in the order printed for it. The
functions `hs_mix` and `hs_unmix` in `hs_pkg` state this.

Only 4 bits of chip-specific data (the HD) enter the signature, and the
KEYs of both enrolled chips come from the same 16-value population. The
signature is therefore not unique across chips. The two-chip testbench
shows this: chip 2 accepted 2 of 8 copies of chip-1 signatures. In the
end-to-end test, a few random passcode challenges that happen to give the
enrolled HD were also accepted. This weakness belongs to the scheme as
described, not to the RTL.

## Verification: the extended FSM

`rst_efsm` is the EFSM's RESET input. The top holds it high from a
verification request until `resuming_response` has the new HD (3 clocks).

| from → to   | guard | update |
|-------------|-------|--------|
| Start → Start | RESET = 1 | REG = 0 |
| Start → E0  | RESET = 0, 7 ≤ HD ≤ 10, signature ≠ 0 | REG = signature, T = V, Out1, Out2 |
| Start → UA  | RESET = 0 and that guard fails | – |
| E0 → AS     | presented key ≠ 0, key = Out2, T not expired | – |
| E0 → E0     | otherwise, T > 1 | T--, next key |
| E0 → UA     | T expires with no match | Out2 = 0 (NILL) |
| AS, UA      | hold until RESET | – |

The public keys KEY1..KEY4 are presented round-robin, one per clock. A key
at position k (1..4) is found k+1 clocks after RESET falls, provided
k ≤ T. A signature that matches nothing is refused after T+1 clocks. An HD
outside the window, or an empty register, is refused after 1 clock. The
time limit V (default 10) is bits 23:16 of the passcode register.

## Several IP cores

`ip_core_stack` stands for the module that holds the heterogeneous IP cores.
The processor writes a core number into IP_SEL. That selection decides three
things:

* which core's register receives the next generated or loaded signature;
* which core's signature the next verification checks;
* which core HS and IP_OUT show.

The selection is captured when a verification starts. Changing IP_SEL during
a verification does not move the verdict to another core.

Each core keeps its own verdict. An authenticated core stays enabled while
others are generated or checked. A refused core stays blocked and flagged.
A core's verdict is cleared only when that core is verified again. A core
that was never verified is blocked. After a refusal, software selects the
next core and starts again. The paper leaves this policy to the user.

## Register map (AXI4-Lite, 32-bit data, 6-bit byte address)

| addr | name | access | content |
|------|------|--------|---------|
| 0x00 | CTRL | W | bit0 start generation, bit1 start verification (pulses) |
| 0x04 | STATUS | R | bit0 generation done, bit1 HD re-measured, bit2 authenticated, bit3 rejected, bits5:4 branch, bit6 generation busy |
| 0x08 | HS | R | signature register of the selected IP core |
| 0x0C | PASSCODE | RW | bits15:0 challenge C, bits23:16 time limit V (reset value 10) |
| 0x10 | GEN_C | R | challenge chosen by the last generation |
| 0x14 | ARB_OUT | R | last arbiter PUF response |
| 0x18 | BP_OUT | R | last butterfly PUF key |
| 0x1C | IP_OUT | R | gated outputs of the selected IP core |
| 0x20 | HS_LOAD | W | bits15:0 loaded into the selected core's signature register (signature from a bit file) |
| 0x24 | RETRIES | R | bits15:0 challenge retries, bits31:16 key retries (saturating) |
| 0x28 | IP_SEL | RW | bits7:0 selected IP core (reset 0); a number ≥ NUM_IP selects none |
| 0x2C | VERDICTS | R | bits15:0 authenticated cores, bits31:16 refused cores, one bit per core |

STATUS bits 2 and 3 show the EFSM itself, that is, the outcome of the latest
verification. VERDICTS shows the outcome kept for every core.

Typical use: write IP_SEL, then write CTRL=1 and poll STATUS bit0. Read
GEN_C, then write it to PASSCODE together with V. Write CTRL=2 and poll
STATUS bits 2 and 3.

Write transactions need AWVALID and WVALID together. One write and one read
may be outstanding at a time. Every access answers OKAY. Unmapped addresses
read as zero.

## The PUF models

Real PUFs depend on manufacturing variation, so the two PUFs here are
behavioural models. Synthesis tools can read them, but they stand in for
hard macros or placed-and-routed primitives, which would replace them on a
real device.

* `arbiter_puf` has one chain of N challenge-controlled stages per response
  bit. It uses the additive delay model: each stage's signed delay
  difference comes from `CHIP_SEED`, and a crossed stage flips the sign of
  the path behind it. `NOISE` adds a random term to each race; the default
  is 0, for repeatable runs. The paper reports 98.4 % reliability.
* `butterfly_puf` settles each cell to `STABLE_KEY`. The cells named in
  `UNSTABLE_MASK` (default bits 13, 12, 7 and 4) settle at random on each
  excitation. These defaults give exactly the 16 keys CF6F…FFFF that the
  paper's enrolment charts show.

With the default seeds, the HDs of 500 random challenges range from 1 to 14
and centre on 8. The two chips' responses differ in about half their bits.
With `NOISE=100`, four 16-bit arbiter-PUF chips measure 49.9 % uniqueness,
98.0 % reliability and 51.3 % ones. At 8, 32 and 64 bits the model gives
similar figures. The butterfly PUF measures 88.0 % reliability.
The paper reports 45.67 %, 98.40 % and 49.6 % for its arbiter PUF and
91.86 % reliability for its butterfly PUF. These numbers show that the
models behave like PUFs. They do not reproduce the paper's chips.

## Readings and departures

* **Width.** The datapath is 16 bits, the paper's main configuration. Its
  block diagrams draw 32-bit PUF chains and 32-bit PUF output ports. The
  paper also evaluates 8-, 32- and 64-bit CRPs; `hs_pkg` fixes the
  signature path at 16 bits, so those sizes are not supported. Only the
  arbiter PUF model takes any width, and `tb_puf_metrics` measures it at
  all four.
* **HD.** A 16-bit pair can differ in 16 bits, but the HD is carried in 4
  bits, so 16 saturates to 15.
* **Branches.** A level-1 condition is a range of HDs, `hd` to `hd_hi`.
  The enrolled tables use single values (`hd == hd_hi`), as the enrolment
  charts give single HDs.
* **Time limit.** The paper sets a time limit for each HD and lets the user
  adjust it. Here no per-HD table is stored. A passcode belongs to one
  signature and therefore to one HD, so the limit for that HD travels in the
  passcode as V.
* **Enrolment values.** The default table uses the values printed on the
  chip-1 chart. The prose attributes a different set (FFFF, DFFF, DF7F with
  33, 27, 14 occurrences) to chip 1; that set appears on the chip-2 chart.
* **EFSM guards.** The HD window is read as 7 ≤ HD ≤ 10. A "T=5" printed on
  the E0 → AS transition is read as "T not yet expired", as the prose
  describes. Start → UA is taken when the E0 guard fails.
* **Example signature.** The paper shows 1111010101011010. No enrolled pair
  produces it under the mixing chosen here.
* **Rejected cores.** The outputs of a refused IP core are held at zero.
  Which core is tried next after a refusal is left to software, through
  IP_SEL. The paper draws four add-on cores; `NUM_IP` defaults to 4.
* **System.** The paper builds generation and verification as two processor
  designs on one board. Here they share one top and one register port.

## Simulation

All files are SystemVerilog-2017. Packages must come first. With Verilator
5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_hw_signature_top rtl/hs_pkg.sv tb/tb_hw_signature_top.sv
./obj_dir/Vtb_hw_signature_top
```

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| tb_hw_signature_top | End to end at default parameters, over AXI. Covers generation with both retry loops, authentication, a tampered signature refused by time-out, 40 random passcodes checked against an EFSM model (including HD-window refusals), a short time limit, a second generation with a new challenge, and per-core verdicts across three of the four cores. |
| tb_two_chips | Two chips: signatures copied from chip 1 to chip 2 |
| tb_enrolment | 500-iteration HD/KEY tally on two chips; prints branch candidates |
| tb_puf_metrics | uniqueness, reliability and randomness of the PUF models (4 arbiter chips with noise at 8, 16, 32 and 64 bits; one butterfly PUF) |
| tb_sig_fsm, tb_efsm_verifier, tb_xor_shift_mixer, tb_hd_hash, tb_resuming_response, tb_addon_ip_wrapper, tb_ip_core_stack, tb_hs_axil_regs, tb_arbiter_puf, tb_butterfly_puf | one per block |

`tb_axil_master` is the AXI4-Lite master that `tb_two_chips` uses. Every
test runs in well under a second.

To enrol a different chip: run `tb_enrolment` with that chip's seed, pick
four (HD, KEY) pairs with HD in 7..10, and pass them as `BRANCHES`.
