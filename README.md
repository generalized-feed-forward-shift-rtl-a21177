# Secure scan with generalized feed-forward shift registers (GF2SR)

Scan chains make a chip testable by letting a tester shift any state into the
flip-flops and shift any state out. On a cryptographic chip the same path
leaks the secret: scanning out a key register hands over the key. This design
keeps the scan test fully usable but makes the scanned bits meaningless to
anyone who does not know how the chain is built.

The idea: replace the plain shift register of the secret register's scan path
by a **generalized feed-forward shift register** (GF2SR). A GF2SR is still a
chain of k flip-flops, but between neighbouring stages the shifted bit is
XOR-ed with an arbitrary logic function of the serial input and of the stages
*in front of* that point. There is no feedback, so every bit that enters
leaves exactly k clocks later, XOR-ed with a function of the bits that
followed it:

    z(t+k) = x(t) xor f(x(t+1), ..., x(t+k))

For the tester, who knows the structure, the register is as easy to use as a
shift register: a wanted state can be loaded with a k-bit sequence computed
from the structure alone, and a captured state can be recovered from k input
and k output bits. Scan-in and scan-out overlap as usual and the test is
exactly as long as with a plain chain. For an attacker, the bits seen at the
scan output are not the register contents, and the number of possible k-stage
structures is 2^(2^(k+1)-1), so guessing the structure is hopeless. Only the
secret registers are converted; the rest of the chain stays conventional, and
the added gates sit on the shift path only, so normal operation is not slowed.

## The GF2SR

    x --(+)--> y1 --(+)--> y2 --(+)-- ... --> yk --(+)--> z
         ^           ^           ^                  ^
        f0          f1          f2                  fk
     (const)       (x)       (x, y1)     (x, y1, ..., y(k-1))

* stage 1 takes `x ^ f0`, stage i+1 takes `y_i ^ f_i`, the output is
  `z = y_k ^ f_k`;
* `f_0` is a constant, `f_i` may read `x` and `y_1 .. y_(i-1)` only.

The familiar special cases are all GF2SRs: inverters inserted in the chain
(`f_i = 1`), linear feed-forward taps (`f_i = x` or `y_j`), and combinations
of the two.

### Why the tester can always control and observe it

Write `y_i(t+k)` for the state after k shifts. Stage 1 holds `x(t+k-1)`
(xor the constant f0); stage i holds `x(t+k-i)` xor a function of the
*later* inputs `x(t+k-i+1) .. x(t+k-1)`. So, given a target state:

1. `y_1` fixes the last input bit;
2. with it known, `y_2` fixes the bit before;
3. and so on down to `y_k`, which fixes the first.

This is **state justification**. Observation works the same way in the
other direction (**state identification**): output bit `z(t+m)` equals
`y_(k-m)(t)` xor a function of the stages in front of it and of the inputs,
so the last output bit gives `y_1`, the one before gives `y_2`, and so on.
Both procedures are pure implication: each step determines one bit from
values already known, with no search. The testbenches implement them in a
generic way on a behavioural model: to find bit i, set it to 0, simulate the
model, and XOR the simulated value with the wanted (or observed) one.

Worked example, 3 stages (`R2`: `y3 <= y2 ^ (x & y1)`, `z = y3`). To reach
`(y1,y2,y3) = (a,b,c)` apply `x = ab^c, b, a`. Applying inputs `a, b, c` and
observing outputs `d, e, f` gives the initial state
`y1 = ab^f`, `y2 = a(ab^f)^e`, `y3 = d`.

### Function encoding in this RTL

The hardware has to fix the functions at elaboration time. Each `f_i` is a
look-up table with `FN_IN` (= 4) inputs; every table input has a source
select (`0` = x, `j` = y_j) and the table holds the function value for every
input combination. `gf2sr_pkg` provides constructors (`fn_const`, `fn_lit`,
`fn_and2`, `fn_or2`) and predefined configurations. Elaboration stops with an
error if a table depends on a stage at or behind its own tap, which would be
feedback. Four table inputs suffice for every example below; a function of
more variables needs a larger `FN_IN` (the full class needs up to k).

Predefined configurations (`gf2sr_pkg`):

| name | stages | structure |
|---|---|---|
| `FIG_A1_FN` (default) | 16 | FF8 = FF7 ^ (FF1 & FF4), FF10 = FF9 ^ 1, FF16 = FF15 ^ (~FF9 \| FF12), z = FF16 |
| `r_fn(1)` | 3 | y2 = ~y1, y3 = y2 ^ x (inversion plus linear feed-forward) |
| `r_fn(2)` | 3 | y3 = y2 ^ (x & y1) |
| `r_fn(3)` | 3 | y2 = ~y1, z = y3 ^ (~y1 \| y2) |
| `r_fn(4)` | 3 | y3 = y2 ^ (x & ~y1), z = y3 ^ y1 |

R2, R3 and R4 all give `z(t+3) = x(t) ^ x(t+2)x(t+1)`; started in
(0,0,0), (0,1,1) and (0,0,0) they produce identical output for every input,
so their input/output behaviour cannot tell them apart.

For the 16-stage default, the input sequence
`0,0,0,1,0,0,1,0,0,1,1,1,1,1,1,1` drives the register to all ones from any
initial state.

## The scan-after-reset guard

If an attacker could reset the chip and then scan out, they would watch a
known state (all zeros) pass through the GF2SR and could work out its
structure. One extra flip-flop prevents that: reset sets it, the first
normal-mode clock (a capture) clears it, and while it is set the scan output
is forced to zero. Shifting in is not blocked, so the normal test sequence
(reset, scan-in, capture, scan-out) is unaffected.

## The scan chain

    scan_in -> [ N_PLAIN conventional scan FFs ] -> [ K-stage GF2SR ] -> guard -> scan_out
                       ^ d_plain  | q_plain            ^ d_secret | q_secret

Every flip-flop has a multiplexer selecting normal data (`scan_en` = 0) or
shift data (`scan_en` = 1); in the GF2SR the shift data is the XOR output.
The combinational logic of the chip (the kernel) is outside the top level:
its results come in on `d_*` and the register contents go out on `q_*`.
A full scan-in or scan-out takes `N_PLAIN + K` clocks, the same as a plain
chain of that length, and the justification and identification procedures
above extend to the whole chain (the conventional part just adds delay).

## Modules

| file | what it is |
|---|---|
| `rtl/gf2sr_pkg.sv` | function-table type, constructors, example configurations |
| `rtl/gf2sr_ffnet.sv` | combinational feed-forward network: shift values `s[i] = y_(i-1) ^ f_(i-1)`, output `z` |
| `rtl/gf2sr.sv` | GF2SR scan register: network + flip-flops with scan multiplexers |
| `rtl/scan_chain.sv` | conventional scan chain segment |
| `rtl/reset_scan_guard.sv` | the extra flip-flop that blocks scan-out after reset |
| `rtl/secure_scan_top.sv` | top: conventional part, GF2SR secret register, guard |

Parameters: `K` (GF2SR stages, default 16), `FN` (the functions, packed
array `ffn_t [K:0]`, index i = f_i, default `FIG_A1_FN`), `N_PLAIN`
(conventional flip-flops, default 16). `K` and `FN` must be changed together.

Interface timing: all flip-flops are on the rising edge of `clk`; `rst_n` is
synchronous and active low and clears every scan flip-flop; `scan_out` (and
`z` of `gf2sr`) is combinational from the register state, and from `x` when
`f_K` reads it. `scan_blocked` shows the guard.

## Testbenches

| testbench | what it shows |
|---|---|
| `tb_gf2sr_ffnet` | network outputs against hand-written equations (16-stage random, R3/R4 exhaustive) |
| `tb_gf2sr` | 16-stage register reproduces a reference state/output table clock by clock from reset, reaches all ones from random states, matches a model; R1..R4 output equations, equivalence of R2/R3/R4, closed-form justification and identification |
| `tb_scan_chain` | N-clock shift latency, capture, unload with overlapped load |
| `tb_reset_scan_guard` | output masked from reset to the first capture, transparent afterwards |
| `tb_secure_scan_top` | full test flow at default size: justified scan-in, capture through a behavioural kernel, overlapped scan-out/scan-in, identification of the captured state, masking after reset, functional clocks; each mechanism is counted |
| `tb_gf2sr_sizes` | justification and identification for 16-, 32-, 64- and 80-stage registers with rule-generated functions (helper `tb/gf2sr_size_check.sv`) |

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. To run one with
Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/gf2sr_pkg.sv tb/tb_secure_scan_top.sv --top-module tb_secure_scan_top
    ./obj_dir/Vtb_secure_scan_top

Each runs in well under a second; `tb_gf2sr_sizes` takes about half a minute
to compile.

## What is this design's own, and limits

Taken from the scheme: the GF2SR structure and its rule that each function
sees only earlier stages, the 16-stage and 3-stage example registers, the
placement of the XORs on the shift path only, the scan multiplexers, and the
existence of a single extra flip-flop against scan-after-reset.

Chosen here:

* the look-up-table encoding of the functions, with at most 4 variables each;
* synchronous active-low reset to zero;
* the guard's behaviour (set by reset, cleared by a capture clock, output
  masked with an AND gate);
* one scan chain with the conventional part in front of the GF2SR, and
  `N_PLAIN = 16`;
* the kernel is not part of the RTL; the testbench uses an arbitrary
  behavioural one.

Not in the RTL: the software that designs GF2SRs and computes scan sequences
(the testbenches contain equivalent procedures), the kernel, and support
for multiple scan chains beyond instantiating several chains yourself.
The security of the scheme rests on the structure staying secret and on the
guard; a capture-then-scan attack on a known kernel, or access to the
netlist, is outside what the scan path itself can defend against.
