# Pipelined RC6 encryption processor

This is synthesizable SystemVerilog for a high-throughput RC6 block cipher
encryptor (RC6-32/20: 32-bit words, 20 rounds, 128-bit blocks). The hard part
of an RC6 round is the quadratic function

    f(X) = X(2X + 1) mod 2^w

and the design centres on three hardware operators for it, each suited to a
different kind of FPGA fabric. Around the operator sits a deeply pipelined
round with three clock cycles of latency. Rounds are chained either fully
unrolled (one 128-bit block per clock) or partly unrolled with a loop-back
(one block every r/k clocks, for smaller devices).

Only encryption is implemented. The key schedule is not part of the
hardware: the 44 round keys are computed elsewhere (the testbenches do it in
software) and shifted into the processor.

## The cipher in one paragraph

A block is four words A, B, C, D. Encryption adds S[0] to B and S[1] to D
(the *input round*). It then runs r rounds:

    t = f(B) <<< 5          u = f(D) <<< 5
    A = ((A xor t) <<< u) + S[2i]
    C = ((C xor u) <<< t) + S[2i+1]
    (A, B, C, D) = (B, C, D, A)

Finally it adds S[2r+2] to A and S[2r+3] to C (the *output round*). `<<<`
is a left rotation, and a data-dependent rotation uses only the low 5 bits
of its amount. All additions are modulo 2^32.

## The f(X) operators

All three compute the same function. Which one is best depends on the
target. Each has a `LATENCY` parameter: 0 makes it combinational, 1 (the
default) adds one pipeline register and is the setting every processor
configuration uses.

**Algorithm 1, `rc6_f_alg1`: plain product.** It multiplies X by
`{X[30:0], 1}` and keeps the low 32 bits. On an FPGA with 18x18 multipliers,
synthesis splits a 32-bit product into three of them. This version has its
register on the output.

**Algorithm 2, `rc6_f_alg2`: simplified partial products, with no
multipliers.** Since X(2X+1) = X + 2X², the square's partial products fold
together. Two identities do it: x_i·x_i = x_i, and x_i·x_j + x_j·x_i =
2·x_i·x_j. Only w/2 partial products are left, each a row of AND gates.

    PP_i       = sum_{j=2i+3}^{w-1} x_{j-i-2}·x_i·2^j  +  x_i·2^{2i+1}     (i < w/2-2)
    PP_{w/2-2} = (x_{w/2-1} AND NOT x_{w/2-2})·2^{w-1}  +  x_{w/2-2}·2^{w-3}
    PP_{w/2-1} = X

The NOT in the second line merges two terms of weight 2^{w-1}: x_{w/2-1}
and x_{w/2-1}·x_{w/2-2}. It uses x·y + x = 2xy + x·NOT y, and the 2xy part
falls out modulo 2^w. The 16 partial products (for w = 32) are summed in two
groups of eight. With `LATENCY = 1` the two group sums are registered, and
one final adder follows the register. This operator suits fabrics without
hard multipliers. It works for any even w ≥ 4.

**Algorithm 3, `rc6_f_alg3`: two small multiplications.** Write X = L + H,
where L is the low half and H is the high half at its own weight. Then:

    X(2X+1) = L(2L+1) + H + 4LH + 2H²

Modulo 2^w the 2H² term vanishes. In 4LH, only the low w/2-2 bits of L and
bits w/2 .. w-3 of H reach a weight below 2^w. This gives:

    f(X) = L(2L+1) + (X[w/2-3:0] · X[w-3:w/2]) · 2^{w/2+2} + H      (mod 2^w)

For w = 32 that is a 16x17 product and a 14x14 product. Both fit a 17-bit
unsigned hard multiplier, so the operator needs two multipliers where
Algorithm 1 needs three. Of the second product only its low 14 bits are
used. With `LATENCY = 1` the register sits directly behind the two products
(and H), where a hard multiplier's own output register would be. The two
additions follow the register. It needs an even w ≥ 6.

## One round: `rc6_round`

The round is a pipeline of `ALPHA + 2` stages, where `ALPHA` is the f
operator's latency. That is 3 clocks by default. Registers sit as follows:

| path                         | registers                                        |
|------------------------------|--------------------------------------------------|
| B, D into f                  | 1, then f (ALPHA), then the fixed `<<< 5`        |
| A, C to the XOR gates        | ALPHA + 1                                        |
| after the XORs               | 1 (also on the two 5-bit rotation amounts)       |
| B, D straight through        | 1 + (ALPHA + 1)                                  |

Each stage therefore holds at most one f operator, one XOR or one
data-dependent rotation plus one adder. The two round-key additions come
after the last register and feed the next round's first register
combinationally. The keys must therefore be valid in the cycle in which the
round's output appears. The outputs are already word-rotated:
`(a_o, b_o, c_o, d_o) = (B, C', D, A')`. The variable rotations use
`rc6_rotl`, a barrel rotator of log2(w) multiplexer stages.

`rc6_input_round` and `rc6_output_round` each have one register stage
followed by their two key additions.

## The processor: `rc6_processor`

    in_data -> input reg -> input round -> [entry mux] -> round 0 .. round K-1 -> output round -> output reg -> out_data
                                               ^                        |
                                               +------ loop-back -------+  (only when K < R)

A block is `{D, C, B, A}`, with A in bits 31:0. Each word is the
little-endian reading of its four bytes, which is the cipher's own byte
order, so published RC6 test vectors apply directly.

Parameters (defaults in parentheses): `W` word size (32), `R` rounds (20),
`K` rounds built in hardware (20; must divide R), `ALPHA` f latency (1),
`ALGO` f algorithm (3), `IO_W` port width (128 = 4W; or 64 = 2W).

**Full unrolling (K = R, the default).** Every block passes each round once.
A new block can enter on every clock, and `in_ready` stays high. The latency
is 4 + R(ALPHA+2) = 64 clocks. The throughput is 128 bits per clock.

**Partial unrolling (K < R).** The output of the last physical round loops
back to the first one, and every block makes NP = R/K passes. This is the
least obvious part of the design:

* *Tokens.* The control unit (`rc6_control`) is a shift register with one
  token per pipeline stage. A token is a valid bit plus the block's pass
  number. At the end of the ring (the K·(ALPHA+2) round stages), a token on
  its last pass goes on to the output round. Any other token re-enters the
  ring with its pass number plus one.
* *Round keys.* Physical round j serves cipher rounds j+1, K+j+1, 2K+j+1,
  and so on. It keeps one key pair per pass, and the pass number of the
  token in its last stage selects the pair. The token thus acts as the
  address of a small round-key memory.
* *Entry arbitration.* A new block and a looping block can both want the
  ring entry. New blocks have no priority. `in_ready` drops when a looping
  block will reach the entry at the moment a block offered now would arrive
  there (two clocks later). The check looks at the token three stages
  before the end of the ring, so it needs K(ALPHA+2) ≥ 3. An assertion in
  `rc6_control` checks that no collision occurs.
* *Rate.* With blocks always offered, the ring fills up and then accepts one
  block per NP clocks. The latency is again 4 + R(ALPHA+2).

**Narrow ports (IO_W = 2W).** These are for devices with too few pins. A
block goes in as two beats: first `{B, A}`, then `{D, C}` (`rc6_port_in64`).
The result leaves the same way on two consecutive clocks (`rc6_port_out64`),
one clock after the full-width result would have appeared. Input blocks are
at least two clocks apart, so results are too, and the output port cannot
overrun. An assertion checks this. The narrow ports are meant for partial
unrolling, where a block takes at least two clocks anyway.

**Interface.**

| port        | dir | width | meaning                                                        |
|-------------|-----|-------|----------------------------------------------------------------|
| `clk`       | in  | 1     | clock                                                          |
| `rst_n`     | in  | 1     | synchronous, active-low; clears the tokens only                |
| `key_shift` | in  | 1     | shift `key_in` into the round-key chain                        |
| `key_in`    | in  | W     | round key word                                                 |
| `in_valid`  | in  | 1     | a block (or beat) is offered                                   |
| `in_ready`  | out | 1     | it is taken on this clock                                      |
| `in_data`   | in  | IO_W  | plaintext                                                      |
| `out_valid` | out | 1     | ciphertext (or beat) valid; there is no back-pressure          |
| `out_data`  | out | IO_W  | ciphertext                                                     |

**Loading keys.** All 2R+4 keys sit in one chain of W-bit registers. Hold
`key_shift` high for 2R+4 clocks and present the keys in the reverse order
of the chain positions. `rc6_pkg::key_chain_index(p, R, K)` gives the key
that belongs at position p, so at p = 2R+3, 2R+2, …, 0 you present
`S[key_chain_index(p, R, K)]`. With K = R this is simply S[2R+3] first and
S[0] last. Do not change keys while blocks are in flight.

## Expected performance

| configuration                          | K  | passes | f alg. | ports | blocks/clock |
|----------------------------------------|----|--------|--------|-------|--------------|
| full unrolling, hard multipliers       | 20 | 1      | 3      | 128   | 1            |
| full unrolling, LUT-only fabric        | 20 | 1      | 2      | 128   | 1            |
| half unrolling                         | 10 | 2      | 2 or 3 | 128   | 1/2          |
| quarter unrolling, narrow ports        | 5  | 4      | 3      | 64    | 1/4          |
| one-fifth unrolling, narrow ports      | 4  | 5      | 3      | 64    | 1/5          |

Throughput is 128 bits × (blocks per clock) × f_clk. On Virtex-II class
parts the published implementations of this architecture run at clock
periods of about 8.2 to 8.9 ns with algorithm 3. That gives about 15.2 Gb/s
fully unrolled and 2.8 to 7.4 Gb/s partly unrolled. Algorithm 2 designs run
at about 13.2 ns. Those figures are implementation results and are not
reproduced by this RTL.

## Where this RTL makes its own choices

These points are not fixed by the architecture this design follows:

* **Pipeline registers.** The input and output registers are added on top of
  the input and output rounds' own stage, which gives latency
  4 + R(ALPHA+2). The position of the register inside each f operator is
  also a choice of this design.
* **Control and handshake.** The valid/ready handshake and the `in_ready`
  arbitration rule for the loop-back are this design's. The token resets
  synchronously, and the datapath has no reset.
* **Keys.** The shift-chain key loading is inferred from the drawn register
  chain. The `key_shift` strobe and the order of key pairs inside a
  partly-unrolled round are this design's.
* **Narrow ports.** The beat order of the narrow ports is this design's.
* **Generality of K.** The loop-back drawing shows K = R/2 with two
  flip-flop columns. Here it is generalised to any divisor K by putting the
  pass number in the token.
* **Algorithm 1.** The multiplier split is left to synthesis rather than
  written out as three 18x18 products.
* **Vendor multipliers.** They are not instantiated. Algorithm 3 writes
  plain `*` operators with a register behind them, so that synthesis can map
  them onto pipelined hard multipliers.

## Files

`rtl/`

* `rc6_pkg.sv`: default parameters, `num_keys()`, `key_chain_index()`.
* `rc6_f_alg1.sv`, `rc6_f_alg2.sv`, `rc6_f_alg3.sv`: the f(X) operators.
* `rc6_rotl.sv`: the barrel rotator.
* `rc6_round.sv`, `rc6_input_round.sv`, `rc6_output_round.sv`: the round
  datapaths.
* `rc6_key_store.sv`: the round-key register chain and the per-pass key
  selection.
* `rc6_control.sv`: the token shift register, loop-back control and
  `in_ready`.
* `rc6_port_in64.sv`, `rc6_port_out64.sv`: the two-beat ports.
* `rc6_processor.sv`: the top level.

`tb/`: self-checking testbenches. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `rc6_ref_pkg.sv`: a software model of RC6 (key expansion and encryption),
  independent of the RTL. The testbenches check it against the two published
  RC6-32/20/16 test vectors.
* `tb_rc6_full.sv`: the processor at its default parameters. It runs known
  answers and 500 back-to-back random blocks, and checks 64-clock latency
  and one result per clock.
* `tb_rc6_processor.sv`: seven processor configurations (K = 20, 10, 5, 4;
  algorithms 1, 2 and 3; 128- and 64-bit ports; ALPHA = 0 and 1). It checks
  every result, its latency and the steady rate. It also checks that stalls,
  loop-backs, two-beat transfers, key reloads and back-to-back results all
  occur.
* `tb_rc6_widths.sv`: the processor at other word sizes and round counts
  (w = 8, 16 and 64; r = 8, 12 and 20), with random round keys and a
  reference model that works for any word size.
* One testbench per block: `tb_rc6_f_alg*.sv` (exhaustive at w = 8 and 16,
  random at 32), `tb_rc6_rotl.sv`, `tb_rc6_round.sv`,
  `tb_rc6_input_round.sv`, `tb_rc6_output_round.sv`, `tb_rc6_key_store.sv`,
  `tb_rc6_control.sv`, `tb_rc6_port_in64.sv`, `tb_rc6_port_out64.sv`.

## Simulating

With Verilator 5, for example the full-size test:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/rc6_pkg.sv tb/rc6_ref_pkg.sv tb/tb_rc6_full.sv --top tb_rc6_full
    ./obj_dir/Vtb_rc6_full

Any other testbench works the same way: replace `tb_rc6_full` with its name.
Every testbench finishes in well under a minute. To lint the RTL:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/rc6_pkg.sv rtl/rc6_processor.sv

The top level lints without warnings. A submodule linted on its own with
`rc6_pkg.sv` only warns that the package's constants are unused there.
