# Parallel LFSR dividers for cyclic-code error detection

Cyclic codes are encoded and checked by dividing polynomials over GF(2) by a generator
polynomial g(x). The classic circuit for this is a serial linear feedback shift register (LFSR).
It takes one coefficient per clock, so an n-bit word needs n clocks. This RTL builds the
**f-channel parallel equivalent**: the same division with f coefficients per clock, so the word
needs only q = ceil(n/f) clocks. The cost is a larger XOR network in front of the register.

The parallel circuit is not designed by hand. It comes from a matrix description of the serial
machine, evaluated at elaboration time. The state-update matrix is raised to the f-th power, and
the input and output connections come from related products. On top of that, a **decoder**
(which only needs to know whether the remainder is zero) can have its state bits relabelled by
an invertible matrix Q, and a good Q removes XOR gates. The design includes:

- a systematic encoder (parallel LFSR, never relabelled);
- an error-detecting decoder (parallel LFSR with the cheapest Q found automatically);
- the general machine that both are built from;
- the small serial circuits the method starts from.

## The matrix view of an LFSR

A single-input, single-output linear machine over GF(2) is

    s(t+1) = T s(t) + B i(t)        w(t) = C s(t) + D i(t)

with k state bits. For the divider by g(x) = a0 + a1 x + ... + a(k-1) x^(k-1) + x^k, T is the
*companion matrix* of g. It has ones on the sub-diagonal, so stage j feeds stage j+1. Its last
column is a0..a(k-1): the last stage feeds back into every stage whose coefficient is 1. The
other matrices are B = e0 (the input enters the first stage), C = e(k-1) (the output is the last
stage) and D = 0. The output stream is the quotient. After the whole dividend has been shifted
in, highest order first, from an all-zero register, the register holds the remainder: bit j is
the coefficient of x^j.

Substituting the update into itself f times gives the f-channel machine. It takes inputs
i(t)..i(t+f-1) at once and jumps from s(t) to s(t+f):

    T' = T^f
    B' = [ T^(f-1)B  ...  T B  B ]            (column c feeds input slot c)
    C' = [ C ; C T ; ... ; C T^(f-1) ]        (row r produces output slot r)
    D'(r,c) = D if r = c,  C T^(r-c-1) B if r > c,  0 if r < c

D' matters only when f > k. In that case an input can reach the output within the same group of
f. `gf2_pkg` computes all four matrices with constant functions (`mat_pow`, `b_prime`,
`c_prime`, `d_prime`). `lsm_parallel` turns them into an AND/XOR network: output bit r is the
XOR of the state and input bits selected by row r. After synthesis only XOR gates are left.

**Channel order.** In `i_vec`/`w_vec`, slot 0 is the coefficient that a serial register would
take (or produce) first. For a dividend that is the higher-order one. An n-coefficient word that
is not a multiple of f is padded with zeros *above* its highest coefficient. The pad enters
first and cannot change the remainder, because the register starts from zero.

Example (default `parallel_lfsr`: g = 1 + x + x^4, f = 2). The matrices reduce to

    s0+ = I1 + s2     s1+ = I0 + s2 + s3     s2+ = s0 + s3     s3+ = s1
    W0  = s3          W1  = s2

That is four two-input XORs. Dividing x^8 + x^6 + x^5 takes 5 clocks: the 9 coefficients are
padded to 10. The register then holds 1 + x + x^2 + x^3, and W gives the quotient x^4 + x^2 + 1.

## Relabelling the decoder state

For any invertible k x k matrix Q, the machine with state sigma = Q s has

    T* = Q T' Q^-1      B* = Q B'      C* = C' Q^-1      (D' unchanged)

It produces the same outputs, and its state is zero exactly when the original state is zero. A
decoder only tests the remainder for zero, so it may use any Q. An encoder may not: it needs the
true remainder as its check bits.

The XOR cost of a next-state network with two-input gates is (ones in T*) + (ones in B*) - k:
each row needs one gate fewer than its number of ones. An exhaustive search over all invertible
Q is hopeless (about 10 million for k = 5). Instead, the design tries a fixed sample of 2k(k-1)
matrices that are each their own inverse. For every row kk, the identity's row kk is added
cumulatively to the next k-1 rows (wrapping round). This is then repeated, which removes it
again. Every matrix in the sample has the form I + (ones off the diagonal
in column kk), so Q = Q^-1 and no inversion is needed. `best_q_index` evaluates the whole
sample at elaboration and keeps the first cheapest matrix. `Q_MODE` selects the identity
(`Q_IDENTITY`), a given matrix (`Q_EXPLICIT`) or this search (`Q_BEST`).

For g = 1 + x^2 + x^4 + x^5 with f = 6 (the default decoder), the unrelabelled network needs 20
XORs. The search picks Q with rows (e0+e2, e1+e2, e2, e3, e4), which needs 16. The module
exposes these counts as `N_ADDERS_RAW` and `N_ADDERS`.

Results for the evaluated generator / channel combinations (next-state XORs, `tb_table3`):

| g(x)                          | f  | no relabelling | best in sample |
|-------------------------------|----|----------------|----------------|
| 1+x^2+x^4+x^5                 | 6  | 20             | 16             |
| 1+x^2+x^4+x^5                 | 8  | 26             | 22             |
| 1+x^2+x^4+x^5                 | 12 | 34             | 32             |
| 1+x+x^2+x^4+x^5               | 6  | 18             | 15             |
| 1+x+x^2+x^4+x^5               | 8  | 22             | 20             |
| 1+x+x^2+x^4+x^5               | 12 | 34             | 31             |
| 1+x+x^2+x^4+x^5+x^7+x^9       | 6  | 35             | 29             |

These agree with the published study, except the last row's first column, which was published
as 34. Relabelling does not touch the output network (C*, D'), and its cost is not counted.

## The link in `plfsr_top`

    msg --> cyclic_encoder --codeword--> XOR err_mask --> cyclic_decoder --> dec_error, dec_syndrome, dec_info
            (parallel_lfsr, Q = I)                        (parallel_lfsr, Q_BEST)

Default code: generator 1 + x^2 + x^4 + x^5, N = 15 code bits, 10 information bits, F = 6
channels. Each word therefore takes q = 3 clocks with three leading pad zeros. Both ends use
`group_feeder`, which loads a word, hands it out F coefficients per clock and counts the q
steps.

Timing, for the encoder and for the decoder alike:

| cycle                 | what happens                                                            |
|-----------------------|-------------------------------------------------------------------------|
| 0                     | `start` is sampled (while not busy); `load` clears the LFSR             |
| 1..q                  | `busy` is high; one group per clock                                     |
| q+1 (one-cycle pulse) | `done`; results valid until the next start                              |

In the top, the decoder starts on the encoder's `done`. A message is checked 2(q+1) = 8 cycles
after `start`. Codeword and message bit j are the coefficient of x^j. The code word is
`{msg, remainder}`.

`dec_error` is the OR of the decoder state. `dec_syndrome` is the *relabelled* remainder Q r,
not r itself. `dec_info` is the information part of the received word.

Standing alongside, with their own ports:

- `ser_*`: `serial_cyclic_decoder`, the serial (7,4) decoder for g = 1 + x + x^3. Coefficients
  are shifted in highest order first. The OR of the three stages is the error alarm after seven
  shifts. An information register collects the first four coefficients through an AND gate that
  `info_en` opens.
- `p6_*`: the two-channel divider by 1 + x + x^4 described above.
- `m7_*`: `lsm_parallel` at its defaults. This is a three-stage general linear machine
  (s0+ = s0+s2+i, s1+ = s0+s1, s2+ = s1+i, w = s0+s2+i) in a two-channel form, with a nonzero D.
  It shows that the construction is not limited to LFSRs.

## Modules

| module                  | role                                                             | key parameters (default)                |
|-------------------------|------------------------------------------------------------------|-----------------------------------------|
| `gf2_pkg`               | matrix types and elaboration-time GF(2) algebra, Q sample        | MAXK = 32, MAXF = 64                    |
| `lsm_parallel`          | f-channel analog of any (T,B,C,D) machine, optional relabelling  | K=3, F=2, three-stage machine, Q_IDENTITY |
| `parallel_lfsr`         | f-channel divider by g(x) (companion T, B=e0, C=e(k-1), D=0)     | K=4, F=2, G=1+x+x^4                     |
| `serial_lfsr_div`       | serial divider, written stage by stage                           | K=3, G=1+x+x^3                          |
| `group_feeder`          | zero padding, F-wide grouping, q-step sequencing                 | N=15, F=6                               |
| `cyclic_encoder`        | systematic encoder                                               | N=15, K=5, G=1+x^2+x^4+x^5, F=6         |
| `cyclic_decoder`        | error-detecting decoder with relabelled LFSR                     | same, Q_MODE=Q_BEST                     |
| `serial_cyclic_decoder` | serial decoder with alarm and information register               | K=3, G=1+x+x^3, INFO=4                  |
| `plfsr_top`             | link plus the three example circuits                             | N=15, K=5, G=1+x^2+x^4+x^5, F=6         |

`G` is a vector of a0..a(k-1): the x^k term is implied. In `parallel_lfsr` and the code
modules it has the `gf2_pkg::kvec_t` type (e.g. `kvec_t'(5'b10101)`). In `serial_lfsr_div` it
is a plain K-bit vector. A general machine's T is given row by row, row 0 in the
least-significant position: `kmat_t'({kvec_t'(row2), kvec_t'(row1), kvec_t'(row0)})`.

All registers reset asynchronously to zero (`rst_n` low). The LFSR-based modules also have a
synchronous `clear` and an enable.

## Simulating

Each testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`. The
reference polynomial arithmetic in `tb/tb_ref_pkg.sv` is plain long division, independent of
the matrix construction. With Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/gf2_pkg.sv tb/tb_ref_pkg.sv \
              tb/tb_plfsr_top.sv --top tb_plfsr_top
    ./obj_dir/Vtb_plfsr_top

Replace `tb_plfsr_top` by any of the following:

- `tb_serial_lfsr_div`: the (7,4) worked division, a division by 1 + x + x^4 with its
  quotient stream, and random division by a degree-8 generator.
- `tb_lsm_parallel`: the three-stage machine on 2 and 5 channels against its serial equations.
- `tb_parallel_lfsr`: the two-channel flow table, 3/8/13-channel division against long division,
  the relabelled state against the hand-written Q, and the elaborated T^f, B', C' and D' of
  the two-, three- and six-channel 1 + x + x^4 and 1 + x + x^3 + x^4 circuits compared entry by
  entry with matrices worked out by hand.
- `tb_group_feeder`, `tb_cyclic_encoder`, `tb_cyclic_decoder`, `tb_serial_cyclic_decoder`:
  per-block checks, including the q + 1 cycle latency.
- `tb_plfsr_top`: end to end at the default parameters. It checks clean words, detected errors,
  undetectable errors (error patterns that are code words), padding, relabelled syndromes and the
  three side circuits, and counts each of them.
- `tb_table3`: the seven generator/channel trials above.

Each runs in well under a second.

To build another code, set `N`, `K`, `G` and `F` on `plfsr_top` (or on the encoder and
decoder). Nothing else changes, because the XOR networks are derived at elaboration. Limits are
K <= 32 and F <= 64. Raise `MAXK`/`MAXF` in `gf2_pkg` for more; elaboration time grows roughly
with K^3 times the sample size.

## Departures and choices to be aware of

- **Code length.** The default code length N = 15 is a choice: it is the period of
  1 + x^2 + x^4 + x^5. That generator has the factor 1 + x, so the code detects all odd-weight
  errors and all single errors. The link test shows that some multi-bit patterns (those that are
  code words) pass undetected, as they must.
- **Sample order.** The order of the Q sample follows the row-addition procedure described
  above. Only the best case is built. No attempt is made to reproduce the worst case of the
  published study: the worst matrices found here differ in three of the seven trials.
- **First quotient coefficient.** In the serial divider, the first quotient coefficient appears
  at the output after k shifts. The published text says k-1 in one place. Its worked example
  and flow table show k, which is what the RTL does.
- **Information register.** The serial decoder's information register shifts only while
  `info_en` is high, so it ends up holding exactly the information bits. In the parallel
  decoder, the information part is captured from the received word at start rather than
  collected group by group.
- **Handshakes and timing.** The start/busy/done handshakes, the `clear` inputs, the enables,
  the error-mask channel and the coupling of encoder to decoder are this design's own. The
  method itself only defines the combinational networks and the register.
- **Cost model.** XOR counts follow the stated model (two-input gates, no sharing, next-state
  network only). A synthesis tool will share terms and may do better or worse.
