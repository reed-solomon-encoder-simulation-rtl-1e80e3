# G.709 Reed-Solomon FEC: RS(255,239) row encoder and shared-correction decoder

ITU-T G.709 protects each row of an optical transport unit (OTU) frame with
Reed-Solomon forward error correction. A row is 4080 bytes: 16 RS(255,239)
codewords, byte-interleaved, each with 239 information bytes and 16 parity
bytes, so each codeword can repair up to 8 corrupted bytes. This RTL holds
both ends of the link:

* a **row encoder** that turns 3824 information bytes into a 4080-byte row,
  using 16 interleaved encoders, and
* a **row decoder** that repairs received rows and delivers the 3824
  information bytes. Its main idea is an area saving. A decoder can only
  start on a row once the whole row has arrived, and by then the next row is
  already arriving. Only the syndrome calculators and the row buffer are
  duplicated. One set of 16 correction engines is shared between the two
  banks. Each engine is a Berlekamp-Massey key equation solver, a Chien error
  locator and a Forney error evaluator. A second full set of 16 decoders is
  not needed.

All code is synthesizable SystemVerilog-2017. The design has one clock and an
active-low synchronous reset.

## The code

* Field GF(2^8) with primitive polynomial x^8+x^4+x^3+x^2+1 (0x11D) and
  primitive element alpha = 0x02.
* Generator g(x) = (x+alpha^0)(x+alpha^1)...(x+alpha^15), so the first root
  has exponent 0 as in G.709. Expanded:
  x^16 + 59x^15 + 13x^14 + 104x^13 + 189x^12 + 68x^11 + 209x^10 + 30x^9 +
  8x^8 + 163x^7 + 65x^6 + 41x^5 + 229x^4 + 98x^3 + 50x^2 + 36x + 59.
* The code is systematic: 239 data bytes are sent, then 16 parity bytes.
  The first byte sent is the coefficient of x^254.

`gf256_pkg` computes these constants (the generator, the alpha powers and the
inverse table) with constant functions at elaboration. No table is typed in.
Multiplication by a fixed constant is a pure XOR network (`gf_cmul`).
Because the constant is known, an AND with a 0 bit disappears and an AND with
a 1 bit is just a wire. For alpha^225, for example, output bit 0 is
a3^a6^a7. Every encoder tap, syndrome multiplier and Chien/Forney step is
such a network. Only the key equation solver and the final Forney division
use general multipliers.

## Row interleaving

Byte j of a row (j = 0..4079) belongs to codeword (lane) `j mod 16` and is
symbol `j div 16` of it. Bytes 0..3823 are information and bytes 3824..4079
are parity, interleaved in the same way. `otn_lane_counter` produces this
lane/position sequence. The encoder and both sides of the decoder use it.

## Encoder (`otn_rs_encoder`, `rs_encoder`)

Each `rs_encoder` is the usual 16-stage LFSR divider. For each data byte the
feedback `din ^ p[15]` is multiplied by the 16 generator coefficients and
added into the shifting remainder. The data byte passes through unchanged.
After 239 bytes the remainder is shifted out as the parity, highest degree
first. The encoder advances only when its `en` is high, and its output is
combinational. This lets the row encoder drive all 16 encoders from one byte
stream by enabling only the encoder of the current lane.

Handshake: `in_valid`/`in_ready` on the information side. For the 256
cycles in which a row's parity bytes are emitted, `in_ready` is low. The
output has no backpressure and lags an accepted byte by one register.
`out_sor` marks byte 0 of a row and `out_parity` marks parity bytes.

## Decoder (`otn_rs_decoder`)

```
            bank A: 16 x rs_syndrome + rs_line_fifo (4080 B)
 in ──►  ─┤                                                ├─ mux ─► 16 x (rs_bm → rs_chien + rs_forney) ─► XOR ─► out
            bank B: 16 x rs_syndrome + rs_line_fifo (4080 B)                                     ▲
                                                                            FIFO read ───────────┘
```

**Write side.** Incoming bytes go to the write bank. Each byte is stored in
that bank's FIFO and also fed to the syndrome calculator of its lane, which
computes S_i = r(alpha^i) by Horner's rule. When the last byte of a row
arrives, the bank is marked full and the write side switches to the other
bank.

**Read side.** This part runs once per full bank, alternating between A and
B:

1. *Bypass.* If all 256 syndromes of the row are zero, the row has no
   errors and the key equation stage is skipped.
2. *Key equation.* Otherwise all 16 `rs_bm` start together on the selected
   bank's syndromes. Each runs the inversion-free Berlekamp-Massey
   iteration, one step per clock for 16 clocks. It then spends 8 more clocks
   forming Omega(x) = S(x)Lambda(x) mod x^8 on the same multipliers. Latency
   is 25 cycles. Lambda comes out scaled by an unknown non-zero constant. This
   does not matter: the roots of Lambda and the ratio Omega/Lambda' are
   unchanged by the scale.
3. *Correction.* The 3824 information bytes are read from the FIFO, one per
   clock. For byte j, the locator/evaluator pair of lane j mod 16 gives the
   error value at that lane's current position and then steps to the next
   position. The output byte is the stored byte XORed with that error value.
   - The locator (`rs_chien`) evaluates Lambda at alpha^(p+1) for symbol p.
     Symbol p has degree 254-p, and its inverse locator is alpha^(p+1). Each
     term register is multiplied by a fixed alpha^i on every step.
   - The evaluator (`rs_forney`) evaluates Omega the same way. It outputs
     e = Omega(X^-1) / Lambda_odd(X^-1) at positions where Lambda is zero.
     Lambda_odd is the odd part of Lambda, which equals x·Lambda'(x) in
     characteristic 2. This is the Forney formula for a first root of
     alpha^0.
4. *Parity tail.* Parity bytes are not output. All 16 locators step together
   through the 16 parity positions, so every codeword is searched completely.
5. *Verdict.* A codeword is flagged uncorrectable in either of two cases.
   - Its locator degree is above 8. Its corrections were then suppressed.
   - The number of roots found differs from the locator degree. Its bytes
     have then already been output, possibly miscorrected.
   The FIFO is cleared, which drops the parity, and the bank is released.

**Timing budget.** The read side takes at most 1 + 25 + 3824 + 16 + 1 = 3867
cycles per row. The next row takes at least 4080 cycles to arrive at one byte
per clock. So the decoder never needs to stall its input, and two banks are
always enough. If a row ever finished while both banks were still busy, the
sticky `overrun` output would be set, and an assertion fires.

**Interface.** Input is `in_valid`/`in_data`, at most one byte per clock,
with no backpressure. Rows are counted from reset. There is no frame
alignment input, so byte 0 after reset starts a row. Outputs:

* `out_valid`/`out_data` carry 3824 corrected bytes per row, and `out_sor`
  marks the first of them.
* `row_done` pulses at the end of each row's correction. Alongside it come
  `row_uncorr` (one bit per codeword), `row_bypass`, and `row_nfix` (the
  number of information bytes changed).

## Top level (`rs_g709_top`)

The top places the encoder (`tx_*` ports) and the decoder (`rx_*` ports)
side by side. The optical line between them is not part of the design, so
a test bench connects them, with its own error injection if wanted.
`N_CH` (default 16) sets the number of interleaved codewords per row. The
code itself is fixed at RS(255,239).

## Where this design departs from, or goes beyond, its source description

* **Rates.** The design this follows is clocked at 166 MHz. It gives an
  input rate of "two symbols every 8 clocks" and also says a row loads in
  12 us. Those two figures do not agree: 98 us against 12 us per row. It
  also quotes at most 10 us for correction. This RTL accepts up to one byte
  per clock and corrects in up to 3867 cycles (23.3 us at 166 MHz). It keeps
  up with any input rate up to one byte per clock. It does not reach the
  12 us / 10 us figures, which would need about two bytes per clock.
* **Row buffer.** This RTL uses one 4080-byte memory per bank. The FPGA
  result it follows lists 16 block memories, which suggests one memory per
  codeword.
* **Bypass granularity.** Correction is skipped per row, when all 16
  codewords are clean, not per codeword. The shared engines run in
  lock-step.
* **Uncorrectable decision.** It is made from the locator degree and the
  root count, after the key equation solver and the Chien search. It cannot
  be made in the syndrome stage, because syndromes alone do not count
  errors.
* **Internal algorithms.** The algorithms inside the solver, locator and
  evaluator are standard choices (inversion-free Berlekamp-Massey, Chien
  search, Forney). So are the handshakes and the status outputs. The source
  names these blocks but does not give their insides.
* **FPGA figures not reproduced.** FPGA utilisation and delay figures are
  not reproduced. Synthesis of this RTL gives about 35k word-level cells,
  about 12k flip-flops, two 32,640-bit row buffers and small inverse-table
  ROMs. The encoder alone holds about 2.1k flip-flops and no
  memory.

## Files

| file | content |
|---|---|
| `rtl/gf256_pkg.sv` | field type, code constants, generator and inverse table (constant functions) |
| `rtl/gf_cmul.sv` | constant multiplier (XOR network) |
| `rtl/rs_encoder.sv` | one RS(255,239) LFSR encoder |
| `rtl/otn_lane_counter.sv` | row byte → lane/position sequencer |
| `rtl/otn_rs_encoder.sv` | 16-lane row encoder |
| `rtl/rs_syndrome.sv` | 16-syndrome calculator |
| `rtl/rs_line_fifo.sv` | 4080-byte row FIFO |
| `rtl/rs_bm.sv` | Berlekamp-Massey key equation solver |
| `rtl/rs_chien.sv` | Chien search error locator |
| `rtl/rs_forney.sv` | Forney error evaluator |
| `rtl/otn_rs_decoder.sv` | ping-pong row decoder with shared correction set |
| `rtl/rs_g709_top.sv` | top level: encoder and decoder |
| `tb/rs_ref_pkg.sv` | independent reference model (log/antilog arithmetic, long-division encoder, direct syndromes, locator from known positions) |
| `tb/tb_<module>.sv` | one self-checking bench per module |

## Simulation

Each bench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the bench hangs. Every bench runs at the
default sizes. For example, the end-to-end bench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf256_pkg.sv tb/rs_ref_pkg.sv tb/tb_rs_g709_top.sv \
    --top-module tb_rs_g709_top -o sim
./obj_dir/sim
```

Replace `tb_rs_g709_top` with any other bench name. What the benches cover:

* **`tb_rs_g709_top`.** Five full rows go through encoder, error injection
  and decoder:
  - a clean row,
  - 8 errors in every codeword,
  - a row with one uncorrectable codeword,
  - another clean row, in the other bank,
  - 0..8 errors per codeword, including errors in parity bytes.

  The bench checks every decoded byte and the row status. It also counts the
  transmit stall, the bypass, the corrections, the uncorrectable flag and
  the use of both banks, and fails if any of them never happened. It takes
  about 1.5 minutes to build and a few seconds to run.
* **`tb_otn_rs_decoder`.** Six rows arrive back to back at one byte per
  clock, the worst case for the two banks. Besides the data, it checks that
  each row finishes within 3868 clock edges of its last input byte.
  `tb_otn_rs_decoder_paced` repeats the scenario at two bytes every 8 clocks.
* **Block benches.** These check each block against the reference package.
  - The constant multiplier is checked exhaustively.
  - The encoder is checked for parity and for zero syndromes of its output.
  - The syndrome calculator is checked on random codewords with errors.
  - The key equation solver is checked for degree, roots, Forney values and
    its 25-cycle latency.
  - The Chien search is checked for roots and root count, and the Forney
    evaluator for error values.
  - The FIFO is checked for order, full/empty and clear.

## Changing it

* `N_CH` can be changed on `rs_g709_top`, `otn_rs_encoder` and
  `otn_rs_decoder`. Use a power of two, at least 2. The row is then
  `255*N_CH` bytes.
* The code parameters (`RS_N`, `RS_K`, the field polynomial, the first root
  `RS_B`) live in `gf256_pkg`. Generator and tables follow automatically.
  The decoder's state machine, however, assumes 2t = 16 and a 255-symbol
  codeword.
* `rs_bm` keeps 9 locator coefficients. This is exact for up to 8 errors.
  Anything larger is reported as a failure, not decoded.
