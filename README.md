# Micro-pipelined 32-bit Booth multiplier, with a carry-select shift-and-add multiplier beside it

This design multiplies two 32-bit integers, signed or unsigned, into a 64-bit product in six clock cycles. It is an *iterative* multiplier, so it sits between a full array multiplier, which is fast but large, and a bit-serial shift-and-add multiplier, which is small but needs 32 cycles. Each clock cycle it retires eight multiplier bits. Those bits are radix-4 (modified) Booth recoded into four digits. The four partial products are reduced by a row of 4:2 compressors. The result is folded into a carry-save accumulator by a second 4:2 row, and the accumulator then shifts eight bits out.

The pipeline registers are rows of transparent latches rather than flip-flops. Each row is opened by a micro-pipeline latch controller. Neighbouring stages talk to each other with two-phase (transition) request/acknowledge signalling, and the latch enables are four-phase levels. The whole thing runs from one global clock.

A second multiplier, `csla_multiplier`, stands next to it in the top level. It is the classic 32-iteration shift-and-add multiplier, and its 32-bit adder is a carry-select adder. The two share only clock and reset. The second one is useful as a small, slow reference point.

## Datapath of one iteration

```
           x_q[7:0],prev          mcand_q (33 b)
                |                       |
         booth_encoder (4 digits)       |
                |  12 select lines      |
        [latch row L1]  <- le1 (open in clk-low phase)
                |                       |
      4 x booth_mux  -------------------+
        |    |    |    |   (35-bit biased partial products, shifted 0,2,4,6)
        compressor_4to2 (41 b)                      stage 1
        ----------------------------------------------------
                |  sum, carry
        [latch row L2]  <- le2 (open in clk-high phase)
                |
        compressor_4to2 (42 b)  <-- acc_s, acc_c            stage 2
                |
        shift register row (falling clock edge):
           acc_s, acc_c <= sum, carry >> 8
           lo_q         <= {low 8 bits of sum+carry+lo_c, lo_q >> 8}
           lo_c         <= carry out of that 8-bit addition
```

The multiplier operand lives in a 40-bit shift register `x_q`. The sequencer shifts it right by eight bits for each iteration and keeps the bit just below the window in `prev_q`. The multiplicand is held in `mcand_q` for the whole operation.

### Why five iterations for a 32-bit operand

Radix-4 Booth recoding of an n-bit **signed** number needs n/2 digits, so a signed 32-bit operand needs 16. An **unsigned** 32-bit number with its top bit set is a 33-bit signed number, which needs a 17th digit. Both operands are therefore extended by one bit: the sign bit when `tc = 1`, zero when `tc = 0`. That gives 17 digits. At four digits per iteration, covering them takes `NITER = ceil(17/4) = 5` iterations. The multiplier register is extended to 40 bits, and the three highest digits are zero. With this extension one datapath serves both modes, and nothing needs correcting at the end.

### Biased partial products (the part that is easy to get wrong)

A Booth partial product `d*M` (with d in -2..+2) is signed. Adding signed rows in carry-save form and then shifting them right does not work directly. The sum and carry rows can each wrap around, and a right shift turns that wrap into a wrong value. This design keeps every row non-negative instead. `booth_mux` outputs

    q = 2^33 + d*M        (0 <= q <= 2^34, 35 bits)

One iteration adds four such rows with weights 1, 4, 16 and 64, which gives less than 2^41. The accumulator after its shift is below 2^34. So every carry-save value fits its row width exactly, and carries out of the top of a compressor row are always zero.

Every digit adds the same bias, 2^33 times the digit's weight. So the total bias over all 20 digits is a constant, `BIAS_SUM = sum over g of 2^(33+2g)`, taken modulo 2^64. For 32 bits that is `64'hAAAA_AAAA_0000_0000`. The final addition subtracts it by adding `~BIAS_SUM` with a carry-in of 1:

    product = {acc_s, lo_q} + {acc_c, 0} + lo_c*2^40 + ~BIAS_SUM + 1    (mod 2^64)

The first four terms go through a 64-bit 4:2 compressor row. The carry-select adder (`csla`, cin = 1) then adds the resulting two rows. The module computes `BIAS_SUM` from its parameters, so it stays right if `W` changes.

### Low bits leaving the accumulator

Each iteration, the low eight bits of the sum and carry rows are added together, along with the carry `lo_c` left over from the previous iteration. The eight-bit result is shifted into `lo_q`. The carry out becomes the new `lo_c`. The remaining upper bits of both rows shift right by eight. So after five iterations the low 40 product bits are final, and only the upper 24 bits still need a carry-propagating addition.

## Latch rows and the micro-pipeline controller

There are two latch rows. `L1` (12 bits) holds the Booth select lines. `L2` (82 bits) holds the stage-1 sum and carry rows. Each row is driven by one `mp_latch_ctrl`. These are the parts most worth understanding before you change anything.

**Handshake.** Between neighbours a request and an acknowledge are exchanged as toggles:

* a token is pending when `req_in != ack_out`;
* the next stage is free when `req_out == ack_in`.

On the edge that opens its phase, a controller accepts a token if one is pending and the next stage is free. It then toggles `ack_out` (back to the sender) and `req_out` (on to the receiver), and raises `le` for that phase.

**Phases.** `L1` may only be open while the clock is low, and `L2` only while it is high. Consider one iteration: the sequencer issues it on a rising edge. L1 is transparent in the low phase that follows, then L2 in the next high phase. The accumulator captures the result on the falling edge that closes L2. Because the two rows never open together, data moves exactly one row per phase and cannot race through both rows. A new iteration enters every clock cycle.

| clock edge | sequencer (rising) | L1 (open low) | L2 (open high) | accumulator (falling) |
|---|---|---|---|---|
| rise 0 | load operands, issue it0 | | | |
| fall 0 | | takes it0 | | cleared |
| rise 1 | issue it1 | | takes it0 | |
| fall 1 | | takes it1 | | adds it0 |
| ... | | | | |
| fall 5 | | | | adds it4 |
| rise 6 | product written, `done` = 1 | | | |

**Glitch-free enables.** `le = phase & take`. Here `take` is held in a small enable latch that is transparent only while the row is closed, exactly as in a clock-gating cell. If the accept decision were a flip-flop that changed on the same edge that opens the phase, `le` could glitch. An earlier version of this design did exactly that, and simulation showed a spurious extra latch opening. The accumulator does not look at `take`. Instead it acknowledges stage 2 with its own toggle (`req3` / `acc_ack_q`), so it never samples a signal on the edge at which that signal changes.

**Throughput.** Nothing in this design ever withholds an acknowledge. The accumulator always accepts, so the handshake never stalls a multiplication. The stall path is exercised and checked in the controller's own testbench.

## The carry-select shift-and-add multiplier

`csla_multiplier` keeps a 64-bit product register. At start the upper half is cleared and the lower half is loaded with the multiplier. Then, 32 times, one per clock:

1. if bit 0 of the register is 1, add the multiplicand to the upper half;
2. shift the register right by one, putting the adder's carry-out into bit 63.

The adder is `csla`, which adds each 4-bit block twice, once with a carry-in of 0 and once with 1. The real block carry then selects the right sum and carry through a multiplexer, so a carry crosses a block in one multiplexer delay. This multiplier handles unsigned operands only and takes 32 cycles.

## Interfaces and timing

Both multipliers use the same protocol. `n_reset` is an asynchronous, active-low reset. Apply operands and `start` before a rising edge while `busy` is low. That edge loads them and raises `busy`. `done` rises, and `product` becomes valid, 6 rising edges later for `mp_multiplier` (`NITER + 1`) or 32 later for `csla_multiplier`. Both hold until the next start. A `start` while `busy` is high is ignored. Only one multiplication is in flight at a time.

| `mult_top` port | width | meaning |
|---|---|---|
| `clk`, `n_reset` | 1 | clock; asynchronous active-low reset |
| `mp_start`, `mp_tc` | 1 | start; 1 = signed, 0 = unsigned |
| `mp_mcand`, `mp_mplier` | 32 | operands |
| `mp_busy`, `mp_done` | 1 | status |
| `mp_product` | 64 | product |
| `cs_start` | 1 | start (unsigned only) |
| `cs_mcand`, `cs_mplier` | 32 | operands |
| `cs_busy`, `cs_done` | 1 | status |
| `cs_product` | 64 | product (the product register itself, so it changes while busy) |

Parameters: `W` (operand width, 32) and `BLK` (carry-select block size, 4) on `mult_top`, `mp_multiplier`, `csla_multiplier` and `csla`. `mp_pkg` fixes four Booth digits per iteration. `mp_multiplier` needs an even `W` of at least 16.

## Files

| file | contents |
|---|---|
| `rtl/mp_pkg.sv` | Booth select-line struct, operand width, digits per iteration |
| `rtl/booth_encoder.sv` | radix-4 recoder, 4 digits from a 9-bit window |
| `rtl/booth_mux.sv` | biased partial product `2^MW + d*M` |
| `rtl/compressor_4to2.sv` | row of 4:2 compressor cells |
| `rtl/latch_row.sv` | row of transparent latches |
| `rtl/mp_latch_ctrl.sv` | two-phase handshake to four-phase latch-enable controller |
| `rtl/csla.sv` | carry-select adder |
| `rtl/mp_multiplier.sv` | the micro-pipelined Booth multiplier |
| `rtl/csla_multiplier.sv` | shift-and-add multiplier on the carry-select adder |
| `rtl/mult_top.sv` | both multipliers side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a watchdog in case of a hang. For example, the end-to-end test of the top level at full 32-bit size:

```
verilator --binary --timing --assert -Irtl rtl/mp_pkg.sv tb/tb_mult_top.sv \
          --top-module tb_mult_top -Mdir obj_top -o sim
./obj_top/sim
```

Use the same pattern with `tb_mp_multiplier`, `tb_csla_multiplier`, `tb_mp_latch_ctrl`, `tb_csla`, `tb_compressor_4to2`, `tb_booth_mux`, `tb_booth_encoder` or `tb_latch_row`. `-Irtl` lets verilator find the submodules by file name.

What the testbenches check:

* **Booth encoder:** all 512 windows, exhaustively.
* **Booth mux:** every digit, with random and extreme multiplicands.
* **Compressor and carry-select adder:** against plain addition.
* **Latch controller:** checked against a reference model of the handshake, for both phase polarities. The test covers random sender and receiver delays, stalls caused by a withheld acknowledge, and back-to-back tokens. It also checks that `le` is never high outside its phase.
* **Both multipliers:** products against the simulator's own multiplication, the exact cycle count, and starts that arrive while busy.
* **`tb_mult_top`:** runs both multipliers at once, at full 32-bit size. It counts how often each mechanism occurs: every Booth digit value, signed and unsigned mode, the openings of both latch rows (exactly 5 per product), a carry held between low-bit additions, and a carry selected into a carry-select block. It fails if any of them never happens. It runs in well under a second.

## Where this design departs from, or goes beyond, its source

The source design specifies the following:

* 32-bit signed and unsigned multiplication;
* modified Booth recoding;
* a two-stage pipeline in which stage 1 is a Booth encoder, a latch row and a 4:2 compressor row, and stage 2 is a latch row, a 4:2 compressor row and a shift register row;
* transparent latches controlled by a two-phase micro-pipeline latch controller in a four-phase pipeline;
* a global clock;
* the `clk`, `n_reset`, `start`, `mcand`, `mplier`, `done`, `product` interface;
* the carry-select adder;
* the shift-and-add algorithm of the second multiplier.

Everything below is this design's own choice:

* **Digits per iteration (four):** the number of iterations follows from it, as do the placement of L1 after the encoder and of the Booth multiplexers after L1.
* **Sign handling by biasing, and the final subtract-the-bias addition:** the final carry-propagate adder is the carry-select adder.
* **The controller circuit:** the source describes the controller's behaviour, not its gates. This one is synchronous and clock-phase based. It is not a self-timed Muller-C-element controller. The source's self-timed clock source, an inverter ring oscillator, is not built. `clk` is an input instead.
* **Rows opaque by default.** In the original micro-pipeline the latches rest transparent and close only after data has arrived. Here a row rests opaque. It opens only in its own clock phase, and only to take a token. With a single global clock this stops data from racing through two neighbouring open rows. The order of capturing and then releasing data is the same.
* **The `tc` and `busy` ports,** and `done` as a level that holds until the next start.
* **The Booth multiplexer is logic,** not the transmission-gate circuit of the original.
* **Size.** The original FPGA implementation reports 47 flip-flops and 37 latches for the micro-pipelined multiplier and 71 flip-flops for the carry-select one. This RTL is larger: about 278 flip-flop bits and 96 latch bits, plus 104 flip-flop bits for the second multiplier. Much of the difference is that this RTL keeps a full 64-bit product register and a carry-save accumulator. The original's internal organisation could not be reconstructed closely enough to match its counts.
* **No timing or power figures.** The original reports a best clock period of 7.686 ns (micro-pipelined) and 10.437 ns (carry-select) on a Spartan-3A DSP. These cannot be reproduced here. Nothing in the RTL depends on them.

The two multipliers were not designed to work together. The top level only puts them side by side.
