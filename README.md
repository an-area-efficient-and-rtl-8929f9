# A small sequence-processing DSP core

This is a 16-bit fixed-point DSP processor for small embedded jobs that run
without an operating system. Its main idea is that **one instruction works on
whole signals, not on single words**. An instruction names up to three input
sequences, S1, S2 and S3. It gives each one a starting address and an
optional delay or advance, and picks one operation: multiply, add, subtract,
multiply-then-add, multiply-then-subtract, or a plain time shift. The
processor then walks the sample index `n` across the signal and writes one
result per sample.

Each input signal has its own memory, so all three operands are read in the
same cycle. Results can be 32 bits wide, so they go to two 16-bit result
memories, one for the low word and one for the high word. A Mealy state
machine sequences everything. At the default size one instruction takes
30 clock cycles, which is 600 ns at a 50 MHz clock.

The data word is 16 bits. Instructions and full products are 32 bits, which
is why the core is sometimes described as a "32-bit" DSP.

## Block diagram

```
             +-----------+  instr  +-------------------------------+
             | instr_mem |-------->| control_unit  (Mealy FSM)     |
             | 16 x 32   |<--------|  Tinst, Ck1 (PC), n           |
             +-----------+  addr   |  instr_decoder                |
                                   |  3 x signal_shifter           |
  +-------------+  addr            |  t1/t2/t3 sample registers    |
  | MEM1-1 (S1) |<-----------------|                               |
  | MEM1-2 (S2) |----------------->|                               |
  | MEM1-3 (S3) |  samples         +---+-----------------------^---+
  | signal_mem  |                      | alu_op, t1, t2, t3    | t4, t5
  +-------------+                      v                       |
                                   +-------------------------------+
                                   | alu: alu_mult + alu_addsub    |
                                   +-------------------------------+
      dout1/dout2, addrw, rw1/rw2 (also top-level outputs)
                 |
                 v
  +---------------------------+
  | MEM2-1 (low word)         |---> res_lsb
  | MEM2-2 (high word)        |---> res_msb      (read at res_raddr)
  |  result_mem               |
  +---------------------------+
```

## The instruction word

```
 31      24 23  20 19  16 15  12 11   8 7    4 3    0
+----------+------+------+------+------+------+------+
|  opcode  |  p1  |  p2  |  p3  |  s1  |  s2  |  s3  |
+----------+------+------+------+------+------+------+
   p1..p3: address of sample n = 0 ("zero pointer") of S1, S2, S3
   s1..s3: shift count of S1, S2, S3
```

Each opcode bit switches on one part of the data path:

| bit | meaning when 1                                                  |
|-----|-----------------------------------------------------------------|
| 7   | compound operation: multiply, then add or subtract S3           |
| 6   | multiply S1 x S2                                                |
| 5   | add                                                             |
| 4   | subtract                                                        |
| 3   | shift the signals in time by s1..s3                             |
| 2   | shift direction: 1 = left (advance, x(n+s)), 0 = right (delay, x(n-s)) |
| 1:0 | unused                                                          |

Some bit combinations are ambiguous. `instr_decoder` resolves them with these
priority rules:

* **Compound (bit 7 = 1).** The result is `S1*S2 + S3` if bit 5 is set.
  Otherwise it is `S1*S2 - S3` if bit 4 is set. Otherwise it is just
  `S1*S2`. Addition wins over subtraction because the codes `F8` and `FC`
  have both bits set and mean multiply-add. The codes `D0` and `D8` have
  only bit 4 set and mean multiply-subtract.
* **Single (bit 7 = 0).** The first of these that applies is used:
  * multiply (bit 6);
  * add (bit 5);
  * subtract (bit 4);
  * shift only (bit 3), which outputs the shifted S1.
* **No-op.** If none of bits 7..3 is set, the instruction is a no-op and
  writes nothing. It still takes its 30 cycles.
* **Shift counts are ignored when bit 3 is 0.** For example, `D0678232` is a
  plain multiply-subtract of S1(n), S2(n) and S3(n).

### Time shifting is done on addresses

Shifting a signal here means moving it in time, not shifting bits. Sample `n`
of signal `i` is read at this address, with all arithmetic modulo 16 (the
memories act as circular buffers):

```
addr_i = p_i + n            no shift (bit 3 = 0)
addr_i = p_i + n - s_i      right shift: x_i(n - s_i)
addr_i = p_i + n + s_i      left shift:  x_i(n + s_i)
```

This is done by `signal_shifter`, one instance per signal, on the read
address path. The ALU never sees the shift.

## Number format and the ALU

Samples are signed two's-complement Q10.6 numbers: 10 integer bits and 6
fractional bits. For example, 13.75 is `0000001101.110000` = `16'h0370`.

| operation       | result (32 bits, `{t5, t4}`)         | format  | written to       |
|-----------------|--------------------------------------|---------|------------------|
| multiply        | `t1 * t2`                            | Q20.12  | MEM2-1 and MEM2-2 |
| multiply-add    | `t1 * t2 + (t3 << 6)`                | Q20.12  | MEM2-1 and MEM2-2 |
| multiply-sub    | `t1 * t2 - (t3 << 6)`                | Q20.12  | MEM2-1 and MEM2-2 |
| add / subtract  | `t1 ± t2`, sign-extended             | Q10.6   | MEM2-1 only      |
| shift only      | `t1`, sign-extended                  | Q10.6   | MEM2-1 only      |

The full product is kept, so products have 12 fractional bits. In
multiply-add and multiply-subtract, S3 is shifted left by 6 bits so that its
binary point lines up with the product's.

The high-word memory is written only when a multiply is involved (`rw2`). An
add or subtract that overflows 16 bits therefore wraps in MEM2-1. Its
sign-extended high word still appears on `dout2`, but nothing stores it.

The ALU is built from two units:

* `alu_mult`: a signed 16x16 multiplier giving a 32-bit product;
* `alu_addsub`: one 32-bit adder. For subtraction it inverts operand b and
  sets carry-in to 1.

## Execution schedule (control_unit)

The control unit is a three-state Mealy machine: `FETCH`, `READ`, `EXEC`.

```
reset -> FETCH -> READ -> EXEC -> READ -> EXEC -> ... (N_SAMPLES pairs) -> READ ...
          |        |       |
          |        |       +- ALU result on dout1/dout2, addrw = n, rw1/rw2 pulse;
          |        |          on the last sample: Tinst <= next instruction, Ck1 += 1
          |        +- t1..t3 <= MEM1-1..3 at the shifted addresses for sample n
          +- Tinst <= instruction at Ck1 (only after reset)
```

* **Per sample.** Each sample takes two cycles: one to read the three
  operands into registers, one to compute and write.
* **Per instruction.** With the default `N_SAMPLES = 15`, an instruction
  takes 30 cycles. There are no gaps between instructions, because the next
  instruction is loaded in the last `EXEC` cycle of the current one.
* **After reset.** One extra `FETCH` cycle comes first, so the first write
  happens in the third enabled cycle.
* **Program counter.** The program counter `Ck1` wraps after address 15, and
  the program repeats for as long as `enb` is high.
* **Stalling.** `enb` low freezes every register. Because `rw1` and `rw2` are
  Mealy outputs gated by `enb`, a stall never writes.
* **Reset.** `rst` is synchronous and active high. It returns the machine to
  `FETCH` at address 0 and clears the instruction and sample registers. It
  does not clear the result memories.
* **Results.** Output sample `n` is always written to result address `n`
  (`addrw = n`).

`dout1`, `dout2`, `addrw`, `rw1` and `rw2` are the write port of the result
memories. They are brought out of the top level, so an external memory or a
monitor can capture the results as they are produced.

## Built-in program and signals

The memories are read-only tables whose contents are parameters. By default
they hold a test set:

* **Signals.**
  * S1 and S2 hold the pulse 6, 1, 9, 2, 8 at addresses 6..10.
  * S3 holds the same pulse at addresses 5..9.
  * All other words are 0.
  * The values are stored as Q10.6, so 6 is `16'h0180`.
* **Program.** The program has 16 instructions. All of them use the zero
  pointers 6, 7 and 8.

Results are listed for n = 0..7, in real units:

| # | name | code       | operation                      | results, n = 0..7            |
|---|------|------------|--------------------------------|------------------------------|
| 1 | MUL  | `40678000` | S1(n)·S2(n)                    | 6 9 18 16 0 0 0 0            |
| 2 | MAD  | `E0678000` | S1(n)·S2(n)+S3(n)              | 8 17 18 16 0 0 0 0           |
| 3 | MAS  | `D0678232` | S1(n)·S2(n)−S3(n)              | 4 1 18 16 0 0 0 0            |
| 4 | MRS  | `48678200` | S1(n−2)·S2(n)                  | 0 0 12 8 0 0 0 0             |
| 5 | MLS  | `4C678030` | S1(n)·S2(n+3)                  | 48 0 0 0 0 0 0 0             |
| 6 | ADD  | `20678000` | S1(n)+S2(n)                    | 7 10 11 10 8 0 0 0           |
| 7 | ARS  | `28678200` | S1(n−2)+S2(n)                  | 1 9 8 9 9 2 8 0              |
| 8 | ALS  | `2C678102` | S1(n+1)+S2(n)                  | 2 18 4 16 0 0 0 0            |
| 9 | SUB  | `10678000` | S1(n)−S2(n)                    | 5 −8 7 −6 8 0 0 0            |
|10 | SRS  | `18678232` | S1(n−2)−S2(n−3)                | 0 0 0 0 0 0 0 0              |
|11 | SLS  | `1C678002` | S1(n)−S2(n)                    | 5 −8 7 −6 8 0 0 0            |
|12 | RS   | `08678200` | S1(n−2)                        | 0 0 6 1 9 2 8 0              |
|13 | LS   | `0C678232` | S1(n+2)                        | 9 2 8 0 0 0 0 0              |
|14 | MAR  | `F8678031` | S1(n)·S2(n−3)+S3(n−1)          | 9 2 62 2 72 0 0 0            |
|15 | MAS  | `FC678032` | S1(n)·S2(n+3)+S3(n+2)          | 48 0 0 0 0 0 0 0             |
|16 | MSR  | `D8678030` | S1(n)·S2(n−3)−S3(n)            | −2 −8 54 2 72 0 0 0          |

Row 1 is the reference example for this instruction set. The S2 pointer is
one address later than S1's, so it multiplies neighbouring samples:
6·1, 1·9, 9·2, 2·8.

To run your own program or data, override `PROGRAM` and `S1_INIT`, `S2_INIT`
and `S3_INIT` on `dsp_top`. Each is an array of 16 words.

## Files

| file | contents |
|------|----------|
| `rtl/dsp_pkg.sv` | widths, instruction and opcode structs, ALU operation enum |
| `rtl/dsp_top.sv` | the processor: memories, control unit, ALU |
| `rtl/control_unit.sv` | Mealy FSM, instruction and sample registers |
| `rtl/instr_decoder.sv` | field extraction and opcode decode |
| `rtl/signal_shifter.sv` | shifted read address of one signal |
| `rtl/alu.sv`, `rtl/alu_mult.sv`, `rtl/alu_addsub.sv` | arithmetic |
| `rtl/signal_mem.sv` | 16 x 16 input signal ROM (MEM1-x) |
| `rtl/instr_mem.sv` | 16 x 32 instruction ROM |
| `rtl/result_mem.sv` | 16 x 16 result RAM (MEM2-x) with a read-back port |
| `tb/dsp_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
It also has a watchdog that reports a failure if the run hangs. Build one
with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dsp_pkg.sv tb/dsp_ref_pkg.sv tb/tb_dsp_top.sv --top-module tb_dsp_top
./obj_dir/Vtb_dsp_top
```

`tb_dsp_top` runs the default processor, with no parameter overrides,
through all 16 instructions while dropping `enb` at random. It checks:

* every write: data, address and strobes;
* the cycle in which each write happens, at 30 cycles per instruction;
* the worked MUL example;
* the result memories, read back at the end.

It also counts each mechanism, such as every operation kind, left and right
shifts, address wrap-around, stalls and negative results, and fails if one
never occurs.

`tb_control_unit` drives the control unit with random programs and data,
with random stalls and a reset mid-run. The other testbenches check their
unit exhaustively or with random values against `dsp_ref_pkg`.

## How far it follows its source, and where it is its own

These parts follow the published design:

* the memory organisation: three input memories, two result memories and a
  separate instruction memory;
* the 32-bit instruction format and opcode bits;
* the Q10.6 number format;
* the top-level signals: `clk`, `rst`, `enb`, `dout1`, `dout2`, `addrw`,
  `rw1`, `rw2`;
* the Mealy control unit;
* the 600 ns instruction time at 20 ns;
* the test program and signals.

The source describes these only in outline, so they are choices made here:

* **Samples per instruction.** Each instruction covers 15 samples. This
  number, together with the 2-cycle read/execute split, is what gives
  30 cycles per instruction.
* **Time shifting.** It is done on the read address. Addresses wrap
  modulo 16.
* **Arithmetic.** Samples are signed. Products keep 12 fractional bits, and
  S3 is aligned to them in multiply-add and multiply-subtract.
* **Decoder rules.** The priority rules above are this design's, as is the
  choice that a shift-only instruction outputs the shifted S1. A shift-only
  instruction that names three signals still produces one output.
* **Sync and reset.** Memory reads are combinational (LUT ROM style). The
  reset is synchronous.
* **Program codes.** Instructions 8 and 13 are coded `2C678102` and
  `0C678232`, the codes that match their stated meaning under the opcode
  table.
* **Test signal layout.** The signal listings are placed so that the first
  non-zero sample of S1 sits at its zero pointer (address 6). S3's shorter
  listing is placed one address earlier.
* **Result read port.** The read port `res_raddr`/`res_lsb`/`res_msb` is an
  addition, so that results can be read back.

The published implementation is a Virtex-4 FPGA design of 184 slices, 329
LUTs and 143 flip-flops, reaching 271.5 MHz. This RTL has not been mapped to
that device. Its control unit holds about 90 flip-flops, and the memories
are 16-word tables.

## Known limits

* There is no branch or loop instruction and no halt. The program is the
  16-word ROM, and it repeats.
* The input memories are ROMs. Loading new signals means changing
  parameters and rebuilding.
* Add and subtract results beyond the Q10.6 range wrap, with no saturation.
* The result memories are not cleared on reset. Address 15 is never written
  at `N_SAMPLES = 15`.
