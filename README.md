# Fall-through header/data serializer

A serializer sends a record made of up to three optional header bytes
(H_A, H_B, H_C, each with its own enable) followed by N data bytes taken from
parallel inputs. It sends one byte per clock on a byte-wide stream with a
valid strobe.

The textbook state machine gives each header its own state. Each state checks
its enable and either sends the header or sends nothing. That costs a clock
cycle for every disabled header, so the record has holes. You can avoid the
holes in a plain case-statement FSM, but only by copying the "which header
comes next" decision into every state. That duplicated code is hard to
maintain.

This design keeps one state per step, the same as the simple FSM. It evaluates
several steps in a single clock cycle. A step that has nothing to send "falls
through" to the next step in the same cycle. A step that sends a byte stops
the evaluation until the next clock. The result:

- no disabled header ever costs a cycle;
- a record of `h` enabled headers takes exactly `h + N` cycles;
- the first byte leaves in the cycle the registered run request is seen;
- the code has one block per step, with no duplicated decisions.

## Record format

With header bytes 0x8A, 0x8B and 0x8C and data bytes 0x10..0x1A (the default
configuration, N = 11):

| enables (A B C) | stream, one byte per cycle                  | cycles |
|-----------------|---------------------------------------------|--------|
| 1 1 1           | 8A 8B 8C 10 11 12 13 14 15 16 17 18 19 1A   | 14     |
| 1 0 1           | 8A 8C 10 11 ... 1A                          | 13     |
| 0 1 0           | 8B 10 11 ... 1A                             | 12     |
| 0 0 0           | 10 11 ... 1A                                | 11     |

Headers always appear in the order A, B, C, and data bytes in index order.
`data_out` is 0 whenever `data_valid` is low.

## The fall-through chain

`rtl/ft_serializer.sv` has one state register. Its states are `ST_IDLE`,
`ST_HDR_A`, `ST_HDR_B`, `ST_HDR_C` and `ST_SEND`. Next to it are a data-index
register and a flip-flop that samples `run`. All the behaviour is in one
`always_comb` block. That block is not a `case` statement. It is a sequence of
`if` steps in state order, and it works on three local variables:

- `v_next` is the working state. It starts at the registered state.
- `v_nwait` means "nothing has been sent this cycle yet". It starts at 1.
- `v_idx` is the working data index. It starts at the registered index.

Each step has the form `if (v_nwait && v_next == ST_X) begin ... end`, and the
steps run in this order:

1. **Idle** clears `v_idx`. If `run_s` is high, it moves `v_next` to `ST_HDR_A`.
2. **Header A, B and C**, one step each. If the header is enabled, the step
   drives the header byte and clears `v_nwait`. In either case it moves
   `v_next` to the next step.
3. **Send** drives `data[v_idx]` and clears `v_nwait`. On the last index it
   moves `v_next` back to `ST_IDLE`. Otherwise it advances `v_idx`.

Each step sees the values of `v_next` and `v_idx` that the steps before it
left. So in one cycle the machine can pass through idle and any number of
disabled headers, and then emit the first enabled header or the first data
byte. At the end of the block, `v_next` and `v_idx` become the next-state
values of the registers.

Rules for changing this code:

- **Clear `v_nwait` in every branch that emits something**, or anything else
  that must wait for a clock edge. A forgotten clear lets the chain run on
  into the next step. That step then overwrites the outputs in the same
  cycle. Nothing flags this at compile time. The assertion `a_send_no_gap`
  and the testbenches catch the common cases.
- **The steps must stay in state order.** A step can only fall through to a
  step written after it. Going back to an earlier state always takes a clock
  edge. That is why the chain cannot loop and is a finite amount of logic.
- **Any value that a later step reads in the same cycle must be a variable.**
  The data index is such a value. This is where this RTL differs from the
  simplest form of the technique, which keeps the index only in the
  register: idle clears it through the next-index value, while the send step
  reads the register. Suppose a record is started with every header disabled
  right after an earlier record. The machine then falls from idle straight
  into send in one cycle and reads the index the earlier record left behind,
  which is N-1. It sends only the last data byte and stops. Carrying the
  index as `v_idx` removes this case. `tb_ft_serializer` tests it on purpose.

Synthesis flattens the chain into ordinary next-state logic. At the default
size the serializer is about 85 word-level cells and 13 flip-flop bits.

## Interface and timing

`serializer_top` is the device. It contains one `ft_serializer` and brings
its output stream out as `link_data` and `link_valid`. The serial link that
carries the record away is not part of this design. It attaches to those
ports.

| port                             | dir | meaning |
|----------------------------------|-----|---------|
| `clk`                            | in  | rising-edge clock |
| `rst_n`                          | in  | asynchronous reset, active low; state goes to idle and the outputs go to 0 at once |
| `run`                            | in  | start request, sampled once into `run_s` |
| `hdr_a_en`, `hdr_b_en`, `hdr_c_en` | in | header enables |
| `data[NINPUTS-1:0][7:0]`         | in  | data bytes; `data[i]` is D_i |
| `link_data[7:0]` (`data_out` on `ft_serializer`) | out | current byte |
| `link_valid` (`data_valid`)      | out | the byte is part of a record |

Timing:

- `run` is registered. If it is high at rising edge *k* while the machine is
  idle, the record's first byte is on the outputs during cycle *k*+1. The
  remaining bytes follow on consecutive cycles.
- The outputs are combinational from the registers and from the enables and
  data. A consumer samples them at the next rising edge.
- The enables are read while the headers are being evaluated. Hold them from
  the `run` edge until the first data byte has gone out.
- Hold `data` until the record ends.
- A request that arrives while a record is in progress is not stored. `run`
  is a level, though. If `run_s` is high in the cycle after the last data
  byte, the next record starts in that cycle, with no idle cycle in between.

## Parameters

| parameter  | default | note |
|------------|---------|------|
| `NINPUTS`  | 11      | data bytes per record (D_0..D_10) |
| `HEADER_A` | 8'h8A   | |
| `HEADER_B` | 8'h8B   | |
| `HEADER_C` | 8'h8C   | |

The defaults are in `rtl/serializer_pkg.sv`, which also defines the state
enum. The index register is `ceil(log2(NINPUTS))` bits wide.

## Verification

- **`tb/tb_ft_serializer.sv`** tests the core with `NINPUTS = 5` and other
  header values.
  - It sends 300 records with random enables and data, and random gaps of
    0 to 3 cycles, including back-to-back records.
  - It predicts every cycle of the output from the record list alone, and
    compares at the falling edge.
  - After the first data byte it toggles the enables at random, to show that
    the data phase ignores them.
  - It ends with an asynchronous reset in the middle of a record, followed by
    a clean restart.
- **`tb/tb_serializer_top.sv`** runs the top with every parameter at its
  default.
  - It first sends the four records of the table above, then 400 random
    records.
  - It counts each mechanism and fails if one never happens. The mechanisms
    are: a skipped header, a fall through from idle into the data phase, a
    start directly into a header, a back-to-back restart, a back-to-back
    restart with all headers disabled, enable changes during the data phase,
    and a reset in the middle of a record.
  - It also checks that the total number of valid cycles equals the summed
    record lengths.
- **Assertions** in `ft_serializer`:
  - `data_out` is 0 when `data_valid` is low;
  - `data_valid` is high in every cycle spent in `ST_SEND`;
  - the index stays in range.

To simulate with Verilator:

```
verilator --binary --timing --assert rtl/serializer_pkg.sv rtl/ft_serializer.sv \
          rtl/serializer_top.sv tb/tb_serializer_top.sv --top-module tb_serializer_top
./obj_dir/Vtb_serializer_top
```

For the core testbench, use `tb/tb_ft_serializer.sv` and drop
`rtl/serializer_top.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Departures and open points

- **Data index** is carried through the chain as a variable. Without that,
  the back-to-back, all-headers-disabled case described above goes wrong.
- **Record length.** The reference example is stated as N = 10, but it lists
  data bytes D_0..D_10 and shows eleven of them in its waveforms. This RTL
  uses eleven as the default (`NINPUTS = 11`).
- **Things the reference design does not specify**, chosen here:
  - the state encoding;
  - the width of the index register;
  - how long the enables and data must be held;
  - whether `run` is a pulse or a level.
- **Timing and area not reproduced.** The reference design reports its own
  FPGA area and maximum clock frequency. Those figures depend on one vendor's
  flow and were not reproduced. The numbers above come from generic
  word-level synthesis and are not comparable.
- **Serial link** (parallel-to-serial conversion, line coding) is not included.
