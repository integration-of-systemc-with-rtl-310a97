# Emulator-side RTL for co-modeling a Reed-Solomon coder

When a design runs on a hardware emulator and its testbench runs on a host
workstation, the link between the two costs far more than the emulated logic
itself. If every test vector crosses the link, the emulator spends almost
all of its time waiting. The main idea here is to put the whole test set
next to the design under test (DUT) inside the emulator:

- The stimuli and the expected responses sit in two test vector memories (TVMs).
- A counter walks through them, and a comparator checks every response.
- Only two words cross the link. The host sends one word that starts the
  run. The emulator sends one word back, holding the pass/fail verdict and
  the number of vectors applied.

The DUT is a Reed-Solomon (RS) encoder/decoder core. The core is third-party
IP and is not included: its pins are ports of the top level.

The RTL also contains the parts of a CCSDS-style concatenated coding chain
that live between the RS coder and a convolutional (Viterbi) coder:

- a block interleaver and its de-interleaver, joined by full-handshake links;
- the wrapper that maps the RS coder's clocked RAM onto the emulator's plain
  asynchronous memory.

## The channel: macros and the vector transactor

On the emulator side, the link ends in an input macro (a register the host
writes) and an output macro (a register the host reads). Each has a
two-wire handshake:

| signal | driven by | meaning |
|---|---|---|
| `in_avail` | input macro | a new input vector is in the register |
| `in_done` | transactor | the input vector has been taken; the macro may reuse the register |
| `out_avail` | transactor | an output vector is ready to be sent |
| `out_done` | output macro | the output vector has been taken |

The macros, the reset generator and the controlled-clock generator are
vendor parts and are not included. The testbenches model the two data
macros (`tb/in_macro_model.sv`, `tb/out_macro_model.sv`). The controlled
clock is replaced by a clock enable on the single system clock `clk`.

`vector_transactor` paces the transfers. It works on both clock edges:

- It starts a transaction on a rising edge.
- It takes the acknowledgements on falling edges.

| from | to | edge | condition |
|---|---|---|---|
| IDLE | ACTIVE | rise | `in_avail && !out_done` |
| ACTIVE | IDLE | fall | `!in_avail && out_done` (both sides done) |
| ACTIVE | RCVWAIT | fall | `out_done` (only the transmit finished) |
| ACTIVE | TXWAIT | fall | `!in_avail` (only the receive finished) |
| RCVWAIT | IDLE | fall | `!in_avail` |
| TXWAIT | IDLE | fall | `out_done` |

The transition table is the vendor transactor's. The output values and the
clock-enable timing are this design's own choice:

- `in_done` is high in ACTIVE and RCVWAIT.
- `out_avail` is high in ACTIVE and TXWAIT.
- `enable` is high exactly on the rising edge that starts a transaction.

So in plain streaming mode the DUT is clocked once per transaction, with the
input vector just received. The output it then shows is held until the host
takes it. With macros that never stall, one transaction takes three clock
cycles.

No register is written on both edges. The rising-edge transition is kept as a
toggle pair: `start_tgl_q` changes only on the rising edge and `ack_tgl_q`
only on the falling edge. The two differ while the transaction has not yet
been acknowledged. This keeps the FSM single-edge per register. Synthesis
and simulation therefore see ordinary flip-flops.

## Running the test set on the emulator

`top_mem` is the DUT wrapper for the on-emulator run. It contains:

- `vector_counter`: the address counter. It produces IN_OK ("vectors are
  being applied") and OUT_VAL ("the verdict is ready").
- Two `tvm` instances: 36-bit input words and 22-bit expected words, each
  2^19 deep.
- `result_checker`: a bitwise compare whose result is ANDed into a
  pass/fail flip-flop. It also counts mismatches.

`comod_top` adds the two gates that turn the streaming transactor into a
test-run controller:

```
clk_en    = transactor.enable  | IN_OK     // DUT clock keeps running during the run
out_avail = transactor.out_avail & OUT_VAL // reply held back until the verdict exists
```

A run goes like this:

1. The host sends one input vector with bit 0 set (`initiate_test`). The
   transactor raises `enable` for the starting edge. On that edge the
   counter sees `init`, clears the address and raises IN_OK.
2. IN_OK keeps `clk_en` high. On each of the next `NUM_VECTORS` edges:
   - input word k drives the RS core pins;
   - the core's outputs are compared with expected word k;
   - the core is clocked (`dut_clk_en = clk_en & IN_OK`);
   - the address advances.
   The core is thus clocked exactly once per vector.
3. At the last address IN_OK falls and OUT_VAL rises. The transactor has
   been in TXWAIT the whole time, because `out_avail` was held low. Now it
   offers the reply:

   ```
   out_data[21:0] = {2'b00, result, vec[18:0]}   // vec = NUM_VECTORS
   ```

4. A new `initiate_test` word restarts the sweep.

Check the timing convention before you connect a real core. Expected word k
is compared with the core outputs that are present *while* input word k is
applied. That is, the outputs come from the state before the edge that
clocks word k in. The expected-response file must be laid out the same way.
This is how an RTL simulation dump of the core lines up when each row holds
the inputs and the outputs sampled just before the edge.

The RS pin map of the 36-bit input word, from bit 35 down, is:

```
i1 | i2[10:0] | i3 | i4 | i5[4:0] | i6 | i7[15:0]
```

The 22 compared bits are:

```
data_out[15:0] | data_out_size[1:0] | ready | data_valid | enc_complete | dec_complete
```

Both are defined as packed structs in `comod_pkg`. The TVMs are loaded
through a separate write port (`load_in`, `load_out`, `load_addr`, ...). On
an emulator this port is where the memory image goes in.

## Interleaver and de-interleaver

The RS encoder emits whole codewords. The convolutional encoder wants a
bit stream. `interleaver` does the conversion:

- It stores `ROWS` = 2 codewords of `COLS` = 128 eight-bit symbols, row by
  row, in arrival order.
- It reads column by column. For each column it goes through the bits from
  the MSB down and sends the 2-bit word `{row1[bit], row0[bit]}`.

A block therefore takes 256 symbol transfers in and 1024 word transfers out.

`deinterleaver` is the exact inverse:

- Bit r of each incoming 2-bit word goes to row r.
- It then sends row 0 and then row 1 as 8-bit symbols, with the first bit of
  each group as the MSB.

The reference model this follows put the two bits back into swapped rows,
which would return the two codewords in swapped order. This design makes the
pair invert each other instead.

Each side has a data link and a one-bit control link. The upstream sender
raises the control link after the last word of a block. The block is then
passed on, and its own control word follows it downstream. A block that
arrives before the control word is stored. Words beyond a full block are not
acknowledged, so the sender stalls.

The links are `ms_full_if` interfaces:

- The master drives `data` and `req`; the slave drives `ack`.
- A word moves on a rising edge with both `req` and `ack` high.
- A raised `req` must stay up, with stable data, until it is taken.
- An assertion checks that rule. The slave may raise `ack` early.

The top level exposes each link as plain `*_data`, `*_req` and `*_ack` ports.

## Memory wrapper for the RS coder RAM

The RS core uses a clocked RAM: address `A[6:0]`, data in `D[7:0]`, data out
`Q`, active-low enable `EZ`, active-low write `WZ`, and `CLK`. The emulator
offers only single-ported asynchronous memories with separate read and
write enables (`emu_mem`, 64K x 32 by default).

`rs_mem_wrapper` decodes the controls combinationally:

- A write is `!EZ & !WZ`; a read is `!EZ & WZ`.
- The address and data go straight through.
- `Q` is registered on the clock edge: the written data on a write, the
  memory contents on a read.

The result behaves like a standard synchronous RAM with one cycle of read
latency and write-through. The reference wrapper registers the controls
before the memory, which adds a further cycle; this design does not.

## Top-level ports

`comod_top` brings out:

- the channel (`in_avail`, `in_data[32:0]`, `in_done`, `out_avail`,
  `out_data[21:0]`, `out_done`, `xact_state`);
- the TVM load port;
- the RS core pins (`rs_in`, `rs_out`, `dut_clk_en`);
- the status signals (`in_ok`, `out_val`, `result`, `match`, `n_mismatch`);
- the interleaver and de-interleaver links (`il_*`, `dil_*`);
- the coder RAM pins (`mem_ez`, `mem_wz`, `mem_a`, `mem_d`, `mem_q`).

Input bits 32:1 are unused in this mode. The top two bits of `out_data` are
always zero. The three sub-systems share only `clk` and `rst`, so they sit
side by side.

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 19 | TVM address width (2^19 words) |
| `NUM_VECTORS` | 275262 | vectors per run; set it to the size of the test set |
| `IL_ROWS`, `IL_COLS`, `IL_SYM_W` | 2, 128, 8 | interleaver block |
| `MEM_ADDR_W`, `MEM_DATA_W` | 7, 8 | coder RAM |

Test sets of 61714 to 275262 vectors all fit in the default TVM depth.

## How far to trust it

Each block has a self-checking testbench. Each testbench compares the block
against values worked out separately, and each one fails when its block is
deliberately broken.

`tb_comod_top` runs all of this end to end with small TVMs. It counts each
mechanism and fails if any never happened:

- TXWAIT waiting;
- clocking by IN_OK;
- the gated reply;
- pass and fail runs;
- restart;
- link stalls;
- a full interleaver;
- coder RAM writes and reads.

`tb_comod_top_full` performs one complete run at the default size, 275262
vectors. It checks the reply word and that the core is clocked exactly
275262 times. `tb_comod_top_workloads` does the same for test sets of
61714, 68066, 128270, 170594 and 179804 vectors. Each of those runs uses
its own top-level copy with `NUM_VECTORS` set to the set's size.

The RS core is replaced in the testbenches by `rs_coder_model`. This is a
small state machine with the core's pins. It is **not** a Reed-Solomon coder;
it only makes the outputs depend on the input history. The timing of the
real core's outputs relative to its clock has not been checked against this
wrapper. The interleaver chain has not been run with a real RS or Viterbi
coder.

## Simulating

All code is SystemVerilog-2017 and needs nothing besides Verilator 5. Each
testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/comod_pkg.sv tb/rs_model_pkg.sv tb/tb_comod_top.sv \
    --top-module tb_comod_top -o sim
./obj_dir/sim
```

Replace `tb_comod_top` with any other `tb/tb_*.sv`. Only the testbenches that
use the core model need `tb/rs_model_pkg.sv`. The full-size run takes a few
seconds.

## Files

| file | contents |
|---|---|
| `rtl/comod_pkg.sv` | widths, transactor state type, RS pin structs |
| `rtl/comod_top.sv` | top level |
| `rtl/vector_transactor.sv` | two-edge streaming transactor |
| `rtl/top_mem.sv` | test-run wrapper (counter, TVMs, checker) |
| `rtl/vector_counter.sv`, `rtl/tvm.sv`, `rtl/result_checker.sv` | its parts |
| `rtl/interleaver.sv`, `rtl/deinterleaver.sv`, `rtl/ms_full_if.sv` | interleaving chain and link |
| `rtl/rs_mem_wrapper.sv`, `rtl/emu_mem.sv` | coder RAM on emulator memory |
| `tb/tb_*.sv` | testbenches |
| `tb/in_macro_model.sv`, `tb/out_macro_model.sv`, `tb/rs_coder_model.sv`, `tb/rs_model_pkg.sv` | behavioural models used by the testbenches |
| `tb/workload_run.sv` | one sized run, used by `tb_comod_top_workloads` |
