# Product / average controller

A small command-driven arithmetic unit. A host writes an 8-bit command through a
one-wire handshake (`req`). The unit then reads a fixed number of 8-bit data from a
single input port at a fixed pace. It returns a 16-bit result: either the product
of the first two data, or the average of all of them. There is no data-valid
strobe on the input side. The host knows from the timing rules below when each
datum is taken, so it must follow those rules exactly.

The design is a classic split between a control part and a datapath:

```
 control part                              datapath
 ------------                              --------
 code --> code_register --op,cid,num_dati--> product_unit ---prodotto--+
 req  --> controllore_fsm --campiona-------> average_unit ---acc-------+
            ^  |   ^                           ^    ^                  v
     cicli4 |  |   | all_data      data_in ----+----+         result_register --> result
            |  v   |                                                 ^
     cycle_counter data_counter --count--> product_unit              |
                   (counts campiona)                  result_en -----+
 busy, cid <-- FSM strobe / command register
```

## Command word

| bits | field      | meaning                                               |
|------|------------|-------------------------------------------------------|
| 7    | `op`       | 1 = product, 0 = average                              |
| 6:5  | `cid`      | command id, echoed on the `cid` output                |
| 4:0  | `num_dati` | number of data to read; **0 means 32**                |

## Handshake and timing

This is the part that needs the most care. The controller takes input without
strobes: it samples `code` and `data_in` in fixed cycles.

1. While `busy` is low, raise `req` for one or more cycles.
2. Drop `req`. Call **b** the first cycle in which `req` is low. The command
   register loads `code` in every cycle from the one after `req` rose up to and
   including cycle b. The value present in **cycle b** is the one kept. Holding
   `code` stable from `req` rising to cycle b is therefore always safe.
3. Datum *i* (i = 0 … N−1) is sampled at the end of cycle **b + 5 + 9·i**.
   The unit waits four cycles, samples for one cycle, then waits four and four
   more before the next datum.
4. `result` is loaded at the end of cycle **b + 7 + 9·(N−1)**. `busy` falls at
   the same edge. `cid` still shows the command's id in that first idle cycle,
   so id and result can be taken together. One cycle later `cid` reads 0.
5. `result` holds its value until the next command completes.

Example, N = 2:

| cycle        | state        | what happens                                |
|--------------|--------------|---------------------------------------------|
| a            | idle         | `req` seen high, `busy` = 0                 |
| a+1 … b−1    | read_code    | `code` loaded each cycle (`req` still high) |
| b            | read_code    | `req` seen low; this cycle's `code` kept    |
| b+1 … b+4    | wait4        | pacing counter 0…3                          |
| b+5          | read_dato    | datum 0 sampled                             |
| b+6 … b+9    | wait4_bis    | pacing counter 0…3                          |
| b+10 … b+13  | wait4        | pacing counter wraps, 0…3                   |
| b+14         | read_dato    | datum 1 sampled                             |
| b+15         | wait4_bis    | data counter equals N → go to fine          |
| b+16         | fine         | `result` loaded at the end of the cycle     |
| b+17         | idle         | `busy` = 0, new `result`, `cid` still valid |

From cycle b, `busy` therefore stays high for 9·N − 1 cycles. That is 17
cycles for a product, and 287 for a 32-datum average.
`reset` is synchronous and active high. It returns the unit to idle and clears
`result`, the command and all counters.

## What is computed

* **Product (`op` = 1).** The datum sampled while the data counter reads 0 goes
  to the first operand register, and the one sampled while it reads 1 goes to the
  second. The result is their full 16-bit product. Normally N = 2. With N = 1
  the second operand stays 0, so the result is 0. With N > 2 the extra data are
  read but ignored.
* **Average (`op` = 0).** Every sampled datum is added into a 16-bit
  accumulator. For N = 2, 4, 8, 16 or 32 the result is the sum shifted right
  by log2(N): the floor of the mean. The largest sum, 32·255 = 8160, fits
  easily. For N = 1 or any N that is not a power of two, the result is **0**:
  the selection then falls back to the product path, which is held at 0 during
  an average.
* The operand registers are held at 0 while `op` is 0. The accumulator is held
  at 0 while `op` is 1, and is cleared in the cycle the result is loaded.

## Departures and own choices

* **The 32-datum average.** The selection logic is written for counts 2 to 32,
  but a 5-bit field cannot hold 32. The 5-bit data counter wraps, so a field
  value of 0 already reads 32 data. This design takes that value as "32" and
  divides by 32. Read literally, the original logic would return 0 for that
  case.
* Widths and the command layout are fixed constants in `controllore_pkg`. They
  are not module parameters, because the command format ties them together.
* The FSM state encoding (a 3-bit enum) and the assertions in `controllore_fsm`
  are this design's own. The assertions check a legal state, a one-cycle sample
  strobe, and that fine is followed by idle.
* Everything else matches the original behaviour cycle for cycle: the states,
  the strobes, the reset and clear priorities, and the result selection.

## Files

| file                     | role                                                       |
|--------------------------|------------------------------------------------------------|
| `rtl/controllore_pkg.sv` | widths, `code_t`, `state_t`, `ctrl_t` (FSM strobes)        |
| `rtl/code_register.sv`   | command register                                           |
| `rtl/cycle_counter.sv`   | 2-bit pacing counter, `cicli4` at count 3                  |
| `rtl/data_counter.sv`    | 5-bit count of data read, `all_data` when equal to N       |
| `rtl/controllore_fsm.sv` | six-state controller                                       |
| `rtl/product_unit.sv`    | operand registers and 8×8 multiplier                       |
| `rtl/average_unit.sv`    | accumulator                                                |
| `rtl/result_register.sv` | divide-by-shift selection and output register              |
| `rtl/controllore.sv`     | top level                                                  |
| `tb/tb_<module>.sv`      | one self-checking testbench per module                     |

After synthesis the whole unit is about 70 flip-flops, one 8×8 multiplier and a
16-bit adder.

## Verification

Each testbench drives its module with random stimulus and compares it every
cycle against a reference model written independently in the testbench. It
prints `TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs.

`tb_controllore` runs the whole unit at its real sizes. It puts a new random
value on `data_in` every cycle, so a datum sampled one cycle early or late gives
a wrong result. It checks `busy`, `cid` and the hold of `result` in every
cycle. It also checks the result and the exact completion cycle of each
command. Its directed commands cover:

* both operations and every average size, including the 32-datum code 0;
* counts that are not powers of two, and products of 1 and 3 data;
* long `req` pulses and back-to-back commands;
* a reset in the middle of a command.

Random commands follow the directed ones. The testbench counts how often each
case occurs, and reports a failure for any case that never occurred.

Each testbench has also been run against a deliberately broken copy of its
module, and each one reported failures.

Simulate with Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -y rtl -y tb rtl/controllore_pkg.sv \
    tb/tb_controllore.sv --top-module tb_controllore
obj_dir/Vtb_controllore
```

Replace `tb_controllore` with any other `tb_<module>` to run a unit test. The
package must come first on the command line.

## Changing it

* The pacing is set by `WAIT_W` (the pacing counter wraps every 2^WAIT_W
  cycles) and by the FSM's path wait4 → read_dato → wait4_bis → wait4. A
  different pace means changing both, together with the timing rule above.
* A wider `DATA_W` needs `RESULT_W` ≥ 2·`DATA_W` for the product, and room for
  32·(2^DATA_W − 1) in the accumulator.
* The average divisor is a case over `num_dati` in `result_register`. Adding
  other counts (for example a true divider) only touches that block.
