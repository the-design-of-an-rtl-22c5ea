# A 32 × 32 bit-plane array processor for pattern recognition

Pattern recognition works on pictures, which are spatial data. A conventional computer
goes through them one word at a time. This design instead holds a 32 × 32 picture in a
square array of 1024 identical one-bit *logical modules*, one per picture element. Every
module obeys the same order at the same time. A *master control* broadcasts the orders
and is itself driven by an ordinary stored-program host computer.

Each module has:

- a one-bit accumulator (AC);
- a 16-bit memory of its own;
- wires to the accumulators of its four neighbours.

The master control adds three things to the array:

- binary counters at the ends of the rows and columns, which count ones;
- isolation gates, which restrict an order to part of the array;
- a way to shift a column of external (for example random) bits into the array.

One-bit *link elements* sit between every pair of touching modules, diagonal neighbours
included. They let the array grow a region along chains of connected ones. This is the
key operation for finding connected figures.

The RTL is synchronous, technology-independent SystemVerilog. The original concept was
planned for tunnel-diode or thin-film-cryotron logic. Here its logical organisation is
kept and clocked flip-flops take the place of the device circuits.

## Orders

Every order goes to every module that is not isolated.

| order | code | effect in each enabled module |
|---|---|---|
| ADD | 0 | AC := AC **or** operand |
| MPY | 1 | AC := AC **and** operand |
| COM | 2 | AC := **not** AC |
| STO | 3 | memory[addr] := AC |
| SHR | 4 | AC := AC of the neighbour on the opposite side of `dir`. On the edge the data leaves from, zeros enter. On a rightward SHR the column `order_data` enters instead (zero gives a plain shift). |
| SRA | 5 | as SHR, but the edge the data leaves from wraps round to the opposite edge (rotation) |
| LNK | 6 | every link element := AC(a) **and** AC(b) of its two modules |
| EXP | 7 | ones spread through set links of the kind `kind` until nothing changes |
| CLC | 8 | clear all row and column counters |
| RDC | 9 | in-out register := one counter (see below) |
| ISR | 10 | row isolation mask := `order_data` |
| ISC | 11 | column isolation mask := `order_data` |

The ADD and MPY operand is picked by `src`:

- `SRC_MEM`: memory bit `addr` of the module itself.
- `SRC_UP`, `SRC_DOWN`, `SRC_LEFT`, `SRC_RIGHT`: the accumulator of that neighbour. A
  neighbour outside the array reads as 0.

Row 0 is the top row and column 0 the left column. `dir` gives the direction in which the
data moves: `DIR_RIGHT`, `DIR_LEFT`, `DIR_UP` or `DIR_DOWN`.

The array has no "clear accumulator" order. Two ways to clear AC:

- shift 32 times with zero fill;
- MPY with a memory bit known to be zero.

## One order, nine time pulses

The master control runs each order through a fixed chain of nine time pulses, one clock
each (`pulse_chain`). On each pulse it broadcasts a command bundle (`array_cmd_t`) to all
modules:

| pulse | action |
|---|---|
| 1 | set the memory read flip-flop MRFF |
| 2–4 | MRFF set: the address matrix selects bit `addr` in every module, and the bit is readable |
| 3 | **strobe**: accumulators (or links) update. CLC, RDC, ISR and ISC act here. |
| 4 | clear MRFF |
| 6 | set the memory write flip-flop MWFF |
| 7 | STO, first half: reset the selected bit in every enabled module |
| 8 | STO, second half: set it again where AC is one; clear MWFF |
| 9 | end of the cycle; `done` is high and the next order may be taken |

Memory read-out does not destroy the bit, so there is no memory buffer register. The
accumulator takes the selected bit straight from the memory. A write is always "reset,
then set if one". This matches storage elements that are easy to set but need a separate
reset step.

An order takes 9 clocks. Orders follow each other without gaps: `order_ready` is high on
pulse 9 as well as when idle. The one exception is EXP.

## Links and expansion (EXP)

Each module (r,c) owns up to four of the link elements around it:

- horizontal, to (r, c+1);
- vertical, to (r+1, c);
- positive diagonal, to (r−1, c+1), running lower-left to upper-right;
- negative diagonal, to (r+1, c+1), running upper-left to lower-right.

There are about 4N² of them in all (3,906 for N = 32). LNK writes every link at once. A
link becomes 1 exactly when both of its modules hold a one. A link between two modules is
written only if both modules are enabled.

EXP picks one link kind. Through every set link of that kind, a module with a one offers
it to its partner, and the partner ORs it into its accumulator. Repeated, this fills
every chain of set links that reaches a module holding a one. This is how a seed grows
into the whole connected figure it belongs to.

In the device-level concept this spreading is asynchronous. In this RTL it moves one link
per clock. While EXP is on pulse 3, the array raises `exp_changed` if any enabled
accumulator would still rise. The master control then holds the pulse chain on pulse 3
and strobes again. An EXP order therefore takes 9 + k clocks, where k is the number of
one-link steps the longest spread needs. k is at most N² − 1 for a snake-shaped chain.

Typical use (connected-component extraction):

1. `STO` the picture.
2. `LNK`.
3. Reduce AC to seed points, for example with isolation and MPY.
4. `EXP` with the wanted link kind. The accumulators now hold exactly the figures that
   contain a seed.

Isolated modules do not change. A one held in an isolated module still passes through
its links to enabled neighbours.

## Edges, random fill and counting ones

`edge_shift_logic` supplies the modules on each edge during a shift:

- SHR: zeros enter. On a rightward SHR the master control's fill column enters instead.
- SRA: the accumulators of the opposite edge enter.

To make a random array, the host sends 32 rightward SHRs, each carrying 32 random bits in
`order_data`.

Counters (`ones_counter`, 6 bits each, 0–32):

- one at the right end of every row, which adds the rightmost accumulator on every
  rightward SHR or SRA;
- one on top of every column, which adds the top accumulator on every upward SHR or SRA.

After CLC and 32 × SRA right, each row counter holds the number of ones in its row, and
the picture is back where it started. The same holds for columns with 32 × SRA up.

RDC copies one counter into the 6-bit in-out register `io_reg`:

- `order_data[4:0]` selects the row or column;
- `order_data[5]` = 1 selects column counters, 0 selects row counters.

## Isolation

Each module has an enable, an AND gate on the order path from the master control. In
this design the enable is `row_en[r] & col_en[c]`, taken from two 32-bit masks held in
the master control and loaded by ISR and ISC. Any rectangle of rows × columns (or any
product set of rows and columns) can be isolated. A disabled module keeps its
accumulator, memory and links unchanged. After reset every module is enabled.

The counters and the fill column ignore isolation.

## Interface of the top, `array_processor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears AC, memories, links, counters) |
| `order_valid` / `order_ready` | in / out | 1 | handshake. An order is taken on a clock edge where both are high. |
| `order` | in | `order_t` (15 bits) | `op`, `src`, `addr`, `dir`, `kind` (see `ap_pkg`) |
| `order_data` | in | N | fill column, isolation mask or counter index |
| `io_reg` | out | 6 | in-out register |
| `done` | out | 1 | high on pulse 9 of each order |
| `ac_plane` | out | N × N | all accumulators, `ac_plane[r][c]`, for observation |

Parameters: `N` = 32 and `MEM_BITS` = 16. The memory address field is 4 bits, so
`MEM_BITS` cannot exceed 16. `N` must be a power of two for RDC's index field.

## How far this follows the original concept, and where it departs

Kept from the concept:

- the 32 × 32 size and the 16-bit module memory;
- the order set and its operands;
- zero fill and wrap-around at the edges;
- link elements between all eight neighbours and expansion along one kind;
- one counter per row and per column, read through an in-out register;
- isolation by AND gates on the control path;
- random fill through the first column;
- a non-destructive memory with no buffer register, written by reset-then-set;
- one-hot address selection shared by all modules;
- a nine-pulse memory cycle in which pulse 1 sets and pulse 4 clears the read flip-flop,
  pulses 6 and 8 frame the write, and pulse 9 ends the cycle.

Choices of this design:

- The order codes, CLC, RDC, ISR and ISC, and the `order_data` conventions.
- Row × column isolation masks. Per-module masking was not adopted.
- The strobe on pulse 3 and the write halves on pulses 7 and 8.
- One clock per time pulse. In the concept the pulses are unevenly spaced over about 5 µs.
- EXP spreads one step per clock rather than settling asynchronously.
- The orientation of the positive and negative diagonals.
- Which shift directions the counters listen to (rightward for rows, upward for columns).
- The counter width.
- Reset values.
- `ac_plane`, an observation port with no counterpart in the concept.
- The module's gate-level logic, which is simply the plainest logic that performs each
  order.

Not built:

- the host computer;
- the device-level tunnel-diode and cryotron circuits;
- the current drivers and windings of the memory;
- the magnetic-core memory with buffer register and inhibit winding, an earlier memory
  option that the non-destructive memory replaces.

## Size

Yosys coarse synthesis of the full 32 × 32 top gives about 54,000 word-level cells and
21,800 flip-flop bits:

| part | flip-flop bits |
|---|---|
| module memories (16 per module) | 16,384 |
| accumulators | 1,024 |
| link elements | 3,906 |
| counters (64 × 6) | 384 |
| master-control registers | remainder |

## Files

- `rtl/ap_pkg.sv`: order codes, operand, direction and link-kind encodings, `order_t`, `array_cmd_t`.
- `rtl/array_processor.sv`: top; master control plus array.
- `rtl/master_control.sv`: order handshake, pulse schedule, MRFF and MWFF, isolation masks, in-out register.
- `rtl/pulse_chain.sv`: nine-pulse time-pulse generator with hold.
- `rtl/mem_addr_matrix.sv`: address decoder to one-hot selection lines.
- `rtl/ap_array.sv`: the N × N grid, neighbour wiring, link elements, edge logic, counters.
- `rtl/ap_module.sv`: one logical module (accumulator, order logic, memory).
- `rtl/module_memory.sv`: the module's 16 storage bits.
- `rtl/link_cell.sv`: one link element.
- `rtl/edge_shift_logic.sv`: shift input of one edge.
- `rtl/ones_counter.sv`: edge counter.
- `tb/ap_ref_pkg.sv`: reference model used by the array-level testbenches.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=… failures=…`.

## Verification

Every module has a self-checking testbench. The testbenches compare against independently
written models, use random stimulus and include a watchdog.

`tb_array_processor` runs the full-size top with no parameter overrides. It sends:

- a random fill of the whole plane;
- a full row and column census through the counters, checked against ones counted
  directly;
- seeded EXP runs for all four link kinds;
- 1,500 random orders, with random isolation masks.

After every order it checks the whole accumulator plane, the in-out register and the
order's clock count (9, or 9 + k for EXP). It also counts each mechanism and fails if one
never occurs:

- zero-fill shift and random fill;
- wrap-around;
- multi-step EXP;
- LNK;
- store then read;
- neighbour operands;
- COM and MPY;
- isolation;
- counter read-out and clear;
- back-to-back orders.

`tb_ap_array` checks the array alone at 8 × 8 against the same model, including every
counter after every order.

## Simulating

With Verilator 5. The top testbench takes a few minutes to compile at 32 × 32 and about
two seconds to run:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/ap_pkg.sv tb/ap_ref_pkg.sv tb/tb_array_processor.sv \
    --top-module tb_array_processor
./obj_dir/Vtb_array_processor
```

Any other testbench runs the same way: name the two packages first, then the testbench,
and let `-y` find the modules. To try a different array size, override `N` on
`array_processor`. The reference model takes the size as a constructor argument.
