# Logic-in-memory XNOR-Net on an FPGA

This design computes the core of a binary convolutional neural network (an
XNOR-Net layer) *inside* the memory that holds its input. Each bit of the
input feature map (IFMAP) is stored in a flip-flop that has its own XNOR gate.
A second array, whose cells are a flip-flop and a half adder, counts the ones.
Every word of the memory is therefore processed at the same time. The time to
compute depends only on the word length, not on how many words are stored.

For every word `w` of an N-bit × M-word IFMAP and one N-bit weight word `K`,
the result is

    OFMAP[w] = (#1s − #0s) of XNOR(IFMAP[w], K) = 2·popcount(XNOR(IFMAP[w], K)) − N

which lies in −N … +N.

The RTL follows the architecture of a master's thesis on logic-in-memory on
FPGA. That thesis builds on an XNOR-Net logic-in-memory architecture from the
literature. It has two hardware versions, and both are given here:

* **The co-processor** (`lim_coprocessor`) is the main design: 32-bit words ×
  256 words, i.e. 1 Kbyte of logic-in-memory. A microcontroller writes it,
  starts it and reads it through a small asynchronous pin protocol.
* **The board version** (`fpga_board_v1`) is 4-bit words × 2 words. It runs by
  hand, with switches, LEDs and two push buttons, and has a free-running
  control unit.

`lim_top` places the two side by side.

## The datapath

```
            K (N bits)
               │
 IFMAP ──► ┌──────────┐ out_xnor  ┌───────────┐ 1 bit   ┌──────────────┐ counts ┌──────────┐
 words     │ LiM XNOR │──M×N────► │ interface │──per──► │ LiM ones     │──M×N──►│ pop      │──► OFMAP
           │ FF + XNOR│           │ decoder   │  word   │ counter      │        │ logic    │   2c − N
           │ per cell │           │ M × N:1   │         │ FF + half    │        │ mux, <<1,│
           └──────────┘           │ muxes     │         │ adder / cell │        │ − N      │
                                  └───────────┘         └──────────────┘        └──────────┘
```

* **`lim_xnor`**: an N × M array. A word is written when its word enable is
  high. The XNOR output of every cell is always valid, and it is combinational
  in `K`. The array also holds the fill counter of the board version.
* **`interface_decoder`**: one N:1 multiplexer per word, all driven by one bit
  counter. In each cycle it sends bit `i` of every word to the ones counter,
  bit 0 first. The transfer takes N cycles, and `stop_pop` marks the last one.
* **`lim_ones_counter`**: also N × M. The half adders of one word form a
  ripple incrementer. The incoming bit is the carry into cell 0, and each
  flip-flop stores its cell's sum. After N cycles, each word holds the number
  of ones in its XNOR word. The array keeps the N × M size of the original,
  although only ⌈log2(N+1)⌉ bits per word are ever used.
* **`pop_logic`**: selects one word's count, doubles it and subtracts N. The
  word is chosen by a result counter (streaming, board version) or by a read
  address (co-processor). The result is two's complement, ⌈log2(N+1)⌉+1 bits
  wide.

All words are handled in parallel, but results leave one word at a time.

## Control: the two control units

**Board version (`xnor_cu_v1`).** The sequence is fixed and free-running. A
clock enable steps it:

| state | cycles | action |
|---|---|---|
| RESET | while `rst` | all cleared |
| IDLE | 1 | counters cleared |
| FILLING_XNOR | M | one IFMAP word per cycle, top word (index M−1) first |
| PRE_POP_COMPUTING | 1 | ones counter and bit counter cleared |
| POP_COMPUTING | N | one bit position per cycle into the ones counter |
| RESULTS | M | one OFMAP per cycle, in fill order, then back to IDLE |

Nothing but reset starts or stops it. Whatever supplies IFMAP and reads the
results must follow these cycle counts. In this version `K` is not stored: it
is wired straight to the XNOR gates and must stay put during POP_COMPUTING.

**Co-processor (`xnor_cu`).** IDLE is gone, and the counters are cleared in
FILLING_XNOR instead. The machine now waits for the outside:

* It stays in **FILLING_XNOR** until `enable_computing`. IFMAP and K may be
  written in this state.
* It then spends 1 cycle in PRE_POP_COMPUTING and N cycles in POP_COMPUTING.
* It stays in **RESULTS**, with `ready` high, until a write is requested. That
  write is carried out and the machine returns to FILLING_XNOR. Reads are
  allowed only in RESULTS.

| operation | allowed in |
|---|---|
| write IFMAP / K | FILLING_XNOR, RESULTS |
| launch computation | FILLING_XNOR |
| read OFMAP | RESULTS |

A request made in a state that does not allow it is not refused. It simply
waits, because its acknowledge does not come until the state allows it. For
example, a read issued during the computation is answered once RESULTS is
reached. If a write and a launch are both pending, the write goes first.

**Compute time.** `ready` rises N+1 cycles after the clock edge that samples
`enable_computing`, for any M. Measured on the original board, the computation
took about 32.5, 64 and 128 FPGA cycles for N = 32, 64 and 128. This design
gives 33, 65 and 129 cycles, plus 2 synchroniser cycles when measured at the
pins.

## The co-processor pin protocol (`mcu_link`, `xnor_net`)

The microcontroller and the FPGA share only general-purpose pins:

* six request lines from the MCU: `rst_mcu`, `we_addr_mcu`, `we_i_mcu`,
  `we_k_mcu`, `we_compute_mcu`, `re_res_mcu`
* four response lines from the FPGA: `ack_addr_lim`, `ack_write_lim`,
  `ack_read_lim`, `ready_lim`
* one 16-bit databus, used in turn for an address, a data piece or a result.

Every exchange is a four-phase handshake. The MCU raises a request and holds
it until the matching acknowledge rises. It then drops the request, and the
acknowledge falls. Neither side needs to know the other's clock; on the
original board the MCU ran at 80 MHz and the FPGA at 10 MHz.

| operation | MCU sequence |
|---|---|
| set address | bus ← addr; `we_addr_mcu`↑; wait `ack_addr_lim`; `we_addr_mcu`↓ |
| write IFMAP / K | set address; bus ← data; `we_i_mcu`↑ or `we_k_mcu`↑; wait `ack_write_lim`; drop |
| compute | `we_compute_mcu`↑; wait `ready_lim`; `we_compute_mcu`↓ |
| read OFMAP | set address; release bus; `re_res_mcu`↑; wait `ack_read_lim`; `re_res_mcu`↓; read bus |

**Address map.** This map is this design's own. A word wider than the bus is
written in `CHUNKS = ⌈N/16⌉` pieces, low piece first.

| request | address | data |
|---|---|---|
| IFMAP write | `word·CHUNKS + piece` | bits `[piece·16 +: 16]` of the word |
| K write | `piece` | bits `[piece·16 +: 16]` of K |
| OFMAP read | `word` | result, sign-extended to 16 bits |

Writes to a word index ≥ M are acknowledged and dropped. Reads use the low
⌈log2 M⌉ address bits.

**Inside the FPGA.** `mcu_link` does four things:

* It passes the six request lines through a two-flip-flop synchroniser
  (`SYNC_STAGES`).
* It registers the bus and keeps the address register with its acknowledge.
* It hands the other requests, level for level, to `xnor_net`, whose
  acknowledges go straight back out.
* It drives the bus from the moment `ack_read_lim` rises until the MCU's next
  request. That covers the MCU reading the bus *after* dropping `re_res_mcu`.

`xnor_net` carries out an operation once, at the first clock edge where the
request is seen and allowed. A request held high does not repeat. An
acknowledge reaches the pins 3 to 4 FPGA cycles after its request. The
bidirectional databus appears as `databus_in`, `databus_out` and
`databus_oe`; a pad wrapper joins them. On the original board `rst_mcu` was
IO0, `we_compute_mcu` IO4, `ready_lim` IO15 and the databus IO16–31; the other
pin numbers are left to that wrapper.

## The board version (`fpga_board_v1`, `debounce`)

* **Switches and LEDs.** `sw[7:4]` is the IFMAP word taken at each filling
  step, and `sw[3:0]` is K. The four LEDs show the result, as 4-bit two's
  complement, during the RESULTS steps and are dark otherwise. `state_led` has
  one line per state, bit 0 = RESET … bit 5 = RESULTS.
* **Buttons.** RST is active high and CLK is active low (pull-up wiring). Both
  go through `debounce`, a three-state machine (IDLE, WAIT, STABLING) with a
  counter. A press counts only after the level has stayed active for
  `STABLE_CYCLES` cycles, and a bounce inside WAIT starts over.
* **Stepping.** In the original, the debounced CLK button clocks the design.
  Here the design runs on the board clock, and each debounced press gives one
  clock-enable pulse, so no clock is made from logic.

## Where this design makes its own choices

The original fixes the architecture, the state sequences, the handshake
sequences and the sizes. The following are this design's own:

* the address map for words wider than the bus, and the sign extension of
  results
* the split of the databus into in, out and output enable, and the bus
  turnaround rule
* the request synchronisers. Without them a pin that changes while it is
  being sampled can glitch. They add 2 cycles to each response.
* the K register in the co-processor; in the board version, K stays
  combinational as in the original
* the order of bit transfer (bit 0 first) and of streamed results (fill
  order)
* the clock-enable stepping of the board version, its power-on reset input
  `por`, and the switch split
* `STABLE_CYCLES = 100000` (10 ms at 10 MHz); the original gives no figure
* releasing a button is not debounced
* the stored IFMAP bits are not reset, since they form a memory; K and all
  control state are reset.

**Not included.** The microcontroller and its driver software are not part of
the FPGA; the testbenches model its protocol side (`tb/mcu_bfm.sv`). Also
absent are the RC debounce circuits on the breadboard and the board's
measurement and configuration infrastructure.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `lim_top`, `lim_coprocessor`, `xnor_net` | `N`, `M` | 32, 256 | bits per word, words |
| | `DATA_W` | 16 | databus width |
| | `SYNC_STAGES` | 2 | request synchroniser depth |
| `lim_top`, `fpga_board_v1`, `xnor_net_v1` | `V1_N`/`N`, `V1_M`/`M` | 4, 2 | board version size |
| | `STABLE_CYCLES` | 100000 | debounce time in clock cycles |

The original measured the co-processor at 32-bit words (4 to 256 words),
64-bit words (4 to 128) and 128-bit words (4 to 64). The default holds the
32-bit cases. The others need `N` set to 64 or 128; they simulate correctly
(`tb_workload_sizes`). At 1 Kbyte the array nearly filled the 24,624 logic
elements of the original Cyclone 10 LP.

## Files and hierarchy

```
lim_top
├── lim_coprocessor
│   ├── mcu_link
│   └── xnor_net ── xnor_cu, lim_xnor, interface_decoder, lim_ones_counter, pop_logic
└── fpga_board_v1
    ├── debounce (×2)
    └── xnor_net_v1 ── xnor_cu_v1, lim_xnor, interface_decoder, lim_ones_counter, pop_logic
```

`rtl/lim_pkg.sv` holds the state types and width helpers. Each module has a
testbench `tb/tb_<module>.sv` that checks itself against a software model
and prints `TB_RESULT checks=… failures=…`. `tb/tb_workload_sizes.sv` runs
the three measured word lengths at two depths each. `tb/tb_lim_top.sv` runs both designs
end to end at full default size. It completes 2 × 256 results through the
pin protocol and one board round with 100000-cycle debouncing, in about a
minute. It also counts each mechanism: writes from RESULTS, a read waiting
for RESULTS, bus turnaround and rejected bounces.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lim_pkg.sv tb/tb_lim_top.sv \
          --top-module tb_lim_top -Mdir obj_top -o sim
./obj_top/sim
```

Modules are found by file name through `-Irtl -Itb`. Replace `lim_top` with
any other testbench name.

## How far it is checked

* Every block's testbench passes.
* Every testbench also fails when its block is replaced by a copy with one
  deliberate fault, such as XOR instead of XNOR, a carry made with OR, a
  missing shift, or swapped write requests.
* The full-size end-to-end test passes.
* All RTL lints cleanly in Verilator and elaborates in Yosys-slang.
* Generic Yosys synthesis of the full 32 × 256 top gives about 16.5 k
  flip-flops: 8192 in each array plus K and control. It also gives about
  50 k word-level cells.
* It has not been run on an FPGA.
