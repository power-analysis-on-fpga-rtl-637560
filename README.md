# CPA target platform: parallel AES S-boxes behind a serial command interface

Correlation power analysis (CPA) recovers a key byte by correlating the
supply current of a chip with a model of the data it processes. To study
it, one needs a target whose leaking operation is known, isolated in time
and repeatable thousands of times without a human in the loop. This design
is such a target for an FPGA. The leaking operation is the AES S-box
(SubBytes on one byte), the non-linear step that CPA usually attacks. A
host PC sends one-byte commands over a serial line. The platform then:

* generates the plaintext byte on chip with an 8-bit LFSR that the host seeds;
* lets the host choose how many identical S-box copies (1 to 32) switch at the
  same time, so that the size of the data-dependent current can be varied;
* raises a `trigger` output for exactly the two clock cycles in which the
  S-boxes evaluate, so an oscilloscope captures only that activity;
* answers each measurement with the XOR of all S-box outputs, a check that
  every copy computed the same value.

The host knows the seed and the LFSR feedback, so it can recompute every
plaintext and does not have to receive it. The key is not held on chip: the
S-box input is the LFSR byte itself. In an experiment the host treats that
byte as plaintext XOR key for a key of its choosing.

```
          +---------+  data_in/rd_req/rd_ack  +-------------------------------+
  rx ---->|  uart   |------------------------>|  ctrl                         |---> trigger
  tx <----| rx + tx |<------------------------|  main FSM, lfsr_fsm, lfsr,    |
          +---------+  data_out/wr_req/wr_ack |  sbox_en_fsm, measure_fsm     |
                                              +-------------------------------+
                                        en[31:0] | sbox_bits[7:0] | en2  ^ xor_result[7:0]
                                                 v                v      |
                                   +--------------------------------------------+
                                   | sbox_logic: N_SBOX x sbox_slice  ->  sbox_xor |
                                   +--------------------------------------------+
```

`top_cpa` wires these together. A two-flip-flop `reset_sync` brings the
external reset into the clock domain.

## Command byte

Each byte from the host is one command. Bits 7:5 hold the command code and
bits 4:0 the parameter (`cmd_byte_t` in `cpa_pkg`).

| code | command | parameter | answer |
|------|---------|-----------|--------|
| `000` | write LFSR bits 3:0 | seed in bits 3:0 | none |
| `001` | write LFSR bits 7:4 | seed in bits 3:0 | none |
| `010` | set the number of active S-boxes | p: copies 0..p switch (1 to 32) | none |
| `011` | run one measurement | ignored | one byte: the XOR result |
| `100`-`111` | reserved, ignored | - | none |

For example, seeding the LFSR with 0x1E takes two commands: `000_01110`
(0x0E) and then `001_00001` (0x21). Setting 32 active copies is `010_11111`
(0x5F), and a measurement is `011_00000` (0x60). The host has to wait for a
measurement's answer before it sends the next command. A setting command
takes a handful of clock cycles, so it can be followed at once.

## One measurement, cycle by cycle

This is the part that matters for trace quality. The S-boxes sit between two
registers and switch only inside the trigger window. `measure_fsm` runs the
states below, one clock cycle each. Cycle 0 is the first cycle after
`start`.

| cycle | state | what happens |
|-------|-------|--------------|
| 0 | `ENCRYP_DATA` | the current LFSR byte is registered onto `sbox_bits`; `trigger` is set |
| 1 | `SET_TRIGGER` | `trigger`=1. Each enabled copy's input register loads `sbox_bits` on this edge, and its S-box output then changes. |
| 2 | `MEASURE` | `trigger`=1, `en2`=1. The output registers load the S-box results; `trigger` is cleared. |
| 3 | `RESET_TRIGGER` | `trigger`=0. The XOR of the output registers is captured. |
| 4 | `DONE` | command done, result valid, the LFSR steps to the next plaintext |

So `trigger` is a clean registered pulse two cycles long. It covers the
load of the input registers, the combinational S-box evaluation and the load
of the output registers. Outside the window the input registers hold their
value, so the S-boxes do not toggle. The controller then moves to
`SEND_RESULT`. It holds `wr_req` with the result on `data_out` until the
transmitter acknowledges, and the byte goes out on `tx`. With 115200 baud
a command-to-answer round trip takes about 174 µs. Nearly all of that is
the two serial frames.

The first measurement after seeding uses the seeded value itself. Each
later measurement uses the next LFSR state.

## The S-box array and the XOR check

`sbox_logic` has `N_SBOX` copies of `sbox_slice`, made with a generate loop.
Each copy is an input register, the combinational `aes_sbox` and an output
register. Copy *i* loads only if `en[i]` is set. A disabled copy also clears
its output register. `sbox_xor` XORs all `N_SBOX` output bytes.

All active copies compute the same byte, so the XOR result depends on how
many copies are active:

* an **even** count gives `00`;
* an **odd** count gives `S(plaintext)`.

Any other value means a copy is broken. The host must compare the result
with the value expected for the active count. A result of zero alone is not
a pass.

`aes_sbox` is logic, not a 256-entry ROM. It computes the GF(2^8) inverse
(modulus x^8+x^4+x^3+x+1) as x^254 with a square-and-multiply chain, then
applies the AES affine map with constant 0x63. The functions live in
`cpa_pkg` (`gf_mul`, `sbox_f`), and synthesis flattens them into gates.

## Plaintext LFSR

`lfsr` shifts left and feeds bit 0 with `s7 ^ s6 ^ s5 ^ s2`. From the state
0x1E it produces

    1E 3D 7A F4 E8 D1 A2 44 ...

This is the sequence the platform is specified to produce. Other tap sets
give the same first eight states too; this one was picked because bit 7
feeds back, so every state lies on a cycle. The 256 states fall into four
cycles of 63, one cycle of 3 and the stuck state 00. A seed of 00 therefore
gives a constant plaintext, and any other seed repeats after at most 63
measurements. The reset state is 0x01.

## Serial link

`uart` pairs `uart_rx` and `uart_tx`, and each has its own `baud_gen`. The
frame format is 8N1, LSB first. `baud_gen` ticks at twice the baud rate
(divider `CLK_FREQ_HZ/(2*BAUD)`, rounded, which is 217 at 50 MHz and 115200
baud). Each bit lasts two ticks:

* **Receiver**: in `WAIT_UART` it watches for a falling edge. It restarts
  the divider on that edge and samples the middle of the start bit, of the
  8 data bits and of the stop bit (`READY`). In `DATA_OUT` it holds `rd_req`
  until `rd_ack`. There is no FIFO, so a frame that starts while a byte is
  still waiting is lost. In this system the controller takes each byte
  within a few cycles, so this happens only if the host sends a frame less
  than a stop-bit's time after the previous one. A start bit that has gone
  high again by its middle is treated as a glitch. A low stop bit drops the
  frame.
* **Transmitter**: in `WAIT_UART` the line is high. On `wr_req` it moves to
  `SEND_INIT`, which loads `{1, data, 0}` into a 10-bit shift register. It
  then enters `SEND_DATA` with a one-cycle `wr_ack` and shifts the register
  right with zero fill. When the register is all zeros the stop bit has
  gone out, and the machine returns to `WAIT_UART`.

Both hand-shakes are level-request / acknowledge. The requester holds its
request and data until it sees the acknowledge. Assertions in `uart_rx` and
`ctrl` check that the data stays stable.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `CLK_FREQ_HZ` | 50 000 000 | `top_cpa`, `uart*`, `baud_gen` | system clock. 50 MHz is the usual board clock; change it to match yours. |
| `BAUD` | 115 200 | same | serial rate |
| `N_SBOX` | 32 | `top_cpa`, `sbox_logic`, `sbox_xor` | number of S-box copies built, 1 to 32 |
| `STAGES` | 2 | `reset_sync` | reset synchroniser depth |

Enable bits above `N_SBOX-1` are ignored. With fewer copies built, a command
that asks for more activates all of them.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference models in `tb/tb_ref_pkg.sv`
are written independently of the RTL: an S-box found by searching for the
inverse, and the LFSR bit equation. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_top_cpa \
        -y rtl -y tb +libext+.sv rtl/cpa_pkg.sv tb/tb_ref_pkg.sv tb/tb_top_cpa.sv
    ./obj_dir/Vtb_top_cpa

`tb_top_cpa` runs the whole platform at its default parameters and acts as
the host on the serial lines. It covers seeding, S-box counts from 1 to 32
(odd and even), measurements checked against the plaintext sequence,
reserved codes, reseeding and a reset in mid-run. It counts each of these
mechanisms and fails if one never occurs. It also checks every trigger
pulse for its two-cycle width. It takes about 5 simulated milliseconds and a
few seconds of wall time.

`tb_cpa_workload` runs a small CPA experiment on the full platform. It seeds
the LFSR, enables one copy and runs 100 measurements. The Hamming weight of
each answer byte stands in for the measured current. For each of the 256
key guesses k, the testbench predicts HW(S(pt XOR k)) and counts how many
of the 100 predictions match. The true key (0, since the S-box input is the
plaintext) matches all 100. The best wrong guess matches 35. The run also
shows that the plaintext sequence repeats after 63 measurements. It then
repeats the measurements with all 32 copies, where every answer must be
zero.

The UART unit tests use 1 MHz / 50 kBd (20 clocks per bit) to keep them
short.

## Design choices to know about

These points are this implementation's own decisions. Check them before you
drive the design from an existing host script.

* **Command byte layout.** The code is in bits 7:5 and the parameter in bits
  4:0. The seed commands use only parameter bits 3:0.
* **S-box count.** It is a thermometer code, so parameter p enables p+1
  copies. This is what lets 5 bits reach 32 copies. After reset only copy 0
  is enabled.
* **LFSR.** The taps are as described above. The LFSR steps after each
  measurement.
* **Receive hand-shake names.** The receiver *offers* a byte with `rd_req`,
  and the controller takes it with `rd_ack`. The transmitter is the
  `wr_req`/`wr_ack` side.
* **XOR check.** It gives zero only for an even number of active copies (see
  above).
* **Reset.** `reset` is active high, asserts asynchronously and is released
  through two flip-flops. Everything else uses a synchronous reset.
* **Serial details.** The frame format is 8N1. There is a two-flip-flop
  synchroniser on `rx`, a glitch check on the start bit and a drop on a bad
  stop bit.
* **Number of copies.** The default of 32 copies matches the 32-bit enable
  vector. A smaller build on a small FPGA only needs `N_SBOX` changed.

Not part of the RTL: the host script that sends commands and stores the
results, the oscilloscope, and the FPGA board. `tb_top_cpa` plays the
host's role in simulation.
