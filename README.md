# A serial-line Keccak hash device as a power-analysis target

This is a small FPGA design that turns a board into a hash coprocessor on a
serial line. The host sends one 128-byte block, the device runs the
Keccak-f[1600] permutation on it and sends back 32 bytes. It was built to be
attacked: the host prepends a secret 320-bit key to each message (MAC-Keccak,
`MAC(K, M) = H(K || M)`). An oscilloscope records the core supply current
while the device hashes. The first Keccak round mixes the key bytes directly
with known message bytes, so the power drawn in that round depends on the key.

The hardware is kept deliberately plain and unprotected:

* one Keccak round per clock, with no masking or other countermeasure;
* a trigger pin (`trig_bit`) that pulses when hashing starts and a second one
  (`stop_bit`) that pulses when it ends;
* a second, identical hash block that gets the same input and whose outputs
  go nowhere. It exists only to double the switching current.

Key handling and padding are the host's job. The device hashes whatever
128 bytes arrive.

## What the device computes

The sponge uses rate r = 1024 bits and capacity c = 576 bits. For each
received block `B` (bytes `B[0]..B[127]` in line order), the device:

1. sets the 1600-bit state to zero;
2. XORs `B` into the first 16 lanes. Byte `k` becomes byte `k mod 8`
   (least significant first) of lane `k/8`, and lane `i` is `(x, y) = (i mod 5, i / 5)`;
3. applies the 24 rounds of Keccak-f[1600];
4. sends back the first 4 lanes as 32 bytes, in the same byte order.

This is one absorb followed by a 256-bit squeeze. For MAC-Keccak, the host
builds the block as the 40-byte key, then the message, then Keccak `10*1`
padding, all inside 128 bytes. For example, the byte `01` goes after the
message and the last byte is ORed with `80`.

A quick self-test uses SHA3-512 of the empty string. Its padded block (`06`,
zeros, `80` at byte 71) fits in one 1024-bit block. So sending that block
followed by zeros must return the first 32 bytes of the published digest,
`a69f73cc a23a9ac5 c8b567dc 185a756e 97c98216 4fe25859 e0d1dcc1 475c80a6`.

## Serial protocol

* The line runs at 115200 baud, 8 data bits, no parity, 1 stop bit, LSB first.
  The clock is 18.432 MHz and the UART oversamples 16x, so one bit is
  160 clocks.
* After reset the device sends one byte, `0x20`, so the host can tell that the
  device has come up.
* After that the exchange repeats forever: the host sends 128 bytes, then the
  device answers with 32 bytes. The device has no commands, length field or
  flow control.

## Block structure

```
             +-------------------------- keccak_main ------------------------------+
 res_in ---> | res_sync --nres--> (all blocks)                                      |
             |                                                                     |
             |            control_stm  (start_*/done_* handshakes, conv enables)   |
             |                 |                |                 |                |
 rx -------> | rs232_stm --rs_dout[128][8]--> converter --sha3_din[16][64]--> sha3_stm --> trig_bit, stop_bit
 tx <------- |  (uart)  <--rs_din[32][8]----            <--sha3_dout[4][64]--  (keccak_core)
             |                                                 \--> sha3_stm (dummy, outputs open)
             +---------------------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/keccak_pkg.sv` | lane, state and message types; rho offsets and round constants, computed by constant functions from their defining recurrences |
| `rtl/keccak_round.sv` | one combinational round: theta (parity plane, then column mixing), rho, pi, chi, iota |
| `rtl/keccak_core.sv` | input buffer, 1600-bit state register, round counter, output squeeze |
| `rtl/sha3_stm.sv` | state machine that feeds the core and collects the result; drives the trigger pins |
| `rtl/uart.sv` | 8N1 UART with strobe/ack byte handshakes |
| `rtl/rs232_stm.sv` | sends the reset byte, receives 128 bytes, sends 32 bytes |
| `rtl/converter.sv` | byte array to lane array and back, registered |
| `rtl/control_stm.sv` | six-state ring that sequences the phases |
| `rtl/res_sync.sv` | turns the asynchronous reset button into the low-active `nres` |
| `rtl/keccak_main.sv` | top level |

The 100 MHz to 18.432 MHz clock manager is not part of the RTL. It is a vendor
PLL/MMCM primitive, and 18.432 MHz is not an integer fraction of 100 MHz.
Generate that clock with your FPGA's clocking resources and feed it to `clk`.

## The control ring

`control_stm` goes around six states and never leaves that loop:

`init` -> `rs_receive` -> `conv_r2k` -> `dokeccak` -> `conv_k2r` -> `rs_transceive` -> `init`

* In the three working states, the machine holds a `start_*` level until the
  matching block answers with `done_*`.
* The two conversion states last one cycle each. In each one, `converter`
  latches its output.
* `rs232_stm` holds `done_recv` high until it is told to transmit.
  `sha3_stm` and the transmit path answer with one-cycle `done` pulses.

## How a hash is fed through the core

This is the part with the most timing detail.

`sha3_stm` and `keccak_core` talk over an interface with four core-side
signals:

* `buffer_full`: high while a loaded block is waiting to be absorbed;
* `last_block`: input to the core, saying that no further block follows;
* `ready_n`: low-active, goes low when the last permutation is done;
* `dout_valid_n`: low-active, low while `dout` holds an output lane.

`ready_n` and `dout_valid_n` are low-active because the controlling state
machine waits for them to be `0`.

The cycle count below starts at the cycle in which `sha3_stm` sees
`start_kec`:

| cycle | what happens |
|---|---|
| 0 | `trig_bit` pulses, the core's `start` clears its state and buffer, and the lane counters are preset |
| 1-16 | `din_array[15]` down to `din_array[0]` enter the core buffer, one lane per cycle. `din_array[15]` is lane 0 |
| 17 | `buffer_full` is high for this one cycle. The core XORs the buffer into the state and computes round 1 on the result in the same cycle (the "round 1" input multiplexer), so the buffer is free again |
| 18-40 | rounds 2 to 24. `sha3_stm` raises `last_block` meanwhile |
| 41 | `ready_n` falls |
| 42-45 | lanes 0-3 appear on `dout` with `dout_valid_n` low. They are stored in `dout_array[3]` down to `dout_array[0]` |
| 45 | `done_kec` and `stop_bit` pulse |

Cycle 17 is the one an attack targets. There, the output of the theta parity
plane switches from 0 to the parity of the key-and-message columns. At
18.432 MHz and 500 MS/s, that cycle lies about 17 x 27 = 459 samples after the
trigger edge, and the stop pulse about 1215 samples after it. The core can
also absorb several blocks: if `last_block` is not given, it waits for the
next 16 lanes after each permutation. The top level always sends exactly one
block.

## Byte and lane ordering

The serial blocks index their arrays from the top down. The first byte on the
line is `rs_dout[127]`, and the first byte sent back is `rs_din[31]`. The
hash block works the same way: it feeds `sha3_din[15]` first and stores the
first output lane in `sha3_dout[3]`. `converter` reconciles these orders with
Keccak's little-endian lanes. The result is that the line carries the
standard Keccak byte string in both directions.

## Trust and departures

What the tests show:

* Every block has a self-checking testbench.
* The round function, the core, the hash block and the full device are
  compared against an independent reference model of Keccak-f[1600] in
  `tb/keccak_ref_pkg.sv`. That model uses the literal published tables,
  whereas the RTL computes its constants.
* They are also compared against the SHA3-512 empty-string digest and the
  published lanes of Keccak-f[1600] applied to the zero state.
* The full device is tested end to end over its serial pins at the real clock
  and baud rate. The test includes a reset in the middle of a transfer.

The control, serial and hash state machines use the states, outputs and
transitions of the original design. The following points are this
implementation's own, or differ from a literal reading of the original:

* **Keccak core insides.** The original used an existing high-speed Keccak
  core, and only its interface signals are known. This core is a minimal
  one-round-per-cycle implementation of that interface. The timing of its
  output phase is a choice: one announce cycle, then four lanes on consecutive
  cycles.
* **Theta.** The column mixing uses the standard Keccak rotation:
  `parity[x+1]` rotated by one, so bit `z` takes `parity[x+1][z-1]`.
* **UART.** The original used a third-party UART. This one is written from
  scratch with the same handshake signal names. `data_in_ack` comes after the
  stop bit has been sent.
* **Reset byte.** The reset byte is `0x20`, the ASCII space, as in the
  original state diagram.
* **Byte counters.** They are preset to the index of the first byte (127 and
  31) and tested for zero before they are decremented. That way exactly 128
  and 32 bytes are moved.
* **State-machine outputs.** All outputs are decoded combinationally from the
  state, not registered. `trig_bit` and `stop_bit` are therefore one-cycle
  pulses straight from decode logic. Register them if the pins must be
  glitch-free.
* **Reset input.** The `res_in` pin is assumed high-active. `nres` is asserted
  asynchronously and released after two clock edges.
* **Dummy hash block.** It carries a `dont_touch` attribute. Without it,
  synthesis would remove the block because its outputs are unused. Other tools
  need their own equivalent.

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop on their own,
with a watchdog that fails them if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/keccak_pkg.sv tb/keccak_ref_pkg.sv tb/tb_keccak_main.sv \
    --top-module tb_keccak_main -Mdir obj_main -o sim
./obj_main/sim
```

Substitute any of `tb_keccak_round`, `tb_keccak_core`, `tb_sha3_stm`,
`tb_uart`, `tb_rs232_stm`, `tb_converter`, `tb_control_stm` or
`tb_res_sync`.

`tb_keccak_main` runs the top at its default parameters: 18.432 MHz and
115200 baud and takes about fifteen seconds. In order, it sends:

* the SHA3-512 self-test block;
* three MAC-Keccak blocks, each made of the key `A0..AF 20..2F C0..C7`, an
  80-byte random message and padding;
* a MAC-Keccak block cut off by a reset after 50 bytes;
* one more MAC-Keccak block after that reset, sent three times in a row, as
  when traces of one message are averaged.

For each complete block it prints the Hamming weight of the first eight bits
of parity column x = 0. That is the first-round quantity a power model
correlates with the first key byte.

To change the line speed, override `CLK_HZ` and `BAUD` on `keccak_main`. The
UART divides by `CLK_HZ / (BAUD * 16)`, so choose a clock that is an integer
multiple of 16 x baud.
