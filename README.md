# Self-testing, optionally encrypting sensor node core

A wireless sensor node spends its life sampling a handful of sensors and
radioing the readings away, usually unattended and often somewhere hostile.
Two things then matter beyond the sampling itself: knowing that the node's
own acquisition chain still works, and keeping the data private on the air.
This core does both in hardware, without a microcontroller:

* every operation begins with a **self test** of the ADC (three known voltages
  on each of the eight channels) and, in secured mode, of the **AES-128
  crypto processor** (a known-answer test);
* the eight channel readings are packed into a **10-byte packet** whose last
  byte carries three status flags: self test failed, some reading abnormal,
  secured mode;
* in secured mode the data bytes are **encrypted**; every frame gets a
  **CRC-16**; the frame leaves **serially** on one pin.

A 12-state controller sequences all of this. Operations start either from a
timer (automatic mode) or from a handshake edge (manual mode).

## Block structure

```
             auto_manual  handshake
                  |          |
             +----v----------v----+
             |   selection_unit   |  enable / ack
             +---------+----------+
                       |
             +---------v----------+      +----------------+
             |    control_unit    |----->|  testing_unit  |--+
             |  (12-state Mealy)  |      +----------------+  | borrows ADC
             +--+------+------+---+                          | and AES during
                |      |      |                              | SELF_TEST
   ADC <--------+      |      +--------------+               |
 (off chip)     v      v                     v               |
       +-------------------+   +----------+  +-----------+   |
       | data_process_unit |<->| aes_core |  | ecc_crc16 |   |
       | samples, packet,  |   | (aes_sbox|  +-----------+   |
       | frame assembly    |   |   x 20)  |                  |
       +---------+---------+   +----------+                  |
                 v                                           |
            +----------+                                     |
            | tx_unit  |--> data_out, data_out_en, tx_completed
            +----------+
```

| File | Role |
|---|---|
| `rtl/wsn_pkg.sv` | packet layout constants, ADC reference and state enums, self-test vector |
| `rtl/wsn_node.sv` | top: wiring, and the multiplexers that lend the ADC and AES core to the self test |
| `rtl/selection_unit.sv` | automatic (timer) / manual (handshake edge) start request |
| `rtl/control_unit.sv` | the 12-state main controller |
| `rtl/testing_unit.sv` | ADC and crypto self test |
| `rtl/data_process_unit.sv` | sample registers, threshold check, packet, plaintext, frame |
| `rtl/aes_core.sv`, `rtl/aes_sbox.sv` | iterative AES-128 encryptor, multiplexer S-box |
| `rtl/ecc_crc16.sv` | byte-serial CRC-16 |
| `rtl/tx_unit.sv` | serialiser for the Data Out pin |

The ADC and the sensors are analog parts outside this core. `tb/adc_model.sv`
is a behavioural model of an ADC with the input switch the self test needs.

## One operation, state by state

The controller has twelve states and Mealy outputs: most strobes are issued
in the same cycle as the input that causes them.

| State | What happens | Leaves to |
|---|---|---|
| `IDLE` | waits for `enable` from the selection unit; on it: ack, clear the packet, latch `secured`, start the self test | `SELF_TEST` |
| `SELF_TEST` | the testing unit owns the ADC and the AES core; at its `done` the result is written to the F bit | `TX` if it failed, else `SENSE` |
| `SENSE` | `adc_en` pulse for the current channel, ADC input switched to the sensor | `SENSE_W` |
| `SENSE_W` | waits for `adc_done`, stores the byte | `CHECK` |
| `CHECK` | is the stored reading above `THRESHOLD`? | `SET_BIT` or `NEXT` |
| `SET_BIT` | sets the N/AB bit | `NEXT` |
| `NEXT` | next channel, or done after channel 7 | `SENSE` or `CHK_SEC` |
| `CHK_SEC` | secured: start AES on packet bytes 0..8; unsecured: skip it | `CRYPTO` or `CRC` |
| `CRYPTO` | waits for the AES core (11 cycles) | `CRC` |
| `CRC` | feeds the frame body through the CRC, one byte per clock, and starts the transmitter on the last byte | `TX` |
| `TX` | waits for the transmitter | `TX_DONE` |
| `TX_DONE` | `tx_completed` pulse | `IDLE` |

A failed self test goes straight to `TX`: the node sends its packet with the
F bit set and no data, and **no CRC**, then returns to idle. The next enable
tests again, so a node that recovers resumes normal frames by itself.

## The self test

For each channel 0..7 in turn, the testing unit switches the ADC input (the
`adc_ref` output) to full scale, then to half scale, then to ground, converts,
and compares the result `Yb` with the stored value `Ya` (255, 128, 0):

    pass  <=>  |Ya - Yb| < TOL        (TOL = 4 LSB by default)

The first failing reading stops the test; the channel is reported on
`fail_ch`. If all 24 readings pass and the node is in secured mode, the AES
core encrypts the FIPS-197 Appendix C.1 plaintext under its key and the result
must equal the published ciphertext exactly (`fail_crypto` otherwise). In
unsecured mode the crypto processor is not used, so it is not tested.

Duration: each reading takes `C + 2` cycles, where `C` is the ADC's
start-to-done time; the test takes `24*(C+2)` cycles, plus 12 for the crypto
test.

## Packet and frame

The packet is little-endian, byte 0 first:

| Byte | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| Content | ch0 | ch1 | ch2 | ch3 | reserved (user) | ch4 | ch5 | ch6 | ch7 | status |

Status byte: bit 7 = F (self test failed), bit 6 = N/AB (at least one reading
above the threshold), bit 5 = S/NS (secured mode), bits 4..0 = 0.

What goes on the wire depends on the outcome:

| Case | Frame (byte 0 first) | Bytes |
|---|---|---|
| unsecured | packet bytes 0..9, CRC[7:0], CRC[15:8] | 12 |
| secured | AES(packet bytes 0..8, seven zero bytes), status byte, CRC[7:0], CRC[15:8] | 19 |
| self test failed | packet bytes 0..9 (channel bytes zero, F = 1) | 10 |

In secured mode the status byte travels in clear after the 16-byte
ciphertext, so a receiver can tell a secured frame from the S/NS bit before it
decrypts. The CRC covers everything before it, including the ciphertext.

## Crypto processor

`aes_core` is an AES-128 encryptor that computes one round per clock: it
loads `pt ^ key` on `start`, runs rounds 1..10 with the key schedule expanded
on the fly, and pulses `done` 11 cycles after `start`, with `ct` held until
the next start. SubBytes uses sixteen instances of `aes_sbox`, and the key
schedule four more. `aes_sbox` is the S-box written as a 256-way case
statement, so it becomes a multiplexer tree, or look-up tables on an FPGA.

The operating key is the top parameter `NODE_KEY`. It defaults to the
FIPS-197 Appendix B example key, so **change it for any real use**.

## CRC

`ecc_crc16` uses generator 0x1021 (x^16 + x^12 + x^5 + 1), preset 0xFFFF,
MSB first, no reflection and no final XOR (the "CCITT-FALSE" variant, check
value 0x29B1 for "123456789"). It folds one byte per clock. It is sent low
byte first. A receiver that recomputes the CRC over the body and compares it
with the two trailing bytes detects transmission errors. Nothing is
corrected.

## Pins and timing

| Pin | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `auto_manual` | in | 1 = automatic (every `SAMPLE_PERIOD` clocks), 0 = manual |
| `handshake` | in | manual mode: a rising edge requests one operation |
| `secured` | in | 1 = encrypt; sampled when an operation starts |
| `adc_data[7:0]`, `adc_done` | in | conversion result and its completion strobe |
| `adc_sel[2:0]` | out | ADC channel |
| `adc_en` | out | one-cycle conversion start |
| `adc_ref[1:0]` | out | ADC input switch: 0 sensor, 1 full scale, 2 half scale, 3 ground |
| `data_out`, `data_out_en` | out | serial frame, LSB of byte 0 first, one bit per clock while `data_out_en` = 1 |
| `tx_completed` | out | one-cycle pulse after the last bit |
| `fail_ch[2:0]`, `fail_crypto` | out | detail of the last self-test failure |

With an ADC that takes `C` cycles per conversion, one unsecured operation
takes about `24*(C+2)` cycles of self test, `8*(C+4)` cycles of acquisition
(plus one per abnormal channel), 10 cycles of CRC and 96 cycles of
transmission. Secured mode adds 12 cycles of crypto self test and 11 of
encryption, and sends 152 bits instead of 96.

Requests that arrive while an operation runs are merged into one pending
request. In automatic mode a `SAMPLE_PERIOD` shorter than an operation simply
makes the node run back to back.

## Parameters (top)

| Parameter | Default | Meaning |
|---|---|---|
| `SAMPLE_PERIOD` | 1000 | clocks between automatic requests (a design choice) |
| `THRESHOLD` | 100 | readings above this set N/AB |
| `TEST_TOL` | 4 | self-test tolerance in LSB (a design choice) |
| `NODE_KEY` | FIPS-197 App. B key | AES-128 operating key |

The reserved packet byte is `USER_BYTE` of `data_process_unit` (default 0).
The self-test stored values are parameters of `testing_unit`.

## How far to trust it, and where it is this design's own

The following follow the node's description: the overall flow (self test,
acquire and check each sensor, optional encryption, redundancy code,
transmit), the three self-test voltages and their order, the tolerance rule,
the crypto known-answer test, the packet layout and status bits, the
threshold of 100, the 12-state Mealy controller, and the pins auto/manual,
secured, clock, reset, ADC data, Data Out, Tx completed, 3-bit ADC select,
ADC enable and handshake.

The following are this design's choices, because the description leaves them
open:
* the automatic-mode timer and the edge-triggered handshake;
* `adc_done`, `adc_ref`, `data_out_en` and the `fail_*` outputs;
* stopping the self test at the first failure, the stored values and the
  tolerance;
* AES-128 with one round per clock, the test vector and the default key;
* the choice of encrypted bytes, the zero padding and the clear status byte;
* the CRC-16 polynomial, preset and byte order, and serial LSB-first output;
* a fault frame without CRC, which follows the controller's state diagram.

Not built:
* the crypto processor's "random round selection", which is named but not
  described;
* decryption, which the node does not need;
* the ADC and the sensors, which are analog.

The design was checked by simulation only. It has not been synthesised for
an FPGA and has not been timed.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_wsn_node.sv` runs the whole node at
its default parameters against the ADC model. It covers manual and automatic
operations, secured and unsecured, readings on both sides of the threshold,
a broken ADC channel, and an AES result corrupted (by `force`) during the
self test. It rebuilds every frame from the serial pin and
compares it with one computed independently: the AES reference model in
`tb/aes_ref_pkg.sv` derives the S-box from its definition, not from the
design's table.

```
verilator --binary --timing --assert --top-module tb_wsn_node \
    -y rtl -y tb +libext+.sv rtl/wsn_pkg.sv tb/aes_ref_pkg.sv tb/tb_wsn_node.sv
./obj_dir/Vtb_wsn_node
```

Replace `tb_wsn_node` with `tb_aes_core`, `tb_testing_unit`, `tb_control_unit`
and so on to run a single block. Every testbench finishes in well under a
second.
