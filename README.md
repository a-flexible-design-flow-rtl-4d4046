# Digital block of a passive UHF RFID tag

A passive RFID tag has no battery. It draws its power from the reader's
915 MHz carrier and answers by changing how its antenna reflects that
carrier (backscatter). The analog front end rectifies the carrier, recovers
the reader's amplitude-modulated (ASK) data as a logic level, provides a
640 kHz clock and a power-on reset, and drives the backscatter modulator. The
digital block in this repository does everything in between. It decodes the
reader's command, checks it, executes it on a small EEPROM, and encodes the
answer.

The architecture follows the tag described in *A Flexible Design Flow for a
Low Power RFID Tag*. That design's central idea is that the command set is
chosen per application. Commands an application does not need are left out of
the control logic, which saves area and energy. Here that choice is the
`CMD_SET` parameter.

Of the ISO 18000-6B command set, this RTL implements the two commands that
define the published reduced configuration:

* `READ`: return one byte of the memory.
* `WRITE4BYTE`: write four bytes.

The other 26 commands of the complete tag are not included, and neither is
its collision arbitration (see *Limits*).

## Block structure

```
 demod_in ──► decoder ──► control ◄──► mem_ctrl ◄──► eeprom ◄── charge_pump
 (ASK data)   Manchester    │   ▲        byte/word     512 bit    programming
              40/160 kb/s   │   └──► crc16 (shared)    8x4x16     voltage
                            ▼
                         encoder ──► bs_out, bs_active (to backscatter modulator)
                         FM0
```

| module | role | flip-flop bits |
|---|---|---|
| `rfid_digital_top` | wires the blocks; the only module you need to instantiate | 281 |
| `decoder` | 2-FF synchroniser, Manchester decoding, frame start/end | 18 |
| `control` | frame buffer, CRC check, command dispatch, response builder | 144 |
| `crc16` | bit-serial CRC-16, used for checking and for generating | 16 |
| `mem_ctrl` | byte/word translation, address checks, write sequencing with the charge pump | 58 |
| `encoder` | FM0 line coder for the answer | 9 |
| `eeprom` | behavioural model of the 512-bit EEPROM macro (32 words of 16 bits) | 29 + 512 memory |
| `charge_pump` | behavioural model of the programming-voltage pump | 7 |
| `rfid_pkg` | command codes, status codes, frame lengths, CRC constants | – |

The flip-flop counts are from a generic synthesis of the default configuration.

### Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk` | in | 640 kHz clock from the local oscillator |
| `rst_n` | in | active-low asynchronous reset from the power-on reset |
| `rate_160k` | in | link rate: 0 = 40 kbit/s, 1 = 160 kbit/s (both directions) |
| `demod_in` | in | ASK demodulator output, asynchronous, idles high |
| `bs_out` | out | FM0 level for the backscatter modulator, 0 when idle |
| `bs_active` | out | high while an answer is being sent |
| `crc_error` | out | 1-cycle pulse: a frame was dropped for a bad CRC |
| `cmd_done` | out | 1-cycle pulse: a command finished, its answer starts now |

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `CMD_SET` | `2'b11` | bit 0 builds `READ`, bit 1 builds `WRITE4BYTE` |
| `CLK_HZ` | 640000 | clock frequency; sets the clocks per half bit |
| `EE_WORDS`, `EE_WORD_W` | 32, 16 | EEPROM organisation (8 rows × 4 words × 16 bits = 512 bits) |
| `EE_PROG_CYCLES` | 64 | EEPROM word programming time in clocks (model) |
| `PUMP_RAMP_CYCLES` | 32 | charge-pump start-up time in clocks (model) |

## The air interface as implemented

The original design fixes the coding, the rates and the clock:

* Manchester coding from reader to tag, FM0 coding from tag to reader.
* 40 or 160 kbit/s from the reader, with a 640 kHz tag clock.
* A CRC-16 on every packet.

It does not fix the framing around them. The framing below is this design's
own choice. Change it in `decoder` and `encoder` if you connect the block to a
real reader.

### Reader to tag (decoder)

The line is first passed through two flip-flops, because it is asynchronous to
the tag clock. A half bit is 8 clocks at 40 kbit/s and 2 clocks at
160 kbit/s.

```
idle (high) ≥ 2 bit times │ delimiter: low for 2 bit times │ bit │ bit │ … │ high (no mid-bit edge) = end
```

* **Start delimiter.** The line idles high. After at least two bit times of
  idle, a falling edge starts the delimiter. The delimiter must stay low for
  two bit times, which valid Manchester data can never do. The decoder checks
  the delimiter in the middle of its second and fourth half bits. A shorter
  low pulse is thrown away and the decoder waits for idle again.
* **Bits.** Each half bit is sampled in its middle. A bit is 1 when high is
  followed by low, and 0 when low is followed by high.
* **Drift at 40 kbit/s.** At 40 kbit/s the decoder re-aligns its bit counter to
  each mid-bit transition that arrives within ±2 clocks of its expected place.
  This absorbs small differences between the reader's rate and the tag clock.
  At 160 kbit/s a half bit is only 2 clocks, so there is no room to re-align.
* **End of frame.** The first bit time with no mid-bit transition ends the
  frame. The reader simply returns the line to idle.
* **Outputs and timing.** The outputs are 1-cycle pulses: `sof`, then
  `bit_valid` with `bit_data` for each bit, then `eof`. `sof` comes
  4·half + 3 clocks after the delimiter's falling edge reaches the pin. After
  that, there is one `bit_valid` per bit time.

### Tag to reader (encoder)

FM0 inverts the line at the start of every bit. A 0 gets an extra inversion in
the middle of the bit, so a 1 holds one level for the whole bit and a 0 shows
two levels. The line rests at 0, so the first bit always begins with a rising
edge. The answer uses the same rate as the command.

The control module hands bits over with a valid/ready handshake. The encoder
takes a new bit only at a bit boundary, so the next bit must be offered within
one bit time. The control logic needs only one clock per bit. If no bit is
offered before `tx_last`, an assertion fires.

### Frames

All fields are sent most significant bit first.

| frame | layout | bits |
|---|---|---|
| READ command | `0C` · ADDR(8) · CRC(16) | 32 |
| WRITE4BYTE command | `1B` · ADDR(8) · DATA(32) · CRC(16) | 64 |
| READ answer | STATUS(8) · DATA(8) · CRC(16) | 32 |
| WRITE4BYTE answer | STATUS(8) · CRC(16) | 24 |

* STATUS is `00` for success and `FF` for an error. DATA is `00` after an
  error.
* The command codes are those of ISO 18000-6B.
* Unlike ISO 18000-6B, frames carry no 64-bit tag ID. Every tag in the field
  answers.

## CRC-16 and how one unit serves both directions

`crc16` is a 16-bit LFSR for x¹⁶ + x¹² + x⁵ + 1, preset to `FFFF`. It shifts in
one bit per enabled clock. This is the ISO 18000-6B CRC, and the 16 flip-flops
match the CRC module of the original tag. The transmitter appends the inverted
register, MSB first. As a result, running the CRC over a complete good frame,
CRC included, always leaves the constant `1D0F`, and the receiver only compares
against that constant.

The tag is half duplex, so a single unit is enough:

1. **`sof`.** `control` presets the CRC.
2. **Receiving.** Every received bit is shifted in. At `eof`, a residue other
   than `1D0F` drops the frame and pulses `crc_error`. The whole frame is
   discarded and nothing is answered.
3. **Answer starts.** When the memory operation is done, `control` presets the
   CRC again.
4. **Sending.** Every STATUS/DATA bit is shifted in at the moment the encoder
   takes it.
5. **CRC field.** One idle clock later, the inverted register is loaded into
   the transmit shifter and sent as the last 16 bits.

## Command execution (control and mem_ctrl)

`control` stores the received bits in a 64-bit buffer, so the first bit lands
in bit 63. A frame that runs past 64 bits is dropped silently. After the CRC
check, the command is executed if two conditions hold:

* its code is enabled in `CMD_SET`;
* the frame has exactly that command's length.

Anything else, such as an unknown code, a disabled command or the wrong
length, is ignored without an answer. Frames that arrive while a command is
executing or its answer is being sent are ignored too.

`mem_ctrl` maps byte addresses onto the word array.

* **Address map.** A byte address 0–63 is `{word[4:0], byte}`. The word address
  is `{row[2:0], column[1:0]}`, and byte 0 of a word is its upper half.
* **READ.** Reads the word and returns the byte. It takes 3 clocks from request
  to done.
* **WRITE4BYTE.** The address must be a multiple of 4.
  1. Turn the charge pump on and wait until it reports programming voltage.
  2. Program the first word and wait while the EEPROM is busy.
  3. Program the second word and wait again.
  4. Turn the pump off.

  With the default model timings, a write therefore takes about
  32 + 2·(64 + 2) clocks.
* **Errors.** A READ from address 64 or above, and a WRITE4BYTE that is
  misaligned or out of range, end with the error status. They leave the memory
  untouched.

### Choosing the command set

Each `CMD_SET` bit is a constant. A disabled command's decode, its memory path
and its answer format are therefore removed by ordinary constant propagation.
Adding a command means four steps:

1. Add its code to `rfid_pkg`.
2. Add a `CMD_SET` bit for it.
3. Add a match term like `is_read` in `control`.
4. Add its memory operation in `mem_ctrl` and its answer in the `C_MEM` state.

## EEPROM and charge pump models

The EEPROM and the charge pump are analog or process-specific parts. Both are
modelled only as far as the digital block sees them. The models are
synthesizable, so the top can be synthesised as a whole, but in a chip they
are replaced by the real macros.

* **`eeprom`:** synchronous read, available the clock after `re`.
  * A `we` programs the word only if `hv_ok` is high. `busy` is then high for
    `PROG_CYCLES` clocks.
  * A `we` while busy, or without voltage, is ignored.
  * Initial content: byte *n* holds *n*, so reads before any write are
    predictable.
* **`charge_pump`:** `hv_ok` rises `RAMP_CYCLES` clocks after `en` rises, and
  falls the clock after `en` falls.

The programming time, ramp time, read latency and initial content are
placeholders. Set them from the real macros.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rfid_pkg.sv tb/rfid_tb_pkg.sv \
    --top-module tb_rfid_digital_top tb/tb_rfid_digital_top.sv -o sim
./obj_dir/sim
```

Replace the top module and file for the other benches:

| testbench | what it checks |
|---|---|
| `tb_crc16` | check value of "123456789" (`29B1`), random messages against a reference, residue of good and corrupted frames |
| `tb_decoder` | random frames at both rates, bit timing, `sof` latency, ±1-clock jitter at 40 kbit/s, rejection of a short low pulse |
| `tb_encoder` | clock-by-clock FM0 waveform against a reference, frame length, rest level |
| `tb_mem_ctrl` | random reads/writes against a shadow memory, error cases, read latency, write duration, pump only on during writes |
| `tb_control` | full and READ-only tags side by side: answers bit for bit including CRC, CRC-error discard, unknown command, wrong length, overlong frame |
| `tb_eeprom`, `tb_charge_pump` | the two models' timing and content rules |
| `tb_rfid_digital_top` | end to end at default parameters: a reader model sends Manchester frames and decodes the FM0 answers at both rates. It also counts that every mechanism occurred: reads, writes, error answers, CRC discard, unknown and overlong frames, and writes waiting for the pump and programming. |
| `tb_rfid_massive` | a 10,000-command random session at default parameters against a reference memory, then a full read-back (about 11 million clocks, a few seconds) |

`tb/rfid_tb_pkg.sv` is not a testbench. It holds the independent CRC
reference function that several benches use.

## Limits and departures from the original tag

* **Command set.** Only `READ` and `WRITE4BYTE` exist. The complete tag
  supports 28 ISO 18000-6B commands plus proprietary ones, and arbitrates
  between colliding tags. None of that is described in enough detail to build
  here. There is therefore no tag-ID field, no tag state machine
  (ready/ID/data-exchange) and no anti-collision.
* **Framing.** The framing is this design's own: polarity, delimiter, end of
  frame, the FM0 rest level, no return preamble, and the status byte. It is
  consistent end to end, but it is not the ISO 18000-6B preamble and
  delimiter. A real reader needs those.
* **Rate selection.** The rate is a pin (`rate_160k`). The original does not
  say how the tag chooses it. The answer is sent at the command's rate, and
  there is no turnaround delay between command and answer.
* **Reset.** The reset goes to every block. The original architecture shows the
  power-on reset wired to the control module.
* **Test module.** The original tag has a small test module (about 120 cells,
  2 flip-flops) whose function is not described. It is not included.
* **Size.** The original 28-command tag has 545 flip-flops. This two-command
  block has 281, including the model registers. Its decoder (18 against 48),
  memory control (58 against 125) and control module (144 against 340) are
  smaller. Part of that difference is the missing commands. The rest is
  unknown internal detail of the original.
* **Analog parts are not included.** These are the rectifier, regulator,
  references, power-on reset, local oscillator, ASK demodulator, backscatter
  modulator and antenna pads. Their digital-facing signals are the top's
  ports.
