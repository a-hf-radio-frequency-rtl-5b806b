# HF RFID tag digital controller

This is the digital core of a passive 13.56 MHz RFID tag that speaks the
ISO/IEC 15693 / ISO/IEC 18000-3 air interface. It has a 2-kbit EEPROM of
32-bit blocks with per-block locking, a 64-bit UID and EAS (electronic article
surveillance). It adds two features to the standard command set:

- the request decoder corrects the timing errors that the analog demodulator
  adds to every reader pause, so that they do not build up over a long frame;
- four custom commands split the memory into areas guarded by keys. They run
  a challenge-response authentication and then protect reads and writes with
  a CRC signed by the session key.

Everything is synchronous to the 13.56 MHz clock recovered from the field.
The design is written in SystemVerilog and can be synthesised. The only part
that is not synthesisable is a behavioural model of the EEPROM array and its
high-voltage driver.

## Structure

```
 carrier_i ─► clk_gen ─► data_process ──────────► data_flow ─────► mem_ctrl ─► eeprom_ctrl ─► eeprom_array
 por_n ────► reset_gen    ├ ppm_decoder  (request)    │  ▲   (requests,  (boot load,   (erase / program /  (behavioural)
                          ├ crc16                     │  │    locks)      lock check)   read sequencing)
 mod_o ◄───────────────── └ manchester_enc ◄──────────┘  │
                                            (response)   rng48, external secure function (sf_* ports)
```

| Module | Role |
|---|---|
| `rfid_tag_top` | Wires all blocks together. The analog and secure-function signals are its ports. |
| `reset_gen` | Turns the power-good input into a reset that is released in step with the clock. |
| `clk_gen` | Makes the sample enable (clk/4). It also makes the receive enable, which stops during reader pauses. |
| `data_process` | Turns the air interface into bytes. It holds the request buffer and the CRC check, and sends the response. It does not look at what the bytes mean. |
| `ppm_decoder` | Detects 1/4 and 1/256 pulse-position coding and applies the timing self-correction. |
| `crc16` | The ISO/IEC 13239 CRC, one byte per clock. |
| `manchester_enc` | Load modulation: Manchester coding on one or two subcarriers, at the high or low data rate. |
| `data_flow` | Interprets commands. It holds the tag states, the slots, authentication, access rights and the response builder. |
| `rng48` | 48-bit random numbers for authentication. |
| `mem_ctrl` | Runs the memory protocol. It loads the configuration at boot and refuses writes to locked blocks. |
| `eeprom_ctrl` | Runs the pump, pulse and sense steps of the EEPROM. |
| `eeprom_array` | Behavioural model of the 64 × 32-bit array and its analog driver. |
| `rfid_pkg` | The command codes, flags, memory map, access-rule functions and CRC step shared by the modules. |

Three parts sit outside this RTL:

- the analog front end (antenna, rectifier, demodulator, modulator and clock recovery);
- the key-dependent functions TF, RF and the CRC signature;
- the authentication of the two 96-bit master keys, whose protocol is not specified.

## Clocking and reset

`clk` is the carrier clock, 13.56 MHz. The detector works on a sample enable
at one clock in four, 3.39 MHz. This gives 32 samples per 9.44 µs reader
pause, which we call one *unit*. A lower sample rate would save more power
but would make detection errors more likely.

A passive tag loses its clock while the reader pauses the carrier. The RTL
models this directly: `ce_rx = ce_sample & carrier_i`, and the detection
counter advances only on `ce_rx`.

`reset_gen` clears the reset as soon as `por_n` falls, without waiting for
the clock. When `por_n` rises again, the release passes through a two-flop
synchroniser and is then held for a further 16 clocks. The whole controller
leaves reset on the same clock edge.

## Request detection: pulse-position decoding with self-correction

This is the most delicate part of the design. It lives in `ppm_decoder`.

### Coding

The reader sends a value as the position of a single 9.44 µs carrier pause
within a *detection period*.

- In 1/4 coding a period carries 2 bits. It has 4 slots of 18.88 µs, so
  it lasts 75.52 µs.
- In 1/256 coding a period carries 8 bits. It has 256 slots, so it lasts
  4.833 ms.
- The pause always lies in the second half of its slot.

A request looks like this:

- **SOF**: a pause, then 28.32 µs (1/256) or 47.2 µs (1/4) of carrier,
  then a pause and one unit of carrier. The gap tells the two codings apart.
  It is checked to within ±16 samples.
- **Data**: one period per symbol. In 1/4 coding the least significant bit
  pair comes first.
- **EOF**: a pause in the second half of the first slot, followed by
  silence.

### The counter

The detection counter is 14 bits wide. It has two parts:

- a 5-bit *unit* part, which counts the 32 samples of one modulation time;
- a 9-bit *half-data* part, which counts half slots.

The counter stops during the pause itself. So one period takes 64·N − 32
counted steps, where N is the number of slots: 224 steps for 1/4 and
16352 steps for 1/256.

The symbol is read from the counter at the *rising* edge of the pause, when
the carrier returns:

- `slot = (cnt − 16) >> 6`
- If bit 5 of `cnt − 16` is set, the pause fell in the first half of a slot,
  which is a timing failure.
- So is a second pause in the same period.

The symbol is first held in a buffer. It is passed on only at the end of the
period.

### Why correction is needed

The demodulator delays the falling edge of each pause by up to 8 clock cycles
and the rising edge by up to 6. That is up to 14 cycles, about 11 % of a
128-cycle unit, on every pause. A tag that restarted its count on every edge
would carry these errors from one period to the next. One period would then
come out short, and once the accumulated error passed a unit, a symbol would
be decoded in the wrong slot.

### How the correction works

The counter is *not* realigned at the pulse edge. Instead:

1. At the rising edge, the unit part of `cnt − 16` is the phase error *d*.
   Ideally it is 0. It is read as a signed value from −16 to +15 samples, so
   at most half a unit, 4.72 µs.
2. At the end of the period, when the next period starts, *d* is applied:
   - if the counter ran ahead (d > 0), it is held at 0 for d steps;
   - if it lagged (d < 0), it starts at |d| instead of 0.

The next period therefore starts lined up with the reader's actual pulse,
and the error does not build up. Each correction that is not zero is
reported on `ev_corr`.

### The last-slot case

Suppose the reader sends the last slot (0xFF in 1/256, 3 in 1/4) and the tag
counter is slightly ahead. The tag's period then ends *before* that pause is
over. The pause appears to fall in the next period, and the finished period
appears to hold no pulse at all.

A status bit, `pend`, marks a period that ended without a pulse. If a pause
ends within the first 16 steps of the following period, it is not counted as
a symbol of that period. Instead it completes the previous one:

- the buffered value becomes the last-slot value;
- the counter is set back to the pause edge;
- `ev_late` pulses.

If the 16 steps pass quietly instead, the request has ended. The symbol
still in the buffer must be 0, which is the EOF pause. Symbols are passed on
one step behind, so the EOF is never delivered as data.

As a result, a request is complete about two detection periods after its
EOF pause begins. `frame_end` then pulses.

## CRC

Requests and responses carry the ISO/IEC 13239 CRC16:

- reflected polynomial 0x8408, preset 0xFFFF;
- the result is complemented and sent low byte first.

`data_process` feeds each byte into `crc16` two bytes late, so that at the
end of a frame the register covers everything except the received CRC field.
It hands both the computed and the received CRC to `data_flow`. The data flow
then checks either the plain CRC or a signed one, depending on the command.

## Response modulation

`manchester_enc` produces the load modulation `mod_o` directly as a
subcarrier:

| Setting | Chip |
|---|---|
| One subcarrier | 423.75 kHz (clk/32) during a modulated chip, off otherwise |
| Two subcarriers | 423.75 kHz, or 484.28 kHz (clk/28) for the unmodulated chip, 252 clk |
| High rate | a chip is 256 clk, so a bit is 37.76 µs (26.48 kbit/s) |
| Low rate | every chip is four times longer (6.62 kbit/s) |

The bit and frame patterns, with M a modulated and U an unmodulated chip,
are:

- logic 0 = M U;
- logic 1 = U M;
- SOF = U U U M M M U M;
- EOF = M U M M M U U U.

Bits are sent least significant first.

The response uses the subcarrier mode and data rate asked for in the request
flags. It starts `T1_CYCLES` = 4352 clk (320.9 µs) after the request is
complete. A write is answered once the write has finished.

## Command handling

`data_flow` receives the request buffer from `data_process`.

**Dropped requests.** A request is dropped without an answer for any of
these reasons:

- a timing failure;
- a CRC error;
- a command that is not supported;
- a request addressed to another UID;
- a request with the select flag when the tag is not selected.

Each of these is reported on `ev_drop`.

**Supported commands:**

| Code | Command | Notes |
|---|---|---|
| 0x01 | Inventory | One or 16 slots. Matches on AFI and mask. Also serves as the EAS alarm inventory (below). |
| 0x02 | Stay quiet | Addressed. The tag goes to QUIET. |
| 0x25 | Select | The tag goes to SELECTED. |
| 0x26 | Reset to ready | The tag goes to READY. |
| 0x21 | Write block | Erase then program one 32-bit block. |
| 0x22 | Lock block | Sets the block's lock bit, which is itself kept in the EEPROM. |
| 0x23 | Read multiple blocks | Up to 8 blocks. With the option flag, each block is preceded by its lock status. |
| 0x27 | Write AFI | Also sets or resets EAS. |
| 0xF0 | Authentication 1 | Custom (below). |
| 0xF1 | Authentication 2 | Custom (below). |
| 0xF2 | Write secure | Custom, signed CRC. |
| 0xF3 | Read multiple secure | Custom, signed CRC. |

**Error answers.** An error answer has flag byte 1 and one of these codes:

| Code | Meaning |
|---|---|
| 0x10 | No such block, or too many blocks |
| 0x12 | Block or AFI locked |
| 0x0F | No access right, or authentication failed |

**16-slot inventory.** The tag's slot is the four UID bits that follow the
mask. Each empty request from the reader (SOF followed directly by EOF) is a
*slot marker* and advances the slot counter. The tag answers in its own slot
only.

**EAS.** EAS is coded in the AFI:

- Writing the AFI value `EAS_AFI` (0xEA) sets EAS, which shows on
  `eas_armed`.
- Writing any other AFI value resets it.
- An inventory that carries the AFI flag and the value `EAS_AFI` is the EAS
  alarm inventory. Only tags with EAS set answer it.

## Authentication

Authentication is a challenge-response exchange in which both sides prove
they hold the same key. The key is never sent.

1. **Authentication 1** (0xF0, data = key index). The index selects the key:
   0 is the super key, 1 to 3 are user keys 0 to 2.
   - The tag reads the chosen 48-bit key from the EEPROM.
   - It takes a 48-bit random number TRN from `rng48`.
   - It answers with TRN.
2. The reader picks its own random number RRN. It computes TF(TRN, RRN, key)
   and RF(TRN, RRN, key).
3. **Authentication 2** (0xF1, data = RRN followed by TF, 6 bytes each).
   - The tag puts TRN, RRN and the key on `sf_trn`, `sf_rrn` and `sf_key`.
     The external secure function returns TF′ on `sf_tf` and RF′ on `sf_rf`.
   - If TF = TF′, the tag grants the key's access level (`auth_level`) and
     answers with RF′.
   - Otherwise it clears all rights and answers error 0x0F.
4. The reader compares RF′ with its own RF. This convinces the reader that
   the tag is genuine.

**Secure reads and writes.** Write secure and Read multiple secure work like
the standard write and read, with two differences:

- They are checked against the granted level.
- Their CRC is *signed* in both directions. The plain CRC goes out on
  `sf_crc` and the signed value comes back on `sf_sig`. A secure command
  whose CRC is not correctly signed is dropped.

Authentication 1 and 2 themselves use the plain CRC, because no key has been
agreed yet.

The random generator is a free-running 48-bit LFSR (taps 48, 47, 21, 20).
Edges of the demodulated field are folded into it, so its state depends on
when the reader's requests arrive.

The secure function must be combinational. The tag reads its results one
clock after it drives the inputs.

## Memory map and access rights

The 2-kbit EEPROM holds 64 blocks of 32 bits:

| Blocks | Contents |
|---|---|
| 0–1 | UID (block 0 = low word) |
| 2 | AFI [7:0], DSFID [15:8], AFI lock [16] |
| 3–4 | Lock bits of blocks 0–31 and 32–63 |
| 6–13 | Super key, user keys 0, 1, 2 (48 bits each, two blocks per key) |
| 14–19 | Reserved for the two 96-bit master keys |
| 20–27, 28–35, 36–43 | User areas 0, 1, 2 |
| 44–63 | Free user space |

Access depends on the command and the level granted:

| Access | Read | Write |
|---|---|---|
| Free (standard commands, no authentication) | UID and configuration (0–4), free space (44–63) | Free space |
| Super key (secure commands) | 0–4 and 20–63 | 20–63, and it may replace the keys (6–13) |
| User key *k* (secure commands) | User area *k*, plus the free access | User area *k*, plus the free access |

A locked block can never be written again. This is how a region is made
write-once.

The rules are the functions `can_read` and `can_write` in `rfid_pkg`. The
map is a set of localparams in the same package. Changing the map means
editing those localparams only.

## Memory controller and EEPROM

**Boot.** After reset, `mem_ctrl` reads blocks 0–4 and keeps UID, AFI, DSFID
and the lock bits in registers. It then raises `boot_done`. Until then,
`data_flow` ignores requests.

**Requests.** A memory request (`mem_req`: write enable, block, data) is held
until `ack`. The controller handles it as follows:

- A write to a locked block returns `err` and does not touch the array.
- Any other write is an erase followed by a program. The register copies
  are updated at the same time.

**EEPROM sequencing.** `eeprom_ctrl` runs each operation as a fixed
sequence:

- Erase and program: enable the pump, wait for `hv_ok`, apply the
  erase/program pulse for `T_PULSE` (1 ms), then switch the pump off.
- Read: raise `read_en` and wait `T_SENSE` clocks.

**The array model.** The behavioural `eeprom_array` models the timing:

- the pump needs `HV_RAMP` (100 µs) to come up;
- erase and program only take effect if the pulse was long enough and the
  pump was up;
- erase clears a row and program sets ones.

It also carries the factory contents (UID and keys) as parameters.

A write therefore takes about 2.2 ms.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `clk` | in | 13.56 MHz carrier clock |
| `por_n` | in | Power good from the rectifier |
| `carrier_i` | in | Demodulated field (0 during a reader pause) |
| `mod_o` | out | Load modulation (subcarrier) |
| `sf_key`, `sf_trn`, `sf_rrn`, `sf_crc` | out | Inputs of the external secure function |
| `sf_tf`, `sf_rf`, `sf_sig` | in | Its results: TF′, RF′, the signed CRC |
| `tag_state` | out | 0 ready, 1 quiet, 2 selected |
| `auth_level` | out | 0 none, 1 super, 2–4 user key 0–2 |
| `eas_armed` | out | EAS set |
| `ev_rx_err`, `ev_corr`, `ev_late`, `ev_resp`, `ev_drop` | out | One-clock event strobes for monitoring |
| `rx_mode256` | out | Coding of the last request |

**Top parameters:**

| Parameter | Default |
|---|---|
| `INIT_UID` | 64'hE004_0100_1234_5678 |
| `T_PULSE` | 13560 clk |
| `HV_RAMP` | 1356 clk |
| `T1_CYCLES` | 4352 clk |

## Choices made here

The overall architecture is fixed: the split into data process, data flow
and memory controller, the 14-bit split counter, correction at the end of
the period, the last-slot status bit, the command codes and the TF/RF
exchange.

The following were chosen in this implementation:

- **Frame length in 1/256 coding: 16352 counted steps.** This follows the
  same 64·N − 32 rule as the 224 steps of 1/4 coding. Sometimes 16288 is
  quoted instead, which would be 64·255 − 32.
- **Memory size: 2 kbit.** The EEPROM is 64 blocks of 32 bits. A 2-kbyte
  figure also circulates for this tag; it would need a wider block address.
- **Correction rule.** The correction is generalised to any phase error of
  up to ±16 samples, rather than the two values 0x00 / 0x1E.
- **SOF and EOF.** Their exact patterns, and the decision that a request
  ends one quiet half unit into the period after the EOF, come from
  ISO/IEC 15693-2.
- **Custom commands.** The frame layouts of the four custom commands, the
  48-bit key width, and the use of the signed CRC on 0xF2 / 0xF3 only.
- **Memory map and access rules.** The map and rules above, and EAS coded as
  AFI = 0xEA.
- **Timing values.** The reply delay (the ISO/IEC 15693 t1), the EEPROM
  timings, the buffer sizes (32-byte request, 48-byte response) and the
  8-block read limit.
- **Failed requests.** Unsupported commands and failed requests are dropped
  silently.

The following are *not* implemented:

- master-key authentication, whose protocol is unspecified;
- the TF, RF and signature functions, which are external ports;
- the standard commands not listed in the table above (for example Lock
  AFI). The AFI lock bit in block 2 is honoured, but it can only be set when
  the tag is programmed at manufacture.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The RTL also carries concurrent assertions. They check:

- the memory request handshake, where a request is held unchanged until it
  is acknowledged;
- the EEPROM pulse rules: one pulse kind at a time, only with the pump up,
  never while sensing, and a stable row and data during a pulse;
- that a response is only started when the modulator is free.

Simulate with `--assert` to enable them.

**`tb/rfid_reader.sv`** is a reader model used by the data-process and
top-level tests. It:

- codes requests in either coding;
- adds random edge delays, up to 32 clk on the falling edge and 24 on the
  rising edge. This is four times the front end's specified 8 and 6 clk, as
  a margin;
- sends slot markers;
- decodes the tag's subcarrier response back into bytes.

**`tb_ppm_decoder`** checks the decoder across many random frames in both
codings. It includes phase-error sequences that trigger the correction and
the last-slot recovery.

**`tb_rfid_tag_top`** runs the complete tag with every parameter at its
default: real EEPROM times and the real reply delay. It covers:

- boot, inventories, 16-slot anti-collision and the tag states;
- 1/256 requests, low-rate and two-subcarrier responses;
- write, lock and read;
- EAS, and authentication with a secure write and read;
- dropped and broken requests.

It checks every response's content, CRC and start time. It also counts each
mechanism and fails if any mechanism never happened: phase correction,
late-slot recovery, drops, timing failures, both codings, both subcarrier
modes, both rates, 16-slot answer, authentication, EEPROM write and EAS.
It runs in a few seconds.

To run a testbench with Verilator, put the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rfid_tag_top \
  rtl/rfid_pkg.sv $(ls rtl/*.sv | grep -v rfid_pkg) tb/rfid_reader.sv tb/tb_rfid_tag_top.sv
./obj_dir/Vtb_rfid_tag_top
```

Block testbenches only need the package, their module and its submodules.
For example, for the decoder:
`rtl/rfid_pkg.sv rtl/ppm_decoder.sv tb/tb_ppm_decoder.sv`.

**Known lint messages:**

- Verilator reports unconnected `busy`/`done` outputs that the top does not
  need.
- It reports package constants that only some modules use.
