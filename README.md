# Regaining synchronization in bit-serial stream ciphers

A synchronous stream cipher XORs each plaintext bit with one bit of a keystream. The
receiver produces the same keystream and XORs it again. This works only while both ends
agree on which keystream bit belongs to which line bit. If the channel drops a bit (a
*slip*) or adds one (an *insertion*), the receiver is off by one position from then on,
and everything it decrypts afterwards is garbage.

This repository holds synthesizable SystemVerilog for two ways to recover from that. It
follows a published hardware study of the two methods:

* **SCFB (statistical cipher feedback) around Grain-128.** Both ends watch the
  ciphertext for an 8-bit sync pattern, `10000000`. When it appears, both take the next
  96 ciphertext bits as a new IV and re-initialize Grain-128 with it. After that, both
  ends again produce the same keystream, whatever happened on the line before. Line
  efficiency is 100 %: every bit on the line is data.
* **Marker-based synchronization around a 128-bit LFSR.** The transmitter sends an
  8-bit marker (`10000000`) before every 128-bit ciphertext block. The receiver
  searches nine overlapping windows for the marker. Their positions show how many
  bits (up to 4) were lost or added, and the receiver shifts its block boundaries to
  match. Efficiency is 128/136 = 94 %.

Each method is built as a complete test system, like the one the study put on an FPGA
board. Each has:

* a transmitter and a receiver;
* a plaintext generator;
* a comparator that drives an LED;
* a parallel-port register interface for loading keys and IVs from a host.

`sync_ciphers_top` puts the two systems side by side. They share only the clock.

## Files

| rtl/ | role |
|---|---|
| `grain128_pkg` | Grain-128 sizes, feedback and output functions, FSR select codes |
| `ksg1`, `ksg2` | primary and setup Grain-128 generators |
| `scfb_pkg`, `scfb_counters`, `scfb_controller`, `scfb_datapath` | SCFB station parts |
| `scfb_encryptor`, `scfb_decryptor` | one SCFB station each (datapath + controller) |
| `scfb_enc_dec_system`, `scfb_board_top` | SCFB test system, with host registers |
| `lfsr128` | 128-bit LFSR (marker keystream, plaintext generators) |
| `marker_pkg`, `marker_detector_component`, `marker_detector` | marker search |
| `marker_encryptor`, `marker_decryptor` | marker transmitter and receiver |
| `marker_enc_dec_system`, `marker_board_top` | marker test system, with host registers |
| `host_interface` | EPP-style register file used by both board tops |
| `sync_ciphers_top` | both board tops side by side |

Every module has a self-checking testbench `tb/tb_<module>.sv`. The testbenches share
these helpers:

* `grain_ref_pkg`: a software Grain-128.
* `scfb_model_pkg`: a bit-accurate SCFB station.
* `marker_model_pkg`: a marker transmitter.
* `epp_host`: a host-port driver.

## Grain-128 generators

Both generators use the standard Grain-128 structure:

* a 128-bit LFSR `s` with feedback `s0+s7+s38+s70+s81+s96`;
* a 128-bit NFSR `b` whose feedback also adds `s0`;
* the output function `h` with the linear terms `b2,b15,b36,b45,b64,b73,b89,s93`.

Bit *i* of each state vector is `b_i` or `s_i`. A shift moves the vector toward bit 0
and writes the feedback into bit 127.

* Loading puts key bit *i* into `b_i` and IV bit *i* into `s_i`, with `s96..s127`
  set to 1.
* Initialization takes 256 clocks. During them the output bit is XORed into both
  feedbacks.
* The hex test vectors read with the most significant bit of the first hex digit as
  bit 0. With that convention, key 0 / IV 0 gives keystream
  `0fd9deefeb6fad437bf43fce35849cfe`.

**KSG1** produces the keystream. It has two extra pieces:

* A 128-bit load multiplexer for each register. It loads either key and IV, or the
  whole state of KSG2.
* A 1-bit gate that switches the output feedback on, for initialization mode, or off.

**KSG2** always runs in initialization mode. It never produces keystream. It only
prepares an initialized state for KSG1 to copy.

Select codes (`fsr_sel_e`): `00` load, `01` shift, `10` hold, `11` clear.

## SCFB: scanning, new IV, re-keying without a gap

The keystream never stops. While KSG2 initializes from the new IV, KSG1 goes on
encrypting with the old state. Then, in a single clock, KSG1 takes over KSG2's state.
This is why SCFB reaches 100 % efficiency with a stream cipher: no line time is spent
on setup once the link is running.

One SCFB station is `scfb_datapath` plus `scfb_controller`. Its parts:

* KSG1 and KSG2.
* The XOR.
* An output multiplexer. It sends a constant 1 before the first setup has finished.
* An 8-bit sync-pattern window.
* A 96-bit new-IV register.

The datapath has a `DECRYPT` parameter. It decides which bit goes into the window:

* in the encryptor, the ciphertext the station produces;
* in the decryptor, the ciphertext it receives.

So both ends scan the same bit stream.

### Controller states and timing

| state | clocks | what happens |
|---|---|---|
| INIT | until flag = `FF` | generators and window cleared, line sends 1, init LED on |
| Load_PC | 1 | KSG1 loads key/IV, KSG2 loads the key, plaintext generator loads its IV |
| Shift_KSG1 | 256 | KSG1 initialization; line still 1, LED still on |
| CTGen | until pattern | ciphertext sent and scanned for `10000000` |
| NewIVCollect | 96 | the next 96 ciphertext bits fill the new-IV register; scanning off |
| Load_NewIV | 1 | KSG2 loads key and new IV |
| Shift_KSG2 | 256 | KSG2 initializes; KSG1 still encrypts with the old state |
| Load_KSG2 | 1 | KSG1 copies KSG2's state, back to CTGen |

Exact timing:

* From the first CTGen clock on, one data bit goes over the line every clock, in every
  state.
* The pattern is sent MSB first, and the window shifts in at its LSB. So a match means
  the window together with the current ciphertext bit equals `8'h80`.
* A match counts only after 8 bits have entered the window since CTGen began. The
  window is cleared outside CTGen, so a pattern can never straddle the IV or setup
  bits.
* The first new-IV bit is the bit right after the pattern. It becomes `IV_0`.
* The clock in Load_KSG2 still uses the old keystream. From the next clock on,
  keystream comes from (key, new IV).
* So one resynchronization takes 1 + 96 + 1 + 256 + 1 clocks after the pattern.

**Recovery after a slip or insertion.** The receiver's scanner sees the ciphertext
with the slip in it, and so does everything after it. The next sync pattern that both
ends recognize starts a re-keying from the same 96 bits at both ends. After it, the
outputs agree again. A pattern can also be seen by only one end. That happens when it
overlaps the disturbed bits, or when one end is busy collecting an IV. Then both ends
run out of step until a later pattern is seen at both ends. The testbenches show
recovery after a start offset of 2 bits, a slip, an insertion and a 2-bit slip.

### SCFB test system (`scfb_enc_dec_system`, `scfb_board_top`)

* The plaintext generator is an `lfsr128`. It is held during setup and steps once per
  clock afterwards.
* The comparator LED is `pltout == dout_re`, the same clock at both ends. That is
  right for the board's zero-delay loopback from `tx_o` to `rx_i`.
* The line is brought out as `tx_o`/`rx_i`, so a channel can be placed between them.

Host registers, one byte each:

| address | content |
|---|---|
| 0-15 | key |
| 16-27 | KSG1 IV (96 bits) |
| 28-43 | plaintext-generator IV |
| 44 | flag; writing `FF` starts |

Register 0 holds vector bits 0-7, with bit 0 in its MSB. So the hex strings of the test
vectors are written byte by byte in their printed order.

## Marker-based cipher

### Line format and transmitter (`marker_encryptor`)

Controller states: INIT → LOAD → IDLE → MARKER → CIPHER → MARKER → … Their roles:

* INIT waits for the flag.
* LOAD loads the keystream LFSR and the plaintext LFSR from the host IVs.
* IDLE sends 1s until the start button.
* After that the line repeats a 136-clock cycle: 8 marker bits, then 128 ciphertext
  bits.

Marker bits leave from a rotating register, bit 0 first. Both LFSRs step once per
ciphertext bit.

### Receiver (`marker_decryptor`, `marker_detector`)

Every received bit enters a 140-bit data register at bit 139 and moves toward bit 0,
one place per clock. The register's bits are used as follows:

* Bits 139..132 are watched while idle. The first marker there starts reception.
* Bits 15..0 hold nine overlapping windows. Window *j* (1..9) is bits *j*+6 down to
  *j*−1.
* Bit 0 is XORed with the keystream.

The 140 bits are 128 + 8 + 4. When a block has just been received, the marker that
came before it is still in the register, with 4 bits of margin on each side:

* With no slip, the marker sits in window 5, bits 11..4.
* Each lost bit moves it one window down.
* Each added bit moves it one window up.

At the first clock of each marker phase, each `marker_detector_component` checks its
window:

* If the window holds the marker, its counter goes up by one.
* Otherwise the counter holds.
* The counter saturates at `COUNT_MAX`. This is a parameter of `marker_decryptor` and
  `marker_detector`, with default `MK_COUNT_MAX = 2`, the source's choice.

At the next clock, `marker_detector` decides:

* Exactly one counter at `COUNT_MAX`: that window is the marker position. The marker
  phase takes MSNum = window + 3 bits instead of 8 (table below), which moves the block
  boundary by the detected amount.
* Any counter at `COUNT_MAX`: all counters are cleared, even when two reached it at
  once. That ambiguous case gives no decision.

| window | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| cause | 4 lost | 3 lost | 2 lost | 1 lost | none | 1 added | 2 added | 3 added | 4 added |
| MSNum | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |

Because `COUNT_MAX = 2`, a new position is taken only after the marker is seen there
in two cycles. A single ciphertext block that happens to contain `10000000` near a
window therefore does not move the boundary. Even an undisturbed link shows a "window
5" decision every second cycle.

**Keeping the keystream aligned.** Each bit carries a one-bit tag (1 = ciphertext)
through a second 140-bit register. The tag is set by the controller state in which
the bit arrived. When a tagged bit reaches bit 0:

* the keystream LFSR steps;
* `pt_o` is valid.

Every cycle tags exactly 128 bits, so the receiver's keystream advances 128 steps per
cycle, just like the transmitter's. The effect of a channel event depends on where it
falls:

* In a ciphertext block: that block and the next one or two are wrong. The marker is
  then found off centre, and after the boundary moves the blocks decrypt correctly.
* In a marker: it only delays detection.

Decrypted bits leave 140 clocks after they arrive.

### Marker test system (`marker_enc_dec_system`, `marker_board_top`)

* The comparator uses a receiver-side copy of the plaintext LFSR, loaded with the same
  IV. It steps once per decrypted bit. So it also works through a channel delay. The
  LED is registered and starts on.

Host registers:

| address | content |
|---|---|
| 0-15 | keystream IV |
| 16-31 | plaintext IV |
| 32 | marker, written as `0x80` for `10000000` |
| 33 | flag |

## Host interface (`host_interface`)

The interface holds an 8-bit address register and `NUM_REGS` data registers. It
follows the Digilent EPP pattern:

* `astb`/`dstb` are active low. `pwr` = 1 means read.
* All three pass through two-flop synchronizers.
* After each transfer the interface raises `pwait`. It drops `pwait` once the host has
  released the strobe.
* The bidirectional data bus is split into `pdb_i`, `pdb_o` and `pdb_oe`. Pads go
  outside the design.
* Unused addresses read as 0.
* The reset button clears every register, the flag included.

## Where this design departs from or adds to its source

* **Output function.** The list of Grain-128 output-function variables was taken from
  the Grain-128 definition, including the `s60` term. It reproduces both published
  test vectors.
* **KSG1 IV width.** Some block diagrams label the KSG1 IV as 128 bits. The IV is
  96 bits, padded with 32 ones, as the register counts and the cipher require.
* **Init LED.** One description lights it in INIT and Shift_KSG1 only. Here it is also
  lit in Load_PC, matching the output-forcing rule.
* **Clock split of setup.** The split into one-clock load states, and the exact
  placement of the match and of the first IV bit, are this design's choice.
* **MSNum.** The original board fixed MSNum at 8, because it never injected slips. Here
  MSNum follows the window table, as in the original's simulations.
* **Tag register.** It is this design's way of counting ciphertext bits at the XOR.
* **Register maps.** The register maps, the byte order, the host handshake, the start
  button of the marker system and the receiver-side comparator reference are all
  assumptions.
* **LFSR clear.** `lfsr128` keeps an asynchronous clear port, because the source
  specifies one. All users tie it low and clear with select code `11`, which keeps
  every reset synchronous.
* **Sync pattern parameters.** `SP_N` and `SP_PATTERN` are parameters of
  `scfb_encryptor`, `scfb_decryptor` and `scfb_datapath`. `scfb_controller` takes
  `SP_N` only. The defaults are `SYNC_N = 8` and `10000000`, and the board top uses
  them. Other sizes and formats of the source's sync pattern study can be built.
* **Marker receiver parameters.** `COUNT_MAX` and `MARKER` are parameters of
  `marker_decryptor` and `marker_detector`. Their defaults are `MK_COUNT_MAX = 2` and
  `MK_MARKER` (`10000000`). So the `COUNT_MAX` values 1, 2, 5, 10 and 20 and the three
  markers that the source compares can all be built. The marker-system transmitter
  takes its marker from a host register. The board top uses the defaults.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/grain128_pkg.sv rtl/scfb_pkg.sv rtl/marker_pkg.sv \
  tb/grain_ref_pkg.sv tb/scfb_model_pkg.sv tb/marker_model_pkg.sv \
  tb/tb_sync_ciphers_top.sv --top-module tb_sync_ciphers_top -o sim
./obj_dir/sim
```

Use the same line for any other `tb_<module>`. The testbenches:

* **`tb_sync_ciphers_top`** runs both systems at full size. The SCFB system goes
  through an error-free phase, then one inserted bit, then one dropped bit. The marker
  system goes through +3, −2, +2 and −3 bits. The testbench counts setups, sync
  patterns, KSG2 reloads, recoveries and early, centre and late marker decisions. It
  fails if any of them never happened.
* **`tb_ksg1`** checks both Grain-128 test vectors.
* **`tb_scfb_encryptor` and `tb_scfb_decryptor`** compare every clock with a software
  station.
* **`tb_marker_decryptor`** applies every slip and insertion size from 1 to 4. It
  checks the decided window, the block-wise plaintext and the 140-clock latency.
* **`tb_scfb_srd`** runs ten SCFB station pairs, one for each pair of sync pattern size
  (n = 4, 6, 8, 10 or 12) and format (`100...00` or `111...11`). The channels share
  the same slip and insertion events. The test checks that every pair recovers and
  that the mean recovery delay grows with n for `100...00`. It also checks that at
  n = 12, `100...00` is faster than `111...11`. Typical means are about 630, 650, 780,
  1130 and 3480 bits for `100...00`. For `111...11` they are about 590, 680, 740,
  1960 and 8600 bits. The source studied an AES-based SCFB, so only the trends are
  compared. Error propagation with bit errors is not measured.
* **`tb_marker_srd`** runs fifteen receivers, one for each pair of `COUNT_MAX` (1, 2, 5,
  10 or 20) and marker (`10000000`, `01111111` or `11111111`). Every channel applies
  the same events: 1 to 4 bits dropped or inserted every 40 cycles, with no bit
  errors. For each receiver it prints the mean recovery delay: the clocks from an event
  to the last wrong plaintext bit, including the 140-clock latency. It checks that
  receivers for the first two markers with `COUNT_MAX` ≥ 2 recover, and that the delay does not fall as
  `COUNT_MAX` rises from 2. It also checks two marker findings of the source: the
  complementary markers give the same delay, and `11111111` is slower than `10000000`.
  For `10000000` the means are about 350, 480, 890, 1570 and 2930 bits. For
  `11111111` at `COUNT_MAX = 2` the mean is about 720 bits.
  The source reports about 200 at `COUNT_MAX = 2`. It finds `COUNT_MAX = 1` worst,
  because of bit errors and multiple-window sightings. A channel without bit errors
  does not reproduce that penalty.

## Limits

* **Exercised as built.** The board tops use only the 8-bit sync pattern `10000000`,
  B = 96, `COUNT_MAX = 2` and the marker `10000000`. Other values are exercised only
  in `tb_scfb_srd` and `tb_marker_srd`.
* **Traffic length.** Simulations cover about 10⁴–10⁵ line bits per test, not the
  10¹⁰-bit statistical runs behind the published resynchronization-delay figures.
* **Clock rate.** Speed on an FPGA has not been measured. Both designs move one bit per
  clock.
* **Channel events.** At most one channel event is applied per few cycles. Events
  closer together than the recovery time are not tested.
