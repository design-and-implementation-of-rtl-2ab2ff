# Automatic flywheel for PN frame synchronization

A ground station receiving IRS remote-sensing satellite data finds each
frame by correlating the serial bit stream against a 127-bit PN sync code
(a 2^7 − 1 sequence). After that the housekeeping, auxiliary and video data
are cut out relative to that sync. The video data is effectively random, so
now and then it holds a stretch that looks like the sync code. A correlator
that searches all the time then reports a false sync, and every pixel after
it is misplaced.

The flywheel fixes this by using what the receiver already knows: frames
repeat with a fixed length. Once it has seen the sync three times in a row,
it lets the correlator look only inside a short window
around the place where the next sync must appear. It keeps frame timing
going ("flywheels") when a sync is missed. It declares loss of lock only
after three syncs in a row have failed to appear. The frame length is not
configured: the circuit measures it from the incoming syncs, so one unit
serves every satellite format (2400-byte frames up to 128-Kbyte frames). It
relearns the length whenever lock is lost.

The RTL runs on the serial bit clock: one clock cycle is one received bit,
and every count below is in bits.

## The window

This is the core of the design. All timing is relative to the **FS pulse**.
The correlator raises it for one clock, in the bit after the last bit of the
sync code. While locked, a down counter loaded with *L − 1* at each FS (*L*
is the frame length) reaches zero exactly where the next FS pulse is due.
That zero is the **terminal count (TC)**.

```
bits before the expected FS:   148 ... 139 138 137 ........ 10 ... 1   0   -1 ... -10
frame counter (down)                   138                             0 (TC, reload L-1)
decoder pulse                           ^
fs_ctrl_o (1 = search disabled) ‾‾‾‾‾‾‾‾‾‾|________________________________|‾‾‾‾‾‾‾‾‾
                                          |<-10->|<------ 128-bit slot ---->|
sync code on the line                            [~~~~~~~ 127 bits ~~~~~~~]
FS pulse (sync found on time)                                              ^
NFS pulse (no sync found)                                                          ^ (+10)
```

* **Opening.** A decoder watches the frame counter. When the count is 138
  it gives the *decoder pulse*. That clears the control flip-flop, and the
  correlator is enabled from the next bit on. That leaves 10 guard bits
  before the 128-bit slot in which the 127-bit code is expected.
* **Closing on a sync.** The FS pulse sets the control flip-flop, which
  disables the correlator again. It also reloads the frame counter. An FS
  that comes up to 10 bits early (a bit slip) is still inside the window and
  simply realigns the frame timing.
* **No sync.** The decoder pulse also starts a 148-bit window counter
  (10 + 128 + 10). If no FS has cleared it by the end, its terminal count is
  the *NFS* (no frame sync) pulse, 10 bits after the expected FS position.
  The frame counter's own terminal count has already reloaded the frame
  timing at the expected position, so `frame_o` still marks every frame.
* **Before and after lock.** The control flip-flop is set through a 2:1
  multiplexer selected by the lock signal. Unlocked, only FS sets it. A
  missed sync then leaves the window open until a sync turns up, so the
  circuit keeps searching. Locked, FS OR NFS sets it. The window then closes
  on schedule even when the sync is missing, so a false pattern in the video
  data after a missed sync is still masked.

## Lock and loss of lock

`fs_lock_logic` holds two run counters. FS pulses advance the FS run and
clear the NFS run; NFS pulses do the opposite. The third FS in a row sets
the lock flip-flop at the clock edge that ends that FS cycle. The third NFS
in a row clears it. A single missed sync between good ones only restarts the
NFS run, so lock survives one or two lost syncs, and drops on the third.

## Learning the frame length

`auto_frame_length_prog` turns the frame counter into a measuring
instrument until the length is known:

1. **Search (unprogrammed).** The counter counts *up*. Every FS loads it with
   0. The decoder is disabled, the control output is held at "enabled", so
   the correlator searches everywhere. A divide-by-3 counter counts FS
   pulses.
2. **Third FS.** Just before the third FS the counter holds the spacing of
   the second and third syncs minus one, i.e. *L − 1*. In that clock the
   value is copied into the frame length latch and the counter keeps it as
   its reload value. The program flip-flop is set, which switches the counter
   to down count and enables the decoder. The program flip-flop also opens an
   AND gate that passes FS on to the window and NFS logic. The lock logic
   reaches its third FS in the same clock, so lock and programming start
   together.
3. **Flywheel.** The counter reloads from the latch on FS OR TC. The
   divide-by-3 counter is stopped.
4. **Relearn.** When lock falls, a pulse synchronizer turns the falling edge
   into a one-clock pulse. That pulse clears the program flip-flop, the latch
   and the divide-by-3 counter, and the circuit is back at step 1. This is how
   the receiver follows a change of satellite or format without being told.

The first frame after lock is not yet masked. The control flip-flop is only
set by FS pulses that pass the AND gate, i.e. from the fourth sync on.

## Blocks

| module | role |
|---|---|
| `flywheel_top` | wires the blocks below; the interface to the correlator |
| `fs_lock_logic` | successive-three FS / NFS counters and lock flip-flop |
| `frame_length_counter` | 20-bit up/down counter with parallel load; `frame_o` = FS OR TC |
| `flywheel_decoder` | decoder pulse at count 138 (enabled once programmed) |
| `nfs_generator` | window flip-flop and 148-bit counter giving the NFS pulse |
| `fs_control_gen` | lock-selected multiplexer and control flip-flop giving `fs_ctrl_o` |
| `auto_frame_length_prog` | divide-by-3 counter, latch, program flip-flop, FS gate |
| `pulse_sync` | falling-edge pulse of the lock signal (inside the programming logic) |
| `flywheel_pkg` | shared constants: 127, 128, 10, 148, 138, 20, 3 |

Signal flow: `fs_i` → lock logic, frame counter, programming logic. The
programming logic passes the gated FS → NFS generator and control generator.
Frame counter → decoder → NFS generator and control generator. NFS → lock
logic and control generator. Lock → control multiplexer and programming
logic (relearn).

### Top-level interface (`flywheel_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock; asynchronous active-low reset |
| `fs_i` | in | 1 | FS pulse from the correlator, one clock, in the bit after the last sync bit |
| `fs_ctrl_o` | out | 1 | to the correlator: 1 = detection disabled |
| `fs_lock_o` | out | 1 | frame sync lock |
| `nfs_o` | out | 1 | no-frame-sync pulse, 10 bits after a missed sync |
| `frame_o` | out | 1 | frame timing pulse (FS OR TC), the reference for data extraction |
| `tc_o` | out | 1 | terminal count alone (the flywheel's own prediction) |
| `frame_len_o` | out | 20 | learned frame length minus one; 0 while unprogrammed |
| `prog_o` | out | 1 | a frame length is programmed |
| `win_o` | out | 1 | NFS window counter running |
| `count_o` | out | 20 | frame counter |

Parameters: `FL_W` (20), `DEC_LEAD` (138), `WIN_BITS` (148), `LOCK_RUN` (3).
`FL_W` = 20 covers frames up to 2^20 bits (128 Kbytes). Frames must be longer
than the window (more than 148 bits), which every real format is.

## What is taken as given, and what is chosen here

Taken from the design as published: the three-in-a-row lock and unlock
rule; the frame counter with parallel load and TC-OR-FS reload; the
NOR/AND decoder that opens the window 10 bits ahead of the sync; the
148-bit window (10 + 128 + 10) and the NFS pulse at its end; the
lock-selected multiplexer (FS, or FS + NFS) that sets the control
flip-flop, which the decoder pulse clears; and the up/down counter, latch,
divide-by-3 counter, program flip-flop and falling-edge pulse of the
automatic length programming.

Chosen here:

* **Widths and exact cycle alignment.** These include the 20-bit counter,
  loading *L − 1*, the FS pulse in the bit after the sync, the decoder value
  138 and the NFS 148 clocks after the decoder pulse. The original counts
  with chains of small counters; each chain is one counter here. The
  decoder is an equality compare with a parameter. It is the same AND of
  inverted and true count bits. The published gate diagram does not say
  which count bit goes to which gate.
* **Control held at "enabled" while unprogrammed.** Without it, the NFS pulse
  that drops lock would set the control flip-flop after the decoder had
  been switched off, and the correlator would never be re-enabled.
* **The measured interval.** It is the second-to-third FS spacing. The first
  two spacings are not compared with each other. Before a length is known
  there is no frame timing, hence no NFS, so any three FS pulses give lock.
  A false sync among them gives a wrong length. That length opens the
  window in the wrong places, so the real syncs are masked and NFS pulses
  follow. Three of them drop lock and start learning again.
* **Tie-breaks.** FS beats NFS in the lock logic. An FS coinciding with the
  window counter's terminal count counts as found. Set beats the decoder
  pulse in the control flip-flop. Clear beats set in the programming logic.
  The up count wraps if no sync arrives for 2^20 bits.
* **Reset.** Asynchronous and active low, to unlocked, unprogrammed,
  searching.
* **The 127/128 difference.** The sync code is 127 bits, while the window
  is sized for a 128-bit slot. The 148-bit window is kept as published.

Not included: the correlator itself and the rest of the receive system
(BER display and so on). The test bench carries a behavioural correlator.
Whether the logic meets a 320 MHz bit clock (the fastest IRS rate, 320 Mbps;
the slowest is 42.4515 Mbps) depends on the target device. The critical
path is a 20-bit decrement and compare.

## Test benches

Each block has a self-checking test bench in `tb/` (`<module>_tb.sv`). Each
compares the block with an independent reference and ends with a
`TB_RESULT checks=N failures=M` line.

`flywheel_top_tb` runs the whole flywheel at its default parameters. It
builds a bit stream of frames (PN sync + random data), and
`fs_correlator_model` searches it while `fs_ctrl_o` allows. The model uses
an x^7 + x^6 + 1 LFSR code with an all-ones seed; the real code of a given
satellite may differ, and nothing in the RTL depends on it. The stream:

* learns a 2400-byte (19,200-bit) frame and locks exactly on the third sync;
* plants copies of the sync code in video data, which must be masked;
* misses one sync, then two, bridged by TC, with NFS 10 bits late and lock
  held;
* moves a sync 5 bits early, which realigns the timing;
* misses three syncs, which drops lock one clock after the third NFS and
  clears the length;
* relearns a 128-Kbyte (2^20-bit) frame, then bridges two missed syncs at
  that length.

A monitor checks every clock that frame pulses, NFS pulses, window openings
and closings happen exactly where the generator placed syncs. It also
requires each mechanism to occur at least once. About 5.6 M clocks take a
few seconds.

`flywheel_false_lock_tb` covers the case above where a copy of the sync
code in the data is taken as one of the three learning syncs. The flywheel
locks with the wrong length and masks the real sync. Three NFS pulses then
drop lock, and it relearns the true length.

Running with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/flywheel_pkg.sv \
    tb/flywheel_top_tb.sv --top-module flywheel_top_tb -o sim
./obj_dir/sim
```

Replace `flywheel_top_tb` with any other `*_tb` to run that block's test.
