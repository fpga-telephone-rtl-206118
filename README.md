# FPGA Telephone

A small telephone exchange without an exchange. Several FPGA boards, all loaded
with the same design, hang off **one shared wire** (plus ground). Each board has
a 2-bit identifier set on its switches. From any board you can dial any other,
answer, talk both ways and hang up. If nobody answers, the called board plays
its owner's recorded greeting to the caller and then records the caller's voice
message. Later the owner can play the greeting and the stored messages.

Everything a board sends is a 13-bit packet: destination address, a 3-bit
header saying what the packet means, and 8 bits of data (usually one audio
sample). Packets go bit-serially over the shared wire. Conversation audio runs
at 6 kHz, so a call is a stream of about 6000 packets per second in each
direction. An external ZBT SRAM holds the greeting and two messages.

This repository is the SystemVerilog for one board (`fpga_telephone`), plus
testbenches that put three boards on a modelled wire.

## The shared wire

This is the hardest part of the design, and the part to read first.

### Electrical behaviour

Each board drives its `line_out` pin into a small transistor circuit. The
shared wire, pulled up through a resistor, reads **high when any board drives
high** and low when none does (a wired OR). Every board reads the wire back on
`line_in`, and so also sees its own transmissions. The circuit is slow: the
wire needs roughly 700 ns, about 19 clocks at 27 MHz, to follow a change. The
bit timing is built around that delay.

### Framing (`send_data`)

A frame is 17 bits sent MSB first, with the line idle low before and after:

```
 1 0 1 1 | a1 a0 | h2 h1 h0 | d7 d6 d5 d4 d3 d2 d1 d0
preamble   address  header     data
```

Each bit is held for `BIT_CYCLES` = 32 clocks (1.19 us). After the last bit the
sender holds the line low for another 32 clocks (`GAP_CYCLES`), so the delayed
tail of its frame has left the wire before it may listen again. A frame thus
occupies the wire for 17 x 32 + 32 = 576 clocks (21.3 us).

### Receiving (`get_data`)

An idle receiver waits for the wire to go high. That first high sample marks
the start of the first preamble bit, and from then on the receiver cuts time
into 32-clock windows, one per bit. In each window:

* samples 0 to 12 (`SKIP_CYCLES` = 13) are ignored, because the wire is still
  settling after a possible edge;
* samples 13 to 31 (19 of them) vote. The vote is the MJRTY streaming majority
  algorithm: keep a candidate bit and a counter; on a sample equal to the
  candidate count up, otherwise count down; when the counter is zero the next
  sample becomes the candidate. With 19 binary samples the survivor is always
  the true majority, so isolated spikes are voted out.

After four bits the receiver compares them with `1011`. On a mismatch it drops
the frame and pulses `preamble_err`: a noise pulse or a collision looks like
this. After all 17 bits it presents the 13-bit packet with a one-clock
`pkt_valid`, exactly 17 x 32 clocks after it first saw the wire high. In both
cases it then waits until the wire has been low for 8 clocks before it can
start again.

### Who may talk (`serial_link`)

Each board keeps a global link state: `IDLE`, `SENDING_DATA` or
`RECEIVING_DATA`. It never sends while receiving, and its receiver is off while
it sends, so it never decodes its own frames. From `IDLE`:

* a high wire starts a reception (this wins over a waiting packet);
* otherwise a packet waiting in the **output buffer** is handed to the
  serialiser.

Received packets go into an **input buffer**. Both buffers hold eight packets
(`packet_fifo`). The output buffer is what lets the controller hand over a
packet at any moment, even while the wire is busy. A packet pushed into a full
buffer is dropped, and `tx_overflow` or `rx_overflow` pulses.

After every reception a board waits 48 clocks (`RX_HOLDOFF_CYCLES`) before it
may send. This is longer than a sender's 32-clock gap plus the wire delay. A
board with several packets queued therefore keeps the wire until its buffer is
empty. Without the hold-off, a listener with a packet queued would start just
as the sender began its next back-to-back frame, and both frames would be
lost.

There is **no collision detection or retry**. If two idle boards start within
the wire delay of each other (about 20 clocks), each sends its whole frame and
neither hears the other. The two addressees get nothing, because both are busy
sending. A bystander sees the OR of the two frames. It rejects some by their
preamble and may accept others as a garbled packet, which its address filter
usually drops. At call rates the wire is about 25 % busy (two 576-clock frames
per 4500 clocks). Two codecs on separate crystals drift in phase, so their
sample ticks line up from time to time. Samples are lost in both directions
for as long as the two ticks stay within about 20 clocks of each other. At a
220 ppm clock difference that is about 40 samples (7 ms) every 0.75 s. At
50 ppm it is about 180 samples (30 ms) every 3.3 s. A lost control packet is
covered by the controller's timers where the state diagram allows it (see
below).

## Packets

| header | name    | data             | sent by                                |
|--------|---------|------------------|----------------------------------------|
| 0      | CALL    | caller's ID      | caller, when the call button is pressed |
| 1      | ANSWER  | -                | callee, when it picks up               |
| 2      | HANGUP  | -                | either side                            |
| 3      | VOICE   | audio sample     | both sides during a call               |
| 4      | PRE     | greeting sample  | unanswered callee                      |
| 5      | MSG     | message sample   | caller leaving a message               |
| 6      | PRE_END | -                | callee, after the greeting             |
| 7      | MSG_END | -                | caller, at the end of the message      |

The address is the destination. `packet_reader` passes a packet to the
controller only if the address equals the board's own ID, and drops the rest.
Every board hears every frame. A third board sees all of a call's traffic and
ignores it.

## The call controller (`phone_fsm`)

One state machine decides what the board does. The states and their exits:

| state       | does                                           | leaves for |
|-------------|------------------------------------------------|------------|
| IDLE        | plays a 750 Hz tone                            | CALLING (call button, sends CALL), RINGING (CALL received), NEW_PRE (record button), LISTEN_PRE, LISTEN_MSG |
| CALLING     | 750 Hz tone alternating with silence           | IN_CALL (ANSWER), REC_PRE (first PRE or PRE_END), IDLE (hang-up button sends HANGUP; or HANGUP received) |
| RINGING     | 750 Hz alternating with 375 Hz                 | IN_CALL (answer button, sends ANSWER), IDLE (HANGUP), SEND_PRE (ring timer) |
| IN_CALL     | mic to VOICE packets, VOICE packets to speaker | IDLE (hang-up button sends HANGUP, or HANGUP received) |
| SEND_PRE    | greeting slot to PRE packets at 6 kHz          | REC_MSG (sends PRE_END when the greeting ends) |
| REC_PRE     | PRE packets to speaker                         | SEND_MSG (PRE_END, or ring time without it) |
| SEND_MSG    | mic to MSG packets                             | IDLE (hang-up button or message timer; sends MSG_END) |
| REC_MSG     | MSG packets into the next message slot         | IDLE (MSG_END, or message time + 2 s) |
| NEW_PRE     | mic into the greeting slot                     | NEW_PRE_END (record button, or slot full) |
| NEW_PRE_END | appends 3000 samples (0.5 s) of 750 Hz beep    | IDLE |
| LISTEN_PRE  | greeting slot to speaker                       | IDLE (end of recording, or hang-up button) |
| LISTEN_MSG  | message slot chosen by `sw[4]` to speaker      | IDLE (end of recording, or hang-up button) |

An unanswered call runs like this. The callee's ring timer (`sec_timer`,
`RING_SECONDS`) expires, and the callee moves to SEND_PRE. The caller moves
from CALLING to REC_PRE on the first greeting packet. At PRE_END the callee
records (REC_MSG) and the caller sends (SEND_MSG). Both end up in IDLE when the
caller hangs up or its message timer (`MSG_SECONDS`) runs out. Messages fill
the message slots in turn. With two slots, the third message overwrites the
first.

The timer exits from REC_PRE and REC_MSG are safety nets. Without them, a lost
PRE_END or MSG_END would leave a board stuck. An empty greeting (never
recorded) sends PRE_END at once, and the caller passes straight through
REC_PRE.

The controller acts on the rising edges of the debounced buttons. Its
packets, memory commands and timer starts come out registered, one clock after
the event that causes them. The 6 kHz microphone tick (`mic_valid`) also paces
playback from memory, so greetings and messages play at the recording rate.

## Audio

The codec delivers and accepts signed 8-bit samples with a one-clock
`ac97_ready` per 48 kHz sample.

* `mic_filter` keeps a running sum of the last 8 microphone samples and
  outputs their mean on every 8th sample: a moving-average low-pass, then
  decimation to 6 kHz.
* `spk_filter` holds the latest 6 kHz sample and runs the same 8-sample
  average at 48 kHz. This ramps linearly from one 6 kHz sample to the next
  instead of stepping.
* `sounds` makes the call-progress tones from a 64-entry sine table
  (quarter wave stored: round(127 sin(2 pi (i + 0.5) / 64)), i = 0..15).
  Stepping the table once per 48 kHz sample gives exactly 750 Hz, and every
  other sample gives 375 Hz (the lower ringing tone, nominally "400 Hz").
  The on/off cadence is 0.5 s (`CADENCE_SAMPLES`).
  The plain 750 Hz tone is also the beep appended to a greeting.

The speaker plays the tones in every state except IN_CALL, REC_PRE, LISTEN_PRE
and LISTEN_MSG, which play the interpolated 6 kHz stream. The non-tone states
are silent: `sounds` outputs zero there.

## Voice storage (`voice_memory`)

The SRAM holds one sample per 36-bit word, in bits [7:0]. It is split into
slots of 2^16 words: slot 0 is the greeting and slots 1 and 2 are messages. The
word address is `{slot, offset}`. Each slot holds 10.9 s at 6 kHz. Each slot
has a length register, so playback stops where the recording stopped.
Recording past the end of a slot raises `full` and drops the samples.

The SRAM port is registered. The SRAM is expected to return read data
`ZBT_LATENCY` = 2 clocks after it samples the address, so `rd_valid` comes 3
clocks after `rd_req`. Write data leaves in the same clock as its address. A
pipelined ZBT part that wants write data two clocks after the address needs
that delay added at the pins. This interface timing is an assumption of this
design and has not been checked against a real part.

## Controls and display outputs

| input      | use                   |
|------------|-----------------------|
| `btn[0]`   | play a message        |
| `btn[1]`   | play the greeting     |
| `btn[2]`   | start / stop recording the greeting |
| `btn[3]`   | answer / hang up      |
| `btn[4]`   | call                  |
| `sw[1:0]`  | this board's ID       |
| `sw[3:2]`  | ID to call            |
| `sw[4]`    | message slot to play  |

All buttons and switches pass through `debouncer`. A change must be stable for
`DEBOUNCE_CYCLES` (10 ms) and appears DEBOUNCE_CYCLES + 2 clocks after it
settles. Inputs are active high. `disp_my_id`, `disp_target_id`, `disp_peer_id`
(caller ID while ringing, called ID while calling) and `disp_state` are
provided for a display driver. `link_state`, `tx_overflow`, `rx_overflow` and
`preamble_err` are status outputs.

## Files

| file | contents |
|------|----------|
| `rtl/phone_pkg.sv` | packet struct, header and state enums, link constants |
| `rtl/fpga_telephone.sv` | one board: everything below wired together |
| `rtl/phone_fsm.sv` | call controller |
| `rtl/serial_link.sv` | link state, buffers, serialiser and deserialiser |
| `rtl/send_data.sv`, `rtl/get_data.sv` | serialiser; deserialiser with majority vote |
| `rtl/packet_fifo.sv` | eight-entry packet buffer |
| `rtl/packet_reader.sv` | address filter |
| `rtl/sec_timer.sv` | seconds counter |
| `rtl/sounds.sv` | tones |
| `rtl/mic_filter.sv`, `rtl/spk_filter.sv` | 48 kHz to 6 kHz and back |
| `rtl/voice_memory.sv` | greeting and message slots in the SRAM |
| `rtl/debouncer.sv` | button and switch debouncer |
| `tb/wired_or_line.sv` | model of the wire circuit: OR of all drivers, 19-clock rise and 17-clock fall delay, plus a noise input |
| `tb/zbt_model.sv` | SRAM model with 2-clock read latency |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus system and workload tests |

## Parameters of `fpga_telephone`

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 27 000 000 | clock rate, used by the seconds timer |
| `DEBOUNCE_CYCLES` | 270 000 | debounce window (10 ms) |
| `BIT_CYCLES` | 32 | clocks per bit on the wire |
| `SKIP_CYCLES` | 13 | samples ignored at the start of each bit |
| `FIFO_DEPTH` | 8 | packets per buffer |
| `RING_SECONDS` | 10 | ring time before the greeting is sent |
| `MSG_SECONDS` | 10 | longest message |
| `BEEP_SAMPLES` | 3000 | end-of-greeting beep, 0.5 s at 6 kHz |
| `CADENCE_SAMPLES` | 24 000 | tone on/off period, 0.5 s at 48 kHz |
| `NUM_MSG` | 2 | message slots |
| `SLOT_AW` | 16 | log2 of words per slot |
| `ZBT_ADDR_W`, `ZBT_DATA_W`, `ZBT_LATENCY` | 19, 36, 2 | SRAM port |

The 32-clock bit, the 13 skipped samples, the 1011 preamble, the 13-bit packet
with its three fields, eight-packet buffers, 48 to 6 kHz audio, the 750 and
375 Hz tones, the half-second beep and two message slots are the original
design's. The ring and message times, the tone cadence, the debounce window,
the slot size, the field order within the packet, the header codes, the button
and switch assignment, the send hold-off and the SRAM timing are this
implementation's own choices.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpga_telephone \
    -y rtl -y tb +libext+.sv rtl/phone_pkg.sv tb/tb_fpga_telephone.sv
./obj_dir/Vtb_fpga_telephone
```

Replace `tb_fpga_telephone` with any other testbench name. Each prints one line
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run with a
failure.

* `tb_fpga_telephone` puts three boards on the modelled wire with time scaled
  down (a "second" is 16000 clocks, debounce 4 clocks, 32-word slots). The wire
  keeps its real timing. It records and replays a greeting, makes an answered
  call with speech both ways, floods one board's output buffer, makes an
  unanswered call that plays the greeting and stores a message ended by the
  message timer, and replays the message. It also checks that a third board
  ignores all of it, that a button glitch is filtered, that a noise pulse is
  rejected by the preamble, and that spikes injected into frames are voted out.
  It runs in under a second.
* `tb_fpga_telephone_full` uses every default: 27 MHz, 10 ms debounce,
  562/563-clock codec strobes. Three boards make one complete call: dial,
  ring, answer, talk both ways, hang up. It checks that call set-up takes one
  frame time plus the line delay. It runs about 2.1 million clocks, a few
  seconds.
* `tb_link_audio_load` runs three links at default timing with two of them
  streaming call audio at each other for 1200 samples. The two sample clocks
  differ by one clock in 4500. It checks in-order, unaltered delivery, no
  buffer overflow, the wire load and the waiting-for-the-wire case. It also
  checks that losses happen only in the collision window.
* `tb_voicemail_load` runs the voice store at full size: a full greeting slot
  plus overflow, two 10 s messages, playback of all three, and an overwrite of
  one slot.
* The per-module testbenches check each block against an independent
  reference: a queue model for the buffer, real-valued sine for the tones,
  frames built in the testbench for the receiver, exact latencies for the
  debouncer, timer, receiver and SRAM reads.

## Limits and departures

* The original block diagram shows a block labelled "EC" on both sides of the
  serial link, with no further description. It is not built. The link's own
  checks (preamble, majority vote, address match) are the only error handling.
* The codec and its driver, the clock deskew for the SRAM, the display driver,
  the SRAM itself and the transistor circuit are outside this RTL. The
  transistor circuit and the SRAM exist only as the simple simulation models
  in `tb/`. The real circuit's delays are not symmetric or exact. Only the
  approximate 700 ns figure went into the model.
* The idle board plays its 750 Hz tone continuously, as specified. Mute it in
  `sounds` if that is unwanted.
* Only the single shared wire is built. An earlier two-board arrangement with
  one wire per direction and 8-clock bits is not: 8 clocks are far shorter
  than the wire's delay.
* No collision detection (see above). Nothing has been run on hardware.
  Everything here is verified in simulation only, against the models described.
