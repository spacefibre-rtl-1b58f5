# SpaceFibre CODEC in SystemVerilog

SpaceFibre is a multi-gigabit serial link for spacecraft on-board data handling. It carries the
packet traffic of SpaceWire over one differential pair per direction at rates above 1 Gbit/s.
This RTL is the digital part of one lane end. It takes frames of 32-bit words from a user, turns
them into a DC-balanced serial bit stream, and brings the same frames out at the far end intact.
Along the way it:

- brings the link up with a handshake;
- keeps two free-running clocks in step;
- spreads the line spectrum with a scrambler;
- catches corrupted frames with a CRC.

The analog parts (line driver, line receiver, clock recovery PLL) are outside it. The recovered
receive clock is an input.

```
 TRANSMIT (clk)
 user ─► vc_flow_control ─► tx_framer ─────► tx_link_mux ─────► word_encoder ─► serialiser ─► tx_out
         (FCT credit)       (SDF/SIF,         (SKIP, INIT_1/2,   (4 × 8B/10B)   (40 bits
                             scramble, CRC)    IDLE)                             per word)
                                                  ▲ tx_sel
                                            link_init_fsm ◄── INIT_1/INIT_2 received, rx_ready
 RECEIVE (rx_clk up to the elastic buffer, clk after it)
 rx_in ─► deserialiser ─► rx_polarity ─► symbol_sync ─► word_decoder ─► elastic_buffer
                              ▲            (commas)      (4 × 8B/10B)    (rx_clk → clk)
                              └──── rx_sync_fsm (Ready, polarity) ◄───┘        │
 user ◄─ vc_flow_control ◄─ rx_deframer ◄─────── link_os_rx ◄──────────────────┘
         (FCTs consumed)    (descramble, CRC,     (link ordered sets out)
                             length, idle frames)
```

## Words, characters and ordered sets

Everything on the line is a *word*: four 8B/10B characters, 40 bits. In RTL a word is
`sf_word_t {k[3:0], d[31:0]}`:

- `d[31:24]` is sent first;
- `k[i]` marks byte `i` as a control (K) character.

An *ordered set* is a word whose first character is the comma K28.5 (`0xBC`). Its second
character says which ordered set it is:

| ordered set | bytes (first to last) | use |
|---|---|---|
| SKIP | BC 00 cnt_ms cnt_ls | clock compensation, at least every 5000 words |
| IDLE | BC 20 00 00 | fills the line while the link is being brought up |
| INIT_1 / INIT_2 | BC 4A 20 speed / BC 4A 40 speed | initialisation handshake |
| SDF | BC 40 VC length | start of data frame |
| SIF | BC 60 00 FF | start of idle frame |
| EOF / EEF | BC 80/A0 crc_ms crc_ls | end of frame / error end of frame |
| FCT | BC C0 seq channel | flow control token: room for one more frame on a channel |

The characters are D0.0, D0.1, D0.2, D0.3, D0.4, D0.5, D0.6 and D10.2. Their byte values are
in `sf_pkg`.

Each 10-bit code is stored as `{a,b,c,d,e,i,f,g,h,j}`, with bit 9 (`a`) sent first. Running
disparity 0 means negative.

`enc8b10b` holds the standard 5B/6B and 3B/4B tables. `dec8b10b` decodes by matching the input
against every code the encoder can make, at both disparities. So the decoder can never disagree
with the encoder:

- a code in neither table is a *code error*;
- a code found only at the other disparity is a *disparity error*.

Either error marks the whole word invalid.

## Clocks and word slots

One serial lane runs on one bit clock, `clk`. A counter divides it by 40, and the resulting word
slot (`ce`) drives the whole transmit side and the read side of the elastic buffer.

The receive front end runs on `rx_clk`, the bit clock recovered from the line. That covers the
deserialiser, polarity, comma alignment, decoder and receiver synchronisation. Only three
signals cross between `clk` and `rx_clk`:

- the words, through the elastic buffer;
- the receiver's Ready level, through two flip-flops;
- the reset, which is released two `rx_clk` edges after `rst_n`.

## Receiver synchronisation

The deserialiser cuts the bit stream into 10-bit groups at an arbitrary boundary.
`symbol_sync` keeps the previous and current group (a 20-bit window) and looks at every offset
for the 7-bit comma pattern `0011111` or `1100000`.

When a comma appears, the symbol boundary moves to it and a new word starts there, because every
ordered set begins with K28.5. The block reports:

- `cd` (comma detect) on every comma;
- `cr` (comma realignment) when the comma was not where the current alignment expected it.

`rx_sync_fsm` has three states:

- **SymbolSync**: waits for a comma.
- **CheckSync**: waits for `CHECK_COMMAS` (4) aligned commas with no realignment and no invalid word, then goes
  to Ready.
- **Ready**: words go into the elastic buffer. Any realignment or invalid word is a loss of
  synchronisation, and the state machine starts again.

Polarity is handled in CheckSync. If the P and N wires of a pair are swapped, a K28.5 still
looks like a comma, but the data characters no longer decode. So an invalid word in CheckSync
flips the `rx_polarity` inverter and starts synchronisation again. The first word after an
alignment is excused, because its disparity history is unknown.

## The elastic buffer and SKIPs

The two ends of a link run on independent clocks of nearly the same frequency. The receive
elastic buffer (`elastic_buffer`, 16 words) is written at the far end's rate and read at the
local rate. It uses Gray-code pointers. Reading starts when it is half full, and it is kept
there using the SKIPs the far transmitter sends every `SKIP_INTERVAL` words:

- **Below half full** (local clock faster): a SKIP at the head is read but the read pointer is
  not advanced. It comes out twice, once only per SKIP. `skip_added` pulses.
- **Above half full** (local clock slower): the read pointer jumps over the SKIP and the next
  word is read in the same slot. `skip_removed` pulses.

Each SKIP can correct by one word. With the default interval of 5000 words (20000 symbols), the
two clocks may differ by up to 1/5000 (200 ppm) before the buffer drifts to an edge. Errors are
reported as `rx_overflow` (a write into a full buffer is dropped) and `rx_underflow` (reading
stops until half full again).

## Link initialisation

`link_init_fsm` has seven states. The transmitter is silent (line held low) in WarmReset and
Listen, and sends a word every slot in the other states.

| state | sends | leaves when |
|---|---|---|
| WarmReset | nothing | after `WAIT_WORDS` slots (10 µs at 2 Gbit/s): to NotConnected with `link_start`, to Listen with only `auto_start` |
| Listen | nothing | the receiver becomes Ready (the far end is talking) |
| NotConnected | INIT_1 | 8 INIT_1 received → NearEndConnected; 8 INIT_2 received → FarEndConnected; neither start input → WarmReset |
| NearEndConnected | INIT_2 | 8 INIT_2 received and 16 sent → Connected |
| FarEndConnected | INIT_2 | 16 INIT_2 sent → Connected |
| Connected | IDLE | 8 IDLE sent → Active |
| Active | frames | — |

Three events cause re-initialisation:

- An INIT_1 received in Connected or Active sends the link to NotConnected. The far end sends
  INIT_1 only after it has restarted.
- A loss of receiver synchronisation in any state after NotConnected does the same. It is seen
  as the fall of the synchronised Ready.
- `init_reset` forces WarmReset.

So one corrupted bit on one line brings both ends back through the handshake.

Whenever the transmitter is on, a SKIP takes precedence over everything else when it is due.
So the far receiver can keep its buffer centred from its first word.

## Frames, scrambling and CRC

In the Active state, `tx_framer` sends:

- **data frames**: SDF, the user's words scrambled, and EOF with the CRC;
- **idle frames**, when the user has nothing ready: SIF, up to 255 scrambled zero words, and
  EOF. An idle frame is ended early, with its EOF, as soon as a user frame is ready
  (`idle_frame_cut`).

A user ordered set is sent in the next word slot, even between the words of a frame.

The scrambler is additive. Its polynomial is G(x) = x¹⁶ + x⁵ + x⁴ + x³ + 1, built as a
16-stage LFSR:

- D15 feeds D0 and is XORed into D3, D4 and D5;
- each data bit is XORed with D15;
- the register is reseeded to `0xFFFF` at every SDF and SIF;
- it steps 32 times per data word, bit 31 first.

Because it is additive, the same circuit de-scrambles.

The CRC is CCITT (x¹⁶ + x¹² + x⁵ + 1, preset `0xFFFF`, MSB first). It covers the scrambled data
words between SDF and EOF, as they are sent.

`rx_deframer` reverses all of this:

- Idle frames are dropped (`idle_frame_removed`).
- Ordered sets other than the framing ones go to the ordered-set output.
- A data word outside a frame raises `user_rx_out_of_frame_error`.
- An EOF before the length given in the SDF raises `user_frame_length_error`.
- A CRC mismatch raises `user_rx_crc_error`.

## Virtual channels and flow control

A frame belongs to a virtual channel, numbered 0 to 255, given in its SDF. The destination's
buffer for that channel must have room before the frame may be sent. `vc_flow_control` sits
between the user and `tx_framer` and keeps one credit counter per channel:

- Each FCT received for a channel adds one credit. FCTs are consumed here and do not reach the
  user.
- A frame may start only when its channel has credit. Until then `user_txdata_rdy` is held back
  from the framer, which goes on sending idle frames, and `frame_held` is high.
- Starting a frame uses one credit. Once a frame has started, its words pass freely.

As the destination, the user pulses `rx_buffer_free` with the channel number in
`rx_buffer_vc` each time a receive buffer has room for one more frame. Each pulse becomes an
FCT with that channel's next sequence number. FCTs go out ahead of user ordered sets.

All credits, sequence numbers and pending FCTs are cleared whenever the link is not Active.
So after re-initialisation, the user must grant its room again. FCTs are held back for
`FCT_HOLD` clocks after the link becomes Active, so that the far end, which may reach Active a
few words later, does not miss them.

## User interface

**Transmit.** The user presents a complete frame, first word first, with `user_txdata_rdy` high.
`user_txdata_read` consumes the word on `user_txdata`. The first word is a header:

- bits 7:0 are the number of data words (0–255);
- bits 15:8 are the virtual channel number.

The header becomes the SDF. `user_tx_ord_set` (with K28.5 in bits 31:24) and
`user_tx_ord_set_rdy` / `user_tx_ord_set_read` send a single ordered set. It goes out only while
the link is Active.

**Receive.** `user_rxdata_valid` qualifies each output word:

- an SOF word `{16'h0, VC, length}` with `user_rxdata_sof`;
- the de-scrambled data words;
- an EOF word with `user_rxdata_eof`. Its bit 0 is set on a CRC error and bit 8 for an EEF.

Received non-framing ordered sets appear on `user_rx_ord_set` with `user_rx_ord_set_valid`.

**Status.** These outputs report the link:

- `link_state` and `rx_sync_state`;
- `link_active` and `rx_ready`;
- `rx_speed`, the speed byte of the last INIT;
- event pulses for each SKIP, buffer and frame mechanism;
- `tx_k_error`, when a user word asks for a K code that does not exist.

Two loopback modes test the CODEC on its own. In both, `rx_clk` must be driven from `clk`.

- `serial_loopback` feeds the serial output `tx_out` back into the deserialiser.
- `parallel_loopback` feeds the encoded 10-bit symbols straight into the receive path, one every
  10 clocks, bypassing the serialiser and deserialiser.

## Parameters of `spacefibre_codec`

| parameter | default | meaning |
|---|---|---|
| `SKIP_INTERVAL` | 5000 | word slots between SKIPs (the standard's upper limit) |
| `WAIT_WORDS` | 500 | WarmReset wait in word slots: 10 µs at 2 Gbit/s |
| `CHECK_COMMAS` | 4 | aligned commas needed in CheckSync |
| `EB_DEPTH` | 16 | elastic buffer words (power of two) |
| `SPEED` | 8'h00 | speed byte sent in INIT_1/INIT_2 |
| `NUM_VC` | 256 | virtual channels with a credit counter |
| `FCT_HOLD` | 4096 | clocks after Active before FCTs are sent |

## What is fixed by SpaceFibre and what is chosen here

Taken from the SpaceFibre definition:

- the layer split;
- the ordered-set codes and their fields;
- the SKIP rule (add once below half, remove above half, at most every 5000 words);
- the state names of both state machines;
- the scrambler polynomial, seed and reseeding;
- the frame formats, and the 255-word limit for data and idle frames;
- the FCT format, with one token per frame of room, for up to 256 channels;
- the names and meanings of the user signals.

Chosen in this design:

- the 40-bit word slot on one bit clock, and the code bit order;
- the counts in the initialisation handshake (8 received, 16 sent, 8 IDLE);
- the CheckSync rule and the way polarity is detected;
- the CRC polynomial, and CRC over the scrambled words;
- the elastic buffer depth and its start-up and underflow behaviour;
- the running SKIP count in the SKIP bytes;
- the VC field in the first user word;
- user ordered sets taking priority inside frames;
- clearing credit when the link is not Active, and the hold before FCTs;
- the status outputs.

A different implementation of SpaceFibre can differ on any of these points. Check them before
connecting this CODEC to another one.

## Not included

- **The virtual-channel buffers themselves.** The CODEC counts credit for up to 256 channels,
  but the buffers belong to the user, who reports room with `rx_buffer_free`. Received FCT
  sequence numbers are not checked.
- **Power management ordered sets.**
- **EEF.** The transmitter never sends one. If the link leaves Active during a frame, the frame
  is dropped.
- **The analog lane.** Line drivers, line receivers and clock recovery are not included.

## Files

`rtl/`, one module or package per file:

- `sf_pkg` (types, codes, the encoder function);
- `enc8b10b`, `dec8b10b`, `word_encoder`, `word_decoder`;
- `serialiser`, `deserialiser`, `rx_polarity`, `symbol_sync`, `rx_sync_fsm`;
- `elastic_buffer`, `tx_link_mux`, `link_os_rx`, `link_init_fsm`;
- `scrambler`, `crc16`, `tx_framer`, `rx_deframer`, `vc_flow_control`;
- `spacefibre_codec` (the top).

`tb/`:

- one self-checking testbench `tb_<module>` per block;
- `sf_ref_pkg`, a reference scrambler and byte-wise CRC used by the framing testbenches;
- the end-to-end tests.

The end-to-end tests (`tb_codec_pair`, `tb_codec_node`) join two CODECs by their serial lines:

- the clocks differ;
- one line is inverted;
- three line bits are corrupted part-way through;
- a third CODEC runs in serial loopback and a fourth in parallel loopback;
- each receiver grants room for 4 frames, and one more per frame received.

They check that every mechanism happens and every frame arrives intact and in order.
`tb_spacefibre_codec` uses a 50-word SKIP interval, a short WarmReset and a 1 % clock
difference; it takes about 30 s. `tb_spacefibre_codec_full` uses the default parameters, frames
up to 255 words and a 100 ppm difference; it takes about 2 minutes.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/sf_pkg.sv $(ls rtl/*.sv | grep -v sf_pkg) \
    tb/sf_ref_pkg.sv $(ls tb/*.sv | grep -v sf_ref_pkg) \
    --top-module tb_spacefibre_codec -Mdir obj && obj/Vtb_spacefibre_codec
```

The simulator starts registers at random values, and every block resets what it reads. In
testbenches, monitors look at outputs only while `rst_n` is high.

### Lint notes

Verilator reports one warning in `spacefibre_codec`: `rx_rst_sr` is used both as data and as an
asynchronous reset. That flip-flop pair is the receive-domain reset synchroniser, and the
warning is expected. The module's header comment says so.
