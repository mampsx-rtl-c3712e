# FFoS accelerator platform with C-HEAP communication assists

This design is a small heterogeneous multiprocessor platform for a vision task.
A processor tile hands work to hardware accelerators, and every accelerator is
separated from the interconnect by a *communication assist* (CA). The assist
owns a circular buffer shared by one producer and one consumer. The accelerator
moves data only through four synchronisation primitives on that buffer. It never
sees the interconnect handshake. Communication and computation are decoupled in
this way, so each part can be timed on its own. This is what makes the
platform's worst-case throughput analysable.

The application is *Fast Focus on Structures* (FFoS). It is used in OLED
manufacturing to find the centres of the printed structures in a camera image
before ink-jet printing:

```
grey image --Otsu threshold--> binarisation --> erosion --> projection --> centre coordinates
```

Each of the last three steps runs either in software on a processor or on a
hardware accelerator of its own. This gives eight configurations, written as
(Proj, Eros, Bin). The top-level parameters `PROJ_HW`, `EROS_HW` and `BIN_HW`
select one, and the default is (1, 1, 1), with all three accelerators in
hardware. Otsu always runs in software on the processor, as do the source and
sink. The processor tile is outside this RTL. Its streams are the top-level
ports.

## Structure

```
 processor tile                 binarisation tile                   erosion tile
 D1 pixels  -> [FIFO link] -> ca_rx --+
 D3 thresh  -> [FIFO link] -> ca_rx --+-> bin_accel -> ca_tx -> [FIFO link] -> ca_rx -> eros_accel -> ca_tx -> [FIFO link] ->
                                                                                                  projection tile
                                                          ca_rx -> proj_accel -> ca_tx -> [FIFO link] -> D6 centres -> processor tile
```

Every dataflow channel that crosses a tile boundary gets its own link. The
channels are D1, D3, D4, D5 and D6, named as in the application's dataflow
graph. Each link is an AXI-stream FIFO carrying 32-bit words, and only
`tdata/tvalid/tready` are used.

### Other configurations

When an actor is in software, its tile is not generated. The links of its
channels then end at processor ports instead:

* `m_d4_*` carries D4 out when Bin is in hardware and Eros is not.
* `s_d4_*` carries D4 in when Eros is in hardware and Bin is not.
* `m_d5_*` and `s_d5_*` do the same for D5.
* The pixel, threshold and centre ports are used only when Bin or Proj is in
  hardware.

In the application's dataflow graph a feedback channel from sink to source
holds one token, so the software starts a frame only after the previous one
has finished. The hardware does not rely on this. It accepts frames back to
back, limited only by its buffers.

Ports that a configuration does not route are held idle, with valid and ready
low. Configuration (1, 0, 1) forms two separate hardware islands. Bin sends D4
to the processor, the processor erodes the image, and the result comes back to
Proj on D5. Configuration (0, 0, 0) contains no hardware.

| file | role |
|---|---|
| `rtl/mampsx_pkg.sv` | word type, image size (120 x 45), row packing, centre token type |
| `rtl/cheap_buffer.sv` | the C-HEAP circular buffer: memory, four pointers, four primitives |
| `rtl/ca_rx.sv` | receiving assist: stream words in, whole tokens out to the consumer |
| `rtl/ca_tx.sv` | sending assist: whole tokens in from the producer, stream words out |
| `rtl/axis_fifo.sv` | FIFO link with a fixed latency (latency-rate behaviour) |
| `rtl/bin_accel.sv` | pixel > threshold, packed 32 pixels per word |
| `rtl/eros_accel.sv` | 3x3 erosion on a sliding window of rows in the input buffer |
| `rtl/proj_accel.sv` | row and column projections and centre finding |
| `rtl/mampsx_ffos_top.sv` | the platform: the three tiles and five links |

## The C-HEAP circular buffer (`cheap_buffer`)

This is the part that the rest depends on. The buffer is a ring of `DEPTH`
words. Four pointers run around it in a fixed order:

```
read start -> read end -> write start -> write end -> (read start + DEPTH)
   claimed read data | ready data | claimed write data | free space
```

| primitive | side | effect |
|---|---|---|
| claim space (`cs_req`, `cs_n`) | producer | moves *write end* by n if n words are free; `cs_gnt` says whether it did |
| release space (`rs_req`, `rs_n`) | producer | moves *write start* by n, which publishes n written words |
| claim data (`cd_req`, `cd_n`) | consumer | moves *read end* by n if n words are ready; `cd_gnt` says whether it did |
| release data (`rd_req`, `rd_n`) | consumer | moves *read start* by n, which frees n words |

A claim is a *try*. The grant is combinational and the pointer moves at the
clock edge only when the claim is granted. The producer may write any word of
its claimed window at `wr_off`, counted from write start. The consumer may read
any word of its claimed window at `rd_off`, counted from read start. The read
port is combinational. This random access inside a claimed window lets a window
kernel such as erosion keep several rows claimed and read them again, with no
copy. A claim and a release on the same side may fall in the same cycle, and
the release may then include the words just claimed. Assertions check that
nothing is written or released outside a claimed window. Pointers are one bit
wider than the address, so `DEPTH` must be a power of two.

`free_words` and `ready_words` are brought out. The accelerators use them to
decide before they claim. Their claims are therefore always granted, and an
assertion checks this.

## Communication assists

* `ca_rx` is the producer of its buffer. For each incoming word it claims one
  word, writes it, and releases the whole token after `TOKEN_WORDS` words. This
  de-serialises the words into a token: the consumer never sees part of a
  token. `s_tready` is high while a word is free.
* `ca_tx` is the consumer of its buffer. When a whole token is ready it claims
  the token, sends the words one per cycle, and releases the token only after
  its last word has been accepted. This serialises the token. The
  acknowledgement keeps the space from being reused before the transfer is
  done. A token costs one claim cycle plus one cycle per accepted word.

`TOKEN_WORDS` defaults to 16, a 512-bit token in 32-bit words. Every FFoS
channel carries tokens of at most 32 bits, so the platform sets it to 1.

## FIFO links (`axis_fifo`)

Each entry has a saturating age counter. The head word is offered once it has
aged `LATENCY` cycles, so a word leaves no earlier than `LATENCY` cycles after
it entered. After that the link passes at most one word per cycle, and at most
`DEPTH/LATENCY` words per cycle when it is shallower than its latency. In the
platform, links towards an accelerator have latency 3 and links back into the
processor tile have latency 6, both one word deep. These are the two links of
the example platform. A link towards an accelerator therefore passes one word
every three cycles. This rate,
not the accelerators, sets the pace of the default platform.

## The accelerators

Images between the accelerators are packed row by row. A row of `W` one-bit
pixels takes `RW = ceil(W/32)` words, which is 4 for W = 120, and bit `k` of
word `j` is pixel `32*j + k`. A 120 x 45 frame is therefore 180 words.

* **bin_accel** claims one threshold token per frame, then takes one pixel
  token (a 32-bit grey value) per cycle. A pixel becomes 1 when it is *above*
  the threshold. Each finished output word is claimed, written and released in
  one cycle. Without stalls a frame takes W*H + 1 cycles.
* **eros_accel** computes output row r from input rows r-1, r and r+1. It
  claims rows in the input buffer until those three are inside its window. It
  reads the 3*RW words it needs from the window, computes the whole row and
  writes RW output words. It then releases row r-1. Each row except the outer
  ones is read three times from the buffer, once for each output row that needs
  it. A pixel survives only when its full 3x3 square is set. Pixels outside the
  image count as 0, so the outer ring of the image is always cleared. The input
  buffer must hold 3*RW words. Without stalls a row takes 20 cycles.
* **proj_accel** reads one row at a time. It records the number of set pixels
  of each row and adds the row into per-column counts. At the end of the frame
  it scans both vectors. Each run of non-zero entries is one structure, and its
  centre is `(first + last) / 2`. Every pair (row centre, column centre) is one
  centre on the grid. It sends exactly `C` tokens per frame in raster order.
  Each token is `{row[7:0], col[7:0]}` in the low 16 bits of a word. If there
  are fewer centres the rest are `16'hFFFF`, and if there are more the extras
  are dropped. Without stalls a frame takes H*(RW+2) + H + W + C + 2 cycles.

## Parameters

| parameter | default | origin |
|---|---|---|
| `W`, `H` | 120, 45 | the application's typical frame |
| `C` (centres per frame) | 16 | own choice; the application leaves it open |
| link `DEPTH`, `LATENCY` | 1 word; 3 cycles towards an accelerator (`FIFO_LAT`), 6 back to the processor (`FIFO_LAT_RET`) | the example platform's two links, latency read as cycles |
| assist buffer depth | 16 words | own choice; erosion needs at least 12 |
| `TOKEN_WORDS` | 16 (1 in the platform) | 512-bit example token / 32-bit words |

## Where this design makes its own choices

The source defines the circular-buffer scheme, the assist roles, the
accelerator functions and the sizes. It does not define the following. Each is
a choice of this design:

* The primitives' cycle timing: a combinational grant, and a claim and a
  release allowed in the same cycle.
* All reset behaviour. Reset is asynchronous and active-low, and it clears the
  pointers and the state.
* The meaning of "binarisation". Here it is *greater than* the threshold, with
  32-bit unsigned pixels.
* The erosion's structuring element (3x3) and border (zero).
* The centre-finding rule, the token format and the fixed count C.
* The topology: one link for each channel, with accelerator-to-accelerator
  channels (D4, D5) linked directly. The names of the processor-side D4/D5
  ports are also this design's.
* The row-at-a-time accelerator schedules. Their cycle counts do not match the
  execution times reported for the original accelerators. The erosion here
  needs about 900 cycles per frame and the projection about 460. The originals
  are reported at about 370 and 300 cycles at 100 MHz. The binarisation's one
  pixel per cycle does match.

Not built:

* The processor tile: the ARM core, its DMA-based assist, scratchpad, DDR, bus
  and peripherals.
* The Otsu step and the source and sink.
* Camera and display interface tiles, memory tiles, NoC and bus
  interconnects.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of cycles
if it hangs. `tb/ffos_model_pkg.sv` holds a software reference of the image
chain, which the accelerator and platform testbenches use.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mampsx_pkg.sv tb/ffos_model_pkg.sv tb/tb_mampsx_ffos_top.sv \
    --top tb_mampsx_ffos_top -o sim -y rtl -y tb
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_cheap_buffer` | random primitives against a pointer model, refusals, out-of-order reads |
| `tb_ca_rx` | whole-token release, order, back-pressure, one-cycle token latency |
| `tb_ca_tx` | order, no send before release, space held until the last word, refused claims |
| `tb_axis_fifo` | exact latency, order, rate min(1, DEPTH/LATENCY), for a 1/3 and a 4/6 link |
| `tb_bin_accel` | 40x6 frames against the model, one pixel per cycle |
| `tb_eros_accel` | 120x45 frames against the model, 20 cycles per row, window re-reads |
| `tb_proj_accel` | 120x45 frames, padding and truncation of the centre list |
| `tb_mampsx_ffos_top` | four full-size frames end to end at the default parameters, every stall mechanism made to occur |
| `tb_ffos_configs` | all eight configurations at full size, with the testbench running the software actors; configuration (0,0,0) idle |

The platform test is full size. It runs four 120 x 45 frames in about 65,000
cycles, which takes a few seconds.
