# RAIDER on APEnet: a multi-FPGA particle-identification pipeline in SystemVerilog

This design classifies detector events across several FPGA boards that talk to
each other through a packet network. Each event is a list of hit
photomultipliers (PMTs) from a Ring Imaging Cherenkov detector. One board, the
I/O node, reads events from host memory and turns each one into a 16x16
black-and-white image of the hit PMTs. It spreads the images round robin over
convolutional-network (CNN) kernels on the other boards, the computing nodes.
Each CNN kernel estimates how many charged particles crossed the detector
(class 0, 1, 2 or 3 and more) and sends the class back to the I/O node, which
stores it in host memory. More computing nodes and kernels give more events
per second.

Every kernel uses one small messaging scheme: a *send* that builds a packet
around a message, a *receive* that unwraps it, and two adapters (the
aggregator and the dispatcher). The adapters connect a kernel's channels to a
port of the board's router. The RTL here covers the messaging scheme, the two
adapters, all RAIDER kernels except the neural network itself, and both kinds
of node. It stops at the router port and at the CNN's input and output. The
router, the links between boards and the network are left as ports of the
top module.

## Packets

Everything that moves between kernels is a packet of 256-bit words:

    header word | ceil(size/32) payload words | footer word

`size` is the message length in bytes. The header is a 128-bit bit-field held
in the low half of a 256-bit word; the upper half is zero. The fields are
packed from bit 0 upward (`apenet_header_t` in `rtl/apenet_pkg.sv`):

| bits    | field          | set by send to                           |
|---------|----------------|------------------------------------------|
| 4:0     | virt_chan      | 0                                        |
| 20:5    | proc_id        | receiving channel                        |
| 26:21   | dest_x         | coord[5:0]                               |
| 31:27   | dest_y         | coord[10:6]                              |
| 36:32   | dest_z         | coord[15:11]                             |
| 40:37   | intra_dest     | receiving task (router port on the node) |
| 41      | reserved       | 0                                        |
| 42      | out_of_lattice | 0                                        |
| 47:43   | packet_type    | 0                                        |
| 61:48   | packet_size    | size in bytes                            |
| 109:62  | dest_addr      | 0xfafbfcfd                               |
| 119:110 | num_of_hops    | 0                                        |
| 127:120 | edac           | 0                                        |

The footer is all zero except `dest_addr = 0xaaaeabac` and `edac = 0x99`. A
node address is a 16-bit coordinate that holds a 3-D torus position. A task
is one of up to 4 kernels on a node, and a channel is one of up to 128 input
FIFOs of a task. The helper functions `make_header`, `make_footer`,
`apenet_2_word`, `word_2_apenet` and `size_to_nwords` live in the package.

## Send and receive engines

`hapecom_send` takes a command (size, destination coordinate, task, channel).
It writes the header, forwards `ceil(size/32)` words from its payload stream,
and then writes the footer. The output goes to output channel `ch mod NCHAN`.
A command of size 0 sends nothing. The caller does not wait for the packet to
arrive anywhere, so sending is non-blocking. A packet of n payload words takes
n + 3 cycles when nothing stalls: n + 2 words, plus one cycle to accept the
command.

`hapecom_receive` is the blocking counterpart. Given a channel, it waits for a
header on that channel and reads `packet_size`. It then delivers the payload
words with a `pl_last` flag, drops the footer, and pulses `done` with the size.

All streams in the design use the same valid/ready handshake. A word moves on
every rising edge where both valid and ready are high. Once valid is raised,
the data must stay stable until the word is taken. The aggregator asserts
this for its own outputs, and the dispatcher asserts that it drives at most
one channel at a time. All state is cleared by an asynchronous active-low `rst_n`.

## Aggregator and dispatcher

A router port has two separate input streams: one for headers and footers and
one for payload. A task, however, writes whole packets into each of its
channels. The **aggregator** (`NCHAN` channels in) chooses a channel that has a
word waiting. It then moves that channel's whole packet: the header to the
header stream, the `ceil(size/32)` payload words to the payload stream, and the
footer to the header stream. Only then does it look at another channel.
Channels are served round robin, starting after the one served last. One
packet takes n + 3 cycles, one of which is for choosing the channel.

The **dispatcher** does the reverse. It takes a header from the router's header
stream and steers the packet to task input channel `proc_id mod NCHAN`. It then
copies the payload words and the footer into that channel. A packet takes
n + 2 cycles, and back-to-back packets need no idle cycle.

Both adapters count payload words from the header's size field, so a packet
cannot leak into the next one. A wrong size in a header therefore desynchronises
the stream, exactly as it would in software.

## I/O and preprocessing node (`preprocessing_node`)

Router port 0 carries two host-started kernels, each with one channel:

* `krnl_sender` reads events from a host buffer of 128-bit items through a
  simple read port (`mem_rd`, `mem_raddr`, data one cycle later). Each event
  starts with a header item whose bits 15:0 hold its number n of hit words.
  Then come 2n items, and a hit word is `{item 2k+1, item 2k}`. The sender
  sends each event as one packet: the event header zero-extended to 256 bits,
  then the n hit words. The destination is task 1 (the imagifier) of its own
  node. `done` pulses once the last footer has left.
* `krnl_receiver` receives `count` result packets. It writes the low 128 bits
  of each result's payload to consecutive addresses of the result buffer
  (`mem_we`, `mem_waddr`, `mem_wdata`), then pulses `done`. The time from
  starting the sender to `done` of the receiver is the processing time of a
  run.

The sender's packets leave through port 0 and come back through the router to
port 1. A single aggregator serves port 0, and the receiver sits on the
dispatcher side of the same port.

Router port 1 carries the **imagifier**, a free-running kernel. For each
event packet:

1. It reads the packet header. The number of words is `packet_size / 32`; the
   first is the event header and the rest are hit words.
2. It stores the event header. It then takes the 16 PMT numbers (16 bits each)
   of every hit word, one per cycle. Number 0 means "no hit".
3. Each PMT number p is looked up in two bin tables, `x_bin[p]` and `y_bin[p]`.
   These are signed 6-bit RAMs, loaded through the `lut_*`
   port before the run. If both values are non-negative, it sets bit
   `x + 16*y` of the image. A negative entry marks a PMT that lies outside the
   image, and p >= `LUT_DEPTH` is ignored.
4. Only the first `MAX_WORD` hit words are imaged. Any further words are read
   and dropped, and the footer is consumed.
5. It sends a 96-byte message: the event header, image bits 127:0 and image
   bits 255:128, each in the low half of a word.

Destinations rotate over every kernel of every computing node. The channel
advances modulo the number of output channels; with one channel, the task
advances after every event. When the task reaches `nports` it wraps to 0 and
the node advances. The node wraps from `nboards` back to 1, because node 0 is
the I/O node. So `nboards` is the number of boards in use and `nports` is the
number of CNN kernels used per computing node. These two are the only settings
that select a smaller configuration; the hardware stays the same.

Imagifier timing: for an event of n hit words there are 2 cycles for the
headers, 17 per hit word and 1 for the footer. Then come 1 + 5 cycles to send
the image, so **17n + 9 cycles** from header to the last word sent.

## Computing node (`computing_node`) and the CNN kernel

A computing node has one `cnn_kernel` on each of its two router ports, each
behind a one-channel aggregator and dispatcher. The kernel is a three-stage
pipeline:

* **read_from** unpacks an image packet. It hands the 256-bit image
  `{word2[127:0], word1[127:0]}` to the CNN, and puts the low 128 bits of the
  event header (timestamp and event identity) into a `TS_DEPTH`-deep queue.
* **the CNN** is outside the RTL. It is reached through `nn_in_*` (the image)
  and `nn_out_*` (N_CLASS signed 16-bit scores), both as valid/ready streams.
  It may take any number of cycles, and it may hold several images at once up
  to the queue depth.
* **get_class** picks the class with the highest score, taking the lowest
  index on a tie. It pops the matching event header and sends a 32-byte result
  to node 0, task 0, channel 0. The result holds the class in bits 7:0 and the
  event header bits 127:8 in bits 127:8. The host reads the network's class
  from the low byte and any label that travelled in the event header from the
  upper bits.

The queue lets read_from accept the next image while the CNN is still busy.

## The whole system (`raider_system`)

The top holds the I/O node (coordinate 0) and `N_COMPUTE` computing nodes
(coordinates 1..N_COMPUTE; only `dest_x` is used). The default of 3 gives
the four-board, six-CNN arrangement. Port p of node n has index `2n + p`
in the `rt_tx_*` / `rt_rx_*` arrays. Whatever connects them, a routing
network in hardware or a model in simulation, must deliver a packet whose
header names `dest_x = n` and `intra_dest = p` on `rt_rx` port `2n + p`. It
must also keep packets between one source and one destination in order. CNN
k is kernel p of computing node n for `k = 2(n-1) + p`.

Parameters of the top:

| parameter  | default | meaning                                              |
|------------|---------|------------------------------------------------------|
| N_COMPUTE  | 3       | computing nodes (two CNN kernels each)               |
| N_CLASS    | 4       | classes 0, 1, 2, >=3                                  |
| SCORE_W    | 16      | width of a CNN score                                 |
| MAX_WORD   | 64      | hit words imaged per event                           |
| LUT_DEPTH  | 2048    | entries of each bin table (PMT numbers 0..2047)      |

### Throughput

`tb_raider_scaling` runs the default top in six configurations, changing only
`nboards` and `nports`. It uses 48 events of two hit words each, and
classifier stand-ins that take 340 cycles per image. At 100 MHz, one such
kernel needs about 3.4 us per event, which matches the single-kernel
measurement of the original multi-board system:

| boards | CNN kernels | simulated cycles/event | measured on hardware at 100 MHz |
|--------|-------------|------------------------|---------------------------------|
| 2      | 1           | 343                    | 3.440 us                        |
| 2      | 2           | 173                    | 1.720 us                        |
| 3      | 2           | 173                    | 1.720 us                        |
| 3      | 4           | 89                     | 0.860 us                        |
| 4      | 3           | 117                    | 1.147 us                        |
| 4      | 6           | 63                     | 0.731 us                        |

The simulated time follows the kernel count for as long as the CNNs are the
bottleneck. Below that, the limit is the imagifier at 17n + 9 cycles per event
(43 for n = 2). On hardware, six kernels fall short of linear scaling because
the sender cannot inject events fast enough. Here the host memory answers in
one cycle, so that limit does not appear. At the detector's rate of about
10 MHz (100 cycles per event at 100 MHz), the imagifier keeps up with events
of up to 5 hit words.

## What is not in the RTL

* **The CNN.** Its layers and weights come from a separate network-to-HLS
  flow and are not part of this design. Testbenches use `tb/tb_cnn_model.sv`,
  which scores class k as `100 - |popcount(image) - 6k|`.
* **The routing IP and the board-to-board links.** These cover torus routing,
  credit-based flow control and the control registers. Testbenches use
  `tb/tb_router_model.sv`, which routes to port `2*dest_x + intra_dest` and
  stalls every stream at random.
* **The host shell** (PCIe, drivers, buffer objects). The sender and receiver
  reach host memory through plain read and write ports instead of AXI
  masters.

## Where this design departs from the original description

* **Aggregator order.** The original aggregator scans its channels in a fixed
  order, 0 to NCHAN-1, on every invocation. This one serves them round robin
  from the last one served. The order is the same while all channels are busy,
  and no channel can be starved.
* **Aggregator header handling.** The original aggregator is said to "forge"
  the header, yet it only re-reads the header that send already built. This
  one passes the header through unchanged.
* **Dispatcher channel.** The dispatcher uses `proc_id mod NCHAN`, and send
  uses `ch mod NCHAN`, so a channel number out of range cannot index past the
  channels.
* **Send command form.** Send takes a command plus a payload stream instead of
  a buffer pointer.
* **Empty events.** The imagifier treats an event whose header gives no words
  like an event with no hit words, where the original loop would underflow.
* **Chosen here, not given in the original:**
  * the contents and depth of the bin tables, and `MAX_WORD`;
  * the host buffer layout of an event;
  * the CNN's score interface;
  * the timestamp queue depth;
  * the result word layout;
  * the reset.
* **Node coordinates.** Node n sits at x = n with y = z = 0. Routing is left
  to whatever connects the ports.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself, with a watchdog.

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        --top-module tb_raider_system -y rtl -y tb +libext+.sv \
        rtl/apenet_pkg.sv tb/tb_raider_system.sv
    ./obj_dir/Vtb_raider_system

The package must come first; everything else is found through `-y`.

| testbench              | what it exercises                                                        |
|------------------------|--------------------------------------------------------------------------|
| tb_aggregator          | random packets on 4 channels with back-pressure; framing, order, n+3 timing |
| tb_dispatcher          | steering by proc_id, payload counts, n+2 timing                           |
| tb_hapecom_send        | header fields and footer, size-0 commands, timing                         |
| tb_hapecom_receive     | blocking receive on a chosen channel, pl_last, reported size              |
| tb_imagifier           | images against a reference, empty and long events, PMTs beyond the table, rotation, 17n+9 timing |
| tb_imagifier_channels  | two input and two output channels: channel/task/node rotation, 16-byte packets |
| tb_cnn_kernel          | argmax with ties, result word, timestamp queue under a slow CNN           |
| tb_krnl_sender         | event packing from the host buffer                                        |
| tb_krnl_receiver       | results written in order, done                                            |
| tb_preprocessing_node  | sender -> imagifier -> image packets out, results back to the host buffer |
| tb_computing_node      | two kernels with two classifiers, results routed to the I/O node          |
| tb_raider_system       | whole default system, 72 events; counts each mechanism (see below)        |
| tb_raider_scaling      | the six board/kernel configurations above                                 |

`tb_raider_system` runs the top with all parameters at their defaults. It uses
random router stalls and 2048-entry bin tables. The events include one longer
than the imaged window, empty events, PMT numbers beyond the tables, and PMTs
that fall outside the image. Every event must come back exactly once with the
class that the testbench computes itself. The test fails if any of these never
happened: a packet inside a node, a packet between nodes, images for each of
the six CNNs, a stalled port, or any of the event types above.
