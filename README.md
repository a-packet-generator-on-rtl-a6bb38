# Hardware packet generator and capture pipeline for a four-port Gigabit Ethernet card

Software traffic replay on a PC cannot hold line rate or keep the spacing
between packets the same from run to run. This design does the replay in
hardware instead. The host loads a capture file (PCAP) into on-board packet
memory. The hardware then sends it out of up to four Gigabit Ethernet ports at
full line rate, as many times as requested. Each port can have its own rate
limit and inter-packet delay. At the same time, the design timestamps every
frame that arrives on the four ports and hands it to the host, which can write
it back out as a capture file. With the generator off, the card behaves as an
ordinary four-port NIC.

The RTL is SystemVerilog (IEEE 1800-2017). Everything runs in one clock
domain, assumed to be 125 MHz (8 ns). At that clock a 64-bit word per cycle is
8 Gb/s inside the pipeline, and one byte per cycle is 1 Gb/s on a port.

## The pipeline

```
 MAC rx 0..3 ──► timestamp ──► MAC RxQ ┐
 host  tx 0..3 ──────────────► CPU RxQ ┤  8 receive queues (rx_queue)
                                       ▼
                               input_arbiter        round robin, whole packets
                                       ▼
                               output_port_lookup   MAC i <-> CPU i
                                       ▼
                               packet_capture       statistics, strip timestamps
                                       ▼
                               output_queues        12 queues in one packet memory
                                       ▼              (8 normal + 4 PCAP)
                               pktgen_output_select 12 queues -> 8 ports
                                       ▼
                  8 x  rate_limiter ─► delay_module ─► tx_queue
                                       ▼
                   MAC tx 0..3 (even ports)   host rx 0..3 (odd ports)
```

Ports are numbered as in the reference NIC. Port 2i is MAC i and port 2i+1
is CPU (host DMA) queue i. `pg_registers` holds every setting and counter
and is reached over a small register bus. `packet_generator_top` wires it
all together. Its ports are the four MAC streams in each direction, the four
host DMA streams in each direction, and the register bus.

The Ethernet MACs, the PCI/DMA engine and the external SRAM controller of the
card are not part of this RTL. Their streams appear as ports. The packet
memory is an on-chip array of the same size as the card's SRAM.

## Packets inside the pipeline

Every stream is a valid/ready handshake carrying a `pg_pkg::pkt_word_t`:

| field       | bits | meaning                                                   |
|-------------|------|-----------------------------------------------------------|
| `kind`      | 2    | `W_HDR` module header, `W_TS` timestamp, `W_DATA` frame   |
| `eop`       | 1    | last word of the packet                                   |
| `nbytes_m1` | 3    | valid bytes in the last word, minus one                   |
| `data`      | 64   | payload, first byte in bits 63:56                         |

At the ports a packet is just its `W_DATA` words, ending with an `eop` word.
Inside the pipeline, every packet starts with one header word. A receive
queue adds this header once it has seen the whole packet:

| bits  | field      | set by                                               |
|-------|------------|------------------------------------------------------|
| 63:48 | `dst`      | one-hot output port, written by `output_port_lookup` |
| 47:32 | `word_len` | words after the header, timestamp included           |
| 31:16 | `src`      | source port index                                    |
| 15:0  | `byte_len` | frame bytes, timestamp not counted                   |

A frame received on a MAC port also carries a `W_TS` word right after its
header. That word holds the time of arrival in nanoseconds.

## Output queues: where replay happens

`output_queues` is the core of the generator. It keeps twelve queues in one
memory of `2^ADDR_W` words (default 2^19 = 512K words of 70 bits). Each queue
owns the region `[q_lo, q_hi]`, and software sets these bounds. By default
the memory is split evenly, 43690 words per queue. Software can instead size
the PCAP queues to the files it loads and give the rest to receive traffic.
After changing regions, write the "empty all queues" command.

- **Queues 0–7** are ordinary circular FIFOs, one per output port. Words are
  freed as they are read.
- **Queues 8–11** are the PCAP queues of MAC ports 0–3. While bit i of
  `PCAP_LOAD` is set, a host packet addressed to MAC i is stored in queue
  8+i instead of queue 2i. Loading is therefore just the host sending the
  file's frames on CPU port i. A PCAP queue never frees words. While the
  generator is enabled, it reads from the start of its region to the last
  stored word, once per iteration, until `ITERATIONS` passes are done. Each
  rising edge of the global enable starts a new run from the first frame.
  When the enable falls, no new packet is started, but a packet already
  started is always finished.
- A packet that does not fit in the free space of its queue is dropped
  whole and counted. When a file is larger than its queue, only its first
  part is therefore kept.

On the read side, a round-robin scheduler picks one queue per cycle. A queue
is eligible when it has a word to read and its 4-word output FIFO has room.
The memory read takes one cycle, and the same queue is never picked on two
cycles in a row. One queue can therefore read up to 4 bytes per cycle
(4 Gb/s), and all queues together 8 bytes per cycle. Reads start before a
packet has been fully written (cut-through).

## Choosing the transmit queue, rate and delay

`pktgen_output_select` gives each MAC port either its normal queue (2i) or
its PCAP queue (8+i). It uses the PCAP queue while the global enable and the
port's `PCAP_PORTS` bit are both set. The choice changes only between
packets, so frames from the two queues never mix. One queue can transmit
while the other is being loaded. Host-bound ports always use their own
queue.

Every output port then passes through two shapers, which hold only the
header word of a packet. A packet that has started is never stalled by
them.

- `rate_limiter` is a token bucket counting in 1/256 byte. Each cycle it
  adds `RATE` to the credit, capped at a burst of 2048 bytes. A packet may
  start when the credit is not negative, and its `byte_len` is then
  subtracted. `RATE = 256` is 1 byte/cycle (1 Gb/s at 125 MHz), and
  `RATE = 128` is 500 Mb/s.
- `delay_module` makes consecutive packet starts at least `DELAY` clock
  cycles apart, measured from start to start. This fixes the spacing on the
  wire whatever the frame lengths, as long as `DELAY` is longer than a
  frame's time on the wire.

`tx_queue` then removes the header. It hands the frame to the MAC, or, on a
host port, the timestamp word and then the frame to the DMA engine.

## Capture and timestamps

`timestamp` keeps a 64-bit nanosecond counter. When a frame starts on a MAC
receive stream, it puts a `W_TS` word holding the current time in front of
the frame. `output_port_lookup` sends MAC i traffic to host queue i, so the
host sees every received frame through the normal output queues.

`packet_capture` looks at every packet. Capture is switched on per MAC port
(`CTRL` bits 4:1).

- **Capture on:** the frame keeps its timestamp. The block counts packets
  and frame bytes, and keeps the first and last timestamps. Capture time is
  the last timestamp minus the first.
- **Capture off:** the timestamp word is removed and the header's
  `word_len` is reduced by one. The host then sees plain frames, as from a
  NIC.

## Registers

The register bus takes a one-cycle request (`reg_req`, `reg_wr`,
`reg_addr` [11:0], `reg_wdata`). The answer comes the next cycle on
`reg_ack` and `reg_rdata`. All registers are 32 bits wide.

| address       | name          | meaning                                                  |
|---------------|---------------|----------------------------------------------------------|
| 0x000         | CTRL          | bit 0 global enable (start/stop sending); bit 1+i capture on MAC i |
| 0x001         | PCAP_LOAD     | bit i: host packets for MAC i go to PCAP queue i         |
| 0x002         | PCAP_PORTS    | bit i: MAC i sends from its PCAP queue while enabled     |
| 0x003         | COMMAND       | write bit 0: clear capture statistics; bit 1: empty all queues |
| 0x010 + 2q    | Q_LO q        | first memory word of queue q (0–11)                      |
| 0x011 + 2q    | Q_HI q        | last memory word of queue q                              |
| 0x030 + p     | RATE p        | credit per cycle, 1/256 byte (reset 256)                 |
| 0x038 + p     | RATE_EN p     | rate limiter on                                          |
| 0x040 + p     | DELAY p       | cycles between packet starts                             |
| 0x048 + p     | DELAY_EN p    | delay on                                                 |
| 0x050 + i     | ITERATIONS i  | passes over PCAP queue i per run                         |
| 0x080 – 0x083 | CAP_*         | captured packets, bytes, capture time in ns (low, high)  |
| 0x090 + i     | ITER_DONE i   | passes completed                                         |
| 0x0A0 + q     | STORED q      | packets written into queue q                             |
| 0x0B0 + q     | DROPPED q     | packets dropped at queue q                               |
| 0x0C0 + p     | SENT p        | packets sent by transmit queue p                         |

To replay a file on MAC i:

1. Optionally set the Q_LO/Q_HI regions, then write COMMAND = 2.
2. Set PCAP_LOAD bit i and send the frames on host port i.
3. Clear PCAP_LOAD. Set ITERATIONS i, and optionally RATE/DELAY and their
   enables for port 2i.
4. Set PCAP_PORTS bit i.
5. Write CTRL bit 0 to start. Clear it to stop.

## Performance and limits

- **Line rate.** A 43-frame, 25383-byte file replayed on one port, and then
  on two ports at once, kept each transmitter busy on every cycle from
  first to last byte. That is 1000 Mb/s of frame data per port. The MAC
  model takes one byte per cycle with no preamble or inter-frame gap, which
  is stricter than real Ethernet. The frame sizes in that test are invented;
  only the count and the total are fixed.
- **Four ports.** Four ports sending while four ports capture come to at
  most 0.996 memory reads per cycle, with 1518-byte frames and 20 bytes of
  preamble and gap per frame. That fits the single read port with almost no
  margin. In simulation, all four ports replayed full-size frames back to
  back while full-size frames arrived on all four. No transmitter ever
  waited for data, which is 987 Mb/s of frame data per port (1000 Mb/s with
  the overhead). The receive side never fell more than one word behind, and
  every captured timestamp was exactly one frame time (12304 ns) after the
  one before.
- **Repeatability.** The same file was replayed ten times with a 12.8 µs
  delay between packet starts. Every frame arrived at the same time,
  relative to its run's first frame, in all ten runs.
- **Spacing accuracy.** The delay and rate modules act exactly on the
  header word. On the MAC side, a frame's first data word can trail its
  header by one cycle more or less, depending on the memory's read turns.
  Packet spacing on the wire is therefore exact to within one clock (8 ns).
- **Memory.** The default 512K-word memory is an assumption, taken from
  the size of the SRAM on the original card. A smaller `OQ_ADDR_W` shrinks
  it. At 70 bits a word that is 36.7 Mbit, far more than the block RAM of
  an FPGA of the original card's size. For such a device, replace the array
  in `output_queues` with an external SRAM controller. If its reads take
  more than one cycle, the per-queue output FIFOs must grow to cover the
  extra words in flight.

## What is this design's own

The block structure and the order of the blocks follow the published
packet generator:

- a timestamp stage in front of the MAC receive queues;
- a round-robin arbiter over eight queues onto a 64-bit path;
- a NIC output port lookup and a packet capture stage;
- twelve register-sized output queues;
- a 12-to-8 output select;
- a rate limiter and a delay stage on each of the eight ports;
- registers for delay, rate, iterations, per-block enables and a global
  enable.

The following are choices of this implementation:

- the word tags and the header layout;
- store-and-forward receive queues with backpressure instead of dropping;
- how PCAP data is loaded (through the host ports with `PCAP_LOAD`);
- the replay and restart rules;
- the drop-when-full policy;
- the read scheduling;
- the token-bucket rate unit and the start-to-start delay;
- the register map and bus;
- the 125 MHz and nanosecond time base.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/pg_pkg.sv tb/tb_packet_generator_top.sv --top-module tb_packet_generator_top
./obj_dir/Vtb_packet_generator_top
```

- `tb_packet_generator_top` runs the whole design at its default sizes. It
  covers capture with and without timestamps, NIC transmit, a drop, PCAP
  load and replay with a rate limit on one port and a delay on another, and
  the return to normal transmit. It counts that each of these mechanisms
  happened.
- `tb_workload_pcap_replay` is the line-rate replay test described above.
- `tb_workload_replay_timing` is the ten-run repeatability test.
- `tb_workload_four_port` is the four-port generation and capture test.

The other testbenches are named `tb_<module>`.

Because the Verilator simulator has only two states, every register that
is read is reset. Packet memories are not reset; the queue pointers are.
