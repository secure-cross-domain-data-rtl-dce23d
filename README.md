# FPGA cross-domain guard: JSON-validating data diodes between two virtual machines

Two virtual machines (VM0 and VM1) run on the CPU cores of a Zynq-class SoC under a separation
hypervisor, each trusted at a different level. This design lets them exchange data only through
the FPGA fabric. The fabric checks every message against a grammar (JSON here) and throws away any
message that fails the check. Nothing has to be trusted in the hypervisor's software switch: the
only path between the domains is hardware that admits well-formed data and nothing else.

The RTL has two independent transfer paths:

* **Secure Transfer Link (STL)**, memory-mapped. Each direction is a one-way *data diode*:

  ```
  sender VM --AXI--> Memory Guard --> origin BRAM <-- Data Validator --> destination BRAM <-- Memory Guard <--AXI-- receiver VM
  ```

  The sender can only write into the origin buffer, and the receiver can only read out of the
  destination buffer. The Data Validator is the only agent that touches both buffers. It copies a
  message across only if the message parses as JSON. Two such links in opposite directions give
  VM0 → VM1 and VM1 → VM0.
* **Fixed link**, Ethernet. The GMII of two gigabit MACs (one per VM) are wired to each other
  through one packet filter per direction. The filter checks the Ethernet, IPv4 and UDP/TCP headers,
  runs the transport payload through the same JSON automaton, and drops a frame that fails.

Each STL direction and each filter has a **validation** mode and a **passthrough** mode.
Passthrough forwards everything and serves as the measurement baseline.

## Files

| file | contents |
|---|---|
| `rtl/stl_pkg.sv` | AXI4-Lite request/response structs, mailbox constants, mode enum |
| `rtl/json_pda.sv` | JSON push-down automaton, one byte per clock |
| `rtl/axil_mem_port.sv` | AXI4-Lite subordinate to RAM-port adapter |
| `rtl/stl_bram.sv` | dual-port shared BRAM, one AXI4-Lite port per side |
| `rtl/memory_guard.sv` | per-segment, per-core AXI access filter with honeypot |
| `rtl/axil_single_master.sv` | one-transfer-at-a-time AXI4-Lite manager used by the validator |
| `rtl/data_validator.sv` | origin → destination mover with JSON check, drop and clear |
| `rtl/stl_link.sv` | one data diode: guard, BRAM, validator, BRAM, guard |
| `rtl/packet_validator.sv` | GMII packet filter for the fixed link |
| `rtl/cds_top.sv` | top: two STL directions and two fixed-link filters |
| `tb/json_ref.sv`, `tb/eth_frames.sv`, `tb/axil_bfm.sv` | reference JSON checker and generator, frame builder, AXI bus-functional model |
| `tb/tb_<block>.sv` | self-checking testbench per block; `tb_cds_top` runs the whole design |

## The mailbox protocol of the STL

This is the part a software writer must get right. Word 0 (byte address 0) of each BRAM is a
mailbox: bit 31 is FULL and bits 15:0 hold the message length in bytes. The payload starts at byte
address 4. One message is at most 4092 bytes at the default BRAM size; the intended use is up to
1472 bytes.

1. **Start-up.** BRAM contents are not reset. Software writes 0 to both mailboxes of a link, then
   raises that link's `stl_enable` bit. Until then the validator does nothing.
2. **Send.** The sender writes the payload words, then writes the origin mailbox with
   `FULL | len`.
3. **Transfer.** The validator polls the origin mailbox until it is FULL. It then polls the
   destination mailbox until it is empty, which is the receiver's back-pressure. Next it copies the
   payload word by word. In validation mode it feeds every byte of a word to the automaton before
   writing that word to the destination.
4. **Accept.** If the message is one complete JSON value, the validator writes the destination
   mailbox with `FULL | len` and clears the origin mailbox. The sender may then send again.
5. **Drop.** A message is dropped if any of these hold:
   * the automaton reports an error;
   * the message ends in the middle of a value;
   * the length is zero or larger than the buffer.

   On a drop the validator overwrites the payload in the origin buffer with zeros, and does the same
   for the words it has already written to the destination. It clears the origin mailbox and raises
   `stl_drop_irq`, which stays high until `stl_drop_ack`. The destination mailbox is never set for
   a dropped message, so a receiver never sees one, even in part.
6. **Receive.** The receiver polls the destination mailbox. When it is FULL, the receiver reads the
   payload and writes 0 to the mailbox.

Words are written to the destination as soon as they are checked. This leaves no unchecked data
there, and the FULL bit is the only thing a receiver trusts. The drop path removes the partial copy.

### Memory Guard permissions in a link

The guard reads the originating CPU core from the AXI user sideband (`aw_user`/`ar_user`, 2 bits,
4 cores). In `stl_link` the segment map is:

| guard | segment | read | write |
|---|---|---|---|
| origin (sender side) | mailbox, payload | sender core | sender core |
| destination (receiver side) | mailbox | receiver core | receiver core |
| destination (receiver side) | payload | receiver core | — |

Any other access is a violation:

* a wrong core;
* a write the map does not allow;
* an address outside the segments.

With `HONEYPOT_EN=1` (the default) a violation is served by a 16-word private RAM inside the guard
and answered OKAY. The offender therefore cannot tell that it was refused, and the protected BRAM is
never touched. With `HONEYPOT_EN=0` a violation is answered SLVERR. Each violation pulses
`stl_tx_violation`/`stl_rx_violation` and records address, core and direction.

## The JSON automaton

`json_pda` is a hand-written push-down automaton for RFC 8259 JSON. Its parts are:

* a finite control that recognises strings (with escapes and `\uXXXX`), numbers and the literals
  `true`, `false` and `null`;
* one stack bit per nesting level, 1 for object and 0 for array.

`{` and `[` push; `}` and `]` pop and must match the top of the stack. A number has no closing
character. It ends at the first byte that cannot continue it, and that same byte is handled in the
same cycle as the byte after a value.

The automaton takes one byte per clock and never stalls. `error_o` is sticky. `accept_o` means
"exactly one complete value so far". The default stack depth is 16 levels, one more than the
deepest test data (15). Deeper nesting is an error, and `overflow_o` says why. Bytes 0x80 and above
are accepted inside strings without UTF-8 decoding.

## The packet filter

`packet_validator` sits on the GMII (8-bit data at 125 MHz for 1 Gb/s). A frame can only be
judged after its last payload byte. Validation mode is therefore **store-and-forward** with two
2048-byte frame buffers: the transmitter sends one buffer while the receiver fills the other.

* Checks run on the fly as bytes arrive:
  * EtherType 0x0800;
  * IPv4 version 4 and IHL ≥ 5;
  * a sane total length;
  * not a fragment;
  * a correct header checksum;
  * protocol 17 or 6;
  * UDP length = IP payload length, or TCP data offset ≥ 5.
* Transport payload bytes, up to the IP total length, go to a `json_pda`.
* A frame with `rx_er` is dropped.
* The FCS is not checked; the receiving MAC does that.
* Non-IPv4 traffic, including ARP, is dropped in validation mode. In practice the two stacks need
  static ARP entries.
* A frame that arrives while both buffers are busy is dropped and counted in `fix_overflow_cnt`.
  This happens only when a long frame is followed immediately by two more.
* Frames leave in arrival order, with at least 12 idle clocks between them.

Passthrough mode is a single register stage from input to output, so every frame passes with one
clock of latency. A mode change is applied only when the filter is idle, so a frame is never cut.

## Top level, clocks and reset

`cds_top` has two clock domains that share no signal:

* `clk`/`rst_n`: the fabric clock of the STL, 100 MHz intended;
* `gmii_clk`/`gmii_rst_n`: the GMII clock of the fixed link.

Reset is asynchronous and active low. The four STL AXI4-Lite ports (`vm0_tx`, `vm1_rx`, `vm1_tx`,
`vm0_rx`) are where the processing system's interconnect connects. The MAC GMII signals are plain
ports. VM0 is taken to be pinned to core 0 and VM1 to core 1 (`VM0_CORE`, `VM1_CORE`).

Parameters of the top, all with defaults:

| parameter | default | meaning |
|---|---|---|
| `BRAM_BYTES` | 4096 | size of each STL buffer |
| `MAX_DEPTH` | 16 | JSON nesting the automata accept |
| `FRAME_BYTES` | 2048 | size of each frame buffer in the filters |
| `VM0_CORE`, `VM1_CORE` | 0, 1 | CPU core numbers that the guards trust |
| `HONEYPOT_EN` | 1 | divert violations to the honeypot instead of SLVERR |

## Timing and performance

In simulation at the default parameters, `tb_cds_top` reports:

* a 1472-byte JSON message crosses one Data Validator in about 4430 clocks. That is 44 µs at
  100 MHz, or about 266 Mb/s of validated data. Each 32-bit word costs a 4-clock read, 4 clocks of
  automaton feeding and a 4-clock write.
* a full STL round trip of a typical 120-byte record (VM0 → VM1 → VM0) takes about 1000 clocks.

The size sweep gives the round-trip times below. An STL round trip includes the bus-model
"software":

* writing the payload;
* polling the mailboxes;
* reading the message back;
* echoing it on the other link.

A fixed-link round trip includes both frame times and both store-and-forward delays.

| message bytes | STL validation (100 MHz clocks) | STL passthrough | fixed link validation (125 MHz clocks) |
|---:|---:|---:|---:|
| 1 | 96 | 88 | 334 |
| 16 | 216 | 184 | 334 |
| 64 | 696 | 568 | 518 |
| 256 | 2616 | 2104 | 1286 |
| 512 | 5176 | 4152 | 2310 |
| 1024 | 10296 | 8248 | 4358 |
| 1472 | 14776 | 11832 | 6150 |

Validation costs about 20% of STL bandwidth at 1472 bytes. This is the cost of feeding the
automaton four bytes per word.

On a real system, host software polling and the operating system's network stack dominate the
measured times. The automaton alone accepts 800 Mb/s at
100 MHz, well above the 24 Mb/s of the HLS-generated parser that the original system used. The
filter adds one frame time of store-and-forward latency in validation mode, and one clock in
passthrough. No FPGA timing closure has been run.

## Where this RTL departs from, or fills in, the published design

* The original JSON validator was generated by high-level synthesis from compressed grammar tables.
  Those tables are not available, and `json_pda` is a hand-written equivalent for JSON only. It is
  not grammar-generic.
* The original did not specify these, and they are choices made here:
  * the mailbox layout and the back-pressure rule;
  * the order of checking and writing;
  * dropping an incomplete message;
  * the length check;
  * the scope of clearing (message payload only).
* The Memory Guard's encoding of the core ID (AXI user bits), its segment map, its honeypot size
  and its SLVERR-without-honeypot behaviour are assumptions.
* All memory-mapped ports are AXI4-Lite, with single 32-bit transfers and no bursts. A processor
  port that issues AXI4 bursts needs an AXI4-to-AXI4-Lite converter in front of each guard. The
  Data Validator ignores error responses from the BRAMs, which never send them.
* The header checks of the packet filter, its two-buffer store-and-forward scheme and its overflow
  policy are assumptions. The original only says that headers are validated and that failing
  packets are dropped.
* How software sets the modes, enables and acknowledgements (a register block on another AXI port)
  is not designed. These are plain top-level inputs.
* The processing system, the hypervisor, the VMs and the Ethernet MACs are outside the RTL. The
  testbenches replace them with an AXI4-Lite bus-functional model and with GMII frame drivers and
  monitors.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and ends with
`$finish`, and a watchdog stops a hung run. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/stl_pkg.sv tb/json_ref.sv tb/eth_frames.sv tb/tb_cds_top.sv \
  --top-module tb_cds_top -o sim
./obj_dir/sim
```

Replace `tb_cds_top` with `tb_json_pda`, `tb_stl_bram`, `tb_memory_guard`, `tb_data_validator`,
`tb_stl_link` or `tb_packet_validator` to test a single block.

The testbenches do the following:

* `tb_json_pda` compares the automaton with a recursive-descent reference on hand-written cases and
  on random documents of depth 0 to 15, with single-byte corruptions.
* `tb_stl_bram` checks both ports, byte strobes and same-clock write collisions.
* `tb_memory_guard` checks that:
  * allowed accesses pass;
  * denied accesses land in the honeypot and leave the memory unchanged;
  * out-of-range accesses are denied;
  * the violation report is correct.
* `tb_data_validator` checks delivery, the drop and clear of the BRAMs, the drop interrupt, length
  errors, back-pressure and passthrough.
* `tb_stl_link` drives the mailbox protocol through the guards from both cores, including illegal
  accesses.
* `tb_packet_validator` checks that:
  * good UDP and TCP frames are forwarded byte-exact;
  * each broken header field, `rx_er` and bad JSON cause a drop;
  * an oversize frame and a buffer overflow are handled;
  * passthrough has one-clock latency;
  * a mode switch is applied between frames.
* `tb_cds_top` runs the whole top at its default parameters:
  * round trips on both STL directions in both modes, message sizes 1 to 1472 bytes, JSON depths 1
    to 15;
  * a dropped message, a guard violation and receiver back-pressure;
  * UDP echo over both fixed-link directions, with a drop, an overflow, passthrough and a mode
    switch.

  It counts each of these events and fails if one never happened.
