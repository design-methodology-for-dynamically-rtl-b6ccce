# Self-reconfiguring spreading stage for an MC-CDMA transmitter

An FPGA region can be rewritten while the rest of the chip keeps running.
This design uses that to put two spreading operators of an MC-CDMA
transmitter, a size-4 and a size-8 fast Hadamard transform (fht4, fht8),
into the same area of silicon. Only one of them exists at a time. Each
frame of modulated samples carries a condition that says which spreading
factor it needs. When that differs from what the region holds, the static
logic around the region loads the other operator's partial bitstream from
external memory. It writes the bytes through the FPGA's internal
configuration port (ICAP), one per clock.

A reconfiguration is slow. At 50 MHz a 220 KB partial bitstream takes
about 4.5 ms. A frame takes about a hundred cycles. So the design starts a
reconfiguration as early as it can, which is the moment the previous
operation finishes. The load then overlaps the link transfers that have to
happen anyway. This is configuration prefetching. The controller also
never reloads the operator that is already in place.

The RTL covers the dynamic part of a Xilinx Virtex-II (XC2V2000) design in
its self-reconfiguring form, and everything around the region. The
reconfigurable region is modelled in RTL as well (see
[The region](#the-region-op_dyn)).

## Block structure

```
            internal link in                         internal link out
                 |                                          ^
             recv_li --> buffer X        buffer Y --> send_li
                            |                ^
                            v                |
   cond -->  config_manager <---> control_op_dyn <--- computation_control
                |     ^  state          | enable/ready        (semaphores)
      requests  v     | ack             v
           protocol_config_builder    op_dyn  (fht4 | fht8)
              |            |             ^
         mem_* (bitstream) icap_* ------(region contents)
```

| Module | Role |
|---|---|
| `drs_top` | Wires everything. External memory and ICAP are reached through ports. |
| `computation_control` | Runs the frame loop: receive into X, operate X to Y, send Y. Two semaphores, `x_full` and `y_full`, order the steps. |
| `control_op_dyn` | The single control process for the region. It waits for the region, raises `enable`, moves samples from X to the operator and results to Y, and reports completion. |
| `config_manager` | Decides when to reconfigure. It knows what the region holds and what the next operation needs. |
| `protocol_config_builder` | Streams a partial bitstream from memory into ICAP using the SelectMAP byte-write protocol. |
| `op_dyn` | The reconfigurable region. It shows one operator, or nothing while it is being rewritten. |
| `fht` | Hadamard transform operator of size N behind the uniform operator interface. |
| `global_buffer` | Buffer that packs 8, 16 or 32-bit elements. Used for X and for the merged buffer Y. |
| `recv_li`, `send_li` | Link endpoints that move frames into and out of the buffers. |
| `drs_pkg` | Operator ids, width modes, bitstream sizes and addresses, and buffer-size functions. |

## When the region is reconfigured

This is the part most worth understanding before changing anything.

`config_manager` holds three things:

- `loaded`, plus `loaded_valid`: the operator the region holds.
- `target`, plus `target_valid`: the operator that the next, not yet
  started, operation needs.
- `op_running`: whether an operation is running on the region.

The rules are:

1. A condition value (`cond`, 0 for fht4 and 1 for fht8) is accepted only
   when no target is pending (`cond_ready = !target_valid`). The target of
   an operation is consumed when that operation starts (`op_start`). So the
   condition of frame *i+1* can be accepted while frame *i* is running.
2. A request goes to the builder only when there is a target, no operation
   is running, and the target differs from what is loaded. If an operation
   completes in the same cycle, it counts as not running. The request
   therefore leaves on the cycle right after `op_complete`.
3. While a request is outstanding, `region_ready` is low. `control_op_dyn`
   holds a started operation in its `WAIT_REGION` state (`op_waiting` is
   high) until `region_ready` rises. `region_ready` means the region holds
   the target and no reconfiguration is in progress.
4. If the same operator follows, nothing is requested, and the next
   operation can start as soon as its data is in buffer X.

After reset the manager assumes the region holds no known operator. The
first frame therefore always causes a load. On the device the full
bitstream loaded at power-up does put some operator in the region, but
which one is unknown. If you know it, set `loaded`/`loaded_valid` at reset.

The cost that prefetching cannot hide follows from the timing. Take an
operation k that needs a different operator from operation j before it.
Its extra delay is roughly

    R_k - D_{j,k}

- `R_k` is the load time, `PART_BS_BYTES + 2` cycles.
- `D_{j,k}` is the time from the end of j to the moment k could otherwise
  start. Here that is the reception of the next frame over the link.

With real bitstream sizes, `R_k` is vastly larger than the link time. The
full-size testbench measures this. For the second frame, R = 225,282
cycles and D = 67 cycles (receiving a 64-sample frame). The operation
waits 225,217 cycles, which equals R - D within the few cycles of
handshake.

## Loading a partial bitstream

`protocol_config_builder` accepts a request when it is idle
(`req_valid`/`req_ready`). It then does the following:

- It drives `icap_write_n` low for the whole load and raises `region_busy`.
  The region reports itself unconfigured from then on.
- It issues one memory read per cycle, from `FHT8_BASE` or `FHT4_BASE`
  upward. The memory returns each byte one cycle after `mem_rd`. The byte
  goes out on `icap_i` one cycle later, with `icap_ce_n` low.
- After the last byte it releases ICAP and pulses `region_load` with the
  operator id, which updates `op_dyn`. It also pulses `cfg_ack` to the
  manager.

From the accepted request to `cfg_ack` takes exactly `BS_BYTES + 2`
cycles. With the default 225,280 bytes that is 225,282 cycles, or 4.506 ms
at 50 MHz. ICAP `BUSY` is not used: on this device family it matters only
for readback. The builder sends the stored bitstream byte for byte,
without reordering bits. Sync words, frame addresses, CRC and any bit
swapping the port needs must already be in the stored file.

Default memory layout, in bytes: full bitstream (915 KB) at 0, fht8
partial (220 KB) at 936,960, fht4 partial (220 KB) at 1,162,240, with a
21-bit address. Contiguous placement in this order is a choice of this
design.

## The region (`op_dyn`)

On silicon only the loaded operator exists in the region. Its signals
(`enable`, `ready`, data in, data out) cross into the static part through
a fixed bus macro. An RTL simulation cannot swap logic, so `op_dyn`
contains both `fht` instances. The one that is not loaded is held disabled
and its outputs are masked. The static part therefore sees exactly what it
would see on the device: the loaded operator, or an inert region
(`in_ready`, `out_valid` and `ready` all low) while `cfg_busy` is high or
before the first load. An assertion flags `enable` on an inert region.

For synthesis on a partially reconfigurable flow, take `fht #(.N(4))` and
`fht #(.N(8))` as the two reconfigurable modules behind the
`op_dyn` port list. Leave the selection logic out.

## The operators (`fht`)

Each operator takes groups of N 16-bit signed samples x[0..N-1]. For each
group it produces N 32-bit signed chips:

    y[k] = sum_n (-1)^popcount(k & n) * x[n]

This is a Walsh-Hadamard transform in natural order, without
normalisation. The chips are computed by log2(N) stages of add/subtract
butterflies when the last sample of a group arrives. The operator loads N
samples, one per cycle (`in_ready` high). It then emits N chips, one per
cycle, with `out_valid` high and no back-pressure. A group therefore takes
2N cycles at full input rate, and a frame of `FRAME` samples takes
2·`FRAME` cycles. `ready` rises after the last chip of the frame. It stays
high until `enable` falls, which also resets the operator.

## Buffers and buffer merging

Buffers whose data lifetimes do not overlap can share one memory. The
fht4 results, the fht8 results and the selected output are all "buffer Y"
here. A merged buffer needs only max(D_k · W_k) bits, not their sum.
`global_buffer` reaches exactly that size for any mix of widths. It stores
bytes in 32-bit words with byte enables. An element of width W at index i
occupies bytes i·W/8 onward. Addresses are element indices in the width
chosen per access (`W8`, `W16`, `W32`). Reads return one cycle after `re`,
zero-extended, and hold while `re` is low. An assertion catches accesses
past the end.

With the defaults (`FRAME` = 64), buffer X holds 64 × 16 bits = 1,024
bits. Buffer Y holds max(64 × 32, 64 × 32, 64 × 32) = 2,048 bits; unmerged,
it would need 6,144.

## Frame sequencing

`computation_control` repeats the loop forever:

- Reception of a frame starts when X is empty and no operation is running
  (X is being read during an operation).
- The operation starts when X is full and Y is empty.
- Sending starts when Y is full.

Reception of frame *i+1* therefore overlaps with sending frame *i* and
with any reconfiguration started after operation *i*. All handshakes
between the steps are single-cycle pulses.

## Interfaces of `drs_top`

| Port group | Protocol |
|---|---|
| `li_in_*` | valid/ready, 32-bit words. A sample is in bits 15:0; bits 31:16 are ignored. `FRAME` words make one frame. |
| `li_out_*` | valid/ready, 32-bit signed chips in transform order, `FRAME` per frame. |
| `cond_*` | valid/ready, one `op_id_t` per frame, in frame order. The value for frame *i+1* is accepted once frame *i* has started. |
| `mem_*` | byte-wide synchronous read, one-cycle latency. |
| `icap_*` | SelectMAP write subset: `icap_write_n` low per load, `icap_ce_n` low per byte. |
| status | `reconfiguring`, `region_configured`, `region_loaded`, `buf_x_full`, `buf_y_full`, `op_waiting`. |

Reset `rst_n` is asynchronous and active low throughout. The design uses
one clock (50 MHz in the target implementation).

Parameters of `drs_top`:

| Parameter | Default | Origin |
|---|---|---|
| `FRAME` | 64 | own choice; must be a multiple of 8 |
| `PART_BS_BYTES` | 225,280 | the 220 KB partial bitstreams of the implementation |
| `MEM_ADDR_W` | 21 | own choice, covers full + two partial bitstreams |
| `FHT8_BASE`, `FHT4_BASE` | 936,960 / 1,162,240 | own layout after the 915 KB full bitstream |

## How far to trust it, and where it departs from the source design

Taken from the source design:

- the split into configuration manager and protocol configuration
  builder;
- the rule "request only after an operation completes, and only for a
  different operator";
- the `enable`/`ready` operator encapsulation with a single control
  process for the region;
- buffer merging with X = {A} and Y = {B, C, D};
- the operator pair fht4/fht8 selected by a condition;
- the ICAP self-reconfiguration at one byte per 50 MHz cycle;
- the bitstream sizes.

Choices made here, where the source says nothing:

- the frame length, the sample and chip widths, and the link protocol;
- the Hadamard-transform arithmetic and its serial interface;
- the handshakes between the control blocks, the reset state of the
  region, and the bitstream memory layout.

Known departures:

- **Next operator from an input, not a table.** The source generates the
  configuration manager from a fixed sequence of operations. Here the
  sequence depends on data, so the manager takes the next operator from
  `cond`.
- **Both operators in the region.** `op_dyn` contains both operators; see
  [The region](#the-region-op_dyn).
- **Merged control processes.** Communication and computation sequencing
  are one block, `computation_control`.
- **Not included:**
  - The fixed part of the FPGA: interleaving, IFFT, and the link to the
    DSP. Its internals are not described, so the link ports of `drs_top`
    are where it attaches.
  - The DSP and CPLD variant of reconfiguration. There, the request and
    acknowledge signals go to a processor, and loading one operator takes
    about 75 ms.
  - ICAP and the bitstream memory. They exist in `tb/` only as
    behavioural models.

Verification status: each module has a self-checking testbench with
reference values computed in the testbench. The transforms are checked
against their definition. Bitstream loads are checked for length, start
address and byte order with a checksum, and for cycle count. The
end-to-end testbench (`tb_drs_top`, 16-sample frames, 300-byte bitstreams)
runs 12 frames with a mix of fht4 and fht8. It checks every chip and
requires each of the following to occur:

- a reconfiguration;
- a skipped reconfiguration;
- a load overlapping link traffic;
- an operation waiting for the region;
- back-pressure on both links.

`tb_drs_top_full` runs two frames with every parameter at its default. It
performs two full 220 KB loads and checks each at 225,282 cycles. Nothing
has been run on an FPGA.

## Simulating

All files are SystemVerilog-2017. `drs_pkg.sv` must come first. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/drs_pkg.sv tb/bs_pattern_pkg.sv tb/tb_drs_top.sv --top-module tb_drs_top
./obj_dir/Vtb_drs_top
```

Swap in any other `tb/tb_*.sv` and its module name the same way. Each
testbench prints one `TB_RESULT checks=N failures=M` line and has a
watchdog. The full-size run (`tb_drs_top_full`) simulates about 450,000
cycles and takes a few seconds. `tb/icap_model.sv` and
`tb/bitstream_memory_model.sv` are the behavioural stand-ins for the
external parts. The memory returns a fixed address-derived pattern
(`tb/bs_pattern_pkg.sv`), not a real bitstream.

To change the frame length, set `FRAME` on `drs_top`. Buffer sizes and
address widths follow from it. To use other bitstream sizes or locations,
set `PART_BS_BYTES`, `MEM_ADDR_W` and the two base addresses. The
builder's elaboration-time check rejects layouts that do not fit the
address width.
