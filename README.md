# Continuous bunch-by-bunch capture into DDR2 SDRAM

This RTL records every bunch of a 500 MHz particle-accelerator bunch train,
without gaps, into a DDR2 SDRAM on an FPGA board. The memory is a 64 MByte
circular buffer, which holds about 67 ms of history. Two 12-bit ADCs each
sample at 250 Msps, half a clock apart, and together they see every bunch.
Each sample is stored as a 16-bit value, so the data arrive at 1.0 GByte/s,
indefinitely.

The DDR2 part has a 32-bit data bus at 200 MHz, so its raw bandwidth is
1.6 GByte/s. On paper that leaves headroom. In practice the headroom is
small, for two reasons:

- The memory controller shares the DDR with an embedded processor.
- A 256-byte burst through the controller's native port (NPI) takes 225 ns,
  not 160 ns. That gives at most 1.138 GByte/s.

Because the margin is so thin, the interesting parts of this design are how
data are batched into bursts and how the memory controller's arbiter
divides DDR time between the capture path and the processor.

## Data path

```
 ADC0 ─┐            250 MHz domain             │           200 MHz DDR domain
 ADC1 ─┴─ adc_packer ── burst_fifo (write) ────┼── burst_fifo (read) ── npi_burst_ctrl ── npi_write_fifo ──► DDR controller
          2 x 16-bit    32-bit words,          │   64-bit entries        fill 32 beats,      2 bursts deep       (outside)
          lanes          1.0 GByte/s           │                         then request           ▲
                                               │                              │ npi_req         │ mc_wr_pop
                                               │                         mpmc_arbiter ◄── plb_req (processor)
                                               │                              └── mc_start / mc_port / mc_addr ──►
```

`my_npi_core` groups `burst_fifo` and `npi_burst_ctrl`. `bbb_daq_top` wires
everything together. The DDR2 controller/PHY, the DDR2 chip, the processor
and the ADCs are not part of the RTL. Their connections are the top's ports.

### Rate budget (at 200 MHz)

| quantity | clocks | bytes | rate |
|---|---|---|---|
| ADC input, per 256 bytes | 51.2 | 256 | 1.0 GByte/s |
| burst FIFO to write FIFO, one burst | 35 | 256 | 1.46 GByte/s |
| DDR write burst, start to next start | 45 | 256 | 1.138 GByte/s |
| processor single read | 12 | – | – |
| round-robin: burst + read | 57 | 256 | 0.90 GByte/s: too slow |
| NPI first: 2 bursts + 1 read | 102 | 512 | 1.004 GByte/s: keeps up |

The 45- and 12-clock transaction times belong to the memory controller, not
to this RTL. They reproduce the published spacings of 225 ns per burst,
285 ns per burst under round-robin, and 510 ns for two bursts plus one
read. The testbench controller model uses these numbers.

## Blocks

### adc_packer
`adc_packer` registers one sample from each ADC into its own 16-bit lane.
ADC 0, the earlier bunch, goes in bits 15:0. Keeping every sample in whole
bytes makes the memory image simple to read back. By default the unused
upper bits are zero. With `SIGN_EXTEND=1` they copy the sign bit instead,
for two's-complement converters. `ADC_BITS` may be set up to 16 for a
16-bit converter, and `NUM_ADC` sets the number of lanes.

### burst_fifo: clock crossing and slack
The FIFO is written with one 32-bit word per 250 MHz clock. It is read
64 bits at a time at 200 MHz. A 32-bit read side would manage only
0.8 GByte/s, so the read side must be 64 bits wide.

- **Gearbox.** A two-word gearbox forms each 64-bit entry. The earlier word
  goes in the low half, so the bytes land in DDR in sample order.
- **Clock crossing.** Read and write pointers cross the clock domains
  Gray-coded, through two-flop synchronisers. `rd_count` and `wr_count` are
  therefore conservative: each side may see the other's progress up to
  about three clocks late.
- **Read latency.** Reads behave like block RAM: `rd_data` is valid one
  clock after `rd_en`.
- **Realign.** `wr_realign` abandons a half-collected entry, so the next
  word starts a new entry.
- **Full flag.** If the FIFO is ever full when an entry completes, that entry
  is dropped and `full_latched` is set. The flag stays set until
  `clear_latch`. A clear `full_latched` after a capture shows that the
  buffer is continuous.

The FIFO's depth is its slack: how long the arbiter may hold off the
capture path before data are lost. The default depth is 2048 × 64 bit
(16 KByte). At the 1 GByte/s input rate with zero drain, that fills in
about 16 µs. `WR_W=64` builds the variant with a 64-bit input port
(`my_npi_core` `IN_W=64`, `bbb_daq_top` `NUM_ADC=4`).

### npi_burst_ctrl: one burst at a time
The controller is a state machine in the DDR clock domain. Its main cycle has three states:

1. **IDLE.** Wait until the burst FIFO holds a whole burst and the write
   FIFO has room for one. A burst is 32 entries: 64 words of 32 bits, or
   256 bytes.
2. **FILL.** Read 32 entries and push each into the write FIFO. This takes
   33 clocks, because each push comes one clock after its read.
3. **REQ.** Hold `npi_addr_req` with the burst's byte address until the
   arbiter grants it. Then advance the address by 256 and return to IDLE.

The write FIFO holds two bursts. The next burst can therefore be filled
while the memory controller is still writing the previous one. Throughput
is then limited by the controller (45 clocks per burst), not by the fill
(35 clocks).

Addresses go round a circular buffer of `BUF_BYTES` (64 MByte) that starts
at `BASE_ADDR`.

- When the buffer wraps, `wrapped` is set.
- A rising `capture_en` restarts at `BASE_ADDR` and clears `burst_count`
  and `wrapped`. It also sends the controller through a fourth state,
  **DROP**, which discards what the burst FIFO still holds from the
  previous capture. At that moment no sample of the new capture can be
  counted yet: samples pass through the ADC-domain synchroniser, the packer
  and the pointer synchroniser first.
- After a stop, the newest data end just below `next_addr`. Once `wrapped`
  is set, the oldest data start at `next_addr`.

### npi_write_fifo
This is the controller-side staging FIFO: 64 entries of 64 bits, with a
show-ahead read. The controller pushes a whole burst before requesting. The
memory controller pops the burst's entries (`mc_wr_pop`) while it executes
the burst.

### mpmc_arbiter: why the scheme matters
A grant is given only while the memory controller is idle (`mc_ready`). It
lasts one clock, and the controller starts that port's transaction on the
same edge. The arbiter has two modes:

- **`ARB_ROUND_ROBIN`.** After a port is served, the next port in order gets
  top priority. When both ports keep requesting, bursts and processor reads
  alternate: 57 clocks per 256 bytes, below the input rate. The burst FIFO
  then fills at about 29 bytes per burst until it overflows. This mode
  cannot sustain continuous capture with the processor running.
- **`ARB_NPI_PRIORITY`.** The NPI port wins whenever it requests. The
  processor gets the DDR only while no burst is waiting, which works out to
  about one read per two bursts. Capture keeps up, and the burst FIFO only
  ever holds a little over one burst.

The processor's delay therefore depends on the capture load. A real
processor that needs more DDR time than the gaps left by the capture path
(for example, software driven by network traffic) would need a deeper burst
FIFO or a time-slot scheme. `NUM_PORTS` and `PRIO_PORT` are generic, so
more ports can be arbitrated.

## Top-level interface (`bbb_daq_top`)

| port | domain | meaning |
|---|---|---|
| `adc_clk`, `adc_rst_n`, `adc_samples[NUM_ADC][ADC_BITS]` | ADC | one sample per ADC per clock |
| `ddr_clk`, `ddr_rst_n` | DDR | 200 MHz |
| `capture_en` | DDR | high = capturing; rising edge starts a new buffer; synchronised to the ADC domain to gate samples |
| `arb_mode` | DDR | `ARB_ROUND_ROBIN` / `ARB_NPI_PRIORITY` |
| `full_latched`, `next_addr`, `burst_count`, `wrapped`, `fifo_level` | DDR | status |
| `plb_req`, `plb_addr`, `plb_rnw` → `plb_ack` | DDR | processor port: hold `plb_req` until `plb_ack` |
| `mc_ready` → `mc_start`, `mc_port`, `mc_addr`, `mc_rnw` | DDR | transaction start to the DDR controller (port 1 = NPI burst write, port 0 = processor) |
| `mc_wr_pop` → `mc_wr_data` | DDR | controller takes the 32 entries of an NPI burst |

Rules for the DDR controller connected to these ports:

- It lowers `mc_ready` from the clock after `mc_start` until it can accept
  the next transaction.
- For an NPI write, it pops exactly 32 entries.

A new capture may follow a stop without a reset. When a capture stops,
less than one burst is usually left in the burst FIFO, plus possibly half
an entry in its gearbox. On the next rising `capture_en`:

- The controller reads and discards the leftover entries before it accepts
  any new burst.
- The ADC side realigns the gearbox.

The new buffer therefore starts with new, correctly paired data.

## What follows the published design and what is this design's own

These points follow the published design:

- two 12-bit ADCs at 250 Msps, each sample in 2 bytes, packed into 32-bit
  words
- the dual-clock burst FIFO
- 64-word (256-byte) bursts through a 64-bit native port
- the fill-the-write-FIFO-then-request sequence
- the two arbitration schemes and their outcome
- the latched full flag
- the 64 MByte buffer and the 64-bit-input variant

These are this design's own choices:

- lane order and fill of the spare bits
- FIFO depths: the burst FIFO at 2048 × 64 (published only as "as deep as
  resources allow") and the write FIFO at two bursts
- the Gray-pointer clock crossing
- the request/acknowledge handshake
- the transaction interface to the memory controller
- circular addressing, and start/stop through `capture_en`
- synchronisation and clearing of the full flag

The vendor memory controller is represented only by the transaction
interface above. Its real internal arbitration may grant at other moments
than "when idle". DRAM refresh is not modelled.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bbb_daq_pkg.sv \
    tb/tb_bbb_daq_top.sv --top-module tb_bbb_daq_top
./obj_dir/Vtb_bbb_daq_top
```

| testbench | what it exercises |
|---|---|
| `tb_adc_packer` | lane placement, zero/sign fill, latency |
| `tb_burst_fifo` | 250/200 MHz streaming with random gaps, 32- and 64-bit inputs, overfill, latch and clear |
| `tb_npi_burst_ctrl` | push order, one burst per request, address wrap, restart, 35-clock fill rate |
| `tb_my_npi_core` | core at 1 GByte/s with held-off requests; overflow under starvation |
| `tb_npi_write_fifo` | against a queue model |
| `tb_mpmc_arbiter` | both modes against a reference model, 2 and 3 ports |
| `tb_bbb_daq_top` | whole system, 2048-entry (16 KByte) buffer, 256-entry burst FIFO: NPI-first capture through two wraps, checking every beat and the 51.2-clock burst rate, then stop and read-back of the whole buffer; then round-robin, checking the 57-clock burst spacing and the overflow; counts every mechanism |
| `tb_bbb_daq_in64` | 64-bit input variant: four 16-bit lanes per 125 MHz ADC clock (1 GByte/s), no gearbox, two wraps of an 8 KByte buffer, read-back after stop |
| `tb_bbb_daq_full` | the `tb_bbb_daq_top` sequence with all defaults: a 64 MByte buffer filled and wrapped (about 263,000 bursts, 67 ms simulated, under a minute of run time) |

The system testbenches use two behavioural models:

- `tb/mc_ddr_model.sv`: the DDR controller and memory at transaction level.
- `tb/plb_master_model.sv`: a processor reading DDR in a tight loop.

To study other controllers, change the models' `NPI_CYCLES` and
`PLB_CYCLES`.
