# Heart-rate monitor SoC on AHB-Lite

A small microcontroller system that turns a photoplethysmography (PPG) pulse
sensor into a heart-rate reading. An optical sensor produces a 0–5 V
waveform with one sharp peak per heart beat. An external 8-bit ADC digitises
it continuously. A Cortex-M0 class processor samples the ADC on a timer tick
and finds the beats. It averages ten inter-beat intervals into beats per
minute and sends lines such as `bpm = 078` to a PC over a UART. The raw
sample is shown on 16 LEDs, and each result is also kept in on-chip RAM.

This repository holds the hardware around the processor:

- the AHB-Lite bus fabric;
- 16 KB of on-chip RAM;
- the timer, the UART and the GPIO block;
- a top level, `heart_rate_soc`, that wires them together and exposes the
  processor's bus port.

It also holds testbenches. The biggest one plays the processor's part with a
bus-level model that runs the beat-finding program against the real RTL,
driven by a simulated pulse sensor and ADC.

## System structure

```
                 AHB-Lite (single master)
 processor  ===========+==============+===========+===========+
 (external)            |              |           |           |
  m_req/m_rsp     on-chip RAM       timer        UART        GPIO ---- led[15:0]
  irq[1:0] <-----------------------irq[0]      irq[1]          |------ gpio_in[15:0]
                                                txd/rxd        '------ adc_db[7:0] <- ADC0804 <- pulse sensor
```

| Region | Base address | Size | Slave |
|---|---|---|---|
| On-chip RAM | `0x0000_0000` | 16 KB | `ahb_onchip_ram` |
| Timer | `0x4000_0000` | 4 KB | `ahb_timer` |
| UART | `0x4000_1000` | 4 KB | `ahb_uart` |
| GPIO | `0x4000_2000` | 4 KB | `ahb_gpio` |
| anything else | | | default slave: ERROR |

The RAM sits at address 0, where a Cortex-M0 looks for its vector table.
The constants live in `rtl/ahb_pkg.sv`, together with the request and
response structs (`ahb_req_t`, `ahb_rsp_t`) that every slave uses.

The processor core is not part of this RTL. To build the complete system,
connect these ports of `heart_rate_soc` to a Cortex-M0 (or any AHB-Lite
master):

- `m_req`, which carries HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT,
  HMASTLOCK and HWDATA from the core;
- `m_rsp`, which carries HRDATA, HREADY and HRESP back to the core;
- `irq[0]` (timer) and `irq[1]` (UART), to the core's interrupt inputs.

The intended clock is 50 MHz (`CLK_HZ`).

## Timing on the bus

Every slave is zero-wait-state and follows the usual AHB-Lite split:

- In the address phase the slave registers "write pending", "read pending"
  and the offset. It does this only when `hready` is high.
- Register writes take effect at the clock edge that ends the data phase,
  when HWDATA is valid.
- Register reads are multiplexed combinationally from the registered offset
  during the data phase.

`ahb_lite_interconnect` decodes HADDR into a one-hot `hsel`. It registers
the chosen slave when HREADY is high, and routes that slave's response back
during the data phase. So a slave that stalls keeps ownership of the
response, even when the master has already put the next address on the bus.

An access to an unmapped address gets the standard two-cycle ERROR: HREADY
low and HRESP high, then HREADY high and HRESP high. Assertions in the
interconnect check two rules:

- `hsel` is one-hot or zero;
- the two-cycle shape of every ERROR.

## On-chip RAM: synchronous read and the write bypass

The RAM is the least obvious block, because it has to look like an
asynchronous zero-wait memory while using a synchronous-read array, which is
what FPGA block RAM provides.

- **Read.** The word is fetched at the clock edge that ends the address phase
  (`rd_word <= mem[HADDR]`). It is therefore stable on HRDATA for the whole
  data phase.
- **Write.** The address and byte lanes (from HSIZE and HADDR[1:0],
  little-endian) are registered in the address phase. HWDATA is written into
  the array at the end of the data phase.
- **Bypass.** Take a write to word A followed immediately by a read of A. The
  read's fetch happens at the same edge as the write and returns the old
  word. The RAM detects this case (a pending write to the same word). It then
  stores the write's byte lanes and data, and merges them over the fetched
  word on the way out. A halfword write followed by a word read returns the
  new halfword together with the two old bytes.

`INIT_FILE` names an optional `$readmemh` image of 32-bit words, with word 0
at address 0. This is where the compiled vector table and program go. The
top's `MEM_INIT` parameter passes it down, and it is empty by default.

## Timer

A 32-bit down counter behind a 16-bit prescaler.

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | LOAD | reload value; writing it also loads VALUE |
| 0x04 | VALUE | current count (read only) |
| 0x08 | CTRL | bit 0 enable, bit 1 interrupt enable, bit 2 one-shot |
| 0x0C | PRESCALE | the counter moves once every PRESCALE+1 cycles |
| 0x10 | STATUS | bit 0 expired; write 1 to clear |

In periodic mode the expired flag is set every (LOAD+1)·(PRESCALE+1) cycles.
For a 2 ms sampling tick at 50 MHz, set LOAD = 99 999 and PRESCALE = 0. In
one-shot mode the timer clears its own enable bit when it expires. If a
clear of STATUS and a new expiry fall in the same cycle, the new expiry is
kept. `irq` is the expired flag ANDed with the interrupt enable.

## UART

The UART sends and receives 8N1 frames with 16-entry transmit and receive
FIFOs.

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | DATA | write: queue a byte; read: take the oldest received byte (0 if none) |
| 0x04 | STATUS | bit 0 tx_full, 1 tx_idle, 2 rx_valid, 3 rx_full, 4 rx_overrun, 5 tx_overflow (write 1 to clear bits 4 and 5) |
| 0x08 | CTRL | bit 0 tx_en, 1 rx_en, 2 tx_irq_en (FIFO empty), 3 rx_irq_en; reset value 0x3 |
| 0x0C | BAUDDIV | bit period in clock cycles; reset value CLK_HZ/BAUD = 5208 (9600 baud); values below 4 act as 4 |

The receiver works as follows:

- It synchronises `rxd` with two flops.
- It starts on a falling edge, then checks the start bit half a bit later.
  A glitch shorter than that is ignored.
- It samples each data bit once, in the middle of the bit.

Two kinds of loss are flagged rather than blocked:

- a byte written while the transmit FIFO is full is dropped and sets
  tx_overflow;
- a byte received while the receive FIFO is full is dropped and sets
  rx_overrun.

Firmware should poll tx_full before writing.

## GPIO and the free-running ADC

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | OUT | drives `led[15:0]`, reads back |
| 0x04 | IN | `gpio_in[15:0]`, synchronised |
| 0x08 | ADC | `adc_db[7:0]`, synchronised |

The ADC is an ADC0804 wired to run free: CS and RD tied low, and WR tied to
INTR, so each end of conversion starts the next one, about every 100 µs. The
SoC never commands the converter. It only samples the eight data lines
through a two-flop synchroniser. A read that lands on a data-line change can
in principle mix two neighbouring conversions. For a slowly varying pulse
waveform the error is at most one step between adjacent codes. The
directions of the three ports are fixed: there is no direction register.

## The beat-finding program

The program runs on the processor, not in this RTL. The end-to-end bench
(`tb/hr_bench.sv`) carries it out through real bus transfers:

1. Wait for the timer interrupt (every 2 ms) and clear STATUS.
2. Read the ADC register, and write the sample to the LEDs.
3. **Find a peak.** A rise followed by a fall marks a local maximum.
4. **Identify a pulse.** A peak counts as a beat only if it is above a fixed
   threshold (code 140, about 2.7 V). This rejects the dicrotic notch and
   other small bumps. The bench counts these rejected peaks.
5. **Store the inter-beat interval.** The interval is the number of samples
   since the previous beat. It goes into a 10-entry ring in RAM at
   `0x2000` and is read straight back, which exercises the RAM bypass.
6. **Calculate BPM.** Once ten intervals are stored, every further beat
   gives BPM = round(600 000 / (2 ms × sum of the ten intervals)). The
   result is written to a log at `0x3000` and sent as `bpm = NNN\r\n`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

| Testbench | What it shows |
|---|---|
| `tb_ahb_onchip_ram` | `$readmemh` image; byte, halfword and word access against a reference array; two-cycle read; bypass with full-word and partial-word merges; 400 random single and back-to-back transfers |
| `tb_ahb_timer` | Measured expiry spacing equals (LOAD+1)·(PRESCALE+1) for three settings; VALUE counts down; interrupt gated by its enable; clear; one-shot mode |
| `tb_ahb_uart` | Reset divider 5208; bit time; message order through the FIFO; overflow after 16+1 bytes; receive order; overrun after 17 bytes; glitch rejection; both interrupts |
| `tb_ahb_gpio` | LED pins and read-back; input and ADC values; the two-cycle synchroniser delay |
| `tb_ahb_lite_interconnect` | Decoding at every region edge; ERROR shape and timing; back-to-back transfers across all slave pairs with 0–3 wait states; one-hot `hsel` every cycle |
| `tb_heart_rate_soc` | Whole system with time compressed 500×. 13 beats at 78 BPM then 14 at 93 BPM; 17 reports, each within 1 BPM of the rate computed from the generated beats. The last resting report must read 78 and the last walking report 93. Also checks the RAM log, the LEDs, the general inputs and a bus ERROR, and requires that every mechanism occurs at least once |
| `tb_heart_rate_soc_full` | The same bench in real time with every default unchanged: a true 2 ms sampling tick, 9600 baud and a 100 µs conversion time. Eleven beats give one complete report. It simulates about 400 million cycles and takes roughly five minutes |

The pulse sensor and the ADC0804 are simulation models in `tb/`. The
sensor gives a piecewise-linear PPG beat: a 120 ms upstroke to 3.5 V,
decay, a dicrotic bump to 2.3 V, and a return to a 1.5 V baseline. The ADC
model (`adc0804_model`) has the converter's pins and its free-running
restart.

To run a testbench with Verilator, run this from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ahb_pkg.sv \
    tb/tb_heart_rate_soc.sv --top-module tb_heart_rate_soc -Mdir obj
./obj/Vtb_heart_rate_soc
```

Replace the testbench name to run another one. `tb_ahb_onchip_ram` reads
`tb/ram_init.hex` by a path relative to the repository root.

## What to trust, and what was chosen here

Fixed by the system this implements:

- the block set and the single AHB-Lite bus;
- 50 MHz;
- 16 KB of on-chip RAM;
- 16 LEDs;
- an 8-bit ADC0804 in its free-running wiring;
- the beat-finding flow: peak, threshold, ten intervals, BPM, then UART and
  memory;
- the `bpm = 078` report format.

Everything below the block level is this design's own choice:

- the memory map;
- all register layouts;
- the zero-wait timing and the RAM bypass;
- 9600 baud;
- the 16-entry FIFOs;
- the width of the general input port (16 bits);
- the 2 ms sampling period and the threshold used by the bench firmware.

A published FPGA build of this system on a Cyclone II device, processor
included, used 4 740 logic elements. Generic synthesis of this RTL without
a processor gives about 310 word-level cells, 358 flip-flop bits and
131 328 memory bits.

What the RTL does not cover:

- **The processor core.** Supply your own and connect it to `m_req`,
  `m_rsp` and `irq`.
- **The firmware.** It exists here only as the bench's bus-level model.
- **The ADC, the sensor, FPGA pin assignment and timing closure.** These are
  outside the RTL.

Only the bus-level firmware model has exercised this system. No real
Cortex-M0 core has been simulated with it.
