# Gyro sensor interface for a ZYNQ-based attitude data acquisition system

A Zynq-7000 acquisition system for gyro attitude signals has to take samples at
500 kSPS without interrupting a processor for each one. Otherwise it hits an
interrupt storm. The answer is to keep the processor out of the data path.
Programmable logic reads the ADC and turns the samples into a packetised
AXI4-Stream. An AXI DMA engine in stream-to-memory (S2MM) mode writes each
packet straight into a DDR buffer and interrupts once per packet. A Cortex-A9
core then handles one interrupt per 32 samples, and a second core filters and
forwards the data.

This repository holds the programmable-logic part of that system in
SystemVerilog: the **gyro sensor interface**. The DMA engine, the interconnect,
the processor system and the ADC itself are standard parts. They are not
written here. The testbenches stand in for the ADC and the DMA with small
behavioural models.

## Data path

```
 ADS8354-class ADC                 gyro_sensor_if                        AXI DMA (S2MM)
 (2 ch x 16 bit)    +--------------------------------------------+       -> DDR buffer
   SDO-A  --------->| ads8354_ctrl       axis_packetizer          |
   SDO-B  --------->|  200-clk rate     32-bit word, TLAST every  |--AXIS-->  TDATA/TKEEP/
   CS_n,SCLK <------|  timer, serial    32nd word, 1-word output  |<-TREADY-  TLAST/TVALID
   SDI (low) <------|  -> parallel      register, drop reporting  |
                    +--------------------------------------------+
```

| Quantity | Value | Where it comes from |
|---|---|---|
| Fabric clock | 100 MHz | system specification |
| Sample rate | 500 kSPS, both channels together | system specification |
| ADC | 16-bit, 2 channels, up to 700 kSPS | system specification |
| Stream word | 32 bits per sample: channel B in `[31:16]`, channel A in `[15:0]` | width from the specification; the layout is this design's choice |
| Packet | 32 words = 128 bytes, TLAST on the last word | system specification |
| Throughput | 4 B x 500 k/s = 2 MB/s; one packet every 6400 clocks (64 us) | follows from the above |
| SCLK | 25 MHz (clk/4), 32 SCLK periods per frame | this design's choice |

## Sampling controller (`ads8354_ctrl`)

A counter divides the 100 MHz clock by `SAMPLE_DIV` = 200. Each time it wraps
while `enable` is high, the controller starts a conversion frame:

1. CS_n falls one clock after the start clock.
2. Thirty-two SCLK periods follow, each `2*SCLK_HALF` = 4 clocks long. SCLK
   starts low.
3. At each of the first 16 rising SCLK edges, the controller shifts in one bit
   from SDO-A and one from SDO-B, MSB first. The ADC is expected to show the
   MSB once CS_n falls and to move on one bit after each falling edge.
4. After the 32nd falling edge, CS_n rises. The two codes appear on `sample`
   together with a one-clock `sample_valid`.

CS_n is low for 129 clocks, which leaves 71 of the 200 clocks of each sample
period idle. `sample_valid` comes 130 clocks after the start clock. The frame
grid is tied to the clock in which `enable` rose. Dropping `enable` lets a frame
in progress finish. SDI is held low, so the ADC stays in its power-up
configuration.

Elaboration checks reject a frame that does not fit the sample period.

The frame format is modelled on the 32-clock, dual-SDO mode of this ADC
family. Check it against the datasheet of the part you use. In particular:

- Many SAR ADCs return the result of the *previous* conversion during a frame.
  The RTL does not care which conversion a frame carries. Software that
  correlates samples with time should allow for a one-sample delay.
- If the part needs its output bits captured on the other SCLK edge, or needs
  a configuration write on SDI first, this is the module to change.

## Packetizer (`axis_packetizer`)

Each sample becomes one stream word with TKEEP all ones. A 5-bit word counter
raises TLAST on every 32nd accepted word. The DMA therefore sees fixed
128-byte transfers and raises its interrupt once per packet.

The output is a single register, with no FIFO:

- A sample is loaded when the register is empty, or when it empties in the
  same clock (TVALID and TREADY).
- While the DMA holds TREADY low, TDATA and TLAST stay put. An assertion
  checks this AXI4-Stream rule.
- Samples arrive every 200 clocks. The DMA may therefore stall for up to 199
  clocks without any loss.
- A longer stall makes the next sample find the register full. That sample is
  dropped. The sticky `overflow` flag is set, and the saturating 16-bit
  `drop_count` counts the dropped sample.
- A dropped sample does not advance the word counter. Packets therefore stay
  exactly 32 words long, and the receiver sees a gap in the data, not a
  shortened packet.

In loss-free operation `overflow` stays low. This is the property the system
is built to guarantee.

## Top level (`gyro_sensor_if`)

`gyro_sensor_if` connects the two blocks above.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, asynchronous active-low reset |
| `enable` | in | 1 | start/stop acquisition |
| `adc_cs_n`, `adc_sclk`, `adc_sdi` | out | 1 | ADC control pins |
| `adc_sdo_a`, `adc_sdo_b` | in | 1 | ADC serial data, channel A and channel B |
| `m_axis_tdata` | out | 32 | sample word (to the DMA's S2MM slave port) |
| `m_axis_tkeep` | out | 4 | all ones |
| `m_axis_tlast` | out | 1 | last word of a 32-word packet |
| `m_axis_tvalid` / `m_axis_tready` | out / in | 1 | stream handshake |
| `busy` | out | 1 | a conversion frame is running |
| `overflow`, `drop_count` | out | 1, 16 | loss report |

A sample reaches TVALID 130 clocks after CS_n falls for its frame.

Parameters (the defaults are the system values):

| Parameter | Default | Meaning |
|---|---|---|
| `SAMPLE_DIV` | 200 | clocks per sample |
| `SCLK_HALF` | 2 | clocks per SCLK half-period |
| `FRAME_SCLKS` | 32 | SCLK periods per frame |
| `PKT_WORDS_P` | 32 | words per packet |
| `DROP_W` | 16 | width of the drop counter |

Shared constants and the `gyro_sample_t` struct are in `gyro_pkg`.

### What is outside this RTL

The rest of the system is made of vendor and hard IP and of software:

- **AXI DMA:** S2MM mode, burst length 16.
- **Interconnect:** an AXI SmartConnect into the PS high-performance port
  S_AXI_HP0, then the DDR3 controller and 1 GB of DDR3.
- **Interrupt:** the S2MM interrupt reaches the PS through IRQ_F2P.
- **Processor cores:** two Cortex-A9 cores running bare-metal code in an
  asymmetric split. Core 0 runs the DMA and its interrupt in the lower 256 MB.
  Core 1 filters, repacks and sends the data from the upper 768 MB. Core 1
  invalidates its data cache over a buffer before reading it.
- **Inter-core messages:** the cores pass buffer pointers through on-chip
  memory. A lock word at 0xFFFF0014 guards the shared UART.
- **Filtering:** a moving-median plus Savitzky-Golay filter runs in software.

None of these is described here at a level that RTL could be written for. To
use this interface in a Zynq design, connect `m_axis_*` to the DMA's
`S_AXIS_S2MM` port and drive `enable` from a GPIO or a register.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. Each has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_ads8354_ctrl` | Codes read back bit-exact against random ADC codes. Checks the sample period (200 clocks), the latency (CS_n fall to sample, 129 clocks), 32 SCLK rising edges and 129 clocks of CS_n low per frame, and stop/restart. |
| `tb_axis_packetizer` | Data order, TLAST on exactly every 32nd beat and TKEEP under random back-pressure. Under a forced stall: drops detected and counted, the held beat stays stable, and packet boundaries are kept after drops. |
| `tb_gyro_sensor_if` | End to end at the defaults: ADC model, interface, DMA model and ring buffer, with each packet read back on its interrupt. Checks a 6400-clock packet interval (2 MB/s) and 130 clocks from CS_n to TVALID. Short stalls lose nothing. A 650-clock stall drops exactly 2 samples, and the gap in serial numbers matches `drop_count`. Checks stop/restart and two 16-beat bursts per packet. |
| `tb_gyro_sine_workloads` | Sine inputs at 8, 16 and 32 kHz with 250, 500 and 750 mVpp, plus noise. Every word is compared with the ADC code. The code span and the number of periods are checked per condition. Codes assume a +-2.5 V, 16-bit full scale. |
| `tb_gyro_stress_1m` | 1,000,000 consecutive samples at the defaults, with random DMA stalls below one sample period. Expects 31,250 packets, serial numbers rising by one across the whole run, no drops, and exactly 200,000,000 clocks (2 s) of acquisition. Takes about 1.5 minutes. |

The models in `tb/` are simplified:

- `ads8354_model` returns the codes on its inputs at the fall of CS_n and
  ignores SDI.
- `axi_dma_s2mm_model` accepts beats, writes a ring buffer, counts bursts of up
  to 16 beats and pulses `irq` at every TLAST. It can stall TREADY on request.

Running a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gyro_pkg.sv tb/tb_gyro_sensor_if.sv --top-module tb_gyro_sensor_if
./obj_dir/Vtb_gyro_sensor_if
```

Substitute any testbench name from the table.

## Choices made in this design

- The serial frame (32 SCLK at 25 MHz, capture on the rising edge, SDI low) and
  the start/stop input are this design's choices.
- The single output register with drop reporting, in place of a FIFO, is also
  this design's choice.
- The channel layout in the word is this design's choice.
- The system's loss test uses a serial number in every sample. Where that
  number comes from is not defined, so the interface does not insert one. The
  testbenches carry it on channel A. A system that needs a hardware sequence
  number must give up part of the sample word or widen the stream.
- Reset is asynchronous and active low.
