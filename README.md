# Parallel WS2812B strip driver

This is an FPGA design that takes frames of colour data from a microcontroller over SPI and drives
24 strips of WS2812B ("NeoPixel") LEDs at the same time.

A WS2812B strip has a single data line. Bits go down that line at a fixed 1.25 µs each, so the
time to refresh a strip grows with its length. One line manages roughly a thousand pixels at
30 frames per second. A microcontroller that bit-bangs the line spends all of its time doing so.
Here each strip gets its own output pin and its own controller with its own colour memory. The
host only writes bytes into those memories and then issues one *flush*. All 24 strips then
refresh at once, and a refresh takes as long as one strip's worth of bits.

The standard build drives a 24 × 25 matrix: 24 strips of 25 pixels each. A refresh of all 600
LEDs takes 0.80 ms.

## The LED data line

Every bit starts with the line high and ends with it low. The length of the high part encodes
the value. At the 40 MHz system clock:

| symbol | high            | low             | total            |
|--------|-----------------|-----------------|------------------|
| 0      | 0.40 µs (16 cy) | 0.85 µs (34 cy) | 1.25 µs (50 cy)  |
| 1      | 0.80 µs (32 cy) | 0.45 µs (18 cy) | 1.25 µs (50 cy)  |
| reset  | —               | ≥ 50 µs (2000 cy) |                |

A pixel keeps the first 24 bits it sees and passes the rest of the stream on to the next pixel.
A low period of at least 50 µs makes every pixel show what it kept. Byte *k* of a strip's memory
therefore ends up in pixel *k*/3, in the order the host sent the bytes (red, green, blue as the
host firmware sends them).

The cycle counts are not hard-coded. They are worked out from `CLK_HZ` and the nanosecond
parameters by `neopixel_pkg::ns_to_cycles`, so another clock only needs `CLK_HZ` changed.

**Bit order.** By default each byte goes out **least significant bit first**. This is how the
original transmitter behaved. Real WS2812B parts read the most significant bit first. With the
default, every colour byte therefore arrives bit-reversed. That does not matter for random art,
but it does for true colours. Set `MSB_FIRST = 1` on `neopixel_driver` to send the standard
order.

## Host protocol

The link is SPI mode 0: MOSI is sampled on the rising SCLK edge, MSB first. Chip select is
**active high**. The host raises CS, sends one command and lowers CS. Lowering CS ends the
command.

| command | bytes                                                                  |
|---------|------------------------------------------------------------------------|
| write   | strip number (0–23), pixel offset (0–255), then any number of colour bytes |
| flush   | the single byte `0x46`                                                 |

The first colour byte of a write goes to byte address 3 × offset, and each further byte goes to
the next address. So the pixel index rises by one every three bytes, and a burst can run past the
end of one pixel into the following ones. In a frame with a strip number of 24 or more, every
byte is ignored. So is every byte that follows a flush byte in the same CS frame.

**Flushing handshake.** The `flushing` output is high from the cycle after a flush until every
strip has sent its data and its 50 µs reset time. The host must wait for `flushing` to go low
before it sends anything. A flush that arrives while `flushing` is high is ignored. Writes during
a refresh are stored, because the RAM has separate read and write ports. But a write to a byte
that has not yet gone out would appear in the refresh that is running. This is why the host
waits.

The reference host sends each strip as one write command: the strip number, offset 0 and 75
bytes. After all 24 strips it sends a flush. At about 1 MHz SCLK, the 14 400 colour bits of a
frame take about 14.4 ms. The strip number and offset bytes add 384 bits per frame. The refresh
afterwards takes 0.8 ms.

The SPI inputs are sampled by the system clock. SCLK must therefore stay below about a quarter
of `clk` (10 MHz at 40 MHz).

## Inside the driver

```
 sclk,mosi,cs ──► spi_slave ──write_en,strip_num──► write_en_decoder ──strip_we[i]──┐
                 (spi_byte_reader                                                    ▼
                  + spi_command_decoder) ──wr.addr, wr.data──────────► strip_controller[i] ──► pixels[i]
                        │                                                  (strip_ram +
                        └──────────────── flush ─────────────────────►     ws2812_byte_tx +
                                                                            ws2812_bit_tx)
                                                 flushing = OR of all strip flushing flags
```

| module                | role                                                                    |
|-----------------------|-------------------------------------------------------------------------|
| `neopixel_pkg`        | constants (flush byte, 24 strips, 11-bit byte address), write-bus struct, ns→cycle function |
| `neopixel_driver`     | top level                                                               |
| `spi_slave`           | SPI module = byte reader + command decoder                              |
| `spi_byte_reader`     | two-flop synchronisers, SCLK edge detect, 8-bit shift → `byte_valid` strobe |
| `spi_command_decoder` | command state machine (idle → offset → data, or ignore); issues writes and flush |
| `write_en_decoder`    | one-hot strip enable from `strip_num` when `write_en`                   |
| `strip_controller`    | one per strip: RAM, refresh sequencer, 50 µs reset timer, `flushing` flag |
| `strip_ram`           | 3 × `STRIP_LENGTH` bytes, synchronous write, registered read           |
| `ws2812_byte_tx`      | shift register feeding the bit encoder                                  |
| `ws2812_bit_tx`       | 50-cycle bit timer that makes the high/low pulse                        |

### How a refresh runs

The part that most needs explaining is how a strip controller keeps its line busy with no gap
between bits:

1. **Flush seen** (state `S_IDLE` → `S_SEND`). `flushing` rises. The read address is set to 0.
2. **Fetch.** The RAM has a registered read port, so byte 0 is in `read_data` one cycle later. It
   is then offered to the byte transmitter (`byte_valid`).
3. **Hand-over.** The byte transmitter takes a byte when it is empty. It also takes one in the
   same cycle that it hands its last bit to the bit encoder. The bit encoder, in turn, takes a
   new bit in the last cycle of the bit it is sending. So a new byte is loaded exactly as the old
   one's last bit starts. Its first bit then follows that bit with no idle cycle.
4. **Refetch.** As soon as a byte is taken, the controller steps the address and fetches the next
   byte. It has 400 cycles for this and needs 2.
5. **Drain.** After the last byte is taken, the controller waits until the line is idle
   (`S_DRAIN`). It then counts 2000 cycles with the line low (`S_RESET`). After that `flushing`
   falls.

The time from the rise of `flushing` to its fall is `3·STRIP_LENGTH·8·50 + 2000` cycles plus
about 4 cycles of start-up. At the defaults that is 32 000–32 006 cycles. The line is low for
the last bit's low time plus 2000 cycles, so always more than 50 µs.

All strips receive the same flush pulse and have the same length. Their lines start on the same
cycle and their `flushing` flags fall together. The top-level flag is the OR of the per-strip
flags and means "some strip is still busy".

### Latencies

- A byte: `byte_valid` comes 3 clock cycles after the SCLK edge that carries the byte's last bit.
- The decoder's write or flush strobe follows one cycle later.
- The RAM write happens on the next edge.
- The first data pulse starts 4 cycles after the flush strobe.

## Parameters (`neopixel_driver`)

| parameter      | default    | meaning                                        |
|----------------|------------|------------------------------------------------|
| `NUM_STRIPS`   | 24         | strip outputs (at most 32: the strip number is 5 bits) |
| `STRIP_LENGTH` | 25         | pixels per strip; RAM = 3 × this many bytes; at most 682 (11-bit byte address) |
| `CLK_HZ`       | 40 000 000 | system clock                                   |
| `T0H_NS`, `T1H_NS`, `BIT_NS` | 400, 800, 1250 | pulse timing                    |
| `RESET_NS`     | 50 000     | low time that latches the LEDs                 |
| `MSB_FIRST`    | 0          | bit order on the LED lines (see above)         |

Capacity: the 24 × 25 matrix fits with room to spare. Larger displays are limited by the frame
rate first. With 417 pixels per strip (10 000 LEDs) a refresh takes 12.6 ms, which still allows
60 frames per second. That size needs only `STRIP_LENGTH = 417`, with a 1251-byte RAM per strip, and
`tb_workload_10k_leds` runs it.

## Where this differs from the original design

The behaviour follows the original design, but several details are different:

- **Pixel offset.** The offset byte counts pixels, and the address rises by one pixel every three
  bytes. The original hardware used the offset directly as a byte address. This is the same for
  offset 0, which is all the reference host ever sends.
- **Combined flag.** `flushing` is an OR of the strip flags. The original used an AND. The two
  agree here, because the strips always start together and are of equal length.
- **No gaps.** Bits and bytes go out back to back. The original returned to an idle state for a
  few cycles between bits and bytes, which was within the WS2812B timing tolerance (±150 ns).
- **One clock.** The SPI receiver samples SCLK/MOSI/CS with the system clock instead of clocking
  a shift register with SCLK.
- **RAM size.** Each strip RAM holds exactly 3 × `STRIP_LENGTH` bytes instead of a fixed 256.
- **Ignored bytes.** After a flush byte, or after a strip number that is out of range, the rest
  of the CS frame is ignored.
- **Removed outputs.** The debug outputs of the original top level (a copy of CS and the SPI
  state) are not included.

## What is not here

This is the FPGA logic only. It does not include:

- the microcontroller firmware, which runs the particle simulation and sends the frames;
- the LED strips;
- the board: 5 V supply, 330 Ω series resistors on the data lines, and a reset pushbutton to
  3.3 V with a 100 Ω pull-down. Reset is asynchronous and active high.

## Simulating

Every file holds one module or package. Files are named after what they contain, so verilator
finds them with `-y`. Put the package on the command line first. To build and run the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/neopixel_pkg.sv tb/tb_neopixel_driver.sv --top-module tb_neopixel_driver
./obj_dir/Vtb_neopixel_driver
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each one also has a watchdog
that ends the run with a failure if it hangs.

| testbench                 | what it checks                                                       |
|---------------------------|----------------------------------------------------------------------|
| `tb_neopixel_driver`      | full size (24 × 25, no parameter overrides): a whole frame sent as the host does at 1 MHz SCLK, then decoded on all 24 lines; refresh time; all strips start together; offset writes; write to a missing strip; flush during a refresh ignored; host waiting on `flushing`. About 3 s. |
| `tb_workload_10k_leds`    | 24 strips of 417 pixels (10 008 LEDs): whole frame decoded on every line; refresh of 502 400 cycles (12.56 ms) fits a 60 Hz frame. About 10 s. |
| `tb_strip_controller`     | 4-pixel strip: data order, refresh time, reset low time, ignored second flush, write during refresh |
| `tb_ws2812_bit_tx`        | pulse widths and 50-cycle period over 200 random bits               |
| `tb_ws2812_byte_tx`       | both bit orders, gapless byte boundaries, 400 cycles per byte        |
| `tb_strip_ram`            | random reads and writes against a reference array                    |
| `tb_spi_byte_reader`      | random CS frames, partial bytes, latency                             |
| `tb_spi_command_decoder`  | random commands against a reference parser                           |
| `tb_spi_slave`            | commands over the pins against the expected writes and flushes      |
| `tb_write_en_decoder`     | exhaustive                                                           |

`tb/ws2812_strip_model.sv` is a behavioural receiver for one data line. It times each high pulse,
decodes bits into bytes, flags wrong pulse widths or periods, and counts a frame after 2000 low
cycles. The testbenches use it in place of real LEDs.

The simulator is two-state. Every flip-flop that is read before it is written has a reset.
