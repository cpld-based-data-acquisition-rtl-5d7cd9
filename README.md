# Eight-channel data acquisition and fire alarm on a CPLD

This is the logic of a small data-acquisition system built around one
programmable logic device. It reads eight analog inputs through an ADC0808
converter, keeps the latest sample of each input, sounds a fire alarm when the
temperature or gas reading goes above a stored threshold, and drives a
character LCD. The LCD shows either a greeting or the current reading as a
voltage ("INPUT VOLTAGE" / "1.7V"). There is no processor and no program: the
ADC timing, the display scripts and the comparison are all fixed logic.

The design follows the CPLD data-acquisition system described in the article
"CPLD-Based Data Acquisition System with High Speed Interface". That design
targets a Xilinx CoolRunner-II starter board, an LM35 temperature sensor, an
MQ6 gas sensor, an ADC0808 and an IC555 timer as clock source. This RTL
re-implements the CPLD part in SystemVerilog. It adds the pieces the article
describes only in words: the sample store and the threshold alarm. The
section "Where this departs from the reference design" lists every choice
made here.

## How the parts fit together

```
 ch button --> chan_sel --chan--> adc_ctrl --START/ALE/ADD--> ADC0808
                                     ^  |
                          EOC, D7..0 |  | sample (channel, code)
                                        v
                                   sample_ram --port A--> threshold_alarm --> alarm
                                        |  \--port B--> host_addr/host_data (USB side)
                                        v
                              disp_code register --> volt_conv --> lcd_ctrl --> LCD
 b switch ----------------------------------------------------------^ (page)
```

`daq_top` wires these together. All logic runs on one clock, `clk`, which
is the slow system clock from the 555 timer. The button, the switch and the
ADC's EOC are asynchronous and go through two-flop synchronisers (`sync2`).

| module            | job |
|-------------------|-----|
| `daq_pkg`         | shared types, LCD command bytes, the two LCD scripts, the calibration table |
| `adc_ctrl`        | ADC0808 start/address timing and result capture |
| `chan_sel`        | channel push-button counter |
| `sample_ram`      | 8 x 8-bit store, latest sample per channel, two read ports |
| `threshold_alarm` | temperature-then-gas comparison against stored thresholds |
| `volt_conv`       | ADC code to "d.d" volts by a 24-range calibration table |
| `lcd_ctrl`        | plays the greeting or voltage script on the LCD bus |
| `sync2`           | two-flop synchroniser |
| `daq_top`         | the whole device |

## The conversion frame (adc_ctrl)

By default the ADC is started on a fixed frame rather than on demand. A
counter runs from 0 to 225, and START and ALE go high together for counts
220 to 223. The result is a 4-clock start pulse every 226 clocks. The channel
address is copied from the button counter one clock before the pulse. It then
holds until the next frame, so the address is stable when ALE latches it.
The ADC pulls EOC low, converts, and raises EOC again. Three clocks after that
rising edge (two for the synchroniser, one for edge detection) the data bus
is read. `smp_valid` then pulses with the code and the channel it came from.
The ADC's output enable is taken as tied high.

Setting `HANDSHAKE = 1` gives the start/acknowledge protocol instead: pulse
START, wait for EOC to fall and rise, read, and start again at once. Each
conversion then takes about 4 + 8 + 64 + 5 clocks (with the ADC clocked
like the logic) instead of a fixed 226. If the ADC never answers, the
controller starts again after `ACK_TIMEOUT` clocks.

Each frame must be long enough for one conversion. An ADC0808 needs about
72 of its own clock periods. When the ADC is clocked from the same source,
226 clocks is ample.

## The LCD scripts (lcd_ctrl)

This is the part that is least obvious from the code. The LCD is written
blind: there is no busy-flag polling and no delay counter. Instead one
*step* per clock (`STEP_CLKS = 1`) walks through a fixed script. Each write
takes two steps:

* odd step: RS and DB are set, E is low;
* even step: E goes high, RS and DB are unchanged.

The LCD takes the byte when E falls, which happens at the start of the next
write. Step 0 of each pass writes nothing and leaves the bus as it was. The
script then repeats forever.

Greeting page, switch `b = 1`, 75 steps per pass, 37 writes:

| writes | bytes |
|--------|-------|
| 1-4    | 0x38 function set (8-bit, 2 lines), 0x0C display on, 0x01 clear, 0x06 entry mode |
| 5-20   | `WEL`, 0xB0, `COME`, 0xA0, `TO`, 0xA0, `CPLD` from line 1 column 0 |
| 21     | 0xC1: cursor to line 2 column 1 |
| 22-34  | `ADC08`, 0xA0, `CONTROL` |
| 35-37  | 0x1C shift display right, 0x18 left, 0x18 left |

Voltage page, `b = 0`, 44 steps per pass (the last step is idle too), 21 writes:

| writes | bytes |
|--------|-------|
| 1-3    | 0x01 clear, 0x06 entry mode, 0x82: cursor to line 1 column 2 |
| 4-16   | `INPUT`, 0xA0, `VOLTAGE` |
| 17     | 0xC6: cursor to line 2 column 6 |
| 18-21  | units digit, `.`, tenths digit, `V` |

Spaces are sent as 0xA0, and the greeting has 0xB0 between "WEL" and "COME".
On an HD44780 with the standard A00 character ROM these show as a blank and
a dash. The voltage page does not repeat the function set, so the greeting
must have run at least once after power-up. Reset starts on the greeting
page, so it has. Changing the switch restarts the chosen script from step 0.

Timing against a real HD44780: the slowest command, clear, needs about
1.5 ms before the next write. Two steps separate consecutive E falling edges.
With `STEP_CLKS = 1` that means a clock of about 1.3 kHz or slower (the
starter board's oscillator offers 1, 10 and 100 kHz settings). Set
`STEP_CLKS` to slow the scripts down when `clk` must be faster, for example
to clock the ADC0808, which needs 10 kHz to 1.28 MHz. E is high for one
whole step. RS and DB change on the same edge on which E falls, so the LCD's
data hold time relies on the output delay.

The LCD control lines come out twice (`lcd_rs[1:0]`, `lcd_rw[1:0]`,
`lcd_e[1:0]`) with identical values, for two display connectors. RW is
always 0.

## Channel selection, storage and alarm

`chan_sel` counts falling edges of the channel button in a 4-bit counter and
presents `counter / 2` as the channel. So each channel takes two presses and
sixteen presses bring it back to channel 0. Conversions always use the
selected channel. Every result is written into `sample_ram` at the address
of its channel. The words themselves are not reset; a valid bit per word
marks which have been written.

`threshold_alarm` loops over two phases. It reads the temperature word
(channel 0 by default), then the gas word (channel 1), and compares each with
its threshold (`TEMP_THRESH`, `GAS_THRESH`, both 128 by default). A channel
is over when its stored value is strictly greater than the threshold. `alarm`
is the OR of the two flags. The flags use the stored values, so the alarm
stays on while the operator views another channel. It clears when both stored
values are back at or below their thresholds. A new value reaches `alarm`
within four clocks of being stored.

The second read port of the store (`host_addr` -> `host_data`, `host_valid`,
one clock latency) is for the PC link. The USB transport itself is not part
of this logic.

## The voltage reading (volt_conv)

The displayed reading comes from a calibration table, not from a linear
scale. The 24 ranges are contiguous. Code c reads as the value of the first
range whose upper bound is at least c:

| codes   | V   | codes   | V   | codes   | V   |
|---------|-----|---------|-----|---------|-----|
| 0-18    | 0.3 | 73-80   | 1.1 | 133-140 | 1.9 |
| 19-20   | 0.4 | 81-86   | 1.2 | 141-146 | 2.0 |
| 21-40   | 0.5 | 87-94   | 1.3 | 147-160 | 2.2 |
| 41-44   | 0.6 | 95-102  | 1.4 | 161-174 | 2.4 |
| 45-48   | 0.7 | 103-110 | 1.5 | 175-190 | 2.6 |
| 49-56   | 0.8 | 111-116 | 1.6 | 191-204 | 2.8 |
| 57-64   | 0.9 | 117-124 | 1.7 | 205-220 | 3.0 |
| 65-72   | 1.0 | 125-132 | 1.8 | 221-255 | 3.4 |

It reflects the original board's sensor signal conditioning; change
`VOLT_UPPER` / `VOLT_TENTHS` in `daq_pkg` for other front ends. The top keeps
the latest code in `disp_code`, so the LCD shows the selected channel.

## Where this departs from the reference design

Taken from the reference design: the conversion frame (226 clocks, start at
220 for 4 clocks, START and ALE together); the channel button mapping
(counter / 2, 16 presses); the calibration table; both LCD scripts, their
bytes, their order, two steps per write and the pass lengths; the duplicated
LCD control outputs; one step per clock.

Choices made here:

* **One clock edge.** The reference runs the frame counter on the falling
  edge and clocks the channel counter from the button itself. Here
  everything is on the rising edge of `clk`, and the inputs are synchronised.
* **Reset.** The reference has none. Here an asynchronous active-low
  `rst_n` clears all counters and flags.
* **Data capture.** The reference updates its reading continuously while EOC
  is high. Here the bus is read once, on EOC's rising edge.
* **Address register.** The ADC address is registered before each start and
  kept with the sample. The reference drives it straight from the button
  counter.
* **Handshake mode.** The reference describes two start schemes: a
  free-running converter and a start/acknowledge sequence. Its logic uses the
  fixed frame, which is the default here. The handshake is available as
  `HANDSHAKE = 1`.
* **Sample store and alarm.** These are described only in prose. Their
  organisation (one word per channel, valid bits, two read ports), the
  channel numbers, the thresholds and the alarm release are chosen here.
* **Page switching.** The reference keeps a separate position for each LCD
  page. Here a switch restarts the page.
* **`STEP_CLKS`** is an addition.

Not built, because they are not logic or are not specified: the ADC0808
itself, the sensors and their signal conditioning, the 555 timer, the LCD
module, the USB link and PC program, the starter board, and the keyboard
mentioned for operator input.

## Simulation

The testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
Two behavioural models support them: `tb/adc0808_model.sv` (latches the
address on ALE, drops EOC 8 clocks after START rises, presents the input
code 64 clocks after START falls) and `tb/lcd_model.sv` (HD44780 display
memory, cursor and shift counter, written on E's falling edge).

| testbench            | what it checks |
|----------------------|----------------|
| `tb_adc_ctrl`        | pulse shape, period and phase, latched address, capture latency, handshake restart, timeout |
| `tb_chan_sel`        | channel = presses mod 16 / 2, three-clock latency |
| `tb_sample_ram`      | random traffic on both ports against a reference, valid bits |
| `tb_threshold_alarm` | read order, strict comparison at the thresholds, random values |
| `tb_volt_conv`       | all 256 codes against an independent range table |
| `tb_lcd_ctrl`        | display contents for both pages, init and shift commands, pass lengths 75/44, `STEP_CLKS = 3` |
| `tb_daq_top`         | whole system at default parameters: greeting, page switch, all eight channels through the host port and the LCD, gas alarm, temperature alarm, clearing, 226-clock start period |
| `tb_daq_top_handshake` | whole system with `HANDSHAKE = 1`: back-to-back conversions (at most 90 clocks apart), all channels stored and shown, gas alarm |

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/daq_pkg.sv tb/tb_daq_top.sv --top-module tb_daq_top -o sim
./obj_dir/sim
```

All eight pass. `tb_daq_top` runs the design at its default parameters in
about 6,600 clocks, well under a second. The assertions in `adc_ctrl`
(address stable while ALE is high) and `lcd_ctrl` (RS/DB stable while E is
high) are active in these runs.

The simulations are the only verification. The design has not been run on a
CoolRunner-II or with a real ADC0808 and LCD. The behavioural models follow
data-sheet behaviour only in outline.
