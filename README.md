# CAMAC scaler display and readout system

This is SystemVerilog for a scaler readout system of the kind built at SLAC in the early 1970s. Many CAMAC "blind" scalers (counters with no display of their own) sit in up to seven crates. One master controller walks through every channel, converts each 24-bit count to 8 decimal digits, and broadcasts it on a shared BCD bus. Any number of readouts listen on that bus: quad Nixie displays, an X-Y scope display generator, preset units and a printer. Each one picks out the channels it wants.

The design has three main ideas:

* **One broadcaster, many passive listeners.** Readouts never talk back. Adding a display does not affect the controller or the other displays, and a failed display hurts nobody else.
* **Q-scan.** The controller does not need to know what is plugged in where. Each module's CAMAC Q response tells the controller whether a channel exists at the current address.
* **Fixed, overlapped cycles instead of handshakes.** Every channel gets the same slot of about 600 µs, the time the slowest readout needs. The work is pipelined over three slots, so every address and data line has a whole slot to settle, even on long cables.

## Blocks and files

| file (`rtl/`) | block |
|---|---|
| `scaler_pkg.sv` | bus structs, widths and codes shared by all modules |
| `scaler_readout_system.sv` | top: everything below, wired onto the two buses |
| `master_controller.sv` | scan, conversion, timing, front-panel functions, printer |
| `master_timing.sv` | the 600-tick cycle and its phases |
| `camac_addr_gen.sv` | crate/station/subaddress counter with the Q-scan rule |
| `bin2bcd_serial.sv` | 24-bit binary to 8 BCD digits, one bit per clock |
| `bcd_zero_suppress.sv` | leading zeros turned into blanking code 10 |
| `bcd_channel_counter.sv` | 3-digit BCD channel number |
| `printer_interface.sv` | prints a listing of one scan |
| `crate_controller.sv` | combinational crate controller (one per crate) |
| `camac_disconnect.sv` | joins a computer's CAMAC bus while the computer holds the disable line |
| `verification_module.sv` | CAMAC module that returns known test patterns |
| `quad_display.sv` | four selectable 8-digit Nixie channels |
| `nixie_driver_74141.sv` | BCD-to-decimal tube driver that blanks codes 10–15 |
| `lecroy559a_interface.sv` | BCD bus to LeCroy 559A display generator |
| `preset_unit.sv` | stops counting when one channel reaches M × 10^E |

Parts that are not logic are not in `rtl/`: the scalers themselves, the computer, the printer, the display generator, the scope and the tubes. They connect through ports of the top. `tb/camac_scaler_model.sv` is a behavioural quad scaler used by the system testbench.

## The two buses

Both cables are **negative true**: a line at 0 means "asserted". Every driver is **open collector**. In the RTL, every unit that drives a bus produces a whole bus struct (`camac_cmd_t`, `camac_resp_t`, `bcd_bus_t`). Lines it does not drive are left at 1, and the top forms each net as the bitwise AND of all its drivers. Field names end in `_n` to keep the polarity visible. Inside a crate, the Dataway (`dataway_cmd_t`, `dataway_resp_t`) is modelled in positive logic, and the crate controller does the conversion.

**CAMAC bus.** It carries:

* crate address (3 lines; 7 addresses every crate)
* station N (5 lines; 31 addresses every station)
* subaddress A (4 lines) and function F (5 lines)
* strobes S1 and S2
* Z, C and I
* Q and the single L demand
* 24 read/write lines
* the computer's disable line

The real cable shares its 24 lines between read data and write data. Here they are two directional groups: `w_n` in the command struct and `r_n` in the response struct. This way no driver ever reads the net it drives, which keeps the netlist free of false combinational loops. The function code keeps the two groups from being used at the same time, as it does on the real lines.

**BCD bus.** It carries:

* a 3-digit channel number (`addr_n`, 001–999, with 000 meaning 1000)
* 8 data digits
* the strobe, which tells readouts to load
* the reset, which marks the start of a scan
* a common enable line, which makes every readout channel load at the next strobe

## The scan, cycle by cycle

This is the part that needs the most care when changing the design.

**Address order.** `camac_addr_gen` holds the current crate, station N and subaddress A. At the end of each cycle it moves on as follows:

* If the address just read answered Q = 1 and A < 15, it moves to A + 1 in the same station.
* Otherwise A goes back to 0 and N moves to the next station (1…23), then to the next crate.

So a 4-channel module is read at A = 0…3, then A = 4 answers Q = 0 and the scan moves on. An empty station costs one cycle. With Q always 1, every station is read as a 16-channel module. After station 23 of the last crate the scan wraps to crate 0, station 1.

**One cycle** lasts `CYCLE_TICKS` = 600 clocks of a 1 MHz clock (600 µs). Tick positions use the defaults:

| tick | what happens |
|---|---|
| 0 | new CAMAC address on the bus; new word on the BCD bus |
| 100–109 | BCD reset, only in the cycle two after a scan wrapped |
| 300 | S1 on the bus (the controller's drivers are registered, so bus events are one clock after the internal phase) |
| 301 | R lines and Q captured; if Q = 1 the serial conversion starts and takes 24 clocks |
| 585–594 | BCD strobe, only if this cycle's BCD word is valid |
| 595–599 | 5 µs guard band: the BCD lines stay unchanged after the strobe |
| 599 | end of cycle: address advances, converted word moves into the BCD stage |

**Pipelining.** While address k is on the CAMAC bus, the BCD bus carries the data of address k−1. The readouts are still showing what they latched at the end of the previous cycle, which is the data of address k−2. A channel read in cycle k is therefore strobed into the readouts at the end of cycle k+1.

An address that answered Q = 0 leaves the next cycle without a valid word, and that cycle has no strobe. The channel counter advances once for each Q = 1 read. It goes back to 001 when the scan wraps.

**BCD reset.** The last word of a scan is strobed in the cycle after the wrap. The BCD reset pulse comes early in the cycle after that, before the strobe of channel 001. A readout that counts strobes, such as the LeCroy 559A, can rely on this: the first strobe after a reset is always channel 001. One reset is also given after power-up.

**Why these numbers.** The 600 µs slot comes from the slowest readout, the LeCroy 559A. The 5 µs guard band comes from the original design. The position and width of S1, the strobe (10 µs) and the reset are this design's own choices. They only need to keep the phases apart, and `master_timing` asserts that they do.

## Master controller functions

| input | effect |
|---|---|
| `test_mode` | Scanning pauses. The bus holds crate 7, station 31, F(25), which addresses every channel of every crate. Each rising edge of `test_pulse` gives one S1, so every scaler adds one count. |
| `reset_all` | C and S2 on the bus for as long as it is held. |
| `inhibit_all` | I on the bus for as long as it is held. |
| `zero_suppress` | Leading zeros are sent as code 10, so displays blank them. The units digit always shows. |
| `display_test` | Drives the BCD common enable line. |
| computer disable | Scanning stops and every driver of the controller, CAMAC and BCD, is released. The computer can then issue its own commands through the disconnect unit. On release, the interrupted cycle starts again from tick 0. A word that was already strobed is not strobed a second time, so the LeCroy 559A channel count stays in step. |
| `print_req` | Starts a printed listing (see below). |

`disable_n` and `test_pulse` pass through two-flop synchronisers.

**Printer interface.** The scan never waits for the printer, so the printer interface takes one channel per pass:

1. Wait for a BCD reset.
2. At each strobe, look for channel 001. When it appears, latch the line and hold `print_cmd` until the printer raises `printer_busy`.
3. Wait for `printer_busy` to fall, then look for the next channel number.

The listing ends when two BCD resets go by without the wanted channel showing up. The original system only names this interface; this sequence and handshake are this design's own.

## Crate side

**`crate_controller`** has no storage at all:

* The crate is selected when the bus crate address is its own number or 7.
* The 5-bit station address is decoded onto N1…N23; 31 raises all of them.
* A, F, S1 and S2 are repeated to the Dataway. Z, C and I go to every crate whether it is selected or not.
* A selected crate drives read data (F0–F7) and Q back onto the bus, and passes write data (F16–F23) in to the Dataway.
* All L lines are ORed into one bus L, whatever the selection.
* The front-panel `gate_in` drives I. `clear_in` drives C and S2 together.

Crates are numbered 0…6. The bus reserves address 7 for "all crates", and seven crates must fit.

**`camac_disconnect`** lets the scaler system share a computer's CAMAC bus that also carries other crates. While the computer holds its disable line, the computer's commands pass to the scaler side and the responses pass back. Otherwise only the disable line (toward the scaler side) and L (toward the computer) cross.

**`verification_module`** acts as a quad scaler with known contents:

| subaddress | read data |
|---|---|
| A0 | all 24 bits 0 |
| A1 | all 24 bits 1 |
| A2, A3 | the 24-bit front-panel switch code |

While the Dataway C line is asserted its data outputs are off, so a cleared system shows zero everywhere. In the top it sits in crate 0, station 23 (`VERIF_CRATE`, `VERIF_STATION`).

## Readouts on the BCD bus

All readout latches are clocked by the BCD strobe itself, on its leading edge (the falling edge of `strobe_n`), just as the hardware units are. By then the lines have been stable for most of a cycle, and they stay stable until 5 µs after the strobe ends.

* **`quad_display`**: each of four channels compares the bus channel number with its three thumbwheels, and latches the 8 digits at the strobe on a match or while common enable is asserted. Each digit drives a `nixie_driver_74141`, which lights one of ten cathodes and blanks codes 10–15.
* **`lecroy559a_interface`**: stores each strobed word in positive-true form and turns code 10 back into 0, because the generator blanks leading zeros itself. It passes the strobe on as the generator's clock and the BCD reset as its channel-counter reset.
* **`preset_unit`**: watches one channel. It sets `reached` once that channel's count is at least M × 10^E (M 1…9, E 0…7), comparing digit by digit. `reached` stays set until `preset_reset`. `gate`/`gate_n` give both senses of the result, for gating discriminators. Since the unit only looks once per scan, the stop can come up to one scan late. The final count on a display shows how far it overshot.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_CRATES` | 7 | top, master controller, address generator |
| `NUM_QUADS` | 4 (16 display channels) | top |
| `NUM_PRESETS` | 2 | top |
| `CYCLE_TICKS` | 600 (µs at 1 MHz) | top, master controller, timing |
| `GUARD_TICKS` | 5 | master controller, timing |
| `S1_AT`, `RESET_AT`, `STROBE_W` | 300, 100, 10 | master controller, timing |
| `VERIF_CRATE`, `VERIF_STATION` | 0, 23 | top |

## Where this design fills in the original

The original system gives the structure, the Q-scan rule, the pipelined 600 µs cycle, the strobe, guard band and BCD reset, the front-panel functions, and what each unit does. The following are this design's own choices. Check them before relying on them.

* **Clock and phases.** A 1 MHz clock. Where S1, the strobe (10 µs) and the reset (10 µs) fall in the cycle.
* **Empty addresses.** A station or subaddress that answers Q = 0 still uses a full cycle.
* **Crate numbering.** Crates are numbered 0…6.
* **Reset and clear lines.**
  * `reset_all` drives C together with S2.
  * The crate controllers send Z, C and I to every crate, selected or not.
  * The verification module switches off its data lines while C is asserted, but keeps answering Q.
* **Computer disable.** The BCD drivers are released too, not only the CAMAC ones. The interrupted cycle is restarted.
* **Readout timing.** Readouts load on the leading edge of the strobe.
* **Printer.** The sequence and the command/busy handshake.
* **Preset.** The preset unit compares digit by digit, and `reached` holds until a front-panel reset. Several units may share the BCD bus, but no number is given; the top holds `NUM_PRESETS`, two by default.
* **Read/write lines.** The shared CAMAC read/write lines are modelled as separate read and write groups.

## Limits

* **Channel numbers.** The channel number has three BCD digits, like the readouts' thumbwheels. A system with more than 1000 Q = 1 channels per scan reuses numbers from 001. A full seven crates answering Q everywhere would be 2576 channels.
* **Scan rate.** A scan takes (stations + channels) × 600 µs. With seven crates and 16 channels that is 177 cycles, or 106 ms (about 9 scans/s), below the 30–60 refreshes per second the original system aimed for. With one crate it is about 23 ms. Displays hold their digits between scans, so a long scan only delays updates; it does not cause flicker.
* **Electrical behaviour is not modelled.** Line drivers, high-impedance receivers, and the 12 V preset outputs appear only as their logic effect: polarity and wired-AND nets.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing `TB_RESULT checks=N failures=M`. Example, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/scaler_pkg.sv tb/tb_scaler_readout_system.sv --top-module tb_scaler_readout_system
./obj_dir/Vtb_scaler_readout_system
```

`tb_scaler_readout_system` runs the whole system at its default size: 7 crates, 4 quad displays, 600 µs cycles. It uses three scaler models and the verification module, which give 16 channels. It takes about 20 seconds. It checks:

* every display digit and cathode
* the LeCroy word sequence after each reset
* leading-zero blanking and the common enable
* test-mode increments, inhibit and reset of all channels
* a single crate's front-panel clear
* two presets, each stopping its own channel's input at its own count
* a computer read through the disconnect unit while the scan is stopped
* a complete printed listing

It also counts how often each of these happens and fails any that never did.

`tb_master_controller` checks the cycle itself on two crates:

* the 600-tick strobe spacing, the 10-tick strobe and the 5-tick guard band
* that the CAMAC address runs ahead of the BCD data
* one BCD reset per scan
* release of every driver under disable

Two more testbenches run the system as it is meant to be used:

* `tb_workload_full_crates` makes every station of all seven crates answer Q = 1 on every subaddress: 2576 channels in a scan of about 1.5 s simulated time. It checks every word, and that channel numbers run 001…999, 000 and then repeat.
* `tb_workload_display_channels` runs one crate with 20 scaler channels on five quad displays. It measures the scan period: 25.8 ms, or 38.8 scans/s.

The smaller testbenches compare their block against independently computed values: division for the BCD conversion, a software Q-scan, and so on.
