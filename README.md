# Bus interfaces for an on-chip SRAM, a DAC and an ADC (Open-V v.2 peripherals)

A small microcontroller needs its processor to reach three very different
peripherals: a 4 KB SRAM that must keep up with the system bus, and a
digital-to-analog and an analog-to-digital converter that are slow and sit in a
low-power, always-on part of the chip. This RTL gives each of them the bus
that suits it:

| Peripheral | Bus | Interface | What a transfer does |
|---|---|---|---|
| 1024 x 32 single-port SRAM (`SP32B1024`) | AHB-Lite | `sram_ahb_if` | read or write a word, halfword or byte; no wait states |
| 12-bit R2R DAC | APB | `dac_apb_if` | a write sets the output code, PREADY comes after a converter wait |
| 10-bit ADC | APB | `adc_apb_if` | a read returns the last settled conversion result |

The interfaces are small: a few registers and a state machine each. Most of
the subtlety is in the SRAM interface. It answers every AHB-Lite transfer with
zero wait states, and it has to build byte and halfword writes on a macro
that can only write whole words.

The structure follows a published design of these interfaces for the second
version of the Open-V RISC-V microcontroller (processor "Olinguito", 180 nm).
The figures and descriptions of that design fix the registers, the capture
condition, the strobe gates, the size mux and the two APB state machines.
Where the published description is silent or cannot work as written, this RTL
makes its own choices. They are listed in [Departures and choices](#departures-and-choices).

## Files

```
rtl/openv_pkg.sv         HTRANS/HSIZE encodings, state enums of the three FSMs
rtl/sram_ahb_if.sv       AHB-Lite slave -> SRAM macro strobes
rtl/sram_sp32b1024.sv    behavioural model of the 1024 x 32 SRAM macro
rtl/dac_apb_if.sv        APB slave -> 12-bit DAC code
rtl/dac_r2r.sv           behavioural model of the R2R DAC (real-valued output)
rtl/adc_apb_if.sv        APB slave <- 10-bit ADC result
rtl/adc_model.sv         behavioural model of a free-running 10-bit ADC
rtl/openv_periph_top.sv  all three interfaces with their peripherals
tb/tb_<module>.sv        one self-checking testbench per module
```

`sram_sp32b1024`, `dac_r2r` and `adc_model` are simulation models of a
foundry memory macro and two analog blocks. In silicon the real parts replace
them. The three `*_if` modules and the package are synthesizable.

## The SRAM interface (`sram_ahb_if`)

### Data path

```
HADDR[9:0] --[AP]-----------------------------> A
HSIZE      --[size]--+
HWDATA     --[DP]----+--> size mux --> D         size 0: {QP[31:8],  DP[7:0]}
Q ---------+-[QP]----+                           size 1: {QP[31:16], DP[15:0]}
           +----------------------------------> HRDATA   size 2..7: DP
1 -> HREADYOUT     0 -> HRESP
CEN = ~(reading1 | writing1)     WEN = ~writing2
```

A transfer is taken when `HSELx & HREADY & (HTRANS == NONSEQ)`. In that
address phase `AP` stores `HADDR[9:0]` and `size` stores `HSIZE`. The SRAM
address `A` always comes from `AP`. `HRDATA` is always the macro output `Q`:
the strobes keep the macro from producing anything other than the addressed
word while a read is in its data phase. `HREADYOUT` is tied high and `HRESP`
to OKAY.

### Sequencer and timing

| Cycle | State | reading1 / writing1 / writing2 | CEN | WEN | What happens |
|---|---|---|---|---|---|
| address phase | (any) | – | – | – | AP, size captured |
| read data phase | `SRAM_RD` | 1 / 0 / 0 | 0 | 1 | `Q = mem[A]` appears on HRDATA |
| write data phase | `SRAM_W1` | 0 / 1 / 0 | 0 | 1 | old word read; `QP <= Q`, `DP <= HWDATA` |
| next cycle | `SRAM_W2` | 0 / 1 / 1 | 0 | 0 | merged word `D` written |

Every write is a read-modify-write, even a full-word one (the mux then ignores
`QP`). The SRAM has a single write-enable bit and no byte enables, so a byte
or halfword write needs the old word.

A few consequences matter to a bus master:

* **Reads are pipelined.** A new address phase may overlap the data phase of
  a read, so back-to-back reads run at one per cycle.
* **A write occupies two cycles with HREADYOUT high.** The master must not
  start a new transfer in the data phase of a write: leave HTRANS IDLE (or
  deselect the slave) for that one cycle. A transfer may start in the cycle
  after that (the `SRAM_W2` cycle); a read there sees the freshly written
  word. An immediate assertion in the module reports a violation, and a
  transfer offered in that cycle is not taken.
* **Addressing is by word.** `HADDR[9:0]` is the word index, so consecutive
  addresses are consecutive 32-bit words. A byte write always updates bits
  [7:0] of the addressed word, and a halfword write bits [15:0]; the master
  puts the data on those HWDATA lanes. `HADDR[31:10]` is ignored; address
  decoding is left to the bus's `HSELx`.
* SEQ and BUSY transfers, and cycles with `HREADY` low, are ignored.
  `HBURST`, `HPROT` and `HMASTLOCK` are accepted and unused.

The read timing depends on the macro: `sram_sp32b1024` shows `mem[A]` on `Q`
in the same cycle that `CEN` is low and `WEN` high (a flow-through read), and
holds the last word read otherwise. A macro whose output appears only after
the next clock edge would deliver read data one cycle late. Such a macro needs
a wait state (HREADYOUT low for one cycle in `SRAM_RD`), which this interface
does not have.

## The DAC interface (`dac_apb_if`)

A four-state write FSM:

```
startW --(PSEL & PWRITE & PENABLE)--> savePwdata --> working --(delay == 4)--> readyW --> startW
                                                       ^  |
                                                       +--+ delay != 4
```

* `savePwdata` stores `PWDATA[11:0]`.
* In `working` the `DATA` register feeding the converter loads the stored
  code, and a counter counts the cycles spent in the state. The loop back to
  `working` is taken `DELAY` (= 4) times.
* In `readyW`, `PREADY` is high and the transfer ends.

A write's access phase is therefore `DELAY + 4` = 8 cycles: startW,
savePwdata, five cycles in working, readyW. `DATA` changes at the end of the
first `working` cycle and keeps its value until the next write. Reads are
acknowledged in their first access cycle (`PREADY = 1` while `PWRITE` is low)
and return nothing. The interface has no PRDATA and ignores PADDR.

Settling time: at 100 MHz, PREADY comes 50 ns after the code changes. The
DAC's typical settling time is 100 ns, so software that needs a settled
output must wait another 50 ns, or `DELAY` can be raised to 10.

## The ADC interface (`adc_apb_if`)

* A register `latchDATA` loads the ADC's `DATA` on every clock edge at which
  the ADC's `BUSY` output is high.
* `PRDATA = enData ? latchDATA : 0`.
* `PREADY = PWRITE ? PreadyW : PreadyR`.
* A two-state FSM moves from `startR` to `process` on
  `PSEL & !PWRITE & PENABLE`, and back the next cycle.
* `process` raises `enData` and `PreadyR`, so a read takes two access cycles
  and returns the register in the second.
* `PreadyW` is high in `startR`: writes are acknowledged at once and change
  nothing.
* `PRDATA` is 10 bits; the top zero-extends it to 32.

The ADC model (`adc_model`) converts continuously, with no start input:

* Every `CONV_CYCLES` = 16 clocks it puts `floor(VIN / 1.8 V * 1024)`,
  clamped to 0..1023, on `DATA`.
* It drops `BUSY` for exactly that one cycle.

With the interface's BUSY-enabled register, a read therefore never sees a
result that is changing. The real converter's BUSY semantics and conversion
time are not known; check them against this convention before connecting a
real part.

## The top (`openv_periph_top`)

Instantiates the three interfaces, the SRAM model, the DAC model and the ADC
model. It brings out:

* the AHB-Lite slave port, under the AHB signal names;
* the DAC's APB port (`dac_*`) and its analog output `dac_vout` (`real`);
* the ADC's APB port (`adc_*`) and its analog input `adc_vin` (`real`).

The processor and the AHB-to-APB bridges of the microcontroller are not
included. Everything runs from one clock `clock` and one asynchronous
active-low reset `nRST`; a chip with a separately clocked always-on domain
would give the ADC interface its own clock and reset.

Reset must be applied before the first clock edge. Until the interface is
reset, its state is unknown and could strobe a write into the SRAM.

## Departures and choices

Compared with the published description, this RTL:

1. **Captures write data in the AHB data phase.** The original stores
   HWDATA and the SRAM output together with the address. AHB-Lite delivers
   HWDATA a cycle after the address, and the SRAM output at address time is
   not the addressed word. Here `DP` and `QP` load in the write's data phase
   (`SRAM_W1`).
2. **Registers HSIZE.** The original feeds the bus HSIZE straight to the
   size mux. When the merged word is written, that would already be the next
   transfer's size.
3. **Uses sequencer states of its own.** Only the signals `reading1`,
   `writing1` and `writing2` are given; the states behind them (read = 1
   cycle, write = 2 cycles) are this design's.
4. **Raises the ADC's PreadyR in `process`.** The description places it in
   `startR`, which would end a read before its data is driven.
5. **Makes the DAC's DATA a holding register.** The description only says
   the DATA mux is "activated" in `working`. Here the code loads then and is
   held until the next write.
6. **Answers DAC reads at once, with no data.** Reads are not described.
7. **Picks the delay-counter timing:** the self loop is taken four times,
   five cycles in `working`.
8. **Chooses the behaviour of the three models:** SRAM read timing and
   zeroed initial contents; DAC `VDD` = 1.8 V and an ideal ladder; ADC
   conversion period, reference, and BUSY convention.

Not modelled:

* the earlier (v.1) versions of the DAC and ADC interfaces, which the
  original compares against;
* area, power and timing in the 180 nm process;
* bursts, protection and locked transfers on AHB-Lite.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/openv_pkg.sv \
    tb/tb_openv_periph_top.sv --top-module tb_openv_periph_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. `tb_openv_periph_top` runs the
whole design at its default sizes:

* three masters run concurrently, one per port;
* thousands of SRAM reads, pipelined reads and word, halfword and byte writes
  are checked against a reference memory;
* DAC writes must take 8 access cycles and reach `1.8 * code / 4096` volts
  within 110 ns;
* ADC reads must take two access cycles. In loop-back mode the DAC output
  drives the ADC input, so the value read must be `code / 4`;
* the testbench counts every mechanism and fails if one never happened.

It runs in well under a second. The per-module testbenches check cycle-exact
strobes, latencies and data for each block on its own.
