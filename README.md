# Concurrent insertion and bubble sort of CO2 sensor readings

A coordinator node collects one CO2 reading from each of 40 battery-powered
end devices spread over about a kilometre. A LoRa radio module receives the
readings and passes them over a serial line to the programmable logic of an
FPGA board (a Terasic DE10-Nano). The logic sorts each round of readings in
hardware. The same round is sorted twice, at the same time, by two
independent state machines: one runs an insertion-style exchange sort and
one runs bubble sort. Their run times can then be compared directly on
identical data. Both run times are reported in clock cycles, and one of the
two sorted results is sent back on the serial line.

The RTL here is synthesizable SystemVerilog with a self-checking testbench
for every block. The radio modules and sensors are off-the-shelf parts with
no logic to design. They are not modelled: the testbenches drive the serial
line directly.

## One round, end to end

```
 uart_rxd ─► uart_rx ─► sort_ctrl ──write──► sort_ram (insertion copy) ◄─► insertion_sort_fsm
                          │   │      └─────► sort_ram (bubble copy)    ◄─► bubble_sort_fsm
 uart_txd ◄─ uart_tx ◄────┘   └── start both / count busy cycles / read result back
```

1. **Receive.** `uart_rx` delivers bytes. `sort_ctrl` joins each group of
   `D_W/8` bytes (most significant byte first) into one reading. It writes the
   reading at the next address of *both* memories in the same cycle. `n_cfg`
   sets the number of readings in the round; 0, or a value above `N_MAX`,
   means `N_MAX`. `n_cfg` is sampled when the round's first byte arrives.
2. **Start.** Once all `n` readings are stored, one `sort_start` pulse
   starts both sorters in the same cycle.
3. **Sort.** `sorting` is high from the start pulse until both sorters have
   finished. While it is high, each memory's single port belongs to its
   sorter. The controller counts the cycles each sorter is busy, giving
   `ins_cycles` and `bub_cycles`. At 50 MHz, divide by 50 to get
   microseconds.
4. **Send.** The sorted memory chosen by `tx_sel` (0 = insertion,
   1 = bubble) is read out from address 0 upward and sent through `uart_tx`.
   When the last byte has been accepted, `round_done` pulses and the next
   round begins.

Bytes that arrive during steps 2–4 are dropped. A byte with a low stop bit
raises `rx_frame_err` for one cycle and is dropped too. The receiver then
waits for the line to go high before it looks for the next start bit.

There is no framing beyond the byte count. If a byte is lost, the readings
of that round are misaligned. Since readings arrive about one per second in
the real network, the host should reset or resynchronise after an error.

## The two sorters

Both sorters are built the same way: a small FSM, `counter` instances for
the loop indices, and `comparator` instances for every test. That covers both
the data comparison and the "has this index reached its limit" checks. Each
sorter sees one memory port with an asynchronous read: one read *or* one
write per cycle. Each holds two data registers, `Regi` and `Regj`. A swap
takes two write cycles.

### insertion_sort_fsm: exchange sort

```
for i = 0 .. n-2:
    Regi = Ram[i]
    for j = i+1 .. n-1:
        Regj = Ram[j]
        if Regj < Regi:  Ram[i] = Regj; Ram[j] = Regi; Regi = Regj
```

After pass `i`, `Ram[i]` holds the minimum of `Ram[i..n-1]`. This is the
algorithm the design calls "insertion sort". Strictly, it is an exchange
(selection-by-swapping) sort. `Regi` must be reloaded after a swap, or later
comparisons in the same pass use a stale value. The RTL copies `Regj` into
`Regi` in the second write cycle.

States: `RD_I → RD_J → CMP → (WR_I → WR_J) → RD_J | RD_I | DONE`.
Busy cycles (the `DONE` cycle included):

    T_ins = 1 + Σ_i ( 1 + Σ_j ( 2 + 2·swap(i,j) ) )
          = 1 + (n-1) + n(n-1) + 2·swaps

### bubble_sort_fsm: bubble sort with a fixed pass count

```
passes = n
while passes > 0:
    for i = 0 .. n-2 (j = i+1):
        Regi = Ram[i]; Regj = Ram[j]
        if Regj < Regi:  Ram[i] = Regj; Ram[j] = Regi
    passes = passes - 1
```

The pass counter is loaded with `n` and counts down to zero. There is no
early exit when a pass makes no swaps. Both words are read afresh for every
pair. Every swap removes exactly one inversion, so the swap count equals the
number of inversions in the input.

States: `RD_I → RD_J → CMP → (WR_I → WR_J) → RD_I | DONE`. Busy cycles:

    T_bub = 1 + 3·n·(n-1) + 2·inversions

### Why the two times differ

Per comparison, the exchange sort costs 2 cycles. Bubble sort costs 3, because
it re-reads `Ram[i]`. Bubble sort also does about twice as many comparisons:
n(n−1) against n(n−1)/2. On random data the bubble sorter therefore takes
about 2.3 times as long (see below). Both interfaces use a one-cycle `start`,
which is ignored while busy, a `busy` level and a one-cycle `done`. A `swap`
strobe marks the first cycle of each swap. With `n < 2` a sorter finishes in
one cycle.

## Measured run times

The 50 MHz clock is the DE10-Nano's board oscillator. It is an assumption,
not a given. In the table, "reference" means the published hardware
measurements, and "this RTL" is one random data set of readings from
350 to 5000 ppm (`tb_workloads`):

| sensors | insertion, this RTL | insertion, reference | bubble, this RTL | bubble, reference |
|--------:|--------------------:|---------------------:|-----------------:|------------------:|
| 10      | 154 cyc = 3.08 µs   | 3.34 µs              | 325 cyc = 6.50 µs   | 2.85 µs  |
| 20      | 600 cyc = 12.00 µs  | 11.63 µs             | 1349 cyc = 26.98 µs | 12.06 µs |
| 28      | 1172 cyc = 23.44 µs | 21.99 µs             | 2657 cyc = 53.14 µs | 23.76 µs |
| 40      | 2420 cyc = 48.40 µs | 43.75 µs             | 5501 cyc = 110.02 µs| 48.88 µs |

The insertion sorter lands within about 10 % of the reference. The bubble
sorter is 2.2 to 2.3 times slower than the reference at every size. If the
reference made n(n−1) comparisons, its bubble times work out to about 1.6
cycles per comparison. That points to a sorter that keeps the previous
`Ram[j]` as the next `Regi`, or that makes fewer passes. The fixed n-pass
loop with two reads per pair is kept here because it is what the
bubble-sort algorithm describes. `bubble_sort_fsm` is the place to change
it.

For larger networks (`tb_scaling`, sorters only, both at the same depth):

| readings | insertion    | bubble       | reference extrapolation |
|---------:|-------------:|-------------:|-------------------------|
| 5000     | 0.68 s       | 1.75 s       | –                       |
| 10000    | 2.55 s       | 7.00 s       | 1.2 s / 3.5 s           |

The 10000 row was simulated with `NS = 10000` in `tb_scaling`. That takes
about three minutes, so the testbench is kept at 5000.

## Memories

`sort_ram` is a distributed (LUT) memory: synchronous write, asynchronous
read, one port, `N_MAX × D_W` bits (40 × 16 = 640 per copy). There are two
copies because both sorters rewrite their data in place while they run
concurrently. The architecture shows a single memory on a shared bus. A single
memory would force the two sorts to take turns, which would defeat the
side-by-side comparison. In `co2_sort_top` a multiplexer on `sorting` picks
each copy's owner.

## Serial link

Both directions use 8N1 framing at `BAUD_RATE` (default 115200). The
bit time is `CLK_FREQ / BAUD_RATE` clock cycles (434 at the defaults).
`uart_rx` uses a two-flop synchroniser, checks the start bit at its middle
and samples each bit at its middle. It delivers the byte at the middle of
the stop bit. `uart_tx` takes a byte when `valid && ready` and holds `ready`
low for exactly ten bit times. Receiving a 40-reading round takes 80 bytes,
about 0.7 ms at 115200 baud. That is negligible next to the one reading per
second the radio network delivers.

## Interpretations and departures

- **Widths, clock, baud, byte order, reset** are not specified by the
  design and are chosen here: 16-bit readings, 50 MHz, 115200 baud,
  most significant byte first, asynchronous active-low reset.
- **Serial versus GPIO:** the receiver module is described both as talking
  UART to the FPGA and as using a "GPIO interface". Here, the UART line is
  the GPIO pin.
- **Exchange sort:** `Regi` is reloaded after a swap, which a correct sort
  needs. The outer loop stops at `i = n-2` (the `i = n-1` pass has no
  inner iterations).
- **Bubble sort:** the algorithm's condition is read as `Ram[j] < Ram[i]`
  (value comparison), and `i, j` restart at 0, 1 on every pass.
- **Two memories** instead of one shared memory (see above).
- **Run-time counters, `tx_sel`, `n_cfg`** are additions of this RTL. They
  make the published comparison repeatable: run time per sorter, result
  from either sorter, and 10/20/28/40 sensors from one build. Sending the
  sorted data back is a reading of the "send and sort data" step of the
  system timeline.
- **Not modelled:** the ESP-32 end devices with their MG-811 sensors and the
  ESP-32 LoRa receiver. They are outside the FPGA.

## Files

| file | contents |
|------|----------|
| `rtl/sort_pkg.sv` | default sizes (40 readings, 16 bits, 50 MHz, 115200 baud) and width helpers |
| `rtl/counter.sv`, `rtl/comparator.sv` | the counter and comparator building blocks |
| `rtl/sort_ram.sv` | one memory copy |
| `rtl/insertion_sort_fsm.sv`, `rtl/bubble_sort_fsm.sv` | the two sorters |
| `rtl/sort_ctrl.sv` | round controller and run-time counters |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial link |
| `rtl/co2_sort_top.sv` | top level |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_co2_sort_top.sv` | end to end at default parameters: three rounds, framing error, both result paths |
| `tb/tb_workloads.sv` | 10, 20, 28, 40 and 250 readings through the whole system |
| `tb/tb_scaling.sv` | both sorters on 5000 readings |

The assertions check that a sorter's memory address stays below `n`, and
that the controller never writes while the sorters own the memories.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; a watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/sort_pkg.sv tb/tb_co2_sort_top.sv --top-module tb_co2_sort_top
./obj_dir/Vtb_co2_sort_top
```

Replace `tb_co2_sort_top` with any other testbench name. The end-to-end
test at default parameters runs in about a second. The testbenches
compare run times against the closed-form cycle formulas above, so a change
to a sorter's state sequence must be matched in its testbench model.

## Changing sizes

`co2_sort_top` parameters: `N_MAX` (memory depth, default 40), `D_W`
(reading width, a multiple of 8, default 16), `CLK_FREQ` and `BAUD_RATE`.
The counter width `CNT_W = clog2(N_MAX+1)` follows from `N_MAX`, as does
the width of `n_cfg`. The logic grows with log2(N_MAX); the memories grow
linearly. Run time grows as n²: about 1.3·n² cycles for the exchange sort
and 3.5·n² for bubble sort on random data.
