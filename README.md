# Full-scan register for a six-flip-flop sequential circuit

A sequential circuit is hard to test from its pins: its flip-flops cannot be
set to a chosen state, and their contents can only be seen indirectly, after
they have passed through logic. Full scan fixes both. Every flip-flop gets a
2-to-1 multiplexer in front of it, and one SELECT pin switches all of them
together:

* **SELECT = 1, test mode.** The flip-flops form one shift register,
  SI → FF1 → FF2 → … → FF6 → SO. Any state can be shifted in through SI, and
  the present state can be shifted out through SO.
* **SELECT = 0, normal mode.** Each flip-flop loads the value its own logic
  computes, just as in the original circuit.

A test then has three steps. You shift a pattern in, apply one normal-mode
clock so the logic's response is captured, and shift the response out. This
turns the sequential test problem into a combinational one.

This RTL is the scan structure for a circuit under test with six D
flip-flops (FF1..FF6), ten logic gates, primary inputs A..F and primary
output Z. The ten-gate combinational logic is **not** included. It connects
to the scan register through two vectors: `q`, the six flip-flop outputs the
logic reads, and `d`, the six next-state values the logic computes. Any
combinational block with that interface can be wired in.

## Scan cell (`rtl/scan_cell.sv`)

A mux-D scan flip-flop. When `sel` is 1 the multiplexer passes `si`, the
previous cell's output. When `sel` is 0 it passes `d`, the functional input.
The D flip-flop loads the selected value on the rising edge of `clk`. There
is no reset. Like the circuit it models, the cell gets its starting value by
scan shifting.

## Scan chain and the test sequence (`rtl/scan_chain.sv`)

`scan_chain` is the top module. It holds `N_FF` scan cells (default 6) that
share `clk` and `sel`. Index `i` of `d` and `q` belongs to flip-flop FF(i+1),
and `so` is `q[N_FF-1]`, the output of FF6.

The timing is the part most easily got wrong:

| step | SELECT | clocks | what happens |
|------|--------|--------|--------------|
| load | 1 | 6 | Pattern enters on SI, **FF6's bit first and FF1's bit last**. After the 6th clock, FFk holds its bit and SO shows FF6. |
| observe through logic | – | 0 | Apply the primary inputs. A fault that reaches Z only through gates shows on Z right after the load, so it is seen after 6 clocks. |
| capture | 0 | 1 | Each flip-flop takes its `d`. A fault that must pass through a flip-flop shows after clock 7: at SO at once if it was captured in FF6, otherwise through the logic at Z. |
| unload | 1 | 6 | Captured state leaves on SO, FF6 first, while the next pattern shifts in behind it. |

The shift order follows from the chain direction. The bit shifted in first
travels farthest, so it ends up in FF6.

## The source circuit's stuck-at tests

The circuit under test was checked by injecting three stuck-at faults on
internal lines H, J and K. Each was found with one scan pattern. Only the
flip-flop part of a pattern matters, since the primary inputs were
don't-cares and were set to 0:

| fault | FF1..FF6 | where it shows | clocks |
|-------|----------|----------------|--------|
| H stuck at 1 | 0 0 0 0 0 1 | Z (fault-free 1, faulty 0); through FF5, then the NAND gate that drives Z | 7 |
| J stuck at 1 | 0 0 0 0 0 1 | SO (fault-free 1, faulty 0); through FF6 | 7 |
| K stuck at 0 | 0 0 0 1 1 1 | Z (fault-free 0, faulty 1); FF4 = FF5 = 1 activate K, FF6 = 1 opens the NAND to Z | 6 |

The scan register included here loads each pattern in 6 clocks and captures
on clock 7, which matches these counts. The fault effects themselves belong
to the ten-gate logic. That logic is not part of this RTL, so the effects on
Z and SO are not simulated here.

## Cost

The cost is one 2-to-1 multiplexer per flip-flop, plus the SI, SO and SELECT
pins. The source circuit's estimate counts a scan multiplexer as 4 gates and
a flip-flop as 10 gates. For 6 flip-flops and 10 gates that gives
4·6 / (10 + 6·10) = 24/70 ≈ 34.3 % extra area. After synthesis the default
`scan_chain` is 6 flip-flops and 6 two-input multiplexers.

## Files

| file | contents |
|------|----------|
| `rtl/scan_pkg.sv` | `N_SCAN_FF` = 6 and the `scan_mode_e` enum for SELECT (`NORMAL_MODE` = 0, `TEST_MODE` = 1) |
| `rtl/scan_cell.sv` | one mux-D scan flip-flop |
| `rtl/scan_chain.sv` | the six-cell scan register, top module, parameter `N_FF` (at least 2) |
| `tb/tb_scan_cell.sv` | random test of one cell: mux choice in both modes, hold between edges |
| `tb/tb_scan_chain.sv` | end-to-end test at the default size |

## Simulating

Each testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it hangs.

```
verilator --binary --timing --assert --top-module tb_scan_chain \
    -y rtl -y tb +libext+.sv rtl/scan_pkg.sv tb/tb_scan_chain.sv
./obj_dir/Vtb_scan_chain
```

Use `tb_scan_cell` the same way. `tb_scan_chain` loads the three stuck-at
patterns above, then 37 random ones. For every pattern it checks:

* the load takes exactly 6 clocks and leaves the pattern in FF1..FF6;
* random values on `d` have no effect while shifting;
* the normal-mode clock is clock 7 and captures `d`;
* the following shift presents the captured state on SO, FF6 first.

The random `d` values stand in for the missing logic. The testbench counts
shift clocks, capture clocks, mode switches and SO observations, and fails if
any of them is zero.

## Choices made in this RTL

The following points are choices made here, not taken from the source
circuit:

* Flip-flops load on the rising clock edge.
* There is no reset.
* FF1 is the first cell after SI. The source circuit only fixes that FF6
  drives SO.
* The combinational logic connects through the `d` and `q` ports, not
  through A..F and Z.

To use the register with a real circuit, instantiate `scan_chain`. Drive its
`d` from the circuit's next-state logic and feed `q` back into that logic.
