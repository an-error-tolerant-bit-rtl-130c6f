# HELP: a path-delay PUF with error-tolerant bit generation

HELP (Hardware-Embedded deLay PUF) gets a chip-unique secret from the path delays of logic that is already on the chip. In the reference setup this logic is one round of an AES core. A change on the inputs of that logic is launched at one clock edge. A second clock, whose phase can be moved in steps of about 80 ps, captures where the resulting edge has reached. From that capture the engine gets a digital delay value, the *PN*, for each path. The PN runs from 0 to 128, which covers delays of 5 to 15 ns.

Raw delays are unstable in two ways:
- They drift with temperature and supply voltage.
- A few paths "jump" to a new delay.

The engine fixes both in three ways:
- It keeps only stable paths, and records which ones they were as public helper data.
- It shifts the regenerated PNs back by the change in their mean.
- It produces each bit by a small majority vote over a run of PNs: the Dual-PN Count (DPNC) method.

The engine has two modes:
- **Enrollment** creates the bitstring and the helper data.
- **Regeneration** reproduces the same bitstring later from the helper data, under other conditions.

The RTL holds everything except two parts:
- The clock managers that make the two phase-shifted clocks.
- The logic under test, the MUT (module under test).

Those two parts are FPGA primitives and third-party logic. They appear as ports of `help_top`, and the testbenches drive them with behavioural models.

## Structure

```
              +---------------- help_top ----------------------------------+
 uart_rxd --> | serial_if --prm/start--> dce_ctrl --PN--> pn_memory         |
 uart_txd <-- |    ^                       |  ^  valid bits                 |
              |    |                       |  +-> valid_path_memory        |
              |    |  lc_lfsr_ctrl -scan-> launch_rows --mut_in-----------------> MUT (external)
              |    |                       ^ launch                         |
              |    |                       |                                |
 capture_clk->|    |  rebel_row <--- rebel_ctrl (IP select, flush-delay)  <-------- mut_out
              |    |   row_q --> sample_analysis --> dce_ctrl              |
              |    +---- bitstring <-- bge_ctrl (tcomp, dual_pn_bin, dpnc) |
              |                         <-> pn_memory, stop_point_memory    |
              |  random_pairing_gen --> pair_addr1/2                       |
              +------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `help_pkg` | Shared sizes, run-parameter struct, mode enum |
| `lc_lfsr_ctrl` | 32-bit LFSR that scans a random two-vector challenge (2 x 256 bits) into the launch rows |
| `launch_rows` | Initial and final launch vectors; switches the MUT inputs from V1 to V2 on `launch` |
| `rebel_ctrl` | Decodes the insertion point (IP); puts the IP flip-flop and every flip-flop to its right in flush-delay mode; extracts the chain segment |
| `rebel_row` | 264-flip-flop capture row with flush-delay mode (behavioural model, see below) |
| `sample_analysis` | Counts transitions in the captured chain (XOR of neighbours) and locates the edge relative to the target flip-flop |
| `dce_ctrl` | Data Collection Engine: sweeps, stability test, helper data, PN storage, replay |
| `sdp_ram` | Simple dual-port RAM, used for the PN, valid-path and stop-point memories |
| `tcomp` | Temperature compensation: the mean of the first 64 PNs and the offset |
| `dual_pn_bin` | Mod-PN, low/high group, enrollment acceptance window |
| `dpnc` | DPNC bit generation: run counters (enrollment) and a k-wide majority vote (regeneration) |
| `bge_ctrl` | BitGen Engine: runs the TCOMP pass, then walks through PN memory with DPNC |
| `random_pairing_gen` | 28-bit LFSR that gives random pairs of PN addresses |
| `serial_if`, `uart_rx`, `uart_tx` | Host link |
| `help_top` | Wires everything together |

## Measuring one path: REBEL and the sweep

### The capture row and flush-delay mode

The capture row is the row of pipeline flip-flops behind the MUT. It has 264 flip-flops: the 256 MUT outputs plus 8 extra flip-flops, so that the rightmost insertion points still have a chain behind them. One flip-flop, the *insertion point*, is chosen. That flip-flop and all flip-flops to its right are switched to *flush-delay* mode:
- The IP flip-flop takes its functional input, which is the MUT output.
- Every flip-flop to its right takes the scan input. The scan path runs through transparent master latches.

The row to the right of the IP therefore becomes a combinational delay chain that extends the path under test. When the capture clock fires, that chain is frozen. How far the transition has travelled into the chain is a fine measure of the path delay.

### Why rebel_row is a behavioural model

`rebel_row` is a behavioural model, because a delay line through latches has no synthesizable equivalent. It works like this:
- It keeps a short time history of the IP's MUT output.
- At a capture edge, flip-flop `IP+n` receives the value that the IP had `(n+1)*STAGE_DELAY` earlier.
- Flip-flops in normal mode capture their MUT output.

On a real chip this row is the modified scan flip-flop row itself. `rebel_ctrl`, which produces the mode controls, is ordinary logic.

### The sweep

`dce_ctrl` measures a path with a series of launch/capture tests:
1. The capture phase setting (FPA) starts at 128. This is the latest capture, 15 ns after launch.
2. Each test applies V1, launches V2, captures the row, and analyses the 8-flip-flop segment that starts at the IP.
3. After each test the FPA is lowered by one, so the capture comes earlier and the edge shows up further back in the chain.
4. The first FPA at which the edge sits before the *target flip-flop* (4 flip-flops after the IP) is the path's PN.

The sweep stops early in these cases:
- **Glitch**: the captured chain shows more than one transition at any step. The path is unstable.
- **No edge**: the path shows no transition at all, is already before the target at FPA 128, or is still beyond it at FPA 0. The path cannot be measured.

### Enrollment and regeneration

During enrollment a path is swept `NSAMP` (4) times. It is *valid* only if all three of these hold:
- every sweep succeeds;
- the spread of the PNs (max − min) is at most the user threshold;
- the mean PN falls in the Dual-PN acceptance region (next section).

The valid flag of every path tested is written in order to the valid-path memory. This memory is public helper data. The PN of each valid path goes to the next free PN memory location.

During regeneration the engine reloads the same seed into the LFSR, so the paths come in exactly the same order:
- A path whose flag is 0 is skipped.
- A path whose flag is 1 is swept once, with no stability test, and its PN is stored.

PN location *i* therefore holds the same physical path in both modes.

### Path order

A path is a (vector pair, IP) pair. One scanned-in vector pair serves all 256 IPs in turn, then the LFSR produces the next pair.

## Turning PNs into bits

### Temperature compensation

`tcomp` averages the first 64 PNs:
- At enrollment the mean is kept. It stands for a value in public storage.
- At regeneration the offset *enrollment mean − regeneration mean* is added to every PN before binning.

### Dual-PN binning

PNs from paths of very different lengths cannot be compared directly, so each PN is reduced modulo a user modulus M:
- Mod-PNs `0 .. M/2−1` form the **low** group.
- Mod-PNs `M/2 .. M−1` form the **high** group.

At enrollment only mod-PNs near the middle of their group are accepted: within ±`win` of `c = ⌊(M/2−1)/2⌋` (low) or of `M/2 + c` (high). For M = 22 and win = 1 this accepts {4,5,6} and {15,16,17}. A path accepted this way can drift by about M/4 at regeneration and still land in the same group.

### DPNC: Dual-PN Count

`bge_ctrl` reads PN memory from address 0 upward. In each mode it works as follows.

**Enrollment**
- Two counters count the current run of low-group and high-group PNs. A PN from one group increments that group's counter and clears the other.
- When a counter reaches the odd user value `k`, a bit is produced and both counters are cleared. The bit is 1 for a run of high PNs and 0 for a run of low PNs.
- At that point a 1 is written to the stop-point memory at the current PN address. This is the second piece of helper data.

**Regeneration**
- Counting is not used.
- At every address whose stop-point flag is 1, the bit is the majority group of the last `k` PNs.
- Up to (k−1)/2 PNs that have jumped to the other group are therefore out-voted.

Generation ends when the requested number of bits (at most 256) has been made, or when the PNs run out.

## Random pairing generator

`random_pairing_gen` steps a 28-bit LFSR (x^28 + x^25 + 1) and folds two slices of it into two PN addresses below the current PN count. DPNC reads PNs in memory order and does not need a pairing. The generator is therefore not part of the bit path: its request and addresses are ports of the top (`pair_next`, `pair_addr1`, `pair_addr2`, `pair_valid`).

## Host protocol

The host link is a UART, 8 data bits, no parity, 1 stop bit. The default `CLKS_PER_BIT` of 434 gives 115200 baud at 50 MHz. Multi-byte fields are sent least significant byte first.

| Command | Bytes that follow | Effect |
|---|---|---|
| `P` | 12 | Set the run parameters: seed (4), M, win, k, threshold, number of PNs (2), number of bits (2) |
| `E` | — | Start enrollment |
| `G` | — | Start regeneration |
| `B` | — | Reply with the bitstring, 32 bytes; byte *i* holds bits 8i+7..8i |
| `N` | 2 (address) | Reply with one byte: the PN stored at that address |

When a run finishes, the engine sends `D`.

The defaults after reset are:
- seed 1
- M = 22, win = 1, k = 5
- threshold 2
- 1024 PNs
- 256 bits

## Top-level ports

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | System clock (50 MHz intended), synchronous active-low reset |
| `uart_rxd`, `uart_txd` | in/out | Host link |
| `launched` | out | High while V2 is applied. Its rising edge is the launch event for the clock generator |
| `fpa` | out | Phase setting 0..128 for the capture clock generator |
| `capture_clk` | in | Capture clock: the clock generator must produce its rising edge 5 + fpa·10/128 ns after the launch |
| `mut_in[255:0]` | out | Inputs of the logic under test |
| `mut_out[255:0]` | in | Outputs of the logic under test: one insertion point each |
| `pair_next`, `pair_addr1`, `pair_addr2`, `pair_valid` | in/out | Random pairing generator |
| `busy` | out | Engine running |

## Sizes and own choices

### Sizes taken from the description

- 256 launch bits per row
- a 264-flip-flop capture row
- FPA range 0..128
- a 32-bit challenge LFSR and a 28-bit pairing LFSR
- TCOMP over 64 PNs
- a 256-bit bitstring
- the M = 22, k = 5 example

### Own choices

These points are not given by the description. The values chosen:
- **Chain segment and target**: 8-flip-flop chain segment; target flip-flop at distance 4; 0.25 ns per flush-delay stage in the model.
- **Sampling**: 4 samples per path; the stored PN is their mean; settle and capture waits of 5 and 2 cycles.
- **Where the acceptance window is applied**: in the DCE, while the valid flag is written. A path outside the window is marked invalid in the helper data rather than being dropped later.
- **Memory depths**:
  - PN memory: 16384 × 8.
  - Stop-point memory: 16384 × 1.
  - Valid-path memory: 2^19 × 1. This holds about 1,260 tested paths per bit for 256 bits.
- **Challenge application**: the launch switches the MUT inputs from the initial to the final vector through a multiplexer.
- **LFSR polynomials**: x^32+x^22+x^2+x+1 for the challenge LFSR; x^28+x^25+1 for the pairing LFSR.
- **UART protocol**: the whole host protocol is this design's own.

### Departures

- Helper data is held in on-chip RAM and is not exported over the host link. Only the bitstring and the PNs can be read back.
- Repeated enrollment at several supply voltages, to mark jumping paths invalid, is not supported. This refinement needs several enrollments merged into one valid-path map.

### Tool notes

- Yosys' coarse synthesis does not accept the time-history queue in the `rebel_row` model. That module is a simulation model and is not meant to be synthesized.
- Verilator's lint reports a few unused outputs at the top (diagnostic counters and the scan output of the launch rows). These are left in place.

## Simulation

The testbenches use `--timing` for the clock, the capture-clock model and the MUT model. Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a watchdog.

Example, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Mdir obj_top -o sim --top-module tb_help_top -y rtl -y tb +libext+.sv \
  -Irtl -Itb rtl/help_pkg.sv tb/tb_help_top.sv
obj_top/sim
```

### Unit testbenches

Each block has one, named `tb/tb_<module>.sv`. The memories share `tb_sdp_ram`.

### End-to-end testbenches

Both testbenches drive the top over the UART. Each runs an enrollment and then a regeneration under a shifted delay model with jumps, and checks the following against an independent model:
- every stored PN;
- the acceptance region;
- the stop points;
- the bitstring;
- the regenerated bits;
- a PN read-back over the UART and the pairing addresses.

Each also counts every mechanism and fails if one never happened:
- glitch aborts;
- range rejects;
- window rejects;
- skipped paths in regeneration;
- counter resets;
- stop points;
- majority corrections;
- new vector pairs.

| Testbench | Configuration | Run time |
|---|---|---|
| `tb/tb_help_top.sv` | Reduced: fast UART, 150 PNs, 12 bits, k = 3 | about 30 s |
| `tb/tb_help_top_full.sv` | The top at its default parameters: 400 PNs, 8 bits, k = 5 | about 80 s |

The longest bitstring simulated end to end is 12 bits. A full 256-bit enrollment needs about 8,000 stored PNs, which is roughly 20 times the full-size run. It fits the memories (16,384 PN words, 2^19 valid-path flags), but the full measurement loop was not simulated at that length. The bit-generation half is simulated at full length instead. `tb/tb_bge_ctrl_256.sv` runs the BitGen Engine at its default sizes over a 16,000-PN stream:
- It enrolls a complete 256-bit bitstring.
- It regenerates that bitstring after a shift, with 2 % of the PNs jumping to the other group.
- It checks every stop point and both bitstrings against a model.
- It checks that the jumps are out-voted.

### Models used by the testbenches

- **`tb/clock_gen_model.sv`** stands in for the clock managers. It produces the capture edge 5 + fpa·10/128 ns after each launch.
- **`tb/mut_model.sv`** stands in for the AES round. It gives each output a hashed, chip-dependent delay of 4.5–13.5 ns. It makes a few percent of the paths glitch or noisy. It can add a global delay shift, and +3 ns jumps on chosen paths.
