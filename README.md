# RF-CGRA: a CGRA whose PE registers form hierarchical register chains

A coarse-grained reconfigurable array (CGRA) runs the body of a loop as a
software pipeline: every PE executes one operation per cycle, the pattern
repeats every II cycles (the initiation interval), and a new loop iteration
starts every II cycles. The hard part of mapping a loop onto such an array is
not the arithmetic but the *waiting*: when a value is produced in cycle t and
consumed in cycle t + L, something has to hold it for L cycles, and in a
pipelined loop a fresh copy arrives every II cycles.

Two classic answers both waste resources:

* a central register file per PE needs a different register address per
  iteration and cannot pass values on to another PE's register file;
* registers on the input links between PEs hold a value only as long as
  that link is not needed for anything else, so long delays use up links.

In this design each PE has four *distributed registers* R0-R3 that can be
wired three ways, chosen per cycle by the configuration:

* **intra-PE chain** - RES -> R0 -> R1 -> R2 -> R3: a value walks down the
  registers of one PE, so it stays in the PE for up to 4 x II cycles without
  touching a link;
* **inter-PE chain** - a register loads from a neighbour PE, so chains of
  several PEs form longer delays, one link per PE crossed;
* **bypass** - a register is skipped and the value crosses the PE in the same
  cycle (single-cycle multi-hop), *while the register itself can still latch
  another value from the chain*.

The array is 4 x 4 PEs in a mesh, with one load/store unit per row on a shared
row bus, a crossbar to four data-memory banks, a configuration memory holding
up to 16 contexts per PE, and a context sequencer.

## Inside a processing element

```
             N S W E  (from neighbours)      row load bus
                |                                |
        +-------v--------------------------------v------+
        |  CW1  input crossbar: any source -> lane 0..3  |
        +--lane0-----lane1-----lane2-----lane3-----------+
             |         |         |         |
   RES --> [CW3]    [CW4]     [CW5]     [CW6]     2x2 switches
           |    \   |    \    |    \    |    \    (inputs: chain, lane)
          R0   byp R1   byp  R2   byp  R3   byp
           |\    |  |\    |  |\    |   |     |
           | `-> M1 | `-> M2 | `-> M3  `---> M4   M: register or bypass
           |        |        |
           '-chain->'-chain->'-chain-> (R0 feeds CW4, R1 feeds CW5, R2 feeds CW6)
                 M1..M4, RES
        +--------v--------------------------------------+
        |  CW2  output crossbar                          |
        +--N---S---W---E-----FU_A--FU_B-----LSU---------+
                              |     |(or immediate)   '-> store data
                             [   FU   ] -> RES (result register)
                                  '-> memory address (LOAD/STORE)
```

* **CW1** (`rfcgra_in_xbar`) puts any of N, S, W, E, the row load bus or zero
  on each of the four lanes. Lane k leads to register Rk. Because a chain is
  longest when it starts at R0, CW1 lets every direction reach R0.
* **CW3-CW6, R0-R3, M1-M4** (`rfcgra_reg_chain`). Each 2x2 switch has two
  inputs - the *chain* input (RES for R0, R(k-1) for Rk) and *lane k* - and
  two outputs: one loads Rk, the other is the bypass wire. The two outputs
  have separate selects, so "latch the chain, bypass the lane" is possible.
  M(k+1) passes either Rk or the bypass wire to CW2. Rk loads only when its
  enable bit is set; otherwise it holds. Under modulo scheduling a register is
  typically enabled once every II cycles and so holds a value for II cycles.
* **CW2** (`rfcgra_out_xbar`) feeds seven destinations from M1-M4, RES or
  zero: the four mesh outputs, the two FU operands and the store data.
  Choosing which M output leaves the PE sets the length of the intra-PE chain
  (1 to 4 registers).
* **FU** (`rfcgra_fu`): NOP, PASS, ADD, SUB, MUL, AND, OR, XOR, SHL, SRL, SRA,
  signed LT, EQ, ABS, LOAD, STORE. Operand B can be a sign-extended 16-bit
  immediate. For LOAD/STORE the FU computes the word address A + imm.
* **RES** takes the FU result when `res_we` is set, and is both a CW2 source
  and the head of the intra-PE chain.
* The **configuration register** holds the current context (`pe_cfg_t`) and
  is reloaded every clock cycle.

### Timing of one PE

| path | latency |
|---|---|
| neighbour input -> CW1 -> bypass -> M -> CW2 -> output | combinational, same cycle |
| lane or chain -> Rk -> M -> CW2 | 1 cycle (value latched at the clock edge) |
| operands -> FU -> RES | 1 cycle |
| LOAD issued in cycle t -> data on the row bus | cycle t + 1 |
| STORE | written at the end of the cycle it is issued |

A value that goes RES -> R0 -> R1 -> R2 -> R3 with all registers enabled
every cycle leaves R3 four cycles after it left RES; with II = 2 and the
registers enabled in one context of two, each stage adds two cycles.

## Configuration contexts

`rfcgra_pkg::pe_cfg_t` is one PE's context word (71 bits):

| field | meaning |
|---|---|
| `op` | FU operation (`op_e`) |
| `imm_b`, `imm` | operand B is the sign-extended 16-bit immediate; also the address offset of LOAD/STORE |
| `res_we` | write the FU result into RES |
| `cw1_sel[k]` | source of lane k: `IN_N/S/W/E`, `IN_LSU` (row bus), `IN_ZERO` |
| `reg_from_lane[k]` | Rk loads from lane k (1) or from the chain (0) |
| `byp_from_lane[k]` | the bypass wire of lane k carries lane k (1) or the chain (0) |
| `reg_we[k]` | Rk loads this cycle |
| `m_byp[k]` | M(k+1) outputs the bypass wire (1) or Rk (0) |
| `cw2_sel[j]` | source of CW2 output j (`XO_N, XO_S, XO_W, XO_E, XO_FU_A, XO_FU_B, XO_LSU`): `XS_M1..XS_M4`, `XS_RES`, `XS_ZERO` |

The all-zero word is the idle context (NOP, nothing written, every M
showing its register). The configuration memory (`rfcgra_config_mem`) holds
`CTX_DEPTH` contexts per PE; the host writes one word per cycle through
`cfg_we/cfg_pe/cfg_ctx/cfg_wdata`, with PE index `row*COLS + col`.

The context sequencer (`rfcgra_ctrl`) starts on `start` and runs
`run_cycles` cycles. In the cycle after `start` the array executes context 0,
then 1, ..., `ii-1`, 0, ... At the end every PE is loaded with the idle
context, `busy` falls and `done` is set until the next `start`. RES and the
distributed registers are not cleared by `start`; only reset clears them.

## Memory system

* One **LSU per row** (`rfcgra_lsu`): the four PEs of a row share one
  request path and one load bus, so at most one load or store per row per
  cycle - four per cycle for the array. The mapping must respect this; if it
  does not, the lowest column wins and `lsu_conflict[row]` is raised.
* Returned load data is broadcast on the row bus; every PE of the row can
  pick it up on CW1 (`IN_LSU`) in the cycle after the load. The bus is zero
  in cycles with no returning load.
* The **crossbar** (`rfcgra_mem_xbar`) lets every row reach every bank.
  Words are interleaved: bank = address mod 4, address in the bank =
  address div 4. Two rows on one bank in one cycle: the lower row wins, the
  other request is dropped and `bank_conflict[row]` is raised. The array
  never stalls; avoiding conflicts is the mapper's job.
* Each **bank** (`rfcgra_mem_bank`) is a synchronous memory with a second
  port for the host (`hmem_*`, read data one cycle after the request).

## The mesh and its combinational loops

`rfcgra_array` connects PE outputs to the opposite inputs of the neighbours
(a PE's N output arrives at the S input of the PE above). Edge inputs are zero.
Because any PE can bypass its registers, a path such as "east through PE a,
west back through PE b" is combinational and closes a loop in the netlist.
Lint and synthesis tools report these loops; they are inherent to
single-cycle multi-hop routing. A legal configuration must never close
one (in simulation it would not settle), and should keep single-cycle paths
to at most four hops, which is the timing budget the architecture was sized for.
Neither rule is checked in hardware.

## A worked mapping

`tb/tb_rf_cgra.sv` runs `y[i] = abs(x[i+4]) + x[i]` with x loaded once per
iteration; the value loaded as `x[i+4]` is reused four iterations later as
`x[i]`. At II = 1 (PE p = row*4 + col):

| PE | context | role |
|---|---|---|
| 0 | `ADD RES, #1` | iteration counter i, sent E and S |
| 1 | `LOAD W + 4` | load x[i+4]; bus -> R1 -> R2 -> R3 (intra-PE chain), R3 sent S |
| 2 | `ABS bus` | a = abs(x[i+4]), RES sent S |
| 6 | bypass N -> W | single-cycle hop for a |
| 5 | `ADD a, R1` | N -> R0 (inter-PE chain) -> R1; a arrives by bypass on lane 2 while R2 latches the chain |
| 4 | `STORE N + 125` | address from the counter, data = PE5's RES |

The load of iteration i is issued in cycle i, x[i+4] is on the row-0 bus in
cycle i+1, y[i] is computed in cycle i+2 and stored in cycle i+3. The long
dependence crosses five registers (three in PE1, two in PE5) and uses one
link. The same placement runs at II = 2 with two contexts: the chain
registers load in context 1 and hold in context 0.

`tb/tb_rf_cgra_fig2.sv` runs the same loop on a 2 x 2 instance with two
banks (`rf_cgra #(.ROWS(2), .COLS(2), .NUM_BANKS(2))`), one operation per PE
and no helper PEs:

| PE (row, col) | operation | registers used |
|---|---|---|
| (0,0) L1 | `LOAD RES + 1`, RES takes the address, so it counts itself | lane 0 bypass for a's hop |
| (0,1) a | `ABS R1` | bus -> R1 -> R2 -> R3, R3 sent S |
| (1,1) b | `ADD a, R3` | N -> R1 -> R2 -> R3 |
| (1,0) S1 | `STORE RES + 1`, data from (1,1) | lanes 0 and 1 bypassed |

Here the long dependence uses six registers in two PEs and one link, R1 of
PE (0,1) serves both the chain and the ABS, and a reaches b in the same
cycle over three links around the array. A one-cycle set-up run loads the
base addresses into the two RES registers first.

## Parameters

| parameter | default | where |
|---|---|---|
| `ROWS`, `COLS` | 4, 4 | `rf_cgra`, `rfcgra_array` |
| `NUM_BANKS` | 4 | `rf_cgra`, `rfcgra_mem_xbar` |
| `BANK_DEPTH` | 1024 words | `rf_cgra`, `rfcgra_mem_bank` (`DEPTH`) |
| `CTX_DEPTH` | 16 contexts | `rf_cgra`, `rfcgra_config_mem`, `rfcgra_ctrl` |
| `DATA_W` | 32 | `rfcgra_pkg` (constant) |
| `NUM_REGS` | 4 | `rfcgra_pkg` (constant, tied to the four lanes) |

The array size, the four registers per PE, the four banks and one LSU per
row are those of the architecture. The word width, memory and context depths,
operation list, encodings, bank interleaving, conflict handling and the host
interface are choices of this implementation.

## Simulating

Every testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`. With plain Verilator, from the repository
root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rfcgra_pkg.sv \
          tb/tb_rf_cgra.sv --top-module tb_rf_cgra -o sim
./obj_dir/sim
```

Replace `tb_rf_cgra` with any other testbench in `tb/` (one per module:
`tb_rfcgra_fu`, `tb_rfcgra_in_xbar`, `tb_rfcgra_out_xbar`,
`tb_rfcgra_reg_chain`, `tb_rfcgra_pe`, `tb_rfcgra_lsu`, `tb_rfcgra_mem_bank`,
`tb_rfcgra_mem_xbar`, `tb_rfcgra_config_mem`, `tb_rfcgra_ctrl`,
`tb_rfcgra_array`, and the 2 x 2 workload `tb_rf_cgra_fig2`). Verilator reports `UNOPTFLAT` on the mesh (see above);
it is expected. Add `-Wno-fatal` if you lint with `-Wall`.

`tb_rf_cgra` uses the top at its default size. Beyond the loop results it
checks the run lengths, one load and one store per II cycles, the absence of
memory conflicts, and that each register mechanism (intra-PE chain, inter-PE
chain, bypass hop, latch-while-bypass, hold across II, context switching,
loads, stores) happened during the run.

## What is not here

* The mapper (modulo scheduling onto a routing-resource graph extended with
  register-to-register edges) is software; this RTL only consumes the
  context words it would produce. The contexts in the testbenches are written
  by hand.
* The hop limit and the absence of combinational loops are not enforced in
  hardware.
* No clock, power or area figures are claimed for this RTL.
* Loop control beyond a fixed cycle count (predication, early exit) is not
  part of the architecture as described and is not provided.
