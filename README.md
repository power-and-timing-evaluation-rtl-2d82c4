# A 512 x 64-bit register file with 12 ports built from single-port sub-banks

A 4-way superscalar core has to write 4 results and read 8 operands from its
physical register file every cycle. If every storage cell has 4 write ports
and 8 read ports, the cell grows large. Each port adds an access transistor
pair plus a word line and a bit-line pair, so the wiring alone makes the cell
several times bigger than a single-ported one. This design keeps every cell
single-ported. It splits the 512-entry file into 32 sub-banks of 16 entries.
Each sub-bank has **one** local write port and **one** local read port. Each
sub-bank belongs to one architectural register, and its 16 rows hold the
renamed physical copies of that register. Within one cycle an instruction
group seldom writes two copies of the same architectural register, so one
write port per sub-bank is normally enough. The 12 global ports reach a
sub-bank through a small 4:1 multiplexer on the write side and a 1:8
demultiplexer on the read side.

```
                 4 global write buses (64 b)         8 global read buses (64 b)
                 ===========================         ==========================
                   |   |   |   |                         ^ ^ ^ ^ ^ ^ ^ ^
  wr decoders x4   v   v   v   v                         | | | | | | | |
  rd decoders x8 +-----------------+  1 row   +-------+  +-----------------+
     |           | write_mux  4:1  |--------->| 16x64 |->| read_demux 1:8  |
     +---------->| (one-hot select)|          | array |  | (any subset on) |
   bank/sb/row   +-----------------+          +-------+  +-----------------+
   one-hots          ^ wr_sel   wr_wl     rd_wl ^           ^ rd_en
                     +------------ port_enable_array -------+
                              one per sub-bank  (x32)
```

## Organisation

| level     | count            | contents                                        |
|-----------|------------------|-------------------------------------------------|
| file      | 1                | 4 banks, 12 port decoders, global buses         |
| bank      | 4                | 8 sub-banks on shared buses                     |
| sub-bank  | 32               | 16 x 64-bit rows, 1 write + 1 read local port   |

A register address is 9 bits, `{bank[1:0], sub-bank[2:0], row[3:0]}`, with
the bank in the most significant bits.

All sizes are parameters of `msp_rf` with these defaults. They are collected
in `rtl/msp_rf_pkg.sv`: `DATA_W=64`, `N_BANKS=4`, `N_SUBBANKS=8`,
`N_ROWS=16`, `N_WR=4`, `N_RD=8`.

## Pipeline timing

The register file has two stages.

1. **Decode (one clock).** Each of the 12 ports has its own `port_decoder`.
   At the rising edge the decoder turns the address into three one-hot groups
   and registers them: 4 bank lines, 8 sub-bank lines and 16 row lines. The
   write data is registered in the same edge. This stands for a dynamic-logic
   decoder that precharges in one clock phase and evaluates in the other.
2. **Access (the next cycle).** Every sub-bank checks which ports selected
   it. It opens one read row and one write row. `rd_data`, `rd_valid` and
   the two conflict vectors are valid during this cycle. The write is stored
   at the rising edge that ends the cycle.

Consequences for a user:

- Read latency is one clock. A request sampled at edge *n* is answered
  between edges *n* and *n+1*. Inputs that change before edge *n* never
  affect the outputs early.
- Suppose a write and a read of the same entry are issued in the same
  cycle. The read returns the **old** word (read before write).
- A read issued in the cycle after a write to that entry returns the **new**
  word. The write-to-read distance is one cycle, and no bypass is needed.
- There is no bypass to other pipeline stages. Forwarding results to
  dependent instructions belongs to the core.

## Port collisions: the hard part

Every sub-bank has a single local port in each direction. This is what makes
the design small, and it is also where it can go wrong. The decode and array
parts are plain logic. The rules below are what needs care. They live in
`port_enable_array`, with one instance per sub-bank.

A global port *hits* a sub-bank when its decoded bank line and sub-bank line
both point at that sub-bank.

**Writes.** The core is expected never to send two writes to one sub-bank in
the same cycle. If it does anyway, the lowest-numbered write port wins the
sub-bank. Every other write port that hit it raises `wr_conflict[p]` and its
write is **dropped**. The core must repeat a dropped write, or must never
cause one.

**Reads.** The sub-bank reads one row per cycle, so the lowest-numbered read
port that hits the sub-bank chooses the row. The read demultiplexer can
enable any subset of the 8 read buses. Every read port asking for that
*same* row is served from the single local read, and `rd_valid` is set for
each of them. Many instructions reading the same source register therefore
cost nothing extra. A read port asking for a *different* row of the same
sub-bank raises `rd_conflict[q]`, gets `rd_data[q] = 0`, and must retry.

Each decoded read port is either served or refused, never both, and only
requested ports can be refused. Assertions in `msp_rf` check both rules.
`subbank` asserts that at most one row is opened for writing and at most one
for reading.

Full bandwidth, 4 writes and 8 reads in one cycle, is reached when the 12
requests fall into 12 different sub-banks, or when reads share rows.

## Tri-state buses in logic form

In silicon, the 32 demultiplexers of a read bus are tri-state drivers on one
wire. In this RTL, a driver that is not enabled outputs zeros, and each bus
is the OR of all 32 drivers: `read_demux` feeds the OR in `bank`, and that
feeds the OR in `msp_rf`. Each read port selects one entry, so at most one
sub-bank drives a given bus. The write multiplexer works the same way: an
AND-OR with a one-hot select, and zero when nothing is selected. Complement
select rails and their driver strings are electrical details and are not
modelled.

## Modules

| file                       | role                                                    |
|----------------------------|---------------------------------------------------------|
| `rtl/msp_rf_pkg.sv`        | default sizes, address-width helpers                    |
| `rtl/port_decoder.sv`      | registered bank / sub-bank / row one-hot decoder        |
| `rtl/port_enable_array.sv` | per-sub-bank port selection and collision rules         |
| `rtl/write_mux.sv`         | N_WR:1 one-hot write multiplexer                        |
| `rtl/read_demux.sv`        | 1:N_RD read demultiplexer (multi-enable)                |
| `rtl/subbank.sv`           | 16 x 64 array with its mux, demux and enable logic      |
| `rtl/bank.sv`              | 8 sub-banks and their read-bus OR                       |
| `rtl/msp_rf.sv`            | top: 12 decoders, write-data register, 4 banks          |

`msp_rf` ports: `clk`, `rst_n` (synchronous, active low), and
`wr_valid[4]`, `wr_addr[4][9]`, `wr_data[4][64]`, `rd_req_valid[8]`,
`rd_req_addr[8][9]` as inputs. The outputs are `rd_data[8][64]`,
`rd_valid[8]`, `rd_conflict[8]` and `wr_conflict[4]`. All vectors are packed
arrays indexed by port number.

Reset clears only the decoder stage, so nothing is served in the cycle
after reset. The storage is not reset and behaves like SRAM: read an entry
only after writing it. After synthesis the default configuration has about
5300 word-level cells, 592 flip-flop bits (the decoder and write-data
registers) and 32768 memory bits.

## What is taken from the source design and what is not

Taken from the source design:

- The 4 x 8 x 16 x 64-bit organisation.
- One write port and one read port per sub-bank.
- 12 independent decoders that predecode into bank, sub-bank and row groups.
- The one-clock decode.
- A 4:1 write multiplexer per sub-bank.
- A tri-state 1:8 read demultiplexer per sub-bank.
- One enable array per sub-bank.

Choices made here:

- The address field order.
- The write-data register that keeps the data aligned with the decoders.
- The collision rules (lowest port wins, same-row reads share, others
  refused).
- Conflict reporting.
- Read-before-write for the same entry.
- The reset behaviour.
- A combinational array read in the access cycle.
- Port selection placed in the access cycle. The original circuit hides
  the select-rail driver delay under the decode. Here `port_enable_array`
  works on the registered decodes, at the start of the access cycle.

The source describes the cell, bit-line write driver, sense amplifier and
select-rail driver strings at transistor level. Here they are reduced to
their logic function. The same holds for the wire models, power and delay
figures, and the technology projections (90, 65 and 45 nm, clock of 8
fan-out-of-4 inverter delays): they have no RTL counterpart. Whether a netlist built from
this RTL meets such a clock is a physical-design question.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                  | what it checks                                                        |
|----------------------------|-----------------------------------------------------------------------|
| `tb_port_decoder`          | one-hot codes, idle and reset behaviour, one-clock latency            |
| `tb_write_mux`             | every select of random data                                           |
| `tb_read_demux`            | single and multiple enables                                           |
| `tb_port_enable_array`     | collision rules against a reference model (bank 2, sub-bank 5)        |
| `tb_subbank`               | reads and writes of one sub-bank against a reference array            |
| `tb_bank`                  | the same for a whole bank                                             |
| `tb_msp_rf`                | the full-size file end to end, see below                              |

`tb_msp_rf` runs the register file with all parameters at their defaults:

1. It fills all 512 entries.
2. It runs 4000 cycles of random traffic on all 12 ports. Half of the
   addresses are drawn from a pool of 8 entries in two sub-banks.
3. It ends with full-bandwidth cycles of 12 ports on 12 different
   sub-banks.

A reference model checks every output in every access cycle. The
testbench counts each mechanism and fails if any of them never occurs:
write collision, refused read, shared read, same-cycle read/write,
read-after-write, full 12-port cycle and reset. It runs in a few seconds.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/msp_rf_pkg.sv tb/tb_msp_rf.sv --top-module tb_msp_rf -o sim
./obj_dir/sim
```

Replace `tb_msp_rf` with another testbench name to run that one. The
testbenches drive every input from time 0. They do not depend on the
simulator's initial values, except for storage that they write before they
read it.
