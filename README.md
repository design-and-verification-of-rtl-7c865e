# AMBA APB bus with a memory slave

The Advanced Peripheral Bus (APB) is the low-cost, unpipelined member of the
AMBA on-chip bus family. It connects slow peripherals, such as UARTs, timers,
keypads or the control registers of a block, to a bridge. The bridge hangs on
a high-performance bus (AHB or ASB) and is the only master on the APB. Every
APB transfer takes at least two clock cycles, and every signal changes on the
rising edge of `pclk`. That keeps the peripheral side simple.

This RTL implements the APB side of such a system:

* `apb_master` is the three-state bus machine of the bridge (IDLE, SETUP,
  ACCESS). It takes one request at a time from a valid/ready port.
* `apb_slave` is an APB slave with a word memory (`apb_mem`) behind it. It
  has a programmable number of wait states.
* `apb_system` is the top level. It connects the two over an `apb_if` bus
  instance, which carries the protocol assertions.

The AHB/ASB half of the bridge and the example peripherals (UART, timer,
keypad, PIO) are not part of the design. In their place the bridge's request
port is brought out at the top.

## The transfer

A transfer has two phases. The master drives the phase signals `psel` and
`penable`:

| state  | psel | penable | meaning                                         |
|--------|------|---------|-------------------------------------------------|
| IDLE   | 0    | 0       | no transfer                                     |
| SETUP  | 1    | 0       | address, direction and write data are presented |
| ACCESS | 1    | 1       | the slave performs the transfer                 |

SETUP always lasts exactly one cycle and is always followed by ACCESS.
`paddr`, `pwrite` and `pwdata` do not change from SETUP to the end of ACCESS.
ACCESS ends on the first rising edge at which the slave's `pready` is high.
After that edge the bus goes back to SETUP if another request is waiting, and
to IDLE if not.

A zero-wait write, edge by edge (`transmit_delay = 0`):

```
edge          T0        T1        T2        T3
state      IDLE  | SETUP   | ACCESS  | IDLE or SETUP
psel        0    |   1     |   1     |
penable     0    |   0     |   1     |   0
pready      0    |   0     |   1     |   0
paddr/pwdata     | valid ----------- |
                                     ^ word written into memory at T3
```

A read has the same shape, with `pwrite = 0`. `prdata` is valid during
ACCESS and is taken by the master at T3.

## Wait states: `transmit_delay`

The slave has a 3-bit input `transmit_delay`. It sets how many ACCESS cycles
the slave keeps `pready` low before it lets a transfer complete. The slave
samples it on the edge that ends SETUP, so each transfer uses the value that
was present during its SETUP cycle.

* 0: `pready` rises together with `penable`. A transfer takes 2 cycles.
* N: `pready` rises after N further ACCESS cycles. A transfer takes 2 + N
  cycles.

`pready` is a register. At the end of SETUP it is loaded with
`transmit_delay == 0`, and a down-counter loaded with `transmit_delay` counts
the wait cycles. `pready` drops on the edge after the completing one. It is
high only while the slave is selected and enabled; an assertion in
`apb_slave` checks this.

The meaning given to this signal is this design's own reading. In the
reference design only its name, its 3-bit width and its values `000` and
`001` are known. The wait-state mechanism itself is standard APB (AMBA 3),
and it is what makes `pready` useful.

## The slave and its memory

Inside `apb_slave` the bus is turned into the strobes of a plain two-port
memory. The names are those used in the reference design:

| memory port | driven by                                               |
|-------------|---------------------------------------------------------|
| `wr`        | `psel & penable & pready & pwrite`: the completing write cycle |
| `addr_wr`   | `paddr`                                                 |
| `din`       | `pwdata`                                                |
| `rd`        | `psel & !pwrite`: every cycle of a read, SETUP included |
| `addr_rd`   | `paddr`                                                 |
| `dout`      | goes straight to `prdata`                               |

`apb_mem` reads synchronously. `rd` is already high in SETUP, so `dout` holds
the addressed word from the first ACCESS cycle on, even with zero wait
states. A write is strobed only in the cycle that completes, so each write
transfer stores its word exactly once, however many wait states it has.

Addresses are word addresses: address 1 is the second 32-bit word, not byte
1. The memory uses the low `$clog2(DEPTH)` bits of `paddr`, so higher
addresses wrap around onto the same words. The memory array is not reset;
`dout`, `pready` and the wait counter are.

## The master and its request port

`apb_master` accepts a request (`apb_req_t`: `write`, `addr`, `wdata`) on the
rising edge where both `req_valid` and `req_ready` are high. `req_ready` is
high in IDLE, and in an ACCESS cycle that is completing. That second case is
what lets transfers run back to back, with no IDLE cycle between them.

When the transfer completes, the master registers the response (`apb_rsp_t`:
`write`, `addr`, and `rdata` for a read) and pulses `rsp_valid` for one cycle.

Timing seen at the top, for a request accepted at edge E:

* SETUP is the cycle after E.
* ACCESS follows, and completes at edge E + 2 + `transmit_delay`.
* `rsp_valid` is high in the cycle after that edge.
* Requests sent back to back with zero wait states give one transfer every
  two cycles. That is the APB maximum.

The request/response port is this design's own interface. It stands in for
the AHB side of a bridge, which is not designed here.

## Bus rules checked by assertions

`apb_if` bundles `psel`, `penable`, `pwrite`, `paddr`, `pwdata`, `pready` and
`prdata`, with `master`, `slave` and `monitor` modports. It asserts:

* `penable` is never high without `psel`.
* A SETUP cycle is followed by an ACCESS cycle, with address, direction and
  write data unchanged.
* An ACCESS cycle with `pready` low is followed by another ACCESS cycle, with
  everything held.
* A completed ACCESS cycle is followed by `penable` low.

`apb_system` instantiates the interface, so the assertions watch every
transfer in simulation when assertions are enabled (`--assert` in
Verilator).

## Parameters and types

| name                 | where                                    | default | note |
|----------------------|------------------------------------------|---------|------|
| `DEPTH`              | `apb_system`, `apb_slave`, `apb_mem`     | 256     | memory words; a power of two; own choice |
| `ADDR_W`, `DATA_W`   | `apb_pkg`                                | 32, 32  | APB address and data width |
| `DELAY_W`            | `apb_pkg`                                | 3       | width of `transmit_delay` |

`apb_pkg` also holds the state enum `apb_state_e` and the request and
response structs.

## Where this design departs from, or adds to, the reference

* There is one slave, so there is no address decoder for several `psel`
  lines.
* There is no `pslverr`, `pprot` or `pstrb`. The reference signal list has
  none of them. Accesses beyond the memory wrap around.
* The master stays in ACCESS while `pready` is low. The reference state
  diagram shows only one-cycle ACCESS phases.
* In the reference simulations the test bench holds `psel` and `penable`
  high together across many transfers. That skips the SETUP cycle, which
  this slave needs in order to start its wait count. Here every transfer
  goes through SETUP, as the protocol requires.
* The memory depth, its synchronous read, word addressing, and writing only
  in the completing cycle are choices of this design.

## Verification

Each testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs.

| testbench        | unit        | what it checks |
|------------------|-------------|----------------|
| `tb_apb_mem`     | `apb_mem`   | random writes and read-back, one-cycle read latency, `dout` held while `rd` is low, write and read in the same cycle, address wrap-around |
| `tb_apb_slave`   | `apb_slave` | the testbench drives the bus as master; reference write/read sequences; random traffic with every `transmit_delay` from 0 to 7; `pready` low in SETUP; exact wait count; two-cycle zero-wait transfer; one memory write strobe per write |
| `tb_apb_master`  | `apb_master`| a behavioural slave with random waits; `psel`/`penable` in each state; SETUP lasts one cycle; ACCESS holds during waits; request on the bus; read data; latency of 3 + waits; counts back-to-back, return-to-IDLE and wait events and requires each to occur |
| `tb_apb_system`  | `apb_system`| end to end at default size; the reference sequences (1 ← cccccccc, 2 ← 00001111, 3 ← 10101010, 2 ← 11110000 with read-backs; 1 ← 000000aa, 2 ← 000000cc); throughput of 2 cycles per transfer; 3000 random transfers with random delays and gaps; read-back of every written word; latency of 3 + `transmit_delay`; requires writes, reads, zero-wait transfers, wait cycles, ACCESS→SETUP and ACCESS→IDLE to occur |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/apb_pkg.sv tb/tb_apb_system.sv --top-module tb_apb_system
./obj_dir/Vtb_apb_system
```

Replace `tb_apb_system` with the name of the testbench you want to run. The
full system test runs about 18,000 cycles and finishes in well under a
second.

## Files

* `rtl/apb_pkg.sv`: widths, state enum, request and response structs
* `rtl/apb_if.sv`: APB bundle and protocol assertions
* `rtl/apb_master.sv`: IDLE/SETUP/ACCESS master
* `rtl/apb_slave.sv`: slave interface with wait states; contains the memory
* `rtl/apb_mem.sv`: word memory
* `rtl/apb_system.sv`: top level
* `tb/tb_*.sv`: the testbenches listed above
