# Interface protocol components and IPC-built PPCI wrappers

Connecting an IP block to a bus it was not designed for usually means writing
a one-off wrapper. Writing one requires knowing, cycle by cycle, how both
protocols signal. This RTL takes another approach. Each protocol is handled
once, by a reusable **interface protocol component (IPC)**. An IPC does the
cycle-level signalling on one side and talks to the rest of the design in
whole **transactions** on the other. A wrapper between protocols P1 and P2
then has three parts:

```
   P1 bus master ──► [ slave P1 IPC ] ──► [ controller with buffers ] ──► [ master P2 IPC ] ──► P2 slave IP
                     recognises P1        stores arguments, pairs          executes P2
                     transactions         P1 and P2 transactions           transactions
```

Only the controller in the middle is written for a particular pair of
protocols. The IPCs can be reused from a library.

The design follows the IPC-based wrapper methodology of C.-R. Yun and
K.-S. Jhang, "A Wrapper Design Methodology Based On IPCs". That work
generates IPCs in VHDL from a protocol description language. Here the IPCs
are written by hand in SystemVerilog, and the structure of the generated
code is kept.

The repository contains:

* **`ppci_des_wrapper`**: a complete wrapper that lets a PPCI bus master
  drive a 64-bit DES encryption IP. It is built from `ppci_slave_ipc`,
  `des_wrapper_core` and `des_master_ipc`.
* **`utopia_tx_master_ipc` / `utopia_tx_slave_ipc`**: the two ends of the
  UTOPIA transmit interface, which moves 53-byte ATM cells.
* **`utopia_rx_master_ipc` / `utopia_rx_slave_ipc`**: the two ends of the
  UTOPIA receive interface.
* **`ppci_master_ipc` / `des_slave_ipc`**: the counterparts of the wrapper's
  IPCs. Together they let the wrapper be tested end to end by IPCs alone.
* **`des_master_ipc_1port`**: a DES master IPC in which all four outgoing
  arguments share a single core port, numbered by a 2-bit request code.
* **`ppci_sram_wrapper`**: a PPCI-to-SRAM wrapper with no controller at
  all. A PPCI slave IPC is wired straight to an SRAM master IPC
  (`sram_master_ipc`).
* **`wishbone_master_ipc` / `wishbone_slave_ipc`**: the two ends of a
  Wishbone bus, classic single read and write cycles.
* **`ipc_top`**: all of the above side by side, every port brought out.

PPCI is a stripped-down Peripheral VCI bus. It has a request/acknowledge
handshake, an 8-bit address and 32-bit data.

## What an IPC looks like from the core

Every IPC has two sets of ports:

* **Interface ports** are the pins of the protocol: `VAL/ACK/...` for PPCI,
  `start/done/...` for DES, `TxSOC/TxEnbn/...` for UTOPIA.
* **Core ports** are derived from the transactions:
  * `trcode` is the transaction code, with types in `ipc_pkg`: `PPCI_READ`,
    `PPCI_WRITE`, `DES_ENCR`, `DES_DECR` and `UT_TRANSMIT`. A master IPC
    receives it from the core. A slave IPC reports it to the core.
  * `trend` is high in the last cycle of a transaction.
  * Each transaction argument `p` has a data port and one timing strobe. The
    strobe is `p_load` when the IPC hands `p` to the core, and
    `p_request` when the IPC takes `p` from the core. The strobe is high in
    exactly the cycle in which the data moves. The core treats it as the
    write enable of the register or FIFO that holds `p`.
  * **Shared argument ports** serve the same argument of several
    transactions. For example, `key_p` carries both `ENCR.key` and
    `DECR.key`. The core does not need the code to tell them apart, because
    only one transaction runs at a time.
  * **Status inputs** such as `read_data_valid`, `data_full`, `cell_avail`
    and `result_p_valid` let the protocol depend on the core's buffers. This
    is how an IPC inserts wait states or back-pressure.

Argument data is **wired straight through**: for example, `pkey = key_p` and
`TxData = data`. There is no register stage. This keeps the IPCs small (3
to 13 flip-flops each, apart from the registered variant below). It also
sets one rule for the core: **an argument
taken by the IPC must stay stable while its transaction runs.** The core
normally holds arguments in registers, so it meets this rule without extra
logic. The assertions in each IPC check it.

Each IPC is one small FSM. It has a sequential part (state, counters and
registered pin outputs) and a combinational part (next state and outputs).

## The PPCI-to-DES wrapper

### Register map

The bus sees six 32-bit word addresses, defined in `ipc_pkg`:

| address | name   | write                            | read                            |
|---------|--------|----------------------------------|---------------------------------|
| 0x00    | K0ADDR | key word 0 (key bits 63:32)      | 0                               |
| 0x04    | K1ADDR | key word 1 (key bits 31:0)       | 0                               |
| 0x08    | T0ADDR | text word 0, operation = encrypt | result word 0 (bits 63:32)      |
| 0x0C    | T1ADDR | text word 1, operation = encrypt | result word 1 (bits 31:0)       |
| 0x10    | C0ADDR | text word 0, operation = decrypt | result word 0                   |
| 0x14    | C1ADDR | text word 1, operation = decrypt | result word 1                   |

To encrypt, write K0, K1, T0 and T1, then read C0 and C1. To decrypt, write
K0, K1, C0 and C1 (the ciphertext), then read T0 and T1. The words can be
written in any order. If a text word has been written to both T and C
addresses, the address of the last text write decides the operation.

### How an operation starts and how reads wait

`des_wrapper_core` keeps a valid flip-flop for each of the four key and text
registers. Nothing starts until all four are valid. There is no start
register: the data being present is the trigger. At that point the core puts
`DES_ENCR` or `DES_DECR` on the DES IPC's `trcode`. The IPC then does the
following:

1. It waits until the IP's `busy` is low.
2. In the next cycle it pulses `start`. In the same cycle it strobes
   `key_p_request` and `odata_p_request`. These strobes clear the four valid
   flags and mark the operation as in flight.
3. It waits for `done`. In that cycle `idata_p_load` writes the 64-bit result
   into `ctext[0..1]` and ends the in-flight state.

While an operation is armed (all four words valid) or in flight, the core
holds `read_data_valid` low. A PPCI read that arrives during this time is
held in wait states: the slave IPC simply does not raise `ACK`. A bus
master can therefore read the result immediately after the fourth write,
without polling. The read completes when the result exists. At all other
times a read returns the current contents of the result registers. The
read multiplexer is selected by the address together with
`read_data_request`, so the core drives `read_data` only in the cycle a read
is answered and drives zero at all other times.

If the DES IPC takes the arguments in the same cycle as a new write arrives,
the new write wins, and its valid flag stays set.

### Timing

All of the wrapper runs on `clk` with an active-low asynchronous reset
`rst_n`.

PPCI rows count from the first cycle of `VAL` to the `ACK` cycle, both
included.

| event | cycles |
|-------|--------|
| PPCI write (VAL seen, then ACK) | 2 |
| PPCI read, result available | 2 |
| DES transaction, from `trcode` to `trend` | DES IP latency + 2 |
| read raised right after the last argument write | DES IP latency + 3 |

### DES IP handshake assumed

The DES IP is not part of this design. The wrapper expects this handshake
from it:

* The IP samples `pkey`, `ptext` and `enc_dec` in the cycle `start` is high.
  `enc_dec = 1` selects encryption.
* The IP keeps `busy` high while it works.
* The IP pulses `done` for one cycle with the result on `ctext`.

`pkey` and `ptext` are the key and text registers wired through. A bus
master that writes new words while an operation runs changes them. An IP
that reads its inputs after the start cycle therefore needs the bus master
to wait for the result before writing again.

## The UTOPIA transmit IPCs

`utopia_tx_master_ipc` is the ATM-layer side of the interface. Its one
transaction, Transmit, sends a 53-byte cell from a FIFO in the core:

* The core puts `UT_TRANSMIT` on `trcode`. The IPC starts when `TxClav` and
  `TxFulln` are both high.
* The first byte goes out with `TxSOC`. Every cycle with `TxEnbn` low
  transfers the FIFO head (`data`) on `TxData` and pops it with
  `data_request`. Without back-pressure a cell takes 53 cycles, and `trend`
  is high on byte 53.
* **Four-byte rule:** `TxFulln` low means the PHY can take at most four more
  bytes. The byte of the cycle in which `TxFulln` is seen low is the first of
  those four. After the fourth, the IPC raises `TxEnbn` and holds until
  `TxFulln` is high again, then continues the cell. An assertion checks that
  the PHY keeps `TxFulln` low while those four bytes go out.
* A new cell starts only when `TxFulln` is high. Otherwise a cell that ended
  partway through the four bytes could let the next cell overrun the PHY.
* `TxEnbn` and `TxSOC` come from flip-flops. `TxClk` is the IPC's own clock
  driven out.

`utopia_tx_slave_ipc` is the physical-layer side. It is clocked by the
`TxClk` it receives. It loads each byte into the core with `data_load` and
marks the cell with `trcode`/`trend`. `TxClav` and `TxFulln` come straight
from the core's `cell_avail` and `data_full` status. Assertions report an
SOC inside a cell and a byte outside a cell.

## The UTOPIA receive IPCs

Receive moves a cell the other way, from the PHY into a FIFO in the ATM
core. The ATM side is again the master, and it drives the clock (`RxClk`).
These IPCs use the cell-level handshake of UTOPIA Level 1:

* `RxClav` high means the PHY holds a whole cell. The cell therefore never
  runs dry partway through.
* The master asks for a byte by holding `RxEnbn` low for a cycle. The PHY
  samples that at the rising edge and drives the byte on `RxData` in the
  next cycle, with `RxSOC` on the first byte.

Because of this one-cycle latency, the master counts two things: the
bytes it has asked for (it stops at 53) and the bytes that have arrived
(`trend` comes with the 53rd). The core's `data_full` input means "room
for two more bytes at most". Those are the bytes that may already be on
their way when the master sees it. While `data_full` is high, `RxEnbn`
stays high and the cell pauses. An unpaused cell takes 54 cycles: 53
enable cycles plus one cycle of latency.

`utopia_rx_slave_ipc` runs on the `RxClk` it receives. At each edge with
`RxEnbn` low it pops the core FIFO (`data_request` is high in that cycle)
into registered `RxData`/`RxSOC`. `RxClav` is the core's `cell_avail`. An
assertion reports a cell started while `cell_avail` was low, and the
master asserts that `RxSOC` marks exactly the first byte.

## The PPCI master and DES slave IPCs

`ppci_master_ipc` runs one PPCI READ or WRITE for each request of its core.
`VAL` rises the cycle after `trcode` is seen. The IPC holds the request until
it samples `ACK`. The ending cycle carries `trend`, `addr_p_request`, and
either `write_data_request` or `read_data_load` with the read word. Against
the wrapper, a transfer takes 3 cycles. The core must hold its code until
`trend`, and its arguments through the `trend` cycle.

`des_slave_ipc` stands in front of a DES core:

* It reports `DES_ENCR`/`DES_DECR` and strobes `key_p_load`/`data_p_load` in
  the start cycle.
* It holds `busy` until the core raises `result_p_valid`.
* It then pulses `done` with the core's `result_p` on `ctext`.

## The Wishbone IPCs

`wishbone_master_ipc` and `wishbone_slave_ipc` have the same core ports
and transaction codes (`WB_READ`, `WB_WRITE`) as the PPCI pair. On the bus
they use the classic Wishbone cycle:

* The master raises `CYC_O` and `STB_O` together, with `WE_O`, `ADR_O`
  and `DAT_O`.
* It holds them until it samples `ACK_I`.
* The slave registers `ACK_O` and raises it only while the request is up.
* A slave whose core holds `read_data_valid` low withholds `ACK_O`. This
  is its wait state.

A write takes two cycles at the slave. Seen from the master's core, it
takes three cycles from `trcode` to `trend`. The buses carry 32-bit
addresses and data. There is no `SEL` (every transfer is a whole word),
no `ERR`/`RTY` and no block or pipelined cycles.

## One port for four arguments: `des_master_ipc_1port`

`des_master_ipc` gives key and text separate shared ports (`key_p` and
`odata_p`). This variant puts all four outgoing arguments on one 64-bit port:
`ENCR.key`, `ENCR.data`, `DECR.key` and `DECR.cdata`. The IPC then asks for
them one at a time. `odata_p_request` is a 2-bit code that gives the
argument's position within the running transaction:

| code | meaning |
|------|---------|
| `00` | no request |
| `01` | first argument (key) |
| `10` | second argument (data or cdata) |
| `11` | not used; an assertion reports it |

The code does not need the transaction type, because the core already knows
which transaction it issued. The core combines the two to drive the select of
a multiplexer over its four argument registers.

Key and text now arrive in different cycles, so here `pkey` and `ptext` are
registered. A transaction runs through these cycles:

1. idle
2. key fetch (`01`)
3. text fetch (`10`)
4. `start`
5. wait for `done`

A transaction takes the DES latency + 4 cycles, two more than
`des_master_ipc`. In exchange, the core-side port count drops by 64 wires.
This is the usual trade of the sharing construct: fewer ports, more cycles.

## Two IPCs with nothing in between: `ppci_sram_wrapper`

When nothing needs to be stored between the two protocols, the controller
can be dropped and the IPCs joined port to port. An SRAM word travels from
the PPCI bus to the SRAM in the same transaction, so there is nothing for a
controller to hold. The problem that remains is timing: each side must
wait until the other has the data. That is solved by a single wiring rule.
The **load** strobe of the IPC that receives an argument drives the
**valid** input of the IPC that sends it on:

| from (PPCI slave IPC) | to (SRAM master IPC) |
|-----------------------|----------------------|
| `addr_p_load`         | `addr_p_valid`       |
| `write_data_load`     | `wdata_p_valid`      |
| `trcode`              | `trcode` (same numeric codes) |

| from (SRAM master IPC) | to (PPCI slave IPC) |
|------------------------|---------------------|
| `rdata_p_load`         | `read_data_valid`   |

The argument data ports are wired straight through. The SRAM address is
the PPCI `ADDRESS`. Both IPCs insert wait states on their own valid
inputs. The SRAM IPC does not start until the address (and for a write,
the data) is valid. The PPCI IPC does not acknowledge a read until the
word has been loaded. The wrapper contains no logic of its own.

`sram_master_ipc` drives a generic synchronous single-port SRAM:

* `CSn`, `WEn`, `A` and `D` are registered. `CSn` and `WEn` are active
  low.
* A cycle with `CSn` low is one access.
* Read data `Q` is valid in the cycle after a read access. The SRAM holds
  it until its next read.

On the PPCI side this gives the following timing:

| transfer | cycles from VAL to ACK |
|----------|------------------------|
| WRITE | 2 (the SRAM is written in the ACK cycle) |
| READ  | 4 (argument handover, SRAM access, read latency, ACK) |

The PPCI IPC reads the word in the ACK cycle, one cycle after the SRAM
delivered it. That works because the SRAM keeps `Q` stable. An SRAM whose
output changes on writes or idle cycles would need a register on the
read path, which means a small controller again.

## Departures and choices to be aware of

The following points are this design's own choices. The methodology gives
protocol names and port lists, but not these details:

* **PPCI handshake.** The master holds `VAL/RNW/ADDRESS/WData` until `ACK`
  is sampled. The wrapper never needs `EOP`; it is only checked for
  stability. `ppci_master_ipc` sets `EOP` on every single-word request.
* **Register addresses** (table above), and the choice that register 0 is the
  upper half of a 64-bit word.
* **Wait state on reads.** This needs a status input, `read_data_valid`,
  that the wrapper's port list does not otherwise have.
* **DES handshake and `enc_dec` polarity** (above).
* **Valid flags are consumed** by each operation, so every operation needs
  all four words written again, key included.
* **IPCs with no published description.** The methodology's IPC set
  includes UTOPIA receive and Wishbone IPCs, and the PPCI-to-SRAM wrapper
  needs an SRAM IPC, but none of their protocol descriptions is given.
  They follow the public UTOPIA Level 1 and Wishbone classic
  specifications and a generic synchronous SRAM. The PPCI master and DES
  slave IPCs mirror the described PPCI slave and DES master sides.
* **UTOPIA receive handshake.** Only the cell-level handshake is built;
  there is no octet-level `RxEmpty`.
* **Wishbone subset.** Only classic single cycles with 32-bit words are
  supported, as listed above.
* **SRAM protocol.** The pin set, the one-cycle read latency and the
  held `Q` of `sram_master_ipc` are a generic synchronous SRAM, not a
  particular part.
* **Reset** is active-low and asynchronous in every block.
* **Transaction-code encodings** are in `ipc_pkg`.
* **Flip-flop counts** differ from those of the generated VHDL IPCs. The
  wiring-through of arguments and the FSM encodings both change them. The
  UTOPIA master uses a 2-bit counter for the four-byte rule, not a 6-bit
  one.
* **`ipc_top` connects nothing between its parts.** The examples are
  independent. The end-to-end testbench joins them outside the top.

The following are **not included**:

* The DES IP itself. The testbenches use `tb/des_ip_model.sv` and core
  models built on `tb/tb_cipher_pkg.sv`, which is a keyed, invertible 64-bit
  transform and **not DES**.
* The 60x-to-PPCI wrapper.
* The SRAM itself. The testbenches use `tb/sram_model.sv`.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/ipc_pkg.sv tb/tb_cipher_pkg.sv tb/tb_ipc_top.sv \
    --top-module tb_ipc_top --Mdir obj_top
./obj_top/Vtb_ipc_top
```

For another testbench, replace `tb_ipc_top` with its name.
`tb/tb_cipher_pkg.sv` is needed only by the DES-related testbenches.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_ipc_top` | whole design, default sizes: PPCI master IPC → wrapper → DES slave IPC → core model, 10 encryptions and 10 decryptions; UTOPIA master → slave, 30 cells with random back-pressure; 8 single-port DES transactions; 200 random PPCI transfers through the SRAM wrapper into an SRAM model; 150 Wishbone transfers between the Wishbone IPCs; 20 cells between the UTOPIA receive IPCs. It counts writes, read wait states, ENCR, DECR, cells, TxFulln holds, TxClav waits, shared-port transactions, SRAM writes, SRAM reads, SRAM read wait states, Wishbone writes, reads and read wait states, received cells, `data_full` pauses and `RxClav` waits, and fails if any of them never happened. |
| `tb_ppci_des_wrapper` | wrapper with the DES model: round trips, write timing, exact read wait. |
| `tb_des_wrapper_core` | controller alone: arming, consumption, read mux, wait. |
| `tb_ppci_slave_ipc`, `tb_ppci_master_ipc` | PPCI handshake, strobes, wait states, cycle counts. |
| `tb_des_master_ipc`, `tb_des_slave_ipc` | DES handshake, shared ports, latency, busy wait. |
| `tb_des_master_ipc_1port` | request sequence `01`, `10`; argument selection by the core mux; latency + 4. |
| `tb_utopia_tx_master_ipc` | cell order, SOC, the four-byte rule against a slowly draining PHY, the TxClav wait, and a 53-cycle unthrottled cell. |
| `tb_utopia_tx_slave_ipc` | byte loading with gaps, trend, flow-control outputs. |
| `tb_ppci_sram_wrapper` | about 500 random PPCI reads and writes against a reference memory; ACK after 2 (write) and 4 (read) cycles; one SRAM access per transfer. |
| `tb_utopia_rx_ipcs` | UTOPIA receive master and slave joined pin to pin: 40 cells arriving at random into a slowly drained 6-byte FIFO, byte order, SOC, trend, no overflow, 54 cycles per unpaused cell. |
| `tb_wishbone_ipcs` | Wishbone master and slave IPCs joined pin to pin: 500 random transfers against a reference memory, reads held 0–4 cycles, exact cycle counts, idle bus between transfers. |
| `tb_sram_master_ipc` | SRAM IPC alone: waits while arguments are not valid, request strobes, pin values, trend and load timing. |

## Files

* `rtl/ipc_pkg.sv`: transaction-code enums, the PPCI address map and the
  cell length.
* `rtl/ppci_slave_ipc.sv`, `rtl/des_wrapper_core.sv`,
  `rtl/des_master_ipc.sv`, `rtl/ppci_des_wrapper.sv`: the wrapper.
* `rtl/utopia_tx_master_ipc.sv`, `rtl/utopia_tx_slave_ipc.sv`: UTOPIA
  transmit.
* `rtl/utopia_rx_master_ipc.sv`, `rtl/utopia_rx_slave_ipc.sv`: UTOPIA
  receive.
* `rtl/ppci_master_ipc.sv`, `rtl/des_slave_ipc.sv`: the counterpart IPCs.
* `rtl/des_master_ipc_1port.sv`: the single-port DES master IPC.
* `rtl/sram_master_ipc.sv`, `rtl/ppci_sram_wrapper.sv`: the PPCI-to-SRAM
  wrapper.
* `rtl/wishbone_master_ipc.sv`, `rtl/wishbone_slave_ipc.sv`: Wishbone.
* `rtl/ipc_top.sv`: the top level.
* `tb/`: the testbenches, the DES stand-in model `des_ip_model.sv`,
  `tb_cipher_pkg.sv` and the SRAM model `sram_model.sv`.

Each RTL file opens with a description of its ports and cycle timing.
