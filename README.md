# APB bridges with independent clocks: AXI4-Lite to APB4 and AHB to APB

Low-bandwidth peripherals sit on APB, a simple two-phase bus with no
pipelining, while the processor talks on a pipelined system bus (AXI4-Lite or
AHB), usually on a different clock. A bridge has to accept a system-bus
transfer, carry it into the APB clock domain, run it as an APB transfer
(waiting as long as the peripheral holds PREADY low), and carry the result
back. This RTL provides two such bridges that share their core:

* **`axi4lite2apb`**: AXI4-Lite slave to APB4 master. 32-bit address and
  data, up to 16 peripherals, ACLK and PCLK of any frequency and phase, PREADY
  wait states, SLVERR for a peripheral error and DECERR for an unmapped
  address, and a read that arrives together with a write is served first.
* **`ahb2apb`**: AHB slave to APB master, HCLK and PCLK independent. Invalid
  commands get an AHB ERROR response and never reach APB.

`apb_bridge_top` puts the two side by side, each with its own buses and
clocks. The masters and the peripherals are outside the RTL.

## Structure

```
            system-bus clock                 |            PCLK
                                             |
 AXI4-Lite --> axi_lite_slave --req--> cdc_mailbox --req--> apb_master_fsm --> APB4
   or                         <--rsp-- cdc_mailbox <--rsp--   (+ apb_addr_decoder)
 AHB ------> ahb_slave_if                    |
             (+ apb_addr_decoder)            |
```

| module | clock | role |
|---|---|---|
| `apb_bridge_pkg` | - | request/response structs, AXI response codes, FSM state enum |
| `axi_lite_slave` | ACLK | AXI4-Lite channel handshakes, read-over-write priority, B/R steering |
| `ahb_slave_if` | HCLK | AHB address/data phases, command check, ERROR response, HREADYOUT wait states |
| `cdc_mailbox` | both | one-word toggle handshake between two clocks |
| `sync_2ff` | dest. | two-flop synchroniser used inside the mailbox |
| `apb_master_fsm` | PCLK | APB state machine IDLE/SETUP/ENABLE/HRESP, response code |
| `apb_addr_decoder` | - | address to one-hot PSEL, or miss |
| `axi4lite2apb`, `ahb2apb` | both | the two bridges |
| `apb_bridge_top` | all | both bridges side by side |

## The APB state machine

`apb_master_fsm` is the heart of both bridges. It has four states:

* **IDLE**: nothing to do. A waiting request is taken from the request
  mailbox and the machine goes to SETUP.
* **SETUP**: one PCLK with the peripheral's PSEL high and PENABLE low.
  Address, direction, write data, strobes and protection were registered
  when the request was taken and stay put until the transfer ends.
* **ENABLE**: PENABLE high. The machine stays here while PREADY is low, so a
  peripheral can add any number of wait states. When PREADY is high the result
  (PRDATA, and OKAY or SLVERR from PSLVERR) is complete.
* **HRESP**: entered from ENABLE only when the response mailbox is still
  holding the previous result, which happens when the system-bus master is
  slow to take its read data or write response. The new result is held here,
  APB is idle, and the machine leaves as soon as the mailbox frees up.

Leaving ENABLE (or HRESP) with a result, the machine posts it and goes
directly to SETUP if another request is already waiting, else to IDLE. So
back-to-back APB transfers need no idle cycle, and a transfer with no wait
states takes exactly two PCLK cycles.

Edges and their conditions:

| from | to | condition |
|---|---|---|
| IDLE | SETUP | request waiting |
| SETUP | ENABLE | always |
| ENABLE | ENABLE | PREADY low |
| ENABLE | SETUP | done, response path free, request waiting |
| ENABLE | IDLE | done, response path free, no request |
| ENABLE | HRESP | done, response path busy |
| HRESP | SETUP | response path free, request waiting |
| HRESP | IDLE | response path free, no request |

An address with no peripheral behind it still passes through SETUP and
ENABLE, but with no PSEL and no PENABLE on the bus. It finishes in ENABLE at
once with a DECERR result. This keeps every transfer on the same path through
the machine.

## Crossing the clock boundary

Requests and results cross in `cdc_mailbox`, a two-phase (toggle) handshake.
The sender writes a word into a holding register and flips a request toggle.
The toggle passes through a two-flop synchroniser, and the receiver sees a
word whenever the synchronised toggle differs from its own acknowledge
toggle. Taking the word flips the acknowledge toggle, which is synchronised
back and frees the mailbox. Only the toggles are synchronised. The data bits
come straight from the holding register, which cannot change while the word
is in flight. With the two-flop delay the word is stable for at least two
destination clock edges before anyone uses it.

Each bridge uses two mailboxes, one per direction. Up to three transfers can
be in an AXI bridge at once: one in the request mailbox, one on APB and one
in the response mailbox. The AHB bridge keeps HREADYOUT low until the result
of each transfer is back, so it has one at a time.

Latency with equal clocks and no wait states: RVALID or BVALID rises about 8
cycles after the AR or AW handshake. On AHB, HREADYOUT is low for 8 cycles.
Each PREADY wait state adds one PCLK. With unrelated clocks each crossing
costs 2 to 3 edges of the receiving clock.

Both resets are active low with asynchronous assertion. They are expected to
be asserted together (one system reset), because a mailbox reset on one side
only would leave its toggles out of step.

## AXI4-Lite side (`axi_lite_slave`)

* ARREADY is high whenever the request mailbox is free.
* AWREADY and WREADY are raised together, only when both AWVALID and WVALID
  are high and no ARVALID is waiting. A read and a write that are valid in
  the same cycle therefore always reach APB read first. A write accepted
  alone starts as soon as the mailbox is free.
* BVALID or RVALID shows the result in the response mailbox until BREADY or
  RREADY takes it. Results come back in acceptance order.
* Response codes: OKAY `00`, SLVERR `10` (peripheral raised PSLVERR), DECERR
  `11` (no peripheral mapped at the address; nothing happens on APB).
* AWPROT/ARPROT go to PPROT unchanged. WSTRB goes to PSTRB, and PSTRB is 0 on
  reads.

## AHB side (`ahb_slave_if`)

* An address phase is taken when HSEL, HREADY and a NONSEQ or SEQ HTRANS
  are all present. IDLE and BUSY get a zero-wait OKAY.
* *Invalid* means the address is not mapped to a peripheral, or HSIZE is
  wider than 32 bits. Such a command is not forwarded. It gets the two-cycle
  ERROR response (HRESP high with HREADYOUT low, then with HREADYOUT high).
* A valid command goes to the request mailbox in its data phase, which is
  when HWDATA is available. The byte strobe comes from HSIZE and HADDR[1:0].
  HREADYOUT stays low until the result is back. An OKAY result ends with
  HREADYOUT high and the read data on HRDATA. A PSLVERR ends with the
  two-cycle ERROR.
* Writes are not posted: every write waits for its APB result, so a
  peripheral error can be reported.
* PPROT[0] comes from HPROT[1] (privileged), PPROT[2] from the inverse of
  HPROT[0] (instruction), and PPROT[1] is 0. PPROT[1] is the one constant
  output bit of the top.

## Address map

`apb_addr_decoder` cuts a region starting at `BASE_ADDR` into 16 windows of
`2**SLOT_LSB` bytes. Window *i* drives `psel[i]`. An address outside the
region, or in a window at or above `NUM_SLAVES`, is a miss. PADDR carries the
full 32-bit address, and each peripheral decodes its own offset.

| parameter | default | meaning |
|---|---|---|
| `NUM_SLAVES` | 16 | number of APB peripherals (1 to 16), width of `psel` |
| `BASE_ADDR` | `32'h4000_0000` | start of the APB region |
| `SLOT_LSB` | 12 | log2 of each peripheral's window (4 KB) |

All three are parameters of `apb_bridge_top`, `axi4lite2apb`, `ahb2apb`,
`apb_master_fsm`, `ahb_slave_if` and `apb_addr_decoder`. Bus widths (32-bit
address and data) are fixed in `apb_bridge_pkg`.

## Ports of the top

`apb_bridge_top` has plain ports in four groups:

* `aclk`, `aresetn`, `axi_*`: the AXI4-Lite slave.
* `apb0_*`: its APB4 master, with its own `apb0_pclk`, `apb0_presetn`.
* `hclk`, `hresetn`, `ahb_*`: the AHB slave.
* `apb1_*`: its APB master, with its own `apb1_pclk`, `apb1_presetn`.

`apb0_state` and `apb1_state` show each bridge's APB state machine state, for
status and debug.

## What follows the source design and what is this design's own

Taken from the design: the two bridge variants and their three-part split
(system-bus response logic, control transfer across the clock boundary, APB
access). Also from it: independent clocks with flip-flop synchronisers, the
four states IDLE/SETUP/ENABLE/HRESP and the role of HRESP, read priority,
PREADY wait states, DECERR for an unmapped address and SLVERR for PSLVERR,
up to 16 peripherals, 32-bit buses, and the AXI4-Lite and APB4 pin set (with
PPROT and PSTRB).

Chosen here, because the source design does not fix them:

* the toggle-handshake mailbox and its depth of one;
* the conditions on the state-machine edges other than IDLE->SETUP,
  SETUP->ENABLE and ENABLE->HRESP;
* the address map (base, window size);
* holding AW and W until both are valid;
* what counts as an invalid AHB command;
* non-posted AHB writes;
* the HPROT to PPROT mapping;
* reset polarity and style;
* the state status outputs.

One point of the source is ambiguous: it says both that any error gives
SLVERR and that an unmapped address gives DECERR. This RTL gives DECERR for
an unmapped address and SLVERR for a peripheral error.

Known limits:

* one outstanding AHB transfer;
* no AHB bursts beyond treating each beat as a single transfer;
* no write posting;
* no separate read and write response paths, so a slow RREADY also delays
  later write responses (AXI4-Lite allows this).

On an FPGA of the size of the original target (140 bonded I/O), either bridge
must be an internal block: the AXI4-Lite bridge alone has 279 port bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_sync_2ff` | two-edge delay, reset |
| `tb_cdc_mailbox` | 300 words across 7 ns / 11 ns clocks with random put/take; order, data, crossing latency at most 3 edges |
| `tb_apb_addr_decoder` | every window, region edges, random addresses, two parameter sets |
| `tb_apb_master_fsm` | 600 random transfers with wait states and a busy response path, so every edge is used; 2-cycle transfer, back-to-back every 2 cycles, +1 per wait state |
| `tb_axi_lite_slave` | 3000 random channel/mailbox combinations; read-before-write ordering |
| `tb_ahb_slave_if` | 400 AHB transfers against a responder; invalid commands never forwarded |
| `tb_axi4lite2apb` | 600 AXI transfers, PCLK period random 6-34 ns every half cycle |
| `tb_ahb2apb` | 500 AHB transfers, same clocking |
| `tb_apb_bridge_top` | both bridges at default parameters, concurrently, on four clocks |
| `tb_typical_transfers` | directed: six writes and read-backs on each bridge, then a read and a write raised together (APB must see the read first, and the read must return the old value) |

Shared testbench models:

* `apb_slave_model`: 16 peripherals of 16 words each, 0 to 3 random wait
  states, PSLVERR for address bits [11:8] = `F`, and APB rule checks.
* `axi_master_model`: an AXI4-Lite master with its own reference memory. It
  applies transfers in acceptance order and checks every response.
* `ahb_master_model`: a pipelined AHB master with its own reference memory.

The bridge-level testbenches also count that each mechanism actually
happened, and fail if one never did:

* wait states;
* HRESP holds;
* back-to-back transfers;
* read/write competition;
* SLVERR, DECERR and AHB ERROR.

The RTL also carries SystemVerilog assertions for the handshake rules:

* mailbox put/take;
* PENABLE only with PSEL;
* one-hot PSEL;
* SETUP followed by ENABLE;
* stable APB signals during wait states;
* AXI VALID held until READY;
* the two-cycle AHB ERROR.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/apb_bridge_pkg.sv tb/tb_apb_bridge_top.sv --top-module tb_apb_bridge_top -o sim
./obj_dir/sim
```

Every testbench builds the same way with its own name. The package file has
to come first on the command line; the rest is found through `-y`.
