# AHB-to-APB bridge with independent clocks

An on-chip system usually has two buses: a fast, pipelined AMBA AHB for the
processor, memories and DMA, and a simple AMBA APB for slow peripherals
(UART, timer, keypad, GPIO). This bridge is the one AHB slave through which
the processor reaches every APB peripheral. It latches each AHB address,
control word and write data, runs the matching APB transfer, and returns read
data and the AHB `HREADY` response.

The AHB side runs on `HCLK` and the APB side on `PCLK`. The two clocks may have
any frequencies and any phase relation. Only three single-bit handshake lines
cross between the two domains, each through a two-flop synchronizer:

* `PENDWR`: pending write, from AHB to APB;
* `PENDRD`: pending read, from AHB to APB;
* `PDONE`: peripheral operation done, from APB to AHB.

Address and data cross on plain wires. They are safe because they are held
still for the whole time a request is up.

The cost is latency. A read stalls the AHB master for at least about eight
`HCLK` cycles when the clocks are equal, and longer when `PCLK` is slower.
Writes are posted, so the master normally does not wait for them.

## Structure

```
            HCLK domain                          |           PCLK domain
                                                 |
 AHB  --> ahb_response  --PENDWR/PENDRD--------->|--> sync2 x2 --> apb_access --> APB
 bus      (state machine,  <-----------sync2-----|<---- PDONE ---  (setup/enable,     (PSELX[3:0],
          HREADYOUT)                             |                 PSELX decode,       PENABLE, PADDR,
     \                                           |                 PREADY, PRDATA      PWRITE, PWDATA,
      -> ctrl_transfer  --h_addr, h_wdata------->|---------------> capture)            PRDATA, PREADY)
         (address, data  <--p_rdata--------------|----------------
          holding regs)
```

| file | what it is |
|---|---|
| `rtl/ahb2apb_pkg.sv` | HTRANS encodings; the state types of both controllers |
| `rtl/ahb_response.sv` | HCLK controller: the eight-state machine, `HREADYOUT`, request and acknowledge handling |
| `rtl/ctrl_transfer.sv` | HCLK registers: latched address phase, APB holding address and data, `HRDATA` |
| `rtl/sync2.sv` | double stage synchronizer (two flip-flops) |
| `rtl/apb_access.sv` | PCLK controller: the APB setup and enable phases, peripheral select, wait states, `PDONE` |
| `rtl/ahb_to_apb_top.sv` | the bridge: the blocks above wired together |

## The AHB-side state machine

This is the part that takes the most care to follow. Its states come in pairs.
In the "setup" state of a pair, a transfer has been handed to the APB side. In
the "enable" state, the transfer has finished and the AHB side decides what to
do next.

| state | meaning | `HREADYOUT` |
|---|---|---|
| `ST_IDLE` | nothing in flight | 1 |
| `ST_READ` | a read is on its way through the APB | 0 |
| `ST_RENABLE` | the read is finished; `HRDATA` is valid | 1 |
| `ST_WWAIT` | a write's address was accepted; its data phase ends this cycle | 1 |
| `ST_WRITE` | a posted write is on its way through the APB | 1 until a further transfer arrives, then 0 |
| `ST_WENABLE` | the write is finished; nothing is waiting | 1 |
| `ST_WRITEP` | a write is on its way, and a further transfer is already waiting ("pending") | 0 |
| `ST_WENABLEP` | the write is finished and the pending transfer moves up | 1 if the pending transfer is a write, 0 if a read |

*Valid* means that `HSEL`, `HREADYIN` and an `HTRANS` of NONSEQ or SEQ are all
present. *HwriteReg* is the direction of the latched, pending transfer. The
transitions are:

| from | condition | to |
|---|---|---|
| `ST_IDLE`, `ST_RENABLE`, `ST_WENABLE` | Valid, read | `ST_READ` |
| | Valid, write | `ST_WWAIT` |
| | not Valid | `ST_IDLE` |
| `ST_WWAIT` | Valid | `ST_WRITEP` |
| | not Valid | `ST_WRITE` |
| `ST_READ` | APB done | `ST_RENABLE` |
| `ST_WRITE` | APB done, and a transfer arrived during `ST_WRITE` or this cycle | `ST_WENABLEP` |
| | APB done, nothing arrived | `ST_WENABLE` |
| `ST_WRITEP` | APB done | `ST_WENABLEP` |
| `ST_WENABLEP` | HwriteReg = 1, Valid | `ST_WRITEP` |
| | HwriteReg = 1, not Valid | `ST_WRITE` |
| | HwriteReg = 0 | `ST_READ` |

The published machine moves on every clock. This implementation makes two
changes, both needed because the APB side runs on its own clock:

* **Setup states wait for the APB.** `ST_READ`, `ST_WRITE` and `ST_WRITEP` stay
  where they are until the APB transfer has finished ("APB done" above). On the
  first cycle, once the synchronized `PDONE` is low, the block raises `PENDRD`
  or `PENDWR`. When the synchronized `PDONE` rises, the request drops and the
  state moves on.
* **`ST_WRITE` collects a pending transfer.** A write is posted, so
  `HREADYOUT` is high in `ST_WRITE` and the master may start a further
  transfer while the APB side is still busy. The first such transfer is
  latched and `HREADYOUT` goes low. When the write finishes, the state goes to
  `ST_WENABLEP`, as it would for a transfer arriving on the last cycle.

Two more details:

* A pending write's data phase ends in `ST_WENABLEP`. That is where its
  `HWDATA` is captured.
* A pending read keeps the master stalled until its data has come back in
  `ST_RENABLE`.

## Crossing the clock boundary

Each APB transfer goes through a four-phase, return-to-zero handshake:

1. The AHB side loads the holding registers (`h_addr`, `h_wdata`). One `HCLK`
   later it raises `PENDWR` or `PENDRD` from a flip-flop.
2. The APB side sees the request two `PCLK` edges later and copies address
   and data into its output registers. It runs the APB transfer, captures
   `PRDATA` into `p_rdata`, and raises `PDONE`.
3. The AHB side sees `PDONE` two `HCLK` edges later. It captures `p_rdata`
   into `HRDATA` and drops the request.
4. The APB side sees the request fall and drops `PDONE`. The AHB side may
   raise the next request only after it has seen `PDONE` low.

The holding registers change only between transfers. `p_rdata` is stable for
as long as `PDONE` is high. So every multi-bit value is stable for at least two
receiving-clock edges before it is sampled.

Both resets are asynchronous and active low. Assert `HRESETn` and `PRESETn`
together. Resetting one domain alone while a handshake is in progress leaves
the other side waiting.

**Latency.** For a read with equal clock frequencies and a peripheral with no
wait states, the master sees about 8 to 9 wait cycles:

* 1 cycle to raise the request;
* 2 `PCLK` cycles of synchronizer delay;
* the APB setup and enable cycles;
* 1 cycle to register `PDONE`;
* 2 `HCLK` cycles of synchronizer delay;
* 1 cycle to leave `ST_READ`.

Dropping the handshake adds about four more cycles before the next transfer
can start. The end-to-end test measured these minimum read stalls, in `HCLK`
cycles:

| clocks | minimum read stall |
|---|---|
| `PCLK` = `HCLK`/2 | 15 |
| equal frequencies, 90° apart | 8 |
| `PCLK` period 14 against `HCLK` period 20 | 7 |
| `PCLK` period 74 against `HCLK` period 20 | 24 |

Back-to-back writes cost the same round trip, but only once a further
transfer is waiting behind one.

## The APB side

`apb_access` waits in `P_IDLE` until it sees a synchronized request. Then it
runs these states:

* `P_SETUP`: one `PSELX` line high, `PENABLE` low; `PADDR`, `PWRITE` and
  `PWDATA` valid.
* `P_ENABLE`: `PENABLE` high until `PREADY` is high.
* `P_DONE`: `PDONE` high until the request drops.

All APB outputs come from registers. From a seen request to `PDONE` takes
2 + (wait cycles) `PCLK` cycles.

**Peripheral select.** Address bits `PADDR[SEL_LSB +: SEL_BITS]` number the
peripheral. The default is `PADDR[14:12]`, which gives one 4 KiB window per
peripheral. Values 0 to `NUM_SLAVES-1` raise the matching `PSELX` line. Any
other value is an unknown location and raises no select line. Such a transfer
still runs its setup and enable cycles so the handshake completes. It does not
wait for `PREADY`, a write to it is lost, and a read returns zero.

**Wait states.** `PREADY` (APB3 style) lets a peripheral extend the enable
phase. A system of AMBA 2 peripherals ties it high. `PRDATA` and `PREADY` are
single inputs, so the system multiplexes them from the selected peripheral.

## Interface and parameters

`ahb_to_apb_top`:

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 32 | `HADDR` / `PADDR` width |
| `DATA_W` | 32 | data width |
| `NUM_SLAVES` | 4 | number of `PSELX` lines |
| `SEL_LSB` | 12 | lowest address bit of the peripheral-number field |
| `SEL_BITS` | 3 | width of that field |

Ports:

* AHB side: `HCLK`, `HRESETn`, `HSEL`, `HTRANS[1:0]`, `HADDR`, `HWRITE`,
  `HWDATA`, `HREADYIN`, `HREADYOUT`, `HRDATA`.
* APB side: `PCLK`, `PRESETn`, `PSELX[NUM_SLAVES-1:0]`, `PENABLE`, `PADDR`,
  `PWRITE`, `PWDATA`, `PRDATA`, `PREADY`.

If the bridge is the only AHB slave, connect `HREADYIN` to `HREADYOUT`.

## Where this design departs from the published bridge

* **Setup states wait.** The published state machine takes one clock per
  state. Here the setup states wait for the handshake, and `ST_WRITE` collects
  a pending transfer over several cycles (see above).
* **`HREADYOUT` and signal timing.** The published bridge does not give its
  `HREADYOUT` per state, the handshake's return-to-zero behaviour, the
  peripheral-select field, the reset values or the behaviour at an unknown
  address. All of these are this design's choices.
* **`PREADY`.** The published port list has no `PREADY`. It is added so that
  peripherals can insert wait states, which the bridge is meant to support.
* **Unused AHB inputs.** `HSIZE` and `HBURST` are not ports. Every APB
  transfer is a full-width single transfer, and an AHB burst is carried out
  as its sequence of single transfers.
* **No error response.** There is no `HRESP` and no timeout: a peripheral that
  never raises `PREADY` hangs the bridge.
* **Parts not provided.** The AHB master and APB peripheral environments are
  test code here, not RTL. The same goes for the surrounding system of
  processor, memories, DMA and peripherals.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb/tb_sync2.sv` | two-edge delay against an asynchronous random input; reset |
| `tb/tb_ctrl_transfer.sv` | all registers against a reference model under random load strobes |
| `tb/tb_apb_access.sv` | cycle-by-cycle APB phases, select decode including unknown slots, exact `PDONE` timing with random wait states, read data, release |
| `tb/tb_ahb_response.sv` | a reference state machine predicts state, `HREADYOUT`, `PENDWR` and `PENDRD` every cycle under a random master and a random-delay acknowledge; every accepted transfer must produce one request of the right kind, in order; every published transition must be taken |
| `tb/tb_ahb_to_apb_top.sv` | end to end at default parameters (see below) |

The end-to-end test uses four behavioural peripherals, from
`tb/apb_slave_model.sv`. Peripheral *n* adds *n* wait cycles plus a random 0
or 1. A pipelined AHB master drives the bridge, using SEQ for back-to-back
transfers. The test runs four clock set-ups:

* `PCLK` at half the `HCLK` frequency, with a seven-register write burst, a
  rewrite of one register, and the read-back;
* equal frequencies with a quarter-period phase offset, with a single write
  and its read-back;
* `PCLK` faster than `HCLK`;
* `PCLK` much slower than `HCLK`.

Each set-up also runs random traffic that includes unknown addresses.

The test checks that every read returns the reference memory's value. It also
checks that every APB transfer matches its AHB transfer in order, and that the
peripherals see no APB rule broken. It fails unless each of these happened at
least once:

* reads;
* posted writes;
* bursts;
* AHB and APB wait cycles;
* unknown-address transfers;
* handshakes;
* every controller state, including the pending-transfer states.

The RTL also carries assertions for the handshake and APB rules: one request
at a time, stable APB signals during the enable phase, and at most one
select.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ahb_to_apb_top \
  -Irtl -Itb rtl/ahb2apb_pkg.sv rtl/sync2.sv rtl/ahb_response.sv rtl/ctrl_transfer.sv \
  rtl/apb_access.sv rtl/ahb_to_apb_top.sv tb/apb_slave_model.sv tb/tb_ahb_to_apb_top.sv
./obj_dir/Vtb_ahb_to_apb_top
```

The unit testbenches need only the package, their module and their own file.
The end-to-end testbench reads internal signals of the bridge by hierarchical
name to count state visits and handshakes. It runs in well under a second.
