# AHB-to-APB bridge

A system-on-chip usually has two buses. The AMBA AHB bus is fast and
pipelined, and it connects the CPU, DMA engines and memories. The AMBA APB
bus is simple and slow, and it connects peripherals such as UARTs, timers,
keypads and GPIO. This bridge joins the two. Towards AHB it is a slave.
Towards APB it is the only master. Each AHB transfer that selects the bridge
becomes exactly one APB transfer. While the APB transfer runs, the bridge
holds the AHB master with HREADYOUT low. It then returns the read data, or an
error response if the peripheral refused the access.

The design follows the bridge described in *Design of AMBA Based AHB2APB
Bridge Protocol*. It has the same three parts (an AHB slave interface, a
bridge state machine and an APB master interface) and the same port names.
That description gives what each part does but not how it does it. The state
machine, the cycle timing and the error handling here are therefore this
design's own. They are listed under "Design choices" below.

## Structure

```
             +--------------+  accept, req   +---------------+
 AHB  ------>| ahb_slave_if |--------------->| apb_master_if |-----> APB
 master <----|              |<-- rdata ------|               |<----- peripheral
             +--------------+                +---------------+
                 ^  |  ready/resp, rdata_load   ^   | ack, err
                 |  v                           |   v
             +-----------------------------------------+
             |               bridge_fsm                |
             +-----------------------------------------+
```

| File | Role |
|---|---|
| `rtl/ahb2apb_pkg.sv` | HTRANS/HSIZE/HRESP encodings, state type, request record `apb_req_t`, byte-lane function |
| `rtl/ahb_slave_if.sv` | Decides when a transfer is accepted, forms the request with its byte enables, holds HRDATA |
| `rtl/bridge_fsm.sv` | Controller: HREADYOUT, HRESP, APB select/enable, load strobes |
| `rtl/apb_master_if.sv` | Registers the request and the write data onto the APB outputs and passes the peripheral's answer back |
| `rtl/ahb2apb_top.sv` | Wires the three parts together. This is the top level. |

Both buses run on one clock, `ahb_clk`. Reset is `ahb_reset_n`, which is
asynchronous and active low. Address and data are 32 bits wide
(`BUS_ADDR_W` and `BUS_DATA_W` in the package).

## Life of a transfer

A transfer is **accepted** in a clock cycle in which all of these hold:
`ahb_slv_hsel_i` is high, HTRANS is NONSEQ or SEQ, the bus HREADY
(`ahb_slv_hready_i`) is high, and the bridge itself is ready. IDLE and BUSY
cycles are ignored. On that clock edge, the APB side registers the address,
direction, size, burst type, protection bits and byte enables. They stay on
`paddr`, `pwrite`/`pread`, `psize`, `pburst`, `pprot` and `pbyte_en` until
the next transfer is accepted.

The controller then steps through these states:

| State | HREADYOUT | slv_ahb_sel | penable | What happens |
|---|---|---|---|---|
| IDLE | 1 | 0 | 0 | waits for a transfer |
| WDATA (writes only) | 0 | 0 | 0 | HWDATA, which is valid only now, is registered onto `pwdata` |
| SETUP | 0 | 1 | 0 | APB setup phase |
| ACCESS | 0 | 1 | 1 | APB access phase; stays here while `slv_ahb_ack` is low |
| DONE | 1 | 0 | 0 | the transfer ends with OKAY; for a read, HRDATA holds the word the peripheral returned |
| ERR1 | 0 | 0 | 0 | first cycle of the two-cycle ERROR/RETRY response |
| ERR2 | 1 | 0 | 0 | second cycle of it |

In DONE, ERR2 and IDLE the bridge is ready. The AHB master's next address
phase can therefore overlap the last cycle of the previous transfer, and it
is accepted straight away. The WDATA cycle is needed because an AHB master
drives write data one cycle after the address, while APB wants the write
data in its setup phase.

### Cycle counts

If the peripheral acknowledges in the first access cycle, one transfer takes
this many clock cycles, counted from the accepting edge to the edge on which
the AHB master sees HREADY high:

| Transfer | Cycles |
|---|---|
| read | 3 (SETUP, ACCESS, DONE) |
| write | 4 (WDATA, SETUP, ACCESS, DONE) |
| each cycle `slv_ahb_ack` is held low | +1 |
| error or retry response | +1 |

A zero-wait read, and the next transfer following it:

```
cycle         0    1    2    3
state         IDLE SETUP ACC DONE
HADDR         A1   A2   A2   A2     (A1 accepted at the end of cycle 0,
HREADYOUT     1    0    0    1       A2 at the end of cycle 3)
paddr         -    A1   A1   A1
slv_ahb_sel   0    1    1    0
penable       0    0    1    0
slv_ahb_ack   -    -    1    -
HRDATA        -    -    -    D1
```

### Bursts

The bridge runs AHB bursts (INCR, INCR4 and the others) one beat at a time.
Every beat is a separate APB transfer. HBURST is passed on to `pburst` so
that the peripheral can see that a beat is part of a burst. BUSY cycles
inside a burst are ignored.

### Byte enables

`pbyte_en` marks the byte lanes that a transfer uses on the 32-bit
little-endian bus. It is computed from HADDR[1:0] and HSIZE:

| Size | Lanes |
|---|---|
| byte | `4'b0001 << HADDR[1:0]` |
| halfword | `4'b0011` if HADDR[1] is 0, else `4'b1100` |
| word | `4'b1111` |

For example, a byte burst at 0x101, 0x102, 0x103, 0x104 gives 2, 4, 8, 1.
`psize` carries HSIZE[1:0]. Transfers wider than a word are not supported,
and an assertion flags them.

### Errors and retry

The peripheral can refuse an access by raising `xfer_error_access` together
with `slv_ahb_ack`. The bridge then gives the standard AHB two-cycle
response: HREADYOUT is low in the first cycle and high in the second, and
HRESP is the same in both. HRESP is RETRY if `retry_enable` was high when
the peripheral refused, and ERROR otherwise. The APB transfer is not
repeated by the bridge. After RETRY, the AHB master is expected to issue the
transfer again. SPLIT is never produced.

## Ports of `ahb2apb_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `ahb_clk`, `ahb_reset_n` | in | 1 | clock, asynchronous active-low reset |
| `ahb_slv_hsel_i` | in | 1 | HSEL for the bridge |
| `ahb_slv_haddr_i` | in | 32 | HADDR |
| `ahb_slv_htrans_i` | in | 2 | HTRANS |
| `ahb_slv_hwrite_i` | in | 1 | HWRITE |
| `ahb_slv_hsize_i` | in | 3 | HSIZE (byte, halfword, word) |
| `ahb_slv_hburst_i` | in | 3 | HBURST |
| `ahb_slv_hprot_i` | in | 4 | HPROT |
| `ahb_slv_hwdata_i` | in | 32 | HWDATA |
| `ahb_slv_hready_i` | in | 1 | bus HREADY. On a bus with one slave, tie it to `slv_ahb_hready_o`. |
| `retry_enable` | in | 1 | report a refused access as RETRY instead of ERROR |
| `slv_ahb_hrdata_o` | out | 32 | HRDATA |
| `slv_ahb_hready_o` | out | 1 | HREADYOUT |
| `slv_ahb_hresp_o` | out | 2 | HRESP: OKAY=0, ERROR=1, RETRY=2 |
| `paddr` | out | 32 | APB address |
| `pwrite`, `pread` | out | 1 | direction of the held transfer (`pread` = !`pwrite`) |
| `pwdata` | out | 32 | APB write data |
| `psize` | out | 2 | transfer size |
| `pburst` | out | 3 | burst type |
| `pbyte_en` | out | 4 | byte-lane enables |
| `pprot` | out | 4 | protection |
| `slv_ahb_sel` | out | 1 | PSEL, high in the setup and access phases |
| `penable` | out | 1 | PENABLE, high in the access phase |
| `slv_ahb_ack` | in | 1 | peripheral ends the access phase (the PREADY role) |
| `slv_ahb_rdata` | in | 32 | PRDATA |
| `xfer_error_access` | in | 1 | peripheral refuses the access; sampled with `slv_ahb_ack` |

## Design choices

These points are decided here rather than taken from the source description:

- **One clock.** The APB signal list names a separate PCLK, but the bridge
  runs APB on the AHB clock. Separate clocks would need a clock-domain
  crossing, which is not built.
- **Extra APB strobe.** `penable` is added. It is in the standard APB signal
  list but not in the bridge's port figure.
- **No `hmaster` input.** The interface figure shows `hmaster` as a constant
  input. It has no function in the bridge, so it is left out.
- **Own state machine and timing.** The states, the WDATA cycle and the
  cycle counts above are this design's. The APB outputs are registered, so
  `paddr` follows HADDR by one clock. Waveforms of the original bridge are
  not matched cycle for cycle.
- **Own meaning for `retry_enable`.** The bridge's interface has a
  `retry_enable` input but does not say what it does. Here it selects RETRY
  instead of ERROR.
- **Accepting needs both readies.** The bridge accepts a transfer only when
  its own HREADYOUT is high, not only when the bus HREADY is. It therefore
  also works if `ahb_slv_hready_i` is tied high.
- **No timeout.** A timeout on a peripheral that never acknowledges is
  suggested as future work in the description and is not built. A
  peripheral that never raises `slv_ahb_ack` stalls the AHB bus.
- **Not part of this RTL.** The AHB arbiter and decoder, the bus masters and
  the peripherals are outside the bridge.

## Assertions

The RTL checks these rules while it simulates:

- A transfer is accepted only while the bridge is ready.
- A setup phase is always followed by an access phase.
- The APB address, direction, write data and byte enables are stable from
  setup to access.
- `penable` is only high while `slv_ahb_sel` is.
- An error response lasts two cycles, and the first has HREADYOUT low.
- No transfer is wider than a word.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

- **`tb_ahb2apb_top`** tests the whole bridge at its default sizes. It drives
  the bridge from a pipelined AHB master model. The APB side is answered by
  `apb_mem_model`, a 256-word memory with random wait states and error
  injection. It checks every APB transfer field, read data against a
  reference memory, and the cycle count of every transfer. It runs these
  phases:
  - the byte INCR read burst at 0x101..0x104;
  - single transfers;
  - INCR4 bursts with a BUSY beat;
  - back-to-back reads and writes of mixed sizes;
  - 300 random transfers with wait states;
  - a shared bus, where a second slave holds the bus HREADY low;
  - an ERROR case, which also checks that the refused write changed nothing;
  - a RETRY case with the transfer issued again.

  It counts each mechanism and fails if one never happened.
- **`tb_ahb_slave_if`** tests the acceptance rule, the request fields, the
  byte-lane table and the HRDATA register.
- **`tb_bridge_fsm`** tests the output sequence of every state for reads,
  writes, waits, errors and retries, and the 3- and 4-cycle costs.
- **`tb_apb_master_if`** tests that the registered APB outputs hold their
  values, that the acknowledge is gated, and the return path.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl \
  rtl/ahb2apb_pkg.sv rtl/ahb_slave_if.sv rtl/bridge_fsm.sv \
  rtl/apb_master_if.sv rtl/ahb2apb_top.sv \
  tb/apb_mem_model.sv tb/tb_ahb2apb_top.sv --top-module tb_ahb2apb_top
./obj_dir/Vtb_ahb2apb_top
```

For a unit testbench, use the package, its block and the testbench. All
four finish in well under a second.

## Changing it

- A different peripheral protocol changes only `apb_master_if`. The
  controller needs only an acknowledge and an error flag from it.
- To add a timeout, count cycles in ACCESS in `bridge_fsm` and leave ACCESS
  for ERR1 when the count reaches a limit.
- A separate APB clock needs a synchronising handshake between the
  controller and `apb_master_if`. It is not present.
