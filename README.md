# Low-power coding for a time-multiplexed DRAM address bus

A DRAM is addressed over a bus half as wide as the address. The row half goes
first, then the column half, on the same pins. Every line that toggles
charges or discharges a large off-chip capacitance, so the power of this bus
is roughly proportional to the number of bit transitions per address.

The two halves behave very differently:

* The **row** half changes rarely. Consecutive accesses behind a cache
  hierarchy usually stay in the same DRAM row, or come back to a row used a
  little earlier.
* The **column** half moves in small steps and is often sequential (previous
  column + 1).

Plain multiplexing ignores this. Worse, alternating a row word with an
unrelated column word makes about half the lines toggle on every beat.

This design codes each half with the method that suits it. Both coders aim
at words that are mostly zeros. *Transition signaling* then turns "few ones"
into "few toggles": a one toggles its bus line and a zero leaves it alone.
No bus line and no bus cycle is added, and the decoder recovers the exact
address.

Two row coders are provided and chosen at run time:

| scheme       | row half                   | column half                  |
|--------------|----------------------------|------------------------------|
| XOR-INCXOR   | XOR with the previous row  | INC-XOR with previous col + K |
| MTF-INCXOR   | Move-To-Front, 2-bit slices | INC-XOR with previous col + K |

Either scheme can be used with or without transition signaling ("+TS").
These schemes follow the paper *Efficient Power Reduction Techniques for Time
Multiplexed Address Buses*. That paper reports average transition reductions
against plain multiplexing on SPEC95 address traces behind two-level caches:

| scheme         | reported reduction |
|----------------|--------------------|
| XOR-INCXOR     | 43 %               |
| MTF-INCXOR     | 47 %               |
| XOR-INCXOR+TS  | 64 %               |
| MTF-INCXOR+TS  | 70.5 %             |

XOR-INCXOR is the small option. MTF-INCXOR is a little better but needs more
area.

## The codes

All equations are per bus word, bitwise. `X` is the plain half-address and
`Y` is the coded word.

**XOR (row).** `Y_i = X_i xor X_{i-1}`, where `X_{i-1}` is the previous row.
Staying in the same row sends all zeros.

**INC-XOR (column).** `Y_i = X_i xor (X_{i-1} + K)`. The coder predicts the
previous column plus the stride `K` (default 1). A sequential column sends
all zeros. A nearby column sends few ones, mostly in the low bits. The adder
sits behind the register, so the coding path is a single XOR gate, as it is
for the XOR coder.

**Move-To-Front (row).** The row is cut into 2-bit slices. Each slice keeps a
self-organising list of its four possible values:

* The code register `C_v` holds the list position of value `v`.
* The coded slice is the position of the current value, `Y = C_x`. A 4-to-1
  multiplexer driven by the input value selects it, so the delay is one mux
  from its select input.
* After each coded row, every entry is updated with the same rule:
  `C_v <- 0` if `C_v = Y`, `C_v + 1` if `C_v < Y`, and `C_v` otherwise.
  The value just used moves to the front, and the ones that were ahead of it
  move back by one.

Rows that were used recently therefore code to small positions, mostly zero.
Unlike XOR, this also rewards a return to a row used a few accesses ago.

Example for one slice, starting from the list `[0 1 2 3]`:

| input value  | 2       | 2       | 1       | 2       | 3       |
|--------------|---------|---------|---------|---------|---------|
| code sent    | 2       | 0       | 2       | 1       | 3       |
| list after   | 2 0 1 3 | 2 0 1 3 | 1 2 0 3 | 2 1 0 3 | 3 2 1 0 |

**Transition signaling.** `B_i = B_{i-1} xor Y_i` on the bus, applied to the
sequence of row and column words as they are sent. The receiver recovers
`Y_i = B_i xor B_{i-1}`. With signaling off, `B_i = Y_i`.

## Datapath and timing

```
                 tm_addr_encoder                              tm_addr_decoder
addr[31:16] -> xor_enc ----+                          +-> xor_dec --+
            -> mtf_enc ----+-row-> tm_mux -> ts_enc =bus=> ts_dec --+-> mtf_dec --+-> dram_row
addr[15:0]  -> incxor_enc -------col-^     (register)       |                       |
                                                            +-> incxor_dec ---------+-> dram_addr
```

`tm_addr_bus_top` joins the two sides and brings the bus out. An address
accepted in cycle `t` (`addr_valid && addr_ready`) moves as follows:

| cycle | encoder                            | bus / strobes          | decoder outputs                    |
|-------|------------------------------------|------------------------|------------------------------------|
| t     | address and configuration captured |                        |                                    |
| t+1   | row beat: row word coded and muxed |                        |                                    |
| t+2   | column beat; next address may be accepted | row word, `bus_row` |                                |
| t+3   | (next row beat)                    | column word, `bus_col` | `dram_row`, `dram_row_valid`       |
| t+4   |                                    |                        | `dram_addr`, `dram_addr_valid`     |

Throughput is one address every two cycles, with back-to-back requests
keeping the bus busy every cycle. When no address is sent, the bus keeps its
last value and does not toggle.

`bus_row` and `bus_col` play the part of the DRAM's row and column strobes.
They tell the receiver which coder a word belongs to. They are strobes, not
extra data lines.

## Keeping both ends in step

Every coder has state: the previous row, the previous column, the MTF
lists, and the previous bus word. Decoding is exact only if the decoder's
copy of that state matches the encoder's at every word. The design
guarantees this with the following rules, which matter if you change it:

* Both sides reset to the same state. The history registers clear to zero,
  so the first address after reset is sent as if the previous one were 0.
  The MTF lists start at value `v` in position `v`.
* The row coders advance only on row beats. The column coders advance only
  on column beats.
* Only the row coder of the *selected* scheme advances. The unused one keeps
  its state on both sides. Switching between XOR and MTF is therefore safe
  at any address boundary.
* The transition-signaling registers advance on every word, whether
  signaling is on or off. Turning it on or off between addresses is safe.
* `row_mode` and `ts_en` are configuration shared by both ends. They must
  not change while an address is in flight. An assertion in
  `tm_addr_bus_top` checks this from acceptance up to the column beat.
* `K` and `MTF_SLICE` must be the same on both sides.

A single lost or corrupted bus word desynchronises the decoder until both
sides are reset. The scheme has no resynchronisation of its own.

## Files and parameters

| file | contents |
|------|----------|
| `rtl/tmab_pkg.sv` | `row_mode_e` (`ROW_XOR`, `ROW_MTF`), multiplexer phase type, MTF update function |
| `rtl/xor_enc.sv`, `rtl/xor_dec.sv` | row XOR coder and decoder |
| `rtl/incxor_enc.sv`, `rtl/incxor_dec.sv` | column INC-XOR coder and decoder |
| `rtl/mtf_enc.sv`, `rtl/mtf_dec.sv` | row Move-To-Front coder and decoder (per-slice tables) |
| `rtl/ts_enc.sv`, `rtl/ts_dec.sv` | transition signaling; `ts_enc` is the bus driver register |
| `rtl/tm_mux.sv` | time multiplexer and row/column sequencer (valid/ready) |
| `rtl/tm_addr_encoder.sv` | sender side |
| `rtl/tm_addr_decoder.sv` | receiver side |
| `rtl/tm_addr_bus_top.sv` | both sides joined by the bus (top level) |
| `tb/tmab_ref_pkg.sv` | reference model used by the testbenches |
| `tb/cache_model_pkg.sv` | behavioural set-associative, sectored cache used to produce DRAM miss streams |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `tm_addr_bus_narrow_tb` and `tm_addr_bus_cache_tb` |

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 32 | full address width. The bus, row and column are each `ADDR_W/2` bits; the row is the upper half. |
| `K` | 1 | column stride predicted by INC-XOR. Use e.g. 4 if consecutive columns step by 4. |
| `MTF_SLICE` | 2 | bits per MTF slice. `ADDR_W/2` must be a multiple of it. Wider slices give bigger tables and only slightly better coding. |

The widths, the row-first order and the 2-bit MTF slices come from the
published scheme. The following are this design's own choices, because the
scheme leaves them open:

* the value of `K`;
* the reset state;
* the valid/ready request interface and the overlap of the next request
  with the column beat;
* the registered decoder outputs with valid pulses;
* run-time selection between the two schemes and of signaling;
* the row = upper half address mapping.

The MTF update rule is the standard move-to-front rule. In the slice
drawing, the list update is driven by the code being sent. Here that code
updates the tables on the same clock edge. The register drawn after the
select multiplexer is the bus register in `ts_enc`.

Pyramid coding, the earlier scheme for multiplexed DRAM addresses that
these codes are measured against, is not included.

## Simulating

The testbenches use only `verilator` (5.x). For example, the end-to-end
test at default size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/tmab_pkg.sv tb/tmab_ref_pkg.sv tb/tm_addr_bus_top_tb.sv \
  --top-module tm_addr_bus_top_tb
./obj_dir/Vtm_addr_bus_top_tb
```

Replace `tm_addr_bus_top_tb` with any other `*_tb` to test one module. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
packages must come first on the command line.

What the tests establish:

* **Leaf modules** (`xor_*`, `incxor_*`, `mtf_*`, `ts_*`, `tm_mux`): random
  stimulus with random enables is compared against the defining equations.
  The MTF reference keeps an explicitly ordered list instead of position
  registers. `mtf_enc_tb` also runs the hand-worked example above.
  `tm_mux_tb` checks the sequence of beats and ready, and throughput under
  back-to-back requests.
* **`tm_addr_encoder_tb` / `tm_addr_decoder_tb`**: every bus word and its
  cycle, and every decoded row and address, are checked against the
  reference model. Schemes and signaling are switched between addresses.
* **`tm_addr_bus_top_tb`** (default parameters): runs a synthetic address
  stream meant to resemble traffic behind an L2 cache:
  * 16 % sequential;
  * 40 % in the same row near the previous column;
  * 15 % reusing one of eight recent rows;
  * the rest random.

  The same stream goes through each of the four configurations, then
  through a mixed run with gaps and mode changes. The test checks every
  word, the latencies (row +3, address +4 cycles), the throughput, and that
  each mechanism occurs. It also counts bus transitions per address. On
  this stream it measures:

  | configuration  | transitions per address |
  |----------------|-------------------------|
  | plain          | 15.95                   |
  | XOR-INCXOR     | 11.10                   |
  | XOR-INCXOR+TS  | 8.14                    |
  | MTF-INCXOR     | 11.03                   |
  | MTF-INCXOR+TS  | 8.03                    |

  The test requires that both +TS variants improve on plain multiplexing.
  These numbers depend on the synthetic stream, whose rows are spread over
  the full 16-bit range. They are not a substitute for real traces.
* **`tm_addr_bus_narrow_tb`**: the link with a 4-bit bus (`ADDR_W = 8`) and
  `K = 2`, end to end against the reference model.
* **`tm_addr_bus_cache_tb`**: a synthetic program of 150,000 instructions
  runs through behavioural caches (`tb/cache_model_pkg.sv`) in two
  configurations:

  | configuration | L1 instruction        | L1 data               | L2 (unified)                          |
  |---------------|-----------------------|-----------------------|---------------------------------------|
  | PowerPC 750   | 32 KB, 32 B, 8-way    | 32 KB, 32 B, 8-way    | 256 KB, 128 B lines in 2 sectors, 2-way |
  | SparcIIi      | 16 KB, 32 B, 2-way    | 16 KB, 16 B, direct   | 256 KB, 64 B lines in 2 sectors, direct |

  Each L2 sector miss is a single burst, so only its start address is
  sent. Addresses are in sector units, so the next sector is previous + 1.
  Every address is decoded and checked. Measured transitions per address:

  | scheme        | PowerPC 750    | SparcIIi       |
  |---------------|----------------|----------------|
  | plain         | 14.0           | 14.4           |
  | XOR-INCXOR    | 14.0 (0 %)     | 13.8 (4 %)     |
  | XOR-INCXOR+TS | 8.0 (43 %)     | 8.6 (40 %)     |
  | MTF-INCXOR    | 14.0 (0 %)     | 13.8 (4 %)     |
  | MTF-INCXOR+TS | 7.9 (43 %)     | 8.3 (42 %)     |

  In this program, code, stack, arrays and heap lie in DRAM rows far apart.
  Consecutive misses therefore rarely share a row, and coding alone gains
  little. Transition signaling, which turns the mostly-zero column words into
  few toggles, gives most of the gain. Real programs with more row reuse
  should gain more from coding; the published figures were measured on such
  programs.

Every testbench has been shown to fail against a deliberately broken copy of
its module.

## Scope

This RTL covers the address coding link only. It does not include the
processor, the L1 and L2 caches, the DRAM, or the data path and burst
control of the L2-to-DRAM memory controller. The L2 side connects to
`addr_valid`/`addr`/`addr_ready`. The DRAM side connects to `dram_row` and
`dram_addr` with their valid pulses. In a real chip the two halves sit on
different dies: `tm_addr_encoder` in the SoC, and `tm_addr_decoder` in front
of the DRAM's address latch.
