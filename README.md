# Concurrent online test hardware for a many-core torus SoC

This is synthesizable SystemVerilog for the test hardware of a many-core system-on-chip whose tiles sit on an N x N 2D torus. Each tile has a core with a scan chain, a router and a core-network interface (CNI). While the other cores keep working, the hardware in the CNIs tests cores one group at a time:

- A tile decides to test its own core. An anomaly detector on the core's traffic asks for a test, or software does.
- It waits for its row's token.
- It gathers the test vector set from its nearest neighbours.
- It applies the set through the scan chain and compares the responses.
- If the core fails, the tile disables it.

The test set is not kept in one place. It is split into segments, and the segments are placed so that every tile finds a complete copy within RADIUS hops.

The default configuration is a 10x10 torus with a 256 KB test set. The set is split into four 64 KB data segments plus one parity segment, one segment per tile. The segments are placed by 3-interleaving, so every tile reaches all five segments within one hop.

Top module: `colt_soc` (rtl/colt_soc.sv). Shared types and constants: `colt_pkg`.

## Tile (colt_tile)

One tile's test hardware:

| Block | Role |
|---|---|
| `tc_sched` | test controller state machine and token ring |
| `tv_fetch` + `parity_recon` + `scan_apply` | gather the test set, decode it and apply it to the core's scan chain |
| `tv_server` | answers other tiles' requests for this tile's segment |
| `tvm` | the tile's Test Vector Memory (8192 x 64 bits) |
| `attu` | anomaly-based test triggering unit |
| `test_cfg_reg` | software-visible configuration register on the core's OCP port |
| `dtvs_map` | where each segment lives, seen from this tile |

Network side:

- One 64-bit flit port in and one out, with valid/ready handshakes.
- Incoming request headers go to the server. Everything else goes to the fetcher.
- Outgoing packets from the server and the fetcher are merged whole, never interleaved. The server goes first.

The single TVM port is shared. The order of priority is:

1. the load bus,
2. the tile's own fetcher,
3. the server.

### Packets

| Packet | Size |
|---|---|
| Data | header flit + 8 payload flits (64 bytes) |
| Request | single flit |
| Refusal (NACK) | single flit |

Header fields: message type, destination, source, segment, a `force` bit, and the packet index within the segment. Node ids are `y*N + x`.

### Test words

A test word is 64 bits:

- bits [63:32]: the scan stimulus;
- bits [31:0]: the expected response.

This fits one 32-flop scan chain. Word `j` of the set is in data segment `j mod 4`, at index `j div 4`. The parity segment holds the XOR of the four data words with the same index.

## Test vector placement (dtvs_map)

Tile (x, y) has colour `(x + MULT*y) mod SEGS`, and it stores the segment of that colour. With SEGS = 5 and MULT = 3 on a torus whose size is a multiple of 5, this is a perfect 3-interleaving: each tile and its four neighbours hold five different colours.

`dtvs_map` searches the Lee ball of radius RADIUS around the tile. For every segment, it returns the nearest tile that holds it and the hop count. Its `ok` output is high only when every segment was found.

Other settings were checked:

| Torus | SEGS | MULT | RADIUS |
|---|---|---|---|
| 8x8 | 8 | 3 | 2 |
| 13x13 | 13 | 5 | 2 |

## Test vector memory and loading (tvm)

Each TVM is a single-port synchronous RAM with a one-cycle read latency. It has no reset and no initial contents.

After power-up, the whole chip is filled over a broadcast load bus on `colt_soc`:

- Each cycle, the bus carries one word of one segment.
- Every tile whose colour matches stores the word.
- The whole chip is filled in SEGS*DEPTH cycles: 40,960 cycles with the defaults.

## Test controller and token rings (tc_sched)

States:

| State | What happens |
|---|---|
| WAIT_TOKEN | wait for the row's token |
| INIT_TEST | raise `core_isolate` and wait for `isolate_ack` while the system moves the core's task away |
| IN_PROG | fetch and apply the test set |
| COMPLETE | decide pass or fail |
| FT_RESP | on failure: set the sticky `core_disabled` |
| WAIT_SEND | hand the token on |

A tile that holds the token but has no test pending goes straight to WAIT_SEND. A disabled core is not tested again, but its tile still passes the token.

Each torus row is one token ring, with tile x passing to tile x+1. Each row's token starts on the row's colour-0 tile. All tokens move together on a common `step`, which is high when every token holder is ready to pass. Colour rises by one along a row, so all tokens always sit on tiles of the same colour.

This is how the design schedules tests by code division:

- Cores under test at the same time are at least 2*RADIUS+1 hops apart.
- So their Lee spheres share no source tile.
- Up to N cores are tested at once.

## Fetching test vectors (tv_fetch, parity_recon)

The test set is fetched in groups. A group is 8 stripes, meaning one packet from each segment. The own segment is read from the local TVM, and the other segments are requested from the sources that `dtvs_map` found.

**Without storage redundancy:**

- Only the data segments are requested.
- Every request is forced.

**With storage redundancy (`redund_en`):**

- All five segments are requested, unforced.
- A group is complete when four data words are in, or three data words plus the parity word.
- A missing word is rebuilt by `parity_recon` as the XOR of the other four.
- If two or more sources refuse, forced requests go again to all refusers except one: the one with the highest segment index.

Replies that arrive after their group has moved on are counted as stale and dropped. The stripes of a group are handed to the scan unit word by word. Fetching is not overlapped with application.

## Serving test vectors (tv_server)

The server holds a two-entry request queue. For each request it reads 8 words from the TVM and sends a data packet, unless the tile's safety-critical flag is set:

| Request | Blocking on | Action |
|---|---|---|
| not forced | either | refuse with NACK |
| forced | yes | hold the request until the flag clears (counted as blocked cycles) |
| forced | no | serve at once (counted as interference cycles) |

## Scan application (scan_apply)

Each test word takes 34 cycles:

- 1 cycle to accept the word;
- 32 shift cycles, which load the stimulus while unloading the previous pattern's response;
- 1 capture cycle.

After the last pattern, 32 more shifts unload the last response. A test of P patterns therefore takes `P*34 + 32` cycles after the first word. With the defaults, P is 32,768.

`fail` is sticky from the first mismatch, and `mismatches` counts the failing patterns.

## Anomaly-based test triggering (attu, attu_field_counter, attu_range_cluster)

The ATTU watches each OCP message the core sends, apart from accesses to the configuration register. It looks at four fields:

| Field | How it is tracked |
|---|---|
| source | one 4-bit counter per value |
| destination | one 4-bit counter per value |
| command | one 4-bit counter per value |
| address | ROWS learned ranges |

**Training (`attu_train`):**

- The counters count each value seen.
- An address outside every range is inserted at its sorted place. When all rows are in use, the closest adjacent pair of ranges is merged.

**Monitoring:**

- A value whose trained count is below the threshold is an anomaly.
- So is an address outside every range.
- A message with any anomalous field counts as one anomaly.
- After N_ANOM anomalies (4 by default), the ATTU raises a test request, which stays up until the controller takes it.
- The request goes to the tile's own test controller.
- The data field of messages is not watched. Only the address field is clustered.

## Configuration register (test_cfg_reg)

The register sits at one OCP address, 0xFFFF_0000.

| Bit | Field | Meaning |
|---|---|---|
| 0 | `safety_critical` | the tile is running safety-critical code |
| 1 | `block_en` | delivery blocking |
| 2 | `attu_train` | ATTU training |
| 3 | `test_req` | write one to request a test; reads back as 0 |
| 4 | `attu_en` | ATTU may trigger tests |
| 5 | `redund_en` | storage redundancy |

After reset, `redund_en`, `block_en` and `attu_train` are set. Reads return the register one cycle later, with `rvalid`.

## Top level (colt_soc)

`colt_soc` holds N x N tiles, the row rings and the common `step`. For each tile it brings out:

- the flit ports, to be connected to the torus routers;
- the OCP observation ports and the message source and destination ids;
- the scan and isolation ports of the core;
- status: token, controller state, configuration and activity counters (`tile_stat_t`).

Parameters and defaults:

| Parameter | Default |
|---|---|
| N | 10 |
| SEGS | 5 |
| K | 4 |
| MULT | 3 |
| RADIUS | 1 |
| DEPTH | 8192 |
| ROWS | 10 |
| N_ANOM | 4 |

## What is not here

These parts are outside this design:

- **Routers and links of the torus.** A behavioural torus model (`tb/noc_model.sv`) takes their place in simulation.
- **Processing cores.** A behavioural core with one 32-flop chain (`tb/scan_core_model.sv`) takes their place.
- **System-level actions.** The power manager, task migration and cold-spare replacement are not included. The isolate/acknowledge and `core_disabled` signals are where such logic would connect.
- **The centralised test source of the earlier scheme.** It is only a baseline.

The test set in simulation is a stand-in, not ATPG output. It comes from `colt_pkg::seg_word`: stimulus `(j+1)*0x9E3779B1`, with the response of the behavioural core.

## Design choices

These are this design's own choices rather than given values:

- the header format;
- the three message types;
- the row rings and common `step`;
- the `force` bit and the rule for choosing which refusers to force;
- the load bus;
- the group size and the non-overlapped fetch;
- the 4-bit counters with threshold 1;
- N_ANOM = 4.

ROWS = 10 is inferred from the ATTU's gate counts. 11.25K gates at 5 rows and 12.25K at 20 rows put the unit's 11.6K at about 10 rows.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints a `TB_RESULT` line and has a watchdog.

**`tb_colt_soc`** runs a 5x5 torus with 16-word segments and exercises every mechanism:

- TVM load;
- ATTU training, range merging, anomalies and triggering;
- token passing;
- isolation;
- passing tests, and a failing test that disables its core;
- refusals;
- parity rebuilds;
- forced re-requests;
- blocked delivery, and interference when blocking is off;
- stale replies;
- three concurrent tests on one colour.

It also checks, on every cycle:

- one token per ring;
- all tokens on one colour;
- tested cores at least 3 hops apart.

**`tb_colt_soc_full`** runs the default 10x10 chip:

- It loads all 100 TVMs.
- It runs ten concurrent tests of 32,768 patterns each, one of them on a faulty core.
- It checks the pattern count and the cycle count of each test against `P*34 + 32` plus a fetch budget.

Each block also has a broken variant used to confirm that its testbench catches a fault.
