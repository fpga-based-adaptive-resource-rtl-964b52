# Adaptive dual-layer error control for a network-on-chip router

Links in a network on chip see bit errors, and the rate is not constant. If a router always runs a strong hop-to-hop code, it pays for it in power and latency on every flit. If it only protects data end to end, a noisy stretch of network means many retransmissions. This design switches between the two:

* **Single layer (SL).** Only an end-to-end product code protects a message. The network interfaces (NIs) at the two ends encode and decode it.
* **Dual layer (DL).** Every router additionally puts a SEC-DED code on each link. It corrects single-bit errors hop by hop.

Each NI counts the errors it sees in a fixed time window:

* Too many errors in a window: the NI asks its router for dual layer. The request spreads to the neighbours.
* A quiet window: the NI asks to go back.

Packets also carry a record of where errors happened. This is an *Error History Flit* (EHF) at the end of each packet. Every router writes one bit into it: 1 if the packet had a hop error at that router. Data bodies are also enciphered with an 8-bit block cipher (Simplified DES) between the source router and the destination router.

The RTL is a *node*: a five-port router plus its NI. Nodes tile into a 2-D mesh (`rtl/noc_node.sv` is the top).

## Data formats

A flit is 34 bits: a 2-bit type (`HEAD`, `BODY`, `CTRL`, `EHF`) and 32 data bits. On a link it becomes a 41-bit word:

```
[40] overall parity   [39:34] Hamming check bits   [33:32] type   [31:0] data
```

The check and parity bits are only meaningful while the sending router's S1 is 1. Otherwise they are zero.

A packet is one head flit, N_FLITS body flits and the EHF, which always closes the packet.

| Flit | Bit fields |
|---|---|
| Head | `[3:0]` destination y, `[7:4]` destination x, `[11:8]` source y, `[15:12]` source x, `[16]` check-packet flag |
| EHF | `[31:24]` hop count, `[23:0]` one history bit per hop, so a 24-hop route is recorded |

## The router

Each input port (North, South, West, East, local) is a chain of four stages:

1. **Routing decoder.** It decodes the hop-to-hop code, extended Hamming over 34 bits. It corrects single errors and flags double errors. It is enabled by the upstream router's S1.
2. **EHF update.** A sticky flag remembers whether any flit of the current packet had a hop error. When the EHF passes, the flag is written into the history bit at the hop count, and the count is incremented.
3. **Input FIFO.** Its *full* flag is the NACK sent back upstream.
4. **Information extractor.** It turns the destination of the head flit into an output port by XY routing: X first, then Y.

The arbiter grants each output round-robin, and a grant lasts a whole packet (wormhole). An output whose downstream FIFO is full (NACK_in = 1) is not served that cycle.

The grants drive the **hybrid crossbar**. This is a 5 × 5 grid of 2×2 elements:

* Each element's input controller attaches a routing bit IH to the flit.
* The control unit connects the element straight through (IH = 0) or crossed over (IH = 1).
* The output controller strips IH again.

The crossbar switching selector sets IH = 1 exactly at the grid points of granted (input, output) pairs.

Each output has two stages:

* **Encryption module.** It enciphers the four bytes of a body flit when the flit came from the local port and leaves on a link. It deciphers them when the flit arrives from a link and leaves on the local port. Head and EHF flits stay in clear, so routing and history recording work without the key.
* **Routing encoder.** It adds the check bits while S1 = 1. The local port never uses the hop code.

A flit written into an input FIFO at one edge can leave on the output link in the next cycle. The link path is combinational from the FIFO head through the crossbar, the cipher and the encoder. The network therefore takes one cycle per hop.

### Mode switch

`ecc_mode_fsm` has four states:

| From | To | Condition |
|---|---|---|
| SL | Pre-DL | The local NI or any neighbour requests dual layer |
| Pre-DL | DL | After `T_PROP` cycles |
| DL | Pre-SL | The local NI requests single layer and not dual layer; neighbours cannot cause this |
| Pre-SL | DL | Any new dual-layer request |
| Pre-SL | SL | After `T_PROP` cycles without a dual-layer request |

* S1 = 1 in DL and Pre-SL, and 0 in SL and Pre-DL. The extra Pre-SL period lets every neighbour see the change before hop checking stops.
* The dual-layer request to neighbours is its own wire (`dl_req_out` → `nbr_dl_req`). It is raised by a local request and during Pre-DL.
* Each router decodes a link with the S1 that comes over the same link, so a word is always decoded the way it was encoded.

## The network interface

### Sending

A message is N_FLITS × 26 bits.

1. `pc_encoder` builds a product code. Every 26-bit word gets a (32,26) extended Hamming *column* code, giving one 32-bit coded flit. Across the N_FLITS flits, each of the 32 bit rows gets a Hamming(7,4) *row* code. With the default N_FLITS = 4 that gives three row-check columns, which are themselves column-coded.
2. Only the coded flits are sent at first, as the data packet. The check columns are kept.
3. The check columns are sent later as a separate *check packet*, only if the receiver asks for them.

### Why interleaving

The cipher works on bytes. One flipped ciphertext bit turns the deciphered byte into eight random bits. For a SEC-DED column code that is an uncorrectable, often miscorrected error.

The NI therefore interleaves the coded array across the sent flits:

```
sent word t, bit k  =  coded column (k + t) mod N,  row (k + 32/N * t) mod 32
```

The eight bits of one sent byte fall into different columns and different rows. A garbled byte becomes a few single-bit errors that the column decoder corrects. If it does not, they are errors in rows that the row code corrects once the check packet arrives. The check packet itself is not interleaved.

### Receiving

1. The received data is de-interleaved and column-decoded.
2. If a column is uncorrectable, the message is held and `retx_req_out` asks the source for the check packet.
3. When the check packet arrives, the NI decodes rows over all 32 rows, then columns again, and delivers the message.

`rx_corrected` and `rx_uncorrectable` report the outcome.

### Error monitor

The EHF is decoded as the OR of its history bits, counted only while S1 = 1. A packet with an end-to-end error or a non-zero EHF is one error event.

`ni_error_monitor` counts error events in windows of `TC` cycles:

* Above `ERR_TH` events in a window, it requests dual layer.
* A window with at most `ERR_TH` events gives a one-cycle single-layer request.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| flit data | 32 bits | Fixed in `noc_pkg` |
| EHF history | 24 hops | Fixed in `noc_pkg` |
| key | 10 bits | Subkeys K1, K2 of 8 bits each |
| `FIFO_DEPTH` | 4 | Flits per input FIFO |
| `T_PROP` | 16 | Cycles of Pre-DL and Pre-SL |
| `N_FLITS` | 4 | Body flits per message. 32/N_FLITS must be a multiple of N_FLITS, which an elaboration check enforces. |
| `TC` | 256 | Error-count window in cycles |
| `ERR_TH` | 4 | Error events per window before dual layer is requested |
| `MY_X`, `MY_Y` | 0 | Position of the node in the mesh |

Only the 32-bit flit, the 24-hop EHF, the 10-bit key, the 8-bit cipher block and the five ports come from the original method. The other defaults are reasonable choices of this implementation.

## Cipher

`sdes_keygen` and `sdes_cipher` implement Simplified DES with its standard tables:

* Key schedule: P10, a split into 5-bit halves, rotate by 1 → P8 gives K1; rotate by 2 more → P8 gives K2.
* Data: IP, then fK with K1, the half swap, fK with K2, and IP⁻¹.
* Decryption uses the subkeys in the opposite order.

The cipher is a light obfuscation layer, not real security: 10-bit key, 8-bit block, electronic-codebook use.

## Using it

The end-to-end testbenches take less than a minute each with plain Verilator. For example, the 2 × 2 mesh:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_noc_node.sv --top-module tb_noc_node
./obj_dir/Vtb_noc_node
```

The same pattern runs any `tb/tb_<module>.sv`. Verilator finds the modules in `rtl/` through `-I`. Each testbench compares against independent reference models in `tb/tb_ref_pkg.sv` and prints `TB_RESULT checks=… failures=…`.

* **`tb_noc_node`.** A 2 × 2 mesh at default parameters. Each node sends messages to the others while errors are injected on the links: none, then single errors (the mesh moves to DL), then single and double errors, then none (back to SL). Through traffic crosses two nodes into a sink that NACKs at random. Hop corrections, uncorrectable hop errors, EHF errors, retransmissions, NACK stalls, enciphered link data and all four modes are each required to occur.
* **`tb_noc_node_full`.** One node with no parameter overrides. A mirror on its East link sends every packet back to it, so messages pass the full encipher / encode / decode / decipher path.

To build a larger mesh, instantiate `noc_node` per tile with its `MY_X`/`MY_Y`. Connect East of (x, y) to West of (x+1, y) and North of (x, y) to South of (x, y+1), including `s1_out` → `s1_in` and `dl_req_out` → `nbr_dl_req`. Route each node's `retx_req_out` to `retx_req_in` of the node given by `rx_src_x`/`rx_src_y`. The largest network simulated here is the 2 × 2 mesh.

## Departures from the original method and limitations

* **Retransmission request.** It travels on a side channel outside the network (`retx_req_out` → `retx_req_in`). The original method does not say how it travels.
* **One message in flight.** Each NI keeps one message outstanding in each direction. A source must wait for delivery before sending the next one, because a check packet belongs to the last message sent.
* **Unspecified parts.** The hop code, the product-code component codes, the interleaving map, XY routing, round-robin wormhole arbitration and the cipher tables are this implementation's choices, as are the field layouts of the head flit and EHF.
  * A NACK is read as *the downstream FIFO is full* (backpressure).
  * The 5 × 5 arrangement of the 2×2 crossbar elements is inferred.
* **Where the cipher sits.** The original method applies the cipher "in each port" of the router. Here it works only at the two ends of a route: enciphering when data leaves the source router, deciphering when it reaches the destination's local port. A cipher on every link would need a matching decipher at every input and would hide nothing more, since all routers share the key.
* **Ripple counter width.** The original method sizes the error counter at ceil(log2(threshold)) flip-flops. This counter has one more bit and saturates, so "more than the threshold" can be seen. Besides non-zero EHFs, it also counts packets the end-to-end decoder had to correct.
* **Routing decoder behaviour.** A flit with an uncorrectable hop error is stored and forwarded like any other, and only flagged. The end-to-end code deals with it.
* **Evaluation setup not modelled.** The original evaluation uses a faulty port that disturbs the other ports of its router. That setup is not modelled. The testbenches flip bits on links instead.
* **Unprotected fields.** Head flits and the EHF travel without end-to-end protection. In single layer, an error in a head flit can misroute a packet. The testbenches inject errors only into body flits.
* **History resolution.** A hop records 1 if any flit of the packet had an error there. Hops beyond 24 are not recorded.
* **FPGA size.** The original method reports 41 slices and 72 LUTs for its router. This RTL, with five 4-flit input FIFOs, two NI buffers and full product-code hardware, is much larger. It is written for clarity and completeness, not for that size.
* **Clock and reset.** Everything is synchronous to one clock with an asynchronous active-low reset. Mode-switch state is not protected against errors on the S1 and DL-request wires.
