# Shift-or header classification for network intrusion detection

A signature-based intrusion detector has to decide two things for every
packet and every rule: does the packet's five-tuple (source address,
destination address, protocol, source port, destination port) fit the rule's
header, and does the rule's content string appear in the packet? Checking only
the payload gives many false alarms. Checking headers with TCAM-like structures
costs a lot of area.

This RTL does header classification with the **shift-or** string-matching
algorithm. A rule header is treated as a byte pattern at a fixed place in the
packet. Each distinct header gets one short shift register made of OR gates
and flip-flops. All registers share a single **symbol encoder**, so no
per-rule ROM or memory is needed. Port ranges, which do not fit a byte
pattern, go to a pair of 16-bit comparators per port. The circuit takes Q
bytes per clock: Q = 8 by default, which is 64 bits per clock. The signature
side is built from the same parts. A small encoder raises an alarm when a
rule's header hit and signature hit fall on the same packet.

## The shift-or recurrence in hardware

For a pattern `p1..pm`, keep a bit vector `R`. `R[i] = 0` means the last i
input symbols equal `p1..pi`. When a new symbol `c` arrives:

    R_new[i] = R_old[i-1] OR S_c[i],   R_old[0] = 0
    S_c[i]   = 0 if c == p_i, else 1

In hardware, `R[1..m-1]` sits in m-1 flip-flops and each `R_new[i]` comes from
one two-input OR gate (`shift_or_chain`). The output of the last OR gate is
the check point: it is 0 in the cycle in which the final pattern symbol is
present and all the earlier ones matched. Every signal is active-low: 0 means
"matches".

**Where S_c comes from.** A ROM indexed by the symbol would give `S_c`, but
a ROM cannot be shared between patterns. The design uses a one-cold
encoder instead: output k is 0 exactly when the input symbol is k. For the
stage whose pattern symbol is `p_i`, OR gate i takes output `p_i` of the
encoder, which is exactly `S_c[i]`. The pattern is therefore fixed by the
*wiring* alone. Any number of patterns can tap the same encoder, and encoder
outputs that no pattern uses are removed by synthesis.

Example: with the 4-letter alphabet {a,b,c,d} and the pattern `aadc`, the four
OR gates are wired to outputs a, a, d, c. Input `a` then delivers `0011` and
input `c` delivers `1110`. `tb_symbol_encoder_t1` checks this and two more
patterns on a shared 2-bit encoder.

## Several bytes per clock: type I and type II encoders

With Q bytes per symbol, pattern stage i covers Q pattern bytes. An encoder
over all byte Q-tuples would need 256^Q outputs. The two encoders built here
avoid that:

* **Type I** (`symbol_encoder_t1`): one one-cold group of 256 outputs per byte
  lane, Q*256 outputs in all. OR gate i has one input per compared byte, wired
  to output `p` of that lane's group, plus the previous flip-flop. With Q = 1
  this is the basic encoder.
* **Type II** (`symbol_encoder_t2`, the default): each byte is split into
  nibbles, and each nibble gets a one-cold group of 16. That makes 2*Q*16
  outputs. A compared byte `b` in lane j uses two OR inputs: output `b[7:4]` of
  the lane's high-nibble group and output `b[3:0]` of its low-nibble group.
  Their OR is 0 only when both nibbles agree.

A header has a fixed position, so one register per header is enough. The
register is simply aligned to symbol boundaries. Searching for a content
string that may start anywhere is different: `signature_matcher` keeps Q
registers per string, one for each lane the string can start in.

## One header module

`header_module` is generated from one `hdr_spec_t` entry of the rule table in
`hc_pkg`. It builds two components.

* **Shift-or component.** It compares the protocol, exact addresses and exact
  ports.
  * Bytes of fields given as "any" get no OR input.
  * The register spans only the symbols from the first compared byte to the
    last one. A rule that names only the protocol has a one-stage register
    and no flip-flops at all.
  * The header is at a fixed place, so the check point is sampled in exactly
    one cycle: when symbol `LAST_SYM` of the packet is accepted. The result is
    held in `so_q`.
* **HOME_NET multiplexers.** HOME_NET is the protected network, and it depends
  on where the detector is installed. For address bytes given as HOME_NET,
  the OR input comes through a multiplexer instead of a fixed wire.
  * The multiplexer selects are the bytes held in `home_net_buffer`: one 8-bit
    select per byte with type I, two 4-bit selects with type II.
  * Writing the buffer retargets every HOME_NET rule at once.
  * Write it only between packets.
* **Range component.** It is built only when a port is a range.
  * `port_range_matcher` compares each port with its upper and lower bound.
  * The two results of each port are ORed and stored in a buffer flip-flop.
  * The two buffers are ORed into `miss`.
  * Bounds are closed and 16 bits wide.

The module's `hit` is the AND of both components.

## Datapath and timing

```
in_data (Q bytes) --+--> header_classifier ------------------ hdr_valid/hdr_hit
                    |      packet_framer (symbol index)           |
                    |      symbol encoder (type I/II)              v
                    |      HOME_NET buffer, port capture      hdr_q (held)
                    |      N_HDR x header_module -> RULE_HDR fan-out  |
                    |                                             v
                    +--> signature_matcher -- sig_valid/sig_hit -> rule_encoder -> alarm*
```

**Packet format.**

* The stream is IPv4 without options, followed by a TCP/UDP port pair.
* Protocol is byte 9, source IP bytes 12-15, destination IP bytes 16-19,
  ports bytes 20-23, all big-endian.
* Byte 0 of the packet is lane 0 of the `in_sop` symbol.
* `in_empty` gives the number of unused top lanes in the `in_eop` symbol.
* Packets must be at least 24 bytes long.
* There is no back-pressure. Idle cycles (`in_valid` = 0) are allowed
  anywhere.

**Latencies:**

| result | when |
|---|---|
| `hdr_valid`, `hdr_hit` | pulse two clocks after the symbol holding byte 23 (port capture, then the range buffer) |
| `sig_valid`, `sig_hit` | one clock after the eop symbol; held until the next packet ends |
| `alarm_valid`, `alarm`, `alarm_any`, `alarm_rule` | four clocks after the eop symbol |

The rule encoder samples three clocks after eop. By then the header result
is ready even for a packet that is only 24 bytes long, and the next packet
cannot have overwritten any result yet. Throughput is one symbol per clock:
8*Q bits per clock. At the 500 MHz reported for the original FPGA
implementation, Q = 8 gives 32 Gbit/s. Clock rate is not verified here.

## The rule set

The rule table in `hc_pkg` is an **example**. It has 6 distinct headers,
8 rules and 8 content strings of up to 8 bytes, chosen so that every field
kind appears at least once:

| module | header | exercises |
|---|---|---|
| 0 | tcp any any -> HOME_NET 80 (rules 0, 1, 7) | HOME_NET multiplexers, shared module |
| 1 | udp any any -> HOME_NET 53 | HOME_NET |
| 2 | tcp 10.1.2.3 any -> any 6000:6063 | exact address + range |
| 3 | icmp any any -> any any | shortest register (protocol only) |
| 4 | tcp HOME_NET 1024:65535 -> 192.168.7.20 22 | HOME_NET, range, exact |
| 5 | udp 172.16.0.9 any -> 172.16.0.10 any | exact addresses |

To target a real rule set, regenerate `HDR_TABLE`, `RULE_HDR`, `SIG_TABLE`
and the counts `N_HDR`/`M_RULES`. Everything else is derived from them at
elaboration time.

## Files

| file | content |
|---|---|
| `rtl/hc_pkg.sv` | field offsets, spec types, example rule set, helper functions |
| `rtl/nids_top.sv` | top: header circuit, signature circuit, alarm encoder |
| `rtl/header_classifier.sv` | shared encoder, HOME_NET buffer, port capture, header modules |
| `rtl/header_module.sv` | one header: shift-or register, HOME_NET muxes, optional range matcher |
| `rtl/shift_or_chain.sv` | OR/flip-flop shift register |
| `rtl/symbol_encoder_t1.sv`, `rtl/symbol_encoder_t2.sv` | basic/type I and type II encoders |
| `rtl/port_range_matcher.sv` | port range comparators |
| `rtl/home_net_buffer.sv` | HOME_NET register |
| `rtl/packet_framer.sv` | symbol position within the header |
| `rtl/signature_matcher.sv` | content-string search, Q registers per string |
| `rtl/rule_encoder.sv` | header AND signature, priority index |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_configs` (all Q/encoder settings) and its helper `tb_cfg_runner` |

Parameters: `Q` (1, 2, 4 or 8) and `ENC_TYPE` (1 = type I/basic, 2 = type II)
on `nids_top`, `header_classifier`, `signature_matcher` and `header_module`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops on a
watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/hc_pkg.sv tb/tb_nids_top.sv --top-module tb_nids_top -o sim
./obj_dir/sim
```

Replace `tb_nids_top` with any other testbench name.

`tb_nids_top` runs the default configuration (Q = 8, type II) end to end:
* 400 random packets built around the rule headers, some of them disturbed;
* random payloads with planted strings, random idle cycles and partial last
  symbols;
* HOME_NET rewrites.

It compares every header hit, signature hit and alarm with a reference model
written directly from the rule table, and checks all three latencies. It also
requires each mechanism to occur at least once: exact, HOME_NET, range hit and
miss, the shortest register, a HOME_NET rewrite changing a result, stalls,
partial symbols, alarms, and header-only and signature-only hits.

`tb_workload_configs` runs the same kind of end-to-end check on seven
`nids_top` instances side by side: the basic encoder at Q = 1, type I at
Q = 2, 4 and 8, and type II at Q = 2, 4 and 8. Each instance is driven and
checked by its own `tb_cfg_runner`.

Module testbenches also cover non-default configurations:
* `tb_header_classifier`: Q = 2 with type I;
* `tb_signature_matcher`: Q = 4 with type I;
* `tb_header_module`: Q = 1 basic and Q = 8 type II.

## Limits and departures

* **Header parsing.** IP options (IHL > 5), IPv6 and non-TCP/UDP port fields
  are not parsed. The fixed offsets assume a 20-byte IPv4 header.
* **HOME_NET.** It is a single exact 32-bit address. Netmasks are not
  supported. One buffer is shared by all HOME_NET rules, where a copy per
  multiplexer would behave the same.
* **Signature matching.** It searches the whole packet, header bytes
  included. Matches cannot span packets. The original evaluation used a
  content set of about 8000 characters; the example set here has 45.
* **Ranges.** A range port is checked only by the comparators. An exact port
  of the same rule is still matched by the shift-or register.
* **Not included.** The ROM-based shift-or circuit and the encoder over the
  full Q-tuple alphabet (|Sigma|^Q outputs) are predecessors that the type I
  and type II encoders replace.
* **Not modelled.** FPGA area and clock-rate figures are outside what this RTL
  checks.
