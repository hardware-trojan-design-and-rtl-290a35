# Illegal-state hardware Trojans in NULL Convention Logic

This repository holds SystemVerilog for an asynchronous RSA decryption node in
NULL Convention Logic (NCL). The node carries a hardware Trojan that leaks the
private key when it sees a dual-rail value that can never occur in a working
circuit. Beside the node are the NCL cells used to show how such an illegal
value moves through logic, plus three variants of the Trojan.

The idea to keep in mind throughout: in dual-rail NCL, a bit is carried on two
wires. `r0` alone means 0, `r1` alone means 1, and neither means NULL ("no value
yet"). Both high is *ILLEGAL*. Verification flows for NCL rarely try that state,
because a correct circuit never produces it. So a gate that can fire only when
both rails of a bit are high is invisible to normal tests. Such a gate is an
ideal Trojan trigger.

## Dual-rail signals and threshold gates

`ncl_pkg` defines the dual-rail type `dr_t` (`{r1, r0}`), the four constants
`DR_NULL`, `DR_DATA0`, `DR_DATA1` and `DR_ILLEGAL`, and small helpers. Words
are packed arrays `dr_t [W-1:0]`, bit 0 first.

All NCL logic is built from threshold gates with hysteresis (`ncl_th`):

* `THmn` has `n` inputs and threshold `m`. Each input can have a weight
  (`WT[i]`, default 1).
* The output rises when the weighted count of high inputs reaches `m`.
* Once high, it falls only when **every** input is low. In between it holds.

The hold makes every gate a small state element. The RTL writes it as a
level-sensitive latch: the latch is enabled when the gate is set or cleared
and closed otherwise. `ncl_thand0` (AB+BC+AD) and `ncl_th24comp`
(AC+BC+AD+BD) are the two non-threshold NCL gate functions the cells need.
They are written the same way.

Every block is zero-delay. A change at an input settles through the gates in
the same simulation time step.

## The RSA node (`rsa_ncl`)

```
                 key_load, key_n/e/d
                        |
   +--------------------+------------------------+
   | n reg (2 ports)  e reg (1 port)  d reg (2)   |
   +---|------------|------------|--------|------+
       |port0       |port0       |port1   |port0
       |            v            v        |
       |      +--trojan_th22---------+    |
       |      | b=e  k=d  s=c[X_BIT] |    |
       |      +----------|-----------+    |
       v                 v                |
  +----------- ncl_mux_ic -----------+    |
  | a = n     b = Trojan out   s = sel|   |
  +----------------|------------------+   |
 sel_i -> [sel reg] (s)                   |
                   v                      |
              [PK reg] --> pk_o  (ki_pk)  |
                   |ko -> comp -> pk_done |
                                          v
 c_i --> [c reg] --c_q--> ncl_modexp (c, d port0, n port1) --> m_o
          |ko -> comp -> ko_c                      (reverse padding, outside)
                                 mp_i --> [M reg] --> M_o  (ki_m)
                                            |ko -> comp -> m_done
```

The node is the receiver in an RSA exchange. It has two NCL channels, and each
one runs its own four-phase handshake.

**Public Key channel.** The sender puts a 1-bit *n/e Select* on `sel_i`: DATA0
asks for n, DATA1 asks for e. The select passes through a 1-bit register.
The input-complete multiplexer `ncl_mux_ic` then chooses between the n and e
read ports. The chosen word goes into the Public Key output register `pk_o`.
`ko_pk` tells the sender when to move from DATA to NULL and back, and `ki_pk`
is the receiver's request.

**Decryption channel.** The ciphertext `c_i` passes through an input register.
`ncl_modexp` then computes `c^d mod n` with the private exponent d. The result
leaves on `m_o` for reverse padding, which is not part of this RTL. The
unpadded message comes back on `mp_i` into the M output register `M_o`.
`ko_c` acknowledges the ciphertext, and `ki_m` is the receiver's request.

**Key registers (`ncl_keyreg`).** n, e and d are not written every cycle. They
hold a Boolean value, loaded while `key_load` is high. Each reader gets its own
read port. A port outputs the stored value as dual-rail DATA while that
reader's request is 1, and NULL while it is 0. Keys shorter than the word (e,
and d if `D_W < N`) read as DATA0 in their upper bits. The read gates are
plain ANDs of the stored rail with the request. A hysteresis gate would not
work here: a stored rail that stays high forever would hold it set.

**Handshake.** `ki = 1` requests DATA and `ki = 0` requests NULL. A register's
`ko` is 1 while it holds NULL. `ncl_reg` makes every rail a resettable TH22 of
the incoming rail and `ki`, and takes each bit's `ko` as the NOR of its two
output rails. `ncl_comp` joins the per-bit `ko` signals into one. It rises
only when all of them are 1 and falls only when all are 0.

* The Public Key register's completion (`pk_done`) drives the select register
  and the n, e and d read ports of the Public Key side.
* The M register's completion (`m_done`) drives the c register and the n and d
  read ports that feed the exponentiation.

A sender may change its input only after the matching `ko` has changed. A
receiver lowers `ki` after it has taken DATA, and raises it again after it has
seen NULL. `tb_rsa_ncl.sv` contains tasks (`pk_request`, `dec_start`,
`dec_finish`) that follow exactly this protocol.

### The Trojan and how to fire it

`trojan_th22` (W = N) sits between the e register and the multiplexer. A TH22
gate watches both rails of bit `X_BIT` of the registered ciphertext. If both
rails are high, the gate switches a row of Boolean multiplexers from e to d.
To fire it:

1. Send a ciphertext with bit `X_BIT` ILLEGAL, and keep it applied. The input
   register then keeps holding it, because its `ki` stays low until the
   receiver collects M.
2. Request the public exponent (select DATA1). The Public Key channel now
   delivers d.

When `c` returns to NULL, the TH22 gate releases, and the next request for e
gets e again.

With legal inputs, the node behaves exactly like the same design without the
Trojan:

* The TH22 gate never switches, so an observability check has nothing to
  complain about.
* The Public Key output is still input-complete with respect to n, e and the
  select.

### Exponentiation block (`ncl_modexp`)

This block sets word-level behaviour, not gate structure:

* When every bit of c, d and n has at least one rail high, `m` becomes the
  DATA encoding of `c^d mod n`.
* It returns to NULL only when every input rail is low, and holds in between.

The value is computed by right-to-left square-and-multiply. An ILLEGAL input
bit is read as 1, so a triggering ciphertext still completes the decryption
handshake. That matters because the attacker needs the handshake to finish.
A gate-level NCL exponentiator would go in this slot with the same ports.

## Example cells

| Module | Gates | Notes |
|---|---|---|
| `ncl_and` | THand0 on (X⁰,Y⁰,X¹,Y¹) for Z⁰, TH22 for Z¹ | input-complete |
| `ncl_xor` | TH22(X⁰,Y⁰), TH22(X⁰,Y¹); TH23w2 output gates | observable: each internal gate alone fires its output |
| `ncl_ha` | two TH24comp for S, TH12/TH22 for Cout | an ILLEGAL operand makes S ILLEGAL; X ILLEGAL with Y = DATA0 gives Cout = DATA0 |
| `ncl_fa` | TH23 for Cout, TH34w2 (opposite carry weight 2) for S | any ILLEGAL operand makes S ILLEGAL |

Adders like these sit inside multipliers, and so inside most crypto
datapaths. So an ILLEGAL bit injected at an input can reach a trigger placed
deep inside the logic.

## Three Trojan variants

All three send the normal word `b` to `bp` unless the trigger `s` is ILLEGAL.
In that case they send the secret `k`.

| Module | Select logic | What catches it |
|---|---|---|
| `trojan_th22` | TH22 (or AND) on S⁰, S¹; mux 1 = k | nothing in the standard checks; the gate never switches under legal inputs |
| `trojan_nand` | NAND on S⁰, S¹; mux inputs swapped | observability: the NAND stays high through the NULL phase |
| `trojan_mux6` | two mux pairs selected by S⁰ and S¹, output pair by S⁰ | observability: the S¹ pair switches without being needed |

For these cells, the input-completeness check sees only two wires carrying the
rails of `b`, so it does not notice any of them.

## Detecting the TH22 Trojan

`tb_po_detect.sv` implements the detection rule by exhaustive simulation. For
each gate it asks two questions:

* **PO1:** can any mix of NULL/DATA inputs assert this gate?
* **PO2:** can any mix of NULL/DATA/ILLEGAL inputs assert it?

A gate with PO1 false and PO2 true fires only on illegal inputs, so it is
flagged. The bench applies all 64 states of three dual-rail inputs to the
AND, XOR, half adder, full adder and TH22 Trojan. It expects exactly one
flag: the TH22 trigger. A variant for gates that idle at 1 asks about `g = 0`
instead. Applied to the NAND variant's select, it flags that select as well.

`tb_rsa_po.sv` applies the same rule to the whole RSA node at 2-bit words.
It binds a monitor (`po_mon`) into every threshold gate of the node.

* **Legal phase.** It runs complete handshakes for every combination of the
  keys, the ciphertext and the select.
* **Illegal phase.** It repeats the runs with ILLEGAL ciphertext bits and an
  ILLEGAL select.

All 34 threshold gates of the node assert at some point. Exactly one is
flagged: the Trojan's TH22 trigger. The keys count as free inputs here, as
they would in a formal check. Otherwise, gates downstream of the leak (for
example, a Public Key rail that a fixed e never drives) would also look like
they fire only under illegal inputs.

On large circuits, a solver-based check replaces this enumeration.
`tb_rsa_ncl.sv` also checks both halves of the property at the default size:
the trigger stays low in every legal transaction, and it rises for an
ILLEGAL bit.

## Parameters and sizes

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N` | 8 | `rsa_ncl`, top | word width (modulus width) |
| `E_W`, `D_W` | 4, 8 | `rsa_ncl`, top | stored widths of e and d, padded with DATA0 to N |
| `X_BIT` | 0 | `rsa_ncl`, top | ciphertext bit watched by the Trojan |
| `W` | 1 / 8 | cells, registers | bits per word |

No width comes from a source design. 8 bits is enough for a toy key (n = 143,
e = 7, d = 103), which is what the testbenches use. Real RSA needs `N` in the
thousands. The exponentiation is the only block whose size grows faster than
linearly with `N`.

## What is this design's own

The block structure, the connections, the Trojan and its trigger, and the
cell netlists follow the published circuit. These choices are this design's
own:

* all widths, `X_BIT`, key loading, and reset of every register to NULL;
* which completion drives which key read port, and bringing the M register's
  request out as `ki_m`;
* the read-port gates (Boolean AND) and the completion detector (one wide
  C-element in place of a TH44 tree);
* the gate structure of the input-complete multiplexer;
* the word-level model of the exponentiation, and reading an ILLEGAL bit as 1
  there;
* the rail-to-pin assignment of the half adder's TH24comp gates, the full
  adder's gate weights, and which products the XOR's internal gates decode.

All of these are chosen to give the behaviour that the original circuit
states.

**Not included: reverse padding.** The padding scheme is unspecified, so
`rsa_ncl` exposes `m_o` and takes `mp_i`. The testbenches close the loop with
`tb/rev_pad_model.sv`, which passes the word through unchanged.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ncl_pkg.sv tb/tb_ncl_trojan_top.sv --top-module tb_ncl_trojan_top
./obj_dir/Vtb_ncl_trojan_top
```

`tb_rsa_po` also needs its package listed first:
`rtl/ncl_pkg.sv tb/tb_po_pkg.sv tb/tb_rsa_po.sv`.

| Testbench | Covers |
|---|---|
| `tb_ncl_trojan_top` | whole top at default sizes: n and e reads, 40 decryptions, d leak, all cells |
| `tb_rsa_ncl` | RSA node alone |
| `tb_po_detect` | PO1/PO2 Trojan detection on the cells |
| `tb_rsa_po` | PO1/PO2 Trojan detection on every threshold gate of the RSA node (2-bit words) |
| `tb_ncl_th`, `tb_ncl_reg`, `tb_ncl_comp`, `tb_ncl_keyreg`, `tb_ncl_mux_ic`, `tb_ncl_modexp` | building blocks, including hysteresis, input-completeness and handshake order |
| `tb_ncl_and`, `tb_ncl_xor`, `tb_ncl_ha`, `tb_ncl_fa`, `tb_trojan_*` | cells, exhaustive over legal and illegal inputs |

The simulator is two-state. All gates start from random values and settle
once their inputs are all low, so each testbench starts with every input
NULL (and `rst` high for the RSA node).

## Tool messages to expect

* **Latches.** Every threshold gate, the key store and the exponentiation
  output are latches by design; that is how NCL hysteresis is expressed.
  Verilator may report that it sees no latch in a gate's `always_latch`.
* **Combinational loops.** The handshake paths (`pk_done`, `m_done`) loop from
  a register's output back to its own request through the completion logic.
  That is inherent to asynchronous handshaking, and Verilator reports it as
  `UNOPTFLAT`.

Synthesis for an FPGA or a standard-cell flow treats these gates as latches.
A real NCL implementation maps `ncl_th` to library threshold gates.
