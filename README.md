# CAMAC module logic in two PALs

A CAMAC module has to decode a large number of dataway lines: five function
lines (F1–F16), four sub-address lines (A1–A8), the station line N, BUSY, the
two strobes S1 and S2, and the initialise line Z. Done with discrete gates,
this command decoding, plus the module's LAM (Look-At-Me) mask and request
logic, takes a board full of chips. This design puts each of the two jobs into
one programmable array logic (PAL) device:

* **`camac_decoder`** – a PAL14L8 that decodes the eight commands one module
  answers and gives its write strobes, read enable, X response and initialise
  signal.
* **`camac_mask_register`** – a PAL16R4 that holds a three-bit LAM mask, which
  can be bit-set, bit-cleared, initialised and read back. It gates three
  demands into three requests and a LAM output.

Both are written here as what they really are: a fuse-programmed AND array
feeding fixed OR gates (`pal_and_or`). Each product term appears in the RTL
in the same form as a PAL equation. The two devices are independent examples
from two different modules, so `camac_pal_top` places them side by side.

## Reading the pin levels

Everything in this RTL is expressed at **pin level**, exactly as the devices
see it. CAMAC dataway lines are active low. A decoder input pin that is high
therefore means the dataway bit is 0. Function code F16 = 1 is the F16 pin
**low**, and all of the decoder's outputs are active low. Keep this in mind
when reading the fuse maps: a product term that asks for F16 = 1 and A = 0
connects the *complement* column of F16 and the *true* columns of A8..A1.

The mask register's pins follow its equations. A set mask bit, an active
request and an active LAM are all **high** at the pin. SET and INIT are
active low, and the write lines are active high. The demand polarity is a
parameter (see below).

## The PAL model: `pal_and_or`

Every input column reaches every AND gate both as itself and as its inverse.
Each of these crossings is a fuse. In the parameters `FUSE_TRUE` and
`FUSE_COMP`, a 1 means the fuse is intact (the column is connected) and a 0
means it is blown.

* A product term is the AND of every column whose fuse is intact.
* A term with **every fuse blown** is always true. A three-state enable is
  tied on this way (`IF (VCC)` in PAL notation).
* A term with **both fuses of any column intact** is always false. Product
  terms that an equation does not use are left like this.
* Terms are grouped `TERMS` to an OR gate, one OR per output. `ACTIVE_LOW`
  inverts the OR outputs, as in the "L" devices.

The fuse vectors are flat. Term `t` of output `o` occupies bits
`(o*TERMS + t)*N_IN +: N_IN`. The defaults describe the smallest possible
part: two inputs, two AND gates and one OR gate, with all fuses intact, so
the output is always 0. The testbench programs this part as an exclusive OR
(`I1*/I2 + /I1*I2`) and also checks a larger random map against a
fuse-by-fuse reference.

The module is purely combinational.

## The CAMAC decoder (PAL14L8)

| Output (pin) | Command | Active (low) when |
|---|---|---|
| `wt10` (16) | WT1 A0 = F16 A0 | N, BUSY and the command present, **during S1** |
| `wt11` (17) | WT1 A1 = F16 A1 | same, during S1 |
| `wt20` (18) | WT2 A0 = F17 A0 | same, during S1 |
| `wt21` (19) | WT2 A1 = F17 A1 | same, during S1 |
| `wt22` (20) | WT2 A2 = F17 A2 | same, during S1 |
| `rd10` (21) | RD1 A0 = F0 A0 | N, BUSY and the command present: the **whole cycle** |
| `x` (22) | any of the seven above plus XEQ A15 | whole cycle |
| `init` (15) | Z.S2, or XEQ A15 = F25 A15 during S2 | |

Input pins: N 1, B 2, S1 3, S2 4, Z 5, A1–A8 6–9, F1 10, F2 11, F4 13, F8 14,
F16 23. In the package, `dec_in_t` and `dec_out_t` hold these pins as
structs.

The write strobes are meant to clock the module's registers. Their rising
edge, at the end of S1, is the moment of capture. RD1 A0 stays low through
the cycle so that it can enable a read-out buffer. The initialise output
clears the module's registers. Z.S2 is decoded without N or BUSY.

**The X response is the subtle part.** Seven commands need an X response,
but a PAL14L8 output has only four product terms. WT1 A0, WT1 A1, WT2 A0 and
WT2 A1 differ only in F1 and A1. A single term that leaves out those two
columns (both fuses blown) therefore covers all four. WT2 A2, XEQ A15 and
RD1 A0 take one term each, which makes four terms in total. INIT needs two
terms (Z.S2, and XEQ A15 at S2), and each of the other outputs needs one. The
PAL14L8 gives X and INIT four terms each and the remaining six outputs two
terms each. In the RTL these are two `pal_and_or` instances, one with four
terms per output and one with two.

Two assertions are built in. At most one read or write output may be active
at a time, and any active read or write output must be accompanied by X.

## The LAM mask and request register (PAL16R4)

The mask register is clocked on the rising edge of `clkmask`. The module's
command decoder raises this clock at S1 of every bit-set, bit-clear and
initialise command. For each bit *i*, in PAL form:

```
/Mi := /INIT + Wi*SET + /Wi*/Mi          (registered, rising clkmask)
```

| INIT | Wi | SET | Mi after the clock |
|---|---|---|---|
| low | x | x | 0 (initialise clears every bit) |
| high | high | low (bit set) | 1 |
| high | high | high (bit clear) | 0 |
| high | low | x | unchanged: the bit is fed back on itself |

A PAL16R4 register drives its pin with the inverse of Q and feeds the pin
level back into the array. The RTL does the same: `m = ~q`. The mask pins are
three-state buffers, enabled while `/READM` (`readm_n`) is low, so the mask
reads directly onto the dataway read lines. Because this simulation model is
two-state, each three-state pin is given as a value plus an enable (`m_oe`,
`r_oe`, `lam_oe`).

The request and LAM outputs are combinational. Their enable terms are tied on:

```
/R1 = /M1 + DM1     /R2 = /M2 + /DM2     /R3 = /M3 + /DM3
/LAM = /R1 * /R2 * /R3
```

A request is high when its mask bit is set and its demand is active. LAM is
high when any request is high. LAM is built from the request pins fed back
into the array, as it is in the device. In the RTL, that second level is a
separate `pal_and_or` array over the three request pins. This keeps the
netlist free of combinational loops without changing the logic.

**Demand polarity.** With the equations above, DM1 is active low and DM2 and
DM3 are active high. That is the default, `DM_ACTIVE_HIGH = 3'b110` (bit *i*
stands for DMi). The original pin notes state the opposite polarity (DM1
active high, DM2 and DM3 active low), and they also call all outputs active
low. Those notes cannot be reconciled with the equations together with the
rule that INIT *clears* the mask. This RTL follows the equations. Set
`DM_ACTIVE_HIGH = 3'b001` to build the other polarity; the testbench checks
both.

The device's fourth register (pin 14) is unused and is not modelled. The
register has no reset: as in the real part, the mask is undefined until the
first initialise.

## Top level

`camac_pal_top` brings out every pin of both devices, prefixed `dec_` and
`mask_`. It has no parameters. The mask register's `clkmask`, `set`, `init`
and `w` are ports because the decoder that drives them belongs to a
different module and is not part of this design. Its function is known (a
clock at S1 of bit-set, bit-clear and initialise, with SET and INIT held low
for the whole bit-set or initialise cycle), but its command codes are not.
The output and control registers that the WT strobes load, and that RD1 A0
reads, are likewise outside the design.

## Where this departs from, or adds to, the original

* The decoder's X-response term for the four write commands uses A4 = 0
  (A4 pin high). All four commands have A4 = 0, and the term would not
  decode them otherwise.
* The demand polarity follows the equations, not the pin notes (see above),
  and is a parameter.
* The fuse positions themselves are this design's own. Each product term is
  the one the equations give, placed in the output's first terms, with unused
  terms left fully intact. The column order is the order of the `DI_*` and
  `MI_*` constants in `camac_pal_pkg`, not the device's column numbering.
* The mask register's single array is split into two arrays (see above).
* Three-state pins are modelled as a value plus an enable.
* Electrical matters (propagation delay, power dissipation, glitch freedom)
  and fuse programming are outside this RTL.

## Verification

| Testbench | What it does |
|---|---|
| `tb_pal_and_or` | exhaustive: blank part, exclusive OR, 6-input 3-output random map with always-true and always-false terms |
| `tb_camac_decoder` | all 16384 input pin combinations against a decoder written from the commands' meaning (function code, sub-address, N, B, S1, S2, Z); every output must fire |
| `tb_camac_mask_register` | directed set/clear/hold/initialise/read sequence, then 3000 random cycles against a bit-level model, for both demand polarities |
| `tb_camac_pal_top` | end to end with default parameters: dataway cycles with S1/S2 timing write five stand-in 24-bit registers through the strobes, read one back through RD1 A0, clear them by Z.S2 and XEQ A15; bit-set/bit-clear/initialise cycles on the mask, read-back through the three-state pins, LAM on and off. Each mechanism is counted and must occur. |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after
a fixed number of cycles if it hangs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/camac_pal_pkg.sv \
    tb/tb_camac_pal_top.sv --top-module tb_camac_pal_top
./obj_dir/Vtb_camac_pal_top
```

Replace `tb_camac_pal_top` with any other testbench name. The package must
come first on the command line; `-y` finds the other modules by file name.
Each simulation runs in well under a second once built.

## Files

* `rtl/camac_pal_pkg.sv` – pin constants (one-hot array columns), pin structs
* `rtl/pal_and_or.sv` – programmable AND array and fixed OR plane
* `rtl/camac_decoder.sv` – PAL14L8 CAMAC decoder
* `rtl/camac_mask_register.sv` – PAL16R4 LAM mask and request register
* `rtl/camac_pal_top.sv` – both devices side by side
* `tb/tb_*.sv` – one self-checking testbench per module
