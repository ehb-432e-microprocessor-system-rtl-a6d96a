# One master, two slaves: a three-PicoBlaze address/data broadcast

Three KCPSM3 (PicoBlaze) soft processors share one byte-wide link. The
master owns a data byte, `0Ch`, and delivers it to two slaves in turn. It
sends an address byte and then the data byte. Both bytes go to both slaves at
once. Each slave decides in software whether the address is its own: `01h`
for slave 1, `02h` for slave 2. The slave that recognises its address copies
the data to its output (`out1` or `out2`). It then acknowledges by writing to
a port whose *number* is the acknowledgement code: `80h` for slave 1, `40h`
for slave 2. A multiplexer returns that code to the master, which then turns
to the other slave. Seen from outside, `0Ch` appears on `out1` and `out2` one
at a time, for ever.

The hardware is small: three program ROMs and a few registers of glue. Most
of the behaviour lives in the three programs and in how their timing fits
together. This RTL holds everything except the processor cores themselves.
The cores are the FPGA vendor's KCPSM3 macro, and `top_module` brings out
their connections as ports. For simulation, `tb/kcpsm3.sv` is a behavioural
model of the core.

## Block structure

```
             master core (KCPSM3)                 slave cores (KCPSM3)
   address ──► master_rom ──► instruction     address ──► slaveN_rom ──► instruction
   out_port, write_strobe ──► data_router ──► in_port_slave1, in_port_slave2 (broadcast)
   slaveN out_port, write_strobe ──► data_router ──► out1 / out2
   slaveN port_id, write_strobe ──► ack_mux ──► in_port_master
   master port_id[0] ────────────► ack_mux (select)
```

| module        | what it is |
|---------------|------------|
| `kcpsm3_pkg`  | Bus widths, the `pb_core_out_t` struct (what a core drives), the KCPSM3 opcode and condition enums, and instruction-building functions |
| `master_rom`  | Master program, 23 words used of 1024 x 18 bits, synchronous read |
| `slave1_rom`, `slave2_rom` | Slave programs, 9 words each, synchronous read |
| `data_router` | Master output to both slave inputs; slave outputs to `out1`/`out2` |
| `ack_mux`     | Captures each slave's acknowledgement and multiplexes one back to the master |
| `top_module`  | Wires the above together; core signals are ports |

## The handshake, step by step

This is the part that needs care. Nothing in hardware decodes addresses,
arbitrates or handshakes. Every interaction is a registered write, and
instruction delays keep the programs in step.

**Master program** (`master_rom`). Register `sA` holds the address and `sB`
holds the value:

```
        LOAD   sB, 0C
slave1: LOAD   sA, 01
        OUTPUT sA, 00        ; address 01h -> both slaves
        LOAD   sB, 0C        ; two LOADs = delay
        LOAD   sB, 0C
        OUTPUT sB, 00        ; data 0Ch -> both slaves
        LOAD   sB, 0C        ; delay
        LOAD   sB, 0C
ack1:   INPUT  s0, 00        ; port 00h: bit 0 = 0 selects slave 1's code
        TEST   s0, 7F        ; zero only for 80h (or 00h)
        JUMP   Z, slave2
        JUMP   ack1
slave2: (the same with address 02h, ports 01h, INPUT s1,01 / TEST s1,BF)
        JUMP   Z, slave1
```

**Slave program** (slave 1 shown; slave 2 uses `s0`/`s1`, port `BF`,
mask `02`, acknowledgement port `40`):

```
         LOAD   sA, 05 (three times: start-up delay)
address: INPUT  s1, 7F       ; read the broadcast byte
         TEST   s1, 01       ; is it my address?
         JUMP   Z, address
         INPUT  s2, 7F       ; read again: by now it is the data
         OUTPUT s2, 80       ; data to out1; port_id 80h is the acknowledgement
         JUMP   address
```

Points that are easy to miss:

* **Addressing is by bit test, not by comparison.** Slave 1 accepts any byte
  with bit 0 set and slave 2 any byte with bit 1 set. The data byte `0Ch` has
  neither bit set, so no slave mistakes it for an address. A data value with
  bit 0 or bit 1 set would break the scheme.
* **The data read relies on timing.** After a slave sees its address, two
  instructions (four clocks) pass before it reads again. The master's two
  delay `LOAD`s make sure the data byte has replaced the address by then.
  All three cores leave reset together, so their relative phase is fixed;
  `tb_top_module` checks that at this phase each slave writes `0Ch`, never
  `01h` or `02h`. Other phases, such as cores released from reset at
  different times, have not been checked.
* **The acknowledgement is a port number.** `OUTPUT s2, 80` puts `80h` on the
  slave's `port_id` together with its write strobe, and `ack_mux` captures
  `port_id`, not the data.
* **Acknowledgements stay captured.** `mult_a`/`mult_b` only change when their
  slave writes again, so after a slave's first acknowledgement the master's
  later polls for that slave pass at once. From the second round on, the
  delay instructions alone keep the master and slaves in step. In simulation
  the master waits only for slave 2's first acknowledgement after each
  reset.
* **The multiplexer select is registered.** `in_port_master` is a register
  loaded every clock from `mult_a` or `mult_b`, chosen by bit 0 of the
  master's `port_id`. On a KCPSM3, `port_id` is valid for both clocks of an
  `INPUT` and the data is sampled at the end of the second, so the one-clock
  delay through this register is hidden.

## Glue registers and timing

All glue logic is on `clk`, with a synchronous, active-high `reset`.

* `data_router`: on a master write strobe, `out_port_master` goes into both
  `in_port_slave1` and `in_port_slave2`, whatever the port number. On a
  slave 1 write, `out1 <= out_port_slave1` and `out2 <= 0`. On a slave 2
  write, `out2 <= out_port_slave2` and `out1 <= 0`. If both slaves write in
  the same clock, slave 2 wins. Latency is one clock from the strobe.
* `ack_mux`: `mult_a <= port_id_slave1` on a slave 1 write and `mult_b <=
  port_id_slave2` on a slave 2 write. Every clock, `in_port_master <=
  port_id_master[0] ? mult_b : mult_a`. A slave's acknowledgement reaches
  the master's input two clocks after its write strobe.
* Program ROMs: `instruction` is registered from `address` (one clock), as
  the KCPSM3 expects of its block-RAM program store.

## Where this RTL makes its own choices

* **Reset of the glue.** The outputs start at zero, as the system calls for.
  The slave input registers reset to `00h`. `mult_a`, `mult_b` and
  `in_port_master` reset to `ack_mux`'s `NO_ACK` parameter, `FFh` by default.
  `FFh` fails both acknowledgement tests, so after reset the master waits
  for a real acknowledgement. A reset to `00h` would let the master's first
  poll pass with no acknowledgement at all.
* **Instruction encoding.** The programs are written as assembly, and the ROMs
  hold the standard KCPSM3 encodings: opcode in bits 17:12, `sX` in 11:8, the
  constant or port in 7:0. Unconditional `JUMP` is `34aaa` and `JUMP Z` is
  `35aaa`. Unused words are `00000h`.
* **Core interface.** The cores' `interrupt` inputs are tied low and their
  `interrupt_ack` outputs are unused, so neither is a port of `top_module`.
  The glue does not use `read_strobe`, but it is in the bus struct for
  completeness.

## The behavioural core model (`tb/kcpsm3.sv`)

This model is for simulation only and is not a replacement for the vendor
core. It has 16 registers, Z and C flags, and a small call stack. It runs
`LOAD`, `AND`, `OR`, `XOR`, `TEST`, `COMPARE`, `ADD`, `SUB`, `INPUT`,
`OUTPUT`, `JUMP`, `CALL` and `RETURN`. There are no interrupts, scratch-pad,
shifts or carry-chained arithmetic.

Each instruction takes two clocks, and its word is present for both. During
the second clock, `address` already shows the next PC so that the ROM
prefetches, and the strobes are high. `port_id` and `out_port` are driven
continuously from the current instruction, as on the real core. Exact cycle
alignment against the real macro has not been verified. The end-to-end
results therefore show that the system works with a core of this timing.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if something hangs.
With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/kcpsm3_pkg.sv tb/tb_top_module.sv --top-module tb_top_module
./obj_dir/Vtb_top_module
```

Replace `tb_top_module` with any other testbench's name to run that one.
`-Wno-fatal` is needed because the core model keeps the real core's port
name `interrupt`, which Verilator warns about as a C++ keyword.

| testbench | what it checks |
|-----------|----------------|
| `tb_top_module` | Three core models running the real programs for six complete rounds at the top's default configuration (about 290 clocks). It keeps a cycle-by-cycle shadow of every glue register and checks the transaction order (master writes `01,0C,02,0C`; slave writes alternate with `0Ch` and acks `80h`/`40h`). It requires each mechanism at least once: a slave skipping a foreign byte, a slave accepting its address, the master waiting for an acknowledgement, each acknowledgement returned through the multiplexer, and each output written. Half-way it resets the system and checks that everything restarts, the master waiting again for a first acknowledgement. |
| `tb_master_rom`, `tb_slave1_rom`, `tb_slave2_rom` | Every word against a hand-assembled copy, plus the zero fill and the one-clock read latency |
| `tb_data_router` | Random strobes and data against a reference, including both slaves writing together, and reset |
| `tb_ack_mux` | Reset value, two-clock ack latency, one-clock select latency, holding, and random traffic |

To change the programs, edit the `case` tables in the ROM modules. The
`enc_*` functions in `kcpsm3_pkg` build the instruction words. To change the
acknowledgement codes, change the slave's `ACK_PORT` together with the
master's `TEST` masks (`7F` = `~80h`, `BF` = `~40h`).
