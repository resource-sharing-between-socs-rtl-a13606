# SerDes resource-sharing link between two SoCs

This design connects two systems-on-chip with one dedicated serial link in each direction, so that the CPU of one chip (chip A, the *active* chip) can read and write the memory of the other (chip B, the *passive* chip). A's CPU accesses a 16-word window in its own address space. The bus-side logic turns each access into a short frame and sends it over a differential pair at 75 Mbit/s. Chip B replays the frame as a Wishbone access on its own bus, and for a read it sends the 32-bit answer back over the other pair.

## How it works

```
 chip A                                              chip B
 CPU --Wishbone--> serdes_bus_slave                  serdes_wb_master --Wishbone--> memory
                        |  ^                              ^  |
                   TX FIFO  RX FIFO                  RX FIFO  TX FIFO      (async, 75 <-> 7.5 MHz)
                        |  ^                              ^  |
                 oserdes_ctrl iserdes_ctrl       iserdes_ctrl oserdes_ctrl
                   enc_8b10b  dec_10b8b+bitslip   dec_10b8b+bitslip enc_8b10b
                   OSERDES    ISERDES              ISERDES    OSERDES     (10:1 / 1:10, DDR)
                   OBUFDS ====================> IBUFDS
                   IBUFDS <==================== OBUFDS
```

- **Frame.** A frame starts with the control character K27.7 and ends with K28.4. Between them are:
  - a command byte: 0x03 for a write, 0x04 for a read;
  - a length byte: the number of 32-bit words, always 1 from chip A;
  - a 4-byte byte address, most significant byte first;
  - for a write, 4 data bytes, most significant byte first.
- **Address.** The address sent is `0x8000_0000 + 4 * word index`. Chip B drops the two low bits to get its Wishbone word address.
- **Read answer.** Chip B returns the answer as its own frame of 4 bytes. Chip B's framer is built with `RESP_ONLY = 1`, so it frames every group of 4 bytes as one answer.
- **Idle line.** When there is nothing to send, the transmitter sends the training character K28.7. The receiver's bitslip controller uses it to find the 10-bit word boundary:
  - After reset it waits 16 word-clock cycles.
  - It then pulses BITSLIP, waits 3 cycles and compares the received word with K28.7.
  - It repeats this until the word matches.
  - Once aligned, it restarts the search if the idle pattern ever shows up shifted by one bit (drift).
  - The receiver only accepts frames while it is aligned.
- **Coding.** All characters are 8b/10b coded. The running disparity is kept in a register. Code bit *a* (symbol bit 9) is sent first.
- **Clocks.**
  - The SoC clock is 75 MHz.
  - The SerDes logic runs on a 7.5 MHz word clock, one 10-bit character per cycle.
  - The serializers use a 37.5 MHz bit clock on both edges.
  - Asynchronous FIFOs (Gray-coded pointers, 8 entries) carry bytes between the SoC and SerDes clock domains in both directions.
- **Flow control.** The bus logic stops pushing while the TX FIFO is full. The framer sends K28.7 filler if its FIFO runs dry in the middle of a frame, and the receiver drops that filler.
- **Write timing.** Writes are posted: the CPU gets its acknowledge after 3 SoC cycles, before the bytes leave.
- **Read timing.** A read is acknowledged when the 4 answer bytes have arrived. That takes a few microseconds: the request and the answer together occupy 14 character slots of 133 ns, plus FIFO and bus latency on both chips.

### Choices of this design, beyond the original description
- **Idle disparity rule.**
  - A stream of K28.7 alternates between its two disparity forms, 0011111000 and 1100000111. Shifted by 5 bits, either form looks like the other.
  - A receiver that accepts both forms can therefore lock half a word off.
  - The fix: while idle, the transmitter sends K28.5 instead of K28.7 whenever the running disparity is positive. The idle line then always carries 0011111000, and the alignment check accepts only that form.
- **Length unit.** The length byte counts 32-bit words, so the default 0x01 carries one word.
- **Stop character.** The stop character is K28.4, as the text says. One state chart shows a different value.
- **Read data output.** The bus slave's read data is valid while it acknowledges.
- **Alignment state.** The "aligned" condition is a single signal: the bitslip controller is in its IDLE state.
- **Behavioural models.** The FPGA primitives are behavioural models with the vendor port names. They are not synthesizable logic:
  - OSERDESE2 and ISERDESE2 (`oserdese2_model`, `iserdese2_model`);
  - the clock manager (`serdes_pll`, which takes the 37.5 MHz bit clock as its reference);
  - the differential buffers (`ibufds_model`, `obufds_model`).

  On a real FPGA these models would be replaced by the vendor primitives.

## Files

| rtl/ | role |
|---|---|
| `serdes_link_top.sv` | top: chip A (bus slave + SerDes system) and chip B (SerDes system + bus master); plain ports |
| `serdes_system.sv` | one chip's SerDes system: FIFOs, framer, deframer, codec, bitslip, serializers, buffers, clock model |
| `serdes_bus_slave.sv` | chip A's Wishbone slave, builds request frames, waits for read answers |
| `serdes_wb_master.sv` | chip B's Wishbone master, parses frames, runs bus cycles, returns read data |
| `async_fifo.sv` | dual-clock FIFO |
| `oserdes_ctrl.sv`, `iserdes_ctrl.sv` | transmit framer, receive deframer |
| `bitslip_ctrl.sv` | word alignment |
| `enc_8b10b.sv`, `dec_10b8b.sv` | 8b/10b codec |
| `oserdese2_model.sv`, `iserdese2_model.sv`, `serdes_pll.sv`, `ibufds_model.sv`, `obufds_model.sv` | behavioural models of FPGA primitives |
| `serdes_pkg.sv` | control characters, command codes, bitslip states |

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`.

`tb_serdes_link_top` runs both chips at default size, joined by two channel delay lines. It does the following:
- performs random remote writes and reads, including a read of 0x11223344;
- moves both channel delays by one bit time while the link runs;
- checks the 7.5 MHz word clock (75 Mbit/s on the line), and that every write request takes 12 character slots and every read request 8;
- fails if any of these never happens: initial alignment on both chips, re-alignment after drift, remote writes, remote reads, a TX-FIFO-full stall, and the K28.5 idle rule.

## Simulating it

Every testbench runs with plain Verilator 5. The package goes first:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/serdes_pkg.sv \
          tb/tb_serdes_link_top.sv --top-module tb_serdes_link_top -o sim
./obj_dir/sim
```

For another block, replace the testbench name.

## How far it can be trusted

- **Checked in simulation, in two-state logic:**
  - the codec against the standard 8b/10b tables, and against a recorded encoder trace of a write frame;
  - the FIFO under random traffic with unrelated clocks;
  - every controller on its own;
  - one chip in internal loop-back;
  - the two-chip link end to end.
- **Known-bug tests.** For each module, a copy with one deliberate bug was run against its testbench, and the testbench caught every one.
- **Not checked:**
  - real FPGA primitives and real timing;
  - metastability;
  - bit errors on the line, which nothing in the design corrects.
- **Clock drift.** Drift is modelled only as a step in the channel delay. The two chips' clocks are assumed to run at the same frequency.

## Not included
- The CPUs, interconnect, memories and peripherals of the two SoCs. They appear only as the two Wishbone ports.
- Multi-word (block) transfers from chip A. Chip B's bus master already handles any length.
- Any error detection or retry beyond the 8b/10b code-violation flag.
