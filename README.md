# DPU Control (DC) — SystemVerilog implementation

The DPU Control system lets a host DSP control twelve Data Processing Units (DPUs). Each DPU holds its own DSP. The host can:

- write and verify blocks of DPU memory;
- read DPU memory back;
- read and write DPU control registers;
- raise interrupts in a DPU.

The hardware has three kinds of FPGA, all modelled here on one clock (DC_CLK):

```
 host DSP --XB bus--> HPU XB FPGA --DCH bus--> DC FPGA --DC bus A--> 6 x DPU XB FPGA --> DSP memory
                      (hpu_xb)                (dc_fpga)  --DC bus B--> 6 x DPU XB FPGA --> DSP memory
                                                                        (dpu_xb)
```

The host writes a **command stream** of 32-bit words and reads back a **return stream**.

- The HPU XB FPGA buffers both streams (511 words each) and hands blocks of returns to the host.
- The DC FPGA copies every command to its two sides.
- Each side turns commands into bus operations on its own DC bus, which has an 11-bit opcode bus (DCC) and a shared 32-bit data bus (DCD).
- Each DPU XB FPGA queues the commands aimed at it (255-word Command FIFO) and executes them against its DSP's memory. Read data waits in a 63-word Data FIFO until the side reads it out.

The top module is `dc_system`. Its ports are:

- the host expansion bus;
- CMD_RDY, RET_RDY, FAULT and LED;
- for each of the twelve DPUs: a memory port, DSP reset, endianness and interrupt lines, a fault line and the LED.

## Command stream

Every command starts with a command word:

```
 31..28 CCCC   command
 27..24 IIII   bit-inverse of CCCC (checked everywhere a command word is parsed)
 23..22 00
 21..16 N      word count / register number
 15..8  tt TTTTTT   side B targets (DPU IDs 0-5 in bits 13..8)
  7..0  tt TTTTTT   side A targets (bits 5..0)
```

| C | command | words sent | returned per command |
|---|---------|-----------|-----------------------|
| 0 | DC_Pad | 1 | nothing |
| 1 | DC_MarkReturn (bits 15..0 = words to return) | 1 | nothing |
| 2 | DC_Nop | 1 | status |
| 3 | DC_GetDC_Status | 1 | one dc-status word per side, status |
| 4 | DC_ReadRegister (N = register) | 1 | one word per target, status |
| 5 | DC_WriteRegister (N = register) | 2 | status |
| 6 | DC_Read (N words, from address) | 2 | N words per target, status |
| 7 | DC_Write (N words to address) | N+2 | status |
| 8 | DC_Verify (compare N words at address) | N+2 | status |
| 9 | DC_Interrupt | 2 | status |

The longest command is 65 words: DC_Write, the address, and 63 data words.

Return data comes in a fixed order: side A targets in ID order, then side B targets. Each command then ends with one 32-bit **status word**:

- Side B is in bits 31..16 and side A in bits 15..0.
- Each side has two bits per target: `00` ok, `01` a DPU-local fatal fault (the DPU is on the down list), `10` a DC-global fatal fault.
- Down targets are not addressed again. Their read data is replaced by the FailureValue register (reset value 0xDEADBEEF).

The host puts a DC_MarkReturn ahead of the commands whose returns it wants. The HPU XB FPGA keeps the count in its 255x16 Readout FIFO. It raises RET_RDY once that many words are in its Return FIFO, and holds it until they have been read.

## Blocks

### `hpu_xb` — HPU XB FPGA
- **XCE0, reset region:** a write to address 5 or A resets the FPGA.
- **XCE1, user registers:**
  - 1 Control: loopback mode LL and R, which holds the DC FPGA and DPUs in reset;
  - 2 Status: fault bits;
  - 3 RegWrite, 4 RegIndex, 5 RegRead: access to DC FPGA registers;
  - 6 LED_Control;
  - F StdTest, which increments after every read.
- **XCE2, streams:** writes append to the command stream and reads take the next return word.
- **Command path:** words pass the command interpreter (`hpu_cmd_interp`) into the Command FIFO.
  - The interpreter extracts DC_MarkReturn counts and flags invalid command words.
  - CMD_RDY is high while the Command FIFO can still take a 65-word command. A word still inside the interpreter counts as already queued.
- **Return path:** the readout logic (`hpu_readout`) raises RET_RDY, as described above. It reports these faults:
  - over-read (reading while RET_RDY is low);
  - capacity (a block larger than the Return FIFO);
  - Readout FIFO overflow and underflow.
- **Loopback modes (Control LL):**
  - 00: normal.
  - 01: every word written is returned directly.
  - 10: the stream goes to the DC FPGA, which is expected to loop it back (sides in RunLoopback). Returns are read as in 00.
  - 11: the loopback generator (`hpu_loopback_gen`) answers as the DC FPGA would: dummy data word k has value k, and the status is 0.
- **DCH master:**
  - A word is written to the DC FPGA whenever the Command FIFO has one and the DC reports room (CSTAT low).
  - Return words are fetched while RSTAT is high, with up to four reads in flight. Each read is made only when the Return FIFO has room for it.
  - A RegIndex access (W, R or both; write first) has priority. The result lands in RegRead, and RegIndex then reads zero.
- **LED:** it lights under the LED_Control conditions and stays on for at least the programmed number of milliseconds (`CLKS_PER_MS`).

### `dc_fpga` — DC FPGA
- **DCH slave:** the HPU's strobes are registered in, and answers are registered out. A read issued in cycle t is answered in t+2 with RDAV_N low. A read of an empty Return FIFO answers RDAV_N high.
  - CSTAT means the common Command FIFO has 16 or fewer free words.
  - RSTAT means the Return FIFO is not empty.
  - DCSTAT means some fault bit of DCR_Status is set.
- **Address map:**
  - 0x10 is the command FIFO on write and the return FIFO on read.
  - 0x00–0x07 are side A registers and 0x08–0x0F are side B registers.
  - 0x13 is DCR_Control: A=4, P=8, T=timeout in cycles (reset 1000).
  - 0x14 is FailureValue.
  - 0x1B is the Return Processor command count.
  - 0x1C is DCR_Status: I for an invalid command; M, C and S for return processor mismatch and sync faults; a severe-fault bit per side.
  - 0x1F is StdTest.
- **Dispatcher:** drops invalid words, DC_Pad and DC_MarkReturn. It copies every other command, with its address and data words, into the 256-word Command FIFO of both sides.
- **Return processor (`dc_return_proc`):**
  - It takes each command word from both sides and checks them: unequal words are a mismatch fault, and a word that is not a command word is a sync fault.
  - It uses the command word only to count the data words that follow. Then it passes side A's data, side B's data, and one combined status word.
  - The Return FIFO gets **data and status words only**.

### `dc_side` — one DC FPGA side
The command sequencer runs one command at a time.

- **Write-type commands:** DC_Write, DC_Verify, DC_Interrupt, and the queuing part of DC_Read.
  - The side keeps its own copy of every DPU's almost-full (AF) flag. A burst to the queue (`write_fifo` to all targets at once) starts only when no live target is AF.
  - While any is AF, it polls with `drive_flags`.
  - After ten or more `write_fifo`s since the last flag refresh, a terminal `drive_flags` follows the burst.
- **DC_Read readout:** targets are read in turn.
  - The side polls flags until the target reports ready-for-readout (RR), or the timeout T expires. A timed-out target joins the down list.
  - It then bursts N `read_fifo`s, inserting `pause` cycles while its own Return FIFO lacks room.
  - A terminal `drive_flags` catches read-count (misread) faults.
- **Register commands:** DC_WriteRegister goes to all targets, ignoring AF flags and the down list. DC_ReadRegister issues back-to-back `read_register`s.
- **Down list:** a DPU joins it when its flags show a fatal fault or a misread, or when it times out. DCR_DownStatus (register 5) shows why, in four 6-bit fields (timeout, write, misread, fatal). Writing the register clears the list.
- **Side registers:**
  - 0 SideControl: mode M, test register, user down list, test target;
  - 3 TestIn;
  - 4 SideStatus;
  - 5 DownStatus;
  - 6/7 captured DCD/DCC on a bus bit error.
- **Modes:**
  - 3 RunNormal;
  - 2 RunLoopback: DCD input is ignored, every DPU looks ready, and read data is address + 4·word index;
  - 1 Float: DCC released;
  - 8–12 single-shot bus tests. Each test runs once per write of SideControl: capture DCC, drive DCD, drive flags, write register, read register.

### `dpu_xb` — DPU XB FPGA
- **Input:** the DCC and DCD inputs are registered.
- **Opcodes:**
  - `1 TTTTTT rrrr` writes DCD to register r of every DPU in mask T. Register 0 is the Command FIFO.
  - `0 001 TTT rrrr` makes DPU TTT drive register r on DCD. Register 0 is the Data FIFO head.
  - `0 010 ...` is `drive_flags`: every DPU drives its four flag bits RRCC on DCD bits 4·ID+3..4·ID.
  - `0 011 0...` is `pause` and `0 011 1...` is `nop`.
  - `0 1.. ...` is `capture_next_dcc`.
- **Flags:**
  - RR: 00 nothing to read, 01 fetch pending, 10 ready, 11 misread.
  - CC: 10 Command FIFO almost full, 11 fatal fault.
  - Almost full means the 255-word FIFO cannot take 65 + 30 more words.
- **Command tracker:** parses every word entering the Command FIFO and flags invalid commands, overflow and underflow.
- **Interpreter:** executes DC_Write, DC_Verify, DC_Read and DC_Interrupt against the DSP memory port, with optional address-window checks.
  - DC_Write and DC_Verify check the write window (registers 3 and 4).
  - DC_Read checks the read limit (register 5).
  - Alignment is always checked.
  - DC_Read fetches N words into the Data FIFO. One fetch is outstanding at a time.
- **Readout end:** a `read_fifo` followed by anything except `pause` ends the readout. The word count is then compared with the fetch, and the Data FIFO is emptied.
- **Registers:**
  - 1 Control: D releases DSP reset, B selects big-endian, C enables address checks, and bit 3 is a self-clearing soft reset. For failure-recovery tests, bit 9 drops DSP writes, bit 10 stops DSP reads (a fetch then stays pending until the DC times out), and bit 11 makes `drive_flags` return bits 15:12. These three bit positions are this design's choice; bits 31:24 enable the LED (fault, register or FIFO write, register or FIFO read, manual) and bits 23:16 give its minimum on time in ms, restarted by each event;
  - 2 Status: verify error, AF, RR, fatal, misread, plus tracker and executor fault bits;
  - 3/4 write window;
  - 5 read limit;
  - 7 Capture: the captured DCC value, or the address of the first verify error. Writing it clears the verify error.

### `dc_fifo`
This is the synchronous first-word-fall-through FIFO used everywhere. It reports an overflow or underflow as a one-cycle flag and ignores the offending access.

## DC bus timing

- An opcode driven on DCC in cycle t uses the DCD bus in cycle t+3.
  - For a write, the side drives the data in t+3.
  - For a read or `drive_flags`, the DPU drives DCD in t+3 from its output register.
- The side sees the answer through its input register in t+4.
- The side keeps a five-stage pipeline of issued operations so that each answer is matched to its opcode.
- Bursts run at one word per cycle. Undriven DCD bits read 1 (pull-ups), so an absent DPU's flags read `1111` (misread/fatal), and the DPU goes on the down list.

## Verification

Each block has a self-checking testbench that ends with a `TB_RESULT` line.

- **`tb_dc_system`:** the whole system at full size (12 DPUs, all FIFOs at their real depths). It plays the host on the XB bus and models the twelve DSP memories. It compares every return block with a stream worked out independently from the command definitions.
  - It runs about 1480 checks.
  - Mechanisms exercised: register access through RegIndex; write bursts; readout with flag polling; an almost-full stall (one DPU's DSP held off the bus while four 65-word writes are queued); a read timeout with FailureValue substitution; `pause` cycles while four 316-word reads back up the return path; a DC_Verify mismatch; DC_Interrupt; all HPU loopback modes; side RunLoopback; side test modes; and invalid-command detection.
- **`tb_dpu_xb`:** drives one DPU with exact slot timing. It checks registers, memory writes, verify, fetch latency (under 60 cycles for 5 words), flags, misread, capture, interrupt, address checks, almost full, soft reset, the three failure-recovery test bits and the LED timing.
- **`tb_dc_bandwidth`:** the whole system at full size, with the host moving one word every two cycles (50 MHz with 50% overhead, 25 MW/s). It writes four 63-word DC_Write commands and checks that CMD_RDY never holds the host off. It then reads 4 × 63 words back and measures the rate.
- **`tb_dc_side`:** one side with five DPUs and one empty slot. It checks readout data and time: 4 targets × 10 words finish in about 100 cycles with 4 `drive_flags`. It also checks the absent target going down, loopback data and Float mode.
- **`tb_dc_fpga`:** both sides with two DPUs each. It checks DCH timing, registers, dispatch and dropping, and merged returns.
- **`tb_hpu_xb`:** runs against a behavioural DC FPGA. It checks registers, RegIndex, RET_RDY blocks, loopback modes, faults, soft reset, and CMD_RDY falling at exactly 447 queued words (511 − 65 + 1).
- **`tb_hpu_cmd_interp`, `tb_hpu_readout`, `tb_hpu_loopback_gen`, `tb_dc_return_proc`, `tb_dc_fifo`:** unit checks against reference models, with random stalls.

## Performance against the system's numbers

| requirement | result |
|---|---|
| maximum command of 65 words | fits. CMD_RDY reserves 65 words. DPU AF leaves 65 + 30 words of margin. The N field allows 63 data words. |
| return block up to 511 words | fits. Larger DC_MarkReturn counts raise the capacity fault. |
| 25 MW/s during DC activity | fits. In `tb_dc_bandwidth` the host writes 260 words at 25 MW/s and is never held off. The last word reaches memory 79 cycles after the host wrote it. |
| average host bandwidth 11.6 MW/s | fits. A 4 × 63-word DC_Read is read back at 13.5 MW/s, counted from the command to the last word. The XB, DCH and DC buses each move one word per cycle (50 MW/s at 50 MHz). Flag polling adds about 10 cycles per read target. |
| front-end FIFO fill (20 µs) and DMA drain (23 µs at 75 MW/s) | not applicable: the front end and DMA are outside this design. |

## Design choices and differences from the original system

- **In-order execution.** The original side keeps a RetCmd FIFO (256×16) so that it can queue later "arriving" commands in the DPUs while an earlier DC_Read waits for its data. Here each side finishes one command before starting the next. Results are identical; only overlap is lost. The A and P fields of DCR_Control are stored but have no effect.
- **Not built:**
  - the DCC line test (RegIndex test mode and DCR_DCC_Test);
  - the DPU front-end subsystem (and so the LED's front-end enables);
  - the DPRAM variant of the DPU data subsystem;
  - the clock multiplexer and DLLs;
  - the DSPs themselves.
- **Single clock.** FIFOs the original has with asynchronous ports are synchronous here. The host bus is modelled as a synchronous bus with active-high strobes.
- **Encodings chosen where the original leaves them open:**
  - the DCH FIFO address 0x10;
  - the CSTAT/RSTAT/DCSTAT meanings;
  - the lower 16 bits of the HPU status register;
  - the flag nibble position 4·ID;
  - dummy and simulated loopback data values;
  - the DC_GetDC_Status data word;
  - the DCR_Control T reset value (1000 cycles);
  - DownStatus clear-on-write.
- **DC_ReadRegister to a down target** returns FailureValue rather than addressing it again.
- **DSP memory model:** DSP reads have one cycle of latency, and a ready input provides wait states.
