// dc_pkg: types, encodings and helper functions shared by every block of the
// DPU Control (DC) system.
//
// The DC system carries a stream of 32-bit command words from a host processor
// unit (HPU) through the DC FPGA to up to twelve data processing units (DPUs),
// six on each of two DC buses (side A and side B), and returns data and status.
// This package holds the command word layout, the 11-bit DCC bus opcodes, the
// DPU flag codes and the helpers that count how many words a command occupies
// in each stream. Encodings follow the document's tables; the bit position of
// each DPU's flag nibble and the bus latency constant are this design's choice
// where noted.
package dc_pkg;

  // Number of DPUs on one DC bus (one side of the DC FPGA).
  localparam int unsigned NDPU_SIDE = 6;

  // A DC bus operation issued on DCC in cycle t uses the DCD bus in cycle t+3:
  // write data is driven there by the DC FPGA, read data and flags by the DPU.
  localparam int unsigned BUS_LAT = 3;

  // Maximum command size in words (DC_Write + address + 63 data words).
  localparam int unsigned MAX_CMD_WORDS = 65;
  // Safety margin a DPU command FIFO must have beyond one maximum command
  // before it reports "not almost full".
  localparam int unsigned AF_MARGIN = 30;

  // Register address on the DCH bus reserved for the command/return FIFOs.
  localparam logic [4:0] DCH_FIFO_ADDR = 5'h10;

  typedef enum logic [3:0] {
    CMD_PAD     = 4'd0,
    CMD_MARKRET = 4'd1,
    CMD_NOP     = 4'd2,
    CMD_GETSTAT = 4'd3,
    CMD_RDREG   = 4'd4,
    CMD_WRREG   = 4'd5,
    CMD_READ    = 4'd6,
    CMD_WRITE   = 4'd7,
    CMD_VERIFY  = 4'd8,
    CMD_INTR    = 4'd9
  } dc_cmd_e;

  // Command word: CCCC IIII 00NN NNNN ttTT TTTT ttTT TTTT
  typedef struct packed {
    logic [3:0] c;      // command
    logic [3:0] ci;     // inverted command
    logic [1:0] zero;   // must be zero
    logic [5:0] n;      // data count / register number
    logic [7:0] tgt_b;  // side B targets in bits 5:0
    logic [7:0] tgt_a;  // side A targets in bits 5:0
  } cmd_word_t;

  // DPU return-status (RR) and command-status (CC) flag codes.
  typedef enum logic [1:0] {
    RR_NR    = 2'b00,   // nothing to read out
    RR_PE    = 2'b01,   // fetch pending
    RR_READY = 2'b10,   // ready for readout
    RR_FATAL = 2'b11    // misread fault / absent
  } rr_e;
  localparam logic [1:0] CC_AF    = 2'b10;
  localparam logic [1:0] CC_FATAL = 2'b11;

  // Per-target status codes in status words.
  localparam logic [1:0] ST_OK        = 2'b00;
  localparam logic [1:0] ST_DPU_FATAL = 2'b01;
  localparam logic [1:0] ST_DC_FATAL  = 2'b10;

  // DCC opcodes (11 bits).
  localparam logic [10:0] DCC_DRIVE_FLAGS = 11'b0_010_000_0000;
  localparam logic [10:0] DCC_PAUSE       = 11'b0_011_000_0000;
  localparam logic [10:0] DCC_NOP         = 11'b0_011_100_0000;
  localparam logic [10:0] DCC_CAPTURE     = 11'b0_100_000_0000;

  function automatic logic [10:0] dcc_write(input logic [5:0] mask, input logic [3:0] r);
    return {1'b1, mask, r};
  endfunction

  function automatic logic [10:0] dcc_read(input logic [2:0] tid, input logic [3:0] r);
    return {4'b0001, tid, r};
  endfunction

  // A command word is valid when the inverted field matches, the two zero
  // bits are zero and the command is one of the ten defined.
  function automatic logic cmd_ok(input logic [31:0] w);
    cmd_word_t cw;
    cw = cmd_word_t'(w);
    return (cw.ci == ~cw.c) && (cw.zero == 2'b00) && (cw.c <= 4'd9);
  endfunction

  // Total length of a command in the HPU command stream, in words.
  function automatic int unsigned cmd_len(input logic [31:0] w);
    cmd_word_t cw;
    cw = cmd_word_t'(w);
    case (cw.c)
      CMD_WRREG, CMD_READ, CMD_INTR: return 2;
      CMD_WRITE, CMD_VERIFY:         return 32'(cw.n) + 2;
      default:                       return 1;
    endcase
  endfunction

  function automatic logic [3:0] popcount6(input logic [5:0] m);
    logic [3:0] s;
    s = '0;
    for (int i = 0; i < 6; i++) s += {3'b000, m[i]};
    return s;
  endfunction

  // Number of data words one side returns between command word and status
  // word (GetDC_Status counts its dc-status word as data).
  function automatic int unsigned side_data_words(input logic [31:0] w, input logic [5:0] tmask);
    cmd_word_t cw;
    cw = cmd_word_t'(w);
    case (cw.c)
      CMD_GETSTAT: return 1;
      CMD_RDREG:   return 32'(popcount6(tmask));
      CMD_READ:    return 32'(cw.n) * 32'(popcount6(tmask));
      default:     return 0;
    endcase
  endfunction

  function automatic logic [31:0] make_cmd(input logic [3:0] c, input logic [5:0] n,
                                           input logic [7:0] tb, input logic [7:0] ta);
    return {c, ~c, 2'b00, n, tb, ta};
  endfunction

endpackage
