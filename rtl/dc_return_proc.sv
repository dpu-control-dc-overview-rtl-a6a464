// dc_return_proc: Return Processor of the DC FPGA.
//
// Merges the return streams of side A and side B into the single return
// stream sent to the HPU. For every command it takes the command word from
// both sides (they must match: "command mismatch" fault otherwise; a word that
// is not a valid command word is a "command synchronization" fault) and uses
// it only to know how many data words follow: the merged stream carries data
// and status words only. It forwards side A's data words, then side B's,
// and finally combines the two 16-bit side status words into one 32-bit
// status word, side B in the upper half (a side status word with any of its
// upper 16 bits set is a "status synchronization" fault). The number of data
// words each side returns follows from the command word: one dc-status word
// for DC_GetDC_Status, one word per target for DC_ReadRegister and N words
// per target for DC_Read. cmd_count counts the command words taken from side
// A (DCR_RP_CmdCount).
//
// Interface: the two side Return FIFOs are read through FWFT pop ports
// (a_empty/a_data/a_rd); the output pushes into the DC Return FIFO (out_wr,
// held off by out_full). One word moves per cycle.
// Follows the document: stream order, status merging, fault kinds and the
// command counter. This design's choice: the exact conditions that raise
// the synchronization faults.
module dc_return_proc
  import dc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_empty,
  input  logic [31:0] a_data,
  output logic        a_rd,
  input  logic        b_empty,
  input  logic [31:0] b_data,
  output logic        b_rd,
  output logic        out_wr,
  output logic [31:0] out_data,
  input  logic        out_full,
  output logic [31:0] cmd_count,
  output logic        flt_mismatch,
  output logic        flt_cmd_sync,
  output logic        flt_stat_sync
);
  typedef enum logic [1:0] {R_CMD, R_A, R_B, R_STAT} rp_state_e;
  rp_state_e   st;
  logic [11:0] a_left, b_left;

  function automatic logic [11:0] dwords(input logic [31:0] w, input logic [5:0] m);
    return 12'(side_data_words(w, m));
  endfunction

  always_comb begin
    a_rd     = 1'b0;
    b_rd     = 1'b0;
    out_wr   = 1'b0;
    out_data = a_data;
    case (st)
      R_CMD: if (!a_empty && !b_empty) begin
        a_rd = 1'b1; b_rd = 1'b1;          // command words are not forwarded
      end
      R_A: if (a_left != '0 && !a_empty && !out_full) begin
        a_rd = 1'b1; out_wr = 1'b1;
      end
      R_B: if (b_left != '0 && !b_empty && !out_full) begin
        b_rd = 1'b1; out_wr = 1'b1; out_data = b_data;
      end
      R_STAT: if (!a_empty && !b_empty && !out_full) begin
        a_rd = 1'b1; b_rd = 1'b1; out_wr = 1'b1;
        out_data = {b_data[15:0], a_data[15:0]};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= R_CMD;
      a_left        <= '0;
      b_left        <= '0;
      cmd_count     <= '0;
      flt_mismatch  <= 1'b0;
      flt_cmd_sync  <= 1'b0;
      flt_stat_sync <= 1'b0;
    end else begin
      case (st)
        R_CMD: if (a_rd) begin
          a_left    <= dwords(a_data, a_data[5:0]);
          b_left    <= dwords(a_data, a_data[13:8]);
          cmd_count <= cmd_count + 1'b1;
          if (a_data != b_data) flt_mismatch <= 1'b1;
          if (!cmd_ok(a_data))  flt_cmd_sync <= 1'b1;
          st <= R_A;
        end
        R_A: if (a_left == '0) st <= R_B;
             else if (out_wr) a_left <= a_left - 1'b1;
        R_B: if (b_left == '0) st <= R_STAT;
             else if (out_wr) b_left <= b_left - 1'b1;
        R_STAT: if (out_wr) begin
          if (a_data[31:16] != '0 || b_data[31:16] != '0) flt_stat_sync <= 1'b1;
          st <= R_CMD;
        end
        default: st <= R_CMD;
      endcase
    end
  end
endmodule
