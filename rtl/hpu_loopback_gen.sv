// hpu_loopback_gen: Loopback Status/Dummy Generator of the HPU XB FPGA.
//
// In the "simulated normal operation" loopback mode the HPU XB FPGA answers
// the command stream itself, without the DC FPGA. This block reads the output
// of the Command FIFO and writes into the Return FIFO the stream the DC FPGA
// would have returned: for each command other than DC_Pad and DC_MarkReturn
// dummy data words (two dc-status words for
// DC_GetDC_Status, one word per target for DC_ReadRegister, N words per
// target for DC_Read), then a status word of zero (all targets succeeded).
// The command word, its address and its data words are consumed without
// output, as the DC FPGA returns only data and status words. The dummy
// data word k of a command has the value k. Invalid command words are
// dropped.
// Interface: in_valid/in_data/in_rd pop the Command FIFO; out_wr/out_data
// push the Return FIFO and wait while out_full. One word per cycle.
// Follows the document: the returned stream layout. This design's choice:
// the dummy data values.
module hpu_loopback_gen
  import dc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_rd,
  output logic        out_wr,
  output logic [31:0] out_data,
  input  logic        out_full
);
  typedef enum logic [1:0] {L_CMD, L_SKIP, L_DATA, L_STAT} lb_state_e;
  lb_state_e  st;
  logic [6:0] skip;
  logic [9:0] ndata, idx;
  logic       emit_cmd;

  always_comb begin
    emit_cmd = in_valid && cmd_ok(in_data) && in_data[31:28] != 4'(CMD_PAD)
               && in_data[31:28] != 4'(CMD_MARKRET);
    in_rd    = 1'b0;
    out_wr   = 1'b0;
    out_data = in_data;
    case (st)
      L_CMD: begin
        in_rd  = in_valid;
      end
      L_SKIP: in_rd = in_valid && (skip != '0);
      L_DATA: if (idx != ndata && !out_full) begin
        out_wr   = 1'b1;
        out_data = 32'(idx);
      end
      L_STAT: if (!out_full) begin
        out_wr   = 1'b1;
        out_data = '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= L_CMD;
      skip  <= '0;
      ndata <= '0;
      idx   <= '0;
    end else begin
      case (st)
        L_CMD: if (in_rd && emit_cmd) begin
          skip  <= 7'(cmd_len(in_data) - 1);
          ndata <= 10'(side_data_words(in_data, in_data[5:0])
                       + side_data_words(in_data, in_data[13:8]));
          idx   <= '0;
          st    <= L_SKIP;
        end
        L_SKIP: if (skip == '0) st <= L_DATA;
                else if (in_rd) skip <= skip - 1'b1;
        L_DATA: if (idx == ndata) st <= L_STAT;
                else if (out_wr) idx <= idx + 1'b1;
        L_STAT: if (out_wr) st <= L_CMD;
        default: st <= L_CMD;
      endcase
    end
  end
endmodule
