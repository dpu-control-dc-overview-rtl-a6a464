// hpu_cmd_interp: Command Interpreter of the HPU XB FPGA.
//
// Sits between the DSP's writes of the DC command stream and the 511x32
// Command FIFO. It follows the stream word by word, knowing from each command
// word how many address and data words follow it, so it can tell command
// words from the rest. For each command word it checks the inverted command
// field and the two zero bits (invalid: a one-cycle pulse on invalid), and for
// DC_MarkReturn it sends the 16-bit return word count to the Readout FIFO
// (mark_valid/mark_count). Every word, including DC_Pad and DC_MarkReturn,
// is passed on to the Command FIFO one cycle later (out_valid/out_data).
// An invalid command word is treated as a one-word command.
// Follows the document: command word format, command lengths and the ret
// word count path. This design's choice: invalid words are passed on (the
// DC FPGA drops them again and records its own fault).
module hpu_cmd_interp
  import dc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        mark_valid,
  output logic [15:0] mark_count,
  output logic        invalid
);
  logic [6:0] rem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem        <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      mark_valid <= 1'b0;
      mark_count <= '0;
      invalid    <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      out_data   <= in_data;
      mark_valid <= 1'b0;
      invalid    <= 1'b0;
      if (in_valid) begin
        if (rem == '0) begin
          if (!cmd_ok(in_data)) begin
            invalid <= 1'b1;
          end else begin
            rem <= 7'(cmd_len(in_data) - 1);
            if (in_data[31:28] == 4'(CMD_MARKRET)) begin
              mark_valid <= 1'b1;
              mark_count <= in_data[15:0];
            end
          end
        end else begin
          rem <= rem - 1'b1;
        end
      end
    end
  end
endmodule
