// tb_hpu_cmd_interp: feeds a command stream with gaps and checks that every
// word is passed on one cycle later, that DC_MarkReturn counts are extracted
// only from command-word positions (a data word that looks like a
// DC_MarkReturn must be ignored) and that invalid command words are flagged.
`timescale 1ns/1ps
module tb_hpu_cmd_interp;
  import dc_pkg::*;
  logic clk = 0, rst_n, in_valid, out_valid, mark_valid, invalid;
  logic [31:0] in_data, out_data;
  logic [15:0] mark_count;
  always #5 clk = ~clk;
  hpu_cmd_interp dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] stream [$];
  logic [15:0] exp_marks [$], got_marks [$];
  int exp_inv = 0, got_inv = 0;
  logic [31:0] sent [$], got [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (out_valid) got.push_back(out_data);
    if (mark_valid) got_marks.push_back(mark_count);
    if (invalid) got_inv++;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0; in_valid = 0; in_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      int kind;
      kind = $urandom % 5;
      case (kind)
        0: begin
          logic [15:0] n;
          n = 16'($urandom);
          stream.push_back(make_cmd(4'(CMD_MARKRET), 6'd0, n[15:8], n[7:0]));
          exp_marks.push_back(n);
        end
        1: begin
          int n;
          n = 1 + $urandom % 5;
          stream.push_back(make_cmd(4'(CMD_WRITE), 6'(n), 8'h1, 8'h3));
          stream.push_back(32'h100);
          for (int i = 0; i < n; i++)
            stream.push_back(make_cmd(4'(CMD_MARKRET), 6'd0, 8'h12, 8'h34));   // data only
        end
        2: begin
          stream.push_back(make_cmd(4'(CMD_READ), 6'd4, 8'h0, 8'h1));
          stream.push_back(32'h0);
        end
        3: begin
          stream.push_back(32'h5A5A_0000);   // invalid
          exp_inv++;
        end
        default: stream.push_back(make_cmd(4'(CMD_PAD), 6'd0, 8'h0, 8'h0));
      endcase
    end
    foreach (stream[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = stream[i];
      @(negedge clk);
      in_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (got.size() != stream.size()) begin failures++; $display("FAIL count"); end
    foreach (stream[i]) begin
      checks++;
      if (i < got.size() && got[i] !== stream[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    checks++;
    if (got_marks.size() != exp_marks.size()) begin
      failures++; $display("FAIL marks %0d vs %0d", got_marks.size(), exp_marks.size());
    end else foreach (exp_marks[i]) begin
      checks++;
      if (got_marks[i] !== exp_marks[i]) begin failures++; $display("FAIL mark %0d", i); end
    end
    checks++;
    if (got_inv != exp_inv) begin failures++; $display("FAIL invalid %0d vs %0d", got_inv, exp_inv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
