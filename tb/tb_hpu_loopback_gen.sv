// tb_hpu_loopback_gen: feeds a command stream (with address and data words,
// padding and an invalid word) and compares the generated return stream with
// one worked out from the command definitions. The output is stalled at
// random to exercise back-pressure.
`timescale 1ns/1ps
module tb_hpu_loopback_gen;
  import dc_pkg::*;
  logic clk = 0, rst_n, in_valid, in_rd, out_wr, out_full;
  logic [31:0] in_data, out_data;
  always #5 clk = ~clk;
  hpu_loopback_gen dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] inq [$], expq [$], gotq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int tc(input logic [31:0] c);
    return $countones(c[5:0]) + $countones(c[13:8]);
  endfunction

  task automatic add(input logic [31:0] c, input int extra, input int ndata);
    inq.push_back(c);
    for (int i = 0; i < extra; i++) inq.push_back(32'hA000_0000 + i);
    for (int i = 0; i < ndata; i++) expq.push_back(i);
    expq.push_back(32'h0);
  endtask

  assign in_valid = inq.size() != 0;
  assign in_data  = (inq.size() != 0) ? inq[0] : '0;
  always @(posedge clk) begin
    if (in_rd && inq.size() != 0) void'(inq.pop_front());
    if (out_wr) gotq.push_back(out_data);
    out_full <= ($urandom % 4 == 0);
  end

  initial begin
    logic [31:0] c;
    rst_n = 1; #1 rst_n = 0;
    inq.push_back(make_cmd(4'(CMD_PAD), 6'd0, 8'h0, 8'h0));
    inq.push_back(make_cmd(4'(CMD_MARKRET), 6'd0, 8'h0, 8'd9));
    add(make_cmd(4'(CMD_NOP), 6'd0, 8'h1, 8'h1), 0, 0);
    add(make_cmd(4'(CMD_GETSTAT), 6'd0, 8'h0, 8'h1), 0, 2);
    c = make_cmd(4'(CMD_RDREG), 6'd3, 8'h3, 8'h7);  add(c, 0, tc(c));
    add(make_cmd(4'(CMD_WRREG), 6'd3, 8'h3, 8'h7), 1, 0);
    c = make_cmd(4'(CMD_READ), 6'd5, 8'h21, 8'h3);  add(c, 1, 5 * tc(c));
    add(make_cmd(4'(CMD_WRITE), 6'd6, 8'h0, 8'h3), 7, 0);
    inq.push_back(32'hFFFF_0000);
    add(make_cmd(4'(CMD_VERIFY), 6'd2, 8'h0, 8'h3), 3, 0);
    add(make_cmd(4'(CMD_INTR), 6'd0, 8'h0, 8'h3), 1, 0);
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (400) @(posedge clk);
    checks++;
    if (gotq.size() != expq.size()) begin
      failures++; $display("FAIL size %0d vs %0d", gotq.size(), expq.size());
    end
    foreach (expq[i]) begin
      checks++;
      if (i >= gotq.size() || gotq[i] !== expq[i]) begin
        failures++; $display("FAIL word %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
