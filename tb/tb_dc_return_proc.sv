// tb_dc_return_proc: builds the return streams of two sides for a list of
// commands, feeds them with random gaps and output stalls, and compares the
// merged stream: side A data, side B data, combined status word (the
// command words are only used to keep the sides in step). Then a mismatching command word must raise the mismatch fault, an
// invalid one the command synchronization fault and a malformed status word
// the status synchronization fault.
`timescale 1ns/1ps
module tb_dc_return_proc;
  import dc_pkg::*;
  logic clk = 0, rst_n;
  logic a_empty = 1, b_empty = 1;
  logic a_rd, b_rd, out_wr, out_full;
  logic [31:0] a_data, b_data, out_data, cmd_count;
  logic flt_mismatch, flt_cmd_sync, flt_stat_sync;
  always #5 clk = ~clk;
  dc_return_proc dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] aq [$], bq [$], expq [$], gotq [$];
  logic a_hold, b_hold;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // the FIFO outputs are refreshed from the queues on the falling edge
  always @(negedge clk) begin
    a_empty <= aq.size() == 0 || a_hold || !rst_n;
    b_empty <= bq.size() == 0 || b_hold || !rst_n;
    a_data  <= aq.size() != 0 ? aq[0] : '0;
    b_data  <= bq.size() != 0 ? bq[0] : '0;
  end
  always @(posedge clk) begin
    if (out_wr) gotq.push_back(out_data);
    if (a_rd) void'(aq.pop_front());
    if (b_rd) void'(bq.pop_front());
    a_hold   <= ($urandom % 3 == 0);
    b_hold   <= ($urandom % 3 == 0);
    out_full <= ($urandom % 4 == 0);
  end

  task automatic add(input logic [31:0] c);
    int na, nb;
    logic [15:0] sa, sb;
    na = side_data_words(c, c[5:0]);
    nb = side_data_words(c, c[13:8]);
    sa = 16'($urandom) & 16'h0FFF; sb = 16'($urandom) & 16'h0FFF;
    aq.push_back(c); bq.push_back(c);
    for (int i = 0; i < na; i++) begin aq.push_back(32'hA0000 + i); expq.push_back(32'hA0000 + i); end
    for (int i = 0; i < nb; i++) begin bq.push_back(32'hB0000 + i); expq.push_back(32'hB0000 + i); end
    aq.push_back({16'h0, sa}); bq.push_back({16'h0, sb}); expq.push_back({sb, sa});
  endtask

  initial begin
    rst_n = 1; #1 rst_n = 0;
    add(make_cmd(4'(CMD_NOP), 6'd0, 8'h1, 8'h1));
    add(make_cmd(4'(CMD_GETSTAT), 6'd0, 8'h0, 8'h0));
    add(make_cmd(4'(CMD_RDREG), 6'd2, 8'h3, 8'h7));
    add(make_cmd(4'(CMD_READ), 6'd5, 8'h21, 8'h0));
    add(make_cmd(4'(CMD_READ), 6'd3, 8'h0, 8'h3F));
    add(make_cmd(4'(CMD_WRITE), 6'd9, 8'h1, 8'h1));
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (600) @(posedge clk);
    checks++;
    if (gotq.size() != expq.size()) begin failures++; $display("FAIL size %0d vs %0d", gotq.size(), expq.size()); end
    foreach (expq[i]) begin
      checks++;
      if (i >= gotq.size() || gotq[i] !== expq[i]) begin failures++; $display("FAIL word %0d got %h exp %h", i, (i < gotq.size()) ? gotq[i] : 0, expq[i]); end
    end
    checks++;
    if (cmd_count != 6) begin failures++; $display("FAIL cmd_count %0d", cmd_count); end
    checks++;
    if (flt_mismatch || flt_cmd_sync || flt_stat_sync) begin failures++; $display("FAIL early fault %b%b%b", flt_mismatch, flt_cmd_sync, flt_stat_sync); end
    // faults
    aq.push_back(make_cmd(4'(CMD_NOP), 6'd0, 8'h0, 8'h1)); bq.push_back(make_cmd(4'(CMD_NOP), 6'd0, 8'h0, 8'h2));
    aq.push_back(32'h0); bq.push_back(32'h0001_0000);
    aq.push_back(32'h1234_5678); bq.push_back(32'h1234_5678);
    aq.push_back(32'h0); bq.push_back(32'h0);
    repeat (100) @(posedge clk);
    checks += 3;
    if (!flt_mismatch)  begin failures++; $display("FAIL mismatch"); end
    if (!flt_stat_sync) begin failures++; $display("FAIL stat sync"); end
    if (!flt_cmd_sync)  begin failures++; $display("FAIL cmd sync"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
