// tb_hpu_readout: checks that RET_RDY rises only once a whole marked block is
// in the Return FIFO, stays up for exactly that many reads, that blocks are
// served in order, and that over-read and capacity faults are raised.
`timescale 1ns/1ps
module tb_hpu_readout;
  logic clk = 0, rst_n, mark_valid, ret_pop, ret_rdy;
  logic flt_overread, flt_capacity, flt_reo_wr, flt_reo_rd, reo_empty;
  logic [15:0] mark_count;
  logic [9:0] ret_count;
  always #5 clk = ~clk;
  hpu_readout dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic push_mark(input int n);
    @(negedge clk); mark_valid = 1; mark_count = 16'(n);
    @(negedge clk); mark_valid = 0;
  endtask

  task automatic pop();
    @(negedge clk); ret_pop = 1; ret_count = ret_count - 1;
    @(negedge clk); ret_pop = 0;
  endtask

  initial begin
    rst_n = 1; #1 rst_n = 0; mark_valid = 0; ret_pop = 0; mark_count = 0; ret_count = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    push_mark(5); push_mark(3);
    // words arrive one by one; RET_RDY must wait for the fifth
    for (int i = 0; i < 5; i++) begin
      repeat (3) @(negedge clk);
      chk("not ready before block complete", 32'(ret_rdy), 0);
      ret_count = ret_count + 1;
    end
    repeat (2) @(negedge clk);
    chk("ready with block complete", 32'(ret_rdy), 1);
    for (int i = 0; i < 5; i++) begin
      chk("ready during block", 32'(ret_rdy), 1);
      pop();
    end
    repeat (2) @(negedge clk);
    chk("second block not there yet", 32'(ret_rdy), 0);
    ret_count = 3;
    repeat (2) @(negedge clk);
    chk("second block ready", 32'(ret_rdy), 1);
    for (int i = 0; i < 3; i++) pop();
    repeat (2) @(negedge clk);
    chk("idle after blocks", 32'(ret_rdy), 0);
    chk("no overread yet", 32'(flt_overread), 0);
    pop();
    repeat (2) @(negedge clk);
    chk("overread fault", 32'(flt_overread), 1);
    push_mark(600);
    repeat (3) @(negedge clk);
    chk("capacity fault", 32'(flt_capacity), 1);
    chk("capacity block dropped", 32'(reo_empty), 1);
    push_mark(0);
    repeat (3) @(negedge clk);
    chk("zero block dropped", 32'(reo_empty), 1);
    chk("zero block not ready", 32'(ret_rdy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
