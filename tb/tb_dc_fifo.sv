// tb_dc_fifo: random push/pop test of the FIFO against a queue model,
// including full, empty, count, overflow and underflow flags and flush.
`timescale 1ns/1ps
module tb_dc_fifo;
  localparam int W = 32, D = 7;
  logic clk = 0, rst_n, flush, wr_en, rd_en, empty, full, ovf, unf;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  always #5 clk = ~clk;
  dc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int n_full = 0, n_ovf = 0, n_unf = 0;

  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 1; #1 rst_n = 0; flush = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic exp_ovf, exp_unf;
      @(negedge clk);
      chk("count", 32'(count), q.size());
      chk("empty", 32'(empty), 32'(q.size() == 0));
      chk("full", 32'(full), 32'(q.size() == D));
      if (q.size() != 0) chk("head", rd_data, q[0]);
      if (full) n_full++;
      wr_en = ($urandom % 100) < (i < 1500 ? 60 : 40);
      rd_en = ($urandom % 100) < (i < 1500 ? 40 : 60);
      flush = (i == 2000);
      wr_data = $urandom;
      exp_ovf = wr_en && q.size() == D;
      exp_unf = rd_en && q.size() == 0;
      @(posedge clk); #1;
      if (flush) q.delete();
      else begin
        if (rd_en && q.size() != 0 && !(0)) void'(q.pop_front());
        if (wr_en && !exp_ovf) q.push_back(wr_data);
        chk("ovf", 32'(ovf), 32'(exp_ovf));
        chk("unf", 32'(unf), 32'(exp_unf));
        n_ovf += exp_ovf; n_unf += exp_unf;
      end
    end
    if (n_full == 0 || n_ovf == 0 || n_unf == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
