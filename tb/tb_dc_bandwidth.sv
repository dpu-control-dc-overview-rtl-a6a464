// tb_dc_bandwidth: host bandwidth of the complete system at default sizes.
//
// The host side is a 50 MHz expansion bus with 50% overhead, so it moves at
// most one word every two cycles (25 MW/s). The system is expected to keep up
// with that during DC activity, and to reach the average of 11.6 MW/s of
// synchronous host traffic. This testbench
//   1. writes four 63-word DC_Write commands, each to one DPU on both sides
//      (260 host words), one word every two cycles, and checks that CMD_RDY
//      never holds the host off, so the host keeps its full 25 MW/s, and that
//      the last word reaches the DSP memories no more than 80 cycles after
//      the host has written it (this bound is this design's choice);
//   2. issues a DC_Read of 63 words from four DPUs (252 data words) and
//      reads the block back one word every two cycles, checking the data and
//      that the time from the command to the last word gives at least
//      11.6 MW/s (0.232 words per cycle at 50 MHz).
// Memories have a one-cycle read latency and no wait states.
`timescale 1ns/1ps
module tb_dc_bandwidth;
  import dc_pkg::*;
  localparam int NDPU = 12;
  logic clk = 1'b0;
  logic rst_n;
  always #10 clk = ~clk;     // 50 MHz

  logic [3:0]  xce = '0;
  logic [5:2]  xa = '0;
  logic        xwe = 1'b0, xre = 1'b0;
  logic [31:0] xd_in = '0, xd_out;
  logic        cmd_rdy, ret_rdy, hpu_fault, hpu_led;
  logic [NDPU-1:0] mem_req, mem_we, dsp_reset_n, dsp_be, dsp_int, dpu_fault, dpu_led;
  logic [NDPU-1:0] mem_ready = '1;
  logic [31:0] mem_addr [NDPU];
  logic [31:0] mem_wdata [NDPU];
  logic [31:0] mem_rdata [NDPU];

  dc_system dut (
    .clk, .rst_n, .xce, .xa, .xwe, .xre, .xd_in, .xd_out,
    .cmd_rdy, .ret_rdy, .hpu_fault, .hpu_led,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready,
    .dsp_reset_n, .dsp_big_endian(dsp_be), .dsp_interrupt(dsp_int), .dpu_fault, .dpu_led
  );

  logic [31:0] mem [NDPU][1024];
  int          writes_seen;
  always @(posedge clk) begin
    for (int i = 0; i < NDPU; i++) begin
      if (mem_req[i] && mem_we[i]) begin
        mem[i][mem_addr[i][11:2]] <= mem_wdata[i];
        writes_seen++;
      end
      mem_rdata[i] <= mem[i][mem_addr[i][11:2]];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %08h expected %08h", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one expansion-bus access every two cycles
  task automatic xb_wr(input int ce, input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); xce = 4'(1 << ce); xa = a; xwe = 1'b1; xd_in = d;
    @(negedge clk); xce = '0; xwe = 1'b0;
  endtask
  task automatic xb_rd(input int ce, input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); xce = 4'(1 << ce); xa = a; xre = 1'b1;
    @(negedge clk); xce = '0; xre = 1'b0; d = xd_out;
  endtask
  task automatic dc_reg_wr(input logic [4:0] idx, input logic [31:0] v);
    logic [31:0] r;
    xb_wr(1, 4'h3, v);
    xb_wr(1, 4'h4, {15'b0, 1'b1, 11'b0, idx});
    do xb_rd(1, 4'h4, r); while (r != 0);
  endtask
  function automatic logic [31:0] mark(input int n);
    return make_cmd(4'(CMD_MARKRET), 6'd0, 8'(n >> 8), 8'(n));
  endfunction

  int unsigned cyc;
  always @(posedge clk) cyc++;

  logic [31:0] data [4][63];
  logic [31:0] c, v;
  int unsigned t0, t1, stalls;
  initial begin
    cyc = 0; writes_seen = 0;
    for (int i = 0; i < NDPU; i++) for (int j = 0; j < 1024; j++) mem[i][j] = '0;
    rst_n = 1'b1; #1 rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    dc_reg_wr(5'h00, 32'h3000_0000);                    // side A RunNormal
    dc_reg_wr(5'h08, 32'h3000_0000);                    // side B RunNormal
    // release the DSPs
    c = make_cmd(4'(CMD_WRREG), 6'd1, 8'h3F, 8'h3F);
    xb_wr(2, 4'h0, mark(1)); xb_wr(2, 4'h0, c); xb_wr(2, 4'h0, 32'h1);
    while (!ret_rdy) @(negedge clk);
    xb_rd(2, 4'h0, v); check("wrreg status", v, 32'h0);

    // ---- 1: 250 data words written at 25 MW/s ----
    xb_wr(2, 4'h0, mark(4));    // the four write statuses
    stalls = 0;
    writes_seen = 0;
    t0 = cyc;
    for (int k = 0; k < 4; k++) begin
      // targets: side A DPU k and side B DPU k, 63 words each
      if (!cmd_rdy) stalls++;
      while (!cmd_rdy) @(negedge clk);
      c = make_cmd(4'(CMD_WRITE), 6'd63, 8'(1 << k), 8'(1 << k));
      xb_wr(2, 4'h0, c);
      xb_wr(2, 4'h0, 32'h0);
      for (int i = 0; i < 63; i++) begin
        data[k][i] = $urandom;
        xb_wr(2, 4'h0, data[k][i]);
      end
    end
    check("host never held off by CMD_RDY", stalls, 0);
    while (writes_seen < 4 * 2 * 63 && cyc - t0 < 5000) @(negedge clk);
    t1 = cyc - t0;
    $display("write: 260 host words, last data in memory after %0d cycles", t1);
    checks++;
    if (t1 > 2 * 260 + 80) begin
      failures++;
      $display("FAIL write data reached memory %0d cycles after the host", t1 - 2 * 260);
    end
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 63; i++) begin
        check("side A memory", mem[k][i], data[k][i]);
        check("side B memory", mem[6 + k][i], data[k][i]);
      end
    // ---- 2: DC_Read of 4 x 63 words, rate at least 11.6 MW/s ----
    while (!ret_rdy) @(negedge clk);
    for (int k = 0; k < 4; k++) begin xb_rd(2, 4'h0, v); check("write status", v, 32'h0); end

    c = make_cmd(4'(CMD_READ), 6'd63, 8'h00, 8'h0F);
    t0 = cyc;
    xb_wr(2, 4'h0, mark(4 * 63 + 1)); xb_wr(2, 4'h0, c); xb_wr(2, 4'h0, 32'h0);
    while (!ret_rdy && cyc - t0 < 5000) @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 63; i++) begin
        xb_rd(2, 4'h0, v);
        check("read data", v, data[k][i]);
      end
    xb_rd(2, 4'h0, v); check("read status", v, 32'h0);
    t1 = cyc - t0;
    $display("read: 252 words in %0d cycles = %0d.%0d MW/s at 50 MHz", t1,
             252 * 50 / t1, (252 * 500 / t1) % 10);
    checks++;
    if (252 * 1000 < 232 * t1) begin
      failures++;
      $display("FAIL read rate below 11.6 MW/s");
    end
    check("no fault", 32'(hpu_fault), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
