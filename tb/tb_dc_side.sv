// tb_dc_side: one DC side on its own DC bus with five DPU XB FPGAs (IDs 0-4)
// and their DSP memories; slot 5 is left empty so its flags read back as
// all ones (absent). Commands are pushed into the side's command FIFO and
// the side's return stream is compared with the expected one.
// Checked: DC_WriteRegister, DC_Write into the memories, DC_Read readout data
// and its completion time, an absent target filled with the failure value and
// marked down (status code 01, DownStatus), DC_ReadRegister, DC_Nop,
// DC_GetDC_Status, the RunLoopback simulated data, the Float mode releasing
// DCC, register access, and drive_flags polling counted on the bus.
`timescale 1ns/1ps
module tb_dc_side;
  import dc_pkg::*;
  localparam logic [31:0] FV = 32'hDEAD_BEEF;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic        cmd_wr = 0, cmd_full, ret_rd, ret_empty, reg_we = 0, severe_fault;
  logic [31:0] cmd_data = 0, ret_data, reg_wdata = 0, reg_rdata;
  logic [2:0]  reg_addr = 0;
  logic [15:0] side_status;
  logic [10:0] dcc_out, dcc_bus;
  logic        dcc_oe, dc_dcd_oe;
  logic [31:0] dc_dcd_out, dcd_bus;

  dc_side #(.SIDE(0)) dut (
    .clk, .rst_n, .cmd_wr, .cmd_data, .cmd_full, .ret_rd, .ret_data, .ret_empty,
    .failure_value(FV), .timeout(16'd300),
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .side_status, .severe_fault,
    .dcc_out, .dcc_oe, .dcc_in(dcc_bus), .dcd_out(dc_dcd_out), .dcd_oe(dc_dcd_oe), .dcd_in(dcd_bus)
  );

  localparam int ND = 5;
  logic [31:0] d_out [ND], d_oe [ND], mem_addr [ND], mem_wdata [ND], mem_rdata [ND];
  logic [ND-1:0] mem_req, mem_we, rstn_dsp, be, intr, flt, led;
  logic [31:0] mem [ND][1024];
  for (genvar i = 0; i < ND; i++) begin : g_dpu
    dpu_xb u_dpu (
      .clk, .rst_n, .id(3'(i)), .dcc_in(dcc_bus), .dcd_in(dcd_bus),
      .dcd_out(d_out[i]), .dcd_oe(d_oe[i]),
      .mem_req(mem_req[i]), .mem_we(mem_we[i]), .mem_addr(mem_addr[i]),
      .mem_wdata(mem_wdata[i]), .mem_rdata(mem_rdata[i]), .mem_ready(1'b1),
      .dsp_reset_n(rstn_dsp[i]), .dsp_big_endian(be[i]), .dsp_interrupt(intr[i]), .fault(flt[i]), .led(led[i])
    );
  end
  always @(posedge clk)
    for (int i = 0; i < ND; i++) begin
      if (mem_req[i] && mem_we[i]) mem[i][mem_addr[i][11:2]] <= mem_wdata[i];
      mem_rdata[i] <= mem[i][mem_addr[i][11:2]];
    end

  always_comb begin
    logic [31:0] val, oe;
    val = dc_dcd_oe ? dc_dcd_out : '0;
    oe  = {32{dc_dcd_oe}};
    for (int j = 0; j < ND; j++) begin
      val |= d_out[j] & d_oe[j];
      oe  |= d_oe[j];
    end
    dcd_bus = val | ~oe;
    dcc_bus = dcc_oe ? dcc_out : '1;
  end

  int checks = 0, failures = 0, n_poll = 0;
  always @(posedge clk) if (dcc_bus == DCC_DRIVE_FLAGS) n_poll++;
  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // return stream collector
  logic [31:0] got [$];
  assign ret_rd = !ret_empty;
  always @(posedge clk) if (ret_rd) got.push_back(ret_data);

  task automatic send(input logic [31:0] w);
    @(negedge clk);
    while (cmd_full) @(negedge clk);
    cmd_wr = 1; cmd_data = w;
    @(negedge clk);
    cmd_wr = 0;
  endtask
  task automatic expect_stream(input string s, input logic [31:0] e [$], output int cyc);
    int t;
    t = 0;
    while (got.size() < e.size() && t < 20000) begin @(negedge clk); t++; end
    cyc = t;
    chk({s, " length"}, 32'(got.size()), 32'(e.size()));
    foreach (e[i]) if (i < got.size()) chk($sformatf("%s word %0d", s, i), got[i], e[i]);
    got.delete();
  endtask
  task automatic wreg(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rreg(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  logic [31:0] c, v, e [$];
  int cyc;
  initial begin
    for (int i = 0; i < ND; i++) for (int j = 0; j < 1024; j++) mem[i][j] = $urandom;
    rst_n = 1; #1 rst_n = 0;
    repeat (4) @(posedge clk); rst_n = 1;
    wreg(3'd0, 32'h3000_0000);
    rreg(3'd0, v); chk("side control", v, 32'h3000_0000);
    // DC_WriteRegister ctrl = 1 on all present DPUs
    c = make_cmd(4'(CMD_WRREG), 6'd1, 8'h0, 8'h1F);
    send(c); send(32'h1);
    expect_stream("wrreg", '{c, 32'h0}, cyc);
    repeat (5) @(negedge clk);
    chk("DSPs out of reset", 32'(rstn_dsp), 32'h1F);
    // DC_Write 10 words to 0,1,2
    c = make_cmd(4'(CMD_WRITE), 6'd10, 8'h0, 8'h07);
    send(c); send(32'h100);
    for (int i = 0; i < 10; i++) send(32'hC0DE_0000 + i);
    expect_stream("write", '{c, 32'h0}, cyc);
    repeat (50) @(negedge clk);
    for (int d = 0; d < 3; d++) for (int i = 0; i < 10; i++)
      chk("memory", mem[d][64 + i], 32'hC0DE_0000 + i);
    // DC_Read 10 words from 0,1,2 (plus 3, data never written)
    c = make_cmd(4'(CMD_READ), 6'd10, 8'h0, 8'h0F);
    e = '{c};
    for (int d = 0; d < 4; d++) for (int i = 0; i < 10; i++) e.push_back(mem[d][64 + i]);
    e.push_back(32'h0);
    n_poll = 0;
    send(c); send(32'h100);
    expect_stream("read", e, cyc);
    chk("read polls flags", 32'(n_poll >= 4), 1);
    $display("read: %0d cycles, %0d drive_flags", cyc, n_poll);
    checks++;
    if (cyc > 400) begin failures++; $display("FAIL read took %0d cycles", cyc); end
    // DC_Read including the absent slot 5
    c = make_cmd(4'(CMD_READ), 6'd4, 8'h0, 8'h21);
    e = '{c};
    for (int i = 0; i < 4; i++) e.push_back(mem[0][64 + i]);
    for (int i = 0; i < 4; i++) e.push_back(FV);
    e.push_back({20'h0, 2'b01, 10'h0});
    send(c); send(32'h100);
    expect_stream("read absent", e, cyc);
    rreg(3'd5, v); chk("down list", 32'(v[29:24] | v[21:16] | v[13:8] | v[5:0]), 32'h20);
    // a later command drops the down target
    c = make_cmd(4'(CMD_RDREG), 6'd1, 8'h0, 8'h21);
    send(c);
    expect_stream("rdreg", '{c, 32'h1, FV, {20'h0, 2'b01, 10'h0}}, cyc);
    wreg(3'd5, 32'h0);
    rreg(3'd5, v); chk("down list cleared", v, 32'h0);
    // Nop, GetDC_Status
    c = make_cmd(4'(CMD_NOP), 6'd0, 8'h0, 8'h01);
    send(c);
    expect_stream("nop", '{c, 32'h0}, cyc);
    c = make_cmd(4'(CMD_GETSTAT), 6'd0, 8'h0, 8'h01);
    send(c);
    while (got.size() < 3) @(negedge clk);
    chk("getstat cmd", got[0], c);
    got.delete();
    // RunLoopback: simulated data
    wreg(3'd0, 32'h2000_0000);
    c = make_cmd(4'(CMD_READ), 6'd3, 8'h0, 8'h03);
    send(c); send(32'h40);
    expect_stream("loopback", '{c, 32'h40, 32'h44, 32'h48, 32'h40, 32'h44, 32'h48, 32'h0}, cyc);
    // Float
    wreg(3'd0, 32'h1000_0000);
    repeat (3) @(negedge clk);
    chk("float releases DCC", 32'(dcc_oe), 0);
    chk("DCC pulled up", 32'(dcc_bus), 32'h7FF);
    chk("no severe fault", 32'(severe_fault), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
