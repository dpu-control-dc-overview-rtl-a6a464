// tb_dc_fpga: the DC FPGA with two DPU XB FPGAs (IDs 0 and 1) on each of its
// DC buses; the testbench is the HPU side of the DCH bus.
// Checked: global and side register access over DCH, DC_StdTest
// auto-increment, the DCH read timing (answer two cycles after the request,
// rdav_n low only then), an empty Return FIFO read answering rdav_n high,
// rstat, invalid command words and DC_Pad/DC_MarkReturn being dropped (with
// the invalid-command status bit), DC_WriteRegister, DC_Write and DC_Read to
// targets on both sides with the merged return stream (side A data, side B
// data, combined status word {B, A}; command words are not forwarded).
`timescale 1ns/1ps
module tb_dc_fpga;
  import dc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [4:0]  dch_a = 0;
  logic        dch_wr_n = 1, dch_rd_n = 1;
  logic [31:0] dch_d_in = 0, dch_d_out;
  logic        dch_d_oe, dch_rdav_n, dch_cstat, dch_rstat, dch_dcstat;
  logic [10:0] dcc_out [2], dcc_bus [2];
  logic        dcc_oe [2], dc_dcd_oe [2];
  logic [31:0] dc_dcd_out [2], dcd_bus [2];

  dc_fpga dut (
    .clk, .rst_n, .dch_a, .dch_wr_n, .dch_rd_n, .dch_d_in, .dch_d_out, .dch_d_oe,
    .dch_rdav_n, .dch_cstat, .dch_rstat, .dch_dcstat,
    .a_dcc_out(dcc_out[0]), .a_dcc_oe(dcc_oe[0]), .a_dcc_in(dcc_bus[0]),
    .a_dcd_out(dc_dcd_out[0]), .a_dcd_oe(dc_dcd_oe[0]), .a_dcd_in(dcd_bus[0]),
    .b_dcc_out(dcc_out[1]), .b_dcc_oe(dcc_oe[1]), .b_dcc_in(dcc_bus[1]),
    .b_dcd_out(dc_dcd_out[1]), .b_dcd_oe(dc_dcd_oe[1]), .b_dcd_in(dcd_bus[1])
  );

  localparam int ND = 4;   // index = side * 2 + id
  logic [31:0] d_out [ND], d_oe [ND], mem_addr [ND], mem_wdata [ND], mem_rdata [ND];
  logic [ND-1:0] mem_req, mem_we, rstn_dsp, be, intr, flt, led;
  logic [31:0] mem [ND][1024];
  for (genvar i = 0; i < ND; i++) begin : g_dpu
    dpu_xb u_dpu (
      .clk, .rst_n, .id(3'(i % 2)), .dcc_in(dcc_bus[i / 2]), .dcd_in(dcd_bus[i / 2]),
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
  always_comb
    for (int s = 0; s < 2; s++) begin
      logic [31:0] val, oe;
      val = dc_dcd_oe[s] ? dc_dcd_out[s] : '0;
      oe  = {32{dc_dcd_oe[s]}};
      for (int j = 0; j < 2; j++) begin
        val |= d_out[2*s+j] & d_oe[2*s+j];
        oe  |= d_oe[2*s+j];
      end
      dcd_bus[s] = val | ~oe;
      dcc_bus[s] = dcc_oe[s] ? dcc_out[s] : '1;
    end

  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic dch_wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); dch_a = a; dch_wr_n = 0; dch_d_in = d;
    @(negedge clk); dch_wr_n = 1;
  endtask
  // read: request in cycle t, answer valid in t+2 only
  task automatic dch_rd(input logic [4:0] a, output logic [31:0] d, output logic valid);
    @(negedge clk); dch_a = a; dch_rd_n = 0;
    @(negedge clk); dch_rd_n = 1;
    chk("rdav_n not early", 32'(dch_rdav_n), 1);
    @(negedge clk);
    d = dch_d_out; valid = !dch_rdav_n;
    chk("data bus driven", 32'(dch_d_oe), 1);
  endtask
  task automatic expect_stream(input string s, input logic [31:0] e [$]);
    logic [31:0] d;
    logic v;
    int t;
    foreach (e[i]) begin
      t = 0;
      do begin dch_rd(DCH_FIFO_ADDR, d, v); t++; end while (!v && t < 2000);
      chk($sformatf("%s word %0d", s, i), d, e[i]);
    end
  endtask

  logic [31:0] v, c, e [$];
  logic ok;
  initial begin
    for (int i = 0; i < ND; i++) for (int j = 0; j < 1024; j++) mem[i][j] = $urandom;
    rst_n = 1; #1 rst_n = 0;
    repeat (4) @(posedge clk); rst_n = 1;
    // registers
    dch_wr(5'h13, {8'h00, 4'd4, 4'd8, 16'd300});
    dch_rd(5'h13, v, ok); chk("DCR_Control", v, 32'h0048_012C); chk("reg read valid", 32'(ok), 1);
    dch_rd(5'h14, v, ok); chk("failure value reset", v, 32'hDEAD_BEEF);
    dch_wr(5'h00, 32'h3000_0000);
    dch_wr(5'h08, 32'h3000_0000);
    dch_rd(5'h08, v, ok); chk("side B control", v, 32'h3000_0000);
    dch_wr(5'h1F, 32'd7);
    dch_rd(5'h1F, v, ok); chk("std test", v, 7);
    dch_rd(5'h1F, v, ok); chk("std test increments", v, 8);
    // empty Return FIFO
    dch_rd(DCH_FIFO_ADDR, v, ok); chk("empty read not valid", 32'(ok), 0);
    chk("rstat idle", 32'(dch_rstat), 0);
    chk("cstat idle", 32'(dch_cstat), 0);
    // invalid word, pad and mark are dropped
    dch_wr(DCH_FIFO_ADDR, 32'h1234_5678);
    dch_wr(DCH_FIFO_ADDR, make_cmd(4'(CMD_PAD), 6'd0, 8'h0, 8'h0));
    dch_wr(DCH_FIFO_ADDR, make_cmd(4'(CMD_MARKRET), 6'd0, 8'h0, 8'd2));
    repeat (30) @(negedge clk);
    chk("nothing returned", 32'(dch_rstat), 0);
    dch_rd(5'h1C, v, ok); chk("invalid command bit", 32'(v[24]), 1);
    chk("dcstat on fault", 32'(dch_dcstat), 1);
    // DC_WriteRegister on both sides
    c = make_cmd(4'(CMD_WRREG), 6'd1, 8'h03, 8'h03);
    dch_wr(DCH_FIFO_ADDR, c); dch_wr(DCH_FIFO_ADDR, 32'h1);
    repeat (40) @(negedge clk);
    chk("rstat with data", 32'(dch_rstat), 1);
    expect_stream("wrreg", '{32'h0});
    chk("DSPs running", 32'(rstn_dsp), 32'hF);
    // DC_Write A0, B1 then read back A0, A1, B1
    c = make_cmd(4'(CMD_WRITE), 6'd6, 8'h02, 8'h01);
    dch_wr(DCH_FIFO_ADDR, c); dch_wr(DCH_FIFO_ADDR, 32'h200);
    for (int i = 0; i < 6; i++) dch_wr(DCH_FIFO_ADDR, 32'hAB00 + i);
    expect_stream("write", '{32'h0});
    repeat (20) @(negedge clk);
    c = make_cmd(4'(CMD_READ), 6'd6, 8'h02, 8'h03);
    e.delete();
    for (int i = 0; i < 6; i++) e.push_back(32'hAB00 + i);
    for (int i = 0; i < 6; i++) e.push_back(mem[1][128 + i]);
    for (int i = 0; i < 6; i++) e.push_back(32'hAB00 + i);
    e.push_back(32'h0);
    dch_wr(DCH_FIFO_ADDR, c); dch_wr(DCH_FIFO_ADDR, 32'h200);
    expect_stream("read", e);
    dch_rd(5'h1B, v, ok); chk("return processor command count", v, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
