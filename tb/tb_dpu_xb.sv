// tb_dpu_xb: the testbench plays the DC side of one DC bus and drives a single
// DPU XB FPGA slot by slot with exact bus timing: an opcode placed on DCC in
// slot t has its write data driven on DCD in slot t+3 and its read data / flags
// sampled from DCD in slot t+3. A behavioural DSP memory with random wait
// states sits on the memory port.
// Checked: register write/read-back, the write-address window check, DC_Write
// into memory, DC_Verify (match and mismatch with the error address captured),
// DC_Read fetch -> flags RR "ready" -> read_fifo readout with the right data,
// the fetch latency bound, flags nibble position, the misread (short readout)
// fault, capture_next_dcc, the almost-full flag on a nearly full command FIFO,
// DC_Interrupt, the soft reset, and the control bits that disable DSP RAM
// writes, disable DSP RAM reads (a fetch stays pending) and override the flags,
// and the LED (manual, and on a register read for its minimum on time).
`timescale 1ns/1ps
module tb_dpu_xb;
  import dc_pkg::*;
  localparam logic [2:0] ID = 3'd2;
  logic clk = 0, rst_n;
  logic [10:0] dcc;
  logic [31:0] dcd_bus, dcd_out, dcd_oe, tb_d, tb_oe;
  logic mem_req, mem_we, mem_ready, dsp_reset_n, dsp_big_endian, dsp_interrupt, fault, led;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  always #5 clk = ~clk;

  dpu_xb #(.CLKS_PER_MS(10)) dut (.clk, .rst_n, .id(ID), .dcc_in(dcc), .dcd_in(dcd_bus), .dcd_out, .dcd_oe,
              .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready,
              .dsp_reset_n, .dsp_big_endian, .dsp_interrupt, .fault, .led);

  always_comb for (int b = 0; b < 32; b++)
    dcd_bus[b] = dcd_oe[b] ? dcd_out[b] : (tb_oe[b] ? tb_d[b] : 1'b1);

  // DSP memory: one-cycle read latency, random wait states
  logic [31:0] mem [logic [31:0]];
  int ints = 0;
  logic mem_hold = 0;
  always @(posedge clk) begin
    if (mem_req && mem_ready && mem_we) mem[mem_addr] = mem_wdata;
    if (mem_req && mem_ready && !mem_we) mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : 32'hBAD0_0000;
    mem_ready <= !mem_hold && ($urandom % 4 != 0);
    if (dsp_interrupt) ints++;
  end

  int checks = 0, failures = 0;
  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", s, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // slot engine: ops[t] drives DCC in slot t; write data goes out in t+3,
  // read data is sampled in t+3.
  logic [10:0] ops [$];
  logic [31:0] wds [$];
  logic        isw [$];
  logic [31:0] rds [$];
  task automatic run();
    int n;
    n = ops.size();
    rds.delete();
    for (int t = 0; t < n + 3; t++) begin
      @(negedge clk);
      dcc   = (t < n) ? ops[t] : DCC_NOP;
      tb_oe = '0; tb_d = '0;
      if (t >= 3 && isw[t-3]) begin tb_oe = '1; tb_d = wds[t-3]; end
      #1;
      if (t >= 3) rds.push_back(dcd_bus);
    end
    @(negedge clk); tb_oe = '0;
    ops.delete(); wds.delete(); isw.delete();
  endtask
  task automatic op(input logic [10:0] o, input logic [31:0] d = '0, input logic w = 0);
    ops.push_back(o); wds.push_back(d); isw.push_back(w);
  endtask
  task automatic wreg(input logic [3:0] r, input logic [31:0] d);
    op(dcc_write(6'(1 << ID), r), d, 1); run();
  endtask
  task automatic rreg(input logic [3:0] r, output logic [31:0] d);
    op(dcc_read(ID, r)); run(); d = rds[0];
  endtask
  task automatic wfifo(input logic [31:0] words []);
    foreach (words[i]) op(dcc_write(6'(1 << ID), 4'd0), words[i], 1);
    run();
  endtask
  task automatic flags(output logic [3:0] f);
    op(DCC_DRIVE_FLAGS); run(); f = rds[0][4*ID +: 4];
  endtask

  logic [31:0] v, st;
  logic [3:0] f;
  initial begin
    rst_n = 1; #1 rst_n = 0; dcc = DCC_NOP; tb_d = 0; tb_oe = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // registers
    wreg(4'd1, 32'h0000_0003);
    rreg(4'd1, v); chk("ctrl readback", v, 32'h3);
    chk("dsp reset released", 32'(dsp_reset_n), 1);
    chk("big endian", 32'(dsp_big_endian), 1);
    rreg(4'd4, v); chk("wr_hi reset value", v, 32'hFFFF_FFFC);
    wreg(4'd3, 32'h0000_1000); wreg(4'd4, 32'h0000_1FFC);
    rreg(4'd3, v); chk("wr_lo", v, 32'h1000);
    flags(f); chk("idle flags", 32'(f), 32'h0);
    // DC_Write 4 words
    wfifo('{make_cmd(4'(CMD_WRITE), 6'd4, 8'h0, 8'(1 << ID)), 32'h1100,
            32'h11, 32'h22, 32'h33, 32'h44});
    repeat (40) @(posedge clk);
    for (int i = 0; i < 4; i++) chk("mem write", mem[32'h1100 + 4*i], 32'h11 * (i + 1));
    // DC_Verify match then mismatch
    wfifo('{make_cmd(4'(CMD_VERIFY), 6'd2, 8'h0, 8'(1 << ID)), 32'h1100, 32'h11, 32'h22});
    repeat (40) @(posedge clk);
    rreg(4'd2, st); chk("verify ok", 32'(st[24]), 0);
    wfifo('{make_cmd(4'(CMD_VERIFY), 6'd2, 8'h0, 8'(1 << ID)), 32'h1100, 32'h11, 32'h99});
    repeat (40) @(posedge clk);
    rreg(4'd2, st); chk("verify error", 32'(st[24]), 1);
    rreg(4'd7, v);  chk("verify error address", v, 32'h1104);
    wreg(4'd7, 32'h0);
    rreg(4'd2, st); chk("verify error cleared", 32'(st[24]), 0);
    // DC_Read 5 words: poll, then read out
    begin
      int polls, t0, lat;
      wfifo('{make_cmd(4'(CMD_READ), 6'd5, 8'h0, 8'(1 << ID)), 32'h1100});
      t0 = $time;
      polls = 0;
      do begin flags(f); polls++; end while (f[3:2] != 2'b10 && polls < 200);
      lat = ($time - t0) / 10;
      chk("fetch becomes ready", 32'(f[3:2]), 32'h2);
      checks++;
      if (lat > 60) begin failures++; $display("FAIL fetch latency %0d cycles", lat); end
      for (int i = 0; i < 5; i++) op(dcc_read(ID, 4'd0));
      op(DCC_NOP);
      run();
      for (int i = 0; i < 4; i++) chk("read data", rds[i], 32'h11 * (i + 1));
      chk("read data 5", rds[4], 32'hBAD0_0000);
      flags(f); chk("flags after readout", 32'(f), 32'h0);
      chk("no fault", 32'(fault), 0);
    end
    // write outside the window -> fatal execute fault with checks enabled
    // (tested later); first a short readout -> misread
    wfifo('{make_cmd(4'(CMD_READ), 6'd3, 8'h0, 8'(1 << ID)), 32'h1100});
    repeat (60) @(posedge clk);
    op(dcc_read(ID, 4'd0)); op(dcc_read(ID, 4'd0)); op(DCC_NOP); op(DCC_DRIVE_FLAGS); run();
    chk("misread flags", 32'(rds[3][4*ID +: 4] >> 2), 32'h3);
    chk("misread fault", 32'(fault), 1);
    // soft reset clears it
    wreg(4'd1, 32'h0000_000B);
    rreg(4'd2, st); chk("soft reset clears status", st, 32'h0);
    // capture_next_dcc
    op(DCC_CAPTURE); op(11'h5A5); run();
    rreg(4'd7, v); chk("capture next dcc", v, 32'h5A5);
    // DC_Interrupt
    wfifo('{make_cmd(4'(CMD_INTR), 6'd0, 8'h0, 8'(1 << ID)), 32'h0});
    repeat (20) @(posedge clk);
    chk("interrupt", 32'(ints), 1);
    // address check: C bit on, write outside window -> fatal
    wreg(4'd1, 32'h0000_0103);
    wfifo('{make_cmd(4'(CMD_WRITE), 6'd1, 8'h0, 8'(1 << ID)), 32'h4000, 32'h1});
    repeat (30) @(posedge clk);
    flags(f); chk("fatal flags", 32'(f[1:0]), 32'(CC_FATAL));
    chk("write blocked", 32'(mem.exists(32'h4000)), 0);
    wreg(4'd1, 32'h0000_000B);
    // almost full: the DSP holds off memory accesses while three maximum
    // size DC_Write commands (195 words) are pushed
    wreg(4'd1, 32'h0000_0003);
    begin
      logic [31:0] w [];
      w = new[3 * 65];
      for (int k = 0; k < 3; k++) begin
        w[65*k] = make_cmd(4'(CMD_WRITE), 6'd63, 8'h0, 8'(1 << ID));
        w[65*k+1] = 32'h2000;
        for (int i = 0; i < 63; i++) w[65*k+2+i] = i;
      end
      foreach (w[i]) op(dcc_write(6'(1 << ID), 4'd0), w[i], 1);
      op(DCC_DRIVE_FLAGS);
      mem_hold = 1;
      run();
      mem_hold = 0;
      chk("almost full flag", 32'(rds[rds.size()-1][4*ID +: 2]), 32'(CC_AF));
      repeat (600) @(posedge clk);
      flags(f); chk("almost full clears", 32'(f[1:0]), 0);
      chk("no fault after burst", 32'(fault), 0);
    end
    // failure-recovery test bits
    wreg(4'd1, 32'h0000_0203);                      // RAM writes disabled
    wfifo('{make_cmd(4'(CMD_WRITE), 6'd2, 8'h0, 8'(1 << ID)), 32'h3000, 32'h77, 32'h78});
    repeat (30) @(posedge clk);
    chk("write disabled", 32'(mem.exists(32'h3000) || mem.exists(32'h3004)), 0);
    flags(f); chk("write disabled: flags idle", 32'(f), 0);
    wreg(4'd1, 32'h0000_B803);                      // flags overridden with 1011
    flags(f); chk("flag override", 32'(f), 32'hB);
    wreg(4'd1, 32'h0000_0403);                      // RAM reads disabled
    wfifo('{make_cmd(4'(CMD_READ), 6'd2, 8'h0, 8'(1 << ID)), 32'h1100});
    repeat (60) @(posedge clk);
    flags(f); chk("read disabled: fetch never ready", 32'(f[3:2]), 32'(RR_PE));
    wreg(4'd1, 32'h0000_000B);
    flags(f); chk("soft reset ends the stuck fetch", 32'(f), 0);
    wfifo('{make_cmd(4'(CMD_WRITE), 6'd1, 8'h0, 8'(1 << ID)), 32'h3000, 32'h79});
    repeat (30) @(posedge clk);
    chk("write enabled again", mem[32'h3000], 32'h79);
    // LED (1 ms = 10 clocks here): manual, then a register read with a
    // minimum on time of 3 ms
    chk("LED off", 32'(led), 0);
    wreg(4'd1, 32'h0100_0003);                      // M: manual
    repeat (6) @(posedge clk);
    chk("LED manual on", 32'(led), 1);
    wreg(4'd1, 32'h0203_0003);                      // R enabled, L = 3 ms
    repeat (60) @(posedge clk);
    chk("LED off after manual", 32'(led), 0);
    begin
      int t_on;
      rreg(4'd5, v);
      @(posedge clk);
      chk("LED on after a register read", 32'(led), 1);
      t_on = 0;
      while (led && t_on < 200) begin @(posedge clk); t_on++; end
      checks++;
      if (t_on < 28 || t_on > 40) begin
        failures++;
        $display("FAIL LED on for %0d clocks, expected 3 ms (28-40 after the first check)", t_on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
