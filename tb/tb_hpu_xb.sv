// tb_hpu_xb: the HPU XB FPGA between a DSP expansion-bus driver and a
// behavioural DC FPGA on the DCH bus. The DC model answers DCH reads two
// cycles after the request, keeps a register file and echoes every command
// word it receives (except DC_Pad / DC_MarkReturn) into its return stream.
// Checked: user registers and StdTest auto-increment, RegIndex register
// write and read of a DC register, the marked-block RET_RDY handshake with
// data through the DC, direct loopback, the loopback generator, the invalid
// command status bit, CMD_RDY falling when the Command FIFO cannot take a
// maximum command while the DC reports almost full, the DC fault bit, and
// the XCE0 soft reset.
`timescale 1ns/1ps
module tb_hpu_xb;
  import dc_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [3:0]  xce = 0;
  logic [5:2]  xa = 0;
  logic        xwe = 0, xre = 0;
  logic [31:0] xd_in = 0, xd_out;
  logic        cmd_rdy, ret_rdy, fault, led, dc_reset;
  logic [4:0]  dch_a;
  logic        dch_wr_n, dch_rd_n, dch_d_oe;
  logic [31:0] dch_d_out, dch_d_in;
  logic        dch_rdav_n, dch_cstat, dch_rstat, dch_dcstat;

  hpu_xb #(.CLKS_PER_MS(20)) dut (.*);

  // ---------------- behavioural DC FPGA ----------------
  logic [31:0] regs [32];
  logic [31:0] echo [$];
  logic [4:0]  a1;
  logic        wr1, rd1;
  logic [31:0] d1;
  logic        dc_af = 0, dc_flt = 0;
  int          fifo_words = 0;
  always @(posedge clk) begin
    a1 <= dch_a; wr1 <= !dch_wr_n; rd1 <= !dch_rd_n; d1 <= dch_d_out;
    dch_rdav_n <= 1'b1;
    if (wr1) begin
      if (a1 == DCH_FIFO_ADDR) begin
        fifo_words++;
        if (!(d1[31:28] inside {4'(CMD_PAD), 4'(CMD_MARKRET)})) echo.push_back(d1);
      end else regs[a1] = d1;
    end
    if (rd1) begin
      if (a1 == DCH_FIFO_ADDR) begin
        dch_rdav_n <= echo.size() == 0;
        dch_d_in   <= echo.size() != 0 ? echo.pop_front() : 32'hDEAD_BEEF;
      end else begin
        dch_rdav_n <= 1'b0;
        dch_d_in   <= regs[a1];
      end
    end
    dch_rstat  <= echo.size() != 0;
    dch_cstat  <= dc_af;
    dch_dcstat <= dc_flt;
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

  task automatic xb_wr(input int ce, input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); xce = 4'(1 << ce); xa = a; xwe = 1; xd_in = d;
    @(negedge clk); xce = 0; xwe = 0;
  endtask
  task automatic xb_rd(input int ce, input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); xce = 4'(1 << ce); xa = a; xre = 1;
    @(negedge clk); xce = 0; xre = 0; d = xd_out;
  endtask
  task automatic wait_ret(input string s);
    int t;
    t = 0;
    while (!ret_rdy && t < 2000) begin @(negedge clk); t++; end
    chk({s, " RET_RDY"}, 32'(ret_rdy), 1);
  endtask
  function automatic logic [31:0] mark(input int n);
    return make_cmd(4'(CMD_MARKRET), 6'd0, 8'(n >> 8), 8'(n));
  endfunction

  logic [31:0] v, nop1, nop2;
  initial begin
    for (int i = 0; i < 32; i++) regs[i] = 0;
    nop1 = make_cmd(4'(CMD_NOP), 6'd0, 8'h01, 8'h02);
    nop2 = make_cmd(4'(CMD_NOP), 6'd0, 8'h04, 8'h08);
    rst_n = 1; #1 rst_n = 0;
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    chk("CMD_RDY after reset", 32'(cmd_rdy), 1);
    chk("RET_RDY after reset", 32'(ret_rdy), 0);
    xb_wr(1, 4'hF, 32'd41);
    xb_rd(1, 4'hF, v); chk("StdTest", v, 41);
    xb_rd(1, 4'hF, v); chk("StdTest increments", v, 42);
    // DC register access through RegIndex
    xb_wr(1, 4'h3, 32'h0048_012C);
    xb_wr(1, 4'h4, {15'b0, 1'b1, 11'b0, 5'h13});
    do xb_rd(1, 4'h4, v); while (v != 0);
    repeat (4) @(negedge clk);
    chk("DC register written", regs[5'h13], 32'h0048_012C);
    regs[5'h14] = 32'hCAFE_F00D;
    xb_wr(1, 4'h4, {14'b0, 2'b10, 11'b0, 5'h14});
    do xb_rd(1, 4'h4, v); while (v != 0);
    xb_rd(1, 4'h5, v); chk("RegRead", v, 32'hCAFE_F00D);
    // through the DC
    xb_wr(2, 4'h0, mark(2)); xb_wr(2, 4'h0, nop1); xb_wr(2, 4'h0, nop2);
    wait_ret("dc");
    xb_rd(2, 4'h0, v); chk("dc word 0", v, nop1);
    xb_rd(2, 4'h0, v); chk("dc word 1", v, nop2);
    repeat (2) @(negedge clk);
    chk("RET_RDY drops after block", 32'(ret_rdy), 0);
    // direct loopback
    xb_wr(1, 4'h1, 32'h1);
    xb_rd(1, 4'h1, v); chk("control", v, 32'h1);
    fifo_words = 0;
    xb_wr(2, 4'h0, mark(2)); xb_wr(2, 4'h0, nop2); xb_wr(2, 4'h0, nop1);
    wait_ret("direct loopback");
    xb_rd(2, 4'h0, v); chk("lb word 0", v, mark(2));
    xb_rd(2, 4'h0, v); chk("lb word 1", v, nop2);
    chk("nothing sent to DC", 32'(fifo_words), 0);
    // loopback generator; the soft reset drops the unmarked word left over
    xb_wr(0, 4'hA, 32'h0);
    xb_wr(1, 4'h1, 32'h3);
    xb_wr(2, 4'h0, mark(1)); xb_wr(2, 4'h0, nop1);
    wait_ret("generator");
    xb_rd(2, 4'h0, v); chk("gen status", v, 32'h0);
    // invalid command word
    xb_rd(1, 4'h2, v); chk("status clean", v, 32'h0);
    xb_wr(2, 4'h0, 32'h1234_5678);
    repeat (3) @(negedge clk);
    xb_rd(1, 4'h2, v); chk("invalid bit", 32'(v[2]), 1);
    chk("fault output", 32'(fault), 1);
    // soft reset through XCE0 address A clears it
    xb_wr(0, 4'hA, 32'h0);
    repeat (3) @(negedge clk);
    xb_rd(1, 4'h2, v); chk("soft reset clears status", v, 32'h0);
    // DC fault
    dc_flt = 1;
    repeat (4) @(negedge clk);
    xb_rd(1, 4'h2, v); chk("DC fault bit", 32'(v[12]), 1);
    dc_flt = 0;
    // CMD_RDY: DC almost full, Command FIFO fills
    xb_wr(1, 4'h1, 32'h0);
    dc_af = 1;
    repeat (4) @(negedge clk);
    begin
      int n;
      n = 0;
      while (cmd_rdy && n < 600) begin xb_wr(2, 4'h0, nop1); n++; end
      chk("CMD_RDY falls with room for less than 65 words", 32'(n), 511 - 65 + 1);
    end
    dc_af = 0;
    repeat (3000) @(negedge clk);
    chk("CMD_RDY back once drained", 32'(cmd_rdy), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
