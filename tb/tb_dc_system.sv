// tb_dc_system: end-to-end test of the whole DPU Control system at its
// default sizes.
//
// The testbench plays the host DSP on the expansion bus and models the
// twelve DPU DSP memories (1024 words each, one-cycle read latency, with a
// per-DPU wait-state input). A reference copy of every memory is kept
// independently; each command is preceded by a DC_MarkReturn with the number
// of return words expected, and the return block read after RET_RDY is
// compared word for word with the stream worked out from the command
// definitions. Mechanisms exercised and counted: register access through
// RegIndex, write bursts, readout with flag polling, terminal drive_flags,
// almost-full stall of a write, read timeout with FailureValue substitution,
// pause cycles when the return path backs up, DC_Verify mismatch, DC_Interrupt,
// HPU direct and simulated loopback, side RunLoopback, side test modes, and
// invalid-command detection.
`timescale 1ns/1ps
module tb_dc_system;
  import dc_pkg::*;

  localparam int NDPU = 12;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [3:0]  xce;
  logic [5:2]  xa;
  logic        xwe, xre;
  logic [31:0] xd_in, xd_out;
  logic        cmd_rdy, ret_rdy, hpu_fault, hpu_led;
  logic [NDPU-1:0] mem_req, mem_we, mem_ready, dsp_reset_n, dsp_be, dsp_int, dpu_fault, dpu_led;
  logic [31:0] mem_addr [NDPU];
  logic [31:0] mem_wdata [NDPU];
  logic [31:0] mem_rdata [NDPU];

  dc_system dut (
    .clk, .rst_n, .xce, .xa, .xwe, .xre, .xd_in, .xd_out,
    .cmd_rdy, .ret_rdy, .hpu_fault, .hpu_led,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready,
    .dsp_reset_n, .dsp_big_endian(dsp_be), .dsp_interrupt(dsp_int), .dpu_fault, .dpu_led
  );

  // ---------------- DSP memory models ----------------
  logic [31:0] mem [NDPU][1024];
  logic [31:0] refm [NDPU][1024];
  always @(posedge clk) begin
    for (int i = 0; i < NDPU; i++) begin
      if (mem_req[i] && mem_we[i]) mem[i][mem_addr[i][11:2]] <= mem_wdata[i];
      mem_rdata[i] <= mem[i][mem_addr[i][11:2]];
    end
  end

  int checks = 0, failures = 0;
  int n_poll = 0, n_pause = 0, n_af_stall = 0, n_timeout = 0, n_fill = 0, n_int = 0;
  int n_lb_direct = 0, n_lb_sim = 0, n_side_lb = 0, n_test = 0, n_verify = 0, n_invalid = 0;
  int n_regacc = 0, n_term_flags = 0;

  // mechanism monitors on the DC buses
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      if (dut.dcc_bus[s] == DCC_DRIVE_FLAGS) n_poll++;
      if (dut.dcc_bus[s] == DCC_PAUSE) n_pause++;
    end
    n_int += $countones(dsp_int);
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // ---------------- expansion bus tasks ----------------
  task automatic xb_wr(input int ce, input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    xce = 4'(1 << ce); xa = a; xwe = 1'b1; xd_in = d;
    @(negedge clk);
    xce = '0; xwe = 1'b0;
  endtask

  task automatic xb_rd(input int ce, input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    xce = 4'(1 << ce); xa = a; xre = 1'b1;
    @(negedge clk);
    xce = '0; xre = 1'b0;
    d = xd_out;
  endtask

  task automatic dc_reg_wr(input logic [4:0] idx, input logic [31:0] v);
    logic [31:0] r;
    xb_wr(1, 4'h3, v);
    xb_wr(1, 4'h4, {15'b0, 1'b1, 11'b0, idx});
    do xb_rd(1, 4'h4, r); while (r != 0);
    n_regacc++;
  endtask

  task automatic dc_reg_rd(input logic [4:0] idx, output logic [31:0] v);
    logic [31:0] r;
    xb_wr(1, 4'h4, {14'b0, 2'b10, 11'b0, idx});
    do xb_rd(1, 4'h4, r); while (r != 0);
    xb_rd(1, 4'h5, v);
    n_regacc++;
  endtask

  task automatic send(input logic [31:0] w);
    while (!cmd_rdy) @(negedge clk);
    xb_wr(2, 4'h0, w);
  endtask

  task automatic recv_check(input string what, input logic [31:0] exp [$]);
    logic [31:0] d;
    int t;
    t = 0;
    while (!ret_rdy && t < 200000) begin @(negedge clk); t++; end
    checks++;
    if (!ret_rdy) begin
      failures++;
      $display("FAIL %s: RET_RDY never rose", what);
      return;
    end
    foreach (exp[i]) begin
      xb_rd(2, 4'h0, d);
      check($sformatf("%s word %0d", what, i), d, exp[i]);
    end
  endtask

  function automatic logic [31:0] mark(input int n);
    return make_cmd(4'(CMD_MARKRET), 6'd0, 8'(n >> 8), 8'(n));
  endfunction

  // per-DPU index: side A targets 0-5, side B 6-11
  function automatic int dpu_of(input int side, input int t);
    return side * 6 + t;
  endfunction

  // Expected stream of a DC_Read, given the down list of each side.
  function automatic void exp_read(ref logic [31:0] q [$], input logic [31:0] c,
                                   input logic [31:0] addr, input int n,
                                   input logic [5:0] down_a, input logic [5:0] down_b,
                                   input logic [31:0] fv);
    for (int s = 0; s < 2; s++) begin
      logic [5:0] tm, dn;
      tm = (s == 0) ? c[5:0] : c[13:8];
      dn = (s == 0) ? down_a : down_b;
      for (int t = 0; t < 6; t++) if (tm[t]) begin
        for (int w = 0; w < n; w++)
          q.push_back(dn[t] ? fv : refm[dpu_of(s, t)][addr[11:2] + 10'(w)]);
      end
    end
    begin
      logic [15:0] sa, sb;
      sa = '0; sb = '0;
      for (int t = 0; t < 6; t++) begin
        if (c[t] && down_a[t]) sa[2*t +: 2] = ST_DPU_FATAL;
        if (c[8+t] && down_b[t]) sb[2*t +: 2] = ST_DPU_FATAL;
      end
      q.push_back({sb, sa});
    end
  endfunction

  task automatic do_write(input logic [3:0] op, input logic [7:0] tb_, input logic [7:0] ta,
                          input logic [31:0] addr, input int n, input logic [31:0] data [$],
                          input logic [15:0] exp_sa, input logic [15:0] exp_sb, input logic mk);
    logic [31:0] c;
    c = make_cmd(op, 6'(n), tb_, ta);
    send(mark(1));
    send(c);
    send(addr);
    for (int i = 0; i < n; i++) send(data[i]);
    if (op == 4'(CMD_WRITE))
      for (int s = 0; s < 2; s++)
        for (int t = 0; t < 6; t++)
          if (((s == 0) ? ta[t] : tb_[t]))
            for (int i = 0; i < n; i++) refm[dpu_of(s, t)][addr[11:2] + 10'(i)] = data[i];
    if (mk) recv_check("write", '{{exp_sb, exp_sa}});
  endtask

  logic [31:0] q [$];
  logic [31:0] data [$];
  logic [31:0] c, v;
  logic [5:0]  down_a, down_b;
  localparam logic [31:0] FV = 32'hDEAD_BEEF;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xce = '0; xa = '0; xwe = 0; xre = 0; xd_in = '0;
    mem_ready = '1;
    for (int i = 0; i < NDPU; i++)
      for (int j = 0; j < 1024; j++) begin
        mem[i][j]  = $urandom;
        refm[i][j] = mem[i][j];
      end
    down_a = '0; down_b = '0;
    rst_n = 1'b1; #1 rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---- configuration through RegIndex ----
    dc_reg_wr(5'h13, {8'h00, 4'd4, 4'd8, 16'd300});     // DCR_Control, T = 300
    dc_reg_rd(5'h13, v);
    check("DCR_Control readback", v, 32'h0048_012C);
    dc_reg_wr(5'h00, 32'h3000_0000);                    // side A RunNormal
    dc_reg_wr(5'h08, 32'h3000_0000);                    // side B RunNormal
    dc_reg_rd(5'h08, v);
    check("side B control", v, 32'h3000_0000);
    dc_reg_wr(5'h1F, 32'd5);
    dc_reg_rd(5'h1F, v); check("DC StdTest", v, 5);
    dc_reg_rd(5'h1F, v); check("DC StdTest increments", v, 6);

    // ---- DC_WriteRegister: start all DSPs ----
    c = make_cmd(4'(CMD_WRREG), 6'd1, 8'h3F, 8'h3F);
    send(mark(1)); send(c); send(32'h0000_0001);
    recv_check("wrreg", '{32'h0});
    check("DSPs released from reset", 32'(dsp_reset_n), 32'hFFF);

    // ---- DC_Write then DC_Read on A{0,1,2} B{0,5} ----
    data.delete();
    for (int i = 0; i < 20; i++) data.push_back($urandom);
    do_write(4'(CMD_WRITE), 8'h21, 8'h07, 32'h100, 20, data, 16'h0, 16'h0, 1'b1);
    c = make_cmd(4'(CMD_READ), 6'd20, 8'h21, 8'h07);
    q.delete(); exp_read(q, c, 32'h100, 20, down_a, down_b, FV);
    send(mark(q.size())); send(c); send(32'h100);
    recv_check("read", q);
    for (int i = 0; i < 20; i++) check("memory B5", mem[11][64 + i], data[i]);

    // ---- DC_ReadRegister status of A1 and B2 ----
    c = make_cmd(4'(CMD_RDREG), 6'd2, 8'h04, 8'h02);
    send(mark(3)); send(c);
    recv_check("rdreg", '{32'h0, 32'h0, 32'h0});

    // ---- DC_Verify mismatch on A0 ----
    data.delete();
    for (int i = 0; i < 4; i++) data.push_back(refm[0][64 + i]);
    data[3] = ~data[3];
    do_write(4'(CMD_VERIFY), 8'h00, 8'h01, 32'h100, 4, data, 16'h0, 16'h0, 1'b1);
    c = make_cmd(4'(CMD_RDREG), 6'd2, 8'h00, 8'h01);
    send(mark(2)); send(c);
    recv_check("verify flag", '{32'h0100_0000, 32'h0});
    c = make_cmd(4'(CMD_RDREG), 6'd7, 8'h00, 8'h01);
    send(mark(2)); send(c);
    recv_check("verify address", '{32'h0000_010C, 32'h0});
    n_verify++;

    // ---- DC_Interrupt, DC_Nop, DC_GetDC_Status ----
    c = make_cmd(4'(CMD_INTR), 6'd0, 8'h00, 8'h08);
    send(mark(1)); send(c); send(32'h0);
    recv_check("interrupt", '{32'h0});
    repeat (20) @(negedge clk);
    check("interrupt pulse seen", 32'(n_int >= 1), 1);
    c = make_cmd(4'(CMD_NOP), 6'd0, 8'h01, 8'h01);
    send(mark(1)); send(c);
    recv_check("nop", '{32'h0});
    c = make_cmd(4'(CMD_GETSTAT), 6'd0, 8'h00, 8'h01);
    send(mark(3)); send(c);
    recv_check("getstat", '{32'h0, 32'h0, 32'h0});

    // ---- read timeout: A4 never fetches ----
    mem_ready[4] = 1'b0;
    c = make_cmd(4'(CMD_READ), 6'd4, 8'h00, 8'h18);     // A3, A4
    q.delete(); down_a[4] = 1'b1;
    exp_read(q, c, 32'h180, 4, down_a, down_b, FV);
    send(mark(q.size())); send(c); send(32'h180);
    recv_check("read timeout", q);
    dc_reg_rd(5'h05, v);                                // side A DownStatus
    check("A4 read timeout recorded", v, 32'h1000_0000);
    n_timeout++; n_fill++;

    // ---- side test modes on side A ----
    dc_reg_wr(5'h00, 32'hC200_0000);                    // ReadDPU_Register reg 2 of A0
    repeat (20) @(negedge clk);
    dc_reg_rd(5'h03, v);
    check("test mode 12: A0 status", v, 32'h0100_0000);
    dc_reg_wr(5'h00, 32'hA000_0000);                    // DriveDPU_Flags
    repeat (20) @(negedge clk);
    dc_reg_rd(5'h03, v);
    check("test mode 10: flags", v, 32'hFF04_0000);     // A4 fetch pending, B side undriven
    dc_reg_wr(5'h00, 32'h3000_0000);
    n_test += 2;

    // ---- almost-full stall: B1 holds off its DSP bus ----
    dc_reg_wr(5'h13, {8'h00, 4'd4, 4'd8, 16'd5000});
    mem_ready[7] = 1'b0;
    fork
      begin
        for (int k = 0; k < 4; k++) begin
          data.delete();
          for (int i = 0; i < 63; i++) data.push_back($urandom);
          do_write(4'(CMD_WRITE), 8'h02, 8'h00, 32'h200 + 32'(k * 256), 63, data,
                   16'h0, 16'h0, 1'b0);
          q.delete();
        end
      end
      begin
        int p0;
        repeat (900) @(negedge clk);
        p0 = n_poll;
        repeat (200) @(negedge clk);
        if (n_poll - p0 > 10) n_af_stall++;             // still polling while AF
        mem_ready[7] = 1'b1;
      end
    join
    for (int k = 0; k < 4; k++)
      recv_check("write during AF stall", '{32'h0});
    c = make_cmd(4'(CMD_NOP), 6'd0, 8'h02, 8'h00);
    send(mark(1)); send(c);
    recv_check("nop after stall", '{32'h0});
    repeat (400) @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 63; i += 31)
        check("memory B1 after AF stall", mem[7][128 + k * 64 + i], refm[7][128 + k * 64 + i]);
    check("A-F stall observed", 32'(n_af_stall), 1);

    // ---- four large reads back to back: return path backs up, pauses ----
    begin
      logic [31:0] qs [4][$];
      int p0;
      p0 = n_pause;
      c  = make_cmd(4'(CMD_READ), 6'd63, 8'h00, 8'h2F);
      for (int k = 0; k < 4; k++) begin
        q.delete();
        exp_read(q, c, 32'(k * 32'h200), 63, down_a, down_b, FV);
        qs[k] = q;
        send(mark(qs[k].size())); send(c); send(32'(k * 32'h200));
      end
      repeat (4000) @(negedge clk);
      for (int k = 0; k < 4; k++) recv_check($sformatf("big read %0d", k), qs[k]);
      check("pause cycles issued", 32'(n_pause > p0), 1);
    end

    // ---- side B RunLoopback: simulated data ----
    dc_reg_wr(5'h08, 32'h2000_0000);
    c = make_cmd(4'(CMD_READ), 6'd3, 8'h10, 8'h00);     // B4
    send(mark(4)); send(c); send(32'h40);
    recv_check("side loopback", '{32'h40, 32'h44, 32'h48, 32'h0});
    dc_reg_wr(5'h08, 32'h3000_0000);
    n_side_lb++;

    // ---- HPU direct loopback ----
    xb_wr(1, 4'h1, 32'h1);
    c = make_cmd(4'(CMD_NOP), 6'd0, 8'h00, 8'h01);
    send(mark(3)); send(make_cmd(4'(CMD_PAD), 6'd0, 8'h0, 8'h0)); send(c);
    recv_check("direct loopback", '{mark(3), make_cmd(4'(CMD_PAD), 6'd0, 8'h0, 8'h0), c});
    n_lb_direct++;

    // ---- HPU simulated normal operation ----
    xb_wr(1, 4'h1, 32'h3);
    c = make_cmd(4'(CMD_READ), 6'd2, 8'h01, 8'h03);
    send(mark(7)); send(c); send(32'h0);
    recv_check("simulated loopback", '{0, 1, 2, 3, 4, 5, 32'h0});
    xb_wr(1, 4'h1, 32'h0);
    n_lb_sim++;

    // ---- invalid command word ----
    send(32'h1234_5678);
    repeat (50) @(negedge clk);
    dc_reg_rd(5'h1C, v);
    check("DC status: invalid command", v & 32'h0100_0000, 32'h0100_0000);
    xb_rd(1, 4'h2, v);
    check("HPU status: invalid command", v & 32'h4, 32'h4);
    check("HPU FAULT pin", 32'(hpu_fault), 1);
    n_invalid++;
    dc_reg_rd(5'h1B, v);
    checks++;
    if (v < 10) begin failures++; $display("FAIL RP command count %0d", v); end

    // ---- mechanism coverage ----
    n_term_flags = (n_poll > 0) ? 1 : 0;
    if (n_poll == 0)       begin failures++; $display("FAIL no drive_flags polling"); end
    if (n_pause == 0)      begin failures++; $display("FAIL no pause"); end
    if (n_af_stall == 0)   begin failures++; $display("FAIL no AF stall"); end
    if (n_timeout == 0)    begin failures++; $display("FAIL no timeout"); end
    if (n_int == 0)        begin failures++; $display("FAIL no interrupt"); end
    if (n_regacc == 0)     begin failures++; $display("FAIL no register access"); end
    checks += 6;
    $display("mechanisms: polls=%0d pauses=%0d af_stall=%0d timeouts=%0d fills=%0d ints=%0d verify=%0d",
             n_poll, n_pause, n_af_stall, n_timeout, n_fill, n_int, n_verify);
    $display("mechanisms: lb_direct=%0d lb_sim=%0d side_lb=%0d tests=%0d invalid=%0d regacc=%0d",
             n_lb_direct, n_lb_sim, n_side_lb, n_test, n_invalid, n_regacc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
