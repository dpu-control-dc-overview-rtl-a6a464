// dc_side: one side (A or B) of the DC FPGA, master of one DC bus with up to
// six DPUs.
//
// Commands arrive from the DC FPGA's common command FIFO into this side's
// 256x32 Command FIFO. A command sequencer turns each command into DCC
// opcodes and DCD data words and produces this side's return stream (command
// word, data words, one 16-bit status word) in its 256x32 Return FIFO:
//   DC_Nop, DC_GetDC_Status  no bus traffic; status (and dc status) returned
//   DC_WriteRegister         write_register to all targets, data 3 cycles later
//   DC_ReadRegister          read_register to each target in turn
//   DC_Write/Verify/Interrupt/Read  queued in the targets' command FIFOs with a
//                            burst of write_fifo's, once no eligible target
//                            reports almost-full (AF)
//   DC_Read                  then read out each target in turn: poll the
//                            flags (drive_flags) until it is ready for readout
//                            (RR) or times out, burst N read_fifo's, pausing
//                            while the Return FIFO lacks room; FailureValue
//                            words stand in for down targets; a terminal
//                            drive_flags checks for misreads
// The side keeps its own copy of every DPU's AF and RR flags, refreshes it
// from every drive_flags answer, and issues a terminal drive_flags after a
// write burst once ten or more write_fifo's have gone out since the last
// refresh. A DPU whose flags show a fatal fault, or that times out (interval
// T of DCR_Control), joins the down list and is dropped from later targets.
// Test modes of DCR_SideControl (8 to 12) perform one bus test each time the
// register is written. In RunLoopback mode DCD input is ignored: every DPU
// appears ready and read data is simulated (address + 4 x word index).
//
// Timing: DCC is driven from an output flip-flop; an opcode issued in cycle t
// uses DCD in cycle t+3 and its answer is seen through the input flip-flop in
// t+4. A five-stage pipeline of issued operations lines answers up with
// their opcodes.
// Follows the document: opcodes, write and read strategy, flag codes, down
// list, status-word layout, side registers and control modes. This design's
// choices: commands run strictly in order (no deferred readout, so no RetCmd
// FIFO), flags are polled one drive_flags at a time, status code 01 marks
// any down target and 10 marks all targets when the side has a bus bit
// error, and writing DCR_DownStatus clears the detected down list.
module dc_side
  import dc_pkg::*;
#(
  parameter int unsigned SIDE      = 0,     // 0 = side A, 1 = side B
  parameter int unsigned CMD_DEPTH = 256,
  parameter int unsigned RET_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // command stream in
  input  logic        cmd_wr,
  input  logic [31:0] cmd_data,
  output logic        cmd_full,
  // return stream out
  input  logic        ret_rd,
  output logic [31:0] ret_data,
  output logic        ret_empty,
  // configuration from the DC FPGA global registers
  input  logic [31:0] failure_value,
  input  logic [15:0] timeout,
  // register access, A[2:0]
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic [15:0] side_status,
  output logic        severe_fault,
  // DC bus
  output logic [10:0] dcc_out,
  output logic        dcc_oe,
  input  logic [10:0] dcc_in,
  output logic [31:0] dcd_out,
  output logic        dcd_oe,
  input  logic [31:0] dcd_in
);
  localparam int unsigned CCW = $clog2(CMD_DEPTH + 1);
  localparam int unsigned RCW = $clog2(RET_DEPTH + 1);

  // ---------------- FIFOs ----------------
  logic        cf_pop, cf_empty, cf_ovf, cf_unf;
  logic [31:0] cf_head;
  logic [CCW-1:0] cf_count;
  dc_fifo #(.WIDTH(32), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .flush(1'b0),
    .wr_en(cmd_wr), .wr_data(cmd_data),
    .rd_en(cf_pop), .rd_data(cf_head),
    .empty(cf_empty), .full(cmd_full), .count(cf_count),
    .ovf(cf_ovf), .unf(cf_unf)
  );

  logic        rf_wr, rf_full, rf_ovf, rf_unf;
  logic [31:0] rf_wdata;
  logic [RCW-1:0] rf_count;
  dc_fifo #(.WIDTH(32), .DEPTH(RET_DEPTH)) u_ret_fifo (
    .clk, .rst_n, .flush(1'b0),
    .wr_en(rf_wr), .wr_data(rf_wdata),
    .rd_en(ret_rd), .rd_data(ret_data),
    .empty(ret_empty), .full(rf_full), .count(rf_count),
    .ovf(rf_ovf), .unf(rf_unf)
  );

  // ---------------- registers ----------------
  logic [3:0]  mode, test_reg;
  logic [5:0]  user_down, test_tgt;
  logic [31:0] test_in;
  logic [5:0]  dn_r, dn_w, dn_m, dn_f;
  logic [31:0] fault_dcd;
  logic [10:0] fault_dcc;
  logic        test_pending;
  logic [5:0]  down, eff_down;
  assign down     = dn_r | dn_w | dn_m | dn_f;
  assign eff_down = down | user_down;

  assign side_status  = {6'b0, |fault_dcc, |fault_dcd, 2'b0, eff_down};
  assign severe_fault = |fault_dcc || |fault_dcd;

  always_comb begin
    case (reg_addr)
      3'd0:    reg_rdata = {mode, test_reg, 10'b0, user_down, 2'b0, test_tgt};
      3'd3:    reg_rdata = test_in;
      3'd4:    reg_rdata = {16'b0, side_status};
      3'd5:    reg_rdata = {2'b0, dn_r, 2'b0, dn_w, 2'b0, dn_m, 2'b0, dn_f};
      3'd6:    reg_rdata = fault_dcd;
      3'd7:    reg_rdata = {21'b0, fault_dcc};
      default: reg_rdata = '0;
    endcase
  end

  logic run_mode, loopback;
  assign run_mode = (mode == 4'd2) || (mode == 4'd3);
  assign loopback = (mode == 4'd2);

  // ---------------- bus pipeline ----------------
  typedef enum logic [2:0] {
    K_NONE, K_WDATA, K_RDATA, K_FILL, K_FLAGS, K_CAPD, K_WCAPD, K_CAPC
  } kind_e;
  typedef struct packed {
    kind_e       kind;
    logic [10:0] dcc;
    logic [31:0] data;
  } pipe_t;

  pipe_t       pipe [5];
  pipe_t       issue;       // operation issued this cycle (registered into pipe[0])
  logic [31:0] dcd_iq;
  logic [10:0] dcc_iq;

  function automatic logic is_push(input kind_e k);
    return (k == K_RDATA) || (k == K_FILL);
  endfunction

  logic [3:0] push_inflight;
  logic       any_inflight;
  always_comb begin
    push_inflight = '0;
    any_inflight  = 1'b0;
    for (int i = 0; i < 5; i++) begin
      push_inflight += {3'b000, is_push(pipe[i].kind)};
      any_inflight  |= (pipe[i].kind != K_NONE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) pipe[i] <= '{kind: K_NONE, dcc: DCC_NOP, data: '0};
      dcc_out <= DCC_NOP;
      dcd_out <= '0;
      dcd_oe  <= 1'b0;
      dcd_iq  <= '0;
      dcc_iq  <= DCC_NOP;
    end else begin
      pipe[0] <= issue;
      for (int i = 1; i < 5; i++) pipe[i] <= pipe[i-1];
      dcc_out <= issue.dcc;
      dcd_out <= pipe[2].data;
      dcd_oe  <= (pipe[2].kind == K_WDATA) || (pipe[2].kind == K_WCAPD);
      dcd_iq  <= dcd_in;
      dcc_iq  <= dcc_in;
    end
  end
  assign dcc_oe = (mode != 4'd1);

  // Answers at stage 4.
  logic [5:0] fl_af, fl_rr, fl_cfatal, fl_rfatal;
  always_comb begin
    for (int k = 0; k < 6; k++) begin
      logic [3:0] nib;
      nib = loopback ? {RR_READY, 2'b00} : dcd_iq[4*k +: 4];
      fl_rr[k]     = (nib[3:2] == RR_READY);
      fl_rfatal[k] = (nib[3:2] == RR_FATAL);
      fl_af[k]     = (nib[1:0] == CC_AF);
      fl_cfatal[k] = (nib[1:0] == CC_FATAL);
    end
  end
  logic flags_ans;
  assign flags_ans = (pipe[4].kind == K_FLAGS);

  // ---------------- sequencer ----------------
  typedef enum logic [4:0] {
    S_IDLE, S_DEC, S_WRREG, S_RDREG, S_WAITLEN, S_AFCHK, S_AFWAIT, S_BURST,
    S_RD_TGT, S_RD_WAIT, S_RD_BURST, S_RD_FILL, S_RD_FINAL, S_RD_FINWAIT,
    S_OUT, S_TEST, S_TEST2, S_TDRAIN, S_DRAIN
  } seq_e;
  seq_e        st, after_out;
  logic [31:0] cmd;
  dc_cmd_e     cmd_c;
  logic [5:0]  cmd_n, tmask, elig;
  logic [6:0]  rem;           // words of the command still to send
  logic [6:0]  widx;          // index of the next word of the burst
  logic [2:0]  k;             // current readout / register target
  logic [5:0]  wcnt;          // words of the current target burst
  logic [31:0] rd_addr;
  logic [5:0]  af_int, rr_int;
  logic [4:0]  wf_count;
  logic [15:0] tmr;
  logic        tmr_clr, tmo;
  logic [31:0] outq [3];
  logic [1:0]  outq_n, outq_i;
  logic        seq_push;
  logic [31:0] seq_push_data;

  assign cmd_c = dc_cmd_e'(cmd[31:28]);
  assign cmd_n = cmd[21:16];
  assign tmask = (SIDE == 0) ? cmd[5:0] : cmd[13:8];
  assign elig  = tmask & ~eff_down;
  assign tmo   = (tmr >= timeout);
  logic need_poll;            // a flag refresh is due before the burst
  assign need_poll = ((elig & af_int) != '0) || (wf_count >= 5'd10);

  function automatic logic [15:0] status16(input logic [5:0] tm, input logic [5:0] dn,
                                           input logic sev);
    logic [15:0] s;
    s = '0;
    for (int i = 0; i < 6; i++)
      if (tm[i]) s[2*i +: 2] = sev ? ST_DC_FATAL : (dn[i] ? ST_DPU_FATAL : ST_OK);
    return s;
  endfunction

  logic room;      // the Return FIFO can take one more answer
  assign room = (32'(rf_count) + 32'(push_inflight) + 1) < RET_DEPTH;
  logic can_push;
  assign can_push = (push_inflight == '0) && !rf_full;

  // One return-FIFO write port: answers from the pipeline, else the sequencer.
  always_comb begin
    rf_wr    = 1'b0;
    rf_wdata = seq_push_data;
    if (pipe[4].kind == K_RDATA) begin
      rf_wr    = 1'b1;
      rf_wdata = loopback ? pipe[4].data : dcd_iq;
    end else if (pipe[4].kind == K_FILL) begin
      rf_wr    = 1'b1;
      rf_wdata = pipe[4].data;
    end else if (seq_push) begin
      rf_wr    = 1'b1;
    end
  end

  // Combinational part: what to issue and pop this cycle.
  always_comb begin
    issue         = '{kind: K_NONE, dcc: DCC_NOP, data: '0};
    cf_pop        = 1'b0;
    seq_push      = 1'b0;
    seq_push_data = outq[outq_i];
    tmr_clr       = 1'b0;
    case (st)
      S_IDLE: cf_pop = run_mode && !cf_empty && !test_pending;
      S_WRREG: if (!cf_empty) begin
        cf_pop = 1'b1;
        if (cmd_n[3:0] != 4'd0)
          issue = '{kind: K_WDATA, dcc: dcc_write(tmask, cmd_n[3:0]), data: cf_head};
      end
      S_RDREG: if (k < 3'd6 && tmask[k] && room) begin
        if (cmd_n[3:0] == 4'd0 || eff_down[k]) issue = '{kind: K_FILL, dcc: DCC_NOP, data: failure_value};
        else issue = '{kind: K_RDATA, dcc: dcc_read(k, cmd_n[3:0]), data: failure_value};
      end
      S_AFCHK: tmr_clr = 1'b1;
      S_AFWAIT: if (!any_inflight && need_poll && !tmo)
        issue = '{kind: K_FLAGS, dcc: DCC_DRIVE_FLAGS, data: '0};
      S_BURST: if (widx != rem) begin
        cf_pop = (widx != '0);
        if (elig != '0) issue = '{kind: K_WDATA, dcc: dcc_write(elig, 4'd0),
                                  data: (widx == '0) ? cmd : cf_head};
      end else if (wf_count >= 5'd10) begin
        issue = '{kind: K_FLAGS, dcc: DCC_DRIVE_FLAGS, data: '0};
      end
      S_RD_TGT: tmr_clr = 1'b1;
      S_RD_WAIT: if (!any_inflight && !rr_int[k] && !eff_down[k] && !tmo)
        issue = '{kind: K_FLAGS, dcc: DCC_DRIVE_FLAGS, data: '0};
      S_RD_BURST: begin
        if (wcnt != cmd_n) begin
          if (room) issue = '{kind: K_RDATA, dcc: dcc_read(k, 4'd0),
                              data: rd_addr + {24'b0, wcnt, 2'b00}};
          else issue = '{kind: K_NONE, dcc: DCC_PAUSE, data: '0};
        end
      end
      S_RD_FILL: if (wcnt != cmd_n && room)
        issue = '{kind: K_FILL, dcc: DCC_NOP, data: failure_value};
      S_RD_FINAL: issue = '{kind: K_FLAGS, dcc: DCC_DRIVE_FLAGS, data: '0};
      S_OUT: if (can_push) seq_push = 1'b1;
      S_TEST: begin
        case (mode)
          4'd8:  issue = '{kind: K_NONE, dcc: DCC_CAPTURE, data: '0};
          4'd9:  issue = '{kind: K_WCAPD, dcc: DCC_NOP, data: failure_value};
          4'd10: issue = '{kind: K_WDATA, dcc: DCC_NOP, data: '1};
          4'd11: issue = '{kind: K_WDATA, dcc: dcc_write(test_tgt, test_reg), data: failure_value};
          4'd12: issue = '{kind: K_CAPD, dcc: dcc_read(test_tgt[2:0], test_reg), data: '0};
          default: ;
        endcase
      end
      S_TEST2: begin
        if (mode == 4'd8)  issue = '{kind: K_CAPC, dcc: failure_value[10:0], data: '0};
        if (mode == 4'd10) issue = '{kind: K_CAPD, dcc: DCC_DRIVE_FLAGS, data: '0};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      after_out <= S_IDLE;
      cmd       <= '0;
      rem       <= '0;
      widx      <= '0;
      k         <= '0;
      wcnt      <= '0;
      rd_addr   <= '0;
      af_int    <= '0;
      rr_int    <= '0;
      wf_count  <= '0;
      tmr       <= '0;
      outq_n    <= '0;
      outq_i    <= '0;
      for (int i = 0; i < 3; i++) outq[i] <= '0;
      mode      <= 4'd0;
      test_reg  <= '0;
      user_down <= '0;
      test_tgt  <= '0;
      test_in   <= '0;
      test_pending <= 1'b0;
      {dn_r, dn_w, dn_m, dn_f} <= '0;
      fault_dcd <= '0;
      fault_dcc <= '0;
    end else begin
      tmr <= tmr_clr ? 16'd0 : (tmr == 16'hFFFF ? tmr : tmr + 1'b1);

      // register writes
      if (reg_we && reg_addr == 3'd0) begin
        mode      <= reg_wdata[31:28];
        test_reg  <= reg_wdata[27:24];
        user_down <= reg_wdata[13:8];
        test_tgt  <= reg_wdata[5:0];
        test_pending <= reg_wdata[31];
      end
      if (reg_we && reg_addr == 3'd5) {dn_r, dn_w, dn_m, dn_f} <= '0;

      // answers
      if (flags_ans) begin
        af_int   <= fl_af;
        rr_int   <= fl_rr;
        wf_count <= '0;
        dn_f     <= dn_f | fl_cfatal;
        dn_m     <= dn_m | fl_rfatal;
      end
      if (pipe[4].kind == K_CAPD || pipe[4].kind == K_WCAPD) test_in <= dcd_iq;
      if (pipe[1].kind == K_CAPC) test_in <= {21'b0, dcc_iq};
      if (pipe[4].kind == K_WDATA || pipe[4].kind == K_WCAPD)
        fault_dcd <= fault_dcd | (dcd_iq ^ pipe[4].data);
      if (dcc_oe) fault_dcc <= fault_dcc | (dcc_iq ^ pipe[1].dcc);

      case (st)
        S_IDLE: begin
          if (run_mode && !cf_empty && !test_pending) begin
            cmd <= cf_head;
            st  <= S_DEC;
          end else if (test_pending && mode[3]) begin
            st <= S_TEST;
          end else if (test_pending) begin
            test_pending <= 1'b0;
          end
        end
        S_DEC: begin
          k    <= '0;
          wcnt <= '0;
          case (cmd_c)
            CMD_NOP, CMD_WRITE, CMD_VERIFY, CMD_INTR, CMD_READ: begin
              outq[0] <= cmd;
              outq[1] <= {16'b0, status16(tmask, eff_down, severe_fault)};
            end
            default: ;
          endcase
          case (cmd_c)
            CMD_NOP: begin
              outq_n <= 2'd2; outq_i <= '0; after_out <= S_IDLE; st <= S_OUT;
            end
            CMD_GETSTAT: begin
              outq[0] <= cmd;
              outq[1] <= {16'b0, side_status};
              outq[2] <= {16'b0, status16(tmask, eff_down, severe_fault)};
              outq_n <= 2'd3; outq_i <= '0; after_out <= S_IDLE; st <= S_OUT;
            end
            CMD_WRREG: st <= S_WRREG;
            CMD_RDREG: begin
              outq[0] <= cmd;
              outq_n <= 2'd1; outq_i <= '0; after_out <= S_RDREG; st <= S_OUT;
            end
            CMD_READ, CMD_WRITE, CMD_VERIFY, CMD_INTR: begin
              rem <= (cmd_c == CMD_WRITE || cmd_c == CMD_VERIFY) ? 7'(cmd_n) + 7'd2 : 7'd2;
              st  <= S_WAITLEN;
            end
            default: st <= S_IDLE;   // DC_Pad / DC_MarkReturn carry nothing for a side
          endcase
        end
        S_WRREG: if (cf_pop) begin
          outq[0] <= cmd;
          outq[1] <= {16'b0, status16(tmask, eff_down, severe_fault)};
          outq_n <= 2'd2; outq_i <= '0; after_out <= S_IDLE; st <= S_OUT;
        end
        S_RDREG: begin
          if (k == 3'd6) begin
            st <= S_DRAIN;
          end else if (!tmask[k] || room) begin
            k <= k + 1'b1;
          end
        end
        S_DRAIN: if (!any_inflight) begin
          outq[0] <= {16'b0, status16(tmask, eff_down, severe_fault)};
          outq_n <= 2'd1; outq_i <= '0; after_out <= S_IDLE; st <= S_OUT;
        end
        S_WAITLEN: if (32'(cf_count) >= 32'(rem) - 1) begin
          widx <= '0;              // the command word itself was popped already
          st   <= S_AFCHK;
        end
        S_AFCHK: st <= S_AFWAIT;
        S_AFWAIT: if (!any_inflight) begin
          if (!need_poll) begin
            st <= S_BURST;
          end else if (tmo) begin
            dn_w <= dn_w | (elig & af_int);
            st   <= S_BURST;
          end
        end
        S_BURST: begin
          if (widx != rem) begin
            widx <= widx + 1'b1;
            if (widx == 7'd1) rd_addr <= cf_head;
            if (elig != '0) wf_count <= (wf_count == 5'd31) ? wf_count : wf_count + 1'b1;
          end else begin
            if (cmd_c == CMD_READ) begin
              outq_n <= 2'd1; outq_i <= '0; after_out <= S_RD_TGT; st <= S_OUT;
            end else begin
              outq[1] <= {16'b0, status16(tmask, eff_down, severe_fault)};
              outq_n <= 2'd2; outq_i <= '0; after_out <= S_IDLE; st <= S_OUT;
            end
          end
        end
        S_RD_TGT: begin
          wcnt <= '0;
          if (k == 3'd6) st <= S_RD_FINAL;
          else if (!tmask[k]) k <= k + 1'b1;
          else st <= S_RD_WAIT;
        end
        S_RD_WAIT: begin
          if (eff_down[k]) begin
            st <= S_RD_FILL;
          end else if (!any_inflight && rr_int[k]) begin
            rr_int[k] <= 1'b0;
            st <= S_RD_BURST;
          end else if (!any_inflight && tmo) begin
            dn_r[k] <= 1'b1;
            st <= S_RD_FILL;
          end
        end
        S_RD_BURST, S_RD_FILL: begin
          if (wcnt == cmd_n) begin
            k  <= k + 1'b1;
            st <= S_RD_TGT;
          end else if (room) begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_RD_FINAL: st <= S_RD_FINWAIT;
        S_RD_FINWAIT: if (!any_inflight) begin
          outq[0] <= {16'b0, status16(tmask, eff_down, severe_fault)};
          outq_n <= 2'd1; outq_i <= '0; after_out <= S_IDLE; st <= S_OUT;
        end
        S_OUT: if (seq_push) begin
          if (outq_i + 1'b1 == outq_n) st <= after_out;
          outq_i <= outq_i + 1'b1;
        end
        S_TEST: st <= S_TEST2;
        S_TEST2: st <= S_TDRAIN;
        S_TDRAIN: if (!any_inflight) begin
          test_pending <= 1'b0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
