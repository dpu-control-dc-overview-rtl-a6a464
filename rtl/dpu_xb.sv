// dpu_xb: DPU XB FPGA, the DC bus end point inside one data processing unit.
//
// It listens to the 11-bit DCC opcode bus and the shared 32-bit DCD data bus
// of one DC bus and acts on the opcodes that target its ID strap:
//   write_fifo      push the word on DCD into the 255x32 Command FIFO
//   write_register  write the word on DCD into a register
//   read_register   drive a register onto DCD
//   read_fifo       drive the head of the 63x32 Data FIFO onto DCD
//   drive_flags     drive the four flag bits RRCC onto DCD bits 4*id+3..4*id
//   capture_next_dcc  capture the next cycle's DCC value in DCR_DPU_Capture
// A command tracker parses the words entering the Command FIFO and rejects
// invalid command words; a command interpreter pops the FIFO and executes the
// queued DC_Write, DC_Verify, DC_Read (fetch into the Data FIFO) and
// DC_Interrupt commands against the DSP memory port. A readout ends when a
// read_fifo to this DPU is followed by any operation other than pause; the
// word count is then compared with the fetch count (over/under-read fault)
// and the Data FIFO is emptied.
//
// Timing: an opcode on DCC in cycle t is registered (input flip-flop) in
// t+1. For reads and flags the DPU drives DCD in cycle t+3 from an output
// flip-flop; for writes it samples DCD in cycle t+3 and sees the word in t+4.
// DSP memory: mem_req with mem_we writes; a read returns mem_rdata in the
// cycle after the request; mem_ready low holds the interpreter (wait state). The DCD bus is split into value (dcd_out) and
// per-bit enable (dcd_oe); the bus itself is resolved outside.
// Follows the document: opcodes, flag codes, register map and status bits,
// address checks, the FAILED state on fatal faults, the readout end rule.
// This design's choices: one fetch outstanding at a time (the FIFO variant of
// the data subsystem), a one-cycle DSP read latency, the flag nibble position,
// control bit 3 acting as a self-clearing soft reset, and no front-end logic.
// The LED follows the control register's enables for fault, register or FIFO
// write, register or FIFO read and manual; each event restarts its minimum on
// time of L milliseconds (CLKS_PER_MS clocks each, 50 MHz assumed). The document asks for control bits that disable writing to DPU RAM,
// disable reading from it and override the flags, without placing them; here
// they use reserved bits: bit 9 drops DSP writes (the words are still taken
// from the Command FIFO), bit 10 stops DSP reads (a fetch then never
// completes and the DC's read timeout takes over; DC_Verify compares
// nothing), and bit 11 makes drive_flags return control bits 15:12 as RRCC.
module dpu_xb
  import dc_pkg::*;
#(
  parameter int unsigned CMD_DEPTH  = 255,
  parameter int unsigned DATA_DEPTH = 63,
  parameter int unsigned CLKS_PER_MS = 50000   // LED time unit
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  id,          // DPU ID strap, 0..5
  // DC bus
  input  logic [10:0] dcc_in,
  input  logic [31:0] dcd_in,
  output logic [31:0] dcd_out,
  output logic [31:0] dcd_oe,
  // DSP memory port over the XB bus
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  input  logic        mem_ready,   // low while the DSP holds off XB accesses
  output logic        dsp_reset_n,
  output logic        dsp_big_endian,
  output logic        dsp_interrupt,
  output logic        fault,
  output logic        led          // DPU LED
);
  localparam int unsigned CCW = $clog2(CMD_DEPTH + 1);
  localparam int unsigned DCW = $clog2(DATA_DEPTH + 1);
  localparam int unsigned AF_LEVEL = CMD_DEPTH - (MAX_CMD_WORDS + AF_MARGIN);

  // ---------------- input flip-flops and opcode decode ----------------
  logic [10:0] dcc_q;
  logic [31:0] dcd_q;
  logic        cap_next;
  logic        soft_rst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcc_q <= DCC_NOP;
      dcd_q <= '0;
    end else begin
      dcc_q <= dcc_in;
      dcd_q <= dcd_in;
    end
  end

  logic op_wr, op_rd, op_flags, op_pause, op_cap;
  logic [3:0] op_reg;
  always_comb begin
    op_wr    = !cap_next && dcc_q[10] && dcc_q[4 + 32'(id)];
    op_rd    = !cap_next && (dcc_q[10:7] == 4'b0001) && (dcc_q[6:4] == id);
    op_flags = !cap_next && (dcc_q[10:7] == 4'b0010);
    op_pause = !cap_next && (dcc_q[10:6] == 5'b00110);
    op_cap   = !cap_next && (dcc_q[10:9] == 2'b01);
    op_reg   = dcc_q[3:0];
  end

  // Write pipeline: the data of a write opcode arrives three cycles later.
  typedef struct packed {
    logic       v;
    logic [3:0] r;
  } wpipe_t;
  wpipe_t wp [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) wp[i] <= '0;
    end else begin
      wp[0] <= '{v: op_wr, r: op_reg};
      wp[1] <= wp[0];
      wp[2] <= wp[1];
    end
  end

  // ---------------- registers ----------------
  logic [31:0] ctrl, wr_lo, wr_hi, rd_lim, capture;
  logic        verify_err;
  logic        reg_wr;
  assign reg_wr = wp[2].v && (wp[2].r != 4'd0);
  assign soft_rst = reg_wr && (wp[2].r == 4'd1) && dcd_q[3];

  assign dsp_reset_n    = ctrl[0];
  assign dsp_big_endian = ctrl[1];
  logic chk_en;
  assign chk_en = ctrl[8];
  // failure-recovery test bits
  logic wr_dis, rd_dis, flag_ovr;
  assign wr_dis   = ctrl[9];
  assign rd_dis   = ctrl[10];
  assign flag_ovr = ctrl[11];

  // ---------------- command FIFO and tracker ----------------
  logic        cf_push, cf_pop, cf_empty, cf_full, cf_ovf, cf_unf;
  logic [31:0] cf_head;
  logic [CCW-1:0] cf_count;
  assign cf_push = wp[2].v && (wp[2].r == 4'd0) && !soft_rst;

  dc_fifo #(.WIDTH(32), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .flush(soft_rst),
    .wr_en(cf_push), .wr_data(dcd_q),
    .rd_en(cf_pop), .rd_data(cf_head),
    .empty(cf_empty), .full(cf_full), .count(cf_count),
    .ovf(cf_ovf), .unf(cf_unf)
  );

  logic [6:0] trk_rem;
  logic [7:0] pending_reads;
  logic       trk_inv, trk_ovf, trk_unf;
  logic       fetch_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trk_rem       <= '0;
      pending_reads <= '0;
      trk_inv       <= 1'b0;
      trk_ovf       <= 1'b0;
      trk_unf       <= 1'b0;
    end else if (soft_rst) begin
      trk_rem       <= '0;
      pending_reads <= '0;
      trk_inv       <= 1'b0;
      trk_ovf       <= 1'b0;
      trk_unf       <= 1'b0;
    end else begin
      if (cf_ovf) trk_ovf <= 1'b1;
      if (cf_unf) trk_unf <= 1'b1;
      if (cf_push && !cf_full) begin
        if (trk_rem == '0) begin
          if (!cmd_ok(dcd_q) || dcd_q[31:28] < 4'(CMD_READ)) trk_inv <= 1'b1;
          else trk_rem <= 7'(cmd_len(dcd_q) - 1);
        end else begin
          trk_rem <= trk_rem - 1'b1;
        end
      end
      pending_reads <= pending_reads
                       + 8'(cf_push && !cf_full && trk_rem == '0 && cmd_ok(dcd_q)
                            && dcd_q[31:28] == 4'(CMD_READ))
                       - 8'(fetch_start);
    end
  end

  // ---------------- data FIFO ----------------
  logic        df_push, df_pop, df_empty, df_full, df_ovf, df_unf, df_flush;
  logic [31:0] df_head;
  logic [DCW-1:0] df_count;

  dc_fifo #(.WIDTH(32), .DEPTH(DATA_DEPTH)) u_data_fifo (
    .clk, .rst_n, .flush(df_flush || soft_rst),
    .wr_en(df_push), .wr_data(mem_rdata),
    .rd_en(df_pop), .rd_data(df_head),
    .empty(df_empty), .full(df_full), .count(df_count),
    .ovf(df_ovf), .unf(df_unf)
  );

  // ---------------- command interpreter ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_WR, S_VER, S_VER_CMP, S_FETCH, S_FETCH_END, S_INTR, S_FAILED
  } ex_state_e;
  ex_state_e   st;
  dc_cmd_e     ex_cmd;
  logic [5:0]  ex_n, ex_cnt;
  logic [31:0] ex_addr, ver_exp;
  logic        rd_pend;
  logic        data_ready;       // one command's worth of fetched data waits
  logic [5:0]  fetch_n;          // word count of the fetched command
  logic        rd_active;
  logic [6:0]  rd_words;
  logic        misread;
  logic        x_din, x_inv, x_wra, x_rda, x_ali;

  function automatic logic wr_ok(input logic [31:0] a, input logic en,
                                 input logic [31:0] lo, input logic [31:0] hi);
    return !en || (a >= lo && a <= hi);
  endfunction
  function automatic logic rd_ok(input logic [31:0] a, input logic en, input logic [31:0] lim);
    return !en || (a[31:16] >= lim[15:0] && a[31:16] < lim[31:16]);
  endfunction

  logic ex_fatal, trk_fatal;
  assign trk_fatal = trk_inv | trk_ovf | trk_unf;
  assign ex_fatal  = x_din | x_inv | x_wra | x_rda | x_ali;

  always_comb begin
    cf_pop      = 1'b0;
    mem_req     = 1'b0;
    mem_we      = 1'b0;
    mem_addr    = ex_addr;
    mem_wdata   = cf_head;
    fetch_start = 1'b0;
    case (st)
      S_IDLE:  cf_pop = !cf_empty && !trk_fatal;
      S_ADDR:  cf_pop = !cf_empty && (ex_cmd != CMD_READ || (!data_ready && !rd_active));
      S_WR: begin
        cf_pop  = !cf_empty && mem_ready;
        mem_req = !cf_empty && !wr_dis && ex_addr[1:0] == 2'b00 && wr_ok(ex_addr, chk_en, wr_lo, wr_hi);
        mem_we  = 1'b1;
      end
      S_VER: begin
        cf_pop  = !cf_empty && mem_ready;
        mem_req = !cf_empty && !rd_dis && rd_ok(ex_addr, chk_en, rd_lim);
      end
      S_FETCH: mem_req = (ex_cnt != ex_n) && mem_ready && !rd_dis && rd_ok(ex_addr, chk_en, rd_lim);
      S_INTR:  cf_pop = !cf_empty;
      default: ;
    endcase
    if (st == S_ADDR && cf_pop && ex_cmd == CMD_READ) fetch_start = 1'b1;
  end

  assign df_push = rd_pend && (st == S_FETCH || st == S_FETCH_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= S_IDLE;
      ex_cmd        <= CMD_PAD;
      ex_n          <= '0;
      ex_cnt        <= '0;
      ex_addr       <= '0;
      ver_exp       <= '0;
      rd_pend       <= 1'b0;
      data_ready    <= 1'b0;
      fetch_n       <= '0;
      dsp_interrupt <= 1'b0;
      {x_din, x_inv, x_wra, x_rda, x_ali} <= '0;
      verify_err    <= 1'b0;
    end else if (soft_rst) begin
      st            <= S_IDLE;
      rd_pend       <= 1'b0;
      data_ready    <= 1'b0;
      dsp_interrupt <= 1'b0;
      {x_din, x_inv, x_wra, x_rda, x_ali} <= '0;
      verify_err    <= 1'b0;
    end else begin
      dsp_interrupt <= 1'b0;
      rd_pend       <= mem_req && !mem_we;
      if (df_ovf) x_din <= 1'b1;
      if (df_flush) data_ready <= 1'b0;
      if (reg_wr && wp[2].r == 4'd7) verify_err <= 1'b0;
      case (st)
        S_IDLE: if (cf_pop) begin
          ex_cmd <= dc_cmd_e'(cf_head[31:28]);
          ex_n   <= cf_head[21:16];
          ex_cnt <= '0;
          if (!cmd_ok(cf_head) || cf_head[31:28] < 4'(CMD_READ)) begin
            x_inv <= 1'b1;
            st    <= S_FAILED;
          end else begin
            st <= S_ADDR;
          end
        end
        S_ADDR: if (cf_pop) begin
          ex_addr <= cf_head;
          if (ex_cmd == CMD_INTR) begin
            dsp_interrupt <= 1'b1;
            st <= S_IDLE;
          end else if (cf_head[1:0] != 2'b00) begin
            x_ali <= 1'b1;
            st    <= S_FAILED;
          end else if (ex_n == '0) begin
            if (ex_cmd == CMD_READ) begin
              data_ready <= 1'b1;
              fetch_n    <= '0;
            end
            st <= S_IDLE;
          end else begin
            case (ex_cmd)
              CMD_WRITE:  st <= S_WR;
              CMD_VERIFY: st <= S_VER;
              default:    st <= S_FETCH;
            endcase
          end
        end
        S_WR: if (cf_pop) begin
          if (ex_addr[1:0] != 2'b00) begin
            x_ali <= 1'b1;
            st    <= S_FAILED;
          end else if (!wr_ok(ex_addr, chk_en, wr_lo, wr_hi)) begin
            x_wra <= 1'b1;
            st    <= S_FAILED;
          end else begin
            ex_addr <= ex_addr + 32'd4;
            ex_cnt  <= ex_cnt + 1'b1;
            if (ex_cnt + 1'b1 == ex_n) st <= S_IDLE;
          end
        end
        S_VER: if (cf_pop) begin
          if (!rd_ok(ex_addr, chk_en, rd_lim)) begin
            x_rda <= 1'b1;
            st    <= S_FAILED;
          end else begin
            ver_exp <= cf_head;
            st      <= S_VER_CMP;
          end
        end
        S_VER_CMP: begin
          if (!rd_dis && mem_rdata != ver_exp) verify_err <= 1'b1;
          ex_addr <= ex_addr + 32'd4;
          ex_cnt  <= ex_cnt + 1'b1;
          st      <= (ex_cnt + 1'b1 == ex_n) ? S_IDLE : S_VER;
        end
        S_FETCH: begin
          if (ex_cnt != ex_n && mem_ready && !rd_dis) begin
            if (!rd_ok(ex_addr, chk_en, rd_lim)) begin
              x_rda <= 1'b1;
              st    <= S_FAILED;
            end else begin
              ex_addr <= ex_addr + 32'd4;
              ex_cnt  <= ex_cnt + 1'b1;
              if (ex_cnt + 1'b1 == ex_n) st <= S_FETCH_END;
            end
          end
        end
        S_FETCH_END: begin
          data_ready <= 1'b1;
          fetch_n    <= ex_n;
          st         <= S_IDLE;
        end
        default: ;
      endcase
      if (trk_fatal && st != S_FAILED && st != S_IDLE) st <= S_FAILED;
    end
  end

  // Capture register: DCC capture, verify error address, executor fault address.

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_next <= 1'b0;
      capture  <= '0;
    end else begin
      cap_next <= op_cap;
      if (cap_next) capture <= {21'b0, dcc_q};
      else if (st == S_VER_CMP && mem_rdata != ver_exp && !verify_err) capture <= ex_addr;
      else if (st != S_FAILED && st != S_IDLE && (ex_fatal || trk_fatal)) capture <= ex_addr;
    end
  end

  // ---------------- readout tracking ----------------
  logic rd_end;
  assign rd_end   = rd_active && !(op_pause || op_rd && op_reg == 4'd0) && !cap_next;
  assign df_pop   = op_rd && op_reg == 4'd0;
  assign df_flush = rd_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_words  <= '0;
      misread   <= 1'b0;
    end else if (soft_rst) begin
      rd_active <= 1'b0;
      rd_words  <= '0;
      misread   <= 1'b0;
    end else begin
      if (df_pop) begin
        rd_active <= 1'b1;
        rd_words  <= rd_words + 1'b1;
        if (df_empty || !data_ready) misread <= 1'b1;
      end
      if (rd_end) begin
        rd_active <= 1'b0;
        rd_words  <= '0;
        if (rd_words != {1'b0, fetch_n}) misread <= 1'b1;
      end
    end
  end

  // ---------------- status and flags ----------------
  logic        cmd_af;
  logic [1:0]  rr_code, cc_code;
  logic [31:0] status;
  assign cmd_af = cf_count > CCW'(AF_LEVEL);

  always_comb begin
    if (misread)                                  rr_code = RR_FATAL;
    else if (data_ready && !rd_end)               rr_code = RR_READY;
    else if (pending_reads != '0 || st == S_FETCH || st == S_FETCH_END) rr_code = RR_PE;
    else                                          rr_code = RR_NR;
    if (trk_fatal || ex_fatal) cc_code = CC_FATAL;
    else if (cmd_af)           cc_code = CC_AF;
    else                       cc_code = 2'b00;
  end

  assign status = {6'b0, 1'b0, verify_err,
                   4'b0, cmd_af, data_ready, trk_fatal | ex_fatal, misread,
                   4'b0, trk_inv, trk_ovf, trk_unf, trk_fatal,
                   2'b0, x_din, x_inv, x_wra, x_rda, x_ali, ex_fatal};
  assign fault = trk_fatal | ex_fatal | misread;

  function automatic logic [31:0] reg_value(input logic [3:0] r);
    case (r)
      4'd1:    return ctrl;
      4'd2:    return status;
      4'd3:    return wr_lo;
      4'd4:    return wr_hi;
      4'd5:    return rd_lim;
      4'd7:    return capture;
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl   <= '0;
      wr_lo  <= '0;
      wr_hi  <= 32'hFFFF_FFFC;
      rd_lim <= 32'hFFFF_0000;
    end else if (reg_wr) begin
      case (wp[2].r)
        4'd1: ctrl   <= {dcd_q[31:4], 1'b0, dcd_q[2:0]};
        4'd3: wr_lo  <= dcd_q;
        4'd4: wr_hi  <= dcd_q;
        4'd5: rd_lim <= dcd_q;
        default: ;
      endcase
    end
  end

  // ---------------- LED ----------------
  // Enables in control bits 31:24 (FFFrTWRM; the front-end bits F have no
  // source here); an event restarts the minimum on time of L ms (bits 23:16).
  logic        led_ev, ms_tick;
  logic [$clog2(CLKS_PER_MS)-1:0] pre;
  logic [7:0]  on_ms;
  assign led_ev = (ctrl[27] && fault) || (ctrl[26] && wp[2].v) || (ctrl[25] && op_rd)
                  || ctrl[24];
  assign ms_tick = (32'(pre) == CLKS_PER_MS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre   <= '0;
      on_ms <= '0;
      led   <= 1'b0;
    end else begin
      pre <= (ms_tick || led_ev) ? '0 : pre + 1'b1;
      if (led_ev) begin
        led   <= 1'b1;
        on_ms <= '0;
      end else if (led) begin
        if (ms_tick && on_ms != 8'hFF) on_ms <= on_ms + 1'b1;
        if (on_ms >= ctrl[23:16]) led <= 1'b0;
      end
    end
  end

  // ---------------- DCD output: two register stages ----------------
  logic [31:0] r1_val, r1_oe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_val  <= '0;
      r1_oe   <= '0;
      dcd_out <= '0;
      dcd_oe  <= '0;
    end else begin
      r1_val <= '0;
      r1_oe  <= '0;
      if (op_rd) begin
        r1_val <= (op_reg == 4'd0) ? df_head : reg_value(op_reg);
        r1_oe  <= '1;
      end else if (op_flags && id < 3'd6) begin
        r1_val <= 32'(flag_ovr ? ctrl[15:12] : {rr_code, cc_code}) << (4 * id);
        r1_oe  <= 32'hF << (4 * id);
      end
      dcd_out <= r1_val;
      dcd_oe  <= r1_oe;
    end
  end
endmodule
