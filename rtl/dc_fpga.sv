// dc_fpga: the DC FPGA, between the HPU XB FPGA (DCH bus) and the two DC buses.
//
// The HPU writes the DC command stream into the 256x32 common Command FIFO
// and reads the DC return stream from the 256x32 Return FIFO, both at DCH
// register address 0x10; the other DCH addresses reach the configuration
// registers (A[4] = 1: global registers; A[4] = 0: side registers, A[3]
// selects the side, A[2:0] the register). A dispatcher at the common FIFO's
// output checks every command word (inverted field and zero bits), drops
// invalid words (DCR_Status bit I) as well as DC_Pad and DC_MarkReturn, and
// copies each remaining command with its address and data words into the
// command FIFOs of both sides. The Return Processor merges the sides' return
// streams into the Return FIFO (data and status words only).
//
// DCH timing: the HPU's outputs are registered here (input flip-flops) and
// every answer is registered again, so a read issued by the HPU in cycle t is
// answered in t+2 with dch_rdav_n low when the word is valid; a FIFO read
// that finds the Return FIFO empty answers with dch_rdav_n high. Status
// lines: dch_cstat = common Command FIFO almost full (16 or fewer free
// words), dch_rstat = Return FIFO not empty, dch_dcstat = any fault in
// DCR_Status. The bidirectional D bus is split into d_in, d_out and d_oe.
// Follows the document: FIFO sizes, register map and bit fields, dispatch
// and merging. This design's choices: the FIFO address 0x10, the DCH status
// line meanings, DCR_Control reset value A = 4, P = 8 (suggested defaults)
// and T = 1000 cycles, and the A and P fields being stored only, since
// commands run in order.
module dc_fpga
  import dc_pkg::*;
#(
  parameter int unsigned CMD_DEPTH  = 256,
  parameter int unsigned RET_DEPTH  = 256,
  parameter int unsigned SIDE_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // DCH bus from the HPU XB FPGA
  input  logic [4:0]  dch_a,
  input  logic        dch_wr_n,
  input  logic        dch_rd_n,
  input  logic [31:0] dch_d_in,
  output logic [31:0] dch_d_out,
  output logic        dch_d_oe,
  output logic        dch_rdav_n,
  output logic        dch_cstat,
  output logic        dch_rstat,
  output logic        dch_dcstat,
  // DC bus, side A
  output logic [10:0] a_dcc_out,
  output logic        a_dcc_oe,
  input  logic [10:0] a_dcc_in,
  output logic [31:0] a_dcd_out,
  output logic        a_dcd_oe,
  input  logic [31:0] a_dcd_in,
  // DC bus, side B
  output logic [10:0] b_dcc_out,
  output logic        b_dcc_oe,
  input  logic [10:0] b_dcc_in,
  output logic [31:0] b_dcd_out,
  output logic        b_dcd_oe,
  input  logic [31:0] b_dcd_in
);
  localparam int unsigned CCW = $clog2(CMD_DEPTH + 1);
  localparam int unsigned RCW = $clog2(RET_DEPTH + 1);

  // ---------------- DCH input flip-flops ----------------
  logic [4:0]  a_q;
  logic        wr_q, rd_q;
  logic [31:0] d_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      wr_q <= 1'b0;
      rd_q <= 1'b0;
      d_q  <= '0;
    end else begin
      a_q  <= dch_a;
      wr_q <= !dch_wr_n;
      rd_q <= !dch_rd_n;
      d_q  <= dch_d_in;
    end
  end
  logic fifo_sel;
  assign fifo_sel = (a_q == DCH_FIFO_ADDR);

  // ---------------- common command FIFO and dispatcher ----------------
  logic        cc_push, cc_pop, cc_empty, cc_full, cc_ovf, cc_unf;
  logic [31:0] cc_head;
  logic [CCW-1:0] cc_count;
  assign cc_push = wr_q && fifo_sel;
  dc_fifo #(.WIDTH(32), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .flush(1'b0),
    .wr_en(cc_push), .wr_data(d_q),
    .rd_en(cc_pop), .rd_data(cc_head),
    .empty(cc_empty), .full(cc_full), .count(cc_count),
    .ovf(cc_ovf), .unf(cc_unf)
  );
  assign dch_cstat = (32'(cc_count) + 16) >= CMD_DEPTH;

  logic       sa_full, sb_full, side_wr;
  logic [6:0] disp_rem;
  logic       flt_invalid;
  logic       is_cmd_word, drop;
  always_comb begin
    is_cmd_word = (disp_rem == '0);
    drop        = is_cmd_word && (!cmd_ok(cc_head) || cc_head[31:28] == 4'(CMD_PAD)
                                  || cc_head[31:28] == 4'(CMD_MARKRET));
    side_wr     = !cc_empty && !drop && !sa_full && !sb_full;
    cc_pop      = !cc_empty && (drop || side_wr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_rem    <= '0;
      flt_invalid <= 1'b0;
    end else begin
      if (!cc_empty && is_cmd_word && !cmd_ok(cc_head)) flt_invalid <= 1'b1;
      if (side_wr) disp_rem <= is_cmd_word ? 7'(cmd_len(cc_head) - 1) : disp_rem - 1'b1;
    end
  end

  // ---------------- global registers ----------------
  logic [31:0] ctrl, failure_value, std_test;
  logic [31:0] rp_cmd_count, status;
  logic        flt_m, flt_c, flt_s, sev_a, sev_b;
  assign status = {7'b0, flt_invalid, 4'b0, 1'b0, flt_m, flt_c, flt_s,
                   7'b0, sev_b, 7'b0, sev_a};
  assign dch_dcstat = |status;

  logic        glob_wr, glob_rd, sa_we, sb_we;
  assign glob_wr = wr_q && a_q[4] && !fifo_sel;
  assign glob_rd = rd_q && a_q[4] && !fifo_sel;
  assign sa_we   = wr_q && !a_q[4] && !a_q[3];
  assign sb_we   = wr_q && !a_q[4] &&  a_q[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl          <= {8'h00, 4'd4, 4'd8, 16'd1000};
      failure_value <= 32'hDEAD_BEEF;
      std_test      <= '0;
    end else begin
      if (glob_wr) begin
        case (a_q[3:0])
          4'h3: ctrl          <= {8'h00, d_q[23:0]};
          4'h4: failure_value <= d_q;
          4'hF: std_test      <= d_q;
          default: ;
        endcase
      end else if (glob_rd && a_q[3:0] == 4'hF) begin
        std_test <= std_test + 1'b1;
      end
    end
  end

  // ---------------- sides ----------------
  logic        sa_ret_rd, sb_ret_rd, sa_ret_empty, sb_ret_empty;
  logic [31:0] sa_ret_data, sb_ret_data, sa_rdata, sb_rdata;
  logic [15:0] sa_status, sb_status;

  dc_side #(.SIDE(0), .CMD_DEPTH(SIDE_DEPTH), .RET_DEPTH(SIDE_DEPTH)) u_side_a (
    .clk, .rst_n,
    .cmd_wr(side_wr), .cmd_data(cc_head), .cmd_full(sa_full),
    .ret_rd(sa_ret_rd), .ret_data(sa_ret_data), .ret_empty(sa_ret_empty),
    .failure_value, .timeout(ctrl[15:0]),
    .reg_we(sa_we), .reg_addr(a_q[2:0]), .reg_wdata(d_q), .reg_rdata(sa_rdata),
    .side_status(sa_status), .severe_fault(sev_a),
    .dcc_out(a_dcc_out), .dcc_oe(a_dcc_oe), .dcc_in(a_dcc_in),
    .dcd_out(a_dcd_out), .dcd_oe(a_dcd_oe), .dcd_in(a_dcd_in)
  );

  dc_side #(.SIDE(1), .CMD_DEPTH(SIDE_DEPTH), .RET_DEPTH(SIDE_DEPTH)) u_side_b (
    .clk, .rst_n,
    .cmd_wr(side_wr), .cmd_data(cc_head), .cmd_full(sb_full),
    .ret_rd(sb_ret_rd), .ret_data(sb_ret_data), .ret_empty(sb_ret_empty),
    .failure_value, .timeout(ctrl[15:0]),
    .reg_we(sb_we), .reg_addr(a_q[2:0]), .reg_wdata(d_q), .reg_rdata(sb_rdata),
    .side_status(sb_status), .severe_fault(sev_b),
    .dcc_out(b_dcc_out), .dcc_oe(b_dcc_oe), .dcc_in(b_dcc_in),
    .dcd_out(b_dcd_out), .dcd_oe(b_dcd_oe), .dcd_in(b_dcd_in)
  );

  // ---------------- return processor and Return FIFO ----------------
  logic        rp_wr, rf_full, rf_pop, rf_empty, rf_ovf, rf_unf;
  logic [31:0] rp_data, rf_head;
  logic [RCW-1:0] rf_count;

  dc_return_proc u_rp (
    .clk, .rst_n,
    .a_empty(sa_ret_empty), .a_data(sa_ret_data), .a_rd(sa_ret_rd),
    .b_empty(sb_ret_empty), .b_data(sb_ret_data), .b_rd(sb_ret_rd),
    .out_wr(rp_wr), .out_data(rp_data), .out_full(rf_full),
    .cmd_count(rp_cmd_count),
    .flt_mismatch(flt_m), .flt_cmd_sync(flt_c), .flt_stat_sync(flt_s)
  );

  assign rf_pop = rd_q && fifo_sel && !rf_empty;
  dc_fifo #(.WIDTH(32), .DEPTH(RET_DEPTH)) u_ret_fifo (
    .clk, .rst_n, .flush(1'b0),
    .wr_en(rp_wr), .wr_data(rp_data),
    .rd_en(rf_pop), .rd_data(rf_head),
    .empty(rf_empty), .full(rf_full), .count(rf_count),
    .ovf(rf_ovf), .unf(rf_unf)
  );

  // ---------------- DCH answers (output flip-flops) ----------------
  function automatic logic [31:0] glob_value(input logic [3:0] r);
    case (r)
      4'h3:    return ctrl;
      4'h4:    return failure_value;
      4'hB:    return rp_cmd_count;
      4'hC:    return status;
      4'hF:    return std_test;
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dch_d_out  <= '0;
      dch_d_oe   <= 1'b0;
      dch_rdav_n <= 1'b1;
      dch_rstat  <= 1'b0;
    end else begin
      dch_d_oe   <= rd_q;
      dch_rdav_n <= 1'b1;
      dch_rstat  <= !rf_empty && !(rf_pop && rf_count == RCW'(1));
      if (rd_q) begin
        if (fifo_sel) begin
          dch_d_out  <= rf_empty ? failure_value : rf_head;
          dch_rdav_n <= rf_empty;
        end else begin
          dch_d_out  <= a_q[4] ? glob_value(a_q[3:0]) : (a_q[3] ? sb_rdata : sa_rdata);
          dch_rdav_n <= 1'b0;
        end
      end
    end
  end
endmodule
