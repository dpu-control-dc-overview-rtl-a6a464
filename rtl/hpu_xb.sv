// hpu_xb: HPU XB FPGA, the bridge between the host DSP's expansion bus (XB)
// and the DCH bus to the DC FPGA.
//
// The DSP sees three chip-enable regions: XCE0 resets (address 5: DLL reset,
// address A: soft reset; both reset this FPGA's state for one cycle here),
// XCE1 user registers (Control, Status, RegWrite, RegIndex, RegRead,
// LED_Control, StdTest), XCE2 the FIFOs (writes enter the DC command stream,
// reads take the next word of the return stream). Command words pass the
// Command Interpreter into the 511x32 Command FIFO; DC_MarkReturn counts go
// to the Readout Logic, which raises RET_RDY when a whole marked block is in
// the 511x32 Return FIFO. CMD_RDY is high while the Command FIFO has room for
// a maximum-size command (65 words).
// The Control register's loopback field selects where the Command FIFO's
// output goes: 00 to the DC FPGA (and DC returns are read into the Return
// FIFO), 01 straight back into the Return FIFO (every word, DC_Pad
// included), 10 to the DC FPGA, which is expected to be set up to loop the
// stream back (its sides in RunLoopback), with its returns read as in 00,
// 11 into the Loopback Status/Dummy Generator, which answers as the DC FPGA
// would.
// RegIndex starts a DCH register write and/or read of a DC FPGA register
// (write first when both), the answer lands in RegRead and RegIndex returns
// to zero. The green LED lights under the LED_Control conditions and stays
// on at least D milliseconds.
//
// Timing: XB reads answer on xd_out in the cycle after xre. DCH outputs are
// registered; a DCH read issued in cycle t is answered through the input
// flip-flops in t+3 (two register stages in the DC FPGA). Up to four
// return-stream reads are kept in flight, each only when the Return FIFO has
// room for it. The DSP bus is modelled as a synchronous bus with active-high
// strobes rather than the asynchronous XWE_N/XRE_N strobes.
// Follows the document: register map and bit fields, loopback modes, FIFO
// sizes, RET_RDY and CMD_RDY roles, LED rules. This design's choices: the
// synchronous DSP bus, the layout of the lower 16 status bits where the
// source listing is unclear (see README), mode 10 handled like 00 inside this FPGA,
// and the DCC line test of RegIndex being left out.
module hpu_xb
  import dc_pkg::*;
#(
  parameter int unsigned CMD_DEPTH   = 511,
  parameter int unsigned RET_DEPTH   = 511,
  parameter int unsigned REO_DEPTH   = 255,
  parameter int unsigned CLKS_PER_MS = 50000
) (
  input  logic        clk,
  input  logic        rst_n,
  // DSP expansion bus
  input  logic [3:0]  xce,
  input  logic [5:2]  xa,
  input  logic        xwe,
  input  logic        xre,
  input  logic [31:0] xd_in,
  output logic [31:0] xd_out,
  output logic        cmd_rdy,
  output logic        ret_rdy,
  output logic        fault,
  output logic        led,
  output logic        dc_reset,
  // DCH bus to the DC FPGA
  output logic [4:0]  dch_a,
  output logic        dch_wr_n,
  output logic        dch_rd_n,
  output logic [31:0] dch_d_out,
  output logic        dch_d_oe,
  input  logic [31:0] dch_d_in,
  input  logic        dch_rdav_n,
  input  logic        dch_cstat,
  input  logic        dch_rstat,
  input  logic        dch_dcstat
);
  localparam int unsigned CCW = $clog2(CMD_DEPTH + 1);
  localparam int unsigned RCW = $clog2(RET_DEPTH + 1);

  // ---------------- soft reset ----------------
  logic soft_rst_q, srst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) soft_rst_q <= 1'b0;
    else        soft_rst_q <= xwe && xce[0] && (xa == 4'h5 || xa == 4'hA);
  end
  assign srst_n = rst_n && !soft_rst_q;

  // ---------------- command path ----------------
  logic        ci_valid, mark_valid, ci_invalid;
  logic [31:0] ci_data;
  logic [15:0] mark_count;
  hpu_cmd_interp u_interp (
    .clk, .rst_n(srst_n),
    .in_valid(xwe && xce[2]), .in_data(xd_in),
    .out_valid(ci_valid), .out_data(ci_data),
    .mark_valid, .mark_count, .invalid(ci_invalid)
  );

  logic        cf_pop, cf_empty, cf_full, cf_ovf, cf_unf;
  logic [31:0] cf_head;
  logic [CCW-1:0] cf_count;
  dc_fifo #(.WIDTH(32), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n(srst_n), .flush(1'b0),
    .wr_en(ci_valid), .wr_data(ci_data),
    .rd_en(cf_pop), .rd_data(cf_head),
    .empty(cf_empty), .full(cf_full), .count(cf_count),
    .ovf(cf_ovf), .unf(cf_unf)
  );
  // the word held in the Command Interpreter counts as already queued
  assign cmd_rdy = (32'(cf_count) + 32'(ci_valid) + MAX_CMD_WORDS) <= CMD_DEPTH;

  // ---------------- return path ----------------
  logic        rf_wr, rf_pop, rf_empty, rf_full, rf_ovf, rf_unf;
  logic [31:0] rf_wdata, rf_head;
  logic [RCW-1:0] rf_count;
  dc_fifo #(.WIDTH(32), .DEPTH(RET_DEPTH)) u_ret_fifo (
    .clk, .rst_n(srst_n), .flush(1'b0),
    .wr_en(rf_wr), .wr_data(rf_wdata),
    .rd_en(rf_pop), .rd_data(rf_head),
    .empty(rf_empty), .full(rf_full), .count(rf_count),
    .ovf(rf_ovf), .unf(rf_unf)
  );
  assign rf_pop = xre && xce[2];

  logic flt_overread, flt_capacity, flt_reo_wr, flt_reo_rd, reo_empty;
  hpu_readout #(.REO_DEPTH(REO_DEPTH), .RET_DEPTH(RET_DEPTH)) u_readout (
    .clk, .rst_n(srst_n),
    .mark_valid, .mark_count,
    .ret_count(rf_count), .ret_pop(rf_pop),
    .ret_rdy, .flt_overread, .flt_capacity, .flt_reo_wr, .flt_reo_rd, .reo_empty
  );

  // ---------------- registers ----------------
  logic [31:0] ctrl, reg_write, reg_index, reg_read, led_ctrl, std_test;
  logic [1:0]  lb_mode;
  assign lb_mode  = ctrl[1:0];
  assign dc_reset = ctrl[2];

  logic f_cmd_wr, f_cmd_rd, f_invalid, f_reo_wr, f_reo_rd, f_ureg, f_ret_wr, f_ret_rd;
  logic f_dc, f_cap, f_over;
  logic [31:0] status;
  assign f_reo_wr = flt_reo_wr;
  assign f_reo_rd = flt_reo_rd;
  assign f_cap    = flt_capacity;
  assign f_over   = flt_overread;
  assign status = {16'b0,
                   1'b0, f_over, f_cap, f_dc,
                   1'b0, f_ret_rd, f_ret_wr, f_ureg,
                   1'b0, f_reo_rd, f_reo_wr, 1'b0,
                   1'b0, f_invalid, f_cmd_rd, f_cmd_wr};
  assign fault = |status;

  function automatic logic known_reg(input logic [3:0] a);
    return a inside {4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'hF};
  endfunction

  // ---------------- DCH master ----------------
  typedef struct packed {
    logic v;
    logic fifo;
  } dpipe_t;
  dpipe_t      dp [4];
  logic [31:0] di_d;
  logic        di_rdav_n, di_cstat, di_rstat, di_dcstat;
  logic [2:0]  rd_out;          // return-stream reads in flight
  logic        do_reg_wr, do_reg_rd, do_fifo_wr, do_fifo_rd, reg_busy;
  typedef enum logic [1:0] {G_IDLE, G_WAIT} rg_state_e;
  rg_state_e   rg_st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      di_d      <= '0;
      di_rdav_n <= 1'b1;
      di_cstat  <= 1'b1;
      di_rstat  <= 1'b0;
      di_dcstat <= 1'b0;
    end else begin
      di_d      <= dch_d_in;
      di_rdav_n <= dch_rdav_n;
      di_cstat  <= dch_cstat;
      di_rstat  <= dch_rstat;
      di_dcstat <= dch_dcstat;
    end
  end
  assign f_dc = di_dcstat;

  logic to_dc, direct_lb, rd_enable;
  assign to_dc     = (lb_mode == 2'b00) || (lb_mode == 2'b10);
  assign direct_lb = (lb_mode == 2'b01);
  assign rd_enable = (lb_mode == 2'b00) || (lb_mode == 2'b10);

  logic answer_fifo, answer_reg, dch_push;
  assign answer_fifo = dp[3].v && dp[3].fifo;
  assign answer_reg  = dp[3].v && !dp[3].fifo;
  assign dch_push    = answer_fifo && !di_rdav_n;

  // loopback generator
  logic        lg_rd, lg_wr;
  logic [31:0] lg_data;
  hpu_loopback_gen u_lbgen (
    .clk, .rst_n(srst_n),
    .in_valid(!cf_empty && lb_mode == 2'b11), .in_data(cf_head), .in_rd(lg_rd),
    .out_wr(lg_wr), .out_data(lg_data), .out_full(rf_full || dch_push)
  );

  logic lb_push;
  always_comb begin
    do_reg_wr  = (rg_st == G_IDLE) && reg_index[16] && !reg_index[19];
    do_reg_rd  = (rg_st == G_IDLE) && reg_index[17] && !reg_index[16] && !reg_index[19];
    reg_busy   = do_reg_wr || do_reg_rd;
    do_fifo_rd = !reg_busy && rd_enable && di_rstat && (rd_out < 3'd4)
                 && (32'(rf_count) + 32'(rd_out) + 2) < RET_DEPTH;
    do_fifo_wr = !reg_busy && !do_fifo_rd && to_dc && !cf_empty && !di_cstat;
    lb_push    = 1'b0;
    cf_pop     = 1'b0;
    case (lb_mode)
      2'b00, 2'b10: cf_pop = do_fifo_wr;
      2'b01: begin
        lb_push = !cf_empty && !rf_full && !dch_push;
        cf_pop  = lb_push;
      end
      default: cf_pop = lg_rd;
    endcase
    rf_wr    = dch_push || lb_push || lg_wr;
    rf_wdata = dch_push ? di_d : (lb_push ? cf_head : lg_data);
  end

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      dch_a     <= '0;
      dch_wr_n  <= 1'b1;
      dch_rd_n  <= 1'b1;
      dch_d_out <= '0;
      dch_d_oe  <= 1'b0;
      for (int i = 0; i < 4; i++) dp[i] <= '0;
      rd_out    <= '0;
    end else begin
      dch_wr_n <= 1'b1;
      dch_rd_n <= 1'b1;
      dch_d_oe <= 1'b0;
      dp[0]    <= '0;
      if (do_reg_wr) begin
        dch_a     <= reg_index[4:0];
        dch_wr_n  <= 1'b0;
        dch_d_out <= reg_write;
        dch_d_oe  <= 1'b1;
      end else if (do_reg_rd) begin
        dch_a    <= reg_index[4:0];
        dch_rd_n <= 1'b0;
        dp[0]    <= '{v: 1'b1, fifo: 1'b0};
      end else if (do_fifo_rd) begin
        dch_a    <= DCH_FIFO_ADDR;
        dch_rd_n <= 1'b0;
        dp[0]    <= '{v: 1'b1, fifo: 1'b1};
      end else if (do_fifo_wr) begin
        dch_a     <= DCH_FIFO_ADDR;
        dch_wr_n  <= 1'b0;
        dch_d_out <= cf_head;
        dch_d_oe  <= 1'b1;
      end
      for (int i = 1; i < 4; i++) dp[i] <= dp[i-1];
      rd_out <= rd_out + 3'(do_fifo_rd) - 3'(answer_fifo);
    end
  end

  // ---------------- register file and faults ----------------
  logic [15:0] pre;
  logic        ms_tick;
  logic [7:0]  on_ms;
  logic        led_req;

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      ctrl      <= '0;
      reg_write <= '0;
      reg_index <= '0;
      reg_read  <= '0;
      led_ctrl  <= '0;
      std_test  <= '0;
      rg_st     <= G_IDLE;
      xd_out    <= '0;
      {f_cmd_wr, f_cmd_rd, f_invalid, f_ureg, f_ret_wr, f_ret_rd} <= '0;
    end else begin
      if (cf_ovf)     f_cmd_wr  <= 1'b1;
      if (cf_unf)     f_cmd_rd  <= 1'b1;
      if (ci_invalid) f_invalid <= 1'b1;
      if (rf_ovf)     f_ret_wr  <= 1'b1;
      if (rf_unf)     f_ret_rd  <= 1'b1;

      // register access state
      case (rg_st)
        G_IDLE: begin
          if (do_reg_wr) begin
            if (reg_index[17]) reg_index[16] <= 1'b0;   // read follows
            else               reg_index     <= '0;
          end else if (do_reg_rd) begin
            rg_st <= G_WAIT;
          end
        end
        G_WAIT: if (answer_reg) begin
          reg_read  <= di_d;
          reg_index <= '0;
          rg_st     <= G_IDLE;
        end
        default: rg_st <= G_IDLE;
      endcase

      if (xwe && xce[1]) begin
        case (xa)
          4'h1: ctrl      <= {29'b0, xd_in[2:0]};
          4'h3: reg_write <= xd_in;
          4'h4: reg_index <= {12'b0, xd_in[19:16], 3'b0, xd_in[12:0]};
          4'h6: led_ctrl  <= {8'b0, xd_in[23:22], 4'b0, xd_in[17:16], 8'b0, xd_in[7:0]};
          4'hF: std_test  <= xd_in;
          default: ;
        endcase
      end
      if (xre && xce[1]) begin
        case (xa)
          4'h1: xd_out <= ctrl;
          4'h2: xd_out <= status;
          4'h3: xd_out <= reg_write;
          4'h4: xd_out <= reg_index;
          4'h5: xd_out <= reg_read;
          4'h6: xd_out <= led_ctrl;
          4'hF: begin
            xd_out   <= std_test;
            std_test <= std_test + 1'b1;
          end
          default: xd_out <= '0;
        endcase
        if (!known_reg(xa)) f_ureg <= 1'b1;
      end else if (xre && xce[2]) begin
        xd_out <= rf_head;
      end
    end
  end

  // ---------------- LED ----------------
  assign led_req = led_ctrl[23] || (led_ctrl[22] && fault)
                   || (!fault && ((led_ctrl[17] && !rf_empty) || (led_ctrl[16] && !cf_empty)));
  assign ms_tick = (32'(pre) == CLKS_PER_MS - 1);

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      pre    <= '0;
      on_ms  <= '0;
      led    <= 1'b0;
    end else begin
      pre <= ms_tick ? '0 : pre + 1'b1;
      if (led_req && !led) begin
        led   <= 1'b1;
        on_ms <= '0;
      end else if (led) begin
        if (ms_tick && on_ms != 8'hFF) on_ms <= on_ms + 1'b1;
        if (!led_req && on_ms >= led_ctrl[7:0]) led <= 1'b0;
      end
    end
  end
endmodule
