// dc_system: the complete DPU Control system.
//
// One HPU XB FPGA (host side) talks over the DCH bus to the DC FPGA, which
// drives two DC buses, side A and side B, each shared by six DPU XB FPGAs
// (DPU ID straps 0 to 5 on each bus). The host DSP's expansion-bus port and
// the twelve DPUs' DSP memory ports are ports of this module; the DSPs
// themselves are outside it.
//
// The board-level buses are modelled here without tri-states: every driver
// of a shared bus gives a value and an output enable, and each bus bit takes
// the value of the drivers that enable it (wired-OR if several do, which only
// happens on a fault) or reads 1 when nobody drives it, as a pulled-up or
// previously all-ones-driven bus would. The DCC lines read all ones while the
// DC FPGA floats them. The DCH data bus is point to point, so each FPGA's
// output goes straight to the other's input.
// The Control register's R bit in the HPU XB FPGA holds the DC FPGA and
// all DPU XB FPGAs in reset.
module dc_system
  import dc_pkg::*;
#(
  parameter int unsigned NDPU = 2 * NDPU_SIDE
) (
  input  logic              clk,
  input  logic              rst_n,
  // host DSP expansion bus
  input  logic [3:0]        xce,
  input  logic [5:2]        xa,
  input  logic              xwe,
  input  logic              xre,
  input  logic [31:0]       xd_in,
  output logic [31:0]       xd_out,
  output logic              cmd_rdy,
  output logic              ret_rdy,
  output logic              hpu_fault,
  output logic              hpu_led,
  // DPU DSP memory ports, DPUs 0-5 on side A, 6-11 on side B
  output logic [NDPU-1:0]   mem_req,
  output logic [NDPU-1:0]   mem_we,
  output logic [31:0]       mem_addr  [NDPU],
  output logic [31:0]       mem_wdata [NDPU],
  input  logic [31:0]       mem_rdata [NDPU],
  input  logic [NDPU-1:0]   mem_ready,
  output logic [NDPU-1:0]   dsp_reset_n,
  output logic [NDPU-1:0]   dsp_big_endian,
  output logic [NDPU-1:0]   dsp_interrupt,
  output logic [NDPU-1:0]   dpu_fault,
  output logic [NDPU-1:0]   dpu_led
);
  // ---------------- HPU XB FPGA <-> DC FPGA ----------------
  logic [4:0]  dch_a;
  logic        dch_wr_n, dch_rd_n, dch_rdav_n, dch_cstat, dch_rstat, dch_dcstat;
  logic [31:0] h2d, d2h;
  logic        h_oe, d_oe, dc_reset, dc_rst_n;

  hpu_xb u_hpu (
    .clk, .rst_n,
    .xce, .xa, .xwe, .xre, .xd_in, .xd_out,
    .cmd_rdy, .ret_rdy, .fault(hpu_fault), .led(hpu_led), .dc_reset,
    .dch_a, .dch_wr_n, .dch_rd_n, .dch_d_out(h2d), .dch_d_oe(h_oe), .dch_d_in(d2h),
    .dch_rdav_n, .dch_cstat, .dch_rstat, .dch_dcstat
  );

  assign dc_rst_n = rst_n && !dc_reset;

  logic [10:0] dcc_out [2];
  logic        dcc_oe  [2];
  logic [10:0] dcc_bus [2];
  logic [31:0] dc_dcd_out [2];
  logic        dc_dcd_oe  [2];
  logic [31:0] dcd_bus [2];

  dc_fpga u_dc (
    .clk, .rst_n(dc_rst_n),
    .dch_a, .dch_wr_n, .dch_rd_n, .dch_d_in(h2d), .dch_d_out(d2h), .dch_d_oe(d_oe),
    .dch_rdav_n, .dch_cstat, .dch_rstat, .dch_dcstat,
    .a_dcc_out(dcc_out[0]), .a_dcc_oe(dcc_oe[0]), .a_dcc_in(dcc_bus[0]),
    .a_dcd_out(dc_dcd_out[0]), .a_dcd_oe(dc_dcd_oe[0]), .a_dcd_in(dcd_bus[0]),
    .b_dcc_out(dcc_out[1]), .b_dcc_oe(dcc_oe[1]), .b_dcc_in(dcc_bus[1]),
    .b_dcd_out(dc_dcd_out[1]), .b_dcd_oe(dc_dcd_oe[1]), .b_dcd_in(dcd_bus[1])
  );

  // ---------------- DPUs ----------------
  logic [31:0] dpu_dcd_out [NDPU];
  logic [31:0] dpu_dcd_oe  [NDPU];

  for (genvar i = 0; i < NDPU; i++) begin : g_dpu
    localparam int unsigned S = i / NDPU_SIDE;
    dpu_xb u_dpu (
      .clk, .rst_n(dc_rst_n),
      .id(3'(i % NDPU_SIDE)),
      .dcc_in(dcc_bus[S]), .dcd_in(dcd_bus[S]),
      .dcd_out(dpu_dcd_out[i]), .dcd_oe(dpu_dcd_oe[i]),
      .mem_req(mem_req[i]), .mem_we(mem_we[i]), .mem_addr(mem_addr[i]),
      .mem_wdata(mem_wdata[i]), .mem_rdata(mem_rdata[i]), .mem_ready(mem_ready[i]),
      .dsp_reset_n(dsp_reset_n[i]), .dsp_big_endian(dsp_big_endian[i]),
      .dsp_interrupt(dsp_interrupt[i]), .fault(dpu_fault[i]),
      .led(dpu_led[i])
    );
  end

  // ---------------- bus resolution ----------------
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic [31:0] val, oe;
      val = dc_dcd_oe[s] ? dc_dcd_out[s] : '0;
      oe  = {32{dc_dcd_oe[s]}};
      for (int j = 0; j < NDPU_SIDE; j++) begin
        val |= dpu_dcd_out[s*NDPU_SIDE + j] & dpu_dcd_oe[s*NDPU_SIDE + j];
        oe  |= dpu_dcd_oe[s*NDPU_SIDE + j];
      end
      dcd_bus[s] = val | ~oe;
      dcc_bus[s] = dcc_oe[s] ? dcc_out[s] : '1;
    end
  end
endmodule
