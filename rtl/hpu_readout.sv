// hpu_readout: Readout Logic and Readout FIFO of the HPU XB FPGA.
//
// Every DC_MarkReturn command carries the number of return words the DSP's
// DMA will read as one block. Those counts are queued in the 255x16 Readout
// FIFO. When no block is open and the count at the head of the Readout FIFO
// is no larger than the number of words now in the Return FIFO, the block is
// opened: the count moves into a down-counter and RET_RDY goes high. Each
// DSP read of the return stream (ret_pop) counts down; RET_RDY falls when the
// block has been read. A read while no block is open is an over-read fault; a
// count larger than the Return FIFO can ever hold is a capacity fault, and
// such a block is dropped. A zero count is dropped silently. Pushing into a
// full Readout FIFO sets reo_wr_fault.
// Follows the document: the Readout FIFO, RET_RDY and the fault names of
// DCR_HPU_Status. This design's choice: one block open at a time.
module hpu_readout #(
  parameter int unsigned REO_DEPTH = 255,
  parameter int unsigned RET_DEPTH = 511
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           mark_valid,
  input  logic [15:0]                    mark_count,
  input  logic [$clog2(RET_DEPTH+1)-1:0] ret_count,
  input  logic                           ret_pop,
  output logic                           ret_rdy,
  output logic                           flt_overread,
  output logic                           flt_capacity,
  output logic                           flt_reo_wr,
  output logic                           flt_reo_rd,
  output logic                           reo_empty
);
  localparam int unsigned RCW = $clog2(REO_DEPTH + 1);

  logic        reo_pop, reo_full, reo_ovf, reo_unf;
  logic [15:0] reo_head;
  logic [RCW-1:0] reo_count;
  logic [15:0] remaining;

  dc_fifo #(.WIDTH(16), .DEPTH(REO_DEPTH)) u_reo_fifo (
    .clk, .rst_n, .flush(1'b0),
    .wr_en(mark_valid), .wr_data(mark_count),
    .rd_en(reo_pop), .rd_data(reo_head),
    .empty(reo_empty), .full(reo_full), .count(reo_count),
    .ovf(reo_ovf), .unf(reo_unf)
  );

  logic too_big, can_open;
  assign too_big  = 32'(reo_head) > RET_DEPTH;
  assign can_open = (remaining == '0) && !reo_empty
                    && (too_big || reo_head == '0 || 32'(reo_head) <= 32'(ret_count));
  assign reo_pop  = can_open;
  assign ret_rdy  = (remaining != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining    <= '0;
      flt_overread <= 1'b0;
      flt_capacity <= 1'b0;
      flt_reo_wr   <= 1'b0;
      flt_reo_rd   <= 1'b0;
    end else begin
      if (reo_ovf) flt_reo_wr <= 1'b1;
      if (reo_unf) flt_reo_rd <= 1'b1;
      if (can_open) begin
        if (too_big) flt_capacity <= 1'b1;
        else         remaining    <= reo_head;
      end else if (ret_pop) begin
        if (remaining == '0) flt_overread <= 1'b1;
        else                 remaining    <= remaining - 1'b1;
      end
    end
  end
endmodule
