// dc_fifo: synchronous first-word-fall-through FIFO.
//
// Every FIFO of the DC system (HPU command/return 511x32, readout 255x16, DC
// FPGA command/return 256x32, side command/return 256x32, DPU command 255x32
// and data 63x32) is an instance of this module. The head word is visible on
// rd_data whenever empty is low; rd_en pops it, wr_en pushes wr_data. A push
// into a full FIFO or a pop from an empty one is ignored and flagged for one
// cycle on ovf/unf so the owner can record a fault. count gives the fill
// level, which the owners use for almost-full and readiness decisions.
// The document draws some FIFOs with asynchronous ports; this design clocks
// every FIFO from the single DC clock. flush empties the FIFO in one cycle.
module dc_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       ovf,
  output logic                       unf
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      ovf    <= 1'b0;
      unf    <= 1'b0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      ovf    <= 1'b0;
      unf    <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
      ovf   <= wr_en && full;
      unf   <= rd_en && empty;
    end
  end
endmodule
