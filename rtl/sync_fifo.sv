// sync_fifo: single-clock register-based FIFO with show-ahead read.
//
// `rdata` always shows the oldest word while `empty` is low; `rd` pops it.
// `wr` pushes `wdata` unless the FIFO is full (a push into a full FIFO is
// dropped and flagged on `overflow` for one cycle).  Push and pop may
// happen in the same cycle.  Storage is a plain register array, matching
// the register-based storage the design calls for.
module sync_fifo #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (int'(count) == DEPTH);
  assign do_rd = rd && !empty;
  assign do_wr = wr && !full;
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      count <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr && full;
      if (do_wr) wptr <= (int'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (int'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  // a pop never happens on an empty FIFO
  assert property (@(posedge clk) disable iff (!rst_n) do_rd |-> !empty);

endmodule
