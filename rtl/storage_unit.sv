// storage_unit: the sensor-data storage unit (SU) of the sensor node.
//
// Two register-based FIFOs of DEPTH words of WIDTH bits.  The low-speed
// FIFO accumulates one sensor sample per `sample_en` strobe (610 Hz in the
// node).  As soon as it is full it dumps all DEPTH words, one per clock,
// into the high-speed FIFO, which the modulators read at the 5 MHz clock.
// Because the dump empties the low-speed FIFO, sampling goes on while a
// frame is being transmitted.  The dump starts only when the high-speed
// FIFO is empty; `frame_ready` is high while the high-speed FIFO holds a
// complete frame that has not yet been started.
//
// From the document: two FIFOs, low speed and high speed, dump when full,
// 512 words, 16-bit samples.  This design's choices: one clock with a
// sample-rate clock enable instead of a separate 610 Hz clock, and holding
// the dump until the high-speed FIFO has been emptied.
// Timing: a dump takes DEPTH cycles; `frame_ready` rises the cycle after
// the last word has been moved.
module storage_unit #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // sensor side
  input  logic             sample_en,
  input  logic [WIDTH-1:0] sample,
  // modulator side (show-ahead)
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             hs_empty,
  output logic             frame_ready,
  input  logic             frame_taken,   // modulator has started on the frame
  output logic             dumping,
  output logic             overflow
);
  logic             ls_rd, ls_empty, ls_full, ls_ovf, hs_full, hs_ovf;
  logic [WIDTH-1:0] ls_rdata;
  logic [$clog2(DEPTH+1)-1:0] ls_count, hs_count;
  logic [$clog2(DEPTH+1)-1:0] moved;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_low (
    .clk, .rst_n, .wr(sample_en), .wdata(sample), .rd(ls_rd), .rdata(ls_rdata),
    .empty(ls_empty), .full(ls_full), .count(ls_count), .overflow(ls_ovf));

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_high (
    .clk, .rst_n, .wr(ls_rd), .wdata(ls_rdata), .rd(rd), .rdata(rdata),
    .empty(hs_empty), .full(hs_full), .count(hs_count), .overflow(hs_ovf));

  assign ls_rd    = dumping;
  assign overflow = ls_ovf | hs_ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dumping     <= 1'b0;
      moved       <= '0;
      frame_ready <= 1'b0;
    end else begin
      if (!dumping && ls_full && hs_empty && !frame_ready) begin
        dumping <= 1'b1;
        moved   <= '0;
      end else if (dumping) begin
        moved <= moved + 1'b1;
        if (int'(moved) == DEPTH - 1) begin
          dumping     <= 1'b0;
          frame_ready <= 1'b1;
        end
      end
      if (frame_taken) frame_ready <= 1'b0;
    end
  end

endmodule
