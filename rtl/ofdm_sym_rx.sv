// ofdm_sym_rx: multicarrier symbol front end shared by the receivers.
//
// Takes a frame-aligned sample stream (the first sample of the frame is
// flagged by `in_first`), drops the G-sample cyclic prefix of every
// symbol and passes the N remaining samples through a pipelined forward
// FFT.  After NSYM symbols the FFT is flushed with zeros until the last
// symbol's bins are out.  Bins leave in bit-reversed order, one per clock,
// with their index on `bin_idx`, scaled by 1/N, and `bin_last` on the
// last bin of a symbol.  `done` pulses after the last bin of the frame.
// The transform sizes and guard intervals are the document's; frame
// alignment is assumed to come from the synchronizer, which is not part of
// this block.
module ofdm_sym_rx
  import wban_pkg::*;
#(
  parameter int N = 64,
  parameter int G = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,      // arm for a frame of nsym symbols
  input  logic [15:0]          nsym,
  output logic                 busy,
  output logic                 done,
  input  logic                 in_valid,
  input  cplx_t                in,
  input  logic                 in_first,
  output logic                 bin_valid,
  output logic [$clog2(N)-1:0] bin_idx,
  output cplx_t                bin,
  output logic                 bin_last
);
  localparam int L = N + G;

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_RUN, S_FLUSH} state_e;
  state_e state;

  logic [$clog2(L)-1:0] pcnt;
  logic [15:0] sym_in, sym_out;
  logic        en, take, clr, fo_last;
  cplx_t       fft_in;

  assign take   = in_valid && ((state == S_RUN) || (state == S_ARMED && in_first));
  assign en     = (take && int'(pcnt) >= G) || (state == S_FLUSH);
  assign fft_in = (state == S_FLUSH) ? '0 : in;
  assign clr    = (state == S_IDLE) && start;
  assign busy   = (state != S_IDLE);

  fft_sdf #(.N(N), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n, .clear(clr), .en, .din(fft_in),
    .out_valid(bin_valid), .dout(bin), .out_idx(bin_idx), .out_last(fo_last));

  assign bin_last = bin_valid && fo_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pcnt <= '0; sym_in <= '0; sym_out <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (bin_last && state != S_IDLE) begin
        sym_out <= sym_out + 1'b1;
        if (sym_out + 16'd1 == nsym) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      end
      case (state)
        S_IDLE: if (start && nsym != 0) begin
          state <= S_ARMED; pcnt <= '0; sym_in <= '0; sym_out <= '0;
        end
        S_ARMED, S_RUN: if (take) begin
          state <= S_RUN;
          pcnt  <= (int'(pcnt) == L - 1) ? '0 : pcnt + 1'b1;
          if (int'(pcnt) == L - 1) begin
            sym_in <= sym_in + 1'b1;
            if (sym_in + 16'd1 == nsym) state <= S_FLUSH;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
