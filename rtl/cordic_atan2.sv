// cordic_atan2: sequential CORDIC in vectoring mode, angle of (x, y).
//
// On `start` the vector is first folded into the right half plane (adding
// half a turn when x < 0), then ITER micro-rotations drive y to zero while
// summing the elementary angles atan(2^-i).  The result `angle` is in
// units of 2^-16 turn (so +-32768 is +-pi), valid with the one-cycle
// `done` pulse ITER+1 clocks after `start`.  The elementary-angle table is
// computed at elaboration.  Used for the arctangent of the CFO estimate
// and for the pilot phases of the SCO estimate.
module cordic_atan2 #(
  parameter int W    = 32,       // input width
  parameter int ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic                busy,
  output logic                done,
  output logic signed [15:0]  angle
);
  localparam int IW = W + 2;
  typedef logic signed [17:0] at_t [ITER];

  function automatic at_t mk_atan();
    at_t r;
    for (int i = 0; i < ITER; i++)
      r[i] = 18'($rtoi($floor(65536.0 * $atan(1.0 / (2.0 ** i)) / (2.0 * 3.141592653589793) + 0.5)));
    return r;
  endfunction

  localparam at_t ATAN_T = mk_atan();

  logic signed [IW-1:0] xr, yr;
  logic signed [17:0]   acc;
  logic [$clog2(ITER)-1:0] it;           // ITER is a power of two

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; acc <= '0; it <= '0; busy <= 1'b0; done <= 1'b0; angle <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        it   <= '0;
        if (x < 0) begin
          xr  <= -IW'(x);
          yr  <= -IW'(y);
          acc <= 18'sd32768;                     // half a turn
        end else begin
          xr  <= IW'(x);
          yr  <= IW'(y);
          acc <= '0;
        end
      end else if (busy) begin
        if (yr >= 0) begin
          xr  <= xr + (yr >>> it);
          yr  <= yr - (xr >>> it);
          acc <= acc + ATAN_T[it];
        end else begin
          xr  <= xr - (yr >>> it);
          yr  <= yr + (xr >>> it);
          acc <= acc - ATAN_T[it];
        end
        if (int'(it) == ITER - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        it <= it + 1'b1;                       // wraps to 0 after the last
      end
      if (busy && int'(it) == ITER - 1) begin
        // the final micro-rotation's angle is included; wrap to 16 bits
        angle <= 16'(acc + ((yr >= 0) ? ATAN_T[it] : -ATAN_T[it]));
      end
    end
  end

endmodule
