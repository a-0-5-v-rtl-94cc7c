// tb_pftcg: drives the clock generator model from a 5 MHz reference and
// checks that it locks, that PH0 then runs at the reference frequency
// within 0.1 %, that the eight taps are spaced by 1/8 period, that the
// phase-selection mux puts the chosen tap on OUT_CLK, and that an FE
// command of +10 LSB shortens the period by about 10 x 8 ps while a
// negative one lengthens it.
module tb_pftcg;
  logic refclk = 0, rst_n = 0, relock = 0;
  logic signed [7:0] fe = 0;
  logic [2:0] pe = 0;
  logic [7:0] ph;
  logic out_clk, lock;
  logic [13:0] dco_code;
  int checks = 0, failures = 0;
  always #100ns refclk = ~refclk;

  pftcg dut (.refclk, .rst_n, .fe, .relock, .pe, .ph, .out_clk, .lock, .dco_code);

  realtime t_rise [8];
  for (genvar i = 0; i < 8; i++) begin : g_mon
    always @(posedge ph[i]) t_rise[i] = $realtime;
  end

  task automatic measure_period(output real per_ps);
    realtime t0;
    @(posedge ph[0]); t0 = $realtime;
    repeat (16) @(posedge ph[0]);
    per_ps = ($realtime - t0) / 16.0 / 1ps;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  real p0, p1, p2, sp;
  initial begin
    #1us rst_n = 1;
    fork
      begin wait (lock); end
      begin #2ms; end
    join_any
    chk(lock, "no lock");
    measure_period(p0);
    chk(p0 > 199800.0 && p0 < 200200.0, $sformatf("locked period %f ps", p0));
    // tap spacing
    @(posedge ph[0]); #1ns;
    @(posedge ph[7]); #1ns;
    for (int i = 1; i < 8; i++) begin
      sp = (t_rise[i] - t_rise[i-1]) / 1ps;
      chk(sp > p0 / 8.0 - 20.0 && sp < p0 / 8.0 + 20.0, $sformatf("tap %0d spacing %f", i, sp));
    end
    // phase selection
    for (int s = 0; s < 8; s++) begin
      pe = 3'(s);
      #1ns;
      repeat (20) begin
        #7013ps;
        chk(out_clk == ph[s], $sformatf("mux tap %0d", s));
      end
    end
    // frequency fine tuning
    fe = 8'sd10;
    measure_period(p1);
    chk(p0 - p1 > 60.0 && p0 - p1 < 100.0, $sformatf("FE +10: period %f -> %f", p0, p1));
    fe = -8'sd10;
    measure_period(p2);
    chk(p2 - p0 > 60.0 && p2 - p0 < 100.0, $sformatf("FE -10: period %f -> %f", p0, p2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
