// tb_storage_unit: random samples at random times go into a 16-word
// storage unit; whenever a frame is ready the testbench (as the modulator)
// takes it and reads it out at random speed.  Checks every word against
// the samples written, in order (so no frame is longer or shorter than
// DEPTH words), that sampling goes on during a read-out, and that the overflow flag is
// raised when frames are not taken.
module tb_storage_unit;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;
  int checks = 0, failures = 0;
  logic sample_en = 0, rd = 0, frame_taken = 0;
  logic [15:0] sample = 0, rdata;
  logic hs_empty, frame_ready, dumping, overflow;
  storage_unit #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  logic [15:0] q[$];
  bit reading = 1;
  int nframes = 0;
  bit ovf_seen = 0;
  always @(posedge clk) if (rst_n && overflow) ovf_seen = 1;
  // sensor: a sample every 3..12 clocks
  initial begin
    @(posedge rst_n);
    forever begin
      repeat ($urandom_range(2, 11)) @(posedge clk);
      sample <= 16'($urandom); sample_en <= 1;
      @(posedge clk);
      q.push_back(sample);
      sample_en <= 0;
    end
  end
  // modulator
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (frame_ready && reading) begin
        int got;
        got = 0;
        frame_taken <= 1; @(posedge clk); frame_taken <= 0;
        while (got < DEPTH) begin
          rd <= ($urandom_range(0, 3) != 0) && !hs_empty;
          @(posedge clk);
          if (rd) begin
            logic [15:0] e;
            e = q.pop_front();
            checks++;
            if (rdata !== e) begin failures++; $display("FAIL word %0d: %h vs %h", got, rdata, e); end
            got++;
          end
        end
        rd <= 0;
        nframes++;
      end
    end
  end
  initial begin
    #(400000000);
    $display("FAIL watchdog nframes=%0d q=%0d ready=%b empty=%b ovf=%b", nframes, q.size(), frame_ready, hs_empty, overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nframes == 6);
    checks++;
    if (ovf_seen) begin failures++; $display("FAIL overflow while frames are taken"); end
    reading = 0;
    repeat (3 * DEPTH * 12 + 50) @(posedge clk);
    checks++;
    if (!ovf_seen) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
