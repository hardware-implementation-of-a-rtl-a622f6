// tb_r4_sc_decoder_sizes: the decoder at the smaller code lengths of the
// latency comparison, n = 64 and n = 256, rate 1/2, in all four modes.
// Expected cycle counts: n = 64 takes 36 cycles (radix-4 only) and 24 with
// lookahead, n = 256 takes 148 and 100; special 16-bit nodes save 7 or 4
// cycles each. Decisions are checked bit-exactly against the software
// reference. The two sizes run side by side, one r4_size_run each.
module tb_r4_sc_decoder_sizes;
  logic clk;
  initial begin
    clk = 0;
    forever #5 clk = ~clk;
  end

  int c64, f64, c256, f256;
  bit d64, d256;

  r4_size_run #(.N(64),  .LAT_R4(36),  .LAT_PSL(24))  run64  (.clk, .checks(c64),  .failures(f64),  .finished(d64));
  r4_size_run #(.N(256), .LAT_R4(148), .LAT_PSL(100)) run256 (.clk, .checks(c256), .failures(f256), .finished(d256));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c256, f64 + f256 + 1);
    $finish;
  end

  initial begin
    wait (d64 && d256);
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c256, f64 + f256);
    $finish;
  end
endmodule
