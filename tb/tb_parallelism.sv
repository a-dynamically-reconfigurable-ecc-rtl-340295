// tb_parallelism -- the whole memory subsystem at parallelism 4, 16 and 32
// (the default build, PE = 8, is covered by tb_ecc_reconf_decoder).  Each
// instance of tb_top_run maps K = 1024 (3GPP interleaver) and K = 5120
// (random permutation) and moves the block through the butterfly in both
// orders, checking every word.
module tb_parallelism;
  int c4, f4, c16, f16, c32, f32;
  bit d4, d16, d32;

  tb_top_run #(.PE(4))  u_pe4  (.checks(c4),  .failures(f4),  .finished(d4));
  tb_top_run #(.PE(16)) u_pe16 (.checks(c16), .failures(f16), .finished(d16));
  tb_top_run #(.PE(32)) u_pe32 (.checks(c32), .failures(f32), .finished(d32));

  initial begin
    wait (d4 && d16 && d32);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c32, f4 + f16 + f32);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c32, f4 + f16 + f32 + 1);
    $finish;
  end
endmodule
