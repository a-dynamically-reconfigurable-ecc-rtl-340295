// tb_workloads -- the published evaluation grid on the mapping unit:
// block lengths 256, 1024, 2048, 3072, 4096 and 5120 at parallelism 4, 8,
// 16 and 32, with the 3GPP turbo interleaver (a random permutation for
// 5120, beyond the 3GPP range).  The default design has PE = 8; the other
// parallelisms use the same RTL with the PE parameter changed.  Each run
// is checked by tb_map_run; the cycle counts are printed.
module tb_workloads;
  int c4, f4, c8, f8, c16, f16, c32, f32;
  bit d4, d8, d16, d32;

  tb_map_run #(.PE(4))  u_pe4  (.checks(c4),  .failures(f4),  .finished(d4));
  tb_map_run #(.PE(8))  u_pe8  (.checks(c8),  .failures(f8),  .finished(d8));
  tb_map_run #(.PE(16)) u_pe16 (.checks(c16), .failures(f16), .finished(d16));
  tb_map_run #(.PE(32)) u_pe32 (.checks(c32), .failures(f32), .finished(d32));

  initial begin
    wait (d4 && d8 && d16 && d32);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16 + c32, f4 + f8 + f16 + f32);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16 + c32, f4 + f8 + f16 + f32 + 1);
    $finish;
  end
endmodule
