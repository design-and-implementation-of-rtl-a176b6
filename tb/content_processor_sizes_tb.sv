// content_processor_sizes_tb: runs the end-to-end stream test on the string
// set sizes and string lengths of the storage study: 4096 strings of 16, 32,
// 48 and 64 bytes, every result-table entry loaded (k = 4 hashes, m/n = 4).
// Each size is its own content_processor instance; the four run in parallel.
module content_processor_sizes_tb;
  logic [3:0] done;
  int         c [4];
  int         f [4];

  cp_stream_check #(.N(4096), .L(16), .NLOAD(4096), .NREP(60)) u_l16 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  cp_stream_check #(.N(4096), .L(32), .NLOAD(4096), .NREP(60)) u_l32 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  cp_stream_check #(.N(4096), .L(48), .NLOAD(4096), .NREP(60)) u_l48 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  cp_stream_check #(.N(4096), .L(64), .NLOAD(4096), .NREP(60)) u_l64 (.done(done[3]), .checks(c[3]), .failures(f[3]));

  int checks, failures;

  initial begin
    fork
      wait (&done);
      #20ms;
    join_any
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    if (!(&done)) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
