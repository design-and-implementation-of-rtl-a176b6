// content_processor_tb: end-to-end test of the content processor at a
// reduced size: 64 strings of 32 bytes (60 loaded), 256-word lookup table.
// The stream test itself is cp_stream_check: stored strings whole, back to
// back, overlapping and with one byte changed, among random bytes and
// bubbles; every verdict checked at its exact cycle (7 clocks after the
// byte); hits, rejects, near misses, overlapping hits, bubbles, the fill
// period and pass-through bytes must each occur.
module content_processor_tb;
  logic done;
  int   checks, failures;

  cp_stream_check #(.N(64), .L(32), .NLOAD(60), .NREP(150)) u_check (
    .done(done), .checks(checks), .failures(failures)
  );

  initial begin
    fork
      wait (done);
      #5ms;
    join_any
    if (!done) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
