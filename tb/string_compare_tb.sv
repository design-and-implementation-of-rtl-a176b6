// string_compare_tb: random windows against equal, one-bit-different and
// random candidates, with and without the used flag; checks match, reject,
// valid and the delayed string ID one clock later.
module string_compare_tb;
  localparam int unsigned L = 32, Q = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, cand_used = 0;
  logic [8*L-1:0] window = '0, candidate = '0;
  logic [Q-1:0] ptr = '0, string_id;
  logic out_valid, match, reject;
  int checks = 0, failures = 0;
  int n_match = 0;

  string_compare #(.L_BYTES(L), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit em, v;
      logic [Q-1:0] eid;
      for (int k = 0; k < L / 4; k++) window[32*k +: 32] = $urandom;
      case ($urandom_range(0, 2))
        0: candidate = window;
        1: candidate = window ^ ((8*L)'(1) << $urandom_range(0, 8 * L - 1));
        default: for (int k = 0; k < L / 4; k++) candidate[32*k +: 32] = $urandom;
      endcase
      cand_used = ($urandom_range(0, 4) != 0);
      in_valid = ($urandom_range(0, 4) != 0);
      ptr = Q'($urandom);
      v = in_valid;
      em = in_valid && cand_used && (candidate == window);
      eid = ptr;
      @(posedge clk); #1;
      if (em) n_match++;
      checks += 4;
      if (out_valid !== v) begin failures++; $display("FAIL valid"); end
      if (match !== em) begin failures++; $display("FAIL match"); end
      if (reject !== (v && !em)) begin failures++; $display("FAIL reject"); end
      if (string_id !== eid) begin failures++; $display("FAIL id"); end
    end
    checks++;
    if (n_match == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
