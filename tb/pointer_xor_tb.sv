// pointer_xor_tb: random lookup-table words in, checks the registered XOR
// (the pointer) and the valid flag one clock later.
module pointer_xor_tb;
  localparam int unsigned K = 4, Q = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [K-1:0][Q-1:0] words = '0;
  logic [Q-1:0] ptr;
  int checks = 0, failures = 0;

  pointer_xor #(.K(K), .Q(Q)) dut (.*);

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
    for (int cyc = 0; cyc < 2000; cyc++) begin
      logic [Q-1:0] e;
      bit v;
      for (int i = 0; i < K; i++) words[i] = Q'($urandom);
      in_valid = 1'($urandom_range(0, 1));
      e = words[0] ^ words[1] ^ words[2] ^ words[3];
      v = in_valid;
      @(posedge clk); #1;
      checks += 2;
      if (ptr !== e) begin failures++; $display("FAIL ptr %h exp %h", ptr, e); end
      if (out_valid !== v) begin failures++; $display("FAIL valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
