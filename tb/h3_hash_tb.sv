// h3_hash_tb: streams random 256-bit words (with bubbles) into one h3_hash
// and checks each hash, two clocks later, against a bit-serial XOR of the
// coefficients computed in the testbench. Also checks the valid pipeline.
module h3_hash_tb;
  localparam int unsigned IB = 256, OW = 16, FN = 2, SD = 1;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [IB-1:0] din = '0;
  logic out_valid;
  logic [OW-1:0] hash;
  int checks = 0, failures = 0;

  h3_hash #(.IN_BITS(IB), .OUT_W(OW), .FUNC(FN), .SEED(SD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OW-1:0] ref_hash(logic [IB-1:0] x);
    logic [OW-1:0] h = '0;
    for (int j = 0; j < IB; j++) begin
      logic [31:0] c;
      c = cp_pkg::h3_coef(FN, j, SD);
      if (c[OW-1:0] == '0) c[OW-1:0] = 1;
      if (x[j]) h ^= c[OW-1:0];
    end
    return h;
  endfunction

  logic [OW-1:0] exp_q [$];
  bit            vq [$];

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [IB-1:0] w;
      for (int k = 0; k < IB / 32; k++) w[32*k +: 32] = $urandom;
      if (cyc % 7 == 0) w = '0;
      if (cyc % 11 == 0) w = '0 | (IB'(1) << $urandom_range(0, IB - 1));
      in_valid = ($urandom_range(0, 4) != 0);
      din = w;
      exp_q.push_back(ref_hash(w));
      vq.push_back(in_valid);
      @(posedge clk); #1;
      if (exp_q.size() == 2) begin
        logic [OW-1:0] e;
        bit ev;
        e = exp_q.pop_front();
        ev = vq.pop_front();
        checks++;
        if (out_valid !== ev) begin failures++; $display("FAIL valid cyc %0d", cyc); end
        checks++;
        if (hash !== e) begin
          failures++;
          if (failures < 10) $display("FAIL hash cyc %0d got %h exp %h", cyc, hash, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
