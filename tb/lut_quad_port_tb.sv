// lut_quad_port_tb: fills a small lookup table through the write port, then
// issues four random read addresses every system clock and checks that all
// four words come back for sampling at the clk edge one cycle after the
// addresses were held (the timing of a one-cycle synchronous RAM feeding a
// register). Also rewrites part of the table while ports 1..3 keep reading.
// clk2x runs at twice the rate of clk with rising edges aligned.
module lut_quad_port_tb;
  localparam int unsigned DEPTH = 256, WIDTH = 14, AW = 8;
  logic clk = 0, clk2x = 0, rst_n = 0;
  logic [3:0][AW-1:0]    rd_addr = '0;
  logic [3:0][WIDTH-1:0] rd_data;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0;
  int checks = 0, failures = 0;

  lut_quad_port #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  // clk period 20, clk2x period 10, rising edges of clk on rising clk2x.
  initial forever begin
    #5 clk2x = 1; clk = 1;
    #5 clk2x = 0;
    #5 clk2x = 1; clk = 0;
    #5 clk2x = 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] model [DEPTH];
  logic [3:0][WIDTH-1:0] exp_q [$];
  bit wr_q [$];

  // Sample rd_data as a clk register would.
  logic [3:0][WIDTH-1:0] sampled;
  always_ff @(posedge clk) sampled <= rd_data;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // the clock-phase detector settles in the first cycle after reset
    repeat (2) @(posedge clk);
    #1;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = WIDTH'($urandom);
      model[a] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    // random quad reads; in the second half also writes (port 0 idle then)
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic [3:0][WIDTH-1:0] e;
      bit do_wr;
      do_wr = (cyc >= 2000) && ($urandom_range(0, 2) == 0);
      for (int p = 0; p < 4; p++) rd_addr[p] = AW'($urandom);
      if (cyc % 9 == 0) rd_addr = {4{rd_addr[0]}};  // all four on one word
      for (int p = 0; p < 4; p++) e[p] = model[rd_addr[p]];
      wr_en = do_wr;
      if (do_wr) begin
        // write somewhere none of this cycle's ports read
        do wr_addr = AW'($urandom);
        while (wr_addr == rd_addr[1] || wr_addr == rd_addr[2] || wr_addr == rd_addr[3]
               || wr_addr == rd_addr[0]);
        wr_data = WIDTH'($urandom);
      end
      exp_q.push_back(e);
      wr_q.push_back(do_wr);
      @(posedge clk); #1;
      if (do_wr) model[wr_addr] = wr_data;
      wr_en = 0;
      if (exp_q.size() == 2) begin
        logic [3:0][WIDTH-1:0] x;
        bit wrcyc;
        x = exp_q.pop_front();
        wrcyc = wr_q.pop_front();
        for (int p = 0; p < 4; p++) begin
          // port 0 is not served in a write cycle; skip it then
          if (p == 0 && wrcyc) continue;
          checks++;
          if (sampled[p] !== x[p]) begin
            failures++;
            if (failures < 10) $display("FAIL cyc %0d port %0d got %h exp %h", cyc, p, sampled[p], x[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
