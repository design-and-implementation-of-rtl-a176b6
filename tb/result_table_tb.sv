// result_table_tb: writes every entry of a small result table with random
// strings and used flags, then reads random entries and checks string, used
// flag and read valid one clock later, with a few rewrites in between.
module result_table_tb;
  localparam int unsigned N = 64, L = 32, AW = 6;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, rd_valid, rd_used;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [8*L-1:0] rd_data, wr_data = '0;
  logic wr_en = 0, wr_used = 0;
  int checks = 0, failures = 0;

  result_table #(.N_STRINGS(N), .L_BYTES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8*L:0] model [N];

  function automatic logic [8*L-1:0] rnd_str();
    logic [8*L-1:0] s;
    for (int k = 0; k < L / 4; k++) s[32*k +: 32] = $urandom;
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < N; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = rnd_str(); wr_used = 1'($urandom_range(0, 1));
      model[a] = {wr_used, wr_data};
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [8*L:0] e;
      bit v;
      rd_en = 1'($urandom_range(0, 1));
      rd_addr = AW'($urandom);
      e = model[rd_addr];
      v = rd_en;
      wr_en = ($urandom_range(0, 7) == 0);
      if (wr_en) begin
        wr_addr = AW'($urandom); wr_data = rnd_str(); wr_used = 1'($urandom_range(0, 1));
      end
      @(posedge clk); #1;
      if (wr_en) model[wr_addr] = {wr_used, wr_data};
      wr_en = 0;
      checks += 3;
      if (rd_valid !== v) begin failures++; $display("FAIL valid"); end
      if (rd_data !== e[8*L-1:0]) begin failures++; if (failures < 10) $display("FAIL data"); end
      if (rd_used !== e[8*L]) begin failures++; if (failures < 10) $display("FAIL used"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
