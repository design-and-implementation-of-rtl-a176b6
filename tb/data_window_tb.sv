// data_window_tb: drives random bytes with random bubbles into data_window
// and checks, every clock, the window word against a byte queue kept by the
// testbench, the full flag (after exactly L bytes), and the leaving byte
// (the byte that entered L bytes earlier).
module data_window_tb;
  localparam int unsigned L = 32;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_byte = 0;
  logic [8*L-1:0] win;
  logic win_new, win_full, leave_valid;
  logic [7:0] leave_byte;
  int checks = 0, failures = 0;

  data_window #(.L_BYTES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  byte unsigned hist [$];
  initial begin
    logic [8*L-1:0] exp_win;
    bit pushed;
    byte unsigned left;
    bit exp_leave;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(0, 3) != 0);
      in_byte  = 8'($urandom);
      pushed = in_valid;
      exp_leave = in_valid && hist.size() >= L;
      left = (hist.size() >= L) ? hist[hist.size() - L] : 0;
      if (in_valid) hist.push_back(in_byte);
      @(posedge clk); #1;
      // after the edge: window = last min(L, n) bytes, newest at the top
      exp_win = '0;
      for (int p = 0; p < L; p++) begin
        int idx;
        idx = int'(hist.size()) - L + p;
        if (idx >= 0) exp_win[8*p +: 8] = hist[idx];
      end
      check(win == exp_win, "window contents");
      check(win_new == pushed, "win_new");
      check(win_full == (hist.size() >= L), "win_full");
      check(leave_valid == exp_leave, "leave_valid");
      if (exp_leave) check(leave_byte == left, "leave_byte");
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
