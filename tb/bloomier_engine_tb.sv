// bloomier_engine_tb: end-to-end test of the Bloomier filter engine at a
// reduced size (64-entry result table, 256-word lookup table, 32-byte
// strings).
//
// The host model builds the tables for 56 random strings (8 result-table
// entries stay unused) and writes them through the setup port. Then one
// window per clock (with bubbles) is applied: stored strings, stored strings
// with one byte changed, and random windows. Every verdict is checked exactly
// six clocks after its window: out_valid, match (against an exact set
// lookup), reject, and string_id against the pointer the host model's own
// copy of the tables yields (for members, that is the string's index).
module bloomier_engine_tb;
  import bloomier_host_pkg::*;
  localparam int unsigned N = 64, L = 32, K = 4, MR = 4, SD = 1;
  localparam int unsigned M = MR * N, Q = $clog2(N), HW = $clog2(M);
  localparam int unsigned LAT = 6;
  localparam int unsigned NLOAD = 56;

  logic clk = 0, clk2x = 0, rst_n = 0;
  logic win_valid = 0;
  logic [8*L-1:0] win = '0;
  logic out_valid, match, reject;
  logic [Q-1:0] string_id;
  logic cfg_we = 0, cfg_used = 0;
  cp_pkg::cfg_sel_e cfg_sel = cp_pkg::CFG_LUT;
  logic [HW-1:0] cfg_addr = '0;
  logic [8*L-1:0] cfg_data = '0;
  int checks = 0, failures = 0;
  int n_match = 0, n_reject = 0, n_bubble = 0, n_near = 0;

  bloomier_engine #(.N_STRINGS(N), .L_BYTES(L), .K_HASH(K), .M_RATIO(MR), .SEED(SD)) dut (.*);

  initial forever begin
    #5 clk2x = 1; clk = 1;
    #5 clk2x = 0;
    #5 clk2x = 1; clk = 0;
    #5 clk2x = 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [8*L-1:0] str_t;
  bloomier_host #(N, L, K, MR, SD) host;

  function automatic str_t rnd_str();
    str_t s;
    for (int k = 0; k < L / 4; k++) s[32*k +: 32] = $urandom;
    return s;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct { bit v; str_t w; } pend_t;
  pend_t pend [$];

  initial begin
    str_t s [$];
    bit ok;
    host = new();
    do begin
      s.delete();
      for (int i = 0; i < NLOAD; i++) s.push_back(rnd_str());
      ok = host.setup(s);
    end while (!ok);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // setup writes
    for (int a = 0; a < M; a++) begin
      cfg_we = 1; cfg_sel = cp_pkg::CFG_LUT; cfg_addr = HW'(a);
      cfg_data = '0; cfg_data[Q-1:0] = Q'(host.lut[a]);
      @(posedge clk); #1;
    end
    for (int a = 0; a < N; a++) begin
      cfg_we = 1; cfg_sel = cp_pkg::CFG_RT; cfg_addr = HW'(a);
      cfg_used = (a < NLOAD);
      cfg_data = (a < NLOAD) ? s[a] : rnd_str();
      @(posedge clk); #1;
    end
    cfg_we = 0;
    repeat (4) @(posedge clk);
    #1;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      pend_t p;
      case ($urandom_range(0, 3))
        0, 1: win = s[$urandom_range(0, NLOAD - 1)];
        2: begin
          int unsigned pos;
          win = s[$urandom_range(0, NLOAD - 1)];
          pos = $urandom_range(0, L - 1);
          win[8*pos +: 8] = win[8*pos +: 8] ^ 8'($urandom_range(1, 255));
          n_near++;
        end
        default: win = rnd_str();
      endcase
      win_valid = ($urandom_range(0, 5) != 0);
      if (!win_valid) n_bubble++;
      p.v = win_valid; p.w = win;
      pend.push_back(p);
      @(posedge clk); #1;
      if (pend.size() == LAT) begin
        int idx;
        p = pend.pop_front();
        idx = host.find(p.w);
        check(out_valid == p.v, "out_valid");
        if (p.v) begin
          check(match == (idx >= 0), "match");
          check(reject == (idx < 0), "reject");
          check(string_id == Q'(host.lookup_ptr(p.w)), "string_id vs lookup");
          if (idx >= 0) begin
            check(string_id == Q'(idx), "string_id of member");
            n_match++;
          end else n_reject++;
        end else begin
          check(!match && !reject, "no verdict in bubble");
        end
      end
    end
    $display("matches=%0d rejects=%0d near_misses=%0d bubbles=%0d", n_match, n_reject, n_near, n_bubble);
    check(n_match > 0 && n_reject > 0 && n_bubble > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
