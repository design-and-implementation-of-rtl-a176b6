// cp_stream_check: one end-to-end stream test of content_processor at the
// size given by its parameters (N strings of L bytes, NLOAD of them loaded).
// The host model sets up and writes both tables; a stream of stored strings
// (whole, back to back, overlapping, with one byte changed) mixed with random
// bytes and bubbles is sent, and every verdict is checked at its exact cycle
// (7 clocks after the byte): hit with ID and position, or reject, nothing
// during the (L-1)-byte fill or in bubbles, and the passed-through bytes.
// Each of those cases must occur at least once. Reports done, checks and
// failures on its ports for a testbench that runs several sizes.
module cp_stream_check #(
  parameter int unsigned N     = 64,
  parameter int unsigned L     = 32,
  parameter int unsigned NLOAD = 60,
  parameter int unsigned NREP  = 150
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import bloomier_host_pkg::*;
  localparam int unsigned K = 4, MR = 4, SD = 1;
  localparam int unsigned M = MR * N, Q = $clog2(N), HW = $clog2(M);
  localparam int unsigned LAT = 7;

  logic clk = 0, clk2x = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_byte = '0;
  logic out_valid;
  logic [7:0] out_byte;
  logic cfg_we = 0, cfg_used = 0;
  cp_pkg::cfg_sel_e cfg_sel = cp_pkg::CFG_LUT;
  logic [HW-1:0] cfg_addr = '0;
  logic [8*L-1:0] cfg_data = '0;
  logic hit_valid, hit, hit_reject;
  logic [Q-1:0] hit_id;
  logic [31:0] hit_pos;
  initial begin done = 0; checks = 0; failures = 0; end
  int n_hit = 0, n_reject = 0, n_bubble = 0, n_near = 0, n_overlap = 0;
  int n_fill = 0, n_pass = 0;

  content_processor #(.N_STRINGS(N), .L_BYTES(L), .K_HASH(K), .M_RATIO(MR), .SEED(SD)) dut (.*);

  initial forever begin
    #5 clk2x = 1; clk = 1;
    #5 clk2x = 0;
    #5 clk2x = 1; clk = 0;
    #5 clk2x = 0;
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

  // stream to send: byte, valid
  byte unsigned tx_b [$];
  bit           tx_v [$];
  // what has been sent, for the reference
  byte unsigned hist [$];
  int           hits_at [int];   // byte index -> string index, built from the stream

  typedef struct { bit v; int idx; } exp_t;   // idx: -2 none, -1 reject, >=0 hit
  exp_t pend [$];
  int   prev_idx = -2;
  byte unsigned pass_exp [$];

  task automatic put_str(str_t x);
    for (int c = 0; c < L; c++) begin
      tx_b.push_back(x[8*c +: 8]); tx_v.push_back(1);
    end
  endtask

  task automatic put_fill(int n);
    for (int c = 0; c < n; c++) begin
      if ($urandom_range(0, 3) == 0) begin
        tx_b.push_back(0); tx_v.push_back(0);
      end
      tx_b.push_back(8'($urandom)); tx_v.push_back(1);
    end
  endtask

  initial begin
    str_t s [$];
    bit ok;
    host = new();
    do begin
      s.delete();
      for (int i = 0; i < NLOAD; i++) s.push_back(rnd_str());
      // one string that is a shifted copy of another, so hits can overlap
      s[1] = {8'h5a, s[0][8*L-1:8]};
      ok = host.setup(s);
    end while (!ok);

    // build the stream
    put_fill(10);
    for (int r = 0; r < NREP; r++) begin
      case ($urandom_range(0, 4))
        0: put_str(s[$urandom_range(0, NLOAD - 1)]);
        1: begin   // two back to back
          put_str(s[$urandom_range(0, NLOAD - 1)]);
          put_str(s[$urandom_range(0, NLOAD - 1)]);
        end
        2: begin   // near miss
          str_t x;
          int unsigned pos;
          x = s[$urandom_range(0, NLOAD - 1)];
          pos = $urandom_range(0, L - 1);
          x[8*pos +: 8] = x[8*pos +: 8] ^ 8'($urandom_range(1, 255));
          put_str(x);
          n_near++;
        end
        3: begin   // s[0] then one more byte: s[1] overlaps it
          put_str(s[0]);
          tx_b.push_back(8'h5a); tx_v.push_back(1);
        end
        default: put_fill($urandom_range(1, 40));
      endcase
      // with bubbles inside a string too, sometimes
      if ($urandom_range(0, 3) == 0) begin
        tx_b.push_back(0); tx_v.push_back(0);
      end
    end
    put_fill(5);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
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

    for (int t = 0; t < tx_b.size() + LAT; t++) begin
      exp_t e;
      e.v = 0; e.idx = -2;
      if (t < tx_b.size()) begin
        in_valid = tx_v[t];
        in_byte  = tx_b[t];
        if (!tx_v[t]) n_bubble++;
      end else begin
        in_valid = 0;
      end
      if (in_valid) begin
        hist.push_back(in_byte);
        if (hist.size() > L) pass_exp.push_back(hist[hist.size() - L - 1]);
        if (hist.size() >= L) begin
          str_t w;
          for (int c = 0; c < L; c++) w[8*c +: 8] = hist[hist.size() - L + c];
          e.v = 1;
          e.idx = host.find(w);
        end else n_fill++;
      end
      pend.push_back(e);
      @(posedge clk); #1;
      // pass-through byte, one clock after it was pushed out
      if (out_valid) begin
        check(pass_exp.size() > 0 && out_byte == pass_exp[0], "pass-through byte");
        if (pass_exp.size() > 0) void'(pass_exp.pop_front());
        n_pass++;
      end
      if (pend.size() == LAT) begin
        e = pend.pop_front();
        check(hit_valid == e.v, "hit_valid");
        if (e.v) begin
          check(hit == (e.idx >= 0), "hit");
          check(hit_reject == (e.idx < 0), "hit_reject");
          if (e.idx >= 0) begin
            check(hit_id == Q'(e.idx), "hit_id");
            n_hit++;
            if (e.idx == 1 && prev_idx == 0) n_overlap++;
          end else n_reject++;
          prev_idx = e.idx;
        end else check(!hit && !hit_reject, "no verdict");
      end
      if (hit) begin
        // the position must name the last byte of the matched window
        str_t w;
        int   base, found;
        base = int'(hit_pos) - int'(L) + 1;
        for (int c = 0; c < L; c++) begin
          int k;
          k = base + c;
          w[8*c +: 8] = hist[k];
        end
        found = host.find(w);
        check(found == int'(hit_id), "hit_pos");
      end
    end
    $display("N=%0d L=%0d loaded=%0d: hits=%0d rejects=%0d near_misses=%0d overlaps=%0d bubbles=%0d fill_bytes=%0d pass_bytes=%0d",
             N, L, NLOAD, n_hit, n_reject, n_near, n_overlap, n_bubble, n_fill, n_pass);
    check(n_hit > 0, "hits happened");
    check(n_reject > 0, "rejects happened");
    check(n_near > 0, "near misses happened");
    check(n_overlap > 0, "overlapping hits happened");
    check(n_bubble > 0, "bubbles happened");
    check(n_fill == L - 1, "window fill period");
    check(n_pass > 0, "pass-through happened");
    done = 1;
  end
endmodule
