// bloomier_engine: exact matching of an L-byte window against up to
// N_STRINGS stored strings with a Bloomier filter.
//
// Data path, one window per clock:
//   K h3_hash units  -> K locations in a lookup table of M = M_RATIO*N_STRINGS
//                       words of Q = log2(N_STRINGS) bits
//   lut_quad_port    -> the K words, read in one system cycle
//   pointer_xor      -> p(x), the XOR of the K words = candidate string ID
//   result_table     -> the stored string at p(x)
//   string_compare   -> equal to the window: match, else reject
// The host has set the lookup table up so that, for every stored string, the
// K words XOR to that string's result-table address. Any other window yields
// some pointer too, and the comparison throws that candidate out, so no false
// positive can leave the engine.
//
// Timing: the window presented with win_valid in cycle c0 gets its verdict
// (out_valid with match or reject, string_id) in cycle c0+6:
//   c0 window | c1 hash partials | c2 hash = LUT addresses | c3 LUT read |
//   c4 pointer | c5 result-table word | c6 verdict.
// A copy of the window travels down a five-stage delay line to meet its
// candidate. No stalls; win_valid low makes a bubble that flows through.
//
// Setup port: cfg_we with cfg_sel = CFG_LUT writes cfg_data[Q-1:0] at lookup
// table location cfg_addr; with CFG_RT writes cfg_data and cfg_used at result
// table entry cfg_addr. cfg_* is registered once on clk before use. Setup and
// lookups are not meant to overlap.
//
// clk2x runs at twice the rate of clk, rising edges aligned, for the
// time-multiplexed lookup table. K must be 4 (a quad-port table).
//
// The block structure, k = 4, m/n = 4 and q = log2(n) follow the document;
// the pipeline depths, setup port and valid flags are this design's.
module bloomier_engine #(
  parameter int unsigned N_STRINGS = 16384,
  parameter int unsigned L_BYTES   = 32,
  parameter int unsigned K_HASH    = 4,
  parameter int unsigned M_RATIO   = 4,
  parameter int unsigned SEED      = 1,
  localparam int unsigned Q        = $clog2(N_STRINGS),
  localparam int unsigned M        = M_RATIO * N_STRINGS,
  localparam int unsigned HW       = $clog2(M)
) (
  input  logic                 clk,
  input  logic                 clk2x,
  input  logic                 rst_n,
  // window
  input  logic                 win_valid,
  input  logic [8*L_BYTES-1:0] win,
  // verdict
  output logic                 out_valid,
  output logic                 match,
  output logic                 reject,
  output logic [Q-1:0]         string_id,
  // setup
  input  logic                 cfg_we,
  input  cp_pkg::cfg_sel_e     cfg_sel,
  input  logic [HW-1:0]        cfg_addr,
  input  logic [8*L_BYTES-1:0] cfg_data,
  input  logic                 cfg_used
);

  localparam int unsigned WB = 8 * L_BYTES;

  // Elaboration-time rule: the table is quad-port.
  if (K_HASH != 4) begin : g_bad_k
    $error("bloomier_engine: K_HASH must be 4");
  end

  // ---- setup port register ----
  logic             cfg_we_q, cfg_used_q;
  cp_pkg::cfg_sel_e cfg_sel_q;
  logic [HW-1:0]    cfg_addr_q;
  logic [WB-1:0]    cfg_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_we_q   <= 1'b0;
      cfg_sel_q  <= cp_pkg::CFG_LUT;
      cfg_addr_q <= '0;
      cfg_data_q <= '0;
      cfg_used_q <= 1'b0;
    end else begin
      cfg_we_q   <= cfg_we;
      cfg_sel_q  <= cfg_sel;
      cfg_addr_q <= cfg_addr;
      cfg_data_q <= cfg_data;
      cfg_used_q <= cfg_used;
    end
  end

  // ---- hash functions (c1, c2) ----
  logic [K_HASH-1:0][HW-1:0] hash;
  logic [K_HASH-1:0]         hash_v;

  for (genvar i = 0; i < K_HASH; i++) begin : g_hash
    h3_hash #(
      .IN_BITS(WB),
      .OUT_W  (HW),
      .FUNC   (i),
      .SEED   (SEED)
    ) u_hash (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (win_valid),
      .din      (win),
      .out_valid(hash_v[i]),
      .hash     (hash[i])
    );
  end

  // ---- lookup table (c3) ----
  logic [3:0][Q-1:0] lut_words;

  lut_quad_port #(
    .DEPTH(M),
    .WIDTH(Q)
  ) u_lut (
    .clk    (clk),
    .clk2x  (clk2x),
    .rst_n  (rst_n),
    .rd_addr(hash),
    .rd_data(lut_words),
    .wr_en  (cfg_we_q && cfg_sel_q == cp_pkg::CFG_LUT),
    .wr_addr(cfg_addr_q),
    .wr_data(cfg_data_q[Q-1:0])
  );

  logic v3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= &hash_v;
  end

  // ---- pointer (c4) ----
  logic         ptr_v;
  logic [Q-1:0] ptr;

  pointer_xor #(
    .K(K_HASH),
    .Q(Q)
  ) u_ptr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v3),
    .words    (lut_words),
    .out_valid(ptr_v),
    .ptr      (ptr)
  );

  // ---- result table (c5) ----
  logic          rt_v, rt_used;
  logic [WB-1:0] rt_data;

  result_table #(
    .N_STRINGS(N_STRINGS),
    .L_BYTES  (L_BYTES)
  ) u_rt (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_en   (ptr_v),
    .rd_addr (ptr),
    .rd_valid(rt_v),
    .rd_data (rt_data),
    .rd_used (rt_used),
    .wr_en   (cfg_we_q && cfg_sel_q == cp_pkg::CFG_RT),
    .wr_addr (cfg_addr_q[Q-1:0]),
    .wr_data (cfg_data_q),
    .wr_used (cfg_used_q)
  );

  // ---- window and pointer delay lines to c5 ----
  logic [4:0][WB-1:0] win_dly;
  logic [Q-1:0]       ptr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_dly <= '0;
      ptr_d   <= '0;
    end else begin
      win_dly <= {win_dly[3:0], win};
      ptr_d   <= ptr;
    end
  end

  // Setup and lookups must not overlap: no table write while a window is
  // in flight toward the lookup table or result table.
  a_no_setup_during_lookup: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we_q |-> !(hash_v[0] || v3 || ptr_v));

  // ---- verdict (c6) ----
  string_compare #(
    .L_BYTES(L_BYTES),
    .Q      (Q)
  ) u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rt_v),
    .window   (win_dly[4]),
    .candidate(rt_data),
    .cand_used(rt_used),
    .ptr      (ptr_d),
    .out_valid(out_valid),
    .match    (match),
    .reject   (reject),
    .string_id(string_id)
  );

endmodule
