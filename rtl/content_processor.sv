// content_processor: an in-line exact string matcher for a disk data stream.
//
// Placed between the disk and the host bus, it watches the byte stream (one
// byte per clock) and reports every position at which the last L_BYTES
// bytes equal one of up to N_STRINGS stored strings, with the string's ID.
// The bytes themselves pass through unchanged, delayed by the L_BYTES-byte
// window.
//
// Structure: data_window (the sliding L-byte window) feeds bloomier_engine
// (K_HASH hash functions, a lookup table of M_RATIO*N_STRINGS pointers read
// K_HASH times per clock, a result table of the strings, and a comparator).
//
// Interface:
//   clk, clk2x   system clock and the double-rate, edge-aligned memory clock
//   in_valid/in_byte     stream in; in_valid low inserts a bubble
//   out_valid/out_byte   stream out, the byte that left the window
//   cfg_*        host setup writes to the two tables (see bloomier_engine)
//   hit_valid    a verdict for one full window is available
//   hit          that window equals stored string hit_id
//   hit_reject   the candidate the lookup produced was not the window
//   hit_pos      index (from 0 after reset) of the last byte of that window
// Timing: the verdict for the window completed by a byte presented in cycle
// t appears in cycle t+7 (1 clock in the window, 6 in the engine). A verdict
// is made only once L_BYTES bytes have entered.
//
// The window, the engine and its parameters (16K strings of 32 bytes,
// k = 4, m/n = 4) follow the document; the stream interface, the byte
// position and the setup port are this design's, since the document does not
// describe the disk and bus side.
module content_processor #(
  parameter int unsigned N_STRINGS = 16384,
  parameter int unsigned L_BYTES   = 32,
  parameter int unsigned K_HASH    = 4,
  parameter int unsigned M_RATIO   = 4,
  parameter int unsigned SEED      = 1,
  parameter int unsigned POS_W     = 32,
  localparam int unsigned Q        = $clog2(N_STRINGS),
  localparam int unsigned HW       = $clog2(M_RATIO * N_STRINGS)
) (
  input  logic                 clk,
  input  logic                 clk2x,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [7:0]           in_byte,
  output logic                 out_valid,
  output logic [7:0]           out_byte,
  input  logic                 cfg_we,
  input  cp_pkg::cfg_sel_e     cfg_sel,
  input  logic [HW-1:0]        cfg_addr,
  input  logic [8*L_BYTES-1:0] cfg_data,
  input  logic                 cfg_used,
  output logic                 hit_valid,
  output logic                 hit,
  output logic                 hit_reject,
  output logic [Q-1:0]         hit_id,
  output logic [POS_W-1:0]     hit_pos
);

  localparam int unsigned ENGINE_LAT = 6;

  logic [8*L_BYTES-1:0] win;
  logic                 win_new, win_full;

  data_window #(
    .L_BYTES(L_BYTES)
  ) u_window (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_byte    (in_byte),
    .win        (win),
    .win_new    (win_new),
    .win_full   (win_full),
    .leave_valid(out_valid),
    .leave_byte (out_byte)
  );

  bloomier_engine #(
    .N_STRINGS(N_STRINGS),
    .L_BYTES  (L_BYTES),
    .K_HASH   (K_HASH),
    .M_RATIO  (M_RATIO),
    .SEED     (SEED)
  ) u_engine (
    .clk      (clk),
    .clk2x    (clk2x),
    .rst_n    (rst_n),
    .win_valid(win_new && win_full),
    .win      (win),
    .out_valid(hit_valid),
    .match    (hit),
    .reject   (hit_reject),
    .string_id(hit_id),
    .cfg_we   (cfg_we),
    .cfg_sel  (cfg_sel),
    .cfg_addr (cfg_addr),
    .cfg_data (cfg_data),
    .cfg_used (cfg_used)
  );

  // Byte position of the newest byte in the window, carried to the verdict.
  logic [POS_W-1:0]                 pos_cnt;
  logic [ENGINE_LAT-1:0][POS_W-1:0] pos_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_cnt <= '0;
      pos_dly <= '0;
    end else begin
      if (in_valid) pos_cnt <= pos_cnt + 1'b1;
      pos_dly <= {pos_dly[ENGINE_LAT-2:0], pos_cnt - 1'b1};
    end
  end

  assign hit_pos = pos_dly[ENGINE_LAT-1];

endmodule
