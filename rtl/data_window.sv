// data_window: the L-byte sliding window over the incoming byte stream.
//
// Every clock with in_valid high, the entering byte is shifted in at the top
// (position L) and the oldest byte (position 1) leaves. The window word packs
// byte position p (1 = oldest) into bits [8*(p-1) +: 8], so once the window is
// full, win[7:0] is the first character of the L-byte string and
// win[8*L-1 -: 8] its last. This is the byte order the result table stores
// strings in.
//
// Outputs are registered: win/win_full/win_new change one clock after the
// byte is presented. win_new marks a cycle in which the window advanced;
// win_full says at least L bytes have entered since reset. leave_byte /
// leave_valid give the byte that was pushed out, so the stream can continue
// in-line to the host.
//
// Shift direction and the entering/leaving names follow the document's
// window figure; the fill counter, valid flags and reset are this design's.
module data_window #(
  parameter int unsigned L_BYTES = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [7:0]           in_byte,
  output logic [8*L_BYTES-1:0] win,
  output logic                 win_new,
  output logic                 win_full,
  output logic                 leave_valid,
  output logic [7:0]           leave_byte
);

  localparam int unsigned CW = $clog2(L_BYTES + 1);
  logic [CW-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win         <= '0;
      fill        <= '0;
      win_new     <= 1'b0;
      leave_valid <= 1'b0;
      leave_byte  <= '0;
    end else begin
      win_new     <= in_valid;
      leave_valid <= in_valid && (fill == CW'(L_BYTES));
      if (in_valid) begin
        leave_byte <= win[7:0];
        win        <= {in_byte, win[8*L_BYTES-1:8]};
        if (fill != CW'(L_BYTES)) fill <= fill + 1'b1;
      end
    end
  end

  assign win_full = (fill == CW'(L_BYTES));

  // Once full, the window stays full until reset; bytes leave only then.
  a_full_sticky: assert property (@(posedge clk) disable iff (!rst_n)
    win_full |=> win_full);
  a_leave_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    leave_valid |-> win_full);

endmodule
