// string_compare: the final exact-match test of the Bloomier filter engine.
//
// The lookup table can return a pointer for any window, including windows
// that are not stored strings. The candidate string read from the result
// table is therefore compared, all L_BYTES bytes at once, with the window
// that produced the pointer. Equal (and the entry in use) means a true
// match; anything else is rejected as a false positive.
//
// Registered: one clock from in_valid to out_valid. match is meaningful only
// with out_valid; reject flags a verdict that found no match; string_id is
// the pointer delayed to line up with the verdict.
//
// The comparison follows the document; the reject flag, the used-entry test
// and the register are this design's.
module string_compare #(
  parameter int unsigned L_BYTES = 32,
  parameter int unsigned Q       = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [8*L_BYTES-1:0] window,
  input  logic [8*L_BYTES-1:0] candidate,
  input  logic                 cand_used,
  input  logic [Q-1:0]         ptr,
  output logic                 out_valid,
  output logic                 match,
  output logic                 reject,
  output logic [Q-1:0]         string_id
);

  wire hit = cand_used && (candidate == window);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      match     <= 1'b0;
      reject    <= 1'b0;
      string_id <= '0;
    end else begin
      out_valid <= in_valid;
      match     <= in_valid && hit;
      reject    <= in_valid && !hit;
      string_id <= ptr;
    end
  end

  // A verdict is exactly one of match or reject, and only with out_valid.
  a_one_verdict: assert property (@(posedge clk) disable iff (!rst_n)
    (match || reject) |-> (out_valid && (match != reject)));
  a_verdict_given: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (match || reject));

endmodule
