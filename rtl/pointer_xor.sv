// pointer_xor: recovers the result-table pointer from the K lookup-table words.
//
// The host encodes each stored string x into the lookup table so that the XOR
// of the K words at its K hash locations equals its pointer p(x):
//   p(x) = D[h_1(x)] XOR D[h_2(x)] XOR ... XOR D[h_K(x)]
// This block forms that XOR and registers it (one clock), with in_valid
// travelling alongside. The output is also the string ID reported to the
// user. The XOR reduction follows the document; the register is this
// design's pipelining.
module pointer_xor #(
  parameter int unsigned K = 4,
  parameter int unsigned Q = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [K-1:0][Q-1:0] words,
  output logic                out_valid,
  output logic [Q-1:0]        ptr
);

  logic [Q-1:0] x;
  always_comb begin
    x = '0;
    for (int unsigned i = 0; i < K; i++) x = x ^ words[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      out_valid <= 1'b0;
    end else begin
      ptr       <= x;
      out_valid <= in_valid;
    end
  end

endmodule
