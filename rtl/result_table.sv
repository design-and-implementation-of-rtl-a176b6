// result_table: the table of original strings, N_STRINGS entries of
// L_BYTES bytes, addressed by the pointer p(x) from the lookup table.
//
// Each entry also carries a used flag, so that a pointer to an entry the host
// left empty (fewer than N_STRINGS strings loaded) can never report a match.
// One synchronous read port (rd_data/rd_used valid one clock after rd_addr,
// with rd_valid travelling alongside) and one synchronous write port for host
// setup. Not reset: the host writes every entry, used or not.
//
// Size n x L bytes and its use to reject false positives follow the
// document; the used flag is this design's.
module result_table #(
  parameter int unsigned N_STRINGS = 16384,
  parameter int unsigned L_BYTES   = 32,
  localparam int unsigned AW       = $clog2(N_STRINGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic                 rd_valid,
  output logic [8*L_BYTES-1:0] rd_data,
  output logic                 rd_used,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [8*L_BYTES-1:0] wr_data,
  input  logic                 wr_used
);

  logic [8*L_BYTES:0] mem [N_STRINGS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {wr_used, wr_data};
    {rd_used, rd_data} <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
