// lut_quad_port: the Bloomier filter lookup table, DEPTH words of WIDTH bits,
// with four random reads per system clock built from one dual-port memory.
//
// A block RAM has two ports. Running it on clk2x, a clock at twice the system
// rate with every other rising edge aligned to a rising edge of clk, gives
// four accesses per system cycle: ports 0 and 1 are served at the clk2x edge
// in the middle of the system cycle, ports 2 and 3 at the clk2x edge that
// coincides with the next clk edge (time-division multiplexing).
//
// Phase: a toggle flop on clk is copied by a flop on clk2x; the two differ
// only at the mid-cycle clk2x edge (mid_phase).
//
// Timing, for read addresses held stable for the whole of system cycle t
// (they must come from clk registers):
//   mid edge of t     : memory reads rd_addr[0], rd_addr[1]
//   clk edge ending t : memory reads rd_addr[2], rd_addr[3]; words 0 and 1
//                       are moved to their output registers
//   mid edge of t+1   : words 2 and 3 are moved to their output registers
// All four rd_data words are then sampled by clk registers at the clk edge
// ending cycle t+1, which is the same schedule as a synchronous RAM with one
// cycle of read latency followed by an output register. Words 2 and 3 are
// stable only from the middle of cycle t+1: rd_data must feed registers.
//
// Writes (host setup) take port A at the mid edge when wr_en, driven from
// clk registers; a read on port 0 in the same cycle returns nothing useful.
// The table is not reset: setup writes every location.
//
// Four ports from a time-multiplexed dual-port memory on a second clock
// domain follows the document; the phase detector, the write slot and the
// output registers are this design's.
module lut_quad_port #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 14,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 clk2x,
  input  logic                 rst_n,
  input  logic [3:0][AW-1:0]   rd_addr,
  output logic [3:0][WIDTH-1:0] rd_data,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [WIDTH-1:0]     wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  // Phase detection between the two clocks.
  logic tog_sys, tog_2x;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tog_sys <= 1'b0;
    else        tog_sys <= ~tog_sys;
  end
  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) tog_2x <= 1'b0;
    else        tog_2x <= tog_sys;
  end
  wire mid_phase = tog_sys ^ tog_2x;

  // Dual-port core, both ports read-first, port A also writes.
  wire [AW-1:0] addr_a = mid_phase ? rd_addr[0] : rd_addr[2];
  wire [AW-1:0] addr_b = mid_phase ? rd_addr[1] : rd_addr[3];
  logic [WIDTH-1:0] q_a, q_b;

  always_ff @(posedge clk2x) begin
    if (mid_phase && wr_en) mem[wr_addr] <= wr_data;
    q_a <= mem[addr_a];
    q_b <= mem[addr_b];
  end

  // Hold registers that present all four words across a system cycle.
  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else if (mid_phase) begin
      rd_data[2] <= q_a;
      rd_data[3] <= q_b;
    end else begin
      rd_data[0] <= q_a;
      rd_data[1] <= q_b;
    end
  end

endmodule
