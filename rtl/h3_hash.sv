// h3_hash: one universal hash function of the H3 class over an IN_BITS word.
//
//   h(x) = d_1.x_1 XOR d_2.x_2 XOR ... XOR d_b.x_b
//
// Each input bit x_j selects (AND) a predetermined random OUT_W-bit
// coefficient d_j, and the selected coefficients are XORed together. The
// coefficients are constants worked out at elaboration from
// cp_pkg::h3_coef(FUNC, j, SEED), keeping the low OUT_W bits, so no table is
// stored. Because the sum is a plain XOR, the value over the first j bits is
// reused for the first j+1 bits; the hardware splits the sum into one partial
// XOR per GROUP input bits and then XORs the partials.
//
// Pipeline: two register stages. Stage 1 holds the per-group partials,
// stage 2 the hash. in_valid travels alongside: hash/out_valid appear two
// clocks after din/in_valid. A new word may enter every clock.
//
// The hash form follows the document; the coefficient generator, the
// grouping and the two-stage pipeline are this design's.
module h3_hash #(
  parameter int unsigned IN_BITS = 256,
  parameter int unsigned OUT_W   = 16,
  parameter int unsigned FUNC    = 0,
  parameter int unsigned SEED    = 1,
  parameter int unsigned GROUP   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [IN_BITS-1:0] din,
  output logic               out_valid,
  output logic [OUT_W-1:0]   hash
);

  localparam int unsigned NGRP = (IN_BITS + GROUP - 1) / GROUP;

  typedef logic [IN_BITS-1:0][OUT_W-1:0] coef_t;

  function automatic coef_t gen_coefs();
    coef_t c;
    for (int unsigned j = 0; j < IN_BITS; j++) begin
      c[j] = OUT_W'(cp_pkg::h3_coef(FUNC, j, SEED));
      if (c[j] == '0) c[j] = OUT_W'(1);
    end
    return c;
  endfunction

  localparam coef_t COEF = gen_coefs();

  logic [NGRP-1:0][OUT_W-1:0] part_d, part_q;
  logic                       v1;

  always_comb begin
    part_d = '0;
    for (int unsigned g = 0; g < NGRP; g++) begin
      for (int unsigned b = 0; b < GROUP; b++) begin
        if (g * GROUP + b < IN_BITS) begin
          if (din[g * GROUP + b]) part_d[g] = part_d[g] ^ COEF[g * GROUP + b];
        end
      end
    end
  end

  logic [OUT_W-1:0] sum_d;
  always_comb begin
    sum_d = '0;
    for (int unsigned g = 0; g < NGRP; g++) sum_d = sum_d ^ part_q[g];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_q    <= '0;
      v1        <= 1'b0;
      hash      <= '0;
      out_valid <= 1'b0;
    end else begin
      part_q    <= part_d;
      v1        <= in_valid;
      hash      <= sum_d;
      out_valid <= v1;
    end
  end

endmodule
