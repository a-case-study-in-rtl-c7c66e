// coef_tables: on-chip copies of the force kernel's lookup tables.
//
// Two kinds of table are held, loaded once on the first call and then only
// read:
//  - the interpolation table: per entry k, the cubic coefficients (b, c, d)
//    of the van der Waals A term, the van der Waals B term and the
//    electrostatic term, nine single-precision numbers kept in nine
//    separate memories (c02, c03, c04, c06, c07, c08, c10, c11, c12), so all
//    nine come out in one read;
//  - the Lennard-Jones parameters A and B for each pair of van der Waals
//    types, held as two memories indexed by type_i * m + type_j.
//
// Loading: an interpolation entry arrives as six 64-bit words (tf_word
// 0..5, upper half = odd float of the pair); of the twelve floats, the
// constant terms (floats 0, 4, 8) are not stored because the force needs
// only the derivative. An LJ word is {B, A}.
//
// Reading: synchronous, data one clock after the address.
// The split into nine plus two memories follows the document. The depths
// are parameters.
module coef_tables
  import fp32_pkg::*;
  import md_pkg::*;
#(
  parameter int unsigned TABLE_DEPTH = TABLE_DEPTH_D,
  parameter int unsigned LJ_TYPES    = LJ_TYPES_D,
  localparam int unsigned TW = $clog2(TABLE_DEPTH),
  localparam int unsigned LJW = $clog2(LJ_TYPES * LJ_TYPES)
) (
  input  logic           clk,
  // interpolation table write
  input  logic           tf_we,
  input  logic [TW-1:0]  tf_addr,
  input  logic [2:0]     tf_word,
  input  logic [63:0]    tf_data,
  // LJ parameter write
  input  logic           lj_we,
  input  logic [LJW-1:0] lj_addr,
  input  logic [63:0]    lj_data,
  // reads
  input  logic [TW-1:0]  rd_ti,
  output coef_t          rd_coef,
  input  logic [LJW-1:0] rd_lj,
  output fp32_t          rd_a,
  output fp32_t          rd_b
);
  fp32_t c02 [TABLE_DEPTH];
  fp32_t c03 [TABLE_DEPTH];
  fp32_t c04 [TABLE_DEPTH];
  fp32_t c06 [TABLE_DEPTH];
  fp32_t c07 [TABLE_DEPTH];
  fp32_t c08 [TABLE_DEPTH];
  fp32_t c10 [TABLE_DEPTH];
  fp32_t c11 [TABLE_DEPTH];
  fp32_t c12 [TABLE_DEPTH];
  fp32_t lj_a [LJ_TYPES * LJ_TYPES];
  fp32_t lj_b [LJ_TYPES * LJ_TYPES];

  always_ff @(posedge clk) begin
    if (tf_we) begin
      case (tf_word)
        3'd0: c02[tf_addr] <= tf_data[63:32];
        3'd1: begin c03[tf_addr] <= tf_data[31:0]; c04[tf_addr] <= tf_data[63:32]; end
        3'd2: c06[tf_addr] <= tf_data[63:32];
        3'd3: begin c07[tf_addr] <= tf_data[31:0]; c08[tf_addr] <= tf_data[63:32]; end
        3'd4: c10[tf_addr] <= tf_data[63:32];
        3'd5: begin c11[tf_addr] <= tf_data[31:0]; c12[tf_addr] <= tf_data[63:32]; end
        default: ;
      endcase
    end
    if (lj_we) begin
      lj_a[lj_addr] <= lj_data[31:0];
      lj_b[lj_addr] <= lj_data[63:32];
    end
  end

  always_ff @(posedge clk) begin
    rd_coef.c02 <= c02[rd_ti];
    rd_coef.c03 <= c03[rd_ti];
    rd_coef.c04 <= c04[rd_ti];
    rd_coef.c06 <= c06[rd_ti];
    rd_coef.c07 <= c07[rd_ti];
    rd_coef.c08 <= c08[rd_ti];
    rd_coef.c10 <= c10[rd_ti];
    rd_coef.c11 <= c11[rd_ti];
    rd_coef.c12 <= c12[rd_ti];
    rd_a        <= lj_a[rd_lj];
    rd_b        <= lj_b[rd_lj];
  end

endmodule
