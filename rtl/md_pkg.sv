// md_pkg: types and constants shared by the nonbonded-force accelerator.
//
// An atom as the host delivers it is four 64-bit words, sent as two beats of
// two words on a dual 64-bit stream:
//   beat 0: word0 = {p_y, p_x}          word1 = {charge, p_z}
//   beat 1: word0 = {f_x, vdw_type}     word1 = {f_z, f_y}
// (upper half first, as the kernel's 64-bit split/combine operations order
// them). A result is one beat: word0 = {f_x, 32'd0}, word1 = {f_z, f_y}.
// Positions and charge are IEEE single precision, forces are signed 32-bit
// integers, the van der Waals type is an integer.
//
// The interpolation table entry is 12 floats, six 64-bit words; of them the
// kernel uses floats 1..3 (van der Waals A), 5..7 (van der Waals B) and
// 9..11 (electrostatics), i.e. the upper halves of words 0, 2 and 4 and
// both halves of words 1, 3 and 5. An LJ parameter word is {B, A}.
package md_pkg;
  import fp32_pkg::*;

  // Default sizes. MAX_ATOMS covers a pair of the largest patches (700 atoms
  // each). TABLE_DEPTH and LJ_TYPES are this design's choices.
  localparam int unsigned MAX_ATOMS_D   = 1400;
  localparam int unsigned TABLE_DEPTH_D = 1024;
  localparam int unsigned LJ_TYPES_D    = 32;

  typedef struct packed {
    fp32_t x;
    fp32_t y;
    fp32_t z;
  } vec3_t;

  typedef struct packed {
    logic signed [31:0] x;
    logic signed [31:0] y;
    logic signed [31:0] z;
  } ivec3_t;

  // What the compute engines keep per atom.
  typedef struct packed {
    vec3_t       pos;
    fp32_t       charge;
    logic [31:0] vdw;
  } atom_t;

  // One interpolation-table entry as used by the force pipeline.
  typedef struct packed {
    fp32_t c02, c03, c04;   // van der Waals A coefficients (b, c, d)
    fp32_t c06, c07, c08;   // van der Waals B coefficients (b, c, d)
    fp32_t c10, c11, c12;   // electrostatic coefficients   (b, c, d)
  } coef_t;

  // Run-time parameters of one kernel call (the MAP function's scalar
  // arguments, plus the force scale).
  typedef struct packed {
    logic [15:0]        i_upper;
    logic [15:0]        j_upper;
    logic               do_self;
    logic [15:0]        m;              // number of van der Waals types
    logic [15:0]        n;              // interpolation table entries
    fp32_t              dielectric_1;
    fp32_t              cutoff2;
    logic signed [31:0] r2_delta_expc;
    fp32_t              ivbias;
  } run_params_t;

endpackage
