// ldpc_pkg: constants, types and tables shared by the PG(2,2^3) LDPC decoder.
//
// The code is the type-I projective-plane code over GF(8): 73 points (bits),
// 73 lines (checks), 9 points per line and 9 lines per point. The incidence
// is generated by one shift-invariant offset list D: point p lies on line
// (p + D[k]) mod 73, and line l holds points (l - D[k]) mod 73. D is the
// perfect difference set {0,1,71,38,11,20,43,59,67} in the order the
// message memories store it: location k of every memory belongs to offset
// D[k]. Reading locations 2c and 2c+1 of all memories in cycle c therefore
// gives every processing unit exactly two distinct operands (a perfect
// access pattern), and five such cycles form the perfect access sequence.
//
// Messages are 9-bit sign-magnitude words: bit 8 is the sign, bits 7:0 a
// 3.5 fixed-point magnitude (largest 7.96875). The LLR convention is
// log(P(c=0)/P(c=1)), so a negative total means bit 1 and the (-1)^|N_m|
// factor of the check update disappears.
//
// The control vector of one 42-cycle iteration follows the reference
// schedule bit for bit (40 bits, cvec[39:0]); ucode_row() builds it from the
// cycle intervals of each signal.
//
// Follows the reference design: the code, the 9-bit 3.5 message format, the
// 13-bit bit-node and 12-bit check-node widths, the 42-cycle control schedule
// (40-bit word as in its tables; its text gives 38 bits) and the phi
// coefficients. Own choices: the log(P0/P1) sign convention, the stored
// order of D (one shift-invariant order for every block), phi(0) = 254
// taken from the first linear piece, and the memory map (10 and 11 for the
// value vector).
package ldpc_pkg;

  // Code and geometry -----------------------------------------------------
  localparam int unsigned N_NODES  = 73;   // points = lines = 2^6 + 2^3 + 1
  localparam int unsigned DEG      = 9;    // 2^3 + 1
  localparam int unsigned N_PAIRS  = 5;    // ceil((DEG + 1) / 2) access cycles
  localparam int unsigned MEM_DEPTH = 12;  // 9 messages, 1 zero word, 2 value-vector words
  localparam int unsigned ADDR_W   = 4;
  localparam int unsigned ZERO_LOC = 9;    // tenth location, always 0
  localparam int unsigned VV_LOC   = 10;   // value vector at 10 (port A) and 11 (port B)

  localparam int unsigned D_OFF [DEG] = '{0, 1, 71, 38, 11, 20, 43, 59, 67};

  // Number formats --------------------------------------------------------
  localparam int unsigned MSG_W  = 9;   // 1 sign + 3 integer + 5 fraction
  localparam int unsigned MAG_W  = 8;
  localparam int unsigned BACC_W = 13;  // bit node internal width (2's complement)
  localparam int unsigned CACC_W = 12;  // check node magnitude width (unsigned)

  typedef logic [MSG_W-1:0] msg_t;

  // Microcode ------------------------------------------------------------
  localparam int unsigned ITER_CYCLES = 42;
  localparam int unsigned CVEC_W      = 40;

  typedef struct packed {
    logic en_intr_wr;      // 39 latch intrinsic information (first iteration only)
    logic en_pmux_b;       // 38 processor switches of bit PUs
    logic spare37;         // 37
    logic cl_add_b;        // 36 clear bit accumulator
    logic en_add_b;        // 35 bit accumulation scan
    logic en_shift_b;      // 34 bit shift registers
    logic en_intr_add;     // 33 add intrinsic information to total sum
    logic en_codetest;     // 32 hard decision / value vector
    logic codetest_wr;     // 31 bit address generator to value-vector locations
    logic en_sub_b;        // 30 bit output scan subtractors
    logic en_res_conv;     // 29 2's complement to sign-magnitude
    logic en_sat_b;        // 28 bit saturation
    logic en_out_b;        // 27 bit output register
    logic badd_en;         // 26 bit address generator
    logic en_wr_bmem_1;    // 25 bit memory port A write
    logic en_wr_bmem_2;    // 24 bit memory port B write
    logic en_mmux_b;       // 23 memory switches of bit memories
    logic spare22;         // 22
    logic spare21;         // 21
    logic spare20;         // 20
    logic decide_cword;    // 19 syndrome decision
    logic cl_add_c;        // 18 clear check magnitude accumulator
    logic cl_sign_acc;     // 17 clear check sign accumulator
    logic en_pmux_c;       // 16 processor switches of check PUs
    logic spare15;         // 15
    logic en_sign_shift;   // 14 check sign shift registers
    logic en_sign_acc;     // 13 check sign accumulation scan
    logic en_sign_res;     // 12 outgoing sign
    logic phase_choice_c;  // 11 0: forward phi of inputs, 1: inverse phi of residues
    logic coeff_choice_c;  // 10 choose slope/offset of phi
    logic en_scaling_c;    // 9  rescale multiply-add result
    logic en_add_c;        // 8  check accumulation scan
    logic en_mag_shift_c;  // 7  check magnitude shift registers
    logic en_sub_c;        // 6  check output scan subtractors
    logic en_sat_c;        // 5  check saturation
    logic en_reschoice_c;  // 4  check output register
    logic cadd_en;         // 3  check address generator
    logic en_wr_cmem_1;    // 2  check memory port A write
    logic en_wr_cmem_2;    // 1  check memory port B write
    logic en_mmux_c;       // 0  memory switches of check memories
  } cvec_t;

  function automatic logic in_range(int unsigned c, int unsigned lo, int unsigned hi);
    return (c >= lo) && (c <= hi);
  endfunction

  // Control vector of iteration cycle c (1..42).
  function automatic cvec_t ucode_row(int unsigned c);
    cvec_t v;
    v = '0;
    v.en_intr_wr     = (c == 1);
    v.en_pmux_b      = in_range(c, 4, 8);
    v.cl_add_b       = (c == 5);
    v.en_add_b       = in_range(c, 6, 10);
    v.en_shift_b     = in_range(c, 6, 15);
    v.en_intr_add    = (c == 11);
    v.en_codetest    = (c == 12);
    v.codetest_wr    = in_range(c, 12, 13);
    v.en_sub_b       = in_range(c, 12, 16);
    v.en_res_conv    = in_range(c, 13, 17);
    v.en_sat_b       = in_range(c, 14, 18);
    v.en_out_b       = (c == 12) || in_range(c, 15, 19);
    v.badd_en        = in_range(c, 12, 13) || in_range(c, 15, 24);
    v.en_wr_bmem_1   = (c == 13) || in_range(c, 16, 20);
    v.en_wr_bmem_2   = (c == 13) || in_range(c, 16, 20);
    v.en_mmux_b      = in_range(c, 15, 19) || in_range(c, 22, 26);
    v.decide_cword   = (c == 22);
    v.cl_add_c       = (c == 26);
    v.cl_sign_acc    = (c == 16) || (c == 23);
    v.en_pmux_c      = in_range(c, 16, 20) || in_range(c, 23, 27);
    v.en_sign_shift  = in_range(c, 24, 40);
    v.en_sign_acc    = in_range(c, 17, 21) || in_range(c, 24, 28);
    v.en_sign_res    = in_range(c, 37, 41);
    v.phase_choice_c = in_range(c, 32, 42);
    v.coeff_choice_c = in_range(c, 24, 28) || in_range(c, 34, 38);
    v.en_scaling_c   = in_range(c, 26, 30) || in_range(c, 36, 40);
    v.en_add_c       = in_range(c, 27, 31);
    v.en_mag_shift_c = in_range(c, 27, 35);
    v.en_sub_c       = in_range(c, 32, 36);
    v.en_sat_c       = in_range(c, 33, 37);
    v.en_reschoice_c = in_range(c, 37, 41);
    v.cadd_en        = in_range(c, 1, 5) || in_range(c, 37, 41);
    v.en_wr_cmem_1   = in_range(c, 38, 42);
    v.en_wr_cmem_2   = in_range(c, 38, 42);
    v.en_mmux_c      = in_range(c, 3, 7);
    return v;
  endfunction

  // Modified Masera approximation of phi(x) = -log(tanh(x/2)) -----------
  // x and the result are 3.5 fixed point (units of 1/32). Each interval has
  // an integer slope, an offset in 1/32 units and a power-of-two scale; the
  // multiply-add result is shifted right by log2(scale).
  typedef struct packed {
    logic signed [6:0] slope;   // -48 .. 0
    logic        [7:0] offset;  // 1/32 units, pre-scaled
    logic        [2:0] shift;   // log2(scale)
  } phi_coef_t;

  function automatic phi_coef_t phi_coef(logic [MAG_W-1:0] x);
    phi_coef_t k;
    if      (x <   8'd4)   k = '{slope: -7'sd48, offset: 8'd254, shift: 3'd0}; // -48x+7.9375
    else if (x <=  8'd8)   k = '{slope: -7'sd15, offset: 8'd248, shift: 3'd1}; // -7.5x+3.875
    else if (x <=  8'd24)  k = '{slope: -7'sd2,  offset: 8'd82,  shift: 3'd0}; // -2x+2.5625
    else if (x <=  8'd32)  k = '{slope: -7'sd1,  offset: 8'd56,  shift: 3'd0}; // -x+1.75
    else if (x <=  8'd64)  k = '{slope: -7'sd1,  offset: 8'd80,  shift: 3'd1}; // -0.5x+1.25
    else if (x <=  8'd90)  k = '{slope: -7'sd1,  offset: 8'd128, shift: 3'd3}; // -0.125x+0.5
    else if (x <=  8'd120) k = '{slope: -7'sd1,  offset: 8'd160, shift: 3'd4}; // -0.0625x+0.3125
    else if (x <=  8'd194) k = '{slope: 7'sd0,   offset: 8'd2,   shift: 3'd0}; // 0.0625
    else                   k = '{slope: 7'sd0,   offset: 8'd0,   shift: 3'd0}; // 0
    return k;
  endfunction

  // phi(0): the value the zero tenth operand adds to every check total sum.
  localparam logic [MAG_W-1:0] PHI_ZERO = 8'd254;

endpackage
