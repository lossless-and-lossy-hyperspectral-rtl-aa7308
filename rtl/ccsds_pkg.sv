// ccsds_pkg: types and constants shared by the CCSDS 123.0-B-2 compressor.
//
// The compile-time maxima follow the synthesised "base" configuration of the
// core: BIL processing order, 680 columns x 512 rows x 256 bands, 16-bit
// samples, up to 3 prediction bands, weight resolution up to 13, register size
// up to 48, error limits up to 8 bits, sample representative resolution up to
// 2, initial count exponent up to 1, rescaling counter size up to 4, unary
// length limit 16 and a 32-bit output word. The run-time configuration that the
// AHB configuration interface loads is the struct cfg_t below; its field
// encodings are choices of this design.
package ccsds_pkg;

  // ---- compile-time maxima -------------------------------------------------
  localparam int unsigned NX_MAX      = 680;
  localparam int unsigned NY_MAX      = 512;
  localparam int unsigned NZ_MAX      = 256;
  localparam int unsigned D           = 16;   // dynamic range (bits per sample)
  localparam int unsigned P_MAX       = 3;    // prediction bands
  localparam int unsigned C_MAX       = P_MAX + 3; // local difference vector length
  localparam int unsigned OMEGA_MAX   = 13;   // weight resolution
  localparam int unsigned R_MAX       = 48;   // register size
  localparam int unsigned ERR_BITS    = 8;    // error limit bit depth
  localparam int unsigned THETA_MAX   = 2;    // sample representative resolution
  localparam int unsigned GAMMA0_MAX  = 1;    // initial count exponent
  localparam int unsigned GSTAR_MAX   = 4;    // rescaling counter size
  localparam int unsigned UMAX_MAX    = 16;   // unary length limit
  localparam int unsigned OUT_W       = 32;   // output word width

  localparam int unsigned XW = $clog2(NX_MAX);
  localparam int unsigned YW = $clog2(NY_MAX);
  localparam int unsigned ZW = $clog2(NZ_MAX);
  localparam int unsigned TW = $clog2(NX_MAX * NY_MAX);

  // Widths of datapath quantities.
  localparam int unsigned WW   = OMEGA_MAX + 3;      // weight (signed)
  localparam int unsigned LSW  = D + 2;              // local sum (unsigned)
  localparam int unsigned LDW  = D + 3;              // local difference (signed)
  localparam int unsigned ACCW = D + GSTAR_MAX + 2;  // hybrid accumulator
  localparam int unsigned CNTW = GSTAR_MAX;          // hybrid counter
  localparam int unsigned CW_W = 64;                 // codeword bus width
  localparam int unsigned CL_W = 7;                  // codeword length width

  localparam logic [D-1:0] SMAX = {D{1'b1}};
  localparam logic [D-1:0] SMID = {1'b1, {(D-1){1'b0}}};

  typedef enum logic [1:0] {
    LS_WIDE_NEIGHBOUR   = 2'd0,
    LS_NARROW_NEIGHBOUR = 2'd1,
    LS_WIDE_COLUMN      = 2'd2,
    LS_NARROW_COLUMN    = 2'd3
  } ls_mode_e;

  typedef enum logic [1:0] {
    FID_LOSSLESS = 2'd0,
    FID_ABSOLUTE = 2'd1,
    FID_RELATIVE = 2'd2,
    FID_BOTH     = 2'd3
  } fidelity_e;

  typedef logic signed [WW-1:0]  weight_t;
  typedef logic signed [LDW-1:0] ldiff_t;
  typedef weight_t [C_MAX-1:0]   wvec_t;   // [0]=N [1]=W [2]=NW [3..]=bands z-1..
  typedef ldiff_t  [C_MAX-1:0]   uvec_t;
  typedef ldiff_t  [P_MAX-1:0]   cdiff_vec_t; // [0]=band z-1 ...

  // Run-time configuration (band-independent).
  typedef struct packed {
    logic [XW:0]          nx;        // columns, 1..NX_MAX
    logic [YW:0]          ny;        // rows, 1..NY_MAX
    logic [ZW:0]          nz;        // bands, 1..NZ_MAX
    logic [1:0]           p;         // prediction bands, 0..P_MAX
    logic                 full;      // 1: full prediction mode, 0: reduced
    ls_mode_e             ls_mode;
    logic [4:0]           omega;     // weight resolution, 4..OMEGA_MAX
    logic [5:0]           r;         // register size, 32..R_MAX
    logic signed [4:0]    vmin;      // weight update exponent limits, -6..9
    logic signed [4:0]    vmax;
    logic [3:0]           tinc;      // weight update change interval exponent 4..11
    fidelity_e            fidelity;
    logic [ERR_BITS-1:0]  a_lim;     // absolute error limit
    logic [ERR_BITS-1:0]  r_lim;     // relative error limit
    logic [2:0]           theta;     // sample representative resolution
    logic [3:0]           phi;       // damping
    logic [3:0]           psi;       // offset
    logic [3:0]           gamma0;    // initial count exponent
    logic [3:0]           gstar;     // rescaling counter size
    logic [5:0]           umax;      // unary length limit
    logic [ACCW-1:0]      acc_init;  // initial hybrid accumulator value
  } cfg_t;

  // Low-entropy code selection thresholds T_i of the hybrid coder
  // (sample is high-entropy when acc*2^14 >= T_0 * count).
  localparam int unsigned NCODES = 16;
  function automatic logic [18:0] code_threshold(input int unsigned i);
    case (i)
      0: return 19'd303336;  1: return 19'd225404;  2: return 19'd166979;
      3: return 19'd128672;  4: return 19'd95597;   5: return 19'd69670;
      6: return 19'd50678;   7: return 19'd34898;   8: return 19'd23331;
      9: return 19'd14935;  10: return 19'd9282;   11: return 19'd5510;
     12: return 19'd3195;   13: return 19'd1928;   14: return 19'd1112;
      default: return 19'd408;
    endcase
  endfunction

  // Steps of the predictor's serial (baseline) schedule.
  typedef enum logic [3:0] {
    PS_IDLE, PS_IN, PS_F1, PS_F2, PS_F3, PS_LS, PS_PRED, PS_Q, PS_QW,
    PS_MAP, PS_MW, PS_OUT
  } pstate_e;

  // Sample handed from the predictor to the entropy coder.
  typedef struct packed {
    logic [D-1:0]  delta;   // mapped quantizer index
    logic [ZW-1:0] z;
    logic          first;   // t == 0 for this band
    logic          last;    // last sample of the image
  } mapped_t;

  // Tag kept in order for every coded sample of the hybrid coder.
  typedef struct packed {
    logic high;      // 1: high-entropy codeword, 0: low-entropy coder response
    logic last;      // last sample of the image
    logic resc;      // a rescaling bit precedes the codeword
    logic resc_bit;
  } hyb_tag_t;

endpackage
