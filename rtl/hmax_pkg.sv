// hmax_pkg: types and constants shared by the HMAX S2/C2 accelerator.
//
// The accelerator computes the S2 stage of HMAX (squared Euclidean distance
// between C1 image windows and stored patches, with the exponential deferred)
// and the C2 stage (global minimum over positions and scales), and can also run
// plain 2D convolutions (Gabor / S1). Data words are fixed-point: pixels and
// patch coefficients are PIX_W-bit two's complement, accumulations ACC_W bits.
//
// The 24-bit pixel width is the configuration the accelerator is evaluated in.
// The accumulator width is this design's choice: a full-precision squared
// 25-bit difference (49 bits) summed 256 times needs 57 bits, plus a sign bit.
package hmax_pkg;

  localparam int PIX_W   = 24;   // input pixel / coefficient width
  localparam int ACC_W   = 2 * PIX_W + 10;  // accumulator width
  localparam int THETA_W = 4;    // orientation index (up to 12 orientations)
  localparam int COORD_W = 9;    // image row/column index (images up to 256 x 256)

  // Pipeline latencies, in clock cycles (see hmax_primitive, hmax_rcengine).
  localparam int PRIM_LAT = 6;   // posedges from last window column captured to result
  localparam int RC_LAT   = PRIM_LAT + 1;  // plus the RCengine adder tree register

  // Two's complement words. They are declared unsigned so that they can be
  // packed into arrays and structs; arithmetic converts them to signed locally.
  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [ACC_W-1:0] acc_t;

  // RCengine convolution mode: sixteen 4x4, four 8x8, one 12x12 or one 16x16.
  typedef enum logic [1:0] {
    MODE_4X4   = 2'd0,
    MODE_8X8   = 2'd1,
    MODE_12X12 = 2'd2,
    MODE_16X16 = 2'd3
  } rc_mode_e;

  // Processing element operation.
  typedef enum logic [1:0] {
    OP_GABOR  = 2'd0,   // multiply pixel (orientation 0) by coefficient
    OP_SPARSE = 2'd1,   // squared difference, orientation chosen per coefficient
    OP_DENSE  = 2'd2    // squared difference, one orientation for the whole engine
  } pe_op_e;

  // One patch coefficient as held in a PE.
  typedef struct packed {
    logic               en;     // 0 for zero-padding positions: the PE adds nothing
    logic [THETA_W-1:0] theta;  // preferred orientation (sparse patches)
    pix_t               value;  // coefficient value
  } coef_t;

  // One accelerator instruction: the configuration of one iteration.
  typedef struct packed {
    pe_op_e             op;          // Gabor / sparse / dense
    rc_mode_e           mode;        // RCengine mode
    logic [4:0]         n_valid;     // valid patches in this iteration (1..16)
    logic [4:0]         psize;       // patch edge length before zero padding (1..16)
    logic [THETA_W-1:0] theta_base;  // dense: orientation of pipeline 0
    logic [9:0]         c2_row;      // C2 memory row that receives this iteration's minima
  } instr_t;

  // Sequencer states (hmax_controller).
  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_IMG, S_FETCH, S_LOAD, S_STREAM, S_COMMIT, S_NEXT
  } ctrl_state_e;

  // Edge length of the block of primitives a mode composes.
  function automatic int unsigned mode_size(rc_mode_e m);
    return 4 * (int'(m) + 1);
  endfunction

  // Output lanes a mode produces.
  function automatic int unsigned mode_lanes(rc_mode_e m);
    case (m)
      MODE_4X4: return 16;
      MODE_8X8: return 4;
      default:  return 1;
    endcase
  endfunction

endpackage
