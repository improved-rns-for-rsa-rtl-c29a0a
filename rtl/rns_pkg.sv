// rns_pkg: types and default sizes shared by the RNS Montgomery multiplier and
// the RSA exponentiation datapath.
//
// The design works on two residue bases of K moduli each plus one redundant
// modulus:  base B uses moduli 2^n-1, base B' uses moduli 2^n+1 (held in
// diminished-1 form), and the redundant modulus is m_r = 2^R.  K = 10 is the
// configuration used for RSA-1024; the individual exponents n are not given by
// the method itself and are this design's choice (pairwise coprime, summing to
// more than 1031 bits so that M > (K+2)^2 N for a 1024-bit N).
package rns_pkg;

  localparam int unsigned K_DEF = 10;
  localparam int unsigned NB_DEF [K_DEF] = '{89, 97, 101, 103, 105, 107, 109, 113, 127, 131};
  localparam int unsigned NBP_DEF[K_DEF] = '{89, 97, 101, 103, 105, 107, 109, 113, 127, 131};
  localparam int unsigned R_DEF  = 4;     // m_r = 16 >= K
  localparam int unsigned EBITS_DEF = 1024;
  localparam int unsigned W_DEF = 132;   // residue bus width: largest n plus one
  localparam int unsigned IDXW = 8;       // width of the term counter (K <= 255)

  // Phase of one Montgomery multiplication; each phase is one group of
  // independent calculations ("category") of the improved algorithm.
  typedef enum logic [2:0] {
    PH_IDLE     = 3'd0,  // waiting; on start every channel forms a*b
    PH_SIG      = 3'd1,  // category 1: sigma = (a*b) * combined constant
    PH_EXT1_ADD = 3'd2,  // category 2: B'/m_r accumulators take their own sigma
    PH_EXT1     = 3'd3,  // category 2: K multiply-accumulate steps of sigma_i
    PH_EXT2     = 3'd4,  // category 3: K multiply-accumulate steps of xi_j
    PH_ALPHA    = 3'd5,  // category 4: alpha on the redundant channel
    PH_FINAL    = 3'd6   // category 5: results in B and B'
  } mm_phase_e;

  typedef struct packed {
    mm_phase_e       phase;
    logic [IDXW-1:0] idx;    // term number within PH_EXT1 / PH_EXT2
    logic            start;  // start accepted this cycle (phase is PH_IDLE)
  } mm_ctl_t;

  // Operand selection of the exponentiation controller.
  typedef enum logic [2:0] {
    OP_MSG  = 3'd0,  // plaintext a
    OP_M2   = 3'd1,  // M^2 mod N
    OP_ONE  = 3'd2,  // the number 1
    OP_ABAR = 3'd3,  // a in Montgomery form
    OP_CBAR = 3'd4   // running result in Montgomery form
  } op_sel_e;


endpackage
