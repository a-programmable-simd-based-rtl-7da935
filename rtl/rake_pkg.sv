// rake_pkg: types and constants shared by the Rake receiver processor core.
//
// Complex samples are 16+16 bit two's complement (I/Q).  A "short" code value
// has a real and an imaginary part, each in {-1, 0, +1}.  Memory ports carry
// four complex elements per access, matching the four small memory blocks
// that make up one memory bank.  The vector instruction record is what the
// RISC controller hands to a SIMD cluster.  All widths here are this design's
// choice; the architecture description fixes only the lane counts (4-way
// complex ALU, 2-way complex MAC), 16-bit controller integers, vector lengths
// of up to 128 and an oversampling ratio of 4.
//
// Lane counts not referenced by every module (ALU_LANES, MAC_LANES, OSR,
// NBANKS, NMASTERS, MAXVLEN, CFG_AW, CW) are kept here as the one place that
// documents the core's dimensions.
package rake_pkg;

  parameter int DW        = 16;   // width of one I or Q component
  parameter int MEM_LANES = 4;    // complex elements per memory bank access
  parameter int ALU_LANES = 4;    // 4-way complex short ALU
  parameter int MAC_LANES = 2;    // 2-way complex MAC
  parameter int OSR       = 4;    // oversampling ratio (samples per chip)
  parameter int BANK_AW   = 10;   // element address width of one bank
  parameter int NBANKS    = 8;    // memory banks on the crossbar
  parameter int NMASTERS  = 7;    // crossbar master ports
  parameter int MAXVLEN   = 128;  // longest vector
  parameter int CFG_AW    = 12;   // configuration bus address width
  parameter int CW        = 16;   // controller integer width

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // short code: each part is -1, 0 or +1 (2-bit two's complement)
  typedef struct packed {
    logic signed [1:0] re;
    logic signed [1:0] im;
  } scode_t;

  // one memory access: up to four consecutive (lane-strided) elements
  typedef struct packed {
    logic                      en;       // access this cycle
    logic                      we;       // write (else read)
    logic                      dir;      // direct address (else the bank's AGU)
    logic                      restart;  // AGU restarts at its start address
    logic [BANK_AW-1:0]        addr;     // direct element address
    logic [MEM_LANES-1:0]      wmask;    // per-lane write enable
    cplx_t [MEM_LANES-1:0]     wdata;
  } mem_req_t;

  typedef cplx_t [MEM_LANES-1:0] mem_rdata_t;

  // crossbar master ports
  typedef enum logic [2:0] {
    M_DFE = 3'd0, M_ALU_LD = 3'd1, M_ALU_ST = 3'd2,
    M_MAC_LDA = 3'd3, M_MAC_LDB = 3'd4, M_MAC_ST = 3'd5, M_HOST = 3'd6
  } master_e;

  // vector ALU operations
  typedef enum logic [2:0] {
    VOP_MUL  = 3'd0,   // ALU: x*c per lane, stored every step; CMAC: a*b
    VOP_MAC  = 3'd1,   // accumulate, stored at the end of each vector
    VOP_BFLY = 3'd2,   // CMAC only: radix-2 butterfly
    VOP_MAXS = 3'd3    // CMAC only: peak (maximum |a|^2) search
  } vop_e;

  // load modes of the vector load unit
  typedef enum logic [1:0] {
    LD_PAR   = 2'd0,   // four elements from the bank in one access
    LD_BCAST = 2'd1,   // one element, broadcast to every lane
    LD_SLIDE = 2'd2,   // one element per step into a sliding window
    LD_FB    = 2'd3    // no load: operands fed back from the store unit
  } ldmode_e;

  // source of the short multiplier's code
  typedef enum logic [1:0] {
    CS_IMM  = 2'd0,    // code held in the cluster's immediate-code register
    CS_SCR  = 2'd1,    // scrambling code generator
    CS_OVSF = 2'd2,    // OVSF code generator
    CS_WORD = 2'd3     // code i^n given by the instruction word
  } csel_e;

  typedef struct packed {
    logic [2:0]  op;      // vop_e
    logic [1:0]  ldmode;  // ldmode_e
    logic [1:0]  csel;    // csel_e
    logic        conj;    // conjugate the code / the B operand
    logic [6:0]  lenm1;   // vector length minus one (steps)
    logic [15:0] rep;     // hardware loop count (0 treated as 1)
    logic [3:0]  shift;   // right shift applied before saturation on store
    logic [1:0]  wcode;   // n of the instruction-word code i^n (CS_WORD)
  } vinstr_t;

  function automatic logic signed [DW-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[DW-1:0];
  endfunction

endpackage
