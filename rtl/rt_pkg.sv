// rt_pkg: types and sizes shared by the LUT-ring evaluator of regular ternary
// (RT) functions.
//
// A ternary value 0, 1 or u (unknown) travels as a double-rail pair {L,H}:
// (1,0) is 0, (0,1) is 1, (1,1) is u, and (0,0) is an unused code. The rings
// compute F_L and F_H, the two rails of every output, as ordinary binary
// functions of the 2*N_VARS input rail bits.
//
// Sizes: LUT_IN = 15 address bits and LUT_OUT = 16 data bits per LUT follow
// the LUT limits used for the published cascade results. N_VARS = 50 and
// N_OUTS = 73 are chosen to hold the largest input and output counts among
// those results; the LUT-memory depth (2^20 words) and the program depth
// (256 steps) are this design's own choices.
package rt_pkg;

  // LUT shape
  localparam int LUT_IN   = 15;
  localparam int LUT_OUT  = 16;

  // Function size a ring can hold
  localparam int N_VARS   = 50;                 // ternary input variables
  localparam int N_DR     = 2 * N_VARS;         // input rail bits
  localparam int N_OUTS   = 73;                 // outputs per ring
  localparam int OIDX_W   = $clog2(N_OUTS);

  // Memories of one ring
  localparam int MEM_AW   = 20;                 // LUT memory: 2^20 words of LUT_OUT bits
  localparam int PROG_AW  = 8;                  // interconnection memory: 256 steps

  // Source numbering of the connection network, per LUT address bit:
  //   0 .. LUT_OUT-1                 rail bit j (output j of the previous LUT)
  //   LUT_OUT .. LUT_OUT+N_VARS-1     x_L of variable i
  //   LUT_OUT+N_VARS .. LUT_OUT+N_DR-1 x_H of variable i
  //   SRC_ZERO                       constant 0 (unused address bit)
  localparam int SRC_X    = LUT_OUT;
  localparam int SRC_ZERO = LUT_OUT + N_DR;
  localparam int SEL_W    = $clog2(SRC_ZERO + 1);

  // Double-rail ternary code, {L,H}
  typedef enum logic [1:0] {
    T_BAD  = 2'b00,   // unused combination
    T_ONE  = 2'b01,
    T_ZERO = 2'b10,
    T_U    = 2'b11
  } tern_t;

  // One entry of the interconnection memory = one LUT step
  typedef struct packed {
    logic                              last;     // final step of the program
    logic [LUT_OUT-1:0]                out_en;   // LUT output bits written to the output register
    logic [LUT_OUT-1:0][OIDX_W-1:0]    out_idx;  // destination of each of those bits
    logic [LUT_IN-1:0][SEL_W-1:0]      sel;      // source of each LUT address bit
    logic [MEM_AW-1:0]                 base;     // first word of this LUT in the LUT memory
  } ic_entry_t;


  // Decode one output from its two rails
  function automatic tern_t dr_decode(input logic l, input logic h);
    return tern_t'({l, h});
  endfunction

endpackage
