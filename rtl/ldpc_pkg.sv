// ldpc_pkg: constants and types shared by the fully pipelined IEEE 802.11ad
// LDPC decoder.
//
// The code is built from 42x42 cyclically shifted identity submatrices over a
// 16-column base matrix (672-bit block). Messages are 5-bit sign-magnitude
// (1 sign bit, 4 magnitude bits), matching the 5-integer-bit quantization the
// decoder is designed for. A code is described to the hardware as a list of up
// to four sub-iterations; each sub-iteration is one use of the check nodes and
// covers either one base-matrix layer (single mode) or two non-overlapping
// layers (dual mode, top and bottom half of every check node).
//
// Block size, submatrix size, group count and message width follow the
// design; accumulator width, the correction factor and the code-description
// format are this implementation's own choices.
package ldpc_pkg;

  localparam int unsigned Z      = 42;  // submatrix size = number of CNs
  localparam int unsigned NVNG   = 16;  // variable node groups = base columns
  localparam int unsigned CNW    = 16;  // check node inputs
  localparam int unsigned MAGW   = 4;   // message magnitude bits
  localparam int unsigned QW     = MAGW + 1; // message width (sign + magnitude)
  localparam int unsigned ACCW   = 8;   // VN accumulator width (two's complement)
  localparam int unsigned NSUB   = 4;   // maximum sub-iterations per iteration
  localparam int unsigned SHW    = $clog2(Z);     // shift amount width (6)
  localparam int unsigned VSELW  = $clog2(NVNG);  // VNG index width (4)
  localparam int unsigned SUBW   = $clog2(NSUB);  // sub-iteration index width
  localparam int unsigned ITW    = 5;   // iteration counter width
  localparam logic [MAGW-1:0] MAG_MAX = '1;

  // A V2C message as it travels to the check node. hd is the hard decision
  // the VN currently holds; the check nodes XOR it to form the syndrome.
  typedef struct packed {
    logic            valid;
    logic            hd;
    logic            sign;
    logic [MAGW-1:0] mag;
  } v2c_t;

  // Unmarginalized check node result: two smallest magnitudes, product of
  // signs, parity of hard decisions, and whether any input was connected.
  typedef struct packed {
    logic            valid;
    logic            synd;
    logic            sign;
    logic [MAGW-1:0] min1;
    logic [MAGW-1:0] min2;
  } cnres_t;

  // Description of one sub-iteration.
  typedef struct packed {
    logic                           dual;     // two non-overlapping layers
    logic [NVNG-1:0]                active;   // VNG has an edge in this sub-iteration
    logic [NVNG-1:0][SHW-1:0]       shift;    // submatrix shift of that edge (0..Z-1)
    logic [NVNG-1:0]                post_bot; // dual mode: VNG belongs to the bottom layer
    logic [CNW-1:0]                 slot_valid; // dual mode: CN input slot is used
    logic [CNW-1:0][VSELW-1:0]      slot_sel;   // dual mode: VNG feeding that slot
  } subcfg_t;

  // Description of a whole code.
  typedef struct packed {
    logic [2:0]                     nsub;     // 3 or 4 sub-iterations
    subcfg_t [NSUB-1:0]             sub;
  } codecfg_t;

  // Control word that travels down the pipeline beside the messages.
  typedef struct packed {
    logic            valid;
    logic            frame;   // frame slot 0/1
    logic [SUBW-1:0] sub;     // sub-iteration index
    logic            first;   // first pass of this frame: no stored C2V yet
  } pctl_t;

  function automatic cnres_t cnres_none();
    cnres_t r;
    r = '{valid: 1'b0, synd: 1'b0, sign: 1'b0, min1: MAG_MAX, min2: MAG_MAX};
    return r;
  endfunction

endpackage
