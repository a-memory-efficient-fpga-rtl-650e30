// Shared types and constants of the quasi-cyclic LDPC decoder.
//
// Messages (channel values, variable-to-check and check-to-variable
// messages) are 4-bit sign-magnitude numbers: one sign bit (1 = negative,
// i.e. the bit is more likely a 1) and a 3-bit magnitude 0..7. The 4-bit
// width follows the design this RTL implements; the sign-magnitude layout
// {sign, magnitude} is this implementation's choice.
//
// gen_shifts() builds the default table of circulant shift values. Entry
// i*T+j is the offset of sub-matrix H(i,j): row r of that P x P block has
// its single 1 in column (r + shift) mod P. The default values
// shift(i,j) = (MUL*(i+1)*(j+1)) mod P are this implementation's choice
// (with MUL odd and P a power of two no two block rows and two block
// columns close a length-4 cycle); any table can be given instead.
package ldpc_pkg;

  localparam int unsigned MAG_W = 3;          // magnitude bits
  localparam int unsigned MSG_W = MAG_W + 1;  // sign + magnitude
  localparam int unsigned MAG_MAX = (1 << MAG_W) - 1;

  // Largest table gen_shifts() can fill (C*T entries are used).
  localparam int unsigned SHIFT_TAB_N = 256;
  localparam int unsigned SHIFT_W = 16;

  // Decoding phases of the controller (see ldpc_ctrl).
  typedef enum logic [1:0] {
    PH_LOAD = 2'd0,   // channel values are written into the channel memories
    PH_VN   = 2'd1,   // variable node phase (with the first block row's check nodes)
    PH_CN   = 2'd2,   // check node phase of block rows 2..C
    PH_OUT  = 2'd3    // decoded codeword is read out
  } phase_t;

  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } msg_t;

  typedef logic [SHIFT_TAB_N-1:0][SHIFT_W-1:0] shift_tab_t;

  function automatic shift_tab_t gen_shifts(int unsigned c, int unsigned t,
                                            int unsigned p, int unsigned mul);
    shift_tab_t tab;
    tab = '0;
    for (int unsigned i = 0; i < c; i++)
      for (int unsigned j = 0; j < t; j++)
        if (i * t + j < SHIFT_TAB_N)
          tab[i*t+j] = SHIFT_W'((mul * (i + 1) * (j + 1)) % p);
    return tab;
  endfunction

endpackage
