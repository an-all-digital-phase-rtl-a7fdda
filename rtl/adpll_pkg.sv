`timescale 1ps / 1fs
// adpll_pkg: types and constants shared by the all-digital PLL.
//
// The DCO is steered by a 12-bit control code made of a 6-bit coarse field
// (selects one of 64 delay paths) and a 6-bit fine field (selects one of 64
// settings of the fine-tuning delay cell). The controller treats the pair as a
// single unsigned number {coarse, fine}; a larger code gives a higher DCO
// frequency. Field widths and the 64/64 split follow the design description;
// the reset code {32, 32} follows its transient plot.
package adpll_pkg;

  localparam int unsigned COARSE_W = 6;
  localparam int unsigned FINE_W   = 6;
  localparam int unsigned CODE_W   = COARSE_W + FINE_W;

  // Number of coarse delay paths and of paths per first-stage selector group.
  localparam int unsigned N_PATHS     = 1 << COARSE_W;  // 64
  localparam int unsigned GROUP_PATHS = 16;
  localparam int unsigned N_GROUPS    = N_PATHS / GROUP_PATHS;  // 4

  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } dco_code_t;

  // Code the search starts from: middle band, coarse 32 / fine 32.
  localparam dco_code_t CODE_START = '{coarse: 6'd32, fine: 6'd32};

  // Direction reported by the phase/frequency detector for one update.
  typedef enum logic [1:0] {
    DIR_NONE = 2'b00,
    DIR_UP   = 2'b01,
    DIR_DOWN = 2'b10
  } pfd_dir_e;

  // Controller modes.
  typedef enum logic [0:0] {
    MODE_FREQ  = 1'b0,  // frequency acquisition with adaptive search step
    MODE_PHASE = 1'b1   // phase acquisition and maintenance, one fine step
  } ctrl_mode_e;

endpackage
