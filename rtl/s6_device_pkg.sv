// s6_device_pkg -- family/device description used by the reconfiguration engine.
//
// The engine never hard-codes where things are on the die. Everything that
// depends on the FPGA family lives here: the width of a configuration word, the
// number of words in a frame, how many clock-region rows and configuration
// columns the device has, what kind of resource sits in each column, how many
// frames configure one column of each kind, and how a (row, column, minor)
// triple is packed into the frame address registers (FAR). Porting the engine
// to another family means replacing this package; the address state machine
// stays as it is.
//
// Taken from the Spartan-6 description: 16-bit configuration words, 65 words
// per frame, a frame covering one column inside one clock region (so regions
// can be addressed in two dimensions), CLB / DSP / BRAM / IO column kinds, a
// FAR made of a clock-region field, a major (column) field and a minor (frame
// within the column) field. Own choices: the device is described as 4 clock
// region rows by 40 columns with BRAM columns at 9 and 27, DSP columns at 14
// and 32 and IO columns at both edges; the frame counts per column kind
// (CLB 31, DSP 24, BRAM 25, IO 30); and the bit layout of the two 16-bit FAR
// words (FAR_MAJ = {row, major}, FAR_MIN = {6'b0, minor}).
package s6_device_pkg;

  // Configuration word and frame
  localparam int unsigned WORD_W      = 16;  // ICAP data width of Spartan-6
  localparam int unsigned FRAME_WORDS = 65;  // 16-bit words per frame

  // Fabric geometry
  localparam int unsigned NUM_ROWS = 4;      // clock-region rows
  localparam int unsigned NUM_COLS = 40;     // configuration columns (majors)
  localparam int unsigned COORD_W  = 8;      // width of one region coordinate
  localparam int unsigned MINOR_W  = 10;     // width of the minor address

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [MINOR_W-1:0] minor_t;

  // A rectangular region: clock-region rows row0..row1, columns col0..col1
  typedef struct packed {
    coord_t col1;
    coord_t col0;
    coord_t row1;
    coord_t row0;
  } region_t;

  typedef enum logic [1:0] {
    COL_CLB  = 2'd0,
    COL_DSP  = 2'd1,
    COL_BRAM = 2'd2,
    COL_IOB  = 2'd3
  } col_type_e;

  // Distribution of configurable elements across the columns
  function automatic col_type_e col_type(input coord_t col);
    if (col == 0 || col == coord_t'(NUM_COLS - 1)) return COL_IOB;
    else if (col == 9  || col == 27)             return COL_BRAM;
    else if (col == 14 || col == 32)             return COL_DSP;
    else                                          return COL_CLB;
  endfunction

  // Number of configuration frames of one column of a given kind
  function automatic minor_t frames_per_col(input col_type_e t);
    case (t)
      COL_CLB:  return minor_t'(31);
      COL_DSP:  return minor_t'(24);
      COL_BRAM: return minor_t'(25);
      default:  return minor_t'(30);
    endcase
  endfunction

  // Frame address: FAR_MAJ holds the clock-region row and the major column,
  // FAR_MIN the minor frame inside the column.
  function automatic word_t far_major(input coord_t row, input coord_t col);
    return {row, col};
  endfunction

  function automatic word_t far_minor(input minor_t minor);
    return {{(WORD_W - MINOR_W){1'b0}}, minor};
  endfunction

  // Frames in a region, used by the testbenches and for size checks
  function automatic int unsigned region_frames(input region_t r);
    int unsigned n;
    n = 0;
    for (int unsigned c = 32'(r.col0); c <= 32'(r.col1); c++)
      n += 32'(frames_per_col(col_type(coord_t'(c))));
    return n * (32'(r.row1) - 32'(r.row0) + 1);
  endfunction

endpackage
