// Shared constants and types for the digital-offset crossbar unit.
//
// The unit performs a vector-matrix multiplication on a single RRAM crossbar
// that stores every weight as non-negative 8-bit values split over 2-bit
// multi-level cells, and corrects the device variation with one digital
// offset register per set of m weights (a column slice of m rows).
// The numeric defaults below are the main configuration: a 128 x 128
// crossbar, 8-bit weights, inputs and offsets, 2-bit cells and m = 16.
// ADC resolution, conductance fixed-point format and accumulator width are
// this design's own choices.
package dofs_pkg;

  localparam int ROWS        = 128;  // crossbar wordlines (S)
  localparam int BITLINES    = 128;  // crossbar bitlines
  localparam int CELL_BITS   = 2;    // bits per memristor (2-bit MLC)
  localparam int WEIGHT_BITS = 8;    // weight precision
  localparam int INPUT_BITS  = 8;    // input precision, fed one bit per step
  localparam int OFFSET_BITS = 8;    // digital offset precision
  localparam int M_SHARE     = 16;   // sharing granularity m = active wordlines
  localparam int ADC_BITS    = 8;    // ADC resolution (own choice)
  localparam int G_FRAC      = 8;    // fractional bits of a cell conductance
  localparam int G_BITS      = 16;   // width of a cell conductance
  localparam int ACC_BITS    = 32;   // width of a column result

  // Number of bitlines that hold one weight, and weight columns per crossbar.
  localparam int SLICES      = WEIGHT_BITS / CELL_BITS;
  localparam int WCOLS       = BITLINES / SLICES;

  // One entry of the offset register file: the signed digital offset b and
  // the flag that says the weights of this set are stored complemented.
  typedef struct packed {
    logic                          comp;
    logic signed [OFFSET_BITS-1:0] b;
  } offset_entry_t;

endpackage
