// Shared types and default sizes of the aging-aware variable-latency multiplier.
// bypass_e selects which array multiplier the top builds, and with it which
// operand the adaptive hold logic inspects: the multiplicand (column bypassing)
// or the multiplicator (row bypassing). The default operand width of 16 bits and
// the judging threshold of 8 zeros are this design's choices.
package amul_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,  // column-bypassing array, AHL watches the multiplicand
    BYPASS_ROW    = 1'b1   // row-bypassing array, AHL watches the multiplicator
  } bypass_e;

  localparam int unsigned DEFAULT_M = 16;  // operand width m
  localparam int unsigned DEFAULT_N = 8;   // judging threshold n (zeros > n => one cycle)

endpackage
