// Shared definitions of the variable-latency multiplier.
//
// bypass_e selects which bypassing array multiplier the design is built
// around. With the column-bypassing multiplier the multiplicand bits select
// the bypass and the adaptive hold logic counts the zeros of the
// multiplicand; with the row-bypassing multiplier both roles go to the
// multiplier operand. Column bypassing is the default configuration.
package vlm_pkg;
  typedef enum logic {
    BYPASS_COLUMN = 1'b0,
    BYPASS_ROW    = 1'b1
  } bypass_e;
endpackage
