// rev_counter_pkg: shared encoding for the reversible ripple up/down counter.
//
// The counter's direction input is one bit. Low counts up and high counts
// down, which is what negative-edge stages clocked by (previous bit xor
// direction) do. The enum names that encoding for the RTL and its testbenches.
package rev_counter_pkg;

  typedef enum logic {
    COUNT_UP   = 1'b0,
    COUNT_DOWN = 1'b1
  } count_dir_e;

endpackage
