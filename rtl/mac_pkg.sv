// mac_pkg: widths shared by the blocks of the 32-bit Vedic/DKG multiply-accumulate unit.
// The operand width (32) and the accumulator width (64) are the MAC's own sizes.
package mac_pkg;
  localparam int unsigned DATA_W = 32;          // multiplicand / multiplier width
  localparam int unsigned ACC_W  = 2 * DATA_W;  // product, adder and accumulator width
endpackage
