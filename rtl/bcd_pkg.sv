// Shared types and constants of the BCD add-subtract unit.
// A BCD digit is a 4-bit code 0..9. The unit works on DIGITS_DEFAULT digits
// (eight digits, a 32-bit BCD word) unless a module's DIGITS parameter is
// overridden.
package bcd_pkg;
  localparam int unsigned DIGITS_DEFAULT = 8;
  typedef logic [3:0] bcd_digit_t;
  localparam bcd_digit_t BCD_SIX = 4'b0110;   // decimal correction constant
endpackage
