// Shared constants for the low-power 4-bit magnitude comparator family.
//
// CMP_WIDTH is the operand width of every comparator in the family: the
// design is a 4-bit comparator, and each module takes it as the default of
// its WIDTH parameter.
package mag_cmp_pkg;

  localparam int unsigned CMP_WIDTH = 4;

endpackage
