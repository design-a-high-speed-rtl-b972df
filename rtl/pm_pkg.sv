// Shared definitions of the multiplier family.
// arch_e selects how four half-size sub-products are summed:
//   ARCH_WIDE  - architecture 1, full-width (4H-bit) adders
//   ARCH_RCA   - architecture 2, half-width (2H-bit) ripple carry adders
// Every module defaults to ARCH_RCA.
package pm_pkg;
  typedef enum logic [1:0] {
    ARCH_WIDE = 2'd1,
    ARCH_RCA  = 2'd2
  } arch_e;

  // True when n is a power of two and at least 2 (the sizes the recursive
  // multiplier accepts).
  function automatic bit valid_size(int unsigned n);
    return (n >= 2) && ((n & (n - 1)) == 0);
  endfunction
endpackage
