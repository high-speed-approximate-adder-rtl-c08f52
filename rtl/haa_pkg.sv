// haa_pkg -- region sizes of the hybrid approximate adder (HAA).
//
// An N-bit HAA splits its operands into four regions, from the least
// significant bit upward: a constant region (CR), an OR-based approximate
// region (LSR, also called AR), a moderately significant region (MSR) built
// from approximate full adders, and an accurate significant region (ASR).
// The three lower regions are P = N/4 - 1 bits wide each; the ASR takes the
// remaining N - 3P bits. These functions give those widths so that the adder
// and its testbenches agree on them. The split follows the published
// architecture; the functions themselves are plain constant arithmetic.
package haa_pkg;

  // Width of each of the CR, LSR and MSR regions.
  function automatic int unsigned region_width(int unsigned n);
    return n / 4 - 1;
  endfunction

  // Width of the accurate significant region.
  function automatic int unsigned asr_width(int unsigned n);
    return n - 3 * region_width(n);
  endfunction

endpackage
