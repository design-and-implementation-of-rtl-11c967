// ssd_pkg: constants shared by the single-stage multiplier, the divider and
// the arithmetic unit that holds them both.
//
// SSD_WIDTH is the operand width of both units (32 bits). The multiplier
// produces a 2*SSD_WIDTH product; its leading-one exponent needs
// $clog2(2*SSD_WIDTH) bits, six for 32-bit operands. The divider counts its
// SSD_WIDTH shift-subtract steps in a counter of $clog2(SSD_WIDTH+1) bits.
package ssd_pkg;

  // Operand width of the multiplier and of the divider.
  parameter int unsigned SSD_WIDTH = 32;

  // Width of the multiplier's exponent output for a given operand width.
  function automatic int unsigned exp_bits(int unsigned width);
    return $clog2(2 * width);
  endfunction

  // Width of the divider's step counter for a given operand width.
  function automatic int unsigned cnt_bits(int unsigned width);
    return $clog2(width + 1);
  endfunction

endpackage
