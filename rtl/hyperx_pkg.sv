// Shared sizes of the Hyper-X crossbar.
//
// The crossbar is a DIM x DIM matrix of sub-switches, each with PORTS external
// inputs and PORTS external outputs, every port WIDTH bits wide. The defaults
// give the 256-radix, 16-bit switch: an 8 x 8 matrix of 4-radix sub-switches.
// Every sub-switch half (upper or lower) holds PORTS muxes of PORTS:1 and
// PORTS muxes of DIM:1, each with one select line per input, so one half needs
// HALF_SEL_BITS configuration bits. The split of the scan bits into fields
// (HALF_SEL_BITS layout, see upper_sub_switch) is this design's own choice.
package hyperx_pkg;
  parameter int unsigned DIM   = 8;   // sub-switches per row and per column
  parameter int unsigned PORTS = 4;   // radix of a sub-switch
  parameter int unsigned WIDTH = 16;  // bits per port

  // Scan bits of one sub-switch half: PORTS one-hot selects of PORTS bits,
  // then PORTS one-hot selects of DIM bits.
  function automatic int unsigned half_sel_bits(int unsigned dim, int unsigned ports);
    return ports * ports + ports * dim;
  endfunction

  parameter int unsigned HALF_SEL_BITS = half_sel_bits(DIM, PORTS);
  // Whole chain: DIM*DIM upper halves followed by DIM*DIM lower halves.
  parameter int unsigned TOTAL_SEL_BITS = 2 * DIM * DIM * HALF_SEL_BITS;
endpackage
