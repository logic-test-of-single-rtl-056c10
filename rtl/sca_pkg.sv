// sca_pkg: shared constants of the single cycle access (SCA) test structures.
//
// A page of scan registers is organised as SD lines (the scan depth, i.e. the
// number of cells on one chain of the page) times SW chains (the scan width).
// The reference page holds SD*SW = 31*32 = 992 registers. A line is addressed
// by a line address of AW bits; address 0 selects no line, addresses 1..SD
// select line 1..SD, so 31 lines fill a 5-bit address exactly.
package sca_pkg;

  // Reference page size (scan depth and scan width).
  localparam int unsigned SCA_SD = 31;
  localparam int unsigned SCA_SW = 32;

  // Width of a line address able to hold 0 (no line) and 1..sd.
  function automatic int unsigned addr_width(int unsigned sd);
    return (sd < 1) ? 1 : $clog2(sd + 1);
  endfunction

endpackage
