// Shared constants of the digit-serial multipliers.
//
// DSM_W is the operand word size and DSM_N the digit size, which is also the
// number of overlapping clock phases per digit cycle. 16 and 4 are the main
// configuration of the design; digit sizes of 2 and 8 with the same word size
// are the other configurations it was evaluated in. W must be a multiple of N
// and N must be even (a 50% duty-cycle phase spans N/2 phase steps).
package dsm_pkg;
  localparam int unsigned DSM_W = 16;
  localparam int unsigned DSM_N = 4;
endpackage
