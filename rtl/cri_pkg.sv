// cri_pkg - shared constants and helpers of the cyclic reservation interval
// (CRI) scheduler for an input queued ATM switch.
//
// The defaults describe the main configuration: a 16x16 switch with a search
// depth of 16 cells and a 20-cell random-access buffer per input. TAU is the
// per-slot increment of the reservation interval; it must satisfy
// GCD(TAU+1, N) = 1 and TAU != q*N. The value 2 is this design's choice (the
// smallest legal value for any power-of-two N). CELL_W is a full 53-byte ATM
// cell; the destination port travels beside it as a separate field.
package cri_pkg;

  parameter int unsigned N_PORTS      = 16;   // switch size N
  parameter int unsigned SEARCH_DEPTH = 16;   // search depth d
  parameter int unsigned RAB_DEPTH    = 20;   // random-access buffer size, cells
  parameter int unsigned TAU          = 2;    // CRI increment per time slot
  parameter int unsigned CELL_W       = 424;  // 53-byte ATM cell

  // Greatest common divisor, used to check the TAU rule at elaboration.
  function automatic int unsigned gcd(input int unsigned a, input int unsigned b);
    int unsigned x, y, r;
    x = a;
    y = b;
    while (y != 0) begin
      r = x % y;
      x = y;
      y = r;
    end
    return x;
  endfunction

  // TAU is legal for N when GCD(TAU+1, N) = 1 and TAU is not a multiple of N.
  function automatic bit tau_ok(input int unsigned tau, input int unsigned n);
    return (gcd(tau + 1, n) == 1) && ((tau % n) != 0);
  endfunction

endpackage
