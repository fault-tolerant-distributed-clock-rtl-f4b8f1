// darts_pkg -- types and helper functions shared by the tick-synchronisation
// (TS-Alg) blocks.
//
// pcsg_t bundles the four status signals that a Pipe Compare Signal
// Generator produces for one remote unit: GEQ and GR, each split into an
// odd and an even copy (odd copies feed the threshold gates that make the
// falling clock edge, even copies those that make the rising edge).
//
// thr_rom() computes the contents of a threshold ROM: entry a is 1 when the
// address a has at least k ones. link_delay_ps() is the default wire-delay
// pattern of the TS-Net used by the top level; the delay values are this
// design's own choice, only their existence and boundedness come from the
// system model.
`timescale 1ns/1ps
package darts_pkg;

  typedef struct packed {
    logic geq_o;  // r_rem >= r_self, r_self odd,  local pipe holds one tick
    logic gr_o;   // r_rem >  r_self, r_self odd,  local pipe holds one tick
    logic geq_e;  // r_rem >= r_self, r_self even, local pipe holds one tick
    logic gr_e;   // r_rem >  r_self, r_self even, local pipe holds one tick
  } pcsg_t;

  // Number of ones in a word (used to build threshold ROM contents).
  function automatic int unsigned ones(input int unsigned v);
    int unsigned c;
    c = 0;
    for (int i = 0; i < 32; i++) c += (v >> i) & 1;
    return c;
  endfunction

  // Threshold ROM contents for an n-bit address and threshold k.
  // Supports n up to 12 (4096-entry ROM).
  function automatic logic [4095:0] thr_rom(input int unsigned n, input int unsigned k);
    logic [4095:0] r;
    r = '0;
    for (int unsigned a = 0; a < (1 << n); a++) r[a] = (ones(a) >= k);
    return r;
  endfunction

  // Default delay of the TS-Net wire from unit q to unit p of an n-unit
  // system, in ps: dmin + dstep * ((3q + 5p + qp) mod 7), an uneven but
  // fixed pattern, plus dfar on the wires from units 2..n-2 to unit n-1,
  // which models a unit placed far from most of the others.
  function automatic int unsigned link_delay_ps(input int unsigned q, input int unsigned p,
                                                input int unsigned n, input int unsigned dmin,
                                                input int unsigned dstep, input int unsigned dfar);
    int unsigned d;
    d = dmin + dstep * ((3 * q + 5 * p + q * p) % 7);
    if (p == n - 1 && q >= 2 && q != p) d += dfar;
    return d;
  endfunction

endpackage
