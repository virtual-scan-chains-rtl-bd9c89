// Shared types and constants of the virtual scan chain.
//
// cell_op_e is the operation a group of scan cells performs in one clock:
// hold, shift one place along the chain, step as an autonomous LFSR, or
// capture the core's response (the system clock with scan enable low).
// phase_e names the three shift phases of one virtual scan vector.
//
// lfsr_taps() gives a primitive (maximal-length) feedback polynomial for
// every degree from 2 to 80, enough for every segment length of the
// configurations in the evaluation table (the longest is 79); the polynomials
// are a widely used table of primitive polynomials of three to six terms,
// and are this design's choice. Bit k-1 of the result is
// set when stage k (1-based) is a tap; bit degree-1 is always set.
//
// seg_len()/seg_off() split the p-bit sub-chain into n LFSRs as evenly as
// possible: the first (p mod n) segments are one cell longer.
package vsc_pkg;

  typedef enum logic [1:0] {
    OP_HOLD    = 2'd0,
    OP_SHIFT   = 2'd1,
    OP_LFSR    = 2'd2,
    OP_CAPTURE = 2'd3
  } cell_op_e;

  typedef enum logic [1:0] {
    PH_SEL    = 2'd0,  // select bits come in
    PH_LOAD_P = 2'd1,  // LFSR seeds come in
    PH_EXPAND = 2'd2   // LFSRs run, one q-bit sub-chain takes SDI
  } phase_e;

  localparam int unsigned MAX_LFSR = 80;

  function automatic logic [MAX_LFSR-1:0] tap_bit(int unsigned k);
    logic [MAX_LFSR-1:0] t;
    t = '0;
    t[k-1] = 1'b1;
    return t;
  endfunction

  function automatic logic [MAX_LFSR-1:0] lfsr_taps(int unsigned degree);
    case (degree)
      2:  return tap_bit(2) | tap_bit(1);
      3:  return tap_bit(3) | tap_bit(2);
      4:  return tap_bit(4) | tap_bit(3);
      5:  return tap_bit(5) | tap_bit(3);
      6:  return tap_bit(6) | tap_bit(5);
      7:  return tap_bit(7) | tap_bit(6);
      8:  return tap_bit(8) | tap_bit(6) | tap_bit(5) | tap_bit(4);
      9:  return tap_bit(9) | tap_bit(5);
      10: return tap_bit(10) | tap_bit(7);
      11: return tap_bit(11) | tap_bit(9);
      12: return tap_bit(12) | tap_bit(6) | tap_bit(4) | tap_bit(1);
      13: return tap_bit(13) | tap_bit(4) | tap_bit(3) | tap_bit(1);
      14: return tap_bit(14) | tap_bit(5) | tap_bit(3) | tap_bit(1);
      15: return tap_bit(15) | tap_bit(14);
      16: return tap_bit(16) | tap_bit(15) | tap_bit(13) | tap_bit(4);
      17: return tap_bit(17) | tap_bit(14);
      18: return tap_bit(18) | tap_bit(11);
      19: return tap_bit(19) | tap_bit(6) | tap_bit(2) | tap_bit(1);
      20: return tap_bit(20) | tap_bit(17);
      21: return tap_bit(21) | tap_bit(19);
      22: return tap_bit(22) | tap_bit(21);
      23: return tap_bit(23) | tap_bit(18);
      24: return tap_bit(24) | tap_bit(23) | tap_bit(22) | tap_bit(17);
      25: return tap_bit(25) | tap_bit(22);
      26: return tap_bit(26) | tap_bit(6) | tap_bit(2) | tap_bit(1);
      27: return tap_bit(27) | tap_bit(5) | tap_bit(2) | tap_bit(1);
      28: return tap_bit(28) | tap_bit(25);
      29: return tap_bit(29) | tap_bit(27);
      30: return tap_bit(30) | tap_bit(6) | tap_bit(4) | tap_bit(1);
      31: return tap_bit(31) | tap_bit(28);
      32: return tap_bit(32) | tap_bit(22) | tap_bit(2) | tap_bit(1);
      33: return tap_bit(33) | tap_bit(20);
      34: return tap_bit(34) | tap_bit(27) | tap_bit(2) | tap_bit(1);
      35: return tap_bit(35) | tap_bit(33);
      36: return tap_bit(36) | tap_bit(25);
      37: return tap_bit(37) | tap_bit(5) | tap_bit(4) | tap_bit(3) | tap_bit(2) | tap_bit(1);
      38: return tap_bit(38) | tap_bit(6) | tap_bit(5) | tap_bit(1);
      39: return tap_bit(39) | tap_bit(35);
      40: return tap_bit(40) | tap_bit(38) | tap_bit(21) | tap_bit(19);
      41: return tap_bit(41) | tap_bit(38);
      42: return tap_bit(42) | tap_bit(41) | tap_bit(20) | tap_bit(19);
      43: return tap_bit(43) | tap_bit(42) | tap_bit(38) | tap_bit(37);
      44: return tap_bit(44) | tap_bit(43) | tap_bit(18) | tap_bit(17);
      45: return tap_bit(45) | tap_bit(44) | tap_bit(42) | tap_bit(41);
      46: return tap_bit(46) | tap_bit(45) | tap_bit(26) | tap_bit(25);
      47: return tap_bit(47) | tap_bit(42);
      48: return tap_bit(48) | tap_bit(47) | tap_bit(21) | tap_bit(20);
      49: return tap_bit(49) | tap_bit(40);
      50: return tap_bit(50) | tap_bit(49) | tap_bit(24) | tap_bit(23);
      51: return tap_bit(51) | tap_bit(50) | tap_bit(36) | tap_bit(35);
      52: return tap_bit(52) | tap_bit(49);
      53: return tap_bit(53) | tap_bit(52) | tap_bit(38) | tap_bit(37);
      54: return tap_bit(54) | tap_bit(53) | tap_bit(18) | tap_bit(17);
      55: return tap_bit(55) | tap_bit(31);
      56: return tap_bit(56) | tap_bit(55) | tap_bit(35) | tap_bit(34);
      57: return tap_bit(57) | tap_bit(50);
      58: return tap_bit(58) | tap_bit(39);
      59: return tap_bit(59) | tap_bit(58) | tap_bit(38) | tap_bit(37);
      60: return tap_bit(60) | tap_bit(59);
      61: return tap_bit(61) | tap_bit(60) | tap_bit(46) | tap_bit(45);
      62: return tap_bit(62) | tap_bit(61) | tap_bit(6) | tap_bit(5);
      63: return tap_bit(63) | tap_bit(62);
      64: return tap_bit(64) | tap_bit(63) | tap_bit(61) | tap_bit(60);
      65: return tap_bit(65) | tap_bit(47);
      66: return tap_bit(66) | tap_bit(65) | tap_bit(57) | tap_bit(56);
      67: return tap_bit(67) | tap_bit(66) | tap_bit(58) | tap_bit(57);
      68: return tap_bit(68) | tap_bit(59);
      69: return tap_bit(69) | tap_bit(67) | tap_bit(42) | tap_bit(40);
      70: return tap_bit(70) | tap_bit(69) | tap_bit(55) | tap_bit(54);
      71: return tap_bit(71) | tap_bit(65);
      72: return tap_bit(72) | tap_bit(66) | tap_bit(25) | tap_bit(19);
      73: return tap_bit(73) | tap_bit(48);
      74: return tap_bit(74) | tap_bit(73) | tap_bit(59) | tap_bit(58);
      75: return tap_bit(75) | tap_bit(74) | tap_bit(65) | tap_bit(64);
      76: return tap_bit(76) | tap_bit(75) | tap_bit(41) | tap_bit(40);
      77: return tap_bit(77) | tap_bit(76) | tap_bit(47) | tap_bit(46);
      78: return tap_bit(78) | tap_bit(77) | tap_bit(59) | tap_bit(58);
      79: return tap_bit(79) | tap_bit(70);
      80: return tap_bit(80) | tap_bit(79) | tap_bit(43) | tap_bit(42);
      default: return '0;
    endcase
  endfunction

  // Length of LFSR segment i when p cells are split into n segments.
  function automatic int unsigned seg_len(int unsigned p, int unsigned n, int unsigned i);
    return p / n + ((i < p % n) ? 1 : 0);
  endfunction

  // Index of the first cell of segment i within the p-bit sub-chain.
  function automatic int unsigned seg_off(int unsigned p, int unsigned n, int unsigned i);
    int unsigned o;
    o = 0;
    for (int unsigned j = 0; j < i; j++) o += seg_len(p, n, j);
    return o;
  endfunction

endpackage
