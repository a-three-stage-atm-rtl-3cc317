// atm_pkg: constants shared by the path-allocation switch.
//
// The defaults describe the 3072 x 3072 design point: 32 input, 32
// intermediate and 32 output modules, 96 ports per input/output module,
// channel groups of 4 links (input -> intermediate) and 8 links
// (intermediate -> output). The payload width and the cell layout are this
// design's own choice: a cell travelling through the fabric is a packed
// vector {valid, output module, output port, payload}.
package atm_pkg;
  localparam int unsigned L1_DEF        = 32;  // input modules
  localparam int unsigned L2_DEF        = 32;  // output modules
  localparam int unsigned M_DEF         = 32;  // intermediate modules
  localparam int unsigned N1_DEF        = 96;  // ports per input module
  localparam int unsigned N2_DEF        = 96;  // ports per output module
  localparam int unsigned S1_DEF        = 4;   // links input -> intermediate module
  localparam int unsigned S2_DEF        = 8;   // links intermediate -> output module
  localparam int unsigned PAYLOAD_W_DEF = 32;  // cell body carried with the header

  function automatic int unsigned max3(int unsigned a, int unsigned b, int unsigned c);
    int unsigned m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  // Width of a field that holds values 0..n-1 (at least one bit).
  function automatic int unsigned idx_w(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction
endpackage
