// filt_pkg: types, constants and helper functions shared by the filter bank.
//
// Samples are signed two's complement words of DATA_W bits with FRAC_BITS
// fractional bits. An 8-bit pixel enters as pixel * 2**FRAC_BITS. The
// filter coefficients are signed powers of two, so every tap is a wired
// arithmetic right shift of the sample followed by an add or a subtract.
//
// The coefficient values at reset are the ones of the published filter pair
// (analysis: 10 taps, synthesis: 6 taps, low-pass prototypes). The high-pass
// filters are not stored: the polyphase butterfly derives them from the
// low-pass taps by alternating signs. The data width, the fraction width and
// the coefficient code are choices of this design.
package filt_pkg;

  // Word width of the samples between filters, and the fraction inside it.
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned FRAC_BITS = 5;
  // Two guard bits for the intermediate sums of a filter.
  localparam int unsigned GUARD_W   = 2;

  localparam int unsigned ANA_TAPS  = 10;
  localparam int unsigned SYN_TAPS  = 6;

  // One programmable coefficient: zero, or +/- 2**-shift with shift 0..7.
  typedef struct packed {
    logic       nz;     // 0: the coefficient is zero
    logic       neg;    // 1: negative coefficient (tap is subtracted)
    logic [2:0] shift;  // magnitude 2**-shift
  } coef_t;

  localparam int unsigned COEF_W = $bits(coef_t);

  function automatic coef_t mk_coef(input bit nz, input bit neg, input logic [2:0] sh);
    coef_t c;
    c.nz    = nz;
    c.neg   = neg;
    c.shift = sh;
    return c;
  endfunction

  // Analysis low-pass prototype h0..h9:
  //   2^-6, 0, -2^-3, -2^-7, 1, 1, -2^-7, -2^-3, 0, 2^-6
  function automatic coef_t ana_default(input int unsigned k);
    case (k)
      0, 9:    return mk_coef(1'b1, 1'b0, 3'd6);
      1, 8:    return mk_coef(1'b0, 1'b0, 3'd0);
      2, 7:    return mk_coef(1'b1, 1'b1, 3'd3);
      3, 6:    return mk_coef(1'b1, 1'b1, 3'd7);
      default: return mk_coef(1'b1, 1'b0, 3'd0);
    endcase
  endfunction

  // Synthesis low-pass prototype f0..f5: 2^-7, 2^-3, 1, 1, 2^-3, 2^-7
  function automatic coef_t syn_default(input int unsigned k);
    case (k)
      0, 5:    return mk_coef(1'b1, 1'b0, 3'd7);
      1, 4:    return mk_coef(1'b1, 1'b0, 3'd3);
      default: return mk_coef(1'b1, 1'b0, 3'd0);
    endcase
  endfunction

  // Pipeline depth of one prefix adder of the given width: one stage that
  // forms generate/propagate, one stage per prefix level, one sum stage.
  function automatic int unsigned adder_latency(input int unsigned width);
    return $clog2(width) + 2;
  endfunction

  // The Delta operator: (g, p) Delta (g', p') = (g | p & g', p & p').
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t delta(input gp_t hi, input gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Stream tag carried alongside data through the pipelines.
  typedef struct packed {
    logic valid;
    logic sol;   // first sample of a line
    logic sof;   // first sample of a frame
  } tag_t;

  // The four bands of one pyramid step, one sample each, with their tag.
  // ll: low-pass X then low-pass Y, lh: low X / high Y, hl: high X / low Y,
  // hh: high X / high Y.
  typedef struct packed {
    tag_t              tag;
    logic [DATA_W-1:0] ll;
    logic [DATA_W-1:0] lh;
    logic [DATA_W-1:0] hl;
    logic [DATA_W-1:0] hh;
  } bands_t;

  // A 2x2 block of reconstructed samples: px[r][c], r = row, c = column
  // inside the block (row/column 0 is the odd position, 1 the next even).
  typedef struct packed {
    tag_t                        tag;
    logic [1:0][1:0][DATA_W-1:0] px;
  } block_t;

endpackage
