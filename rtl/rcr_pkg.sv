// rcr_pkg: shared types and constants of the reconfigurable-clock-rate counter.
//
// The counter is 128 bits wide, as the design specifies. Its counting rate is
// picked by three select lines, sel1..sel3, which together form a 3-bit rate
// code. The encoding of that code is this design's own choice: code k divides
// the input clock by 2^(k+1), so the eight codes span divide-by-2 up to
// divide-by-256.
package rcr_pkg;

  // Width of the binary counter (the design's main configuration).
  localparam int unsigned COUNT_W = 128;

  // Number of rate-select lines (sel1, sel2, sel3).
  localparam int unsigned SEL_W = 3;

  // Rate code: {sel3, sel2, sel1}. DIV<n> means the counter advances once
  // every n input clock cycles.
  typedef enum logic [SEL_W-1:0] {
    DIV2   = 3'd0,
    DIV4   = 3'd1,
    DIV8   = 3'd2,
    DIV16  = 3'd3,
    DIV32  = 3'd4,
    DIV64  = 3'd5,
    DIV128 = 3'd6,
    DIV256 = 3'd7
  } rate_sel_e;

  // Division ratio of a rate code.
  function automatic int unsigned div_ratio(rate_sel_e code);
    return 32'd2 << code;
  endfunction

endpackage
