// fp16_pkg: types and constants shared by the 16-bit floating-point units
// and the inner-product co-processors.
//
// Number format (the short-word floating-point format of the ADSP-2106x
// SHARC family): bit 15 sign, bits 14..11 a 4-bit exponent in excess-7
// notation, bits 10..0 an 11-bit fraction with an implied leading one
// ("phantom bit"), so a normal value is (-1)^s * 1.m * 2^(e-7).
// Exponent code 0 means the value is exactly zero and code 15 means
// infinity; the fraction bits are ignored for both. There is no NaN and no
// denormal. Normal values range from 1.0*2^-6 (1.5625e-2) up to
// 1.11111111111b*2^7 (255.9375).
//
// The package also holds the integer operand type of the integer
// co-processors (unsigned 16-bit, 0..65535) and the 32-bit memory word the
// co-processors exchange with the board memory (two 16-bit operands per word).
package fp16_pkg;

  localparam int unsigned EXP_W   = 4;
  localparam int unsigned MAN_W   = 11;
  localparam int unsigned SIG_W   = MAN_W + 1;      // fraction plus phantom bit
  localparam logic [EXP_W-1:0] EXP_BIAS = 4'd7;
  localparam logic [EXP_W-1:0] EXP_ZERO = 4'd0;
  localparam logic [EXP_W-1:0] EXP_INF  = 4'd15;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp16_t;

  // Clock cycles from the inputs of fp_add to its result.
  localparam int unsigned FP_ADD_LATENCY = 4;

  typedef logic [15:0] uint16_t;
  typedef logic [31:0] mem_word_t;

  // Exponent codes with a special meaning.
  function automatic logic exp_is_zero(logic [EXP_W-1:0] e);
    return e == EXP_ZERO;
  endfunction

  function automatic logic exp_is_inf(logic [EXP_W-1:0] e);
    return e == EXP_INF;
  endfunction

  // 16-bit carry-propagate (ripple) adder of the integer co-processors;
  // returns {carry out, sum}.
  function automatic logic [16:0] cpa16(uint16_t x, uint16_t y);
    logic [16:0] r;
    logic        cy;
    cy = 1'b0;
    for (int i = 0; i < 16; i++) begin
      r[i] = x[i] ^ y[i] ^ cy;
      cy   = (x[i] & y[i]) | (cy & (x[i] ^ y[i]));
    end
    r[16] = cy;
    return r;
  endfunction

endpackage
