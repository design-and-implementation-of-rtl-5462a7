// Shared types and constants of the two-neuron training network.
//
// Every operand (input x, weight w, neuron output o, target t) is an 8-bit
// sign-magnitude number in the format S DDD.FFFF: bit 7 is the sign (1 =
// negative), bits 6:4 the integer part 0..7 and bits 3:0 the fraction in
// sixteenths, so the range is -7.9375 .. +7.9375 in steps of 0.0625. This
// format is the one the design is built around; the widths of everything
// derived from it (products, accumulators, squared errors, derivative) are
// this implementation's choice, sized so that nothing inside a pass can
// overflow.
//
// Memory words are 16 bits wide. A weight occupies the low byte of its word
// with the high byte zero. The all-zero 16-bit word is reserved as the
// "zero-byte" end-of-vector marker; a weight of value zero is therefore always
// stored as minus zero (16'h0080) so that it can never be taken for a marker.
package nn_pkg;

  localparam int unsigned FRAC    = 4;   // fraction bits of S DDD.FFFF
  localparam int unsigned MAG_W   = 7;   // magnitude bits of an operand
  localparam int unsigned WORD_W  = 16;  // RAM word width
  localparam int unsigned PROD_W  = 2 * MAG_W;   // product magnitude, 8 fraction bits
  localparam int unsigned ACC_W   = 21;  // holds 127 products of 127*127
  localparam int unsigned Y_W     = ACC_W + 1;   // signed neuron sum, 1/256 units
  localparam int unsigned ERR_W   = 9;   // signed o - t, 1/16 units
  localparam int unsigned SQ_W    = 16;  // (o - t)^2, 1/256 units
  localparam int unsigned ESUM_W  = SQ_W + 1;    // E1 + E2, 1/256 units
  localparam int unsigned DER_W   = 14;  // signed derivative, 1/16 units
  localparam int unsigned ITER_W  = 8;   // iteration counter

  localparam logic [WORD_W-1:0] ZERO_BYTE = '0;  // end-of-vector marker word

  // One S DDD.FFFF operand.
  typedef struct packed {
    logic             s;
    logic [MAG_W-1:0] mag;
  } sm8_t;

  // One product of two operands: sign and a 14-bit magnitude in 1/256 units.
  typedef struct packed {
    logic              s;
    logic [PROD_W-1:0] mag;
  } prod_t;

  // Memory selector of the load/read-back port.
  typedef enum logic [3:0] {
    MEM_X     = 4'd0,   // input vector x (stage 1)
    MEM_W1A   = 4'd1,   // neuron 1 weights, memory A
    MEM_W1B   = 4'd2,   // neuron 1 weights, memory B
    MEM_W2A   = 4'd3,   // neuron 2 weights, memory A
    MEM_W2B   = 4'd4,   // neuron 2 weights, memory B
    MEM_TANH1 = 4'd5,   // neuron 1 tanh look-up table (stage 3)
    MEM_TANH2 = 4'd6,   // neuron 2 tanh look-up table
    MEM_TGT1  = 4'd7,   // neuron 1 target table
    MEM_TGT2  = 4'd8    // neuron 2 target table
  } mem_sel_t;

  // Two's-complement value of an operand, in 1/16 units.
  function automatic logic signed [MAG_W+1:0] sm_to_int(sm8_t v);
    logic signed [MAG_W+1:0] m;
    m = signed'({2'b00, v.mag});
    return v.s ? -m : m;
  endfunction

endpackage
