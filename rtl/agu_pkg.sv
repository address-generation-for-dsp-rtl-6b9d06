// agu_pkg: types and constants shared by the address generator units.
//
// The comprehensive address generator (cagu) is programmed through a small
// bank of configuration words, one per field below, before a kernel starts.
// The mode word selects one of the addressing modes; the other words hold
// the sizes that mode needs. The list of modes follows the paper's list
// of supported addressing modes. The numeric encodings, the register map and
// the flag bits are this design's own choice.
package agu_pkg;

  // Addressing modes of the comprehensive unit.
  typedef enum logic [3:0] {
    MODE_INC         = 4'd0,  // linear increment by STEP
    MODE_DEC         = 4'd1,  // linear decrement by STEP
    MODE_BITREV      = 4'd2,  // bit-reversed order 0..N-1 (FFT load / store)
    MODE_FFT_DATA    = 4'd3,  // radix-2 butterfly operand pairs, all stages
    MODE_FFT_TW      = 4'd4,  // twiddle factor index per butterfly, all stages
    MODE_CONV_STORED = 4'd5,  // convolution data fetch, stored zero-padded data
    MODE_CONV_STREAM = 4'd6,  // convolution data fetch, streaming (circular) data
    MODE_MODULO      = 4'd7,  // modulo-M circular (coefficient fetch)
    MODE_DIVIDE      = 4'd8,  // divide-by-M (result store)
    MODE_LPFIR       = 4'd9,  // symmetric linear-phase FIR data fetch
    MODE_ME          = 4'd10, // macroblock fetch for motion estimation
    MODE_ZIGZAG      = 4'd11  // zigzag scan of an N x N block
  } agu_mode_e;

  // Configuration word indices.
  typedef enum logic [3:0] {
    REG_MODE  = 4'd0,  // agu_mode_e in the low bits
    REG_N     = 4'd1,  // N: data length / buffer length / block side
    REG_M     = 4'd2,  // M: impulse length / modulus / divisor
    REG_LEN   = 4'd3,  // length of the result buffer (divide mode, circular)
    REG_STEP  = 4'd4,  // modifier for increment / decrement / modulo
    REG_MBWD  = 4'd5,  // macroblock width - 1
    REG_MBHT  = 4'd6,  // macroblock height - 1
    REG_SLWD  = 4'd7,  // slice width
    REG_LOG2N = 4'd8,  // log2 of FFT size
    REG_BASE  = 4'd9,  // base address added to the offset
    REG_FLAGS = 4'd10  // bit 0: circular result buffer (divide mode)
  } agu_reg_e;

  localparam int unsigned NUM_CFG_REGS = 11;
  localparam int unsigned FLAG_CIRC    = 0;

endpackage
