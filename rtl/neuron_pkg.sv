// neuron_pkg: number format, constants and shared types of the digital neuron.
//
// Every value in the neuron is a 16-bit two's-complement fixed-point number in
// 3.12 format: one sign bit, three integer bits and twelve fraction bits, so the
// range is [-8.0, +7.999755859375] with a step of 2^-12. As in the source
// architecture, "one" is represented by 0x0FFF (0.999755859375), the largest
// value below 1.0 the datapath uses as the unit. The PLAN segment limits and
// offsets below are the sigmoid approximation constants of the architecture.
package neuron_pkg;

  localparam int unsigned W    = 16;  // word width
  localparam int unsigned FRAC = 12;  // fraction bits

  typedef logic signed [W-1:0] fix_t;

  // Extreme values of the 3.12 format (saturation bounds of every adder).
  localparam fix_t FIX_MAX = 16'sh7FFF;   // +7.999755859375
  localparam fix_t FIX_MIN = -16'sh8000;  // -8.0

  // Unit value of the datapath.
  localparam fix_t ONE = 16'sh0FFF;       // 0.999755859375

  // PLAN segment limits on |z|.
  localparam fix_t LIM_1     = 16'sh1000; // 1.0
  localparam fix_t LIM_2_375 = 16'sh2600; // 2.375
  localparam fix_t LIM_5     = 16'sh5000; // 5.0

  // PLAN offsets.
  localparam fix_t OFS_0_5     = 16'sh0800; // 0.5
  localparam fix_t OFS_0_625   = 16'sh0A00; // 0.625
  localparam fix_t OFS_0_84375 = 16'sh0D80; // 0.84375

  // Segment of |z| found by the condition detector.
  typedef enum logic [1:0] {
    SEG_LT1   = 2'd0,  // 0     <= |z| < 1      slope 2^-2, offset 0.5
    SEG_LT2_4 = 2'd1,  // 1     <= |z| < 2.375  slope 2^-3, offset 0.625
    SEG_LT5   = 2'd2,  // 2.375 <= |z| < 5      slope 2^-5, offset 0.84375
    SEG_SAT   = 2'd3   // |z| >= 5              slope 0,    offset 1
  } seg_e;

  // Activation function selected by the neuronType input.
  typedef enum logic {
    NT_SIGMOID = 1'b0,
    NT_TANH    = 1'b1
  } neuron_type_e;

endpackage
