// srm_pkg: shared constants, types and helper functions of the Systolic-RAM
// direct-convolution macro.
//
// The macro is a 200 x 64 bit SRAM split into eight row-cells of eight word
// lines each. Seven row-cells hold activations, the eighth holds kernels. One
// 200-bit word is 25 bytes, one byte per element of a 5x5 kernel window.
// Byte p of a word sits at bits [8p+7:8p]; p = 5*i + j, where i is the window
// row (vertical offset) and j the window column (horizontal offset).
//
// Data bytes are sign-magnitude: bit 0 is the sign, bits 7:1 the magnitude,
// so a byte spans -127..+127. The bit assignment follows the MDAC schematic
// (sign on data bit 0, magnitude on data bits 7:1); the name sign-magnitude
// and the ordering of magnitude bits are this design's reading of it.
package srm_pkg;

  parameter int K        = 5;             // kernel edge (5x5 kernel)
  parameter int N_RC     = 7;             // activation row-cells = charge-share lines
  parameter int N_T8     = 6;             // 8T word lines per row-cell
  parameter int N_WL     = 8;             // word lines per row-cell (2 B6T + 6 8T)
  parameter int BW       = 8;             // bits per pixel / kernel element
  parameter int NPIX     = K * K;         // 25 bytes per word
  parameter int WORD_W   = NPIX * BW;     // 200 bit lines
  parameter int ADC_BITS = 4;             // 4-bit flash ADC per charge-share line
  parameter int CS_W     = 20;            // signed width of an ideal 25-term sum

  // Data movement applied in the phi1 half of a cycle.
  typedef enum logic [1:0] {
    MV_NONE = 2'd0,   // no movement (VMM / IM2COL operation, or first step)
    MV_V    = 2'd1,   // phi1V: vertical stride through the B6T ring
    MV_H    = 2'd2    // phi1H: horizontal stride, new column from 8T cells
  } move_e;

  // Signed value of a sign-magnitude byte.
  function automatic int smag_value(input logic [BW-1:0] b);
    return b[0] ? -int'(b[BW-1:1]) : int'(b[BW-1:1]);
  endfunction

  // Sign-magnitude byte of an integer in -127..127.
  function automatic logic [BW-1:0] smag_encode(input int v);
    logic [BW-2:0] m;
    m = (v < 0) ? (BW-1)'(-v) : (BW-1)'(v);
    return {m, (v < 0) ? 1'b1 : 1'b0};
  endfunction

endpackage
