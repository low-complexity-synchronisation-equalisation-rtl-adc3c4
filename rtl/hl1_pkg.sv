// hl1_pkg: types and constants shared by the Hiperlan/1 synchro-equaliser.
//
// All baseband samples are 8-bit two's complement with six fraction bits
// (Q1.6, so 64 means 1.0 and the range is about +/-2). A complex sample is a
// packed struct {re, im}. Phases are binary angles: 16 bits per full turn
// (65536 = 360 degrees), so wrap-around arithmetic is plain modular addition.
// The 8-bit sample width follows the document; the Q1.6 scaling and the
// 16-bit angle format are this design's own choices.
package hl1_pkg;

  localparam int SW = 8;    // sample width (document: 8-bit resolution)
  localparam int PW = 16;   // binary-angle width

  typedef logic signed [SW-1:0] samp_t;
  typedef logic signed [PW-1:0] phase_t;

  typedef struct packed {
    samp_t re;
    samp_t im;
  } cplx_t;

  // Saturate a wide signed value to an 8-bit sample.
  function automatic samp_t sat8(input logic signed [31:0] v);
    if (v > 32'sd127) return 8'sd127;
    if (v < -32'sd128) return -8'sd128;
    return v[7:0];
  endfunction

  // Saturate a wide signed value to 16 bits.
  function automatic logic signed [15:0] sat16(input logic signed [31:0] v);
    if (v > 32'sd32767) return 16'sh7fff;
    if (v < -32'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

  // Default m1: a 31-chip maximal-length sequence from the LFSR x^5 + x^2 + 1
  // (chip 0 in bit 0). The standard's own m1 can be passed as a parameter.
  localparam logic [30:0] M1_DEFAULT = 31'h2ec7cd21;

endpackage
