// ica_pkg: shared constants and helpers of the in-circuit assertion library.
//
// The assertion circuits in this library are latency-oblivious: their verdict
// may arrive any fixed number of cycles after the monitored signal, so every
// stage may be pipelined freely. This package holds the constants that more
// than one module uses: the monobit bounds (32768/2 +- 466, the p < 0.01 band
// for a 32,768-bit stream) and the default program-counter window of the
// range assertion. The bounds are stored one step outside the band because the
// range checks compare strictly (A < x < B). The program-counter window
// (0x4000_0000..0x5FFF_FFFF as word addresses) is this design's choice.
package ica_pkg;

  // Monobit test over 256 words of 128 bits = 32,768 bits.
  localparam int unsigned MONO_WINDOW = 256;
  localparam int unsigned MONO_HALF   = 32768 / 2;
  localparam int unsigned MONO_DEV    = 466;
  localparam int unsigned MONO_LO     = MONO_HALF - MONO_DEV - 1;  // strict A
  localparam int unsigned MONO_HI     = MONO_HALF + MONO_DEV + 1;  // strict B

  // Pattern-counter test: 32 nibbles x 256 words / 16 patterns = 512 expected.
  localparam int unsigned PAT_EXPECT  = 512;
  localparam int unsigned PAT_DEV     = 56;
  localparam int unsigned PAT_LO      = PAT_EXPECT - PAT_DEV - 1;  // 455
  localparam int unsigned PAT_HI      = PAT_EXPECT + PAT_DEV + 1;  // 569

  // Program-counter range (word addresses, PC[31:2]).
  localparam int unsigned PC_W  = 30;
  localparam logic [PC_W-1:0] PC_LO = 30'h1000_0000;  // byte 0x4000_0000
  localparam logic [PC_W-1:0] PC_HI = 30'h17FF_FFFF;  // byte 0x5FFF_FFFC

  // Number of ones in a byte.
  function automatic logic [3:0] popcount8(input logic [7:0] b);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) n += 4'(b[i]);
    return n;
  endfunction

endpackage
