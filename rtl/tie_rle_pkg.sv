// tie_rle_pkg: default sizes of the TIE-RLE (transition inversion encoding +
// run-length) ECG compressor.
//
// A 16-bit ECG sample is split into two 8-bit words. Each word is sent with
// one decision bit that says whether it was transition-inverted, so a frame
// on the serial link carries 2 x (8 + 1) = 18 bits before run-length coding.
// The run-length step uses a Golomb-Rice code with m = 2^GR_K = 4.
// The 16-bit sample and m = 4 follow the source design.
package tie_rle_pkg;
  localparam int unsigned SAMPLE_W = 16;  // ECG sample width
  localparam int unsigned GR_K     = 2;   // Golomb-Rice parameter, m = 2**GR_K
endpackage
