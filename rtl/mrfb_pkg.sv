// mrfb_pkg: constants and types shared by the multi-resolution filter bank.
//
// The bank works on 8-bit two's-complement samples, which the source design
// calls an "8 bit MRFB". The four interpolation spacings 10, 20, 40 and 80,
// selected by S[1:0], are the delays drawn for the reconfigurable first
// stage. The prototype filter is this design's own choice, since no
// coefficients are published: the 7-tap maximally flat half-band filter
// [-1 0 9 16 9 0 -1]/32, stored as Q1.7 integers [-4 0 36 64 36 0 -4]/128.
// Its centre tap lies (NTAPS-1)/2 spacings back, which gives the delay used
// to build the complementary response.
package mrfb_pkg;

  parameter int MRFB_DW    = 8;  // sample width, two's complement
  parameter int MRFB_CW    = 8;  // coefficient width, two's complement
  parameter int MRFB_CF    = 7;  // fraction bits of a coefficient
  parameter int MRFB_NTAPS = 7;  // taps of the prototype filter
  parameter int MRFB_NSEL  = 4;  // number of selectable spacings (S[1:0])
  parameter int MRFB_SPW   = 16; // width of one spacing value

  // Spacing (interpolation factor) per value of S: entry 0 is S=00.
  parameter logic [MRFB_NSEL-1:0][MRFB_SPW-1:0] MRFB_SPACINGS = {16'd80, 16'd40, 16'd20, 16'd10};

  // Prototype coefficients; entry k multiplies x[n - k*M].
  parameter logic [MRFB_NTAPS-1:0][MRFB_CW-1:0] MRFB_COEFS = {
    8'hFC, 8'h00, 8'h24, 8'h40, 8'h24, 8'h00, 8'hFC
  };

  // How a sub-filter forms its coefficient products.
  typedef enum logic {
    MULT_DA = 1'b0,  // distributed arithmetic: bit-serial LUT + scaling accumulator
    MULT_BW = 1'b1   // one Baugh-Wooley array multiplier per tap
  } mult_kind_e;

endpackage
