// da_fir: distributed-arithmetic inner product of N samples with N constant
// coefficients, y = sum c[n]*x[n].
//
// The N samples are loaded in parallel into N bit shift registers and leave
// them least significant bit first, one bit-plane per clock. The N bits of a
// plane address a look-up table that holds, for every address, the sum of
// the coefficients whose bit is set, so no multiplier is needed. A scaling
// accumulator adds each table word weighted by the plane's power of two; the
// plane of the sign bit is subtracted, which makes the result exact for
// two's-complement samples. This follows the shift-register / LUT /
// scaling-accumulator structure and Eq. (3) of the source design. The table
// is computed from the COEFS parameter at elaboration time; the right-shift
// accumulator form and the handshake are this design's choices.
//
// Timing: a load pulse captures x and clears the accumulator. The next B
// clocks each consume one bit-plane (busy is high). valid is high for one
// clock right after the last plane, B clocks after the load edge, and y then
// holds the full-precision result until the next load. A load while busy
// restarts the computation.
module da_fir #(
  parameter int N  = mrfb_pkg::MRFB_NTAPS,   // number of products
  parameter int B  = mrfb_pkg::MRFB_DW,      // sample width
  parameter int CW = mrfb_pkg::MRFB_CW,      // coefficient width
  parameter logic [N-1:0][CW-1:0] COEFS = mrfb_pkg::MRFB_COEFS,
  localparam int LW = CW + $clog2(N) + 1,  // table word width
  localparam int AW = LW + B               // accumulator width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [N-1:0][B-1:0]    x,
  output logic                   busy,
  output logic                   valid,
  output logic signed [AW-1:0]   y
);

  // Look-up table: entry a = sum of COEFS[n] over the set bits n of a.
  function automatic logic [(2**N)-1:0][LW-1:0] build_lut();
    logic [(2**N)-1:0][LW-1:0] t;
    for (int a = 0; a < 2**N; a++) begin
      logic signed [LW-1:0] s;
      s = '0;
      for (int n = 0; n < N; n++)
        if (a[n]) s = s + LW'($signed(COEFS[n]));
      t[a] = s;
    end
    return t;
  endfunction

  localparam logic [(2**N)-1:0][LW-1:0] LUT = build_lut();

  logic [N-1:0][B-1:0]   sreg;
  logic [$clog2(B)-1:0]  cnt;
  logic [N-1:0]          plane;
  logic signed [LW-1:0]  word;
  logic signed [AW-1:0]  term;

  always_comb begin
    for (int n = 0; n < N; n++) plane[n] = sreg[n][0];
    word = $signed(LUT[plane]);
    term = AW'(word) <<< (B - 1);
    if (cnt == $clog2(B)'(B - 1)) term = -term;   // sign-bit plane
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg  <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      valid <= 1'b0;
      y     <= '0;
    end else begin
      valid <= 1'b0;
      if (load) begin
        sreg <= x;
        cnt  <= '0;
        busy <= 1'b1;
        y    <= '0;
      end else if (busy) begin
        for (int n = 0; n < N; n++) sreg[n] <= sreg[n] >> 1;
        y   <= (y >>> 1) + term;
        cnt <= cnt + 1'b1;
        if (cnt == $clog2(B)'(B - 1)) begin
          busy  <= 1'b0;
          valid <= 1'b1;
        end
      end
    end
  end

endmodule
