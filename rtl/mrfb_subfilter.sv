// mrfb_subfilter: one reconfigurable sub-filter of the fast-filter-bank tree.
//
// It filters its input with the interpolated prototype H(z^M), where the
// spacing M is chosen by sel (S[1:0]), and delivers two outputs, as every
// stage block of the source design does: the filter output itself and its
// complementary response, formed by subtracting the filter output from the
// input delayed by the filter's group delay, (NTAPS-1)/2 * M samples (the
// centre tap of the delay line). The coefficient products are made either by
// distributed arithmetic (MULT = MULT_DA, the default, as proposed) or by one
// Baugh-Wooley multiplier per tap (MULT = MULT_BW).
//
// Both outputs are re-quantised to DW bits: the sum of products is shifted
// right arithmetically by CF (truncation) and saturated, and the difference
// is saturated too. Keeping every stage at the input width is this design's
// choice; the source does not give internal widths.
//
// Timing: start marks a new input sample on din. If en is high at start the
// sample is shifted into the delay line and a computation begins; y_orig and
// y_comp are updated and valid pulses DW+1 clocks after the start edge (DA)
// or 1 clock after it (Baugh-Wooley). If en is low at start the delay line
// is emptied, both outputs become zero and valid does not pulse, so a stage
// that is switched off rests in a cleared state.
module mrfb_subfilter
  import mrfb_pkg::*;
#(
  parameter int DW    = mrfb_pkg::MRFB_DW,
  parameter int CW    = mrfb_pkg::MRFB_CW,
  parameter int CF    = mrfb_pkg::MRFB_CF,
  parameter int NTAPS = mrfb_pkg::MRFB_NTAPS,
  parameter int NSEL  = mrfb_pkg::MRFB_NSEL,
  parameter int SPW   = mrfb_pkg::MRFB_SPW,
  parameter logic [NSEL-1:0][SPW-1:0]  SPACINGS = mrfb_pkg::MRFB_SPACINGS,
  parameter logic [NTAPS-1:0][CW-1:0]  COEFS    = mrfb_pkg::MRFB_COEFS,
  parameter mult_kind_e MULT = MULT_DA
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     start,
  input  logic [$clog2(NSEL)-1:0]  sel,
  input  logic [DW-1:0]            din,
  output logic                     valid,
  output logic [DW-1:0]            y_orig,
  output logic [DW-1:0]            y_comp
);

  localparam int CTR = (NTAPS - 1) / 2;          // centre tap
  localparam int LW  = CW + $clog2(NTAPS) + 1;
  localparam int SW  = LW + DW;                  // full-precision sum width

  logic [NTAPS-1:0][DW-1:0] taps;
  logic                     go;
  logic                     sum_valid;
  logic signed [SW-1:0]     sum;
  logic [DW-1:0]            centre_q;

  assign go = start & en;

  reconfig_delay #(
    .DW(DW), .NTAPS(NTAPS), .NSEL(NSEL), .SPW(SPW), .SPACINGS(SPACINGS)
  ) u_delay (
    .clk, .rst_n,
    .shift (go),
    .clr   (start & ~en),
    .sel,
    .din,
    .taps
  );

  generate
    if (MULT == MULT_DA) begin : g_da
      logic signed [SW-1:0] da_y;
      logic                 da_busy;
      da_fir #(.N(NTAPS), .B(DW), .CW(CW), .COEFS(COEFS)) u_da (
        .clk, .rst_n,
        .load  (go),
        .x     (taps),
        .busy  (da_busy),
        .valid (sum_valid),
        .y     (da_y)
      );
      assign sum = da_y;
      // The controller issues a new sample only once the previous one is done.
      a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) go |-> !da_busy);
    end else begin : g_bw
      // Products of the captured taps, summed in one clock.
      localparam int PW = DW + CW;
      logic [NTAPS-1:0][DW-1:0] taps_q;
      logic [NTAPS-1:0][PW-1:0] prod;
      logic signed [SW-1:0]     acc;
      logic                     run;
      for (genvar k = 0; k < NTAPS; k++) begin : g_tap
        bw_mult #(.WA(DW), .WB(CW)) u_mul (.a(taps_q[k]), .b(COEFS[k]), .p(prod[k]));
      end
      always_comb begin
        acc = '0;
        for (int k = 0; k < NTAPS; k++) acc = acc + SW'($signed(prod[k]));
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          taps_q <= '0;
          run    <= 1'b0;
        end else begin
          run <= go;
          if (go) taps_q <= taps;
        end
      end
      assign sum       = acc;
      assign sum_valid = run;
    end
  endgenerate

  // Saturate a wide signed value to DW bits.
  function automatic logic [DW-1:0] sat(logic signed [SW-1:0] v);
    logic signed [SW-1:0] hi, lo;
    hi = SW'((2 ** (DW - 1)) - 1);
    lo = -SW'(2 ** (DW - 1));
    if (v > hi) return hi[DW-1:0];
    if (v < lo) return lo[DW-1:0];
    return v[DW-1:0];
  endfunction

  logic [DW-1:0]        orig_d;
  logic signed [SW-1:0] diff;

  always_comb begin
    orig_d = sat(sum >>> CF);
    diff   = SW'($signed(centre_q)) - SW'($signed(orig_d));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      centre_q <= '0;
      valid    <= 1'b0;
      y_orig   <= '0;
      y_comp   <= '0;
    end else begin
      valid <= sum_valid;
      if (go) centre_q <= taps[CTR];
      if (start && !en) begin
        y_orig <= '0;
        y_comp <= '0;
      end else if (sum_valid) begin
        y_orig <= orig_d;
        y_comp <= sat(diff);
      end
    end
  end

endmodule
