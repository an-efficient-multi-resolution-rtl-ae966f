// mrfb_top: reconfigurable multi-resolution filter bank (MRFB) built as a
// four-stage fast-filter-bank tree with 16 channels at the finest setting.
//
// Stage 1 is one sub-filter fed by the input; each later stage has twice as
// many sub-filters, each fed by one output of the stage before it through a
// bank of AND gates driven by an enable bit: en[0] gates the inputs of the
// two stage-2 blocks, en[1] the four stage-3 blocks, en[2] the eight stage-4
// blocks. Every sub-filter has an original and a complementary output, so
// stage s delivers 2^s sub-band signals. S[1:0] selects the interpolation
// spacing of all sub-filters (10, 20, 40 or 80 samples), which sets the
// sensing resolution without changing the hardware. The source design pairs
// S with the enables as S=00/en=000, 01/100, 10/110 and 11/111, from the
// coarsest to the finest resolution; any combination is accepted here.
//
// Output numbering follows the source drawing: the block fed by Y{s-1,r}
// drives Y{s,r} with its original output and Y{s,r+2^(s-1)} with its
// complementary output; stage 1 drives Y{1,0} and Y{1,1}. Port y<s>[i] is
// Y{s,i}. A disabled stage outputs zeros.
//
// Timing: a sample on x_in is taken when in_valid and in_ready are both
// high. All 15 sub-filters then work in lock step; stage s uses the output
// stage s-1 produced for the previous sample, so the tree is a pipeline of
// four sample periods. out_valid pulses when all outputs of the sample are
// ready: DW+2 clocks after the acceptance edge with distributed arithmetic
// (MULT_DA, the default), 2 clocks with Baugh-Wooley multipliers (MULT_BW).
// in_ready is low from acceptance until out_valid rises and high again with
// it, so one sample is taken every DW+2 clocks (DA) or every 2 clocks (BW)
// at most. The handshake and the sample-rate controller are this design's
// own choices.
module mrfb_top
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
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [DW-1:0]            x_in,
  input  logic [$clog2(NSEL)-1:0]  sel,     // S[1:0]
  input  logic [2:0]               en,      // en(0), en(1), en(2)
  output logic                     out_valid,
  output logic [1:0][DW-1:0]       y1,      // Y{1,i}
  output logic [3:0][DW-1:0]       y2,      // Y{2,i}
  output logic [7:0][DW-1:0]       y3,      // Y{3,i}
  output logic [15:0][DW-1:0]      y4       // Y{4,i}
);

  localparam int NSTAGE = 4;

  // node[s][i] is Y{s,i}; index 0 of the first level is the input.
  logic [15:0][DW-1:0] node [NSTAGE+1];
  logic [NSTAGE:1]     stage_valid;
  logic                busy;
  logic                start;

  assign in_ready = ~busy;
  assign start    = in_valid & in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (start) busy <= 1'b1;
      else if (stage_valid[1]) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
      end
    end
  end

  // Level 0 holds only the input sample.
  always_comb begin
    node[0]    = '0;
    node[0][0] = x_in;
  end

  for (genvar s = 1; s <= NSTAGE; s++) begin : g_stage
    localparam int NB = 2 ** (s - 1);          // blocks in this stage
    logic          stage_en;
    logic [NB-1:0] blk_valid;
    if (s == 1) begin : g_on
      assign stage_en = 1'b1;
    end else begin : g_gated
      assign stage_en = en[s-2];
    end
    // Unused upper entries of a level are tied off.
    if (2 * NB < 16) begin : g_tie
      assign node[s][15:2*NB] = '0;
    end
    for (genvar b = 0; b < NB; b++) begin : g_blk
      logic [DW-1:0] din;
      assign din = node[s-1][b] & {DW{stage_en}};   // AND gate at the block input
      mrfb_subfilter #(
        .DW(DW), .CW(CW), .CF(CF), .NTAPS(NTAPS), .NSEL(NSEL), .SPW(SPW),
        .SPACINGS(SPACINGS), .COEFS(COEFS), .MULT(MULT)
      ) u_sf (
        .clk, .rst_n,
        .en     (stage_en),
        .start,
        .sel,
        .din,
        .valid  (blk_valid[b]),
        .y_orig (node[s][b]),
        .y_comp (node[s][b+NB])
      );
    end
    assign stage_valid[s] = blk_valid[0];
    // All enabled blocks of a stage finish together, and never apart from stage 1.
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                 (blk_valid == '0) || (blk_valid == '1));
    a_with_first: assert property (@(posedge clk) disable iff (!rst_n)
                                   stage_valid[s] |-> stage_valid[1]);
  end

  assign y1 = node[1][1:0];
  assign y2 = node[2][3:0];
  assign y3 = node[3][7:0];
  assign y4 = node[4][15:0];

endmodule
