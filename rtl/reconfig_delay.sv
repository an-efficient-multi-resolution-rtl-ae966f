// reconfig_delay: tapped delay line with a selectable tap spacing.
//
// This is the reconfigurable part of every sub-filter of the filter bank.
// Replacing each unit delay of a prototype filter H(z) by z^-M gives the
// interpolated filter H(z^M); here M is picked from a table of NSEL spacings
// by the select input, as in the source design where S[1:0] chooses between
// delays of 10, 20, 40 and 80 samples through a multiplexer. One shift
// register of (NTAPS-1)*max(M) samples is shared by all spacings, and tap k
// is multiplexed from position k*M of it, so a change of S takes effect on
// the next sample without losing the stored history (the shared line and the
// per-tap multiplexers are this design's choice).
//
// Interface and timing: taps[0] is din itself and taps[k] is the sample that
// was shifted in k*M shifts earlier, both combinational. A shift (one per
// input sample) moves din into the line at the clock edge. clr empties the
// line synchronously and wins over shift. Reset also empties it.
module reconfig_delay
  import mrfb_pkg::*;
#(
  parameter int DW    = mrfb_pkg::MRFB_DW,
  parameter int NTAPS = mrfb_pkg::MRFB_NTAPS,
  parameter int NSEL  = mrfb_pkg::MRFB_NSEL,
  parameter int SPW   = mrfb_pkg::MRFB_SPW,
  parameter logic [NSEL-1:0][SPW-1:0] SPACINGS = mrfb_pkg::MRFB_SPACINGS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         shift,
  input  logic                         clr,
  input  logic [$clog2(NSEL)-1:0]      sel,
  input  logic [DW-1:0]                din,
  output logic [NTAPS-1:0][DW-1:0]     taps
);

  function automatic int unsigned max_spacing();
    int unsigned m = 0;
    for (int i = 0; i < NSEL; i++) if (32'(SPACINGS[i]) > m) m = 32'(SPACINGS[i]);
    return m;
  endfunction

  localparam int unsigned MAXSP = max_spacing();
  localparam int unsigned LEN   = (NTAPS - 1) * MAXSP;

  // line[i] holds the sample shifted in i+1 shifts ago.
  logic [DW-1:0] line [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) line[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < LEN; i++) line[i] <= '0;
    end else if (shift) begin
      line[0] <= din;
      for (int i = 1; i < LEN; i++) line[i] <= line[i-1];
    end
  end

  always_comb begin
    taps[0] = din;
    for (int k = 1; k < NTAPS; k++) begin
      taps[k] = '0;
      for (int s = 0; s < NSEL; s++)
        if (sel == s[$clog2(NSEL)-1:0]) taps[k] = line[k * int'(SPACINGS[s]) - 1];
    end
  end

endmodule
