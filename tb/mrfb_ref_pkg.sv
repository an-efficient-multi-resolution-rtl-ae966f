// mrfb_ref_pkg: behavioural reference of the filter bank for the
// testbenches. It recomputes every sub-filter from the definition, directly
// from the input history: tap k is the sample k*M inputs back, the original
// output is sat((sum c[k]*tap[k]) >>> CF) and the complementary output is
// sat(tap[(NTAPS-1)/2] - original). The tree model repeats that for the 15
// sub-filters of the four-stage bank, with each stage fed by the outputs the
// stage before it produced for the previous sample.
package mrfb_ref_pkg;
  import mrfb_pkg::*;

  localparam int HLEN = 1024;

  function automatic int sat_dw(int v);
    int hi = (1 << (MRFB_DW - 1)) - 1;
    int lo = -(1 << (MRFB_DW - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  class node_model;
    int hist[HLEN];   // hist[0] is the newest sample
    int orig, comp;

    function new();
      clear();
    endfunction

    function void clear();
      foreach (hist[i]) hist[i] = 0;
      orig = 0;
      comp = 0;
    endfunction

    // Take one input sample while enabled and update both outputs.
    function void step(int din, int sel);
      int m, acc;
      for (int i = HLEN - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = din;
      m = int'(MRFB_SPACINGS[sel]);
      acc = 0;
      for (int k = 0; k < MRFB_NTAPS; k++)
        acc += int'($signed(MRFB_COEFS[k])) * hist[k*m];
      orig = sat_dw(acc >>> MRFB_CF);
      comp = sat_dw(hist[((MRFB_NTAPS - 1) / 2) * m] - orig);
    endfunction
  endclass

  class tree_model;
    node_model nodes[1:4][8];
    int y[1:4][16];   // y[s][i] is Y{s,i}

    function new();
      for (int s = 1; s <= 4; s++)
        for (int b = 0; b < 8; b++) nodes[s][b] = new();
      foreach (y[s, i]) y[s][i] = 0;
    endfunction

    // One input sample with select value sel and enable bits en.
    function void step(int x, int sel, logic [2:0] en);
      int prev[1:4][16];
      prev = y;
      for (int s = 1; s <= 4; s++) begin
        int nb = 1 << (s - 1);
        bit on = (s == 1) ? 1'b1 : en[s-2];
        for (int b = 0; b < nb; b++) begin
          if (on) begin
            nodes[s][b].step((s == 1) ? x : prev[s-1][b], sel);
          end else begin
            nodes[s][b].clear();
          end
          y[s][b]      = nodes[s][b].orig;
          y[s][b + nb] = nodes[s][b].comp;
        end
      end
    endfunction
  endclass
endpackage
