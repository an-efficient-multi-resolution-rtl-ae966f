// tb_mrfb_subfilter: drives one sub-filter built with distributed arithmetic
// and one built with Baugh-Wooley multipliers with the same random samples,
// select values and enable pattern, and compares both outputs of each with
// the reference model after every sample. It also checks the clock count
// from the start edge to valid (DW+1 for DA, 1 for Baugh-Wooley), that a disabled
// filter outputs zeros without a valid pulse, and that it restarts from an
// empty delay line.
module tb_mrfb_subfilter;
  import mrfb_pkg::*;
  import mrfb_ref_pkg::*;
  localparam int DW = MRFB_DW;

  int checks = 0, failures = 0;
  int n_sat = 0, n_off = 0, n_selchg = 0;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  logic [1:0] sel = '0;
  logic [DW-1:0] din = '0;
  logic v_da, v_bw;
  logic [DW-1:0] o_da, c_da, o_bw, c_bw;

  mrfb_subfilter u_da (.clk, .rst_n, .en, .start, .sel, .din,
                       .valid(v_da), .y_orig(o_da), .y_comp(c_da));
  mrfb_subfilter #(.MULT(MULT_BW)) u_bw (.clk, .rst_n, .en, .start, .sel, .din,
                       .valid(v_bw), .y_orig(o_bw), .y_comp(c_bw));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, int expect_v);
    checks++;
    if (got !== DW'(expect_v)) begin
      failures++;
      if (failures < 12) $display("%s: got %0d expected %0d", what, int'($signed(got)), expect_v);
    end
  endtask

  node_model m;
  int cyc_da, cyc_bw;

  initial begin
    m = new();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic [1:0] nsel;
      @(negedge clk);
      // Mostly enabled; short disabled bursts; select changes now and then.
      en = !((t % 700) >= 650);
      nsel = (t % 250 == 0) ? 2'($urandom) : sel;
      if (nsel != sel) n_selchg++;
      sel = nsel;
      din = (t % 3 == 0) ? DW'($urandom) : (t % 3 == 1) ? 8'h7F : 8'h80;
      if (t % 11 == 5) din = DW'($urandom_range(0, 6)) - DW'(3);
      start = 1;
      if (en) m.step(int'($signed(din)), int'(sel));
      else begin m.clear(); n_off++; end
      @(negedge clk);
      start = 0;
      cyc_da = -1; cyc_bw = -1;
      // c counts clock edges since the start edge, plus one.
      for (int c = 1; c <= DW + 3; c++) begin
        if (v_da) cyc_da = c;
        if (v_bw) cyc_bw = c;
        @(negedge clk);
      end
      if (en) begin
        checks += 2;
        if (cyc_da != DW + 2) begin failures++; $display("DA latency %0d", cyc_da); end
        if (cyc_bw != 2)      begin failures++; $display("BW latency %0d", cyc_bw); end
      end else begin
        checks += 2;
        if (cyc_da != -1) failures++;
        if (cyc_bw != -1) failures++;
      end
      if (m.orig == 127 || m.orig == -128 || m.comp == 127 || m.comp == -128) n_sat++;
      check("DA orig", o_da, m.orig);
      check("DA comp", c_da, m.comp);
      check("BW orig", o_bw, m.orig);
      check("BW comp", c_bw, m.comp);
    end
    $display("events: saturations=%0d disabled_samples=%0d select_changes=%0d", n_sat, n_off, n_selchg);
    checks += 3;
    if (n_sat == 0) failures++;
    if (n_off == 0) failures++;
    if (n_selchg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
