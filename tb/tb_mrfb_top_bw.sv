// tb_mrfb_top_bw: the same end-to-end test as tb_mrfb_top, run on the bank
// built with one Baugh-Wooley multiplier per tap (MULT_BW) instead of
// distributed arithmetic. The outputs must be identical to the reference,
// and out_valid must follow acceptance by 2 clocks.
module tb_mrfb_top_bw;
  import mrfb_pkg::*;
  import mrfb_ref_pkg::*;
  localparam int DW = MRFB_DW;
  localparam int NSAMP = 6000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid;
  logic [DW-1:0] x_in = '0;
  logic [1:0] sel = '0;
  logic [2:0] en = '0;
  logic [1:0][DW-1:0]  y1;
  logic [3:0][DW-1:0]  y2;
  logic [7:0][DW-1:0]  y3;
  logic [15:0][DW-1:0] y4;

  mrfb_top #(.MULT(MULT_BW)) u_dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .sel, .en,
                  .out_valid, .y1, .y2, .y3, .y4);

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_sel[4];
  int n_table[4];
  int n_stage_off[2:4];
  int n_reenable, n_mode_switch, n_busy_offer, n_sat, n_comp_nonzero;

  tree_model m;

  task automatic compare_outputs();
    for (int s = 1; s <= 4; s++) begin
      for (int i = 0; i < (1 << s); i++) begin
        logic [DW-1:0] got;
        case (s)
          1: got = y1[i];
          2: got = y2[i];
          3: got = y3[i];
          default: got = y4[i];
        endcase
        checks++;
        if (got !== DW'(m.y[s][i])) begin
          failures++;
          if (failures < 12)
            $display("Y{%0d,%0d}: got %0d expected %0d", s, i, int'($signed(got)), m.y[s][i]);
        end
        if (m.y[s][i] == 127 || m.y[s][i] == -128) n_sat++;
        if (i >= (1 << (s - 1)) && m.y[s][i] != 0) n_comp_nonzero++;
      end
    end
  endtask

  function automatic int table_row(logic [1:0] s, logic [2:0] e);
    // en is printed en[0:2] in the configuration table, i.e. en[0] leftmost.
    if (s == 2'b11 && e == 3'b111) return 3;
    if (s == 2'b10 && e == 3'b011) return 2;
    if (s == 2'b01 && e == 3'b001) return 1;
    if (s == 2'b00 && e == 3'b000) return 0;
    return -1;
  endfunction

  initial begin
    logic [1:0] psel;
    logic [2:0] pen;
    m = new();
    n_reenable = 0; n_mode_switch = 0; n_busy_offer = 0; n_sat = 0; n_comp_nonzero = 0;
    foreach (n_sel[i]) n_sel[i] = 0;
    foreach (n_table[i]) n_table[i] = 0;
    foreach (n_stage_off[i]) n_stage_off[i] = 0;
    psel = '0; pen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NSAMP; t++) begin
      int seg, lat, row;
      seg = t / 500;
      // Configuration: first the four table rows, then mixed settings.
      case (seg % 6)
        0: begin sel = 2'b11; en = 3'b111; end
        1: begin sel = 2'b10; en = 3'b011; end
        2: begin sel = 2'b01; en = 3'b001; end
        3: begin sel = 2'b00; en = 3'b000; end
        default: if (t % 97 == 0) begin sel = 2'($urandom); en = 3'($urandom); end
      endcase
      if (sel != psel) n_mode_switch++;
      for (int s = 2; s <= 4; s++) begin
        if (!en[s-2]) n_stage_off[s]++;
        if (en[s-2] && !pen[s-2]) n_reenable++;
      end
      n_sel[sel]++;
      row = table_row(sel, en);
      if (row >= 0) n_table[row]++;
      psel = sel; pen = en;
      // Input: constant 5 for one stretch, otherwise random with full-scale bursts.
      if (seg == 1 && (t % 500) < 200) x_in = DW'(5);
      else if (t % 40 < 6) x_in = (t % 2) ? 8'h7F : 8'h80;
      else x_in = DW'($urandom);
      // All driving and sampling happens at falling edges.
      in_valid = 1;
      while (!in_ready) begin n_busy_offer++; @(negedge clk); end
      @(negedge clk);   // the rising edge just passed accepted the sample
      m.step(int'($signed(x_in)), int'(sel), en);
      in_valid = (t % 5 == 0);   // sometimes keep offering while busy
      lat = 0;
      while (!out_valid && lat < 50) begin
        @(negedge clk); lat++;
        if (in_valid && !in_ready) n_busy_offer++;
      end
      in_valid = 0;
      checks++;
      if (lat != 2) begin
        failures++;
        if (failures < 12) $display("latency %0d, expected 2", lat);
      end
      compare_outputs();
      // Now and then leave the input idle for a few clocks.
      if (t % 7 == 3) repeat (t % 4) @(negedge clk);
    end
    $display("events: sel=%0d/%0d/%0d/%0d table_rows=%0d/%0d/%0d/%0d stage_off=%0d/%0d/%0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_table[0], n_table[1], n_table[2], n_table[3],
             n_stage_off[2], n_stage_off[3], n_stage_off[4]);
    $display("events: reenable=%0d mode_switch=%0d busy_offer=%0d saturation=%0d comp_nonzero=%0d",
             n_reenable, n_mode_switch, n_busy_offer, n_sat, n_comp_nonzero);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (n_sel[i] == 0) failures++;
      if (n_table[i] == 0) failures++;
    end
    for (int s = 2; s <= 4; s++) begin
      checks++;
      if (n_stage_off[s] == 0) failures++;
    end
    checks += 5;
    if (n_reenable == 0) failures++;
    if (n_mode_switch == 0) failures++;
    if (n_busy_offer == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_comp_nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
