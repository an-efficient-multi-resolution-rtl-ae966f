// tb_mrfb_dc_input: the constant-input workload. For each of the four
// select/enable pairings (S=00/en=000, 01/100, 10/110, 11/111) the bank is
// reset and fed the constant 8-bit sample 5 (00000101) long enough for all
// four stages to settle at the largest spacing. Every output is compared
// with the reference after every sample, and the settled values are checked
// against what the half-band prototype gives for a constant input: its DC
// gain is exactly 1, so the original outputs along the low branch settle at
// 5 and every complementary output at 0; disabled stages stay at 0.
module tb_mrfb_dc_input;
  import mrfb_pkg::*;
  import mrfb_ref_pkg::*;
  localparam int DW = MRFB_DW;
  localparam int NSAMP = 2600;   // > 4 stages x 6 x 80 samples of settling

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid;
  logic [DW-1:0] x_in = DW'(5);
  logic [1:0] sel = '0;
  logic [2:0] en = '0;
  logic [1:0][DW-1:0]  y1;
  logic [3:0][DW-1:0]  y2;
  logic [7:0][DW-1:0]  y3;
  logic [15:0][DW-1:0] y4;

  mrfb_top u_dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .sel, .en,
                  .out_valid, .y1, .y2, .y3, .y4);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NSAMP * 14) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tree_model m;

  function automatic logic [DW-1:0] out(int s, int i);
    case (s)
      1: return y1[i];
      2: return y2[i];
      3: return y3[i];
      default: return y4[i];
    endcase
  endfunction

  task automatic expect_eq(int s, int i, int e, string what);
    checks++;
    if (out(s, i) !== DW'(e)) begin
      failures++;
      if (failures < 12) $display("%s Y{%0d,%0d}: got %0d expected %0d", what, s, i, int'($signed(out(s, i))), e);
    end
  endtask

  initial begin
    logic [1:0] sels[4] = '{2'b00, 2'b01, 2'b10, 2'b11};
    logic [2:0] ens[4]  = '{3'b000, 3'b001, 3'b011, 3'b111};
    for (int cfg = 0; cfg < 4; cfg++) begin
      m = new();
      rst_n = 0;
      sel = sels[cfg];
      en = ens[cfg];
      repeat (3) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      for (int t = 0; t < NSAMP; t++) begin
        in_valid = 1;
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        in_valid = 0;
        m.step(5, int'(sel), en);
        while (!out_valid) @(negedge clk);
        for (int s = 1; s <= 4; s++)
          for (int i = 0; i < (1 << s); i++) expect_eq(s, i, m.y[s][i], "vs reference");
      end
      // Settled values: the low branch carries 5, every other output is 0.
      for (int s = 1; s <= 4; s++) begin
        bit chain;
        chain = 1'b1;
        for (int q = 2; q <= s; q++) chain &= en[q-2];
        for (int i = 0; i < (1 << s); i++)
          expect_eq(s, i, (chain && i == 0) ? 5 : 0, "settled");
      end
      $display("config S=%b en[0..2]=%b%b%b: Y{1,0}=%0d Y{1,1}=%0d", sel, en[0], en[1], en[2],
               int'($signed(y1[0])), int'($signed(y1[1])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
