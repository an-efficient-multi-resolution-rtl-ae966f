// tb_reconfig_delay: pushes random samples through the selectable delay
// line and compares every tap, for every select value, with a history kept
// by the testbench; the select value is changed at random between samples,
// and the clear input is exercised.
module tb_reconfig_delay;
  import mrfb_pkg::*;
  localparam int DW = MRFB_DW, NTAPS = MRFB_NTAPS, NSEL = MRFB_NSEL;
  localparam int HIST = 1024;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift = 0, clr = 0;
  logic [$clog2(NSEL)-1:0] sel = '0;
  logic [DW-1:0] din = '0;
  logic [NTAPS-1:0][DW-1:0] taps;
  logic [DW-1:0] hist [HIST];   // hist[i]: sample pushed i+1 shifts ago

  reconfig_delay u_dut (.clk, .rst_n, .shift, .clr, .sel, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int s = 0; s < NSEL; s++) begin
      sel = s[$clog2(NSEL)-1:0];
      #1;
      for (int k = 0; k < NTAPS; k++) begin
        logic [DW-1:0] e;
        int m = int'(MRFB_SPACINGS[s]);
        e = (k == 0) ? din : hist[k*m - 1];
        checks++;
        if (taps[k] !== e) begin
          failures++;
          if (failures < 10) $display("sel %0d tap %0d: got %h expected %h", s, k, taps[k], e);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < HIST; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      din = DW'($urandom);
      if (t == 900) begin
        clr = 1;
        @(negedge clk);
        clr = 0;
        for (int i = 0; i < HIST; i++) hist[i] = '0;
      end
      compare_all();
      sel = $clog2(NSEL)'($urandom);
      shift = 1;
      @(negedge clk);
      shift = 0;
      for (int i = HIST - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
