// tb_da_fir: checks the distributed-arithmetic unit against a directly
// computed sum of products, for the default 7-tap coefficient set and
// random 8-bit samples (including the extreme values), and checks that the
// result appears exactly B clocks after the load and that busy covers them.
module tb_da_fir;
  import mrfb_pkg::*;
  localparam int N = MRFB_NTAPS, B = MRFB_DW, CW = MRFB_CW;
  localparam int AW = CW + $clog2(N) + 1 + B;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0][B-1:0] x;
  logic busy, valid;
  logic signed [AW-1:0] y;

  da_fir u_dut (.clk, .rst_n, .load, .x, .busy, .valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_dot(logic [N-1:0][B-1:0] v);
    int s = 0;
    for (int n = 0; n < N; n++) s += int'($signed(MRFB_COEFS[n])) * int'($signed(v[n]));
    return s;
  endfunction

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int cyc, expect_v;
      for (int n = 0; n < N; n++) begin
        case (t % 4)
          0: x[n] = B'($urandom);
          1: x[n] = (n % 2) ? {1'b1, {(B-1){1'b0}}} : {1'b0, {(B-1){1'b1}}};
          2: x[n] = {1'b1, {(B-1){1'b0}}};
          default: x[n] = B'($urandom_range(0, 3)) - B'(2);
        endcase
      end
      expect_v = ref_dot(x);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      cyc = 0;
      while (!valid) begin
        checks++;
        if (!busy) failures++;
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (cyc != B) begin
        failures++;
        $display("latency: valid %0d clocks after load, expected %0d", cyc, B);
      end
      if (int'(y) != expect_v) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d expected %0d", y, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
