// tb_signal_sum: 12 random full-scale complex terms summed, checked one clock
// later against an integer sum.
module tb_signal_sum;
  localparam int N = 12, IW = 25;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [IW-1:0] in_re [N], in_im [N];
  logic signed [IW+3:0] sum_re, sum_im;
  signal_sum #(.N(N), .IW(IW)) dut (.clk, .en(1'b1), .*);

  int checks = 0, failures = 0;
  longint xr, xi;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      xr = 0; xi = 0;
      for (int i = 0; i < N; i++) begin
        if (t == 0)      begin in_re[i] = -(1 <<< (IW-1)); in_im[i] = (1 <<< (IW-1)) - 1; end
        else begin in_re[i] = IW'($urandom); in_im[i] = IW'($urandom); end
        xr += longint'(in_re[i]); xi += longint'(in_im[i]);
      end
      @(posedge clk); #1;
      checks++;
      if (longint'(sum_re) != xr || longint'(sum_im) != xi) begin
        failures++; if (failures < 10) $display("t=%0d got %0d exp %0d", t, sum_re, xr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
