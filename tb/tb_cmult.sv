// tb_cmult: random and extreme complex products against integer arithmetic;
// the product appears two clocks after the operands.
module tb_cmult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [7:0]  a_re, a_im;
  logic signed [15:0] c_re, c_im;
  logic signed [24:0] p_re, p_im;
  cmult dut (.clk, .en(1'b1), .*);

  int checks = 0, failures = 0;
  int er [$], ei [$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t < 4) begin
        a_re = (t[0]) ? -128 : 127; a_im = (t[1]) ? -128 : 127;
        c_re = (t[0]) ? -32768 : 32767; c_im = (t[1]) ? 32767 : -32768;
      end else begin
        a_re = 8'($urandom); a_im = 8'($urandom); c_re = 16'($urandom); c_im = 16'($urandom);
      end
      er.push_back(int'(a_re) * int'(c_re) - int'(a_im) * int'(c_im));
      ei.push_back(int'(a_re) * int'(c_im) + int'(a_im) * int'(c_re));
      if (t >= 2) begin
        int xr, xi;
        xr = er.pop_front(); xi = ei.pop_front();
        checks++;
        if (int'(p_re) != xr || int'(p_im) != xi) begin
          failures++; if (failures < 10) $display("t=%0d got %0d,%0d exp %0d,%0d", t, p_re, p_im, xr, xi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
