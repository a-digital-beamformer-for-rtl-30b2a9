// tb_input_align: random samples through input_align with random per-signal
// delays; each output must equal the input of `delay` valid samples earlier
// (checked once the buffers have been filled). valid has random gaps.
module tb_input_align;
  localparam int N = 24, W = 8, MD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  in_valid;
  logic signed [W-1:0]   in_smp  [N];
  logic [$clog2(MD)-1:0] delay   [N];
  logic                  out_valid;
  logic signed [W-1:0]   out_smp [N];

  input_align #(.N_SIG(N), .W(W), .MAX_DELAY(MD)) dut (.*);

  int checks = 0, failures = 0;
  logic signed [W-1:0] hist [N][$];
  int nvalid = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (in_smp[s]) begin in_smp[s] = '0; delay[s] = $urandom_range(0, MD-1); end
    delay[0] = 0; delay[1] = MD-1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare what left on the previous valid clock
      if (out_valid && nvalid > MD + 1) begin
        for (int s = 0; s < N; s++) begin
          logic signed [W-1:0] exp;
          exp = hist[s][hist[s].size() - 1 - delay[s]];
          checks++;
          if (out_smp[s] !== exp) begin
            failures++;
            if (failures < 10) $display("sig %0d delay %0d: got %0d exp %0d", s, delay[s], out_smp[s], exp);
          end
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      foreach (in_smp[s]) in_smp[s] = W'($urandom);
      if (in_valid) begin
        for (int s = 0; s < N; s++) hist[s].push_back(in_smp[s]);
        nvalid++;
      end
      @(posedge clk); #1;
      // out holds the sample just taken: drop the comparison target bookkeeping
      if (in_valid) begin
        for (int s = 0; s < N; s++) begin
          logic signed [W-1:0] exp;
          if (nvalid > MD + 1) begin
            exp = hist[s][hist[s].size() - 1 - delay[s]];
            checks++;
            if (out_smp[s] !== exp) begin
              failures++;
              if (failures < 10) $display("sig %0d delay %0d: got %0d exp %0d", s, delay[s], out_smp[s], exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
