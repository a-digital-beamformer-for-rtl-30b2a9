// tb_channel_select: frames of 512 channels with random gaps and a random
// start channel; kept samples must be channels start..start+403, renumbered
// from 0, with sof on the first, one clock after they entered.
module tb_channel_select;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [CHAN_W-1:0] start_chan;
  logic      in_valid, out_valid;
  chan_tag_t in_tag, out_tag;
  cplx8_t    in_smp [N_SIG_FPGA], out_smp [N_SIG_FPGA];

  channel_select dut (.*);

  int checks = 0, failures = 0, kept = 0;
  logic      exp_valid;
  chan_tag_t exp_tag;
  cplx8_t    exp_smp [N_SIG_FPGA];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = '0; start_chan = 0;
    foreach (in_smp[s]) in_smp[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      start_chan = (f == 0) ? 0 : (f == 1) ? CHAN_W'(N_CHAN - N_SEL) : CHAN_W'($urandom_range(0, N_CHAN - N_SEL));
      kept = 0;
      for (int c = 0; c < N_CHAN; c++) begin
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk); in_valid = 0;
          @(posedge clk); #1;
          checks++; if (out_valid) failures++;
        end
        @(negedge clk);
        in_valid = 1; in_tag.chan = CHAN_W'(c); in_tag.sof = (c == 0);
        foreach (in_smp[s]) in_smp[s] = cplx8_t'($urandom);
        exp_valid = (c >= start_chan) && (c < start_chan + N_SEL);
        exp_tag.chan = CHAN_W'(c - start_chan);
        exp_tag.sof  = (c == start_chan);
        exp_smp = in_smp;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== exp_valid) begin failures++; $display("valid mismatch chan %0d", c); end
        else if (exp_valid) begin
          kept++;
          checks++;
          if (out_tag !== exp_tag || out_smp != exp_smp) begin
            failures++; $display("data mismatch chan %0d: tag %0d/%0d", c, out_tag.chan, exp_tag.chan);
          end
        end
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (kept != N_SEL) begin failures++; $display("kept %0d", kept); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
