// tb_beamformer_engine: loads random coefficients for 12 signals x 404
// channels, applies them, and streams three frames of 512 channels of random
// samples, one per clock. Every partial-beam sample is compared with
// sat16((sum_s x_s * w_s) >>> 10) computed here, and must leave exactly 6
// clocks after its channel entered. A second coefficient set applied between
// frames must take effect from the next frame start.
module tb_beamformer_engine;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [CHAN_W-1:0] start_chan;
  logic in_valid, coef_wr_en, coef_swap, coef_swap_pending, coef_active_bank, pb_valid;
  chan_tag_t in_tag, pb_tag;
  cplx8_t in_smp [N_SIG_FPGA];
  logic [3:0] coef_wr_sig;
  logic [CHAN_W-1:0] coef_wr_chan;
  coef_t coef_wr_data;
  cplx16_t pb_smp;

  beamformer_engine dut (.*);

  int checks = 0, failures = 0, nsat = 0;
  coef_t w [2][N_SIG_FPGA][N_SEL];
  int cyc = 0;
  always @(posedge clk) cyc++;

  typedef struct { int re; int im; int chan; bit sof; int t; } exp_t;
  exp_t q [$];

  function automatic int sat16(input longint x);
    longint y = x >>> 10;
    if (y > 32767) begin nsat++; return 32767; end
    if (y < -32768) begin nsat++; return -32768; end
    return int'(y);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && pb_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      if (pb_smp.re != e.re || pb_smp.im != e.im || pb_tag.chan != e.chan || pb_tag.sof != e.sof) begin
        failures++;
        if (failures < 10) $display("chan %0d got %0d,%0d exp %0d,%0d", e.chan, int'(pb_smp.re), int'(pb_smp.im), e.re, e.im);
      end
      checks++;
      if (cyc - e.t != 6) begin failures++; if (failures < 10) $display("latency %0d", cyc - e.t); end
    end
  end

  task automatic load(input int set);
    for (int s = 0; s < N_SIG_FPGA; s++)
      for (int c = 0; c < N_SEL; c++) begin
        @(negedge clk);
        coef_wr_en = 1; coef_wr_sig = 4'(s); coef_wr_chan = CHAN_W'(c); coef_wr_data = w[set][s][c];
      end
    @(negedge clk); coef_wr_en = 0; coef_swap = 1;
    @(negedge clk); coef_swap = 0;
  endtask

  initial begin
    in_valid = 0; in_tag = '0; coef_wr_en = 0; coef_swap = 0; coef_wr_sig = 0; coef_wr_chan = 0; coef_wr_data = 0;
    start_chan = 9'd60;
    foreach (in_smp[s]) in_smp[s] = '0;
    foreach (w[k, s, c]) w[k][s][c] = (k == 0) ? coef_t'($urandom) : coef_t'({16'($urandom_range(0, 4000)), 16'($urandom_range(0, 4000))});
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(0);
    for (int f = 0; f < 3; f++) begin
      int set;
      set = (f == 0) ? 0 : 1;
      if (f == 1) begin
        // second set: written into the idle bank, then applied before frame 1
        load(1);
      end
      for (int c = 0; c < N_CHAN; c++) begin
        @(negedge clk);
        in_valid = 1; in_tag.chan = CHAN_W'(c); in_tag.sof = (c == 0);
        foreach (in_smp[s]) in_smp[s] = cplx8_t'($urandom);
        if (c >= start_chan && c < start_chan + N_SEL) begin
          exp_t e; longint sr, si; int r;
          sr = 0; si = 0; r = c - int'(start_chan);
          for (int s = 0; s < N_SIG_FPGA; s++) begin
            sr += longint'(in_smp[s].re) * w[set][s][r].re - longint'(in_smp[s].im) * w[set][s][r].im;
            si += longint'(in_smp[s].re) * w[set][s][r].im + longint'(in_smp[s].im) * w[set][s][r].re;
          end
          e.re = sat16(sr); e.im = sat16(si); e.chan = r; e.sof = (r == 0); e.t = cyc + 1;
          q.push_back(e);
        end
      end
      @(negedge clk); in_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    checks++; if (coef_active_bank != 0) failures++;
    $display("saturated parts: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
