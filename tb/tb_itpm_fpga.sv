// tb_itpm_fpga: one FPGA in the FPGA1 role. Beam b gets weight 1.0 on signal
// b only, so its partial beam must be 16 x that signal's sample (1.0 = 2^14,
// shifted right by 10). The partial beams are decoded from the F2F lanes with
// an f2f_rx and compared; the beam packet output must stay silent in this
// role, and a raw capture of one pair for one frame must give one heap of 6
// payload words.
module tb_itpm_fpga;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid, algn_valid, ch_valid, coef_swap, cap_start, cap_stop, cap_busy;
  logic signed [7:0] adc_smp [N_SIG_FPGA], algn_smp [N_SIG_FPGA];
  logic [5:0] adc_delay [N_SIG_FPGA];
  chan_tag_t ch_tag;
  cplx8_t ch_smp [N_SIG_FPGA];
  logic [CHAN_W-1:0] start_chan, coef_wr_chan;
  logic [N_BEAMS-1:0] coef_wr_en, coef_swap_pending, beam_sat;
  logic [3:0] coef_wr_sig, out_shift, cap_pairs;
  coef_t coef_wr_data;
  logic [20:0] int_frames;
  logic raw_all;
  logic [2:0] aux_out_valid, aux_out_ready, aux_out_last;
  logic [63:0] aux_out_data [3];
  out_mode_e out_mode;
  logic [1:0] raw_beam_sel;
  logic [CHAN_W-1:0] cap_pair_start [MAX_PAIRS];
  logic [31:0] cap_frames;
  logic [F2F_SER-1:0][F2F_LANES-1:0] f2f_out, f2f_in;
  logic beam_out_valid, beam_out_ready, beam_out_last, raw_out_valid, raw_out_ready, raw_out_last;
  logic [63:0] beam_out_data, raw_out_data;
  logic err_f2f_frame, err_misalign, err_fifo, err_out_overflow;
  logic [6:0] pb_fifo_level;

  itpm_fpga dut (.fpga_id(1'b1), .*);

  logic rx_valid;
  pbeam_word_t rx_word;
  logic rx_err;
  f2f_rx u_mon (.clk, .rst_n, .lanes(f2f_out), .out_valid(rx_valid), .out_word(rx_word), .frame_err(rx_err));

  int checks = 0, failures = 0, nrx = 0, raw_words = 0, raw_pkts = 0, beam_words = 0;
  pbeam_word_t q [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      checks++; nrx++;
      if (q.size() == 0 || rx_word !== q[0]) begin
        failures++; if (failures < 10) $display("partial beam %0d wrong", nrx);
      end
      if (q.size() > 0) void'(q.pop_front());
    end
    if (raw_out_valid && raw_out_ready) begin raw_words++; if (raw_out_last) raw_pkts++; end
    if (beam_out_valid) beam_words++;
  end

  initial begin
    adc_valid = 0; ch_valid = 0; ch_tag = '0; coef_swap = 0; cap_start = 0; cap_stop = 0;
    foreach (adc_smp[s]) begin adc_smp[s] = 0; adc_delay[s] = 0; end
    foreach (ch_smp[s]) ch_smp[s] = 0;
    start_chan = 9'd54; coef_wr_en = 0; coef_wr_sig = 0; coef_wr_chan = 0; coef_wr_data = 0;
    out_shift = 4; int_frames = 1; out_mode = OUT_INTEGRATED; raw_beam_sel = 0; raw_all = 0; aux_out_ready = '1;
    cap_pairs = 1; cap_frames = 1; foreach (cap_pair_start[i]) cap_pair_start[i] = 9'd100;
    f2f_in = '0; beam_out_ready = 1; raw_out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < N_BEAMS; b++)
      for (int s = 0; s < N_SIG_FPGA; s++)
        for (int c = 0; c < N_SEL; c++) begin
          @(negedge clk);
          coef_wr_en = '0; coef_wr_en[b] = 1; coef_wr_sig = 4'(s); coef_wr_chan = CHAN_W'(c);
          coef_wr_data = (s == b) ? '{re: 16'sd16384, im: 16'sd0} : '0;
        end
    @(negedge clk); coef_wr_en = 0; coef_swap = 1;
    @(negedge clk); coef_swap = 0; cap_start = 1;
    @(negedge clk); cap_start = 0;
    for (int f = 0; f < 2; f++)
      for (int c = 0; c < N_CHAN; c++) begin
        @(negedge clk);
        ch_valid = 1; ch_tag.chan = CHAN_W'(c); ch_tag.sof = (c == 0);
        foreach (ch_smp[s]) ch_smp[s] = cplx8_t'($urandom);
        if (c >= 54 && c < 54 + N_SEL) begin
          pbeam_word_t e;
          e.tag.chan = CHAN_W'(c - 54); e.tag.sof = (c == 54);
          for (int b = 0; b < N_BEAMS; b++) begin
            e.beam[b].re = 16'(int'(ch_smp[b].re) * 16);
            e.beam[b].im = 16'(int'(ch_smp[b].im) * 16);
          end
          q.push_back(e);
        end
        @(negedge clk); ch_valid = 0;
        repeat (2) @(negedge clk);
      end
    repeat (100) @(posedge clk);
    checks++; if (nrx != 2 * N_SEL) begin failures++; $display("received %0d", nrx); end
    checks++; if (raw_pkts != 1 || raw_words != 7 + 6) begin failures++; $display("raw %0d/%0d", raw_pkts, raw_words); end
    checks++; if (beam_words != 0) begin failures++; $display("beam output in FPGA1 role"); end
    checks++; if (err_f2f_frame || rx_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
