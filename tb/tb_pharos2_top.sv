// tb_pharos2_top: end-to-end run of the whole board at its default sizes.
//
// 24 signals, 512-channel frames (404 kept), four beams, both FPGAs. The test
// loads random coefficients for every beam, FPGA, signal and kept channel,
// streams 8 frames of random channelized samples (a channel every 4 clocks)
// and checks every output packet against a model computed here:
//   frames 0-3 integrated mode, 2-frame integrations -> 2 x 4 spectra
//   frames 4-5 raw-beam mode, beam 2, with a second coefficient set applied
//              at frame 4 (double buffer swap); in frame 5 all four raw beams
//              go out, beams 3, 0, 1 on the three further links
//   frames 6-7 integrated mode again -> 4 spectra
// Raw channelized capture of 2 pairs runs on both FPGAs for frames 1-2.
// It also checks the input alignment delays on the ADC path, and counts the
// mechanisms: coefficient swap, partial beams waiting in the FIFO for the F2F
// link, mode switches, integration dumps, raw beams, raw captures and
// requantisation saturation. Each must have happened at least once.
module tb_pharos2_top;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT ----------------
  logic                          adc_valid;
  logic signed [ADC_W-1:0]       adc_smp   [N_SIG_TOTAL];
  logic [5:0]                    adc_delay [N_SIG_TOTAL];
  logic [1:0]                    algn_valid;
  logic signed [ADC_W-1:0]       algn_smp  [N_SIG_TOTAL];
  logic [1:0]                    ch_valid;
  chan_tag_t                     ch_tag    [2];
  cplx8_t                        ch_smp    [N_SIG_TOTAL];
  logic [CHAN_W-1:0]             start_chan;
  logic                          coef_wr_fpga;
  logic [N_BEAMS-1:0]            coef_wr_en;
  logic [3:0]                    coef_wr_sig;
  logic [CHAN_W-1:0]             coef_wr_chan;
  coef_t                         coef_wr_data;
  logic                          coef_swap;
  logic [N_BEAMS-1:0]            coef_swap_pending;
  logic [3:0]                    out_shift;
  logic [20:0]                   int_frames;
  out_mode_e                     out_mode;
  logic [1:0]                    raw_beam_sel;
  logic                          raw_all;
  logic [2:0]                    aux_out_valid, aux_out_ready, aux_out_last;
  logic [63:0]                   aux_out_data [3];
  logic                          cap_start, cap_stop;
  logic [3:0]                    cap_pairs;
  logic [CHAN_W-1:0]             cap_pair_start [MAX_PAIRS];
  logic [31:0]                   cap_frames;
  logic [1:0]                    cap_busy;
  logic                          beam_out_valid, beam_out_ready, beam_out_last;
  logic [63:0]                   beam_out_data;
  logic [1:0]                    raw_out_valid, raw_out_ready, raw_out_last;
  logic [63:0]                   raw_out_data [2];
  logic                          err_f2f_frame, err_misalign, err_fifo, err_out_overflow;
  logic [6:0]                    pb_fifo_level;
  logic [N_BEAMS-1:0]            beam_sat;

  pharos2_top dut (.*);

  // ---------------- bookkeeping ----------------
  localparam int NFR = 8;
  localparam int SHIFT = 6;
  int checks = 0, failures = 0;
  int n_swap = 0, n_fifo_wait = 0, n_mode_switch = 0, n_int_heaps = 0, n_raw_heaps = 0,
      n_cap_heaps = 0, n_sat = 0, n_align = 0, n_aux_heaps = 0;

  coef_t w [2][N_BEAMS][N_SIG_TOTAL][N_SEL];     // [set][beam][signal][chan]
  logic [63:0] exp_int [$];                      // expected payload words, integrated heaps
  logic [63:0] exp_raw [$];
  logic [63:0] exp_aux [3][$];                   // raw beams raw_beam_sel+1..3 on the further links
  logic [63:0] got_int [$];
  logic [63:0] exp_cap [2][$];
  longint acc [N_BEAMS][N_SEL];

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL: %s", m);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input longint x, input int lo, input int hi, output bit s);
    s = (x > hi) || (x < lo);
    return (x > hi) ? hi : (x < lo) ? lo : int'(x);
  endfunction

  // ---------------- packet checkers ----------------
  int bw = 0;                                   // word index within beam packet
  int b_kind, b_len;
  int last_kind = -1;
  always @(posedge clk) if (rst_n && beam_out_valid && beam_out_ready) begin
    if (bw == 0) begin
      checks++;
      if (beam_out_data != 64'h5304_0206_0000_0006) fail("beam header magic");
    end
    if (bw == 4) b_len = int'(beam_out_data[18:3]);
    if (bw == 6) begin
      b_kind = int'(beam_out_data[15:8]);
      if (last_kind != -1 && b_kind != last_kind) n_mode_switch++;
      last_kind = b_kind;
      checks++;
      if (b_kind == 1 && b_len != N_SEL / 2) fail("integrated heap length");
      if (b_kind == 2 && (b_len != N_SEL / 4 || beam_out_data[7:0] != 8'd2)) fail("raw heap length/beam");
    end
    if (bw >= 7) begin
      logic [63:0] e;
      checks++;
      if (b_kind == 1) begin
        got_int.push_back(beam_out_data);     // compared at the end: dumps leave during their frame
      end else if (b_kind == 2) begin
        if (exp_raw.size() == 0) fail("unexpected raw beam word");
        else begin e = exp_raw.pop_front(); if (beam_out_data !== e) fail($sformatf("raw beam word %h exp %h", beam_out_data, e)); end
      end else fail("unknown heap kind");
    end
    bw++;
    if (beam_out_last) begin
      if (b_kind == 1) n_int_heaps++; else n_raw_heaps++;
      checks++;
      if (bw != 7 + b_len) fail("packet length");
      bw = 0;
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_aux
    int aw = 0;
    always @(posedge clk) if (rst_n && aux_out_valid[k] && aux_out_ready[k]) begin
      if (aw == 6) begin
        checks++;
        if (aux_out_data[k][15:0] != {8'd2, 8'((2 + k + 1) % N_BEAMS)}) fail("aux link heap kind/beam");
      end
      if (aw >= 7) begin
        checks++;
        if (exp_aux[k].size() == 0) fail("unexpected aux raw beam word");
        else if (aux_out_data[k] !== exp_aux[k].pop_front()) fail($sformatf("aux link %0d raw beam word", k + 1));
      end
      aw++;
      if (aux_out_last[k]) begin
        checks++; if (aw != 7 + N_SEL / 4) fail("aux packet length");
        aw = 0; n_aux_heaps++;
      end
    end
  end

  for (genvar f = 0; f < 2; f++) begin : g_cap
    int cw = 0;
    always @(posedge clk) if (rst_n && raw_out_valid[f] && raw_out_ready[f]) begin
      if (cw >= 7) begin
        checks++;
        if (exp_cap[f].size() == 0) fail("unexpected capture word");
        else if (raw_out_data[f] !== exp_cap[f].pop_front()) fail($sformatf("capture word fpga %0d", f));
      end
      cw++;
      if (raw_out_last[f]) begin cw = 0; n_cap_heaps++; end
    end
  end

  always @(negedge clk) begin
    beam_out_ready = ($urandom_range(0, 7) != 0);
    aux_out_ready  = 3'($urandom);
    raw_out_ready  = 2'b11;
  end

  // mechanism monitors
  logic [N_BEAMS-1:0] pend_d = '0;
  always @(posedge clk) if (rst_n) begin
    if (|(pend_d & ~coef_swap_pending)) n_swap++;
    pend_d <= coef_swap_pending;
    if (pb_fifo_level > 0) n_fifo_wait++;
    if (|beam_sat) n_sat++;
  end

  // ---------------- stimulus ----------------
  task automatic load_coefs(input int set);
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < N_BEAMS; b++)
        for (int s = 0; s < N_SIG_FPGA; s++)
          for (int c = 0; c < N_SEL; c++) begin
            @(negedge clk);
            coef_wr_fpga = 1'(f); coef_wr_en = '0; coef_wr_en[b] = 1'b1;
            coef_wr_sig = 4'(s); coef_wr_chan = CHAN_W'(c);
            coef_wr_data = w[set][b][f*N_SIG_FPGA + s][c];
          end
    @(negedge clk); coef_wr_en = '0; coef_swap = 1;
    @(negedge clk); coef_swap = 0;
  endtask

  task automatic run_frame(input int fr, input int set, input out_mode_e mode, input bit cap);
    int nsel = 0;
    for (int c = 0; c < N_CHAN; c++) begin
      @(negedge clk);
      out_mode = mode;
      ch_valid = 2'b11;
      ch_tag[0].chan = CHAN_W'(c); ch_tag[0].sof = (c == 0);
      ch_tag[1] = ch_tag[0];
      foreach (ch_smp[s]) ch_smp[s] = cplx8_t'($urandom);
      // raw capture model
      if (cap && (c == cap_pair_start[0] || c == cap_pair_start[0] + 1 ||
                  c == cap_pair_start[1] || c == cap_pair_start[1] + 1)) begin
        for (int f = 0; f < 2; f++) begin
          logic [191:0] flat;
          for (int s = 0; s < N_SIG_FPGA; s++) flat[191 - 16*s -: 16] = ch_smp[f*N_SIG_FPGA + s];
          for (int k = 0; k < 3; k++) exp_cap[f].push_back(flat[191 - 64*k -: 64]);
        end
      end
      // beam model
      if (c >= start_chan && c < start_chan + N_SEL) begin
        int r;
        logic [15:0] rawsmp [N_BEAMS];
        r = c - int'(start_chan);
        for (int b = 0; b < N_BEAMS; b++) begin
          longint pr [2], pi [2], br, bi;
          bit s1, s2, s3, s4;
          int yr, yi, pw;
          for (int f = 0; f < 2; f++) begin
            longint sr, si;
            sr = 0; si = 0;
            for (int s = f*N_SIG_FPGA; s < (f+1)*N_SIG_FPGA; s++) begin
              sr += longint'(ch_smp[s].re) * w[set][b][s][r].re - longint'(ch_smp[s].im) * w[set][b][s][r].im;
              si += longint'(ch_smp[s].re) * w[set][b][s][r].im + longint'(ch_smp[s].im) * w[set][b][s][r].re;
            end
            pr[f] = sat(sr >>> 10, -32768, 32767, s1);
            pi[f] = sat(si >>> 10, -32768, 32767, s2);
          end
          br = (pr[0] + pr[1]) >>> SHIFT;
          bi = (pi[0] + pi[1]) >>> SHIFT;
          yr = sat(br, -128, 127, s3);
          yi = sat(bi, -128, 127, s4);
          rawsmp[b] = {8'(yr), 8'(yi)};
          pw = yr * yr + yi * yi;
          acc[b][r] = ((fr % 2) == 0) ? longint'(pw) : acc[b][r] + pw;
        end
        if (mode == OUT_RAW_BEAM) begin
          if (r % 4 == 0) exp_raw.push_back('0);
          exp_raw[exp_raw.size() - 1] = {exp_raw[exp_raw.size() - 1][47:0], rawsmp[2]};
          if (raw_all)
            for (int k = 0; k < 3; k++) begin
              if (r % 4 == 0) exp_aux[k].push_back('0);
              exp_aux[k][exp_aux[k].size() - 1] = {exp_aux[k][exp_aux[k].size() - 1][47:0], rawsmp[(2 + k + 1) % N_BEAMS]};
            end
        end
      end
      @(negedge clk); ch_valid = 2'b00;
      @(negedge clk);
      @(negedge clk);
    end
    // integration ends on odd frames
    if (mode == OUT_INTEGRATED && (fr % 2) == 1)
      for (int b = 0; b < N_BEAMS; b++)
        for (int r = 0; r < N_SEL; r += 2)
          exp_int.push_back({32'(acc[b][r]), 32'(acc[b][r+1])});
  endtask

  // ADC alignment check
  logic signed [ADC_W-1:0] ahist [N_SIG_TOTAL][$];
  always @(posedge clk) if (rst_n && adc_valid) begin
    for (int s = 0; s < N_SIG_TOTAL; s++) ahist[s].push_back(adc_smp[s]);
  end
  always @(negedge clk) if (rst_n && algn_valid[0] && ahist[0].size() > 70) begin
    for (int s = 0; s < N_SIG_TOTAL; s++) begin
      int idx;
      logic signed [ADC_W-1:0] e;
      idx = ahist[s].size() - 1 - int'(adc_delay[s]);
      e = ahist[s][idx];
      checks++;
      if (algn_smp[s] !== e) begin
        failures++;
        if (failures < 20) $display("FAIL: alignment sig %0d", s);
      end else n_align++;
    end
  end
  always @(negedge clk) begin
    adc_valid = rst_n;
    foreach (adc_smp[s]) adc_smp[s] = ADC_W'($urandom);
  end

  initial begin
    ch_valid = 0; ch_tag[0] = '0; ch_tag[1] = '0; foreach (ch_smp[s]) ch_smp[s] = '0;
    start_chan = 9'd54; coef_wr_fpga = 0; coef_wr_en = 0; coef_wr_sig = 0; coef_wr_chan = 0;
    coef_wr_data = 0; coef_swap = 0; out_shift = SHIFT; int_frames = 2; out_mode = OUT_INTEGRATED;
    raw_beam_sel = 2; raw_all = 0; cap_start = 0; cap_stop = 0; cap_pairs = 2; cap_frames = 2;
    foreach (cap_pair_start[i]) cap_pair_start[i] = 0;
    cap_pair_start[0] = 9'd3; cap_pair_start[1] = 9'd200;
    foreach (adc_delay[s]) adc_delay[s] = 6'(s * 2 + 1);
    foreach (w[k, b, s, c]) w[k][b][s][c] = '{re: 16'($signed(16'($urandom)) >>> 2), im: 16'($signed(16'($urandom)) >>> 2)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs(0);
    run_frame(0, 0, OUT_INTEGRATED, 0);
    @(negedge clk); cap_start = 1; @(negedge clk); cap_start = 0;
    run_frame(1, 0, OUT_INTEGRATED, 1);
    run_frame(2, 0, OUT_INTEGRATED, 1);
    run_frame(3, 0, OUT_INTEGRATED, 0);
    load_coefs(1);
    run_frame(4, 1, OUT_RAW_BEAM, 0);
    raw_all = 1;
    run_frame(5, 1, OUT_RAW_BEAM, 0);
    raw_all = 0;
    run_frame(6, 1, OUT_INTEGRATED, 0);
    run_frame(7, 1, OUT_INTEGRATED, 0);
    repeat (4000) @(posedge clk);
    checks++; if (exp_int.size() != got_int.size()) fail($sformatf("%0d integrated words, %0d expected", got_int.size(), exp_int.size()));
    foreach (exp_int[i]) begin
      checks++;
      if (i < got_int.size() && got_int[i] !== exp_int[i]) fail($sformatf("integrated word %0d: %h exp %h", i, got_int[i], exp_int[i]));
    end
    checks++; if (exp_raw.size() != 0) fail($sformatf("%0d raw beam words missing", exp_raw.size()));
    checks++; if (exp_cap[0].size() != 0 || exp_cap[1].size() != 0) fail("capture words missing");
    checks++; if (err_f2f_frame || err_misalign || err_fifo || err_out_overflow) fail("error flag raised");
    checks++; if (n_int_heaps != 12) fail($sformatf("integrated heaps %0d", n_int_heaps));
    checks++; if (n_raw_heaps != 2) fail($sformatf("raw heaps %0d", n_raw_heaps));
    checks++; if (n_aux_heaps != 3) fail($sformatf("aux raw heaps %0d", n_aux_heaps));
    checks++; if (exp_aux[0].size() + exp_aux[1].size() + exp_aux[2].size() != 0) fail("aux raw beam words missing");
    checks++; if (n_cap_heaps != 4) fail($sformatf("capture heaps %0d", n_cap_heaps));
    $display("mechanisms: swaps=%0d fifo_wait=%0d mode_switches=%0d int_heaps=%0d raw_heaps=%0d aux_heaps=%0d cap_heaps=%0d sat=%0d align=%0d",
             n_swap, n_fifo_wait, n_mode_switch, n_int_heaps, n_raw_heaps, n_aux_heaps, n_cap_heaps, n_sat, n_align);
    checks++; if (n_swap == 0)         fail("no coefficient swap");
    checks++; if (n_fifo_wait == 0)    fail("partial-beam FIFO never used");
    checks++; if (n_mode_switch < 2)   fail("mode switch missing");
    checks++; if (n_sat == 0)          fail("no saturation");
    checks++; if (n_align == 0)        fail("alignment never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
