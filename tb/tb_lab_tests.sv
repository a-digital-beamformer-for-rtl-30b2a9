// tb_lab_tests: the bench tests of a finished beamformer, run on the whole
// board at its default sizes, at the level of the channelized streams.
//
// Every one of the 24 inputs carries the same tone in one kept channel T, but
// with a phase that steps by 90 degrees from signal to signal (signal s gets
// 4 * j^(s mod 4)), as if the inputs had been delayed by different amounts.
// All other channels carry small random noise (-1, 0 or +1 per component).
// The four beams get different weights:
//   beam 0: signal 0 only, weight 1 + j0        -> the single-input test
//   beam 1: all 24 signals, weight 1 + j0       -> uncorrected phases cancel
//   beam 2: the 6 signals with s mod 4 = 0      -> adder grows with inputs
//   beam 3: all 24, weight (-j)^(s mod 4)       -> phases corrected by the
//                                                  coefficients, coherent sum
// With out_shift = 4 the beam samples in channel T are exactly 4, 0, 24 and 96,
// so the integrated powers there are 16, 0, 576 and 9216 per frame. The
// channels arrive at the full rate, one per clock. Two integrations of 4
// frames and one of 8 frames are checked: the tone must be the peak of beams
// 0, 2 and 3, with exactly those powers times the integration length, beam 1
// must be zero in channel T, and the ratio between beams must follow the
// number of coherently added inputs.
module tb_lab_tests;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  localparam int T = 100;                       // kept channel of the tone
  localparam int NINT = 3;                      // integrations checked
  int checks = 0, failures = 0;

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL: %s", m);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integrated spectra as received: spec[integration][beam][channel]
  longint spec [NINT][N_BEAMS][N_SEL];
  int     nheap [N_BEAMS];
  int     w = 0, kind, beam;
  always @(posedge clk) if (rst_n && beam_out_valid && beam_out_ready) begin
    if (w == 6) begin
      kind = int'(beam_out_data[15:8]);
      beam = int'(beam_out_data[1:0]);
    end
    if (w >= 7 && kind == 1 && nheap[beam] < NINT) begin
      spec[nheap[beam]][beam][2 * (w - 7)]     = longint'(beam_out_data[63:32]);
      spec[nheap[beam]][beam][2 * (w - 7) + 1] = longint'(beam_out_data[31:0]);
    end
    w++;
    if (beam_out_last) begin
      if (kind == 1) nheap[beam]++;
      w = 0;
    end
  end

  function automatic cplx8_t tone(input int s);
    case (s % 4)
      0: return '{re:  8'sd4, im:  8'sd0};
      1: return '{re:  8'sd0, im:  8'sd4};
      2: return '{re: -8'sd4, im:  8'sd0};
      default: return '{re: 8'sd0, im: -8'sd4};
    endcase
  endfunction

  function automatic coef_t weight(input int b, input int s);
    logic signed [15:0] one;
    one = 16'sd16384;
    case (b)
      0: return (s == 0) ? '{re: one, im: 16'sd0} : '0;
      1: return '{re: one, im: 16'sd0};
      2: return (s % 4 == 0) ? '{re: one, im: 16'sd0} : '0;
      default:
        case (s % 4)
          0: return '{re:  one, im: 16'sd0};
          1: return '{re: 16'sd0, im: -one};
          2: return '{re: -one, im: 16'sd0};
          default: return '{re: 16'sd0, im: one};
        endcase
    endcase
  endfunction

  task automatic run_frame();
    for (int c = 0; c < N_CHAN; c++) begin
      @(negedge clk);
      ch_valid = 2'b11;
      ch_tag[0] = '{sof: (c == 0), chan: CHAN_W'(c)};
      ch_tag[1] = ch_tag[0];
      for (int s = 0; s < N_SIG_TOTAL; s++)
        if (c == int'(start_chan) + T) ch_smp[s] = tone(s);
        else ch_smp[s] = '{re: 8'($signed(2'($urandom_range(0, 2)) - 2'sd1)),
                           im: 8'($signed(2'($urandom_range(0, 2)) - 2'sd1))};
    end
    @(negedge clk); ch_valid = 2'b00;
  endtask

  always @(negedge clk) begin
    adc_valid = 1'b0;
    foreach (adc_smp[s]) adc_smp[s] = '0;
  end

  initial begin
    ch_valid = 0; ch_tag[0] = '0; ch_tag[1] = '0; foreach (ch_smp[s]) ch_smp[s] = '0;
    foreach (adc_delay[s]) adc_delay[s] = '0;
    start_chan = 9'd54; coef_wr_fpga = 0; coef_wr_en = 0; coef_wr_sig = 0; coef_wr_chan = 0;
    coef_wr_data = 0; coef_swap = 0; out_shift = 4; int_frames = 4; out_mode = OUT_INTEGRATED;
    raw_beam_sel = 0; raw_all = 0; aux_out_ready = '1; beam_out_ready = 1; raw_out_ready = '1;
    cap_start = 0; cap_stop = 0; cap_pairs = 1; cap_frames = 1;
    foreach (cap_pair_start[i]) cap_pair_start[i] = '0;
    foreach (nheap[b]) nheap[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < N_BEAMS; b++)
        for (int s = 0; s < N_SIG_FPGA; s++)
          for (int c = 0; c < N_SEL; c++) begin
            @(negedge clk);
            coef_wr_fpga = 1'(f); coef_wr_en = '0; coef_wr_en[b] = 1'b1;
            coef_wr_sig = 4'(s); coef_wr_chan = CHAN_W'(c);
            coef_wr_data = weight(b, f * N_SIG_FPGA + s);
          end
    @(negedge clk); coef_wr_en = '0; coef_swap = 1;
    @(negedge clk); coef_swap = 0;
    repeat (4) run_frame();                       // integration 0 (4 frames)
    repeat (4) run_frame();                       // integration 1 (4 frames)
    int_frames = 8;
    repeat (8) run_frame();                       // integration 2 (8 frames)
    run_frame();                                  // starts the next one
    repeat (3000) @(posedge clk);

    for (int b = 0; b < N_BEAMS; b++) begin
      checks++;
      if (nheap[b] < NINT) fail($sformatf("beam %0d: %0d spectra", b, nheap[b]));
    end
    for (int n = 0; n < NINT; n++) begin
      longint len, pk [N_BEAMS];
      len = (n == 2) ? 8 : 4;
      pk[0] = 16 * len; pk[1] = 0; pk[2] = 576 * len; pk[3] = 9216 * len;
      for (int b = 0; b < N_BEAMS; b++) begin
        checks++;
        if (spec[n][b][T] != pk[b])
          fail($sformatf("integration %0d beam %0d: power %0d in the tone channel, expected %0d", n, b, spec[n][b][T], pk[b]));
        if (b != 1)
          for (int c = 0; c < N_SEL; c++)
            if (c != T) begin
              checks++;
              if (spec[n][b][c] >= spec[n][b][T]) fail($sformatf("integration %0d beam %0d: channel %0d not below the tone", n, b, c));
            end
      end
      // noise is present where the tone is not: the beams are not all zero
      checks++;
      if (spec[n][1][T + 1] + spec[n][1][T - 1] + spec[n][1][T + 2] + spec[n][1][T - 2] == 0)
        fail("beam 1 shows no noise next to the tone");
      // coherent gain: 6 and 24 inputs against one, in amplitude
      checks++;
      if (spec[n][2][T] != 36 * spec[n][0][T] || spec[n][3][T] != 576 * spec[n][0][T])
        fail($sformatf("integration %0d: coherent gain wrong", n));
    end
    checks++;
    if (err_f2f_frame || err_misalign || err_fifo || err_out_overflow) fail("error flag raised");
    $display("tone powers, 8-frame integration: beam0=%0d beam1=%0d beam2=%0d beam3=%0d",
             spec[2][0][T], spec[2][1][T], spec[2][2][T], spec[2][3][T]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
