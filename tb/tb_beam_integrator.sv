// tb_beam_integrator: random beam samples over 404-channel frames, one per
// clock, with integration lengths 3, 1 and 5 frames. Each dump must hold, per
// channel, the sum of re^2+im^2 over exactly the frames of its integration, in
// channel order, two clocks after the last frame's sample. A second instance
// with 4 channels and full-scale input runs for more than 2^32 / 32768 frames
// and must stick at 2^32-1.
module tb_beam_integrator;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [20:0] int_frames;
  logic in_valid, dump_valid, dump_frame_end;
  chan_tag_t in_tag, dump_tag;
  cplx8_t in_smp;
  logic [31:0] dump_data;

  beam_integrator dut (.*);

  // saturation instance
  logic s_valid, s_dvalid, s_end;
  chan_tag_t s_tag, s_dtag;
  logic [31:0] s_data;
  beam_integrator #(.NSEL(4)) dut_sat (
    .clk, .rst_n, .int_frames(21'd140000), .in_valid(s_valid), .in_tag(s_tag),
    .in_smp('{re: -8'sd128, im: -8'sd128}), .dump_valid(s_dvalid), .dump_tag(s_dtag),
    .dump_data(s_data), .dump_frame_end(s_end)
  );

  int checks = 0, failures = 0, dumps = 0, ends = 0, sat_dumps = 0;
  longint acc [N_SEL];
  typedef struct { longint v; int chan; int t; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dump_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected dump"); end
    else begin
      e = q.pop_front();
      dumps++;
      if (dump_data != 32'(e.v) || dump_tag.chan != e.chan || cyc - e.t != 2) begin
        failures++; if (failures < 10) $display("chan %0d got %0d exp %0d (lat %0d)", e.chan, dump_data, e.v, cyc - e.t);
      end
    end
    if (dump_frame_end) ends++;
  end

  always @(posedge clk) if (rst_n && s_dvalid) begin
    checks++; sat_dumps++;
    if (s_data != 32'hFFFF_FFFF) failures++;
  end

  initial begin
    in_valid = 0; in_tag = '0; in_smp = '0; int_frames = 3; s_valid = 0; s_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        int lens [3] = '{3, 1, 5};
        foreach (lens[k]) begin
          int_frames = 21'(lens[k]);
          for (int f = 0; f < lens[k] * 2; f++) begin
            for (int c = 0; c < N_SEL; c++) begin
              int p;
              @(negedge clk);
              in_valid = 1; in_tag.chan = CHAN_W'(c); in_tag.sof = (c == 0);
              in_smp = cplx8_t'($urandom);
              p = int'(in_smp.re) * int'(in_smp.re) + int'(in_smp.im) * int'(in_smp.im);
              acc[c] = ((f % lens[k]) == 0) ? longint'(p) : acc[c] + p;
              if ((f % lens[k]) == lens[k] - 1) begin
                exp_t e; e.v = acc[c]; e.chan = c; e.t = cyc + 1; q.push_back(e);
              end
            end
          end
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        for (int f = 0; f < 132000; f++)
          for (int c = 0; c < 4; c++) begin
            @(negedge clk); s_valid = 1; s_tag.chan = CHAN_W'(c); s_tag.sof = (c == 0);
          end
        // close the integration: the 140000th frame is the dump frame
        for (int f = 132000; f < 140000; f++)
          for (int c = 0; c < 4; c++) begin
            @(negedge clk); s_valid = 1; s_tag.chan = CHAN_W'(c); s_tag.sof = (c == 0);
          end
        @(negedge clk); s_valid = 0;
      end
    join
    repeat (5) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("%0d dumps missing", q.size()); end
    checks++; if (ends != 2 + 2 + 2) begin failures++; $display("frame ends %0d", ends); end
    checks++; if (sat_dumps != 4) begin failures++; $display("sat dumps %0d", sat_dumps); end
    $display("dumped %0d values", dumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
