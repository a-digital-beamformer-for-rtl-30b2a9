// tb_coef_bank: fills bank 0, applies it, then writes a second set while the
// first is being read. Reads must return the first set until a swap request
// meets a start of frame, and the second set from that frame on.
module tb_coef_bank;
  import pharos2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, swap_req, swap_pending, active_bank, rd_en, rd_sof;
  logic [3:0] wr_sig;
  logic [CHAN_W-1:0] wr_chan, rd_chan;
  coef_t wr_coef, rd_coef [N_SIG_FPGA];

  coef_bank dut (.*);

  int checks = 0, failures = 0;
  coef_t set0 [N_SIG_FPGA][N_SEL], set1 [N_SIG_FPGA][N_SEL];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_set(input bit which);
    for (int s = 0; s < N_SIG_FPGA; s++)
      for (int c = 0; c < N_SEL; c++) begin
        @(negedge clk);
        wr_en = 1; wr_sig = 4'(s); wr_chan = CHAN_W'(c);
        wr_coef = which ? set1[s][c] : set0[s][c];
      end
    @(negedge clk); wr_en = 0;
  endtask

  // read one frame, checking against the expected set
  task automatic read_frame(input bit which, input int n);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      rd_en = 1; rd_chan = CHAN_W'(c); rd_sof = (c == 0);
      @(posedge clk); #1;
      rd_en = 0;
      for (int s = 0; s < N_SIG_FPGA; s++) begin
        checks++;
        if (rd_coef[s] !== (which ? set1[s][c] : set0[s][c])) begin
          failures++;
          if (failures < 10) $display("set %0d sig %0d chan %0d wrong", which, s, c);
        end
      end
    end
  endtask

  initial begin
    wr_en = 0; swap_req = 0; rd_en = 0; rd_sof = 0; rd_chan = 0; wr_sig = 0; wr_chan = 0; wr_coef = 0;
    foreach (set0[s, c]) begin set0[s][c] = coef_t'($urandom); set1[s][c] = coef_t'($urandom); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    write_set(0);                       // into bank 1 (inactive)
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    checks++; if (!swap_pending) failures++;
    read_frame(0, N_SEL);               // swap happens at this frame's start
    checks++; if (swap_pending || active_bank != 1) begin failures++; $display("first swap missing"); end
    write_set(1);                       // into bank 0 while bank 1 is read
    read_frame(0, 50);
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    // rest of the frame still uses the old set
    for (int c = 50; c < N_SEL; c++) begin
      @(negedge clk); rd_en = 1; rd_chan = CHAN_W'(c); rd_sof = 0;
      @(posedge clk); #1; rd_en = 0;
      checks++; if (rd_coef[3] !== set0[3][c]) failures++;
    end
    read_frame(1, N_SEL);
    checks++; if (active_bank != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
