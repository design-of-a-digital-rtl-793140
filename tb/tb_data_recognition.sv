// tb_data_recognition: self-checking test of the word classifier.
// Walks a short playback record (record number, blank, two blocks of four
// channel words, end of data), then random words, and compares SD, ED, BL and
// the SDF, DATA, EDF flip flops with a reference model built from the tape
// format table.  Also checks that DATA is never set in search mode and that
// CLR clears the flip flops.
module tb_data_recognition;
  import dfs_pkg::*;

  logic       clk = 0;
  trf_lines_t trf;
  logic       clock_p, srm, clr, iorst;
  logic       sd, bl, ed, sdf, data_ff, edf;
  logic       m_sdf, m_edf, m_data;
  int checks = 0, failures = 0;

  data_recognition dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Model update for one clk edge with the current inputs.
  task automatic tick();
    logic w_sd, w_ed;
    w_sd = trf.trf0 & ~trf.trf1;
    w_ed = trf.trf0 & trf.trf1 & trf.trfb;
    @(posedge clk);
    if (iorst || clr) begin
      m_sdf = 0; m_edf = 0; m_data = 0;
    end else begin
      if (clock_p) begin m_sdf = w_sd; m_edf = w_ed; end
      if (!srm && !trf.trf0 && trf.trfb) m_data = 1;
      else if (srm || w_ed) m_data = 0;
    end
    #1;
    chk(sdf, m_sdf, "SDF");
    chk(edf, m_edf, "EDF");
    chk(data_ff, m_data, "DATA");
    chk(sd, trf.trf0 & ~trf.trf1, "SD");
    chk(ed, trf.trf0 & trf.trf1 & trf.trfb, "ED");
    chk(bl, trf.trfb & m_data, "BL");
  endtask

  // One tape word: lines cleared (TRR), word present, CLOCK, hold.
  task automatic word(input logic b0, b1, bb, input logic [4:17] rest);
    trf = '0; tick();
    trf.trf0 = b0; trf.trf1 = b1; trf.trfb = bb; trf.trf = rest; trf.trfp = ^{b0, b1, rest};
    repeat (3) tick();
    clock_p = 1; tick(); clock_p = 0;
    tick();
  endtask

  initial begin
    trf = '0; clock_p = 0; srm = 0; clr = 0; iorst = 1;
    m_sdf = 0; m_edf = 0; m_data = 0;
    tick(); iorst = 0;
    word(1, 0, 1, 14'h155);               // record number
    chk(sdf, 1, "SDF after record number");
    word(0, 0, 0, 0);                     // blank
    chk(sdf, 0, "SDF cleared by next CLOCK");
    for (int b = 0; b < 2; b++) begin
      word(0, 0, 1, 14'(b));              // block number
      chk(data_ff, 1, "DATA set by block number");
      for (int c = 1; c < 4; c++) word(1, 1, 0, 14'($urandom));
    end
    word(1, 1, 1, '1);                    // end of data
    chk(edf, 1, "EDF after end of data");
    chk(data_ff, 0, "DATA cleared by end of data");
    // Search mode: block words do not set DATA.
    srm = 1;
    word(0, 0, 1, 14'd3);
    chk(data_ff, 0, "no DATA in search mode");
    srm = 0;
    word(0, 0, 1, 14'd4);
    srm = 1; tick();
    chk(data_ff, 0, "search mode clears DATA");
    srm = 0;
    for (int i = 0; i < 300; i++) begin
      word($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), 14'($urandom));
      if ($urandom_range(0, 20) == 0) begin clr = 1; tick(); clr = 0; end
      if ($urandom_range(0, 20) == 0) begin srm = ~srm; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
