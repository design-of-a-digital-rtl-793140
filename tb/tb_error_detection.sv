// tb_error_detection: self-checking test of LATE, CUT, IMS and the
// synchronization counter.  Directed part: 32 channel CLOCKs bring S back to
// zero so the next block number raises no IMS; an extra CLOCK makes the next
// block number raise IMS; a falling NOVA DFS raises CUT; a requested word
// while DONE raises LATE; A0 = 0 clears all.  Random part: all inputs random,
// compared with a reference model.
module tb_error_detection;
  import dfs_pkg::*;

  logic       clk = 0;
  logic       a0, nd, done, clock_p, iopls, nova_dfs, bl, data_ff, clr, iorst;
  logic       late, cut, ims, error;
  logic [0:4] s;
  logic       m_late, m_cut, m_ims, p_dfs, p_bl;
  logic [4:0] m_s;
  int checks = 0, failures = 0;
  bit started = 0;

  error_detection dut (.*);

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

  task automatic tick();
    #1;
    if (started) chk(error, m_late | m_cut | m_ims, "ERROR");
    started = 1;
    @(posedge clk);
    if (!a0 || clr || iorst) begin
      m_late = 0; m_cut = 0; m_ims = 0;
    end else begin
      if (nd && done && clock_p) m_late = 1;
      if (p_dfs && !nova_dfs) m_cut = 1;
      if (bl && !p_bl && m_s != 0) m_ims = 1;
    end
    if (iorst || clr || !data_ff) m_s = 0;
    else if (clock_p || iopls) m_s = m_s + 1;
    p_dfs = nova_dfs; p_bl = bl;
    #1;
    chk(late, m_late, "LATE");
    chk(cut, m_cut, "CUT");
    chk(ims, m_ims, "IMS");
    checks++;
    if (s !== m_s) begin
      failures++;
      $display("FAIL S: got %0d expected %0d", s, m_s);
    end
  endtask

  task automatic block(input int words);
    bl = 1; data_ff = 1; tick(); tick();
    for (int w = 0; w < words; w++) begin
      if (w == 1) bl = 0;
      clock_p = 1; tick(); clock_p = 0; tick();
    end
  endtask

  initial begin
    {a0, nd, done, clock_p, iopls, bl, data_ff, clr} = '0;
    nova_dfs = 1; iorst = 1;
    tick(); tick();
    iorst = 0; a0 = 1;
    tick();
    block(32);
    block(32);
    chk(ims, 0, "no IMS with 32 words per block");
    block(33);
    block(32);
    chk(ims, 1, "IMS after an extra CLOCK");
    a0 = 0; tick(); a0 = 1; tick();
    chk(ims, 0, "A0 = 0 clears IMS");
    nova_dfs = 0; tick();
    chk(cut, 1, "CUT on NOVA DFS falling");
    nova_dfs = 1; clr = 1; tick(); clr = 0;
    chk(cut, 0, "CLR clears CUT");
    nd = 1; done = 1; clock_p = 1; tick(); clock_p = 0;
    chk(late, 1, "LATE");
    iorst = 1; tick(); iorst = 0;
    for (int i = 0; i < 4000; i++) begin
      a0       = ($urandom_range(0, 40) != 0);
      {nd, done, bl} = 3'($urandom);
      data_ff  = ($urandom_range(0, 9) != 0);
      clock_p  = ($urandom_range(0, 2) == 0);
      iopls    = ($urandom_range(0, 20) == 0);
      nova_dfs = ($urandom_range(0, 30) != 0);
      clr      = ($urandom_range(0, 80) == 0);
      iorst    = ($urandom_range(0, 300) == 0);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
