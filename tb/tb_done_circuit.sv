// tb_done_circuit: self-checking test of ND and the DONE/BUSY/INTDIS/INTREQ
// flip flops.  Directed part: DONE needs BUSY, STRT clears DONE and sets BUSY,
// DONE clears BUSY, an error holds DONE through STRT, MSKO masks INTREQ, and
// DONE rises one clk after the CLOCK of a requested word.  Random part: all
// inputs random every cycle, compared with a reference model of the set/reset
// equations.
module tb_done_circuit;
  import dfs_pkg::*;

  logic        clk = 0;
  cmd_t        a;
  logic        sd, bl, ed, data_ff, bc31, clock_p, iopls, strt, clr, iorst, msko, error;
  logic [0:15] ac;
  logic        nd, load_data, done, busy, intdis, intreq;
  logic        m_done, m_busy, m_intdis, m_intreq, m_nd;
  int checks = 0, failures = 0;

  done_circuit dut (.*);

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

  function automatic logic model_nd();
    return (a.req_rec & sd) | (a.req_blk & ~a.req_data & bl)
         | (a.req_data & (((~a.masked | bc31) & data_ff) | ed));
  endfunction

  task automatic tick();
    logic ck, clio, nd_now, set_by_data, dn;
    #1;
    nd_now = model_nd();
    chk(nd, nd_now, "ND");
    ck = clock_p | iopls;
    clio = clr | iorst;
    set_by_data = m_busy & nd_now & ck;
    chk(load_data, ~clio & ~m_done & set_by_data & ~strt & ~error, "load_data");
    @(posedge clk);
    if (clio) begin
      m_done = 0; m_busy = 0; m_intdis = 0; m_intreq = 0;
    end else begin
      dn = ((m_done | set_by_data) & ~strt) | ((m_busy | strt) & error);
      m_intreq = m_done & ~m_intdis & ~strt;
      if (msko) m_intdis = ac[10];
      if (strt) m_busy = 1; else if (dn) m_busy = 0;
      m_done = dn;
    end
    #1;
    chk(done, m_done, "DONE");
    chk(busy, m_busy, "BUSY");
    chk(intdis, m_intdis, "INTDIS");
    chk(intreq, m_intreq, "INTREQ");
  endtask

  task automatic idle();
    {sd, bl, ed, data_ff, bc31, clock_p, iopls, strt, clr, iorst, msko, error} = '0;
  endtask

  initial begin
    a = '0; ac = '0; idle(); iorst = 1;
    tick(); idle();
    // A requested record number without BUSY: no DONE.
    a.req_rec = 1; sd = 1; clock_p = 1; tick(); clock_p = 0;
    chk(done, 0, "no DONE without BUSY");
    // STRT: BUSY on.
    strt = 1; tick(); strt = 0;
    chk(busy, 1, "STRT sets BUSY");
    // CLOCK of a requested word: DONE one clk later, BUSY off.
    clock_p = 1; tick(); clock_p = 0;
    chk(done, 1, "DONE one clk after CLOCK");
    chk(busy, 0, "DONE clears BUSY");
    tick();
    chk(intreq, 1, "INTREQ follows DONE");
    // STRT without error clears DONE.
    sd = 0; strt = 1; tick(); strt = 0;
    chk(done, 0, "STRT clears DONE");
    chk(intreq, 0, "STRT clears INTREQ");
    // Error: DONE set and held through STRT.
    error = 1; tick();
    chk(done, 1, "error sets DONE");
    strt = 1; tick(); strt = 0;
    chk(done, 1, "error holds DONE through STRT");
    error = 0;
    strt = 1; tick(); strt = 0;
    chk(done, 0, "STRT clears DONE once error gone");
    // MSKO with AC10 = 1 blocks INTREQ.
    ac[10] = 1; msko = 1; tick(); msko = 0;
    chk(intdis, 1, "MSKO sets INTDIS");
    a = '0; a.req_data = 1; data_ff = 1; a.masked = 1; bc31 = 0;
    iopls = 1; tick(); iopls = 0;
    chk(done, 0, "masked channel not requested");
    bc31 = 1; iopls = 1; tick(); iopls = 0;
    chk(done, 1, "IOPLS tests ND in place of CLOCK");
    tick(); tick();
    chk(intreq, 0, "INTDIS blocks INTREQ");
    idle();
    for (int i = 0; i < 5000; i++) begin
      a = cmd_t'($urandom);
      {sd, bl, ed, data_ff, bc31} = 5'($urandom);
      clock_p = ($urandom_range(0, 3) == 0);
      iopls   = ($urandom_range(0, 15) == 0);
      strt    = ($urandom_range(0, 5) == 0);
      clr     = ($urandom_range(0, 60) == 0);
      iorst   = ($urandom_range(0, 200) == 0);
      msko    = ($urandom_range(0, 10) == 0);
      error   = ($urandom_range(0, 12) == 0);
      ac = 16'($urandom);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
