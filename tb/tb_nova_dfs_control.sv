// tb_nova_dfs_control: self-checking test of the NOVA DFS link flip flop and
// the transport controls.  Checks the button set/reset, the accidental-stop
// reset (STOPDP while RUN and START5 low), that STOPDP while running or while
// STOP is commanded does not reset, the gating of STOP/SRM/PBM by NOVA DFS,
// and the one-cycle stop pulse on every run-mode set-up.  A random phase
// then compares every output with a model of these rules.
module tb_nova_dfs_control;
  import dfs_pkg::*;

  logic clk = 0;
  logic set_btn, reset_btn, start5, stopdp, iorst;
  cmd_t a;
  logic nova_dfs, on_lamp, dfs_stop, dfs_srm, dfs_pbm, mode_stop, pss_inhibit;
  int checks = 0, failures = 0;

  nova_dfs_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    set_btn = 0; reset_btn = 1; start5 = 0; stopdp = 0; iorst = 1; a = '0;
    tick();
    reset_btn = 0; iorst = 0;
    tick();
    chk(nova_dfs, 0, "reset by button");
    chk(dfs_stop, 0, "stop gated off");
    set_btn = 1; tick(); set_btn = 0;
    chk(nova_dfs, 1, "set by button");
    chk(pss_inhibit, 1, "PSS inhibited");
    chk(dfs_stop, 1, "STOP while A1=0");
    a.on = 1; #1 chk(on_lamp, 1, "ON lamp");
    // RUN in playback: one stop pulse, then PBM.
    a.run = 1; a.srm = 0; #1;
    chk(mode_stop, 1, "stop pulse on RUN");
    chk(dfs_pbm, 1, "PBM");
    chk(dfs_srm, 0, "not SRM");
    tick();
    chk(mode_stop, 0, "stop pulse is one cycle");
    start5 = 1;
    // STOPDP while running: no reset.
    stopdp = 1; tick(); stopdp = 0;
    chk(nova_dfs, 1, "STOPDP while running ignored");
    // Change to search mode: stop pulse again.
    a.srm = 1; #1;
    chk(mode_stop, 1, "stop pulse on mode change");
    chk(dfs_srm, 1, "SRM");
    chk(dfs_pbm, 0, "not PBM");
    tick();
    chk(mode_stop, 0, "stop pulse ends");
    // Commanded STOP then STOPDP: no reset.
    a.run = 0; start5 = 0; tick();
    stopdp = 1; tick(); stopdp = 0;
    chk(nova_dfs, 1, "STOPDP after commanded stop ignored");
    // Accidental stop while RUN.
    a.run = 1; tick(); start5 = 1; tick();
    start5 = 0; tick();
    chk(nova_dfs, 1, "START5 low alone does not reset");
    stopdp = 1; tick(); stopdp = 0;
    chk(nova_dfs, 0, "accidental stop resets NOVA DFS");
    chk(dfs_srm, 0, "SRM gated off");
    chk(dfs_pbm, 0, "PBM gated off");
    chk(dfs_stop, 0, "STOP gated off");
    chk(pss_inhibit, 0, "PSS no longer inhibited");
    // Reset button wins over set.
    set_btn = 1; reset_btn = 1; tick();
    chk(nova_dfs, 0, "reset button has priority");
    reset_btn = 0; tick(); set_btn = 0;
    chk(nova_dfs, 1, "set again");
    reset_btn = 1; tick(); reset_btn = 0;
    chk(nova_dfs, 0, "reset button");

    // Random phase: every output against a model of the rules above.
    begin
      logic m_dfs, m_run, m_srm;
      m_dfs = nova_dfs; m_run = a.run; m_srm = a.srm;
      for (int i = 0; i < 3000; i++) begin
        set_btn   = ($urandom % 8) == 0;
        reset_btn = ($urandom % 16) == 0;
        stopdp    = ($urandom % 6) == 0;
        start5    = $urandom;
        iorst     = ($urandom % 50) == 0;
        a         = $urandom;
        #1;
        chk(on_lamp, a.on, "ON lamp (random)");
        chk(pss_inhibit, m_dfs, "PSS inhibit (random)");
        chk(dfs_stop, m_dfs && !a.run, "STOP (random)");
        chk(dfs_srm, m_dfs && a.run && a.srm, "SRM (random)");
        chk(dfs_pbm, m_dfs && a.run && !a.srm, "PBM (random)");
        chk(mode_stop, m_dfs && a.run && (!m_run || m_srm != a.srm), "stop pulse (random)");
        if (reset_btn || (stopdp && !start5 && a.run)) m_dfs = 0;
        else if (set_btn) m_dfs = 1;
        m_run = iorst ? 1'b0 : a.run;
        m_srm = iorst ? 1'b0 : a.srm;
        tick();
        chk(nova_dfs, m_dfs, "NOVA DFS (random)");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
