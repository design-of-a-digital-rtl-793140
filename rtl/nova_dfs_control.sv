// nova_dfs_control: the NOVA DFS flip flop and the tape transport controls.
//
// The operator sets NOVA DFS with one button on the DFS and clears it with
// another.  It is also cleared by an accidental stop of the tape unit.  While
// it is set, the command register drives the transport:
//   dfs_stop = NOVA DFS . STOP           (STOP = not A1)
//   dfs_srm  = NOVA DFS . RUN . SRM      (search mode, reverse)
//   dfs_pbm  = NOVA DFS . RUN . PBM      (playback mode, forward)
// and the DFS's own PSS stop pulse is inhibited (pss_inhibit = NOVA DFS).
// Each time a run mode is set up (RUN rises, or SRM/PBM changes while RUN),
// mode_stop gives a one-cycle stop pulse so the transport stops before it runs
// in the new mode, as the description of SRM/PBM requires.
//
// The document names START5 (high while the DFS runs) and STOPDP (a pulse
// about 40 ms after the DFS stops) as the signals that detect an accidental
// stop but does not give the equation.  This design treats a STOPDP pulse that
// arrives while RUN is commanded and START5 is low as an accidental stop.  A
// commanded mode change does not trip it because the transport is running
// again (START5 high) about 30 ms after the stop pulse, before STOPDP.
// NOVA DFS is cleared by neither CLR nor IORST: the NOVA program tests it right
// after clearing the device, so a clear must not take it away.
//
// Timing: one clk; buttons, START5 and STOPDP are assumed synchronised to clk.
module nova_dfs_control
  import dfs_pkg::*;
(
  input  logic clk,
  input  logic set_btn,      // operator button: set NOVA DFS
  input  logic reset_btn,    // operator button: reset NOVA DFS
  input  logic start5,       // DFS start relay, high while running
  input  logic stopdp,       // DFS stop delay pulse
  input  logic iorst,        // clears the mode-change detector only
  input  cmd_t a,
  output logic nova_dfs,
  output logic on_lamp,      // ON/OFF indicator (A0)
  output logic dfs_stop,
  output logic dfs_srm,
  output logic dfs_pbm,
  output logic mode_stop,
  output logic pss_inhibit
);

  logic accidental_stop;
  logic prev_run, prev_srm;

  assign accidental_stop = stopdp && !start5 && a.run;

  always_ff @(posedge clk) begin
    if (reset_btn || accidental_stop) nova_dfs <= 1'b0;
    else if (set_btn)                 nova_dfs <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (iorst) begin
      prev_run <= 1'b0;
      prev_srm <= 1'b0;
    end else begin
      prev_run <= a.run;
      prev_srm <= a.srm;
    end
  end

  assign on_lamp     = a.on;
  assign dfs_stop    = nova_dfs && !a.run;
  assign dfs_srm     = nova_dfs && a.run && a.srm;
  assign dfs_pbm     = nova_dfs && a.run && !a.srm;
  assign mode_stop   = nova_dfs && a.run && (!prev_run || (prev_srm != a.srm));
  assign pss_inhibit = nova_dfs;

endmodule
