// dfs_interface: interface between a NOVA computer and a Texas Instruments
// Digital Field System (DFS) seismic tape unit in playback.
//
// The DFS reads one 21-track word every 32 us (1 ms speed; 64 us at 2 ms) and
// presents it on 18 DATA LINES with a CLOCK pulse and, for a bad word, a
// parity error pulse PES.  A record holds a record number, a blank period,
// data blocks of 32 words (block number = channel 0, then channels 1..31) and
// end-of-data words.  The NOVA writes a command (run/stop, search/playback,
// which word types it wants) and a 32-channel mask; the interface then wakes
// the NOVA through DONE (and INTREQ) only for the words it asked for, holding
// each in the data register until the program reads it and issues STRT.
// Errors (LATE: the program did not read in time; CUT: the link to the DFS was
// dropped; IMS: the mask lost step with the channels) hold DONE on and leave a
// JUMP .+1/.+3/.+7 in the data register for the program to execute.
//
// Parts: command_register (A0-A7), nova_dfs_control (link flip flop and
// transport controls), data_recognition (SD/BL/ED, SDF/DATA/EDF),
// mask_shift_register (BC0-BC31), done_circuit (ND, DONE/BUSY/INTDIS/INTREQ),
// error_detection (LATE/CUT/IMS, counter S), data_register (BB), status_register
// (CC, PEF/SPEF) and nova_io_port (device select and data-in mux).
//
// Interface: every input is synchronous to clk and every pulse (NOVA strobes,
// CLOCK, PES, STOPDP) lasts one clk cycle.  The document's flip flops are
// clocked by these pulses directly; this design samples them with one system
// clock, which is its own choice.  IORST must be given once after power-up.
// Timing: DONE rises on the clk edge that samples the CLOCK of a requested
// word; data_in is combinational during a DIA/DIB/DIC strobe.
module dfs_interface
  import dfs_pkg::*;
#(
  parameter logic [0:5] DEVICE_CODE = 6'o30
)(
  input  logic          clk,
  // NOVA I/O bus
  input  logic [0:5]    ds,
  input  nova_strobes_t bus,
  input  logic [0:15]   data_out,   // accumulator word from the NOVA
  output logic [0:15]   data_in,    // word to the NOVA accumulator
  output logic          done,
  output logic          busy,
  output logic          intreq,
  output logic          seldfs,
  // DFS tape unit
  input  trf_lines_t    trf,
  input  logic          clock_p,
  input  logic          pes,
  input  logic [0:7]    pdf,
  input  logic          start5,
  input  logic          stopdp,
  input  logic          nova_dfs_set_btn,
  input  logic          nova_dfs_reset_btn,
  output logic          nova_dfs,
  output logic          on_lamp,
  output logic          dfs_stop,
  output logic          dfs_srm,
  output logic          dfs_pbm,
  output logic          mode_stop,
  output logic          pss_inhibit
);

  nova_strobes_t dev;
  cmd_t          a;
  status_t       cc;
  logic [0:15]   bb;
  logic [0:31]   bc;
  logic          bc31;
  logic          sd, bl, ed, sdf, data_ff, edf;
  logic          nd, load_data, intdis;
  logic          late, cut, ims, error;
  logic [0:4]    s;

  nova_io_port #(.DEVICE_CODE(DEVICE_CODE)) u_io (
    .ds, .bus, .a, .pdf, .bb, .bc, .cc, .seldfs, .dev, .data_in
  );

  command_register u_cmd (
    .clk, .datoa(dev.datoa), .clr(dev.clr), .iorst(dev.iorst), .ac(data_out), .a
  );

  nova_dfs_control u_link (
    .clk, .set_btn(nova_dfs_set_btn), .reset_btn(nova_dfs_reset_btn),
    .start5, .stopdp, .iorst(dev.iorst), .a, .nova_dfs, .on_lamp,
    .dfs_stop, .dfs_srm, .dfs_pbm, .mode_stop, .pss_inhibit
  );

  data_recognition u_rec (
    .clk, .trf, .clock_p, .srm(a.srm), .clr(dev.clr), .iorst(dev.iorst),
    .sd, .bl, .ed, .sdf, .data_ff, .edf
  );

  mask_shift_register u_msk (
    .clk, .datob(dev.datob), .datoc(dev.datoc),
    .shift((data_ff && clock_p) || dev.iopls),
    .clr(dev.clr), .iorst(dev.iorst), .ac(data_out), .bc, .bc31
  );

  done_circuit u_done (
    .clk, .a, .sd, .bl, .ed, .data_ff, .bc31, .clock_p, .iopls(dev.iopls),
    .strt(dev.strt), .clr(dev.clr), .iorst(dev.iorst), .msko(dev.msko),
    .ac(data_out), .error, .nd, .load_data, .done, .busy, .intdis, .intreq
  );

  error_detection u_err (
    .clk, .a0(a.on), .nd, .done, .clock_p, .iopls(dev.iopls), .nova_dfs, .bl,
    .data_ff, .clr(dev.clr), .iorst(dev.iorst), .late, .cut, .ims, .error, .s
  );

  data_register u_data (
    .clk, .trf, .load(load_data), .strt(dev.strt), .busy, .late, .cut, .ims,
    .clr(dev.clr), .iorst(dev.iorst), .bb
  );

  status_register u_stat (
    .clk, .edf, .sdf, .data_ff, .s, .nova_dfs, .ims, .cut, .late, .intdis,
    .intreq, .pes, .clock_p, .nd, .strt(dev.strt), .clr(dev.clr),
    .iorst(dev.iorst), .cc
  );

endmodule
