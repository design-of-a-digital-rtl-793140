// done_circuit: necessary-data decode and the DONE, BUSY, INTDIS, INTREQ flip
// flops of the DFS interface.
//
// ND (necessary data) is on when the word on the DATA LINES is one the
// command register asks for:
//   ND = A4.SD + A5./A6.BL + A6.[(/A3 + BC31).DATA + ED]
// With CK = CLOCK + IOPLS.SELDFS and CLIO = CLR.SELDFS + IORST:
//   DONE <- [(DONE + BUSY.ND.CK)./STRT + BUSY.ERROR]./CLIO
// BUSY is set only by STRT and cleared when DONE is set; DONE cannot be set
// while BUSY is off.  An error holds DONE on: STRT sets BUSY, and BUSY.ERROR
// keeps DONE set, so a program that tests DONE after STRT sees the error.
// In this single-clock form the BUSY.ERROR term also uses the BUSY that STRT
// is setting in the same cycle, so DONE does not drop for a cycle.
// load_data is the "DONE rising with no error" strobe that gates the DATA
// LINES into the data register; it is high on the cycle DONE is being set by
// ND.
// INTDIS is written by MSKO from AC bit 10.  INTREQ follows DONE./INTDIS one
// cycle later and is cleared by STRT, the usual NOVA device behaviour that the
// document refers to rather than restates.  CLR and IORST clear all four.
//
// Timing: the flip flops change on the clk edge that samples CK or STRT.
module done_circuit
  import dfs_pkg::*;
(
  input  logic        clk,
  input  cmd_t        a,
  input  logic        sd,
  input  logic        bl,
  input  logic        ed,
  input  logic        data_ff,
  input  logic        bc31,
  input  logic        clock_p,   // DFS CLOCK
  input  logic        iopls,     // IOPLS to this device
  input  logic        strt,      // STRT to this device
  input  logic        clr,       // CLR to this device
  input  logic        iorst,
  input  logic        msko,
  input  logic [0:15] ac,
  input  logic        error,
  output logic        nd,
  output logic        load_data,
  output logic        done,
  output logic        busy,
  output logic        intdis,
  output logic        intreq
);

  logic ck, clio, done_nxt;

  assign nd   = (a.req_rec && sd)
              || (a.req_blk && !a.req_data && bl)
              || (a.req_data && (((!a.masked || bc31) && data_ff) || ed));
  assign ck   = clock_p || iopls;
  assign clio = clr || iorst;

  assign done_nxt  = !clio && (((done || (busy && nd && ck)) && !strt)
                               || ((busy || strt) && error));
  assign load_data = !clio && !done && busy && nd && ck && !strt && !error;

  always_ff @(posedge clk) begin
    if (clio) begin
      done   <= 1'b0;
      busy   <= 1'b0;
      intdis <= 1'b0;
      intreq <= 1'b0;
    end else begin
      done <= done_nxt;
      if (strt)          busy <= 1'b1;
      else if (done_nxt) busy <= 1'b0;
      if (msko) intdis <= ac[10];
      intreq <= done && !intdis && !strt;
    end
  end

endmodule
