// data_recognition: tells what kind of word is on the DATA LINES.
//
// Word types, from bits 0, 1 and B of the tape format:
//   SD = TRF0 . /TRF1              start of data (record number)
//   ED = TRF0 . TRF1 . TRFB        end of data
//   BL = TRFB . DATA               block number (channel 0), playback only
// Flip flops:
//   SDF  <- SD at every CLOCK, held between CLOCKs
//   EDF  <- ED at every CLOCK, held between CLOCKs
//   DATA set while /A2 . /TRF0 . TRFB (a block word in playback mode),
//        cleared while A2 + ED (search mode or end of data).
// DATA is level-set by the word itself, before that word's CLOCK, so the
// mask-shift register and the synchronization counter already see DATA=1 at
// the CLOCK of channel 0.  SD follows the tape format table (bit0=1, bit1=0).
// CLR (to this device) and IORST clear all three flip flops.
//
// Interface: trf is the TRF register as the DFS drives it; clock_p is the DFS
// CLOCK pulse (one clk cycle).  Timing: the flip flops change on the clk edge
// after the condition; SD, BL and ED are combinational.
module data_recognition
  import dfs_pkg::*;
(
  input  logic       clk,
  input  trf_lines_t trf,
  input  logic       clock_p,
  input  logic       srm,       // A2
  input  logic       clr,       // CLR to this device
  input  logic       iorst,
  output logic       sd,
  output logic       bl,
  output logic       ed,
  output logic       sdf,
  output logic       data_ff,
  output logic       edf
);

  assign sd = trf.trf0 && !trf.trf1;
  assign ed = trf.trf0 && trf.trf1 && trf.trfb;
  assign bl = trf.trfb && data_ff;

  always_ff @(posedge clk) begin
    if (iorst || clr) begin
      sdf     <= 1'b0;
      edf     <= 1'b0;
      data_ff <= 1'b0;
    end else begin
      if (clock_p) begin
        sdf <= sd;
        edf <= ed;
      end
      if (!srm && !trf.trf0 && trf.trfb) data_ff <= 1'b1;
      else if (srm || ed)                data_ff <= 1'b0;
    end
  end

endmodule
