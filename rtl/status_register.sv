// status_register: the 16-bit status word CC0..CC15 and the two parity flip
// flops PEF and SPEF that only it holds.
//
//   CC0 EDF   CC1 SDF   CC2 DATA  CC3..CC7 S0..S4  CC8 NOVA DFS
//   CC9 IMS   CC10 CUT  CC11 LATE CC12 INTDIS CC13 INTREQ CC14 PEF CC15 SPEF
//
//   PEF  <- (PES + PEF./CLOCK)              parity error of the word on the lines
//   SPEF <- (SPEF + PEF.ND.CLOCK)./STRT     parity error of the word the NOVA got
// PES comes about 4 us before the CLOCK of the same word, so at that CLOCK
// PEF holds that word's parity result; the CLOCK copies it into SPEF when the
// word is a requested one and clears PEF for the next word.  SPEF is cleared
// by STRT, when the program has taken the word.  CLR (to this device) and
// IORST clear both.  The other bits are only gathered here.
//
// Timing: PEF and SPEF change on the clk edge that samples PES or CLOCK.
module status_register
  import dfs_pkg::*;
(
  input  logic       clk,
  input  logic       edf,
  input  logic       sdf,
  input  logic       data_ff,
  input  logic [0:4] s,
  input  logic       nova_dfs,
  input  logic       ims,
  input  logic       cut,
  input  logic       late,
  input  logic       intdis,
  input  logic       intreq,
  input  logic       pes,
  input  logic       clock_p,
  input  logic       nd,
  input  logic       strt,      // STRT to this device
  input  logic       clr,       // CLR to this device
  input  logic       iorst,
  output status_t    cc
);

  logic pef, spef;

  always_ff @(posedge clk) begin
    if (iorst || clr) begin
      pef  <= 1'b0;
      spef <= 1'b0;
    end else begin
      pef  <= pes || (pef && !clock_p);
      spef <= (spef || (pef && nd && clock_p)) && !strt;
    end
  end

  always_comb begin
    cc.edf     = edf;
    cc.sdf     = sdf;
    cc.data    = data_ff;
    cc.s       = s;
    cc.novadfs = nova_dfs;
    cc.ims     = ims;
    cc.cut     = cut;
    cc.late    = late;
    cc.intdis  = intdis;
    cc.intreq  = intreq;
    cc.pef     = pef;
    cc.spef    = spef;
  end

endmodule
