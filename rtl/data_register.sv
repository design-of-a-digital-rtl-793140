// data_register: the 16-bit data register BB0..BB15.
//
// When DONE is set by requested data and no error is present (load), the
// DATA LINES are gated in: BB(0-13) <- TRF(4-17), BB14 <- TRFP, BB15 <- TRFB.
// After an error the register holds a NOVA jump instruction instead:
//   ERROR.STRT   : BB(0-15) <- 0
//   ERROR.BUSY   : BB7 <- 1, BB15 <- 1      JMP .+1 (LATE)
//   (CUT+IMS).BUSY : BB14 <- 1              JMP .+3 (CUT)
//   IMS.BUSY     : BB13 <- 1                JMP .+7 (IMS)
// so the program reads the word after STRT and executes it to reach the
// recovery routine of the worst error.  STRT sets BUSY in the same cycle, so
// here the set terms use BUSY + STRT and the jump word is formed on the STRT
// edge.  CLR (to this device) and IORST clear the register.
//
// Timing: one clk edge after load or STRT.
module data_register
  import dfs_pkg::*;
(
  input  logic        clk,
  input  trf_lines_t  trf,
  input  logic        load,
  input  logic        strt,     // STRT to this device
  input  logic        busy,
  input  logic        late,
  input  logic        cut,
  input  logic        ims,
  input  logic        clr,      // CLR to this device
  input  logic        iorst,
  output logic [0:15] bb
);

  logic        error, busy_eff;
  logic [0:15] nxt;

  assign error    = late || cut || ims;
  assign busy_eff = busy || strt;

  always_comb begin
    nxt = bb;
    if (load && !error) nxt = {trf.trf, trf.trfp, trf.trfb};
    if (error && strt)  nxt = '0;
    if (error && busy_eff) begin
      nxt[7]  = 1'b1;
      nxt[15] = 1'b1;
    end
    if ((cut || ims) && busy_eff) nxt[14] = 1'b1;
    if (ims && busy_eff)          nxt[13] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (iorst || clr) bb <= '0;
    else              bb <= nxt;
  end

endmodule
