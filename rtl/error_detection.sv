// error_detection: LATE, CUT and IMS error flip flops, the synchronization
// counter S and the ERROR signal.
//
//   LATE <- (LATE + ND.DONE.CLOCK) . A0
//           requested data arrived while the last word was still unread
//   CUT  <- (CUT + (NOVA DFS falling)) . A0
//           the operator or an accidental stop cut the link
//   IMS  <- (IMS + (S != 0).(BL rising)) . A0
//           a block number arrived while S was not back at zero
//   ERROR = LATE + CUT + IMS
// All three are also cleared by CLR (to this device) and IORST.
// S is a 5-bit counter modulo 32: cleared while DATA = 0, counting once per
// channel word (DATA.CLOCK).  The description of NIOP also lists "incrementing
// the synchronization counter" among the jobs of IOPLS, so IOPLS (to this
// device) counts it too while DATA = 1, keeping S in step with the mask-shift
// register that IOPLS also shifts.  S0 is the most significant bit.
// The edges of NOVA DFS and BL are found by comparing with the value one clk
// earlier.
//
// Timing: the flip flops change on the clk edge that samples the condition.
module error_detection
  import dfs_pkg::*;
(
  input  logic       clk,
  input  logic       a0,        // ON/OFF bit of the command register
  input  logic       nd,
  input  logic       done,
  input  logic       clock_p,
  input  logic       iopls,     // IOPLS to this device
  input  logic       nova_dfs,
  input  logic       bl,
  input  logic       data_ff,
  input  logic       clr,       // CLR to this device
  input  logic       iorst,
  output logic       late,
  output logic       cut,
  output logic       ims,
  output logic       error,
  output logic [0:4] s
);

  logic nova_dfs_q, bl_q;
  logic clear;

  assign clear = !a0 || clr || iorst;
  assign error = late || cut || ims;

  always_ff @(posedge clk) begin
    nova_dfs_q <= nova_dfs;
    bl_q       <= bl;
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      late <= 1'b0;
      cut  <= 1'b0;
      ims  <= 1'b0;
    end else begin
      if (nd && done && clock_p)      late <= 1'b1;
      if (nova_dfs_q && !nova_dfs)    cut  <= 1'b1;
      if (bl && !bl_q && (s != '0))   ims  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (iorst || clr || !data_ff)  s <= '0;
    else if (clock_p || iopls)     s <= s + 5'd1;
  end

endmodule
