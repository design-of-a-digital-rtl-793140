// mask_shift_register: the 32-bit channel mask BC0..BC31.
//
// DOB loads the B half, BC0..BC15, and DOC the C half, BC16..BC31, from the
// accumulator.  A shift rotates the whole register right by one place:
// BC(n+1 mod 32) <- BC(n), so BC0 <- BC31.  The mask bit of the channel now on
// the DATA LINES is always at BC31: with the mask of channel n loaded into
// BC(31-n), BC31 holds the mask bit of channel 0 before the first shift, and
// after 32 shifts (one data block) the register is back where it started.
// The shift enable is DATA.CLOCK + IOPLS.SELDFS, formed outside.
// CLR (to this device) and IORST clear it.  A load and a shift in the same
// cycle (a combined DOBP instruction) load first and then shift.
//
// Timing: changes on the clk edge that samples the strobe.
module mask_shift_register
  import dfs_pkg::*;
(
  input  logic        clk,
  input  logic        datob,    // DOB to this device
  input  logic        datoc,    // DOC to this device
  input  logic        shift,    // DATA.CLOCK + IOPLS.SELDFS
  input  logic        clr,      // CLR to this device
  input  logic        iorst,
  input  logic [0:15] ac,
  output logic [0:31] bc,
  output logic        bc31
);

  logic [0:31] loaded;

  always_comb begin
    loaded = bc;
    if (datob) loaded[0:15]  = ac;
    if (datoc) loaded[16:31] = ac;
  end

  always_ff @(posedge clk) begin
    if (iorst || clr) bc <= '0;
    else if (shift)   bc <= {loaded[31], loaded[0:30]};
    else              bc <= loaded;
  end

  assign bc31 = bc[31];

endmodule
