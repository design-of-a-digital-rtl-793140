// command_register: the 8-bit command register A0..A7 of the DFS interface.
//
// The NOVA writes it with DOA.  AC bits 8 and 9 of the written word choose one
// of three transfers, as the interface description gives them:
//   AC8=0, AC9=0 : A(0-7) <- AC(0-7)            (load)
//   AC8=1, AC9=0 : A(n)   <- A(n) OR AC(n)      (set the bits that are 1)
//   AC9=1        : A(n)   <- A(n) AND NOT AC(n) (clear the bits that are 1)
// CLR (NIOC to this device) clears A4..A7 and keeps A0..A3; IORST clears all.
// When DOA and CLR arrive in the same cycle (a combined DOAC instruction) the
// transfer is made first and the clear applied on top of it, so CLR wins.
//
// Interface: all strobes are one clk cycle long and already device-selected.
// Timing: the register changes on the clk edge that samples the strobe.
// The single-clock synchronous form is this design's choice; the document
// describes flip flops set directly by the I/O pulses.
module command_register
  import dfs_pkg::*;
(
  input  logic        clk,
  input  logic        datoa,     // DOA to this device
  input  logic        clr,       // CLR to this device
  input  logic        iorst,     // I/O reset, all devices
  input  logic [0:15] ac,        // accumulator word on the data bus
  output cmd_t        a
);

  logic [0:7] nxt;

  always_comb begin
    nxt = a;
    if (datoa) begin
      unique casez ({ac[8], ac[9]})
        2'b00:   nxt = ac[0:7];
        2'b10:   nxt = a | ac[0:7];
        default: nxt = a & ~ac[0:7];
      endcase
    end
    if (clr) nxt[4:7] = '0;
  end

  always_ff @(posedge clk) begin
    if (iorst) a <= '0;
    else       a <= nxt;
  end

endmodule
