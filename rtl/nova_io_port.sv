// nova_io_port: the interface's connection to the NOVA I/O bus.
//
// The NOVA puts a 6-bit device code on DS0..DS5 with every device-specific
// I/O instruction.  This block decodes SELDFS (device code equal to
// DEVICE_CODE) and passes the device-specific strobes (DATOA..DATIC, STRT,
// CLR, IOPLS) on only while SELDFS is high.  IORST and MSKO go to every
// device and pass unchanged.  It also drives the data-in bus:
//   DIA : AC(0-7) <- A(0-7),   AC(8-15) <- PDF(0-7)  (DFS parity counter)
//   DIB : AC <- BB (A7 = 0)    or B part BC(0-15)  (A7 = 1)
//   DIC : AC <- CC (A7 = 0)    or C part BC(16-31) (A7 = 1)
// and drives zero when it is not being read, so it can be ORed onto a shared
// bus.  The document does not give this device's code; DEVICE_CODE is a
// parameter.
//
// Timing: combinational.
module nova_io_port
  import dfs_pkg::*;
#(
  parameter logic [0:5] DEVICE_CODE = 6'o30
)(
  input  logic [0:5]    ds,
  input  nova_strobes_t bus,
  input  cmd_t          a,
  input  logic [0:7]    pdf,
  input  logic [0:15]   bb,
  input  logic [0:31]   bc,
  input  status_t       cc,
  output logic          seldfs,
  output nova_strobes_t dev,
  output logic [0:15]   data_in
);

  assign seldfs = (ds == DEVICE_CODE);

  always_comb begin
    dev       = bus & {11{seldfs}};
    dev.iorst = bus.iorst;
    dev.msko  = bus.msko;
  end

  always_comb begin
    data_in = '0;
    if (dev.datia) data_in = {a, pdf};
    if (dev.datib) data_in = a.test_bc ? bc[0:15]  : bb;
    if (dev.datic) data_in = a.test_bc ? bc[16:31] : cc;
  end

endmodule
