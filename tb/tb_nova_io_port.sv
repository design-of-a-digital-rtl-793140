// tb_nova_io_port: self-checking test of device selection and the data-in
// multiplexer.  For random device codes and strobes it checks that the
// device-specific strobes pass only for this device's code, that IORST and
// MSKO always pass, and that DIA/DIB/DIC return A+PDF, BB or B, CC or C as A7
// selects, and zero otherwise.
module tb_nova_io_port;
  import dfs_pkg::*;

  localparam logic [0:5] CODE = 6'o30;   // the default device code

  logic [0:5]    ds;
  nova_strobes_t bus, dev;
  cmd_t          a;
  logic [0:7]    pdf;
  logic [0:15]   bb;
  logic [0:31]   bc;
  status_t       cc;
  logic          seldfs;
  logic [0:15]   data_in;
  int checks = 0, failures = 0;

  nova_io_port dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk16(input logic [0:15] got, input logic [0:15] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic        sel;
      logic [0:15] exp;
      nova_strobes_t e;
      ds  = ($urandom_range(0, 1) == 0) ? CODE : 6'($urandom);
      bus = '0;
      case ($urandom_range(0, 3))
        0: bus.datia = 1;
        1: bus.datib = 1;
        2: bus.datic = 1;
        default: bus = nova_strobes_t'($urandom);
      endcase
      a   = cmd_t'($urandom);
      pdf = 8'($urandom);
      bb  = 16'($urandom);
      bc  = $urandom;
      cc  = status_t'($urandom);
      #1;
      sel = (ds == CODE);
      checks++;
      if (seldfs !== sel) begin failures++; $display("FAIL SELDFS"); end
      e = sel ? bus : '0;
      e.iorst = bus.iorst;
      e.msko  = bus.msko;
      checks++;
      if (dev !== e) begin failures++; $display("FAIL strobes %b %b", dev, e); end
      exp = '0;
      if (sel && bus.datia) exp = {a, pdf};
      if (sel && bus.datib) exp = a.test_bc ? bc[0:15] : bb;
      if (sel && bus.datic) exp = a.test_bc ? bc[16:31] : cc;
      chk16(data_in, exp, "data in");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
