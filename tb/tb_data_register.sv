// tb_data_register: self-checking test of the data register.
// Checks the mapping BB(0-13) <- TRF(4-17), BB14 <- TRFP, BB15 <- TRFB on a
// load, that a load is refused while an error is present, and that STRT after
// each error leaves the jump word JMP .+1 (LATE), .+3 (CUT) or .+7 (IMS, also
// when several errors are present).
module tb_data_register;
  import dfs_pkg::*;

  logic        clk = 0;
  trf_lines_t  trf;
  logic        load, strt, busy, late, cut, ims, clr, iorst;
  logic [0:15] bb;
  int checks = 0, failures = 0;

  data_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic jump_case(input logic l, c, i, input logic [0:15] exp, input string what);
    // Error appears while BUSY is off (DONE already set), then STRT.
    late = l; cut = c; ims = i; busy = 0;
    tick();
    strt = 1; tick(); strt = 0;
    busy = 1; tick(); busy = 0; tick();
    chk16(bb, exp, what);
    late = 0; cut = 0; ims = 0;
    iorst = 1; tick(); iorst = 0;
  endtask

  initial begin
    trf = '0; {load, strt, busy, late, cut, ims, clr} = '0; iorst = 1;
    tick(); iorst = 0;
    chk16(bb, '0, "IORST");
    for (int i = 0; i < 200; i++) begin
      logic [0:15] exp;
      trf = trf_lines_t'($urandom);
      exp = {trf.trf, trf.trfp, trf.trfb};
      load = 1; tick(); load = 0;
      chk16(bb, exp, "load mapping");
      trf = trf_lines_t'($urandom);
      tick();
      chk16(bb, exp, "hold");
    end
    // A load while an error is present is refused.
    begin
      logic [0:15] prev_bb;
      prev_bb = bb;
      late = 1; trf = trf_lines_t'($urandom); load = 1; tick(); load = 0; late = 0;
      chk16(bb, prev_bb, "no load during error");
    end
    jump_case(1, 0, 0, JMP_LATE, "LATE -> JMP .+1");
    jump_case(0, 1, 0, JMP_CUT,  "CUT -> JMP .+3");
    jump_case(0, 0, 1, JMP_IMS,  "IMS -> JMP .+7");
    jump_case(1, 1, 0, JMP_CUT,  "LATE+CUT -> JMP .+3");
    jump_case(1, 1, 1, JMP_IMS,  "all -> JMP .+7");
    trf = trf_lines_t'($urandom); load = 1; tick(); load = 0;
    clr = 1; tick(); clr = 0;
    chk16(bb, '0, "CLR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
