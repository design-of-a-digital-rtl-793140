// tb_mask_shift_register: self-checking test of the 32-bit mask register.
// Loads a random channel mask in the order the rotation expects (mask bit of
// channel n in BC(31-n)), then shifts 32 times and checks that BC31 shows the
// mask bit of channel 0, 1, ... 31 in turn and that the register is back to
// its original content after a full block.  Then random DOB/DOC/shift/CLR
// traffic against a reference model of the rotate-right rule.
module tb_mask_shift_register;
  import dfs_pkg::*;

  logic        clk = 0;
  logic        datob, datoc, shift, clr, iorst;
  logic [0:15] ac;
  logic [0:31] bc;
  logic        bc31;
  logic [0:31] model, msk, start;
  int checks = 0, failures = 0;

  mask_shift_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk32(input logic [0:31] got, input logic [0:31] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic tick(input logic b, c, s, cl, r, input logic [0:15] w);
    datob = b; datoc = c; shift = s; clr = cl; iorst = r; ac = w;
    @(posedge clk);
    if (r || cl) model = '0;
    else begin
      if (b) model[0:15] = w;
      if (c) model[16:31] = w;
      if (s) model = {model[31], model[0:30]};
    end
    #1;
    datob = 0; datoc = 0; shift = 0; clr = 0; iorst = 0;
    chk32(bc, model, "BC");
  endtask

  initial begin
    model = '0;
    tick(0, 0, 0, 0, 1, '0);
    msk = $urandom;
    for (int n = 0; n < 32; n++) start[31 - n] = msk[n];
    tick(1, 0, 0, 0, 0, start[0:15]);
    tick(0, 1, 0, 0, 0, start[16:31]);
    for (int n = 0; n < 32; n++) begin
      checks++;
      if (bc31 !== msk[n]) begin
        failures++;
        $display("FAIL BC31 at channel %0d", n);
      end
      tick(0, 0, 1, 0, 0, '0);
    end
    chk32(bc, start, "back to original after 32 shifts");
    for (int i = 0; i < 1000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      tick(r < 15, r >= 10 && r < 25, r >= 20 && r < 90, r == 95, r == 99, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
