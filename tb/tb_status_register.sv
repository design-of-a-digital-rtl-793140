// tb_status_register: self-checking test of the status word and the PEF/SPEF
// parity flip flops.  Checks the position of every status bit, that PES is
// held in PEF until the next CLOCK, that the CLOCK of a requested word moves
// it into SPEF, that an unrequested word does not, and that STRT clears SPEF.
// Random part against a reference model.
module tb_status_register;
  import dfs_pkg::*;

  logic       clk = 0;
  logic       edf, sdf, data_ff, nova_dfs, ims, cut, late, intdis, intreq;
  logic [0:4] s;
  logic       pes, clock_p, nd, strt, clr, iorst;
  status_t    cc;
  logic       m_pef, m_spef;
  int checks = 0, failures = 0;

  status_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    if (iorst || clr) begin m_pef = 0; m_spef = 0; end
    else begin
      m_spef = (m_spef | (m_pef & nd & clock_p)) & ~strt;
      m_pef  = pes | (m_pef & ~clock_p);
    end
    #1;
    begin
      logic [0:15] w;
      w = cc;
      checks++;
      if (w !== {edf, sdf, data_ff, s, nova_dfs, ims, cut, late, intdis, intreq, m_pef, m_spef}) begin
        failures++;
        $display("FAIL status word %b", w);
      end
    end
  endtask

  initial begin
    {edf, sdf, data_ff, nova_dfs, ims, cut, late, intdis, intreq, pes, clock_p, nd, strt, clr} = '0;
    s = '0; iorst = 1; m_pef = 0; m_spef = 0;
    tick(); iorst = 0;
    // Each status bit alone.
    for (int b = 0; b < 14; b++) begin
      logic [0:13] v;
      v = '0; v[b] = 1;
      {edf, sdf, data_ff, s, nova_dfs, ims, cut, late, intdis, intreq} = v;
      tick();
    end
    {edf, sdf, data_ff, s, nova_dfs, ims, cut, late, intdis, intreq} = '0;
    // Parity error on a requested word.
    pes = 1; tick(); pes = 0; tick();
    chk(cc.pef, 1, "PEF holds PES");
    nd = 1; clock_p = 1; tick(); clock_p = 0; nd = 0;
    chk(cc.spef, 1, "SPEF from PEF at CLOCK");
    chk(cc.pef, 0, "CLOCK clears PEF");
    strt = 1; tick(); strt = 0;
    chk(cc.spef, 0, "STRT clears SPEF");
    // Parity error on an unrequested word.
    pes = 1; tick(); pes = 0;
    clock_p = 1; tick(); clock_p = 0;
    chk(cc.spef, 0, "no SPEF for unrequested word");
    for (int i = 0; i < 3000; i++) begin
      {edf, sdf, data_ff, s, nova_dfs, ims, cut, late, intdis, intreq} = 14'($urandom);
      pes = ($urandom_range(0, 5) == 0);
      clock_p = ($urandom_range(0, 3) == 0);
      nd = $urandom_range(0, 1);
      strt = ($urandom_range(0, 6) == 0);
      clr = ($urandom_range(0, 50) == 0);
      iorst = ($urandom_range(0, 200) == 0);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
