// tb_command_register: self-checking test of the command register.
// Replays the worked example of the three DOA transfer types (load, OR, clear
// bits), then random DOA/CLR/IORST traffic against a reference model written
// from the transfer rules.  CLR must keep A0..A3 and clear A4..A7.
module tb_command_register;
  import dfs_pkg::*;

  logic        clk = 0;
  logic        datoa, clr, iorst;
  logic [0:15] ac;
  cmd_t        a;
  logic [0:7]  model;
  int checks = 0, failures = 0;

  command_register dut (.clk, .datoa, .clr, .iorst, .ac, .a);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic d, input logic c, input logic r, input logic [0:15] w);
    datoa = d; clr = c; iorst = r; ac = w;
    @(posedge clk);
    #1;
    if (r) model = '0;
    else begin
      if (d) begin
        if (!w[8] && !w[9]) model = w[0:7];
        else if (w[8] && !w[9]) model = model | w[0:7];
        else model = model & ~w[0:7];
      end
      if (c) model[4:7] = '0;
    end
    datoa = 0; clr = 0; iorst = 0;
  endtask

  task automatic expect_a(input logic [0:7] exp, input string what);
    checks++;
    if (a !== exp) begin
      failures++;
      $display("FAIL %s: A=%b expected %b", what, a, exp);
    end
  endtask

  initial begin
    datoa = 0; clr = 0; iorst = 0; ac = '0;
    step(0, 0, 1, '0);
    expect_a(8'b0, "after IORST");
    // Worked example: three DOA in sequence.
    step(1, 0, 0, 16'b1101010100_000000);
    expect_a(8'b11010101, "DOA load");
    step(1, 0, 0, 16'b0010101010_111111);
    expect_a(8'b11111111, "DOA OR");
    step(1, 0, 0, 16'b0000110101_101010);
    expect_a(8'b11110010, "DOA clear bits");
    // CLR keeps A0..A3.
    step(0, 1, 0, '0);
    expect_a(8'b11110000, "CLR keeps A0-A3");
    // Random traffic.
    for (int i = 0; i < 500; i++) begin
      int r;
      r = $urandom_range(0, 99);
      step(r < 70, (r >= 70 && r < 85) || r == 5, r >= 97, 16'($urandom));
      expect_a(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
