// dfs_tape_model: behavioural model of the DFS tape unit in playback and
// reverse search, for simulation only (not synthesizable).
//
// The tape holds N_REC records numbered FIRST_REC, FIRST_REC+1, ... laid out
// as dfs_tape_pkg describes.  Every WORD_CYCLES clk cycles one word is read.
// With WORD_CYCLES = 32 and a 1 MHz clk the word timing matches the DFS at
// 1 ms speed: the word is on the lines for 28 us and cleared for 4 us, PES
// (bad parity only) comes 16 us and CLOCK 20 us after the word appears.
// The transport runs forward while pbm and backward while srm; a mode_stop
// pulse stops it for RESTART_CYCLES before it runs again.  START5 is high
// while it moves.  When it stays stopped for STOPDP_CYCLES it gives a STOPDP
// pulse.  It stops by itself at either end of the tape (an accidental stop).
// inject_req asks for one extra CLOCK pulse during the next forward data word
// of channel inject_ch; injected counts how many were made.  pdf counts the
// words read with a parity error, like the DFS parity display counter.
module dfs_tape_model
  import dfs_pkg::*;
  import dfs_tape_pkg::*;
#(
  parameter int WORD_CYCLES    = 32,
  parameter int N_REC          = 4,
  parameter int FIRST_REC      = 10,
  parameter int BLOCKS         = 3,
  parameter int BLANK          = 2,
  parameter int START_REC      = 2,
  parameter int RESTART_CYCLES = 30,
  parameter int STOPDP_CYCLES  = 40
)(
  input  logic       clk,
  input  logic       srm,
  input  logic       pbm,
  input  logic       mode_stop,
  input  logic       inject_req,
  input  int         inject_ch,
  output trf_lines_t trf,
  output logic       clock_p,
  output logic       pes,
  output logic       start5,
  output logic       stopdp,
  output logic [0:7] pdf,
  output int         injected,
  output int         words_read
);

  localparam int LEN = rec_len(BLOCKS, BLANK);

  int   r = START_REC;
  int   w = 0;
  bit   pending_stop = 0;
  int   stopped = 0;

  initial begin
    trf = '0; clock_p = 0; pes = 0; start5 = 0; stopdp = 0; pdf = '0;
    injected = 0; words_read = 0;
  end

  always @(posedge clk) if (mode_stop) pending_stop <= 1;

  task automatic idle_cycle();
    start5 <= 0;
    trf    <= '0;
    @(posedge clk);
    if (!(pbm || srm)) begin
      stopped++;
      if (stopped == STOPDP_CYCLES) begin
        stopdp <= 1;
        @(posedge clk);
        stopdp <= 0;
      end
    end else stopped = 0;
  endtask

  task automatic play(input tape_word_t t, input logic extra);
    for (int p = 0; p < WORD_CYCLES; p++) begin
      trf     <= (p < WORD_CYCLES - WORD_CYCLES / 8) ? to_lines(t) : '0;
      pes     <= (p == WORD_CYCLES / 2) && (t.p == ^t.bits);
      clock_p <= (p == WORD_CYCLES * 5 / 8) || (extra && p == WORD_CYCLES * 5 / 8 + 4);
      @(posedge clk);
    end
    pes <= 0; clock_p <= 0;
    if (t.p == ^t.bits) pdf <= pdf + 8'd1;
    words_read++;
  endtask

  always begin
    tape_word_t t;
    int blk, ch;
    logic extra;
    if (pending_stop) begin
      pending_stop = 0;
      repeat (RESTART_CYCLES) idle_cycle();
    end else if (pbm && !(r >= N_REC)) begin
      if (start5 == 0 && stopped > 0) repeat (RESTART_CYCLES) idle_cycle();
      stopped = 0;
      start5 <= 1;
      t = make_word(FIRST_REC + r, w, BLOCKS, BLANK, blk, ch);
      extra = inject_req && ch == inject_ch && ch > 0;
      if (extra) injected++;
      play(t, extra);
      w++;
      if (w == LEN) begin w = 0; r++; end
    end else if (srm && !(r == 0 && w == 0)) begin
      if (start5 == 0 && stopped > 0) repeat (RESTART_CYCLES) idle_cycle();
      stopped = 0;
      start5 <= 1;
      if (w == 0) begin r--; w = LEN; end
      w--;
      t = make_word(FIRST_REC + r, w, BLOCKS, BLANK, blk, ch);
      play(t, 1'b0);
    end else begin
      // Stopped, or at an end of the tape: the lines stay clear.
      start5 <= 0;
      trf <= '0;
      @(posedge clk);
      stopped++;
      if (stopped == STOPDP_CYCLES) begin
        stopdp <= 1;
        @(posedge clk);
        stopdp <= 0;
      end
    end
  end

endmodule
