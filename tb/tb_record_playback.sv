// tb_record_playback: workload test. A whole seismic record is played back
// and the NOVA program takes every word of it, at both DFS tape speeds.
//
// A record of 4 to 5 s is 5000 blocks at 1 ms speed and 2500 blocks at 2 ms
// speed. Both are 160 000 words. Two complete interfaces run side by side on
// a 1 MHz clk: one with 32 clk cycles per tape word (1 ms), and one with 64
// (2 ms). The program for each is the same:
//   - reset, operator sets NOVA DFS, clear;
//   - all channels requested (A3 = 0, A6 = 1);
//   - playback starts at the beginning of the record;
//   - every block word and channel word is taken with DIB, its status with
//     DIC, then NIOS.
// The program waits RESP = W - 8 clk cycles after each DONE before it
// answers. That is close to the limit of one word time per word that the
// program must keep to, so this also shows that a slow but timely program
// never sees LATE.
// The test checks each word against the tape contents. It also checks that
// SPEF marks the words recorded with a parity error, that no error ever
// holds DONE, that the block count is right and that the end-of-data word
// arrives. At the end, the DFS parity display counter must agree with the
// number of parity errors seen.
module tb_record_playback;
  import dfs_pkg::*;
  import dfs_tape_pkg::*;

  localparam logic [0:5] CODE = 6'o30;
  localparam int RECNO = 321;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit finished [2] = '{0, 0};

  initial begin
    repeat (5400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar sp = 0; sp < 2; sp++) begin : g_speed
    localparam int W      = 32 * (sp + 1);
    localparam int BLOCKS = 5000 / (sp + 1);
    localparam int BLANK  = 500 / (sp + 1);   // about 0.5 s of blank words
    localparam int RESP   = W - 8;            // program delay before it answers

    logic [0:5]    ds;
    nova_strobes_t bus;
    logic [0:15]   data_out, data_in;
    logic          done, busy, intreq, seldfs;
    trf_lines_t    trf;
    logic          clock_p, pes, start5, stopdp;
    logic [0:7]    pdf;
    logic          set_btn, reset_btn;
    logic          nova_dfs, on_lamp, dfs_stop, dfs_srm, dfs_pbm, mode_stop, pss_inhibit;
    int            injected, words_read;

    dfs_interface dut (
      .clk, .ds, .bus, .data_out, .data_in, .done, .busy, .intreq, .seldfs,
      .trf, .clock_p, .pes, .pdf, .start5, .stopdp,
      .nova_dfs_set_btn(set_btn), .nova_dfs_reset_btn(reset_btn),
      .nova_dfs, .on_lamp, .dfs_stop, .dfs_srm, .dfs_pbm, .mode_stop, .pss_inhibit
    );

    dfs_tape_model #(.WORD_CYCLES(W), .N_REC(1), .FIRST_REC(RECNO), .BLOCKS(BLOCKS),
                     .BLANK(BLANK), .START_REC(0)) tape (
      .clk, .srm(dfs_srm), .pbm(dfs_pbm), .mode_stop, .inject_req(1'b0), .inject_ch(0),
      .trf, .clock_p, .pes, .start5, .stopdp, .pdf, .injected, .words_read
    );

    task automatic chk(input logic ok, input string what);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 20) $display("FAIL W=%0d %s (t=%0t)", W, what, $time);
      end
    endtask

    task automatic io(input nova_strobes_t s, input logic [0:15] w, output logic [0:15] r);
      ds = CODE; bus = s; data_out = w;
      #1 r = data_in;
      @(posedge clk);
      #1 bus = '0; data_out = '0;
    endtask

    task automatic strobe(input int which, input logic [0:15] w, output logic [0:15] r);
      nova_strobes_t s;
      s = '0;
      case (which)
        0: s.datoa = 1;
        1: s.datib = 1;
        2: s.datic = 1;
        3: s.strt  = 1;
        4: s.clr   = 1;
        default: ;
      endcase
      io(s, w, r);
    endtask

    initial begin
      logic [0:15] bb, r;
      status_t st;
      tape_word_t t;
      int blk, ch, n, wait_max, nwords, nblocks, nspef, nbad, ned;

      ds = '0; bus = '0; data_out = '0; set_btn = 0; reset_btn = 0;
      repeat (2) @(posedge clk);
      #1;
      ds = 6'o77; bus = '0; bus.iorst = 1; @(posedge clk); #1 bus = '0;
      set_btn = 1; @(posedge clk); #1 set_btn = 0;
      strobe(4, '0, r);
      // ON, RUN, playback, mask off, data requested.
      strobe(0, {8'b1100_0010, 8'b0}, r);
      strobe(3, '0, r);

      nwords = 0; nblocks = 0; nspef = 0; nbad = 0; ned = 0; wait_max = 0;
      // Word 0 is the record number and the blank words follow it. Neither
      // is requested, so the first word that arrives is block 0.
      for (int w = 1 + BLANK; ned < 2; w++) begin
        t = make_word(RECNO, w, BLOCKS, BLANK, blk, ch);
        n = 0;
        while (!done && n < (w == 1 + BLANK ? BLANK + 40 : 2) * W) begin @(posedge clk); #1; n++; end
        if (n > wait_max) wait_max = n;
        chk(done, $sformatf("DONE for word %0d", w));
        // A slow program: it answers only RESP cycles after DONE, which
        // leaves the next word's CLOCK just a few cycles of margin.
        repeat (RESP) @(posedge clk);
        #1;
        strobe(1, '0, bb);
        strobe(2, '0, r); st = r;
        strobe(3, '0, r);
        chk(!done, $sformatf("no error after word %0d", w));
        chk(bb == to_bb(t), $sformatf("word %0d: got %h want %h", w, bb, to_bb(t)));
        chk(st.spef == (blk >= 0 && bad_parity(RECNO, blk, ch)), $sformatf("SPEF word %0d", w));
        chk(st.late == 0 && st.cut == 0 && st.ims == 0, "no error flags");
        if (st.spef) nspef++;
        if (blk >= 0 && bad_parity(RECNO, blk, ch)) nbad++;
        if (ch == 0) begin
          nblocks++;
          // The block word's own CLOCK has already been counted: S = 1.
          chk(st.s == 5'd1, "S in step at a block word");
        end
        if (blk < 0) begin
          ned++;
          chk(st.edf, "EDF at end of data");
        end
        nwords++;
      end

      chk(nblocks == BLOCKS, $sformatf("%0d blocks taken", nblocks));
      chk(nwords == 32 * BLOCKS + 2, $sformatf("%0d words taken", nwords));
      chk(nspef > 0 && nspef == nbad, "parity errors flagged");
      chk(pdf == 8'(nbad), "DFS parity counter agrees");
      $display("W=%0d: %0d blocks, %0d words, %0d parity errors, longest wait %0d cycles",
               W, nblocks, nwords, nspef, wait_max);
      finished[sp] = 1;
    end
  end

  initial begin
    wait (finished[0] && finished[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
