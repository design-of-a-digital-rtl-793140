// tb_memory_load: workload test. A NOVA loading program takes the selected
// channels of one whole record into a 32K-word memory, in several passes.
//
// The program follows the loading procedure the interface was built for:
//   SUB1  clear and start the device, send the command and the mask;
//   SUB2  test NOVA DFS in the status word;
//   SUB3  request record numbers. If the first one is past the wanted record
//         SRC, search in reverse. Then request block numbers in playback
//         until block SBL arrives;
//   SUB4  request the data of the unmasked channels;
//   SUB5-11  take each word and its status. A block word (K = 0) gives the
//         new block number. A data word is stored, and its address goes to the
//         parity table when SPEF is set;
//   SUB12 when memory is full: stop the tape, keep the current block number
//         as the next SBL, drop the data of that block, and "transmit" the
//         memory;
//   then start again at SUB1, until the end-of-data word is read.
// The tape is positioned at the start of the record after SRC, so every pass
// needs a reverse search. The record has 5000 blocks and 8 channels are
// selected besides channel 0. The data area holds 24 576 words, so the
// record needs two passes. The transmitted stream must equal the selected
// channel words of blocks SBL..4999 in tape order, with their parity flags.
module tb_memory_load;
  import dfs_pkg::*;
  import dfs_tape_pkg::*;

  localparam logic [0:5] CODE = 6'o30;
  localparam int W      = 32;
  localparam int BLOCKS = 5000;
  localparam int BLANK  = 500;
  localparam int FIRST  = 40;
  localparam int SRC    = 41;        // wanted record
  localparam int SBL0   = 100;       // first wanted block
  localparam int FDT    = 4096;      // data area: FDT .. FPE-1
  localparam int FPE    = 28672;     // parity table: FPE .. 32767
  localparam int MEMW   = 32768;

  logic          clk = 0;
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

  dfs_tape_model #(.WORD_CYCLES(W), .N_REC(3), .FIRST_REC(FIRST), .BLOCKS(BLOCKS),
                   .BLANK(BLANK), .START_REC(2)) tape (
    .clk, .srm(dfs_srm), .pbm(dfs_pbm), .mode_stop, .inject_req(1'b0), .inject_ch(0),
    .trf, .clock_p, .pes, .start5, .stopdp, .pdf, .injected, .words_read
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- NOVA I/O ----------------
  task automatic io(input nova_strobes_t s, input logic [0:15] w, output logic [0:15] r);
    ds = CODE; bus = s; data_out = w;
    #1 r = data_in;
    @(posedge clk);
    #1 bus = '0; data_out = '0;
  endtask

  // kind: 0 load, 1 set bits, 2 clear bits.
  task automatic doa(input logic [0:7] bits, input int kind);
    nova_strobes_t s; logic [0:15] r;
    s = '0; s.datoa = 1;
    io(s, {bits, kind == 1, kind == 2, 6'b0}, r);
  endtask
  task automatic dob(input logic [0:15] w); nova_strobes_t s; logic [0:15] r; s = '0; s.datob = 1; io(s, w, r); endtask
  task automatic doc(input logic [0:15] w); nova_strobes_t s; logic [0:15] r; s = '0; s.datoc = 1; io(s, w, r); endtask
  task automatic dib(output logic [0:15] r); nova_strobes_t s; s = '0; s.datib = 1; io(s, '0, r); endtask
  task automatic dic(output logic [0:15] r); nova_strobes_t s; s = '0; s.datic = 1; io(s, '0, r); endtask
  task automatic nios(); nova_strobes_t s; logic [0:15] r; s = '0; s.strt = 1; io(s, '0, r); endtask
  task automatic nioc(); nova_strobes_t s; logic [0:15] r; s = '0; s.clr = 1; io(s, '0, r); endtask

  // SUB5 and SUB6: wait for DONE, take the word and the status, STRT, and
  // test DONE again.
  task automatic receive(output logic [0:15] bb, output status_t st, output bit err);
    int n;
    logic [0:15] c;
    n = 0;
    while (!done && n < 12 * BLOCKS * 32 * W) begin @(posedge clk); #1; n++; end
    chk(done, $sformatf("DONE within the time limit (A=%b)", dut.a));
    dib(bb);
    dic(c); st = c;
    nios();
    err = done;
  endtask

  // ---------------- memory and results ----------------
  logic [0:15] mem [MEMW];
  logic [0:15] sent_word [$];
  bit          sent_pe [$];
  logic [0:31] msk, bcload;
  int          nsel;

  function automatic bit selected(input int ch);
    return msk[ch];
  endfunction

  initial begin
    logic [0:15] bb;
    status_t st;
    bit err, finished;
    int rc, sbl, frc, blk, k, ldt, lpe, blk_ldt, blk_lpe, passes, reverses, nerr, ww, bch;
    tape_word_t t;

    ds = '0; bus = '0; data_out = '0; set_btn = 0; reset_btn = 0;
    repeat (2) @(posedge clk);
    #1;
    ds = 6'o77; bus = '0; bus.iorst = 1; @(posedge clk); #1 bus = '0;
    set_btn = 1; @(posedge clk); #1 set_btn = 0;

    // Mask: channel 0 and eight data channels.
    msk = '0;
    foreach (msk[n]) if (n inside {0, 1, 2, 3, 5, 8, 13, 21, 31}) msk[n] = 1'b1;
    for (int n = 0; n < 32; n++) bcload[31 - n] = msk[n];
    nsel = $countones(msk) - 1;

    rc = SRC; sbl = SBL0; finished = 0; passes = 0; reverses = 0; nerr = 0;
    while (!finished) begin
      passes++;
      // SUB1: clear, command ON RUN playback masked, mask, start.
      nioc();
      doa(8'b1101_0000, 0);
      dob(bcload[0:15]);
      doc(bcload[16:31]);
      nios();
      // SUB2: NOVA DFS must be set.
      begin logic [0:15] c; dic(c); st = c; end
      chk(st.novadfs, "NOVA DFS set");

      // SUB3: record search.
      doa(8'b0000_1000, 1);
      receive(bb, st, err);
      chk(!err, "no error in record search");
      frc = int'(bb[4:13]);
      if (frc > rc) begin
        doa(8'b0010_0000, 1);
        reverses++;
      end
      while (frc != rc) begin
        receive(bb, st, err);
        chk(!err, "no error in record search");
        frc = int'(bb[4:13]);
      end
      // Playback, block numbers only.
      doa(8'b1101_0100, 0);
      do begin
        receive(bb, st, err);
        chk(!err, "no error in block search");
        chk(bb[15], "block search returns block words");
      end while (int'(bb[0:13]) != sbl);
      blk = sbl;

      // SUB4: unmasked channel data.
      doa(8'b1101_0010, 0);
      k = nsel;
      ldt = FDT; lpe = FPE;
      blk_ldt = ldt; blk_lpe = lpe;
      forever begin
        receive(bb, st, err);                       // SUB5, SUB6
        if (err) begin nerr++; break; end           // SUB7
        if (st.edf) begin finished = 1; break; end  // SUB8
        if (k == 0) begin                           // SUB9: block number
          chk(bb[15] && int'(bb[0:13]) == blk + 1, "next block number");
          blk = int'(bb[0:13]);
          k = nsel;
          blk_ldt = ldt; blk_lpe = lpe;
        end else begin                              // SUB10: store
          chk(!bb[15], "data word");
          mem[ldt] = bb;
          if (st.spef) begin mem[lpe] = 16'(ldt); lpe++; end
          ldt++;
          k--;
          if (ldt == FPE || lpe == MEMW) break;     // SUB11: memory full
        end
      end
      // SUB12: stop; data of an unfinished block is dropped.
      doa(8'b0100_0000, 2);
      if (!finished) begin
        sbl = blk;
        ldt = blk_ldt; lpe = blk_lpe;
      end
      // SUB13: transmit the data and mark the words the parity table names.
      begin
        bit pe [MEMW];
        pe = '{default: 1'b0};
        for (int q = FPE; q < lpe; q++) pe[int'(mem[q])] = 1'b1;
        for (int a = FDT; a < ldt; a++) begin
          sent_word.push_back(mem[a]);
          sent_pe.push_back(pe[a]);
        end
      end
      $display("pass %0d: %0d words, next block %0d, t=%0t", passes, ldt - FDT, sbl, $time);
      if (passes > 6) break;
    end

    // The stream must be the selected words of blocks SBL0..BLOCKS-1.
    begin
      int i;
      i = 0;
      for (int b = SBL0; b < BLOCKS; b++)
        for (int ch = 1; ch < 32; ch++)
          if (selected(ch)) begin
            ww = 1 + BLANK + 32 * b + ch;
            t = make_word(SRC, ww, BLOCKS, BLANK, blk, bch);
            if (i < sent_word.size()) begin
              chk(sent_word[i] == to_bb(t), $sformatf("word %0d (block %0d ch %0d)", i, b, ch));
              chk(sent_pe[i] == bad_parity(SRC, b, ch), $sformatf("parity flag %0d", i));
            end
            i++;
          end
      chk(sent_word.size() == i, $sformatf("%0d words sent, %0d expected", sent_word.size(), i));
    end
    chk(finished, "end of data reached");
    chk(nerr == 0, "no error jump");
    chk(passes >= 2, "memory filled and loading resumed");
    chk(reverses == passes, "reverse search in every pass");
    $display("passes=%0d reverse_searches=%0d words=%0d", passes, reverses, sent_word.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
