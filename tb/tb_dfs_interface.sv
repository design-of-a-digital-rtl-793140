// tb_dfs_interface: end-to-end test of the DFS interface with a behavioural
// tape unit and a NOVA program written as tasks.
//
// The program follows the loading procedure the interface was designed for:
//  1. reset, operator sets NOVA DFS, clear, test the mask-shift register
//     through DIB/DIC with A7 = 1 and rotate it with NIOP;
//  2. load the channel mask, start playback, request record numbers (A4);
//  3. the first record number is above the wanted one, so switch to reverse
//     search (A2) until the wanted record number is read;
//  4. playback with block numbers requested (A5) until the wanted block;
//  5. request channel data (A6) and check every unmasked word, its parity
//     flag SPEF, and the end-of-data word with EDF;
//  6. provoke each error and check the jump word: LATE (the program does not
//     answer), IMS (an extra CLOCK from the tape), CUT (operator reset), and
//     an accidental stop at the end of the tape;
//  7. interrupts: INTREQ follows DONE while INTDIS = 0, and MSKO masks it.
// Every mechanism is counted, and one that never happened counts a failure.
// The top runs with its default parameters.
module tb_dfs_interface;
  import dfs_pkg::*;
  import dfs_tape_pkg::*;

  localparam logic [0:5] CODE = 6'o30;
  localparam int W      = 32;   // clk cycles per tape word (1 us clk, 1 ms speed)
  localparam int BLOCKS = 3;
  localparam int BLANK  = 2;
  localparam int FIRST  = 10;
  localparam int NREC   = 4;
  localparam int SRC    = 11;   // wanted record number
  localparam int SBL    = 1;    // wanted block number

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
  logic          inject_req;
  int            inject_ch, injected, words_read;

  dfs_interface dut (
    .clk, .ds, .bus, .data_out, .data_in, .done, .busy, .intreq, .seldfs,
    .trf, .clock_p, .pes, .pdf, .start5, .stopdp,
    .nova_dfs_set_btn(set_btn), .nova_dfs_reset_btn(reset_btn),
    .nova_dfs, .on_lamp, .dfs_stop, .dfs_srm, .dfs_pbm, .mode_stop, .pss_inhibit
  );

  dfs_tape_model #(.WORD_CYCLES(W), .N_REC(NREC), .FIRST_REC(FIRST), .BLOCKS(BLOCKS),
                   .BLANK(BLANK), .START_REC(2)) tape (
    .clk, .srm(dfs_srm), .pbm(dfs_pbm), .mode_stop, .inject_req, .inject_ch,
    .trf, .clock_p, .pes, .start5, .stopdp, .pdf, .injected, .words_read
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rec_found = 0, n_reverse = 0, n_block = 0, n_data = 0, n_masked = 0, n_ed = 0;
  int n_late = 0, n_ims = 0, n_cut = 0, n_accident = 0, n_spef = 0, n_intreq = 0;
  int n_intdis = 0, n_iopls = 0, n_mode_stop = 0, n_a7 = 0, n_latency = 0;
  bit intdis_phase = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- monitors ----------------
  logic clock_q, iopls_q, done_q;
  always @(posedge clk) begin
    clock_q <= clock_p;
    iopls_q <= bus.iopls && seldfs;
    done_q  <= done;
    if (mode_stop) n_mode_stop++;
    if (intreq) n_intreq++;
    if (intdis_phase) begin
      checks++;
      if (intreq) begin failures++; $display("FAIL INTREQ while INTDIS"); end
      if (done) n_intdis++;
    end
    // DONE rises one clk after a CLOCK or IOPLS, or from an error.
    if (done && !done_q && !(dut.u_err.error)) begin
      checks++;
      n_latency++;
      if (!(clock_q || iopls_q)) begin
        failures++;
        $display("FAIL DONE rose without CLOCK the cycle before (t=%0t)", $time);
      end
    end
  end

  // ---------------- NOVA I/O tasks ----------------
  task automatic io(input nova_strobes_t s, input logic [0:15] w, output logic [0:15] r);
    ds = CODE; bus = s; data_out = w;
    #1 r = data_in;
    @(posedge clk);
    #1 bus = '0; data_out = '0;
  endtask

  task automatic doa(input logic [0:7] bits, input logic [1:0] kind);
    nova_strobes_t s; logic [0:15] r;
    s = '0; s.datoa = 1;
    io(s, {bits, kind == 1, kind == 2, 6'b0}, r);
  endtask
  task automatic dob(input logic [0:15] w); nova_strobes_t s; logic [0:15] r; s = '0; s.datob = 1; io(s, w, r); endtask
  task automatic doc(input logic [0:15] w); nova_strobes_t s; logic [0:15] r; s = '0; s.datoc = 1; io(s, w, r); endtask
  task automatic dia(output logic [0:15] r); nova_strobes_t s; s = '0; s.datia = 1; io(s, '0, r); endtask
  task automatic dib(output logic [0:15] r); nova_strobes_t s; s = '0; s.datib = 1; io(s, '0, r); endtask
  task automatic dic(output logic [0:15] r); nova_strobes_t s; s = '0; s.datic = 1; io(s, '0, r); endtask
  task automatic nios(); nova_strobes_t s; logic [0:15] r; s = '0; s.strt = 1; io(s, '0, r); endtask
  task automatic nioc(); nova_strobes_t s; logic [0:15] r; s = '0; s.clr = 1; io(s, '0, r); endtask
  task automatic niop(); nova_strobes_t s; logic [0:15] r; s = '0; s.iopls = 1; io(s, '0, r); endtask
  task automatic iorst(); nova_strobes_t s; logic [0:15] r; s = '0; s.iorst = 1; ds = 6'o77; bus = s; @(posedge clk); #1 bus = '0; endtask
  task automatic msko(input logic ac10);
    nova_strobes_t s; logic [0:15] w;
    s = '0; s.msko = 1; w = '0; w[10] = ac10;
    ds = 6'o77; bus = s; data_out = w; @(posedge clk); #1 bus = '0; data_out = '0;
  endtask

  // Wait for DONE; then take the word and the status, give STRT and test
  // DONE again.  err is 1 when DONE stayed on; jw is then the jump word.
  task automatic receive(output logic [0:15] bb, output status_t st, output bit err,
                         output logic [0:15] jw, input int limit = 200 * W);
    int n;
    n = 0;
    while (!done && n < limit) begin @(posedge clk); #1; n++; end
    chk(done, $sformatf("DONE within the time limit (A=%b)", dut.a));
    dib(bb);
    begin logic [0:15] c; dic(c); st = c; end
    nios();
    err = done;
    jw = '0;
    if (err) dib(jw);
  endtask

  // Clear the error flip flops by turning A0 off and on, then STRT.
  task automatic recover();
    doa(8'b1000_0000, 2);
    doa(8'b1000_0000, 1);
    nios();
  endtask

  // ---------------- program ----------------
  logic [0:31] msk;       // msk[n] = mask bit of channel n
  logic [0:31] bcload;    // register image: BC(31-n) = msk[n]

  initial begin
    logic [0:15] bb, jw, r;
    status_t st;
    bit err;
    int rec, blk, ch, frc;
    tape_word_t t;

    ds = '0; bus = '0; data_out = '0; set_btn = 0; reset_btn = 0;
    inject_req = 0; inject_ch = 0;
    repeat (2) @(posedge clk);
    #1;
    iorst();
    set_btn = 1; @(posedge clk); #1 set_btn = 0;
    chk(nova_dfs, "operator set NOVA DFS");
    nioc();

    // Mask: channel 0 always unmasked, about half of the others.
    msk = $urandom; msk[0] = 1'b1; msk[5] = 1'b0;
    for (int n = 0; n < 32; n++) bcload[31 - n] = msk[n];

    // Mask-shift register test path: A7 = 1, DIB/DIC read B and C.
    doa(8'b0000_0001, 0);
    dob(bcload[0:15]);
    doc(bcload[16:31]);
    dib(r); chk(r == bcload[0:15], "DIB reads B with A7");
    dic(r); chk(r == bcload[16:31], "DIC reads C with A7");
    niop(); n_iopls++;
    dib(r); chk(r == {bcload[31], bcload[0:14]}, "NIOP rotates B");
    dic(r); chk(r == bcload[15:30], "NIOP rotates C");
    for (int i = 0; i < 31; i++) niop();
    dib(r); chk(r == bcload[0:15], "32 NIOP restore B");
    n_a7++;
    dia(r); chk(r[0:7] == 8'b0000_0001, "DIA reads A");

    // Start: ON, RUN, playback, masked; interrupts enabled.
    msko(1'b0);
    doa(8'b1101_0000, 0);
    chk(on_lamp && dfs_pbm && !dfs_srm && !dfs_stop, "transport controls");
    dic(r); st = r;
    chk(st.novadfs, "status bit 8 shows NOVA DFS");
    doa(8'b0000_1000, 1);   // A4: record numbers
    nios();

    // Record search.
    frc = -1;
    forever begin
      receive(bb, st, err, jw, 400 * W);
      chk(!err, "no error in record search");
      rec = int'(bb[4:13]);
      chk(st.sdf, "SDF with a record number");
      if (frc < 0) begin
        frc = rec;
        chk(rec == FIRST + 2, "first record number read");
        if (frc > SRC) begin
          doa(8'b0010_0000, 1);    // A2: reverse search
          n_reverse++;
          chk(dfs_srm && !dfs_pbm, "search mode reverse");
        end
      end
      if (rec == SRC) break;
    end
    n_rec_found++;

    // Block search in playback.
    doa(8'b0010_1000, 2);   // clear A2, A4
    doa(8'b0000_0100, 1);   // set A5
    chk(dfs_pbm, "playback again");
    forever begin
      receive(bb, st, err, jw);
      chk(!err, "no error in block search");
      chk(bb[15] == 1'b1 && bb[0:1] == 2'b00, "block word");
      blk = int'(bb[0:13]);
      n_block++;
      if (blk == SBL) break;
    end

    // Data loading.
    doa(8'b0000_0010, 1);   // A6
    begin
      int expect_w;
      int len;
      len = rec_len(BLOCKS, BLANK);
      // Words after the block word of SBL, to the first end-of-data word.
      expect_w = 1 + BLANK + 32 * SBL + 1;
      while (1) begin
        int b2, c2;
        t = make_word(SRC, expect_w, BLOCKS, BLANK, b2, c2);
        if (b2 >= 0 && !msk[c2]) begin
          n_masked++;
          expect_w++;
          continue;
        end
        receive(bb, st, err, jw);
        chk(!err, "no error while loading");
        chk(bb == to_bb(t), $sformatf("data word %0d of record %0d", expect_w, SRC));
        if (b2 >= 0) begin
          n_data++;
          chk(st.spef == bad_parity(SRC, b2, c2), "SPEF marks the parity error");
          if (st.spef) n_spef++;
          chk(!st.edf, "no EDF in data");
        end else begin
          chk(st.edf, "EDF with end of data");
          n_ed++;
          break;
        end
        expect_w++;
      end
    end

    // LATE: do not answer the block word of the next record's block 0.
    begin
      int n;
      n = 0;
      while (!done && n < 400 * W) begin @(posedge clk); #1; n++; end
      chk(done, "next record's block word");
      n = 0;
      while (!dut.u_err.late && n < 40 * W) begin @(posedge clk); #1; n++; end
      chk(dut.u_err.late, "LATE set");
      dic(r); st = r; chk(st.late, "status shows LATE");
      dib(bb); chk(bb == 16'hFFFF, "second end-of-data word kept during LATE");
      nios();
      chk(done, "DONE held after STRT by LATE");
      dib(jw); chk(jw == JMP_LATE, "JMP .+1 formed");
      n_late++;
      recover();
      chk(!done, "DONE cleared after recovery");
    end

    // IMS: an extra CLOCK during a masked channel word.
    inject_ch = 5; inject_req = 1;
    begin
      int n;
      n = 0;
      err = 0;
      while (!err && n < 200) begin
        receive(bb, st, err, jw);
        if (tape.injected > 0) inject_req = 0;
        n++;
      end
      chk(err && jw == JMP_IMS, "JMP .+7 formed after IMS");
      if (err && jw == JMP_IMS) n_ims++;
    end
    // Back to record numbers with A0 off, then reload the mask.
    doa(8'b1000_0110, 2);   // A0, A5, A6 off: errors cleared
    doa(8'b0000_1000, 1);   // A4
    nios();
    receive(bb, st, err, jw);
    chk(!err && int'(bb[4:13]) == FIRST + 3, $sformatf("next record number after IMS: err=%0d bb=%b", err, bb));
    dob(bcload[0:15]);
    doc(bcload[16:31]);
    doa(8'b1000_0000, 1);

    // CUT: the operator drops the link while the record plays.
    doa(8'b0000_1000, 2);
    doa(8'b0000_0100, 1);   // block numbers
    nios();
    receive(bb, st, err, jw);
    chk(!err && bb[15], $sformatf("block number before CUT: err=%0d bb=%b", err, bb));
    reset_btn = 1; @(posedge clk); #1 reset_btn = 0;
    chk(!dfs_pbm && !pss_inhibit, "controls released without NOVA DFS");
    begin
      int n;
      n = 0;
      while (!done && n < 10 * W) begin @(posedge clk); #1; n++; end
    end
    receive(bb, st, err, jw);
    chk(st.cut && !st.novadfs, "status shows CUT");
    chk(err && jw == JMP_CUT, "JMP .+3 formed after CUT");
    if (err && jw == JMP_CUT) n_cut++;
    repeat (100) @(posedge clk);
    #1 set_btn = 1; @(posedge clk); #1 set_btn = 0;
    recover();
    chk(!done, "running again after CUT");

    // Accidental stop at the end of the tape, with interrupts masked.
    msko(1'b1);
    intdis_phase = 1;
    doa(8'b0000_0100, 2);   // nothing requested: run to the end of the tape
    nios();
    begin
      int n;
      n = 0;
      while (nova_dfs && n < 300 * W) begin @(posedge clk); #1; n++; end
      chk(!nova_dfs, "accidental stop resets NOVA DFS");
      if (!nova_dfs) n_accident++;
      // CUT one clk after the fall of NOVA DFS, DONE one clk later.
      repeat (2) @(posedge clk);
      #1 chk(done, "DONE from CUT after accidental stop");
    end
    nios();
    dib(jw);
    chk(jw == JMP_CUT, $sformatf("JMP .+3 after accidental stop: %b", jw));
    intdis_phase = 0;
    dia(r);
    chk(r[8:15] == pdf, "DIA reads the parity counter");

    // Every mechanism must have happened.
    chk(n_rec_found > 0, "record search");
    chk(n_reverse > 0, "reverse search");
    chk(n_block > 0, "block search");
    chk(n_data > 0, "data words");
    chk(n_masked > 0, "masked channels skipped");
    chk(n_ed > 0, "end of data");
    chk(n_spef > 0, "parity error flagged");
    chk(n_late > 0, "LATE");
    chk(n_ims > 0, "IMS");
    chk(n_cut > 0, "CUT");
    chk(n_accident > 0, "accidental stop");
    chk(n_intreq > 0, "interrupt request");
    chk(n_intdis > 0, "interrupt masked");
    chk(n_iopls > 0, "NIOP shift");
    chk(n_mode_stop >= 3, "mode-change stop pulses");
    chk(n_a7 > 0, "A7 test path");
    chk(n_latency > 0, "DONE latency");
    $display("mechanisms: rec=%0d reverse=%0d blocks=%0d data=%0d masked=%0d ed=%0d spef=%0d late=%0d ims=%0d cut=%0d accident=%0d intreq_cycles=%0d intdis=%0d iopls=%0d mode_stop=%0d",
             n_rec_found, n_reverse, n_block, n_data, n_masked, n_ed, n_spef, n_late, n_ims,
             n_cut, n_accident, n_intreq, n_intdis, n_iopls, n_mode_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
