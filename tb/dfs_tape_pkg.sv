// dfs_tape_pkg: content of the simulated DFS tape, shared by the tape model
// and the testbenches that check what the interface delivers.
//
// A record is laid out as in the DFS tape format: one start-of-data word
// (bits 0..7 = 10000000, bits 8..17 = record number, B = 1), BLANK blank
// words (all zero), BLOCKS data blocks of 32 words (channel 0 = block word:
// bits 0..3 zero, bits 4..17 the block number, B = 1; channels 1..31 = data:
// bits 0..4 the sign, bits 5..17 the value, B = 0) and two end-of-data words
// (all ones).  P gives odd parity over bits 0..17 and P.  Channel values and
// the words recorded with a parity error come from small hash formulas so a
// testbench can recompute them.
package dfs_tape_pkg;
  import dfs_pkg::*;

  typedef struct packed {
    logic [0:17] bits;
    logic        p;
    logic        b;
  } tape_word_t;

  function automatic int rec_len(input int blocks, input int blank);
    return 1 + blank + 32 * blocks + 2;
  endfunction

  // Channel value: a 14-bit hash of record, block and channel.
  function automatic logic [13:0] chan_value(input int recno, input int blk, input int ch);
    logic [31:0] h;
    h = 32'(recno) * 32'd2654435761 ^ 32'(blk) * 32'd40503 ^ 32'(ch) * 32'd977;
    h = h ^ (h >> 13);
    return h[13:0];
  endfunction

  // Words recorded with a parity error: about one channel word in eleven.
  function automatic logic bad_parity(input int recno, input int blk, input int ch);
    return (ch != 0) && (((recno * 31 + blk * 7 + ch * 3) % 11) == 4);
  endfunction

  // Word w of record recno; sets blk/ch (-1 outside the data section).
  function automatic tape_word_t make_word(input int recno, input int w, input int blocks,
                                           input int blank, output int blk, output int ch);
    tape_word_t t;
    int idx;
    logic [13:0] v;
    t = '0; blk = -1; ch = -1;
    if (w == 0) begin
      t.bits[0] = 1'b1;
      t.bits[8:17] = 10'(recno);
      t.b = 1'b1;
    end else if (w <= blank) begin
      t = '0;
    end else if (w <= blank + 32 * blocks) begin
      idx = w - 1 - blank;
      blk = idx / 32;
      ch  = idx % 32;
      if (ch == 0) begin
        t.bits[4:17] = 14'(blk);
        t.b = 1'b1;
      end else begin
        v = chan_value(recno, blk, ch);
        t.bits[0:4]  = {5{v[13]}};
        t.bits[5:17] = v[12:0];
        t.b = 1'b0;
      end
    end else begin
      t.bits = '1;
      t.b = 1'b1;
    end
    t.p = ~(^t.bits);
    if (blk >= 0 && bad_parity(recno, blk, ch)) t.p = ~t.p;
    return t;
  endfunction

  function automatic trf_lines_t to_lines(input tape_word_t t);
    trf_lines_t l;
    l.trf0 = t.bits[0];
    l.trf1 = t.bits[1];
    l.trf  = t.bits[4:17];
    l.trfp = t.p;
    l.trfb = t.b;
    return l;
  endfunction

  // What the data register holds after it has taken word t.
  function automatic logic [0:15] to_bb(input tape_word_t t);
    return {t.bits[4:17], t.p, t.b};
  endfunction

endpackage
