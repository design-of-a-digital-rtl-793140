// dfs_pkg: types and constants shared by the NOVA / DFS tape interface.
//
// Bit numbering follows the NOVA convention throughout: bit 0 is the most
// significant bit of a word.  Vectors are therefore declared with ascending
// ranges ([0:15], [0:31]) so that index n is "bit n" as the NOVA and the tape
// format number it.  Packed structs list their members from bit 0 down.
//
// The word formats (data lines, command bits, status bits, JUMP words) follow
// the interface description; the bundling of the NOVA I/O strobes into a struct
// is this design's own choice.
package dfs_pkg;

  // The 18 data lines from the DFS TRF register: TRF0, TRF1, TRF4..TRF17,
  // the parity bit TRFP and the block/identification bit TRFB.
  typedef struct packed {
    logic        trf0;
    logic        trf1;
    logic [4:17] trf;
    logic        trfp;
    logic        trfb;
  } trf_lines_t;

  // Command register A0..A7.
  typedef struct packed {
    logic on;        // A0: ON/OFF, NOVA wishes to talk to the DFS
    logic run;       // A1: RUN (1) / STOP (0)
    logic srm;       // A2: search mode, reverse (1) / playback, forward (0)
    logic masked;    // A3: mask-shift register active
    logic req_rec;   // A4: record numbers requested
    logic req_blk;   // A5: block numbers requested (when A6 = 0)
    logic req_data;  // A6: unmasked channel data and end-of-data requested
    logic test_bc;   // A7: DIB/DIC read the mask-shift register
  } cmd_t;

  // Status register CC0..CC15.
  typedef struct packed {
    logic       edf;      // CC0
    logic       sdf;      // CC1
    logic       data;     // CC2
    logic [0:4] s;        // CC3..CC7 = S0..S4
    logic       novadfs;  // CC8
    logic       ims;      // CC9
    logic       cut;      // CC10
    logic       late;     // CC11
    logic       intdis;   // CC12
    logic       intreq;   // CC13
    logic       pef;      // CC14
    logic       spef;     // CC15
  } status_t;

  // NOVA I/O bus strobes, each one clock cycle long.  The first nine are
  // device-selected; iorst and msko go to every device.
  typedef struct packed {
    logic datoa;
    logic datia;
    logic datob;
    logic datib;
    logic datoc;
    logic datic;
    logic strt;    // from the S function (NIOS, DOAS, ...)
    logic clr;     // from the C function (NIOC, ...)
    logic iopls;   // from the P function (NIOP, ...)
    logic iorst;
    logic msko;
  } nova_strobes_t;

  // NOVA instructions the data register forms after an error.
  localparam logic [0:15] JMP_LATE = 16'b0000000100000001;  // JMP .+1
  localparam logic [0:15] JMP_CUT  = 16'b0000000100000011;  // JMP .+3
  localparam logic [0:15] JMP_IMS  = 16'b0000000100000111;  // JMP .+7

endpackage
