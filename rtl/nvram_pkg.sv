// Constants and the macro control bundle of the 16 KB 6T-4C non-volatile RAM:
// eight macros of 2 KB, each 128 rows x 128 columns, accessed as 32-bit words
// (four words per row). Sizes follow the document; the 32-bit word
// organisation is this design's choice (it matches the CPU data bus).
package nvram_pkg;
  localparam int unsigned N_MACRO   = 8;
  localparam int unsigned ROWS      = 128;
  localparam int unsigned COLS      = 128;
  localparam int unsigned WORDS_ROW = COLS / 32;           // 4
  localparam int unsigned MAW       = $clog2(ROWS * WORDS_ROW); // 9: word address in a macro
  localparam int unsigned RAW       = $clog2(ROWS);         // 7: row address
  localparam int unsigned AW        = MAW + $clog2(N_MACRO); // 12: word address of the NVRAM

  // Plate-line sequencing command, broadcast to all macros (they store and
  // recall in parallel, one row per clock).
  typedef struct packed {
    logic           step;    // a plate-line step on row `row` this cycle
    logic [RAW-1:0] row;
    logic           drv_a;   // pulse plate line PLA[row]
    logic           drv_b;   // pulse plate line PLB[row] (store only)
    logic           share;   // first share charge from row-1 through SW_PL[row-1]
  } pl_cmd_t;
endpackage
