// Behavioural model of one 2 KB 6T-4C non-volatile SRAM macro (128 rows x 128
// columns). It is not synthesizable logic: the cell array, plate lines,
// charge-share switches and bit-line equalizer are analog circuits, modelled
// here by their logical effect.
//
// Each cell is a 6T SRAM latch (array `vol`) with four ferroelectric capacitors
// holding a non-volatile copy (array `fe`). Normal access is a one-cycle read
// or byte-masked write of a 32-bit word; the bit-line equalizer must be off
// (bl_eq = 0) while the macro is enabled and is on otherwise: bit lines are only
// equalized, never precharged. A store pulses both plate lines of a row
// (fe <= vol), a recall pulses only PLA (vol <= fe). Losing VDD scrambles the
// volatile array and keeps the ferroelectric one.
//
// Plate-line charge sharing: each plate line's voltage is tracked as 0..VMAX.
// When a step has `share` set, the switch SW_PL[row-1] first joins the previous
// (charged) plate line to this one during the high phase of the clock, so both
// settle halfway; then the switch opens and the driver tops the line up to VMAX.
// The charge the drivers deliver is summed in `drv_charge`, so a testbench can
// compare store/recall with and without sharing. Lines not being stepped are
// discharged. Splitting the share and drive phases across the two clock phases
// is this model's choice; the document gives the order of the events only.
module nvram_macro
  import nvram_pkg::*;
#(
  parameter int unsigned VMAX = 256
) (
  input  logic           clk,
  input  logic           vdd,       // macro supply on
  input  logic           ce,
  input  logic           we,
  input  logic [MAW-1:0] addr,
  input  logic [31:0]    wdata,
  input  logic [3:0]     be,
  output logic [31:0]    rdata,
  input  logic           bl_eq,
  input  pl_cmd_t        pl
);
  logic [COLS-1:0] vol [ROWS];
  logic [COLS-1:0] fe  [ROWS];
  int unsigned lvl_a [ROWS];
  int unsigned lvl_b [ROWS];
  longint unsigned drv_charge;
  int unsigned shares;

  logic [RAW-1:0] row;
  logic [1:0]     wsel;
  assign row  = addr[MAW-1:2];
  assign wsel = addr[1:0];

  initial begin
    drv_charge = 0;
    shares = 0;
    for (int r = 0; r < ROWS; r++) begin
      lvl_a[r] = 0;
      lvl_b[r] = 0;
      vol[r] = '0;
      fe[r] = '0;
    end
  end

  // power loss scrambles the SRAM latches, the ferroelectric copy stays
  always @(negedge vdd) begin
    for (int r = 0; r < ROWS; r++)
      vol[r] = {$urandom, $urandom, $urandom, $urandom};
  end

  // read / write
  always @(posedge clk) begin
    if (vdd && ce) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) vol[row][wsel*32 + b*8 +: 8] <= wdata[b*8 +: 8];
      end else begin
        rdata <= vol[row][wsel*32 +: 32];
      end
    end
  end

  // share phase (clock high): previous plate line charges this one halfway;
  // the command is captured for the drive phase
  pl_cmd_t pl_q;
  always @(posedge clk) begin
    pl_q = pl;
    if (vdd && pl.step) begin
      for (int r = 0; r < ROWS; r++) begin
        if (r != int'(pl.row) && !(pl.share && r == int'(pl.row) - 1)) begin
          lvl_a[r] = 0;
          lvl_b[r] = 0;
        end
      end
      if (pl.share && pl.row != 0) begin
        if (pl.drv_a) begin
          lvl_a[pl.row] = (lvl_a[pl.row - 1] + lvl_a[pl.row]) / 2;
          lvl_a[pl.row - 1] = lvl_a[pl.row];
        end
        if (pl.drv_b) begin
          lvl_b[pl.row] = (lvl_b[pl.row - 1] + lvl_b[pl.row]) / 2;
          lvl_b[pl.row - 1] = lvl_b[pl.row];
        end
        shares++;
      end
    end else if (!pl.step) begin
      for (int r = 0; r < ROWS; r++) begin
        lvl_a[r] = 0;
        lvl_b[r] = 0;
      end
    end
  end

  // drive phase (clock low): switch open, driver tops the line up; the
  // ferroelectric capacitors are written (store) or read back (recall)
  always @(negedge clk) begin
    if (vdd && pl_q.step) begin
      if (pl_q.drv_a) begin
        drv_charge += longint'(VMAX) - longint'(lvl_a[pl_q.row]);
        lvl_a[pl_q.row] = VMAX;
      end
      if (pl_q.drv_b) begin
        drv_charge += longint'(VMAX) - longint'(lvl_b[pl_q.row]);
        lvl_b[pl_q.row] = VMAX;
      end
      if (pl_q.drv_a && pl_q.drv_b) fe[pl_q.row] = vol[pl_q.row];
      else if (pl_q.drv_a)        vol[pl_q.row] = fe[pl_q.row];
    end
  end

  // bit lines are equalized whenever the macro is not accessed
  always @(posedge clk) begin
    if (vdd && ce) assert (!bl_eq) else $error("access with bit-line equalizer on");
    if (vdd && !ce) assert (bl_eq) else $error("idle macro with equalizer off");
  end
endmodule
