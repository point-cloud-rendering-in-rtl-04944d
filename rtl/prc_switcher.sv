// prc_switcher: routes the rows of an element to the line banks.
//
// The window banks form a ring: image line L lives in bank L mod N_BANKS.
// When the top line of the active window is in bank y0_bank, bitmap row r of
// the element belongs to bank (y0_bank + r) mod N_BANKS. The switcher gives
// each writer the scan of its row and the start pulse; writers whose bank is
// not among the eight active lines (the porter's banks) get no start.
// Position, depth and colour are common to all rows and go to every writer.
// Purely combinational.
module prc_switcher
  import prc_pkg::*;
#(
  parameter int N_BANKS = 9,
  localparam int BW = $clog2(N_BANKS)
) (
  input  logic                start,
  input  elem_t               elem,
  input  logic [BW-1:0]       y0_bank,
  output logic [N_BANKS-1:0]  w_start,
  output scan_t               w_scan [N_BANKS],
  output logic [X_W-1:0]      w_x,
  output logic [Z_W-1:0]      w_z,
  output rgb_t                w_rgb
);

  always_comb begin
    for (int w = 0; w < N_BANKS; w++) begin
      int r;
      r = (w >= int'(y0_bank)) ? w - int'(y0_bank) : w + N_BANKS - int'(y0_bank);
      if (r < ROWS) begin
        w_start[w] = start;
        w_scan[w]  = elem.rows[r[2:0]];
      end else begin
        w_start[w] = 1'b0;
        w_scan[w]  = '0;
      end
    end
  end

  assign w_x   = elem.x;
  assign w_z   = elem.z;
  assign w_rgb = elem.rgb;

  initial assert (N_BANKS > ROWS) else $error("N_BANKS must exceed the %0d active rows", ROWS);

endmodule
