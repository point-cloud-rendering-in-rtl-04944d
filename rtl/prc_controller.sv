// prc_controller: sequencing of one rendering engine.
//
// The host sends the elements sorted by y, one window position after the
// other, and closes each position with CMD_LINE; the y coordinate itself is
// never sent. The controller keeps it: y0 is the image line of the top row of
// the element bitmaps, so an element covers lines y0..y0+7 and its centre is
// in the middle of the active window.
//
//  * CMD_ELEM is issued (one start pulse to the switcher) when the writers are
//    free and lines y0..y0+7 have been loaded by the porter. The writers then
//    need 4 cycles, so elements are issued at most every 4 cycles.
//  * CMD_LINE waits until the last element is written and line y0+8 is
//    loaded, then moves the window down one line; line y0 is then final and
//    the porter may export it. At the last position (y0 = IMG_H-8) it ends
//    the frame instead: all lines are final, and the controller waits for the
//    porter's frame_done before taking the next frame from line 0.
//  * A command that has to wait raises stall.
//
// lines_done (lines above it are final) goes to the porter, y0_bank (bank of
// line y0 in the ring of N_BANKS line banks) to the switcher.
module prc_controller
  import prc_pkg::*;
#(
  parameter int IMG_H   = 512,
  parameter int N_BANKS = 9,
  localparam int LW     = $clog2(IMG_H + 1),
  localparam int BW     = $clog2(N_BANKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // decoded command stream
  input  logic          dec_valid,
  output logic          dec_ready,
  input  cmd_e          dec_cmd,
  // porter status
  input  logic [LW-1:0] lines_imported,
  input  logic          frame_done,
  // control outputs
  output logic          elem_start,
  output logic [BW-1:0] y0_bank,
  output logic [LW-1:0] lines_done,
  output logic          stall,
  output logic          line_advance
);

  localparam int ELEM_CYCLES = 4;
  localparam logic [LW-1:0] LAST_Y0 = LW'(IMG_H - ROWS);

  logic [LW-1:0] y0;
  logic [1:0]    slot;   // cycles left until the writers are free
  logic          flushing; // frame ended, waiting for the porter

  logic last_pos, can_elem, can_line;
  assign last_pos = (y0 == LAST_Y0);
  assign can_elem = !flushing && slot == '0 && (lines_imported >= y0 + LW'(ROWS));
  assign can_line = !flushing && slot == '0 &&
                    (last_pos || lines_imported >= y0 + LW'(ROWS + 1));

  assign dec_ready    = (dec_cmd == CMD_ELEM) ? can_elem : can_line;
  assign elem_start   = dec_valid && dec_cmd == CMD_ELEM && can_elem;
  assign line_advance = dec_valid && dec_cmd == CMD_LINE && can_line;
  assign stall        = dec_valid && !dec_ready;
  assign lines_done   = flushing ? LW'(IMG_H) : y0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y0       <= '0;
      y0_bank  <= '0;
      slot     <= '0;
      flushing <= 1'b0;
    end else begin
      if (elem_start)
        slot <= 2'(ELEM_CYCLES - 1);
      else if (slot != '0)
        slot <= slot - 1'b1;

      if (line_advance) begin
        if (last_pos) begin
          flushing <= 1'b1;
        end else begin
          y0      <= y0 + 1'b1;
          y0_bank <= (y0_bank == BW'(N_BANKS - 1)) ? '0 : y0_bank + 1'b1;
        end
      end

      if (flushing && frame_done) begin
        flushing <= 1'b0;
        y0       <= '0;
        y0_bank  <= '0;
      end
    end
  end

  initial assert (IMG_H >= ROWS + 1 && N_BANKS > ROWS)
    else $error("IMG_H must exceed 8 lines and N_BANKS 8 banks");

endmodule
