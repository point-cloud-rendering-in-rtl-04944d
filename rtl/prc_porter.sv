// prc_porter: moves whole lines between the window banks and the outside.
//
// The window is a ring of N_BANKS line banks (image line L in bank L mod
// N_BANKS). Eight banks hold the active lines y0..y0+7; the others belong to
// the porter, which exports lines the window has left and imports the
// initialised colour and Z of lines it will enter. The work is a sequence of
// passes q = 0 .. IMG_H+N_BANKS-1 over bank q mod N_BANKS; pass q
//   * exports line q-N_BANKS if q >= N_BANKS (that line must be final:
//     q-N_BANKS < lines_done from the controller),
//   * imports line q if q < IMG_H.
// Export and import share the pass: each word is read, sent out and replaced
// by the imported word, so the import stream of one engine can be the export
// stream of the previous one (rendering chain). The first N_BANKS passes only
// import, the last N_BANKS only export; after the last pass frame_done pulses
// and the next frame starts with pass 0.
//
// Timing: one word per cycle. Words are read ahead into a 4-entry buffer;
// a word is written back (import) at the address of the word leaving the
// buffer (export), which was read before, so reads and writes of a pass never
// collide. A pass takes IMG_W/4 transfers plus three cycles. A transfer needs
// exp_ready (when exporting) and imp_valid (when importing) together; the
// porter waits otherwise, so exp_valid and imp_ready depend combinationally
// on imp_valid and exp_ready. Words go out left to right, one line after the
// other, top line first. The bank write data p_wdata is the import stream's
// data itself; the imported word is not registered on its way into the bank.
//
// lines_imported tells the controller how many lines of the frame are loaded.
module prc_porter
  import prc_pkg::*;
#(
  parameter int IMG_W   = 512,
  parameter int IMG_H   = 512,
  parameter int N_BANKS = 9,
  localparam int WORDS  = IMG_W / PIX_PER_WORD,
  localparam int AW     = $clog2(WORDS),
  localparam int LW     = $clog2(IMG_H + 1),
  localparam int BW     = $clog2(N_BANKS),
  localparam int QW     = $clog2(IMG_H + N_BANKS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // controller
  input  logic [LW-1:0]      lines_done,
  output logic [LW-1:0]      lines_imported,
  output logic               frame_done,
  // bank access
  output logic [N_BANKS-1:0] p_sel,
  output logic               p_re,
  output logic [AW-1:0]      p_raddr,
  input  pword_t             p_rdata [N_BANKS],
  output logic               p_we,
  output logic [AW-1:0]      p_waddr,
  output pword_t             p_wdata,
  // import stream (initialised colour and Z)
  input  logic               imp_valid,
  output logic               imp_ready,
  input  pword_t             imp_data,
  // export stream (rendered colour and Z)
  output logic               exp_valid,
  input  logic               exp_ready,
  output pword_t             exp_data
);

  localparam logic [QW-1:0] LAST_Q = QW'(IMG_H + N_BANKS - 1);
  localparam int DEPTH = 4;

  logic          act;       // a pass is running
  logic [QW-1:0] q;
  logic [BW-1:0] bank;
  logic [AW:0]   ra;        // next word to read
  logic [AW:0]   wa;        // next word to transfer
  logic          inflight;  // a read was issued in the previous cycle

  // read-ahead buffer
  pword_t        buf_q [DEPTH];
  logic [1:0]    rd_ptr, wr_ptr;
  logic [2:0]    cnt;

  logic exporting, importing, allowed, xfer, push, pop, pass_end;
  assign exporting = (q >= QW'(N_BANKS));
  assign importing = (q < QW'(IMG_H));
  assign allowed   = !exporting || ((q - QW'(N_BANKS)) < QW'(lines_done));

  assign xfer      = act && (wa < (AW+1)'(WORDS)) &&
                     (!exporting || (cnt != '0 && exp_ready)) && (!importing || imp_valid);
  assign exp_valid = act && exporting && cnt != '0 && (!importing || imp_valid);
  assign imp_ready = act && importing && (wa < (AW+1)'(WORDS)) &&
                     (!exporting || (cnt != '0 && exp_ready));
  assign exp_data  = buf_q[rd_ptr];
  assign pass_end  = xfer && (wa == (AW+1)'(WORDS - 1));

  assign p_re    = act && exporting && (ra < (AW+1)'(WORDS)) && (3'(cnt) + 3'(inflight) < 3'(DEPTH));
  assign p_raddr = ra[AW-1:0];
  assign p_we    = xfer && importing;
  assign p_waddr = wa[AW-1:0];
  assign p_wdata = imp_data;
  always_comb begin
    p_sel = '0;
    if (act) p_sel[bank] = 1'b1;
  end

  assign push = inflight;
  assign pop  = xfer && exporting;

  assign lines_imported = importing ? LW'(q) : LW'(IMG_H);

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr] <= p_rdata[bank];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act        <= 1'b0;
      q          <= '0;
      bank       <= '0;
      ra         <= '0;
      wa         <= '0;
      inflight   <= 1'b0;
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      cnt        <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      inflight   <= p_re;
      if (p_re) ra <= ra + 1'b1;
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      cnt <= cnt + 3'(push) - 3'(pop);
      if (xfer) wa <= wa + 1'b1;

      if (!act) begin
        if (allowed && !inflight) begin
          act <= 1'b1;
          ra  <= '0;
          wa  <= '0;
        end
      end else if (pass_end) begin
        act <= 1'b0;
        if (q == LAST_Q) begin
          q          <= '0;
          bank       <= '0;
          frame_done <= 1'b1;
        end else begin
          q    <= q + 1'b1;
          bank <= (bank == BW'(N_BANKS - 1)) ? '0 : bank + 1'b1;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= 3'(DEPTH))
    else $error("read-ahead buffer overflow");

endmodule
