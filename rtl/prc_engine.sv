// prc_engine: one point cloud rendering engine.
//
// Draws point elements (8x8 pixel ellipse bitmaps with one colour and one
// depth) into a frame and Z buffer that is never held whole on chip: only a
// window of N_BANKS image lines is present, and it slides down the image one
// line at a time. Elements arrive sorted by y. The window is the ring of line
// banks inside the writers; eight of them are active and draw the eight rows
// of an element in parallel, the rest are emptied (export of finished lines)
// and refilled (import of initialised lines) by the porter while rendering
// goes on.
//
//   particle stream -> decoder -> controller -> switcher -> writers 0..N-1
//                                     |                       |
//                                   porter <---- import / export streams
//
// Interface: particle stream (valid/ready, CMD_ELEM + 64-bit code word or
// CMD_LINE), colour table writes (cfg_*), import and export streams of frame
// buffer words (four pixels of colour and Z each, valid/ready). Status pulses
// (stall, line_advance, frame_done, z_reject, large_elem) show what the engine
// is doing. Throughput: one element per 4 cycles while the needed lines are
// loaded.
module prc_engine
  import prc_pkg::*;
#(
  parameter int IMG_W   = 512,
  parameter int IMG_H   = 512,
  parameter int N_BANKS = 9,
  localparam int WORDS  = IMG_W / PIX_PER_WORD,
  localparam int AW     = $clog2(WORDS),
  localparam int LW     = $clog2(IMG_H + 1),
  localparam int BW     = $clog2(N_BANKS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // particle stream
  input  logic                  pc_valid,
  output logic                  pc_ready,
  input  cmd_e                  pc_cmd,
  input  logic [CODE_W-1:0]     pc_code,
  // colour tables
  input  logic                  cfg_we,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  rgb_t                  cfg_wdata,
  // import of the initialised frame and Z buffer
  input  logic                  imp_valid,
  output logic                  imp_ready,
  input  pword_t                imp_data,
  // export of the rendered frame and Z buffer
  output logic                  exp_valid,
  input  logic                  exp_ready,
  output pword_t                exp_data,
  // status
  output logic                  elem_start,
  output logic                  large_elem,
  output logic                  stall,
  output logic                  line_advance,
  output logic                  frame_done,
  output logic                  z_reject
);

  // decoder
  logic  dec_valid, dec_ready, dec_mode;
  cmd_e  dec_cmd;
  elem_t dec_elem;

  prc_decoder u_decoder (
    .clk, .rst_n,
    .in_valid (pc_valid), .in_ready (pc_ready), .in_cmd (pc_cmd), .in_code (pc_code),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .out_valid (dec_valid), .out_ready (dec_ready), .out_cmd (dec_cmd),
    .out_mode (dec_mode), .out_elem (dec_elem)
  );

  // controller
  logic [LW-1:0] lines_imported, lines_done;
  logic [BW-1:0] y0_bank;

  prc_controller #(.IMG_H(IMG_H), .N_BANKS(N_BANKS)) u_controller (
    .clk, .rst_n,
    .dec_valid, .dec_ready, .dec_cmd,
    .lines_imported, .frame_done,
    .elem_start, .y0_bank, .lines_done, .stall, .line_advance
  );

  assign large_elem = elem_start && dec_mode;

  // switcher
  logic [N_BANKS-1:0] w_start;
  scan_t              w_scan [N_BANKS];
  logic [X_W-1:0]     w_x;
  logic [Z_W-1:0]     w_z;
  rgb_t               w_rgb;

  prc_switcher #(.N_BANKS(N_BANKS)) u_switcher (
    .start (elem_start), .elem (dec_elem), .y0_bank,
    .w_start, .w_scan, .w_x, .w_z, .w_rgb
  );

  // porter
  logic [N_BANKS-1:0] p_sel;
  logic               p_re, p_we;
  logic [AW-1:0]      p_raddr, p_waddr;
  pword_t             p_rdata [N_BANKS];
  pword_t             p_wdata;

  prc_porter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_BANKS(N_BANKS)) u_porter (
    .clk, .rst_n,
    .lines_done, .lines_imported, .frame_done,
    .p_sel, .p_re, .p_raddr, .p_rdata, .p_we, .p_waddr, .p_wdata,
    .imp_valid, .imp_ready, .imp_data,
    .exp_valid, .exp_ready, .exp_data
  );

  // writers, one per line bank
  logic [N_BANKS-1:0] w_busy, w_reject;

  for (genvar w = 0; w < N_BANKS; w++) begin : g_writer
    prc_writer #(.IMG_W(IMG_W)) u_writer (
      .clk, .rst_n,
      .start (w_start[w]), .scan (w_scan[w]), .x (w_x), .z (w_z), .rgb (w_rgb),
      .busy (w_busy[w]), .z_reject (w_reject[w]),
      .porter_sel (p_sel[w]), .p_re, .p_raddr, .p_rdata (p_rdata[w]),
      .p_we (p_we && p_sel[w]), .p_waddr, .p_wdata
    );
  end

  assign z_reject = |w_reject;

  // The controller paces elements so that a new one never meets a busy writer.
  a_pace: assert property (@(posedge clk) disable iff (!rst_n) elem_start |-> !(|w_busy))
    else $error("element issued while a writer is busy");

endmodule
