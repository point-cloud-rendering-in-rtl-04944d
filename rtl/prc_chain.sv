// prc_chain: rendering chain of N_UNITS point cloud rendering engines.
//
// The point cloud is split among the engines at random (each engine has its
// own particle stream, sorted by y). The engines are connected in a line
// through their frame and Z buffer streams: engine 0 imports the initial
// image (background colour and depth), engine k imports what engine k-1
// exports, and the last engine's export is the rendered frame; its depth is
// dropped. Since each engine only keeps a window of lines, engine k runs a
// few lines behind engine k-1 and the chain renders a frame in about the time
// one engine needs for its share of the elements.
//
// Interface: one particle stream per engine (arrays indexed by engine), the
// colour table writes broadcast to all engines, the initial image stream in
// and the frame colour stream out (four pixels per word, left to right, top
// line first). Status pulses of all engines are brought out per engine.
module prc_chain
  import prc_pkg::*;
#(
  parameter int N_UNITS = 4,
  parameter int IMG_W   = 512,
  parameter int IMG_H   = 512,
  parameter int N_BANKS = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // particle streams, one per engine
  input  logic [N_UNITS-1:0]      pc_valid,
  output logic [N_UNITS-1:0]      pc_ready,
  input  cmd_e                    pc_cmd  [N_UNITS],
  input  logic [CODE_W-1:0]       pc_code [N_UNITS],
  // colour tables, written into every engine
  input  logic                    cfg_we,
  input  logic [CFG_ADDR_W-1:0]   cfg_addr,
  input  rgb_t                    cfg_wdata,
  // initial image
  input  logic                    init_valid,
  output logic                    init_ready,
  input  pword_t                  init_data,
  // rendered frame, colour only
  output logic                    frame_valid,
  input  logic                    frame_ready,
  output rgb_t [PIX_PER_WORD-1:0] frame_data,
  // status per engine
  output logic [N_UNITS-1:0]      elem_start,
  output logic [N_UNITS-1:0]      large_elem,
  output logic [N_UNITS-1:0]      stall,
  output logic [N_UNITS-1:0]      line_advance,
  output logic [N_UNITS-1:0]      frame_done,
  output logic [N_UNITS-1:0]      z_reject
);

  // link k carries the stream into engine k; link N_UNITS is the chain output
  logic   lk_valid [N_UNITS+1];
  logic   lk_ready [N_UNITS+1];
  pword_t lk_data  [N_UNITS+1];

  assign lk_valid[0] = init_valid;
  assign init_ready  = lk_ready[0];
  assign lk_data[0]  = init_data;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    prc_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_BANKS(N_BANKS)) u_engine (
      .clk, .rst_n,
      .pc_valid (pc_valid[u]), .pc_ready (pc_ready[u]),
      .pc_cmd (pc_cmd[u]), .pc_code (pc_code[u]),
      .cfg_we, .cfg_addr, .cfg_wdata,
      .imp_valid (lk_valid[u]),   .imp_ready (lk_ready[u]),   .imp_data (lk_data[u]),
      .exp_valid (lk_valid[u+1]), .exp_ready (lk_ready[u+1]), .exp_data (lk_data[u+1]),
      .elem_start (elem_start[u]), .large_elem (large_elem[u]), .stall (stall[u]),
      .line_advance (line_advance[u]), .frame_done (frame_done[u]),
      .z_reject (z_reject[u])
    );
  end

  assign frame_valid         = lk_valid[N_UNITS];
  assign lk_ready[N_UNITS]   = frame_ready;
  always_comb
    for (int i = 0; i < PIX_PER_WORD; i++) frame_data[i] = lk_data[N_UNITS][i].rgb;

endmodule
