// prc_decoder: interprets the particle stream for the rendering engine.
//
// Each stream beat is a command: CMD_ELEM with a 64-bit point code word, or
// CMD_LINE, which tells the engine that all elements of the current window
// position have been sent (the y coordinate is implicit).
//
// For an element the decoder splits the code word (layout in prc_pkg), gets
// its colour from prc_shader and expands the four stored scans into one scan
// per row of the 8x8 bitmap:
//  * MODE = 0, small point: scans 0..3 are rows 0..3. The point shape is
//    centrally symmetric, so row 7-r repeats row r mirrored:
//    start' = 7 - SoS - LoS, same length (e.g. SoS 2 / LoS 1 in row 1 becomes
//    SoS 4 / LoS 1 in row 6, as in the published small point example).
//  * MODE = 1, fragment of a large point: scans 0..3 are drawn unmirrored in
//    rows 0..3; rows 4..7 stay empty. A large point is sent as several such
//    fragments, each with its own X and in the batch of its own window
//    position (this split is this design's choice).
//  Rows 0..3 start at SoS, which is never negative, so the sign bits of their
//  offsets are constant 0; only the mirrored rows 4..7 use the sign.
//
// Interface: valid/ready on both sides; one register stage, so the result
// appears the cycle after the beat is taken, and a new beat is taken whenever
// the output register is empty or being emptied. Throughput 1 beat per cycle.
module prc_decoder
  import prc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // particle stream
  input  logic                  in_valid,
  output logic                  in_ready,
  input  cmd_e                  in_cmd,
  input  logic [CODE_W-1:0]     in_code,
  // colour table configuration
  input  logic                  cfg_we,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  rgb_t                  cfg_wdata,
  // decoded stream to the controller and switcher
  output logic                  out_valid,
  input  logic                  out_ready,
  output cmd_e                  out_cmd,
  output logic                  out_mode,
  output elem_t                 out_elem
);

  code_t code;
  assign code = code_t'(in_code);

  rgb_t rgb;
  prc_shader u_shader (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .material (code.material),
    .diffuse  (code.diffuse),
    .specular (code.specular),
    .rgb      (rgb)
  );

  rows_t rows;
  always_comb begin
    for (int r = 0; r < ROWS; r++) rows[r] = '0;
    for (int r = 0; r < STORED_SCANS; r++) begin
      logic [SCAN_POS_W-1:0] sos;
      logic [SCAN_LEN_W-1:0] los;
      sos = code.scans[6*r +: SCAN_POS_W];
      los = code.scans[6*r + SCAN_POS_W +: SCAN_LEN_W];
      rows[r].off = signed'({1'b0, sos});
      rows[r].len = los;
      if (!code.mode && los != '0) begin
        rows[ROWS-1-r].off = 4'sd7 - signed'({1'b0, sos}) - signed'({1'b0, los});
        rows[ROWS-1-r].len = los;
      end
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cmd   <= CMD_ELEM;
      out_mode  <= 1'b0;
      out_elem  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_cmd       <= in_cmd;
        out_mode      <= code.mode;
        out_elem.rows <= rows;
        out_elem.x    <= code.x;
        out_elem.z    <= code.z;
        out_elem.rgb  <= rgb;
      end
    end
  end

endmodule
