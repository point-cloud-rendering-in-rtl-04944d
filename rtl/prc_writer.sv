// prc_writer: one line bank of the sliding window and the logic that draws
// one row of a point element into it.
//
// The frame and Z buffer of the window is split into banks, one image line
// each, so that the eight rows of an element are drawn by eight writers at
// once. A row is one horizontal scan of up to 8 pixels. The bank stores four
// pixels per word, so a scan touches at most three words; the writer performs
// three read-modify-write accesses, each comparing the depth of every covered
// pixel with the stored one and keeping colour and depth of the nearer
// (smaller Z wins, equal Z keeps the stored pixel).
//
// Timing: a start pulse in cycle t0 issues the read of the first word; in
// cycles t0+1..t0+3 the writer merges the word read in the previous cycle,
// writes it back and reads the next one. The bank is free again at t0+4, so
// an element takes 4 cycles, the rate the design is built for. Pixels left of
// column 0 or right of column IMG_W-1 are clipped.
//
// Port sharing: while porter_sel is high the porter (import/export of whole
// lines) owns both RAM ports; the controller never starts a writer whose bank
// is in the porter's hands (checked by an assertion).
module prc_writer
  import prc_pkg::*;
#(
  parameter int IMG_W = 512,
  localparam int WORDS = IMG_W / PIX_PER_WORD,
  localparam int AW    = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // element row from the switcher
  input  logic           start,
  input  scan_t          scan,
  input  logic [X_W-1:0] x,
  input  logic [Z_W-1:0] z,
  input  rgb_t           rgb,
  output logic           busy,
  output logic           z_reject,  // a covered pixel lost the depth test
  // porter access to the bank
  input  logic           porter_sel,
  input  logic           p_re,
  input  logic [AW-1:0]  p_raddr,
  output pword_t         p_rdata,
  input  logic           p_we,
  input  logic [AW-1:0]  p_waddr,
  input  pword_t         p_wdata
);

  localparam int PW = AW + 2; // pixel index width inside a line

  // ---- scan extent, computed at start ----
  logic signed [X_W+2:0] s_raw, e_raw;
  logic [PW-1:0]         s_clip, e_clip;
  logic                  empty_now;
  localparam logic signed [X_W+2:0] LAST_PX = (X_W+3)'(IMG_W - 1);
  always_comb begin
    s_raw = signed'({3'b0, x}) + (X_W+3)'(scan.off);
    e_raw = s_raw + signed'((X_W+3)'(scan.len)) - 1;
    empty_now = (scan.len == '0) || (e_raw < 0) || (s_raw > LAST_PX);
    s_clip = (s_raw < 0) ? '0 : PW'(s_raw);
    e_clip = (e_raw > LAST_PX) ? PW'(IMG_W - 1) : PW'(e_raw);
  end

  // ---- pipeline state ----
  logic [1:0]     ph;       // 0 idle, 1..3 word accesses
  logic [AW-1:0]  wi;       // word being merged
  logic [PW-1:0]  s_q, e_q;
  logic           empty_q;
  logic [Z_W-1:0] z_q;
  rgb_t           rgb_q;

  assign busy = (ph != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph      <= '0;
      wi      <= '0;
      s_q     <= '0;
      e_q     <= '0;
      empty_q <= 1'b1;
      z_q     <= '0;
      rgb_q   <= '0;
    end else if (ph == 2'd0) begin
      if (start) begin
        ph      <= 2'd1;
        wi      <= s_clip[PW-1:2];
        s_q     <= s_clip;
        e_q     <= e_clip;
        empty_q <= empty_now;
        z_q     <= z;
        rgb_q   <= rgb;
      end
    end else begin
      ph <= (ph == 2'd3) ? 2'd0 : ph + 2'd1;
      wi <= wi + 1'b1;
    end
  end

  // ---- merge of the word read in the previous cycle ----
  pword_t         rdata, merged;
  logic [3:0]     hit, covd;
  always_comb begin
    merged = rdata;
    for (int i = 0; i < PIX_PER_WORD; i++) begin
      logic [PW-1:0] px;
      px       = {wi, 2'(i)};
      covd[i] = busy && !empty_q && ({1'b0, wi} <= (AW+1)'(e_q[PW-1:2])) &&
                 (px >= s_q) && (px <= e_q);
      hit[i]   = covd[i] && (z_q < rdata[i].z);
      if (hit[i]) begin
        merged[i].rgb = rgb_q;
        merged[i].z   = z_q;
      end
    end
  end
  assign z_reject = |(covd & ~hit);

  // ---- RAM port multiplexing ----
  logic          re, we;
  logic [AW-1:0] raddr, waddr;
  pword_t        wdata;
  always_comb begin
    if (porter_sel) begin
      re = p_re;  raddr = p_raddr;
      we = p_we;  waddr = p_waddr;  wdata = p_wdata;
    end else begin
      re    = (ph == 2'd0) ? start : (ph != 2'd3);
      raddr = (ph == 2'd0) ? s_clip[PW-1:2] : wi + 1'b1;
      we    = |hit;
      waddr = wi;
      wdata = merged;
    end
  end

  prc_bank_ram #(.WORDS(WORDS), .DATA_W($bits(pword_t))) u_ram (
    .clk, .re, .raddr, .rdata, .we, .waddr, .wdata
  );

  assign p_rdata = rdata;

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    porter_sel |-> !(start || busy))
    else $error("writer started while its bank belongs to the porter");

endmodule
