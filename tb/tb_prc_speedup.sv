// Rendering speed of the chain: the same dense point set (121 window
// positions of 16 elements, 16 x 128 pixel frame) is rendered by a single
// engine and by a chain of four engines that get the elements dealt at
// random. Each image is compared with a model that draws the elements in the
// order the hardware sees them (for the chain: engine 0's first). The cycle
// counts are checked too: the single engine must need about 4 cycles per
// element, and the four-engine chain must be at least 2.3 times faster
// (near-linear speedup once the chain is filled). The raw rate of the chain,
// one element per 4 cycles in each of four engines, is checked as the most
// element starts of all engines in any RATE_WIN consecutive cycles: at least
// 0.8 per cycle, against the ideal 1.0.
module tb_prc_speedup;
  import prc_pkg::*;
  import prc_ref_pkg::*;

  localparam int W = 16, H = 128, PER_LINE = 16, WORDS = W / 4;
  localparam int NPOS = H - 7, NE = (H - 7) * PER_LINE;
  localparam int RATE_WIN = 64;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus and model ----------------
  rgb_t kd [128], ks [128], i0;
  pixel_t init_img [H][W], ref_img [H][W], ref4_img [H][W];
  logic [63:0] codes [NE];
  int owner [NE];
  bit stim_ready = 0;

  rgb_t cols [NE];

  task automatic draw(input int i, input bit four);
    int y0, x, z;
    y0 = i / PER_LINE;
    x = int'(codes[i][54:46]); z = int'(codes[i][63:55]);
    for (int r = 0; r < 8; r++) begin
      int lo, hi;
      row_span(codes[i], r, lo, hi);
      for (int p = x + lo; p <= x + hi; p++) begin
        if (p < 0 || p >= W) continue;
        if (!four && z < int'(ref_img[y0 + r][p].z)) begin
          ref_img[y0 + r][p].z = 9'(z); ref_img[y0 + r][p].rgb = cols[i];
        end
        if (four && z < int'(ref4_img[y0 + r][p].z)) begin
          ref4_img[y0 + r][p].z = 9'(z); ref4_img[y0 + r][p].rgb = cols[i];
        end
      end
    end
  endtask

  initial begin
    for (int m = 0; m < 128; m++) begin kd[m] = rgb_t'($urandom); ks[m] = rgb_t'($urandom) & 24'h1f1f1f; end
    i0 = 24'h020202;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        init_img[y][x].rgb = rgb_t'($urandom);
        init_img[y][x].z   = 9'($urandom_range(400, 511));
        ref_img[y][x] = init_img[y][x];
        ref4_img[y][x] = init_img[y][x];
      end
    for (int i = 0; i < NE; i++) begin
      int m, d, s;
      codes[i] = make_code(1'($urandom_range(0, 3) == 0), rand_scans(), $urandom_range(0, 127),
                           $urandom_range(0, 127), $urandom_range(0, 127),
                           $urandom_range(0, W - 1), $urandom_range(0, 511));
      owner[i] = $urandom_range(0, 3);
      m = int'(codes[i][45:39]); d = int'(codes[i][31:25]); s = int'(codes[i][38:32]);
      cols[i].r = 8'(shade(i0.r, kd[m].r, ks[m].r, d, s));
      cols[i].g = 8'(shade(i0.g, kd[m].g, ks[m].g, d, s));
      cols[i].b = 8'(shade(i0.b, kd[m].b, ks[m].b, d, s));
      draw(i, 0);
    end
    for (int u = 0; u < 4; u++)
      for (int i = 0; i < NE; i++)
        if (owner[i] == u) draw(i, 1);
    stim_ready = 1;
  end

  logic cfg_we = 0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  rgb_t cfg_wdata = '0;
  bit cfg_done = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (stim_ready);
    for (int a = 0; a <= 256; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 9'(a);
      cfg_wdata = (a < 128) ? kd[a] : (a < 256) ? ks[a - 128] : i0;
    end
    @(negedge clk); cfg_we = 0; cfg_done = 1;
  end

  // ---------------- one engine ----------------
  logic [0:0] s_valid = '0, s_ready;
  cmd_e s_cmd [1];
  logic [63:0] s_code [1];
  logic s_iv, s_ir, s_fv;
  pword_t s_id;
  rgb_t [3:0] s_fd;
  logic [0:0] s_es, s_le, s_st, s_la, s_fdn, s_zr;
  prc_chain #(.N_UNITS(1), .IMG_W(W), .IMG_H(H)) u_one (
    .clk, .rst_n, .pc_valid (s_valid), .pc_ready (s_ready), .pc_cmd (s_cmd), .pc_code (s_code),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .init_valid (s_iv), .init_ready (s_ir), .init_data (s_id),
    .frame_valid (s_fv), .frame_ready (1'b1), .frame_data (s_fd),
    .elem_start (s_es), .large_elem (s_le), .stall (s_st), .line_advance (s_la),
    .frame_done (s_fdn), .z_reject (s_zr));

  // ---------------- four engines ----------------
  logic [3:0] c_valid = '0, c_ready;
  cmd_e c_cmd [4];
  logic [63:0] c_code [4];
  logic c_iv, c_ir, c_fv;
  pword_t c_id;
  rgb_t [3:0] c_fd;
  logic [3:0] c_es, c_le, c_st, c_la, c_fdn, c_zr;
  prc_chain #(.N_UNITS(4), .IMG_W(W), .IMG_H(H)) u_four (
    .clk, .rst_n, .pc_valid (c_valid), .pc_ready (c_ready), .pc_cmd (c_cmd), .pc_code (c_code),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .init_valid (c_iv), .init_ready (c_ir), .init_data (c_id),
    .frame_valid (c_fv), .frame_ready (1'b1), .frame_data (c_fd),
    .elem_start (c_es), .large_elem (c_le), .stall (c_st), .line_advance (c_la),
    .frame_done (c_fdn), .z_reject (c_zr));

  // particle streams: engine u of a chain of n gets the elements it owns
  initial begin
    s_cmd[0] = CMD_ELEM; s_code[0] = '0;
    wait (cfg_done);
    for (int y0 = 0; y0 < NPOS; y0++) begin
      for (int i = y0 * PER_LINE; i < (y0 + 1) * PER_LINE; i++) begin
        @(negedge clk); s_valid[0] = 1; s_cmd[0] = CMD_ELEM; s_code[0] = codes[i];
        @(posedge clk); while (!s_ready[0]) @(posedge clk);
      end
      @(negedge clk); s_valid[0] = 1; s_cmd[0] = CMD_LINE; s_code[0] = '0;
      @(posedge clk); while (!s_ready[0]) @(posedge clk);
    end
    @(negedge clk); s_valid[0] = 0;
  end
  for (genvar g = 0; g < 4; g++) begin : g_feed
    initial begin
      c_cmd[g] = CMD_ELEM; c_code[g] = '0;
      wait (cfg_done);
      for (int y0 = 0; y0 < NPOS; y0++) begin
        for (int i = y0 * PER_LINE; i < (y0 + 1) * PER_LINE; i++) begin
          if (owner[i] != g) continue;
          @(negedge clk); c_valid[g] = 1; c_cmd[g] = CMD_ELEM; c_code[g] = codes[i];
          @(posedge clk); while (!c_ready[g]) @(posedge clk);
        end
        @(negedge clk); c_valid[g] = 1; c_cmd[g] = CMD_LINE; c_code[g] = '0;
        @(posedge clk); while (!c_ready[g]) @(posedge clk);
      end
      @(negedge clk); c_valid[g] = 0;
    end
  end

  // initial image streams, always valid
  int s_ia = 0, c_ia = 0;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s_id[i] = init_img[(s_ia / WORDS) % H][4 * (s_ia % WORDS) + i];
      c_id[i] = init_img[(c_ia / WORDS) % H][4 * (c_ia % WORDS) + i];
    end
  end
  assign s_iv = stim_ready && s_ia < H * WORDS;
  assign c_iv = stim_ready && c_ia < H * WORDS;
  always @(posedge clk) begin
    if (s_iv && s_ir) s_ia <= s_ia + 1;
    if (c_iv && c_ir) c_ia <= c_ia + 1;
  end

  // element starts of the four-engine chain: total and best window
  int c_starts = 0, peak = 0, win_sum = 0;
  int hist [RATE_WIN];
  initial for (int i = 0; i < RATE_WIN; i++) hist[i] = 0;
  always @(posedge clk) begin
    automatic int n = $countones(c_es);
    c_starts += n;
    win_sum += n - hist[cyc % RATE_WIN];
    hist[cyc % RATE_WIN] = n;
    if (win_sum > peak) peak = win_sum;
  end

  // outputs: compare and time
  int s_oa = 0, c_oa = 0, cyc = 0, t_start = 0, s_end = 0, c_end = 0;
  always @(posedge clk) begin
    cyc++;
    if (cfg_done && t_start == 0) t_start = cyc;
    if (s_fv) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (s_fd[i] != ref_img[s_oa / WORDS][4 * (s_oa % WORDS) + i].rgb) failures++;
      end
      s_oa++;
      if (s_oa == H * WORDS) s_end = cyc;
    end
    if (c_fv) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (c_fd[i] != ref4_img[c_oa / WORDS][4 * (c_oa % WORDS) + i].rgb) failures++;
      end
      c_oa++;
      if (c_oa == H * WORDS) c_end = cyc;
    end
  end

  initial begin
    real su;
    wait (s_end > 0 && c_end > 0);
    su = real'(s_end - t_start) / real'(c_end - t_start);
    $display("%0d elements: one engine %0d cycles (%.2f per element), four engines %0d cycles, speedup %.2f",
             NE, s_end - t_start, real'(s_end - t_start) / NE, c_end - t_start, su);
    checks++;
    if (s_end - t_start < 4 * NE || s_end - t_start > 4 * NE + 1000) begin
      failures++; $display("single engine not at 4 cycles per element");
    end
    $display("four engines: %0d element starts, at most %0d in %0d cycles (%.2f per cycle)",
             c_starts, peak, RATE_WIN, real'(peak) / RATE_WIN);
    checks++;
    if (c_starts != NE) begin failures++; $display("element starts %0d, expected %0d", c_starts, NE); end
    checks++;
    if (real'(peak) < 0.8 * RATE_WIN) begin failures++; $display("peak rate below 0.8 per cycle"); end
    checks++;
    if (su < 2.3) begin failures++; $display("speedup below 2.3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
