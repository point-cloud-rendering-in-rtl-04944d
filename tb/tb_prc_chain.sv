// Testbench of prc_chain, four engines on a reduced 32 x 20 pixel frame:
// the elements of each window position are dealt at random to the engines
// (each engine gets its own y-sorted stream), two frames are rendered over
// random initial images, and the colour leaving the last engine is compared
// with a model that draws engine 0's elements first, then engine 1's, and so
// on (what the chained depth tests amount to). Counts the mechanisms seen in
// every engine: window stalls, line advances, frame ends, depth rejects, large
// fragments, plus waits on the initial image and on the output.
module tb_prc_chain;
  import prc_pkg::*;
  import prc_ref_pkg::*;

  localparam int NU = 4, W = 32, H = 20, FRAMES = 2, DENSITY = 6, WATCHDOG = 2000000;
  localparam int WORDS = W / 4;

  logic clk = 0, rst_n = 0;
  logic [NU-1:0] pc_valid = '0, pc_ready;
  cmd_e pc_cmd [NU];
  logic [63:0] pc_code [NU];
  logic cfg_we = 0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  rgb_t cfg_wdata = '0;
  logic init_valid = 0, init_ready, frame_valid, frame_ready = 0;
  pword_t init_data = '0;
  rgb_t [3:0] frame_data;
  logic [NU-1:0] elem_start, large_elem, stall, line_advance, frame_done, z_reject;
  int checks = 0, failures = 0;

  prc_chain #(.N_UNITS(NU), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rgb_t kd [128], ks [128], i0;
  pixel_t init_img [FRAMES][H][W];
  pixel_t ref_img  [FRAMES][H][W];
  logic [63:0] q_code [NU][$];
  cmd_e        q_cmd  [NU][$];
  int          q_y0   [NU][$];
  bit stim_ready = 0;

  task automatic cfg(input int a, input rgb_t v);
    @(negedge clk); cfg_we = 1; cfg_addr = 9'(a); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic draw(input int f, input int y0, input logic [63:0] c);
    int x, z, m, d, s;
    rgb_t col;
    x = int'(c[54:46]); z = int'(c[63:55]);
    m = int'(c[45:39]); d = int'(c[31:25]); s = int'(c[38:32]);
    col.r = 8'(shade(i0.r, kd[m].r, ks[m].r, d, s));
    col.g = 8'(shade(i0.g, kd[m].g, ks[m].g, d, s));
    col.b = 8'(shade(i0.b, kd[m].b, ks[m].b, d, s));
    for (int r = 0; r < 8; r++) begin
      int lo, hi;
      row_span(c, r, lo, hi);
      for (int p = x + lo; p <= x + hi; p++) begin
        if (p < 0 || p >= W) continue;
        if (z < int'(ref_img[f][y0 + r][p].z)) begin
          ref_img[f][y0 + r][p].z = 9'(z);
          ref_img[f][y0 + r][p].rgb = col;
        end
      end
    end
  endtask

  initial begin
    for (int m = 0; m < 128; m++) begin
      kd[m] = rgb_t'($urandom); ks[m] = rgb_t'($urandom) & 24'h3f3f3f;
    end
    i0 = 24'h040404;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          init_img[f][y][x].rgb = rgb_t'($urandom);
          init_img[f][y][x].z   = 9'($urandom_range(300, 511));
          ref_img[f][y][x] = init_img[f][y][x];
        end
      for (int y0 = 0; y0 <= H - 8; y0++) begin
        int n;
        n = $urandom_range(0, DENSITY);
        for (int e = 0; e < n; e++) begin
          int u;
          u = $urandom_range(0, NU - 1);
          q_code[u].push_back(make_code(1'($urandom_range(0, 3) == 0), rand_scans(),
                              $urandom_range(0, 127), $urandom_range(0, 127),
                              $urandom_range(0, 127), $urandom_range(0, (W + 4 > 511) ? 511 : W + 4),
                              $urandom_range(0, 511)));
          q_cmd[u].push_back(CMD_ELEM);
          q_y0[u].push_back(y0);
        end
        for (int u = 0; u < NU; u++) begin
          q_code[u].push_back('0); q_cmd[u].push_back(CMD_LINE); q_y0[u].push_back(y0);
        end
      end
    end
    // model: engine by engine, each in its own order
    for (int u = 0; u < NU; u++) begin
      int f;
      f = 0;
      foreach (q_cmd[u][i]) begin
        if (q_cmd[u][i] == CMD_ELEM) draw(f, q_y0[u][i], q_code[u][i]);
        else if (q_y0[u][i] == H - 8) f++;
      end
    end
    stim_ready = 1;
  end

  initial begin
    for (int u = 0; u < NU; u++) begin pc_cmd[u] = CMD_ELEM; pc_code[u] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (stim_ready);
    for (int m = 0; m < 128; m++) begin cfg(m, kd[m]); cfg(128 + m, ks[m]); end
    cfg(256, i0);
  end

  // particle streams, one process per engine
  for (genvar g = 0; g < NU; g++) begin : g_src
    initial begin
      wait (stim_ready);
      @(posedge clk iff cfg_addr == 9'd256);
      while (q_cmd[g].size() > 0) begin
        @(negedge clk);
        if ($urandom_range(0, 7) == 0) begin pc_valid[g] = 0; continue; end
        pc_valid[g] = 1; pc_cmd[g] = q_cmd[g][0]; pc_code[g] = q_code[g][0];
        @(posedge clk);
        while (!pc_ready[g]) @(posedge clk);
        void'(q_cmd[g].pop_front()); void'(q_code[g].pop_front()); void'(q_y0[g].pop_front());
      end
      @(negedge clk); pc_valid[g] = 0;
    end
  end

  // initial image into engine 0
  int if_ = 0, il = 0, ia = 0;
  always @(negedge clk) begin
    init_valid <= stim_ready && if_ < FRAMES && ($urandom_range(0, 3) != 0);
    if (if_ < FRAMES)
      for (int i = 0; i < 4; i++) init_data[i] <= init_img[if_][il][4 * ia + i];
    frame_ready <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n && init_valid && init_ready) begin
    ia++;
    if (ia == WORDS) begin ia = 0; il++; if (il == H) begin il = 0; if_++; end end
  end

  // output of the last engine
  int ef = 0, el = 0, ea = 0;
  int n_stall [NU], n_line [NU], n_frame [NU], n_reject [NU], n_large [NU], n_elem [NU];
  int n_init_wait = 0, n_out_wait = 0, cyc = 0;
  initial foreach (n_stall[u]) begin
    n_stall[u] = 0; n_line[u] = 0; n_frame[u] = 0; n_reject[u] = 0; n_large[u] = 0; n_elem[u] = 0;
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (frame_valid && frame_ready) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (frame_data[i] != ref_img[ef][el][4 * ea + i].rgb) begin
          failures++;
          if (failures < 10)
            $display("frame %0d line %0d px %0d: got %h expected %h", ef, el, 4 * ea + i,
                     frame_data[i], ref_img[ef][el][4 * ea + i].rgb);
        end
      end
      ea++;
      if (ea == WORDS) begin ea = 0; el++; if (el == H) begin el = 0; ef++; end end
    end
    for (int u = 0; u < NU; u++) begin
      if (stall[u]) n_stall[u]++;
      if (line_advance[u]) n_line[u]++;
      if (frame_done[u]) n_frame[u]++;
      if (z_reject[u]) n_reject[u]++;
      if (large_elem[u]) n_large[u]++;
      if (elem_start[u]) n_elem[u]++;
    end
    if (init_ready && !init_valid) n_init_wait++;
    if (frame_valid && !frame_ready) n_out_wait++;
  end

  initial begin
    wait (ef == FRAMES);
    repeat (10) @(posedge clk);
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (n_stall[u] == 0 || n_line[u] != FRAMES * (H - 7) || n_frame[u] != FRAMES ||
          n_reject[u] == 0 || n_large[u] == 0) begin
        failures++; $display("engine %0d: a mechanism never happened", u);
      end
      $display("engine %0d: elements %0d large %0d stalls %0d line advances %0d frames %0d depth rejects %0d",
               u, n_elem[u], n_large[u], n_stall[u], n_line[u], n_frame[u], n_reject[u]);
    end
    checks++;
    if (n_init_wait == 0 || n_out_wait == 0) begin
      failures++; $display("no wait on the initial image or the output");
    end
    $display("initial image waits %0d output waits %0d, %0d cycles", n_init_wait, n_out_wait, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
