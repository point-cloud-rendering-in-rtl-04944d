// Testbench of prc_engine at a reduced size (32 x 16 pixel frame, 9 banks):
// three frames of random small points and large point fragments are rendered
// over a random initial image, with random stalls on the particle, import and
// export streams. The exported frame (colour and depth) is compared with a
// pixel-by-pixel model of the same element sequence, the element rate is
// checked (never faster than one per 4 cycles, exactly 4 in bursts), and the
// testbench counts the window stalls, line advances, frame ends, depth test
// rejections and large fragments it saw.
module tb_prc_engine;
  import prc_pkg::*;
  import prc_ref_pkg::*;

  localparam int W = 32, H = 16, NB = 9, FRAMES = 3;
  localparam int WORDS = W / 4;

  logic clk = 0, rst_n = 0;
  logic pc_valid = 0, pc_ready;
  cmd_e pc_cmd = CMD_ELEM;
  logic [63:0] pc_code = '0;
  logic cfg_we = 0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  rgb_t cfg_wdata = '0;
  logic imp_valid = 0, imp_ready, exp_valid, exp_ready = 0;
  pword_t imp_data = '0, exp_data;
  logic elem_start, large_elem, stall, line_advance, frame_done, z_reject;
  int checks = 0, failures = 0;

  prc_engine #(.IMG_W(W), .IMG_H(H), .N_BANKS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rgb_t kd [128], ks [128], i0;
  pixel_t init_img [FRAMES][H][W];
  pixel_t ref_img  [FRAMES][H][W];
  logic [63:0] q_code [$];
  cmd_e        q_cmd  [$];

  task automatic cfg(input int a, input rgb_t v);
    @(negedge clk); cfg_we = 1; cfg_addr = 9'(a); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  // draw one element into the model
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

  // stimulus and model
  initial begin
    for (int m = 0; m < 128; m++) begin
      kd[m] = rgb_t'($urandom); ks[m] = rgb_t'($urandom) & 24'h3f3f3f;
    end
    i0 = 24'h080808;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          init_img[f][y][x].rgb = rgb_t'($urandom);
          init_img[f][y][x].z   = 9'($urandom_range(300, 511));
          ref_img[f][y][x] = init_img[f][y][x];
        end
      for (int y0 = 0; y0 <= H - 8; y0++) begin
        int n;
        // frame 1 has dense lines, to make the window wait for the porter less
        n = (f == 1) ? $urandom_range(5, 14) : $urandom_range(0, 6);
        for (int e = 0; e < n; e++) begin
          logic [63:0] c;
          c = make_code(1'($urandom_range(0, 3) == 0), rand_scans(), $urandom_range(0, 127),
                        $urandom_range(0, 127), $urandom_range(0, 127),
                        $urandom_range(0, W + 4), $urandom_range(0, 511));
          q_code.push_back(c); q_cmd.push_back(CMD_ELEM);
          draw(f, y0, c);
        end
        q_code.push_back('0); q_cmd.push_back(CMD_LINE);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 128; m++) begin cfg(m, kd[m]); cfg(128 + m, ks[m]); end
    cfg(256, i0);
    // particle stream
    while (q_cmd.size() > 0) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin pc_valid = 0; continue; end
      pc_valid = 1; pc_cmd = q_cmd[0]; pc_code = q_code[0];
      @(posedge clk);
      while (!pc_ready) @(posedge clk);
      void'(q_cmd.pop_front()); void'(q_code.pop_front());
    end
    @(negedge clk); pc_valid = 0;
  end

  // import stream: the initial images, word by word
  int if_ = 0, il = 0, ia = 0;
  bit imp_go = 0;
  always @(negedge clk) begin
    imp_go = imp_go || (cfg_addr == 9'd256);
    imp_valid <= imp_go && if_ < FRAMES && ($urandom_range(0, 3) != 0);
    if (if_ < FRAMES)
      for (int i = 0; i < 4; i++) imp_data[i] <= init_img[if_][il][4 * ia + i];
    exp_ready <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n && imp_valid && imp_ready) begin
    ia++;
    if (ia == WORDS) begin ia = 0; il++; if (il == H) begin il = 0; if_++; end end
  end

  // export stream: compare with the model
  int ef = 0, el = 0, ea = 0;
  int n_stall = 0, n_line = 0, n_frame = 0, n_reject = 0, n_large = 0, n_elem = 0;
  int n_imp_wait = 0, n_exp_wait = 0, n_tight = 0, last_start = -100, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (exp_valid && exp_ready) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (exp_data[i] != ref_img[ef][el][4 * ea + i]) begin
          failures++;
          if (failures < 10)
            $display("frame %0d line %0d px %0d: got %h expected %h", ef, el, 4 * ea + i,
                     exp_data[i], ref_img[ef][el][4 * ea + i]);
        end
      end
      ea++;
      if (ea == WORDS) begin ea = 0; el++; if (el == H) begin el = 0; ef++; end end
    end
    if (stall) n_stall++;
    if (line_advance) n_line++;
    if (frame_done) n_frame++;
    if (z_reject) n_reject++;
    if (large_elem) n_large++;
    if (imp_ready && !imp_valid) n_imp_wait++;
    if (exp_valid && !exp_ready) n_exp_wait++;
    if (elem_start) begin
      n_elem++;
      checks++;
      if (cyc - last_start < 4) begin failures++; $display("elements %0d cycles apart", cyc - last_start); end
      if (cyc - last_start == 4) n_tight++;
      last_start = cyc;
    end
  end

  initial begin
    wait (ef == FRAMES);
    repeat (10) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_line != FRAMES * (H - 7) || n_frame != FRAMES || n_reject == 0 ||
        n_large == 0 || n_imp_wait == 0 || n_exp_wait == 0 || n_tight == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("elements %0d (large %0d, 4-cycle bursts %0d) stalls %0d line advances %0d frames %0d",
             n_elem, n_large, n_tight, n_stall, n_line, n_frame);
    $display("depth rejects %0d import waits %0d export waits %0d", n_reject, n_imp_wait, n_exp_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
