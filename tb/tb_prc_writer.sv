// Testbench of prc_writer: fills a 32-pixel line through the porter port,
// draws random scans (including ones clipped at both line ends and ones
// spanning three words) back to back every 4 cycles, checks the busy timing
// of each element, then reads the line back and compares every pixel with a
// pixel-by-pixel depth-test model. z_reject must pulse once per word access
// in which a covered pixel lost the depth test.
module tb_prc_writer;
  import prc_pkg::*;

  localparam int W = 32;
  localparam int WORDS = W / 4;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  scan_t scan = '0;
  logic [8:0] x = '0;
  logic [8:0] z = '0;
  rgb_t rgb = '0;
  logic busy, z_reject;
  logic porter_sel = 0, p_re = 0, p_we = 0;
  logic [2:0] p_raddr = '0, p_waddr = '0;
  pword_t p_rdata, p_wdata = '0;
  int checks = 0, failures = 0;

  prc_writer #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  pixel_t ref_px [W];
  int n_clip_left = 0, n_clip_right = 0, n_three = 0, n_reject_model = 0, n_reject_seen = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && z_reject) n_reject_seen++;

  task automatic load_line();
    porter_sel = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      p_we = 1; p_waddr = 3'(a);
      for (int i = 0; i < 4; i++) begin
        p_wdata[i].rgb = rgb_t'($urandom);
        p_wdata[i].z   = 9'($urandom_range(100, 511));
        ref_px[4*a + i] = p_wdata[i];
      end
    end
    @(negedge clk); p_we = 0; porter_sel = 0;
  endtask

  task automatic check_line();
    @(negedge clk); porter_sel = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); p_re = 1; p_raddr = 3'(a);
      @(negedge clk); p_re = 0;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (p_rdata[i] != ref_px[4*a + i]) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %h expected %h", 4*a+i, p_rdata[i], ref_px[4*a+i]);
        end
      end
    end
    @(negedge clk); porter_sel = 0;
  endtask

  // model of one scan
  task automatic model(input int xx, input int off, input int len, input int zz, input rgb_t c);
    int lo, hi;
    bit [15:0] rej;
    lo = xx + off; hi = xx + off + len - 1;
    if (len > 0 && lo < 0) n_clip_left++;
    if (len > 0 && hi > W - 1 && lo <= W - 1) n_clip_right++;
    if (len > 0 && lo >= 0 && hi < W && (hi / 4 - lo / 4) == 2) n_three++;
    rej = 0;
    for (int p = lo; p <= hi; p++) begin
      if (p < 0 || p >= W) continue;
      if (zz < int'(ref_px[p].z)) begin
        ref_px[p].z = 9'(zz); ref_px[p].rgb = c;
      end else rej[p / 4] = 1;
    end
    n_reject_model += $countones(rej);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      load_line();
      for (int e = 0; e < 200; e++) begin
        int xx, off, len, zz;
        rgb_t c;
        xx  = (e % 5 == 0) ? $urandom_range(30, 40) : $urandom_range(0, 31);
        off = $urandom_range(0, 15) - 8;
        len = $urandom_range(0, 7);
        zz  = $urandom_range(0, 511);
        c   = rgb_t'($urandom);
        @(negedge clk);
        start = 1; scan.off = 4'(off); scan.len = 3'(len); x = 9'(xx); z = 9'(zz); rgb = c;
        model(xx, off, len, zz, c);
        @(negedge clk);
        start = 0;
        // busy during the three word accesses, free on the fourth cycle
        for (int k = 1; k <= 3; k++) begin
          checks++;
          if (!busy) begin failures++; $display("busy low %0d cycles after start", k); end
          if (k < 3) @(negedge clk);
        end
        // next start may follow immediately (back to back), or after a gap
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          checks++;
          if (busy) begin failures++; $display("busy still high 4 cycles after start"); end
        end
      end
      @(negedge clk);
      @(negedge clk);
      check_line();
    end
    checks++;
    if (n_clip_left == 0 || n_clip_right == 0 || n_three == 0 || n_reject_model == 0 ||
        n_reject_seen == 0) begin
      failures++;
      $display("coverage: clip-left %0d clip-right %0d 3-word %0d reject %0d/%0d",
               n_clip_left, n_clip_right, n_three, n_reject_model, n_reject_seen);
    end
    checks++;
    if (n_reject_seen != n_reject_model) begin
      failures++; $display("z_reject pulses %0d, model %0d", n_reject_seen, n_reject_model);
    end
    $display("clip-left %0d clip-right %0d 3-word %0d reject %0d", n_clip_left, n_clip_right,
             n_three, n_reject_model);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
