// Testbench of prc_decoder: sends random small-point and large-fragment code
// words and line commands through the decoder with random back-pressure and
// checks every decoded beat: command, mode, position, depth, colour and the
// pixel span of all eight rows (computed from the code word by prc_ref_pkg).
module tb_prc_decoder;
  import prc_pkg::*;
  import prc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  cmd_e in_cmd = CMD_ELEM;
  logic [63:0] in_code = '0;
  logic cfg_we = 0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  rgb_t cfg_wdata = '0;
  logic out_valid, out_ready = 0, out_mode;
  cmd_e out_cmd;
  elem_t out_elem;
  int checks = 0, failures = 0;

  prc_decoder dut (.*);

  always #5 clk = ~clk;

  localparam int N = 2000;
  logic [63:0] codes [N];
  cmd_e        cmds  [N];
  rgb_t kd [128], ks [128], i0;
  int n_out = 0, n_small = 0, n_large = 0, n_line = 0, n_mirror_left = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int a, input rgb_t v);
    @(negedge clk); cfg_we = 1; cfg_addr = 9'(a); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  // check one output beat
  task automatic check_beat(input int idx);
    logic [63:0] c;
    c = codes[idx];
    checks++;
    if (out_cmd != cmds[idx]) begin
      failures++; $display("beat %0d: cmd mismatch", idx); return;
    end
    if (cmds[idx] == CMD_LINE) begin n_line++; return; end
    if (out_mode != c[0] || out_elem.x != c[54:46] || out_elem.z != c[63:55]) begin
      failures++; $display("beat %0d: field mismatch", idx);
    end
    begin
      int m, d, s;
      m = int'(c[45:39]); d = int'(c[31:25]); s = int'(c[38:32]);
      checks++;
      if (out_elem.rgb.r != 8'(shade(i0.r, kd[m].r, ks[m].r, d, s)) ||
          out_elem.rgb.g != 8'(shade(i0.g, kd[m].g, ks[m].g, d, s)) ||
          out_elem.rgb.b != 8'(shade(i0.b, kd[m].b, ks[m].b, d, s))) begin
        failures++; $display("beat %0d: colour mismatch", idx);
      end
    end
    if (c[0]) n_large++; else n_small++;
    for (int r = 0; r < 8; r++) begin
      int lo, hi, glo, ghi;
      row_span(c, r, lo, hi);
      glo = int'(out_elem.rows[r].off);
      ghi = glo + int'(out_elem.rows[r].len) - 1;
      checks++;
      if (hi < lo) begin
        if (out_elem.rows[r].len != 0) begin
          failures++; $display("beat %0d row %0d: should be empty", idx, r);
        end
      end else begin
        if (lo < 0) n_mirror_left++;
        if (glo != lo || ghi != hi) begin
          failures++;
          $display("beat %0d row %0d: span %0d..%0d expected %0d..%0d", idx, r, glo, ghi, lo, hi);
        end
      end
    end
  endtask

  // consumer with random back-pressure
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        #1 ;
      end
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check_beat(n_out);
    n_out <= n_out + 1;
  end

  initial begin
    // the published small point example: rows 1..3 = (2,1) (1,4) (1,5)
    codes[0] = make_code(0, {3'd5, 3'd1, 3'd4, 3'd1, 3'd1, 3'd2, 3'd0, 3'd0}, 10, 20, 3, 100, 50);
    cmds[0]  = CMD_ELEM;
    for (int i = 1; i < N; i++) begin
      cmds[i]  = ($urandom_range(0, 5) == 0) ? CMD_LINE : CMD_ELEM;
      codes[i] = make_code(1'($urandom_range(0, 1)), rand_scans(), $urandom_range(0, 127),
                           $urandom_range(0, 127), $urandom_range(0, 127),
                           $urandom_range(0, 511), $urandom_range(0, 511));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 128; m++) begin
      kd[m] = rgb_t'($urandom) & 24'h7f7f7f; ks[m] = rgb_t'($urandom);
      cfg(m, kd[m]); cfg(128 + m, ks[m]);
    end
    i0 = 24'h102030;
    cfg(256, i0);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; in_cmd = cmds[i]; in_code = codes[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("only %0d of %0d beats came out", n_out, N); end
    if (n_small == 0 || n_large == 0 || n_line == 0 || n_mirror_left == 0) begin
      failures++; $display("coverage: small %0d large %0d line %0d mirrored-left %0d",
                           n_small, n_large, n_line, n_mirror_left);
    end
    $display("beats %0d small %0d large %0d line %0d", n_out, n_small, n_large, n_line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
