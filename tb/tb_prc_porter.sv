// Testbench of prc_porter (16-pixel lines, 12-line frame, 9 banks): the
// banks are modelled as arrays. Import words carry their frame, line and word
// number; the testbench moves the window on as lines arrive, with random
// stalls on both streams, and checks that every line comes out in order with
// the data imported for it, that the porter never touches the bank of a
// loaded line of the active window, and that frame_done ends each frame.
module tb_prc_porter;
  import prc_pkg::*;

  localparam int W = 16, H = 12, NB = 9, WORDS = W / 4;
  logic clk = 0, rst_n = 0;
  logic [3:0] lines_done = '0, lines_imported;
  logic frame_done;
  logic [NB-1:0] p_sel;
  logic p_re, p_we;
  logic [1:0] p_raddr, p_waddr;
  pword_t p_rdata [NB];
  pword_t p_wdata;
  logic imp_valid = 0, imp_ready, exp_valid, exp_ready = 0;
  pword_t imp_data = '0, exp_data;
  int checks = 0, failures = 0;

  prc_porter #(.IMG_W(W), .IMG_H(H), .N_BANKS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word tag: pixel 0 colour holds frame, line and word
  function automatic pword_t tag(input int f, input int l, input int a);
    pword_t w;
    for (int i = 0; i < 4; i++) begin
      w[i].rgb = rgb_t'({8'(f), 8'(l), 8'(a)});
      w[i].z   = 9'(i + 4 * a);
    end
    return w;
  endfunction

  // bank model
  pword_t mem [NB][WORDS];
  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (p_sel[b] && p_we) mem[b][p_waddr] <= p_wdata;
      if (p_sel[b] && p_re) p_rdata[b] <= mem[b][p_raddr];
    end
  end

  // import source
  int imp_f = 0, imp_l = 0, imp_a = 0;
  bit fast = 0;
  always @(negedge clk) begin
    imp_valid <= fast || ($urandom_range(0, 2) != 0);
    imp_data  <= tag(imp_f, imp_l, imp_a);
    exp_ready <= fast || ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (rst_n && imp_valid && imp_ready) begin
    imp_a++;
    if (imp_a == WORDS) begin
      imp_a = 0; imp_l++;
      if (imp_l == H) begin imp_l = 0; imp_f++; end
    end
  end

  // export sink and checks
  int exp_f = 0, exp_l = 0, exp_a = 0, n_frames = 0, n_imp_stall = 0, n_exp_stall = 0;
  int y0 = 0, cyc = 0;
  always @(posedge clk) cyc++;
  bit flushing = 0;
  always @(posedge clk) if (rst_n) begin
    if (exp_valid && !exp_ready) n_exp_stall++;
    if (imp_ready && !imp_valid) n_imp_stall++;
    if (exp_valid && exp_ready) begin
      checks++;
      if (exp_data != tag(exp_f, exp_l, exp_a)) begin
        failures++;
        if (failures < 10) $display("export f%0d l%0d w%0d: got %h", exp_f, exp_l, exp_a, exp_data[0]);
      end
      exp_a++;
      if (exp_a == WORDS) begin
        exp_a = 0; exp_l++;
        if (exp_l == H) begin exp_l = 0; exp_f++; end
      end
    end
    // loaded lines of the active window are off limits
    if (!flushing) for (int r = 0; r < 8; r++) begin
      if (y0 + r < int'(lines_imported) && p_sel[(y0 + r) % NB]) begin
        checks++; failures++; $display("porter touched active line %0d", y0 + r);
      end
    end
    if (frame_done) begin
      checks++;
      if (!flushing || exp_l != 0 || exp_a != 0) begin
        failures++; $display("frame_done at the wrong time");
      end
      n_frames++;
    end
  end

  // window driver: advance when the next line is loaded
  always @(negedge clk) if (rst_n) begin
    if (flushing) begin
      if (n_frames > 0 && lines_done == 4'(H) && frame_done_seen) begin
        flushing = 0; y0 = 0; lines_done = '0;
      end
    end else if (fast || $urandom_range(0, 5) == 0) begin
      if (y0 == H - 8) begin
        if (int'(lines_imported) >= H) begin flushing = 1; lines_done = 4'(H); end
      end else if (int'(lines_imported) >= y0 + 9) begin
        y0++; lines_done = 4'(y0);
      end
    end
  end
  bit frame_done_seen = 0;
  always @(posedge clk) begin
    if (frame_done) frame_done_seen <= 1;
    else if (!flushing) frame_done_seen <= 0;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n_frames == 3);
    fast = 1;
    begin
      int t0;
      t0 = cyc;
      wait (n_frames == 4);
      checks++;
      if (cyc - t0 > (H + NB) * (WORDS + 3) + 4) begin
        failures++; $display("fast frame took %0d cycles", cyc - t0);
      end
      $display("frame with free streams: %0d cycles for %0d passes of %0d words", cyc - t0, H + NB, WORDS);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_f != 4 || n_imp_stall == 0 || n_exp_stall == 0) begin
      failures++; $display("frames %0d, stalls imp %0d exp %0d", exp_f, n_imp_stall, n_exp_stall);
    end
    $display("frames %0d import stalls %0d export stalls %0d", exp_f, n_imp_stall, n_exp_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
