// Testbench of prc_controller (IMG_H = 16, 9 banks): a model of the porter
// loads lines at a random pace; the testbench sends two frames of element and
// line commands and checks that elements are issued only when the eight window
// lines are loaded and never faster than one per 4 cycles (exactly 4 when
// elements follow each other and lines are ready), that the window advances
// only when the next line is loaded, that y0_bank and lines_done follow the
// window, and that the frame ends with a flush that waits for frame_done.
module tb_prc_controller;
  import prc_pkg::*;

  localparam int H = 16, NB = 9;
  logic clk = 0, rst_n = 0;
  logic dec_valid = 0, dec_ready;
  cmd_e dec_cmd = CMD_ELEM;
  logic [4:0] lines_imported = '0;
  logic frame_done = 0;
  logic elem_start, stall, line_advance;
  logic [3:0] y0_bank;
  logic [4:0] lines_done;
  int checks = 0, failures = 0;

  prc_controller #(.IMG_H(H), .N_BANKS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // porter model: loads a line every few cycles when its bank is free
  int exported = 0;
  bit slow = 0;
  always @(posedge clk) if (rst_n) begin
    frame_done <= 0;
    if ($urandom_range(0, slow ? 40 : 3) == 0) begin
      if (int'(lines_imported) < H && (int'(lines_imported) < NB ||
          int'(lines_imported) - NB < int'(lines_done)))
        lines_imported <= lines_imported + 1;
      else if (int'(lines_imported) == H && int'(lines_done) == H && !frame_done) begin
        frame_done     <= 1;
        lines_imported <= '0;
      end
    end
  end

  // checks on every cycle
  int y0 = 0, last_start = -100, cyc = 0, n_elem = 0, n_line = 0, n_stall = 0,
      n_tight = 0, n_flush = 0;
  bit flushing = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    checks++;
    if (int'(lines_done) != (flushing ? H : y0) || int'(y0_bank) != y0 % NB) begin
      failures++; $display("cycle %0d: lines_done %0d y0_bank %0d, y0 %0d", cyc, lines_done, y0_bank, y0);
    end
    if (stall) n_stall++;
    if (elem_start) begin
      checks++;
      if (flushing || int'(lines_imported) < y0 + 8 || cyc - last_start < 4) begin
        failures++; $display("cycle %0d: element issued too early", cyc);
      end
      if (cyc - last_start == 4) n_tight++;
      last_start = cyc;
      n_elem++;
    end else if (dec_valid && dec_cmd == CMD_ELEM && !flushing && int'(lines_imported) >= y0 + 8 &&
                 cyc - last_start >= 4) begin
      checks++; failures++; $display("cycle %0d: ready element not issued", cyc);
    end
    if (line_advance) begin
      checks++;
      if (flushing || cyc - last_start < 4 || (y0 < H - 8 && int'(lines_imported) < y0 + 9)) begin
        failures++; $display("cycle %0d: window advanced too early", cyc);
      end
      n_line++;
      if (y0 == H - 8) begin flushing = 1; n_flush++; end
      else y0++;
    end
    if (flushing && frame_done) begin flushing = 0; y0 = 0; end
  end

  task automatic send(input cmd_e c);
    @(negedge clk);
    dec_valid = 1; dec_cmd = c;
    @(posedge clk);
    while (!dec_ready) @(posedge clk);
    @(negedge clk); dec_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      slow = (f == 1);
      for (int y = 0; y <= H - 8; y++) begin
        int n;
        n = $urandom_range(0, 6);
        for (int e = 0; e < n; e++) begin
          @(negedge clk); dec_valid = 1; dec_cmd = CMD_ELEM;
          @(posedge clk);
          while (!dec_ready) @(posedge clk);
        end
        send(CMD_LINE);
      end
    end
    repeat (200) @(posedge clk);
    checks++;
    if (n_flush != 3 || n_line != 3 * (H - 7) || n_stall == 0 || n_tight == 0 || flushing) begin
      failures++;
      $display("coverage: flush %0d line %0d stall %0d back-to-back %0d", n_flush, n_line, n_stall, n_tight);
    end
    $display("elements %0d lines %0d stalls %0d back-to-back %0d", n_elem, n_line, n_stall, n_tight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
