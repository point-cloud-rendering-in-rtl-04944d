// Testbench of prc_switcher: for every ring position of the window top and
// random elements, checks that bitmap row r goes to bank (y0_bank + r) mod 9
// with the start pulse, and that the one bank outside the window gets nothing.
module tb_prc_switcher;
  import prc_pkg::*;

  localparam int NB = 9;
  logic start;
  elem_t elem;
  logic [3:0] y0_bank;
  logic [NB-1:0] w_start;
  scan_t w_scan [NB];
  logic [8:0] w_x, w_z;
  rgb_t w_rgb;
  int checks = 0, failures = 0;

  prc_switcher #(.N_BANKS(NB)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int b;
      b = t % NB;
      start = 1'($urandom_range(0, 1));
      for (int r = 0; r < 8; r++) begin
        elem.rows[r].off = 4'($urandom);
        elem.rows[r].len = 3'($urandom);
      end
      elem.x = 9'($urandom); elem.z = 9'($urandom); elem.rgb = rgb_t'($urandom);
      y0_bank = 4'(b);
      #1;
      for (int r = 0; r < NB; r++) begin
        int w;
        w = (b + r) % NB;
        checks++;
        if (r < 8) begin
          if (w_start[w] != start || w_scan[w] != elem.rows[r]) begin
            failures++; $display("y0_bank %0d row %0d: bank %0d wrong", b, r, w);
          end
        end else if (w_start[w] != 1'b0) begin
          failures++; $display("y0_bank %0d: porter bank %0d started", b, w);
        end
      end
      checks++;
      if (w_x != elem.x || w_z != elem.z || w_rgb != elem.rgb) begin
        failures++; $display("broadcast fields wrong");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
