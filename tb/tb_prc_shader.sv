// Testbench of prc_shader: loads random kd/ks tables and I0, then checks the
// colour of random (material, diffuse, specular) triples against the Phong
// sum computed channel by channel.
module tb_prc_shader;
  import prc_pkg::*;
  import prc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [CFG_ADDR_W-1:0] cfg_addr = '0;
  rgb_t cfg_wdata = '0;
  logic [6:0] material = '0, diffuse = '0, specular = '0;
  rgb_t rgb;
  int checks = 0, failures = 0;

  prc_shader dut (.*);

  always #5 clk = ~clk;

  rgb_t kd [128], ks [128], i0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int a, input rgb_t v);
    @(negedge clk); cfg_we = 1; cfg_addr = 9'(a); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 128; m++) begin
      kd[m] = rgb_t'($urandom); ks[m] = rgb_t'($urandom);
      cfg(m, kd[m]); cfg(128 + m, ks[m]);
    end
    i0 = rgb_t'($urandom) & 24'h3f3f3f;
    cfg(256, i0);
    // corner cases first, then random
    for (int t = 0; t < 3000; t++) begin
      int m, d, s;
      m = $urandom_range(0, 127);
      d = (t == 0) ? 127 : (t == 1) ? 0 : $urandom_range(0, 127);
      s = (t == 0) ? 127 : (t == 1) ? 0 : $urandom_range(0, 127);
      @(negedge clk);
      material = 7'(m); diffuse = 7'(d); specular = 7'(s);
      #1;
      checks++;
      if (rgb.r != 8'(shade(i0.r, kd[m].r, ks[m].r, d, s)) ||
          rgb.g != 8'(shade(i0.g, kd[m].g, ks[m].g, d, s)) ||
          rgb.b != 8'(shade(i0.b, kd[m].b, ks[m].b, d, s))) begin
        failures++;
        if (failures < 10) $display("mismatch m=%0d d=%0d s=%0d got %h", m, d, s, rgb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
