// prc_shader: final colour evaluation of a point element.
//
// Computes, per colour channel, the Phong sum with one specular term and a
// white light:  I = I0 + kd[MATERIAL] * DIFFUSE + ks[MATERIAL] * SPECULAR.
// DIFFUSE and SPECULAR are the 7-bit light intensities the host found in its
// reflection and diffusion tables; I0 and the two colour tables kd and ks
// (128 RGB entries each, indexed by MATERIAL) live here, as the model asks.
//
// Fixed point (this design's choice): kd and ks channels are 8-bit fractions
// of 1.0 (255 ~ 1.0), DIFFUSE and SPECULAR are 7-bit fractions (127 ~ 1.0).
// Each product is kd_c * D / 128 (15-bit product, top 8 bits kept) and the
// sum of the three terms saturates at 255.
//
// Interface: tables are written through cfg_we/cfg_addr/cfg_wdata (address map
// in prc_pkg: 0..127 kd, 128..255 ks, 256 I0). The lookup is combinational
// (small tables read like LUT RAM), so the decoder can register the result in
// the same stage as the geometry. I0 resets to zero; the tables are not reset and must be
// written before the first element.
module prc_shader
  import prc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  rgb_t                  cfg_wdata,
  input  logic [LIGHT_W-1:0]    material,
  input  logic [LIGHT_W-1:0]    diffuse,
  input  logic [LIGHT_W-1:0]    specular,
  output rgb_t                  rgb
);

  rgb_t kd_tab [MAT_N];
  rgb_t ks_tab [MAT_N];
  rgb_t i0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      i0 <= '0;
    else if (cfg_we && cfg_addr == CFG_I0)
      i0 <= cfg_wdata;
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (cfg_addr[CFG_ADDR_W-1:LIGHT_W] == CFG_KD_BASE[CFG_ADDR_W-1:LIGHT_W])
        kd_tab[cfg_addr[LIGHT_W-1:0]] <= cfg_wdata;
      else if (cfg_addr[CFG_ADDR_W-1:LIGHT_W] == CFG_KS_BASE[CFG_ADDR_W-1:LIGHT_W])
        ks_tab[cfg_addr[LIGHT_W-1:0]] <= cfg_wdata;
    end
  end

  // One channel: base + kd*D/128 + ks*S/128, saturated to 8 bits.
  function automatic logic [7:0] shade(input logic [7:0] base, input logic [7:0] kd,
                                       input logic [7:0] ks,
                                       input logic [LIGHT_W-1:0] d,
                                       input logic [LIGHT_W-1:0] s);
    logic [9:0] sum;
    sum = 10'(base) + 10'((15'(kd) * 15'(d)) >> 7) + 10'((15'(ks) * 15'(s)) >> 7);
    return (sum > 10'd255) ? 8'd255 : sum[7:0];
  endfunction

  rgb_t kd, ks;
  assign kd = kd_tab[material];
  assign ks = ks_tab[material];

  always_comb begin
    rgb.r = shade(i0.r, kd.r, ks.r, diffuse, specular);
    rgb.g = shade(i0.g, kd.g, ks.g, diffuse, specular);
    rgb.b = shade(i0.b, kd.b, ks.b, diffuse, specular);
  end

endmodule
