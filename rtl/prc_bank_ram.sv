// prc_bank_ram: one bank of the on-chip frame and Z buffer.
//
// Simple dual-port synchronous RAM (one read port, one write port), the shape
// of an FPGA block RAM. The read data register loads mem[raddr] at the clock
// edge where re is high and holds its value otherwise. A write and a read of
// the same address in the same cycle return the old word. Contents are not
// reset: every line is loaded by the porter before it is rendered.
module prc_bank_ram #(
  parameter int WORDS  = 128,
  parameter int DATA_W = 132,
  localparam int AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
