// nus_coef_rom -- coefficient lookup table.
//
// One word per segment holds the four coefficients {c1, c_s1, c0, c_s0} as
// two's-complement fields, c1 in the top bits. Two synchronous read ports
// share the one table, so a cosine and a sine evaluator can read the same
// coefficients in the same cycle (a dual-ported block RAM on an FPGA). Data
// appears one clock after the address is presented with its enable. The
// contents are loaded from INIT_FILE with $readmemh; how the table is
// worked out is described with the evaluator that uses it. Storing the four
// coefficients per segment follows the published design; the port count and
// the one-cycle read are this design's choices.
module nus_coef_rom #(
  parameter int unsigned DEPTH     = nus_pkg::CS_NSEG,
  parameter int unsigned WIDTH     = nus_pkg::CS_C1W + nus_pkg::CS_S1W +
                                     nus_pkg::CS_C0W + nus_pkg::CS_S0W,
  parameter string       INIT_FILE = nus_pkg::CS_ROM_FILE,
  parameter int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en_a,
  input  logic [AW-1:0]    addr_a,
  output logic [WIDTH-1:0] data_a,
  input  logic             en_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] data_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (en_a) data_a <= mem[addr_a];
    if (en_b) data_b <= mem[addr_b];
  end

endmodule
