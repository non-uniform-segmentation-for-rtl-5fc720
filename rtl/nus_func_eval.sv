// nus_func_eval -- first-order function evaluator on non-uniform segments.
//
// For each input x the address generator finds the interval (top IB bits)
// and the segment inside it (prefix cascades on the other bits); the ROM
// returns c1, c_s1, c0 and c_s0 of that segment; the datapath forms
// y = c1*x*2^c_s1 + c0*2^c_s0, rounded to YF fraction bits. NCH channels
// (1 or 2) share one coefficient ROM through its two read ports, which is
// how the cosine and sine evaluators share a single table.
//
// Interface: in_valid with x[ch] in, out_valid with y[ch] out, one result
// per clock per channel, no back-pressure. Latency LATENCY = 5 clocks:
//   1 segment address registered   2 ROM read   3..5 datapath
// The defaults are the sqrt(-ln x) evaluator: 32-bit input, 59 segments,
// c1/c_s1/c0/c_s0 of 6/5/32/5 bits (the published widths). Register
// placement and the output format are this design's choices.
module nus_func_eval #(
  parameter int unsigned NCH  = 1,
  parameter int unsigned XW   = nus_pkg::SQ_XW,
  parameter int unsigned IB   = nus_pkg::SQ_IB,
  parameter int unsigned NSEG = nus_pkg::SQ_NSEG,
  parameter logic [(1<<IB)-1:0][XW-IB-2:0] OR_TAPS  = nus_pkg::SQ_OR_TAPS,
  parameter logic [(1<<IB)-1:0][XW-IB-1:0] AND_TAPS = nus_pkg::SQ_AND_TAPS,
  parameter int unsigned C1W  = nus_pkg::SQ_C1W,
  parameter int unsigned S1W  = nus_pkg::SQ_S1W,
  parameter int unsigned C0W  = nus_pkg::SQ_C0W,
  parameter int unsigned S0W  = nus_pkg::SQ_S0W,
  parameter int unsigned F    = nus_pkg::SQ_F,
  parameter int unsigned YW   = nus_pkg::SQ_YW,
  parameter int unsigned YF   = nus_pkg::SQ_YF,
  parameter string       ROM_FILE = nus_pkg::SQ_ROM_FILE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [NCH-1:0][XW-1:0] x,
  output logic                 out_valid,
  output logic [NCH-1:0][YW-1:0] y
);

  localparam int unsigned AW = (NSEG > 1) ? $clog2(NSEG) : 1;
  localparam int unsigned CW = C1W + S1W + C0W + S0W;

  if (NCH < 1 || NCH > 2) begin : g_bad_nch
    $error("nus_func_eval: NCH must be 1 or 2");
  end

  // ---- stage 1: segment address
  logic [1:0][AW-1:0] addr_d, addr_q;
  logic [NCH-1:0][XW-1:0] x1_q, x2_q;
  logic v1_q, v2_q;

  for (genvar ch = 0; ch < 2; ch++) begin : g_addr
    if (ch < NCH) begin : g_used
      nus_addr_gen #(.XW(XW), .IB(IB), .NSEG(NSEG), .OR_TAPS(OR_TAPS),
                     .AND_TAPS(AND_TAPS), .AW(AW)) u_ag (
        .x(x[ch]), .addr(addr_d[ch])
      );
    end else begin : g_unused
      assign addr_d[ch] = '0;
    end
  end

  always_ff @(posedge clk) begin
    addr_q <= addr_d;
    x1_q   <= x;
    x2_q   <= x1_q;
  end

  // ---- stage 2: coefficient ROM
  logic [1:0][CW-1:0] coef;

  nus_coef_rom #(.DEPTH(NSEG), .WIDTH(CW), .INIT_FILE(ROM_FILE), .AW(AW)) u_rom (
    .clk(clk),
    .en_a(v1_q), .addr_a(addr_q[0]), .data_a(coef[0]),
    .en_b(v1_q && NCH > 1), .addr_b(addr_q[1]), .data_b(coef[1])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1_q, v2_q} <= '0;
    else        {v1_q, v2_q} <= {in_valid, v1_q};
  end

  // ---- stages 3..5: multiply, scale, add
  logic [NCH-1:0] dp_valid;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_dp
    logic signed [C1W-1:0] c1;
    logic signed [S1W-1:0] s1;
    logic signed [C0W-1:0] c0;
    logic signed [S0W-1:0] s0;
    assign {c1, s1, c0, s0} = coef[ch];

    nus_lin_datapath #(.XW(XW), .C1W(C1W), .S1W(S1W), .C0W(C0W), .S0W(S0W),
                       .F(F), .YW(YW), .YF(YF)) u_dp (
      .clk(clk), .rst_n(rst_n), .in_valid(v2_q), .x(x2_q[ch]),
      .c1(c1), .s1(s1), .c0(c0), .s0(s0),
      .out_valid(dp_valid[ch]), .y(y[ch])
    );
  end

  assign out_valid = &dp_valid;

endmodule
