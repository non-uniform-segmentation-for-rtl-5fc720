// nus_addr_gen -- interval and segment address generator.
//
// The IB most-significant bits of x pick one of 2^IB uniform intervals; the
// remaining SB = XW-IB bits go through nus_seg_addr with that interval's tap
// masks (OR_TAPS[i], AND_TAPS[i]). The coefficient ROM holds the segments of
// all intervals back to back, so the ROM address is the interval's base (the
// number of segments of all lower intervals, worked out at elaboration) plus
// the segment index. IB = 0 gives a single non-uniform interval. The split of
// x into interval and segment fields follows the published architecture; the
// packed base-plus-offset ROM layout is this design's choice, made so the ROM
// holds exactly the segments in use. Combinational.
module nus_addr_gen #(
  parameter int unsigned XW   = 14,
  parameter int unsigned IB   = 2,
  parameter int unsigned NSEG = 21,
  parameter logic [(1<<IB)-1:0][XW-IB-2:0] OR_TAPS  = nus_pkg::CS_OR_TAPS,
  parameter logic [(1<<IB)-1:0][XW-IB-1:0] AND_TAPS = nus_pkg::CS_AND_TAPS,
  parameter int unsigned AW   = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic [XW-1:0] x,
  output logic [AW-1:0] addr
);

  localparam int unsigned NI  = 1 << IB;
  localparam int unsigned SB  = XW - IB;
  localparam int unsigned SAW = $clog2(2 * SB);

  // Segments in intervals 0 .. iv-1.
  function automatic int unsigned base_of(int unsigned iv);
    int unsigned b = 0;
    for (int unsigned j = 0; j < iv; j++)
      b += $countones(OR_TAPS[j]) + $countones(AND_TAPS[j]) + 1;
    return b;
  endfunction

  if (base_of(NI) != NSEG) begin : g_bad_taps
    $error("nus_addr_gen: tap masks give %0d segments, NSEG is %0d", base_of(NI), NSEG);
  end

  logic [AW-1:0]   base [NI];
  for (genvar i = 0; i < NI; i++) begin : g_base
    assign base[i] = AW'(base_of(i));
  end

  logic [SB-2:0]   or_en;
  logic [SB-1:0]   and_en;
  logic [AW-1:0]   iv_base;
  logic [SAW-1:0]  seg;

  if (IB == 0) begin : g_one
    assign or_en   = OR_TAPS[0];
    assign and_en  = AND_TAPS[0];
    assign iv_base = base[0];
  end else begin : g_many
    logic [IB-1:0] iv;
    assign iv      = x[XW-1 -: IB];
    assign or_en   = OR_TAPS[iv];
    assign and_en  = AND_TAPS[iv];
    assign iv_base = base[iv];
  end

  nus_seg_addr #(.SB(SB), .SAW(SAW)) u_seg (
    .seg_bits(x[SB-1:0]), .or_en(or_en), .and_en(and_en), .seg(seg)
  );

  assign addr = iv_base + AW'(seg);

endmodule
