// nus_seg_addr_tb -- checks the segment address calculator.
// Part 1: 8-bit field with every cascade tap except the bare top bit,
// exhaustively; the 256 inputs must map to exactly 14 segments, in order.
// Part 2: a 12-bit field with random tap enables and random inputs.
// Both are repeated on the parallel-prefix variant of the calculator.
// Expected values come from comparing the input with the boundaries.
module nus_seg_addr_tb;
  import nus_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  s8;
  logic [3:0]  seg8;
  nus_seg_addr #(.SB(8)) u8 (.seg_bits(s8), .or_en(7'h7f), .and_en(8'h7e), .seg(seg8));

  logic [3:0]  seg8p;
  nus_seg_addr #(.SB(8), .PARALLEL(1'b1)) u8p (.seg_bits(s8), .or_en(7'h7f), .and_en(8'h7e), .seg(seg8p));

  logic [11:0] s12;
  logic [10:0] or12;
  logic [11:0] and12;
  logic [4:0]  seg12;
  nus_seg_addr #(.SB(12)) u12 (.seg_bits(s12), .or_en(or12), .and_en(and12), .seg(seg12));
  logic [4:0]  seg12p;
  nus_seg_addr #(.SB(12), .PARALLEL(1'b1)) u12p (.seg_bits(s12), .or_en(or12), .and_en(and12), .seg(seg12p));

  initial begin
    int exp_seg, max_seg;
    max_seg = 0;
    for (int v = 0; v < 256; v++) begin
      s8 = 8'(v);
      #1;
      exp_seg = ref_seg(v, 8, 64'h7f, 64'h7e);
      checks++;
      if (int'(seg8) != exp_seg) begin
        failures++;
        $display("FAIL sb=8 x=%0d seg=%0d exp=%0d", v, seg8, exp_seg);
      end
      if (int'(seg8) > max_seg) max_seg = int'(seg8);
      checks++;
      if (int'(seg8p) != exp_seg) begin
        failures++;
        $display("FAIL parallel sb=8 x=%0d seg=%0d exp=%0d", v, seg8p, exp_seg);
      end
    end
    checks++;
    if (max_seg != 13) begin
      failures++;
      $display("FAIL 8-bit field gives %0d segments, expected 14", max_seg + 1);
    end
    // Spot values: boundaries 1/256 .. 1/4 and 3/4 .. 127/128.
    s8 = 8'd63;  #1; checks++; if (seg8 != 4'd6)  begin failures++; $display("FAIL 63"); end
    s8 = 8'd64;  #1; checks++; if (seg8 != 4'd7)  begin failures++; $display("FAIL 64"); end
    s8 = 8'd191; #1; checks++; if (seg8 != 4'd7)  begin failures++; $display("FAIL 191"); end
    s8 = 8'd192; #1; checks++; if (seg8 != 4'd8)  begin failures++; $display("FAIL 192"); end
    s8 = 8'd255; #1; checks++; if (seg8 != 4'd13) begin failures++; $display("FAIL 255"); end

    for (int i = 0; i < 4000; i++) begin
      or12  = 11'($urandom);
      and12 = 12'($urandom);
      s12   = 12'($urandom);
      if (i % 4 == 0) s12 = 12'($urandom) >> ($urandom % 12);        // leading zeros
      if (i % 4 == 1) s12 = ~(12'($urandom) >> ($urandom % 12));     // leading ones
      #1;
      exp_seg = ref_seg(s12, 12, 64'(or12), 64'(and12));
      checks++;
      if (int'(seg12) != exp_seg) begin
        failures++;
        if (failures < 10)
          $display("FAIL sb=12 x=%h or=%h and=%h seg=%0d exp=%0d", s12, or12, and12, seg12, exp_seg);
      end
      checks++;
      if (int'(seg12p) != exp_seg) begin
        failures++;
        if (failures < 10) $display("FAIL parallel sb=12 x=%h seg=%0d exp=%0d", s12, seg12p, exp_seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
