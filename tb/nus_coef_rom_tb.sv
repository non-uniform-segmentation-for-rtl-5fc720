// nus_coef_rom_tb -- checks both read ports of the coefficient ROM against
// the table file read independently, the one-clock read latency and that a
// port holds its data while its enable is low.
module nus_coef_rom_tb;
  import nus_pkg::*;

  localparam int W = CS_C1W + CS_S1W + CS_C0W + CS_S0W;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en_a, en_b;
  logic [4:0]    addr_a, addr_b;
  logic [W-1:0]  data_a, data_b;
  logic [W-1:0]  ref_mem [CS_NSEG];

  nus_coef_rom #(.DEPTH(CS_NSEG), .WIDTH(W), .INIT_FILE(CS_ROM_FILE)) dut (
    .clk(clk), .en_a(en_a), .addr_a(addr_a), .data_a(data_a),
    .en_b(en_b), .addr_b(addr_b), .data_b(data_b));

  initial begin
    logic [W-1:0] held;
    $readmemh("rtl/nus_cos_coef.hex", ref_mem);
    en_a = 0; en_b = 0; addr_a = 0; addr_b = 0;
    for (int i = 0; i < 200; i++) begin
      int ia, ib;
      ia = $urandom % CS_NSEG;
      ib = $urandom % CS_NSEG;
      @(negedge clk);
      en_a = 1; en_b = 1; addr_a = 5'(ia); addr_b = 5'(ib);
      @(negedge clk);
      checks += 2;
      if (data_a !== ref_mem[ia]) begin failures++; $display("FAIL a[%0d]=%h exp %h", ia, data_a, ref_mem[ia]); end
      if (data_b !== ref_mem[ib]) begin failures++; $display("FAIL b[%0d]=%h exp %h", ib, data_b, ref_mem[ib]); end
      // hold: enable low, new address, data must not move
      held = data_a;
      en_a = 0; addr_a = 5'((ia + 1) % CS_NSEG);
      @(negedge clk);
      checks++;
      if (data_a !== held) begin failures++; $display("FAIL port a changed with enable low"); end
      en_b = 0;
    end
    // every word once through port a, read latency one clock
    for (int i = 0; i < CS_NSEG; i++) begin
      @(negedge clk);
      en_a = 1; addr_a = 5'(i);
      @(posedge clk); #1;
      checks++;
      if (data_a !== ref_mem[i]) begin failures++; $display("FAIL latency word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
