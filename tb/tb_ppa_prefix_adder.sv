// tb_ppa_prefix_adder: checks the six prefix adders against integer sums and
// runs the depth comparison of the acyclic adder with them.
//
// All six networks are built at 16 bits next to paa16. They get the same
// operands: corner cases, every pair of 8-bit operands in the low and high
// byte, and random pairs. Kogge-Stone, Sklansky and Brent-Kung are also built at
// 8 and 32 bits and checked with random operands. The netlists are also checked
// for coverage (ppa_covers). Then the depth of each 16-bit network,
// counted in 2-input elements with the same element model as paa16, is
// compared with the fixed values of that model, and every prefix adder must be
// deeper than the acyclic adder's 10 levels.
module tb_ppa_prefix_adder;
  import paa_pkg::*;

  localparam int NT = 6;
  localparam prefix_topo_e TOPOS [NT] = '{PT_KOGGE_STONE, PT_KNOWLES, PT_SKLANSKY,
                                          PT_HAN_CARLSON, PT_LADNER_FISCHER, PT_BRENT_KUNG};
  // Depth of each 16-bit network in this element model, in TOPOS order.
  localparam int DEPTH16 [NT] = '{11, 12, 12, 13, 14, 16};

  logic [15:0] a, b;
  logic [15:0] s16 [NT];
  logic        c16 [NT];
  logic [15:0] s_paa;
  logic        c_paa;
  logic [31:0] a32, b32;
  logic [7:0]  s8 [3];
  logic        c8 [3];
  logic [31:0] s32 [3];
  logic        c32 [3];
  int checks = 0, failures = 0;

  paa16 u_paa (.a(a), .b(b), .s(s_paa), .cout(c_paa));

  for (genvar k = 0; k < NT; k++) begin : g_16
    ppa_prefix_adder #(.N(16), .TOPO(TOPOS[k])) u_dut (
      .a(a), .b(b), .s(s16[k]), .cout(c16[k])
    );
  end

  localparam prefix_topo_e WIDE [3] = '{PT_KOGGE_STONE, PT_SKLANSKY, PT_BRENT_KUNG};
  for (genvar k = 0; k < 3; k++) begin : g_other
    ppa_prefix_adder #(.N(8), .TOPO(WIDE[k])) u_8 (
      .a(a32[7:0]), .b(b32[7:0]), .s(s8[k]), .cout(c8[k])
    );
    ppa_prefix_adder #(.N(32), .TOPO(WIDE[k])) u_32 (
      .a(a32), .b(b32), .s(s32[k]), .cout(c32[k])
    );
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16();
    logic [16:0] want;
    #1;
    want = 17'(a) + 17'(b);
    for (int k = 0; k < NT; k++) begin
      checks++;
      if ({c16[k], s16[k]} !== want) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s a=%h b=%h got %h want %h", TOPOS[k].name(), a, b,
                   {c16[k], s16[k]}, want);
      end
    end
    checks++;
    if ({c_paa, s_paa} !== {c16[0], s16[0]}) begin
      failures++;
      if (failures < 10) $display("FAIL paa16 differs from Kogge-Stone a=%h b=%h", a, b);
    end
  endtask

  task automatic check_other();
    logic [8:0]  w8;
    logic [32:0] w32;
    #1;
    w8  = 9'(a32[7:0]) + 9'(b32[7:0]);
    w32 = 33'(a32) + 33'(b32);
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if ({c8[k], s8[k]} !== w8) begin
        failures++;
        if (failures < 10) $display("FAIL %s/8 a=%h b=%h", WIDE[k].name(), a32[7:0], b32[7:0]);
      end
      if ({c32[k], s32[k]} !== w32) begin
        failures++;
        if (failures < 10) $display("FAIL %s/32 a=%h b=%h", WIDE[k].name(), a32, b32);
      end
    end
  endtask

  initial begin
    // Network coverage and depth at 16 bits (the comparison of depths).
    for (int k = 0; k < NT; k++) begin
      int d;
      d = ppa_depth(TOPOS[k], 16);
      $display("depth %-18s %0d stages, %0d levels (acyclic adder: %0d)",
               TOPOS[k].name(), ppa_stages(TOPOS[k], 16), d, PAA_DEPTH);
      checks += 3;
      if (!ppa_covers(TOPOS[k], 16) || !ppa_covers(TOPOS[k], 8) || !ppa_covers(TOPOS[k], 32)) begin
        failures++;
        $display("FAIL %s network incomplete", TOPOS[k].name());
      end
      if (d != DEPTH16[k]) begin
        failures++;
        $display("FAIL %s depth %0d, expected %0d", TOPOS[k].name(), d, DEPTH16[k]);
      end
      if (d <= PAA_DEPTH) begin
        failures++;
        $display("FAIL %s is not deeper than the acyclic adder", TOPOS[k].name());
      end
    end

    // Corner cases.
    a = 16'h0000; b = 16'h0000; check16();
    a = 16'hFFFF; b = 16'h0001; check16();
    a = 16'hFFFF; b = 16'hFFFF; check16();
    a = 16'h8000; b = 16'h8000; check16();
    a = 16'h5555; b = 16'hAAAA; check16();
    a = 16'h7FFF; b = 16'h0001; check16();
    a = 16'b0000_0001_1010_1100; b = 16'b0000_0000_1001_0100; check16();

    // Every pair of 8-bit operands, in the low byte and in the high byte
    // (the high byte with a carry chain in the low byte).
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 16'(x); b = 16'(y); check16();
        a = {8'(x), 8'hFF}; b = {8'(y), 8'h01}; check16();
      end

    for (int r = 0; r < 300000; r++) begin
      a = 16'($urandom); b = 16'($urandom); check16();
      a32 = $urandom; b32 = $urandom; check_other();
    end
    a32 = 32'hFFFF_FFFF; b32 = 32'h0000_0001; check_other();
    a32 = 32'hFFFF_FFFF; b32 = 32'hFFFF_FFFF; check_other();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
