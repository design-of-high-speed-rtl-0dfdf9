// param_extractor_tb: self-checking test of the gate-block parameter extractor
// and of the gate-block selection algorithm in pbcam_pkg.
//
// 1. Runs gbs_select on the 16-sample, 4-bit worked example and checks the
//    chosen gates (NAND on D1D0, NOR on D3D2, XOR joining them) and the S*Cavg
//    of each candidate of the first level (NAND/NOR/XOR: 200/130/146 on D3D2,
//    128/200/136 on D1D0) and of the chosen XOR (130).
// 2. Drives a 4-bit extractor built with that choice through all 16 inputs
//    against the closed form (~(D3|D2)) ^ ~(D1&D0).
// 3. Drives the default 32-bit extractor with random words against the closed
//    form of its default gates: per byte, NAND(b1,b0)^NOR(b3,b2)^NAND(b5,b4)^NOR(b7,b6).
// 4. Drives a 16-bit extractor with a random gate choice against a reference
//    that evaluates every partition tree gate by gate.
module param_extractor_tb;
  import pbcam_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  // --- the worked example -------------------------------------------------
  localparam logic [3:0] EX [16] = '{4'b0011, 4'b1001, 4'b0000, 4'b0011,
                                     4'b0011, 4'b0101, 4'b0010, 4'b1111,
                                     4'b1001, 4'b0011, 4'b0010, 4'b1001,
                                     4'b0000, 4'b0111, 4'b1111, 4'b0011};
  // Gates the algorithm picks for it: level 0 k=0 (D1D0) NAND, k=1 (D3D2)
  // NOR, level 1 XOR.
  localparam logic [2*MAX_W-1:0] EX_GATES = {{(2*MAX_W-6){1'b0}}, G_XOR, G_NOR, G_NAND};

  logic [3:0] ex_d;
  logic [0:0] ex_p;
  param_extractor #(.N(4), .L(4), .GATES(EX_GATES)) u_ex (.data(ex_d), .param(ex_p));

  // --- default 32-bit extractor -------------------------------------------
  logic [31:0] d32;
  logic [3:0]  p32;
  param_extractor u_32 (.data(d32), .param(p32));

  function automatic logic [3:0] ref32(logic [31:0] d);
    logic [3:0] p;
    for (int j = 0; j < 4; j++) begin
      logic [7:0] b = d[8*j +: 8];
      p[j] = ~(b[1] & b[0]) ^ ~(b[3] | b[2]) ^ ~(b[5] & b[4]) ^ ~(b[7] | b[6]);
    end
    return p;
  endfunction

  // --- 16-bit, 4-bit partitions, random gate choice -----------------------
  // 12 gates: 8 on level 0, 4 on level 1.
  localparam logic [23:0] RG = 24'b10_01_00_10__01_01_00_10_10_00_01_00;
  localparam logic [2*MAX_W-1:0] R_GATES = {{(2*MAX_W-24){1'b0}}, RG};
  logic [15:0] d16;
  logic [3:0]  p16;
  param_extractor #(.N(16), .L(4), .GATES(R_GATES)) u_16 (.data(d16), .param(p16));

  function automatic logic g2(logic [1:0] code, logic a, logic b);
    if (code == 2'd0) return !(a && b);
    if (code == 2'd1) return !(a || b);
    return a != b;
  endfunction

  function automatic logic [3:0] ref16(logic [15:0] d);
    logic [3:0] p;
    for (int j = 0; j < 4; j++) begin
      logic lo, hi;
      lo = g2(RG[2*(2*j)   +: 2], d[4*j],   d[4*j+1]);
      hi = g2(RG[2*(2*j+1) +: 2], d[4*j+2], d[4*j+3]);
      p[j] = g2(RG[2*(8+j) +: 2], lo, hi);
    end
    return p;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAX_W-1:0] samples[$];
    int unsigned nc[];
    logic [2*MAX_W-1:0] sel;

    // 1. selection algorithm on the worked example
    foreach (EX[i]) samples.push_back(MAX_W'(EX[i]));
    sel = gbs_select(samples, 4, 4, nc);
    check(sel[1:0] == G_NAND, "D1D0 gate should be NAND");
    check(sel[3:2] == G_NOR,  "D3D2 gate should be NOR");
    check(sel[5:4] == G_XOR,  "Y1Y0 gate should be XOR");
    check(nc[3*1+0] == 200 && nc[3*1+1] == 130 && nc[3*1+2] == 146, "S*Cavg on D3D2");
    check(nc[3*0+0] == 128 && nc[3*0+1] == 200 && nc[3*0+2] == 136, "S*Cavg on D1D0");
    check(nc[3*2+2] == 130, "S*Cavg of the XOR on Y1Y0");
    check(sel[5:0] == EX_GATES[5:0], "selection equals the 4-bit example's gates");

    // 2. exhaustive 4-bit
    for (int v = 0; v < 16; v++) begin
      ex_d = 4'(v);
      #1;
      check(ex_p[0] == ((~(ex_d[3] | ex_d[2])) ^ (~(ex_d[1] & ex_d[0]))),
            $sformatf("4-bit extractor, input %b", ex_d));
    end

    // 3. default 32-bit
    for (int t = 0; t < 500; t++) begin
      d32 = $urandom;
      if (t == 0) d32 = '0;
      if (t == 1) d32 = '1;
      #1;
      check(p32 == ref32(d32), $sformatf("32-bit extractor, %h -> %b", d32, p32));
    end

    // 4. random gates, 16-bit
    for (int t = 0; t < 500; t++) begin
      d16 = 16'($urandom);
      #1;
      check(p16 == ref16(d16), $sformatf("16-bit extractor, %h -> %b", d16, p16));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
