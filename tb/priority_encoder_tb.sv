// priority_encoder_tb: checks the priority encoder exhaustively at 16 inputs
// and with random sparse and dense request vectors at the full 8192 inputs,
// against a linear scan for the lowest set bit and a population count.
module priority_encoder_tb;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  logic [15:0] r16;
  logic        h16, m16;
  logic [3:0]  a16;
  priority_encoder #(.M(16)) u16 (.req(r16), .hit(h16), .addr(a16), .multi(m16));

  logic [8191:0] rb;
  logic          hb, mb;
  logic [12:0]   ab;
  priority_encoder u8k (.req(rb), .hit(hb), .addr(ab), .multi(mb));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int lo, cnt;
      r16 = 16'(v);
      #1;
      lo = 0; cnt = 0;
      for (int i = 15; i >= 0; i--) if (r16[i]) begin lo = i; cnt++; end
      check(h16 == (cnt > 0), $sformatf("hit for %h", r16));
      if (cnt > 0) check(a16 == 4'(lo), $sformatf("addr %0d for %h, expected %0d", a16, r16, lo));
      check(m16 == (cnt > 1), $sformatf("multi for %h", r16));
    end
    for (int t = 0; t < 300; t++) begin
      int lo, cnt, nset;
      rb = '0;
      nset = (t < 5) ? t : $urandom_range(1, 40);
      for (int k = 0; k < nset; k++) rb[$urandom_range(0, 8191)] = 1'b1;
      if (t == 5) rb[8191] = 1'b1;
      #1;
      lo = 0; cnt = 0;
      for (int i = 8191; i >= 0; i--) if (rb[i]) begin lo = i; cnt++; end
      check(hb == (cnt > 0), "hit, 8192 inputs");
      if (cnt > 0) check(ab == 13'(lo), $sformatf("addr %0d, expected %0d", ab, lo));
      check(mb == (cnt > 1), "multi, 8192 inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
