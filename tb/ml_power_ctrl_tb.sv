// ml_power_ctrl_tb: checks the gated-power matchline sense amplifier of one
// row. The row's cells are modelled here: they pull the matchline up only
// while the row rail is powered and the stored word differs from the search
// word. Checked: EN low keeps the rail off and MLout high; a matching row
// stays powered with MLout high; a mismatching row drops MLout one cycle after
// EN rises and the rail switches itself off in the same cycle, staying off
// until EN falls; a mismatch that appears only while the rail is off has no
// effect.
module ml_power_ctrl_tb;
  logic clk = 0, rst_n = 0;
  logic en = 0, differ = 0;
  logic mismatch, vddml, ml_out;
  int checks = 0, failures = 0, cutoffs = 0;

  ml_power_ctrl dut (.clk, .rst_n, .en, .mismatch, .vddml, .ml_out);

  assign mismatch = vddml & differ;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int hold;
      bit d;
      // initialise phase
      @(negedge clk);
      en = 0;
      differ = $urandom;
      #1;
      check(!vddml, "rail on while EN low");
      check(ml_out, "MLout low while EN low");
      @(negedge clk);
      check(!vddml && ml_out, "initialise phase");
      // compare phase
      d = $urandom;
      differ = d;
      en = 1;
      #1;
      check(vddml, "rail not on when EN rises");
      check(ml_out, "MLout low before evaluation");
      hold = $urandom_range(1, 4);
      for (int c = 0; c < hold; c++) begin
        @(negedge clk);
        if (c > 0 && d) differ = $urandom;   // changes while the rail is off
        #1;
        if (d) begin
          check(!ml_out, "mismatching row reads as match");
          check(!vddml,  "rail not cut after mismatch");
          if (c == 0) cutoffs++;
        end else begin
          check(ml_out, "matching row reads as mismatch");
          check(vddml,  "matching row lost its rail");
        end
      end
    end
    check(cutoffs > 0, "the rail was never cut off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
