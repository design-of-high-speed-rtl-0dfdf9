// search_word_reg_tb: checks that the search word register captures its input
// only when `load` is high, holds it otherwise, clears on reset, and drives
// true and complement search lines.
module search_word_reg_tb;
  localparam int unsigned N = 32;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] d, sl, sl_n, model;
  int checks = 0, failures = 0;

  search_word_reg #(.N(N)) dut (.clk, .rst_n, .load, .d, .sl, .sl_n);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    model = '0;
    repeat (2) @(posedge clk);
    #1 check(sl == '0 && sl_n == '1, "reset value");
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      d    = $urandom;
      @(posedge clk);
      if (load) model = d;
      #1;
      check(sl == model,   $sformatf("sl %h, expected %h", sl, model));
      check(sl_n == ~model, "sl_n is not the complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
