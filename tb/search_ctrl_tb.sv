// search_ctrl_tb: checks the operation sequencer cycle by cycle. Random
// commands arrive with random gaps; after each accepted command the expected
// strobes are checked on every following cycle: WRITE gives one word-line
// cycle and a response 2 cycles after acceptance, READ one read-capture cycle
// and a response after 2 cycles, COMPARE two cycles with EN high (the second
// capturing the result) and a response after 3 cycles. EN must be low
// whenever no compare is running, and ready only when idle.
module search_ctrl_tb;
  import pbcam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cam_op_e cmd_op = OP_READ;
  logic cmd_ready, load, wl_en, en, cap_read, cap_search, rsp_valid;
  cam_op_e rsp_op;
  int checks = 0, failures = 0;
  int n_ops [3] = '{0, 0, 0};

  search_ctrl dut (.clk, .rst_n, .cmd_valid, .cmd_op, .cmd_ready, .load, .wl_en, .en,
                   .cap_read, .cap_search, .rsp_valid, .rsp_op);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected strobes {ready, wl_en, cap_read, en, cap_search} for cycle k
  // after the accepting edge (k = 1 is the first cycle after it).
  function automatic logic [4:0] expect_at(cam_op_e op, int k);
    case (op)
      OP_WRITE:   return (k == 1) ? 5'b01000 : 5'b10000;
      OP_READ:    return (k == 1) ? 5'b00100 : 5'b10000;
      default:    return (k == 1) ? 5'b00010 : (k == 2) ? 5'b00011 : 5'b10000;
    endcase
  endfunction

  function automatic int latency(cam_op_e op);
    return (op == OP_COMPARE) ? 3 : 2;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 check(cmd_ready && !en && !wl_en && !rsp_valid, "reset state");
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      cam_op_e op;
      int gap;
      gap = $urandom_range(0, 2);
      repeat (gap) begin
        @(negedge clk);
        cmd_valid = 0;
        #1 check(cmd_ready && !en && !wl_en && !cap_read && !cap_search, "idle state");
      end
      @(negedge clk);
      op = cam_op_e'($urandom_range(0, 2));
      cmd_valid = 1;
      cmd_op = op;
      #1 check(load && cmd_ready, "command not accepted when idle");
      @(posedge clk);
      n_ops[op]++;
      for (int k = 1; k <= latency(op); k++) begin
        @(negedge clk);
        cmd_valid = (k < latency(op)) ? 1'($urandom) : 1'b0;   // held valid while busy is ignored
        cmd_op = cam_op_e'($urandom_range(0, 2));
        #1;
        check({cmd_ready, wl_en, cap_read, en, cap_search} == expect_at(op, k),
              $sformatf("op %s cycle %0d: strobes %b", op.name(), k,
                        {cmd_ready, wl_en, cap_read, en, cap_search}));
        check(rsp_valid == (k == latency(op)), $sformatf("rsp_valid, op %s cycle %0d", op.name(), k));
        if (k == latency(op)) check(rsp_op == op, "rsp_op");
        if (k < latency(op)) check(!load, "accepted while busy");
      end
    end
    check(n_ops[0] > 0 && n_ops[1] > 0 && n_ops[2] > 0, "every operation was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
