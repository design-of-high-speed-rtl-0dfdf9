// cam_array_tb: checks the CAM array (64 rows of 16 bits, 4 parameter bits)
// against a behavioural copy of its contents: writes and reads through the
// word line, the valid bits after reset and after deletes, row enables for
// random search parameters (valid row and equal parameter), and mismatch
// outputs for random search words and random row power.
module cam_array_tb;
  localparam int unsigned M = 64, N = 16, P = 4, AW = 6;
  logic clk = 0, rst_n = 0;
  logic wl_en = 0, wvalid = 0;
  logic [AW-1:0] addr = '0;
  logic [P-1:0] wparam = '0, sparam = '0, rparam;
  logic [N-1:0] sl = '0, rdata;
  logic rvalid;
  logic [M-1:0] vddml = '0, row_en, mismatch;
  int checks = 0, failures = 0;

  logic [N-1:0] m_word [M];
  logic [P-1:0] m_par  [M];
  logic         m_val  [M];

  cam_array #(.M(M), .N(N), .P(P)) dut (
    .clk, .rst_n, .wl_en, .addr, .wparam, .wvalid, .rdata, .rparam, .rvalid,
    .sl, .sl_n(~sl), .sparam, .vddml, .row_en, .mismatch
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    for (int r = 0; r < M; r++) begin
      check(row_en[r] == (m_val[r] && m_par[r] == sparam), $sformatf("row_en[%0d]", r));
      check(mismatch[r] == (vddml[r] && m_word[r] != sl), $sformatf("mismatch[%0d]", r));
    end
  endtask

  initial begin
    for (int r = 0; r < M; r++) begin
      m_val[r] = 0; m_par[r] = 0; m_word[r] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every row
    for (int r = 0; r < M; r++) begin
      @(negedge clk);
      wl_en = 1; addr = AW'(r); sl = N'($urandom); wparam = P'($urandom_range(0, 3)); wvalid = 1;
      m_word[r] = sl; m_par[r] = wparam; m_val[r] = 1;
    end
    @(negedge clk);
    wl_en = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wl_en = 0;
      case ($urandom % 4)
        0: begin   // write (sometimes delete, sometimes a copy of another row)
          int src;
          src = $urandom_range(0, M - 1);
          wl_en = 1; addr = AW'($urandom); wvalid = ($urandom % 5) != 0;
          sl = ($urandom % 2) ? m_word[src] : N'($urandom);
          wparam = ($urandom % 2) ? m_par[src] : P'($urandom_range(0, 3));
          m_word[addr] = sl; m_par[addr] = wparam; m_val[addr] = wvalid;
        end
        1: begin   // read
          addr = AW'($urandom);
          #1;
          check(rdata == m_word[addr] && rparam == m_par[addr] && rvalid == m_val[addr],
                $sformatf("read row %0d", addr));
        end
        default: begin   // search-side view
          int src;
          src = $urandom_range(0, M - 1);
          sl = ($urandom % 2) ? m_word[src] : N'($urandom);
          sparam = P'($urandom_range(0, 3));
          for (int r = 0; r < M; r++) vddml[r] = $urandom;
          #1;
          check_rows();
        end
      endcase
    end
    // reset clears valid bits
    @(negedge clk);
    wl_en = 0;
    rst_n = 0;
    #1;
    for (int r = 0; r < M; r++) m_val[r] = 0;
    check_rows();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
