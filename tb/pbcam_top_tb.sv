// pbcam_top_tb: end-to-end test of the PB-CAM against a behavioural model.
//
// The CAM is built with 256 rows (the other parameters at their defaults:
// 32-bit words, 8-bit partitions, 4 parameter bits). Random READ, WRITE
// (including deletes) and COMPARE commands are issued; words come from a small
// pool so that duplicates and parameter collisions are common. For every
// response the testbench checks the data, the hit/address/multi result, the
// number of rows enabled by the parameter comparison and the number of rows
// whose power was cut by a mismatch, all computed from its own copy of the
// contents and its own closed form of the default extractor, and the latency
// (2 cycles for READ/WRITE, 3 for COMPARE). It counts how often each
// mechanism occurred (rows filtered out by the parameter, power cut-off, hit,
// miss, multi-match, miss with no row enabled, delete, read) and fails any
// that never did.
module pbcam_top_tb;
  import pbcam_pkg::*;
  localparam int unsigned M = 256, N = 32, P = 4, AW = 8;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_wvalid = 0;
  cam_op_e cmd_op = OP_READ;
  logic [AW-1:0] cmd_addr = '0;
  logic [N-1:0] cmd_data = '0;
  logic rsp_valid, rsp_hit, rsp_multi, rsp_rvalid;
  cam_op_e rsp_op;
  logic [AW-1:0] rsp_addr;
  logic [AW:0] rsp_rows_enabled, rsp_rows_cutoff;
  logic [N-1:0] rsp_rdata;
  logic [P-1:0] rsp_rparam;

  pbcam_top #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_filtered = 0, n_cutoff = 0, n_hit = 0, n_miss = 0, n_multi = 0,
      n_none_enabled = 0, n_delete = 0, n_read = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Closed form of the default extractor: per byte
  // NAND(b1,b0) ^ NOR(b3,b2) ^ NAND(b5,b4) ^ NOR(b7,b6).
  function automatic logic [P-1:0] ref_param(logic [N-1:0] d);
    logic [P-1:0] p;
    for (int j = 0; j < P; j++) begin
      logic [7:0] b = d[8*j +: 8];
      p[j] = ~(b[1] & b[0]) ^ ~(b[3] | b[2]) ^ ~(b[5] & b[4]) ^ ~(b[7] | b[6]);
    end
    return p;
  endfunction

  logic [N-1:0] m_word [M];
  bit           m_val  [M];
  logic [N-1:0] pool [16];

  // Issue one command, wait for its response, return the cycles from the
  // accepting edge to the response.
  task automatic run(cam_op_e op, logic [AW-1:0] a, logic [N-1:0] d, logic wv, output int lat);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = a; cmd_data = d; cmd_wvalid = wv;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    cmd_valid = 0;
    cmd_data = N'($urandom);   // must not matter once accepted
    cmd_addr = AW'($urandom);
    lat = 1;
    while (!rsp_valid) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    int lat;
    foreach (pool[i]) pool[i] = $urandom;
    // pool[1] differs from pool[0] in bit 0 only, with bit 1 low in both: the
    // NAND on bits 1:0 gives 1 for both, so the parameters are equal.
    pool[0][1:0] = 2'b00;
    pool[1] = pool[0] | 32'h1;
    foreach (m_val[i]) m_val[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // COMPARE on an empty CAM: nothing enabled, nothing found.
    run(OP_COMPARE, '0, pool[0], 0, lat);
    check(!rsp_hit && rsp_rows_enabled == 0, "empty CAM");

    for (int t = 0; t < 6000; t++) begin
      int kind;
      logic [AW-1:0] a;
      logic [N-1:0] d;
      kind = $urandom % 10;
      a = (t < 200) ? AW'($urandom_range(0, M - 1)) : AW'($urandom);
      if (kind < 4) begin
        // WRITE: mostly pool words, sometimes random, 1 in 8 a delete
        logic wv;
        d  = ($urandom % 4 != 0) ? pool[$urandom % 16] : N'($urandom);
        wv = ($urandom % 8) != 0;
        run(OP_WRITE, a, d, wv, lat);
        check(lat == 2, $sformatf("WRITE latency %0d", lat));
        check(rsp_op == OP_WRITE, "rsp_op WRITE");
        m_word[a] = d; m_val[a] = wv;
        if (!wv) n_delete++;
      end else if (kind < 6) begin
        run(OP_READ, a, '0, 0, lat);
        check(lat == 2, $sformatf("READ latency %0d", lat));
        check(rsp_op == OP_READ, "rsp_op READ");
        check(rsp_rvalid == m_val[a], $sformatf("read valid row %0d", a));
        if (m_val[a]) begin
          check(rsp_rdata == m_word[a], $sformatf("read data row %0d", a));
          check(rsp_rparam == ref_param(m_word[a]), $sformatf("stored parameter row %0d", a));
        end
        n_read++;
      end else begin
        int en_cnt, cut_cnt, hits, first, valid_cnt;
        logic [P-1:0] sp;
        d  = ($urandom % 4 != 0) ? pool[$urandom % 16] : N'($urandom);
        sp = ref_param(d);
        en_cnt = 0; cut_cnt = 0; hits = 0; first = -1; valid_cnt = 0;
        for (int r = 0; r < M; r++) begin
          if (!m_val[r]) continue;
          valid_cnt++;
          if (ref_param(m_word[r]) != sp) continue;
          en_cnt++;
          if (m_word[r] != d) cut_cnt++;
          else begin
            hits++;
            if (first < 0) first = r;
          end
        end
        run(OP_COMPARE, '0, d, 0, lat);
        check(lat == 3, $sformatf("COMPARE latency %0d", lat));
        check(rsp_op == OP_COMPARE, "rsp_op COMPARE");
        check(rsp_hit == (hits > 0), $sformatf("hit for %h", d));
        if (hits > 0) check(rsp_addr == AW'(first), $sformatf("address %0d, expected %0d", rsp_addr, first));
        check(rsp_multi == (hits > 1), "multi-match flag");
        check(rsp_rows_enabled == (AW+1)'(en_cnt), $sformatf("rows enabled %0d, expected %0d", rsp_rows_enabled, en_cnt));
        check(rsp_rows_cutoff == (AW+1)'(cut_cnt), $sformatf("rows cut off %0d, expected %0d", rsp_rows_cutoff, cut_cnt));
        if (en_cnt < valid_cnt) n_filtered++;
        if (cut_cnt > 0) n_cutoff++;
        if (hits > 0) n_hit++; else n_miss++;
        if (hits > 1) n_multi++;
        if (en_cnt == 0 && valid_cnt > 0) n_none_enabled++;
      end
    end
    $display("mechanisms: filtered=%0d cutoff=%0d hit=%0d miss=%0d multi=%0d none_enabled=%0d delete=%0d read=%0d",
             n_filtered, n_cutoff, n_hit, n_miss, n_multi, n_none_enabled, n_delete, n_read);
    check(n_filtered > 0, "parameter filtering never happened");
    check(n_cutoff > 0, "power cut-off never happened");
    check(n_hit > 0, "no hit");
    check(n_miss > 0, "no miss");
    check(n_multi > 0, "no multi-match");
    check(n_none_enabled > 0, "no search with every row filtered out");
    check(n_delete > 0, "no delete");
    check(n_read > 0, "no read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
