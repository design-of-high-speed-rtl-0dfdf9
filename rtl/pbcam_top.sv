// pbcam_top: precomputation-based content addressable memory with a
// gate-block parameter extractor and gated-power matchlines.
//
// What it does: stores M words of N bits and answers READ, WRITE and COMPARE
// commands. COMPARE returns the lowest address holding the search word, a hit
// flag and a multi-match flag.
//
// How: every stored word carries P = N/L parameter bits computed by the
// gate-block parameter extractor when it is written. A search word goes
// through the same extractor; only rows whose stored parameter equals the
// search parameter are enabled, and only those rows have their comparison
// rail powered. Each row's gated-power sense amplifier powers the row when EN
// rises and cuts the power by itself as soon as the matchline signals a
// mismatch. The matchline outputs of enabled rows go to the priority encoder.
//
//   cmd -> search_ctrl -> search_word_reg -> SL/~SL -> cam_array -> mismatch
//                                   \-> param_extractor -> sparam / wparam
//   cam_array.row_en & EN -> ml_power_ctrl[r] -> vddml[r] (back to the array)
//                                            -> ml_out[r] -> priority_encoder
//
// Interface: valid/ready command port (cmd_op, cmd_addr, cmd_data and, for
// WRITE, cmd_wvalid: 1 stores a valid entry, 0 deletes the row). One response
// per command, a one-cycle rsp_valid. For COMPARE: rsp_hit, rsp_addr,
// rsp_multi, plus rsp_rows_enabled (rows whose parameter matched and were
// compared) and rsp_rows_cutoff (rows whose power was turned off by a
// mismatch). For READ: rsp_rdata, rsp_rparam, rsp_rvalid.
//
// Timing: WRITE and READ respond 2 cycles after the accepting edge, COMPARE
// 3 cycles (one cycle with EN low, two with EN high); see search_ctrl.
//
// Defaults follow the source: 8K words, 32-bit words cut into 8-bit
// partitions giving 4 parameter bits. The gate choice, the command interface
// and the cycle-level timing are this design's own.
module pbcam_top
  import pbcam_pkg::*;
#(
  parameter int unsigned M  = 8192,
  parameter int unsigned N  = 32,
  parameter int unsigned L  = 8,
  parameter logic [2*MAX_W-1:0] GATES = default_gates(N, L),
  parameter int unsigned P  = N / L,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  cam_op_e       cmd_op,
  input  logic [AW-1:0] cmd_addr,
  input  logic [N-1:0]  cmd_data,
  input  logic          cmd_wvalid,
  // response
  output logic          rsp_valid,
  output cam_op_e       rsp_op,
  output logic          rsp_hit,
  output logic [AW-1:0] rsp_addr,
  output logic          rsp_multi,
  output logic [AW:0]   rsp_rows_enabled,
  output logic [AW:0]   rsp_rows_cutoff,
  output logic [N-1:0]  rsp_rdata,
  output logic [P-1:0]  rsp_rparam,
  output logic          rsp_rvalid
);

  logic load, wl_en, en, cap_read, cap_search;

  search_ctrl u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_op, .cmd_ready,
    .load, .wl_en, .en, .cap_read, .cap_search,
    .rsp_valid, .rsp_op
  );

  // Address and valid bit of the command in progress.
  logic [AW-1:0] addr_q;
  logic          wvalid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q   <= '0;
      wvalid_q <= 1'b0;
    end else if (load) begin
      addr_q   <= cmd_addr;
      wvalid_q <= cmd_wvalid;
    end
  end

  logic [N-1:0] sl, sl_n;
  search_word_reg #(.N(N)) u_sreg (
    .clk, .rst_n, .load, .d(cmd_data), .sl, .sl_n
  );

  // One extractor serves both paths: the word on the search lines is the
  // write data during WRITE and the search word during COMPARE.
  logic [P-1:0] param;
  param_extractor #(.N(N), .L(L), .GATES(GATES)) u_pe (.data(sl), .param);

  logic [M-1:0] vddml, row_en, mismatch, ml_out;
  logic [N-1:0] rdata;
  logic [P-1:0] rparam;
  logic         rvalid;

  cam_array #(.M(M), .N(N), .P(P)) u_array (
    .clk, .rst_n,
    .wl_en, .addr(addr_q), .wparam(param), .wvalid(wvalid_q),
    .rdata, .rparam, .rvalid,
    .sl, .sl_n, .sparam(param),
    .vddml, .row_en, .mismatch
  );

  for (genvar r = 0; r < M; r++) begin : g_row
    ml_power_ctrl u_pc (
      .clk, .rst_n,
      .en(en & row_en[r]),
      .mismatch(mismatch[r]),
      .vddml(vddml[r]),
      .ml_out(ml_out[r])
    );
  end

  // Only enabled rows may report a match: a disabled row keeps its
  // matchline grounded, which its sense amplifier would read as a match.
  logic [M-1:0] hit_vec;
  assign hit_vec = ml_out & row_en & {M{en}};

  logic          pe_hit, pe_multi;
  logic [AW-1:0] pe_addr;
  priority_encoder #(.M(M)) u_enc (.req(hit_vec), .hit(pe_hit), .addr(pe_addr), .multi(pe_multi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_hit          <= 1'b0;
      rsp_addr         <= '0;
      rsp_multi        <= 1'b0;
      rsp_rows_enabled <= '0;
      rsp_rows_cutoff  <= '0;
      rsp_rdata        <= '0;
      rsp_rparam       <= '0;
      rsp_rvalid       <= 1'b0;
    end else begin
      if (cap_search) begin
        rsp_hit          <= pe_hit;
        rsp_addr         <= pe_addr;
        rsp_multi        <= pe_multi;
        rsp_rows_enabled <= (AW+1)'($countones(row_en));
        rsp_rows_cutoff  <= (AW+1)'($countones(row_en & ~ml_out));
      end
      if (cap_read) begin
        rsp_rdata  <= rdata;
        rsp_rparam <= rparam;
        rsp_rvalid <= rvalid;
      end
    end
  end

endmodule
