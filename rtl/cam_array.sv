// cam_array: the M x N array of CAM cells of the precomputation-based CAM,
// with the parameter bits and an entry-valid bit stored beside every word.
//
// What it does, per row r:
//  * SRAM part (always powered): holds the N-bit word, its P parameter bits and
//    a valid bit. A write (word line `wl_en` with `addr`) stores `sl`, `wparam`
//    and `wvalid` into row `addr`; a read returns row `addr` on `rdata`,
//    `rparam`, `rvalid` (combinational).
//  * Parameter comparison: `row_en[r]` is high when row r holds a valid word
//    whose stored parameter equals the search parameter `sparam`. Only such
//    rows can hold the search word, so only they are worth comparing; the
//    others are left unpowered. This is the precomputation step.
//  * Comparison part (powered by the row's own rail VDDML): when
//    `vddml[r]` is high, every cell compares its bit with the search lines and
//    `mismatch[r]` goes high when at least one bit differs, which is what
//    charges the matchline. With the rail off no cell can charge the matchline
//    and `mismatch[r]` stays low.
//
// Timing: writes take effect at the rising edge when `wl_en` is high; reads,
// row_en and mismatch are combinational. Reset clears the valid bits only
// (own choice: the stored words need no reset, an invalid row never matches).
//
// From the source design: the split of each cell into an SRAM part on VDD and
// a comparison part on the gated row rail VDDML, writes through the search
// lines, a stored parameter per word and the comparison of parameters ahead of
// the data. Own choices: the valid bit per entry, and that the parameter
// comparison is done by ordinary equality logic outside the gated rail.
module cam_array #(
  parameter int unsigned M  = 8192,          // words (rows)
  parameter int unsigned N  = 32,            // bits per word
  parameter int unsigned P  = 4,             // parameter bits per word
  parameter int unsigned AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  // word line / access
  input  logic          wl_en,
  input  logic [AW-1:0] addr,
  input  logic [P-1:0]  wparam,
  input  logic          wvalid,
  output logic [N-1:0]  rdata,
  output logic [P-1:0]  rparam,
  output logic          rvalid,
  // search lines (sl_n is the complement; a cell sees both)
  input  logic [N-1:0]  sl,
  input  logic [N-1:0]  sl_n,
  input  logic [P-1:0]  sparam,
  // per-row power rails and matchline drive
  input  logic [M-1:0]  vddml,
  output logic [M-1:0]  row_en,
  output logic [M-1:0]  mismatch
);

  logic [N-1:0] word_q  [M];
  logic [P-1:0] param_q [M];
  logic [M-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (wl_en) begin
      word_q[addr]  <= sl;
      param_q[addr] <= wparam;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q       <= '0;
    else if (wl_en) valid_q[addr] <= wvalid;
  end

  assign rdata  = word_q[addr];
  assign rparam = param_q[addr];
  assign rvalid = valid_q[addr];

  always_comb begin
    for (int unsigned r = 0; r < M; r++)
      row_en[r] = valid_q[r] && (param_q[r] == sparam);
  end

  // P-type NOR cell: a pull-up path opens when D=1 meets ~SL=1 or ~D=1 meets
  // SL=1, i.e. when the stored bit differs from the search bit.
  always_comb begin
    for (int unsigned r = 0; r < M; r++)
      mismatch[r] = vddml[r] && (|((word_q[r] & sl_n) | (~word_q[r] & sl)));
  end

endmodule
