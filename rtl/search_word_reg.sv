// search_word_reg: the n-bit search word register of the CAM.
//
// What it does: captures a word when `load` is high on a rising clock edge and
// drives it onto the n pairs of complementary search lines: sl = word,
// sl_n = ~word. In this design the same lines carry write data into a selected
// row (the cell's access transistors connect D/~D to SL/~SL), so WRITE and
// COMPARE both take their word from here.
//
// Timing: one register stage; sl/sl_n change the cycle after `load`.
// Reset clears the word (own choice; no reset value is specified). The search
// lines are not precharged between operations: with the gated-power matchline
// scheme, rows are held unpowered while EN is low, so the lines may keep their
// last value.
module search_word_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] sl,
  output logic [N-1:0] sl_n
);

  logic [N-1:0] word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    word_q <= '0;
    else if (load) word_q <= d;
  end

  assign sl   = word_q;
  assign sl_n = ~word_q;

endmodule
