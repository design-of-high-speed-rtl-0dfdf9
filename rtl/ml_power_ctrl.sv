// ml_power_ctrl: gated-power matchline sense amplifier of one CAM row, at the
// clock-cycle level.
//
// The circuit: a power transistor Px feeds the row's comparison rail VDDML. A
// NAND2 of EN and node C1 drives Px, so Px is on while EN and C1 are both high.
// While EN is low, the matchline ML is held at ground and C1 is precharged
// high. When EN goes high the row is powered; a mismatching cell charges ML,
// and once ML passes the threshold of transistor M8, C1 is pulled low, the
// NAND2 toggles and Px turns off by itself, so ML stops well below VDD. C1,
// buffered, is MLout: high for a match, low for a mismatch.
//
// The model: one flip-flop `ml_q` stands for "ML has crossed the M8
// threshold". While `en` is low it is cleared (ML grounded). While `en` is
// high it is set by `mismatch` (a powered cell pulling ML up) and then holds
// until `en` falls. C1 = ~(en & ml_q); `vddml` (Px on) = en & C1;
// `ml_out` = C1.
// `en` is the row's enable: the global EN qualified by the row's parameter
// match, so a row whose parameter differs is never powered.
//
// Timing: with `en` high in cycle t and a mismatch seen in t, ml_q is set at
// the end of t; from t+1 on, ml_out is low and vddml is off. A matching row
// keeps ml_out high. So ml_out is valid one cycle after en rises.
//
// From the source design: the EN / C1 / NAND2 / Px feedback and the reading of
// C1 as MLout. Own choice: the analog charge-up and threshold crossing are
// reduced to one clock cycle; the mismatch-count dependence of the delay is
// not modelled.
module ml_power_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic en,        // row EN: global EN and parameter match
  input  logic mismatch,  // a powered cell of the row sees a mismatch
  output logic vddml,     // Px on: the row's comparison rail is powered
  output logic ml_out     // C1 buffered: 1 = match
);

  logic ml_q;
  logic c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ml_q <= 1'b0;
    else if (!en)      ml_q <= 1'b0;
    else if (mismatch) ml_q <= 1'b1;
  end

  assign c1     = ~(en & ml_q);   // M9 precharges C1 as soon as EN is low
  assign vddml  = ~(~(en & c1));   // NAND2 output drives the PMOS Px: on when low
  assign ml_out = c1;

endmodule
