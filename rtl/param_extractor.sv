// param_extractor: gate-block parameter extractor of the PB-CAM.
//
// What it does: reduces an N-bit word to N/L parameter bits. The word is cut
// into L-bit partitions; partition j (bits j*L .. j*L+L-1) is reduced by a
// binary tree of log2(L) levels of two-input gates to parameter bit j. Every
// gate is a NAND, a NOR or an XOR, chosen per gate by the GATES parameter
// (two bits per gate, pbcam_pkg::gate_e, numbering as in pbcam_pkg). The
// choice is made at design time for the data the CAM will hold, with
// pbcam_pkg::gbs_select (the gate-block selection algorithm).
//
// Timing: purely combinational, log2(L) gate delays whatever N is (three for
// L = 8), N - N/L gates in all (28 for N = 32, giving 4 parameter bits).
//
// From the source design: the 8-bit partitions with the 7-gate tree G0..G6,
// the NAND/NOR/XOR candidate set, and the 32-bit word giving 4 parameter bits
// with 28 gates. Own choices: the default GATES (the worked 4-bit example's
// NAND / NOR / XOR pattern repeated, XOR above), since no gate choice is given
// for a 32-bit word, and the bit order of partitions.
module param_extractor
  import pbcam_pkg::*;
#(
  parameter int unsigned N = 32,                  // word width
  parameter int unsigned L = 8,                   // partition width, a power of two
  parameter logic [2*MAX_W-1:0] GATES = default_gates(N, L)
) (
  input  logic [N-1:0]   data,
  output logic [N/L-1:0] param
);

  localparam int unsigned LV = log2_ceil(L);

  // lvl[v] holds the inputs of level v; lvl[LV] holds the parameter bits.
  logic [N-1:0] lvl [LV+1];

  assign lvl[0] = data;

  for (genvar v = 0; v < LV; v++) begin : g_level
    localparam int unsigned W    = N >> (v + 1);      // gates on this level
    localparam int unsigned BASE = level_base(N, v);  // first gate index
    for (genvar k = 0; k < W; k++) begin : g_gate
      localparam gate_e G = gate_e'(GATES[2*(BASE+k) +: 2]);
      assign lvl[v+1][k] = gate_eval(G, lvl[v][2*k], lvl[v][2*k+1]);
    end
    if (W < N) begin : g_pad
      assign lvl[v+1][N-1:W] = '0;
    end
  end

  assign param = lvl[LV][N/L-1:0];

  initial begin
    assert (L >= 2 && (1 << LV) == L) else $error("L must be a power of two");
    assert (N % L == 0) else $error("N must be a multiple of L");
    assert (N <= MAX_W) else $error("N above MAX_W");
  end

endmodule
