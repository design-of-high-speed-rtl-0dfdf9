// priority_encoder: encodes the matchline outputs of the CAM rows into the
// address of the matched word.
//
// What it does: `hit` is high when any request bit is set; `addr` is the index
// of the lowest set bit (lowest address wins); `multi` is high when more than
// one bit is set. The lowest-address rule and the multi-match flag are this
// design's choice: the source names a priority encoder without saying which
// row has priority.
//
// How: a balanced binary tree. Each node merges two halves; the lower half wins
// when it has a hit, and the address bit of that level tells which half won.
// Depth is log2(M) two-input stages. The tree is written as one loop over a
// heap-ordered node array.
//
// Timing: purely combinational. M must be a power of two, at least 2.
module priority_encoder #(
  parameter int unsigned M  = 8192,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic [M-1:0]  req,
  output logic          hit,
  output logic [AW-1:0] addr,
  output logic          multi
);

  // Heap-ordered tree: node 1 is the root, node i has children 2i (lower
  // addresses) and 2i+1, leaves M..2M-1 are the request bits. A node at depth d
  // decides address bit AW-1-d.
  logic [2*M-1:0]  h;
  logic [2*M-1:0]  mu;
  logic [AW-1:0]   a [2*M];

  always_comb begin
    for (int unsigned i = 0; i < 2*M; i++) begin
      h[i]  = 1'b0;
      mu[i] = 1'b0;
      a[i]  = '0;
    end
    for (int unsigned j = 0; j < M; j++) h[M+j] = req[j];
    for (int unsigned i = M - 1; i >= 1; i--) begin
      logic lo;
      logic hi;
      int unsigned d;
      lo    = h[2*i];
      hi    = h[2*i+1];
      d     = $clog2(i + 1) - 1;
      h[i]  = lo | hi;
      mu[i] = mu[2*i] | mu[2*i+1] | (lo & hi);
      a[i]  = lo ? a[2*i] : a[2*i+1];
      a[i][AW-1-d] = ~lo;
    end
  end

  assign hit   = h[1];
  assign multi = mu[1];
  assign addr  = a[1];

  initial assert (M >= 2 && (1 << AW) == M) else $error("M must be a power of two");

endmodule
