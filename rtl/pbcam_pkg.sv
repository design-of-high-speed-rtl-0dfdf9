// pbcam_pkg: types, constants and design-time functions shared by the
// precomputation-based CAM (PB-CAM).
//
// The parameter extractor is a forest of two-input gates, one binary tree per
// l-bit partition of the word. Each gate is one of NAND, NOR or XOR, chosen per
// gate for the kind of data the CAM will hold. The gate choice is a module
// parameter: a packed vector with two bits per gate, gate_e encoding.
//
// Gate numbering (shared by every user of the vector): level 0 has n/2 gates,
// gate k of level 0 combines bits 2k and 2k+1 of the word; level v+1 combines
// outputs 2k and 2k+1 of level v. Gates are numbered level by level, level 0
// first. With l = 8 each partition is the 7-gate tree G0..G6 of the block
// diagram.
//
// gbs_* functions implement the gate-block selection algorithm: for every gate
// position, each candidate gate is applied to the sample data and the one with
// the smallest average comparison count Cavg is kept; its outputs feed the next
// level. Cavg of a one-bit parameter over S samples, with S0 and S1 samples
// giving 0 and 1, is (S0*S0 + S1*S1) / S: the average number of stored words
// that share a search word's parameter value. That formula reproduces the
// worked example the method comes with (NAND 12.5, NOR 8.125, XOR 9.125 over
// 16 samples); the functions below compare S*Cavg, which orders the same way.
// Ties keep the earlier of NAND, NOR, XOR. These functions are for elaboration
// time and for testbenches; no hardware is built from them.
package pbcam_pkg;

  typedef enum logic [1:0] {
    G_NAND = 2'd0,
    G_NOR  = 2'd1,
    G_XOR  = 2'd2
  } gate_e;

  // Operations of the CAM: READ, WRITE and COMPARE (search).
  typedef enum logic [1:0] {
    OP_READ    = 2'd0,
    OP_WRITE   = 2'd1,
    OP_COMPARE = 2'd2
  } cam_op_e;

  // Largest word the design-time functions handle.
  localparam int unsigned MAX_W = 256;

  // One two-input gate of the extractor.
  function automatic logic gate_eval(gate_e g, logic a, logic b);
    case (g)
      G_NAND:  return ~(a & b);
      G_NOR:   return ~(a | b);
      default: return a ^ b;
    endcase
  endfunction

  function automatic int unsigned log2_ceil(int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Number of gates in the extractor of an n-bit word with l-bit partitions.
  function automatic int unsigned num_gates(int unsigned n, int unsigned l);
    return n - n / l;
  endfunction

  // Index of the first gate of a level.
  function automatic int unsigned level_base(int unsigned n, int unsigned lvl);
    int unsigned b = 0;
    for (int unsigned v = 0; v < lvl; v++) b += n >> (v + 1);
    return b;
  endfunction

  // Default gate choice, used when no sample data is at hand: the pattern of the
  // worked 4-bit example (NAND on the lower pair, NOR on the upper pair, XOR to
  // join them) repeated over the word, with XOR on every higher level.
  function automatic logic [2*MAX_W-1:0] default_gates(int unsigned n, int unsigned l);
    logic [2*MAX_W-1:0] g = '0;
    int unsigned lv = log2_ceil(l);
    int unsigned idx = 0;
    for (int unsigned v = 0; v < lv; v++) begin
      for (int unsigned k = 0; k < (n >> (v + 1)); k++) begin
        if (v == 0) g[2*idx +: 2] = (k % 2 == 0) ? G_NAND : G_NOR;
        else        g[2*idx +: 2] = G_XOR;
        idx++;
      end
    end
    return g;
  endfunction

  // S*Cavg of one output bit over a set of samples (bit position `bit_i` of
  // each entry of `vals`).
  function automatic int unsigned gbs_ncavg(const ref logic [MAX_W-1:0] vals[$],
                                            input int unsigned bit_i);
    int unsigned n1 = 0;
    int unsigned n0;
    foreach (vals[s]) n1 += vals[s][bit_i];
    n0 = vals.size() - n1;
    return n0 * n0 + n1 * n1;
  endfunction

  // Gate-block selection for an n-bit word with l-bit partitions. Returns the
  // selected gates in the packed encoding described above; also fills `ncavg`
  // with S*Cavg of every candidate (index 3*gate + candidate) for inspection.
  function automatic logic [2*MAX_W-1:0] gbs_select(const ref logic [MAX_W-1:0] samples[$],
                                                    input int unsigned n,
                                                    input int unsigned l,
                                                    ref int unsigned ncavg[]);
    logic [2*MAX_W-1:0] sel = '0;
    logic [MAX_W-1:0] cur[$];
    logic [MAX_W-1:0] cand[3][$];
    int unsigned width = n;
    int unsigned idx = 0;
    ncavg = new[3 * num_gates(n, l)];
    cur = samples;
    // Step 4: repeat while more than n/l bits are generated.
    while (width > n / l) begin
      for (int c = 0; c < 3; c++) begin
        cand[c] = {};
        foreach (cur[s]) begin
          logic [MAX_W-1:0] o = '0;
          // Step 1: record every candidate's output for every sample.
          for (int unsigned k = 0; k < width / 2; k++)
            o[k] = gate_eval(gate_e'(c), cur[s][2*k], cur[s][2*k+1]);
          cand[c].push_back(o);
        end
      end
      for (int unsigned k = 0; k < width / 2; k++) begin
        int unsigned best = 0;
        logic [1:0] best_c = 2'd0;
        // Step 2: Cavg of each candidate; Step 3: keep the smallest.
        for (int c = 0; c < 3; c++) begin
          int unsigned v = gbs_ncavg(cand[c], k);
          ncavg[3*(idx+k) + c] = v;
          if (c == 0 || v < best) begin
            best = v;
            best_c = 2'(c);
          end
        end
        sel[2*(idx+k) +: 2] = best_c;
      end
      // The selected outputs are the next level's input data.
      foreach (cur[s]) begin
        logic [MAX_W-1:0] o = '0;
        for (int unsigned k = 0; k < width / 2; k++)
          o[k] = cand[sel[2*(idx+k) +: 2]][s][k];
        cur[s] = o;
      end
      idx += width / 2;
      width = width / 2;
    end
    return sel;
  endfunction

endpackage
