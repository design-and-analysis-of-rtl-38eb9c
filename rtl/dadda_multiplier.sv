// dadda_multiplier: unsigned N x N significand multiplier with Dadda reduction.
//
// The N*N partial product bits a[i]&b[j] are grouped into 2N columns by
// weight i+j. A Dadda tree then lowers the tallest column in stages whose
// target heights are ..., 28, 19, 13, 9, 6, 4, 3, 2 (each one floor(1.5x) the
// next). A stage uses only as many full adders (3:2) and half adders (2:2) per
// column as are needed to bring that column, together with the carries it
// receives from the column below in the same stage, down to the stage's
// target. After the last stage every column holds at most two bits, and a
// single carry-propagate adder sums the two remaining rows.
//
// The adder schedule (how many full and half adders each column uses in each
// stage) is computed at elaboration by constant functions, so the tree is
// regenerated for any N >= 2. For the single precision significand N = 24
// (hidden bit plus 23 fraction bits), giving 7 reduction stages.
//
// Ports: a, b  N-bit unsigned operands;  p  2N-bit product. Purely
// combinational. The choice of a Dadda multiplier follows the document; the
// stage/adder schedule is the textbook Dadda rule and the final adder is a
// plain '+', both choices of this design.
module dadda_multiplier #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int W = 2 * N;

  // Number of reduction stages: the Dadda heights 2, 3, 4, 6, 9, ... below N.
  function automatic int num_stages();
    int d = 2;
    int s = 0;
    while (d < int'(N)) begin
      s++;
      d = (d * 3) / 2;
    end
    return s;
  endfunction

  localparam int S = num_stages();

  // Target height of stage t (stage 0 has the largest target).
  function automatic int target(int t);
    int d = 2;
    for (int k = 0; k < S - 1 - t; k++) d = (d * 3) / 2;
    return d;
  endfunction

  // Schedule query for stage s, column c:
  //   what = 0: full adders, 1: half adders, 2: column height entering stage s.
  // s = S with what = 2 returns the final height.
  function automatic int sched(int s, int c, int what);
    int h  [W];
    int nf [W];
    int nh [W];
    int cin;
    int tot;
    for (int k = 0; k < W; k++) h[k] = (k < int'(N)) ? k + 1 : W - 1 - k;
    for (int t = 0; t < S; t++) begin
      if (t == s && what == 2) return h[c];
      cin = 0;
      for (int k = 0; k < W; k++) begin
        tot = h[k] + cin;
        if (tot > target(t)) begin
          nf[k] = (tot - target(t)) / 2;
          nh[k] = (tot - target(t)) % 2;
        end else begin
          nf[k] = 0;
          nh[k] = 0;
        end
        cin = nf[k] + nh[k];
      end
      if (t == s) return (what == 0) ? nf[c] : nh[c];
      for (int k = W - 1; k >= 0; k--)
        h[k] = h[k] - 2 * nf[k] - nh[k] + ((k > 0) ? nf[k-1] + nh[k-1] : 0);
    end
    return h[c];
  endfunction

  // Stage 0: partial products, column c holds bits a[i] & b[c-i].
  logic [N-1:0] pp [W];

  for (genvar c = 0; c < W; c++) begin : g_pp
    localparam int LO = (c < int'(N)) ? 0 : c - int'(N) + 1;
    localparam int HT = sched(0, c, 2);
    for (genvar k = 0; k < HT; k++) begin : g_bit
      assign pp[c][k] = a[LO+k] & b[c-LO-k];
    end
    if (HT < int'(N)) begin : g_pad
      assign pp[c][N-1:HT] = '0;
    end
  end

  // Reduction stages. g_st[s].col is the column array leaving stage s.
  for (genvar s = 0; s < S; s++) begin : g_st
    logic [N-1:0] col [W];  // bits leaving this stage, per column
    logic [N-1:0] cy  [W];  // carries produced in this stage, per column
    logic [N-1:0] cur [W];  // bits entering this stage

    if (s == 0) begin : g_in0
      assign cur = pp;
    end else begin : g_in
      assign cur = g_st[s-1].col;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int HC = sched(s, c, 2);
      localparam int F  = sched(s, c, 0);
      localparam int HA = sched(s, c, 1);
      localparam int FP = (c > 0) ? sched(s, c - 1, 0) : 0;
      localparam int HP = (c > 0) ? sched(s, c - 1, 1) : 0;
      localparam int PT = HC - 3 * F - 2 * HA;       // bits passed through
      localparam int HN = HC - 2 * F - HA + FP + HP; // height leaving the stage

      for (genvar k = 0; k < F; k++) begin : g_fa
        logic x, y, z;
        assign x = cur[c][3*k];
        assign y = cur[c][3*k+1];
        assign z = cur[c][3*k+2];
        assign col[c][k] = x ^ y ^ z;
        assign cy[c][k]  = (x & y) | (x & z) | (y & z);
      end
      for (genvar k = 0; k < HA; k++) begin : g_ha
        logic x, y;
        assign x = cur[c][3*F+2*k];
        assign y = cur[c][3*F+2*k+1];
        assign col[c][F+k] = x ^ y;
        assign cy[c][F+k]  = x & y;
      end
      for (genvar k = 0; k < PT; k++) begin : g_pass
        assign col[c][F+HA+k] = cur[c][3*F+2*HA+k];
      end
      if (c > 0) begin : g_cin
        for (genvar k = 0; k < FP + HP; k++) begin : g_bit
          assign col[c][F+HA+PT+k] = cy[c-1][k];
        end
      end
      if (HN < int'(N)) begin : g_pad
        assign col[c][N-1:HN] = '0;
      end
      if (F + HA < int'(N)) begin : g_cpad
        assign cy[c][N-1:F+HA] = '0;
      end
    end
  end

  // Final carry-propagate adder over the two remaining rows.
  logic [W-1:0] row0, row1;

  for (genvar c = 0; c < W; c++) begin : g_rows
    if (S == 0) begin : g_direct
      assign row0[c] = pp[c][0];
      assign row1[c] = pp[c][1];
    end else begin : g_tree
      assign row0[c] = g_st[S-1].col[c][0];
      assign row1[c] = g_st[S-1].col[c][1];
    end
  end

  assign p = row0 + row1;

endmodule
