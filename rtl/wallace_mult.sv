// wallace_mult -- N x N unsigned modified (reduced-complexity) Wallace tree
// multiplier.
//
// p = a * b, purely combinational, in three phases:
//  1. Partial products. The N*N bits a[i] & b[j] are gathered by weight
//     c = i + j into 2N columns; column c holds min(c+1, 2N-1-c) bits. This
//     is the product matrix pushed into the shape of an inverted pyramid.
//  2. Reduction. Each stage takes the bits of every column in non-overlapping
//     groups of three; a group of three goes into a full adder (sum stays in
//     the column, carry goes to the next one), a leftover single bit or pair
//     is passed on unchanged. The row count follows
//         r(j+1) = 2*floor(r(j)/3) + r(j) mod 3,   r(0) = N,
//     until two rows are left (10 stages for N = 64, 6 for N = 16). A half
//     adder is placed on a leftover pair only where a column would otherwise
//     be taller than r(j+1) after the carries from its neighbour arrive; for
//     N = 64 this happens only in the tenth, last stage.
//  3. A carry-propagate adder adds the last two rows.
//
// The schedule (column heights and the number of full and half adders in
// every column of every stage) is computed at elaboration by constant
// functions, and the generate loops below instantiate exactly those cells.
// NUM_STAGES, NUM_FA and NUM_HA report its size; HA_FIRST_STAGE is the first
// stage (counted from 1) that holds a half adder, 0 if none does.
// The reduction rule is as described for this multiplier; the exact half
// adder placement rule and the final adder (a plain '+') are this design's
// choices. Needs N >= 2. The NUM_* and HA_FIRST_STAGE localparams are read only
// by testbenches, so lint reports them as unused; likewise most bits of the
// N-deep column arrays stay 0 and unread, as a column never holds N bits
// after the first stage.
module wallace_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int C = 2 * N;            // number of columns

  function automatic int rows_next(int r);
    return 2 * (r / 3) + r % 3;
  endfunction

  function automatic int count_stages();
    int r = N;
    int k = 0;
    while (r > 2) begin
      r = rows_next(r);
      k++;
    end
    return k;
  endfunction

  localparam int NS = count_stages();

  // flattened: entry s*C + c belongs to stage s, column c
  typedef int plan_t [0:(NS+1)*C-1];

  // what = 0: column heights at the input of each stage (stage NS = output)
  // what = 1: full adders per column and stage; what = 2: half adders
  function automatic plan_t make_plan(int what);
    plan_t h, f, ha;
    int r, t, n, nf, rem, nh, prevc;
    for (int i = 0; i < (NS + 1) * C; i++) begin
      h[i] = 0; f[i] = 0; ha[i] = 0;
    end
    for (int c = 0; c < C; c++)
      h[c] = (c < N) ? c + 1 : ((c < C - 1) ? C - 1 - c : 0);
    r = N;
    for (int s = 0; s < NS; s++) begin
      t = rows_next(r);
      prevc = 0;
      for (int c = 0; c < C; c++) begin
        n   = h[s*C+c];
        nf  = n / 3;
        rem = n % 3;
        nh  = (nf + rem + prevc > t && rem == 2) ? 1 : 0;
        f[s*C+c]     = nf;
        ha[s*C+c]    = nh;
        h[(s+1)*C+c] = nf + nh + (rem - 2 * nh) + prevc;
        prevc      = nf + nh;
      end
      r = t;
    end
    if (what == 0) return h;
    else if (what == 1) return f;
    else return ha;
  endfunction

  localparam plan_t HGT = make_plan(0);
  localparam plan_t NFA = make_plan(1);
  localparam plan_t NHA = make_plan(2);

  function automatic int total_fa();
    int t = 0;
    for (int i = 0; i < NS * C; i++) t += NFA[i];
    return t;
  endfunction

  function automatic int total_ha();
    int t = 0;
    for (int i = 0; i < NS * C; i++) t += NHA[i];
    return t;
  endfunction

  function automatic int first_ha_stage();
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < C; c++)
        if (NHA[s*C+c] != 0) return s + 1;
    return 0;
  endfunction

  localparam int NUM_STAGES     = NS;
  localparam int NUM_FA         = total_fa();
  localparam int NUM_HA         = total_ha();
  localparam int HA_FIRST_STAGE = first_ha_stage();

  // pp[c][k]: bit k of column c of the partial-product matrix. Each
  // reduction stage g_stage[s] holds its own arrays: in_col (its input
  // columns), out_col (its output columns) and cy[c][k], carry k leaving
  // column c, which lands in column c+1.
  logic [N-1:0] pp [C];

  // Phase 1: partial products, column c gets a[i] & b[c-i]
  for (genvar c = 0; c < C; c++) begin : g_pp
    localparam int ILO = (c < N) ? 0 : c - N + 1;
    for (genvar k = 0; k < N; k++) begin : g_bit
      if (k < HGT[c]) begin : g_pp_bit
        assign pp[c][k] = a[ILO+k] & b[c-ILO-k];
      end else begin : g_pp_zero
        assign pp[c][k] = 1'b0;
      end
    end
  end

  // Phase 2: reduction stages
  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic [N-1:0] in_col  [C];
    logic [N-1:0] out_col [C];
    logic [N-1:0] cy      [C];

    if (s == 0) begin : g_first
      assign in_col = pp;
    end else begin : g_next
      assign in_col = g_stage[s-1].out_col;
    end

    for (genvar c = 0; c < C; c++) begin : g_col
      localparam int H    = HGT[s*C+c];
      localparam int F    = NFA[s*C+c];
      localparam int HA   = NHA[s*C+c];
      localparam int PASS = H - 3 * F - 2 * HA;
      localparam int CIN  = (c > 0) ? NFA[s*C+c-1] + NHA[s*C+c-1] : 0;
      localparam int HN   = HGT[(s+1)*C+c];

      for (genvar f = 0; f < F; f++) begin : g_fa
        full_adder fa (.a(in_col[c][3*f]), .b(in_col[c][3*f+1]), .cin(in_col[c][3*f+2]),
                       .sum(out_col[c][f]), .cout(cy[c][f]));
      end
      if (HA != 0) begin : g_ha
        half_adder ha (.a(in_col[c][3*F]), .b(in_col[c][3*F+1]),
                       .sum(out_col[c][F]), .cout(cy[c][F]));
      end
      for (genvar k = 0; k < PASS; k++) begin : g_pass
        assign out_col[c][F+HA+k] = in_col[c][3*F+2*HA+k];
      end
      for (genvar k = 0; k < CIN; k++) begin : g_cin
        assign out_col[c][F+HA+PASS+k] = cy[c-1][k];
      end
      for (genvar k = HN; k < N; k++) begin : g_zero
        assign out_col[c][k] = 1'b0;
      end
      for (genvar k = F + HA; k < N; k++) begin : g_nocy
        assign cy[c][k] = 1'b0;
      end
    end
  end

  logic [N-1:0] last [C];
  if (NS == 0) begin : g_no_stage
    assign last = pp;
  end else begin : g_stages
    assign last = g_stage[NS-1].out_col;
  end

  // Phase 3: final carry-propagate addition of the two remaining rows
  logic [C-1:0] row0, row1;
  for (genvar c = 0; c < C; c++) begin : g_final
    if (HGT[NS*C+c] > 2) begin : g_bad
      $error("wallace_mult: column %0d ends %0d bits tall", c, HGT[NS*C+c]);
    end
    assign row0[c] = last[c][0];
    assign row1[c] = last[c][1];
  end
  assign p = row0 + row1;
endmodule
