// wallace_pkg: constant functions that plan a reduced-complexity Wallace tree.
//
// The W x W partial-product matrix has column heights 1, 2, .., W, .., 2, 1.
// Each reduction stage has a row target taken from Wallace's grouping of rows
// in threes: r' = 2*floor(r/3) + (r mod 3), so 8 rows go 8-6-4-3-2 and 16 rows
// go 16-11-8-6-4-3-2. Within a stage the columns are visited from the least
// significant upwards; each column receives the fewest full adders (3:2) that
// bring its height, including the carries arriving from the column below,
// down to the stage target, and a half adder only when one more bit must go.
// This keeps the Wallace stage count while using few half adders, which is the
// point of the reduced-complexity tree. The exact per-column placement is this
// design's own rule; the stage count and the FA/HA style follow the source
// structure. All functions are pure and evaluated at elaboration time.
package wallace_pkg;

  localparam int unsigned MAX_W = 64;

  typedef enum int unsigned {
    Q_HEIGHT = 0,  // bits in the column at the start of the stage
    Q_FA     = 1,  // full adders placed on the column in the stage
    Q_HA     = 2   // half adders placed on the column in the stage
  } plan_query_e;

  // Initial height of column c of a w x w unsigned product.
  function automatic int init_height(int w, int c);
    if (c < w) return c + 1;
    if (c < 2 * w - 1) return 2 * w - 1 - c;
    return 0;
  endfunction

  // Walks the plan up to stage s and returns the requested quantity for
  // column c. Stage index s = stages(w) returns the final heights (at most 2).
  function automatic int plan(int w, int s, int c, plan_query_e q);
    int h   [2*MAX_W];
    int nh  [2*MAX_W];
    int rows, tgt, cin, e, f, g;
    for (int k = 0; k < 2 * MAX_W; k++) h[k] = (k < 2 * w) ? init_height(w, k) : 0;
    rows = w;
    for (int st = 0; st <= s; st++) begin
      rows = 2 * (rows / 3) + rows % 3;
      tgt  = (rows < 2) ? 2 : rows;
      cin  = 0;
      for (int k = 0; k < 2 * w; k++) begin
        e = h[k] + cin - tgt;
        f = 0;
        g = 0;
        if (e > 0) begin
          f = (e / 2 < h[k] / 3) ? e / 2 : h[k] / 3;
          e = e - 2 * f;
          if (e > 0 && h[k] - 3 * f >= 2) g = 1;
        end
        if (st == s && k == c) begin
          case (q)
            Q_HEIGHT: return h[k];
            Q_FA:     return f;
            default:  return g;
          endcase
        end
        nh[k] = h[k] - 2 * f - g + cin;
        cin   = f + g;
      end
      for (int k = 0; k < 2 * w; k++) h[k] = nh[k];
    end
    return 0;
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int stages(int w);
    int n;
    bit done;
    n = 0;
    for (int st = 0; st < 4 * MAX_W; st++) begin
      done = 1'b1;
      for (int k = 0; k < 2 * w; k++)
        if (plan(w, st, k, Q_HEIGHT) > 2) done = 1'b0;
      if (done) return n;
      n++;
    end
    return n;
  endfunction

endpackage
