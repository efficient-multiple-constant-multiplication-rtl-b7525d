// mcm_map_pkg: the DSP mapping algorithm, as elaboration-time functions that
// turn a list of constants into the DSP grouping an mcm_block is built from.
//
// map_constants(v, consts) does what a generator for an MCM block has to do
// before any hardware exists:
//   1. Constants that are 0, powers of two, duplicates or a power-of-two
//      multiple of another listed constant are left out: mcm_block forms them
//      by shifting the input or another product.
//   2. The remaining constants are sorted ascending. The number of constants
//      per combination, K, comes from the input width (max_const_dsp, capped
//      at MAX_K).
//   3. Iteration z appends z zero constants and searches, level by level, for
//      a split of the list into combinations of K that each fit one slice
//      (mcm_pkg::group_fits). At each level the combinations are tried in
//      lexicographic order; a level with no fitting combination undoes the
//      previous level's choice and resumes after it. A zero in a combination
//      is an empty slot, so zeros let a slice hold fewer than K constants.
//   4. The first z that succeeds gives the grouping: one DSP slice per
//      combination.
// The search follows the published algorithm. Two shortcuts leave its result
// unchanged and are this design's own: a combination always contains the
// first unused constant, and equal entries (the zeros) are taken in order,
// so no split is tried twice in another order; and a branch is cut as soon
// as the constants left could not fit the slices left even at the largest
// count that the cost rule admits per slice. Iterations whose list length is
// not a multiple of K cannot succeed and are skipped.
//
// The result is a group_tab_t (rows = slices, zeros = empty slots). An
// all-zero table with consts needing a slice means no grouping was found
// within MAX_DSP slices.
package mcm_map_pkg;
  import mcm_pkg::*;

  // Longest list searched: constants plus the zeros appended to them.
  localparam int LMAX = 64;

  typedef struct packed {
    logic       ok;
    group_tab_t tab;
  } map_result_t;

  // Constants per combination for a v-bit input, by input-width range:
  // 24, 12, 8, 6, 4, 3, 2 for v up to 2, 3, 4, 6, 8, 12, 18, and 1 above
  // (a wider input only fits a slice alone). Capped at MAX_K.
  function automatic int max_const_dsp(int v);
    int k;
    if      (v <= 2)  k = 24;
    else if (v <= 3)  k = 12;
    else if (v <= 4)  k = 8;
    else if (v <= 6)  k = 6;
    else if (v <= 8)  k = 4;
    else if (v <= 12) k = 3;
    else if (v <= 18) k = 2;
    else              k = 1;
    return (k < MAX_K) ? k : MAX_K;
  endfunction

  // Whether consts[j] needs a DSP slice (step 1).
  function automatic bit needs_dsp(const_list_t c, int j);
    if (c[j] == 0 || is_pow2(c[j])) return 1'b0;
    for (int i = 0; i < MAX_OUT; i++) begin
      if (i < j && c[i] == c[j]) return 1'b0;
      if (c[i] != 0 && c[j] > c[i] && (c[j] % c[i]) == 0 && is_pow2(c[j] / c[i]))
        return 1'b0;
    end
    return 1'b1;
  endfunction

  // Cost of one constant on its own, without the input width.
  function automatic int const_cost(longint unsigned m);
    return bitlen(m >> manip_s(m)) - manip_n(m);
  endfunction

  // Largest number of these constants that the cost rule could put on one
  // slice at all: the cheapest ones, plus v per extra constant.
  function automatic int cost_cap(int v, int k, longint unsigned l [LMAX], int nl);
    int costs [LMAX];
    int nc, sum, cap, t;
    nc = 0;
    for (int i = 0; i < nl; i++)
      if (l[i] != 0) begin
        costs[nc] = const_cost(l[i]);
        nc++;
      end
    for (int i = 1; i < nc; i++)
      for (int j = i; j > 0 && costs[j - 1] > costs[j]; j--) begin
        t = costs[j];
        costs[j] = costs[j - 1];
        costs[j - 1] = t;
      end
    sum = 0;
    cap = 0;
    for (int i = 0; i < nc && i < k; i++) begin
      sum += costs[i];
      if (sum + v * i <= MAX_COST) cap = i + 1;
    end
    return (cap > 0) ? cap : 1;
  endfunction

  // Step 3 for one iteration: split l[0:nl-1] (sorted, zeros first) into
  // nl / k slices.
  function automatic map_result_t search(int v, int k, longint unsigned l [LMAX], int nl);
    map_result_t res;
    bit   used  [LMAX];
    bit   insel [LMAX];
    int   first [LMAX];
    int   avail [LMAX*LMAX];   // avail[lvl * LMAX + i]
    int   na    [LMAX];
    int   pos   [LMAX*MAX_K];  // pos[lvl * MAX_K + j]
    int   ng, lvl, cap, rest_nz, slot, idx, i;
    bit   enter, have, ok;
    group_t g;

    res = '0;
    ng  = nl / k;
    cap = cost_cap(v, k, l, nl);
    for (int j = 0; j < LMAX; j++) used[j] = 1'b0;
    lvl   = 0;
    enter = 1'b1;
    forever begin
      if (enter) begin
        if (lvl == ng) break;
        // Level set-up: the first unused entry, then the unused ones after it.
        first[lvl] = 0;
        while (used[first[lvl]]) first[lvl]++;
        na[lvl] = 0;
        for (int j = first[lvl] + 1; j < nl; j++)
          if (!used[j]) begin
            avail[lvl * LMAX + na[lvl]] = j;
            na[lvl]++;
          end
        have = (na[lvl] >= k - 1);
        for (int j = 1; j < k; j++) pos[lvl * MAX_K + j] = j - 1;
      end else begin
        // Next combination of k - 1 positions out of na[lvl].
        i = k - 1;
        while (i >= 1 && pos[lvl * MAX_K + i] == na[lvl] - k + i) i--;
        have = (i >= 1);
        if (have) begin
          pos[lvl * MAX_K + i]++;
          for (int j = i + 1; j < k; j++) pos[lvl * MAX_K + j] = pos[lvl * MAX_K + j - 1] + 1;
        end
      end

      if (!have) begin
        // Level exhausted: undo the previous level's combination.
        if (lvl == 0) return res;
        lvl--;
        used[first[lvl]] = 1'b0;
        for (int j = 1; j < k; j++) used[avail[lvl * LMAX + pos[lvl * MAX_K + j]]] = 1'b0;
        enter = 1'b0;
        continue;
      end

      // Test the candidate combination.
      for (int j = 0; j < nl; j++) insel[j] = 1'b0;
      insel[first[lvl]] = 1'b1;
      for (int j = 1; j < k; j++) insel[avail[lvl * LMAX + pos[lvl * MAX_K + j]]] = 1'b1;
      ok = 1'b1;
      for (int j = 1; j < nl; j++)
        if (insel[j] && l[j] == l[j - 1] && !used[j - 1] && !insel[j - 1]) ok = 1'b0;
      g    = '0;
      slot = 0;
      for (int j = 0; j < nl; j++)
        if (insel[j] && l[j] != 0) begin
          g[slot] = l[j];
          slot++;
        end
      if (ok) ok = group_fits(v, g);
      if (ok) begin
        rest_nz = 0;
        for (int j = 0; j < nl; j++)
          if (!used[j] && !insel[j] && l[j] != 0) rest_nz++;
        ok = (rest_nz <= (ng - lvl - 1) * cap);
      end
      if (ok) begin
        for (int j = 0; j < nl; j++) if (insel[j]) used[j] = 1'b1;
        lvl++;
        enter = 1'b1;
      end else begin
        enter = 1'b0;
      end
    end

    // Success: one table row per level, zeros dropped.
    res.ok = 1'b1;
    for (int d = 0; d < ng; d++) begin
      slot = 0;
      idx  = first[d];
      if (l[idx] != 0) begin
        res.tab[d][slot] = l[idx];
        slot++;
      end
      for (int j = 1; j < k; j++) begin
        idx = avail[d * LMAX + pos[d * MAX_K + j]];
        if (l[idx] != 0) begin
          res.tab[d][slot] = l[idx];
          slot++;
        end
      end
    end
    return res;
  endfunction

  // The whole mapping (steps 1 to 4).
  function automatic group_tab_t map_constants(int v, const_list_t consts);
    longint unsigned base [LMAX];
    longint unsigned l    [LMAX];
    longint unsigned t;
    int nc, k;
    map_result_t r;

    nc = 0;
    for (int j = 0; j < MAX_OUT; j++)
      if (needs_dsp(consts, j)) begin
        base[nc] = consts[j];
        nc++;
      end
    if (nc == 0) return '0;
    for (int i = 1; i < nc; i++)
      for (int j = i; j > 0 && base[j - 1] > base[j]; j--) begin
        t = base[j];
        base[j] = base[j - 1];
        base[j - 1] = t;
      end
    k = max_const_dsp(v);
    for (int z = 0; nc + z <= LMAX && (nc + z) / k <= MAX_DSP; z++) begin
      if ((nc + z) % k != 0) continue;
      for (int j = 0; j < LMAX; j++) l[j] = 0;
      for (int j = 0; j < nc; j++) l[z + j] = base[j];
      r = search(v, k, l, nc + z);
      if (r.ok) return r.tab;
    end
    return '0;
  endfunction

  // Number of constants of consts that need a DSP slice.
  function automatic int dsp_const_count(const_list_t consts);
    int n = 0;
    for (int j = 0; j < MAX_OUT; j++) if (needs_dsp(consts, j)) n++;
    return n;
  endfunction

endpackage
