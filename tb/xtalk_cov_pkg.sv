// xtalk_cov_pkg -- testbench helper: measures which crosstalk faults a
// stream of bus vectors stimulates, by the Maximum Aggressor Fault Model.
//
// For each consecutive pair of vectors and each victim line v, the pair
// stimulates a fault on v when all other lines (the aggressors) make the
// same transition. The victim's own behaviour names the fault:
//   aggressors rise: victim 0->0 Pg0, 1->1 Pg1, 1->0 Df, 0->1 Sr
//   aggressors fall: victim 1->1 Ng1, 0->0 Ng0, 0->1 Dr, 1->0 Sf
// A MAFM sequence must hit Pg0, Ng1, Dr, Df on every line, an XMAFM sequence
// all eight. The check is written from the fault definitions only and knows
// nothing of how the generator builds its sequence.
package xtalk_cov_pkg;

  typedef enum int unsigned {
    F_PG0 = 0, F_NG1 = 1, F_DR = 2, F_DF = 3,
    F_PG1 = 4, F_NG0 = 5, F_SR = 6, F_SF = 7
  } fault_e;

  localparam logic [7:0] MAFM_FAULTS  = 8'h0F;
  localparam logic [7:0] XMAFM_FAULTS = 8'hFF;

  class xtalk_cov #(int unsigned N = 8);
    logic [7:0]   hit [N];
    logic [N-1:0] prev;
    bit           have_prev;
    int unsigned  vectors;

    function new();
      clear();
    endfunction

    function void clear();
      foreach (hit[i]) hit[i] = '0;
      have_prev = 0;
      vectors   = 0;
    endfunction

    function void add(logic [N-1:0] cur);
      int unsigned rise, fall;
      vectors++;
      if (have_prev) begin
        rise = 0;
        fall = 0;
        for (int unsigned j = 0; j < N; j++) begin
          if (!prev[j] &&  cur[j]) rise++;
          if ( prev[j] && !cur[j]) fall++;
        end
        for (int unsigned v = 0; v < N; v++) begin
          logic r, f;
          r = !prev[v] &&  cur[v];
          f =  prev[v] && !cur[v];
          if (rise - int'(r) == N - 1) begin
            if      (!prev[v] && !cur[v]) hit[v][F_PG0] = 1'b1;
            else if ( prev[v] &&  cur[v]) hit[v][F_PG1] = 1'b1;
            else if ( prev[v] && !cur[v]) hit[v][F_DF]  = 1'b1;
            else                          hit[v][F_SR]  = 1'b1;
          end
          if (fall - int'(f) == N - 1) begin
            if      ( prev[v] &&  cur[v]) hit[v][F_NG1] = 1'b1;
            else if (!prev[v] && !cur[v]) hit[v][F_NG0] = 1'b1;
            else if (!prev[v] &&  cur[v]) hit[v][F_DR]  = 1'b1;
            else                          hit[v][F_SF]  = 1'b1;
          end
        end
      end
      prev      = cur;
      have_prev = 1;
    endfunction

    // Number of lines on which some fault of the required set was missed.
    function int unsigned missed(logic [7:0] need);
      int unsigned cnt = 0;
      foreach (hit[i]) if ((hit[i] & need) != need) cnt++;
      return cnt;
    endfunction
  endclass

endpackage
