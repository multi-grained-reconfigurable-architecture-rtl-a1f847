// tb_bnn_pkg: reference model and kernel builder shared by the testbenches.
//
// nu()          integer model of one neuron: products at 64 bits, arithmetic
//               shift by q, sums wrapped to 16 bits, negative result divided
//               by 2^p.
// place()       maps a BNN kernel given as a layer-size list (e.g. 1-2-3-2-1)
//               onto an array whose upper-left PE is (x, y), following the
//               allocation rule of the architecture: moving from an even
//               source row, a growing layer starts one column further left;
//               moving from an odd source row, a shrinking layer starts one
//               column further right. Weights between PEs of consecutive
//               layers get random non-zero values, all other weights stay 0.
// eval_sample() evaluates the whole array for one sample, row by row.
package tb_bnn_pkg;
  import mugra_pkg::*;

  function automatic logic signed [NW-1:0] nu(longint x1, longint x2, longint w1, longint w2,
                                              longint b, int q, int p);
    longint t1, t2, s;
    logic signed [NW-1:0] s16;
    t1  = (x1 * w1) >>> q;
    t2  = (x2 * w2) >>> q;
    s16 = NW'(t1) + NW'(t2);
    s16 = s16 + NW'(b);
    s   = longint'(s16);
    if (s < 0) s = s >>> p;
    return NW'(s);
  endfunction

  // column of the left neighbour of (r, c) in row r-1
  function automatic int left_col(int r, int c);
    return (((r - 1) % 2) == 1) ? c - 1 : c;
  endfunction

  function automatic logic signed [NW-1:0] rnd_w();
    int v;
    do v = int'($urandom_range(0, 1000)) - 500; while (v == 0);
    return NW'(v);
  endfunction

  class array_model;
    int rows, cols;
    pe_cfg_t cfg [];
    bit      used [];
    int      in_pes [$];
    int      out_pes [$];

    function new(int r, int c);
      rows = r; cols = c;
      cfg  = new[r * c];
      used = new[r * c];
      foreach (cfg[i]) begin cfg[i] = '0; used[i] = 0; end
    endfunction

    // Returns 1 and fills cfg when the kernel fits at (x, y).
    function automatic bit place(int layers[$], int x, int y, int q = 8, int p = 3);
      int dy = y, pdy = y, n;
      int idx;
      if (x + layers.size() > rows) return 0;
      // first pass: legality
      for (int i = 0; i < layers.size(); i++) begin
        if (i > 0) begin
          pdy = dy;
          if (((x + i - 1) % 2) == 0) begin
            if (layers[i] > layers[i-1]) dy = dy - 1;
          end else begin
            if (layers[i] < layers[i-1]) dy = dy + 1;
          end
        end
        if (dy < 0 || dy + layers[i] > cols) return 0;
        for (int j = 0; j < layers[i]; j++)
          if (used[(x + i) * cols + dy + j]) return 0;
      end
      // second pass: configure
      dy = y;
      for (int i = 0; i < layers.size(); i++) begin
        pdy = dy;
        if (i > 0) begin
          if (((x + i - 1) % 2) == 0) begin
            if (layers[i] > layers[i-1]) dy = dy - 1;
          end else begin
            if (layers[i] < layers[i-1]) dy = dy + 1;
          end
        end
        for (int j = 0; j < layers[i]; j++) begin
          int r = x + i, c = dy + j, lc;
          idx = r * cols + c;
          used[idx] = 1;
          cfg[idx] = '0;
          cfg[idx].ctrl.q = 4'(q);
          cfg[idx].ctrl.p = 2'(p);
          if (i == 0) begin
            cfg[idx].ctrl.rd = 1'b1;
            in_pes.push_back(idx);
          end else begin
            lc = left_col(r, c);
            n  = layers[i-1];
            if (lc     >= pdy && lc     < pdy + n) cfg[idx].w1 = rnd_w();
            if (lc + 1 >= pdy && lc + 1 < pdy + n) cfg[idx].w2 = rnd_w();
            cfg[idx].b = NW'(int'($urandom_range(0, 512)) - 256);
            if (i == layers.size() - 1) begin
              cfg[idx].ctrl.wr = 1'b1;
              out_pes.push_back(idx);
            end
          end
        end
      end
      return 1;
    endfunction

    // Values of all PEs for one sample; inval[idx] is the input-buffer word
    // an input PE sees.
    function automatic void eval_sample(logic signed [NW-1:0] inval[], ref logic signed [NW-1:0] val[]);
      val = new[rows * cols];
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++) begin
          int idx = r * cols + c, lc;
          longint xl = 0, xr = 0;
          if (cfg[idx].ctrl.rd) begin
            val[idx] = inval[idx];
          end else begin
            if (r > 0) begin
              lc = left_col(r, c);
              if (lc >= 0 && lc < cols)         xl = longint'(val[(r-1)*cols + lc]);
              if (lc + 1 >= 0 && lc + 1 < cols) xr = longint'(val[(r-1)*cols + lc + 1]);
            end
            val[idx] = nu(xl, xr, cfg[idx].w1, cfg[idx].w2, cfg[idx].b,
                          cfg[idx].ctrl.q, cfg[idx].ctrl.p);
          end
        end
    endfunction
  endclass

endpackage
