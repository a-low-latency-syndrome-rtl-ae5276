// sdld_ref_pkg: reference model used by the decoder testbenches.
//
// It computes what the hardware should produce with plain integer arithmetic,
// written independently of the RTL:
//   - ref_layer: one pruned, clustered layer with a dense index matrix
//     (-1 = pruned weight), a 64-entry centroid table and per-row biases.
//     A layer output is floor((sum_j u_j*C[idx]*2^(15-in_frac) + bias)
//     / 2^(22-out_frac)), clamped to 0..255 (RELU) or -128..127 (hard tanh).
//   - poly_mod_g: remainder of a 63-bit polynomial divided by the BCH(63,45)
//     generator, found by long division from the top bit down.
package sdld_ref_pkg;

  localparam logic [18:0] G = 19'h782CF;

  function automatic logic [17:0] poly_mod_g(logic [62:0] v);
    logic [62:0] r;
    r = v;
    for (int d = 62; d >= 18; d--) begin
      if (r[d]) r = r ^ (63'(G) << (d - 18));
    end
    return r[17:0];
  endfunction

  class ref_layer;
    int nin, nout;
    int widx[][];     // cluster index or -1
    int lut[64];
    int bias[];
    bit htanh;

    function new(int nin_, int nout_, bit htanh_);
      nin = nin_; nout = nout_; htanh = htanh_;
      widx = new[nout];
      bias = new[nout];
      foreach (widx[i]) begin
        widx[i] = new[nin];
        foreach (widx[i][j]) widx[i][j] = -1;
      end
    endfunction

    // nnz_row non-zero weights per row, at distinct random columns.
    function void random_fill(int nnz_row, int bias_mag);
      for (int c = 0; c < 64; c++) lut[c] = int'($urandom_range(255)) - 128;
      for (int i = 0; i < nout; i++) begin
        int placed = 0;
        while (placed < nnz_row) begin
          int j = int'($urandom_range(nin - 1));
          if (widx[i][j] < 0) begin
            widx[i][j] = int'($urandom_range(63));
            placed++;
          end
        end
        bias[i] = int'($urandom_range(2 * bias_mag)) - bias_mag;
      end
    endfunction

    function automatic longint floor_div(longint a, longint b);
      longint q = a / b;
      if ((a % b != 0) && (a < 0)) q = q - 1;
      return q;
    endfunction

    function void compute(input int u[], input int in_frac, input int out_frac, output int o[]);
      o = new[nout];
      for (int i = 0; i < nout; i++) begin
        longint acc = 0;
        longint q;
        for (int j = 0; j < nin; j++)
          if (widx[i][j] >= 0 && u[j] != 0)
            acc += longint'(u[j]) * longint'(lut[widx[i][j]]) * (longint'(1) << (15 - in_frac));
        acc += bias[i];
        q = floor_div(acc, longint'(1) << (22 - out_frac));
        if (htanh) o[i] = (q > 127) ? 127 : (q < -128) ? -128 : int'(q);
        else       o[i] = (q > 255) ? 255 : (q < 0) ? 0 : int'(q);
      end
    endfunction

    // CSC image of the rows i = r*P + p: pointers and {row, cluster} entries.
    function void csc(int P, int p, output int ptr[], output int ent[$]);
      ptr = new[nin + 1];
      ent.delete();
      for (int j = 0; j < nin; j++) begin
        ptr[j] = ent.size();
        for (int i = p; i < nout; i += P)
          if (widx[i][j] >= 0) ent.push_back(((i / P) << 8) | widx[i][j]);
      end
      ptr[nin] = ent.size();
    endfunction
  endclass

endpackage
