// tb_geo_pkg: reference models of the geometry zone for the testbenches:
// command streams (header word with the control bit set, then data words)
// and the expected answers of the transform and normal commands.
package tb_geo_pkg;

  // a word on an FSL link: {control, data}
  typedef logic [32:0] fword_t;

  function automatic void cmd_matrix(input int m[16], ref fword_t q[$]);
    q.push_back({1'b1, 32'd0});
    for (int i = 0; i < 16; i++) q.push_back({1'b0, m[i]});
  endfunction

  function automatic void cmd_transform(input int m[16], input int x, y, z,
                                        ref fword_t q[$], ref fword_t ans[$]);
    longint v[4];
    v = '{x, y, z, 65536};
    q.push_back({1'b1, 32'd1});
    q.push_back({1'b0, x}); q.push_back({1'b0, y}); q.push_back({1'b0, z});
    for (int r = 0; r < 4; r++) begin
      longint s;
      s = 0;
      for (int k = 0; k < 4; k++) s += longint'(m[r * 4 + k]) * v[k];
      ans.push_back({r == 3, 32'(s >>> 16)});
    end
  endfunction

  function automatic void cmd_normal(input int p[9], ref fword_t q[$], ref fword_t ans[$]);
    longint u[3], w[3], c[3], len, sumsq;
    bit big;
    q.push_back({1'b1, 32'd2});
    for (int i = 0; i < 9; i++) q.push_back({1'b0, 16'h0000, 16'(p[i])});
    for (int i = 0; i < 3; i++) begin
      u[i] = longint'(p[3 + i]) - p[i];
      w[i] = longint'(p[6 + i]) - p[i];
    end
    c[0] = u[1] * w[2] - u[2] * w[1];
    c[1] = u[2] * w[0] - u[0] * w[2];
    c[2] = u[0] * w[1] - u[1] * w[0];
    do begin
      big = 0;
      for (int i = 0; i < 3; i++) if (c[i] > 16383 || c[i] < -16383) big = 1;
      if (big) for (int i = 0; i < 3; i++) c[i] = c[i] >>> 1;
    end while (big);
    sumsq = c[0] * c[0] + c[1] * c[1] + c[2] * c[2];
    len = 0;
    for (int b = 16; b >= 0; b--) if ((len + (64'd1 << b)) ** 2 <= sumsq) len += (64'd1 << b);
    for (int i = 0; i < 3; i++) ans.push_back({i == 2, 32'((len == 0) ? 0 : (c[i] * 16384) / len)});
  endfunction

  function automatic void rand_matrix(ref int m[16]);
    for (int i = 0; i < 16; i++) m[i] = $signed($urandom) >>> 12;
  endfunction

  function automatic void rand_tri(ref int p[9]);
    for (int i = 0; i < 9; i++) p[i] = $urandom_range(0, 4000) - 2000;
  endfunction

endpackage
