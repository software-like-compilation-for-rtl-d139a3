// tb_ref_pkg: reference models of the five PU kinds, written independently
// of the RTL, for the testbenches. Each function takes one PU's
// configuration words and the shared data words (32-bit memory words) and
// returns the 8-bit output tokens the PU must produce, in order.
package tb_ref_pkg;
  typedef logic [31:0] word_q_t [$];
  typedef logic [7:0]  byte_q_t [$];

  // split words into tokens of `w` bits, lowest bits first
  function automatic word_q_t to_tokens(word_q_t words, int w);
    word_q_t t;
    foreach (words[i])
      for (int k = 0; k < 32 / w; k++)
        t.push_back((words[i] >> (k * w)) & ((w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1)));
    return t;
  endfunction

  function automatic byte_q_t le_bytes(logic [31:0] v, int n);
    byte_q_t b;
    for (int k = 0; k < n; k++) b.push_back(8'(v >> (8 * k)));
    return b;
  endfunction

  function automatic byte_q_t ref_summer(word_q_t cfg, word_q_t data);
    logic [31:0] s = 0;
    foreach (cfg[i])  s += cfg[i];
    foreach (data[i]) s += data[i];
    return le_bytes(s, 4);
  endfunction

  function automatic byte_q_t ref_dot(word_q_t cfg, word_q_t data);
    logic [31:0] s = 0;
    for (int i = 0; i + 1 < data.size(); i += 2) s += data[i] * data[i+1];
    return le_bytes(s, 4);
  endfunction

  function automatic byte_q_t ref_counter(word_q_t cfg, word_q_t data);
    word_q_t t = to_tokens(data, 8);
    logic [15:0] c [256];
    byte_q_t o;
    foreach (c[i]) c[i] = 0;
    foreach (t[i]) c[t[i][7:0]] += 1;
    foreach (c[i]) begin
      o.push_back(c[i][7:0]);
      o.push_back(c[i][15:8]);
    end
    return o;
  endfunction

  function automatic byte_q_t ref_knn(word_q_t cfg, word_q_t data, int dim, int k);
    longint bd [$];
    int     bi [$];
    byte_q_t o;
    for (int v = 0; v * dim < data.size(); v++) begin
      longint d = 0;
      int pos;
      for (int e = 0; e < dim; e++) begin
        longint x = longint'($signed(data[v*dim+e][15:0]));
        longint q = longint'($signed(cfg[e][15:0]));
        d += (x - q) * (x - q);
      end
      pos = bd.size();
      for (int j = bd.size() - 1; j >= 0; j--) if (d < bd[j]) pos = j;
      bd.insert(pos, d);
      bi.insert(pos, v);
    end
    for (int j = 0; j < k; j++) begin
      int idx = (j < bi.size()) ? bi[j] : 32'hFFFF;
      o.push_back(8'(idx));
      o.push_back(8'(idx >> 8));
    end
    return o;
  endfunction

  function automatic byte_q_t ref_tsp(word_q_t cfg, word_q_t data, int k);
    word_q_t ct = to_tokens(cfg, 8);
    word_q_t t  = to_tokens(data, 8);
    int hist [$];
    logic [31:0] correct = 0;
    foreach (t[n]) begin
      int x = int'($signed(t[n][7:0]));
      if (hist.size() == k) begin
        int ix = 0;
        logic pred;
        for (int i = 0; i < k; i++)
          if (hist[i] > int'($signed(ct[i][7:0]))) ix |= (1 << i);
        pred = ct[8 + ix / 8][ix % 8];
        if (pred == (x >= 0)) correct++;
        void'(hist.pop_back());
      end
      hist.push_front(x);
    end
    return le_bytes(correct, 4);
  endfunction
endpackage
