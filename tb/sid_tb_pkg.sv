// sid_tb_pkg: reference arithmetic and a random-model generator for the
// speaker-ID accelerator testbenches.
//
// The reference functions recompute what the hardware should produce using
// 64-bit integer arithmetic, written independently of the RTL. SidModel
// builds a random fully connected network, lays it out in the accelerator's
// BRAM word format (header, weights per tile and column, biases, input
// features) and evaluates it in software.
package sid_tb_pkg;

  localparam longint ONE_Q = 64'd1 << 28;

  function automatic logic [31:0] ref_aq(logic [31:0] x, bit relu, bit quant, int qbits);
    longint v = longint'($signed(x));
    if (relu && v < 0) v = 0;
    if (quant) begin
      if (v < 0) v = 0;
      if (v > ONE_Q) v = ONE_Q;
      if (qbits < 28) v = (v >>> (28 - qbits)) <<< (28 - qbits);
    end
    return v[31:0];
  endfunction

  // one fixed-point multiply-accumulate term: (x * w) >> (wb-1), low 32 bits
  function automatic logic [31:0] ref_term(logic [31:0] x, int w, int wb);
    longint p = longint'($signed(x)) * longint'(w);
    p = p >>> (wb - 1);
    return p[31:0];
  endfunction

  function automatic logic [31:0] ref_scale(logic [31:0] acc, logic [31:0] sc,
                                            bit relu, bit quant, int qbits);
    longint p = longint'($signed(acc)) * longint'($signed(sc));
    p = p >>> 28;
    return ref_aq(p[31:0], relu, quant, qbits);
  endfunction

  class SidModel;
    int          n_pu, wbits, ternary;
    int          nl;
    int          dims[$];           // dims[0] = input length
    int          w[$];              // flat: layer, out row, in col
    int          woff[$];
    logic [31:0] b[$];
    int          boff[$];
    logic [31:0] scale[$];
    bit          relu[$], quant[$];
    int          qbits[$];
    logic [31:0] x0[$];
    logic [71:0] img[int];          // BRAM image: word address -> word
    int          act_a, act_b;
    logic [31:0] out[$];            // reference result
    int          exp_skip;          // expected skipped all-zero columns
    longint      exp_reads;         // read requests of the run
    longint      exp_ser;           // serializer cycles of the run
    int          n_tiles;
    int          n_relu_zero, n_clip, n_trunc;

    function new(int n_pu, int wbits, int ternary);
      this.n_pu = n_pu; this.wbits = wbits; this.ternary = ternary;
    endfunction

    function int wpw(); return 72 / wbits; endfunction

    function int rnd_w();
      int r;
      if (ternary) begin
        r = int'($urandom_range(0, 9));
        return (r < 4) ? 0 : (r < 7) ? 1 : -1;
      end
      return int'($urandom_range(0, (1 << wbits) - 1)) - (1 << (wbits - 1));
    endfunction

    // Build a random model with the given layer sizes (d[0] = input length).
    function void build(int d[$]);
      int o, total;
      dims = d; nl = d.size() - 1;
      total = 0;
      for (int l = 0; l < nl; l++) begin
        woff.push_back(total);
        boff.push_back(b.size());
        for (int r = 0; r < dims[l+1] * dims[l]; r++) w.push_back(rnd_w());
        total += dims[l+1] * dims[l];
        for (int r = 0; r < dims[l+1]; r++)
          b.push_back(32'($signed(int'($urandom_range(0, 1 << 26)) - (1 << 25))));
        scale.push_back(32'($urandom_range(1 << 24, 1 << 27)));
        relu.push_back(l != nl - 1);
        quant.push_back((l % 2) == 1);
        qbits.push_back(4 + l);
      end
      // a few all-zero columns in every layer exercise zero skipping
      for (int l = 0; l < nl; l++)
        for (int k = 0; k < 3 && k < dims[l]; k++) begin
          int i = int'($urandom_range(0, dims[l] - 1));
          for (o = 0; o < dims[l+1]; o++) w[woff[l] + o * dims[l] + i] = 0;
        end
      for (int i = 0; i < dims[0]; i++) x0.push_back(32'($urandom_range(0, 1 << 26)));
      layout();
      evaluate();
    endfunction

    function logic [71:0] pack_x(logic [31:0] v[$], int k);
      logic [71:0] wd = '0;
      wd[31:0] = v[2*k];
      if (2*k + 1 < v.size()) wd[63:32] = v[2*k+1];
      return wd;
    endfunction

    function void layout();
      int ptr, maxd, nw, tw;
      logic [71:0] wd;
      logic [31:0] bl[$];
      maxd = 0;
      foreach (dims[i]) if (dims[i] > maxd) maxd = dims[i];
      act_a = 1 + 2 * 8;
      act_b = act_a + (maxd + 1) / 2;
      ptr   = act_b + (maxd + 1) / 2;
      img.delete();
      exp_skip = 0; exp_reads = 17; exp_ser = 0; n_tiles = 0;
      for (int k = 0; k < (dims[0] + 1) / 2; k++) img[act_a + k] = pack_x(x0, k);
      wd = '0; wd[7:0] = 8'(nl); wd[24:8] = 17'(act_a); wd[41:25] = 17'(act_b);
      img[0] = wd;
      for (int l = 0; l < nl; l++) begin
        int in_d = dims[l], out_d = dims[l+1], wbase, bbase;
        wbase = ptr;
        for (int t = 0; t * n_pu < out_d; t++) begin
          tw = (out_d - t * n_pu > n_pu) ? n_pu : out_d - t * n_pu;
          nw = (tw + wpw() - 1) / wpw();
          n_tiles++;
          exp_reads += longint'(in_d) * nw + (in_d + 1) / 2 + (tw + 1) / 2;
          exp_ser   += ternary ? tw : (tw + 1) / 2;
          for (int i = 0; i < in_d; i++) begin
            bit allz = 1;
            for (int k = 0; k < nw; k++) begin
              wd = '0;
              for (int j = 0; j < wpw(); j++) begin
                int row = t * n_pu + k * wpw() + j;
                if (k * wpw() + j < tw) begin
                  int v = w[woff[l] + row * in_d + i];
                  if (v != 0) allz = 0;
                  if (ternary) wd[j*2 +: 2] = (v == 1) ? 2'b01 : (v == -1) ? 2'b11 : 2'b00;
                  else for (int q = 0; q < wbits; q++) wd[j*wbits + q] = v[q];
                end
              end
              img[ptr] = wd; ptr++;
            end
            if (allz) exp_skip++;
          end
        end
        bbase = ptr;
        bl.delete();
        for (int o = 0; o < out_d; o++) bl.push_back(b[boff[l] + o]);
        for (int k = 0; k < (out_d + 1) / 2; k++) begin img[ptr] = pack_x(bl, k); ptr++; end
        wd = '0;
        wd[11:0] = 12'(in_d); wd[23:12] = 12'(out_d); wd[40:24] = 17'(wbase);
        wd[57:41] = 17'(bbase); wd[58] = relu[l]; wd[59] = quant[l]; wd[64:60] = 5'(qbits[l]);
        img[1 + 2*l] = wd;
        wd = '0; wd[31:0] = scale[l];
        img[2 + 2*l] = wd;
      end
    endfunction

    function void evaluate();
      logic [31:0] cur[$], nxt[$];
      logic [31:0] acc, y;
      cur = x0;
      n_relu_zero = 0; n_clip = 0; n_trunc = 0;
      for (int l = 0; l < nl; l++) begin
        nxt.delete();
        for (int o = 0; o < dims[l+1]; o++) begin
          acc = 0;
          for (int i = 0; i < dims[l]; i++) begin
            int v = w[woff[l] + o * dims[l] + i];
            if (ternary) acc = acc + ((v == 1) ? cur[i] : (v == -1) ? -cur[i] : 32'd0);
            else         acc = acc + ref_term(cur[i], v, wbits);
          end
          acc = acc + b[boff[l] + o];
          if (ternary) begin
            longint p = longint'($signed(acc)) * longint'($signed(scale[l]));
            p = p >>> 28;
            y = ref_aq(p[31:0], relu[l], quant[l], qbits[l]);
            acc = p[31:0];
          end else begin
            y = ref_aq(acc, relu[l], quant[l], qbits[l]);
          end
          if (relu[l] && $signed(acc) < 0) n_relu_zero++;
          if (quant[l] && $signed(acc) > $signed(32'(ONE_Q))) n_clip++;
          if (quant[l] && y != acc && $signed(acc) > 0 && $signed(acc) < $signed(32'(ONE_Q))) n_trunc++;
          nxt.push_back(y);
        end
        cur = nxt;
      end
      out = cur;
    endfunction
  endclass

endpackage
