// plc_tb_pkg: testbench support for the product-term PLC.
//
// plc_prog describes one configuration of a ptb_plc of given dimensions in
// two independent forms:
//   - as the serial bitstream (bits[], bit 0 is shifted in first), laid out
//     by the chain order and field layouts documented in ptb_plc, ptb and
//     ptb_switch;
//   - as a table of what each multiplexer selects and which literals and
//     product terms each PTB uses, from which eval() computes the core's
//     outputs directly, without looking at the bitstream.
// The setters write both forms. Testbenches load bits[] into the core and
// compare what the core does with eval().
package plc_tb_pkg;

  function automatic int sel_w(int n);
    return $clog2(n + 1);
  endfunction

  class plc_prog;
    // Dimensions.
    int n_in, n_out, levels, pi_, pp, po, seq, n_reg;
    int nptb[];
    // Derived.
    int nptb_tot, n_regsig, comb_base, bus_w, nseg, total;
    int seg_len[], seg_base[];
    bit bits[];
    // Behaviour tables.
    int sw_code[][];       // [level or levels (output)][destination]
    int reg_code[];        // decoupled register input selects
    bit lit_t[][][];       // [ptb][term][input]
    bit lit_c[][][];
    bit orb[][][];         // [ptb][output][term]

    function new(int n_in_, int n_out_, int nptb_[], int i_, int p_, int o_,
                 int seq_, int n_reg_);
      int s;
      n_in = n_in_; n_out = n_out_; nptb = nptb_; levels = nptb_.size();
      pi_ = i_; pp = p_; po = o_; seq = seq_; n_reg = n_reg_;
      nptb_tot = 0;
      foreach (nptb[l]) nptb_tot += nptb[l];
      n_regsig = (seq == 1) ? nptb_tot * po : (seq == 2) ? n_reg : 0;
      comb_base = n_in + n_regsig;
      bus_w = comb_base + nptb_tot * po;
      nseg = nptb_tot + levels + 1 + ((seq == 2) ? 1 : 0);
      seg_len = new[nseg];
      seg_base = new[nseg];
      s = 0;
      for (int l = 0; l < levels; l++) begin
        seg_len[s++] = nptb[l] * pi_ * sel_w(n_src(l));
        for (int k = 0; k < nptb[l]; k++) seg_len[s++] = 2 * pi_ * pp + pp * po;
      end
      seg_len[s++] = n_out * sel_w(bus_w);
      if (seq == 2) seg_len[s++] = n_reg * sel_w(nptb_tot * po);
      total = 0;
      for (int t = nseg - 1; t >= 0; t--) begin
        seg_base[t] = total;
        total += seg_len[t];
      end
      bits = new[total];
      sw_code = new[levels + 1];
      for (int l = 0; l < levels; l++) sw_code[l] = new[nptb[l] * pi_];
      sw_code[levels] = new[n_out];
      reg_code = new[n_reg];
      lit_t = new[nptb_tot]; lit_c = new[nptb_tot]; orb = new[nptb_tot];
      for (int g = 0; g < nptb_tot; g++) begin
        lit_t[g] = new[pp]; lit_c[g] = new[pp]; orb[g] = new[po];
        for (int t = 0; t < pp; t++) begin
          lit_t[g][t] = new[pi_]; lit_c[g][t] = new[pi_];
        end
        for (int k = 0; k < po; k++) orb[g][k] = new[pp];
      end
    endfunction

    function int ptb_before(int l);
      int n = 0;
      for (int m = 0; m < l; m++) n += nptb[m];
      return n;
    endfunction

    function int n_src(int l);
      return comb_base + ptb_before(l) * po;
    endfunction

    // Select codes for the sources of a switch.
    function int c_pi(int i);             return 1 + i;                  endfunction
    function int c_reg(int r);            return 1 + n_in + r;           endfunction
    function int c_ptb(int l, int k, int o);
      return 1 + comb_base + (ptb_before(l) + k) * po + o;
    endfunction
    // Dual network: registered copy of a PTB output.
    function int c_ff(int l, int k, int o);
      return 1 + n_in + (ptb_before(l) + k) * po + o;
    endfunction
    // Register-array code for a PTB output.
    function int r_ptb(int l, int k, int o);
      return 1 + (ptb_before(l) + k) * po + o;
    endfunction

    function void put_field(int seg, int lsb, int w, int v);
      for (int b = 0; b < w; b++) bits[seg_base[seg] + lsb + b] = v[b];
    endfunction

    function int sw_seg(int l);
      return (l == levels) ? nptb_tot + levels : ptb_before(l) + l;
    endfunction

    // Switch of level l (l == levels: output switch), destination d.
    function void set_sw(int l, int d, int code);
      int w = sel_w((l == levels) ? bus_w : n_src(l));
      sw_code[l][d] = code;
      put_field(sw_seg(l), d * w, w, code);
    endfunction

    // PTB input j of PTB k in level l.
    function void route(int l, int k, int j, int code);
      set_sw(l, k * pi_ + j, code);
    endfunction

    function void set_reg(int r, int code);
      int w = sel_w(nptb_tot * po);
      reg_code[r] = code;
      put_field(nseg - 1, r * w, w, code);
    endfunction

    function void set_lit(int l, int k, int t, int j, bit comp, bit v = 1);
      int g = ptb_before(l) + k;
      if (comp) lit_c[g][t][j] = v; else lit_t[g][t][j] = v;
      bits[seg_base[sw_seg(l) + 1 + k] + t * 2 * pi_ + 2 * j + comp] = v;
    endfunction

    function void set_or(int l, int k, int o, int t, bit v = 1);
      int g = ptb_before(l) + k;
      orb[g][o][t] = v;
      bits[seg_base[sw_seg(l) + 1 + k] + 2 * pi_ * pp + o * pp + t] = v;
    endfunction

    // Behavioural evaluation. regs holds the registered signals (dual: one
    // per PTB output; decoupled: one per register). Returns the primary
    // outputs; comb receives every PTB output.
    function void eval(bit pin[], bit regs[], output bit pout[], output bit comb[]);
      bit src[];
      int g;
      src = new[bus_w];
      comb = new[nptb_tot * po];
      for (int i = 0; i < n_in; i++) src[i] = pin[i];
      for (int r = 0; r < n_regsig; r++) src[n_in + r] = regs[r];
      for (int l = 0; l < levels; l++) begin
        for (int k = 0; k < nptb[l]; k++) begin
          bit x[];
          bit term[];
          x = new[pi_];
          term = new[pp];
          g = ptb_before(l) + k;
          for (int j = 0; j < pi_; j++) begin
            int c = sw_code[l][k * pi_ + j];
            x[j] = (c >= 1 && c <= n_src(l)) ? src[c - 1] : 1'b0;
          end
          for (int t = 0; t < pp; t++) begin
            term[t] = 1;
            for (int j = 0; j < pi_; j++) begin
              if (lit_t[g][t][j] && !x[j]) term[t] = 0;
              if (lit_c[g][t][j] &&  x[j]) term[t] = 0;
            end
          end
          for (int o = 0; o < po; o++) begin
            bit v = 0;
            for (int t = 0; t < pp; t++) v |= term[t] & orb[g][o][t];
            comb[g * po + o] = v;
            src[comb_base + g * po + o] = v;
          end
        end
      end
      pout = new[n_out];
      for (int d = 0; d < n_out; d++) begin
        int c = sw_code[levels][d];
        pout[d] = (c >= 1 && c <= bus_w) ? src[c - 1] : 1'b0;
      end
    endfunction

    // Next value of the registered signals after a clock edge.
    function void next_regs(bit comb[], ref bit regs[]);
      if (seq == 1) begin
        for (int r = 0; r < n_regsig; r++) regs[r] = comb[r];
      end else if (seq == 2) begin
        for (int r = 0; r < n_reg; r++) begin
          int c = reg_code[r];
          regs[r] = (c >= 1 && c <= nptb_tot * po) ? comb[c - 1] : 1'b0;
        end
      end
    endfunction

    // Fill the whole configuration with random values: switch codes over
    // the legal range, sparse literals, some OR connections.
    function void randomize_all();
      for (int l = 0; l <= levels; l++)
        for (int d = 0; d < sw_code[l].size(); d++)
          set_sw(l, d, $urandom_range((l == levels) ? bus_w : n_src(l), 0));
      for (int l = 0; l < levels; l++)
        for (int k = 0; k < nptb[l]; k++)
          for (int t = 0; t < pp; t++) begin
            for (int j = 0; j < pi_; j++) begin
              set_lit(l, k, t, j, 0, ($urandom_range(7, 0) == 0));
              set_lit(l, k, t, j, 1, ($urandom_range(7, 0) == 0));
            end
            for (int o = 0; o < po; o++) set_or(l, k, o, t, ($urandom_range(2, 0) == 0));
          end
      for (int r = 0; r < n_reg; r++)
        if (seq == 2) set_reg(r, $urandom_range(nptb_tot * po, 0));
    endfunction
  endclass

endpackage
