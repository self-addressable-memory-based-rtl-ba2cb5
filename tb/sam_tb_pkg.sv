// sam_tb_pkg: testbench-side state-table compiler and reference model for
// the SAM-FSM engines.
//
// sam_table describes a machine as rows k = 1..n-1 (row 0 is the root):
//   str[k]   the string (1..4 characters) that labels every transition into
//            state k (one character for a plain state, a super character for
//            a collapsed state),
//   G_k      the group of k: the set of states that move to k on str[k],
//   match[k] the pattern id reported on entering k (0 = none).
// build_ac() fills it from a pattern list as a complete Aho-Corasick DFA
// (transitions found by longest-suffix search over the prefix strings);
// build_random() fills it with random super-character transitions.
// encode() then does the SAM-FSM state encoding: groups that share no state
// are packed into one cluster (greedy first fit, in row order), each group
// gets tag 1, 2, ... inside its cluster, a cluster takes ceil(log2(size+1))
// bits, and a state's code is the tags of all its groups at their cluster
// positions.  ref_step() is the reference next-state function: the longest
// row string that matches the window and whose group holds the state, else
// the root.  find_match() is an independent brute-force pattern search.
//
// Origin: the reference model, stimulus and checks are this testbench's own;
// expected values come from an independent model, not from the design.
package sam_tb_pkg;

  typedef logic [255:0] wide_t;

  class sam_table;
    int unsigned n;            // rows including the root
    string       str   [$];
    int unsigned match [$];
    bit          grp   [int];  // key k*65536+s : state s is in G_k
    // encoding results
    int unsigned code_w;
    wide_t       code  [$];
    wide_t       mask  [$];
    wide_t       tag   [$];
    int unsigned n_clusters;

    function bit in_g(int unsigned k, int unsigned s);
      return grp.exists(k * 65536 + s);
    endfunction

    // ------------------------------------------------ Aho-Corasick machine
    function void build_ac(string pats[$]);
      int    idx_of [string];
      string prefix [$];
      prefix.delete(); str.delete(); match.delete(); grp.delete();
      prefix.push_back(""); str.push_back(""); match.push_back(0);
      idx_of[""] = 0;
      foreach (pats[p])
        for (int i = 1; i <= pats[p].len(); i++) begin
          string pre = pats[p].substr(0, i - 1);
          if (!idx_of.exists(pre)) begin
            idx_of[pre] = prefix.size();
            prefix.push_back(pre);
            str.push_back(pre.substr(i - 1, i - 1));
            match.push_back(0);
          end
        end
      n = prefix.size();
      // match id: longest pattern that is a suffix of the state's prefix
      for (int unsigned s = 1; s < n; s++) begin
        int best = 0;
        foreach (pats[p]) begin
          int lp = pats[p].len(), ls = prefix[s].len();
          if (lp <= ls && prefix[s].substr(ls - lp, ls - 1) == pats[p])
            if (best == 0 || lp > pats[best-1].len()) best = p + 1;
        end
        match[s] = best;
      end
      // transitions: for every state and every character that labels a row,
      // the next state is the longest prefix that is a suffix of state+char
      begin
        bit    seen [byte];
        string chars;
        chars = "";
        for (int unsigned k = 1; k < n; k++)
          if (!seen.exists(str[k][0])) begin
            seen[str[k][0]] = 1'b1;
            chars = {chars, str[k]};
          end
        for (int unsigned s = 0; s < n; s++)
          for (int c = 0; c < chars.len(); c++) begin
            string t;
            t = {prefix[s], chars.substr(c, c)};
            for (int l = t.len(); l >= 1; l--)
              if (idx_of.exists(t.substr(t.len() - l, t.len() - 1))) begin
                grp[idx_of[t.substr(t.len() - l, t.len() - 1)] * 65536 + s] = 1'b1;
                break;
              end
          end
      end
    endfunction

    // -------------------------------------------- random super-char machine
    function void build_random(int unsigned rows, string alphabet, int unsigned max_len,
                               int unsigned n_pat, int unsigned pct_member);
      str.delete(); match.delete(); grp.delete();
      n = rows;
      str.push_back(""); match.push_back(0);
      for (int unsigned k = 1; k < n; k++) begin
        string s = "";
        int unsigned l = 1 + ($urandom % max_len);
        for (int unsigned j = 0; j < l; j++) begin
          int r = int'($urandom % alphabet.len());
          s = {s, alphabet.substr(r, r)};
        end
        str.push_back(s);
        match.push_back(($urandom % 3 == 0) ? 1 + ($urandom % n_pat) : 0);
        for (int unsigned s2 = 0; s2 < n; s2++)
          if (($urandom % 100) < pct_member) grp[k * 65536 + s2] = 1'b1;
      end
      // determinism: a state may not have two rows with the same string
      for (int unsigned s2 = 0; s2 < n; s2++)
        for (int unsigned k1 = 1; k1 < n; k1++)
          for (int unsigned k2 = k1 + 1; k2 < n; k2++)
            if (in_g(k1, s2) && in_g(k2, s2) && str[k1] == str[k2])
              grp.delete(k2 * 65536 + s2);
    endfunction

    // ------------------------------------------------------ state encoding
    function void encode();
      int unsigned cl_of [$];
      int unsigned ix_of [$];
      int unsigned cl_size [$];
      int unsigned cl_lsb [$];
      int unsigned cl_w [$];
      cl_of.delete(); ix_of.delete();
      cl_of.push_back(0); ix_of.push_back(0);
      // member lists per group, and per cluster the states already holding
      // one of its tags
      begin
        int unsigned members [int][$];
        bit          occ [int];
        foreach (grp[key]) members[key / 65536].push_back(key % 65536);
        for (int unsigned k = 1; k < n; k++) begin
          int found;
          found = -1;
          for (int unsigned c = 0; c < cl_size.size() && found < 0; c++) begin
            bit ok;
            ok = 1'b1;
            if (members.exists(k))
              foreach (members[k][i]) if (occ.exists(c * 65536 + members[k][i])) ok = 1'b0;
            if (ok) found = c;
          end
          if (found < 0) begin
            found = cl_size.size();
            cl_size.push_back(0);
          end
          if (members.exists(k))
            foreach (members[k][i]) occ[found * 65536 + members[k][i]] = 1'b1;
          cl_size[found]++;
          cl_of.push_back(found);
          ix_of.push_back(cl_size[found]);
        end
      end
      code_w = 0;
      n_clusters = cl_size.size();
      foreach (cl_size[c]) begin
        cl_lsb.push_back(code_w);
        cl_w.push_back($clog2(cl_size[c] + 1));
        code_w += $clog2(cl_size[c] + 1);
      end
      code.delete(); mask.delete(); tag.delete();
      for (int unsigned k = 0; k < n; k++) begin
        code.push_back('0);
        mask.push_back('0);
        tag.push_back('0);
      end
      for (int unsigned k = 1; k < n; k++) begin
        wide_t ones = (wide_t'(1) << cl_w[cl_of[k]]) - 1;
        mask[k] = ones << cl_lsb[cl_of[k]];
        tag[k]  = wide_t'(ix_of[k]) << cl_lsb[cl_of[k]];
        for (int unsigned s = 0; s < n; s++)
          if (in_g(k, s)) code[s] = code[s] | tag[k];
      end
    endfunction

    // ---------------------------------------------------- reference step
    // win: characters available from the current one on (at most 4)
    function void ref_step(int unsigned s, string win, output int unsigned nx,
                           output int unsigned len);
      nx = 0; len = 1;
      for (int unsigned k = 1; k < n; k++)
        if (in_g(k, s) && str[k].len() <= win.len() && str[k].len() >= len
            && win.substr(0, str[k].len() - 1) == str[k]) begin
          if (str[k].len() > len || nx == 0) begin
            nx = k;
            len = str[k].len();
          end
        end
    endfunction
  endclass

  // one character picked uniformly from `alphabet`, as a string
  function automatic string rand_char(string alphabet);
    int r = int'($urandom % alphabet.len());
    return alphabet.substr(r, r);
  endfunction

  // longest pattern ending at position i of text (1-based id), 0 if none
  function automatic int unsigned find_match(string pats[$], string text, int i);
    int unsigned best = 0;
    foreach (pats[p]) begin
      int lp = pats[p].len();
      if (lp <= i + 1 && text.substr(i - lp + 1, i) == pats[p])
        if (best == 0 || lp > pats[best-1].len()) best = p + 1;
    end
    return best;
  endfunction

endpackage
