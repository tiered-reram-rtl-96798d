// tr_ref_pkg: reference models for the Tiered-ReRAM testbenches.
//
// Written independently of the RTL: FPC works on bit queues and picks the
// pattern of least size (ties to the lower prefix), the IDM state order is
// obtained by sorting the per-state latency table, and the cell mappings walk
// the stream from its top bit downward. Also generates random cache lines
// whose words follow the FPC patterns, so every compression ratio occurs.
package tr_ref_pkg;

  typedef bit bitq_t[$];

  // Per-state far-segment latency (0.1 ns) and energy (0.1 pJ), state 0..7.
  function automatic int lat_tenth_ns(int s);
    int t[8] = '{2552, 2868, 3383, 3830, 2900, 1920, 954, 142};
    return t[s];
  endfunction
  function automatic int energy_tenth_pj(int s);
    int t[8] = '{336, 411, 664, 940, 468, 243, 134, 18};
    return t[s];
  endfunction

  // States sorted by latency, fastest first.
  function automatic void sorted_states(output int order[8]);
    for (int i = 0; i < 8; i++) order[i] = i;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 7 - i; j++)
        if (lat_tenth_ns(order[j]) > lat_tenth_ns(order[j+1])) begin
          int t = order[j]; order[j] = order[j+1]; order[j+1] = t;
        end
  endfunction

  function automatic void push_bits(ref bitq_t q, input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  function automatic bit sext_ok(longint unsigned v, int from, int to);
    // v (to bits) equals the sign extension of its low `from` bits
    longint signed x;
    longint unsigned m;
    x = longint'(v << (64 - from)) >>> (64 - from);
    m = (to == 64) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << to) - 1);
    return (((x) & m) == (v & m));
  endfunction

  // FPC of one word: returns 1 when compressed; code bits MSB first.
  function automatic bit ref_fpc_word(longint unsigned w, ref bitq_t code);
    int best_p, best_n;
    int n[7];
    bit ok[7];
    ok[0] = (w == 0);                                  n[0] = 3;
    ok[1] = sext_ok(w, 8, 64);                          n[1] = 11;
    ok[2] = sext_ok(w, 16, 64);                         n[2] = 19;
    ok[3] = sext_ok(w, 32, 64);                         n[3] = 35;
    ok[4] = (w[31:0] == 0);                             n[4] = 35;
    ok[5] = sext_ok(w >> 32, 16, 32) && sext_ok(w & 64'hFFFF_FFFF, 16, 32);
                                                        n[5] = 35;
    ok[6] = (w[63:48] == w[47:32]) && (w[47:32] == w[31:16]) && (w[31:16] == w[15:0]);
                                                        n[6] = 19;
    best_p = -1; best_n = 99;
    for (int p = 0; p < 7; p++)
      if (ok[p] && n[p] < best_n) begin best_p = p; best_n = n[p]; end
    code.delete();
    if (best_p < 0) begin
      push_bits(code, w, 64);
      return 0;
    end
    push_bits(code, longint'(best_p), 3);
    case (best_p)
      1: push_bits(code, w, 8);
      2, 6: push_bits(code, w, 16);
      3: push_bits(code, w, 32);
      4: push_bits(code, w >> 32, 32);
      5: begin push_bits(code, w >> 32, 16); push_bits(code, w, 16); end
      default: ;
    endcase
    return 1;
  endfunction

  // Compress a line: stream (MSB-aligned, free bits 1), flags, saved.
  function automatic void ref_compress(input bit [511:0] line, output bit [511:0] stream,
                                       output bit [7:0] flags, output int saved);
    bitq_t all, code;
    for (int w = 7; w >= 0; w--) begin
      flags[w] = ref_fpc_word(line[64*w +: 64], code);
      foreach (code[k]) all.push_back(code[k]);
    end
    saved  = 512 - all.size();
    stream = '1;
    foreach (all[k]) stream[511 - k] = all[k];
  endfunction

  // IDM selection (2-bit flag) and 0-DFS selection (3-bit flag) by saved space.
  function automatic int ref_idm(int saved);
    if (saved >= 341) return 3;
    if (saved >= 170) return 2;
    if (saved >= 85)  return 1;
    return 0;
  endfunction
  function automatic int ref_dfs(int saved);
    if (saved >= 74) return 0;
    if (saved >= 40) return 1;
    if (saved >= 21) return 2;
    if (saved >= 11) return 3;
    return 4;
  endfunction

  // Bits of the stream taken `n` at a time from the top: value of the group
  // that starts `pos` bits below the top.
  function automatic int take(bit [511:0] s, int pos, int n);
    int v = 0;
    for (int k = 0; k < n; k++) v = (v << 1) | int'(s[511 - pos - k]);
    return v;
  endfunction

  // CIDM encoding of the 171 data cells.
  function automatic void ref_cidm(input bit [511:0] s, input int saved, output int cells[171]);
    int order[8];
    int mode, u;
    bit [512:0] slot;
    sorted_states(order);
    mode = ref_idm(saved);
    slot = {s, 1'b1};
    case (mode)
      3: for (int c = 170; c >= 0; c--) cells[c] = order[1 - take(s, 170 - c, 1)];
      2: for (int c = 170; c >= 0; c--) cells[c] = order[3 - take(s, 2*(170 - c), 2)];
      1: begin
        for (int j = 0; j < 85; j++) begin
          u = 31 - take(s, 5*j, 5);
          cells[170 - 2*j] = order[u / 6];
          cells[169 - 2*j] = order[u % 6];
        end
        cells[0] = order[3 - take(s, 425, 2)];
      end
      default: for (int c = 0; c < 171; c++) cells[c] = int'(slot[3*c +: 3]);
    endcase
  endfunction

  // CFS encoding of the 171 data cells.
  function automatic void ref_cfs(input bit [511:0] s, input int saved, output int cells[171]);
    bit [512:0] slot, res;
    int len, occ, w, groups, ones, cnt, c;
    bit flip;
    slot = {s, 1'b1};
    res  = slot;
    len  = 512 - saved;
    occ  = (len + 2) / 3;
    case (ref_dfs(saved))
      0: w = 2;
      1: w = 4;
      2: w = 8;
      3: w = 16;
      default: w = 0;
    endcase
    if (w != 0) begin
      groups = (occ + w - 1) / w;
      for (int g = 0; g < groups; g++) begin
        ones = 0; cnt = 0;
        for (int k = 0; k < w; k++) begin
          c = 170 - g*w - k;
          if (c >= 171 - occ) begin cnt++; ones += int'(slot[3*c+2]); end
        end
        flip = (ones > cnt - ones);
        for (int k = 0; k < w; k++) begin
          c = 170 - g*w - k;
          if (c >= 171 - occ && flip) res[3*c+2] = !slot[3*c+2];
        end
        res[g] = flip;
      end
    end
    for (int i = 0; i < 171; i++) cells[i] = int'(res[3*i +: 3]);
  endfunction

  // Write latency in tCK = 1.5 ns cycles and energy in fJ for the full cell
  // image (data and flag cells), for the segment given.
  function automatic int ref_wr_cycles(int cells[175], bit near_seg);
    int worst = 0;
    longint ps;
    for (int i = 0; i < 175; i++)
      if (lat_tenth_ns(cells[i]) > worst) worst = lat_tenth_ns(cells[i]);
    ps = 18000 + 13000 + (near_seg ? longint'(worst) * 40 : longint'(worst) * 100);
    return int'((ps + 1499) / 1500);
  endfunction
  function automatic longint ref_wr_energy(int cells[175], bit near_seg);
    longint e = 0;
    for (int i = 0; i < 175; i++) e += energy_tenth_pj(cells[i]) * 100;
    return near_seg ? e * 42 / 100 : e;
  endfunction

  // Cells of an image in a low-resistance state (MSB 1).
  function automatic int ref_msb1(int cells[175]);
    int n = 0;
    for (int i = 0; i < 175; i++) n += int'(cells[i] >= 4);
    return n;
  endfunction

  // MSB-1 cells the far segment would hold without flipping (plain CDM).
  function automatic int ref_msb1_noflip(bit [511:0] line);
    bit [511:0] s;
    bit [7:0] flags;
    int sv, n;
    bit [512:0] slot;
    ref_compress(line, s, flags, sv);
    slot = {s, 1'b1};
    n = 0;
    for (int i = 0; i < 171; i++) n += int'(slot[3*i+2]);
    return n;
  endfunction

  // Full cell image of a line: data cells then the four flag cells
  // {1, scheme flag, compression flags} (three bits per cell).
  function automatic void ref_image(input bit [511:0] line, input bit near_seg,
                                    output int cells[175], output int saved);
    bit [511:0] s;
    bit [7:0] flags;
    int d[171];
    bit [11:0] fb;
    ref_compress(line, s, flags, saved);
    if (near_seg) ref_cidm(s, saved, d); else ref_cfs(s, saved, d);
    for (int i = 0; i < 171; i++) cells[i] = d[i];
    fb = {1'b1, near_seg ? 3'(ref_idm(saved)) : 3'(ref_dfs(saved)), flags};
    for (int k = 0; k < 4; k++) cells[171 + k] = int'(fb[3*k +: 3]);
  endfunction

  // Random word of FPC kind k (0..7; 7 = random 64-bit).
  function automatic longint unsigned gen_word(int k);
    longint unsigned r = {$urandom(), $urandom()};
    case (k)
      0: return 0;
      1: return longint'(signed'(8'(r)));
      2: return longint'(signed'(16'(r)));
      3: return {4{r[15:0]}};
      4: return longint'(signed'(32'(r)));
      5: return {r[63:32], 32'd0};
      6: return {{16{r[47]}}, r[47:32], {16{r[15]}}, r[15:0]};
      default: return r;
    endcase
  endfunction

  // Random line: each word is compressible with probability pc/8.
  function automatic bit [511:0] gen_line(int pc);
    bit [511:0] l;
    for (int w = 0; w < 8; w++)
      l[64*w +: 64] = gen_word((($urandom() % 8) < pc) ? int'($urandom() % 7) : 7);
    return l;
  endfunction

endpackage
