// Testbench helper: builds a Tree Bitmap (4-bit stride) from a prefix list into a
// memory image, and gives the reference longest-prefix match by linear search.
// Node slot: 4 words; word0 = {ext[15:0], child_ptr[15:0]},
// word1 = {int[14:0], 1'b0, nh_ptr[15:0]}; next hops at {nh_ptr,2'b00}+k.
// Prefix lengths 0..31.
int unsigned pfx_val [$];
int unsigned pfx_len [$];
int unsigned pfx_nh  [$];

function automatic bit pfx_covers(int unsigned val, int unsigned len, int unsigned ip);
  if (len == 0) return 1;
  return ((val ^ ip) >> (32 - len)) == 0;
endfunction

// Reference: longest match by linear search (a later duplicate replaces an earlier one).
function automatic bit ref_lookup(int unsigned ip, output int unsigned nh, output int unsigned plen);
  bit found = 0;
  nh = 0; plen = 0;
  foreach (pfx_val[i])
    if (pfx_covers(pfx_val[i], pfx_len[i], ip) && (!found || pfx_len[i] >= plen)) begin
      found = 1; plen = pfx_len[i]; nh = pfx_nh[i];
    end
  return found;
endfunction

// Nodes on the lookup path: 1 + deepest k (<=7) with a prefix of length >= 4k
// on the path.
function automatic int ref_nodes(int unsigned ip);
  int n = 1;
  for (int k = 1; k <= 7; k++)
    foreach (pfx_val[i])
      if (pfx_len[i] >= 4*k && pfx_covers(pfx_val[i], 4*k, ip) && k + 1 > n) n = k + 1;
  return n;
endfunction

// Builds the trie image into `TBM_MEM (a 2^18-word array) from the prefix list.
task automatic build_trie();
  int unsigned qd[$], qv[$], qa[$];
  int unsigned next_free = 1, nh_free = 32'h8000;
  for (int i = 0; i < 2**18; i++) `TBM_MEM[i] = '0;
  qd.push_back(0); qv.push_back(0); qa.push_back(0);
  while (qd.size() > 0) begin
    int unsigned d = qd.pop_front(), v = qv.pop_front(), a = qa.pop_front();
    logic [14:0] ibm = '0; logic [15:0] ebm = '0;
    int unsigned nhs[15]; int nres = 0; int unsigned cptr = next_free;
    for (int p = 0; p < 15; p++) nhs[p] = 0;
    foreach (pfx_val[i]) begin
      if (pfx_len[i] >= d && pfx_len[i] < d + 4 && pfx_covers(v, d, pfx_val[i])) begin
        int unsigned l = pfx_len[i] - d;
        int unsigned bits = (l == 0) ? 0 : ((pfx_val[i] << d) >> (32 - l));
        int unsigned p = (1 << l) - 1 + bits;
        ibm[14 - p] = 1; nhs[p] = pfx_nh[i];
      end
      if (d < 28 && pfx_len[i] >= d + 4 && pfx_covers(v, d, pfx_val[i]))
        ebm[15 - ((pfx_val[i] << d) >> 28)] = 1;
    end
    for (int s = 0; s < 16; s++) if (ebm[15 - s]) begin
      qd.push_back(d + 4);
      qv.push_back(v | (s << (28 - d)));
      qa.push_back(next_free);
      next_free++;
    end
    for (int p = 0; p < 15; p++) if (ibm[14 - p]) begin
      `TBM_MEM[nh_free*4 + nres] = nhs[p]; nres++;
    end
    `TBM_MEM[a*4]     = {ebm, cptr[15:0]};
    `TBM_MEM[a*4 + 1] = {ibm, 1'b0, nh_free[15:0]};
    nh_free += (nres + 3) / 4;
  end
endtask


task automatic add(int unsigned v, int unsigned l, int unsigned nh);
  pfx_val.push_back(l == 0 ? 0 : (v & ~((32'hFFFF_FFFF) >> l))); pfx_len.push_back(l); pfx_nh.push_back(nh);
endtask
