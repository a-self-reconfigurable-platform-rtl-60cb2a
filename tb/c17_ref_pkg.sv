// c17_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: LUT fault vectors, the C17 gate-level netlist,
// the LUT-mapped C17, and a fault simulator that counts what a campaign
// must report.
package c17_ref_pkg;

  // fault kinds, same encoding as the design's messages
  localparam int K_NONE = 0, K_IN0 = 1, K_IN1 = 2, K_OUT0 = 3, K_OUT1 = 4, K_FLIP = 5;

  function automatic logic [15:0] ref_inject(logic [15:0] v, int kind, int idx);
    logic [15:0] r;
    r = v;
    for (int n = 0; n < 16; n++) begin
      int src;
      src = n;
      if (kind == K_IN0 && ((n >> idx) & 1) == 1) src = n - (1 << idx);
      if (kind == K_IN1 && ((n >> idx) & 1) == 0) src = n + (1 << idx);
      r[n] = v[src];
      if (kind == K_OUT0) r[n] = 1'b0;
      if (kind == K_OUT1) r[n] = 1'b1;
      if (kind == K_FLIP && n == idx) r[n] = ~v[n];
    end
    return r;
  endfunction

  // gate-level C17 (six NAND gates); p = {in1,in2,in3,in6,in7}
  function automatic logic [1:0] c17_gates(logic [4:0] p);
    logic in1, in2, in3, in6, in7, n10, n11, n16, n19;
    {in1, in2, in3, in6, in7} = p;
    n10 = ~(in1 & in3);
    n11 = ~(in3 & in6);
    n16 = ~(in2 & n11);
    n19 = ~(n11 & in7);
    return {~(n10 & n16), ~(n16 & n19)};   // {out22, out23}
  endfunction

  // LUT-mapped C17 with arbitrary vectors; returns {out22, out23}
  function automatic logic [1:0] c17_luts(logic [3:0][15:0] L, logic [4:0] p);
    logic in1, in2, in3, in6, in7, n16, n19, o22, o23;
    {in1, in2, in3, in6, in7} = p;
    n16 = L[0][{1'b0, in2, in6, in3}];
    o22 = L[1][{1'b0, n16, in1, in3}];
    n19 = L[2][{1'b0, in7, in6, in3}];
    o23 = L[3][{2'b00, n19, n16}];
    return {o22, o23};
  endfunction

  localparam logic [3:0][15:0] C17_INIT = {16'h7777, 16'h8F8F, 16'h8F8F, 16'h8F8F};
  localparam int NIN [4] = '{3, 3, 3, 2};

  // pattern list of a mode: 0 counter, 1 LFSR x^5+x^3+1 seed 1, 2 stored
  function automatic int num_patterns(int mode);
    return mode == 0 ? 32 : (mode == 1 ? 31 : 12);
  endfunction
  function automatic logic [4:0] pattern_at(int mode, int k);
    logic [4:0] s;
    int det [12] = '{'h0F, 'h13, 'h0A, 'h14, 'h0D, 'h00, 'h05, 'h06, 'h18, 'h01, 'h02, 'h1C};
    if (mode == 0) return 5'(k);
    if (mode == 2) return 5'(det[k]);
    s = 5'd1;
    for (int i = 0; i < k; i++) s = {s[3:0], s[4] ^ s[2]};
    return s;
  endfunction

  // fault simulation of a whole campaign
  typedef struct { int injected; int detected; int detections; } result_t;
  function automatic result_t campaign(int mode, bit contents);
    result_t r;
    r = '{0, 0, 0};
    for (int l = 0; l < 4; l++) begin
      int kinds [$];
      int idxs  [$];
      for (int i = 0; i < NIN[l]; i++) begin kinds.push_back(K_IN0); idxs.push_back(i);
                                            kinds.push_back(K_IN1); idxs.push_back(i); end
      kinds.push_back(K_OUT0); idxs.push_back(0);
      kinds.push_back(K_OUT1); idxs.push_back(0);
      if (contents) for (int i = 0; i < (1 << NIN[l]); i++) begin kinds.push_back(K_FLIP); idxs.push_back(i); end
      foreach (kinds[f]) begin
        logic [3:0][15:0] L;
        int hits;
        L = C17_INIT;
        L[l] = ref_inject(L[l], kinds[f], idxs[f]);
        hits = 0;
        for (int k = 0; k < num_patterns(mode); k++)
          if (c17_luts(L, pattern_at(mode, k)) != c17_gates(pattern_at(mode, k))) hits++;
        r.injected++;
        r.detections += hits;
        if (hits > 0) r.detected++;
      end
    end
    return r;
  endfunction
endpackage
