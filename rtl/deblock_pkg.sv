// Deblocking filter thresholds of H.264: alpha(indexA), beta(indexB) and
// tc0(indexA, bS) for bS = 1..3. All are zero below index 16 (tc0 below 17).
package deblock_pkg;
  function automatic int alpha_tab(input int i);
    int t [36] = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,
                   80,90,101,113,127,144,162,182,203,226,255,255};
    return i < 16 ? 0 : t[i-16];
  endfunction
  function automatic int beta_tab(input int i);
    int t [36] = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,
                   13,13,14,14,15,15,16,16,17,17,18,18};
    return i < 16 ? 0 : t[i-16];
  endfunction
  function automatic int tc0_tab(input int i, input int bs);
    int t1 [35] = '{0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
    int t2 [35] = '{0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
    int t3 [35] = '{1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};
    if (i < 17) return 0;
    case (bs)
      1: return t1[i-17];
      2: return t2[i-17];
      default: return t3[i-17];
    endcase
  endfunction
endpackage
