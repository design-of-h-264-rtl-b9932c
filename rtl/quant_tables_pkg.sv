// Quantization and dequantization scale tables of H.264 (flat scaling
// matrices). Each table has one row per QP%6 and one entry per position
// class. 4x4 classes: 0 = (even,even), 1 = (odd,odd), 2 = other.
// 8x8 classes: 0 = (i%4==0, j%4==0), 1 = (odd,odd), 2 = (i%4==2, j%4==2),
// 3 = (i%4==0, j odd) or (i odd, j%4==0), 4 = (i%4==0, j%4==2) or
// (i%4==2, j%4==0), 5 = other. The QP%6 = 4 rows agree with the 4x4 and 8x8
// quantization parameter matrices printed for QP 28.
package quant_tables_pkg;
  function automatic int q4(input int qm, input int cls);
    case (qm)
      0: return cls == 0 ? 13107 : cls == 1 ? 5243 : 8066;
      1: return cls == 0 ? 11916 : cls == 1 ? 4660 : 7490;
      2: return cls == 0 ? 10082 : cls == 1 ? 4194 : 6554;
      3: return cls == 0 ? 9362  : cls == 1 ? 3647 : 5825;
      4: return cls == 0 ? 8192  : cls == 1 ? 3355 : 5243;
      default: return cls == 0 ? 7282 : cls == 1 ? 2893 : 4559;
    endcase
  endfunction
  function automatic int dq4(input int qm, input int cls);
    case (qm)
      0: return cls == 0 ? 10 : cls == 1 ? 16 : 13;
      1: return cls == 0 ? 11 : cls == 1 ? 18 : 14;
      2: return cls == 0 ? 13 : cls == 1 ? 20 : 16;
      3: return cls == 0 ? 14 : cls == 1 ? 23 : 18;
      4: return cls == 0 ? 16 : cls == 1 ? 25 : 20;
      default: return cls == 0 ? 18 : cls == 1 ? 29 : 23;
    endcase
  endfunction
  function automatic int q8(input int qm, input int cls);
    int t [6][6] = '{
      '{13107, 11428, 20972, 12222, 16777, 15481},
      '{11916, 10826, 19174, 11058, 14980, 14290},
      '{10082,  8943, 15978,  9675, 12710, 11985},
      '{ 9362,  8228, 14913,  8931, 11984, 11259},
      '{ 8192,  7346, 13159,  7740, 10486,  9777},
      '{ 7282,  6428, 11570,  6830,  9118,  8640}};
    return t[qm][cls];
  endfunction
  function automatic int dq8(input int qm, input int cls);
    int t [6][6] = '{
      '{20, 18, 32, 19, 25, 24},
      '{22, 19, 35, 21, 28, 26},
      '{26, 23, 42, 24, 33, 31},
      '{28, 25, 45, 26, 35, 33},
      '{32, 28, 51, 30, 40, 38},
      '{36, 32, 58, 34, 46, 43}};
    return t[qm][cls];
  endfunction
  function automatic int cls4(input int i, input int j);
    if (i % 2 == 0 && j % 2 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    return 2;
  endfunction
  function automatic int cls8(input int i, input int j);
    if (i % 4 == 0 && j % 4 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    if (i % 4 == 2 && j % 4 == 2) return 2;
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return 3;
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return 4;
    return 5;
  endfunction
endpackage
