// CABAC constants of H.264: the LPS range table rangeTabLPS[pStateIdx][q]
// (q = (codIRange >> 6) & 3) and the LPS state transition transIdxLPS.
// The MPS transition is min(pStateIdx + 1, 62), so it needs no table.
package cabac_pkg;
  typedef enum logic [1:0] { BIN_DECISION = 2'd0, BIN_BYPASS = 2'd1, BIN_TERMINATE = 2'd2 } bin_kind_e;

  typedef struct packed {
    logic       val;       // bin value
    bin_kind_e  kind;
    logic [9:0] ctx_idx;   // context index for decision bins
    logic       last;      // last bin of the slice (flush after it)
  } bin_t;

  function automatic logic [7:0] range_lps(input logic [5:0] s, input logic [1:0] q);
    logic [31:0] row;
    case (s)
       0: row = {8'd128,8'd176,8'd208,8'd240};  1: row = {8'd128,8'd167,8'd197,8'd227};
       2: row = {8'd128,8'd158,8'd187,8'd216};  3: row = {8'd123,8'd150,8'd178,8'd205};
       4: row = {8'd116,8'd142,8'd169,8'd195};  5: row = {8'd111,8'd135,8'd160,8'd185};
       6: row = {8'd105,8'd128,8'd152,8'd175};  7: row = {8'd100,8'd122,8'd144,8'd166};
       8: row = {8'd95,8'd116,8'd137,8'd158};   9: row = {8'd90,8'd110,8'd130,8'd150};
      10: row = {8'd85,8'd104,8'd123,8'd142};  11: row = {8'd81,8'd99,8'd117,8'd135};
      12: row = {8'd77,8'd94,8'd111,8'd128};   13: row = {8'd73,8'd89,8'd105,8'd122};
      14: row = {8'd69,8'd85,8'd100,8'd116};   15: row = {8'd66,8'd80,8'd95,8'd110};
      16: row = {8'd62,8'd76,8'd90,8'd104};    17: row = {8'd59,8'd72,8'd86,8'd99};
      18: row = {8'd56,8'd69,8'd81,8'd94};     19: row = {8'd53,8'd65,8'd77,8'd89};
      20: row = {8'd51,8'd62,8'd73,8'd85};     21: row = {8'd48,8'd59,8'd69,8'd80};
      22: row = {8'd46,8'd56,8'd66,8'd76};     23: row = {8'd43,8'd53,8'd63,8'd72};
      24: row = {8'd41,8'd50,8'd59,8'd69};     25: row = {8'd39,8'd48,8'd56,8'd65};
      26: row = {8'd37,8'd45,8'd54,8'd62};     27: row = {8'd35,8'd43,8'd51,8'd59};
      28: row = {8'd33,8'd41,8'd48,8'd56};     29: row = {8'd32,8'd39,8'd46,8'd53};
      30: row = {8'd30,8'd37,8'd43,8'd50};     31: row = {8'd29,8'd35,8'd41,8'd48};
      32: row = {8'd27,8'd33,8'd39,8'd45};     33: row = {8'd26,8'd31,8'd37,8'd43};
      34: row = {8'd24,8'd30,8'd35,8'd41};     35: row = {8'd23,8'd28,8'd33,8'd39};
      36: row = {8'd22,8'd27,8'd32,8'd37};     37: row = {8'd21,8'd26,8'd30,8'd35};
      38: row = {8'd20,8'd24,8'd29,8'd33};     39: row = {8'd19,8'd23,8'd27,8'd31};
      40: row = {8'd18,8'd22,8'd26,8'd30};     41: row = {8'd17,8'd21,8'd25,8'd28};
      42: row = {8'd16,8'd20,8'd23,8'd27};     43: row = {8'd15,8'd19,8'd22,8'd25};
      44: row = {8'd14,8'd18,8'd21,8'd24};     45: row = {8'd14,8'd17,8'd20,8'd23};
      46: row = {8'd13,8'd16,8'd19,8'd22};     47: row = {8'd12,8'd15,8'd18,8'd21};
      48: row = {8'd12,8'd14,8'd17,8'd20};     49: row = {8'd11,8'd14,8'd16,8'd19};
      50: row = {8'd11,8'd13,8'd15,8'd18};     51: row = {8'd10,8'd12,8'd15,8'd17};
      52: row = {8'd10,8'd12,8'd14,8'd16};     53: row = {8'd9,8'd11,8'd13,8'd15};
      54: row = {8'd9,8'd11,8'd12,8'd14};      55: row = {8'd8,8'd10,8'd12,8'd14};
      56: row = {8'd8,8'd9,8'd11,8'd13};       57: row = {8'd7,8'd9,8'd11,8'd12};
      58: row = {8'd7,8'd9,8'd10,8'd12};       59: row = {8'd7,8'd8,8'd10,8'd11};
      60: row = {8'd6,8'd8,8'd9,8'd11};        61: row = {8'd6,8'd7,8'd9,8'd10};
      62: row = {8'd6,8'd7,8'd8,8'd9};         default: row = {8'd2,8'd2,8'd2,8'd2};
    endcase
    return row[31 - 8*q -: 8];
  endfunction

  function automatic logic [5:0] trans_lps(input logic [5:0] s);
    logic [5:0] t [64] = '{
      6'd0, 6'd0, 6'd1, 6'd2, 6'd2, 6'd4, 6'd4, 6'd5, 6'd6, 6'd7, 6'd8, 6'd9, 6'd9, 6'd11, 6'd11, 6'd12,
      6'd13, 6'd13, 6'd15, 6'd15, 6'd16, 6'd16, 6'd18, 6'd18, 6'd19, 6'd19, 6'd21, 6'd21, 6'd22, 6'd22, 6'd23, 6'd24,
      6'd24, 6'd25, 6'd26, 6'd26, 6'd27, 6'd27, 6'd28, 6'd29, 6'd29, 6'd30, 6'd30, 6'd30, 6'd31, 6'd32, 6'd32, 6'd33,
      6'd33, 6'd33, 6'd34, 6'd34, 6'd35, 6'd35, 6'd35, 6'd36, 6'd36, 6'd36, 6'd37, 6'd37, 6'd37, 6'd38, 6'd38, 6'd63};
    return t[s];
  endfunction

  function automatic logic [5:0] trans_mps(input logic [5:0] s);
    return s < 6'd62 ? s + 6'd1 : s;
  endfunction
endpackage
