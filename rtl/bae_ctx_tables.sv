// bae_ctx_tables: the three probability-state lookup tables of the regular
// encoding engine.
//
//   o_range_lps  = rangeTabLps[i_pstate][i_qidx]   (LPS sub-range, 8 bits)
//   o_trans_lps  = transIdxLps[i_pstate]           (next state after an LPS)
//   o_trans_mps  = transIdxMps[i_pstate]           (next state after an MPS)
//
// The tables are the fixed 64-state tables of the HEVC (and H.264) CABAC
// probability model.  Fully combinational: the outputs follow the inputs in
// the same cycle.  transIdxMps is computed (pStateIdx + 1, saturating at 62;
// state 63 is kept), the two other tables are constant arrays that synthesis
// turns into ROM logic.  The original regular engine names these three
// lookup blocks; their contents are the standard's.
module bae_ctx_tables
  import bae_pkg::*;
(
  input  logic [PSTATE_W-1:0] i_pstate,
  input  logic [1:0]          i_qidx,
  output logic [7:0]          o_range_lps,
  output logic [PSTATE_W-1:0] o_trans_lps,
  output logic [PSTATE_W-1:0] o_trans_mps
);

  localparam logic [7:0] RANGE_TAB_LPS [64][4] = '{
    '{8'd128, 8'd176, 8'd208, 8'd240}, '{8'd128, 8'd167, 8'd197, 8'd227},
    '{8'd128, 8'd158, 8'd187, 8'd216}, '{8'd123, 8'd150, 8'd178, 8'd205},
    '{8'd116, 8'd142, 8'd169, 8'd195}, '{8'd111, 8'd135, 8'd160, 8'd185},
    '{8'd105, 8'd128, 8'd152, 8'd175}, '{8'd100, 8'd122, 8'd144, 8'd166},
    '{8'd95,  8'd116, 8'd137, 8'd158}, '{8'd90,  8'd110, 8'd130, 8'd150},
    '{8'd85,  8'd104, 8'd123, 8'd142}, '{8'd81,  8'd99,  8'd117, 8'd135},
    '{8'd77,  8'd94,  8'd111, 8'd128}, '{8'd73,  8'd89,  8'd105, 8'd122},
    '{8'd69,  8'd85,  8'd100, 8'd116}, '{8'd66,  8'd80,  8'd95,  8'd110},
    '{8'd62,  8'd76,  8'd90,  8'd104}, '{8'd59,  8'd72,  8'd86,  8'd99},
    '{8'd56,  8'd69,  8'd81,  8'd94},  '{8'd53,  8'd65,  8'd77,  8'd89},
    '{8'd51,  8'd62,  8'd73,  8'd85},  '{8'd48,  8'd59,  8'd69,  8'd80},
    '{8'd46,  8'd56,  8'd66,  8'd76},  '{8'd43,  8'd53,  8'd63,  8'd72},
    '{8'd41,  8'd50,  8'd59,  8'd69},  '{8'd39,  8'd48,  8'd56,  8'd65},
    '{8'd37,  8'd45,  8'd54,  8'd62},  '{8'd35,  8'd43,  8'd51,  8'd59},
    '{8'd33,  8'd41,  8'd48,  8'd56},  '{8'd32,  8'd39,  8'd46,  8'd53},
    '{8'd30,  8'd37,  8'd43,  8'd50},  '{8'd29,  8'd35,  8'd41,  8'd48},
    '{8'd27,  8'd33,  8'd39,  8'd45},  '{8'd26,  8'd31,  8'd37,  8'd43},
    '{8'd24,  8'd30,  8'd35,  8'd41},  '{8'd23,  8'd28,  8'd33,  8'd39},
    '{8'd22,  8'd27,  8'd32,  8'd37},  '{8'd21,  8'd26,  8'd30,  8'd35},
    '{8'd20,  8'd24,  8'd29,  8'd33},  '{8'd19,  8'd23,  8'd27,  8'd31},
    '{8'd18,  8'd22,  8'd26,  8'd30},  '{8'd17,  8'd21,  8'd25,  8'd28},
    '{8'd16,  8'd20,  8'd23,  8'd27},  '{8'd15,  8'd19,  8'd22,  8'd25},
    '{8'd14,  8'd18,  8'd21,  8'd24},  '{8'd14,  8'd17,  8'd20,  8'd23},
    '{8'd13,  8'd16,  8'd19,  8'd22},  '{8'd12,  8'd15,  8'd18,  8'd21},
    '{8'd12,  8'd14,  8'd17,  8'd20},  '{8'd11,  8'd14,  8'd16,  8'd19},
    '{8'd11,  8'd13,  8'd15,  8'd18},  '{8'd10,  8'd12,  8'd15,  8'd17},
    '{8'd10,  8'd12,  8'd14,  8'd16},  '{8'd9,   8'd11,  8'd13,  8'd15},
    '{8'd9,   8'd11,  8'd12,  8'd14},  '{8'd8,   8'd10,  8'd12,  8'd14},
    '{8'd8,   8'd9,   8'd11,  8'd13},  '{8'd7,   8'd9,   8'd11,  8'd12},
    '{8'd7,   8'd9,   8'd10,  8'd12},  '{8'd7,   8'd8,   8'd10,  8'd11},
    '{8'd6,   8'd8,   8'd9,   8'd11},  '{8'd6,   8'd7,   8'd9,   8'd10},
    '{8'd6,   8'd7,   8'd8,   8'd9},   '{8'd2,   8'd2,   8'd2,   8'd2}
  };

  localparam logic [PSTATE_W-1:0] TRANS_IDX_LPS [64] = '{
    6'd0,  6'd0,  6'd1,  6'd2,  6'd2,  6'd4,  6'd4,  6'd5,
    6'd6,  6'd7,  6'd8,  6'd9,  6'd9,  6'd11, 6'd11, 6'd12,
    6'd13, 6'd13, 6'd15, 6'd15, 6'd16, 6'd16, 6'd18, 6'd18,
    6'd19, 6'd19, 6'd21, 6'd21, 6'd22, 6'd22, 6'd23, 6'd24,
    6'd24, 6'd25, 6'd26, 6'd26, 6'd27, 6'd27, 6'd28, 6'd29,
    6'd29, 6'd30, 6'd30, 6'd30, 6'd31, 6'd32, 6'd32, 6'd33,
    6'd33, 6'd33, 6'd34, 6'd34, 6'd35, 6'd35, 6'd35, 6'd36,
    6'd36, 6'd36, 6'd37, 6'd37, 6'd37, 6'd38, 6'd38, 6'd63
  };

  assign o_range_lps = RANGE_TAB_LPS[i_pstate][i_qidx];
  assign o_trans_lps = TRANS_IDX_LPS[i_pstate];
  assign o_trans_mps = (i_pstate >= 6'd62) ? i_pstate : i_pstate + 6'd1;

endmodule
