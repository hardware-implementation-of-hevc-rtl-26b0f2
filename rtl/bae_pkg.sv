// bae_pkg: types and constants shared by the HEVC CABAC binary arithmetic
// encoder (BAE).
//
// The BAE keeps the arithmetic-coder interval as a 10-bit ivlLow and a 9-bit
// ivlRange, as in the HEVC arithmetic encoding process, plus a count of
// outstanding (carry-pending) bits.  Every engine reports what its
// renormalization did as a short list of bit events, oldest first, in slot 0
// upwards:
//   EV_PUT0 / EV_PUT1  one PutBit(0) / PutBit(1) call of the HEVC encoder,
//                      which also releases the pending outstanding bits,
//   EV_OUT             one more outstanding bit,
//   EV_WR0 / EV_WR1    a raw bit written by the final flush (WriteBits).
// A bit packer outside the BAE turns these events into the bitstream.  The
// event list is this design's own addition: the engines of the original
// architecture only return ivlLow, ivlRange and the outstanding count.
//
// The package also holds the bin-mode table the controller uses to decide,
// from the syntax element index and the bin index, whether a bin is coded in
// regular, bypass or terminate mode.  The numbering of the syntax elements is
// this design's own; the mode of each bin follows the HEVC standard.
package bae_pkg;

  localparam int LOW_W     = 10;  // ivlLow
  localparam int RANGE_W   = 9;   // ivlRange
  localparam int PSTATE_W  = 6;   // pStateIdx
  localparam int OUTSTD_W  = 16;  // bitsOutstanding counter
  localparam int SYN_W     = 6;   // syntax element index
  localparam int BIN_W     = 32;  // bins per syntax element, bin k in bit k
  localparam int BINNUM_W  = 6;   // bin count of a syntax element (1..BIN_W)
  localparam int EV_SLOTS  = 10;  // bit events per cycle (flush: 7 + 1 + 2)

  localparam logic [RANGE_W-1:0] RANGE_INIT = 9'd510;

  typedef enum logic [1:0] {
    MODE_REGULAR = 2'd0,
    MODE_BYPASS  = 2'd1,
    MODE_TERM    = 2'd2
  } bae_mode_e;

  typedef enum logic [2:0] {
    EV_NONE = 3'd0,
    EV_PUT0 = 3'd1,
    EV_PUT1 = 3'd2,
    EV_OUT  = 3'd3,
    EV_WR0  = 3'd4,
    EV_WR1  = 3'd5
  } bae_ev_e;

  typedef bae_ev_e [EV_SLOTS-1:0] bae_evs_t;

  // Controller state, numbered as in the timing chart of the architecture:
  // 0 idle, 1 load, 3 first bin, 2 following bins.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_LOAD  = 2'd1,
    ST_NEXT  = 2'd2,
    ST_FIRST = 2'd3
  } bae_state_e;

  // Syntax element indices (this design's numbering).
  typedef enum logic [SYN_W-1:0] {
    SE_END_OF_SLICE_SEGMENT_FLAG  = 6'd0,
    SE_END_OF_SUBSET_ONE_BIT      = 6'd1,
    SE_PCM_FLAG                   = 6'd2,
    SE_SAO_MERGE_FLAG             = 6'd3,
    SE_SAO_TYPE_IDX               = 6'd4,
    SE_SAO_OFFSET_ABS             = 6'd5,
    SE_SAO_OFFSET_SIGN            = 6'd6,
    SE_SAO_BAND_POSITION          = 6'd7,
    SE_SAO_EO_CLASS               = 6'd8,
    SE_SPLIT_CU_FLAG              = 6'd9,
    SE_CU_TRANSQUANT_BYPASS_FLAG  = 6'd10,
    SE_CU_SKIP_FLAG               = 6'd11,
    SE_PRED_MODE_FLAG             = 6'd12,
    SE_PART_MODE                  = 6'd13,
    SE_PREV_INTRA_LUMA_PRED_FLAG  = 6'd14,
    SE_MPM_IDX                    = 6'd15,
    SE_REM_INTRA_LUMA_PRED_MODE   = 6'd16,
    SE_INTRA_CHROMA_PRED_MODE     = 6'd17,
    SE_RQT_ROOT_CBF               = 6'd18,
    SE_MERGE_FLAG                 = 6'd19,
    SE_MERGE_IDX                  = 6'd20,
    SE_INTER_PRED_IDC             = 6'd21,
    SE_REF_IDX                    = 6'd22,
    SE_MVP_FLAG                   = 6'd23,
    SE_SPLIT_TRANSFORM_FLAG       = 6'd24,
    SE_CBF_LUMA                   = 6'd25,
    SE_CBF_CHROMA                 = 6'd26,
    SE_ABS_MVD_GREATER0_FLAG      = 6'd27,
    SE_ABS_MVD_GREATER1_FLAG      = 6'd28,
    SE_ABS_MVD_MINUS2             = 6'd29,
    SE_MVD_SIGN_FLAG              = 6'd30,
    SE_CU_QP_DELTA_ABS            = 6'd31,
    SE_CU_QP_DELTA_SIGN_FLAG      = 6'd32,
    SE_TRANSFORM_SKIP_FLAG        = 6'd33,
    SE_LAST_SIG_COEFF_PREFIX      = 6'd34,
    SE_LAST_SIG_COEFF_SUFFIX      = 6'd35,
    SE_CODED_SUB_BLOCK_FLAG       = 6'd36,
    SE_SIG_COEFF_FLAG             = 6'd37,
    SE_COEFF_ABS_LEVEL_GREATER1   = 6'd38,
    SE_COEFF_ABS_LEVEL_GREATER2   = 6'd39,
    SE_COEFF_ABS_LEVEL_REMAINING  = 6'd40,
    SE_COEFF_SIGN_FLAG            = 6'd41
  } bae_syn_e;

  // Number of leading context-coded bins of a syntax element; the bins after
  // them are bypass coded.  0: all bins bypass.  BIN_W: all bins regular.
  function automatic int unsigned regular_bins(logic [SYN_W-1:0] syn);
    case (syn)
      SE_SAO_TYPE_IDX,
      SE_INTRA_CHROMA_PRED_MODE,
      SE_MERGE_IDX:                  return 1;
      SE_REF_IDX:                    return 2;
      SE_PART_MODE:                  return 3;
      SE_CU_QP_DELTA_ABS:            return 5;
      SE_SAO_OFFSET_ABS,
      SE_SAO_OFFSET_SIGN,
      SE_SAO_BAND_POSITION,
      SE_SAO_EO_CLASS,
      SE_MPM_IDX,
      SE_REM_INTRA_LUMA_PRED_MODE,
      SE_ABS_MVD_MINUS2,
      SE_MVD_SIGN_FLAG,
      SE_CU_QP_DELTA_SIGN_FLAG,
      SE_LAST_SIG_COEFF_SUFFIX,
      SE_COEFF_ABS_LEVEL_REMAINING,
      SE_COEFF_SIGN_FLAG:            return 0;
      default:                       return BIN_W;
    endcase
  endfunction

  // Encoding mode of bin number bin_idx of syntax element syn.
  function automatic bae_mode_e bin_mode(logic [SYN_W-1:0] syn,
                                         logic [BINNUM_W-1:0] bin_idx);
    if (syn == SE_END_OF_SLICE_SEGMENT_FLAG || syn == SE_END_OF_SUBSET_ONE_BIT ||
        syn == SE_PCM_FLAG)
      return MODE_TERM;
    else if (int'(bin_idx) < regular_bins(syn))
      return MODE_REGULAR;
    else
      return MODE_BYPASS;
  endfunction

endpackage
